// tb_n105_flags -- self-checking testbench of n105_flags.
//
// Random per-flag updates are compared with a shadow flag register; after
// each update all sixteen condition codes are evaluated and compared with
// the condition formulas of the IFS table, computed here.
module tb_n105_flags;
  import n105_pkg::*;

  logic clk = 0, rst = 1;
  flags_t we, d, q;
  cond_e cc;
  logic cond_true;
  bit sn, sv, sz, sc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  n105_flags u_dut (.clk, .rst, .we, .d, .cc, .q, .cond_true);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit expect_cc(int c);
    case (c)
      0: return !sc;  1: return sc;  2: return !sz; 3: return sz;
      4: return !sn;  5: return sn;  6: return sn ^ sv; 7: return !(sn ^ sv);
      8: return !(sz | (sn ^ sv));   9: return sz | (sn ^ sv);
      10: return !sv; 11: return sv; 12: return !(sc | sz); 13: return sc | sz;
      14: return 1;   default: return 0;
    endcase
  endfunction

  initial begin
    we = '0; d = '0; cc = CC_CC;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    sn = 0; sv = 0; sz = 0; sc = 0;
    for (int n = 0; n < 3000; n++) begin
      for (int c = 0; c < 16; c++) begin
        cc = cond_e'(c); #1;
        checks++;
        if (cond_true != expect_cc(c)) begin
          failures++;
          if (failures < 10) $display("FAIL cc=%0d nvzc=%b%b%b%b got %b", c, sn, sv, sz, sc, cond_true);
        end
      end
      checks++;
      if (q != {sn, sv, sz, sc}) begin failures++; $display("FAIL q=%b", q); end
      we = 4'($urandom); d = 4'($urandom);
      @(posedge clk);
      if (we.n) sn = d.n; if (we.v) sv = d.v; if (we.z) sz = d.z; if (we.c) sc = d.c;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
