// tb_n105_regfile -- self-checking testbench of n105_regfile.
//
// Checks the reset value, then random writes and reads on both read ports
// against a shadow copy, including reading a register in the cycle after it
// was written and a write with we low.
module tb_n105_regfile;
  import n105_pkg::*;

  logic clk = 0, rst = 1, we = 0;
  regidx_t ra_idx, rb_idx, wr_idx;
  word_t ra_data, rb_data, wr_data;
  word_t shadow [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  n105_regfile u_dut (.clk, .rst, .ra_idx, .ra_data, .rb_idx, .rb_data, .we, .wr_idx, .wr_data);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    ra_idx = 0; rb_idx = 0; wr_idx = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 16; i++) begin
      shadow[i] = '0;
      ra_idx = 4'(i); rb_idx = 4'(15 - i); #1;
      chk(ra_data == 0 && rb_data == 0, $sformatf("reset r%0d", i));
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      // check last cycle's write through both ports
      ra_idx = 4'($urandom); rb_idx = 4'($urandom); #1;
      chk(ra_data == shadow[ra_idx], $sformatf("port A r%0d = %h, expected %h", ra_idx, ra_data, shadow[ra_idx]));
      chk(rb_data == shadow[rb_idx], $sformatf("port B r%0d = %h, expected %h", rb_idx, rb_data, shadow[rb_idx]));
      we = ($urandom_range(3, 0) != 0); wr_idx = 4'($urandom); wr_data = 16'($urandom);
      @(posedge clk);
      if (we) shadow[wr_idx] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
