// tb_n105_lsu -- self-checking testbench of n105_lsu.
//
// An execute-stage model issues random loads and stores, holding each
// request until done, to a behavioural Avalon memory with random wait
// states. Load data is compared with a shadow copy of the memory, and every
// store is checked in the memory. With a fixed number w of wait states, a
// transfer must finish in 2 + w cycles; stall must be high for all cycles of
// the request but the last.
module tb_n105_lsu;
  import n105_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic req_ld, req_st, stall, done, d_read, d_write, d_waitrequest;
  logic [15:0] addr, d_address;
  word_t wdata, rdata, d_writedata, d_readdata;
  logic [15:0] shadow [1024];
  int checks = 0, failures = 0;

  n105_lsu u_dut (.clk, .rst, .req_ld, .req_st, .addr, .wdata, .stall, .done, .rdata,
                  .d_address, .d_read, .d_write, .d_writedata, .d_readdata, .d_waitrequest);
  n105_avalon_mem #(.DEPTH(1024)) u_mem (.clk, .rst, .address(d_address), .read(d_read),
                  .write(d_write), .writedata(d_writedata), .readdata(d_readdata),
                  .waitrequest(d_waitrequest));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  // one transfer; returns its length in cycles
  task automatic xfer(bit is_ld, int unsigned a, output int unsigned len);
    @(negedge clk);
    req_ld = is_ld; req_st = !is_ld; addr = 16'(a * 2); wdata = 16'($urandom);
    len = 0;
    forever begin
      #1;
      len++;
      if (done) break;
      chk(stall, "stall low before done");
      @(negedge clk);
      if (len > 100) begin chk(0, "transfer never done"); break; end
    end
    chk(!stall, "stall high with done");
    if (is_ld) chk(rdata == shadow[a], $sformatf("load [%0d] = %h, expected %h", a, rdata, shadow[a]));
    else shadow[a] = wdata;
    @(posedge clk); #1;
    req_ld = 0; req_st = 0;
    if (!is_ld) chk(u_mem.mem[a] == shadow[a], $sformatf("store [%0d]", a));
  endtask

  initial begin
    int unsigned len;
    req_ld = 0; req_st = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 1024; i++) begin shadow[i] = 16'($urandom); u_mem.mem[i] = shadow[i]; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    u_mem.cfg_rand = 1; u_mem.cfg_max = 4;
    for (int n = 0; n < 3000; n++) begin
      xfer($urandom_range(1, 0), $urandom_range(1023, 0), len);
      if ($urandom_range(3, 0) == 0) repeat ($urandom_range(3, 1)) @(posedge clk);
    end
    u_mem.cfg_rand = 0;
    for (int w = 0; w < 4; w++) begin
      u_mem.cfg_wait = w;
      xfer(1'b1, 0, len);  // the memory picks a transfer's wait count at the previous one
      for (int n = 0; n < 20; n++) begin
        xfer(n % 2 == 0, $urandom_range(1023, 0), len);
        chk(len == 2 + w, $sformatf("wait %0d: transfer took %0d cycles, expected %0d", w, len, 2 + w));
      end
    end
    chk(u_mem.violations == 0, "Avalon hold rule violated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
