// tb_n105_fetch -- self-checking testbench of n105_fetch.
//
// The fetch stage reads from a behavioural Avalon memory whose word i holds
// a value derived from i. A model of the execute stage consumes IR on random
// cycles and, on some of them, redirects to a random target. Every word
// entering IR is checked against the memory, and its address against the
// delay-slot rule: the word after a consumed branch comes from the branch's
// pc+2 (the delay slot), the word after that from the target. A timing phase
// checks one fetch per two cycles with one wait state and one per cycle with
// none, when execute consumes every cycle.
module tb_n105_fetch;
  import n105_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [15:0] i_address, ir_pc, pc, i_readdata, redirect_target;
  logic i_read, i_waitrequest, ir_valid, ex_advance, redirect, redirect_pending;
  word_t ir;
  int checks = 0, failures = 0;
  int unsigned n_pend = 0, n_now = 0;

  n105_fetch u_dut (.clk, .rst, .i_address, .i_read, .i_readdata, .i_waitrequest,
                    .ir_valid, .ir, .ir_pc, .pc, .ex_advance, .redirect, .redirect_target,
                    .redirect_pending);
  n105_avalon_mem #(.DEPTH(32768)) u_mem (.clk, .rst, .address(i_address), .read(i_read),
                    .write(1'b0), .writedata(16'h0), .readdata(i_readdata), .waitrequest(i_waitrequest));

  function automatic logic [15:0] word_at(int unsigned i);
    return 16'(i * 16'h9e37 + 16'h1234);
  endfunction

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

  // item bookkeeping: item k is the k-th word loaded into IR
  int unsigned addr_of [int];
  int unsigned tgt_after [int];   // target that replaces addr+2 for item k
  int unsigned n_items, cur;

  task automatic run(int unsigned cycles, int p_adv, int p_red);
    int unsigned expect_addr;
    bit fd;
    for (int c = 0; c < int'(cycles); c++) begin
      @(negedge clk);
      ex_advance = ir_valid && ($urandom_range(99, 0) < p_adv);
      redirect   = ex_advance && ($urandom_range(99, 0) < p_red);
      redirect_target = 16'($urandom_range(4000, 0) * 2);
      #1;
      fd = i_read && !i_waitrequest;
      if (redirect) begin
        tgt_after[cur + 1] = redirect_target;
        if (fd) n_now++; else n_pend++;
      end
      if (fd) begin
        n_items++;
        expect_addr = tgt_after.exists(n_items - 1) ? tgt_after[n_items - 1]
                                                    : addr_of[n_items - 1] + 2;
        chk(i_address == 16'(expect_addr),
            $sformatf("item %0d fetched from %h, expected %h", n_items, i_address, expect_addr));
        addr_of[n_items] = i_address;
        cur = n_items;
      end
      @(posedge clk); #1;
      if (fd) chk(ir_valid && ir == word_at(ir_pc / 2) && ir_pc == 16'(addr_of[cur]),
                  $sformatf("IR %h from %h", ir, ir_pc));
      else if (ex_advance) chk(!ir_valid, "IR not emptied after consume");
    end
  endtask

  initial begin
    int unsigned t0, items0;
    for (int i = 0; i < 32768; i++) u_mem.mem[i] = word_at(i);
    ex_advance = 0; redirect = 0; redirect_target = 0;
    // item 0 is a virtual predecessor at RESET_PC - 2
    addr_of[0] = 32'hfffe; n_items = 0; cur = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    #1;
    // random phase
    u_mem.cfg_rand = 1; u_mem.cfg_max = 3;
    run(20000, 60, 20);
    // timing: every cycle consumed, no redirects
    for (int w = 0; w < 2; w++) begin
      u_mem.cfg_rand = 0; u_mem.cfg_wait = w;
      run(10, 100, 0);
      items0 = n_items;
      run(200, 100, 0);
      chk(n_items - items0 == 200 / (w + 1),
          $sformatf("wait %0d: %0d fetches in 200 cycles, expected %0d", w, n_items - items0, 200 / (w + 1)));
    end
    chk(n_now > 0 && n_pend > 0, $sformatf("redirect paths seen: same cycle %0d, pending %0d", n_now, n_pend));
    chk(u_mem.violations == 0, "Avalon hold rule violated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
