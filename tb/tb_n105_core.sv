// tb_n105_core -- end-to-end testbench of the N-105 core at its default
// parameters.
//
// The core runs programs from a behavioural Avalon instruction memory and
// works on a separate behavioural data memory. Every program ends by reaching
// address END, where a "br -2; nop" loop sits; the test stops when the core
// fetches END, by which time every earlier instruction has completed. The
// register file, the flags and the whole data memory are then compared with
// the instruction-set reference model in n105_tb_pkg.
//
// 1. The call/return example of the instruction reference (BSR and RET with
//    their delay slots), with the register values worked out by hand.
// 2. Fetch timing: with one wait state per fetch, a run of ALU instructions
//    executes one every two cycles; with none, one per cycle.
// 3. Load/store timing: with zero data wait states a LD takes 2 execute
//    cycles, each wait state adds one.
// 4. Random programs (all instructions, random register fields, random
//    don't-care bits, random branches, random wait states on both buses).
// Mechanism counters (taken and skipped IFS, skipped loads/stores, branch
// redirect in the delay slot's return cycle or held pending, fetch and data
// wait states, BSR/RET) must each be seen at least once.
module tb_n105_core;
  import n105_tb_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [15:0] i_address, d_address;
  logic        i_read, i_waitrequest, d_read, d_write, d_waitrequest;
  logic [15:0] i_readdata, d_readdata, d_writedata;

  n105_core u_dut (
    .clk, .rst,
    .i_address, .i_read, .i_readdata, .i_waitrequest,
    .d_address, .d_read, .d_write, .d_writedata, .d_readdata, .d_waitrequest
  );

  n105_avalon_mem #(.DEPTH(MEMW)) u_imem (
    .clk, .rst, .address(i_address), .read(i_read), .write(1'b0), .writedata(16'h0),
    .readdata(i_readdata), .waitrequest(i_waitrequest)
  );
  n105_avalon_mem #(.DEPTH(MEMW)) u_dmem (
    .clk, .rst, .address(d_address), .read(d_read), .write(d_write), .writedata(d_writedata),
    .readdata(d_readdata), .waitrequest(d_waitrequest)
  );

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- mechanism counters ----------------
  int unsigned m_ifs_taken = 0, m_ifs_skip = 0, m_skip_mem = 0, m_redir_now = 0,
               m_redir_pend = 0, m_fetch_wait = 0, m_data_wait = 0, m_bsr = 0, m_ret = 0,
               m_ld = 0, m_st = 0;
  always @(posedge clk) if (!rst) begin
    if (u_dut.ex_advance && u_dut.exec && u_dut.ctrl.is_ifs)
      if (u_dut.cond_true) m_ifs_taken++; else m_ifs_skip++;
    if (u_dut.ex_advance && u_dut.skip_q && (u_dut.ctrl.is_ld || u_dut.ctrl.is_st)) m_skip_mem++;
    if (u_dut.ex_advance && u_dut.redirect)
      if (i_read && !i_waitrequest) m_redir_now++; else m_redir_pend++;
    if (i_read && i_waitrequest) m_fetch_wait++;
    if ((d_read || d_write) && d_waitrequest) m_data_wait++;
    if (u_dut.ex_advance && u_dut.exec && u_dut.ctrl.is_bsr) m_bsr++;
    if (u_dut.ex_advance && u_dut.exec && u_dut.ctrl.is_ret) m_ret++;
    if (d_read && !d_waitrequest) m_ld++;
    if (d_write && !d_waitrequest) m_st++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // load the program in n105_tb_pkg::imem and the initial data into both memories
  task automatic load_memories();
    for (int i = 0; i < MEMW; i++) begin
      u_imem.mem[i] = imem[i];
      dmem[i] = dinit(i);
      u_dmem.mem[i] = dmem[i];
    end
  endtask

  // run the core from reset until it fetches address end_addr; returns cycles
  task automatic run_core(int unsigned end_addr, int unsigned max_cycles, output int unsigned cyc);
    rst = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    cyc = 1;  // the cycle after reset release is cycle 1
    forever begin
      @(negedge clk);
      cyc++;
      if (i_read && !i_waitrequest && i_address == 16'(end_addr)) break;
      if (cyc > max_cycles) begin
        check(0, $sformatf("core did not reach END=%0d in %0d cycles", end_addr, max_cycles));
        break;
      end
    end
    @(posedge clk);
    #1;
  endtask

  // compare the core's state with the reference model
  task automatic compare(string tag);
    int bad = 0;
    for (int i = 0; i < 16; i++)
      check(u_dut.u_rf.regs[i] == r[i],
            $sformatf("%s r%0d = %h, expected %h", tag, i, u_dut.u_rf.regs[i], r[i]));
    check(u_dut.flags_q == {fn, fv, fz, fc},
          $sformatf("%s flags = %b, expected %b", tag, u_dut.flags_q, {fn, fv, fz, fc}));
    for (int i = 0; i < MEMW; i++) if (u_dmem.mem[i] != dmem[i]) bad++;
    check(bad == 0, $sformatf("%s %0d data memory words differ", tag, bad));
    check(u_imem.violations == 0 && u_dmem.violations == 0,
          $sformatf("%s Avalon hold rule violated", tag));
  endtask

  function automatic void clear_imem(int unsigned end_addr);
    for (int i = 0; i < MEMW; i++) imem[i] = NOP;
    imem[end_addr/2]     = e_br(O_BR, -2);
    imem[end_addr/2 + 1] = NOP;
  endfunction

  // run the reference model; 1 if it reaches end_addr within max_steps
  function automatic bit iss_run(int unsigned end_addr, int unsigned max_steps);
    iss_reset(0);
    for (int s = 0; s < int'(max_steps); s++) begin
      if (pc == end_addr) return 1;
      if (pc > end_addr) return 0;
      iss_step();
    end
    return 0;
  endfunction

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int unsigned cyc, c1, c2, endad, n, nprog, accepted;
    logic [15:0] p [$];

    // ---------- 1. the reference's call/return example ----------
    //  0 one:   movi r2 4        12       nop
    //  2        bsr three        14 three: ret
    //  4        movi r4 8        16       movi r1 4
    //  6 two:   movi r4 6        18 end:  nop
    //  8        movi r9 7
    // 10        br end
    clear_imem(20);
    imem[0] = e_i7(O_MOVI, 2, 4);
    imem[1] = e_br(O_BSR, 14 - 4);   // pc of delay slot = 4
    imem[2] = e_i7(O_MOVI, 4, 8);
    imem[3] = e_i7(O_MOVI, 4, 6);
    imem[4] = e_i7(O_MOVI, 9, 7);
    imem[5] = e_br(O_BR, 18 - 12);
    imem[6] = NOP;
    imem[7] = e_ret();
    imem[8] = e_i7(O_MOVI, 1, 4);
    imem[9] = NOP;
    load_memories();
    run_core(20, 1000, cyc);
    check(u_dut.u_rf.regs[2] == 4,  "example: r2");
    check(u_dut.u_rf.regs[4] == 6,  "example: r4 (8 from the delay slot, then 6)");
    check(u_dut.u_rf.regs[1] == 4,  "example: r1 (delay slot of ret)");
    check(u_dut.u_rf.regs[9] == 7,  "example: r9");
    check(u_dut.u_rf.regs[15] == 6, "example: r15 = address of 'two'");
    void'(iss_run(20, 100));
    compare("example");
    // 13 instructions executed (movi bsr movi ret movi movi movi br nop nop) = 10 + END
    // each fetch takes 2 cycles with one wait state: 10 instructions + END fetch
    check(cyc == 2 * 11, $sformatf("example: %0d cycles, expected 22", cyc));

    // ---------- 1b. a counted loop: sum ten data words ----------
    //  0 movi r1 32      10 add  r3 r4     20 nop (delay slot)
    //  2 lsli r1 3       12 addi r1 2      22 st   r3 r1
    //  4 movi r2 10      14 subi r2 1      24 END
    //  6 movi r3 0       16 ifs  ne
    //  8 loop: ld r4 r1  18 br   loop
    clear_imem(24);
    imem[0]  = e_i7(O_MOVI, 1, 32);
    imem[1]  = e_lsli(1, 3);
    imem[2]  = e_i7(O_MOVI, 2, 10);
    imem[3]  = e_i7(O_MOVI, 3, 0);
    imem[4]  = e_rr(O_LD, 4, 1);
    imem[5]  = e_rr(O_ADD, 3, 4);
    imem[6]  = e_i7(O_ADDI, 1, 2);
    imem[7]  = e_i7(O_SUBI, 2, 1);
    imem[8]  = e_ifs(2);              // ne
    imem[9]  = e_br(O_BR, 8 - 20);
    imem[10] = NOP;
    imem[11] = e_rr(O_ST, 3, 1);
    load_memories();
    run_core(24, 5000, cyc);
    begin
      logic [15:0] sum = 0;
      for (int i = 0; i < 10; i++) sum += dinit(128 + i);
      check(u_dmem.mem[138] == sum, $sformatf("loop: sum %h, expected %h", u_dmem.mem[138], sum));
      check(u_dut.u_rf.regs[2] == 0 && u_dut.u_rf.regs[1] == 276, "loop: final counter and pointer");
    end
    void'(iss_run(24, 400));
    compare("loop");

    // ---------- 2. fetch timing ----------
    for (int w = 0; w < 3; w++) begin
      u_imem.cfg_rand = 0; u_imem.cfg_wait = w;
      clear_imem(80);
      for (int i = 0; i < 40; i++) imem[i] = e_i7(O_ADDI, i % 15, i);
      load_memories();
      run_core(80, 2000, cyc);
      // 40 instructions plus the END fetch, each (w+1) cycles
      check(cyc == 41 * (w + 1), $sformatf("fetch timing w=%0d: %0d cycles, expected %0d",
                                           w, cyc, 41 * (w + 1)));
      void'(iss_run(80, 100));
      compare("fetch timing");
    end

    // ---------- 3. load / store timing ----------
    u_imem.cfg_rand = 0; u_imem.cfg_wait = 0;
    for (int w = 0; w < 3; w++) begin
      u_dmem.cfg_rand = 0; u_dmem.cfg_wait = w;
      clear_imem(40);
      imem[0] = e_i7(O_MOVI, 3, 50);
      for (int i = 1; i < 11; i++) imem[i] = e_rr(i % 2 ? O_LD : O_ST, i, 3);
      for (int i = 11; i < 20; i++) imem[i] = NOP;
      load_memories();
      run_core(40, 2000, cyc);
      // 1 + 9 single-cycle, 10 memory ops of (2 + w) cycles, END fetch
      check(cyc == 10 + 10 * (2 + w) + 1,
            $sformatf("ld/st timing w=%0d: %0d cycles, expected %0d", w, cyc, 10 + 10 * (2 + w) + 1));
      void'(iss_run(40, 100));
      compare("ld/st timing");
    end

    // ---------- 4. random programs ----------
    nprog = 0; accepted = 0;
    while (accepted < 500 && nprog < 5000) begin
      nprog++;
      n = $urandom_range(60, 8);
      endad = 2 * n;
      clear_imem(endad);
      for (int i = 0; i < int'(n); i++) begin
        automatic int k = $urandom_range(99, 0);
        automatic int a = $urandom_range(14, 0), b = $urandom_range(15, 0);
        if      (k < 30) imem[i] = e_rr(5'($urandom_range(7, 0)), a, b);
        else if (k < 40) imem[i] = e_i4(5'($urandom_range(11, 8)), a, $urandom_range(15, 0));
        else if (k < 55) imem[i] = e_i7(5'($urandom_range(15, 12)), a, $urandom_range(127, 0));
        else if (k < 63) imem[i] = e_rr(O_LD, a, b);
        else if (k < 71) imem[i] = e_rr(O_ST, $urandom_range(15, 0), b);
        else if (k < 83) imem[i] = e_ifs($urandom_range(15, 0));
        else if (k < 91) imem[i] = e_br(O_BR,  2 * $urandom_range(n, 0) - (2 * i + 2));
        else if (k < 96) imem[i] = e_br(O_BSR, 2 * $urandom_range(n, 0) - (2 * i + 2));
        else             imem[i] = e_ret();
      end
      if (!iss_run(endad, 400)) continue;
      accepted++;
      u_imem.cfg_rand = 1; u_imem.cfg_max = $urandom_range(3, 0);
      u_dmem.cfg_rand = 1; u_dmem.cfg_max = $urandom_range(3, 0);
      // reload the reference's data memory (iss_run changed it)
      load_memories();
      run_core(endad, 20000, cyc);
      void'(iss_run(endad, 400));
      compare($sformatf("random program %0d", accepted));
      if (accepted < 4) $display("random program %0d: %0d instructions, %0d executed, %0d cycles", accepted, n, n_exec, cyc);
    end
    check(accepted >= 400, $sformatf("only %0d random programs accepted", accepted));

    // ---------- mechanisms ----------
    $display("mechanisms: ifs_taken=%0d ifs_skip=%0d skipped_ldst=%0d redirect_now=%0d redirect_pending=%0d fetch_wait=%0d data_wait=%0d bsr=%0d ret=%0d ld=%0d st=%0d",
             m_ifs_taken, m_ifs_skip, m_skip_mem, m_redir_now, m_redir_pend,
             m_fetch_wait, m_data_wait, m_bsr, m_ret, m_ld, m_st);
    check(m_ifs_taken > 0,  "IFS condition true never seen");
    check(m_ifs_skip > 0,   "IFS skip never seen");
    check(m_skip_mem > 0,   "skipped load/store never seen");
    check(m_redir_now > 0,  "redirect with delay slot arriving never seen");
    check(m_redir_pend > 0, "pending redirect never seen");
    check(m_fetch_wait > 0, "fetch wait state never seen");
    check(m_data_wait > 0,  "data wait state never seen");
    check(m_bsr > 0 && m_ret > 0, "BSR/RET never seen");
    check(m_ld > 0 && m_st > 0, "load/store never seen");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
