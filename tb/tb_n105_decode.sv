// tb_n105_decode -- self-checking testbench of n105_decode.
//
// For every one of the 32 opcode values, with random A/B/immediate fields and
// random don't-care bits, the control word is compared with the expected one
// written out here from the instruction reference (operation, destination
// write, flags set, immediate and its extension, memory and branch kind).
module tb_n105_decode;
  import n105_pkg::*;

  word_t instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  n105_decode u_dut (.instr, .ctrl);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s (instr %h)", s, instr); end
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int op = 0; op < 32; op++) begin
        int unsigned A, B, i7, i11;
        int unsigned exp_imm;
        string nm;
        bit ld, st, br, bsr, ret, ifs, we, ui;
        logic [3:0] fl;  // n v z c
        alu_op_e ao;
        instr = 16'({$urandom} & 32'hffe0) | 16'(op);
        A = instr[15:12]; B = instr[11:8]; i7 = instr[11:5]; i11 = instr[15:5];
        #1;
        ld = 0; st = 0; br = 0; bsr = 0; ret = 0; ifs = 0; we = 0; ui = 0; fl = 4'b0000;
        ao = ctrl.alu_op; exp_imm = ctrl.imm;
        case (op)
          0:  begin we = 1; fl = 4'b1010; ao = ALU_OR;  end
          1:  begin we = 1; fl = 4'b1010; ao = ALU_AND; end
          2:  begin we = 1; fl = 4'b1010; ao = ALU_XOR; end
          3:  begin we = 1; ao = ALU_NOT; end
          4:  begin we = 1; ao = ALU_PASSB; end
          5:  begin we = 1; fl = 4'b1111; ao = ALU_ADD; end
          6:  begin we = 1; fl = 4'b1111; ao = ALU_SUB; end
          7:  begin fl = 4'b1111; ao = ALU_SUB; end
          8:  begin we = 1; ui = 1; ao = ALU_LSL; exp_imm = B; end
          9:  begin we = 1; ui = 1; ao = ALU_LSR; exp_imm = B; end
          10: begin we = 1; ui = 1; ao = ALU_ASR; exp_imm = B; end
          11: begin we = 1; ui = 1; ao = ALU_ROR; exp_imm = B; end
          12: begin we = 1; ui = 1; ao = ALU_PASSB; exp_imm = i7[6] ? i7 | 16'hff80 : i7; end
          13: begin we = 1; ui = 1; fl = 4'b1111; ao = ALU_ADD; exp_imm = i7; end
          14: begin we = 1; ui = 1; fl = 4'b1111; ao = ALU_SUB; exp_imm = i7; end
          15: begin ui = 1; fl = 4'b1111; ao = ALU_SUB; exp_imm = i7[6] ? i7 | 16'hff80 : i7; end
          16: ld = 1;
          20: st = 1;
          24: begin br = 1; exp_imm = i11[10] ? i11 | 16'hf800 : i11; end
          25: begin br = 1; bsr = 1; exp_imm = i11[10] ? i11 | 16'hf800 : i11; end
          26, 27: ret = 1;
          31: ifs = 1;
          default: ;
        endcase
        nm = $sformatf("opcode %0d", op);
        chk(ctrl.rd_we == we, {nm, " rd_we"});
        chk(ctrl.flag_we == fl, {nm, " flags set"});
        chk(ctrl.is_ld == ld && ctrl.is_st == st, {nm, " ld/st"});
        chk(ctrl.is_br == br && ctrl.is_bsr == bsr && ctrl.is_ret == ret && ctrl.is_ifs == ifs,
            {nm, " branch/ifs"});
        chk(ctrl.use_imm == ui, {nm, " use_imm"});
        if (we || fl != 0) chk(ctrl.alu_op == ao, {nm, " alu op"});
        if (ui || br) chk(ctrl.imm == 16'(exp_imm), $sformatf("%s imm %h expected %h", nm, ctrl.imm, exp_imm));
        chk(ctrl.ra == (ret ? 4'd15 : 4'(A)) && ctrl.rb == 4'(B), {nm, " register indices"});
        if (ifs) chk(ctrl.cc == cond_e'(B), {nm, " condition code"});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
