// n105_decode -- instruction decoder of the N-105 core.
//
// Turns a 16-bit instruction word into the control word ctrl_t used by the
// execute stage. Purely combinational.
//
// Immediates, as the instruction reference gives them:
//   imm4  (LSLI, LSRI, ASRI, ROTI) zero-extended raw field [11:8]
//   imm7  MOVI and CMPI sign-extended; ADDI and SUBI zero-extended ([11:5])
//   imm11 (BR, BSR) sign-extended byte offset ([15:5])
// Flags set: OR/AND/XOR set N and Z; ADD/SUB/CMP/ADDI/SUBI/CMPI set all four;
// every other instruction leaves the flags alone (NOT and MOV included).
// RET reads r15 through read port A. RET is accepted with opcode 11010 and
// 11011, the two values the reference prints for it. Opcodes the reference
// does not list do nothing (this design's choice).
module n105_decode
  import n105_pkg::*;
(
  input  word_t instr,
  output ctrl_t ctrl
);

  logic [4:0]  opc;
  regidx_t     fa, fb;
  logic [6:0]  imm7;
  logic [10:0] imm11;

  assign opc   = instr[4:0];
  assign fa    = instr[15:12];
  assign fb    = instr[11:8];
  assign imm7  = instr[11:5];
  assign imm11 = instr[15:5];

  localparam flags_t F_NONE = '{n: 1'b0, v: 1'b0, z: 1'b0, c: 1'b0};
  localparam flags_t F_NZ   = '{n: 1'b1, v: 1'b0, z: 1'b1, c: 1'b0};
  localparam flags_t F_ALL  = '{n: 1'b1, v: 1'b1, z: 1'b1, c: 1'b1};

  always_comb begin
    ctrl         = '0;
    ctrl.alu_op  = ALU_OR;
    ctrl.cc      = cond_e'(fb);
    ctrl.ra      = fa;
    ctrl.rb      = fb;
    ctrl.flag_we = F_NONE;
    unique case (opc)
      OP_OR:   begin ctrl.alu_op = ALU_OR;    ctrl.rd_we = 1'b1; ctrl.flag_we = F_NZ;  end
      OP_AND:  begin ctrl.alu_op = ALU_AND;   ctrl.rd_we = 1'b1; ctrl.flag_we = F_NZ;  end
      OP_XOR:  begin ctrl.alu_op = ALU_XOR;   ctrl.rd_we = 1'b1; ctrl.flag_we = F_NZ;  end
      OP_NOT:  begin ctrl.alu_op = ALU_NOT;   ctrl.rd_we = 1'b1; end
      OP_MOV:  begin ctrl.alu_op = ALU_PASSB; ctrl.rd_we = 1'b1; end
      OP_ADD:  begin ctrl.alu_op = ALU_ADD;   ctrl.rd_we = 1'b1; ctrl.flag_we = F_ALL; end
      OP_SUB:  begin ctrl.alu_op = ALU_SUB;   ctrl.rd_we = 1'b1; ctrl.flag_we = F_ALL; end
      OP_CMP:  begin ctrl.alu_op = ALU_SUB;                      ctrl.flag_we = F_ALL; end
      OP_LSLI, OP_LSRI, OP_ASRI, OP_ROTI: begin
        ctrl.alu_op  = (opc == OP_LSLI) ? ALU_LSL :
                       (opc == OP_LSRI) ? ALU_LSR :
                       (opc == OP_ASRI) ? ALU_ASR : ALU_ROR;
        ctrl.use_imm = 1'b1;
        ctrl.imm     = word_t'(fb);
        ctrl.rd_we   = 1'b1;
      end
      OP_MOVI: begin
        ctrl.alu_op  = ALU_PASSB; ctrl.use_imm = 1'b1; ctrl.rd_we = 1'b1;
        ctrl.imm     = word_t'(signed'(imm7));
      end
      OP_ADDI: begin
        ctrl.alu_op  = ALU_ADD; ctrl.use_imm = 1'b1; ctrl.rd_we = 1'b1;
        ctrl.imm     = word_t'(imm7); ctrl.flag_we = F_ALL;
      end
      OP_SUBI: begin
        ctrl.alu_op  = ALU_SUB; ctrl.use_imm = 1'b1; ctrl.rd_we = 1'b1;
        ctrl.imm     = word_t'(imm7); ctrl.flag_we = F_ALL;
      end
      OP_CMPI: begin
        ctrl.alu_op  = ALU_SUB; ctrl.use_imm = 1'b1;
        ctrl.imm     = word_t'(signed'(imm7)); ctrl.flag_we = F_ALL;
      end
      OP_LD:   ctrl.is_ld = 1'b1;
      OP_ST:   ctrl.is_st = 1'b1;
      OP_BR:   begin ctrl.is_br = 1'b1; ctrl.imm = word_t'(signed'(imm11)); end
      OP_BSR:  begin ctrl.is_br = 1'b1; ctrl.is_bsr = 1'b1; ctrl.imm = word_t'(signed'(imm11)); end
      OP_RET, OP_RET2: begin ctrl.is_ret = 1'b1; ctrl.ra = 4'd15; end
      OP_IFS:  ctrl.is_ifs = 1'b1;
      default: ;
    endcase
  end

endmodule
