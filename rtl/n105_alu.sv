// n105_alu -- combinational ALU of the N-105 core.
//
// Computes the result of the logic, move, add/subtract and shift/rotate
// instructions and the four condition flags they produce. The caller decides
// which flags are kept (see n105_decode); this unit always computes all four.
//
//   ALU_OR/AND/XOR  a op b                 N, Z from the result
//   ALU_NOT         ~a
//   ALU_PASSB       b                      (MOV, MOVI)
//   ALU_ADD         a + b                  N, V, Z, C = carry out
//   ALU_SUB         a - b                  N, V, Z, C = borrow (a < b unsigned)
//   ALU_ROR/LSR/ASR a rotated/shifted right by b[3:0]
//   ALU_LSL         a << (16 - b[3:0]) mod 16
//
// All shifts share one right rotator: the reference defines LSLI with the
// field value 16-imm4, so a left shift by n is a right rotation by the field
// 16-n followed by clearing the n low bits. The shift amount is always the
// raw 4-bit field. A field of 0 therefore means "no shift" for LSLI as well
// (this design's reading; 16-0 has bottom four bits 0).
//
// C as borrow for subtraction follows the condition table, where "unsigned
// higher" is not(C or Z). Purely combinational, no timing.
module n105_alu
  import n105_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y,
  output flags_t  flags
);

  logic [3:0]      sh;
  word_t           rot;
  word_t           lmask;   // bits cleared by LSL
  word_t           rmask;   // bits cleared / sign-filled by LSR / ASR
  logic [XLEN:0]   sum;     // with carry/borrow out
  logic            v_add, v_sub;

  assign sh    = b[3:0];
  assign rot   = (a >> sh) | (a << (5'(XLEN) - 5'(sh)));
  // n = 16 - sh low bits are cleared for LSL, except when sh = 0
  assign lmask = (sh == 4'd0) ? '0 : word_t'((17'(1) << (5'(XLEN) - 5'(sh))) - 17'(1));
  assign rmask = ~(word_t'('1) >> sh);

  always_comb begin
    sum = '0;
    unique case (op)
      ALU_ADD: sum = {1'b0, a} + {1'b0, b};
      ALU_SUB: sum = {1'b0, a} - {1'b0, b};
      default: sum = '0;
    endcase
  end

  assign v_add = (a[XLEN-1] == b[XLEN-1]) && (sum[XLEN-1] != a[XLEN-1]);
  assign v_sub = (a[XLEN-1] != b[XLEN-1]) && (sum[XLEN-1] != a[XLEN-1]);

  always_comb begin
    unique case (op)
      ALU_OR:    y = a | b;
      ALU_AND:   y = a & b;
      ALU_XOR:   y = a ^ b;
      ALU_NOT:   y = ~a;
      ALU_PASSB: y = b;
      ALU_ADD,
      ALU_SUB:   y = sum[XLEN-1:0];
      ALU_ROR:   y = rot;
      ALU_LSR:   y = rot & ~rmask;
      ALU_ASR:   y = (rot & ~rmask) | (a[XLEN-1] ? rmask : '0);
      ALU_LSL:   y = rot & ~lmask;
      default:   y = '0;
    endcase
  end

  always_comb begin
    flags.n = y[XLEN-1];
    flags.z = (y == '0);
    flags.v = (op == ALU_SUB) ? v_sub : v_add;
    flags.c = sum[XLEN];
  end

endmodule
