// n105_flags -- N, V, Z, C condition flag register and IFS condition check.
//
// Each flag has its own write enable: an instruction updates only the flags
// it sets (all four for the arithmetic group, N and Z for the logic group,
// none otherwise) and the others keep their last value. The reference leaves
// V and C "undefined" after a logic operation; this design keeps them.
//
// cond_true evaluates the 4-bit condition code of IFS against the current
// (registered) flags, combinationally:
//   0 cc !C   1 cs C    2 ne !Z   3 eq Z    4 pl !N   5 mi N
//   6 lt N^V  7 ge !(N^V)          8 gt !(Z|(N^V))     9 le Z|(N^V)
//  10 vc !V  11 vs V   12 hi !(C|Z)        13 ls C|Z
//  14 always 15 never
// The formulas are the reference's; the numbering of codes 8..15 is this
// design's reading of the table (codes in table order).
module n105_flags
  import n105_pkg::*;
(
  input  logic   clk,
  input  logic   rst,        // synchronous, active high; clears all flags
  input  flags_t we,         // per-flag write enable
  input  flags_t d,          // new flag values
  input  cond_e  cc,
  output flags_t q,
  output logic   cond_true
);

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else begin
      if (we.n) q.n <= d.n;
      if (we.v) q.v <= d.v;
      if (we.z) q.z <= d.z;
      if (we.c) q.c <= d.c;
    end
  end

  always_comb begin
    unique case (cc)
      CC_CC: cond_true = !q.c;
      CC_CS: cond_true =  q.c;
      CC_NE: cond_true = !q.z;
      CC_EQ: cond_true =  q.z;
      CC_PL: cond_true = !q.n;
      CC_MI: cond_true =  q.n;
      CC_LT: cond_true =  (q.n ^ q.v);
      CC_GE: cond_true = !(q.n ^ q.v);
      CC_GT: cond_true = !(q.z | (q.n ^ q.v));
      CC_LE: cond_true =  (q.z | (q.n ^ q.v));
      CC_VC: cond_true = !q.v;
      CC_VS: cond_true =  q.v;
      CC_HI: cond_true = !(q.c | q.z);
      CC_LS: cond_true =  (q.c | q.z);
      CC_AL: cond_true = 1'b1;
      CC_NV: cond_true = 1'b0;
      default: cond_true = 1'b0;
    endcase
  end

endmodule
