// n105_regfile -- the sixteen 16-bit general purpose registers r0..r15.
//
// Two asynchronous read ports (A and B, as named by the instruction fields)
// and one synchronous write port. r15 is an ordinary register; BSR writes the
// return address into it through the same write port. A write becomes
// visible to reads in the cycle after the clock edge, which is all the
// two-stage pipeline needs: execute reads and writes in the same cycle.
// Clearing the registers on reset is this design's choice; the reference
// does not define their reset value.
module n105_regfile
  import n105_pkg::*;
(
  input  logic    clk,
  input  logic    rst,       // synchronous, active high
  input  regidx_t ra_idx,
  output word_t   ra_data,
  input  regidx_t rb_idx,
  output word_t   rb_data,
  input  logic    we,
  input  regidx_t wr_idx,
  input  word_t   wr_data
);

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we) begin
      regs[wr_idx] <= wr_data;
    end
  end

  assign ra_data = regs[ra_idx];
  assign rb_data = regs[rb_idx];

endmodule
