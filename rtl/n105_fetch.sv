// n105_fetch -- instruction fetch stage of the N-105 core.
//
// Holds the program counter pc, which is the address of the instruction being
// fetched, and drives an Avalon-MM read master on the instruction bus. A
// fetch is issued whenever the instruction register IR is empty or is being
// consumed by execute this cycle (ex_advance), so a returned word always has
// a place to go; the read is then held until waitrequest drops. In that
// cycle the word is written to IR, ir_pc records its address, and pc moves
// on.
//
// Branches have one delay slot and the pipeline is never flushed. When
// execute takes a branch (redirect with ex_advance), IR held the branch and
// pc is the address of its delay slot, which is being fetched. The delay
// slot is therefore always fetched; the redirect target replaces pc+2 as the
// address after it. If the delay slot is returned in the same cycle the
// target is used at once, otherwise it is held in a pending register until
// the delay slot returns. pc never changes while a read is waiting, as the
// Avalon protocol requires.
//
// Timing: with a slave that has one wait state, each fetch takes two cycles,
// the figure the reference gives as typical. Reset value of pc is the
// RESET_PC parameter (this design's choice; the reference gives none).
module n105_fetch
  import n105_pkg::*;
#(
  parameter int unsigned AW       = 16,
  parameter logic [AW-1:0] RESET_PC = '0
) (
  input  logic          clk,
  input  logic          rst,
  // Avalon-MM instruction master
  output logic [AW-1:0] i_address,
  output logic          i_read,
  input  word_t         i_readdata,
  input  logic          i_waitrequest,
  // to / from execute
  output logic          ir_valid,
  output word_t         ir,
  output logic [AW-1:0] ir_pc,
  output logic [AW-1:0] pc,
  input  logic          ex_advance,
  input  logic          redirect,
  input  logic [AW-1:0] redirect_target,
  // status
  output logic          redirect_pending
);

  logic          fetch_done;
  logic [AW-1:0] pend_target;

  assign i_read     = !rst && (!ir_valid || ex_advance);
  assign i_address  = pc;
  assign fetch_done = i_read && !i_waitrequest;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc               <= RESET_PC;
      ir_valid         <= 1'b0;
      ir               <= '0;
      ir_pc            <= '0;
      redirect_pending <= 1'b0;
      pend_target      <= '0;
    end else if (fetch_done) begin
      ir       <= i_readdata;
      ir_pc    <= pc;
      ir_valid <= 1'b1;
      if (ex_advance && redirect) pc <= redirect_target;
      else if (redirect_pending)  pc <= pend_target;
      else                        pc <= pc + AW'(2);
      redirect_pending <= 1'b0;
    end else if (ex_advance) begin
      ir_valid <= 1'b0;
      if (redirect) begin
        redirect_pending <= 1'b1;
        pend_target      <= redirect_target;
      end
    end
  end

  // Avalon rule: address held while the slave waits
  a_hold: assert property (@(posedge clk) disable iff (rst)
                           (i_read && i_waitrequest) |=> (i_read && $stable(i_address)));
  a_consume: assert property (@(posedge clk) disable iff (rst) ex_advance |-> ir_valid);

endmodule
