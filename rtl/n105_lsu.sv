// n105_lsu -- Avalon-MM data master of the N-105 core (LD and ST).
//
// The execute stage raises req_ld or req_st with the address (rB) and, for a
// store, the data (rA). The unit registers them and, from the next cycle,
// drives a 16-bit Avalon read or write with registered address, read, write
// and writedata. It holds them until the slave drops waitrequest; in that
// cycle the transfer completes, done is high, and for a load rdata carries
// the slave's readdata. stall is high while the execute stage must wait:
// from the request until the cycle before done.
//
// Timing: a transfer to a slave with no wait states takes two execute
// cycles (request, transfer); each wait state adds one. The slave may hold
// waitrequest indefinitely. The reference gives only the bus (16-bit Avalon
// transfers, the processor waits until the bus is ready, loads and stores a
// few cycles longer); registering the bus outputs is this design's choice.
// Bit 0 of the address is driven as given; word alignment is the
// program's responsibility.
module n105_lsu
  import n105_pkg::*;
#(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          rst,
  // from execute
  input  logic          req_ld,
  input  logic          req_st,
  input  logic [AW-1:0] addr,
  input  word_t         wdata,
  output logic          stall,
  output logic          done,
  output word_t         rdata,
  // Avalon-MM data master
  output logic [AW-1:0] d_address,
  output logic          d_read,
  output logic          d_write,
  output word_t         d_writedata,
  input  word_t         d_readdata,
  input  logic          d_waitrequest
);

  logic busy;
  logic req;

  assign req   = req_ld | req_st;
  assign done  = busy && !d_waitrequest;
  assign stall = req && !done;
  assign rdata = d_readdata;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy        <= 1'b0;
      d_read      <= 1'b0;
      d_write     <= 1'b0;
      d_address   <= '0;
      d_writedata <= '0;
    end else if (!busy) begin
      if (req) begin
        busy        <= 1'b1;
        d_read      <= req_ld;
        d_write     <= req_st;
        d_address   <= addr;
        d_writedata <= wdata;
      end
    end else if (!d_waitrequest) begin
      busy    <= 1'b0;
      d_read  <= 1'b0;
      d_write <= 1'b0;
    end
  end

  // Avalon rule: a master holds its command while the slave waits.
  property p_hold;
    @(posedge clk) disable iff (rst)
      (busy && d_waitrequest) |=> (busy && $stable(d_address) && $stable(d_read)
                                   && $stable(d_write) && $stable(d_writedata));
  endproperty
  a_hold: assert property (p_hold);
  a_excl: assert property (@(posedge clk) disable iff (rst) !(d_read && d_write));

endmodule
