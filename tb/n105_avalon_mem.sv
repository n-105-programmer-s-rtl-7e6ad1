// n105_avalon_mem -- behavioural Avalon-MM slave memory for the testbenches
// (not synthesizable intent; a simulation model of the memories the core is
// attached to).
//
// 16-bit words, byte addresses (bit 0 ignored), DEPTH words. A transfer
// (read or write held high) is answered after a number of wait states with
// waitrequest high; in the cycle waitrequest is low readdata carries the
// addressed word and a write takes effect at the clock edge. The wait count
// of each transfer is cfg_wait, or, when cfg_rand is set, uniform in
// 0..cfg_max (initialised from WAIT, RAND_WAIT and MAX_WAIT). The model also
// counts wait cycles, transfers and violations of the master's hold rule
// (command changed while waitrequest was high).
module n105_avalon_mem #(
  parameter int unsigned AW        = 16,
  parameter int unsigned DEPTH     = 32768,
  parameter int unsigned WAIT      = 1,
  parameter bit          RAND_WAIT = 1'b0,
  parameter int unsigned MAX_WAIT  = 3
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] address,
  input  logic          read,
  input  logic          write,
  input  logic [15:0]   writedata,
  output logic [15:0]   readdata,
  output logic          waitrequest
);

  logic [15:0] mem [DEPTH];
  int unsigned cnt, need;
  // run-time wait-state configuration, initialised from the parameters;
  // a testbench may change it between tests
  int unsigned cfg_wait = WAIT;
  bit          cfg_rand = RAND_WAIT;
  int unsigned cfg_max  = MAX_WAIT;
  int unsigned wait_cycles, transfers, reads, writes, violations;
  logic        was_waiting;
  logic [AW-1:0] last_addr;
  logic        last_read, last_write;
  logic [15:0] last_wdata;

  localparam int unsigned IW = $clog2(DEPTH);
  wire [IW-1:0] idx = address[IW:1];

  assign waitrequest = (read || write) && (cnt != need);
  assign readdata    = mem[idx];

  function automatic int unsigned pick_wait();
    return cfg_rand ? $urandom_range(cfg_max, 0) : cfg_wait;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= 0; need <= pick_wait();
      wait_cycles <= 0; transfers <= 0; reads <= 0; writes <= 0; violations <= 0;
      was_waiting <= 1'b0;
    end else begin
      was_waiting <= waitrequest;
      last_addr <= address; last_read <= read; last_write <= write; last_wdata <= writedata;
      if (was_waiting && (address != last_addr || read != last_read || write != last_write
                          || (write && writedata != last_wdata)))
        violations <= violations + 1;
      if ((read || write) && !waitrequest) begin
        cnt <= 0; need <= pick_wait();
        transfers <= transfers + 1;
        if (read) reads <= reads + 1;
        if (write) begin
          writes <= writes + 1;
          mem[idx] <= writedata;
        end
      end else if (read || write) begin
        cnt <= cnt + 1;
        wait_cycles <= wait_cycles + 1;
      end
    end
  end

endmodule
