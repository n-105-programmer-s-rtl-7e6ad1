// n105_core -- N-105 16-bit RISC soft core, top level.
//
// A two-stage pipeline: instruction fetch (n105_fetch), then everything else
// in one execute stage: decode (n105_decode), register read (n105_regfile),
// ALU (n105_alu), flags (n105_flags), data transfer (n105_lsu) and write
// back. Instruction and data memory are logically separate and reached over
// two independent Avalon-MM masters with 16-bit transfers and byte addresses.
//
// Execute finishes an ALU, branch or IFS instruction in the cycle it sees it
// in IR; LD and ST stall it until the data transfer completes. There are no
// register hazards: the register file is written at the end of the execute
// cycle, before the next instruction reads it.
//
// Program flow, as the reference defines it: pc is the address of the
// instruction being fetched, which is the one after the instruction in
// execute.
//   BR  imm11   pc <- pc + imm11          (one delay slot, always executed)
//   BSR imm11   pc <- pc + imm11, r15 <- pc + 2
//   RET         pc <- r15                 (one delay slot)
//   IFS cc      the next instruction is skipped when cc is false; a skipped
//               instruction is fetched but has no effect, and a skipped LD
//               or ST makes no bus access.
// Branch targets have bit 0 cleared (instructions are half-word aligned);
// imm11 is a byte offset as printed in the reference. Both are this design's
// reading.
//
// Reset (rst, synchronous, active high) clears pc (RESET_PC), the
// registers and the flags. Fetch starts in the first cycle after reset.
//
// i_read depends combinationally on d_waitrequest: a fetch is issued in the
// cycle the instruction in execute completes.
module n105_core
  import n105_pkg::*;
#(
  parameter int unsigned   AW       = 16,
  parameter logic [AW-1:0] RESET_PC = '0
) (
  input  logic          clk,
  input  logic          rst,
  // Avalon-MM instruction master
  output logic [AW-1:0] i_address,
  output logic          i_read,
  input  word_t         i_readdata,
  input  logic          i_waitrequest,
  // Avalon-MM data master
  output logic [AW-1:0] d_address,
  output logic          d_read,
  output logic          d_write,
  output word_t         d_writedata,
  input  word_t         d_readdata,
  input  logic          d_waitrequest
);

  // ---------------- fetch ----------------
  logic          ir_valid;
  word_t         ir;
  logic [AW-1:0] ir_pc, pc;
  logic          ex_advance;
  logic          redirect;
  logic [AW-1:0] redirect_target;
  logic          redirect_pending;

  n105_fetch #(.AW(AW), .RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst,
    .i_address, .i_read, .i_readdata, .i_waitrequest,
    .ir_valid, .ir, .ir_pc, .pc,
    .ex_advance, .redirect, .redirect_target,
    .redirect_pending
  );

  // ---------------- execute ----------------
  ctrl_t   ctrl;
  word_t   ra_data, rb_data;
  word_t   alu_b, alu_y;
  flags_t  alu_flags, flags_q;
  logic    cond_true;
  logic    skip_q;           // set by a failing IFS: nullify next instruction
  logic    exec;             // IR holds an instruction that takes effect
  logic    lsu_stall, lsu_done;
  word_t   lsu_rdata;
  logic    rf_we;
  regidx_t rf_widx;
  word_t   rf_wdata;
  word_t   pc_w;

  n105_decode u_decode (.instr(ir), .ctrl);

  n105_regfile u_rf (
    .clk, .rst,
    .ra_idx(ctrl.ra), .ra_data,
    .rb_idx(ctrl.rb), .rb_data,
    .we(rf_we), .wr_idx(rf_widx), .wr_data(rf_wdata)
  );

  assign exec  = ir_valid && !skip_q;
  assign alu_b = ctrl.use_imm ? ctrl.imm : rb_data;

  n105_alu u_alu (.op(ctrl.alu_op), .a(ra_data), .b(alu_b), .y(alu_y), .flags(alu_flags));

  n105_flags u_flags (
    .clk, .rst,
    .we(exec && ex_advance ? ctrl.flag_we : '0),
    .d(alu_flags),
    .cc(ctrl.cc),
    .q(flags_q),
    .cond_true
  );

  n105_lsu #(.AW(AW)) u_lsu (
    .clk, .rst,
    .req_ld(exec && ctrl.is_ld),
    .req_st(exec && ctrl.is_st),
    .addr(AW'(rb_data)),
    .wdata(ra_data),
    .stall(lsu_stall), .done(lsu_done), .rdata(lsu_rdata),
    .d_address, .d_read, .d_write, .d_writedata, .d_readdata, .d_waitrequest
  );

  assign ex_advance = ir_valid && !lsu_stall;

  // branches
  assign pc_w            = word_t'(pc);
  assign redirect        = exec && (ctrl.is_br || ctrl.is_ret);
  assign redirect_target = ctrl.is_ret ? (AW'(ra_data) & ~AW'(1))
                                       : ((pc + AW'(ctrl.imm)) & ~AW'(1));

  // write back: ALU result or load data to rA, or pc+2 to r15 for BSR
  always_comb begin
    rf_we    = 1'b0;
    rf_widx  = ctrl.ra;
    rf_wdata = alu_y;
    if (exec && ex_advance) begin
      if (ctrl.rd_we) begin
        rf_we = 1'b1;
      end else if (ctrl.is_ld) begin
        rf_we    = lsu_done;
        rf_wdata = lsu_rdata;
      end else if (ctrl.is_bsr) begin
        rf_we    = 1'b1;
        rf_widx  = 4'd15;
        rf_wdata = pc_w + 16'd2;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst)             skip_q <= 1'b0;
    else if (ex_advance) skip_q <= exec && ctrl.is_ifs && !cond_true;
  end

  a_ld_done: assert property (@(posedge clk) disable iff (rst)
                              (exec && ex_advance && (ctrl.is_ld || ctrl.is_st)) |-> lsu_done);

endmodule
