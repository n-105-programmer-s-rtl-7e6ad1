// n105_pkg -- shared types and constants of the N-105 16-bit RISC core.
//
// Instruction word layout (16 bits):
//   [15:12] A      register index of source and destination (rA)
//   [11:8]  B      register index of source (rB), or imm4 / condition code
//   [11:5]  imm7   7-bit immediate (A-format immediates)
//   [15:5]  imm11  11-bit signed branch offset
//   [4:0]   opcode 5-bit opcode; bit 5 is unused by the register formats
// The opcode values are those of the N-105 instruction set reference. The
// enumeration of the IFS condition codes (codes 0000..1101 in table order,
// 1110 = always, 1111 = never) is this design's reading of the table.
package n105_pkg;

  localparam int unsigned XLEN  = 16;  // data and register width
  localparam int unsigned NREGS = 16;  // r0..r15

  typedef logic [XLEN-1:0] word_t;
  typedef logic [3:0]      regidx_t;

  // 5-bit opcodes, instr[4:0]
  typedef enum logic [4:0] {
    OP_OR   = 5'b000_00,
    OP_AND  = 5'b000_01,
    OP_XOR  = 5'b000_10,
    OP_NOT  = 5'b000_11,
    OP_MOV  = 5'b001_00,
    OP_ADD  = 5'b001_01,
    OP_SUB  = 5'b001_10,
    OP_CMP  = 5'b001_11,
    OP_LSLI = 5'b010_00,
    OP_LSRI = 5'b010_01,
    OP_ASRI = 5'b010_10,
    OP_ROTI = 5'b010_11,
    OP_MOVI = 5'b011_00,
    OP_ADDI = 5'b011_01,
    OP_SUBI = 5'b011_10,
    OP_CMPI = 5'b011_11,
    OP_LD   = 5'b100_00,
    OP_ST   = 5'b101_00,
    OP_BR   = 5'b110_00,
    OP_BSR  = 5'b110_01,
    OP_RET  = 5'b110_10,
    OP_RET2 = 5'b110_11,  // second encoding of RET, also accepted
    OP_IFS  = 5'b111_11
  } opcode_e;

  // ALU operations
  typedef enum logic [3:0] {
    ALU_OR, ALU_AND, ALU_XOR, ALU_NOT, ALU_PASSB,
    ALU_ADD, ALU_SUB, ALU_LSL, ALU_LSR, ALU_ASR, ALU_ROR
  } alu_op_e;

  // IFS condition codes, instr[11:8]
  typedef enum logic [3:0] {
    CC_CC = 4'd0,  CC_CS = 4'd1,  CC_NE = 4'd2,  CC_EQ = 4'd3,
    CC_PL = 4'd4,  CC_MI = 4'd5,  CC_LT = 4'd6,  CC_GE = 4'd7,
    CC_GT = 4'd8,  CC_LE = 4'd9,  CC_VC = 4'd10, CC_VS = 4'd11,
    CC_HI = 4'd12, CC_LS = 4'd13, CC_AL = 4'd14, CC_NV = 4'd15
  } cond_e;

  typedef struct packed {
    logic n;  // negative
    logic v;  // arithmetic overflow
    logic z;  // zero
    logic c;  // carry (add) / borrow (subtract)
  } flags_t;

  // Decoded control word for the execute stage
  typedef struct packed {
    alu_op_e alu_op;
    logic    use_imm;   // ALU operand b is the immediate, not rB
    word_t   imm;       // extended immediate (imm4, imm7 or imm11)
    regidx_t ra;        // read port A index (r15 for RET)
    regidx_t rb;        // read port B index
    logic    rd_we;     // ALU result written to rA
    flags_t  flag_we;   // which flags the instruction sets
    logic    is_ld;
    logic    is_st;
    logic    is_br;     // BR or BSR: pc <- pc + imm11
    logic    is_bsr;    // also r15 <- pc + 2
    logic    is_ret;    // pc <- r15
    logic    is_ifs;
    cond_e   cc;
  } ctrl_t;

endpackage
