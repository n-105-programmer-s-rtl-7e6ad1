// n105_tb_pkg -- testbench support for the N-105 core: instruction encoders
// (a tiny assembler) and an instruction-set reference model.
//
// The reference model executes one instruction per call of iss_step with the
// programmer-visible state only: r0..r15, the N V Z C flags, pc (address of
// the instruction to execute), npc (address after it, which a branch
// replaces; this models the single delay slot) and the IFS skip flag. It is
// written from the instruction descriptions, independently of the RTL, and
// makes the same choices where the reference leaves freedom: V and C keep
// their value after OR/AND/XOR, C is the borrow after a subtraction, branch
// offsets are in bytes with bit 0 of a target cleared, and the LSLI field f
// shifts left by (16 - f) mod 16.
package n105_tb_pkg;

  localparam int unsigned MEMW = 32768;   // words in each memory (64 KiB)

  // opcodes (written out again here so the model does not share the RTL's)
  localparam bit [4:0] O_OR=5'd0, O_AND=5'd1, O_XOR=5'd2, O_NOT=5'd3,
                       O_MOV=5'd4, O_ADD=5'd5, O_SUB=5'd6, O_CMP=5'd7,
                       O_LSLI=5'd8, O_LSRI=5'd9, O_ASRI=5'd10, O_ROTI=5'd11,
                       O_MOVI=5'd12, O_ADDI=5'd13, O_SUBI=5'd14, O_CMPI=5'd15,
                       O_LD=5'd16, O_ST=5'd20, O_BR=5'd24, O_BSR=5'd25,
                       O_RET=5'd26, O_IFS=5'd31;

  // ---------------- encoders ----------------
  function automatic logic [15:0] e_rr(bit [4:0] op, int a, int b);
    return {4'(a), 4'(b), 3'($urandom), op};   // bits 7:5 are don't care
  endfunction
  function automatic logic [15:0] e_i4(bit [4:0] op, int a, int imm4);
    return {4'(a), 4'(imm4), 3'($urandom), op};
  endfunction
  function automatic logic [15:0] e_i7(bit [4:0] op, int a, int imm7);
    return {4'(a), 7'(imm7), op};
  endfunction
  function automatic logic [15:0] e_br(bit [4:0] op, int off);
    return {11'(off), op};
  endfunction
  function automatic logic [15:0] e_ifs(int cc);
    return {4'($urandom), 4'(cc), 3'($urandom), O_IFS};
  endfunction
  function automatic logic [15:0] e_ret();
    return {11'($urandom), O_RET};
  endfunction
  function automatic logic [15:0] e_lsli(int a, int n);   // assembler: field = 16-n
    return e_i4(O_LSLI, a, (16 - n) & 15);
  endfunction
  localparam logic [15:0] NOP = 16'h0000;

  // initial data memory content
  function automatic logic [15:0] dinit(int unsigned i);
    return 16'((i * 32'd40503) ^ (i >> 3) ^ 32'h5a5a);
  endfunction

  // ---------------- reference model ----------------
  logic [15:0] imem [MEMW];
  logic [15:0] dmem [MEMW];
  logic [15:0] r [16];
  bit          fn, fv, fz, fc;
  int unsigned pc, npc;
  bit          skip;
  // event counters of the last run
  int unsigned n_exec, n_skipped, n_branch, n_ld, n_st, n_ifs;

  function automatic void iss_reset(int unsigned start);
    for (int i = 0; i < 16; i++) r[i] = '0;
    fn = 0; fv = 0; fz = 0; fc = 0;
    pc = start; npc = start + 2; skip = 0;
    n_exec = 0; n_skipped = 0; n_branch = 0; n_ld = 0; n_st = 0; n_ifs = 0;
  endfunction

  function automatic bit cond(int cc);
    case (cc)
      0: return !fc;          1: return fc;
      2: return !fz;          3: return fz;
      4: return !fn;          5: return fn;
      6: return fn != fv;     7: return fn == fv;
      8: return !(fz || (fn != fv));  9: return fz || (fn != fv);
      10: return !fv;         11: return fv;
      12: return !(fc || fz); 13: return fc || fz;
      14: return 1;           default: return 0;
    endcase
  endfunction

  function automatic void set_nz(int unsigned v);
    fn = v[15]; fz = (v[15:0] == 0);
  endfunction

  function automatic logic [15:0] add_f(int unsigned a, int unsigned b);
    int unsigned s = a + b;
    int sa = int'(signed'(16'(a))), sb = int'(signed'(16'(b)));
    fc = (s > 32'hffff);
    fv = (sa + sb > 32767) || (sa + sb < -32768);
    set_nz(s & 32'hffff);
    return 16'(s);
  endfunction

  function automatic logic [15:0] sub_f(int unsigned a, int unsigned b);
    int unsigned s = (a - b) & 32'hffff;
    int sa = int'(signed'(16'(a))), sb = int'(signed'(16'(b)));
    fc = (a < b);
    fv = (sa - sb > 32767) || (sa - sb < -32768);
    set_nz(s);
    return 16'(s);
  endfunction

  function automatic int unsigned sx(int unsigned v, int bits);
    int unsigned m = 1 << (bits - 1);
    v = v & ((1 << bits) - 1);
    return ((v ^ m) - m) & 32'hffff;
  endfunction

  function automatic void iss_step();
    logic [15:0] ins = imem[(pc >> 1) % MEMW];
    int op = int'(ins[4:0]);
    int a = int'(ins[15:12]), b = int'(ins[11:8]);
    int unsigned ra = r[a], rb = r[b], f = ins[11:8];
    int unsigned imm7 = ins[11:5], imm11 = ins[15:5];
    int unsigned next_pc = npc, next_npc = npc + 2;
    bit next_skip = 0;
    if (skip) begin
      n_skipped++;
    end else begin
      n_exec++;
      case (op)
        O_OR:   begin r[a] = 16'(ra | rb); set_nz(r[a]); end
        O_AND:  begin r[a] = 16'(ra & rb); set_nz(r[a]); end
        O_XOR:  begin r[a] = 16'(ra ^ rb); set_nz(r[a]); end
        O_NOT:  r[a] = ~16'(ra);
        O_MOV:  r[a] = 16'(rb);
        O_ADD:  r[a] = add_f(ra, rb);
        O_SUB:  r[a] = sub_f(ra, rb);
        O_CMP:  void'(sub_f(ra, rb));
        O_LSLI: r[a] = 16'(ra << ((16 - f) % 16));
        O_LSRI: r[a] = 16'(ra >> f);
        O_ASRI: r[a] = 16'(sx(ra, 16) >> f | ((ra & 16'h8000) ? ~(32'hffff >> f) : 0));
        O_ROTI: r[a] = 16'((ra >> f) | (ra << (16 - f)));
        O_MOVI: r[a] = 16'(sx(imm7, 7));
        O_ADDI: r[a] = add_f(ra, imm7);
        O_SUBI: r[a] = sub_f(ra, imm7);
        O_CMPI: void'(sub_f(ra, sx(imm7, 7)));
        O_LD:   begin r[a] = dmem[(rb >> 1) % MEMW]; n_ld++; end
        O_ST:   begin dmem[(rb >> 1) % MEMW] = 16'(ra); n_st++; end
        O_BR:   begin next_npc = (npc + sx(imm11, 11)) & 32'hfffe; n_branch++; end
        O_BSR:  begin next_npc = (npc + sx(imm11, 11)) & 32'hfffe; r[15] = 16'(npc + 2); n_branch++; end
        O_RET, 27: begin next_npc = r[15] & 16'hfffe; n_branch++; end
        O_IFS:  begin next_skip = !cond(f); n_ifs++; end
        default: ;
      endcase
    end
    pc = next_pc & 32'hffff; npc = next_npc & 32'hffff; skip = next_skip;
  endfunction

endpackage
