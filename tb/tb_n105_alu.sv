// tb_n105_alu -- self-checking testbench of n105_alu.
//
// Applies every operation to corner operands (0, 1, 0x7fff, 0x8000, 0xffff)
// and to random operands, and compares result and flags with values computed
// here from the instruction definitions with integer arithmetic.
module tb_n105_alu;
  import n105_pkg::*;

  alu_op_e op;
  word_t   a, b, y;
  flags_t  f;
  int checks = 0, failures = 0;

  n105_alu u_dut (.op, .a, .b, .y, .flags(f));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned s16(int unsigned v);
    return v[15] ? v - 65536 : v;
  endfunction

  task automatic one(alu_op_e o, int unsigned va, int unsigned vb);
    int unsigned ey, sh;
    int sa, sb, ss;
    bit ec, ev, chk_cv;
    op = o; a = 16'(va); b = 16'(vb);
    #1;
    sh = vb & 15; sa = int'(s16(va)); sb = int'(s16(vb));
    chk_cv = 0; ec = 0; ev = 0;
    case (o)
      ALU_OR:    ey = va | vb;
      ALU_AND:   ey = va & vb;
      ALU_XOR:   ey = va ^ vb;
      ALU_NOT:   ey = ~va & 16'hffff;
      ALU_PASSB: ey = vb;
      ALU_ADD:   begin ey = (va + vb) & 16'hffff; ec = (va + vb) > 65535;
                       ss = sa + sb; ev = ss > 32767 || ss < -32768; chk_cv = 1; end
      ALU_SUB:   begin ey = (va - vb) & 16'hffff; ec = va < vb;
                       ss = sa - sb; ev = ss > 32767 || ss < -32768; chk_cv = 1; end
      ALU_LSL:   ey = (va << ((16 - sh) % 16)) & 16'hffff;
      ALU_LSR:   ey = va >> sh;
      ALU_ASR:   ey = (sa >>> sh) & 16'hffff;
      ALU_ROR:   ey = ((va >> sh) | (va << (16 - sh))) & 16'hffff;
      default:   ey = 0;
    endcase
    checks++;
    if (y != 16'(ey) || f.n != ey[15] || f.z != (ey == 0) ||
        (chk_cv && (f.c != ec || f.v != ev))) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%h b=%h: y=%h nvzc=%b, expected y=%h c=%b v=%b",
                 o.name(), va, vb, y, f, ey, ec, ev);
    end
  endtask

  initial begin
    int unsigned corner [5] = '{0, 1, 16'h7fff, 16'h8000, 16'hffff};
    alu_op_e o;
    for (int k = 0; k <= int'(ALU_ROR); k++) begin
      o = alu_op_e'(k);
      foreach (corner[i]) foreach (corner[j]) one(o, corner[i], corner[j]);
      for (int s = 0; s < 16; s++) one(o, 16'hb6d3, s);
      for (int n = 0; n < 2000; n++) one(o, $urandom & 16'hffff, $urandom & 16'hffff);
    end
    // the reference's assembler convention: "lsli r11 13" encodes field 16-13 = 3
    one(ALU_LSL, 16'h0001, 3);
    checks++; if (y != 16'h2000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
