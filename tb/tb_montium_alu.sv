// Self-checking testbench of montium_alu. Drives random operands through
// a set of control words (fixed-point MAC, integer multiply, function-unit
// chains, status-bit operand selection, butterfly outputs, east/west
// path, saturation) and compares every output with a value computed here
// directly from the operands.
module tb_montium_alu;
  import montium_pkg::*;

  alu_ctrl_t ctrl;
  logic signed [15:0] a, b, c, d, east, west, o1, o2;
  logic sb;
  flags_t [3:0] flags;
  int checks = 0, failures = 0;

  montium_alu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic signed [15:0] got, input logic signed [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: a=%0d b=%0d c=%0d d=%0d got %0d exp %0d", what, a, b, c, d, got, exp);
    end
  endtask

  function automatic alu_ctrl_t base();
    alu_ctrl_t k = '0;
    k.fu1 = FU_ZERO; k.fu2 = FU_ZERO; k.fu3 = FU_ZERO; k.fu4 = FU_ZERO;
    k.add_l = SRC_ZERO; k.add_r = SRC_ZERO; k.mo1 = MO_ZA; k.mo2 = MO_ZA;
    return k;
  endfunction

  function automatic logic signed [15:0] satv(input longint v);
    if (v > 32767) return 16'sh7FFF;
    if (v < -32768) return -16'sh8000;
    return 16'(v);
  endfunction

  initial begin
    longint m;
    for (int n = 0; n < 400; n++) begin
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom); d = 16'($urandom); east = 16'($urandom);
      if (n % 7 == 0) begin a = -16'sh8000; c = -16'sh8000; end

      // fixed-point multiply-add: o1 = round(a*c) + d (wrapping)
      ctrl = base(); ctrl.fixed_point = 1; ctrl.mx = MX_A; ctrl.my = MY_C;
      ctrl.add_l = SRC_MUL; ctrl.add_r = SRC_D;
      #1;
      m = (longint'(a) * longint'(c) + 16384) >>> 15;
      if (m > 32767) m = -32768;  // -1 * -1 wraps without saturation
      chk("mac", o1, 16'(m + longint'(d)));

      // integer multiply, saturating subtract: o1 = sat(b - lo16(b*d))
      ctrl = base(); ctrl.saturate = 1; ctrl.mx = MX_B; ctrl.my = MY_D;
      ctrl.add_l = SRC_B; ctrl.add_r = SRC_MUL; ctrl.add_sub = 1;
      #1;
      chk("imul-sub", o1, satv(longint'(b) - longint'(16'(longint'(b) * longint'(d)))));

      // level 1 chain: Z1A = (a + b) xor (c & d); Z1B = (a+b) - (c&d), mul Z1A*Z1B
      ctrl = base(); ctrl.fu1 = FU_ADD; ctrl.fu2 = FU_AND; ctrl.fu3 = FU_XOR; ctrl.fu4 = FU_SUB;
      ctrl.mo1 = MO_Z1A; ctrl.mo2 = MO_Z1B; ctrl.mx = MX_Z1A; ctrl.my = MY_Z1B; ctrl.add_l = SRC_MUL;
      #1;
      chk("fu-xor", o1, 16'(a + b) ^ (c & d));
      chk("fu-sub", o2, 16'(16'(a + b) - (c & d)));
      chk("fu-mul", west, 16'(longint'(16'(a + b) ^ (c & d)) * longint'(16'(16'(a + b) - (c & d)))));

      // status-bit operand choice: o1 = a - (c < 0 ? b : d); SB = c < 0
      ctrl = base(); ctrl.fu2 = FU_PASSA; ctrl.sb_unit = 2'd1; ctrl.sb_flag = FLAG_NEG;
      ctrl.add_l = SRC_A; ctrl.add_dyn = 1; ctrl.dyn1 = DYN_B; ctrl.dyn0 = DYN_D; ctrl.add_sub = 1;
      #1;
      chk("dyn", o1, 16'(a - ((c < 0) ? b : d)));
      chk("sb", 16'(sb), 16'(c < 0));

      // shift and negate in level 1, chosen by inverted sign: CORDIC style
      ctrl = base(); ctrl.fu1 = FU_SRA; ctrl.fu3 = FU_NEG; ctrl.fu4 = FU_PASSA;
      ctrl.sb_unit = 2'd0; ctrl.sb_flag = FLAG_NEG; ctrl.sb_invert = 1;
      ctrl.add_l = SRC_D; ctrl.add_dyn = 1; ctrl.dyn1 = DYN_Z1A; ctrl.dyn0 = DYN_Z1B; ctrl.add_sub = 1;
      #1;
      chk("cordic-x", o1, (a < 0) ? 16'(d - (a >>> b[3:0])) : 16'(d + (a >>> b[3:0])));
      chk("neg-flag", 16'(flags[0].neg), 16'((a >>> b[3:0]) < 0));

      // butterfly with east input: ZA = east + c; o1 = ZA + d; o2 = ZA - d
      ctrl = base(); ctrl.add_l = SRC_EAST; ctrl.add_r = SRC_C; ctrl.mb = MB_D;
      ctrl.mo1 = MO_SUM; ctrl.mo2 = MO_DIFF;
      #1;
      chk("west", west, 16'(east + c));
      chk("bfly+", o1, 16'(16'(east + c) + d));
      chk("bfly-", o2, 16'(16'(east + c) - d));

      // saturating function unit and zero / overflow flags
      ctrl = base(); ctrl.saturate = 1; ctrl.fu1 = FU_ADD; ctrl.fu2 = FU_SUB; ctrl.mo1 = MO_ZA;
      ctrl.add_l = SRC_ZERO; ctrl.add_r = SRC_ZERO;
      ctrl.fu3 = FU_PASSA; ctrl.fu4 = FU_PASSB; ctrl.mo2 = MO_Z1A;
      #1;
      chk("sat-add", o2, satv(longint'(a) + longint'(b)));
      chk("ovf-flag", 16'(flags[1].ovf), 16'((longint'(c) - longint'(d)) > 32767 || (longint'(c) - longint'(d)) < -32768));
      chk("zero-flag", 16'(flags[3].zero), 16'(satv(longint'(c) - longint'(d)) == 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
