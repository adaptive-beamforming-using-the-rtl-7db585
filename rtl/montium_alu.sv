// One ALU of the reconfigurable tile processor's processing part array.
//
// Purely combinational: the ALU is not pipelined, so the whole path from
// the register-file operands A..D to the outputs settles within one clock
// cycle. Three levels, as in the ALU structure of the tile:
//   Level 1  four function units. FU1 works on A,B and FU2 on C,D; FU3 and
//            FU4 both take the results of FU1 and FU2. FU3 gives Z1A and
//            FU4 gives Z1B. Every unit raises overflow, negative and zero
//            flags; a decoder picks one flag (optionally inverted) as the
//            status bit SB, which also leaves the ALU for the sequencer.
//   Level 2  multiplier on mX (A, Z1A or B) and mY (C, Z1B or D), followed
//            by an adder/subtractor. Its operands come from the product,
//            A..D, Z1A, Z1B or the east input; the right operand can be
//            chosen at run time by SB among B, D, Z1A and Z1B. The adder
//            result ZA goes to the west neighbour.
//   Level 3  butterfly ZA + mB and ZA - mB (mB is B or D) and two output
//            multiplexers mO1/mO2 that give o1 and o2.
// In fixed-point mode the multiplier returns the rounded 1.15 product; in
// integer mode it returns the low 16 bits. With ctrl.saturate set, sums
// and the fixed-point product saturate instead of wrapping. Which
// operations the function units offer beyond "bitwise and logic operations
// or simple arithmetic", and the control-word encoding, are this design's
// choices.
module montium_alu
  import montium_pkg::*;
(
  input  alu_ctrl_t          ctrl,
  input  logic signed [15:0] a,
  input  logic signed [15:0] b,
  input  logic signed [15:0] c,
  input  logic signed [15:0] d,
  input  logic signed [15:0] east,
  output logic signed [15:0] west,
  output logic signed [15:0] o1,
  output logic signed [15:0] o2,
  output logic               sb,
  output flags_t [3:0]       flags
);

  // ---------------------------------------------------------------- level 1
  function automatic logic signed [15:0] fit(input logic signed [16:0] v, input logic sat,
                                             output logic ovf);
    ovf = (v > 17'sd32767) || (v < -17'sd32768);
    if (ovf && sat) return (v < 0) ? -16'sh8000 : 16'sh7FFF;
    return v[15:0];
  endfunction

  function automatic logic signed [15:0] fu(input fu_op_e op, input logic signed [15:0] x,
                                            input logic signed [15:0] y, input logic sat,
                                            output logic ovf);
    logic signed [15:0] r;
    ovf = 1'b0;
    unique case (op)
      FU_ZERO:  r = '0;
      FU_PASSA: r = x;
      FU_PASSB: r = y;
      FU_ADD:   r = fit(17'(x) + 17'(y), sat, ovf);
      FU_SUB:   r = fit(17'(x) - 17'(y), sat, ovf);
      FU_NEG:   r = fit(-17'(x), sat, ovf);
      FU_AND:   r = x & y;
      FU_OR:    r = x | y;
      FU_XOR:   r = x ^ y;
      FU_NOT:   r = ~x;
      FU_SRA:   r = x >>> y[3:0];
      FU_SLL:   r = x << y[3:0];
      FU_ABS:   r = fit((x < 0) ? -17'(x) : 17'(x), sat, ovf);
      default:  r = '0;
    endcase
    return r;
  endfunction

  logic signed [15:0] f1, f2, z1a, z1b;
  logic [3:0] ovf;

  always_comb begin
    f1  = fu(ctrl.fu1, a,  b,  ctrl.saturate, ovf[0]);
    f2  = fu(ctrl.fu2, c,  d,  ctrl.saturate, ovf[1]);
    z1a = fu(ctrl.fu3, f1, f2, ctrl.saturate, ovf[2]);
    z1b = fu(ctrl.fu4, f1, f2, ctrl.saturate, ovf[3]);
  end

  logic signed [15:0] fres [4];
  assign fres[0] = f1;
  assign fres[1] = f2;
  assign fres[2] = z1a;
  assign fres[3] = z1b;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      flags[i].ovf  = ovf[i];
      flags[i].neg  = fres[i][15];
      flags[i].zero = (fres[i] == 16'sd0);
    end
  end

  // Status-bit decoder.
  logic sb_raw;
  always_comb begin
    unique case (ctrl.sb_flag)
      FLAG_NEG:  sb_raw = flags[ctrl.sb_unit].neg;
      FLAG_ZERO: sb_raw = flags[ctrl.sb_unit].zero;
      FLAG_OVF:  sb_raw = flags[ctrl.sb_unit].ovf;
      default:   sb_raw = 1'b0;
    endcase
    sb = sb_raw ^ ctrl.sb_invert;
  end

  // ---------------------------------------------------------------- level 2
  logic signed [15:0] mx, my, mul;
  logic signed [31:0] prod;

  always_comb begin
    unique case (ctrl.mx)
      MX_A:    mx = a;
      MX_Z1A:  mx = z1a;
      MX_B:    mx = b;
      default: mx = a;
    endcase
    unique case (ctrl.my)
      MY_C:    my = c;
      MY_Z1B:  my = z1b;
      MY_D:    my = d;
      default: my = c;
    endcase
    prod = mx * my;
    if (ctrl.fixed_point) begin
      // (-1) * (-1) is the only product that does not fit 1.15.
      if (prod == 32'sh4000_0000) mul = ctrl.saturate ? 16'sh7FFF : -16'sh8000;
      else                        mul = 16'((prod + 32'sh4000) >>> 15);
    end else begin
      mul = prod[15:0];
    end
  end

  function automatic logic signed [15:0] pick(input src_e s, input logic signed [15:0] m,
                                              input logic signed [15:0] xa, input logic signed [15:0] xb,
                                              input logic signed [15:0] xc, input logic signed [15:0] xd,
                                              input logic signed [15:0] za, input logic signed [15:0] zb,
                                              input logic signed [15:0] e);
    unique case (s)
      SRC_ZERO: return '0;
      SRC_MUL:  return m;
      SRC_A:    return xa;
      SRC_B:    return xb;
      SRC_C:    return xc;
      SRC_D:    return xd;
      SRC_Z1A:  return za;
      SRC_Z1B:  return zb;
      SRC_EAST: return e;
      default:  return '0;
    endcase
  endfunction

  logic signed [15:0] add_l, add_r, za_q;
  logic               add_ovf;
  dyn_e               dyn;

  always_comb begin
    add_l = pick(ctrl.add_l, mul, a, b, c, d, z1a, z1b, east);
    dyn   = sb ? ctrl.dyn1 : ctrl.dyn0;
    if (ctrl.add_dyn) begin
      unique case (dyn)
        DYN_B:   add_r = b;
        DYN_D:   add_r = d;
        DYN_Z1A: add_r = z1a;
        DYN_Z1B: add_r = z1b;
        default: add_r = b;
      endcase
    end else begin
      add_r = pick(ctrl.add_r, mul, a, b, c, d, z1a, z1b, east);
    end
    za_q = ctrl.add_sub ? fit(17'(add_l) - 17'(add_r), ctrl.saturate, add_ovf)
                        : fit(17'(add_l) + 17'(add_r), ctrl.saturate, add_ovf);
  end

  assign west = za_q;

  // ---------------------------------------------------------------- level 3
  logic signed [15:0] mbv, bsum, bdiff;
  logic               s_ovf, d_ovf;

  always_comb begin
    mbv   = (ctrl.mb == MB_D) ? d : b;
    bsum  = fit(17'(za_q) + 17'(mbv), ctrl.saturate, s_ovf);
    bdiff = fit(17'(za_q) - 17'(mbv), ctrl.saturate, d_ovf);
  end

  function automatic logic signed [15:0] outsel(input mo_sel_e s, input logic signed [15:0] ps,
                                                input logic signed [15:0] pd, input logic signed [15:0] pz,
                                                input logic signed [15:0] za, input logic signed [15:0] zb);
    unique case (s)
      MO_SUM:  return ps;
      MO_DIFF: return pd;
      MO_ZA:   return pz;
      MO_Z1A:  return za;
      MO_Z1B:  return zb;
      default: return pz;
    endcase
  endfunction

  assign o1 = outsel(ctrl.mo1, bsum, bdiff, za_q, z1a, z1b);
  assign o2 = outsel(ctrl.mo2, bsum, bdiff, za_q, z1a, z1b);

endmodule
