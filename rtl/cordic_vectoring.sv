// CORDIC in vectoring mode: converts a Cartesian pair (x, y) to polar
// form (r, theta), built from three tile-processor ALUs.
//
// Each clock cycle performs one CORDIC iteration i on all three equations
// at once, one equation per ALU, as the tile maps it:
//   ALU 1: x' = x - d*(y >>> i)        operands A=y, B=i, D=x
//   ALU 2: y' = y + d*(x >>> i)        operands A=x, B=i, D=y
//   ALU 3: z' = z - d*atan(2^-i)       operands A=atan(2^-i), C=y, D=z
// with d = +1 when y < 0 and -1 otherwise. In every ALU a function unit
// forms the shifted (or table) value, a second unit negates it, and the
// status bit, taken from the sign of y, makes the adder pick the plain or
// the negated value. The arctangent constants come from a 16-entry table
// (32 bytes) that is computed at elaboration.
// Vectoring only converges for angles within +-pi/2, so an initial
// iteration first rotates vectors with x < 0 by -+pi/2 (x' = +-y,
// y' = -+x, z' = +-pi/2); it uses the same ALU mapping with shift 0 and a
// zero left adder operand. Then ITER regular iterations follow.
// Interface: pulse `start` with x_in/y_in (1.15). `done` pulses
// ITER + 3 cycles later (one load, one initial-rotation, ITER iteration
// and one output cycle) with `angle` (binary angle, full circle 2^16,
// range [-pi, pi)) and `mag` = sqrt(x^2 + y^2) (1.15, gain-corrected,
// saturated). `prerot` tells whether the initial rotation was applied.
// On entry the input pair is normalised: shifted left by the largest s
// that keeps both components in 16 bits, then scaled by 1/4 so that the
// CORDIC gain (about 1.65) cannot overflow the 16-bit word. The angle does
// not depend on the scale, and short vectors keep their precision; the
// magnitude is scaled back by 2^-s at the output. This normalisation, the
// headroom, the angle format and the start/done handshake are this
// design's own. The 14 iterations
// are the document's.
module cordic_vectoring
  import bf_pkg::*;
  import montium_pkg::*;
#(
  parameter int ITER = 14
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  q15_t   x_in,
  input  q15_t   y_in,
  output logic   busy,
  output logic   done,
  output angle_t angle,
  output q15_t   mag,
  output logic   prerot
);

  localparam real PI = 3.14159265358979323846;

  typedef logic signed [15:0] atan_rom_t [16];

  function automatic atan_rom_t mk_atan();
    atan_rom_t t;
    for (int i = 0; i < 16; i++)
      t[i] = 16'($rtoi($floor($atan(2.0 ** (-i)) / (2.0 * PI) * 65536.0 + 0.5)));
    return t;
  endfunction

  localparam atan_rom_t ATAN = mk_atan();

  // 1/A_n in 1.15, A_n = prod_{i<ITER} sqrt(1 + 2^-2i).
  function automatic int mk_kinv();
    real g;
    g = 1.0;
    for (int i = 0; i < ITER; i++) g = g * $sqrt(1.0 + 2.0 ** (-2 * i));
    return $rtoi($floor(32768.0 / g + 0.5));
  endfunction

  localparam int KINV = mk_kinv();

  // ALU configurations of the three equations.
  function automatic alu_ctrl_t cfg(input int unit, input logic pre);
    alu_ctrl_t c;
    c = '0;
    c.fixed_point = 1'b0;
    c.saturate    = 1'b0;
    c.fu2         = FU_ZERO;
    c.fu3         = FU_NEG;    // Z1A = -value
    c.fu4         = FU_PASSA;  // Z1B =  value
    c.sb_flag     = FLAG_NEG;
    c.sb_invert   = 1'b1;      // SB = 1 when y >= 0
    c.mx          = MX_A;
    c.my          = MY_C;
    c.add_dyn     = 1'b1;
    c.dyn1        = DYN_Z1A;
    c.dyn0        = DYN_Z1B;
    c.add_r       = SRC_ZERO;
    c.mb          = MB_B;
    c.mo1         = MO_ZA;
    c.mo2         = MO_ZA;
    unique case (unit)
      0: begin  // x' = x - d*(y>>>i): sign of y read from the shifted value
        c.fu1     = FU_SRA;
        c.sb_unit = 2'd0;
        c.add_l   = pre ? SRC_ZERO : SRC_D;
        c.add_sub = 1'b1;
      end
      1: begin  // y' = y + d*(x>>>i)
        c.fu1     = FU_SRA;
        c.fu2     = FU_PASSB;  // D = y, tested for < 0
        c.sb_unit = 2'd1;
        c.add_l   = pre ? SRC_ZERO : SRC_D;
        c.add_sub = 1'b0;
      end
      default: begin  // z' = z - d*atan(2^-i)
        c.fu1     = FU_PASSA;
        c.fu2     = FU_PASSA;  // C = y, tested for < 0
        c.sb_unit = 2'd1;
        c.add_l   = SRC_D;
        c.add_sub = 1'b1;
      end
    endcase
    return c;
  endfunction

  typedef enum logic [1:0] { S_IDLE, S_PRE, S_ITER, S_FIN } state_e;
  state_e state;

  logic signed [15:0] x, y, z;
  logic [3:0]         it;
  logic [3:0]         nsh, nsh_q;
  logic               pre;
  logic signed [15:0] shamt, atanv;
  logic signed [15:0] x_n, y_n, z_n;

  // normalisation shift: largest s with |x|,|y| << s still inside 16 bits
  always_comb begin
    logic [15:0] ax, ay, m;
    ax  = x_in[15] ? 16'(-17'(x_in)) : x_in;
    ay  = y_in[15] ? 16'(-17'(y_in)) : y_in;
    m   = (ax > ay) ? ax : ay;
    nsh = '0;
    for (int s = 15; s >= 1; s--)
      if ((32'(m) << s) <= 32'd32767 && nsh == 4'd0) nsh = 4'(s);
  end

  assign pre   = (state == S_PRE);
  assign shamt = pre ? 16'sd0 : 16'(it);
  assign atanv = pre ? 16'sd16384 : ATAN[it];

  montium_alu u_alu1 (
    .ctrl(cfg(0, pre)), .a(y), .b(shamt), .c(16'sd0), .d(x), .east(16'sd0),
    .west(), .o1(x_n), .o2(), .sb(), .flags()
  );
  montium_alu u_alu2 (
    .ctrl(cfg(1, pre)), .a(x), .b(shamt), .c(16'sd0), .d(y), .east(16'sd0),
    .west(), .o1(y_n), .o2(), .sb(), .flags()
  );
  montium_alu u_alu3 (
    .ctrl(cfg(2, pre)), .a(atanv), .b(16'sd0), .c(y), .d(z), .east(16'sd0),
    .west(), .o1(z_n), .o2(), .sb(), .flags()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      x      <= '0;
      y      <= '0;
      z      <= '0;
      it     <= '0;
      nsh_q  <= '0;
      done   <= 1'b0;
      angle  <= '0;
      mag    <= '0;
      prerot <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          x     <= 16'((32'(x_in) <<< nsh) >>> 2);
          y     <= 16'((32'(y_in) <<< nsh) >>> 2);
          nsh_q <= nsh;
          z     <= '0;
          it    <= '0;
          state <= S_PRE;
        end
        S_PRE: begin
          prerot <= x[15];
          if (x[15]) begin
            x <= x_n;
            y <= y_n;
            z <= z_n;
          end
          state <= S_ITER;
        end
        S_ITER: begin
          x  <= x_n;
          y  <= y_n;
          z  <= z_n;
          it <= it + 4'd1;
          if (int'(it) == ITER - 1) state <= S_FIN;
        end
        S_FIN: begin
          angle <= z;
          mag   <= rnd_sat(64'(x * KINV), 13 + int'(nsh_q));
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  initial assert (ITER >= 1 && ITER <= 16) else $error("ITER must be 1..16");

endmodule
