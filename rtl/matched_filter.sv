// Receive matched filter: two real F_MF-tap FIR filters per beam, one on
// the in-phase and one on the quadrature part of the beamformer output.
//
// out.re[n] = sum_t h[t] * y.re[n - t], out.im likewise, with one shared
// set of real 1.15 coefficients h (the same pulse shape applies to I and
// Q). A single multiplier does one real multiply-accumulate per cycle:
// the I filter first, then the Q filter, so a beam sample costs 2*F_MF
// cycles (18 with the document's nine taps; 54 for three beams).
// Timing: a sample is accepted when in_valid and in_ready are high (tap 0
// of I is computed in that cycle); out_valid pulses with out_beam and the
// rounded, saturated result 2*F_MF cycles after acceptance, when in_ready
// is high again. The history of each beam is cleared by reset. The
// coefficients are written through cfg_*; after reset the filter passes
// its input through (h[0] = 32767/32768). The document does not give the
// pulse shape, so the coefficients are left to the user; the shared
// coefficient set, the port and the handshake are this design's choices.
module matched_filter
  import bf_pkg::*;
#(
  parameter int  N_BEAM = 3,
  parameter int  F_MF   = 9,
  localparam int BW     = (N_BEAM > 1) ? $clog2(N_BEAM) : 1,
  localparam int TW     = $clog2(2 * F_MF),
  localparam int CW     = (F_MF > 1) ? $clog2(F_MF) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [CW-1:0] cfg_tap,
  input  q15_t          cfg_coef,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [BW-1:0] in_beam,
  input  cplx_t         in_y,
  output logic          out_valid,
  output logic [BW-1:0] out_beam,
  output cplx_t         out_y
);

  localparam int HD = (F_MF > 1) ? F_MF - 1 : 1;

  q15_t  coef [F_MF];
  cplx_t hist [N_BEAM][HD];   // hist[b][j] = y_b[n-1-j]

  logic               run;
  logic [TW-1:0]      t;        // 0..F_MF-1: I taps, F_MF..2F_MF-1: Q taps
  logic [BW-1:0]      beam;
  cplx_t              xin;
  logic signed [39:0] acc_i, acc_q;
  int                 tap;
  q15_t               h, v;
  logic signed [31:0] p;

  assign in_ready = !run;

  always_comb begin
    tap = (int'(t) >= F_MF) ? int'(t) - F_MF : int'(t);
    h   = run ? coef[tap] : coef[0];
    if (!run)                 v = in_y.re;
    else if (int'(t) < F_MF)  v = (tap == 0) ? xin.re : hist[beam][(tap > 0) ? tap - 1 : 0].re;
    else                      v = (tap == 0) ? xin.im : hist[beam][(tap > 0) ? tap - 1 : 0].im;
    p = h * v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < F_MF; j++) coef[j] <= (j == 0) ? Q15_MAX : '0;
      for (int b = 0; b < N_BEAM; b++)
        for (int j = 0; j < HD; j++) hist[b][j] <= '0;
      run       <= 1'b0;
      t         <= '0;
      beam      <= '0;
      xin       <= '0;
      acc_i     <= '0;
      acc_q     <= '0;
      out_valid <= 1'b0;
      out_beam  <= '0;
      out_y     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (cfg_we && int'(cfg_tap) < F_MF) coef[cfg_tap] <= cfg_coef;
      if (!run) begin
        if (in_valid) begin
          beam  <= in_beam;
          xin   <= in_y;
          acc_i <= 40'(p);
          acc_q <= '0;
          t     <= TW'(1);
          run   <= 1'b1;
        end
      end else begin
        if (int'(t) < F_MF) acc_i <= acc_i + 40'(p);
        else                acc_q <= acc_q + 40'(p);
        t <= t + TW'(1);
        if (int'(t) == 2 * F_MF - 1) begin
          run       <= 1'b0;
          out_valid <= 1'b1;
          out_beam  <= beam;
          out_y.re  <= rnd_sat(64'(acc_i), 15);
          out_y.im  <= rnd_sat(64'(acc_q + 40'(p)), 15);
          if (F_MF > 1) begin
            for (int j = HD - 1; j > 0; j--) hist[beam][j] <= hist[beam][j-1];
            hist[beam][0] <= xin;
          end
        end
      end
    end
  end

endmodule
