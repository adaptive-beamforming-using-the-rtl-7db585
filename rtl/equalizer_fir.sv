// Antenna equalizer: one complex FIR filter of F_EQ taps per antenna.
//
// Corrects the gain and delay differences of the antenna front-ends before
// beamforming: out[n] = sum_t h[ant][t] * x_ant[n - t]. The filters of all
// antennas share one complex multiplier that performs one tap per clock
// cycle, so a sample costs F_EQ cycles (5 with the document's five taps)
// and a snapshot of N_ANT antennas costs N_ANT * F_EQ cycles.
// Timing: a sample is accepted when in_valid and in_ready are both high;
// that cycle already computes tap 0, the next F_EQ - 1 cycles compute the
// older taps from the antenna's history, and out_valid pulses (with
// out_ant and the rounded, saturated 1.15 result) in the cycle after the
// last tap, when in_ready is high again. Coefficients (1.15 complex) are
// written through cfg_*; after reset every filter is a pass-through
// (tap 0 = 32767/32768, others 0). The sample history is cleared by reset.
// The filter order and its cost per sample follow the document; the
// coefficient port, the reset contents and the handshake are this
// design's choices.
module equalizer_fir
  import bf_pkg::*;
#(
  parameter int  N_ANT = 64,
  parameter int  F_EQ  = 5,
  localparam int AW    = (N_ANT > 1) ? $clog2(N_ANT) : 1,
  localparam int TW    = (F_EQ > 1) ? $clog2(F_EQ) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cfg_we,
  input  logic [AW-1:0] cfg_ant,
  input  logic [TW-1:0] cfg_tap,
  input  cplx_t         cfg_coef,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [AW-1:0] in_ant,
  input  cplx_t         in_sample,
  output logic          out_valid,
  output logic [AW-1:0] out_ant,
  output cplx_t         out_sample
);

  localparam int HD = (F_EQ > 1) ? F_EQ - 1 : 1;

  cplx_t coef [N_ANT][F_EQ];
  cplx_t hist [N_ANT][HD];   // hist[a][j] = x_a[n-1-j]

  logic               run;
  logic [TW-1:0]      t;
  logic [AW-1:0]      ant;
  cplx_t              xin;
  logic signed [39:0] acc_re, acc_im;
  cprod_t             p;
  cplx_t              opnd, hsel;

  assign in_ready = !run;

  always_comb begin
    hsel = hist[ant][(int'(t) > 0) ? int'(t) - 1 : 0];
    opnd = run ? hsel : in_sample;
    p    = cmul_full(run ? coef[ant][t] : coef[in_ant][0], opnd);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < N_ANT; a++) begin
        for (int j = 0; j < F_EQ; j++) coef[a][j] <= (j == 0) ? '{re: Q15_MAX, im: '0} : '0;
        for (int j = 0; j < HD; j++)   hist[a][j] <= '0;
      end
      run        <= 1'b0;
      t          <= '0;
      ant        <= '0;
      xin        <= '0;
      acc_re     <= '0;
      acc_im     <= '0;
      out_valid  <= 1'b0;
      out_ant    <= '0;
      out_sample <= '0;
    end else begin
      out_valid <= 1'b0;
      if (cfg_we) coef[cfg_ant][cfg_tap] <= cfg_coef;
      if (!run) begin
        if (in_valid) begin
          ant    <= in_ant;
          xin    <= in_sample;
          acc_re <= 40'(p.re);
          acc_im <= 40'(p.im);
          t      <= TW'(1);
          if (F_EQ == 1) begin
            out_valid      <= 1'b1;
            out_ant        <= in_ant;
            out_sample.re  <= rnd_sat(64'(p.re), 15);
            out_sample.im  <= rnd_sat(64'(p.im), 15);
          end else begin
            run <= 1'b1;
          end
        end
      end else begin
        if (int'(t) == F_EQ - 1) begin
          run           <= 1'b0;
          out_valid     <= 1'b1;
          out_ant       <= ant;
          out_sample.re <= rnd_sat(64'(acc_re + 40'(p.re)), 15);
          out_sample.im <= rnd_sat(64'(acc_im + 40'(p.im)), 15);
          for (int j = HD - 1; j > 0; j--) hist[ant][j] <= hist[ant][j-1];
          hist[ant][0] <= xin;
        end else begin
          acc_re <= acc_re + 40'(p.re);
          acc_im <= acc_im + 40'(p.im);
          t      <= t + TW'(1);
        end
      end
    end
  end

endmodule
