// Complex division X / Y scaled by a precomputed e = mu/|Y|^2.
//
// Multiplying numerator and denominator by conj(Y) gives
//   (a + jb) / (c + jd) = (ac + bd) * e + j (bc - ad) * e,  e = 1/|Y|^2,
// six real multiplications and two additions once e is known. Here e is
// read from the mu/|y|^2 table, so the result is mu * X / Y. The four
// products ac, bd, bc, ad are kept at full precision (Q2.30), summed, then
// multiplied by e and rounded and saturated to 1.15. One register stage:
// `valid_out` follows `valid_in` by one cycle. The precision of the
// intermediate sums is this design's choice.
module complex_div
  import bf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid_in,
  input  cplx_t num,   // X = a + jb
  input  cplx_t den,   // Y = c + jd
  input  q15_t  e,     // mu / |Y|^2
  output logic  valid_out,
  output cplx_t quo    // mu * X / Y
);

  logic signed [33:0] re_s, im_s;
  logic signed [50:0] re_p, im_p;

  always_comb begin
    re_s = 34'(num.re * den.re) + 34'(num.im * den.im);   // ac + bd
    im_s = 34'(num.im * den.re) - 34'(num.re * den.im);   // bc - ad
    re_p = 51'(re_s * e);
    im_p = 51'(im_s * e);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      quo       <= '0;
    end else begin
      valid_out <= valid_in;
      quo.re    <= rnd_sat(64'(re_p), 30);
      quo.im    <= rnd_sat(64'(im_p), 30);
    end
  end

endmodule
