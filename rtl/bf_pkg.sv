// Shared number formats and arithmetic helpers of the adaptive beamformer.
//
// All data words are 16 bit, as on the reconfigurable tile processor the
// receiver is mapped to. Samples and coefficients are 1.15 fixed point
// (sign bit plus 15 fraction bits, range [-1, 1)). A complex value is a
// packed pair {re, im}. Angles are 16-bit binary angles: the full circle
// is 2^16, so +pi/2 is 16384 and the top bits of an angle can address a
// table directly. Helpers round to nearest and saturate, the tile's
// behaviour "in order to avoid overflow" in fixed-point mode.
package bf_pkg;

  typedef logic signed [15:0] q15_t;

  typedef struct packed {
    q15_t re;
    q15_t im;
  } cplx_t;

  typedef logic signed [15:0] angle_t;

  localparam q15_t Q15_MAX = 16'sh7FFF;
  localparam q15_t Q15_MIN = -16'sh8000;

  // Saturate a wide signed value to 16 bits.
  function automatic q15_t sat16(input logic signed [63:0] v);
    if (v > 64'sd32767) return Q15_MAX;
    else if (v < -64'sd32768) return Q15_MIN;
    else return q15_t'(v);
  endfunction

  // Round a Q(x).(15+SH) value to Q.15 (shift right by SH, round half up),
  // then saturate.
  function automatic q15_t rnd_sat(input logic signed [63:0] v, input int sh);
    logic signed [63:0] r;
    if (sh <= 0) return sat16(v);
    r = (v + (64'sd1 <<< (sh - 1))) >>> sh;
    return sat16(r);
  endfunction

  // Full-precision complex product (Q2.30 parts).
  typedef struct packed {
    logic signed [33:0] re;
    logic signed [33:0] im;
  } cprod_t;

  function automatic cprod_t cmul_full(input cplx_t a, input cplx_t b);
    cprod_t p;
    p.re = 34'(a.re * b.re) - 34'(a.im * b.im);
    p.im = 34'(a.re * b.im) + 34'(a.im * b.re);
    return p;
  endfunction

  // conj(a) * b, full precision.
  function automatic cprod_t cmul_conj_full(input cplx_t a, input cplx_t b);
    cprod_t p;
    p.re = 34'(a.re * b.re) + 34'(a.im * b.im);
    p.im = 34'(a.re * b.im) - 34'(a.im * b.re);
    return p;
  endfunction

  // Complex product rounded and saturated to 1.15.
  function automatic cplx_t cmul_q15(input cplx_t a, input cplx_t b);
    cprod_t p;
    cplx_t  r;
    p = cmul_full(a, b);
    r.re = rnd_sat(64'(p.re), 15);
    r.im = rnd_sat(64'(p.im), 15);
    return r;
  endfunction

  // Real 1.15 product, rounded and saturated.
  function automatic q15_t mul_q15(input q15_t a, input q15_t b);
    return rnd_sat(64'(a * b), 15);
  endfunction

endpackage
