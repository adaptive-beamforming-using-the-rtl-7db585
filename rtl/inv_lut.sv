// Lookup table of mu/|y|^2 for the complex division in the beam-steering
// update.
//
// 1/|y|^2 for |y|^2 in [0, 1) lies in (1, inf) and has no 1.15 code, so
// the step size mu is folded into the table: entry k holds
// mu / (k/DEPTH), rounded to 1.15 and saturated at 32767/32768. With the
// default 512 entries and mu = 0.005 the entries k = 0, 1, 2 are saturated
// (k/512 < mu); all others are exact to rounding. The index is the upper
// log2(DEPTH) bits of |y|^2 (a non-negative 1.15 value; negative inputs
// read entry 0). Values of |y|^2 at or above 1 cannot be represented and
// use the last entry. A lookup takes two cycles (address register, then
// table register), like the sine table; `sat` flags a saturated entry.
// The table contents, DEPTH and mu follow the document; indexing by
// truncation and the handshake are this design's choices.
module inv_lut
  import bf_pkg::*;
#(
  parameter int  DEPTH = 512,
  parameter real MU    = 0.005
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req,
  input  q15_t mag2,
  output logic valid,
  output q15_t inv_out,
  output logic sat
);

  localparam int AB = $clog2(DEPTH);

  typedef logic [16:0] rom_t [DEPTH];  // {saturated, value}

  function automatic rom_t mk_rom();
    rom_t t;
    real  v;
    for (int k = 0; k < DEPTH; k++) begin
      if (k == 0) v = 1.0e9;
      else        v = MU * DEPTH / k;
      v = $floor(v * 32768.0 + 0.5);
      if (v > 32767.0) t[k] = {1'b1, 16'h7FFF};
      else             t[k] = {1'b0, 16'($rtoi(v))};
    end
    return t;
  endfunction

  localparam rom_t ROM = mk_rom();

  logic [AB-1:0] addr_q;
  logic          req_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q  <= '0;
      req_q   <= 1'b0;
      valid   <= 1'b0;
      inv_out <= '0;
      sat     <= 1'b0;
    end else begin
      addr_q  <= mag2[15] ? '0 : mag2[14 -: AB];
      req_q   <= req;
      valid   <= req_q;
      {sat, inv_out} <= ROM[addr_q];
    end
  end

endmodule
