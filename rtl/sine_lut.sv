// Sine lookup table used by the beam-steering update for sin(4*angle(y)).
//
// A 1024-entry, 16-bit read-only table (2048 bytes) addressed by the upper
// 10 bits of a 16-bit binary angle (full circle 2^16). Entry k holds
// sin(2*pi*k/1024) in 1.15, rounded to nearest and saturated at +32767.
// The table is computed at elaboration; no file is read. A lookup takes
// two clock cycles, as on the tile: the address is registered in the
// first, the table word in the second. `req` with `angle` starts a lookup,
// `valid` marks `sin_out` two cycles later. Lookups may be issued every
// cycle. Rounding the angle down to the table step (2*pi/1024) and the
// req/valid handshake are this design's choices.
module sine_lut
  import bf_pkg::*;
#(
  parameter int ABITS = 10
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   req,
  input  angle_t angle,
  output logic   valid,
  output q15_t   sin_out
);

  localparam int  DEPTH = 1 << ABITS;
  localparam real PI    = 3.14159265358979323846;

  typedef logic signed [15:0] rom_t [DEPTH];

  function automatic rom_t mk_rom();
    rom_t t;
    real  v;
    for (int k = 0; k < DEPTH; k++) begin
      v = $floor(32768.0 * $sin(2.0 * PI * k / DEPTH) + 0.5);
      if (v > 32767.0) v = 32767.0;
      t[k] = 16'($rtoi(v));
    end
    return t;
  endfunction

  localparam rom_t ROM = mk_rom();

  logic [ABITS-1:0] addr_q;
  logic             req_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q  <= '0;
      req_q   <= 1'b0;
      valid   <= 1'b0;
      sin_out <= '0;
    end else begin
      addr_q  <= angle[15 -: ABITS];
      req_q   <= req;
      valid   <= req_q;
      sin_out <= ROM[addr_q];
    end
  end

endmodule
