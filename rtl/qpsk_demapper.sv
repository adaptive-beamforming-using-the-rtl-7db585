// QPSK hard-decision demapper for the matched-filter output of each beam.
//
// A QPSK symbol carries two bits, one on the in-phase and one on the
// quadrature axis; the decision is the sign of each component. The bit is
// 0 for a non-negative and 1 for a negative component, which matches the
// Gray mapping of the DVB-S standard (bits = {I bit, Q bit}). One register
// stage: out_valid, out_beam and bits follow in_valid by one cycle. The
// decision rule and bit order are this design's choices; the document
// names the demapper only.
module qpsk_demapper
  import bf_pkg::*;
#(
  parameter int  N_BEAM = 3,
  localparam int BW     = (N_BEAM > 1) ? $clog2(N_BEAM) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [BW-1:0] in_beam,
  input  cplx_t         in_y,
  output logic          out_valid,
  output logic [BW-1:0] out_beam,
  output logic [1:0]    bits
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_beam  <= '0;
      bits      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_beam <= in_beam;
        bits     <= {in_y.re[15], in_y.im[15]};
      end
    end
  end

endmodule
