// Address generation unit of one tile-processor memory.
//
// Produces one address per `step` so that regular vector access patterns
// cost no ALU cycles. Four patterns, the ones the tile supports in
// hardware: linear (+1 per access), stride-by-n (+n per access), modulo
// counting (offset runs 0 .. modulus-1 and wraps, giving circular
// buffers) and bit reversal (the offset counter is output with its low
// `rev_bits` bits reversed, the reordering used by FFTs).
// addr = base + offset, wrapping at 2^AW. `load` restarts the sequence at
// offset 0; `step` advances it after the current address has been used.
// addr is registered: it changes on the clock edge after load/step.
// The configuration fields and their encoding are this design's choice.
module montium_agu #(
  parameter int AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    mode,      // 0 linear, 1 stride, 2 modulo, 3 bit-reverse
  input  logic [AW-1:0] base,
  input  logic [AW-1:0] stride,    // stride for mode 1 and 2
  input  logic [AW:0]   modulus,   // wrap value of the offset in mode 2
  input  logic [$clog2(AW+1)-1:0] rev_bits, // number of reversed bits in mode 3
  input  logic          load,
  input  logic          step,
  output logic [AW-1:0] addr
);

  localparam logic [1:0] M_LINEAR = 2'd0, M_STRIDE = 2'd1, M_MODULO = 2'd2, M_BITREV = 2'd3;

  logic [AW-1:0] offset, next_off;

  always_comb begin
    next_off = offset;
    unique case (mode)
      M_LINEAR: next_off = offset + AW'(1);
      M_STRIDE: next_off = offset + stride;
      M_MODULO: begin
        if ((AW+1)'(offset) + (AW+1)'(stride) >= modulus)
          next_off = AW'((AW+1)'(offset) + (AW+1)'(stride) - modulus);
        else
          next_off = offset + stride;
      end
      M_BITREV: next_off = offset + AW'(1);
      default:  next_off = offset;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    offset <= '0;
    else if (load) offset <= '0;
    else if (step) offset <= next_off;
  end

  logic [AW-1:0] rev;
  always_comb begin
    rev = offset;
    for (int i = 0; i < AW; i++)
      if (i < int'(rev_bits)) rev[i] = offset[int'(rev_bits) - 1 - i];
  end

  assign addr = base + ((mode == M_BITREV) ? rev : offset);

endmodule
