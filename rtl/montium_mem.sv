// One data memory of the tile processor (the tile has ten, M01..M10).
//
// A synchronous memory with one write port and one read port that can be
// used in the same cycle. Read data appears one clock after the read
// address is presented (registered output); a read of the address being
// written returns the old contents. The tile's memories are 16 bits wide
// like its data path; the depth of 1024 words and the port arrangement are
// this design's choice. Nothing is reset: the contents are written before
// use.
module montium_mem #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
