// Weight memory.
//
// Holds the m x m receptive-field weights as signed W-bit numbers. Weights
// are loaded one at a time (row, column); reading returns the m weights of
// one receptive-field column, registered, the clock after rd_en. The
// memory itself appears in the block diagram; the word format and the
// ports are this design's own choice.
module weight_mem #(
  parameter int unsigned M = 20,
  parameter int unsigned W = 6,
  localparam int unsigned AW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                clk,
  input  logic                we,
  input  logic [AW-1:0]       wrow,
  input  logic [AW-1:0]       wcol,
  input  logic signed [W-1:0] wdata,
  input  logic                rd_en,
  input  logic [AW-1:0]       rcol,
  output logic signed [W-1:0] rdata [M]   // rdata[r] = weight(r, rcol)
);
  // stored column-major so a read is a single word
  logic [M*W-1:0] mem [M];

  always_ff @(posedge clk) begin
    if (we) mem[wcol][wrow*W +: W] <= wdata;
    if (rd_en)
      for (int r = 0; r < M; r++) rdata[r] <= mem[rcol][r*W +: W];
  end
endmodule
