// Digital adder-subtractor (DAS).
//
// Combinational: adds the unsigned W-bit converter result to the signed
// W-bit stored state (positive-weight cycle) or subtracts it
// (negative-weight cycle), saturating at the signed W-bit limits. With init
// set the stored state is taken as zero, which starts a new convolution
// without a separate memory clear. Adding in the positive and subtracting
// in the negative cycle follows the document; the number format,
// saturation and init are this design's own choices. ovf flags a clipped
// result.
module das #(
  parameter int unsigned W = 6
) (
  input  logic signed [W-1:0] state_in,
  input  logic        [W-1:0] conv_in,
  input  logic                sub,       // 1: negative-weight cycle
  input  logic                init,      // 1: ignore state_in
  output logic signed [W-1:0] state_out,
  output logic                ovf
);
  localparam logic signed [W+1:0] MAXV = (W+2)'(2 ** (W - 1) - 1);
  localparam logic signed [W+1:0] MINV = -(W+2)'(2 ** (W - 1));

  logic signed [W+1:0] base, mag, sum;

  always_comb begin
    base = init ? '0 : (W+2)'(state_in);
    mag  = (W+2)'({2'b00, conv_in});
    sum  = sub ? base - mag : base + mag;
    ovf  = 1'b0;
    if (sum > MAXV) begin
      state_out = MAXV[W-1:0];
      ovf       = 1'b1;
    end else if (sum < MINV) begin
      state_out = MINV[W-1:0];
      ovf       = 1'b1;
    end else begin
      state_out = sum[W-1:0];
    end
  end
endmodule
