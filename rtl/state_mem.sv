// Internal state memory.
//
// Two-port synchronous RAM of DEPTH words of WIDTH bits: one read port
// (data the clock after the address) and one write port. With the default
// 81 words of 81 x 6 bits it holds 39,366 bits, the chip's 39 kb SRAM: one
// word is one output column, so all 81 adder-subtractors read and write
// their states in one access. The organisation is this design's reading of
// the memory size; contents are not reset, as in an SRAM.
module state_mem #(
  parameter int unsigned DEPTH = 81,
  parameter int unsigned WIDTH = 486,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
