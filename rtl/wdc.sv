// PWM/digital converter (WDC).
//
// Measures a pulse width in clock periods: a clear strobe zeroes the count,
// then every clock in which the pulse is high adds one, saturating at
// 2^W-1. The count is valid the clock after the pulse has fallen. Its role
// (neuron output pulse -> digital value for the adder-subtractor) follows
// the block diagram; the counter is this design's own choice.
module wdc #(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         pwm,
  output logic [W-1:0] value
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       value <= '0;
    else if (clear)                   value <= '0;
    else if (pwm && value != '1)      value <= value + 1'b1;
  end
endmodule
