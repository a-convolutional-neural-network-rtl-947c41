// Digital/PWM converter (DWC).
//
// Turns a W-bit unsigned value into a single pulse whose width is the value
// in clock periods. A start strobe loads the value into a down-counter; the
// pulse is high while the counter is non-zero, so it rises the clock after
// start and lasts exactly `value` clocks (value 0 gives no pulse). The
// engine uses one per input pixel row (N) and one per weight row (m).
// The block and its purpose follow the block diagram; the counter is this
// design's own (simplest) realisation.
module dwc #(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,   // load value, begin pulse next clock
  input  logic [W-1:0] value,
  output logic         pwm
);
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            cnt <= '0;
    else if (start)        cnt <= value;
    else if (cnt != '0)    cnt <= cnt - 1'b1;
  end

  assign pwm = (cnt != '0);
endmodule
