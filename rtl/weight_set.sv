// Weight setting circuit -- behavioural model of an analog block.
//
// On the chip this circuit turns a weight pulse from a digital/PWM
// converter into the DC voltage V_W that sets one synapse row's weight. The
// model measures the pulse width in clocks (clear strobe, then one count per
// high clock, saturating) and, on the latch strobe, copies the count to the
// held output v_w. v_w is a digital code standing for the analog voltage:
// a larger code means a stronger weight. The code abstraction and the
// explicit clear/latch strobes are this design's own; the voltage polarity
// of the real circuit is not modelled.
module weight_set #(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,   // start of a measurement
  input  logic         pwm,     // weight pulse from a DWC
  input  logic         latch,   // transfer the measured width to v_w
  output logic [W-1:0] v_w      // held weight level
);
  logic [W-1:0] width;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      width <= '0;
      v_w   <= '0;
    end else begin
      if (clear)                       width <= '0;
      else if (pwm && width != '1)     width <= width + 1'b1;
      if (latch)                       v_w   <= width;
    end
  end
endmodule
