// Self-checking testbench of the digital/PWM converter: for random values
// (and 0 and the maximum) the pulse must rise the clock after start and
// stay high for exactly `value` clocks.
module tb_dwc;
  localparam int W = 6;
  logic clk = 0, rst_n = 0, start = 0, pwm;
  logic [W-1:0] value;
  int checks = 0, failures = 0;

  dwc dut (.*);
  always #5 clk = ~clk;

  task automatic run(input int v);
    int width, first;
    @(negedge clk); value = W'(v); start = 1;
    @(negedge clk); start = 0; value = '0;
    width = 0; first = -1;
    for (int t = 0; t < (1 << W) + 4; t++) begin
      if (pwm) begin width++; if (first < 0) first = t; end
      @(negedge clk);
    end
    checks++;
    if (width != v || (v != 0 && first != 0)) begin
      failures++;
      $display("FAIL value=%0d width=%0d first=%0d", v, width, first);
    end
  endtask

  initial begin
    value = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    checks++; if (pwm) failures++;
    run(0); run(1); run((1 << W) - 1);
    repeat (40) run($urandom_range((1 << W) - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
