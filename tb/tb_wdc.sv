// Self-checking testbench of the PWM/digital converter: pulses of known
// width (including wider than the range, which must saturate) are measured
// after a clear.
module tb_wdc;
  localparam int W = 6;
  logic clk = 0, rst_n = 0, clear = 0, pwm = 0;
  logic [W-1:0] value;
  int checks = 0, failures = 0;

  wdc dut (.*);
  always #5 clk = ~clk;

  task automatic run(input int w, input int gap);
    int exp;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    repeat (gap) @(negedge clk);
    pwm = 1; repeat (w) @(negedge clk); pwm = 0;
    @(negedge clk);
    exp = (w > (1 << W) - 1) ? (1 << W) - 1 : w;
    checks++;
    if (int'(value) != exp) begin
      failures++;
      $display("FAIL width=%0d value=%0d exp=%0d", w, value, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    run(0, 0); run(1, 3); run(63, 1); run(64, 0); run(90, 2);
    repeat (40) run($urandom_range(70), $urandom_range(5));
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
