// Self-checking testbench of the weight setting circuit model: the held
// level must equal the measured pulse width after latch, and must not move
// while the next pulse is being measured.
module tb_weight_set;
  localparam int W = 6;
  logic clk = 0, rst_n = 0, clear = 0, pwm = 0, latch = 0;
  logic [W-1:0] v_w;
  int checks = 0, failures = 0;
  int held = 0;

  weight_set dut (.*);
  always #5 clk = ~clk;

  task automatic run(input int w);
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    pwm = 1;
    repeat (w) begin
      @(negedge clk);
      checks++; if (int'(v_w) != held) failures++;
    end
    pwm = 0;
    @(negedge clk); latch = 1;
    @(negedge clk); latch = 0;
    held = (w > (1 << W) - 1) ? (1 << W) - 1 : w;
    checks++;
    if (int'(v_w) != held) begin failures++; $display("FAIL w=%0d v_w=%0d", w, v_w); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    run(5); run(0); run(63); run(70);
    repeat (30) run($urandom_range(63));
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
