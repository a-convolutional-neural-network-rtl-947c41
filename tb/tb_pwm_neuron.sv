// Self-checking testbench of the PWM neuron model (20 synapses).
// Each trial clears the capacitor, sends 20 pulses of random widths with
// random weight levels while the V_F code follows a triangle over the
// window, then ramps v_ref 0..63 and measures the output pulse. The
// expected width is min(floor(sum_j w_j * F(T_j) / 2^12), 64), where
// F(T) is the sum of the V_F code over the first T clocks, computed here
// independently. A sweep with all inputs equal checks the S-shaped
// transfer: no output for short pulses, saturation for long ones. A second
// sweep over input width and weight level checks the family of curves:
// for a fixed width, a stronger weight never gives a shorter output.
module tb_pwm_neuron;
  localparam int M = 20, W = 6, VF_W = 5, SHIFT = 12, PW = 64;
  logic clk = 0, rst_n = 0, clear = 0, cmp_en = 0, p_out;
  logic [M-1:0] p_in = '0;
  logic [W-1:0] v_w [M];
  logic [VF_W-1:0] v_f = '0;
  logic [W-1:0] v_ref = '0;
  int checks = 0, failures = 0;

  pwm_neuron dut (.*);
  always #5 clk = ~clk;

  function automatic int tri_vf(int t);
    int d = (t > 33) ? t - 33 : 33 - t;
    return (d >= 17) ? 0 : 17 - d;
  endfunction

  // returns the measured output width
  task automatic trial(input int widths [M], input int wts [M], output int got, output int exp);
    longint vn = 0;
    for (int j = 0; j < M; j++) begin
      v_w[j] = W'(wts[j]);
      for (int t = 0; t < widths[j]; t++) vn += longint'(wts[j] * tri_vf(t));
    end
    exp = int'(vn >>> SHIFT);
    if (exp > PW) exp = PW;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    for (int t = 0; t < PW; t++) begin
      for (int j = 0; j < M; j++) p_in[j] = (t < widths[j]);
      v_f = VF_W'(tri_vf(t));
      @(negedge clk);
    end
    p_in = '0; v_f = '0;
    got = 0;
    for (int t = 0; t < PW; t++) begin
      cmp_en = 1; v_ref = W'(t);
      #1;
      if (p_out) got++;
      @(negedge clk);
    end
    cmp_en = 0;
    #1; checks++; if (p_out) failures++;
  endtask

  initial begin
    int wd [M], wt [M], got, exp, prev;
    for (int j = 0; j < M; j++) v_w[j] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (30) begin
      for (int j = 0; j < M; j++) begin
        wd[j] = $urandom_range(PW - 1);
        wt[j] = $urandom_range(PW - 1) >> $urandom_range(2);
      end
      trial(wd, wt, got, exp);
      checks++;
      if (got != exp) begin failures++; $display("FAIL random got=%0d exp=%0d", got, exp); end
    end
    // identical inputs, weight 40: sweep the input width
    prev = 0;
    for (int w = 0; w < PW; w += 4) begin
      for (int j = 0; j < M; j++) begin wd[j] = w; wt[j] = 40; end
      trial(wd, wt, got, exp);
      checks++;
      if (got != exp || got < prev) begin failures++; $display("FAIL sweep w=%0d got=%0d exp=%0d", w, got, exp); end
      if (w <= 12) begin checks++; if (got != 0) failures++; end
      prev = got;
    end
    checks++; if (prev == 0) failures++;
    // family of curves: for each input width the output must not shrink
    // as the weight level grows
    for (int w = 8; w < PW; w += 8) begin
      int lastw;
      lastw = -1;
      for (int lv = 8; lv < PW; lv += 8) begin
        for (int j = 0; j < M; j++) begin wd[j] = w; wt[j] = lv; end
        trial(wd, wt, got, exp);
        checks++;
        if (got != exp || got < lastw) begin failures++; $display("FAIL family w=%0d level=%0d got=%0d exp=%0d", w, lv, got, exp); end
        lastw = got;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
