// End-to-end testbench of the convolution engine at its full size
// (100 x 100 feature class, 20 x 20 receptive field, 81 neurons).
//
// Three convolutions are run on random images:
//   1. a random 20 x 20 kernel with both signs, new results (acc_init = 1);
//      its large weights make some states clip;
//   2. a 5 x 5 kernel in a 20 x 20 field padded with zero weights (the
//      smaller-receptive-field case), new results;
//   3. the same 5 x 5 kernel on another image, accumulated onto the
//      results of run 2 (acc_init = 0).
// After each run all 81 x 81 states are read back and compared with an
// independent model of the arithmetic: per cycle a neuron's charge is
// sum_r |w(r,c)| * F(pixel), F(T) the sum of the V_F triangle over the
// first T clocks, its output min(charge >> 12, 63), added or subtracted
// with clipping to the signed 6-bit range. It also checks the number of
// clocks per convolution, (N-m+1) * m * 2 cycles of 198 clocks, and counts
// positive cycles, negative cycles, clipping, zero-padded fields and
// accumulation; a mechanism that never happened is a failure.
module tb_cnn_conv_top;
  localparam int N = 100, M = 20, DW = 6, NO = N - M + 1, PW = 64;
  localparam int CYC = 3 * PW + 6;
  localparam int XW = $clog2(N), CW = $clog2(M), RW = $clog2(NO);

  logic clk = 0, rst_n = 0, start = 0, acc_init = 1;
  logic busy, done, sat_seen;
  logic [XW-1:0] img_col_addr;
  logic [DW-1:0] img_col [N];
  logic wmem_we = 0;
  logic [CW-1:0] wmem_row = '0, wmem_col = '0;
  logic signed [DW-1:0] wmem_wdata = '0;
  logic [RW-1:0] res_addr = '0;
  logic signed [DW-1:0] res_data [NO];

  cnn_conv_top dut (.*);
  always #5 clk = ~clk;

  // loop bounds kept in variables so the simulator compiles the loops
  // instead of unrolling them
  int n_img = N, n_rf = M, n_out = NO;
  int img [N][N];          // img[column][row]
  int wt  [M][M];          // wt[row][column]
  int exp_s [NO][NO];      // exp_s[x][k]
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0, n_sat = 0, n_small = 0, n_acc = 0, n_init = 0, n_model_sat = 0;

  always_comb
    for (int i = 0; i < N; i++) img_col[i] = DW'(img[img_col_addr][i]);

  // cycles seen at the state-memory write
  always @(posedge clk)
    if (dut.mem_we) begin
      if (dut.das_sub) n_neg++; else n_pos++;
    end

  function automatic int tri_vf(int t);
    int d = (t > 33) ? t - 33 : 33 - t;
    return (d >= 17) ? 0 : 17 - d;
  endfunction

  function automatic int f_area(int w);
    int a = 0;
    for (int t = 0; t < w; t++) a += tri_vf(t);
    return a;
  endfunction

  function automatic int clip(int v);
    if (v > 31) begin n_model_sat++; return 31; end
    if (v < -32) begin n_model_sat++; return -32; end
    return v;
  endfunction

  task automatic model(input bit init);
    int area [64];
    for (int v = 0; v < 64; v++) area[v] = f_area(v);
    for (int x = 0; x < n_out; x++)
      for (int k = 0; k < n_out; k++) begin
        int s = init ? 0 : exp_s[x][k];
        for (int c = 0; c < n_rf; c++)
          for (int ng = 0; ng < 2; ng++) begin
            longint q = 0;
            int y;
            for (int r = 0; r < n_rf; r++) begin
              int w = wt[r][c], mg;
              mg = (ng == 0) ? ((w > 0) ? w : 0) : ((w < 0) ? -w : 0);
              q += longint'(mg * area[img[x + c][k + r]]);
            end
            y = int'(q >>> 12);
            if (y > 63) y = 63;
            s = clip(ng ? s - y : s + y);
          end
        exp_s[x][k] = s;
      end
  endtask

  task automatic load_weights();
    for (int r = 0; r < n_rf; r++)
      for (int c = 0; c < n_rf; c++) begin
        @(negedge clk);
        wmem_we = 1; wmem_row = CW'(r); wmem_col = CW'(c); wmem_wdata = DW'(wt[r][c]);
      end
    @(negedge clk); wmem_we = 0;
  endtask

  task automatic random_image();
    for (int i = 0; i < n_img; i++)
      for (int j = 0; j < n_img; j++) img[i][j] = $urandom_range(63);
  endtask

  task automatic run_and_check(input bit init, input string name);
    int clocks = 0, bad = 0;
    acc_init = init;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) begin
      if (busy) clocks++;
      @(negedge clk);
    end
    checks++;
    if (clocks != NO * M * 2 * CYC) begin
      failures++; $display("FAIL %s: %0d clocks, expected %0d", name, clocks, NO * M * 2 * CYC);
    end
    model(init);
    for (int x = 0; x < n_out; x++) begin
      @(negedge clk); res_addr = RW'(x);
      @(negedge clk);
      for (int k = 0; k < n_out; k++) begin
        checks++;
        if (int'(res_data[k]) != exp_s[x][k]) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL %s: x=%0d k=%0d got %0d exp %0d", name, x, k, res_data[k], exp_s[x][k]);
        end
      end
    end
    if (sat_seen) n_sat++;
    if (init) n_init++; else n_acc++;
    $display("%s: %0d clocks, %0d mismatches", name, clocks, bad);
  endtask

  initial begin
    for (int i = 0; i < n_img; i++) img[0][i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // run 1: full 20 x 20 kernel
    random_image();
    for (int r = 0; r < n_rf; r++)
      for (int c = 0; c < n_rf; c++) wt[r][c] = int'($urandom_range(63)) - 32;
    load_weights();
    n_model_sat = 0;
    run_and_check(1, "full kernel");
    checks++; if (sat_seen != (n_model_sat > 0)) begin failures++; $display("FAIL saturation flag"); end
    // run 2: 5 x 5 kernel, rest zero
    random_image();
    for (int r = 0; r < n_rf; r++)
      for (int c = 0; c < n_rf; c++)
        wt[r][c] = (r < 5 && c < 5) ? int'($urandom_range(40)) - 20 : 0;
    load_weights();
    run_and_check(1, "5x5 kernel");
    n_small++;
    // run 3: accumulate onto run 2
    random_image();
    run_and_check(0, "5x5 kernel accumulated");
    $display("mechanisms: positive=%0d negative=%0d clipped_runs=%0d small_field=%0d accumulate=%0d init=%0d",
             n_pos, n_neg, n_sat, n_small, n_acc, n_init);
    checks++; if (n_pos != 3 * NO * M) failures++;
    checks++; if (n_neg != 3 * NO * M) failures++;
    checks++; if (n_sat == 0) failures++;
    checks++; if (n_small == 0) failures++;
    checks++; if (n_acc == 0) failures++;
    checks++; if (n_init == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3 * NO * M * 2 * CYC + 100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
