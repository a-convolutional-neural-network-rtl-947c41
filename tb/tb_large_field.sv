// Larger receptive field by time-sharing: a 40 x 40 kernel on a 100 x 100
// image, run on the 20 x 20 engine at its full size.
//
// The kernel is split into four 20 x 20 quarters. Quarter (pr, pc) is
// loaded into the weight memory and run with the image shifted by 20*pc
// columns and 20*pr rows (pixels beyond the image read as zero); the first
// quarter starts new results (acc_init = 1), the other three accumulate
// (acc_init = 0). This outside sequencing is the testbench's, the engine
// is unchanged. The 81 x 81 states (61 x 61 of them are full 40 x 40
// outputs) are compared with an independent model that applies the same
// per-cycle arithmetic quarter by quarter: charge sum_r |w| * F(pixel),
// output min(charge >> 12, 63), add or subtract with clipping to -32..31.
module tb_large_field;
  localparam int N = 100, M = 20, DW = 6, NO = N - M + 1, K = 2 * M;
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

  // loop bounds in variables so the simulator compiles rather than unrolls
  int n_img = N, n_rf = M, n_out = NO, n_k = K;
  int img [N][N];          // img[column][row]
  int wt  [K][K];          // wt[row][column]
  int exp_s [NO][NO];
  int pr = 0, pc = 0;      // current quarter
  int checks = 0, failures = 0, n_acc = 0, n_init = 0;

  function automatic int pix(int col, int row);
    return (col < N && row < N) ? img[col][row] : 0;
  endfunction

  always_comb
    for (int i = 0; i < N; i++) img_col[i] = DW'(pix(int'(img_col_addr) + M * pc, i + M * pr));

  function automatic int tri_vf(int t);
    int d = (t > 33) ? t - 33 : 33 - t;
    return (d >= 17) ? 0 : 17 - d;
  endfunction

  task automatic model_quarter(input bit init);
    int area [64];
    for (int v = 0; v < 64; v++) begin
      area[v] = 0;
      for (int t = 0; t < v; t++) area[v] += tri_vf(t);
    end
    for (int x = 0; x < n_out; x++)
      for (int k = 0; k < n_out; k++) begin
        int s = init ? 0 : exp_s[x][k];
        for (int c = 0; c < n_rf; c++)
          for (int ng = 0; ng < 2; ng++) begin
            longint q = 0;
            int y;
            for (int r = 0; r < n_rf; r++) begin
              int w = wt[M * pr + r][M * pc + c], mg;
              mg = (ng == 0) ? ((w > 0) ? w : 0) : ((w < 0) ? -w : 0);
              q += longint'(mg * area[pix(x + c + M * pc, k + r + M * pr)]);
            end
            y = int'(q >>> 12);
            if (y > 63) y = 63;
            s = ng ? s - y : s + y;
            if (s > 31) s = 31;
            if (s < -32) s = -32;
          end
        exp_s[x][k] = s;
      end
  endtask

  task automatic run_quarter(input bit init);
    for (int r = 0; r < n_rf; r++)
      for (int c = 0; c < n_rf; c++) begin
        @(negedge clk);
        wmem_we = 1; wmem_row = CW'(r); wmem_col = CW'(c);
        wmem_wdata = DW'(wt[M * pr + r][M * pc + c]);
      end
    @(negedge clk); wmem_we = 0;
    acc_init = init;
    start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    model_quarter(init);
    if (init) n_init++; else n_acc++;
  endtask

  initial begin
    int bad = 0, nonzero = 0;
    for (int i = 0; i < n_img; i++)
      for (int j = 0; j < n_img; j++) img[i][j] = $urandom_range(63);
    for (int r = 0; r < n_k; r++)
      for (int c = 0; c < n_k; c++) wt[r][c] = int'($urandom_range(24)) - 12;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int q = 0; q < 4; q++) begin
      pr = q / 2; pc = q % 2;
      run_quarter(q == 0);
    end
    for (int x = 0; x < n_out; x++) begin
      @(negedge clk); res_addr = RW'(x);
      @(negedge clk);
      for (int k = 0; k < n_out; k++) begin
        checks++;
        if (res_data[k] != 0) nonzero++;
        if (int'(res_data[k]) != exp_s[x][k]) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL x=%0d k=%0d got %0d exp %0d", x, k, res_data[k], exp_s[x][k]);
        end
      end
    end
    $display("40x40 field: %0d quarters started new, %0d accumulated, %0d non-zero states",
             n_init, n_acc, nonzero);
    checks++; if (n_init != 1 || n_acc != 3) failures++;
    checks++; if (nonzero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (4 * NO * M * 2 * 198 + 100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
