// Self-checking testbench of the weight memory: all 20 x 20 signed weights
// are written one by one, then every column is read and compared.
module tb_weight_mem;
  localparam int M = 20, W = 6, AW = $clog2(M);
  logic clk = 0, we = 0, rd_en = 0;
  logic [AW-1:0] wrow = '0, wcol = '0, rcol = '0;
  logic signed [W-1:0] wdata = '0;
  logic signed [W-1:0] rdata [M];
  logic signed [W-1:0] model [M][M];
  int checks = 0, failures = 0;

  weight_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int r = 0; r < M; r++)
      for (int c = 0; c < M; c++) begin
        @(negedge clk); we = 1; wrow = AW'(r); wcol = AW'(c);
        wdata = W'($urandom); model[r][c] = wdata;
      end
    @(negedge clk); we = 0;
    for (int k = 0; k < 2 * M; k++) begin
      int c;
      c = (k < M) ? k : $urandom_range(M - 1);
      rd_en = 1; rcol = AW'(c);
      @(negedge clk); rd_en = 0;
      for (int r = 0; r < M; r++) begin
        checks++;
        if (rdata[r] != model[r][c]) begin
          failures++; $display("FAIL r=%0d c=%0d got %0d exp %0d", r, c, rdata[r], model[r][c]);
        end
      end
    end
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
