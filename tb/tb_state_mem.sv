// Self-checking testbench of the internal state memory at its full size
// (81 words of 486 bits): random words are written to every address, then
// read back in random order with writes to other addresses in between.
module tb_state_mem;
  localparam int DEPTH = 81, WIDTH = 486, AW = $clog2(DEPTH);
  logic clk = 0, re = 0, we = 0;
  logic [AW-1:0] raddr = '0, waddr = '0;
  logic [WIDTH-1:0] rdata, wdata = '0;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  state_mem dut (.*);
  always #5 clk = ~clk;

  function automatic logic [WIDTH-1:0] rnd();
    logic [WIDTH-1:0] v;
    for (int i = 0; i < WIDTH; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; waddr = AW'(a); wdata = rnd(); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    repeat (300) begin
      int a, b;
      a = $urandom_range(DEPTH - 1);
      b = $urandom_range(DEPTH - 1);
      @(negedge clk);
      re = 1; raddr = AW'(a);
      we = (a != b); waddr = AW'(b); wdata = rnd();
      @(negedge clk);
      re = 0;
      if (we) model[b] = wdata;
      we = 0;
      checks++;
      if (rdata != model[a]) begin failures++; $display("FAIL addr %0d", a); end
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
