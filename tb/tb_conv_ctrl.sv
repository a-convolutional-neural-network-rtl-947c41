// Self-checking testbench of the time-sharing controller at a small size
// (NO = 3 output columns, M = 4, 64-clock pulse window). It checks the loop order (x, then
// c, then positive before negative), the number of cycles NO*M*2, the
// clocks per cycle 3*PW+6, the strobe positions inside a cycle, the V_F
// waveform, the ramp, and the init flag of the first cycle per column.
module tb_conv_ctrl;
  import cnn_pkg::*;
  localparam int NO = 3, M = 4, PW = 64;
  localparam int XW = $clog2(NO + M), CW = $clog2(M), TW = $clog2(PW + 1), RW = $clog2(PW);
  logic clk = 0, rst_n = 0, start = 0, acc_init = 1;
  logic busy, done, neg;
  phase_e phase;
  logic [XW-1:0] x, img_addr;
  logic [CW-1:0] c;
  logic wmem_rd, wdwc_start, wset_clear, wset_latch, idwc_start, nrn_clear, cmp_en, wdc_clear;
  logic [VF_W-1:0] v_f;
  logic [RW-1:0] v_ref;
  logic mem_re, mem_we, das_sub, das_init;
  int checks = 0, failures = 0, vf_nz = 0;

  conv_ctrl #(.NO(NO), .M(M), .PW(PW)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected strobes relative to the WLOAD clock of a cycle
  initial begin
    int op, busy_clk, tcyc, ex_x, ex_c, ex_n;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      acc_init = (run == 0);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      op = 0; busy_clk = 0; tcyc = 0;
      while (!done) begin
        if (busy) busy_clk++;
        if (phase == PH_WLOAD) begin
          ex_x = op / (2 * M); ex_c = (op / 2) % M; ex_n = op % 2;
          chk(int'(x) == ex_x && int'(c) == ex_c && int'(neg) == ex_n, "loop order");
          chk(int'(img_addr) == ex_x + ex_c, "image column");
          chk(wmem_rd, "weight read");
          chk(das_init == (acc_init && ex_c == 0 && ex_n == 0), "init flag");
          tcyc = 0;
          op++;
        end
        // strobe positions, tcyc = clocks since WLOAD
        chk(wdwc_start == (tcyc == 1 && phase == PH_WSET), "weight DWC start");
        chk(wset_latch == (tcyc == PW + 1), "weight latch");
        chk(idwc_start == (tcyc == PW + 2), "input DWC start");
        chk(nrn_clear == idwc_start, "neuron clear");
        if (phase == PH_INTEG && tcyc > PW + 2) begin
          int tt, d;
          tt = tcyc - PW - 3;
          d = (tt > 33) ? tt - 33 : 33 - tt;
          chk(int'(v_f) == ((d >= 17) ? 0 : 17 - d), "V_F waveform");
          if (v_f != '0) vf_nz++;
        end else chk(v_f == '0, "V_F idle");
        chk(wdc_clear == (tcyc == 2 * PW + 3), "WDC clear");
        if (cmp_en) chk(int'(v_ref) == tcyc - 2 * PW - 4, "ramp");
        chk(cmp_en == (tcyc >= 2 * PW + 4 && tcyc <= 3 * PW + 3), "comparator window");
        chk(mem_re == (tcyc == 3 * PW + 4), "state read");
        chk(mem_we == (tcyc == 3 * PW + 5), "state write");
        chk(das_sub == neg, "subtract in negative cycle");
        if (mem_we && int'(op) < NO * M * 2) chk(phase == PH_WR, "write phase");
        tcyc++;
        @(negedge clk);
      end
      chk(op == NO * M * 2, "number of cycles");
      chk(busy_clk == NO * M * 2 * (3 * PW + 6), "clocks per convolution");
      @(negedge clk);
      chk(!busy && !done, "back to idle");
    end
    chk(vf_nz > 0, "V_F waveform active");
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
