// Self-checking testbench of the digital adder-subtractor: every stored
// state, converter value, add/subtract and init combination is compared
// with integer arithmetic clipped to the signed 6-bit range.
module tb_das;
  localparam int W = 6;
  logic signed [W-1:0] state_in, state_out;
  logic        [W-1:0] conv_in;
  logic sub, init, ovf;
  int checks = 0, failures = 0;

  das dut (.*);

  initial begin
    int s, e, lo, hi;
    bit eo;
    lo = -(1 << (W - 1)); hi = (1 << (W - 1)) - 1;
    for (int st = lo; st <= hi; st++)
      for (int cv = 0; cv < (1 << W); cv++)
        for (int m = 0; m < 4; m++) begin
          state_in = W'(st); conv_in = W'(cv); sub = m[0]; init = m[1];
          #1;
          s = (init ? 0 : st) + (sub ? -cv : cv);
          e = s; eo = 0;
          if (s > hi) begin e = hi; eo = 1; end
          if (s < lo) begin e = lo; eo = 1; end
          checks++;
          if (int'(state_out) != e || ovf != eo) begin
            failures++;
            if (failures < 10)
              $display("FAIL st=%0d cv=%0d sub=%0b init=%0b out=%0d exp=%0d", st, cv, sub, init, state_out, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
