// PWM neuron circuit with M synapses -- behavioural model of an analog block.
//
// Each synapse passes a current onto the shared neuron capacitor while its
// input pulse p_in[j] is high. The current is the product of the synapse's
// weight level v_w[j] (the voltage V_W) and the shared code v_f (the
// current the voltage V_F lets through at that moment). Because v_f changes
// over the integration window, the charge a pulse delivers is a nonlinear
// function of its width, so each synapse computes w_j * f(u_j) and the
// capacitor sums them: the neuron outputs its internal state, not f of it.
// The capacitor voltage is modelled by the accumulator vn, discharged by
// clear. During readout a comparator gives p_out high while the scaled
// capacitor value vn >> SHIFT exceeds the ramp code v_ref, so the output
// pulse width is the internal state in clocks.
//
// The synapse/neuron split, the V_F-controlled nonlinearity, charge
// summation and the ramp comparator follow the document; the digital
// stand-ins for voltages and charge, SHIFT and the clear input are this
// design's own.
module pwm_neuron #(
  parameter int unsigned M     = 20,
  parameter int unsigned W     = 6,     // width of v_w and v_ref codes
  parameter int unsigned VF_W  = 5,
  parameter int unsigned SHIFT = 12,    // capacitor scale against the ramp
  localparam int unsigned VN_W = W + VF_W + $clog2(M + 1) + W + 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,            // discharge C_N
  input  logic [M-1:0]    p_in,             // presynaptic pulses
  input  logic [W-1:0]    v_w [M],          // weight level per synapse
  input  logic [VF_W-1:0] v_f,              // nonlinearity control, shared
  input  logic [W-1:0]    v_ref,            // ramp
  input  logic            cmp_en,           // comparator output enable
  output logic            p_out
);
  logic [VN_W-1:0] vn;
  logic [VN_W-1:0] i_s;

  // summation of the synapse currents
  always_comb begin
    i_s = '0;
    for (int j = 0; j < M; j++)
      if (p_in[j]) i_s += VN_W'(v_w[j]) * VN_W'(v_f);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     vn <= '0;
    else if (clear) vn <= '0;
    else            vn <= vn + i_s;
  end

  assign p_out = cmp_en && ((vn >> SHIFT) > VN_W'(v_ref));
endmodule
