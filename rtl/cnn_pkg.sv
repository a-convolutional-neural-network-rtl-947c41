// Shared constants and types of the PWM convolution engine.
//
// The engine computes a 2-D convolution of an N x N feature class with an
// m x m receptive field by time-sharing N-m+1 PWM neuron circuits. The
// sizes below are the ones of the fabricated chip (N = 100, m = 20, 6-bit
// precision, so 81 neurons). A pulse-width window is 2^6 clocks (a 6-bit
// value maps to 0..63 clocks of pulse), which is this design's own choice;
// so are the V_F waveform and the phase enum.
package cnn_pkg;

  localparam int unsigned CNN_N      = 100; // feature-class size (pixels per side)
  localparam int unsigned CNN_M      = 20;  // receptive-field size / synapses per neuron
  localparam int unsigned CNN_DATA_W = 6;   // precision of pixels, weights and states
  localparam int unsigned VF_W       = 5;   // width of the V_F code

  // Phases of one neuron-operation cycle.
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,
    PH_WLOAD = 3'd1,   // read weight column, request image column
    PH_WSET  = 3'd2,   // weight DWC pulses -> weight setting circuits
    PH_INTEG = 3'd3,   // input DWC pulses -> charge on neuron capacitors
    PH_CONV  = 3'd4,   // capacitor vs. V_ref ramp -> output pulse -> WDC
    PH_RD    = 3'd5,   // read state word
    PH_WR    = 3'd6    // DAS result written back
  } phase_e;

  // V_F code during tick t (0-based) of the integration window. A triangle
  // that lets no current flow in the first quarter of the window, peaks in
  // the middle and closes near four fifths: integrated over a pulse of width
  // T it gives a sigmoid-shaped f(T).
  function automatic logic [VF_W-1:0] vf_profile(input logic [CNN_DATA_W:0] t);
    int d;
    d = int'(t) - 33;
    if (d < 0) d = -d;
    return (d >= 17) ? '0 : VF_W'(17 - d);
  endfunction

endpackage
