# PWM convolution engine: analog neurons, digital accumulation

This is RTL for a convolutional-network accelerator built from a small number
of pulse-width-modulated (PWM) neuron circuits. The neurons are reused over
time. Values travel between blocks as pulses whose width carries the number.
A neuron's synapses turn each input pulse into charge on a capacitor. The
weight and a shared nonlinear function shape that charge. The capacitor then
sums the charges of all synapses. Everything that has to be stored or
accumulated is digital: the neuron's output pulse is counted back into a
number, then added to or subtracted from a word of an on-chip state memory.

The default configuration convolves a 100 x 100 feature class with a
20 x 20 receptive field. It uses 81 neurons of 20 synapses each, and holds
81 x 81 six-bit results in a 39,366-bit state memory.

On the chip this engine was designed for, the neurons, weight setting
circuits, pulse-to-digital converters, adder-subtractors and the state memory
are integrated. The input and weight digital-to-pulse converters and the
weight memory sit outside the chip. The RTL top holds all of them.

The neurons and the weight-setting circuits are analog on silicon. Here they
are behavioural models with digital stand-ins for voltages and charge. All
other blocks are synthesizable RTL.

## How one convolution is time-shared

Let the feature class be N x N and the receptive field m x m. There are
NO = N - m + 1 output positions per side. The engine has NO neurons, each
with m synapses, and computes one output column at a time.

* The N pixels of one input column are converted to N pulses. Neuron k
  receives pixels k .. k+m-1 of that column. Neighbouring neurons therefore
  share m-1 of their inputs.
* All neurons get the same m weights: one column c of the receptive field.
  The weights are identical everywhere because this is a convolution.
* Neuron k's result is added to state (x, k), where x is the output column.

For output column x the engine steps through the receptive-field columns
c = 0 .. m-1 and reads input column x + c each time. For each c it runs two
cycles:

1. A positive cycle. It sends only the positive weights (negative ones as
   zero), and the result is **added** to the state.
2. A negative cycle. It sends the magnitudes of the negative weights, and
   the result is **subtracted**.

A pulse can only carry a magnitude, which is why signed weights need two
passes. A convolution therefore takes NO x m x 2 cycles: 81 x 20 x 2 = 3240
at the default size.

In every cycle all 81 neurons work in parallel, with 1620 synapses active.
At the 1.6 us cycle this design is sized for, a convolution takes 5.2 ms.
That is 2.0 x 10^9 multiply-and-add operations per second.

A smaller receptive field needs no special mode: load zeros into the unused
weights. A larger field can be split into 20 x 20 pieces by an outside
controller. Each piece is run with `acc_init = 0`, which adds onto the stored
results instead of overwriting them. Feeding results back as the input of the
next layer is also left to an outside controller.

## Inside one operation cycle

`conv_ctrl` runs every cycle through fixed phases. PW = 2^6 = 64 is the
length in clocks of one pulse window. A 6-bit value `v` is a pulse of `v`
clocks.

| phase | clocks | what happens |
|---|---|---|
| WLOAD | 1 | weight column c is read; image column x+c is requested on `img_col_addr` |
| WSET | PW+1 | 20 weight DWCs pulse; the 20 weight setting circuits measure the pulses and latch them as V_W at the last clock |
| INTEG | PW+1 | `img_col` is sampled; 100 input DWCs pulse; neuron capacitors are cleared, then charge while V_F follows its waveform |
| CONV | PW+1 | the V_F ramp runs 0..63; each neuron's comparator output pulse is counted by its WDC |
| RD | 1 | state word x (81 states) is read |
| WR | 1 | 81 DASs add or subtract; the word is written back |

One cycle is 3·PW + 6 = 198 clocks. A 1.6 us cycle therefore needs a
123.75 MHz clock. A convolution is 3240 × 198 = 641,520 clocks. The phase
split is this design's choice. The phases could be overlapped, for example
by setting the next weights during the readout.

## The neuron and its nonlinearity

In an ordinary network, a synapse multiplies and the neuron applies the
nonlinearity: o_i = f(Σ w_ij o_j). Here the synapse does both, and the
neuron only sums: u_i = Σ_j w_ij f(u_j). Stacked in layers, the two forms
compute the same thing.

On silicon, two transistors in series do the work:

* one is driven by the global voltage V_F;
* the other is driven by the synapse's weight voltage V_W.

Together they set the current into the neuron capacitor while the input
pulse is high. V_F changes over the pulse window, so the charge a pulse
delivers is a nonlinear function of the pulse width. The capacitor voltage
is then compared with a linear ramp, V_ref, to produce the output pulse.

`pwm_neuron` models this in the digital domain:

* current per clock = `v_w[j] * v_f` for every synapse whose pulse is high;
* `vn` (the capacitor) accumulates these currents;
* output pulse is high while `(vn >> 12) > v_ref`.

The V_F code follows a triangle over the 64-clock window,
`vf(t) = max(0, 17 - |t - 33|)`. The charge of a pulse of width T is
therefore `w * F(T)` with `F(T) = Σ_{t<T} vf(t)`. F is zero for T ≤ 17,
S-shaped in between, and constant (289) for T ≥ 50. This matches the shape of
the circuit's measured transfer curves: no output for short pulses, and
saturation beyond about four fifths of the window. The triangle is this
design's choice. Changing `cnn_pkg::vf_profile` changes the activation
function of every synapse at once, as changing V_F does on the chip.

The weight setting circuit (`weight_set`) holds the analog V_W on the chip.
Here it measures the width of the weight pulse and holds it as a 6-bit code,
where a larger code means a stronger weight.

## Arithmetic, exactly

All values are 6 bits wide.

* Pixels: unsigned, 0..63.
* Weights: signed, -32..31.
* States: signed, -32..31.

For output (x, k), receptive-field column c, and sign s:

```
q   = Σ_r  mag_s(w[r][c]) * F(pixel[column x+c][row k+r])
y   = min(q >> 12, 63)               -- neuron output width, counted by the WDC
st  = clip(st + y)  if s positive    -- DAS, clip to -32..31
st  = clip(st - y)  if s negative
```

`mag_s(w)` is `w` if `w > 0` in the positive cycle, `-w` if `w < 0` in the
negative cycle, and 0 otherwise. With `acc_init = 1`, the first cycle of each
output column starts from `st = 0`, so the memory needs no clearing.
`sat_seen` reports that some state was clipped during the last convolution.

Two points are worth knowing before use:

* The scale `>> 12` decides how much charge one output clock stands for.
  With it, one full-width input at full weight gives y = 4. Twenty of them
  saturate.
* A 6-bit state that takes 40 additions or subtractions clips easily. The
  weight scale has to be chosen with that in mind.

Both are consequences of the 6-bit precision of the state memory.

## Interface of `cnn_conv_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | begin a convolution (taken when idle) |
| `acc_init` | in | 1 | 1: first contribution overwrites; 0: accumulate onto stored results |
| `busy` / `done` | out | 1 | running / one-clock pulse at the end |
| `sat_seen` | out | 1 | a state was clipped in the last convolution |
| `img_col_addr` | out | 7 | input column wanted (x + c) |
| `img_col` | in | 100 × 6 | pixels of that column, row 0 first |
| `wmem_we`, `wmem_row`, `wmem_col`, `wmem_wdata` | in | 1, 5, 5, 6 | load one signed weight (ignored while busy) |
| `res_addr` | in | 7 | result column to read while idle |
| `res_data` | out | 81 × 6 | signed states of that column, one clock after `res_addr` |

`img_col_addr` changes at the start of each cycle. The data on `img_col` must
be valid when the integration phase begins, 66 clocks later.

## Blocks

| module | kind | role |
|---|---|---|
| `cnn_conv_top` | RTL | wiring of the whole engine, weight sign split, saturation flag |
| `conv_ctrl` | RTL | loop over x, c and sign; phase strobes; V_F waveform and V_ref ramp |
| `dwc` | RTL | digital to pulse width: loadable down-counter (120 instances: 100 input, 20 weight) |
| `wdc` | RTL | pulse width to digital: saturating counter (81) |
| `das` | RTL | saturating signed add/subtract (81) |
| `state_mem` | RTL | 81 × 486-bit two-port memory; one word = one output column |
| `weight_mem` | RTL | 20 × 20 signed weights, read one column per cycle |
| `weight_set` | behavioural | pulse width to held weight level V_W (20) |
| `pwm_neuron` | behavioural | 20 synapses, capacitor, ramp comparator (81) |
| `cnn_pkg` | package | default sizes, phase enum, V_F waveform |

## How far it follows the circuit it describes

These parts follow the circuit:

* the block structure: converters, neurons, adder-subtractors, state memory,
  weight memory and weight setting circuits;
* the sizes: N = 100, m = 20, 81 neurons, 6-bit values, a 39-kb state
  memory;
* the time-sharing order and the cycle count;
* the positive and negative weighting passes;
* zero weights for small fields;
* synapses that apply both the nonlinearity and the weight, with a neuron
  that only sums.

These are this design's own choices:

* the converter circuits (counters);
* the number formats and saturation;
* the memory organisation. Its size equals 81 × 81 × 6 bits, which fixes one
  column per word;
* the phase timing and clock rate;
* the V_F waveform and the `>> 12` charge scale;
* the `acc_init` and `sat_seen` ports;
* all handshakes.

The behavioural models reproduce only the function of the analog blocks. They
model no voltages, currents, mismatch or power. Real V_W polarity is also not
modelled: on the chip a lower voltage gives a stronger weight.

Not included: the outside controller that loads images, splits large fields
and feeds one layer's results to the next.

## Simulating

Every testbench in `tb/` checks itself and prints
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cnn_pkg.sv rtl/*.sv \
    tb/tb_cnn_conv_top.sv --top-module tb_cnn_conv_top -o sim
./obj_dir/sim
```

`tb_cnn_conv_top` runs three full-size convolutions (641,520 clocks each, a
few seconds):

1. a random 20 × 20 kernel of both signs, which makes some states clip;
2. a 5 × 5 kernel padded with zeros;
3. the same 5 × 5 kernel accumulated onto run 2.

It compares all 81 × 81 results with an independent model of the arithmetic
above. It also checks the clock count, and counts positive and negative
cycles, clipping, zero padding and accumulation.

`tb_large_field` runs a 40 × 40 kernel as four 20 × 20 quarters. Each
quarter sees the image shifted by 0 or 20 rows and columns. The first quarter
starts new results and the other three accumulate onto them. All 81 × 81
states are then compared with the model.

The block testbenches
(`tb_dwc`, `tb_wdc`, `tb_das`, `tb_state_mem`, `tb_weight_mem`,
`tb_weight_set`, `tb_pwm_neuron`, `tb_conv_ctrl`) are built the same way,
with `rtl/cnn_pkg.sv` and the block's own file.

The sizes are parameters of `cnn_conv_top`: `N`, `M` and `DATA_W`.
`DATA_W` also sets the pulse window (2^DATA_W clocks). The charge scale is
the `SHIFT` parameter of `pwm_neuron`.
