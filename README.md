# A reservoir computer on stochastic bitstreams

This is synthesizable SystemVerilog for a small reservoir computer in which every
number travels as a random bitstream. The design follows the FPGA architecture
described in "Reservoir Computing with Stochastic Bitstream Neurons"
(Verstraeten, Schrauwen, Stroobandt).

Reservoir computing splits a recurrent neural network into two parts:

- The reservoir is a randomly wired recurrent network. It is built once and
  never trained.
- The readout is a linear function of the reservoir's state. Only the readout
  is trained.

The reservoir turns a time series into a rich state that remembers recent
inputs. A weighted sum of that state can then reproduce the input, delay it,
or phase-shift it.

A neuron normally needs multipliers, adders and a sigmoid. Here a value is
instead the probability of a 1 in a bitstream, so:

- A multiplication costs one 16x1 LUT-RAM.
- A sum costs one multiplexer.
- The sigmoid costs a small counter.

The price is time. One value is only known after counting a long window of
bits: 2^16 bits by default.

## Number coding

A bitstream X with P[X=1] = p carries one of two values:

- Unipolar coding: the value is p, in [0, 1].
- Bipolar coding: the value is 2p - 1, in [-1, 1].

Everything in the network uses bipolar coding. A neuron state of 0 is
therefore a stream with half ones. Weights and values enter the hardware as
binary fractions:

- An 8-bit weight code c stands for the probability c/256. Its bipolar value
  is 2c/256 - 1. Code 8'hFF is about +1, 8'h80 is 0 and 8'h00 is -1.
- A 16-bit value code v stands for the probability v/65536.

## The LUT-RAM multiplier: the central trick

This part needs the most care.

`stoch_synapse` stores an 8-bit weight in a 16x1 LUT-RAM (`lut_ram16`). The
LUT's four address bits are {I, A2, A1, A0}:

- I is the neuron input bitstream.
- A2..A0 are three random address bitstreams from `addr_gen`, with
  P[A2=1] = 0.9385, P[A1=1] = 0.7993 and P[A0=1] = 0.6665.

These probabilities make address A = k come up with probability close to
2^-(8-k):

- A = 111 comes up half of the time.
- A = 110 comes up a quarter of the time.
- A = 000 comes up about 1/256 of the time.

If the LUT at {1, A} holds weight bit A, the output is therefore 1 with a
probability of about c/256. So the stored weight is read out as a probability,
without any arithmetic. The upper half of the LUT holds the weight itself. For
bipolar coding the lower half (I = 0) holds the inverted weight, which makes
the output I XNOR W. That is the bipolar product. For unipolar coding the
lower half holds zeros, which makes an AND. The `BIPOLAR` parameter selects
between the two.

| I | A2 A1 A0 | unipolar out | bipolar out |
|---|----------|--------------|-------------|
| 1 | k        | weight[k]    | weight[k]   |
| 0 | k        | 0            | ~weight[k]  |

The three probabilities come from a weighted least-squares fit. Its equations
weight the most significant bits most, so the read-out value is close to
c/256 but not exact. For example, the all-ones weight reads as exactly 1, and
8'h80 reads as 0.49996.

`bs_gen` uses the same idea with all four address lines random:
P[A3..A0 = 1] = 0.9907, 0.9468, 0.7998, 0.6665. It turns a 16-bit value into a
bitstream. Address 1111 holds the most significant bit.

Each address line compares its own 32-bit xorshift generator with
round(a_i * 65536). The package `rc_pkg` holds these thresholds and the
generator step. The choice of generator is not part of the published design.

## Timesteps, windows and the recurrence

One network timestep lasts one window of 2^WIN_LOG2 clock cycles
(`window_ctrl`). On the edge before window t begins:

- The input encoder loads the sample u(t).
- Each neuron's own encoder loads that neuron's state x(t-1), which is its
  ones count over window t-1 scaled to 16 bits.

During the window:

- Each neuron multiplies u(t) and the streams of its K_REC source neurons by
  its weights.
- A random multiplexer (`stoch_adder`) averages the products. Each cycle it
  passes on one input chosen uniformly at random.
- The average drives a 16-state saturating up/down counter (`stoch_tanh`). Its
  output is 1 in the upper half of the states. For a steady input of value s,
  the output value is about tanh(8 s).
- `bs_counter` counts the neuron's output bits into x(t).
- The readout weights the same neuron bitstreams and counts the result into
  y(t).

The network thus computes

    x(t) = f( (w_in * u(t) + sum_k w_k * x_src(k)(t-1)) / (K_REC+1) )
    y_o(t) = (1/N) * sum_n w_o,n * x_n(t)

All values here are bipolar. The 1/M and 1/N factors come from the
multiplexer adders. The first window after reset, or after an idle gap,
starts from x = 0.

The per-window delayed recurrence is this design's choice. It gives the
network proper discrete timesteps that match the 2^16-bit conversion window.
A recurrence wired bit by bit would settle within a few cycles and forget the
input long before a window ends.

## Reservoir wiring

There are N = 25 neurons. Every neuron receives the input and K_REC = 4
recurrent connections. The graph is a small-world ring:

- Neuron n listens to n-2, n-1, n+1 and n+2.
- About one link in five, chosen by a fixed hash, is moved half-way round
  the ring.

The function is `rc_pkg::sw_src`. The published design states the size and
the small-world character, not the graph itself.

## Readout and winner-take-all

`readout` has NOUT = 2 outputs. Each output has N bipolar LUT-RAM synapses and
one multiplexer adder. The counted outputs feed `wta`, which reports the index
of the largest (the lowest index wins a tie). With two regression outputs,
such as input reproduction and a phase-shifted copy, the winner is simply the
larger one. With class outputs it is the classifier decision.

Training the readout is done off-chip. The trained weights are written
through the configuration port.

## Interface of `rc_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; synchronous active-low reset |
| cfg_we, cfg_addr, cfg_weight | in | 1, 8, 8 | write one weight code (write only while no window runs; an assertion checks this) |
| run | in | 1 | keep starting windows back to back; a started window always completes |
| u_in | in | 16 | input sample as a 16-bit value code, taken on cycles with u_take = 1 |
| u_take | out | 1 | u_in is sampled on this edge; present the next sample afterwards |
| step_valid | out | 1 | pulse after each window; state, y and winner hold until the next one |
| state | out | N x 16 | neuron states as 16-bit value codes (saturated at 16'hFFFF) |
| y | out | NOUT x (WIN_LOG2+1) | ones counts of the readout outputs; value = 2*y/2^WIN_LOG2 - 1, times N for the weighted sum |
| winner | out | clog2(NOUT) | index of the largest y |

The weight address map is:

- Reservoir synapse s of neuron n is at n*(K_REC+1) + s. Synapse 0 is the
  input weight.
- The readout weight of neuron n for output o is at N*(K_REC+1) + o*N + n.

Parameters, with their defaults:

| parameter | default | origin |
|-----------|---------|--------|
| N | 25 | published |
| WIN_LOG2 | 16 | published (2^16-bit windows) |
| K_REC | 4 | this design |
| NOUT | 2 | this design (two readouts, as in the sine experiments) |
| FSM_STATES | 16 | this design |

The address-line probabilities in `rc_pkg` are the published ones.

## How far to trust it

The following parts follow the published design:

- The LUT-RAM synapse layout, in both codings.
- The LUT-RAM bitstream generator.
- The address probabilities.
- The 25-neuron small-world reservoir.
- The readout made of LUT-RAM multipliers, with winner-take-all.
- The 2^16-bit windows.

The following are this design's own choices, made where the source gives only
a function or nothing:

- The random-multiplexer adder.
- The counter non-linearity and its size.
- The per-window delayed recurrence.
- The exact wiring graph.
- The random generators.
- The configuration port, which writes a whole LUT in one cycle where an FPGA
  LUT-RAM writes one bit per cycle.
- The handshake.
- The readout's lack of a bias term.

The general reservoir-computing picture also shows the readout output fed
back into the reservoir. That path is not built, because the evaluated
experiments only drive the input.

Measured behaviour at the default size: a readout is trained by ridge
regression on recorded states, quantised to 8-bit codes and run in hardware.
The normalised RMS error of the output against the target, for a sine input
shifted by k*pi/4, is:

| shift | 0 | pi/4 | pi/2 | 3pi/4 | pi | 5pi/4 | 3pi/2 | 7pi/4 |
|-------|---|------|------|-------|----|-------|-------|-------|
| error | 0.048 | 0.118 | 0.192 | 0.135 | 0.054 | 0.135 | 0.168 | 0.138 |

- As in the original work, the error is lowest for shifts of 0 and pi and
  highest near +-pi/2. Those components are the weakest in the reservoir
  state.
- The original reports errors of 2e-3 to 4e-3, so this design is much
  noisier. Its neuron internals and readout scaling are not known here.
- The 1/N scaling of the multiplexer sum multiplies the readout's own
  counting noise by N.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_rc_top \
      -y rtl -y tb +libext+.sv rtl/rc_pkg.sv tb/tb_rc_top.sv
    ./obj_dir/Vtb_rc_top

Substitute any testbench name. The testbenches are:

- `tb_lut_ram16`, `tb_addr_gen`, `tb_stoch_synapse`, `tb_bs_gen`,
  `tb_stoch_adder`, `tb_stoch_tanh`, `tb_stoch_neuron`, `tb_reservoir`,
  `tb_bs_counter`, `tb_readout`, `tb_wta`, `tb_window_ctrl`: unit tests. The
  stochastic blocks are checked statistically against probabilities computed
  from the published address probabilities.
- `tb_rc_top`: end to end with 1024-cycle windows. It covers weight loading,
  back-to-back windows, an idle gap and restart, both winners, window length,
  readout consistency with the states, and neurons following the sign of
  their input weight.
- `tb_rc_full`: default parameters, six 65536-cycle windows.
- `tb_rc_sine`: default parameters, 42 timesteps of a sine with a hand-set
  readout. It checks correlation with the input.
- `tb_rc_phase`: default parameters. It records states and trains one
  readout per phase shift (8 shifts over one period) by ridge regression
  inside the testbench. It then loads the quantised weights two at a time and
  measures the hardware error for each shift. It takes about 1.5 minutes.

A full-size window takes roughly 0.1 s of simulation time with Verilator.

## Files

| file | contents |
|------|----------|
| `rtl/rc_pkg.sv` | address thresholds, xorshift step, seeds, small-world wiring function |
| `rtl/lut_ram16.sv` | 16x1 LUT-RAM |
| `rtl/addr_gen.sv` | 3- or 4-line address bitstream generator |
| `rtl/stoch_synapse.sv` | LUT-RAM multiplier |
| `rtl/bs_gen.sv` | LUT-RAM bitstream generator |
| `rtl/stoch_adder.sv` | random-multiplexer scaled adder |
| `rtl/stoch_tanh.sv` | counter non-linearity |
| `rtl/stoch_neuron.sv` | synapses + adder + non-linearity |
| `rtl/reservoir.sv` | N neurons and their wiring |
| `rtl/bs_counter.sv` | bitstream-to-value counter |
| `rtl/readout.sv` | readout multipliers and adders |
| `rtl/wta.sv` | winner-take-all |
| `rtl/window_ctrl.sv` | window / timestep sequencing |
| `rtl/rc_top.sv` | the complete system |
