# Input-time-multiplexed MLP and spiking network for MNIST

This RTL implements two small neural-network accelerators of the same
784-300-10 shape, for classifying 28x28 images such as MNIST digits. One is a
multilayer perceptron (MLP) with tanh neurons. The other is a spiking neural
network (SNN) of Integrate-and-Fire (IF) neurons that receives the image as
spike trains. Both use one organisation, so they can be compared on how they
code information and on nothing else:

* **Every hidden and output neuron exists in hardware** (spatially expanded):
  300 + 10 neurons, all working in parallel.
* **The inputs of every neuron are time-multiplexed.** The image enters one
  pixel per clock cycle through a single input buffer. All hidden neurons
  process that same pixel in the same cycle, each with its own weight. A
  neuron therefore needs one multiplier (MLP) or one adder (SNN), not 784.

The SNN needs no multipliers, because its neurons only add a weight when an
input spike is present. It pays for that in time: an image is presented as
100 time steps of spikes, so it takes about 100 times as many cycles as the
MLP.

## The schedule of one pass

Both networks are driven by the same sequencer (`nn_controller`). A *pass*
evaluates the network once. For the MLP that is one image; for the SNN it is
one time step. A pass has two phases.

1. **Hidden phase: the hidden counter.** The sequencer accepts `N_IN` items
   from the input stream (valid/ready handshake), one per cycle, numbering
   them 0 .. N_IN-1. The MLP then adds a bias slot (index N_IN), in which the
   input buffer supplies the constant 1.0 instead of stream data. Each slot
   goes through `input_neuron`, a single register stage. Every hidden neuron
   then sees the value, the synapse index and the first/last flags in the
   same cycle. Each neuron reads its weight for that index from its own
   memory. On the last slot every hidden neuron finalises its result: a tanh
   activation, or a spike decision.
2. **Output phase: the output counter.** Once the hidden neurons report
   (`h_done`), the sequencer walks the hidden neurons 0 .. N_HID-1, plus a
   bias slot for the MLP. A multiplexer picks that hidden neuron's output,
   and a second `input_neuron` buffer presents it to all output neurons. The
   output phase needs no input, so `ready` stays low during it. When the
   output neurons report (`o_done`), the pass is complete.

The two phases do not overlap, so one pass takes
`N_IN + N_HID + 2*BIAS + 4` cycles with an uninterrupted input stream:

| network | pass | per image (defaults) |
|---|---|---|
| MLP, BIAS=1, 1 pass per image | 784 + 300 + 6 | 1,090 cycles between image starts; `out_valid` 1,089 cycles after the first pixel |
| SNN, BIAS=0, 100 passes per image | 784 + 300 + 4 = 1,088 | 108,800 cycles between image starts; last `out_valid` 108,799 cycles after the first spike |

Gaps in the input stream only stretch the hidden phase.

## Number formats

Values exchanged between neurons, weights and MLP pixels are signed
fixed-point **Q3.7**: 10 bits in two's complement with 7 fractional bits,
so 1.0 = 128 and the range is [-4, 4). Sums and SNN potentials are **Q11.7**:
18 bits with the same binary point. The types and saturation helpers are in
`nn_pkg`.

## The perceptron (`perceptron`)

The perceptron computes `y = tanh(sum_i w_i * x_i)`, one synapse per cycle:

* **Product:** the Q3.7 x Q3.7 product is shifted right by 7 bits
  (arithmetic shift, so it rounds toward minus infinity). It is then
  saturated back to Q3.7.
* **Sum:** a Q11.7 accumulator that saturates. The first synapse starts a
  new sum.
* **Activation:** on the last synapse, the complete sum goes through
  `tanh_lut` and the result is registered in `y`, with a one-cycle `y_valid`
  pulse.

`y` holds its value until the next sum completes. This is what lets the
output layer read the hidden activations during the output phase.

`tanh_lut` saturates the sum to [-4, 4). Beyond that range tanh already
rounds to ±1.0 in Q3.7. The saturated value addresses a 1024-entry ROM with
`LUT[a] = round(128 * tanh(x/128))`, where x is a read as a 10-bit
two's-complement number. The table is `nn_pkg::TANH_TAB`. It is computed at
elaboration by a constant function (tanh from a series expansion of exp),
so synthesis sees a constant ROM. To use another activation, change
`make_tanh_tab` in `nn_pkg`.

## The Integrate-and-Fire neuron (`if_neuron`)

The IF neuron has one adder, a multiplexer and a comparator. In each
synapse cycle the potential becomes `potential + w` if the input spike is 1,
and stays the same otherwise. The threshold test is made **only when all
synapses of the time step have been summed**. This matters because weights
can be negative: a potential that crosses the threshold partway through the
step and falls back below it does not fire. At the end of the step:

* if `potential >= THRESHOLD`, the neuron spikes and its potential restarts
  from 0;
* otherwise it stays silent and keeps its potential for the next time step.

The neuron does not leak. The default threshold is 1.0 (128 in Q11.7).
`in_clear` on the first synapse of an image restarts the potential from 0.

## Spiking network input and output (`snn_network`)

An image is 100 time steps of 784 input spikes, sent pixel by pixel within
each step. Spike `t*784 + i` of an image is pixel i in step t. Spike trains
are not generated in hardware. A rate code works well: in each step, pixel i
spikes with a probability proportional to its brightness. After every time
step the network gives the 10 output spikes (`out_spikes`, `out_valid`), and
flags the last step of the image with `out_last`. The class is the output
neuron that spiked most often. That count is left to the user, as is the
argmax over the MLP's 10 activations.

## Interfaces

`neuromorphic_top` places both networks side by side. They share only
`clk` and `rst_n`, which is an active-low synchronous reset.

| MLP (`mlp_network`) | SNN (`snn_network`) | meaning |
|---|---|---|
| `pix_valid`, `pix_data` (Q3.7), `pix_ready` | `spk_valid`, `spk_in`, `spk_ready` | input stream; an item moves on a cycle when valid and ready are both high |
| `wload` | `wload` | weight load bus, `nn_pkg::wload_t` |
| `out_y[10]` (Q3.7), `out_valid` | `out_spikes[10]`, `out_valid`, `out_last` | results, held until the next pass |
| `busy` | `busy` | an image is in progress |

**Loading weights.** Each neuron keeps its weights in its own memory
(`weight_mem`: write port, asynchronous read). A cycle with `wload.we = 1`
writes `wload.data` to synapse `wload.syn` of neuron `wload.neuron` in layer
`wload.layer` (0 = hidden, 1 = output). In the MLP the bias weight is the
last synapse: 784 for hidden neurons, 300 for output neurons. Load weights
only while the network is idle. Memory contents are not reset.

Parameters of `neuromorphic_top`: `N_IN` (784), `N_HID` (300), `N_OUT` (10),
`N_STEPS` (100, SNN only), `THRESHOLD` (128). A smaller hidden
layer (10, 50 or 100 neurons) can be run at the default size: zero the
weights of the unused hidden neurons. An MLP neuron with zero weights
outputs tanh(0) = 0, and an IF neuron with zero weights never fires.

## Design choices and limits

The organisation follows the published architecture: expanded neurons,
time-multiplexed inputs, a hidden counter and an output counter, Q3.7 and
Q11.7 formats, a LUT activation, an IF neuron that tests its threshold only
at the end of a step, 1-bit spikes between layers, and 100 steps per image.
The following are this design's own choices:

* **Loadable weights.** The original flow fixes trained weights at
  synthesis. Here they are written through `wload`, so any trained network
  can be used without re-synthesis. Weights stored as constants would be
  smaller.
* **Width of Q3.7.** It is read as 10 bits with the sign counted among the 3
  integer bits. This matches the 113 pins reported for the MLP:
  10-bit pixel + 10 x 10-bit outputs + 3 control pins.
* **Rounding.** Products are truncated and saturated, and sums saturate.
  The original rounding and overflow behaviour is not known, so results may
  differ in the last bit from a network trained and quantised elsewhere.
* **tanh** is assumed as the activation. The table size and contents are
  this design's.
* **Threshold test.** The SNN fires on `>=`, following the hardware
  description. The neuron equation of the model writes a strict `>`.
* **SNN weights** are taken to be Q3.7, and the threshold to be 1.0 in the
  same scale.
* **Potentials** restart from 0 at each new image.
* **No overlap.** Images do not overlap, and neither do the two layers
  within a pass. This keeps the control simple, but costs about N_HID cycles
  per pass.
* **Stream handshake.** The valid/ready handshakes, the sequencer state
  machine and its exact cycle counts are this design's.

## Files

| file | contents |
|---|---|
| `rtl/nn_pkg.sv` | formats, saturation helpers, `wload_t` |
| `rtl/neuromorphic_top.sv` | both networks side by side |
| `rtl/mlp_network.sv`, `rtl/snn_network.sv` | the two networks |
| `rtl/nn_controller.sv` | hidden, output and time-step counters |
| `rtl/input_neuron.sv` | per-layer input buffer with bias insertion |
| `rtl/perceptron.sv`, `rtl/tanh_lut.sv` | MLP neuron and activation table |
| `rtl/if_neuron.sv` | IF neuron |
| `rtl/weight_mem.sv` | per-neuron weight memory |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_topologies` |
| `tb/topology_run.sv` | helper of `tb_topologies` |

## Verification

Each testbench compares the RTL with a reference model written inside the
testbench, using its own integer and floating-point arithmetic. They check:

* every one of the 1024 LUT entries against `$tanh`;
* single neurons with random weights and inputs, including saturation,
  spikes and carried-over potentials;
* the sequencer's slot order, flags, back-pressure and pass length;
* reduced networks (20-6-3 MLP; 24-8-4 SNN with 10 steps), including image
  latency.

`tb_neuromorphic_top` runs the whole design at full size with random
weights: one MLP image and two SNN images of 100 steps, about 470k cycles.
It takes about 10 seconds of simulation and 30 seconds of build. It fails
if any of these never happens: stream gaps, back-pressure, bias slots,
saturated and unsaturated activations, hidden and output spikes, carried
and cleared potentials.

`tb_topologies` runs the smaller 784-10-10, 784-50-10 and 784-100-10
networks, one image each as MLP and as SNN. It checks the outputs and the
image times; the SNN takes 99.9 times as many cycles as the MLP.

No trained MNIST weights were used, so classification accuracy is not
demonstrated here.

To simulate with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_neuromorphic_top \
    rtl/nn_pkg.sv tb/tb_neuromorphic_top.sv -Mdir obj
./obj/Vtb_neuromorphic_top
```

Each testbench prints `TB_RESULT checks=N failures=M`.
