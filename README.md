# Pseudo-RBF spiking neural network for unsupervised clustering

This is synthesizable SystemVerilog for a small spiking neural network that
clusters points of a two-dimensional input space without supervision. It
encodes information in *when* a neuron fires, not in how often. Each input
value becomes a set of spikes. Their delays say how close the value lies to a
family of overlapping receptive fields. Every output neuron integrates these
spikes through learning synapses, and an output neuron fires earlier the closer
the input pattern lies to the pattern stored in its weights. A local, time-based
Hebbian rule moves the weights. After training, each output neuron answers
first for the points around "its" cluster. In that sense the network behaves
like a radial-basis-function (RBF) classifier.

The design follows the fully parallel FPGA network described in *Embedded
Neural Controllers Based on Spiking Neuron Models*. At its default parameters
it has:

* two 8-bit input variables (a 256 x 256 input space),
* 16 receptive fields per variable, so 32 input neurons,
* 96 synapses (32 input neurons x 3 output neurons) with 8-bit weights,
* 3 leaky integrate-and-fire output neurons,
* a time frame of 16 time steps, one input sample per frame.

The same publication also describes a variant that moves the output-neuron
arithmetic into software on small soft-core microcontrollers. That variant is
not part of this RTL (see *What is not here*).

## One frame, cycle by cycle

The network processes one sample per frame. `frame_ctrl` sequences the frame;
at the default sizes it takes 19 clock cycles from `start` to `done`:

| cycle | phase     | what happens |
|-------|-----------|--------------|
| 0     | IDLE      | `start` is high with `x`. Both encoding memories read the delays for `x`. |
| 1     | LOAD      | The 32 input neurons take their delays. Somas and synapses forget the previous frame. |
| 2..17 | RUN       | Time steps t = 0..15. An input neuron fires in step t = its delay. Synapses pass weights. Somas integrate. |
| 18    | SETTLE    | Step t = 16. The somas integrate once more, so spikes of step 15 can still make a neuron fire. |
| 19    | LEARN     | `done` is high. `out_fired` and `out_time` hold the result. Synapses selected by `learn_en` update their weights. |

A new `start` is accepted in the cycle after `done`, so a new sample can
enter every 20 cycles. While a frame runs, `start` is ignored.

The result of a frame is each output neuron's first firing time, `out_time`.
This is the time step in which its spike is seen, 1..16. `out_fired` tells
whether the neuron fired at all. A smaller time means a better match.

## Turning a number into spike delays

An input neuron `k` of a variable has a triangular receptive field centred at
`c_k = 17*k`, so the centres are 0, 17, ..., 255. Its activation for value `x`
is

    r = 35 - floor(|x - c_k| * 35 / 30)   if |x - c_k| < 30,   else 0

The activation is mapped onto a delay in the 16-step frame. The strongest
activation fires first:

    delay = 15 - round(15 * r / 35)

A neuron whose field is not touched gets delay 15, so it fires at the end of
the frame. With these numbers, every value stimulates three or four fields
(delay < 15). Only the values within four of either end of the range (0..4
and 251..255) stimulate two, because the outer fields have only one
neighbour. For example, x = 25 gives delays 12, 4, 4, 13 for fields 0..3 and 15 for all the others.

The 16 delays of one value are 64 bits, twice the width of one memory word. The
encoding memory `rf_rom` is therefore a 512 x 32-bit dual-port ROM addressed by
the input value. The lower half, address `{0,x}`, holds fields 0..7. The upper
half, address `{1,x}`, holds fields 8..15. Port A reads the lower half and
port B the upper half in the same cycle, so all 16 delays arrive together one
cycle after the read. At the default sizes the 16 Kbit of the memory are
exactly full. The contents are computed during elaboration from the formula
above (`snn_pkg::rf_delay`), so no data file is needed. A different field
layout only needs changes to `RF_PEAK`, `RF_HALF` and `RF_SPACING` in
`snn_pkg`.

Each `input_neuron` is a three-state machine: idle, waiting, done. It loads its
delay, counts down one step at a time, and fires exactly once. An assertion
enforces the single spike.

## Synapses and the learning rule

This is the part that needs the most care.

A `synapse` has three jobs:

1. **Weighting.** In the step where its input neuron fires, it sends its weight
   to the soma (`psp = weight`). In every other step it sends 0.
2. **Time-stamping.** It records the step of the first pre-synaptic spike
   (`t_pre`) and the step of the first spike of its output neuron (`t_post`)
   in the frame.
3. **Learning.** On the LEARN cycle it updates the weight, but only if
   `learn_en` is high and both spikes happened. The update depends on
   `dt = t_post - t_pre`:

| condition                   | meaning                                    | weight change |
|-----------------------------|--------------------------------------------|---------------|
| 0 <= dt <= 5                | input came just before the output spike    | +8 (sharp increase) |
| 5 < dt <= 10                | input came somewhat earlier                | +4 (moderate increase) |
| dt > 10                     | input came long before                     | -1 (slight decrease) |
| dt < 0                      | input came after the output spike          | -8 (heavy decrease) |

The result saturates at 0 and 255. The four windows and their 5 and 10-step
borders are from the source publication. The step sizes (+8, +4, -1, -8) are
this design's choice, a stepwise version of the bell-shaped learning curve
published there. They are parameters of `synapse`.

Because the soma output is registered, an input spike in step t can make the
output neuron fire at the earliest in step t+1. So dt is at least 1 for an
input that helped cause the spike.

How the rule clusters the data: the output neuron that fires first on a sample
strengthens the synapses from input neurons that fired shortly before it.
These are the receptive fields nearest the sample. The same neuron weakens the
synapses from neurons that fired late, which are the unstimulated fields at
step 15. Its weights slowly become a template of the region it wins. Through
its weights, a neuron then fires early for points near that region, later for
points further away, and not at all for distant points.

**Who learns is decided outside the network.** The network provides one
`learn_en` bit per output neuron. It is sampled in the LEARN cycle, when
`out_fired` and `out_time` are already valid, so the user can compute it from
the result of the same frame. The testbench uses winner-take-all: only the
neuron that fired first learns, and the lowest index wins a tie. With all
neurons learning on every sample, they would tend towards the same
template.

Weights can be written and read at any time through `w_we`, `w_out`, `w_in`,
`w_wdata` and `w_rdata`. The synapse is selected by output neuron `w_out` and
input neuron `w_in = variable*16 + field`. Reading is combinational. A write
wins over a learning update in the same cycle. After reset every weight is
128. Identical weights make all output neurons fire together, so load
different starting weights (for example random ones) before training.

## The output neuron (soma)

Each `soma` adds the 32 weighted inputs of a time step to its membrane
potential (MP, 16 bits, signed):

* If the new MP reaches `THRESHOLD` (640), the neuron fires. The MP drops to
  the hyper-polarization level `V_HYPER` (-64), below the resting level 0. A
  neuron may fire again in the same frame. Only the first spike is reported
  and used for learning.
* In a step without any input, the MP decays by `LEAK` (4) towards rest. It
  never goes below rest, so a hyper-polarized MP stays down until input
  arrives.
* At the start of each frame the MP returns to rest, so frames are
  independent.

Integrate, threshold, reset below rest and linear leak follow the source. The
numbers for threshold, hyper-polarization and leak are this design's choice:
the source names these quantities but gives no values. The threshold of 640
is five weights of 128. With the reset weights, a sample then makes an output
neuron fire around the middle of the frame.

The adder tree over 32 inputs is combinational, one per soma, as in the fully
parallel design.

## Parameters

`snn_top` parameters (the defaults come from `snn_pkg`):

| parameter   | default | meaning |
|-------------|---------|---------|
| `NV`        | 2       | input variables |
| `NR`        | 16      | receptive fields per variable (even) |
| `NO`        | 3       | output neurons |
| `XW`        | 8       | bits per input variable |
| `DW`        | 4       | delay bits; the frame has 2**DW steps |
| `WW`        | 8       | weight bits |
| `THRESHOLD` | 640     | firing threshold of the somas |

The learning steps and windows are parameters of `synapse`. The leak and the
hyper-polarization level are parameters of `soma`. The receptive-field shape is
set by `RF_PEAK`, `RF_HALF` and `RF_SPACING` in `snn_pkg`. If you change `NR`
or `XW`, keep `RF_SPACING` at about (2**XW-1)/(NR-1) and check the overlap.

Size after a generic coarse synthesis at the defaults: about 5.6 k word-level
cells, 2221 flip-flop bits and 2 x 16 Kbit of ROM.

## Interface of `snn_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | start a frame with sample `x` (needs `x` only in this cycle) |
| `x` | in | NV x XW | the sample |
| `learn_en` | in | NO | per output neuron: learn at the end of this frame (sampled while `done`) |
| `w_we`, `w_out`, `w_in`, `w_wdata` | in | | weight write |
| `w_rdata` | out | WW | weight selected by `w_out`, `w_in` |
| `busy`, `done` | out | 1 | frame running; last cycle of the frame |
| `out_fired`, `out_time` | out | NO, NO x (DW+1) | result: fired at all, first firing step |
| `out_spike` | out | NO | axonal spikes as they happen |
| `phase`, `in_delay`, `in_spike`, `out_mp` | out | | observation: frame phase, delays of the sample, input spikes, membrane potentials |

## Choices made where the source is silent

* The receptive-field centres, slopes and overlap are given only as a plot in
  the source. The formula above reproduces its stated properties: 16
  triangular fields, activations 0..35 scaled to 15 steps, three or four
  active fields per value.
* The source also mentions an earlier configuration with 12 fields per input
  (24 input neurons, 72 synapses). Its example delays (value 25 giving 5 and
  12) belong to that configuration. This RTL builds the 16-field version.
* The synaptic delays of the general model are realised only by the input
  encoding. Synapses add no delay of their own.
* A post-synaptic potential lasts one time step and is as high as the weight.
* Frame phases (load, settle, learn), the 19-cycle frame, the reset values,
  the per-neuron `learn_en`, and the weight port format are this design's own.
* One clock for everything.

## What is not here

* **Soma on soft-core microcontrollers.** The source's second implementation
  computes the somas in software on several Xilinx PicoBlaze cores, clocked
  faster through the FPGA's clock managers. It saves FPGA area at the cost of
  frame time. The program is not published, and the core is vendor IP. The
  function it computes is the `soma` built here.
* **Vendor primitives.** The encoding memories are written as plain arrays
  rather than instances of a specific block RAM. The parity bits of such a
  RAM are unused. The earlier scheme with one 1024 x 4 RAM per input neuron
  is not built.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops. For example, with Verilator 5:

    verilator --binary --timing --top-module tb_snn_top -y rtl -y tb +libext+.sv \
        rtl/snn_pkg.sv tb/tb_snn_top.sv
    ./obj_dir/Vtb_snn_top

Replace `tb_snn_top` by `tb_rf_rom`, `tb_input_neuron`, `tb_input_block`,
`tb_synapse`, `tb_soma` or `tb_frame_ctrl` to test one block. Add `--assert`
to check the assertions in `frame_ctrl` and `input_neuron`.

* `tb_rf_rom` compares all 512 words with an independent model of the fields
  (real arithmetic). It checks the read latency and the number of active
  fields per value.
* `tb_input_neuron` and `tb_input_block` check that every neuron fires
  exactly once, in the right step.
* `tb_synapse` compares 400+ random frames with a reference of the learning
  rule. It makes sure every window and both saturation bounds are exercised.
* `tb_soma` compares membrane potential and spikes cycle by cycle with a
  reference model.
* `tb_frame_ctrl` checks the phase sequence and the 19-cycle frame.
* `tb_snn_top` runs the whole network at its default sizes against a
  behavioural model of the complete network. It first checks the weight
  port and a silent frame with zero weights. It then loads random weights and
  trains for 300 frames on points around three focus points, (40,50),
  (200,90) and (120,210), with winner-take-all learning. After every frame it
  compares input spike times, firing results and frame latency with the
  model, and every 20 frames it compares all 96 weights. At the end it checks
  two things: each focus point is won by a different output neuron, and the
  winner's firing time does not decrease as the point moves away from the
  focus. It also counts each mechanism (firing, silent frame, repeated
  firing, hyper-polarization, leak, the four learning windows, both
  saturation bounds, ignored start) and fails if any of them never happened.

A typical outcome of `tb_snn_top` is that each focus point is answered by its
own neuron at step 6 or 7, while the other two neurons wait until step 16.

## Files

| file | content |
|------|---------|
| `rtl/snn_pkg.sv` | sizes, frame phase type, receptive-field formula |
| `rtl/rf_rom.sv` | dual-port encoding memory |
| `rtl/input_neuron.sv` | one input neuron |
| `rtl/input_block.sv` | encoding of one variable: memory + 16 input neurons |
| `rtl/synapse.sv` | weight, time stamps, learning rule |
| `rtl/soma.sv` | leaky integrate-and-fire output neuron |
| `rtl/frame_ctrl.sv` | frame sequencer |
| `rtl/snn_top.sv` | the network |
| `tb/tb_*.sv` | one self-checking testbench per module |
