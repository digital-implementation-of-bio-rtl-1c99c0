# A spiking neural network that learns to tell normal from abnormal ECG

This is a small neuromorphic classifier. It takes a 10-second ECG record that
has already been reduced to 35 bits, one bit per time slot, with a 1 where an
R peak falls. It answers *normal* or *abnormal* by which of two output neurons
fires. There is no multiply-accumulate datapath and no stored program. The
network is 39 Izhikevich neurons that talk only through spike events. It
learns by spike-timing-dependent plasticity (STDP): a synapse gets stronger
when its input fires shortly before a "teacher" neuron, and weaker when the
input fires shortly after it.

The design follows a published undergraduate design for an FPGA (ZedBoard).
That design adapts an MNIST spiking network to ECG data. The layer sizes, the
neuron model, the event bus with its halt, the parts of the STDP block and
the training-data arrays come from that work. Everything the source leaves
open is this design's own choice and is marked as such below and in each
file's header: number formats, integration step, gate windows, stimulus
levels and timing details.

## The network

| neurons | role | input |
|---|---|---|
| 0–34 | input layer, one per bit of the record | constant bias `I_STIM` (20) while its bit is 1 |
| 35, 36 | training ("teacher") neurons, normal / abnormal | bias `I_TRAIN` (40) while `train_fire[k]` is high |
| 37, 38 | output neurons, normal / abnormal | plastic synapses from neurons 0–34, all 0 after reset |

An input neuron whose bit is 1 fires repeatedly. A 0 bit leaves it silent.
The 35 active/silent input neurons are the record as the network sees it.

Each neuron owns a weight RAM (`neuron_ram`) with one signed 8-bit weight per
presynaptic neuron, indexed by that neuron's address. Only the RAMs of
neurons 37 and 38 are ever written. The other neurons carry the same RAM so
that all neurons are identical, as in the source design.

## Time, spikes and the AER bus

One clock cycle is one integration step of every neuron: 0.25 ms of model
time by default. There is one exception, the halt described below.

All spikes travel on a single address-event (AER) bus (`aer_bus`) that
carries one neuron address per cycle. Every neuron sees the address, reads
its own weight for that address, and adds the weight to the input current of
its next step. If several neurons spike in the same step, the bus queues them
and sends the lowest address first. While more than one spike is waiting it
raises `halt`, and all neurons stop integrating until the queue is empty. In
that case:

- a step with *n* simultaneous spikes costs *n* − 1 extra cycles;
- every neuron has received every spike before the next step starts.

Since the input neurons share one bias, they tend to fire together. That
makes the halt a normal event, not a corner case.

## The neuron (`izh_neuron`)

The model is Izhikevich's:

    v' = 0.04 v² + 5 v + 140 − u + I
    u' = a (b v − u)
    v ≥ 30 mV  →  v ← c,  u ← u + d,  spike

The parameters are a = 0.02, b = 0.2, c = −65 mV, d = 8 (regular spiking).
v and u are signed Q15.8 values in mV. The constants are Q0.16 multipliers.
The integration is forward Euler with dt = 2^−`DT_SHIFT` ms.

Two details decide whether the network works:

- **Input Align.** The summed input current of a step is clamped at −140.
  After training, the wrong output neuron has strongly negative weights.
  Without the clamp, their sum would drive v far below rest.
- **Step size.** The quadratic term makes a 1 ms Euler step unstable when the
  input is large and negative. From rest, an input of −140 throws v to about
  −208 mV, and the next step overshoots into a false spike. With 0.25 ms
  steps, v settles near −122 mV and recovers without firing. A synaptic
  event still delivers the same charge as with 1 ms steps: its weight enters
  the current multiplied by 2^`DT_SHIFT`, as if it lasted 1 ms.

The spike output is a one-cycle pulse, registered at the end of the step in
which v reached 30 mV. An AER event that arrives in the same cycle as a step
counts toward the following step.

## Learning (`stdp`)

There is one STDP module per class. Its presynaptic inputs are the 35 input
neurons. Its postsynaptic input is the class's training neuron, not the
output neuron. It writes into the output neuron's RAM through `we`/`addr`/
`weight`. Inside are the three parts of the source design:

- **I/D Sel** decides the direction of each change. A presynaptic spike opens
  a per-synapse *pre gate* for `WINDOW` cycles (32 = 8 ms). A teacher spike
  opens the *post gate* for the same time.
  - Teacher spike while a synapse's pre gate is open: *increase*.
  - Presynaptic spike while the post gate is open: *decrease*.
  - Each gate is used up by the decision it causes, so one spike pair changes
    a weight once.
- **Weight cnt** makes the change. It is an up/down counter loaded with the
  synapse's current weight and driven by an increment or decrement pulse.
  The length of the pulse sets the size of the change: 1 cycle (+1) for an
  increase and 2 cycles (−2) for a decrease. The counter saturates at
  ±127/−128.
- **Addr cnt** scans the 35 synapses one per cycle while `en_addr` is high.
  At a synapse with a pending decision it runs the weight counter, then
  writes the result (`we` for one cycle).

The module keeps its own copy of the weights it has written, since it has no
read path into the neuron RAM. Pending decisions for the same synapse and
direction merge until that synapse is written. A write follows its decision
within 35 scan cycles, plus up to 4 cycles (detect, pulse, write) for each
write ahead of it.

`en` enables the decisions and `en_addr` the write-back. Turning both off
freezes the weights for testing.

## Training and testing

`train_sequencer` holds the training set: nine normal and nine abnormal
records, loaded through `load_*`. `image_signal[0]` presents the normal
record at `n_counter`, and `image_signal[1]` the abnormal record at
`a_counter`. A counter advances when its bit falls, at the end of a
presentation, and wraps after the ninth record.

The training schedule is driven from outside the RTL. Before training,
`tb/tb_snn_top.sv` drives the whole input layer for a while with learning
off, then lets every neuron return to rest. It then trains on each record of
class *c* as follows:

1. Fire the *other* class's training neuron. Then present the record for 60
   cycles. Input spikes that follow the teacher spike weaken the other output
   neuron's synapses from the active inputs.
2. Withdraw the record and fire class *c*'s training neuron. The input
   neurons fired shortly before it, so the synapses from the active inputs to
   class *c*'s output neuron are strengthened.
3. Wait 120 cycles, so the gates close and the write-back finishes before the
   next record.

For testing, set `test_mode = 1`, turn learning off, and drive the record on
`digit_noise`. The class is whichever of `out_spikes[0]` (neuron 37, normal)
or `out_spikes[1]` (neuron 38, abnormal) fires. No decision logic is built
in.

## Files

| file | contents |
|---|---|
| `rtl/snn_pkg.sv` | sizes, neuron numbering, number formats, types |
| `rtl/neuron_ram.sv` | per-neuron weight RAM, asynchronous read, cleared by reset |
| `rtl/izh_neuron.sv` | Izhikevich neuron with Input Align and its weight RAM |
| `rtl/aer_bus.sv` | AER arbiter/serialiser with halt |
| `rtl/stdp.sv` | STDP learning module |
| `rtl/train_sequencer.sv` | training-record arrays and counters |
| `rtl/snn_top.sv` | the 39-neuron network |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Compile the package first, with `rtl/` and `tb/` as library directories:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/snn_pkg.sv tb/tb_snn_top.sv --top-module tb_snn_top -o sim
    ./obj_dir/sim

`tb_snn_top` runs the full-size network (all parameters at their defaults)
through training on 9 + 9 records and testing on 3 + 3 new ones, in about
5 seconds.

- **Records.** They are synthetic. Normal records have a peak every third
  bit, sometimes with one peak shifted. Abnormal records have irregular peaks
  off that grid.
- **Weight and class checks.** After training, the synapses from the periodic
  positions are positive toward neuron 37 and negative toward neuron 38.
  Every test record makes its own output neuron fire, and fire more often
  than the other one.
- **Spike delivery.** Every spike is delivered over the bus exactly once.
- **Mechanism counts.** The testbench counts AER halts, increases, decreases,
  write-backs, Input Align clamping, the sequencer's counter wrap and both
  input modes. It fails if any of them never happens.

## What to trust, and where this departs from the source

- **Not included: preprocessing.** The preprocessing that produces the
  35-bit records is a software step: two rounds of Daubechies wavelet
  transform (db6, then db2), normalisation, and a threshold of about 0.7 of
  the R-peak height. The records must come from outside.
- **Not tested on real data.** The network has been run only on synthetic
  records. Its accuracy on MIT-BIH data is unknown. The source reports
  mostly correct firing, with occasional firing of both output neurons.
- **Own choices.** These are not taken from the source:
  - the number formats and the 0.25 ms step;
  - the charge per event;
  - the STDP window;
  - the stimulus biases of input and training neurons;
  - the scan order and the merging of pending STDP decisions;
  - the bus priority;
  - the counter-advance rule.

  The neuron parameters are the textbook regular-spiking values. The source
  quotes them only as typical.
- **Not modelled: the "all-or-nothing" reset.** The source also mentions
  that v returns to its starting value when the input is too weak to fire.
  That behaviour is not in the Izhikevich equations and is not built here.
- **Not comparable: FPGA figures.** The source reports about 900 LUTs and
  900 registers on the ZedBoard. Here the weight RAMs (39 × 39 × 8 bits)
  are written as reset-cleared arrays. They map to registers unless the
  reset is removed, and the top brings out many observation ports. Size
  figures are therefore not comparable.
