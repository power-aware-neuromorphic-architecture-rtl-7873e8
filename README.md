# A spiking neural core with bit-sliced, separately powered 3D synaptic memory

Most of the power of a small spiking neural network accelerator goes into the
synaptic memory, and most of the bits held there matter little: flipping the
lowest bit of an 8-bit weight changes it by less than one percent. This core
exploits that by storing every weight as a stack of bit slices. Each slice
lives on its own memory die, stacked above the logic die, with its own supply
rail. The die holding the most significant bits sits at the bottom and always
stays at full voltage. The dies holding the low bits can be:

* run below nominal voltage, where their SRAM cells now and then read back
  the wrong value, or
* switched off completely, so that the low bits read as zero and every weight
  is truncated in place, with no change to the datapath.

The network keeps working because the bits that carry the weight's sign and
magnitude are untouched. The same separation also lets a stack tolerate
manufacturing defects in its upper dies instead of being discarded.

The RTL is one neuromorphic core. It has 784 input axons and 48
leaky-integrate-and-fire (LIF) neurons. Its 8-bit weights are split 2-2-2-2
over four memory dies. It also contains a power controller that commands
each die's supply and brings switched-off dies back safely.

## Weight format and the four slices

A weight is a sign-magnitude number: bit 7 is the sign and bits 6:0 are a
7-bit fraction. For example, `1010_1100` = −44/128 = −0.34375.

| die | position          | holds     | effect when switched off                  |
|-----|-------------------|-----------|-------------------------------------------|
| m0  | bottom, on logic  | W[7:6]    | (never switched off in practice)          |
| m1  |                   | W[5:4]    | weights keep 2 bits                       |
| m2  |                   | W[3:2]    | weights keep 4 bits (sign + 3 magnitude)  |
| m3  | top               | W[1:0]    | weights keep 6 bits                       |

Because the format is sign-magnitude, a switched-off slice truncates every
weight toward zero. Positive and negative weights lose magnitude alike, so
no bias appears. This is why the format matters for the idea.

A broadcast weight write `(axon, neuron, weight)` is cut into the four slices
and written to all four dies in the same cycle. A die that is switched off
ignores the write.

## Power modes

Each die's supply is a 6-bit code `{gate, vsel[4:0]}` (type `layer_supply_t`
in `snn_pkg`):

* `gate = 1` switches the die off.
* Otherwise the die runs at 1100 mV − 25 mV × `vsel`. So code 0 is the
  nominal 1.1 V, 11 is 0.825 V, 12 is 0.8 V and 17 is 0.675 V.

The controller reports one of four modes on `power_mode`:

| mode    | meaning                                         |
|---------|-------------------------------------------------|
| normal  | every die at 1.1 V                              |
| I       | some die below 1.1 V, none off                  |
| II      | some die off, none below 1.1 V                  |
| III     | both at once                                    |

Settings used as examples throughout the testbenches:

| name      | m0      | m1      | m2      | m3     | mode |
|-----------|---------|---------|---------|--------|------|
| case 1    | 1.1 V   | 1.1 V   | 0.8 V   | 0.8 V  | I    |
| II-2      | 1.1 V   | 1.1 V   | 1.1 V   | off    | II   |
| II-3      | 1.1 V   | 1.1 V   | off     | off    | II   |
| III-2     | 1.1 V   | 0.8 V   | 0.8 V   | off    | III  |
| case 2    | 0.825 V | 0.8 V   | off     | off    | III  |
| case 3    | 0.825 V | 0.8 V   | 0.8 V   | off    | III  |

Which setting to use is not decided inside the core. A host, or a policy
outside this RTL, writes a new target with `pwr_cfg_valid`/`pwr_cfg_ready`.

### Going down and coming back up (`power_ctrl`)

Lowering a supply or switching a die off takes effect on the next clock edge.
`die_on` of a gated die drops immediately, so from then on the die delivers
zeros and ignores writes.

Raising supplies is the delicate direction. A die whose rail is ramping must
not be trusted, and the most valuable bits should come back first. The
controller therefore restores raised dies **one at a time, bottom-up**:

1. It takes the lowest-index die that must go up and commands its new supply.
2. It waits `SETTLE_CYCLES` cycles for the rail, then moves to the next die.

Each raised die costs `SETTLE_CYCLES + 1` cycles, and `pwr_busy` is high
throughout. A die that was switched off has lost its contents. When its rail
has settled, the controller sets `die_on` and raises `reload_req` for that
die. The host rewrites the weights, which now land because the die is on,
and clears the request with `reload_ack`.

A core can go on computing during all of this. Weights read from a die that
is off, or still settling on its way back from being off, are zeros. A die
that is only being raised from a lower voltage keeps delivering data, with
the error rate of the supply it is commanded to.

## A time step

The core is event driven at its edges and step driven inside:

* Input spike events (`in_valid`/`in_addr`, one axon index each) can arrive
  at any time. They are collected in the decoder's buffer. Events that arrive
  while a step runs count toward the next step. An index beyond the axon
  count is dropped and flagged on `in_bad_addr`.
* `step_start` (taken when `step_ready`) closes the buffer and runs one step:
  1. **Scan**: the crossbar visits the active axons, lowest index first, one
     per cycle. Each visit reads one row from all four dies at once and
     reassembles the 8-bit weight of every neuron.
  2. **Integrate**: every neuron adds its weight to its potential. The add
     saturates at 16 bits. A refractory neuron ignores its input.
  3. **Fire**: every neuron leaks by a constant step toward zero. If the
     result is at least the threshold, the neuron spikes, resets to zero and
     becomes refractory for `REFRACT` steps.
  4. **Emit**: the neurons that fired are sent out as events on
     `out_valid`/`out_ready`/`out_addr`, lowest index first. The receiver
     may stall.
* `step_done` pulses when the last event has been taken. `step_spikes` then
  holds the neurons that fired in that step.

Latency from `step_start` to `step_done`, with the receiver never stalling,
for k active axons and f firing neurons:

* **k + f + 5** cycles when k ≥ 1;
* **f + 4** cycles when k = 0.

`sample_clear`, given while the core is idle, zeroes every potential and
refractory counter. It is used between input samples.

Because a core's output events have the same form as its input events, cores
chain directly. `tb/tb_mnist_net.sv` wires one core's output port to the next
core's input port and starts both on the same `step_start`. The second core
then works one step behind the first.

## Undervolting and defects: the behavioural die model

Between each die's read port and the crossbar sits `die_supply_model`. It is
a **behavioural** model of what the SRAM cells do at a given supply. It is
not logic to be synthesised: it uses `$urandom` and whole-die maps of failing
cells. It does three things:

* **Undervolting.** Below 0.85 V, every time a die's supply code changes, the
  model draws a fresh set of failing cells. Each cell fails independently
  with the bit error rate of that voltage. A failing cell reads inverted
  until the supply changes again. Rates used:

  | supply | 0.825 V | 0.8 V   | 0.775 V | 0.75 V  | 0.725 V | 0.7 V   |
  |--------|---------|---------|---------|---------|---------|---------|
  | BER    | 0.00116 | 0.01903 | 0.11519 | 0.27163 | 0.43982 | 0.62309 |

  From 0.85 V up a die is error-free. Below 0.7 V the 0.7 V rate is used.
* **Defects.** With `DEFECT_PPM` > 0, each cell of the dies selected by
  `DEFECT_DIES` is stuck at 0 or at 1 (equal odds) with that probability per
  million. The default selection is m2 and m3. Stuck cells win over the
  stored value at every supply.
* **Gating.** A switched-off die reads as zeros.

For a synthesised core, replace the model by a wire (`dout = din`) or by the
real die interface.

## Blocks

```
neuro_core
├── spike_decoder        input events → spike vector of the next step (double-buffered)
├── synapse_crossbar     scans active axons, addresses the dies, reassembles weights
├── mem_die ×4           one 2-bit slice of every weight: 784 rows × 96 bits, 1-cycle read
├── die_supply_model ×4  behavioural: undervolting errors, stuck-at defects, gating
├── lif_neuron ×48       integrate, leak, threshold, refractory
├── spike_encoder        fired neurons → output events
└── power_ctrl           per-die supplies, bottom-up restore, mode, reload requests
snn_pkg                  weight and supply types, supply_mv(), mode encoding
```

## Top-level ports (`neuro_core`)

| group          | signals                                                   | notes |
|----------------|-----------------------------------------------------------|-------|
| input events   | `in_valid`, `in_ready`, `in_addr[9:0]`, `in_bad_addr`     | `in_ready` is always 1 |
| output events  | `out_valid`, `out_ready`, `out_addr[5:0]`                 | held stable while stalled |
| time step      | `step_start`, `step_ready`, `step_done`, `sample_clear`, `step_spikes[47:0]` | |
| weight write   | `wl_valid`, `wl_ready`, `wl_axon`, `wl_neuron`, `wl_weight[7:0]` | one write per cycle, lands one cycle later |
| supply request | `pwr_cfg_valid`, `pwr_cfg_ready`, `pwr_cfg[4]`            | `pwr_cfg[i]` is die m_i |
| supply state   | `vr_supply[4]`, `die_on[3:0]`, `power_mode`, `pwr_busy`   | `vr_supply` drives the regulators and power switches |
| reload         | `reload_req[3:0]`, `reload_ack[3:0]`                      | |

Parameters:

| parameter       | default   | notes |
|-----------------|-----------|-------|
| `AXONS`         | 784       | |
| `NEURONS`       | 48        | |
| `POT_W`         | 16        | |
| `THRESH`        | 128       | 1.0 in weight units |
| `LEAK`          | 1         | 1/128 per step |
| `REFRACT`       | 1         | |
| `SETTLE_CYCLES` | 16        | |
| `DEFECT_PPM`    | 0         | |
| `DEFECT_DIES`   | `4'b1100` | m2 and m3 |
| `SEED`          | 1         | |

The weight width, the number of dies and the bits per die are constants in
`snn_pkg`.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb \
    rtl/snn_pkg.sv rtl/*.sv tb/core_scoreboard.sv tb/tb_mnist_net.sv \
    --top-module tb_mnist_net
./obj_dir/Vtb_mnist_net
```

To run another testbench, swap the last file and the top module name. Only
the core-level testbenches need `tb/core_scoreboard.sv`.

Block-level testbenches:

| testbench               | what it covers |
|-------------------------|----------------|
| `tb_lif_neuron`         | the neuron against a cycle model |
| `tb_mem_die`            | the memory die, including writes ignored while off |
| `tb_die_supply_model`   | error rates at 0.8 V and 0.7 V, stuck-cell density, gating |
| `tb_synapse_crossbar`   | scan order, reassembled weights, `done` timing |
| `tb_spike_decoder`      | step boundaries, bad addresses |
| `tb_spike_encoder`      | ordering, back-pressure |
| `tb_power_ctrl`         | every transition: bottom-up order, settle time, reloads, mode |

Core-level testbenches, built on `core_scoreboard`:

* **The reference model.** `core_scoreboard` watches only a core's ports. It
  keeps its own copy of every die's slices. It predicts each step's spikes
  with a LIF model that carries an interval per neuron. Bits of a gated die
  are known zeros. Bits of an undervolted or defective die are unknown and
  widen the interval. A spike is checked exactly whenever the interval
  decides it.
* **`tb_neuro_core`** runs two reduced cores (60 axons, 12 neurons), one with
  3 % stuck cells on m2/m3. It goes through every power mode and both
  bottom-up restorations with reloads. It also covers looped-back events, bad
  addresses and output stalls.
* **`tb_neuro_core_full`** runs the same sequence on a core with all
  parameters at their defaults.
* **`tb_mnist_net`** runs a 784:48:10 network on two chained default-size
  cores, in two copies: perfect dies, and 10 % stuck cells on m2/m3.
  * It uses ten synthetic 784-pixel classes, rate-coded with random spikes,
    and 100 steps per image. Each image runs under every setting below.
  * The seven settings of the table above.
  * The top one to four dies undervolted together at 0.825–0.7 V.
  * Settings III-1, III-2 and III-3 with the swept dies at 0.8–0.675 V:
    * III-1: m2 and m3 swept.
    * III-2: m1 at 0.8 V, m2 swept, m3 off.
    * III-3: m0 at 0.825 V, m1 swept, m2 and m3 off.
  * It checks that the perfect network classifies every image in normal
    operation, and that losing only low-order bits costs it at most one of
    ten answers. The low-order cases are case 1, m3 or m2+m3 off, and m3
    alone at any voltage.
  * It prints the accuracy and the winner's spike margin per setting and
    copy. The run shows the expected picture:
    * Gating or undervolting m3, or m2 and m3 down to about 0.775 V, leaves
      every answer right and only shrinks the margin.
    * Once m1, or m0, is undervolted to 0.775 V or below, the answers
      collapse.
    * The copy with defective upper dies behaves almost like the perfect one.
  * It takes about a minute in Verilator.

## Design choices and departures

What follows the source design:

* The sign-magnitude 8-bit weights, the 2-2-2-2 split with the MSBs on the
  bottom die, and 48 neurons with four dies.
* Gated slices reading as zero, and reloading the low slices after gating.
* Bottom-up restoration, and the four power modes.
* The undervolting error rates, and stuck-at defects in the upper dies.

Choices made here because the source gives no detail:

* **Neuron constants.** Threshold 1.0, leak 1/128 per step, reset to zero
  and one refractory step. The source names leak, threshold and refractory
  blocks but gives no values or laws.
* **Time-step sequencing.** The scan order, the event formats, the
  valid/ready handshakes and the latency above are this design's own.
* **Size mapping.** The core has 784 axons because the evaluated network has
  784 inputs. How its 10 output neurons share the 48-neuron core is not
  described, so the network test uses a second core.
* **Error model.** The error map is redrawn once per supply change, not once
  per read. The failure probability is per cell. Supplies of 0.85 V and above
  are treated as error-free.
* **Supply interface.** The supply code (25 mV steps) and `SETTLE_CYCLES` are
  this design's. The regulators and power switches are off-chip; the core
  only outputs `vr_supply` and expects the rail to have settled after
  `SETTLE_CYCLES`.
* **Loss on gating.** A gated die in this model keeps its array contents,
  but the controller always asks for a reload, as real SRAM loses its data.
* **Memory arrays.** They are plain behavioural arrays, one read port and
  one single-cell write port per die, standing for SRAM macros.

Not in the RTL:

* **On-chip learning (STDP).** The source shows an STDP block but gives no
  rule, and its evaluated network is trained off-chip. Weights are loaded
  through the broadcast write port only.
* **Interconnect between several cores.** The event ports are where it would
  attach.
* **16-bit weights and convolutional networks such as VGG-16.** The package
  constants allow other splits, but only 8 bits in four 2-bit slices is
  exercised.
* **TSVs, voltage regulators, power switches** and any power or energy
  figure. The RTL models behaviour, not power.

Lint warnings that remain on purpose:

* Verilator reports `SYNCASYNCNET` because the assertions use
  `disable iff (!rst_n)` with the asynchronous reset.
* It reports `BLKSEQ` in the behavioural die model, and `UNSIGNED` there
  because its defect test is constant when `DEFECT_PPM` is 0.
* It reports outputs left open in `neuro_core`: the crossbar's `busy` and
  axon index, the die model's error statistics and each neuron's potential
  and refractory flag. They are there for testbenches and debugging.
