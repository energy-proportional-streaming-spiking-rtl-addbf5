# S2NN: a streaming spiking neural network accelerator

A spiking network of tens of thousands of neurons with all-to-all layer
connections has far more synaptic weights than neuron state. At 170 layers of
170 neurons, the network holds 28,900 neurons and 4.9 million synapses. Its
state is two 32-bit words per neuron plus a small set of synapse potentials,
which fits comfortably in FPGA block RAM. The weights do not fit. This design
keeps only the state on chip. It reads every weight from external memory
exactly once per time step, as a wide stream at one beat per clock. The stream
width (four 64-bit ports, so 256 bits or 32 8-bit weights per cycle) then sets
the speed of the whole network.

The second idea is the **active area**. The number of layers and the number of
neurons per layer that take part in a step are run-time registers. Neurons
outside the active area cost no cycles and no memory traffic. Work per step
therefore scales with the size of the network in use. A smaller network can
meet the 1 ms real-time step at a lower clock, and that clock can feed lower
memory and logic voltages. That voltage and frequency scaling is done outside
this RTL; what is here makes the work shrink with the area.

The neurons follow the Izhikevich model. Each neuron is excitatory (regular
spiking) or inhibitory (fast spiking). Synapses are conductance based, with an
exponentially decaying synapse potential per presynaptic neuron.

## Network and time step

- **Network shape:** a feed-forward stack of up to `L` layers of up to
  `N_LAYER` neurons (defaults 170 x 170).
- **Connections:** neuron k of layer l has one synapse from every neuron of
  layer l-1. Layer 0 has one synapse from each of `N_LAYER` external inputs.
  The host writes those inputs as spike bits before every step.
- **Groups:** presynaptic neurons are indexed by group.
  - Group 0 is the external inputs.
  - Group l+1 is layer l.
  - Each group has a 1-bit type per member (0 excitatory, 1 inhibitory). Each
    member also has a synapse potential `s` and a firing bit from the previous
    step.

One START runs one 1 ms step in three phases, all inside `s2nn_core`.

1. **SYN: synapse update.** For every group and every word of `LANES` (32)
   members, in one cycle per word:

       s <- s * DECAY + spike

   `spike` is the external input bit for group 0. For the other groups it is
   the neuron's firing bit from the previous step. `DECAY` is 0.9, a 10 ms
   synaptic time constant sampled at 1 ms. This phase takes
   `(layers+1) * ceil(neurons/32)` cycles.
2. **NEU: current and neuron update.** For every active neuron, layer by layer
   and neuron by neuron, the core:
   - takes `ceil(neurons/32)` beats of weights from the stream;
   - accumulates the synaptic current against the presynaptic group's `s` and
     types;
   - runs one Izhikevich step;
   - writes `v`, `u` and the firing bit back.
3. **OUT: spike output.** The core streams the firing bits of all active
   layers on the 64-bit output stream, 64 neurons per beat. Each layer starts a
   new beat. Bits past the active neuron count are zero. `tlast` marks the last
   beat of the step. Then DONE is set and the interrupt fires.

Because all synapses are updated before any neuron is computed, layer l sees
the firings of layer l-1 from the previous step. A spike therefore moves one
layer per millisecond.

## Weight streaming and the NEU pipeline

This is the part that sets performance.

### Stream layout

`weight_stream_reader` joins the `N_PORTS` streams, with no buffering, into one
beat of `LANES = N_PORTS*64/W_BITS` weights. A beat is taken only when every
port is valid, and all ports see `tready` together. Within a beat, weight
`8p+i` sits in bits `[8i+7:8i]` of port p. So port 0 carries weights 0-7,
32-39, 64-71 and so on, port 1 carries 8-15, 40-47, and so on.

The host sends the weights in this order:

    for layer l in 0 .. layers-1
      for neuron k in 0 .. neurons-1
        for beat b in 0 .. ceil(neurons/LANES)-1
          lanes: weight of synapse (b*LANES + lane) of neuron k of layer l

Presynaptic index j of layer l is neuron j of layer l-1, or external input j
for l = 0. In the last beat of a neuron, lanes past `neurons` are ignored (they
are masked, not assumed zero). There is no `tlast` on the weight streams: the
beat order alone places each weight. Both sides must agree on the active area,
which is latched at START.

The weights of one step total `layers * neurons * ceil(neurons/32)` beats. Only
the active area is streamed. That is what makes memory bandwidth follow network
size.

### Pipeline

The NEU phase consumes one beat per cycle whenever the streams are valid,
regardless of neuron boundaries. Three stages follow a beat:

| stage | unit | work |
|---|---|---|
| accumulate | `syn_current` stage 1 | `G += sum w*s`, and `Ge` (same sum over excitatory presynaptic lanes), over the neuron's beats |
| current | `syn_current` stage 2 | `I = G*v + 75*Ge`, with `v` read from memory on the neuron's last beat |
| neuron | `izh_neuron` | one Euler step of `v` and `u`, firing and reset |

Results return with a tag `{layer, neuron}` and are written to state memory.
Writeback lands two to three cycles after the neuron's read. The next read of
the same neuron is a whole step later, so no forwarding is needed.

When the streams never run dry, the NEU phase takes

    layers * neurons * ceil(neurons * W_BITS / 256) + 4   cycles

The `+4` is the three stages plus the cycle that checks they are empty. Each
cycle with no valid beat adds one cycle. `NEUCYC` reports the phase length, and
the testbenches check it against this formula plus the counted stalls.

A full step at the defaults (170 x 170, 8-bit weights) takes
28,900 x 6 + 4 = 173,404 NEU cycles, 1,026 SYN cycles and 510 OUT cycles,
174,940 in all. Examples of steps against the 1 ms budget:

| active area | cycles per step | simulated, START to interrupt | time at clock | real time? |
|---|---|---|---|---|
| 170 x 170 | 174,940 | | 1.17 ms at 150 MHz | no, 150 MHz is not enough |
| 150 x 150 | 113,709 | 113,715 | 0.76 ms at 150 MHz | yes |
| 100 x 100 | 40,608 | 40,614 | 0.68 ms at 60 MHz | yes |
| 50 x 50 | 5,156 | 5,162 | 0.57 ms at 9 MHz | yes |

The six extra cycles are the register write that starts the step and the
interrupt handshake.

The memory side must sustain one 256-bit beat per cycle for these numbers. At
150 MHz that is 4.8 GB/s. Fewer ports or wider weights scale the per-neuron
interval directly. For example, `N_PORTS=2` doubles it, and `W_BITS=16` also
doubles it.

## Synaptic current and the sign of the reversal potentials

The current into neuron k is conductance-based:

    I = sum_j  w_j * s_j * (v - E_j)

This design follows the source model's constants as given:

- E = -75 mV for synapses from excitatory neurons.
- E = 0 for synapses from inhibitory neurons.

These values are the reverse of the usual textbook convention. With the
current taken as `+g(v - E)`, they still behave as intended near rest
(v ≈ -65 mV):

- An excitatory input contributes `+10 * w*s` and pushes `v` up.
- An inhibitory input contributes `-65 * w*s`, much more strongly, and pushes
  `v` down.

The sum is split into the total conductance `G = sum w*s` and the excitatory
part `Ge`, so only one multiply by `v` is needed per neuron:

    I = G*v + 75*Ge

Keep this asymmetry in mind when building test stimulus. A few inhibitory
inputs silence a layer. The testbenches make 1 external input in 20 and about
1 neuron in 4 inhibitory.

## Izhikevich neuron

`izh_neuron` computes, with a 1 ms forward-Euler step:

    v' = 0.04 v^2 + 5 v + 140 - u + I
    u' = a (b v - u)
    if v >= 30 mV:  fire,  v <- c,  u <- u + d

The firing test applies to the incoming `v`. A neuron whose update reaches or
passes 30 mV is clamped at 30 mV. It fires and resets in its next step.

The parameters come from two standard sets, chosen by the neuron's type bit:

| type | a | b | c (mV) | d |
|---|---|---|---|---|
| excitatory, regular spiking | 0.02 | 0.2 | -65 | 8 |
| inhibitory, fast spiking | 0.1 | 0.2 | -65 | 2 |

Limits and start state:

- `v` saturates to [-32767, 30] mV.
- `u` saturates to the 32-bit range.
- INIT sets every neuron to v = -65 mV, u = -13 mV (`b*v`). It also clears
  every `s` and firing bit.

The unit is a single register stage using five multipliers.

## Number formats

| quantity | format | notes |
|---|---|---|
| `v`, `u`, `I`, `s` | signed Q16.16 (32 bit) | membrane and current state stay at 32 bits |
| weight | unsigned `W_BITS` code, value = code * 2^-`W_FRAC` (13 by default) | 8-bit range 0 … 0.031; testbench weights 5e-4 … 2.5e-2 |
| `G`, `Ge` | signed, `W_FRAC+16` fraction bits, `W_BITS+48` bits wide | no overflow for any `N_LAYER` up to 2^16 |
| `DECAY` | Q16.16, default 58982 (0.9) | parameter |

All products are exact. Right shifts round toward minus infinity. `I` is
saturated to ±(2^31 - 1).

The design evaluates 8-, 16- and 32-bit fixed-point weights. All three are one
parameter away: `W_BITS=8/16/32` gives 32, 16 or 8 lanes. 8 bits is the
default. 32-bit floating-point weights are not implemented.

`tb_s2nn_precision` runs a 30 x 30 all-excitatory network with each width
side by side. It uses weights of 5e-4 to 2.5e-2, rounded from one 32-bit
value (`W_FRAC` = 13, 21 and 29 keeps the same range). Over 300 steps:

- 16-bit weights give spike counts identical to 32-bit.
- 8-bit weights give a per-neuron correlation of 0.985 to 1.0 and a mean rate
  within 0.5 %.

With the constants used here, and inputs firing half the time, activity dies
out after the second layer of that 30-deep stack. The comparison therefore
covers all neurons, not only the last layer.

## Host interface

`s2nn_ctrl` is a 32-bit AXI4-Lite slave with a 16-bit address. It follows
these handshake rules:

- A write is taken when AW and W are valid together.
- B and R are held until accepted.
- One transaction of each kind is outstanding at a time.

| addr | name | access | meaning |
|---|---|---|---|
| 0x0000 | CTRL | W | bit0 START one step, bit1 INIT state, bit2 clear DONE (START/INIT ignored while busy) |
| | | R | bit0 BUSY, bit1 DONE (sticky), bit2 IDLE |
| 0x0004 | IER | RW | bit0 interrupt enable; `irq = DONE & IER[0]` (level) |
| 0x0008 | LAYERS | RW | active layers, clamped to 1..L at START |
| 0x000C | NEURONS | RW | active neurons per layer, clamped to 1..N_LAYER at START |
| 0x0010 | STEPS | R | steps completed since reset |
| 0x0014 | NEUCYC | R | NEU phase cycles of the last step |
| 0x0018 | SPIKES | R | firings in the last step |
| 0x1000 + 4w | EXT[w] | W | external input spikes `w*LANES ..` (one bit each) |
| 0x4000 + 4i | TYPE[i] | W | neuron types; i = g*NW + w holds members `w*LANES ..` of group g, `NW = ceil(N_LAYER/LANES)` |

EXT and TYPE are ignored while a step runs.

A typical run:

1. Write the TYPE words, set IER, write INIT, and wait for the interrupt.
2. For every step:
   - write the EXT words, LAYERS and NEURONS;
   - write CTRL = 5 (START, clear DONE);
   - feed the weight beats;
   - drain the output stream;
   - wait for the interrupt.

## Top level

`s2nn_top` wires `s2nn_ctrl`, `weight_stream_reader` and `s2nn_core` together,
on one clock with an active-low asynchronous reset. Its ports:

| port | width | role |
|---|---|---|
| `s_axi_*` | 32 data / 16 address | control |
| `s_axis_input_tdata[N_PORTS]`, `_tvalid`, `_tready` | 64 each | weight streams |
| `m_axis_output_tdata/tvalid/tready/tlast` | 64 | firing bits |
| `irq` | 1 | step or init done |

In a full system, these pieces lie outside the RTL:

- a DMA engine that turns DRAM buffers into the weight streams and writes the
  output stream back to memory;
- the processor that runs the host sequence;
- voltage and frequency scaling of the fabric and the DRAM;
- runtime reconfiguration.

| parameter | default | meaning |
|---|---|---|
| `L` | 170 | layers |
| `N_LAYER` | 170 | neurons per layer |
| `N_PORTS` | 4 | weight stream ports |
| `PORT_W` | 64 | bits per port |
| `W_BITS` | 8 | bits per weight |
| `W_FRAC` | 13 | weight fraction bits |
| `DECAY` | 58982 | synapse decay per step, Q16.16 |

At the defaults the state memories total about 2.97 Mbit:

- `v` and `u`: 28,900 words each.
- 171 x 6 words of 32 synapse potentials.
- Type, firing and external-input bits.

They are written as plain arrays. The phases read them in ways that need care
when mapping to block RAM:

- `s` is read one 32-lane word per cycle.
- `v` and `u` are read once per neuron.
- Firing bits are read 64 at a time in OUT.

## Where this RTL fills gaps or departs

The source describes the computation, the stream widths and the loop
structure, but not the hardware's interfaces or its constants. These points
are this design's choices:

- **Register map, output format, INIT command, reset values.** All are this
  design's own.
- **Model constants.** The decay constant (tau = 10 ms) and the Izhikevich
  parameter sets are standard values. The source names the parameters without
  giving numbers.
- **Weight format.** The weight scale (2^-13) and the Q16.16 split of the
  32-bit state are chosen here.
- **Synapse update width.** The synapse update handles one word of 32 neurons
  per cycle, not one neuron per iteration. The result is identical and the
  phase is shorter.
- **Spike propagation.** Layer l uses layer l-1's firings from the previous
  step, as follows from updating all synapses before any current.
- **External inputs.** Layer 0's inputs come from host-written spike bits,
  with one weight per input streamed like any other synapse.
- **Neuron types.** One type bit is kept per neuron. The reversal potential
  of a synapse depends only on its presynaptic neuron, so a bit per synapse
  would hold the same information N times over.
- **Cycle budget.** The NEU phase follows the expected streaming bound, one
  neuron every `ceil(neurons*W_BITS/256)` cycles. The SYN and OUT phases add
  about 1 % at 170 x 170 and are counted in the table above.
- **Saturation.** `v` and `u` are clamped; the source does not say what
  happens at the range limits.
- **Stream joining.** The weight streams are joined without a FIFO, so a gap
  on any port stalls all four. A small per-port FIFO would hide DMA jitter.

## Verification

Each unit has a self-checking testbench against an independent integer
reference (`tb/s2nn_ref_pkg.sv`):

| testbench | checks |
|---|---|
| `tb_izh_neuron` | random and edge-case states of both types |
| `tb_synapse_update` | decay and spike for every lane, with lane masking |
| `tb_syn_current` | random multi-beat neurons; current and 2-cycle latency |
| `tb_weight_stream_reader` | lane mapping, the all-valid join, tready |
| `tb_s2nn_ctrl` | every register, the handshakes and the interrupt, against a small core model |

The system tests share `tb/s2nn_host_model.sv`. It acts as the processor, the
DMA and the output sink, and runs a full reference network. Every step it
checks:

- every output bit and `tlast`;
- NEUCYC against the cycle formula plus counted stalls;
- SPIKES, STEPS and CTRL.

The reduced tests insert random gaps on the weight ports and random output
back-pressure. They change the active area mid-run and fail if any of these
never happens:

- a stall;
- back-pressure;
- a partial last beat;
- an area switch;
- an excitatory and an inhibitory firing;
- an inhibitory input;
- an interrupt.

| testbench | configuration |
|---|---|
| `tb_s2nn_top_full` | default 170 x 170, 12 steps, full-rate streams (about 2.1 M cycles) |
| `tb_s2nn_top_areas` | default build run at 50x50, 100x100 and 150x150; each step must fit 1 ms at 9, 60 and 150 MHz |
| `tb_s2nn_top` | 4 x 40, 30 steps, area 4x40 → 3x23 → 4x40 |
| `tb_s2nn_core` | control + reader + core at 3 x 70 |
| `tb_s2nn_top_w16`, `tb_s2nn_top_w32` | 16- and 32-bit weights |
| `tb_s2nn_top_2port`, `tb_s2nn_top_1port` | 2 and 1 weight ports |
| `tb_s2nn_top_500` | `L = N_LAYER = 500` (250,000 neurons, 125M synapses), 4 steps of 4,000,004 NEU cycles; about a minute |
| `tb_s2nn_precision` | one 30 x 30 all-excitatory network at 8-, 16- and 32-bit weights side by side, 300 steps; spike counts compared |

Every test prints `TB_RESULT checks=N failures=M`. It has a cycle watchdog.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/s2nn_pkg.sv tb/s2nn_ref_pkg.sv rtl/*.sv tb/s2nn_host_model.sv \
      tb/tb_s2nn_top.sv --top-module tb_s2nn_top -Mdir obj -o sim
    ./obj/sim

Substitute any testbench from the tables above. The unit testbenches need
only `rtl/s2nn_pkg.sv`, `tb/s2nn_ref_pkg.sv`, the unit and the testbench. The
full-size test builds in a few minutes and runs in seconds.

To try another size or precision, override `L`, `N_LAYER`, `W_BITS` or
`N_PORTS` on `s2nn_top`. Pass the same values to `s2nn_host_model`, and size
the testbench's `w_tdata` array to `N_PORTS`.
