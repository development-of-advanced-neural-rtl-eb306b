# A multiplier-free spiking neural network that learns to tell two shapes apart

This is synthesizable SystemVerilog for a small third-generation (spiking)
neural network: two neurons, each with nine synapses, that look at a 3x3 grid
of binary pixels and learn without supervision to answer one shape each
(for example T against H, or + against X). Everything a neural network
normally does with multipliers is done here with counters: a synapse
"multiplies" an incoming spike by its weight by emitting that many pulses,
the soma adds the pulses up, and learning moves a weight counter up or down by
one. A PC loads and inspects the network over a slow serial interface, and an
external controller can feed shapes on nine parallel pins at full speed.

The network as built is about 970 word-level cells and 370 flip-flops after
generic synthesis (two neurons plus the serial interface).

## How one neuron computes

```
 spike_in[i] ──► synapse i ──pulses──► ┐
                  (weight w_i)         │   soma
                                       ├─► synapse inputs reader ─► membrane potential ─► > threshold ? ─► axon
 spike_in[j] ──► synapse j ──pulses──► ┘   (count x factor)         calculator            (register)
                        ▲                                                                        │
                        └──────────── axon (postsynaptic spike, for learning) ◄──────────────────┘
```

**Synapse = pulse multiplier** (`synapse`, made of `synapse_cu` and
`synapse_su`). The control unit holds the four-bit weight (Counter I). The
supervising unit watches its input; on the rising edge of an input spike it
clears Counter II and then drives `pulse_out` high for exactly `weight`
consecutive clock cycles. A spike seen at cycle *t* produces pulses in cycles
*t+1 … t+w*. A weight of 0 produces nothing; a held-high input produces one
burst only; a new spike during a burst restarts it.

**Soma** (`soma`, made of `soma_synin`, `soma_mpcu`, a threshold register,
a comparator and the axon register). On each *falling* clock edge the synapse
inputs reader counts how many of the nine pulse lines are high and multiplies
the count by a programmable factor (0–3, shift-and-add, no multiplier). On the
next *rising* edge the membrane-potential unit adds that value to the
seven-bit potential, saturating at 127. The sum is compared with the seven-bit
threshold in the same cycle:

| condition at the rising edge          | new membrane potential                                  |
|---------------------------------------|---------------------------------------------------------|
| sum > threshold (the neuron fires)    | 0 (hyperpolarised, below rest); `axon` = 1 next cycle   |
| last cycle of the time frame          | resting level, 6                                        |
| input value ≠ 0                       | sum                                                     |
| no input                              | one step towards the resting level (down, or up from 0) |

**Time frame.** A free-running counter in each soma divides time into
frames of 16 clock cycles. Input spikes only add up towards a firing within
one frame: at the end of the frame the potential returns to rest. Because a
weight is at most 15, a spike that arrives in the first cycle of a frame has
its whole burst counted inside that frame. Both interfaces therefore deliver
spikes in the first cycle of a frame (`frame_end` is an output so an external
controller can do the same).

Cycle by cycle, a spike in frame cycle 0 gives pulses in cycles 1…w; the pulses
of cycle *k* are read at the falling edge in cycle *k* and added at the
rising edge that ends cycle *k*; if that sum exceeds the threshold, `axon` is
high for the one following cycle and the potential is 0.

## How the weights learn

Each synapse collects two flags over a frame: PRS, "a spike arrived on my
input", and POS, "my neuron's axon fired". With learning enabled, in the last
cycle of each frame the weight changes once:

| PRS | POS | weight                |
|-----|-----|-----------------------|
| 0   | 0   | unchanged             |
| 1   | 0   | − 1                   |
| 0   | 1   | − 1                   |
| 1   | 1   | + 1                   |

The weight saturates at 0 and 15. A neuron that fires on a shape thus
strengthens the synapses of that shape's pixels and weakens all others, while
a shape that does not make it fire weakens that shape's pixels. Presented
alternately with two shapes, a neuron that initially leans towards one of them
ends with 15 on the pixels only that shape has, 0 on the pixels only the other
shape has, and shared pixels hovering where they started (+1 on one shape,
−1 on the other). In the included test, starting from weights of 10 (own
pixels), 6 (shared) and 3 (the other shape's pixels) with threshold 40, this
takes 10 frames, i.e. 160 clock cycles; the design target is about 20 frames.
At a 10 MHz network clock 20 frames are 32 µs; at 100 MHz, 3.2 µs.

There is no competition between the two neurons: which neuron learns which
shape is decided by the initial weights loaded from the PC.

## The test network (`snn_top`)

Input pixel *i* (numbered row by row, pixel 0 top left, bit *i* of the input
vector) drives synapse *i* of both neurons. The spikes come either from the
Serial Input Device or, when `par_mode` is set, directly from `par_in[8:0]`,
which must be synchronous to `clk`; a pin's rising edge is one spike.

### Serial Input Device (`sid`)

The PC drives `serial_clock`, `data_in` and `load`, all synchronised into the
`clk` domain (each level of `serial_clock` must last at least three `clk`
cycles). Each rising edge of `serial_clock` shifts one bit in, most significant
first; a rising edge of `load` executes the last 24 bits as a frame:

```
 23      20 19      16 15      12 11                    0
 ┌─────────┬──────────┬──────────┬───────────────────────┐
 │ command │  neuron  │ synapse  │         data          │
 └─────────┴──────────┴──────────┴───────────────────────┘
```

| command | name            | effect                                                               |
|---------|-----------------|----------------------------------------------------------------------|
| 1       | `SID_WR_WEIGHT` | weight of (neuron, synapse) ← data[3:0]                               |
| 2       | `SID_RD_SELECT` | put the weight of (neuron, synapse) on `weight_bus` until the next 2  |
| 3       | `SID_WR_THRESH` | threshold of neuron ← data[6:0]                                       |
| 4       | `SID_WR_FACTOR` | input factor of neuron ← data[1:0]                                    |
| 5       | `SID_SPIKES`    | spike on every pixel whose data bit is set, at the next frame start; clears the axon flags |
| 6       | `SID_CONTROL`   | `learn_en` ← data[0], `par_mode` ← data[1]                            |

Indices outside the network are ignored. The four `status_out` lines go back
to the PC: with `readback_sel` low they show the selected weight, with it high
one sticky flag per neuron that is set when its axon fires (so the PC can poll
slowly after presenting a shape).

Reset values: weights 0, thresholds 64, factors 1, learning off, serial
input selected.

## Parameters

All sizes are parameters, defaulting to the values in `snn_pkg`:

| parameter     | default | meaning                                             |
|---------------|---------|-----------------------------------------------------|
| `N_NEURONS`   | 2       | neurons in the network                              |
| `N_SYN`       | 9       | synapses per neuron = input pixels                  |
| `W_BITS`      | 4       | weight width (Counter I / II)                       |
| `MP_BITS`     | 7       | membrane potential and threshold width              |
| `FRAME_LEN`   | 16      | clock cycles per time frame                         |
| `REST_MP`     | 6       | resting potential (about 4.7 % of full scale)       |
| `FACTOR_BITS` | 2       | width of the soma's input factor                    |

The serial frame layout assumes at most 16 neurons and 16 synapses, and the
axon read-back needs `N_NEURONS ≤ W_BITS`.

## What is given and what was chosen

The network shape, the nine synapses, the four-bit weights, seven-bit
potentials, the 16-cycle frame, the synapse's two units and burst behaviour,
the learning table, the soma's four parts, reading synapses on the falling
edge with a programmed factor, the leak to a resting level of 4–5 % of full
scale, zeroing after a spike, the "greater than" firing test, and a serial
interface that loads weights and spikes and reads weights and axons back over
four status lines are the design as specified. These are this implementation's
own choices:

- one output pulse per clock cycle, and a spike recognised on its rising edge;
- weight updates once per frame from flags gathered over the frame, with
  saturation at 0 and 15 (weights are meant to settle at exactly those
  extremes);
- the leak rate (one step per idle cycle), the recovery from 0 back to rest,
  and the return to rest at the end of every frame as the meaning of "the
  frame limits the time in which enough spikes must arrive";
- resting potential 6, threshold reset value 64, a single 2-bit input factor
  per soma, all registers on an asynchronous active-low reset;
- the whole serial protocol, the synchronisers, the sticky axon flags, the
  alignment of spikes to frames, and the split of the bidirectional weight bus
  into a write bus and an OR-ed read bus;
- the block diagram of the synapse labels its register "register and
  divider"; no divider function is specified, and none is built.

Not included: the PC side of the parallel port (a board CPLD), the
microcontroller that drives `par_in`, and the board's memories and clock
oscillator. A larger network for 7x5-pixel letters (35 inputs, 35 hidden and 7
output neurons) belongs to the software model of this neuron and is not part
of this hardware; it would need 42 neurons of 35 synapses.

## Files

`rtl/` (one unit per file): `snn_pkg` (sizes, serial commands, frame type),
`synapse_cu`, `synapse_su`, `synapse`, `soma_synin`, `soma_mpcu`, `soma`,
`neuron`, `sid`, `snn_top`.

`tb/`: one self-checking testbench per module (`tb_<module>`), plus
`tb_snn_shapes` (the + / X pair through the whole network) and `snn_ref_pkg`,
cycle-accurate reference models of the soma and of a whole neuron written
independently of the RTL. The neuron, top and shape testbenches compare
every membrane potential, axon and weight with these models on every cycle;
the top-level tests also count each mechanism (serial writes and reads, both
input paths, mode and learning switches, firing, hyperpolarisation, leak up
and down, frame resets, weight increments, decrements and both saturations)
and fail if one never happens. Each prints
`TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Wno-lint -y rtl -y tb \
          rtl/snn_pkg.sv tb/snn_ref_pkg.sv tb/tb_snn_top.sv --top-module tb_snn_top
./obj_dir/Vtb_snn_top
```

Replace `tb_snn_top` with any other testbench name (`-y` lets Verilator find
each module in the file of the same name; the packages are listed first).
`verilator --lint-only -Wall -y rtl rtl/snn_pkg.sv rtl/snn_top.sv` lints the
design; the only remarks are unused package constants and the soma's unread
factor copy. The top-level runs take
about 15 000 clock cycles and finish in well under a second; the full-size
network is what they simulate.
