# PNAA: a programmable neural array built from local loops

Most neuromorphic fabrics let any neuron talk to any other, through packet
routers or a shared bus. A shared bus has a hard limit: if every neuron must
take its turn on the bus once per simulated time step, a network of `n`
neurons needs `n` internal clock cycles per step, so the simulation gets
slower as the network grows.

Biological networks are mostly *locally* connected, and this design is built
around that. Neurons sit in a two-dimensional grid. Small groups of
neighbouring neurons are joined into **loops**: rings of one-bit shift
registers, one register at each member's input. During a time step every
loop shifts around once, so every member hears every other member. A step
lasts *(size of the largest loop − 1)* internal cycles, whatever the size of
the array. A network with loops of at most 10 members runs at 9 cycles per
step, whether it has 100 neurons or 100 000. Each link is one switch between
two registers, so the internal clock does not slow down as the array or the
loops grow.

The RTL here is a complete, synthesizable array (`pnaa_top`) with
configurable loops, neurons, edge IO blocks and serial configuration. It
comes with testbenches: a cycle-exact reference model, and a ten-segment
nematode (*C. elegans*) locomotion network mapped onto the default array.

## The fabric

```
      IO  IO  IO  IO  ...  IO          IO  = io_block  (sensor in, actuator out)
  IO  N   N   N   N   ...  N   IO      N   = neuron_node
  IO  N   N   N   N   ...  N   IO
  ..                           ..      default: ROWS = 5, COLS = 20
  IO  N   N   N   N   ...  N   IO
      IO  IO  IO  IO  ...  IO          (no cells at the four corners)
```

Every cell, whether a node or an IO block, has four **loop ports**, one per
face (N, E, S, W). A port is one stage of one loop. Its routing word
(`pnaa_pkg::link_cfg_t`, 5 bits) says where the stage takes its input from:

| field  | bits | meaning                                                   |
|--------|------|-----------------------------------------------------------|
| `en`   | 1    | 0: port unused (loads 0)                                   |
| `dir`  | 2    | neighbour to read from: 0 = N, 1 = E, 2 = S, 3 = W         |
| `port` | 2    | which of that neighbour's four ports to read               |

A loop is a cycle of such pointers. For example, a ring down one node column
and back up the next uses port 0 of ten nodes: each node in the left column
points N, the top-left node points E, each node in the right column points S,
and the bottom-right node points W. Because each cell has four ports, it can
belong to four loops at once and send and receive in four directions. Any
shape of loop that steps between edge-adjacent cells can be built, including
loops that pass through IO blocks. The original description of the fabric
draws the routing as switch boxes with "straight" and "clockwise" settings
between the nodes. This RTL keeps only the effect of such a route, namely
which neighbouring port feeds a register.

## One time step, cycle by cycle

This is the part that needs care. `step_controller` counts a position
`pos = 1 .. step_len` while `run` is high. It raises `first` at position 1,
and `last` and `step_tick` at position `step_len`. Every loop register
(`loop_stage`) works as follows:

* **cycle 1** (`first`): it loads the *spike* of its upstream cell;
* **cycle k > 1**: it loads the upstream cell's *register* on the same loop.

So the value arriving at a port in cycle *k* (`rx`) is the spike of the loop
member *k* hops upstream. After `L − 1` cycles, a port on a loop of `L`
members has seen all the other members exactly once. If the step is longer
than `L − 1`, the values wrap around: the node sees itself at position `L`,
then the others again. Give those positions weight 0. Set `step_len` to the
size of the largest configured loop minus one. It is clamped to
`1 .. LOOP_MAX − 1`.

In every cycle, a **node** adds `weight[port][pos−1]` for each port whose
`rx` is 1. In the last cycle it computes

```
spike_next = (bias + sum of weights) > threshold        (signed, strict)
```

It registers that as its spike for the whole next step and clears the sum.
This is the binary (McCulloch–Pitts) neuron with the three parameters of the
architecture: a weight per possible input, one bias and one threshold. The
weights are indexed by (port, position), which is how a node tells apart
the senders on a loop. The position works as an address within the loop,
counted relative to the receiver, so the cells need no address registers.

An **IO block** is a loop member too. It sends its sensor pin into the loops
as its "spike": the pin is sampled in the last cycle of a step and sent
during the next step. It drives its actuator pin with the OR of the values
received at the (port, position) pairs selected by its mask during a step,
and updates that pin at the end of the step.

Timing summary, with sensors held for a step:

```
step n   : cycles 1..L-1 shift; spikes/actuators of step n-1 are visible
end of n : every spike, actuator and sensor sample updates at once
```

`run` may drop at any cycle to pause the array. Nothing changes while it is
low.

## Configuration

Each cell holds its configuration word in a `cfg_shift_reg`. The words are
loaded column by column through bit-serial chains, all shifted together
while `cfg_en` is high and `run` is low (an assertion checks this):

* chain `c` = 1..COLS: top IO block → nodes of node column `c−1`, top to bottom → bottom IO block;
* chain 0 and chain COLS+1: the left and right IO blocks, top to bottom.

Bits enter a cell at its LSB and leave from its MSB into the next cell. So
for a chain you send the word of the *last* cell first, each word MSB first.
`cfg_out[c]` returns the previous contents, which lets you read a
configuration back. Word layouts, MSB first:

* node (324 bits at defaults): `link[3], link[2], link[1], link[0]` (5 bits
  each), `threshold` (8, signed), `bias` (8, signed),
  `weight[3][8] ... weight[0][0]` (8 bits signed each; `weight[p][k−1]` is
  the weight of position k on port p);
* IO block (56 bits): `link[3..0]`, `mask[3][8] ... mask[0][0]`.

A column at default size is 1732 bits, so a full load takes 1732 cycles.
Reset clears every word: all ports are then unused and every weight is 0.

## Top-level interface (`pnaa_top`)

| port | dir | width | |
|------|-----|-------|---|
| `clk`, `rst_n` | in | 1 | internal clock; asynchronous active-low reset |
| `cfg_en`, `cfg_in`, `cfg_out` | in/in/out | 1, COLS+2, COLS+2 | configuration chains |
| `run`, `step_len` | in | 1, 4 | run the array; cycles per step |
| `step_tick`, `step_count` | out | 1, 32 | end-of-step pulse; steps completed |
| `io_top_in/out`, `io_bot_in/out` | in/out | COLS | edge sensors and actuators; index = node column |
| `io_left_in/out`, `io_right_in/out` | in/out | ROWS | index = node row |
| `node_spike` | out | ROWS×COLS | every neuron's spike, for observation |

Parameters: `ROWS = 5`, `COLS = 20`, `LOOP_MAX = 10` (largest loop; the
weights per port are `LOOP_MAX − 1`), `WW = 8` (weight width), `AW = 14`
(sum width). At defaults, yosys' coarse synthesis reports about 37 500
flip-flop bits, almost all of them configuration.

## Example: nematode locomotion on the default array

`tb/tb_celegans.sv` maps a ten-segment model of the *C. elegans* locomotion
circuit onto the 5 × 20 array. Each segment has ten neurons: the command
neurons AVB and AVA, the motor neurons DB, DA, VB and VA, the muscle drivers
DM and VM, and the inhibitory DD and VD. A segment takes 2 × 5 nodes, and
two layouts alternate along the array.

* Each segment is one 10-member loop. This is the largest loop, so the step
  is 9 cycles.
* Links between neighbouring segments use 6-member loops around 2 × 3 blocks
  of nodes that straddle the segment boundary.
* Sensors reach AVB (top edge), AVA (bottom edge) and the motor neurons of
  the head and tail segments (left and right edges) over 2-member loops with
  the IO blocks.

The testbench chooses the weights itself (AND of command and neighbour
segment, OR into the muscle drivers, a veto from the inhibitory neurons). It
checks four behaviours:

| behaviour | stimulus | result checked |
|-----------|----------|----------------|
| forward   | AVB on, head stimulated | DM/VM waves run head → tail, 2 steps per segment, muscles oscillate |
| backward  | AVA on, tail stimulated | waves run tail → head |
| coiling   | both commands, ventral head and tail | VM turns on from both ends towards the middle and stays on; no DM fires |
| UNC-25 knockout | inhibitory weights 0, forward | every DM and VM turns on head → tail and stays on |

With exactly the same array and only the configuration changed, the fabric
shows the qualitative behaviours reported for this model. The waveforms are
not cycle-for-cycle copies of any published trace, because the published
model's weights and neuron dynamics are not available. The neuron here is a
plain binary threshold unit, which is simpler than the cellular-automaton
neurons of earlier models.

## What follows the architecture and what is this design's own

Follows the architecture:
* the 2-D grid of nodes with IO blocks on every edge;
* loops as rings of shift registers with a register at each input;
* four loops per node, one per face;
* step length = largest loop − 1, independent of array size;
* the neuron's parameters (a weight per input, one bias, one threshold);
* per-column configuration from IO block to IO block;
* the default size (enough for the 10-segment locomotion model).

Chosen here:
* the routing word, which replaces the straight/clockwise switch-box
  settings with "read neighbour d, port p";
* the binary neuron with a strict `>` comparison;
* all widths (8-bit weights, 14-bit sums, 1-bit serial configuration);
* the weight indexing by (port, position);
* IO sensor sampling and the OR-of-mask actuator;
* the `node_spike` observation port, the `run`/`step_len` control and the
  reset behaviour;
* no cells at the four corners.

Not included: the software that places a network on the array and generates
its configuration. The locomotion testbench does that placement by hand.

Lint note: verilator reports `SYNCASYNCNET` because `rst_n` is both the
flip-flops' asynchronous reset and the `disable iff` of the configuration
assertion in `pnaa_top`. It is harmless.

## Files and simulation

`rtl/`: `pnaa_pkg` (types), `cfg_shift_reg`, `step_controller`,
`loop_stage`, `neuron_node`, `io_block`, `pnaa_top`.

`tb/`: one self-checking testbench per module, plus:
* `tb_pnaa_top`: 3 × 4 array; random configurations checked every step
  against a step-level reference model;
* `tb_pnaa_full`: the same test at the default 5 × 20 size;
* `tb_celegans`: the locomotion example;
* `pnaa_tb_common.svh`, `pnaa_tb_body.svh`: shared testbench code.

The reference model in `pnaa_tb_body.svh` does not simulate cycles. For each
port and position *k* it follows the routing words *k* hops upstream, which
makes it a good place to read what a configuration will do. Every testbench
prints `TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Irtl -Itb rtl/pnaa_pkg.sv \
    tb/tb_pnaa_full.sv --top-module tb_pnaa_full -o sim
./obj_dir/sim
```

Swap in any other testbench name, for example `tb_celegans` or
`tb_neuron_node`. Each runs in well under a second.
