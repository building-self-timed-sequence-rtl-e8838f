# Sequence generators from edge-reversal scheduling

A counter does not need a clocked state register and next-state logic. It can come
from a distributed scheduling algorithm. Take a graph whose nodes are processes and
whose edges are shared resources. Orient every edge, and let a node run only when all
of its edges point at it. When a node has run, it turns its edges around. That rule
alone produces a fixed, repeating pattern of which nodes run when. If "node runs" is
read as 1 and "node waits" as 0, suitably chosen graphs produce a ring counter, a
binary counter and a Gray counter.

The hardware needs only two kinds of cell. A *node controller* detects that all of a
node's edges point at it. An *edge controller* stores which way an edge points and
flips it when the node holding it finishes. This repository gives that method as
synthesizable SystemVerilog. It includes a generic graph builder and three counters
built on it:

| module              | sequence                         | default size |
|---------------------|----------------------------------|--------------|
| `ser_ring_counter`  | one-hot ring, period N           | N = 6        |
| `smer_mod_counter`  | 0, 1, ..., 2^N-1, period 2^N     | N = 4        |
| `smer_gray_counter` | reflected Gray code, period 2^N  | N = 3        |

`stsg_top` puts the three side by side.

## SER: one edge per shared resource

Under *scheduling by edge reversal* (SER), every pair of neighbouring nodes shares one
edge. Start from an orientation with no directed cycle. There is then always at least
one *sink*, a node whose edges all point at it. Every sink operates and then reverses
all of its edges, which makes it a source. Neighbouring nodes can never be sinks
together, because the edge between them points at only one of them, so mutual
exclusion holds. Since some node is always a sink, the system never deadlocks.

**Ring counter.** Connect N nodes in a ring and point every edge from the larger index
to the smaller. Node 0 is then the only sink. When it operates, it hands one edge to
node 1 and one to node N-1. Node N-1 still has one edge pointing away from it, so only
node 1 becomes a sink. The single sink therefore walks round the ring, one node per
step. `q[i]` is "node i is a sink", a one-hot value starting at `000001`.

## SMER: several edges and reversibilities

*Scheduling by multiple edge reversal* (SMER) allows e_ij parallel edges between
nodes i and j. Each node also has a *reversibility* r_i. A node is an *r-sink* when,
on every link, at least r_i of the edges point at it. When it operates, it hands r_i
edges of every link to the neighbour. A node may now run several times in a row. Across
a link, node i runs r_j times for every r_i runs of node j (both divided by their gcd). A link can never let
both of its ends run at once if max(r_i, r_j) <= e_ij <= r_i + r_j - 1. Every link in
this design uses the lower bound, e_ij = max(r_i, r_j).

### Binary counter (`smer_mod_counter`)

Bit b of the counter is a *main* node with r = 1. It is paired with a *mirror* node
with r = 2^b:

- The main–mirror link of bit b has 2^b edges, all pointing at the mirror after reset.
- The mirror of every higher bit b is linked to the mirror of bit 0 by 2^b edges.
  Half of those edges point at the bit-0 mirror.

Main node b holds 2^b edges once its mirror has operated. It gives one back per
operation, so the bit stays 1 for 2^b steps. Then the mirror has all 2^b edges again.
The mirror must also wait for the bit-0 mirror, and that wait holds the bit at 0 for
2^b steps.

The two-bit case has nodes A, B and mirrors A\* (r = 1) and B\* (r = 2). Its steps,
with the nodes that operate in each, are:

| step | sinks   | B A |
|------|---------|-----|
| 0    | A\*     | 0 0 |
| 1    | A, B\*  | 0 1 |
| 2    | B, A\*  | 1 0 |
| 3    | A, B    | 1 1 |
| 4    | A\*     | 0 0 |

This is the default graph of `smer_graph` and the first check of its testbench.

### Gray counter (`smer_gray_counter`)

The Gray counter follows the same idea, but its wiring is harder to see. Each main
node again has a mirror. The mirror's reversibility is how long the bit stays 1 in
the Gray sequence: 2^(b+1) for bit b < N-1, and 2^(N-1) for the top bit. For 3 bits
that gives 2, 4, 4. Bit 0 has a second mirror, A\*\*, with r = 2. The links and their
orientation after reset are:

| link                           | edges      | initially pointing at            |
|--------------------------------|------------|----------------------------------|
| main b – mirror b              | r(mirror b) | all at the mirror               |
| bit 0 – A\*\*                  | 2          | all at bit 0                     |
| mirror 0 – A\*\*               | 2          | all at mirror 0                  |
| mirror b – mirror b-1 (b ≥ 1)  | max of the two r | r(mirror b-1) at mirror b-1, rest at mirror b |
| mirror b – bit 0 (b ≥ 2)       | r(mirror b) | 2^(b-1) at bit 0, rest at mirror b |
| mirror b – mirror 0 (b ≥ 2)    | r(mirror b) | 2^(b-1) at mirror 0, rest at mirror b |

2^(b-1) is the number of steps in which bit 0 is 1 before bit b first rises. Those
links make the higher mirrors wait for the right number of bit-0 pulses. A\*\* pins
bit 0 into its 0-1-1-0 rhythm. The main nodes then produce 0, 1, 3, 2, 6, 7, 5, 4, ...
from the first step after reset. The testbench checks this for N = 2 to 6. Some
details are this design's own choices, made so that the sequence comes out right:
the value r = 2 for A\*\*, the link multiplicities, and the exact split of edges on
the mirror chain.

## Node and edge controllers

`smer_graph` turns any such graph into hardware. The graph is given as packed
parameter arrays of reversibilities and links (`smer_pkg::edge_t`: end nodes,
multiplicity, edges initially pointing at the first end). The counters compute these
arrays with constant functions.

- **`node_controller`**: `sink = run & (all links ready)`. A sink's local operation
  lasts `T_OP` clock cycles. `eoo` (end of operation) is high in the last of those
  cycles. While `run` is low (Stop), no node operates. An operation cut short by Stop
  reverses nothing.
- **`ser_edge_controller`** is used for a single edge between two r = 1 nodes. It is a
  toggle flip-flop with preset. Its T input is `done_a | done_b`, and its output says
  which end the edge points at.
- **`smer_edge_controller`** is used for any other link. It is a counter of the edges
  pointing at end a. It is ready for a when the count is at least r_a, and ready for b
  when `MULT - count` is at least r_b. It subtracts r_a when a finishes and adds r_b
  when b finishes.

A link's readiness goes to the node controllers at its two ends. For links that do
not touch a node, the node controller's input is tied high. Assertions check the
rules that the construction guarantees:

- only the end holding the edges releases them;
- the two ends of a link never release in the same cycle;
- the ring stays one-hot.

## Timing model

The method is meant for self-timed logic. Each node takes whatever time its operation
needs, and the edges carry the sequencing. This RTL is a clocked version of that
circuit. Every controller is an ordinary register stage, and an operation lasts
`T_OP` clock cycles for every node. This is the case in which all nodes take equal
time, and it makes the self-timed sequence readable cycle by cycle:

- `sink` is combinational from the edge registers and `run`.
- With `T_OP = 1`, each generator produces one new value every clock. In general it
  produces one every `T_OP` clocks, and `step` is high in the cycle before the value
  changes.
- While Stop is applied, every output reads 0, because no node is a sink. The edge
  state is kept, so Run resumes the sequence where it stopped.
- `rst_n` is asynchronous and active low. It loads the initial orientation.

## Interface of `stsg_top`

| port                       | dir | meaning |
|----------------------------|-----|---------|
| `clk`, `rst_n`             | in  | clock; asynchronous preset of all orientations |
| `run`                      | in  | 1 = Run, 0 = Stop |
| `ring_q[RING_N-1:0]`, `ring_step` | out | ring position; advance strobe |
| `mod_count[MOD_N-1:0]`, `mod_step` | out | binary count; advance strobe |
| `gray_code[GRAY_N-1:0]`, `gray_step` | out | Gray code; advance strobe |

Parameters: `RING_N = 6`, `MOD_N = 4`, `GRAY_N = 3`, `T_OP = 1`. The node index and
edge counts in `smer_pkg` are 8 and 16 bits wide. This limits graphs to 256 nodes and
links to 65535 edges, so `MOD_N` and `GRAY_N` must be at most 16. The ring
needs `RING_N >= 3`.

## Simulating

Every file in `rtl/` and `tb/` holds one module or package of the same name, so
verilator finds what it needs by searching the folders. For example, to run the
end-to-end test at the default sizes:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/smer_pkg.sv tb/tb_stsg_top.sv --top-module tb_stsg_top
./obj_dir/Vtb_stsg_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`.

- `tb_node_controller`, `tb_ser_edge_controller` and `tb_smer_edge_controller` drive
  the cells at random and check them against a model kept in the testbench.
- `tb_smer_graph` checks the hand-worked two-bit trace above. It also checks a
  two-node SMER pair (r = 2 and 3, four edges) whose nodes run in the ratio 3 : 2,
  including back-to-back operations, with and without a longer `T_OP`.
- `tb_ser_ring_counter`, `tb_smer_mod_counter` and `tb_smer_gray_counter` each run
  several sizes and operation times, with random Stop intervals and a second reset.
  `tb_counter_check` predicts every value and strobe from a step count (one-hot
  rotate, binary, `s ^ (s >> 1)`).
- `tb_stsg_top` runs the top with its default parameters. It also requires that each
  of these happened at least once: wrap-around of all three counters, Stop, a reset
  in mid-count, the top binary bit holding for eight consecutive operations, and
  single-bit Gray steps.

## How far it follows the method, and where it departs

- **Clocked, not self-timed.** The gate-level self-timed version of the method needs
  no clock. Here the node and edge controllers are clocked, and the operation time is
  a fixed count of cycles. The dynamics, and so the sequences, are the same as in the
  equal-time case. Unequal operation times between nodes are not modelled.
- **SMER links as counters.** A general SMER graph can be rewritten as a larger SER
  graph built only from toggle-flip-flop edges. That rewriting is not done here: a
  multi-edge link is one up/down counter. Single edges between r = 1 nodes are still
  toggle flip-flops.
- **Edge counts** are the minimum that the no-deadlock bound allows. The Gray-counter
  details listed above are this design's own and are verified only by simulation.
- **Outputs** are only the main nodes' sink signals. The counters drive no further
  processing logic.
