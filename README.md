# Deterministic hypercube routing with small buffers

This is bit-serial RTL for a router on a K-dimensional hypercube of N = 2^K nodes. Each node
starts with at most one message, and no two messages share a destination. The router delivers
every message deterministically in O(K^2) bit times. Each node needs only O(K) bits of buffer,
a few messages' worth, and never a queue.

The obvious approach fixes one address bit per dimension, in dimension order. It needs large
buffers, because in the worst case many messages pile up at one node. This design still
corrects one address dimension per loop iteration. After each crossing, though, it
*rebalances*. Nodes that now hold two messages hand their extra message to nodes that hold
none. The hand-over uses only cheap, collision-free operations:

* **enumeration**: a parallel prefix count on a butterfly;
* **packing**: a monotone routing into the lowest positions of a subcube, which dimension-order
  routing performs without collisions;
* **rendezvous**: a packing run backwards along its own recorded paths.

A second, pipelined form of the same scheme is also included. It accepts a new batch of
messages every O(K) clocks, at the cost of O(K^2) wires and buffer bits per node.

One clock is one *bit time*: one bit crosses one wire per clock. All data paths between nodes
are single-bit serial wires carrying frames (a valid flag plus one bit per clock, least
significant bit first).

## The routing loop

A message is `{payload[P-1:0], dest[K-1:0]}`, so M = K+P bits. Iteration i (i = 0..K-1) runs
six steps on all nodes in lockstep. At the start of the iteration two things hold:

* every node holds at most one message;
* every message agrees with its destination in address bits 0..i-1.

Call the nodes that agree in bits 0..i a *subcube of level i+1* (2^(K-i-1) nodes, spread out in
steps of 2^(i+1)).

1. **Exchange.** A message whose destination differs from its node in bit i is sent whole over
   the node's wire across dimension i. Now every message is in the right level-(i+1) subcube.
   A node may hold 0, 1 or 2 messages. Within a subcube there are no more messages than nodes
   (they all have distinct destinations in it), so there are at least as many empty nodes as
   doubly loaded ones.
2. **Enumerate the doubly loaded nodes** in each subcube. Each gets its rank r2 (0-based, in
   address order).
3. **Pack.** A doubly loaded node sends its second message to position r2 of its subcube.
   Position p of the subcube containing node x is node `(p << (i+1)) | x[i:0]`.
4. **Enumerate the empty nodes** (empty after step 1). Each gets its rank r0.
5. **Pack addresses.** An empty node sends its own address to position r0. The router records
   every path.
6. **Rendezvous.** Position p may have received a message in step 3. It also received an
   address in step 5, because there are at least as many empty nodes as doubly loaded ones. It
   sends the message back along the recorded step-5 path, which ends at an empty node.

After step 6 every node again holds at most one message, and every message is correct in bits
0..i. After K iterations each message sits at its destination.

Why the packings never collide: a packing is a *semi-contraction*, meaning no two messages end
up further apart, as integers, than they started. Route a semi-contraction by crossing
dimensions 0, 1, ..., K-1 in order. Suppose two messages met at one node. They would agree in
all resolved low bits and in all unresolved high bits. Their sources would then be less than
2^l apart while their destinations would be at least 2^l apart, which a semi-contraction
forbids. Packings in different subcubes never meet, because their low address bits differ all
the way. The step-6 reversal retraces collision-free paths, so it cannot collide either.

## Bit-serial pipelined router (`pack_router`, `switch_cell`)

The router has K levels per node. Level d is a `switch_cell`. A forward frame enters as
`{payload, relative address}`, where the relative address is source XOR destination, bit 0
first.

* The cell at level d reads the frame's first bit. A 1 sends the frame across dimension d, to
  the neighbour's level d+1. A 0 sends it on to the node's own level d+1.
* The cell *consumes* that bit and forwards the remaining bits one clock later.

So the frame shortens by one bit per level and the pipeline is K deep. A payload bit leaves K
clocks after it was injected: a frame injected from cycle c is delivered in cycles
c+2K .. c+L+K-1, where L is the frame length. The input of a level merges the node's own
"stay" output with the neighbour's "cross" output. An assertion checks that these two are never
valid together.

Each cell keeps its last decision (`used`, `dir`) until `clr_i`. That memory is the reverse
path. A frame injected on `rinj_i[m]` follows the recorded settings backwards, one clock per
level, and leaves on `rdlv_o` at the source of the forward frame that reached m. The
rendezvous works this way. No address is needed: the address delivered in step 5 is kept only
for a consistency check.

## Enumeration on a complete butterfly (`enum_butterfly`, `enum_cell`, `serial_adder`)

Each node n has a flag s[n]. The enumeration gives every node two counts within its subcube:

* **o**: how many flagged nodes have a smaller address;
* **t**: how many flagged nodes there are in all.

Each node has K butterfly vertices (`enum_cell`), one per rank. Rank d merges each group of
nodes with its twin group across dimension d:

    t' = t + t_partner
    o' = o + t_partner   if the node's address bit d is 1 (upper twin), else o

The ranks merge the lowest dimension first, which yields address order. The numbers are
W = K+1 bits wide and travel LSB first. Every vertex holds two `serial_adder`s, each a full
adder with a carry flip-flop, so rank d+1 starts on bit l one clock after rank d. The whole
enumeration takes W+K+1 clocks. Ranks below `lo_dim_i` pass their numbers through unchanged,
which restricts the count to subcubes of level `lo_dim_i`. The router uses `lo_dim = i+1`.

## Node and controller (`hc_node`, `hc_sequencer`)

A node holds the following state:

* `a`: its own message;
* `b`: a second message, which arrived in step 1;
* `t`: a message in transit, received in step 3;
* `r`: the partner address, received in step 5;
* one serializer and one deserializer (one frame per step);
* two flags: "two messages" and "empty", recorded right after step 1.

In step 3 the node packs `b`, the message that arrived. `err_o` latches any broken invariant:

* a frame arrives into an occupied register;
* a transit message has no partner, or its partner lies outside the node's subcube;
* a message is left off its destination at the end.

`hc_sequencer` broadcasts the step, the loop index and start/clear pulses. Every step has a
fixed length, derived from the pipeline latencies above:

| step | clocks |
|---|---|
| 1 exchange | M + 2 |
| 2, 4 enumeration | W + K + 3 each |
| 3 pack messages | 2K + M + 2 |
| 5 pack addresses | 3K + 2 |
| 6 rendezvous | K + M + 2 |

One iteration is 3M + 8K + 2W + 14 clocks, and a run is K times that, plus one clock. At the
defaults (K = 6, P = 8) that is 118 clocks per iteration and 709 clocks from `start_i` to
`done_o`.

## Pipelined form (`hc_pipe_router`)

Iteration i uses dimension i for its exchange and only dimensions above i for its packings.
Dimension d is therefore busy only in iterations 0..d. Give dimension d its own d+1 wires (a
"quadratic" hypercube) and the iterations no longer compete for wires. They can then run at the
same time on different batches.

`hc_pipe_router` has K stages. Stage s is a complete iteration-s datapath:

* 2^K nodes with the loop index fixed at s;
* an enumeration butterfly;
* a router;
* its own exchange wire across dimension s.

All stages run the same six steps in lockstep. A slot is one hand-off clock plus one iteration:
119 clocks at the defaults. On the hand-off clock (`slot_o`) three things happen:

* each node's message moves from stage s to stage s+1;
* stage 0 takes a new batch;
* the batch that entered K slots earlier appears on `out_*`.

Latency is K slots. Throughput is one batch per slot, O(K). Storage and serial adders per node
grow to O(K^2). Each stage's router is a full K-level router whose levels at or below s never
cross. An H-permutation (each node sends and receives at most H messages) is routed as H
successive batches. Splitting it into H injective batches is left to the user.

## Using it

`hc_router_top #(K, P)` contains the basic router and, beside it with `pipe_*` ports, the
pipelined one. The two share only clock and reset (`rst_n`, asynchronous, active low).

Basic router:

1. While idle, pulse `load_i` with `load_v_i[n]` / `load_msg_i[n]` for every node.
2. Pulse `start_i`. `busy_o` stays high during the run.
3. When `done_o` pulses, `hold_v_o` / `hold_msg_o` show the delivered messages, and `err_o`
   must be low.

Pipelined router:

1. Hold `pipe_run_i` high.
2. On every `pipe_slot_o` clock, present a batch on `pipe_in_batch_i`, `pipe_in_v_i` and
   `pipe_in_msg_i`.
3. Routed batches come out on `pipe_out_*` one clock after a slot, qualified by
   `pipe_out_valid_o`.

| parameter | default | meaning |
|---|---|---|
| K | 6 | cube dimension, N = 2^K nodes (any K ≥ 2) |
| P | 8 | payload bits per message (message = K + P bits) |
| W | K+1 | width of the enumeration counts (`enum_butterfly` only) |

Input messages must form an injective routing. A routing that is not injective is not handled.
The router assertion or `err_o` will usually report it.

## Simulation

Every file in `rtl/` and `tb/` holds one module or package. Each testbench prints
`TB_RESULT checks=N failures=F`. For example:

    verilator --binary --timing --assert -Irtl -y rtl rtl/hc_pkg.sv \
        tb/tb_hc_router_top.sv --top-module tb_hc_router_top -Mdir obj -o sim && obj/sim

Testbenches (all self-checking, with a watchdog):

* `tb_hc_router_top`: the whole design at its default size.
  * Basic router: identity, complement, bit reversal, cyclic shift, six random full and six
    random partial permutations. It checks payloads, empty nodes, `err_o` and the exact 709-clock
    run time. It counts exchanges, doubly loaded nodes, empty nodes, packed bits and rendezvous
    bits, and fails if any of them is zero.
  * Pipelined router: nine back-to-back batches. It checks delivery, slot spacing, and that
    batches overlap (up to six in flight).
* `tb_hc_pipe_router`: 14 slots of batches, with empty slots.
* `tb_pack_router`: packings at every subcube level, forward and reverse, with exact latencies.
* `tb_enum_butterfly`: every `lo_dim`, with random, all-ones and all-zeros flag sets, and
  W+K+1 latency.
* `tb_hc_node`: one node driven step by step through every node behaviour (leave, double,
  pack, rendezvous, empty, error flags).
* `tb_hc_sequencer`, `tb_switch_cell`, `tb_enum_cell`, `tb_serial_adder`: unit checks against
  independent reference arithmetic.

Every testbench runs in a few seconds. The largest size simulated is the default, K = 6
(64 nodes, and 6 × 64 nodes in the pipelined form).

## Design choices and departures

The routing algorithm, dimension-order packing, butterfly enumeration recursions, one-bit-per-
level pipelining, rendezvous by reversal and the stage-per-iteration pipelining idea are the
scheme being implemented. The following are this implementation's own decisions:

* **Subcube level.** Steps 2-6 of iteration i work inside subcubes that agree in bits 0..i,
  not 0..i-1. Rebalancing over the larger subcube would undo the crossing of dimension i.
* **Positions.** Positions are 0-based. Position p of a subcube is node
  `(p << (i+1)) | x[i:0]`, because a subcube's nodes are not a contiguous integer range.
* **Step-4 count.** The empty nodes of step 4 are counted right after step 1. Messages
  received in step 3 are in transit.
* **Control.** One global lockstep controller with fixed step lengths (SIMD style). There is
  no handshaking between nodes.
* **Rendezvous.** Step 6 follows reverse paths recorded in the switches rather than routing by
  the step-5 address.
* **Formats.** Message layout, LSB-first serial order, valid-flag framing and the asynchronous
  reset are all this design's own.
* **Sizes.** K = 6 and P = 8 are chosen defaults. The scheme is stated for general K with
  Θ(K)-bit messages.
* **Exchange wires.** The dimension-i exchange in the basic router is one serial wire per node
  and dimension, modelled as a multiplexer on the loop index. The butterfly is modelled
  directly as K ranks of cells per node.
* **Unused outputs.** `total_o` of the enumeration is not used by the routers.

The step lengths assume that a node sends at most one frame per step, which holds by
construction. Per-node storage is constant in messages (four registers of at most K+P bits plus
shift registers), which matches the O(K)-bit bound. Synthesis keeps everything as flip-flops.
