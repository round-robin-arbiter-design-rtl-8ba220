# Round-robin bus and switch arbiters

Many requesters share one resource. On a bus, several masters want the bus
in the same cycle. In an input-queued network switch, every output port is
wanted by up to M input queues. A round-robin arbiter picks one requester per
cycle, and it changes the priority order over time so that no requester
starves. This RTL builds two arbiter kinds from the same small parts:

* an **MxM bus arbiter**: a one-hot token in a ring counter says which master
  has the highest priority, and a row of priority-logic blocks turns the
  requests into one grant;
* an **MxM hierarchical switch arbiter**: a tree of 4-input (and, where
  needed, 2-input) arbiter blocks. A request is ORed up the tree, one grant
  per level comes back down, and each level ANDs it with its own choice.
  Every block has only 2 or 4 inputs, and as many blocks as possible are
  4-input ones. So the priority logic stays small and the tree stays shallow,
  which makes the request-to-grant path short even for 128 inputs.

The top level, `rag_top`, puts a 4x4 bus arbiter beside the arbitration and
crossbar of a 32x32 switch. The switch part has 32 hierarchical 32x32 switch
arbiters, one per output port.

All arbitration is combinational: a grant appears in the same clock cycle as
the request. The only state is the tokens.

## Priority logic and the bus arbiter

`rr_priority_logic` is a fixed-priority selector with an enable.
`out[j]` is set when `en` is high, `in[j]` is high and no input of a lower
index is high. So `in[0]` always wins.

`rr_ba_core` gives round-robin order by using M of these blocks, one per
token position. Block *k* is enabled by `token[k]` and sees the requests
rotated by *k*: its input *j* is `req[(k+j) mod M]`. Its output *j* therefore
stands for requester `(k+j) mod M`. Only one block is enabled, and each
`grant[i]` is the OR of every block output that stands for requester *i*.
The result is that the token holder has the highest priority, then the
masters above it in index order, wrapping around.

Example, M = 4: the token is `4'b0100` and masters 0 and 1 request. Block 2
is enabled and sees inputs (req2, req3, req0, req1) = (0, 0, 1, 1). Its
output 2 wins, which is master 0.

`rr_bus_arbiter` adds the state:

* `rr_ring_counter` holds the one-hot token. It resets to `...0001` and
  rotates left by one place when advanced (`0100 -> 1000 -> 0001`).
* A D flip-flop samples `ack` on every clock. The ring counter advances at
  each clock edge at which that flip-flop holds a 1.

Timing of the token, which is the least obvious part:

```
cycle        t          t+1          t+2
ack          1          0            0
ack_q        0          1            0
token        T          T            T+1     (rotated at the end of t+1)
```

The token moves by exactly one place per acknowledged cycle. It does not jump
to the position after the winner. In the example above, master 0 wins with
the token on master 2, and after the ack the token sits on master 3.

## Switch-arbiter blocks

Two kinds of nodes make up a switch-arbiter tree. Both come in 2x2 and 4x4
sizes (parameter `N`).

**ack-req block** (`rr_ack_req_sa`), used at every level below the root:

* `req_up = |req`: one request to the parent;
* an NxN bus arbiter chooses among `req`;
* `grant = bus_arbiter_grant & {N{ack}}`, where `ack` is the parent's grant
  for this node;
* the same `ack` feeds the bus arbiter's ack flip-flop. So the node's token
  moves one clock after each cycle in which the node itself was granted.

**root block** (`rr_root_sa`): the bus-arbiter logic without the ack
flip-flop. Nothing sits above it, so its ring counter advances on **every**
clock edge. The root therefore alternates between subtrees every cycle.

The acks may look like a loop, since a grant depends on an ack that depends
on the request going up. They are not one. Requests only pass through OR
gates upward, and acks only pass through AND gates downward, and each bus
arbiter's choice depends on its requests and its registered token, never on
its ack. The longest path in the 32x32 arbiter runs through the OR gates of
two levels, then the 2x2 root, then two AND gates.

## Hierarchical switch arbiter (`rr_hier_sa`)

For M = 2^L inputs, the tree is planned at elaboration by `rr_arb_pkg`:

* with `USE_4X4 = 1` (default), every level is 4-input. When L is odd, one
  2-input level is needed, and it is placed at the root;
* with `USE_4X4 = 0`, every level is 2-input.

| M   | levels (leaves first)                   | blocks                                    |
|-----|-----------------------------------------|-------------------------------------------|
| 2   | 2x2 root                                | 1                                         |
| 4   | 4x4 root                                | 1                                         |
| 8   | 4x4 ack-req, 2x2 root                   | 2 + 1                                     |
| 16  | 4x4 ack-req, 4x4 root                   | 4 + 1                                     |
| 32  | 4x4, 4x4 ack-req, 2x2 root              | 8 + 2 + 1 (default)                       |
| 64  | 4x4, 4x4 ack-req, 4x4 root              | 16 + 4 + 1                                |
| 128 | 4x4, 4x4, 4x4 ack-req, 2x2 root         | 32 + 8 + 2 + 1                            |

With `USE_4X4 = 0` and M = 4 you get two 2x2 ack-req blocks under a 2x2 root.
This tree works, but it has more levels and so a longer path than a single
4x4 block. That is why the default prefers 4-input blocks.

Under full load the 32x32 arbiter serves inputs in a fixed interleaved
order. The root flips between the two halves every cycle. Each level-1 block
advances once per visit, and so does each leaf. So cycle *c* grants input
`16*(c%2) + 4*((c/2)%4) + (c/8)%4`, which gives 0, 16, 4, 20, 8, 24, 12, 28,
1, 17, and so on. Every input is served once every 32 cycles.

Parameters: `M` (power of two, at least 2, default 32) and `USE_4X4`
(default 1). Ports: `clock`, `reset`, `req[M]`, `grant[M]`. The module
asserts that `grant` is one-hot or zero, that it only grants requesters, and
that some request always gets a grant.

## The switch top (`rag_top`)

```
 voq_req[m][n] ──► per output n: rr_hier_sa #(PORTS) ──► voq_grant[m][n]
                                         │ grant[n][*]
 voq_data[m][n] ──► rr_crossbar ◄────────┘ ──► out_data[n], out_valid[n]
 ba_req, ba_ack ──► rr_bus_arbiter #(BA_M) ──► ba_grant
```

* `voq_req[m][n]`: virtual output queue (m, n) holds a packet. This queue
  belongs to input m and holds packets for output n.
* The arbiter of output n sees column n of `voq_req` and returns one-hot
  `voq_grant[*][n]`.
* `rr_crossbar` closes the switch from VOQ(m, n) to output n while
  `grant(m, n)` is set. It is written as an AND-OR multiplexer of
  `DATA_W`-bit words, so `out_data[n]` carries the head word of the granted
  queue in the same cycle.
* The output arbiters are independent. One input can be granted by several
  outputs in the same cycle, one for each of its queues. No input-side
  matching is done.
* The queues are not part of this RTL: their occupancy and head words are
  inputs.

Parameters: `BA_M = 4`, `PORTS = 32`, `DATA_W = 8`, `USE_4X4 = 1`. Reset is
synchronous and active high for every register.

## Design choices where the source description is silent or ambiguous

* **Reset**: synchronous and active high. Every token resets to position 0,
  and every ack flip-flop is cleared.
* **Ring counter timing**: the ack flip-flop and the ring counter share the
  clock, and the flip-flop's output enables the counter (see the timing table
  above). Another reading, in which the flip-flop output clocks the ring
  counter, would rotate once per ack pulse rather than once per acknowledged
  cycle.
* **Root token**: it advances every clock. One drawing of an 8x8 arbiter
  shows an `ack` line entering the root, while the block diagrams of the root
  show only clock and reset. This RTL follows the block diagrams and gives
  the root no ack input.
* **Priority-logic width**: the equations are given for 4 inputs. The same
  rule is applied to 2 inputs and to any M.
* **Generalised bus arbiter**: any M is accepted. The input rotation of the
  4x4 drawing is extended as `(k+j) mod M`.
* **Non-power-of-two M**: rejected with `$fatal` at elaboration.
* **Crossbar**: the transmission gates are modelled as digital logic.
  `DATA_W` is this design's choice.
* **Instance names**: the 32x32 drawing names the blocks `l0.sa0`–`l0.sa7`,
  `l1.sa0`, `l1.sa1` and the root. This RTL builds the same tree with
  generate loops (`g_lvl[l].g_node.g_blk[b].u_sa`, `g_lvl[2].g_root.u_root`).
* The published delay and area results come from a 0.25 µm standard-cell
  library: 0.94 ns for the 32x32 arbiter, and 6.16 Tbps at 128x128. This
  RTL makes no claim to reproduce those numbers.

## Verification

Each testbench checks its module against a reference model written
independently of the RTL structure. The models are in `tb/rr_ref_pkg.sv`:

* `RrModel` is a bus arbiter with an integer token index and an ack
  flip-flop.
* `TreeModel` evaluates the switch-arbiter tree level by level with integer
  tokens.

Grants are checked in the same cycle as the requests. Every testbench prints
`TB_RESULT checks=N failures=F` and has a watchdog.

| testbench              | what it covers                                                              |
|------------------------|-----------------------------------------------------------------------------|
| `tb_rr_priority_logic` | the 4-input truth table, exhaustive for N = 2, 4, 8                          |
| `tb_rr_ring_counter`   | reset value, rotation order, hold, random advance for N = 4, 2               |
| `tb_rr_ba_core`        | every token/request combination for M = 2, 4, 8, and the worked example      |
| `tb_rr_bus_arbiter`    | token moves two edges after ack, the worked example, random runs for M = 2, 4, 8 |
| `tb_rr_ack_req_sa`     | request OR, grants held back without ack, token timing, random runs          |
| `tb_rr_root_sa`        | token advancing every clock, full-load sequence, random runs                 |
| `tb_rr_hier_sa`        | hand-derived 32x32 full-load order; random runs for M = 2 … 128 and all-2x2 trees; every input served under full load |
| `tb_rr_crossbar`       | random grants on 4x4, a permutation and a broadcast on 32x32                 |
| `tb_rag_top`           | the whole top at default sizes, 3000 cycles and about 3.3 M checks. It counts token rotations, wrap-around grants, root contention, requests held back for lack of ack, crossbar transfers, idle outputs and inputs granted by several outputs, and fails if any of these never happened |

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_rag_top \
    -Irtl -Itb -y rtl -y tb rtl/rr_arb_pkg.sv tb/rr_ref_pkg.sv tb/tb_rag_top.sv
./obj_dir/Vtb_rag_top
```

Replace `tb_rag_top` with any other testbench name to run it. The top-level
test builds in well under a minute and runs in a few seconds. To build a
larger switch, override `PORTS` (a power of two) on `rag_top`. For a single
arbiter, override `M` on `rr_hier_sa`. The largest top-level configuration
simulated end to end is `PORTS = 128`, the terabit-switch size. With the
same test at 400 cycles it passed about 6.6 M checks. Verilator takes about
14 minutes to compile it, so no testbench for it is included.

## Files

* `rtl/rr_arb_pkg.sv`: tree-planning functions
* `rtl/rr_priority_logic.sv`, `rtl/rr_ring_counter.sv`, `rtl/rr_ba_core.sv`,
  `rtl/rr_bus_arbiter.sv`: the bus arbiter
* `rtl/rr_ack_req_sa.sv`, `rtl/rr_root_sa.sv`, `rtl/rr_hier_sa.sv`: the
  switch arbiter
* `rtl/rr_crossbar.sv`, `rtl/rag_top.sv`: the crossbar and the top level
* `tb/`: the testbenches, `rr_ref_pkg.sv` (reference models) and
  `hier_sa_checker.sv` (the per-size checker used by `tb_rr_hier_sa`)
