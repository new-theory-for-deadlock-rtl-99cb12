# Id-tag multicast mesh NoC without virtual channels

This is a 2D-mesh network-on-chip whose routers deliver unicast and multicast
packets with wormhole switching. It has one physical queue per input port and
no virtual channels. Multicast in a wormhole network usually deadlocks. A packet
that branches needs several output ports at once. Two packets that each hold one
of the ports the other needs can then wait on each other forever.

The design avoids this with two mechanisms:

1. **Flit-level interleaving with local Id-tags.** A packet never owns a link.
   Flits of different packets are mixed on a link, one flit at a time. Each
   flit carries a small *Id-tag* that says which packet it belongs to on that
   link. The tag is local: it is reassigned at every hop. The next router uses
   the tag to look up where the flit must go.
2. **Hold/release tagging.** A multicast flit at an input asks for several
   outputs at once. Each output grants it on its own. The flit stays at the
   input until every requested output has granted it. Requests that were
   granted are removed, so no branch gets a second copy. Each output arbiter
   rotates among its requesters flit by flit. A contended flit therefore waits
   at most as many cycles as there are requesters at its busiest output.

Routing is static X-first (XY), the same for unicast and multicast, so there are
no cyclic channel dependencies between routers. Inside a router, hold/release
resolves multicast contention in a bounded time. Together these keep the whole
network free of multicast deadlock.

## Packets and flits

A flit is 38 bits: `{type[1:0], id[3:0], word[31:0]}` (`noc_pkg::flit_t`).

| type | code | word |
|---|---|---|
| header | 0 | `[31:28]` src x, `[27:24]` src y, `[23:20]` target x, `[19:16]` target y, `[15:0]` reserved (carried through) |
| databody | 1 | payload |
| tail | 2 | payload (last flit of the packet) |
| response | 3 | as a header: a single-flit message routed by its address |

A packet is one or more header flits, then databody flits, then one tail flit.
A unicast packet has one header. A multicast packet has one header per
destination. All flits of a packet enter the network with the same Id-tag on
the source's Local link. A processing element must not use the same Id for two
packets that are open at the same time. Id values `0 .. N_SLOT-2` are for
packets. `N_SLOT-1` is reserved, see below.

## The two tables that make interleaving safe

Each one-directional link has `N_SLOT` local Id slots. The two ends of a link
keep matching tables:

* **Routing reservation table**, at the receiving input port
  (`routing_reservation_table`). Entry `k` is a set of output directions.
  - A header with tag `k` adds its own XY direction to entry `k`.
  - A databody flit with tag `k` is sent to every direction in entry `k`.
  - A tail flit with tag `k` is sent the same way and clears entry `k`.

  A multicast packet's headers each take their own branch. Together they
  leave the union of all branch directions in entry `k`. The payload then
  follows that union, which forms the multicast tree.

* **ID slot table**, at the sending output port (`id_management_unit`). Entry
  `k` records which packet owns slot `k` on the outgoing link, as the pair
  (tag on the input link, input port). Each flit switched to the output gets
  its new tag as follows:
  - **header:** it takes the slot its packet already holds on this output, if
    any. That happens when two headers of one multicast packet leave by the same
    port. Otherwise it takes the lowest free slot. If no slot is free, it gets
    the reserved tag `N_SLOT-1` (an *Id run-out*).
  - **databody / tail:** it takes the slot that holds its (old tag, input
    port) pair. A tail also frees the slot. If no slot holds the pair, the
    flit is *dropped*. This is the case when the packet's header ran out.
  - **response:** always gets `N_SLOT-1`.

A header on the reserved tag still reaches its destination, because it is
routed by its address. It does not write the next router's table, and its
packet's payload has been dropped. Without a retransmission protocol, dropping
can be avoided by giving each link enough slots. For XY routing in an N x M mesh:

* an East port needs `x+1` slots and a West port `N-x`;
* North and South ports need `N(y+1)` and `N(M-y)`;
* the Local output needs `NM-1` for all-to-one traffic.

With the default 4x4 mesh and `N_SLOT = 16`, every port has at least the 15
usable slots this requires. The busiest ports are Local (15) and North/South
(at most 12).

## Hold/release, with an example

Each cycle the routing stage of input `n` shows its outstanding requests
`r[n][1:5]`. Each output `m` grants one requester, `a[n][m]`. Then for each
input:

* if every outstanding request was granted, the flit is **released**. It is
  switched to all granted outputs in that cycle, and the next flit of the queue
  enters the routing stage in the same cycle;
* otherwise the flit is **held**. The granted requests are removed
  (`r <= r & ~a`), so those outputs, which already got their copy, are not
  asked again.

Ports are numbered 1..5 = East, North, West, South, Local. Take three inputs
that contend:

* input 1 wants {2, 3};
* input 3 wants {1, 4};
* input 4 wants {2, 3, 5}.

Outputs 2 and 3 each have two requesters. Input 3 has no competitor, so it is
released in the first cycle. Each of outputs 2 and 3 serves one of inputs 1
and 4 in the first cycle and the other in the second. At least one of those
inputs is held, and all three flits are out after two cycles. In general, all
flits present at one moment leave within `max_m(requests to output m)` cycles,
which is at most 5. This is longer only when a downstream queue is full.
`tb_router` runs exactly this case.

The arbiter (`rotating_arbiter`) searches downward in port number. It starts
just below the input it granted last, wraps around, and skips inputs without a
flit. After reset it starts at the highest port. Three inputs requesting all
the time, say 2, 4 and 5, are therefore served in the order 5, 4, 2, 5, 4, 2, ...

## Router organisation and timing

```
 link in ──► input_fifo ──► routing_engine ──req──► rotating_arbiter ─┐
 (valid/full)  (DEPTH)      (RSM + RRT,     ◄─gnt──  (one per output) │
                             hold/release)   flit ──► mux ──► id_management_unit ──► link register ──► link out
```

* `input_port` = `input_fifo` + `routing_engine`. The routing engine holds one
  flit and its request vector.
* `output_port` = `rotating_arbiter` + multiplexer + `id_management_unit` +
  the link register.
* `router` wires five of each: ports 0..4 = E, N, W, S, L.

A flit crosses an idle router in three cycles: queue write, routing stage, and
switch into the link register. In the cycle of its grant it is already in the
link register.

Every link uses valid/full flow control. A flit moves when `valid` is high and
`full` is low. `full` comes from the receiving queue's registered occupancy. A
full queue refuses a flit even when it pops one in the same cycle. This keeps
`full` free of combinational paths, at the cost of one bubble when a queue runs
full. An output grants only when its link register is empty or is draining
this cycle.

The routing-engine state, both tables, the queue pointers and the link
registers are cleared by the active-low asynchronous reset `rst_n`. Queue
storage is not reset.

## Top level: `mesh_noc`

Node `(x, y)` has index `y*MESH_X + x`. East goes to `x+1` and North to `y+1`.
Mesh-edge ports are tied off. The Local port of every router is a top-level
port:

| port | dir | meaning |
|---|---|---|
| `local_in_valid[i]`, `local_in_flit[i]` | in | flit injected by PE `i` |
| `local_in_full[i]` | out | PE `i` must hold its flit |
| `local_out_valid[i]`, `local_out_flit[i]` | out | flit delivered to PE `i` |
| `local_out_full[i]` | in | PE `i` cannot take a flit (stalls the network) |
| `status[i]` | out | per-port event flags of router `i`: held, multicast, contention, allocated, runout, dropped |

Flits delivered to a PE carry the tag given by the Local output. The headers of
one packet arrive with the same tag as its payload. A receiver can reassemble
interleaved packets by tag, and the header tells it the source.

### Parameters

| parameter | default | where |
|---|---|---|
| `MESH_X`, `MESH_Y` | 4, 4 | `mesh_noc`; up to 16 x 16, limited by the 4-bit address fields |
| `N_SLOT` | 16 | Id slots per link, `mesh_noc` / `router` / tables; 2 .. 16 |
| `FIFO_DEPTH` | 4 | input queue depth |

The tag field is 4 bits (`noc_pkg::TAG_W`). More than 16 slots per link needs a
wider `TAG_W`.

## Design choices

The following were chosen here. The underlying method leaves them open.

* **Routing:** XY routing. Any routing function without cyclic dependencies
  would do. Adaptive routing is not built.
* **Multicast style:** tree-based multicast only. Each header goes to its own
  destination and the payload follows the union. Path-based multicast is not
  built. In that style, headers are consumed one by one at successive
  destinations.
* **Pipeline:** three stages rather than four. There is no separate
  arbitration register.
* **Bit layout:** flit widths, header field layout and queue depth.
* **Further headers of a packet:** a multicast packet's second header leaving
  by the same output reuses the slot of the first. A literal reading of the
  slot algorithm would give it a new slot, and then the packet's payload could
  not follow both.
* **Reserved tag:** headers on the reserved tag and response flits do not
  write the routing table.
* **Empty table entry:** a databody or tail flit that finds its entry empty is
  discarded at the routing stage.
* **Single-flit messages:** responses are always tagged `N_SLOT-1`.

The processing-element side is not part of this RTL: packetization, Id
assignment at the source and retransmission after a drop.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_input_fifo` | queue against a model; full refuses pushes |
| `tb_routing_state_machine` | XY directions for all coordinates |
| `tb_routing_reservation_table` | union/clear/read against a model |
| `tb_routing_engine` | table use per flit type; hold with partial grants, release on the last grant; discards |
| `tb_rotating_arbiter` | the 5, 4, 2 rotation example, fairness, random against a model |
| `tb_id_management_unit` | allocation, reuse by further headers, run-out, drop, free; random against a model |
| `tb_output_port` | interleaving of three inputs under random back-pressure; Id consistency; run-out with 3 usable slots |
| `tb_input_port` | order and exactly-once service of multicast flits under random grants |
| `tb_router` | the three-input contention example (`T_f = 2`), then random unicast/multicast traffic; per-output scoreboard |
| `tb_mesh_noc` | default 4x4 mesh: 48 random multicast/unicast packets and 16 responses under PE stalls; then all-to-one from 15 nodes plus one extra packet. Exactly one run-out and its 4 dropped flits; every mechanism counted |

The scoreboards check, for every packet and every port or node:

* the expected headers arrive;
* each databody and tail flit arrives exactly once, in order, on one tag;
* nothing arrives where the packet was not sent.

To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mesh_noc \
  -y rtl -y tb +libext+.sv -Irtl rtl/noc_pkg.sv tb/tb_mesh_noc.sv
./obj_dir/Vtb_mesh_noc
```

The same command works for any other testbench name. `tb_mesh_noc` uses the
top at its default parameters and finishes in well under a second.
