# Clos-MDN: a high-radix packet switch built from small on-chip networks

A switch with hundreds of ports cannot be one crossbar. The crossbar and its
scheduler grow as N². A classic three-stage Clos network splits the switch into
small elements, but then needs either a central scheduler, when the middle stage
is bufferless, or large crosspoint memories, when every stage is buffered.

This design keeps the three Clos stages and makes each middle-stage module a small
**network-on-chip**: a k × k mesh of mini-routers. Packets enter the mesh on one
side edge and may leave on either side edge, so traffic flows in both directions
(a *multi-directional NoC*, MDN). The routers have small buffers, their own
round-robin arbiters and hop-by-hop flow control, so no stage needs a global
scheduler. The middle-stage modules are also chained into a ring through their
north and south edges. A module that gets congested can hand a packet to a
neighbour, which absorbs uneven load without queues per output at the inputs.

The RTL is synthesizable SystemVerilog. By default it builds the 256-port
configuration with a fabric speedup of 3.

## Structure

```
           line inputs / outputs                      line inputs / outputs
   IOM 0 ──┐                                                    ┌── IOM 2K-1
   IOM 1 ──┤     CM 0   (K×K mesh)  ◄── ring link ──►            ├── IOM 2K-2
    ...    ├──►  CM 1                                        ◄──┤    ...
   IOM K-1─┘     ...                                            └── IOM K
                 CM M-1 (wraps to CM 0)
     west edge of every CM                      east edge of every CM
```

| Parameter | Default | Meaning |
|---|---|---|
| `K` | 8 | mesh size of a central module (CM); there are 2K input/output modules (IOMs) |
| `M` | 16 | number of CMs = ports per IOM (n = m, the Beneš case) |
| `N` | 2·K·M = 256 | switch ports |
| `SP` | 3 | speedup: fabric cycles per external time slot |
| `BUFF` | 4 | packet slots per router input port |
| `ASYM` | 1 | split an edge router's IOM-side slots 2/3 : 1/3 between the two VCs (0: 1/2 : 1/2) |
| `CA_EN` | 1 | congestion-aware diversion to neighbouring CMs |
| `HOP_W`, `THRESH` | 1, 8 | diversion cost of a hop and margin, in packets |
| `IN_DEPTH`, `OQ_DEPTH` | 16, 32 | IOM input FIFO and output queue depths |

The 256 ports could also be split as K = 16, M = 8. This design uses 8 × 8 meshes
and 16 CMs, in keeping with the aim of many small modules.

**Port numbering.** IOM g holds input ports g·M … g·M+M−1 and output ports
N−1−g·M down to N−M−g·M. IOM 0, for example, has inputs 0…M−1 and outputs
N−1…N−M, and output 0 sits in the last IOM. IOMs 0…K−1 connect to the west edge
of every CM, IOM g on row g. IOMs K…2K−1 connect to the east edge, IOM g on row
2K−1−g. So input port p and output port N−1−p sit on opposite sides.

**Static dispatch.** Input FIFO i of every IOM always sends to CM i. Every CM has
one link to and one from every IOM. An output queue can therefore receive from
all M CMs in the same cycle.

## The packet and its route

A packet is one fixed-size cell (`clos_mdn_pkg::pkt_t`): a 32-bit payload, the
destination port, and a route header. It travels whole on a link in one cycle and
is stored whole in a buffer, which makes switching store-and-forward.

Each time a packet enters a CM, the route header is computed again. It holds:

* `tgt_row`, `tgt_col`: the router where the packet leaves this CM;
* `exit_dir`: the port it leaves by there (W or E towards an IOM, N or S towards
  a neighbouring CM);
* `turn_col`: the column where it first turns vertical;
* `vc`: its virtual channel;
* `diverted`: set once the packet has been handed to a neighbouring CM.

A router then needs only its own coordinates (`next_hop` in the package):

1. At the target router, take `exit_dir`.
2. Otherwise, if not yet on the target row: move horizontally to `turn_col`,
   then vertically.
3. On the target row, move horizontally to `tgt_col`.

The entry router and the exit edge decide which route a packet takes:

| Entry → exit | Route | turn column |
|---|---|---|
| west edge → east edge (parallel ports) | **Modulo**: east, one turn, vertical, east again | `exit_row mod (K−1)` |
| east edge → west edge | Modulo, mirrored | `K−1 − (exit_row mod (K−1))` |
| same edge (west → west, east → east) | straight vertical in the edge column | — |
| IOM inlet → N/S crossing, or N/S arrival → side exit (perpendicular ports) | **XY**: horizontal first, then vertical | target column |

The Modulo route spreads the vertical part of the traffic over columns 0…K−2,
chosen by the destination row. Plain XY would load only the last column.

**Virtual channels.** Inside a CM a route never moves both east and west. VC 0
carries packets that move east, or that make no horizontal move and leave east,
north or south. VC 1 carries packets that move west or leave west. The VC 0
packets move only E/N/S and the VC 1 packets only W/N/S, and no route reverses
vertically, so neither class can form a cyclic channel dependency inside a mesh.

## Mini-router (`mini_router`)

Four ports, each with up to two VC input buffers:

| Input | Buffers |
|---|---|
| North, South | VC 0 and VC 1, BUFF/2 each |
| West (interior) | VC 0 only, BUFF (eastbound traffic only arrives from the west) |
| East (interior) | VC 1 only, BUFF |
| West of a west-edge router / East of an east-edge router (IOM link) | both VCs. ASYM = 1: 3 + 1 slots for BUFF = 4, the larger share for the VC that heads away from that edge. ASYM = 0: 2 + 2 |

Each of the eight buffer heads asks for one output and competes only if the
buffer behind that output has room. Each output has a round-robin arbiter over
the eight buffers (`rr_arbiter`) and passes one packet per cycle. Two VCs of one
input can leave in the same cycle on different outputs. A hop takes one cycle.

Flow control is valid/ready. The ready of a router input is a per-VC "not full"
vector from registers. A sender looks up the bit for the VC the packet will use
downstream. The ready of an output towards an IOM is a vector with one bit per
output queue.

## Congestion-aware diversion and the interleaved ring

The ring links follow one rule. South-edge column i of CM r connects to north-edge
column (K/2 + i) mod K of CM (r+1) mod M. North-edge column i of CM r connects to
south-edge column (K/2 + i) mod K of CM (r−1) mod M. The links wrap around, so
the CMs form a closed ring.

Every CM registers the number of packets in all its router buffers (`occ_out`)
and passes it to both neighbours. When a packet comes in from an IOM, the CM
compares three costs:

```
stay : occ(this CM)   + HOP_W · hops to the exit inside this CM
down : occ(CM below)  + HOP_W · hops via the south crossing and the CM below
up   : occ(CM above)  + HOP_W · hops via the north crossing and the CM above
```

The packet is diverted when a neighbour is cheaper than staying by more than
`THRESH`. The cheaper neighbour wins, and a tie goes down. A diverted packet is
never diverted again.

A diverted packet crosses at column K/2 if its exit is on the west edge, and at
K/2−1 if it is on the east edge. Because of the K/2 shift in the links, it then
arrives on the neighbour's exit column and only has to move vertically.

This choice also keeps the ring deadlock-free. Packets that leave a CM through
the north or south edge use vertical channels in columns K/2−1 and K/2 only. The
packets arriving from a neighbour move only in columns 0 and K−1, and those
channels lead straight to an IOM exit, which always drains. So no chain of
waiting packets can go all the way round the ring.

Diverted packets can overtake packets of the same flow, so **output order per
flow is not guaranteed**.

## Timing

* A time slot is `SP` fabric cycles. The `slot` output is high on the first
  cycle of each slot.
* A line offers at most one packet per slot. It is taken on the slot cycle if
  `in_ready` is high (the input FIFO is not full).
* An input FIFO sends at most one packet per slot to its CM.
* Inside a CM, a packet visiting h+1 routers takes h+1 cycles when the mesh is
  idle.
* An output queue takes up to M packets per cycle, one per CM link. It sends
  one packet per slot. `out_valid[q]` pulses for one cycle, the cycle after a
  slot cycle.

In an idle switch, latency is therefore hops + 1 cycles plus at most about two
slots of waiting at the IOMs.

## Top-level interface (`clos_mdn_switch`)

| Signal | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset, which empties everything |
| `slot`, `slot_count` | out | 1, 32 | slot strobe; slots since reset |
| `in_valid[p]`, `in_data[p]`, `in_dst[p]` | in | N, N×32, N×10 | packet offered on input port p, with its destination port |
| `in_ready[p]` | out | N | taken this cycle |
| `out_valid[q]`, `out_data[q]` | out | N, N×32 | packet delivered on output port q |
| `div_up_evt[r]`, `div_down_evt[r]` | out | M × 2K | CM r diverted a packet from IOM inlet g upwards/downwards (monitoring) |
| `cm_occ[r]` | out | M × 16 | packets held in CM r (monitoring) |

## Files

| File | Contents |
|---|---|
| `rtl/clos_mdn_pkg.sv` | packet type, port-numbering and routing functions |
| `rtl/clos_mdn_switch.sv` | top: IOMs, CMs, Clos wiring, ring links |
| `rtl/iom.sv` | input FIFOs (static dispatch, one packet per slot) and output queues |
| `rtl/out_queue.sv` | output queue with one write port per CM |
| `rtl/mdn_cm.sv` | central module: mesh, route computation at entry, diversion, occupancy |
| `rtl/mini_router.sv` | mesh router |
| `rtl/rr_arbiter.sv`, `rtl/pkt_fifo.sv`, `rtl/slot_timer.sv` | arbiter, packet FIFO, slot strobe |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus end-to-end runs |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -yrtl rtl/clos_mdn_pkg.sv \
          tb/tb_clos_mdn_switch.sv --top-module tb_clos_mdn_switch -o sim
./obj_dir/sim
```

* `tb_clos_mdn_switch` runs the 32-port layout (K = 4, M = 4). It sends single
  packets between all IOM pairs and checks their latency. It then runs uniform
  traffic at 60 % load, a flood through CM 0 that forces diversions up and down,
  and a hot spot that fills an output queue and pushes back on the input lines.
  A scoreboard checks that every packet leaves on its own port exactly once and
  that no output sends more than one packet per slot.
  The latency of a lone packet must lie between the shortest path it could take
  and the local path plus two slots. In an idle 8 × 8 mesh, a packet between far
  corners is diverted over a ring link, because that way is shorter: on the
  neighbour it arrives on its exit column.
* `tb_clos_mdn_full` does the same at the default 256-port size, with no
  parameter overrides. It needs no output queue to fill and no line to be held
  back. It delivers about 14,000 packets, all through their own ports, with
  every route class and both diversion directions seen. Compiling it takes
  about 10 CPU-minutes of C++ (use `-j`). Running it takes seconds.
* `tb_clos_mdn_workloads` drives the 32-port layout with four traffic patterns,
  at 50 % and 90 % load: uniform Bernoulli, bursty (on/off, mean burst of
  10 packets to one destination), hot spot (omega = 0.5) and diagonal (2/3 to
  the same-numbered output, 1/3 to the next one). It prints throughput and mean
  delay, checks delivery, and checks throughput for uniform traffic (within 5 %
  of 50 % offered, and at least 85 % at 90 % offered). One run gave these results:

  | pattern | 50 % load | 90 % load |
  |---|---|---|
  | uniform | 49.8 %, 4.8 slots | 89.8 %, 8.4 slots |
  | bursty | 50.1 %, 20.0 slots | 59.4 %, 45.7 slots |
  | hot spot | 49.9 %, 4.6 slots | 90.2 %, 7.6 slots |
  | diagonal | 50.5 %, 4.3 slots | 90.3 %, 6.1 slots |

  Bursty traffic at heavy load saturates near 60 %. The input FIFOs are
  first-in first-out, so a burst waiting at the head for a busy output blocks
  the packets queued behind it.
* `tb_mdn_cm` tests one CM with its north and south edges looped back through the
  interleave. `tb_mini_router`, `tb_iom`, `tb_out_queue`, `tb_pkt_fifo`,
  `tb_rr_arbiter` and `tb_slot_timer` check the smaller units against reference
  models.

## How far to trust it, and what is this design's own

These parts follow the switch architecture as published: the three-stage
topology with n = m and static dispatch, the per-slot rates of the input FIFOs and
output queues, the k × k MDN with two VCs split by horizontal direction, the
router buffer layout and the 4-packet buffers, the symmetric and asymmetric VC
splits, the round-robin arbitration, XY routing between perpendicular ports and
an extra-turn "Modulo" route between parallel ports, the K/2-interleaved
wrap-around links between CMs, and diversion weighing hop count against buffer
occupancy.

These are choices made here, because the architecture leaves them open:

* the K = 8, M = 16 split of 256 ports;
* one 32-bit cell per packet, and the header widths (up to 1024 ports, 32 × 32 meshes);
* the exact Modulo turn column;
* the straight vertical route for same-edge traffic;
* the congestion metric. The published scheme refers to regional congestion
  awareness. Here the metric is the whole-module buffer occupancy, passed one
  module away, and the decision is the linear cost rule with `THRESH` given
  above;
* the crossing columns of diverted packets;
* speedup modelled as SP fabric cycles per slot;
* FIFO and queue depths;
* an output queue that accepts only while M entries are free, so a cycle's writes
  always fit;
* valid/ready handshakes everywhere, and asynchronous reset.

The line cards that feed and drain the ports are outside the design.

Not modelled: packets longer than one cell, and reordering buffers. Traffic
generation and statistics live only in the testbenches. Load sweeps and the
512-port size were not simulated.
