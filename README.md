# Contention-look-ahead wormhole mesh for a shared-memory multiprocessor

On a chip, wires are cheap and buffers are expensive. This network uses that
trade-off. It connects the nodes of a shared-memory multiprocessor (each a
processor with its L1/L2 caches and a slice of the shared memory) through a 2-D
mesh of small wormhole switches with only **two flits of buffering per input**.
Besides the 64-bit data link, every pair of neighbouring switches is joined by
dedicated control wires that carry the current **length of the receiving input
queue**. When a packet's header reaches a switch, the switch can see how
crowded each neighbour is before it picks an output. It compares an
estimated delay for every candidate direction, and it will take a detour (a
*misroute*) when that is cheaper than waiting behind a full queue on the
shortest path.

The RTL implements the contention-look-ahead routing scheme and switch
organisation described by T. T. Ye, L. Benini and G. De Micheli in
"Packetization and routing analysis of on-chip multiprocessor networks". The
routing rule, buffer sizes, flit width, queue-length wires and mesh size follow
that description. Everything it leaves open is an explicit choice of this
implementation, listed in [Design choices and departures](#design-choices-and-departures).

Default configuration: 4x4 mesh (16 tiles), 64-bit flits, 2-flit input buffers
on each side plus a 2-flit injection queue (640 data bits of buffering per
switch), 4-bit queue-length wires, 64-byte cache-block payloads.

## Tiles and links

```
            N out  N in (2-flit buffer)
               ^    |
               |    v
 W in  ->  +----------------+  -> E out
 W out <-  |   noc_switch   |  <- E in
           |   local port   |
           +----------------+
              |          ^
         ej (absorb)   inj (2-flit queue)
              v          |
        depacketizer   packetizer      <- node side: rsp_* / req_* ports
```

Each tile (`noc_mesh_top`, one generate iteration per tile) holds:

| module | role |
|---|---|
| `noc_switch` | the router: 4 side inputs, 4 side outputs, local inject/absorb port |
| `flit_fifo` | each input buffer and the injection queue; its occupancy is the queue-length signal |
| `route_lut` | constant table giving the profitable outputs, the misroute outputs and the dimension-ordered output for every destination |
| `allocator` | the combinational look-ahead decision for one header |
| `crossbar` | one multiplexer per output, driven by the reservations |
| `packetizer` / `depacketizer` | network interface: cache block to packet and back |

A side link from switch A to its neighbour B is `out_valid` + a 66-bit flit
(2-bit flit type on separate control wires, 64 data bits) from A to B, plus B's
4-bit queue length for that input from B back to A. Node id is
`y*MESH_X + x`. Row 0 is the north edge and column 0 the west edge. Links on the
mesh edge are tied off.

## Packets and flits

| flit | content |
|---|---|
| header (`F_HEAD`) | `op[63:60]`, `dst[59:52]`, `src[51:44]`, reserved `[43:32]`, `addr[31:0]` (`noc_pkg::header_t`) |
| payload (`F_BODY`) | 64 bits of the cache block, lowest word first |
| tail (`F_TAIL`) | check code: XOR of the header and all payload flits |

*Short* packets (memory read request, invalidate) carry no payload and are two
flits: header and tail. *Long* packets (data fetch reply, write-back/update,
coherence update) carry exactly one cache block: `PAYLOAD_BYTES/8` payload
flits, so 10 flits at the default 64 bytes. The packet size and the cache-block
size are one and the same parameter.

## The routing decision

This is the core of the design (`allocator.sv`, `route_lut.sv`).

For the header at the head of an input buffer, the route table divides the
four sides into:

* **profitable** sides, which bring the packet closer to its destination (one or
  two of them);
* **misroutes**, which are the other sides that exist at this position of the mesh.

A packet for this tile has only the local port as its profitable route.

Each side gets a delay penalty built from the neighbour's queue length `Q`:

```
profitable side:  Q * D_B
misroute side:    Q * D_B + 2 * D_S      (one hop away and one hop back)
```

A side is **eligible** if all of the following hold:

* it is not already reserved by another packet in this switch;
* its neighbour's queue is not full (`Q < BUF_DEPTH`);
* it is not the side the packet arrived on.

The allocator takes the eligible side with the smallest penalty. On a tie, a
profitable side beats a misroute. Among profitable sides, the
dimension-ordered one (north/south first, then east/west) beats the other, and
after that the fixed order N, S, E, W decides. Three consequences:

* **Quiet network:** every profitable side is free with an empty queue, so the
  packet follows dimension-ordered routing.
* **Mild contention:** a profitable side with one flit waiting (penalty 1) still
  beats an empty misroute (penalty 2) at the defaults `D_B = D_S = 1`.
* **Blocked shortest path:** when all profitable queues are full or reserved,
  the header takes the cheapest misroute.

If nothing is eligible, the header waits in its buffer and is re-evaluated
every clock.

In hardware this is what the original allocator circuit shows: a
demultiplexer steers the constant `2*D_S` into the adders of the misroute
channels, four adders produce the penalties, a comparator picks the minimum,
and an output demultiplexer steers the input channel. Here the comparator is a
minimum search over a key `{penalty, is_misroute, not_dor, side}`.

Headers that compete in the same clock are served one after another inside
the same cycle. The four sides go in a rotating order that advances every
clock, and the local injection queue always goes last. Each later allocator
sees the outputs claimed by the earlier ones as reserved. Incoming traffic
therefore always has priority over what the local node injects.

## Wormhole reservation, flow control and timing

* A granted header always moves in its grant cycle, because eligibility already
  required room downstream. The switch records `out_busy`/`out_owner` for the
  output and marks the input as locked. Body flits follow the reserved path, and
  the tail flit clears the reservation as it leaves.
* A flit is sent on a side only while the neighbour's queue length is below
  `BUF_DEPTH`. The queue-length wire doubles as back-pressure, so the link needs
  no ready signal. Toward the node, `ej_ready` plays that role.
* One hop takes one clock. A flit leaves an input buffer and is written into
  the next buffer on the same edge. Accepting a request, sending it over `H`
  hops and delivering an `L`-flit packet takes `1 + H + 1 + (L - 1)` cycles in
  an empty mesh. That is 9 cycles for a short packet and 17 for a 64-byte
  packet across the 6-hop diagonal, and the testbenches check both numbers.
* Body flits whose downstream queue is full stay where they are, spread over
  the switches along the path. This is a *stall*, and the switches report it.
* Reset is synchronous and active-low (`rst_n`). It empties all queues and clears
  all reservations.

Each switch reports per-cycle event counts (`sw_events_t`): profitable
grants, misroutes, dimension-ordered choices, held headers, stalled flits and
absorbed flits.

## Network interface

`packetizer` accepts one request (`req_valid`/`req_ready`): an operation, a
destination, an address, a long/short flag and the cache block. It emits the
flits at up to one per clock into the switch's injection queue, and takes the
next request only after the tail has left. `depacketizer` takes the absorbed
flits, rebuilds the header and the block, and checks the tail code
(`rsp_err`). It presents the packet on `rsp_valid` until `rsp_ready`, and
holds further flits (`in_ready` low) while a packet waits. A coherence message
meant for all caches is sent as separate packets, one per destination; the
interface has no broadcast.

## Deadlock: the known limit

The routing rule allows misroutes in every direction, and no virtual
channels or turn restrictions back it up. The original description presents
the scheme as a one-step-ahead heuristic that makes deadlock *less likely*;
it gives no guarantee, and this RTL adds none. With 2-flit buffers and
10-flit packets, saturating hot-spot traffic does lock the mesh. For example,
many nodes sending long packets to one node at full rate can leave a ring of
switches whose buffers are all full of misrouted packets waiting on each other.
Uniform random traffic at moderate load, and a hot spot fed by four senders,
drain completely, and the testbenches use such loads. A user who needs
guaranteed progress must add a deadlock-avoidance rule, for example by
restricting misroutes to a turn model.

Livelock is not bounded either: nothing limits how often a packet is
misrouted.

## Design choices and departures

Taken from the original description:

* the mesh of tiles with one input and one output per side;
* the local port, through which the node injects and absorbs packets;
* incoming traffic having priority over the local node;
* 2-flit side buffers plus an internal queue, 640 bits in total;
* 64-bit flits;
* binary queue-length wires (the example `1011` = 11 flits implies 4 bits);
* the penalty rule with `2*D_S` for a misroute;
* dimension-ordered routing when the profitable routes are free;
* the route table hard-coded at set-up;
* the reservation registers set by the header and cleared by the tail;
* one cache block per long packet and 2-flit short packets;
* the 4x4 mesh and the 16-256-byte payload range.

Chosen here, because the description leaves it open:

* The full-queue test is `Q < BUF_DEPTH`. One formula of the rule reads
  `Q_p <= Q_pmax`, while the prose says a full profitable queue forces a
  misroute. The prose is followed.
* `D_B = D_S = 1` clock. No value for them is given.
* Dimension order is north/south first ("column first").
* No U-turns: a packet never leaves on the side it arrived on.
* Outputs reserved in this switch are excluded from the minimum.
* The rotating order among the sides, and tie-breaking by DOR then N, S, E, W.
* A one-cycle hop, with the queue length used as back-pressure.
* The header field layout, the operation codes and the XOR tail code. The
  description only says the tail carries an error check or correction code.
* Node numbering, and synchronous reset.

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `MESH_X`, `MESH_Y` | 4, 4 | mesh size |
| `BUF_DEPTH` | 2 | flits per side input buffer; also the "full" threshold of the routing rule |
| `INJ_DEPTH` | 2 | flits in the local injection queue |
| `QLEN_W` | 4 | width of the queue-length wires; must hold `BUF_DEPTH` (use 5 for 16-flit buffers) |
| `PAYLOAD_BYTES` | 64 | cache block = long-packet payload, multiple of 8 |
| `D_B`, `D_S` | 1, 1 | penalty weights: per queued flit, per switch stage |

The flit width (64) and the node-id width (8) are package constants in
`noc_pkg`. The node-id width allows meshes of up to 256 tiles.

## Simulating

All testbenches are self-checking and end with
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/noc_pkg.sv tb/tb_noc_mesh_top.sv --top-module tb_noc_mesh_top
./obj_dir/Vtb_noc_mesh_top
```

| testbench | what it covers |
|---|---|
| `tb_flit_fifo` | buffer against a queue model, queue-length code |
| `tb_route_lut` | table at a corner, an edge and an interior tile, all destinations |
| `tb_allocator` | directed decisions (DOR, shorter queue, misroute, penalty 1 vs 2, hold, absorb), then 5000 random cases against a reference model |
| `tb_crossbar` | random reservations, valid/pop/flit routing |
| `tb_noc_switch` | one switch with modelled neighbours: one-cycle hop, misroute, absorb, priority of incoming traffic, stall, random traffic with whole-packet and legal-output checks |
| `tb_packetizer`, `tb_depacketizer` | packet formats, check code, back-pressure |
| `tb_noc_mesh_top` | the full 4x4 mesh at default parameters: 6-hop latencies, a hot spot, random traffic with slow receivers; every packet scoreboarded; every mechanism (profitable route, misroute, DOR, held header, stall, absorb, busy interface, receiver back-pressure) must occur |
| `tb_noc_mesh_workloads` | the evaluated configurations, each as its own mesh: payloads of 16, 32, 64, 128 and 256 bytes with 2-flit buffers, and 4-, 8- and 16-flit buffers with 64-byte payloads; checks delivery and latency and prints mean latency and misroute counts |

`tb_noc_mesh_workloads` instantiates eight meshes. Its C++ build takes several
minutes, while the simulation itself takes under a second.

## What is not here

The network was originally evaluated inside a full multiprocessor simulator,
with RISC nodes (two ALUs and two FPUs each), 16 KB L1 and 64 KB write-through
L2 caches, invalidate-based coherence and a shared memory. Those parts are not
part of this RTL. Each tile's node side appears as the `req_*`/`rsp_*` ports
of `noc_mesh_top`, so the application benchmarks the network was measured
with cannot be replayed here. The testbenches use synthetic traffic instead.
The dimension-ordered and hot-potato routers that served only as baselines
are not included, and neither is the energy model (a per-flit-hop energy
multiplied by the hop histogram).
