# IODET: in-order deterministic routing with virtual channels for meshes and tori

Head-of-line (HoL) blocking is a major limit on throughput in interconnection
networks. Suppose the packet at the front of a queue waits for a busy output.
Every packet behind it waits too, even packets bound for idle outputs.
Virtual channels (VCs) reduce this by splitting each link's buffer into
several queues. Most schemes then add freedom: adaptive routing, or
deterministic routing that may use any VC. Either way the switch needs a
selection function, a larger crossbar and longer routing time, and packets
can overtake each other.

IODET (In-Order DETerministic routing) uses the VCs to *classify* packets
instead. Routing is ordinary dimension-order routing (DOR). The VC a packet
uses on a hop is fixed by its destination:

> VC = (destination coordinate in the dimension being crossed) mod V

Packets bound for different coordinates of a dimension sit in different
queues, so they block each other less. Every packet from a given source to
a given destination takes the same links and the same VCs. Delivery is
therefore in order by construction. The VC is a few low bits of the
destination address, so no selection function is needed. A packet that
continues in the same dimension keeps its VC, and the crossbar can leave
out every crosspoint that would let it change VC. That saving is what
makes an IODET switch cheaper than its alternatives.

This repository holds synthesizable SystemVerilog for the whole network: a
k-ary n-cube (mesh, or torus with wraparound links) of IODET switches. By
default it is an 8 x 8 mesh with 2 VCs.

## Network and node interface

`iodet_network` instantiates K^N switches (`iodet_router`). The defaults
are K = 8 and N = 2. Node *i* has coordinate `(i / K^d) % K` in dimension
*d*. Its identifier is the coordinates packed `CW = clog2(K)` bits each,
with dimension 0 in the lowest field. When K is a power of two the
identifier equals *i*.

Every node has two flit-wide ports with valid/ready handshakes:

| port | signals | meaning |
|---|---|---|
| injection | `inj_valid[i]`, `inj_flit[i]`, `inj_ready[i]` | a flit is taken on a cycle where valid and ready are both high |
| ejection | `ej_valid[i]`, `ej_flit[i]`, `ej_ready[i]` | same, toward the node |

A flit (`iodet_pkg::flit_t`, 34 bits) has `head`, `tail` and 32 `data`
bits. A packet is `PKT` flits: a head, then body flits, then the tail.
The head flit carries the destination identifier in `data[15:0]`; the
switches read nothing else. The other payload bits belong to the user. The
testbenches put the source identifier in `data[31:16]`.

All packets have the same length, `PKT`, and the switches rely on it. Queue
sizes and cut-through credits are counted in whole packets of `PKT` flits.

## Port numbering

A switch has 2N+1 ports:

* port 0 is the local node (injection in, ejection out);
* port 1+2d is dimension *d*, travelling in the + direction;
* port 2+2d is dimension *d*, travelling in the - direction.

Port numbers name the direction of travel on both sides of a link. Output
port 1+2d of a node drives input port 1+2d of its neighbour one step up in
dimension *d*. So "the packet continues in the same dimension and
direction" means "input port == output port". This makes the crossbar rule
and the torus bubble rule simple comparisons.

## Inside a switch

```
 in_link[p] --> input unit p -----> IODET crossbar -----> output unit p --> out_link[p]
                 V VC queues        + per-output-VC       V VC queues
                 routing delay        allocation          credit counters
                 iodet_route                              link arbiter
 credit_out[p] <-- (1 per pop)                        in_credit[p] --> (from next switch)
```

**Input unit** (`iodet_input_unit`). Each VC has a queue of two packets
(`2*PKT` flits). When a head flit reaches the front of its queue, a
counter starts. In the `ROUTE_CYCLES`-th cycle at the front (default 20),
the unit raises a request to the crossbar. The request carries the output
port and VC that `iodet_route` computes from the head flit. The 20 cycles
model the routing time of a simple deterministic switch. Once granted, the
VC is bound to its output VC until the tail has left. Every flit that
leaves returns one credit upstream, one cycle later. Port 0 has a single
queue, whose free space drives `inj_ready`.

**Routing function** (`iodet_route`, combinational):

* The first dimension (in increasing order) whose coordinates differ is
  routed.
* Mesh: the direction is the sign of the difference.
* Torus: the direction is the shorter way round the ring, with + on a tie.
* The VC is `dst[d] % V`.
* If every coordinate matches, the output is port 0.

**Crossbar and allocator** (`iodet_xbar_alloc`). The crossbar works at VC
level. Any allowed input VC can send one flit per cycle to any allowed
output VC. Only these crosspoints exist (`iodet_pkg::xbar_allowed`):

* from a network input (dimension *i*, VC *v*):
  * to the same port, VC *v* only (a packet continuing in its dimension
    keeps its destination coordinate, so it keeps its VC);
  * to any VC of either direction of a higher dimension;
  * to the ejection port;
* from the injection port: to every VC of every network port.

DOR never turns back to a lower dimension, reverses direction or loops
back to its own node, so those crosspoints are not built either. The
number of crosspoints is

    crosspoints(n, V) = 2V²n² + 4Vn − 2V(V−1)n

For example, 40 for a 2-D switch with 2 VCs, and 4128 for 6-D with 8 VCs.
The last term is the saving from "same dimension, same VC". A switch that
lets a packet take any VC on every hop would need 2V(V−1)n more
crosspoints. `tb_iodet_xbar_alloc` checks `crosspoints()` against 16
published IODET counts for tori of 2/3/4/6 dimensions with 2/4/6/8 VCs.

Allocation is per packet. Each output VC has a round-robin arbiter. A
request is eligible when the output VC is free and its output queue has
room for the whole packet (virtual cut-through). On a grant, the head
crosses in the same cycle. The output VC stays bound until the tail has
crossed.

**Output unit** (`iodet_output_unit`). Each VC has a queue of two packets.
A credit counter per VC mirrors the free space in the next switch's input
queue. A round-robin link arbiter sends one flit per cycle. A head flit
needs credits for a whole packet; a body flit needs one credit. Flits of
different VCs may interleave on the link. The chosen flit goes into the
`out_link` register, so each flit spends one cycle on the link. For port 0
the queue front is offered to the node through `ej_*` instead.

## Latency

With no other traffic, the head of a packet becomes visible at the
destination's ejection port this many cycles after the source accepted it:

    hops * (ROUTE_CYCLES + 2) + ROUTE_CYCLES + 1

Each switch the packet passes spends `ROUTE_CYCLES` routing it. Each hop
adds one cycle through the crossbar into the output queue and one on the
link. Entering the injection queue costs one cycle. The tail follows
`PKT−1` cycles later. Take the 8 x 8 mesh with 20-cycle routing and
32-flit packets. Its average uniform-traffic distance is 5.25 hops, so a
packet takes about 5.25·22 + 21 + 31 ≈ 167 cycles from injection to its
tail.

Under uniform random traffic at 0.1 flits/cycle/node, `tb_iodet_uniform_8x8`
gives these results with the default switch:

* 8 x 8 mesh: mean latency 188 cycles from packet generation to tail
  arrival;
* 8 x 8 torus: mean latency 153 cycles;
* both networks accept the offered load.

## Deadlock freedom

**Mesh.** DOR on a mesh has no cyclic channel dependencies, whatever the
VC assignment. A packet only needs room for one packet downstream.

**Torus.** The wraparound links close each dimension into a ring, and
IODET cannot use the usual "two VCs with a dateline" fix: the VC is already
taken by the destination. This design uses *bubble flow control* (set
`TORUS = 1`). Inside a switch, a packet that *enters* a ring needs its
output VC queue to have room for two packets, i.e. to be empty. A packet
enters a ring when it is injected or when it turns into a new dimension.
A packet that *continues* round the ring needs room for one packet. Each
ring (one VC of one direction of one dimension) then always holds at least
one free packet slot, so some packet in it can always advance.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `K` | 8 | nodes per dimension |
| `N` | 2 | dimensions |
| `V` | 2 | VCs per network port (at most 8) |
| `TORUS` | 0 | 0 = mesh, 1 = torus with bubble flow control |
| `PKT` | 32 | flits per packet; every queue holds 2 packets |
| `ROUTE_CYCLES` | 20 | cycles a head waits at the queue front before requesting |

The network size, VC count, two-packet queues, one-flit-per-cycle links,
one-cycle link delay and 20-cycle routing time follow the evaluated
configuration of the IODET proposal. These choices are this design's own:

* **Packet length.** 32 flits was picked because it makes the zero-load
  latency (about 165 cycles in the mesh, about 135 in the torus) match the
  low-load latencies reported for IODET.
* **Flow control.** Virtual cut-through with credits.
* **Torus deadlock avoidance.** Bubble flow control.
* **Crossbar counting convention.** Single-queue local ports, no U-turns.
* **Crossbar bandwidth.** Each input VC has its own crossbar connection,
  so one input port may forward flits of two VCs in the same cycle. The
  output link still carries one flit per cycle.
* **Arbitration.** Round-robin arbiters.
* **Node interface.** The valid/ready handshake.

Setting `V = 1` gives the plain single-VC DOR baseline switch.

## Files

| file | contents |
|---|---|
| `rtl/iodet_pkg.sv` | flit/link/credit types, `xbar_allowed`, `crosspoints` |
| `rtl/iodet_flit_fifo.sv` | VC queue |
| `rtl/iodet_route.sv` | DOR + IODET VC selection |
| `rtl/iodet_rr_arb.sv` | round-robin arbiter |
| `rtl/iodet_input_unit.sv` | input port |
| `rtl/iodet_xbar_alloc.sv` | restricted crossbar and allocator |
| `rtl/iodet_output_unit.sv` | output port, link, credits, ejection |
| `rtl/iodet_router.sv` | one switch |
| `rtl/iodet_network.sv` | the k-ary n-cube (top) |

## Verification

Every testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<m>`.

| testbench | what it checks |
|---|---|
| `tb_iodet_route` | every node pair of the 8x8 mesh and torus, and of a 5-ary 3-cube with 3 VCs, against an independent reference |
| `tb_iodet_flit_fifo` | random push/pop against a queue model |
| `tb_iodet_input_unit` | request exactly `ROUTE_CYCLES` after the head reaches the front; route and VC; flit order per VC; one credit per pop |
| `tb_iodet_xbar_alloc` | the 16 published crosspoint counts; every grant (output free, room for a packet, or two when entering a torus ring); every flit; that a forbidden connection is never granted; contention and bubble holds occur |
| `tb_iodet_output_unit` | link timing, cut-through credits, per-VC order, ejection handshake |
| `tb_iodet_router` | one switch with modelled neighbours: `ROUTE_CYCLES+2` cycles per hop, correct port/VC for every packet, packet integrity, no overflow downstream |
| `tb_iodet_network` | 4x4 mesh and 4x4 torus (4-flit packets, 3-cycle routing) end to end: zero-load latency formula, integrity, in-order delivery, everything delivered. It also requires every mechanism to occur at least once: both VCs used, output-VC contention, injection back-pressure, credit hold, ejection stall, wraparound use and bubble hold |
| `tb_iodet_network_full` | the default 8x8 mesh (no parameter overrides): zero-load latency, then random traffic |
| `tb_iodet_uniform_8x8` | 8x8 mesh and 8x8 torus at full size under uniform traffic at 0.1 flits/cycle/node; reports mean latency and accepted traffic |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/iodet_pkg.sv rtl/iodet_flit_fifo.sv rtl/iodet_rr_arb.sv \
    rtl/iodet_route.sv rtl/iodet_input_unit.sv rtl/iodet_xbar_alloc.sv \
    rtl/iodet_output_unit.sv rtl/iodet_router.sv rtl/iodet_network.sv \
    tb/tb_traffic.sv tb/tb_iodet_network.sv --top-module tb_iodet_network
./obj_dir/Vtb_iodet_network
```

The unit benches need only the RTL files they instantiate, plus
`tb/tb_xbar_harness.sv` for the crossbar bench. The full-size benches take
a few minutes to compile (64 switches) and seconds to run.

## Limits

* Only fixed-length packets are supported.
* Only the IODET switch is built. The schemes it is usually compared with
  (adaptive routing, deterministic routing with free VC choice, whole-
  address VC assignment, per-output-port VCs) are not part of this code.
  Neither is a "single VC with four-packet queues" baseline: queue depth is
  tied to `2*PKT`.
* The latency-versus-load curves are not reproduced point by point.
  `tb_iodet_uniform_8x8` measures one load point per topology.
* The 20-cycle routing time is modelled as a wait before the crossbar
  request. The routing logic itself is combinational and takes one cycle.
