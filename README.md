# Hybrid bus/mesh network-on-chip with X-Y routing

A plain mesh network-on-chip gives every IP core its own router, so two cores
that exchange a lot of data still pay several router hops per transfer, and
their traffic crowds the links in between. A plain shared bus is cheap for a
few cores but does not scale. This design mixes the two: a 4 x 4 mesh of X-Y
routers forms the backbone, and each mesh node serves either

* **a single IP core**, connected straight to the router's local port, or
* **a sub-system**: a group of IP cores that talk to each other heavily,
  sharing a local bus, with one **bridge** joining that bus to the router.

Traffic inside a sub-system never enters the mesh; traffic between nodes
crosses the mesh with dimension-ordered (X then Y) routing, which needs no
routing tables, decides the output port in the cycle a packet arrives, and
cannot deadlock.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). Its structure, the
4 x 4 size, the 16-bit frame format and the X-Y routing rule follow the
original design description; buffering, flow control, arbitration, the bus
protocol and the bridge's address map are choices made here, listed in
[Choices made here](#choices-made-here).

```
            hybrid_noc
   ┌──────────────────────────────────────────────────────┐
   │  xy_mesh (4 x 4)                                     │
   │   R(0,0)─R(1,0)─R(2,0)─R(3,0)      S = sub-system:   │
   │     │  C   │  C   │  S   │  C        subsys_bus      │
   │   R(0,1)─R(1,1)─R(2,1)─R(3,1)        + bus_noc_bridge│
   │     │  S   │  S   │  C   │  C        + 4 IP cores    │
   │   R(0,2)─R(1,2)─R(2,2)─R(3,2)                        │
   │     │  C   │  C   │  S   │  C      C = single core   │
   │   R(0,3)─R(1,3)─R(2,3)─R(3,3)        (ports out)     │
   │        C      C      C      C                        │
   └──────────────────────────────────────────────────────┘
```

## The frame

Everything on the mesh is one 16-bit frame, carried as a single flit
(`noc_pkg::frame_t`):

| bits  | field  | meaning |
|-------|--------|---------|
| 15    | `en`   | enable: a frame with this bit clear is accepted and discarded by the router |
| 14:13 | `x`    | destination column |
| 12:11 | `y`    | destination row |
| 10:8  | `sub`  | ignored by the routers; at a sub-system it names the target IP (0..3) |
| 7:0   | `data` | payload byte |

Example: payload `11001100` to node (3,3) is `1_11_11_000_11001100`
= `16'hF8CC`.

Nodes are numbered `n = y*4 + x`; row 0 holds (0,0) (1,0) (2,0) (3,0).

## X-Y router (`xy_router`)

Five ports: `LOCAL` and the four neighbours `XP`/`XN` (higher/lower X) and
`YP`/`YN` (higher/lower Y). The route of the frame at the head of an input is
a pure function of its destination and the router's coordinates
(`noc_pkg::xy_route`):

1. destination X greater / smaller than own X: leave on `XP` / `XN`;
2. else destination Y greater / smaller: leave on `YP` / `YN`;
3. else: leave on `LOCAL`.

A frame never turns from Y back to X, so the channel dependency graph has no
cycle and the mesh cannot deadlock. An assertion checks that no frame ever
tries to leave through the port it came in on.

Inside, each input has a two-entry FIFO (`flit_fifo`); each output has a
round-robin arbiter (`rr_arbiter`) among the inputs whose head frame wants
it. The arbiter's priority moves only when the granted frame actually leaves.

**Handshake and timing.** Every port is `flit / valid / ready`; a frame moves
on a clock edge where both are high. `ready` of an input depends only on its
FIFO's fill level, never on the downstream router, so no combinational path
runs between routers. A frame accepted at an edge is offered on its output in
the next cycle: **one cycle per router**. With two entries per FIFO, a stream
keeps moving one frame per cycle per link.

## The mesh (`xy_mesh`)

Instantiates `MESH_X x MESH_Y` routers and joins `XP` of (x,y) to `XN` of
(x+1,y) and `YP` of (x,y) to `YN` of (x,y+1). Edge ports are tied off. Per
node it exposes one injection port (`inj_*`) and one delivery port (`ej_*`).
An uncontended frame from node s to node d arrives `hops(s,d) + 1` cycles
after injection; from (0,0) to (3,3) that is 7 cycles, through (1,0) (2,0)
(3,0) (3,1) (3,2) (3,3).

## Sub-systems: shared bus and bridge

### `subsys_bus`

A single-layer write bus shared by the sub-system's four IP cores and its
bridge: 5 masters, 5 slaves. A master holds `m_req/m_addr/m_wdata` until
`m_gnt`, which marks the cycle the write completes. Address bits 15:13 select
the slave (0..3 = IP cores, 4 = bridge). A slave raises `s_ready` whenever it
can take a write, without waiting for `s_valid`.

Only masters **whose addressed slave is ready** take part in round-robin
arbitration; the winner's slave sees `s_valid` and the write completes that
same cycle. This rule matters: if a master waiting for a busy slave could hold
the bus, an IP writing into the bridge while the mesh is congested would keep
the bridge from writing incoming frames out to the IPs; the mesh would then
never drain and the system would deadlock. (The end-to-end test hit exactly
this with the simpler "hold the grant" bus.)

Writes to slave selects 5..7 complete and are lost. Reads and bursts are not
modelled.

### `bus_noc_bridge`

Two independent one-entry register stages:

* **Packetize (bus slave to mesh).** A write to the bridge with address
  `{3'd4, 6'b0, X[1:0], Y[1:0], IP[2:0]}` and data `D` becomes the frame
  `{1, X, Y, IP, D}`, offered to the router the next cycle. While the frame
  waits, `s_ready` is low (unless the router takes it in that cycle).
* **Depacketize (mesh to bus master).** A frame from the router is held and
  written on the bus, next cycle, to IP `frame[10:8]` at offset 0, with the
  payload byte as data. Frames naming IP 4..7 are dropped.

Each direction adds one cycle: the bridge is the network interface whose
encode/decode delay appears in the latency model below.

## Latency

For an uncontended transfer, with one cycle per router and one per bridge
stage, the network latency is `L = n * L_router + m * L_NI` with
`L_router = L_NI = 1` cycle, `n` routers passed and `m` bridges passed:

| transfer | n | m | cycles |
|----------|---|---|--------|
| core (0,0) to core (3,3) | 7 | 0 | 7 |
| core (0,0) to an IP of the sub-system at (0,1) | 2 | 1 | 3 (counted to the bus write) |
| IP of the sub-system at (2,0) to core (3,3) | 5 | 1 | 6 (counted from the bus write) |
| IP to IP on the same bus | 0 | 0 | bus write completes in the cycle it is granted |

On a busy bus each master waits its turn behind the others, so bus latency
grows with the number of masters sharing it; that is the cost the placement
of cores into sub-systems must weigh.

### Measured against a plain mesh

`tb/latency_compare_tb.sv` runs the same clustered traffic on both networks.
There are 16 cores in four clusters of four, and 80 % of each core's
transfers stay inside its cluster:

* **plain mesh**: `xy_mesh`, one core per node, each cluster on a 2 x 2
  quadrant;
* **hybrid**: `hybrid_noc`, each cluster being one bus sub-system.

Latency is counted from the cycle a core starts offering a transfer to its
delivery:

| offered load per core | mesh | hybrid |
|-----------------------|------|--------|
| 10 % of a transfer per cycle | 2.72 cycles | 1.42 cycles |
| 30 % of a transfer per cycle | 2.91 cycles | 3.61 cycles |

The hybrid wins while each shared bus has spare capacity. At 30 %, four cores
offer 1.2 writes per cycle to a bus that completes one, so the bus saturates.
The hybrid structure pays off only when clusters are formed under a
per-sub-system bandwidth limit. The exact numbers depend on the random seed.

## Top level (`hybrid_noc`)

Parameters: `MESH_X = 4`, `MESH_Y = 4`, `SUBSYS_MASK = 16'h0434`
(sub-systems at nodes 2, 4, 5, 10 = (2,0), (0,1), (1,1), (2,2)), `N_IP = 4`,
`ADDR_W = 16`, `SEL_W = 3`, `BUF_DEPTH = 2`. The placement is a design-time
choice: cores that communicate heavily should share a sub-system, and
sub-systems that talk to each other should sit few hops apart.

Ports (all active-high, asynchronous `reset`):

* single cores, numbered 0..11 in node order over the nodes whose mask bit
  is 0: `core_inj_flit/valid/ready`, `core_ej_flit/valid/ready`;
* sub-system IP cores, sub-system `s` = 0..3 in node order over the nodes
  whose mask bit is 1, IP `i` = 0..3: as masters
  `ip_m_req/addr/wdata[s][i]`, `ip_m_gnt[s][i]`; as slaves
  `ip_s_valid[s][i]`, `ip_s_ready[s][i]` with the shared
  `ip_s_addr[s]`, `ip_s_wdata[s]`.

An IP in a sub-system reaches an IP on its own bus by writing to it directly
(slave 0..3), and anything else by writing to the bridge (slave 4) with the
destination in the address. A core reaches a sub-system IP by setting the
frame's bits 10:8 to the IP number.

The IP cores themselves are outside the design.

## Files

| file | contents |
|------|----------|
| `rtl/noc_pkg.sv` | frame type, port enum, `xy_route`, `make_frame` |
| `rtl/rr_arbiter.sv` | round-robin arbiter |
| `rtl/flit_fifo.sv` | router input FIFO |
| `rtl/xy_router.sv` | five-port X-Y router |
| `rtl/xy_mesh.sv` | 4 x 4 mesh |
| `rtl/subsys_bus.sv` | sub-system shared bus |
| `rtl/bus_noc_bridge.sv` | bus/mesh bridge |
| `rtl/hybrid_noc.sv` | top level |
| `tb/*_tb.sv` | one self-checking testbench per block |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`; each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/noc_pkg.sv tb/hybrid_noc_tb.sv --top-module hybrid_noc_tb
./obj_dir/Vhybrid_noc_tb
```

Replace `hybrid_noc_tb` by `xy_router_tb`, `xy_mesh_tb`, `subsys_bus_tb` or
`bus_noc_bridge_tb` for the block tests, or by `latency_compare_tb` for the
latency comparison above. All run in well under a second of
simulated work.

What they check:

* `xy_router_tb`: every input to every destination leaves on the right port
  exactly one cycle later; three-way contention serves all inputs
  back to back; a stalled output fills the two-entry buffer, then refuses;
  frames with `en = 0` vanish.
* `xy_mesh_tb`: `16'hF8CC` from (0,0) reaches (3,3) in 7 cycles along the X-
  then-Y path (checked router by router); four corners send to the opposite
  corners at once with no added delay; random all-to-all traffic with
  random delivery stalls arrives complete, at the right node and in order
  per source/destination pair.
* `subsys_bus_tb`: slave selection, same-cycle completion, waiting for a busy
  slave, unmapped writes, round-robin fairness under full load, and random
  traffic in per-master order with no idle cycle while a write could
  complete.
* `bus_noc_bridge_tb`: frame building, one write per cycle when the router
  keeps up, back-pressure, depacketized writes held until granted, dropping
  frames for a missing IP.
* `hybrid_noc_tb` (full default size): the three latencies in the table
  above, then 8,400 random transfers among all 28 IP cores (cores,
  sub-system IPs, bus-only and loop-back routes) with random stalls; every
  transfer is checked for place, order and completeness, and each mechanism
  (X-then-Y turns, router contention, mesh back-pressure, bus arbitration,
  packetizing, depacketizing, bus-only transfers, dropped disabled frames)
  must occur.

## Choices made here

The original description gives the hybrid structure, the 4 x 4 mesh, the
frame format, X-Y routing and the role of the bridge, and leaves the rest
open. Decided here:

* **Flow control**: valid/ready on every link, two-entry input FIFOs,
  one cycle per router. Not specified originally.
* **Arbitration**: round-robin per router output and on the bus. iSLIP
  scheduling, mentioned alongside the original work as an alternative, is not
  implemented.
* **Bus**: the original names an AMBA bus. This is a simpler single-cycle
  write-only bus with its own signals, not AHB or APB; no reads, no bursts.
* **Bridge address map**, and the use of frame bits 10:8 (free for routing)
  as the IP number inside a sub-system.
* **Single cores** attach to the router directly with frames, with no
  network interface of their own.
* **Reset** is active-high and asynchronous.
* **Placement** of sub-systems and cores follows the example layout of the
  original; choosing it for a real application (partitioning cores into
  sub-systems from their communication graph) is a design-time task outside
  the RTL.
* The four input terminals R1..R4 of the original set-up are not tied to
  nodes: every node can inject. The tests use (0,0) for R1 and the other
  corners for the rest.

## Limits

* The frame has 2-bit coordinates, so the mesh is at most 4 x 4; larger
  meshes need a wider frame.
* One frame carries one byte; there are no multi-flit packets.
* Order is kept per source/destination pair along one path. An IP that
  reaches a neighbour on its own bus both directly and through the bridge
  loop-back can see those two streams interleave out of order.
