# Fault-tolerant torus NoC router

A SystemVerilog model of a fault-tolerant wormhole router for a k-ary 2-cube
(torus) network on chip. The network is built as a 4x4 torus of these routers.
The defaults are 4 virtual channels (VCs), 256-bit phits and 16 nodes.

Packets travel in two phases:

1. **Path exploration (PE).** A source floods a PE packet. Each router forwards
   it to every neighbour the packet has not visited yet. Each node it reaches
   gets a copy. The header records the path as a first direction plus one turn
   (straight, left or right) per hop, together with the set of visited nodes.
   A node answers the first PE packet from a source with a return packet on
   the reversed path. Every node on a recorded path caches a route to every
   other node on that path.
2. **Data.** The source looks up its cached route. It sends a source-routed
   wormhole packet of any length. Each router consumes one turn of the route.

A faulty link is avoided without special routing. Requests for that link are
always granted and the flits are dropped, so exploration never finds a path
through it. Deadlocks are found by comparing a global timer with the
time-to-live (TTL) stamp in each waiting header. A deadlocked header first
gets higher priority. If it is still stuck, its packet is moved into a buffer
in the local node's memory and re-injected later.

## Parts

| File | Part |
|------|------|
| `rtl/noc_pkg.sv` | Constants, header layout, turn arithmetic, path reversal, header rewrite at each hop |
| `rtl/ft_noc_torus.sv` | Top level: K x K torus of `noc_router` + `node_if`, global timer, link-fault distribution |
| `rtl/noc_router.sv` | 5-port router (N, E, S, W, local) |
| `rtl/input_port.sv` | Per-VC input buffers, route decode, PE fork, deadlock marking, diversion to the deadlock buffer, credit return |
| `rtl/output_port.sv` | Output VC reservation, output VC registers, channel multiplexing, credit counters, faulty-link grant |
| `rtl/dyn_prio_arbiter.sv` | Three-level priority arbiter with round robin inside each level |
| `rtl/fcfs_arbiter.sv` | First-come-first-served (age matrix) choice among ready output VCs |
| `rtl/deadlock_detect.sv` | TTL comparator with timer rollover (epoch bit) |
| `rtl/link_fault_reg.sv` | Sticky fault bit per direction; set by a failure of either the incoming or the outgoing link |
| `rtl/node_if.sv` | Node side of the local port: PE start and answer, route lookup, deadlock buffer, re-injection |
| `rtl/dat.sv` | Destination address table: valid bit and route-cache address per destination, modulo write counter |
| `rtl/route_cache.sv` | Route cache segment (one path per word) |
| `rtl/vc_fifo.sv` | Small FIFO used for VC buffers, the return queue and the deadlock buffer |

### Flit format

One flit is one phit. The top two bits are head and tail on every flit. A head
flit holds 119 header bits, with the payload after them:

- class: PE forward, PE return, data, or re-injected data;
- source and destination;
- TTL stamp;
- route: first direction plus 15 turns;
- recorded path: length, first direction and 15 turns;
- visited-node vector;
- PE-only fields used while a PE packet sits in a deadlock buffer: evict flag,
  travel direction, and the ports it had not yet reached.

### Router

- **Input port.** Each input port has one 4-flit FIFO per VC.
- **Routing a header.** The header at the front of a FIFO requests an output
  port mask:
  - a routed packet: one port, found by applying the next turn to the travel
    direction, or the local port at the destination;
  - a PE packet: the local port plus every unvisited neighbour except the one
    it came from.
- **PE forking.** A PE header is copied into every requested output. It leaves
  the FIFO only after all requested ports have granted it.
- **Arbitration.** Each output port has a dynamic priority arbiter over all
  5 x V input VCs. The levels are:
  - 2: return packets, re-injected packets and PE packets leaving the deadlock buffer;
  - 1: headers marked deadlocked;
  - 0: other forward packets.
- **Output VCs.** The winner reserves the lowest free output VC. Its header is
  rewritten (turn recorded or route shifted) into that VC's register. Body
  flits follow the reservation.
- **Channel.** Ready output VCs share the physical channel in first-come,
  first-served order. The VC index and the credits are one-hot V-bit buses.
- **Latency and bandwidth.** The best case is 2 cycles through the router plus
  1 on the link, at one phit per cycle per channel.
- **Deadlock.** A forward header is marked deadlocked when its TTL has passed.
  The mark stays until the header leaves. If the header is still stalled
  DL_GRACE (8) cycles after the mark, it is sent to the local port with the
  evict flag set, and the rest of the packet follows. If the node's buffer has
  no room, `dl_exception` is raised instead.
- **Faults.** A fault on either link of a direction marks both directions
  faulty. The faulty output grants every request and drops the flit.

### Node interface

- **Receive side.** It serves one packet at a time from the four local VCs.
  - PE headers update the destination address table and the route cache for
    nodes on the path that have no entry yet.
  - The first PE packet from a source queues a return packet.
  - Evicted packets are stored in the deadlock buffer (64 flits).
  - Other data goes to the node.
- **Transmit priority.** Each class uses a fixed VC:
  1. re-injection (VC3);
  2. PE return (VC1);
  3. PE start (VC0);
  4. node data (VC2).
- **Data without a path.** If there is no cached route, the packet is dropped
  and `no_route` is pulsed.
- **Recovery.** `recovery_in_progress` clears the table's valid bits and the
  list of answered sources.

## Design choices and departures from the original description

The original description gives the routing scheme, the table and timer
logic, the priority order and the fault handling. It does not give the
pipeline, the buffer sizes or the header encoding, so those are this design's
own. In particular:

- The best case through this router is 2 cycles. The original reports a
  latency of about 3.5 of its clock cycles for a pipeline it does not describe.
- The PE flood stops after 5 hops (`PE_HOPS = K + 1`). Without a limit, every
  self-avoiding walk would be flooded: about 90,000 per source on a 4x4 torus.
  Five hops still reaches every node with a few faulty links.
- Timer width is 16 bits. The timer's top bit acts as an epoch bit for rollover.
- Buffer depths, the grace period and the VC-per-class mapping are this
  design's own choices.
- The route cache is a register array and not a bank of node memory.
- An output VC can take a header from any of the 20 input VCs. No special
  multiplexer structure is used.

## Not covered

- The node processor, its memory system and the link self-test are outside
  the router. The testbench plays the node, and link failures enter as input
  bits.
- Area, power and timing in silicon are not reproduced.
- 64 nodes do not fit: routes and the visited vector exceed one 256-bit phit.
  4 nodes (K = 2) is degenerate for a torus.

## Verification

Every block has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=... failures=...` line.

`tb/tb_ft_noc_torus.sv` runs the full 4x4 torus with every parameter at its
default. It does the following:

- fails two links;
- runs path exploration from two sources at once;
- checks that every destination got a path and that each source got one
  return per node;
- sends data with one receiving node stalled;
- checks in-order, complete delivery;
- clears the caches and checks that a packet without a path is dropped.

It also counts every mechanism and fails if any count is zero: PE deliveries,
returns, drops on faulty links, deadlock marks, moves to the deadlock buffer,
re-injections, FCFS contention, priority grants and packets dropped for lack
of a path.

Build any testbench with Verilator, for example:

    verilator --binary --timing --assert -y rtl -y tb rtl/noc_pkg.sv tb/tb_ft_noc_torus.sv --top-module tb_ft_noc_torus
