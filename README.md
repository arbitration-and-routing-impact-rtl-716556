# Hermes-SR: a source-routed mesh network-on-chip with per-output FCFS arbitration

Hermes-SR is a packet-switched network-on-chip for multiprocessor systems on
chip. It rests on two ideas:

* **Planned source routing.** When the traffic of an application is known at
  design time, the path of every communicating pair can be chosen offline so
  that load is spread over the links and hotspots are avoided. The sender then
  writes that path into the packet header, hop by hop, and the routers simply
  follow it. Routers need no addresses and no routing algorithm.
* **Distributed arbitration.** Instead of one arbiter and routing unit that all
  inputs of a router take turns on, every input has its own routing logic and
  every output its own arbiter. Packets that want different outputs cross the
  router at the same time; packets that want the same output are served
  first-come first-served, so no input starves.

This repository holds synthesizable SystemVerilog for the router and for a
5x5 mesh of them, with 16-bit flits and 4-flit input buffers, plus
self-checking testbenches for every module.

## Packet format

A packet is a sequence of 16-bit flits:

| flit | content |
|------|---------|
| 0 .. k-1 | route flits: the output port each router on the path must take, in path order; the last is always `LOCAL` |
| k | route terminator (port code 7) |
| k+1 | payload size, in flits |
| k+2 .. | payload |

A route flit carries a port code in bits [2:0]: `EAST`=0, `WEST`=1,
`NORTH`=2, `SOUTH`=3, `LOCAL`=4 (`hermes_sr_pkg::port_e`). Upper bits are
ignored by the routers and should be zero.

**Every router removes the route flit it uses.** The packet therefore shrinks
by one flit per router, the next router always finds its own port at the
head, and the destination element receives the terminator, the size flit and
the payload. A packet that crosses R routers (hops + 1, counting source and
destination routers) has R route flits, so the shortest packet is three flits
(one route flit, terminator, size) and a packet with an 18-flit payload
between opposite corners of the 5x5 mesh is 9 + 2 + 18 = 29 flits.

Example: from router (0,0) to router (1,1), going east then north, with a
2-flit payload:

    sender  : EAST, NORTH, LOCAL, END, 2, p0, p1
    (1,0)   :       NORTH, LOCAL, END, 2, p0, p1     (EAST removed at (0,0))
    (1,1)   :              LOCAL, END, 2, p0, p1
    element :                     END, 2, p0, p1

## Router organisation

`hermes_sr_router` has five ports. For each **input** port:

* `hermes_sr_input_buffer`: a circular FIFO of `BUF_DEPTH` flits. Its credit
  output is high while it has room for one more flit.
* `hermes_sr_routing_unit`: a four-state tracker of the packet layout. In
  `S_IDLE` it takes the route flit at the head of the buffer, removes it and
  pulses a request naming that output port. It then forwards the remaining
  route flits until the terminator (`S_ROUTE`), loads the size flit into a
  counter (`S_SIZE`) and counts the payload down (`S_PAYLOAD`). With the last
  flit it pulses `release_o` and returns to `S_IDLE`.

For each **output** port, `hermes_sr_output_port` holds:

* `hermes_sr_fcfs_arbiter`: a queue of input-port indices, five entries deep.
  Requests are appended in arrival order; requests that arrive in the same
  cycle are appended in ascending port index. The input at the head of the
  queue owns the output until it releases, then the next one takes over.
  Since an input waits for only one output at a time, the queue cannot
  overflow.
* the multiplexer that puts the head input's flit on the link and sends the
  link's credit back to that input as its acknowledge.

The only thing inputs share is the outputs. A request is not refused and
retried: it waits in the queue. That is the difference from a centralised
round-robin router, where a denied input loses its turn and can starve.

## Links, credits and timing

All links, including the local ones, use the same three signals per
direction: `tx` (sender offers a flit), `data`, and `credit` (receiver has
room for one flit). A flit moves at a rising clock edge where `tx` and
`credit` are both high. Credit is a level derived from the receiving buffer's
occupancy, so it never depends on `tx` in the same cycle and there is no
combinational path through a router from a link input to the same link's
credit.

Timing of one router, without contention:

* a route flit written into an empty input buffer at edge 0 is consumed at
  edge 1, and the output is granted in the same edge;
* the next flit of the packet crosses the output link at edge 2;
* after that, one flit per cycle, which is the full link rate (16 bits per
  cycle; 800 Mbit/s at 50 MHz).

Because each router removes one flit and adds two cycles of header delay, a
packet of L flits that crosses R routers in an empty network delivers its
last flit L - 1 + R cycles after its first flit entered. The mesh testbench
checks this exactly for a corner-to-corner packet (L = 29, R = 9: 37 cycles).

Reset is synchronous and active low (`rst_ni`). It empties the buffers and
the arbiter queues and puts every routing unit in `S_IDLE`.

## The mesh

`hermes_sr_noc` places `X_SIZE` x `Y_SIZE` routers (5 x 5 by default).
Router (x, y) has index n = y * X_SIZE + x; east is +x and north is +y. The
east output of (x, y) feeds the west input of (x+1, y), the north output
feeds the south input of (x, y+1). The local port of router n appears as
element n of the `local_*` port arrays:

| port | direction | meaning |
|------|-----------|---------|
| `local_rx_i[n]`, `local_data_i[n]` | in | element n sends a flit |
| `local_credit_o[n]` | out | router n can take a flit from its element |
| `local_tx_o[n]`, `local_data_o[n]` | out | router n delivers a flit |
| `local_credit_i[n]` | in | element n can take a flit |

Ports on the border of the mesh have no neighbour: their inputs are tied idle
and their outputs never get credit, so a packet routed off the mesh stalls
there forever.

Parameters (`hermes_sr_noc`, passed down to every router):

| parameter | default | meaning |
|-----------|---------|---------|
| `X_SIZE`, `Y_SIZE` | 5, 5 | mesh size |
| `FLIT_W` | 16 | flit width, at least 16 so that the size flit holds practical payload sizes |
| `BUF_DEPTH` | 4 | flits per input buffer; 8, 16 and 32 are the other sizes worth comparing |

## Choosing routes

The network trusts the routes completely. Two rules are the sender's (or the
route planner's) responsibility:

1. **Deadlock freedom.** Wormhole switching deadlocks if packets can wait on
   each other in a cycle. All paths in use must come from one deadlock-free
   routing algorithm: XY, or a turn-model algorithm (west-first, north-last,
   negative-first), minimal or non-minimal. Mixing, say, XY and YX paths can
   deadlock.
2. **Valid routes.** Each route must stay on the mesh and end with `LOCAL`
   at the destination router. A route flit at the head of a packet that is not
   a port code 0..4 trips an assertion in simulation.

With a planned route per communicating pair, the load on every link is known
before the system runs. Planning is a design-time program, not part of the
RTL. `tb/tb_hermes_sr_noc_psr.sv` contains a model of it, used to generate
the routes for its workloads:

1. For each pair, list the paths the chosen algorithm allows. A minimal
   adaptive algorithm gives either one path or (dx+dy)!/(dx!·dy!) paths,
   where dx and dy are the hop distances. Non-minimal variants here may take up
   to two extra hops, and never visit a router twice.
2. Give each pair a random path from its list, and add its bandwidth to the
   load estimate of every link on that path.
3. Revisit the pairs one at a time, with all other paths fixed. Switch to an
   alternative path if it has
   * a lower average link load and a peak that is not higher, or
   * the same average and a lower peak, or
   * the same average and peak but fewer hops.
4. Stop after a pass that changes nothing, or after 20 passes.

Results of that testbench, for seven algorithms. "Busiest link" is the
planner's estimate for the busiest router-to-router link; ejection links
into the hotspots are not counted. Latencies are in cycles.

| algorithm | hotspot: busiest link (Mbit/s) | hotspot: latency | all-to-all 30 %: latency |
|-----------|------------------|-----------------|--------------------------|
| XY  | 800 | 487 | 47 |
| NF  | 550 | 452 | 114 |
| NFM | 550 | 465 | 74 |
| WF  | 450 | 431 | 68 |
| WFM | 650 | 465 | 46 |
| NL  | 800 | 449 | 53 |
| NLM | 800 | 472 | 44 |

In the hotspot runs, 23 sources share two ejection links, so those links
saturate and dominate the latency. Even so, every planned turn-model mapping
matches or beats XY, and the testbench checks that. Under all-to-all
traffic, XY is already balanced, and the planner's local acceptance rules can
leave a higher peak than XY. The testbench therefore only reports that case.

## What is this design's own choice

The router structure (a buffer and a routing unit per input, an FCFS arbiter
and a multiplexer per output), the packet layout (port sequence, terminator,
size flit, payload), the credit-based flow control, the wormhole switching,
the 5x5 mesh, 16-bit flits and the 4-flit buffer follow the published
Hermes-SR architecture. The following were not specified there and were
chosen here:

* port codes, the terminator code 7 and the position of the code in bits [2:0];
* the removal of each router's route flit;
* the credit as a level signal ("room for one flit") rather than a counter;
* ascending port index as the tie-break between requests of the same cycle;
* the input FIFO without fall-through, which fixes the two-cycle header delay;
* synchronous active-low reset;
* the treatment of border ports;
* router numbering and the meaning of north and east.

Not included: the centralised round-robin routers used as a comparison
point, the network interfaces and processing elements, and the traffic
generators and sinks (the testbenches have their own). The route planner
exists only as testbench code.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`. Each
one ends by printing `TB_RESULT checks=<n> failures=<n>`, and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_hermes_sr_input_buffer` | random writes and pops against a reference queue; credit drops exactly at 4 flits; writes without credit are ignored |
| `tb_hermes_sr_fcfs_arbiter` | grant one cycle after a request; later requests wait even with a lower index; same-cycle order; random traffic against a reference queue |
| `tb_hermes_sr_routing_unit` | request port, route flit consumed, exact forwarded stream, release on the last flit, one flit per cycle, for 300 random packets with random stalls |
| `tb_hermes_sr_output_port` | grant, link data, acknowledge only with credit, hand-over in arrival order |
| `tb_hermes_sr_router` | two-edge header delay and full link rate; FCFS order of three competing inputs; four packets crossing at once; 400 random packets with random back-pressure, each checked flit by flit |
| `tb_hermes_sr_noc` | the full 5x5 mesh at default parameters (below) |
| `tb_hermes_sr_noc_buffers` | four meshes with 4-, 8-, 16- and 32-flit buffers under identical all-to-all traffic (uses `tb_hermes_sr_noc_harness`) |
| `tb_hermes_sr_noc_psr` | the full mesh with planned routes for seven routing algorithms, hotspot and all-to-all traffic (see *Choosing routes*) |

`tb_hermes_sr_noc` attaches a packet source and sink to every local port.
Each communicating pair gets one random minimal west-first path, fixed for
the whole run. Packets have an 18-flit payload that identifies source,
sequence number and destination, and the sink checks every flit of it. The
run consists of:

1. a single corner-to-corner packet, whose latency is checked exactly;
2. all-to-all traffic (each element sends one packet to each of the other 24)
   at 10, 20, 30, 40 and 50 % of the link bandwidth, spaced uniformly;
3. hotspot traffic: every element sends ten packets to two fixed hotspot
   elements, (1,1) and (3,3), at 12.5 % of the link bandwidth.

It reports the average application latency: from the moment a packet was
planned to be injected to the arrival of its last flit, so it includes any
wait at the source. One run gave:

| traffic | average latency (cycles) |
|---------|--------------------------|
| all-to-all 10 % | 32 |
| all-to-all 20 % | 40 |
| all-to-all 30 % | 55 |
| all-to-all 40 % | 309 |
| all-to-all 50 % | 419 |
| hotspot, 12.5 % per source | 471 |

Latency jumps between 30 % and 40 %, where the links near the centre of the
mesh saturate. The runs are short (24 packets per source), so the run length
caps the high-load figures. The testbench also counts the following events,
and fails if any of them never happens:

* a request queued behind an earlier one;
* two requests reaching one output in the same cycle;
* a full input buffer withholding credit;
* a router driving several outputs in one cycle;
* a source held back by the network.

### Buffer depth

`tb_hermes_sr_noc_buffers` runs the same all-to-all traffic, from a
fixed-seed generator, through four meshes that differ only in `BUF_DEPTH`:

| rate | 4 flits | 8 flits | 16 flits | 32 flits |
|------|---------|---------|----------|----------|
| 10 % | 32 | 31 | 31 | 31 |
| 20 % | 36 | 36 | 35 | 35 |
| 30 % | 95 | 47 | 41 | 41 |
| 40 % | 294 | 170 | 110 | 58 |
| 50 % | 430 | 375 | 308 | 233 |

(average application latency in cycles). Deeper buffers matter little at
light load. Under congestion they matter a great deal, because a packet
blocked in wormhole mode then holds fewer links behind it. The testbench checks
that no larger buffer is slower than the 4-flit one, and that latency falls
with every doubling at 40 % and 50 %. These latencies differ from the
all-to-all table above because the two testbenches draw different random
paths and packet orders.

The RTL carries assertions for the rules between modules: no pop from an
empty buffer, releases only from the granted input, no arbiter overflow, no
input granted by two outputs, and valid route flits.

## Simulating

With Verilator 5 (the package first):

    verilator --binary --timing --assert --top-module tb_hermes_sr_noc \
        rtl/hermes_sr_pkg.sv rtl/hermes_sr_input_buffer.sv rtl/hermes_sr_routing_unit.sv \
        rtl/hermes_sr_fcfs_arbiter.sv rtl/hermes_sr_output_port.sv rtl/hermes_sr_router.sv \
        rtl/hermes_sr_noc.sv tb/tb_hermes_sr_noc.sv
    ./obj_dir/Vtb_hermes_sr_noc

The full-mesh testbenches run in well under a minute each. The other
testbenches build the same way, with their own top module.
`tb_hermes_sr_noc_buffers` also needs `-y tb` so that Verilator finds
`tb_hermes_sr_noc_harness`. For lint, use the same RTL file list with
`--lint-only -Wall --top-module hermes_sr_noc`.

To try other buffer sizes, override `BUF_DEPTH` on `hermes_sr_noc`. To
change the traffic or the routing algorithm used for paths, edit `make_route`
and the traffic tasks in `tb/tb_hermes_sr_noc.sv`, or the planner and its
workloads in `tb/tb_hermes_sr_noc_psr.sv`.

## Files

* `rtl/hermes_sr_pkg.sv`: port codes, terminator code, port count
* `rtl/hermes_sr_input_buffer.sv`: input FIFO with credit
* `rtl/hermes_sr_routing_unit.sv`: per-input route reader and packet tracker
* `rtl/hermes_sr_fcfs_arbiter.sv`: per-output arrival-order queue
* `rtl/hermes_sr_output_port.sv`: arbiter plus output multiplexer
* `rtl/hermes_sr_router.sv`: five-port router
* `rtl/hermes_sr_noc.sv`: the mesh (top level)
* `tb/`: one testbench per module
