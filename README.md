# PIE64 interconnection network in SystemVerilog

PIE64 is a parallel inference machine with 64 processing elements (inference
units, called PEs here). Its programs exchange many short messages, often one
or two words, and often as a request followed by an immediate answer. The
network built here serves that traffic with **circuit switching and no
buffers**: a PE first sets up a path through a three-stage network of 4x4
crossbars, and from then on the path behaves like a plain 32-bit bidirectional
wire. Data pass through the switches with no clock, so one word moves per
clock in either direction. Only setting up and tearing down a path uses the
clock.

The network has three further features:

* **It is duplicated.** There are two identical, independent networks, so each
  PE can hold two connections, and a request blocked in one network may pass
  in the other.
* **It balances load as a side effect.** Every switch compares the load values
  that idle PEs show on unused links, and passes the smallest one back toward
  the sources. A PE can ask for "the least loaded PE" instead of an address,
  and the switches steer the request there.
* **It is testable.** Every switch has a scan path that reads and writes its
  connection state. A one-to-many (multicast) connection can be loaded this
  way.

Everything here is synthesizable RTL with default parameters at full size:
two networks, each with 64 ports, 3 stages and 48 switch nodes of 32 bits.

## Structure

| Module | What it is |
|---|---|
| `pie64_in` | Top: two `pie_in_network`s side by side. Ports are indexed `[network][PE]`. |
| `pie_in_network` | One 64x64 network: 3 stages of 16 switch nodes, butterfly wiring, clock phase per stage. |
| `pie_switch_node` | One 4x4, 32-bit switch node: four 8-bit SUs used as bit slices. |
| `pie_su` | Switching unit (SU): a 4x4, 8-bit crossbar with connection registers, router, comparator and scan path. |
| `pie_su_router` | Decides which waiting input gets which free output. |
| `pie_load_comparator` | Smallest load value among the SU's free outputs. |
| `pie_in_pkg` | Radix, widths, the routing-digit function and the stage-to-stage wiring function. |

The switch node is deliberately built from four independent 8-bit SUs, as in
the original machine, where the SU was an 8-bit LSI. Each SU switches one byte
of the 32-bit word. All four SUs get the same control lines, and each routes
on its own byte. For that reason a PE repeats the destination address and its
load value in all four bytes, so the four slices always take the same decision.
An assertion in `pie_switch_node` checks that they stay in lock step.

## One port

Every network port, on the source side and on the destination side, has these
signals:

| Signal | Direction (source to destination) | Meaning |
|---|---|---|
| `req` | forward | Request a connection, and keep it while high. |
| `lb` | forward | Route this request to the least loaded PE, ignoring the address. |
| `dir` | forward | 0: data flow toward the destination. 1: data flow back to the source. |
| `fdata[31:0]` | forward | Data. While a connection is being set up, it carries the destination address. |
| `ack` | backward | The destination has seen the request. It is passed back through the connection. |
| `bdata[31:0]` | backward | Answer data while `dir` = 1. On a port with no connection, it carries a load value. |

The original hardware has bidirectional data pins. Here each data bus is split
into `fdata` and `bdata`, and `dir` decides which of them a switch passes on.
The other bus reads as zero.

**Address.** The destination PE number sits in bits `[2*STAGES-1:0]` of each
byte: bits 5:0 for 64 PEs, and all eight bits for the 256-port, four-stage
network. The first stage routes on the most significant base-4 digit.

**Load.** A PE with no connection on its destination port drives its load,
an 8-bit number (lower is less loaded), in every byte of `bdata`. Each network
has its own comparators, so a PE can report a different value to each network
(a pair of load measures).

## The life of a connection

This is the part of the design that needs the most care. Every SU holds one
register per output: whether the output is connected, and to which input. Only
these registers use the clock.

1. **Request.** The source PE raises `req` and puts the address on `fdata`,
   just after a rising clock edge.
2. **Set-up, one stage per edge.** At the next active edge of its clock, the
   first-stage SU connects the input to the output that the address digit
   names, if that output is free. The request, address and `lb` then appear
   at once at the second stage, which connects at its next active edge, and
   so on.
3. **Destination.** The destination PE sees `req` rise and registers `ack`.
   `ack` travels back unclocked, so the source learns at the same edge that
   its path is complete.
4. **Transfer.** One word per clock in either direction, with no latency in
   clock cycles.
5. **Turning around.** The source changes `dir`. Each switch follows at once,
   so the answer can come back in the same cycle.
6. **Release.** The source drops `req`. Every SU on the path sees the drop at
   once. It accepts the release at its next active edge and clears the
   connection at the edge after that, so the path is free two edges after
   `req` falls.

**Clock phases (`TWO_PHASE`).** With `TWO_PHASE = 0`, every stage uses the
rising edge of `clk`:

```
edge:        0         1          2          3          4
             request   stage 1    stage 2    stage 3    destination registers req
```

With `TWO_PHASE = 1` (the default), the first and third stages run on the
inverted clock, half a period ahead of the second stage:

```
edge:        0         0.5        1          1.5        2
             request   stage 1    stage 2    stage 3    destination registers req
```

A connection then takes two clock cycles instead of four. The testbenches
check both counts. In a four-stage network, every even-numbered stage runs on
the inverted clock, and set-up takes three cycles.

**Blocking.** If the wanted output is busy, the request simply waits in that
SU, holding the links it already has. The network never drops or retries a
request: a PE that waits too long withdraws `req` itself, which releases the
partial path. When two inputs of one SU want the same free output at the same
edge, the lower-numbered input wins.

## Lowest-load routing

Each SU's comparator takes the minimum of the `bdata` values on its free
outputs. The SU shows that minimum on the `bdata` of every input that has no
connection. Because `bdata` passes stage to stage with no clock, every idle
source PE sees, at any moment, the lowest load among the destinations it can
still reach through free links.

A request with `lb = 1` is steered, at each stage, to the output that has the
minimum, and so arrives at that PE. Ties go to the lowest-numbered output. An
SU with no free output reports `8'hFF`. Once a PE is taken, the next minimum
shows up automatically, because that output is no longer free.

## Wiring between stages

Line `l` (= node x 4 + port) leaving stage `s` enters stage `s+1` at line
`next_line(l, s)`. That line is `l` with its base-4 digit 0 and digit
`STAGES-1-s` exchanged. This is a radix-4 butterfly:

* the first stage spreads each node's four outputs over the four groups of the
  second stage;
* the last boundary connects groups of four nodes among themselves;
* every source reaches every destination by exactly one path.

The network testbench tries all 4096 pairs.

## Scan paths and multicast

With `scan_en` high, each SU's 16 state bits form a shift register, shifting
one bit per clock. From the most significant bit, which is nearest `scan_out`,
the 16 bits are:

```
{conn[3], conn[2], conn[1], conn[0], release_pending[3:0]}    conn = {valid, src[1:0]}
```

* The SUs of a node are chained with SU 0 first.
* The nodes of a stage are chained with node 0 first, nearest `scan_in`.
* Each stage has its own chain (`scan_in[stage]`, `scan_out[stage]`). A single
  chain running through stages on opposite clock phases would lose the order
  of the bits at each crossing.

Shifting reads the connection state out and loads a new state in. A loaded
state may connect one input to several outputs (multicast). A multicast
connection is released like any other, by dropping `req`. In that case the
answer path (`bdata`, `ack`) comes from the lowest-numbered connected output.
The top testbench loads a broadcast from PE 0 to all 64 PEs and reads it back.

## Parameters

| Parameter | Default | Where | Notes |
|---|---|---|---|
| `NETS` | 2 | `pie64_in` | Independent networks. |
| `STAGES` | 3 | `pie64_in`, `pie_in_network` | 4 stages gives 256 ports. The address must fit in 8 bits, so 4 is the limit. |
| `NP` | `4**STAGES` = 64 | `pie64_in`, `pie_in_network` | Ports per network; must equal `4**STAGES`. |
| `WIDTH` | 32 | `pie64_in`, `pie_in_network`, `pie_switch_node` | Multiple of 8, one SU per byte. |
| `TWO_PHASE` | 1 | `pie64_in`, `pie_in_network` | 1: first and third stages on the inverted clock. |
| `STAGE` | 0 | `pie_su`, `pie_su_router`, `pie_switch_node` | Which address digit to route on. |

The 10 MHz clock of the original machine gives 40 MB/s per connection and
5.12 GB/s for 2 x 64 connections. Wire and gate delays (about 60 ns end to end
in the original hardware) are not modelled. The RTL treats a path through the
network as combinational logic, three SUs deep.

## Simulating

Every testbench prints one line `TB_RESULT checks=N failures=M` and stops. A
watchdog counts a failure if the testbench hangs. Build and run a testbench
with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pie_in_pkg.sv tb/tb_pie64_in.sv --top-module tb_pie64_in
./obj_dir/Vtb_pie64_in
```

| Testbench | What it covers | Run time |
|---|---|---|
| `tb_pie_load_comparator` | Random loads and free masks against a reference minimum; the "20 / busy / 8 / 1" example. | instant |
| `tb_pie_su_router` | Random requests against a reference arbiter; address digit and lowest-load routing. | instant |
| `tb_pie_su` | One edge per set-up, data, `ack`, `dir` turn, two-edge release, blocking and priority, lowest load, scan read-out, multicast through scan. | instant |
| `tb_pie_switch_node` | 32-bit words both ways through four slices, lowest load on all bytes, release, scan chain length 64. | instant |
| `tb_pie_in_network` | Drives the network through `tb/pie_net_harness.sv`. With one phase: all 4096 pairs at 4 edges each. With two phases: random pairs at 2 edges. Both also get blocking, lowest-load requests and 2000 to 3000 cycles of random concurrent traffic from all 64 PEs, with PE-side timeouts. | about 20 s |
| `tb_pie_in_network_256` | The same harness on the network expanded to 256 ports in four stages (two phases, 3 edges per set-up): random pairs, blocking, lowest load, concurrent traffic from 256 PEs. | about 1.5 min to build, 11 s to run |
| `tb_pie64_in` | The full-size top with default parameters: both networks in use at once, blocking, a word per clock, `dir` turn, release, per-network load pairs, 400 random connections, scan-loaded broadcast with alternating 0101/1010 data while the other network keeps connecting, transferring and releasing, and read-back. | a few seconds |

The PE behaviour in the testbenches (register `ack` from `req`; answer with
the last word XORed with `{PE, 24'h5A5A5A}`; show the load when idle) is a
stand-in for the real communication controller.

## How far to trust it, and what is this design's own

These points follow the published description of the network:

* circuit switching with no buffers;
* 3 stages of 16 4x4 nodes for 64 PEs, and two networks;
* 32-bit nodes made of four 8-bit SUs;
* distributed routing in each SU;
* a comparator that passes the lowest load of unused outputs back through
  unused inputs;
* a clocked set-up taking 4 cycles with one clock phase and 2 cycles with
  the first and third stages half a period early;
* a `dir` line that turns the data path around without the clock;
* release accepted at one edge and done at the next;
* PE-side timeout for blocked requests;
* scan paths in the SU, and multicast.

These points are choices made here, where the description gives no detail:

* **Control lines.** The original SU has six control lines, but only the
  direction line is described. This design uses four: `req`, `lb`, `dir` and
  `ack`.
* **Address and load.** Their placement in every byte, and 8 bits for the
  load.
* **Priority.** The lowest-numbered input wins.
* **Reset.** Asynchronous, active low.
* **Data buses.** Split into forward and backward buses instead of
  bidirectional pins.
* **First-boundary wiring.** Only the grouping of the wiring is known, and
  any radix-4 delta wiring behaves the same way.
* **Scan paths.** Their content and order, one chain per stage, and the use
  of scan to set up multicast.

Not included:

* the PEs and their communication controllers;
* the maintenance system that drives the scan paths and the clock;
* the cables, connectors and boards.

Their connection points are the ports of `pie64_in`.
