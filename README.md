# Packet-switched CC-banyan networks: DES, SEFD and SEHD switches in SystemVerilog

This is synthesizable RTL for the three ways of building a buffered,
packet-switched banyan interconnect between processors and memories. They are
the three designs compared in the report *SFL: A Parallel Simulation Program
for Banyan Networks*:

* **DES (double-ended simplex).** Processors sit on one side of the network
  and memories on the other. A packet crosses every stage once, always in the
  same direction.
* **SEFD (single-ended full duplex).** Every node is a processor with its own
  memory, and all nodes sit on the same side, the *base*. A packet climbs
  only as high as needed, turns round in a switch (it *reflects*) and comes
  back down to its destination. Each switch port has two one-way lines, one
  up and one down.
* **SEHD (single-ended half duplex).** The same single-ended network, but each
  switch port has a single line shared by both directions. This halves the
  pins. The price is a special queue that keeps the shared lines from
  deadlocking.

All three are built on the same topology, the rectangular **CC-banyan**
(cylindrical crossbar banyan). All three move a whole packet one hop per
network cycle. A packet may move only when the queue ahead has room. That is
decided in the same cycle by a grant signal that ripples back from the
destinations.

The report's main configuration is the default of every parameter here:

| Parameter | Meaning | Default |
|---|---|---|
| `F_LOG` | switch size F = 2**F_LOG (spread = fanout = F) | 1 (2x2 switches) |
| `L` | highest level; the network has L+1 levels | 7 |
| `DEPTH` | packets per switch queue | 16 |
| `SCHEME` | conflict resolution: `CR_RAND`, `CR_FP` or `CR_RR` | `CR_RAND` |
| `PQ_DEPTH` | packets in each processor-side input queue | 64 |
| `MQ_DEPTH` | packets in each memory/receive-side queue | 4 |

So the default is a (2,2,7) network: 8 levels of 128 switches and 256
end ports.

## Topology: the cylindrical crossbar

Levels are numbered 0 (base) to L. Each level has W = F**L switches, and the
network has N = F·W end ports. End port p connects to port `p mod F` of switch
`p / F` at level 0.

Between level k and level k+1, up port m of switch j goes to switch

    (j + m * F**k) mod W

at level k+1, which sees the link on its down port m. Port 0 goes straight up.
The other ports go diagonally, by 1, 2, 4, … switches at successive levels,
and wrap round the edge of the array. This wrap is why the layout is called
"cylindrical".

As a result, a switch at level g can be reached from the 2·F**g − 1 base
switches that lie within ±(F**g − 1) positions of it. That is about twice as
many as in a conventional banyan. It also means a packet need only climb
until source and destination switch fall within that window.

The DES network uses the same wiring, read as stages: stage 0 is at the
processors and stage L at the memories.

## Routing headers

The switches do no arithmetic on addresses. The input interface computes a
header once, when a packet enters its queue. Each switch then just indexes
the header by its own level. The header is defined by `packet_t` in
`sfl_pkg`:

| Field | Contents |
|---|---|
| `dest`, `src` | 8-bit end-port numbers |
| `gdist` | up-hops left before the packet reflects (single-ended only) |
| `up_tag[k]` | the output taken at level k on the way up (or at stage k in DES) |
| `dn_tag[k]` | the output taken at level k on the way down |
| `data` | 32-bit payload |

**DES.** Let M = (dest/F − src/F) mod W. Stage s < L forwards on base-F digit
s of M. The last stage picks `dest mod F`.

**Single-ended.** Let delta = (dest/F − src/F) mod W. The reflection level g is
the smallest level whose window ±(F**g − 1) contains delta.

* If delta is at most F**g − 1, the packet climbs with up digits equal to the
  digits of delta and comes straight down (D = 0).
* Otherwise it climbs straight (U = 0) and shifts by D = W − delta on the way
  down.

On the way down, `dn_tag[k]` for k ≥ 1 is digit k−1 of D, and `dn_tag[0]`
picks `dest mod F` at the base switch. `gdist` starts at g. It drops by one
each time the packet is accepted one level higher, and at zero the packet
reflects.

The functions `des_header`, `reflect_level` and `se_header` in `sfl_pkg` hold
the exact arithmetic. The testbench package `tb_walk_pkg` checks them against
a hop-by-hop walk of the wiring for every source and destination.

## Grants: one ripple per cycle

Each queue front raises a request towards the next hop. The next hop answers
with a grant only if its target queue can take the packet this cycle.

A queue counts as having room when it is not full **or** its own front leaves
in the same cycle. Because of that, a grant depends on the grant the next hop
received. The grant chain therefore runs combinationally from the destination
interfaces back to the sources within one clock cycle, like a ripple carry.

In the single-ended full-duplex network the chain runs in two legs:

1. down the B-queues, from the base up to the apex;
2. then back through the T-queues, from the apex down to the base.

This chain is the critical path. Its length grows with the number of levels
(2·(L+1) switch delays for SEFD). That is a property of the protocol, not of
this implementation.

When several packets want the same queue in one cycle, the queue's
`cr_arbiter` picks one:

| Scheme | Rule |
|---|---|
| `CR_RAND` | the priority starts at a position chosen by a 16-bit LFSR, seeded per switch |
| `CR_FP` | the lowest index wins |
| `CR_RR` | the last winner drops to lowest priority |

Random selection is the default. It performed best in the original study and
needs no per-queue history.

## The DES switch (`des_switch`)

An F×F DES switch has one FIFO per output (`pkt_queue`) and an arbiter per
queue. Each input's front packet asks for the output named by its tag for this
stage. At most one packet enters each queue per cycle. A packet that loses the
arbitration, or finds its queue full, waits at the front of its queue in the
previous stage.

A lone packet takes L+3 cycles from entering the input interface to arriving
in the memory queue:

* 1 cycle into the input queue,
* L+1 switch queues,
* 1 cycle into the memory queue.

## The SEFD switch (`sefd_switch`)

Each port has an up line and a down line. The switch holds:

* **T-queues** (top): one per top port, for packets still climbing;
* **B-queues** (bottom): one per bottom port, for packets heading down.

A packet arriving from below on an up line does one of two things:

* If it is still climbing (`gdist` > 0), it enters T-queue `up_tag[level]`
  and `gdist` drops by one.
* If `gdist` is 0, this switch is its turning point. It is *reflected*
  straight into B-queue `dn_tag[level]`, without being stored on the way up.

A B-queue therefore arbitrates among up to 2F candidates:

* the F downgoing packets arriving from above;
* the reflecting packets arriving from below.

The report quotes 2F − 1 as the worst case per queue. The apex has nothing
wired above it, so its T-queues stay empty and every packet that reaches the
apex reflects there.

A lone packet that reflects at level g takes 2g + 3 cycles.

## The SEHD queue unit (`sehd_queue`)

In the half-duplex switch, each top port has one queue that holds both
directions. Without care, two neighbouring queues can fill with packets that
each wait for the other's line, and the network deadlocks.

The queue unit avoids this by splitting one pool of `DEPTH` slots into three
linked lists:

* **ULIST**, for upgoing packets;
* **DLIST**, for downgoing packets;
* **FREE**, for empty slots.

A packet is admitted if either:

* FREE has two or more slots; or
* FREE has exactly one slot and either:
  * both lists are non-empty, or
  * the list it would join is the empty one.

The last slot can thus never be taken by a direction that already holds
packets while the other direction is empty. A downgoing packet therefore
always finds room eventually, and packets only flow:

* up to up,
* up to down (reflection),
* down to down.

That flow graph has no cycle, so no deadlock can form.

In each cycle the unit can do only one of two things, never both:

* take an upgoing packet and send an upgoing or reflecting packet; or
* take a downgoing packet and send a downgoing packet.

Assertions in the module check both rules.

Storage is a slot array with one next-pointer per slot, a free bitmap, and
head, tail and count registers for each list. The lowest free slot is
allocated first.

## The SEHD switch (`sehd_switch`)

Each port is one line that carries one packet per cycle in either direction.
The switch has F queue units, one per top port, and no bottom queues.
Reflecting packets are not stored in the switch that reflects them. A
reflecting packet passes from the ULIST front of the queue below, up one
bottom line, and straight down another bottom line into the DLIST of the
queue below that.

Each cycle, the control decides in this order:

1. **(1a) Downgoing.** Each DLIST front whose target queue below has room
   claims its bottom line.
2. **(1b) Reflecting.** Packets arriving from below with `gdist` = 0 take the
   remaining free bottom lines. Each needs two lines: the one it arrives on
   and the one it leaves by. They are served in a rotating order so that none starves.
3. **(2) Upgoing.** Packets arriving from below enter a ULIST if:
   * their bottom line is not already carrying a packet down;
   * the queue is not receiving from above this cycle;
   * the admission rule allows the packet.

"Room below" uses the vacancy registered at the start of the cycle. A slot
freed in the same cycle is not credited. This keeps the decision order one
way:

* from the processors up to the apex for downgoing grants;
* then back down for upgoing grants.

The network reports when a packet is refused only by the reserved slot
(`lv_reserve`) and when a packet waits because its line is busy in the other
direction (`lv_line_busy`).

A lone packet that reflects at level g takes 2g + 2 cycles. That is one less
than SEFD, because the reflecting switch does not buffer it.

**A processor cannot send to itself in the half-duplex network.** Such a
packet would need its single base line both ways in one cycle, and it stays
at the head of its input queue for ever. Keep self-addressed traffic inside
the processor.

## Processor and memory interfaces

`src_interface` is the processor's output side:

* a FIFO of `PQ_DEPTH` packets with a valid/ready handshake towards the
  processor (`gen_valid`, `gen_dest`, `gen_data`, `gen_ready`);
* a request/grant handshake towards the first switch;
* it builds the routing header as the packet enters the queue.

`sink_interface` is the receiving side:

* a FIFO of `MQ_DEPTH` packets;
* it grants whenever it has room;
* it hands packets out with valid/ready (`mem_*`, or `rcv_*` in the
  single-ended networks).

The processors and memories themselves are not part of the RTL. The
testbenches generate and drain traffic in their place.

## Top level (`sfl_top`)

`sfl_top` places the three networks side by side, each with its own ports:

* `des_*`: 256 processor inputs and 256 memory outputs;
* `sefd_*` and `sehd_*`: 256 send and 256 receive ports each.

Each network also brings out one bit per level and per cycle for every event
it can observe:

| Event | Signals |
|---|---|
| conflict | `*_st_conflict` (DES), `*_lv_conflict` (SEFD, SEHD) |
| blocked queue front | `*_st_blocked` (DES), `*_lv_blocked` (SEFD, SEHD) |
| reflection | `*_lv_reflect` (SEFD, SEHD) |
| reserve refusal | `sehd_lv_reserve` |
| busy half-duplex line | `sehd_lv_line_busy` |

Counting these over a run gives the statistics the original simulator
gathered.

Level numbers and LFSR seeds reach the switches as input ports rather than
parameters. All switches of one kind are therefore one module body, which
keeps elaboration and simulation builds small.

## Files

| File | Contents |
|---|---|
| `rtl/sfl_pkg.sv` | constants, `packet_t`, conflict scheme enum, header functions |
| `rtl/pkt_queue.sv` | circular-buffer FIFO with same-cycle vacancy |
| `rtl/cr_arbiter.sv` | RAND / FP / RR arbiter |
| `rtl/src_interface.sv`, `rtl/sink_interface.sv` | network end interfaces |
| `rtl/des_switch.sv`, `rtl/des_network.sv` | double-ended simplex network |
| `rtl/sefd_switch.sv`, `rtl/sefd_network.sv` | single-ended full-duplex network |
| `rtl/sehd_queue.sv`, `rtl/sehd_switch.sv`, `rtl/sehd_network.sv` | single-ended half-duplex network |
| `rtl/sfl_top.sv` | all three networks side by side |
| `tb/tb_<module>.sv` | a self-checking testbench per module |
| `tb/tb_walk_pkg.sv` | reference route walk used by the testbenches |
| `tb/tb_sefd_workloads.sv`, `tb/tb_sefd_load.sv` | SEFD networks under the study's workloads, at reduced size |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. Each has
a watchdog that counts a failure if the run hangs. With Verilator 5:

    verilator --binary --timing --assert --top-module tb_sfl_top \
        rtl/sfl_pkg.sv tb/tb_walk_pkg.sv rtl/*.sv tb/tb_sfl_top.sv
    ./obj_dir/Vtb_sfl_top

Replace `tb_sfl_top` with any other testbench name.

The network testbenches and `tb_sfl_top` override `L` to 3 and reduce
`DEPTH` to keep the runs short. This gives (2,2,3) networks with 16 ports
and 4 levels of 8 switches. That is the largest size simulated end to end
here.

The default (2,2,7) top, with three 256-port networks, passes lint and
elaboration. However, Verilator turns it into several hundred C++ files, and
building the simulation model takes longer than 15 minutes on a 4-core
machine. A test at the default size is therefore not part of the set.

What the tests cover:

* **Switch and queue testbenches.** These drive random requests, packets and
  grants. They check every output against a model written in the testbench:
  * which packet may enter which queue;
  * FIFO order;
  * the admission rule;
  * the arbitration schemes;
  * the half-duplex line rules.
* **Network testbenches.** These send random, hot-spot and burst traffic.
  They check that:
  * every packet arrives exactly once, at its destination, with its payload
    intact;
  * a lone packet has the latency given above (L+3, 2g+3, 2g+2);
  * reflections happen at every level.
* **End-to-end test (`tb_sfl_top`).** It runs all three networks under:
  * uniform traffic;
  * a hot spot;
  * bursts of 32 packets per processor.

  It counts conflicts, blocked fronts, reflections, reserve refusals and busy
  lines, and fails if any of these never occurs.
* **Workload test (`tb_sefd_workloads`).** Five 16-processor SEFD networks
  run side by side:
  * the three conflict schemes;
  * a buffer size of 1;
  * a (4,4,1) network with 4×4 switches.

  Each runs uniform and then local traffic at 0.3 packets per cycle per
  processor. It must deliver every packet, drain, and show a shorter average
  response time under local traffic than under uniform traffic. The average
  response times are printed.

To change the network, override the parameters of `sfl_top` or of one network.
For example, `F_LOG=2, L=3` gives 4×4 switches and 256 ports. The package fixes
the upper limits:

* 8-bit port numbers (at most 256 ports);
* at most 8 levels;
* 2-bit route digits (switch size 2 or 4).

Widen `ID_W`, `MAX_LEVELS` or `DIG_W` in `sfl_pkg` for larger networks.

## How far this follows the original design

The report describes the switches at the level of queues, crossbar, control
unit and handshake, and evaluates them in a simulator. This RTL turns those
descriptions into cycle-accurate hardware. These parts come from the report:

* the three protocols and their switch organisation (output FIFOs for DES;
  T- and B-queues for SEFD; shared queue units with ULIST/DLIST/FREE for
  SEHD);
* the admission rule;
* one packet per queue per cycle;
* reflection at the lowest possible level;
* grants rippling back from the destinations;
* the three conflict resolution schemes;
* the (2,2,7) default with 16-packet queues;
* a 32-bit payload per network cycle.

Choices made here where the report gives no detail:

* **Wiring.** The CC-banyan wiring formula and port numbering were read from
  a small example drawing and checked against the report's statements about
  reachability.
* **Routing headers.** The header format and the up/down digit split are this
  design's own.
* **Arbitration.**
  * RAND is realised as an LFSR-chosen starting priority, not a true random
    pick.
  * An SEFD B-queue arbitrates among downgoing and reflecting packets
    together.
* **SEHD.**
  * The order of decisions inside an SEHD switch (downgoing, then
    reflecting, then upgoing) is this design's own.
  * An SEHD switch uses registered rather than same-cycle vacancy below it.
* **Queue sizes.** The processor and memory queues are finite (64 and 4)
  with back-pressure. The report's simulator treats the processor queue as
  unbounded.
* **Reset.** It is asynchronous and active low. Queues and arbiter state
  clear; packet storage is not reset.

A known weakness of the routing choice: among the up/down splits that
reach a destination, the header always takes one with no sideways step on
one of the two legs: either U = delta, D = 0, or U = 0, D = W − delta.
Every packet therefore climbs or descends on the straight (port 0) line of
one leg, and those lines carry more load than the diagonal ones.

The effect is small with 2×2 switches. In the 4×4 configuration of the
workload test it is large: uniform traffic at 0.3 packets per cycle averages
about 40 cycles, against under 8 cycles for 2×2 switches. All reflected
packets there leave the apex through B-queue 0.

Spreading packets over the other valid splits would need only a change in
`se_header` (for instance, choosing D from a few source or payload bits).
The switches already follow whatever tags the header carries.

Not built:

* the conventional (SW) banyan, which the report uses only as a comparison;
* nonrectangular networks (spread different from fanout);
* switch sizes other than 2 and 4;
* the traffic generators and statistics gathering of the simulator itself.
