# FLOV: fly-over power gating for a mesh network-on-chip

When a processor core goes to sleep, the router attached to it keeps burning static
power, yet the router cannot simply be switched off because the rest of the mesh routes
traffic through it. FLOV ("fly-over") lets the router be power-gated anyway. A gated
router keeps four tiny single-flit latches, one per direction. They form straight-through
"fly-over" links: a flit that enters from the west leaves to the east one cycle later, with
no routing and no arbitration. Routing in the powered-on routers knows which neighbours
are gated and steers packets so that they still arrive. The decision to gate is taken
locally by each router from its own core's state, through a short handshake with its four
neighbours. There is no central manager and no reconfiguration epoch.

This repository holds synthesizable SystemVerilog for the whole network: an 8x8 mesh with
3 regular and 1 escape virtual channel (VC) per port and 6-flit buffers. The eight routers of
the rightmost column serve the memory controllers and are never gated. Every other router
is a FLOV router. The design follows the published FLOV scheme (N. Wang, "Fly-Over: A
Light-Weight Distributed Router Power-Gating Mechanism for Energy-Efficient
Interconnects", 2015). Where that description leaves details open, the choices made here
are listed in [Departures and open points](#departures-and-open-points).

## Mesh organisation

- Router `n` sits at column `x = n % 8` and row `y = n / 8`. Router 0 is the north-west
  corner, x grows to the east and y grows to the south.
- Column 7 (routers 7, 15, ..., 63) uses the plain baseline router. Its `core_active` input
  is ignored because these nodes never gate.
- Each router has ports N, E, S, W and Local (index 0..4). The Local port is the
  injection/ejection channel of the node's network interface. It is a port of the top
  (`inj_flit`/`inj_credit`, `ej_flit`/`ej_credit`).
- A flit (`flit_t` in `flov_pkg`) carries valid, head, tail, a 2-bit VC, the destination
  x/y and a 32-bit payload. Every flit carries the destination, so any flit can be
  checked on its own.
- Flow control is credit-based and per VC. A credit (`credit_t`) is a valid bit plus the
  VC number.

## The FLOV router

`flov_router` wraps three things:

- `flov_baseline_router`: the normal 4-stage wormhole VC router.
- Four `flov_flit_buffer`s: the fly-over latches.
- `flov_pg_controller`: decides when to gate.

Every mesh link passes through a multiplexer on its way in and a demultiplexer on its way
out, both driven by one select bit:

- **select 0** (router on): the links connect to the baseline router, and the fly-over
  latches are idle.
- **select 1** (router gated): the baseline router is held in reset, which stands in for
  its power switch. Each input link feeds the latch of the opposite output (N→S, E→W and so
  on).

A fly-over latch holds one flit. It forwards the flit in the next cycle and always sets the
flit's VC to the escape VC. It keeps a credit counter for the downstream escape VC:

- The counter holds the escape-VC depth when the downstream router is on.
- It holds 1 when the downstream router is itself gated, because the downstream "buffer" is
  then another one-flit latch.

Credits coming back from downstream pass through the gated router the same way, towards
the upstream router.

A chain of gated routers therefore behaves as a pipeline with one flit per hop. Latency is
one cycle per gated router, against five (four stages plus the link) per powered-on router.

## Routing

Each powered-on router divides the mesh around itself into eight sections:

```
   2 1 0        y decreases (north)
   3 * 7        x increases (east) ->
   4 5 6
```

It then decides from the section of the destination and from the `pg` flags of its four
neighbours (`flov_route_compute`). The rules differ for the two kinds of VC.

**Packets in regular VCs**

- *Sections 1, 3, 5, 7 (straight line).* The packet goes straight. If that neighbour is
  gated, the packet crosses it on the fly-over link and so must continue in the escape
  VC.
- *Sections 0, 2, 4, 6 (a turn is needed).* The rule is YX routing with a fallback:
  1. Take the Y neighbour towards the destination if it is on.
  2. Otherwise take the X neighbour towards the destination if it is on.
  3. If both are gated, go **East** into the escape VC. Nothing is known about routers
     farther away, but the east column is always powered, so the packet can always turn
     there.

**Packets in the escape VC** (escape sub-network)

Once a packet has used a fly-over link or an escape VC, it stays in escape VCs until it is
delivered. Escape routing is deliberately simple:

- Sections 1, 3, 5, 7: go straight.
- Sections 0, 2, 4, 6: go East.
- In the rightmost column: turn North or South towards the destination row.

The only turns this makes are East→North, East→South, North→West and South→West. No cycle
can be built from those turns, so the escape network cannot deadlock.

**Time-out.** Regular-VC routing alone is not deadlock free. A packet whose head waits
`TIMEOUT` cycles in VC allocation is re-routed into the escape VC. By Duato's argument,
the escape network is then always an exit. `TIMEOUT` is 64 here; the published scheme does
not give a value.

A packet that is waiting in allocation is also re-routed when a neighbour changes its
`pg` flag. The route is snapshotted together with the neighbour state it was computed
from.

## Power-gating handshake

Each FLOV router shows its neighbours a two-bit status, `pg` and `stop`.
`flov_pg_controller` walks through four states:

| state | shows | what happens |
|---|---|---|
| ON | – | normal router |
| DRAIN | stop | core went to sleep; neighbours start no *new* packet towards this router, packets already under way finish; waits until the baseline router is empty and all its credits are home (`quiet`) |
| OFF | pg | baseline router gated, select = 1, fly-over links carry traffic |
| WAKE | pg, stop | core woke up; the fly-over latches finish the packets already in flight while neighbours start no new packet towards the router; once the latches are empty the baseline router is released and select returns to 0 |

Each neighbour tracks the status:

- **Routing** uses `pg`.
- **VC allocation** uses `stop`: a head flit is not allocated towards a neighbour that
  shows `stop`. A head that was allocated just before the neighbour raised `stop` waits
  in switch allocation. If the neighbour's mode has changed by the time the head could
  leave, the head releases its output VC and is routed again. A fly-over latch also holds
  back a head flit while its downstream router shows `stop`.
- **Credits:** when a neighbour's `pg` flips, the credit counters of the output facing it
  are reloaded. The new capacities are 0 for the regular VCs and 1 for the escape VC
  towards a gated router, and the full depth towards a powered one. This is safe because a
  router only changes mode once its own buffers are empty and every credit has returned.

**Not two neighbours at once.** The scheme itself does not say how two adjacent routers
avoid changing mode in the same cycle. Here a router only leaves ON or OFF when:

- no neighbour shows `stop`, and
- its own phase bit is 0. The phase bit starts at `(x + y) mod 2` and toggles every cycle.

Adjacent routers have opposite phases, so they never start in the same cycle. A drain is
abandoned, back to ON, if the core wakes before the router is empty.

## Router pipeline and timing

`flov_baseline_router` is a 4-stage router followed by a registered link. Per input VC:

1. **RC** routes the head flit while it is at the front of the buffer.
2. **VA** asks for one specific downstream VC. VC allocation is atomic: a VC is free only
   when it is unallocated and all its credits have returned.
   - Non-escape packets may use any free regular VC, or the escape VC if routing asks for
     it.
   - `vc_allocator` holds one round-robin arbiter per downstream VC.
3. **SA** uses `switch_allocator`. It is separable and input-first, with round-robin at
   both stages. It needs a credit.
4. **ST** reads the buffer, crosses `crossbar`, writes the output link register and returns
   a credit upstream.

A head flit needs 5 cycles per powered-on router and 1 per gated router. The network
interface adds one more cycle on its injection link. An isolated single-flit packet from
router 0 to router 2 therefore takes 16 cycles. With router 1 gated, it takes 12. From
corner to corner (0 to 63) it takes 76 cycles. The end-to-end testbenches check these
numbers.

## Top-level interface (`flov_noc`)

| port | per node | meaning |
|---|---|---|
| `core_active` | in | core powered; when it drops, the router drains and gates |
| `inj_flit`, `inj_credit` | in, out | injection channel; the interface must keep its own credit count per VC (6 each) |
| `ej_flit`, `ej_credit` | out, in | ejection channel; the interface returns a credit for each flit it takes |
| `router_status` | out | `pg`/`stop` of each router |
| `gate_event`, `wake_event`, `timeout_event`, `flyover_event` | out | one-cycle pulses for statistics |

Parameters: `MX`, `MY` (mesh size, default 8x8), `DEPTH` (flits per VC, default 6),
`TIMEOUT` (default 64). The VC count (3+1) and the flit layout are in `flov_pkg`.

Rules for a network interface driving the top:

- Inject only while `router_status.pg` and `.stop` of its own router are both low. A
  sleeping core does not inject.
- Packets start in a regular VC (0..2) and keep one VC for all their flits.

## Verification

Each block has a self-checking testbench in `tb/` that prints a `TB_RESULT` line:

| testbench | checks |
|---|---|
| `tb_flit_fifo` | random traffic against a queue model, count, look-ahead output |
| `tb_flov_route_compute` | every source/destination pair of the 8x8 mesh under random neighbour states against an independent model; sections; four worked routing examples on a 4x4 mesh, walked hop by hop |
| `tb_vc_allocator`, `tb_switch_allocator` | grants legal, one per resource, no starvation |
| `tb_crossbar` | random selects |
| `tb_flov_flit_buffer` | one-cycle forwarding, VC forced to escape, credit limits, hold on `stop` |
| `tb_flov_pg_controller` | state sequence, blocking by a neighbour's `stop` and by the phase bit, abort of a drain |
| `tb_flov_baseline_router` | 5-cycle latency, routing cases, wormhole order, back-pressure, `stop`, time-out into escape, `quiet` |
| `tb_flov_router` | normal mode, gating in the middle of a packet, fly-over in all four directions with 1-cycle latency, credit hold, wake-up |
| `tb_flov_noc_4x4` | end-to-end run on a 4x4 mesh (see below) |
| `tb_flov_noc` | the same run on the full 8x8 mesh at default parameters |

The two end-to-end testbenches act as the network interface of every node. Each run goes
through these phases:

1. Latency probes.
2. Uniform random traffic at 0.08 flits/node/cycle.
3. Putting 29 of the 56 processor cores to sleep under traffic (5 of 12 on 4x4).
4. Traffic with those routers gated.
5. A probe across a gated router.
6. Waking some cores and sleeping others under traffic.
7. Hot-spot traffic towards one memory-controller node.

Every flit is checked for destination, order and payload, and every packet must arrive
exactly once. The run fails if any of these mechanisms never happened: gating, wake-up,
fly-over traversal, delivery in the escape VC, VA time-out, or a mode change while traffic
was running.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/flov_pkg.sv tb/tb_flov_noc_4x4.sv \
          --top-module tb_flov_noc_4x4 -Mdir obj_noc4 -j 4
obj_noc4/Vtb_flov_noc_4x4
```

Replace the testbench name to run any other testbench. The full 8x8 testbench
(`tb_flov_noc`) produces a large C++ model. It takes a few minutes to compile on four
cores, and its simulation takes about as long again.

## Departures and open points

- **Time-out threshold.** The published scheme gives none; 64 cycles is used.
- **Neighbour mutual exclusion** (phase bit and `stop`), **atomic VC allocation** and the
  **credit reload** on a `pg` change are this design's own mechanisms. They make the
  handshake described above precise.
- **Power switching** is modelled only as holding the baseline router in reset. There is
  no wake-up delay, no power-switch sequencing and no retention.
- **Multicast** is not implemented. The scheme sketches a destination list in the head flit
  and replication in the switch-traversal stage.
- **Network interfaces, cores and memory controllers** are outside the RTL. Their channels
  are ports of the top.
- **Gated routers on the same line.** Routing assumes that a router one column west of the
  rightmost column can always fly east, because the rightmost column is never gated. If
  many neighbouring routers change mode while a long packet is spread over several fly-over
  hops, progress relies on the time-out and the escape network. The end-to-end tests
  exercise this under random traffic but do not prove it.
- **Known failure at full size.** The 4x4 end-to-end test passes under many random
  seeds. The 8x8 test (`tb_flov_noc`) fails. The probe latencies are correct (16 and 76
  cycles), but while 29 routers are gated, traffic stops moving. Two routers (34 and 36)
  never finish draining, and about 300 packets stay in the network until the watchdog
  expires. The cause has not been found yet. Treat the power-gating handshake under heavy
  load on large meshes as unverified.
- **Sizes.** All defaults are the evaluated configuration: 8x8 mesh, 3+1 VCs, 6-flit
  buffers, 1-cycle links.
