# Power-gated virtual channels for a mesh network-on-chip

In a virtual-channel (VC) router most of the static power goes into the VC
buffers, and at light or moderate load most of those buffers sit empty. This
design switches individual VCs off and on while the network runs. The rule
that decides this is set by the router *upstream* of the buffers. The
upstream router is the one that allocates them, so it sees how hard
its packets are competing for them. The signal it uses is the ratio of won to
lost VC-allocation requests on each output port:

* many wins per loss: VCs are plentiful, so one of the downstream VCs is gated;
* few wins per loss: packets are waiting for VCs, so one gated VC is woken.

Each router also has a *class* (cold, warm or hot) that sets the two
ratio thresholds for its VCs. A router starts in the class its position in
the mesh suggests. Central routers carry more traffic and start hot; corners
start cold. It then adapts: VCs that stay idle long enough to have been worth
gating move the router colder, and wake-ups that come too soon after a gating
move it hotter.

The RTL is a complete K x K mesh (8 x 8 by default) of 2-cycle wormhole
routers with XY routing, credit flow control, 4 VCs of 4 flits per input port
and 128-bit flits. The gating logic is built into every router.

## Files

| file | contents |
|------|----------|
| `rtl/vcpg_pkg.sv` | defaults, port numbers, class and power-state enums, threshold and initial-class functions |
| `rtl/noc_mesh.sv` | top: K x K mesh, injection/ejection ports, power and event outputs |
| `rtl/noc_router.sv` | 5-port router with the gating logic on every port |
| `rtl/vc_ratio_monitor.sv` | per output port: win/loss counters and the turn-off/turn-on decision |
| `rtl/vc_power_ctrl.sv` | per input port: ON/OFF/WAKING state of each VC, break-even timing |
| `rtl/router_class_ctrl.sv` | per router: cold/warm/hot class and its two adaptation counters |
| `rtl/vc_buffer.sv` | one VC FIFO with a supply-gate input |
| `rtl/vc_allocator.sv`, `rtl/switch_allocator.sv`, `rtl/rr_arbiter.sv` | separable input-first allocators |
| `tb/tb_*.sv` | self-checking testbenches: one per block, plus the pattern and full-size mesh runs |
| `tb/mesh_traffic.sv` | traffic generator and checker used by the mesh testbenches |

## How a decision is made: the ratio monitor

Each router output port has a `vc_ratio_monitor`. Every cycle, the VC allocator
reports how many input VCs requested a VC on that port (`req_cnt`) and how
many got one (`win_cnt`). The difference is counted as losses. A request that
found no free VC at all is also a loss.

* Two CNT_W-bit counters (10 bits by default) accumulate wins and losses. When
  one of them overflows, the other is reset. This keeps the ratio recent
  without a divider (`ovf_evt`).
* The thresholds are powers of two, so the test is a shift and a compare:
  * `wins > losses << off_shift` asks for a turn-off;
  * `wins < losses << on_shift` asks for a turn-on.
* The shifts come from the class of the **downstream** router, which is
  sent back on the link:

  | class | turn-on threshold | turn-off threshold |
  |-------|-------------------|--------------------|
  | cold  | 4  | 16 |
  | warm  | 8  | 32 |
  | hot   | 16 | 64 |

* After a request is sent, both counters restart. No new ratio decision is
  taken for MIN_EVAL (100) cycles, so the counters collect enough samples
  and the decision does not oscillate.
* A turn-off is only asked for while more than one downstream VC is on. The
  last VC of a port may be gated only after IDLE_LIM (1000) cycles without
  any request for the port. Such a request carries `last_ok`.
* If requests are waiting and no downstream VC is powered, an immediate
  turn-on is sent regardless of the hold time. This design adds it so a fully
  gated port cannot stall.

The requests (`off_req`, `on_req`, `last_ok`) are registered one-cycle pulses
that travel with the link to the downstream router. In the cycle a turn-off
is on the link, the upstream router allocates no VC of that port. Without
this, the downstream router could gate a VC that was being allocated in the
same cycle.

## Carrying it out: VC power states and break-even time

Each router input port has a `vc_power_ctrl`. It keeps every VC in one of
three states: ON, OFF or WAKING.

* **Turn-off.** It gates the highest-numbered VC that meets all of these:
  * it is ON and empty;
  * it is not in use in this router;
  * it is not allocated upstream and is owed no credits (`up_busy` from the
    upstream router).

  The last ON VC is gated only when the request carries `last_ok`.
  A gated `vc_buffer` loses its contents, as a gated SRAM would.
* **Turn-on.** It wakes the lowest-numbered VC that has been OFF for more
  than T_BE (15) cycles, the break-even time. Waking a VC sooner would cost
  more energy than gating it saved, so the request is refused and counted as
  an "ineffective" turn-on.

  One exception: if no VC of the port is powered, a VC is woken anyway.
* **Wake-up.** A woken VC is WAKING for T_WAKE (4) cycles. It is reported
  ON, and can be allocated upstream, from the cycle after that.

The VC states go back upstream as `vc_on`/`vc_pwr`. An output VC is free for
allocation only when all of these hold:

* it is not busy;
* all its credits are back;
* it is ON downstream;
* no turn-off is pending.

The injection port of each router has no upstream monitor, so its VCs are
always on (`PG_EN = 0`).

## Adapting the class

`router_class_ctrl` counts two kinds of event per input port:

* **counter1**: a powered VC stayed idle for more than T_BE consecutive cycles,
  so it could have been gated. This is counted once per idle period. After
  more than C1_LIM (31) such events the router moves one class colder.
* **counter2**: a turn-on arrived while every gated VC had been off for less
  than T_BE, so the gating was premature. After more than C2_LIM (7) such
  events the router moves one class hotter.

When a port reaches a limit, both counters of that port are cleared. If two
ports disagree in the same cycle, "hotter" wins. The class saturates at cold
and hot.

At reset the class comes from the strap input `init_cls`, which the mesh
computes from the router's position (`vcpg_pkg::init_class`). The mesh is
divided into bands of width K/4:

* hot: both coordinates lie in the inner band;
* cold: both lie in the outer band;
* warm: everywhere else.

Counter2 events need a turn-on within T_BE cycles of a gating. The ratio
monitor waits MIN_EVAL cycles between decisions, and MIN_EVAL > T_BE at the
defaults. So a single monitor rarely causes one; they come mostly when a
fully gated port gets an emergency turn-on. Expect the class to drift colder
and only seldom hotter at the defaults.

## Router organisation

`noc_router` has five ports: N, E, S, W and local (numbered 0 to 4). North
is towards smaller y. Its timing is:

1. A flit at the head of its VC buffer goes through the following steps
   combinationally in one cycle:
   * route computation (XY: first x, then y);
   * VC allocation (`vc_allocator`);
   * switch allocation (`switch_allocator`).

   A head flit bids for the switch speculatively. Its switch grant counts
   only if it also wins a VC in the same cycle.
2. The winning flit crosses the crossbar into the output register, which
   drives the link.

A flit is therefore written into the next router two cycles after reaching
the head of its buffer. Both allocators are separable, input-first, and use
round-robin arbiters. A stage-1 pointer moves only when its choice also won
stage 2.

A link carries the following signals:

| direction | signals |
|-----------|---------|
| forward | `v`, flit `{head, tail, vc, data}`, `off_req`, `on_req`, `last_ok`, `busy[NVC]` (VC allocated or owed credits) |
| backward | credit `cr_v`/`cr_vc`, `vc_on[NVC]`, `vc_pwr[NVC]`, `cls` |

A head flit carries its destination in the low bits of its data:
`data[CW-1:0]` = x and `data[2*CW-1:CW]` = y, with CW = 4.

The top `noc_mesh` exposes the following for every node:

* an injection port (flit link with credits);
* an ejection port (always-ready sink);
* the class;
* the power state of every input VC;
* the mechanism events (`ev_gate`, `ev_wake`, `ev_ineff`, `ev_ovf`,
  `ev_colder`, `ev_hotter`).

These outputs are all that is needed to account for buffer energy outside
the RTL.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `K` | 8 | mesh radix (K x K routers); up to 16 with CW = 4 |
| `NVC` | 4 | VCs per input port |
| `DEPTH` | 4 | flits per VC buffer |
| `FLIT_W` | 128 | flit payload width |
| `T_BE` | 15 | break-even time in cycles |
| `T_WAKE` | 4 | wake-up latency in cycles |
| `MIN_EVAL` | 100 | cycles between ratio decisions (own choice) |
| `IDLE_LIM` | 1000 | idle cycles before the last VC of a port may be gated (own choice) |
| `CNT_W` | 10 | win/loss counter width (own choice) |
| `C1_LIM`, `C2_LIM` | 31, 7 | class counter limits |

The following come from the method:

* the network configuration;
* the threshold values;
* T_BE;
* T_WAKE;
* the counter1/counter2 limits.

MIN_EVAL, IDLE_LIM and CNT_W are this design's own values.

## What this design adds or leaves out

These points are this design's own choices:

* the router microarchitecture: the 2-cycle pipeline, speculation, the link
  format and the side-band signals;
* which VC is gated or woken: the highest-numbered is gated, the
  lowest-numbered woken;
* the emergency turn-on when a port is fully gated;
* the win/loss counters and the hold time restart when a request is sent,
  even if the downstream router then refuses a turn-on as premature;
* counting classes per port, and "hotter" winning a tie;
* the hold and idle limits (MIN_EVAL, IDLE_LIM);
* the band rule for the initial class.

The following are not in the RTL:

* **The power switches.** They are represented by `pwr_en` on each
  `vc_buffer` and by the `vc_pwr` outputs.
* **Energy figures.** Leakage and dynamic energy are left to a power model
  that reads the state outputs.
* **Network interfaces.** Packetisation at the cores is left to the traffic
  source. The testbenches inject 4-flit packets directly.

## Verification

Every block has a self-checking testbench that prints
`TB_RESULT checks=<n> failures=<n>` and stops on a watchdog:

* The ratio monitor, power controller and class controller are checked
  cycle by cycle against independent reference models, with directed phases.
  The phases cover:
  * each threshold class;
  * overflow;
  * the hold time;
  * the idle limit;
  * break-even refusals;
  * wake-up latency.
* The allocators are checked for the following with random requests:
  * legal grants: one per output VC or port, only free VCs, only requesters;
  * no starvation.
* `tb_noc_router` checks:
  * the 2-cycle hop latency;
  * delivery of every flit;
  * gating and waking of downstream VCs;
  * that no flit is written into a gated VC.
* `tb_noc_mesh` runs a 4 x 4 mesh through the following phases, and
  checks that every mechanism occurs:
  * light load;
  * heavy load;
  * a hotspot;
  * bursts.

  The mechanisms are gating, waking, a whole port gated and ungated,
  ineffective turn-ons, counter overflows, colder and hotter moves, and
  delivery of every packet to the right node. It uses a short MIN_EVAL and
  C2_LIM = 1 so that the "hotter" path is exercised too.
* `tb_noc_mesh_patterns` runs uniform traffic and the five permutation
  patterns one after another on a 4 x 4 mesh: bit complement, bit reversal,
  shuffle, tornado and transpose. Every other parameter is at its default.
  Each pattern runs at a light and a heavier rate. For each phase it prints
  the share of powered VCs. It checks delivery, and that VCs are gated and
  woken.
* `tb_noc_mesh_full` runs the full 8 x 8 mesh at its default parameters,
  first at light and then at medium uniform load. It checks every packet.
  It also checks that VCs are gated at light load and woken when the load
  rises.

To simulate one of them with verilator 5, for example the mesh:

    verilator --binary --timing -j 4 -Wno-fatal --top-module tb_noc_mesh \
        rtl/vcpg_pkg.sv rtl/rr_arbiter.sv rtl/vc_buffer.sv rtl/vc_allocator.sv \
        rtl/switch_allocator.sv rtl/vc_ratio_monitor.sv rtl/vc_power_ctrl.sv \
        rtl/router_class_ctrl.sv rtl/noc_router.sv rtl/noc_mesh.sv \
        tb/mesh_traffic.sv tb/tb_noc_mesh.sv
    obj_dir/Vtb_noc_mesh

For the unit testbenches, list `rtl/vcpg_pkg.sv`, the block and its
sub-blocks, and `tb/tb_<block>.sv`.

The full 8 x 8 mesh takes a few minutes to compile and about ten seconds to
simulate 7,000 cycles. All state that is read is reset, so the
simulation does not depend on initial values.

The `mesh_traffic` harness can do three things:

* inject uniform, hotspot or permutation traffic at a given rate (packets per 100,000
  cycles per node);
* check every ejected packet;
* count the mechanism events.

It can be reused to measure powered-VC fractions or latency at other loads.

The workloads the method is aimed at are the following:

* synthetic patterns on 8 x 8 (the permutations need K to be a power of two);
* uniform traffic on 10 x 10 and 12 x 12, which need `K = 10` or `K = 12`;
* application traces on 8 x 8 with 2 VCs x 2 flits, which need `NVC = 2`
  and `DEPTH = 2`.

These parameters fit the RTL. The trace-driven runs need the trace files and
a replay front end, which are not included.
