# A power-managed network-on-chip mesh

A network-on-chip has to stay under a power budget, and the budget must not
cost much throughput. This design is a 4x4 mesh of single-cycle routers in
SystemVerilog. Each router manages its own power at three levels:

1. **Budget level.** Routers with spare budget give it to routers that are
   running short. This is done by a swarm of "ants": small control packets
   that follow pheromone trails, much as real ants do.
2. **Router level.** A router that is about to exceed its budget first warns
   its neighbours and lets the packets already in flight drain. Only then
   does it stop. It decides each time whether to stop with the clock gated
   (Throttle) or with the logic power-gated (Off), whichever saves more
   energy given how much of the power window is left.
3. **Component level.** The router's shared flit buffer is cut into blocks
   that are powered on and off as traffic changes. Flits can be stored
   inverted when that is cheaper for the SRAM. Each link chooses between
   full/low voltage swing and full/half width.

The design follows the thesis *Dynamic Power Management of High Performance
Network on Chip* (Mandal, 2011). The thesis describes these mechanisms in
three separate chapters, each on its own router and topology. Here they are
combined in one router. The section "Where this design departs from the
thesis" near the end lists every place where the RTL differs from the thesis
or fills a gap in it.

## Structure

```
pm_noc_mesh                    MESH_X x MESH_Y tiles, links, ant and status wires
└─ cb_router  (one per tile)   5 ports: N, E, S, W, local core
   ├─ central_buffer           shared flit store in power-gated blocks
   ├─ block_power_manager      how many blocks are powered
   ├─ flit_inversion_controller  store flits as-is or inverted
   ├─ link_mode_controller x4  mode S0..S3 of each outgoing link
   ├─ power_estimator          energy spent in the current power window
   ├─ burst_mode_selector      Throttle or Off?
   ├─ flow_control_fsm         Begin / Notify / Throttle / Off
   └─ powerantz_unit           budget register, ant generation and handling
      └─ pheromone_table       per-link trails, evaporation, link choice
noc_pkg                        flit, ant and event types; energy constants
```

The cores and their network interfaces are not part of the design. Port 4
of every router is brought out at the top as `inj_*` / `ej_*`, indexed by
node `n = y*MESH_X + x`. All handshakes are valid/ready. The reset is
asynchronous and active low (`rst_n`), and there is a single clock.

## Flits, ants and units

A flit (`noc_pkg::flit_t`, 77 bits) has these fields:
- `head` and `tail`;
- a two-bit burst marking: random, start of burst, inside a burst, or end
  of burst. The source sets it;
- a `one_dense` hint, meaning "most data bits are 1", also set by the
  source;
- a 4-bit X and a 4-bit Y destination;
- 64 data bits.

A packet is one or more flits. It runs from a head flit to a tail flit;
a single-flit packet has both bits set.

An ant (`ant_t`) has three fields:
- its kind: *power ant* or *beggar ant*;
- a 4-bit hop count;
- a 32-bit share, which is budget offered or budget asked for.

Ants travel on a side channel next to each data link. A router that has
stopped data traffic can therefore still take part in budget sharing.

All energies are integers in units of 0.01 pJ. Per event they are:

| event | energy |
|---|---|
| buffer read | 76.41 pJ |
| buffer write | 76.62 pJ |
| route computation (per head flit) | 310.00 pJ |
| crossbar traversal | 83.00 pJ |
| link | 5.52 pJ per bit |

On a low-swing link the link energy is halved. Static energy is charged per
cycle and depends on the router's state. The budget `P_ALLOC` and all
energies are counted per power window of `WINDOW` cycles.

## Router datapath (`cb_router`, `central_buffer`)

The router has no FIFO per input. Every accepted flit goes into one central
buffer of `NUM_BLOCKS x BLOCK_SLOTS` slots (default 4 x 8). Only its slot
number is queued, and each input has one small pointer queue per output
port (a "set").
- Routing is XY. It is computed for the head flit, and the body flits
  follow the same route.
- Each output grants one input at a time, in round-robin order, and keeps
  it until the tail flit has passed (wormhole switching).
- The output reads its flit directly from the central buffer. A flit can
  therefore leave in the cycle after it arrived: the router has one cycle
  of latency.
- A new flit is written into the fullest powered block that still has
  room. This packs traffic into few blocks, so the others can empty and be
  switched off.
- Each slot also records whether its flit was stored inverted, so the
  read side always returns the true data.

The buffer is shared, so it needs one rule against deadlock. The open slots
are split evenly among the five inputs, and an input holding its share takes
no more flits. With 4 blocks open each input gets 6 slots (at most
`IN_LIMIT`). With 1 block open it gets 1 slot. Without this rule, one
router's buffer could fill with flits heading east while its east neighbour's
buffer filled with flits heading west, and both would wait forever.

## Early-notification flow control (`power_estimator`, `flow_control_fsm`, `burst_mode_selector`)

`power_estimator` adds up the energy of every event in the current window.
The state machine compares that sum with two thresholds:
- P_notify = Pb − Pb/2^`NOTIFY_SHIFT` (default Pb − Pb/32);
- P_th = Pb.

Pb is the router's current budget. The states are:

| state | entered when | behaviour |
|---|---|---|
| Begin | window start | normal operation |
| Notify | energy ≥ P_notify | Takes and starts no new packet. Finishes the packets in flight. Raises `notify_out`, so neighbours start no new packet towards it. |
| Throttle | energy ≥ P_th in burst mode | Nothing moves; clock-gated static energy is charged. |
| Off | energy ≥ P_th outside burst mode | Nothing moves; only the powered buffer blocks' leakage is charged. |

Every state returns to Begin at the end of the window.

Notify exists because of wormhole switching. If a router stops suddenly,
half-sent packets can leave their upstream routers' buffers and links locked
until the router wakes up. Notify drains them first.

**Throttle or Off.** Power-gating the router saves more per cycle than
clock-gating it, but switching the gates costs a fixed amount of energy,
E_pg. Gating only pays off if enough of the window is left. So burst mode
is set when the window position is past

    T_th = WINDOW − E_pg / (E_throttle − E_gated)

A router that reaches its budget late in the window therefore throttles,
and one that reaches it early turns off. Here `E_gated` is the leakage of
the buffer blocks that still hold flits, so `burst_mode_selector` keeps a
small table of T_th indexed by the number of occupied blocks.

## Budget sharing with ants (`powerantz_unit`, `pheromone_table`)

This is the least obvious part of the design.

Each router holds a budget Pb, which starts at `P_ALLOC`. At the end of
every window it also knows its actual energy Pa in that window.

**Asking for budget.** A router that was throttled or off during the window
sends out k beggar ants (k random, 1 ≤ k ≤ number of links). Each asks for
δ− = Pb/(η·k), with η = `ETA` = 4. The total asked for is recorded as
`demand`.

**Offering budget.** A router with surplus (Pa + margin < Pb) that has
received a beggar ant since the last window sends out k power ants. Each
offers δ+ = (Pb − Pa)/k, and its own budget drops by the amount offered.
The budget moves with the ants, so the sum of all budgets stays the same.

**Receiving an ant.** The hop count goes up by one, and the pheromone of
the link the ant came in on is reinforced. Then:
- A power ant at a router with unmet demand raises Pb by
  min(share, demand). Any remaining share is forwarded.
- A beggar ant at a router with surplus is consumed, and the router is
  marked to send power ants.
- Any other ant is forwarded.
- An ant whose hop count reaches `TTL` (8) is dropped.

**Trails.** Each link has two pheromone values, and ants reinforce the
trail of the *other* kind:
- A beggar ant arriving on link i raises `tau_p[i]`. Power ants follow
  `tau_p`, so they go to where demand came from.
- A power ant arriving on link i raises `tau_b[i]`. Beggar ants follow
  `tau_b`, so they go to where budget came from.

The reinforcement is

    f = K · (1 − h/TTL)² · share / P_ALLOC

so news from far away counts less. All trails evaporate by 1/8 every `DT`
(64) cycles, so old routes fade. An ant leaves on the link with the
strongest trail of its kind. If no trail exists yet, it takes a
pseudo-random link. The pheromone update takes one cycle. The unit handles
one incoming ant per cycle, round robin over the links, and queues up to
four outgoing ants.

## Buffer power management (`block_power_manager`)

The controller works in periods of `TIMEOUT` (128) cycles. In each period it
counts the flits that arrived (the flow density) and tracks the peak
occupancy.

Packet burst markings steer a 0–7 confidence counter:
- heads marked start or end of burst raise it;
- heads marked random lower it.

At the end of a period it estimates how many blocks are needed:

    required = ceil((peak occupancy + flow density / 16) / BLOCK_SLOTS)

It acts only if the change exceeds a threshold: 0 blocks when the
confidence is high, 1 block when it is low. Uncertain random traffic
therefore does not cause constant resizing.

Blocks change slowly, at most one every `STEP` (8) cycles, so power-up
causes no supply surge. A block to be removed is first retired: it takes no
new flits and is switched off only once it is empty, so no flit is lost.
Blocks are switched on lowest index first and retired highest index first.

## Storage inversion (`flit_inversion_controller`)

Holding, writing and reading a 1 in the SRAM cell costs more than a 0. The
per-bit sums used are:

| value stored | power per bit |
|---|---|
| 1 | 164.5 nW |
| 0 | 106.0 nW |

Over each interval of `T_INT` (64) cycles the controller counts written
flits with and without the `one_dense` hint, using saturating counters. At
the end of the interval it compares the cost of storing them as they are
(C0) with the cost of storing them inverted (C1). It stores inverted during
the next interval when C1 < C0. The buffer wrapper undoes the inversion on
read, so nothing outside the buffer can tell.

## Link modes (`link_mode_controller`)

Each link has four modes. Mode bit 0 selects low swing and bit 1 selects
half width:

| mode | swing | width |
|---|---|---|
| S0 | full | full |
| S1 | low | full |
| S2 | full | half |
| S3 | low | half |

Each link's controller sits at its sending end. It steps one mode per
`LINK_HOLD` (16) cycles:
- **Up (towards S0)** when the sending router's buffer holds `FILL_HI`
  (24) or more flits, or when it starts a burst on the link.
- **Down (towards S3)** when the receiving router reports that its own
  buffer is filling. A faster link would only feed a full buffer.

If both requests come in the same period, the mode stays. The RTL models a
half-width link as one that sends at most every other cycle. The low-swing
driver and receiver themselves are analog and are not part of the RTL. Only
their energy (halved) and the control word are modelled.

## Parameters

Top-level defaults (`pm_noc_mesh`):

| parameter | default | meaning |
|---|---|---|
| `MESH_X`, `MESH_Y` | 4, 4 | mesh size (up to 16 x 16 with 4-bit coordinates) |
| `WINDOW` | 256 | power window in cycles |
| `P_ALLOC` | 26 000 000 | initial budget per router per window (260 nJ) |
| `NUM_BLOCKS` | 4 | buffer blocks per router |
| `BLOCK_SLOTS` | 8 | flits per block |

`cb_router` adds the following parameters:
- `IN_LIMIT`
- `NOTIFY_SHIFT`
- `FILL_HI`
- `TTL`
- `BPM_TIMEOUT`
- `INV_T`
- `LINK_HOLD`
- `SEED`

Each module's header comment describes its own parameters.

About 26 M units per window is what a router spends when it carries a 40 %
injection load of its own plus transit traffic. Only the mesh size, the
event energies, the 64-bit flit data, the SRAM cost weights and the link
mode table come from the thesis. Every other number is a design choice.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_power_estimator` | window energy against an independent model under random events and states |
| `tb_flow_control_fsm` | every state transition, including window-end returns |
| `tb_burst_mode_selector` | T_th per occupancy against the formula; comparator edges |
| `tb_pheromone_table` | reinforcement, evaporation and link choice against a model, random updates |
| `tb_powerantz_unit` | beggar and power ant generation and shares, grant and forwarding of the rest, marking, TTL kill, trail following |
| `tb_flit_inversion_controller` | decision per interval against the cost formula |
| `tb_central_buffer` | fullest-block allocation, block gating, inverted storage restored, against a model |
| `tb_block_power_manager` | shrinking, growing, one block per step, no block off while it holds flits, low confidence ignoring a small change |
| `tb_link_mode_controller` | stepping up and down, holding on conflicting requests |
| `tb_cb_router` | random traffic on all ports (routing, order, wormhole, one-cycle pass); a second router with a small budget must reach Notify and Throttle/Off, stay silent there, send beggar ants, and still deliver everything |
| `tb_pm_noc_mesh` | the whole mesh at a third of the default budget, described below |
| `tb_pm_noc_mesh_full` | the whole mesh with no parameter changed, same phases with uniform destinations (no hot spot) |

**The mesh traffic** (`tb_mesh_harness`):
- First a quiet phase, with every node at a 10 % injection rate.
- Then a loaded phase:
  - 2 hot nodes at 100 %, sending bursts of 1-dense data;
  - 6 neutral nodes at 40 %;
  - 8 cold nodes at 10 %;
  - a quarter of all packets go to one hot-spot node, whose core accepts
    flits only half the time.
- Then a drain phase.

Every flit must arrive once, at the right node, and in order per
source–destination pair.

**Results.** `tb_pm_noc_mesh` requires every one of the 17 counted
mechanisms to happen at least once:
- Notify, Throttle and Off;
- a held head flit;
- power and beggar ant generation;
- a budget grant and a beggar marked at a surplus router;
- an ant forwarded and an ant killed;
- a buffer resize, a block switched on and a block switched off;
- inversion switched on;
- a link stepping up and a link stepping down;
- a flit waiting for a half-width link.

All 17 occur. With no parameter changed (`tb_pm_noc_mesh_full`, about
60 000 flits), the hot routers reach Notify dozens of times and hold new
packets. Draining in Notify then keeps them under the budget, so no router
ever needs Throttle or Off, and no budget sharing is triggered. The
buffer, inversion and link mechanisms all act, and every flit is
delivered.

Run a testbench with Verilator 5 from the repository root, for example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -Irtl -y rtl -y tb +libext+.sv rtl/noc_pkg.sv tb/tb_pm_noc_mesh.sv \
    --top-module tb_pm_noc_mesh -o sim
./obj_dir/sim
```

The mesh testbenches take about two minutes to compile and under a second
to run.

## Where this design departs from the thesis

- **One router for everything.** The thesis develops budget sharing on a
  virtual-channel router in a 4x4 torus. It develops the flow control on a
  4-stage virtual-channel router (8 VCs of 8 flits per port) in a 4x4 mesh.
  It develops buffer and link management on a centralized-buffer router in
  a 3x3 mesh. Here all of them sit in the centralized-buffer router, in a
  mesh. The 4-stage VC router and the torus wrap-around links are not
  built. A 3x3 mesh is `MESH_X=3, MESH_Y=3`.
- **Routing.** XY dimension-order routing is computed in the router
  itself.
- **Sets without lines.** Each input keeps one queue per output. Packets
  are not given separate lines within a set, because wormhole locking
  keeps packets whole.
- **Per-input buffer quota.** Added against deadlock in the shared buffer;
  not part of the original description.
- **Side channels.** Ants travel on their own channel rather than as
  control flits on the data links. Notify and buffer-fill are dedicated
  wires between neighbours.
- **Throttle → Off.** This transition is taken when burst mode is *not*
  set. That matches the description of Off as the non-burst state.
  Leaving Notify, Throttle and Off at the end of the window is this
  design's rule.
- **Beggar ant at a surplus router.** A router with surplus that receives a
  beggar ant answers with power ants. A router without surplus forwards the
  beggar ant.
- **Inversion decision.** Flits are stored inverted when that is cheaper
  (C1 < C0).
- **Block manager.** The exact requirement formula, the confidence counter
  and the retire-before-off rule are this design's own. Only the outline of
  the block-manager state machine (update, timeout, estimate, resize when
  the change exceeds a threshold) is from the thesis.
- **No sleep bias for waiting flits.** Lowering a block's voltage while its
  flits wait, using the retention of the SRAM cell, is not built; it needs
  cell retention data and an analog bias circuit.
- **Half-width links.** A half-width link is modelled as half the flit rate
  rather than as two beats on half the wires.
- **Assumed values.** These are not given in the thesis:
  - window length;
  - budget;
  - notify threshold;
  - TTL and η;
  - pheromone constants, evaporation rate and period;
  - surplus margin;
  - static energies and power-gating overhead;
  - all interval and hold lengths.

## Known limits

- **Transient deadlock risk.** Right after a block is retired, an input
  can briefly hold more than its new quota. Until those flits drain, the
  deadlock argument above does not strictly hold. No deadlock has been
  seen in simulation.
- **Shared-buffer bandwidth.** The buffer is modelled as a flip-flop array
  with five write and five read ports. A real design would use SRAM banks,
  which the block structure maps onto.
- **Static energies.** The static energies are placeholders. Budget and
  threshold values only make sense relative to them.
