# Max-min-fair rate regulation without per-flow state: link monitor RTL

When many flows share a network link, the fair outcome is max-min fairness:
a flow that cannot use an equal share (because it is limited somewhere else,
or simply asks for less) keeps what it asks for, and the remaining capacity is
split evenly among the others. This RTL implements the in-network part of a
congestion-control scheme that reaches that allocation while the switches keep
**no per-flow state**. Each flow carries its own state through the network in a
small control message. Each switch output keeps a handful of counters.

The scheme in one paragraph: time is cut into Rate Re-evaluation Periods
(RRPs, 20 us) that are common to the whole network. Once per period every
active flow sends a **Flow Rate Packet (FRP)** from source to destination. The
FRP carries the flow's Current Rate (CR) and Desired Rate (DR). At every switch
output a **contention point** (the link monitor) lowers CR and DR to the
link's **Fair Share Rate** (FSR) when they exceed it. It also counts how many
flows are limited here and how much bandwidth the other flows use. At the end
of the period it works out the FSR for the next period. The destination sends
the FRP back with a flag set so nothing touches it on the way. The source then
sends at the rate that survived the whole path.

## The contention point (`contention_point`)

This is the heart of the design, and the part to read first.

### What it counts

During a period, each forward FRP is compared with the FSR that is currently in force:

| condition | meaning | effect |
|---|---|---|
| `CR > FSR` | flow is *bottlenecked here* | `M += 1` |
| `CR <= FSR` | flow is *bottlenecked elsewhere* | `B += CR`, `b_max = max(b_max, CR)` |

In both cases the packet leaves with `CR' = min(CR, FSR)` and
`DR' = min(DR, FSR)`; its flags are untouched. A flow whose CR equals the FSR
counts as bottlenecked elsewhere. That is what makes the numbers of a
worked example come out: with FSR = 3 and flows at 2, 4, 4 and 3, you get
M = 2 and B = 5. With C = 10 the next FSR is (10 - 5) / 2 = 2.5. The
testbench replays this example scaled by ten.

The comparison at equality matters more than it looks. Setting the parameter
`HERE_GE = 1` makes a flow at exactly the FSR count as bottlenecked here
(`CR >= FSR`). Network simulations (see *Rate allocation in three
scenarios* below) show this converges faster and more cleanly. The strict
test stays the default because it matches the worked example.

### The period boundary

At each RRP event the monitor computes

    FSR = (vC - B) / M,        vC = C * (1 - alpha)

`alpha` (5 %) is headroom held back from the flows so that queues can drain.
The same event copies M, B, b_max and the FSR that was in force into a set of
**old** registers. It then clears M, B and b_max. The old registers describe
the period that has just ended, which is the most recent complete picture of
the link.

### Corner cases

Two cases would break the formula. Both are fixed before the division:

1. **M = 0, B != 0.** No flow looks limited here, so the formula would divide
   by zero. The largest rate seen from a flow limited elsewhere (`b_max`) is
   moved from B to M: M = 1, B = B - b_max. This treats the largest flow as
   the one that could grow. If B is also 0 the link is idle, and FSR = vC.
2. **B > vC.** More traffic claims to be limited elsewhere than the link can
   carry, so vC - B would go negative. This happens when many flows start at
   once. The monitor falls back to an even split, FSR = C / K. K is the
   number of flows that announced themselves with flow-init and have not yet
   sent flow-stop.

### Flow-init and flow-stop

A new flow should not have to wait a whole period for a rate. Its first FRP
carries the `init` flag:

* K goes up by one.
* The flow is classified against the **old** FSR. It is then added to both
  the current counters and the old ones. The old counters describe the last
  complete period, so they are updated as if the new flow had been present.
* The FSR is recomputed at once from the updated old counters (with the same
  corner cases).
* The packet is clamped with that new FSR before it leaves.

A flow that ends sends a `stop` FRP, after its normal FRP of the period:

* K goes down by one.
* The flow is taken back out of M or B (current and old), using the same
  `CR > FSR` test.
* The packet passes unchanged.

All counters saturate instead of wrapping. A stop that finds nothing to
subtract leaves a counter at zero, not at a huge value.

### Short-circuit notification

A flow that starts abruptly at a high rate would otherwise be throttled only
after its FRP has gone all the way to the destination and back. To shorten
this, the monitor reacts to a forward FRP (normal or init) whose CR is more
than twice the FSR it is clamped to (`SC_SHIFT = 1`). It emits, in the same
cycle as the forwarded packet, a copy with the clamped rates and `fw = 0`
on `sc_valid` / `sc_pkt`. The header logic sends this copy straight back to
the source, where the reaction point treats it like any reply. The
notification is a hint: a one-cycle strobe without back-pressure. The factor
of two is this design's reading of "much bigger than the link can allocate".
`SC_ENABLE = 0` removes the feature.

### Packets that are not processed

Payload packets (`frp = 0`) pass through untouched. So do replies on their way
back to the source (`frp = 1, fw = 0`).

### Interface and timing

* **Streams.** `in_*` and `out_*` are valid/ready streams of `frp_t`.
* **Event.** `rrp` is a one-cycle pulse.
* **Status outputs.** `fsr`, `m_count`, `k_count` and `b_sum` show the
  state. `calc_start`, `corner_m0` and `corner_over` pulse when a computation
  starts, with the corner case it uses.
* **Latency, no division.** The output is a register, so a packet leaves
  1 cycle after it is accepted.
* **Latency, flow-init.** A flow-init FRP leaves RATE_W + CNT_W + 4 = 20
  cycles after it is accepted. The 16-bit division takes 17 of those cycles.
* **Stalls.** While an FSR computation runs, `in_ready` is low. An RRP pulse
  that arrives meanwhile is remembered and served right after. When an RRP
  and a packet arrive in the same cycle, the RRP goes first.
* **Throughput.** At most one packet per cycle. The input stalls for about
  19 cycles once per period, and once more for each flow-init.
* **Size.** One monitor, with its divider, synthesises to about 200
  flip-flops and about 300 word-level cells.

The division is done by `cp_divider`, a radix-2 restoring divider with a
valid-in / valid-out interface. Any divider with the same handshake can
replace it, for example a vendor IP core.

## The FRP (`frp_pkg`)

| bits | field | meaning |
|---|---|---|
| 0 | `stop` | flow-stop message |
| 1 | `init` | flow-init message |
| 2 | `frp` | the fields are an FRP |
| 3 | `fw` | still travelling to the destination |
| 11:4 | `cr` | current rate |
| 19:12 | `dr` | desired rate |

A normal forward FRP therefore has flags `4'b1100`. Rates are unsigned
integers. A unit is a fraction of a link's capacity: with the default
`CAPACITY = 200`, one unit of a 10 Gb/s link is 50 Mb/s. The rate width
`RATE_W = 8` is set in the package. The scheme allows 8 to 24 bits and uses
8 to 10 bits in practice.

The message classes are:

* **Stop:** `frp` and `stop` are set. `fw` and `init` are ignored.
* **Init:** `frp`, `fw` and `init` are set.
* **Normal:** `frp` and `fw` are set, and neither `stop` nor `init`.
* **Everything else** passes unchanged.

## The node (`mmf_node`, top level)

```
 ingoing link ──► reaction_point ──► destination_point ──► to switching fabric
                   │  ▲ FRPs of own flows                    (external)
       DMA ◄───────┘  │ (init / per-RRP / stop)
   rate feedback      │
   granted rates ──► rate_limiter ──► paced DMA payload to the fabric
                                    from fabric, port p ──► contention_point[p] ──► outgoing link p
 rrp_sync ──► rrp to every contention point and to the reaction point
```

`mmf_node` holds everything that sits on one switch:

* `N_PORTS` = 16 contention points, one per outgoing link.
* The RRP generator.
* The source-side and destination-side logic on the ingoing link.
* A pacer that holds the DMA channels' payload to their granted rates.

The switching fabric and the DMA engine are outside the node. Their sides of
the connections are ports. The fabric-facing streams also carry a flow id,
because FRPs hold no addresses and something must tell flows apart.

### Reaction point (`reaction_point`)

The reaction point keeps a small table with one entry per DMA channel
(`N_FLOWS` = 8). Each entry holds whether the flow is active and the rate it
may currently send at. It generates FRPs for those flows:

* **Flow-init** as soon as a channel becomes active, with CR = DR = the
  desired rate.
* **One normal FRP per active flow** at every RRP, with CR = the current rate
  and DR = the desired rate. DR is always restored to the desired rate, so a
  flow can grow again once congestion clears.
* **Flow-stop** when a channel goes idle, but only after that flow's normal
  FRP of the current period.

Generated FRPs go ahead of pass-through traffic. A reply to one of its own
flows (`frp = 1, fw = 0`, addressed to this node) is consumed:

* The returned DR becomes the flow's new rate. DR is never below the returned
  CR, and it can rise again when the path frees up.
* The new rate is reported to the DMA as a one-cycle `fb_*` strobe.

A DMA engine that can limit its own channels takes the rates from
`flow_rate` and `fb_*`. For one that cannot, the node paces the payload
itself (next section).

### Payload pacing (`rate_limiter`)

A leaky bucket per DMA channel:

* **Filling.** Each cycle the channel's credit grows by its granted rate,
  up to a cap of `BURST_WORDS` (16) link words.
* **Cost.** A packet of L words costs `L * CAPACITY` credits. Over time a
  channel at rate r therefore uses r / `CAPACITY` of the link's words.
* **Start rule.** A channel may start a packet while its credit is not
  negative and its rate is not zero. The packet may drive the credit
  negative; the channel then waits until the debt is paid back.
* **Choice.** Among the channels allowed to send, the lowest index goes
  first.

The pacer handles one-beat descriptors (channel and length), not packet data.
A channel's descriptor waits under back-pressure until it may go.

### Destination point (`destination_point`)

For a packet addressed to this node, the destination point does this:

* A forward FRP leaves with `fw = 0`. It is now a reply, and monitors on the
  way back leave it alone.
* A flow-stop FRP is consumed.

Swapping the source and destination addresses is left to the packet header
logic. The block is combinational.

### RRP generator (`rrp_sync`)

The period has to be common to the whole network. The block supports both
ways of distributing it:

* **Central node** (`ROLE = 0`): a local timer fires every `PERIOD_CYCLES`
  (3125 = 20 us at 156.25 MHz).
* **Follower** (`ROLE = 1`): fires one cycle after a notification arrives on
  any link.
* **Ad-hoc chain** (`ROLE = 2`): every node runs the timer and also accepts
  notifications. Whichever comes first fires and restarts the timer.

In every role, notifications within `HOLDOFF_CYCLES` of an event are
ignored, so echoes along a chain do not double the event. The `rrp` output is
both the local event and the notification to forward. `first_half` marks the
first half of the period, the window in which sources are meant to send their
FRPs.

With a link delay of d cycles per hop, the event reaches a node h hops away
(d + 1) * h cycles late. In an ad-hoc ring the node whose timer runs out
first sets the phase for everyone. All the others restart their timers from
its wave, so after one period the ring fires as if it had a single central
node.

## Parameters

| parameter | default | where | origin |
|---|---|---|---|
| `RATE_W` | 8 | `frp_pkg` | scheme (8 to 10 bit integer rates) |
| `CAPACITY` | 200 | CP, node | this design's choice |
| `ALPHA_PCT` | 5 | CP, node | scheme (alpha = 0.05) |
| `CNT_W` | 8 | CP, node | this design's choice; B is `RATE_W + CNT_W` bits |
| `N_PORTS` | 16 | node | scheme (16-port switch) |
| `N_FLOWS` | 8 | RP, node | scheme (eight DMA channels) |
| `PERIOD_CYCLES` | 3125 | `rrp_sync`, node | scheme (20 us at 156.25 MHz) |
| `HOLDOFF_CYCLES` | 64 | `rrp_sync`, node | this design's choice |
| `SC_ENABLE`, `SC_SHIFT` | 1, 1 | CP | this design's choice (notify above 2 x FSR) |
| `LEN_W`, `BURST_WORDS` | 8, 16 | pacer (`LEN_W` also node) | this design's choice |
| `HERE_GE` | 0 | CP, node | this design's choice (0: `CR > FSR`, 1: `CR >= FSR` is bottlenecked here) |

With 8-bit counters a link can track 255 flows. A core link carrying around
a thousand flows needs `CNT_W >= 10`, and more rate bits.

## Where this RTL goes beyond or departs from the original description

* **Handshakes and reset.** Valid/ready streams, a synchronous active-high
  reset, and saturating counters are this design's own. The original left
  them out on purpose.
* **Classification at equality.** By default, a flow with CR equal to the
  FSR counts as bottlenecked elsewhere. The original's schematic, worked
  example and test model use this rule. Two prose passages say the opposite,
  and the convergence speed it reports is only reached with the opposite
  rule. `HERE_GE = 1` selects that rule.
* **K.** K changes only on flow-init and flow-stop, and is not cleared at a
  period boundary. One overview diagram of the original also increments it
  on normal FRPs. Doing so would make K grow without bound.
* **Overload test.** The test is `B > vC`, the exact point where the formula
  turns negative, rather than `B > C`. A zero K in the fallback is treated
  as 1.
* **Flow-init counting.** A flow-init FRP is counted once in the current
  counters and once in the old ones. It is not counted again by the normal-FRP
  path.
* **Extra register.** A separate old b_max register keeps the M = 0
  correction of a flow-init recomputation consistent with the old counters.
* **Divider placement.** The divider sits inside the contention point, not
  outside it.
* **Destination point.** It is a separate block on the node's ingoing path.
  In the original it is folded into the monitor.
* **Payload pacing.** The original only names a leaky bucket as one way for
  a reaction point to enforce rates, and did not build it. The credit
  arithmetic, burst cap and descriptor interface here are this design's.
* **Reaction point.** It was left as future work in the original. The table,
  the flow-id sideband and the new-rate rule (take the returned DR) are this
  design's choices.
* **Short-circuit notification.** The original implementation left this
  optimisation out. It is built here, with the threshold (`SC_SHIFT`) and
  the strobe interface chosen by this design.
* **Not included.** The 128-bit link-protocol wrapper, whose field positions
  are not known.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=N failures=M`.

* **`tb_contention_point`** compares three monitors cycle by cycle with a
  reference model written from the algorithm. The third uses `HERE_GE = 1`. The model covers the counters,
  the old registers and the corner cases. The stimulus includes:
  * several thousand random packets of all kinds, with output back-pressure;
  * RRPs, including one that arrives during a division;
  * the worked example above;
  * every short-circuit notification;
  * directed checks of both corner cases;
  * the latencies of 1 and 20 cycles.
* **`tb_cp_divider`** checks quotients, remainders and the 17-cycle latency.
* **`tb_rrp_sync`** checks the exact period, the hold-off, and the timer
  restart in ad-hoc mode. It then compares all three roles cycle by cycle
  with a model, under random notifications on both links.
* **`tb_destination_point`** runs every flag combination.
* **`tb_reaction_point`** runs directed sequences for init, per-period FRPs,
  feedback, pass-through and stop ordering. It then runs 300 random periods
  with channels starting and stopping, replies and back-pressure. The
  scheme's rules are checked as invariants against a model of the flows.
* **`tb_experiments`** runs the three network scenarios described above, on
  both settings of `HERE_GE`.
* **`tb_rate_limiter`** compares the pacer cycle by cycle with an integer
  model under random rates, lengths and back-pressure. It also checks
  long-run shares, silence at rate 0, and the burst cap.
* **`tb_rrp_network`** builds two four-node networks from the default
  generator, with 5-cycle link delays. One is a central node with a chain of
  followers; the other is an ad-hoc ring whose timers start out of phase.
  Each node must fire once per period, exactly 3125 cycles apart, and the
  skew must stay within (hops) x 6 cycles, even with echoes.
* **`tb_mmf_node`** runs the whole node at its default size: 16 ports,
  8 channels and a 3125-cycle period. It plays the fabric and the rest of the
  network, and sends the node's own FRPs around the full loop. Three links
  are loaded:
  * Port 0: a flow competes with a 150-unit cross flow and a 20-unit cross
    flow. It must settle at the max-min-fair (190 - 20) / 2 = 85.
  * Port 1: a lone flow must settle at vC = 190, then stop.
  * Port 2: a burst of twelve new flows must trigger the C / K fallback
    (16), then settle at 190 / 12 = 15.
  * Port 4: four cross flows hold the share at 47. Then a flow of the node
    starts asking for 200. A short-circuit notification must throttle it
    within 45 cycles, far sooner than a full period. It then settles at
    190 / 5 = 38.

  Flow 0 also has payload waiting all the time. The pacer must send exactly
  what the granted rates allow, within its burst.

  The test also counts every mechanism (RRP, init, clamp, reply, feedback,
  stop, both corner cases, stall, payload pass-through, short-circuit, pacing) and
  fails if any of
  them never happens.

Simulate with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl rtl/frp_pkg.sv rtl/*.sv \
          tb/tb_mmf_node.sv --top tb_mmf_node -o sim && ./obj_dir/sim
```

Swap the testbench and `--top` to run another one. Every testbench finishes
in well under a second.

## Rate allocation in three scenarios

`tb_experiments` puts real monitors on the links of three small networks and
plays the sources and destinations. Each period, every flow sends an FRP
along its path and adopts the returned DR. Packet queues are not modelled;
only the rate allocation is. The three scenarios use separate links and run
in the same simulation:

* **Convergence.** f1 and f4 leave the same host and share link A. f2, f3
  and f4 share an interlink. f3 joins at 170 us. f4 runs from 370 us to
  570 us. The fair rates are 190 / 190, then 190 / 95 / 95, then
  127 / 63 / 63 / 63, then back.
* **Bulk flow and varying load.** A flow wanting 100 units shares a link
  with one wanting 30, 90, 150 and then 200 units.
* **Local and remote.** Two flows cross an interlink into a host link, where
  a local flow joins them. Each must get 63.

The whole set is built twice: once with the default strict test and once
with `HERE_GE = 1`. Both reach the max-min-fair rates in every phase. They
differ in how they get there. The numbers below are the periods (RRPs) until
the rates stay correct:

| change | `CR > FSR` (default) | `CR >= FSR` |
|---|---|---|
| f3 joins the interlink | 7 | 1 |
| f4 joins (link A and interlink) | 9 | 2 |
| f4 stops | 3 | 3 |

The strict test is slower for two reasons, both visible in the simulation:

* **Rates drop to zero.** Suppose every flow on a link sits exactly at the
  FSR. Under the strict test they are all counted in B, so B = vC. A
  flow-init then finds M = 1 and computes (vC - B) / 1 = 0. For one period
  the monitor hands out a rate of 0.
* **The share wanders.** When several equal flows sit at the FSR, the M = 0
  correction keeps overshooting. In the local/remote scenario the share
  moves between 62 and 66 instead of settling at 63.

With `HERE_GE = 1`, the join of f4 settles in two periods (40 us). That
matches the convergence time reported for the scheme.

## How far to trust it

* **Checked against a model.** The monitor's arithmetic and sequencing are
  checked against an independent model over many random cases.
* **Checked end to end.** Convergence to the max-min-fair share is shown on
  a single node. It is also shown for small networks of monitors, with
  modelled sources and no queues.
* **Known weakness of the default.** With the strict test (`HERE_GE = 0`),
  convergence takes several periods, and a flow-init can briefly hand out a
  rate of 0 (see *Rate allocation in three scenarios*). Set `HERE_GE = 1`
  where convergence speed matters more than matching the worked example.
* **Not done.** Nothing has been run on hardware or timed on an FPGA.
* **Not simulated.** Multi-switch networks (several nodes and a real fabric)
  and network-wide results such as flow completion times.
