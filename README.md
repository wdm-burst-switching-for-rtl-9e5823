# Burst switch control logic for a WDM optical router

A burst switch moves data through an optical fabric without converting it to
electronics. Packets going the same way are gathered into *bursts*. Ahead of
each burst, on a separate control channel, travels a small *burst header
cell* (BHC). The BHC names the destination and gives two numbers:

- an **offset**: how long after the header the burst's first bit will arrive;
- a **length**: how long the burst lasts.

The header is processed electronically, hop by hop. By the time the burst
arrives, every switch element on its path has chosen an outgoing wavelength
(a *channel*) for it and set its optical crossbar. If a link has no free
channel for that time, the element holds the burst in a small store of
optical delay lines and sends it later. If the store is also full, the burst
is dropped.

This repository is the electronic control side of such a router. The optics
are not modelled: fibres, crossbars, wavelength converters and delay lines
are outside the RTL. Each control decision appears on a port as a crossbar
command:

- burst id;
- input port;
- output channel;
- start slot;
- length;
- whether the burst goes through storage, and which storage location.

## Structure

```
 external link ── iom_ctrl ──► stage 0 ──► stage 1 ──► stage 2 ──► iom_ctrl ── external link
      (x D*D)                 D x bse_ctrl  D x bse_ctrl  D x bse_ctrl
                              distributes   routes on the routes on the
                              load          high digit    low digit
```

- **burst_switch_top**: the whole control plane.
  - There are `D*D` external links (64 at the default `D = 8`).
  - Between them sits a three-stage Beneš network of `D`-port burst switch elements.
  - Output `j` of element `i` in one stage feeds input `i` of element `j` in the next stage.
  - The output port number `p` is written in base `D`:
    - The first stage ignores `p` and spreads headers over its outputs, to balance the load.
    - The middle stage routes on the high digit of `p`.
    - The last stage routes on the low digit of `p`.
  - A global slot counter `now` is the time base. It advances by one on each cycle with `tick` high.
- **iom_ctrl**: the input/output module of one external link.
  - On the way in, it looks the destination address up in a routing table and writes the output port number into the header.
  - On the way out, it hands headers back to the link.
- **bse_ctrl**: the control section of one switch element. It contains:
  - an **ase**, a small cell switch that sends each header to the burst processor of its output link;
  - `D` **burst_processor**s, one per output link;
  - a **bsm**, the storage manager that lends storage locations;
  - a **ctrl_ring**, a slotted ring that carries requests and replies between the processors and the storage manager.
- **burst_processor**: the core of the design (next section). It contains:
  - a **diff_search_tree**;
  - a **reseq_buf**;
  - a **horizon_sched**.

## How a burst processor decides

A processor handles the bursts leaving on one output link of `CHANNELS`
wavelengths. It splits each burst's processing into two separate decisions,
made at different times.

**1. When does the burst leave?** This is decided as soon as the header arrives.

The processor keeps the link's *usage curve*: for every future slot, how
many channels are already promised. It asks for the largest value of the
curve over the slots the burst needs.

- **The maximum is below `CHANNELS`.**
  - The burst can go straight through.
  - It is booked on the curve for its own slots.
- **The maximum is not below `CHANNELS`.**
  - The burst must be delayed.
  - It is given the first slot after the link's *horizon*. The horizon is the latest slot known to be full, so the link is never full after it.
  - The processor asks the storage manager, over the ring, for a location from the burst's arrival until its new start.
  - If the storage manager grants a location, the burst is booked at its new time.
  - If the storage manager refuses, the burst is dropped.

After booking, the horizon becomes the latest full slot inside the booked
range, if that is later than the current horizon.

The header is then forwarded at once to the next stage, with the start
time now decided. So every later stage can plan for the burst long before
it arrives. This matters in a multistage network. Each stage adds only
the few cycles of this decision.

**2. Which channel does it use?** This is decided just before the burst leaves.

- The booking is placed in a resequencing buffer, sorted by start time.
- When `now` reaches `start − DELTA`, the entry leaves the buffer.
- The entry goes to a horizon scheduler. The scheduler keeps, for every channel, the slot after which that channel is idle.
- It picks the channel whose idle time is the latest one not after the burst's start. This is a best fit: it leaves the long idle gaps on other channels free for later bursts.
- If no channel is idle in time, it takes the channel that frees up first and marks the command `late`. The usage curve makes this rare: the curve was respected, but late arrival of headers can still force it.

Bursts are assigned channels in start order, not header order. So a header
that arrives late, for an early burst, does not waste a channel.

### The usage curve: a differential search tree

Two operations must each finish in one clock cycle:

- "the largest usage over slots `[s, s+len)`";
- "add one over slots `[s, s+len)`".

`diff_search_tree` does both over a circular window of `SLOTS` slots.

- It is a complete binary tree with one leaf per slot.
- Each node stores one number, Δbuf.
- The usage of a slot is the sum of Δbuf along the path from its leaf to the root.
- Adding one over a range adds one to the few nodes that exactly cover the range. Those are the nodes that are inside the range while their parent is not. At most two such nodes exist per level.
- Each node also has Δmax: the largest usage in its subtree, counted from the node downward.
  - Δmax = Δbuf + max(children's Δmax).
  - Δmax is computed combinationally from the Δbuf fields, not stored.
  - The range maximum combines the Δmax of the covering nodes with the sums above them.
- The query also returns the latest full slot in the range. That slot becomes the horizon.

The window slides one slot whenever `now` advances:

- The slot that has just passed is retired.
- The Δbuf values on its path are pushed down into the sibling subtrees. Those subtrees still hold live slots.
- The path is cleared, so the leaf can be reused for slot `now + SLOTS − 1`.

A burst that does not fit inside the window is dropped.

## Time and header format

Inside the switch, a header carries the **absolute** arrival slot of its
burst (`t_arr`) next to the offset. `iom_ctrl` sets it on entry
(`t_arr = now + offset`) and recomputes the offset on exit
(`offset = t_arr − now`, saturating at 0). Queueing between stages
therefore never makes a burst's time wrong.

A processor forwards a header with `t_arr` set to the burst's decided
start. A burst delayed in one stage is therefore seen as a later burst
by the stages after it.

All fields are defined in `rtl/burst_pkg.sv` (`bhc_t`, `xbar_cmd_t`,
`ring_msg_t`). All block-to-block links use a valid/ready handshake.
Reset is asynchronous and active low.

## Timing

| block | latency |
|---|---|
| horizon_sched | result one cycle after the request |
| diff_search_tree | combinational query, update at the clock edge |
| burst_processor | header forwarded 4 cycles after it is accepted, for a burst sent straight through; a delayed burst adds the ring round trip (up to `D+1` cycles each way) |
| reseq_buf | entry released in the cycle `now ≥ start − DELTA` |
| ase | one register per output, round-robin between inputs |
| ctrl_ring | one hop per cycle; traffic already on the ring has priority |

A processor handles one header at a time. At the defaults, the control
plane keeps up with bursts only if a slot lasts a few dozen clock cycles.
`tick` sets the slot length.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `D` | 8 | ports per switch element; `D*D` external links |
| `CHANNELS` | 512 | wavelengths per link |
| `SLOTS` | 256 | length of the usage-curve window, in slots |
| `DELTA` | 2 | how many slots before its start a burst is given its channel |
| `RSQ_DEPTH` | 16 | resequencing buffer entries per burst processor |
| `BSU_LOCS` | 8 | storage locations per switch element |
| `RT_AW` | 8 | routing-table address bits (`2^RT_AW` entries per link) |

`D` must be a power of two.

`RSQ_DEPTH` limits how many bookings one output link can hold between
header arrival and `start − DELTA`. While the buffer is full, the processor
stops taking headers. With long offsets and heavy traffic, this back-pressure
reaches the earlier stages: headers wait, and bursts whose start has passed
are dropped. Raise `RSQ_DEPTH` for long offsets.

## Departures from the published scheme

- **Tree shape.** The usage curve is described as a balanced search tree keyed by the times at which the curve changes. Here it is a fixed binary tree over slots, with a sliding window. Insertion and rebalancing are not needed, at the price of a bounded horizon (`SLOTS`).
- **Non-full periods.** The scheme can be improved by keeping a few "non-full periods": gaps before the horizon where a delayed burst could fit. This is not built. A delayed burst always starts just after the horizon.
- **Network depth.** Only the three-stage network is built. Deeper networks of `2k−1` stages, such as a five-stage network of 512 links, would chain more `bse_ctrl` stages in the same way, with the first `k−1` stages distributing load.
- **Header field.** The absolute arrival time `t_arr` in the header is an addition.
- **Choices not given by the scheme.** These are all this design's own:
  - the drop rules: storage refused, burst outside the window, or burst start already passed;
  - time-based booking of storage locations, with no release message;
  - the round-robin load distribution in the first stage;
  - the direct-indexed routing table, reset to entry `a` → port `a`.

## Simulation

Every testbench in `tb/` checks itself. Each ends with a line
`TB_RESULT checks=N failures=M` and contains a watchdog. Build any of
them with Verilator 5. For example:

```
verilator --binary --timing --assert rtl/burst_pkg.sv tb/tb_burst_processor.sv \
  -y rtl --top-module tb_burst_processor -Mdir obj && ./obj/Vtb_burst_processor
```

| testbench | what it checks |
|---|---|
| tb_horizon_sched | random bursts against a reference channel choice |
| tb_reseq_buf | sorted release at `start − DELTA` and the full-buffer case, against a model |
| tb_diff_search_tree | range max, latest full slot and range add against an array model, across window slides |
| tb_bsm | grants and refusals against a model of location bookings |
| tb_ctrl_ring | delivery and back-pressure of random messages |
| tb_ase | delivery, routing digit, round-robin spreading, no loss or duplication |
| tb_iom_ctrl | table lookup, table writes, arrival-time stamping, offset recomputation |
| tb_burst_processor | direct, stored and dropped bursts; the 4-cycle forward latency; channel commands |
| tb_bse_ctrl | a whole element with its ring and storage manager |
| tb_burst_switch_top | end to end at `D = 2` with small sizes; counts routing-table lookups, direct and stored bursts, drops, load spreading and back-pressure, and fails if any never happened |
| tb_burst_switch_top_full | the default size (64 links, 512 channels) with no overrides; see below |

`tb_burst_switch_top_full` runs the default configuration in two rounds.

- **Round 1: a permutation.** One header arrives on every link. Each header must:
  - leave on the right link;
  - have a correct offset;
  - receive the same start in all three stages.
- **Round 2: an overload.** 600 bursts go to one link, with about 600 overlapping on its 512 channels.
  - 512 bursts go straight through.
  - 8 bursts are delayed through storage.
  - 80 bursts are dropped.
  - Every burst is accounted for exactly once.

It builds in about a minute and runs in about 20 seconds.
