# Event scheduler for a programmable transport-layer NIC backend

Transport protocols (TCP, RoCE and the like) are event driven: each flow sees
packets from the network, requests from the application and expiring timers,
and each event reads and updates that flow's state (its *context*). A
hardware backend that runs such protocols at line rate has to accept one
event of every type per clock cycle. It then has to feed those events into
deep event-processing pipelines without ever letting two events of the same
flow be in a pipeline at the same time. If it did, the second event would
read a context that the first had not yet written back.

This RTL implements that backend's core, the **event scheduler**, plus the
pieces around it that have a fixed structure: the per-flow context table and
the timer module. The protocol-specific parts are left as ports. These are
the packet parser, the application parser and the event processors (which
are generated per protocol).

The scheduler's main idea: rather than stalling the pipeline when a flow's
event collides with one still in flight, the scheduler never picks such a
flow. It keeps a few flows' queues in fast registers (the *queue cache*).
It marks each of those flows as blocked for the length of the processing
pipeline after each dispatch. Each cycle, for each event type, it picks one
unblocked flow, never the same flow twice. All other flows wait in a wide
memory, and blocked flows are swapped out for them.

## Structure

```
 net_event ─┐                                   ┌─► ep_event/ep_ctx[NET]
 app_event ─┼─► mtp_scheduler ──► context_memory ┼─► ep_event/ep_ctx[APP]
        ┌───┘        ▲                           └─► ep_event/ep_ctx[TIMER]
        │            │                                   │  event processors
 event_timer ◄── tmr_start / tmr_cancel ◄────────────────┤  (outside)
                 context_memory ◄── ctx_wr ◄─────────────┘

 mtp_scheduler
   event_mapper ─► queue_memory ─► temp_holding_area ─► queue_cache ─► islip_mux ─► out
   (stage 0)       (wide rows)     (row 1 / row 2)      (queue boxes,   (1 event per
                                                         swap logic,     type, 1 type
                   swap_history ◄──────────────────────  swap_timer_bank) per box)
```

| file | block |
|---|---|
| `rtl/mtp_pkg.sv` | types shared by all blocks: `event_t`, mini-queue `mq_t`, flow row `qrow_t`, lane request, status struct, queue push/pop functions |
| `rtl/mini_queue.sv` | one FIFO of one event type, whole contents loadable in one cycle |
| `rtl/flow_timer.sv` | count-down that blocks a flow after a dispatch |
| `rtl/queue_box.sv` | one cache row: flow id, one mini-queue per type, flow timer |
| `rtl/queue_cache.sv` | the queue boxes, flow-to-box mapping, hit and swap decisions |
| `rtl/swap_timer_bank.sv` | keeps counting the timers of flows swapped out while blocked |
| `rtl/swap_history.sv` | per-box list of flows waiting in memory (for independent swaps) |
| `rtl/temp_holding_area.sv` | two-row pipeline between queue memory and cache |
| `rtl/queue_memory.sv` | one wide word per flow holding all its mini-queues |
| `rtl/event_mapper.sv` | input registers; injects independent swaps on idle lanes |
| `rtl/islip_mux.sv` | matches queue boxes to event types (iSLIP) |
| `rtl/mtp_scheduler.sv` | the scheduler |
| `rtl/context_memory.sv` | per-flow context table |
| `rtl/event_timer.sv` | timer module that turns armed timers into timer events |
| `rtl/mtp_top.sv` | top: timer module + scheduler + context memory |

## Lanes, flows and rows

There are three event types, and each has its own *lane* through the
scheduler: network (0), application (1) and timer (2). An event is
`{flow, data}` (8-bit flow id, 32-bit payload). Its type is the lane it
travels on.

Every flow owns one *mini-queue* per type (4 entries each). The three
mini-queues of a flow form a *row* (`qrow_t`, 3 × (3-bit count + 4 × 32
bits) = 393 bits). A row is in exactly one place at a time:

* a **queue box** in the queue cache, if the flow is cached, or
* its word in the **queue memory**, otherwise.

Flow `f` can only be cached in box `f mod NUM_BOXES`. Any box count works.

## How an event moves (cycle of arrival = t)

| cycle | what happens |
|---|---|
| t | the event is on `in_valid/in_event`; the mapper registers it |
| t+1 | the queue memory is read for its flow (combinational read). **Row 1** of the holding area is formed: the memory row, corrected by pending write-backs, with the event appended to the mini-queue of its type. The queue cache looks the flow up: **hit** → the event is appended directly to the box; **swap** → row 1 replaces the box's contents; otherwise the event is **parked** |
| t+2 | **row 2** writes the queue memory: either the parked row's segment for this lane, or the whole row of the flow the swap pushed out. The box now shows the event; the multiplexer matches boxes to types |
| t+3 | the chosen events are on `out_valid/out_event` (registered) |

A lone event therefore leaves the scheduler 3 cycles after it arrives. At
the top level, the context read adds one more cycle: `ep_valid` comes 4
cycles after the parser's event.

## Keeping a flow's events apart

Each queue box reports, per type, a validity bit: *"the mini-queue has a
front entry AND the flow timer is not running"*. When the multiplexer takes
an event from a box, the box pops it and loads its timer with
`PIPE_CYCLES-1`. The flow is then invalid for all types until the count
reaches zero. So two dispatches of one flow are at least `PIPE_CYCLES` cycles
apart, and the event processors have that long to finish and write the
context back. At the top level the contract is that the write-back must come
no later than `PIPE_CYCLES-2` cycles after `ep_valid`, because the next event
of the flow reads its context one cycle after it leaves the scheduler.

`islip_mux` must give each type at most one box and each box at most one type
(two types from one box would be two events of one flow). This is bipartite
matching, as in crossbar switch scheduling. It runs `ISLIP_ITERS` rounds of
iSLIP in one cycle. In each round, every unmatched type offers itself to the
first requesting unmatched box at or after its grant pointer. Each box then
accepts the first offer at or after its accept pointer. Pointers move one
past the accepted partner, and only on first-round accepts. This rotates
service over the boxes: with every box always requesting, each is served
once per `NUM_BOXES` cycles. With 3 rounds and 3 types the match is maximal:
no type is left idle while an unmatched box requests it.

## Swapping flows between cache and memory

The cache holds only `NUM_BOXES` flows. The swap policy exploits the fact
that, at any moment, many cached flows are blocked on their timers and so
are only taking up space.

**Replaceable boxes.** A box may take a new flow if it is empty after reset,
if its timer is running, or if its flow has nothing queued. The last case is
this implementation's addition, so that an idle flow cannot keep a box
forever.

**New-arrival swap.** When an event misses and its box is replaceable, row 1
(the arriving flow's queues, including the new event) is loaded into the
box. The box's old flow and queues go to row 2 and are written back as a
whole row.

**Timer bank.** A flow that was swapped out while blocked must stay blocked
if it comes back soon. `swap_timer_bank` (32 counters at the defaults) stores the remaining
count when such a flow is evicted and keeps counting it down. When the flow
is swapped back in, its box timer resumes from that value. The bank has one
store, one lookup and one release port per lane. If no counter is free, a
swap that would need one is not done (lanes are served in order, network
first).

**Independent swap.** New-arrival swaps alone would starve flows that get no
new events, or whose events arrive while their box is busy. Lanes other than
the network lane are often idle. On such a cycle the mapper uses the idle
lane's memory port to bring a waiting flow back. It picks a replaceable box
that has waiting flows, round robin, and pops the box's longest-waiting flow
from `swap_history`. That flow is swapped in if it still has events.
`swap_history` lists every flow whose row went to memory with events in it,
whether evicted or parked. A per-flow bit keeps each flow listed at most
once. With `HIST_DEPTH` = flows per box (4 at the defaults) no flow is ever
dropped from the lists.

**Hazards and the swap rules.** Three lanes work in parallel, so the
holding area and the cache follow a few rules that keep every row in exactly
one consistent place:

* The queue memory is written per segment (one mini-queue). A parked event
  writes back only its own lane's mini-queue, so two lanes can park events of
  one flow in the same cycle.
* Row 1 takes any pending row-2 write to the same flow from any lane
  (forwarding). A read never returns a row older than one in flight.
* A swap into a box happens only if no other lane targets that box in the
  same cycle. So each lane can swap one box per cycle, up to three swaps in
  all, and no two of them touch the same box. Each lane has its own eviction
  path, timer-bank ports and history-list push.
* A box can never be swapped and dequeued in the same cycle, because a
  replaceable box has no valid mini-queue.

## Timer module and context memory

`event_timer` holds up to 16 pending timer events `{flow, deadline,
payload}`. An event processor arms one with `tmr_start_*` (delay in cycles)
or removes it with `tmr_cancel_*`. A flow has at most one timer; arming it
again re-arms it. The table is scanned one slot per cycle against a
free-running 16-bit time counter, as a periodic-update loop would do. A slot
whose deadline has passed is removed and its event enters the scheduler's
timer lane. An event therefore fires at most 15 cycles late, which is small
next to transport timeouts. A start with no free slot is dropped and flagged
(`tmr_start_drop`).

`context_memory` keeps `CTX_W` = 128 bits per flow. It has one synchronous
read port per type, addressed by the scheduler's output, and one write port
per type for the write-backs. A row that was never written reads as zero.

## Parameters (top level)

| parameter | default | meaning | origin |
|---|---|---|---|
| `PIPE_CYCLES` | 10 | minimum spacing of two dispatches of one flow (event-processor pipeline length) | the design's own example length |
| `NUM_BOXES` | 64 | queue boxes in the cache | chosen |
| `NUM_FLOWS` | 256 | flows (rows of queue and context memory) | chosen |
| `BANK_SLOTS` | 32 | timers of swapped-out flows | chosen |
| `HIST_DEPTH` | 4 | waiting-flow list per box | ⌈`NUM_FLOWS`/`NUM_BOXES`⌉, the flows per box |
| `ISLIP_ITERS` | 3 | iSLIP rounds per cycle | chosen |
| `CTX_W` | 128 | context bits per flow | chosen |
| `TMR_SLOTS`, `TIME_W` | 16, 16 | timer table entries, time counter width | chosen |

The package fixes 3 event types, a mini-queue depth of 4, 32-bit payloads and
8-bit flow ids (`NUM_FLOWS` ≤ 256).

## Throughput

Events that hit the cache or can swap in leave at one per lane per cycle.
Whether all three lanes can be kept busy depends on the cache size. Each
dispatch blocks its box for `PIPE_CYCLES` cycles, so three events per cycle
keep about `3 × PIPE_CYCLES` = 30 flows blocked at once. The boxes and the
swap timer bank must hold them; with too few, events pile up in memory until
their mini-queues overflow. The defaults (64 boxes, 32 bank slots) are sized
for this. Measured with every lane loaded every cycle and flows drawn at
random from 256:

| boxes | bank slots | sustained output, events/cycle |
|---|---|---|
| 16 | 8 | 2.2 |
| 16 | 32 | 2.5 |
| 32 | 8 | 2.91 |
| 32 | 32 | 2.93 |
| 64 (default) | 32 (default) | 2.99 |

At the defaults about 0.1 % of the events are still dropped under this load:
a flow whose events of one type arrive faster than one per `PIPE_CYCLES`
for a while fills its 4-entry mini-queue. The traffic the architecture targets is lighter: a
network event every cycle and application and timer events now and then. A
network event every cycle plus 25 % application and 15 % timer load runs with
no overflow. `tb/tb_sched_workloads.sv` runs both loads.

## Where this RTL makes its own choices

These are the places where this implementation decided something the
architecture leaves open:

* **Full queues:** no back-pressure on the inputs. An event that finds its
  mini-queue full is dropped and reported on `overflow` (one cycle after
  arrival, on its lane).
* **Memory timing:** queue memory reads are combinational, so the "read"
  and "row 1" steps share one cycle. A block-RAM implementation would need
  one more stage plus forwarding from it.
* **Empty boxes are replaceable**, a lane swaps only when it is **alone on
  its box** that cycle, and parked flows are listed in the swap history alongside evicted ones (see
  above).
* **Box mapping:** flow `f` can only use box `f mod NUM_BOXES`. The
  architecture requires a fixed flow-to-box mapping but does not give one.
* **Dispatcher:** none. Each event type goes to its own event-processor
  chain, and the order of processors within a chain is the generated event
  processors' concern.
* **External protocol logic:** the network and application parsers, the
  event processors, and the generators of packets, application messages and
  data-memory commands are protocol-specific. They are not part of this RTL;
  the top exposes their interfaces as ports.

## Simulation

Every block has a self-checking testbench in `tb/` (`tb_<module>.sv`) that
prints `TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/mtp_pkg.sv tb/tb_mtp_top.sv \
          --top-module tb_mtp_top -Mdir obj && ./obj/Vtb_mtp_top
```

* `tb_mtp_top`: end to end at the default sizes. The testbench models the
  parsers and the event processors. Each flow's context counts the events
  processed for it, and every dispatched event must see the count its
  predecessor wrote back. A stale context would mean two events of one flow
  overlapped. Timers are armed, re-armed and cancelled. Every non-overflowed
  event must be processed. Each mechanism must occur at least once: hit,
  park, both swap kinds, eviction, timer-bank store and restore, forwarding,
  blocked box, overflow, timer fire, re-arm and cancel. The test runs 16 000
  cycles in well under a second.
* `tb_mtp_scheduler`: random traffic against a reference queue model. It
  checks per-flow, per-type order, the `PIPE_CYCLES` spacing, the 3-cycle
  latency of a lone event, that everything drains (no starvation), and the
  same mechanism counts.
* `tb_sched_workloads`: the two loads of the throughput section, a
  timer-tracking case (five boxes: flows 1 and 6 share box 1; flow 6 evicts
  blocked flow 1, then flow 1 returns and must get its timer back from the
  bank), and a five-box iSLIP case that must send one event of every type
  from three different boxes in one cycle.
* The unit testbenches check each block against a small model (FIFO, timer
  length, iSLIP validity, maximality and rotation, masked memory writes,
  forwarding, bank counts, history order and de-duplication, round robin,
  timer deadlines).
