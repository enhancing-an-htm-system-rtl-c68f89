# Event monitoring for a ring-based hardware transactional memory system

A hardware transactional memory (HTM) system runs transactions inside the
processor cores. It is hard to look into: whether a transaction committed, why
it aborted, who caused the abort, and how long it waited for the commit lock
are all invisible to the program. This design adds an event monitor to a
multi-core HTM system built around rings, with one rule: **the monitor must not
change the timing of the program it observes**.

The monitor works in three stages:

1. Each core's cache state machine emits a small event at every
   transactional step: start, read-only commit, asking for the commit lock,
   getting it, being refused, commit, abort, and receiving a conflicting
   invalidation.
2. A small per-core *log unit* stamps each event with the time since the
   previous one. It holds the event until the core's ring node sees an
   **idle slot** on the ring.
3. Events travel as the lowest-priority traffic on the ring that already
   carries invalidations. The *bus controller* takes them off the ring and
   buffers them. It sends them to a host over a link of fixed bandwidth.

The host adds up the deltas to get each core's absolute timeline. From it, the
host rebuilds the state of every transaction over time. A `START` delta
of 0x39845 cycles from core 3 reaches the host as the 34-bit word
`{2'b11, 4'd3, 28'h1398450}`.

## Block map

```
                +-------------------------------------------------+
   host link <--| bus_ctrl   (event FIFO + link pacing + lock arbiter) |
                +-------------------------------------------------+
                   | ring[0]                              ^ ring[N]
                   v                                      |
             core_unit 0 --> core_unit 1 --> ... --> core_unit N-1
```

Each `core_unit` holds four blocks:

| module | role |
|---|---|
| `event_gen` | TM part of the cache state machine; produces the events |
| `tm_unit` | read and write sets, conflict and capacity detection, write set walked out at commit |
| `log_fifo` | delta timestamps and the event buffer (32 entries) |
| `ring_node` | forwards ring traffic and inserts lock, invalidation and event messages |

`sync_fifo` is a plain FIFO that the bus controller uses. `tmmon_pkg` holds
the message format, the enums and `pack_event`.

Files:

- `rtl/tmbox_mon_top.sv` is the top. Its defaults are `N_CORES=8`,
  `LOG_DEPTH=32`, `RSET_SIZE=16`, `WSET_SIZE=16`, `FIFO_DEPTH=64` and
  `LINK_CYCLES=4`.
- The processor cores, the L1 data caches, the memory ring, the DDR
  controller and the host link hardware are **not** part of this RTL.
- Each core's transactional requests and accesses are top-level ports
  (`op`, `rd_*`, `wr_*`). The host link is a valid/ready word port (`out_*`).

## Ring message format

Every slot on the ring is a valid bit plus a 34-bit message.

```
 33 32 | 31 .. 28 | 27 ............................. 0
 mtype | cpu id   | data (28 bits)
```

| mtype | meaning | data |
|---|---|---|
| 1 | invalidation | 28-bit line address |
| 2 | lock message | `[1:0]` = TRY 0, GRANT 1, DENY 2, RELEASE 3 |
| 3 | monitoring event | `[27:24]` event type, `[23:4]` delta timestamp, `[3:0]` event data |

The 6-bit header, `mtype = 3` for events, the 4-bit CPU ID and the
4/20/4-bit event fields follow the original design.

The original design shows the event fields in two places, and the two do not
agree:

- The field diagram lists them as timestamp, type, data.
- The worked message values print the type in the top nibble.

This RTL follows the worked values.

The codes 1 and 2 for invalidations and lock messages, and the lock sub-codes,
are this design's own choice.

### Event types and data

| code | event | data |
|---|---|---|
| 1 | START | 0 |
| 2 | COMMIT | 0 |
| 3 | ABORT | cause: 0 software, 1 capacity, 2 invalidation |
| 4 | INVALIDATION | CPU ID of the core whose invalidation hit |
| 5 | BEFORE_LOCK (try to lock the ring for commit) | 0 |
| 6 | AFTER_LOCK (lock obtained) | 0 |
| 7 | READONLY (commit with an empty write set) | 0 |
| 8 | RETRY_LOCK (lock held by another core) | 0 |

Codes 1, 2, 5 and 6 are printed in the original design. Codes 3 and 4 follow
from the order in which it lists the events. Codes 7 and 8 and the
abort-cause encoding are this design's own choice.

## The transactional state machine (`event_gen`)

The state machine has four states.

```
READY --START--> READY                 (emit START, open sets)
READY --COMMIT/ABORT request--> TM0
TM0  commit, write set empty ----> READY   (emit READONLY)
TM0  commit, lock not held  -----> TM1     (emit BEFORE_LOCK, send TRY)
TM0  abort request --------------> TM2
TM1  lock granted ---------------> TM2     (emit AFTER_LOCK)
TM1  lock held by another core --> TM0     (emit RETRY_LOCK)
TM2  abort ----------------------> READY   (emit ABORT, clear sets)
TM2  commit ---------------------> READY   (emit COMMIT, start write-back)
```

From the original machine, this design takes:

- the states, the events each transition emits, and the TRY_LOCK request;
- the read-only shortcut and the retry path.

These parts are this design's own choice:

- **Conflicts and capacity.** A matching invalidation or a set overflow turns
  an open transaction into an abort. This happens in READY, in TM0, and in TM2
  even after the lock was granted. The abort's cause goes into the ABORT
  event's data.
- **Ordering of INVALIDATION events.** The INVALIDATION event can collide with
  a state-machine event in the same cycle. When it does, a one-entry buffer
  delays it by a cycle. While such an event is pending, TM0 and TM2 wait. The
  log therefore always shows the invalidation before the abort it causes, and
  never after a commit.
- **The step from READY to TM0.** The original machine does not show this
  transition. Here it happens on a commit or abort request.

The original machine has 11 states, and only these four TM states are built.
The cache-miss and memory states belong to the cache, which is not part of
this RTL.

## Delta timestamps and the log unit (`log_fifo`)

**Timestamps.**

- A free-running counter gives the time. The unit also keeps the time of the
  last *stored* event.
- Each stored entry is `{type, now - last, data}`.
- With a 20-bit delta the reader keeps one-cycle resolution over about a
  million cycles between events (21 ms at 50 MHz).

**Buffering.**

- The buffer is first-word-fall-through, and `output_enable` pops it.
- When the buffer is full, an arriving event is dropped and `dropped` is
  pulsed. The next delta is still measured from the last event that was
  stored, so the later timeline stays correct.

**Limits.**

- A gap of more than 2^20-1 cycles wraps the delta.
- The original design proposes a periodic no-operation event to avoid this.
  It is not built here.
- A host that sees long idle periods must allow for the wrap.

The buffer depth is 32. In the original experiment, a program built to produce
events as fast as possible never used more than 4 entries on 8 cores. The
end-to-end test here peaks at 3.

## Idle-slot insertion (`ring_node`)

Every node is one register stage on the ring. In each cycle the slot that
comes in either passes through, is removed, or is replaced:

- The node removes its own invalidation when it comes back round the ring.
- The node removes a GRANT or DENY addressed to it, and reports it to the
  core.
- The node reports other cores' invalidations to its TM unit, and forwards
  them.
- An empty slot, or one the node has just freed, goes first to a pending
  lock message, then to a pending invalidation, then to the oldest logged
  event.

Events only ever use slots that nothing else wanted. Invalidation and lock
traffic therefore never waits for monitoring data, which is what keeps the
monitor out of the program's timing. The priority between lock messages and
invalidations is this design's own choice.

## Bus controller and host link (`bus_ctrl`)

**Event path.**

- Event messages are taken off the ring into a `FIFO_DEPTH`-entry FIFO
  (default 64) as complete 34-bit words.
- The host port delivers one word per `LINK_CYCLES` clocks (default 4). This
  models a link whose bandwidth is fixed at build time.
- If the FIFO is full, the event is lost and `ev_dropped` pulses.
- The FIFO and its pacing follow the original design. Both sizes are this
  design's own choice.

**Commit lock.**

- The original design names only the TRY_LOCK message and the two outcomes
  (lock acquired, or another core owns it).
- Here the bus controller holds the single ring lock:
  - TRY becomes GRANT if the lock is free or already held by the sender, and
    DENY otherwise.
  - The owner sends RELEASE. A RELEASE from any other core is ignored.
  - Requests and replies use the same slot.
- `core_unit` sends RELEASE after its whole write set has gone out as
  invalidations, or right away if the transaction aborts while holding the
  lock.
- This protocol is this design's own.

## Write-back

At commit, `tm_unit` walks its write set. It hands each address to the ring
node as an invalidation message, and then reports `drain_done`. The memory
write itself would travel on the memory ring, which is not part of this RTL.

Both sets are fully associative with `RSET_SIZE`/`WSET_SIZE` entries (default
16 each; the original design fixes the size at build time but gives no value).
Overflowing either set raises a capacity abort.

## Departures from the original design

- **Secondary ring only.** Only the ring that carries invalidations and events
  is built. The memory ring, the DDR controller and memory forwarding in the
  bus controller are absent.
- **Processor and L1 cache.** These are outside the RTL. Their transactional
  behaviour comes in through ports.
- **Lock protocol.** The lock location, the message codes and the release rule
  are this design's own.
- **State machine.** Only the 4 TM states of the 11-state cache machine are
  built, with the conflict, capacity and invalidation-ordering additions
  described above.
- **Event fields.** The bit order follows the worked message values, not the
  field diagram.
- **Host link.** A valid/ready port stands in for the PCI Express channel.
- **No wrap protection.** There is no no-operation event against timestamp
  wrap.
- **Defaults.** `N_CORES` defaults to 8. The 4-bit CPU ID allows up to 16.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_event_gen` | every transition and event of the state machine, the lock retry loop, the abort causes and the INVALIDATION ordering |
| `tb_log_fifo` | random push/pop against a reference queue with exact deltas, the full flag, the drop at a full buffer and the delta across it, and the 20-bit wrap |
| `tb_tm_unit` | duplicate-free set filling, read- and write-set hits with the sender ID, capacity overflow and the write-set walk under back-pressure |
| `tb_ring_node` | forwarding, removal, idle-slot insertion and slot priority |
| `tb_bus_ctrl` | event delivery order, exact link spacing (12 words drain in 11 x LINK_CYCLES), FIFO overflow and the lock arbiter |
| `tb_core_unit` | the event sequence of read-only, retried-lock and invalidated transactions, START times rebuilt exactly from deltas, and RELEASE after write-back |
| `tb_tmbox_mon_top` | end to end at the default parameters (8 cores) |
| `tb_tmbox_workloads` | the same end-to-end run at 1, 2, 4 and 16 cores, and a 4-core system at three contention levels |

In `tb_tmbox_mon_top`:

- Processor models run conflicting transactions on a shared address pool.
- The host side rebuilds every core's timeline from the link. It checks:
  - the event order against the transaction state machine;
  - that the START times match the processors exactly;
  - that the event counts match what the processors saw;
  - that no event is lost.
- The test also counts every mechanism and fails if one never happened: lock
  refusals, each abort cause, read-only commits, events buffered in a log
  unit, and link back-pressure.

`tb_tmbox_workloads` repeats the same kind of complete run in one simulation
at other sizes. Each run has its own clock and reset, and uses the
parameterised harness `tb/tmbox_mon_env.sv`.

- **Core-count sweep.** The sweep uses 1, 2, 4 and 16 cores.
  - One core must see no invalidation abort and no lock refusal.
  - Sixteen cores must see both.
- **Contention.** A 4-core run is repeated with a shared pool of 1000, 160
  and 24 addresses. The invalidation-abort count must rise from one level to
  the next.

## Sizing the link

The log buffers are never the bottleneck. Even with 16 cores, no log unit held
more than 4 events. The link is another matter.

- The test workloads are dense: transactions of 100 to 300 cycles, back to
  back, with many aborts. They produce about 0.15 events per cycle on average,
  in bursts.
- The default link takes one word every 4 cycles, with a 64-entry FIFO. That
  is enough for 8 cores, whose FIFO peaked at about 20 entries with a host
  that stalls a quarter of the time.
- It is **not** enough for 16 cores. The FIFO filled and events were dropped.
  `ev_dropped` reports each loss.
- The 16-core run therefore uses `LINK_CYCLES=2`.

Choose `LINK_CYCLES` and `FIFO_DEPTH` for the link you actually have and the
event rate you expect.

## Simulating

To run any testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    --top-module tb_tmbox_mon_top \
    -y rtl -y tb +libext+.sv rtl/tmmon_pkg.sv tb/tb_tmbox_mon_top.sv
./obj_dir/Vtb_tmbox_mon_top
```

Replace the testbench name to run another one. The full 8-core run takes
about 8,000 cycles and finishes in under a second. The workload testbench
finishes in well under a second too.

To change the system size, set the parameters of `tmbox_mon_top`. The
full-size testbench is written for `N = 8`. `tmbox_mon_env` takes the core
count, the address-pool size, the link speed and host stalls as parameters.
