# Speculative task-parallel residual belief propagation

This is an accelerator for residual belief propagation (RBP). It has no
central priority queue. Each message update is broken into small tasks,
and each task reads and writes exactly one object. A task carries a
timestamp, and the timestamp stands in for the RBP priority: a larger
residual gives an earlier update. Tiles run these tasks speculatively and
in parallel. Each tile keeps an undo log and commits tasks in timestamp
order. Any task that ran too early is rolled back and re-run.

The default build has 4 tiles with 4 processing elements (PEs) each. It
runs RBP on a 7×7 binary grid model.

## The model computed

The model is a pairwise binary Markov random field on a GRID×GRID,
4-connected grid. It works in the log domain with 16-bit signed integers.

- **Node object.** Holds the node's log-product: its evidence plus the sum
  of its incoming messages.
- **Message object** (i→j). Holds the message value and the last residual
  stored for it.
- **Update rule.** `m(i→j) = clamp(lp(i) − m(j→i), −J, +J)`.
- **Converged state** (what the testbench checks): every node equals its
  evidence plus its incoming messages, exactly. Every message is within EPS
  of its update.

One message update is a chain of seven tasks. Each task touches one object:

| stage | task | object | does |
|---|---|---|---|
| 0 | READ_REV | message j→i | reads the reverse message |
| 1 | LOOKAHEAD | node i | computes the candidate value `la` |
| 2 | CALC_PRIO | message i→j | residual = \|la − current\| |
| 3 | WRITE_PRIO | message i→j | stores the residual. If it is above EPS, schedules UPD_MSG after a delay of `1 + (RES_CAP − min(res, RES_CAP)) >> PRIO_SHIFT` |
| 4 | UPD_MSG | message i→j | stops if a newer residual has been stored since |
| 5 | UPD_MSGVAL | message i→j | writes `la` and passes the change on |
| 6 | UPD_NODE | node j | adds the change, then starts READ_REV for each other neighbour at base+1 |

**Timestamps.** A timestamp is `base << 3 | stage`. Children of a task keep
the base and advance the stage, so two tasks that touch the same data never
have equal timestamps.

**Objects.** Object `o` lives on tile `o mod NTILES`, at word
`o / NTILES`. Objects are numbered as follows:
- node `n` is object `n`;
- the message from `n` in direction `d` is object `N + 4n + d`, with
  directions 0 N, 1 E, 2 S, 3 W.

## How a task moves through a tile

1. **Task queue** (`task_queue`). Holds waiting tasks. Each cycle it picks
   the oldest task that may start. A task may not start while the commit
   queue holds an uncommitted task on the same object with an older or equal
   timestamp. If the commit queue holds a younger task on that object, that
   task ran too early: the task queue asks for it to be aborted, which is a
   conflict abort.
2. **Commit queue** (`commit_queue`). Gives the task a slot and a task
   instance id, `{tile, counter}`. The PE's single read-modify-write goes
   through the object cache. The old word is logged as the undo entry in
   the same cycle.
3. **PE** (`rbp_pe`). Hands up to three children, one per cycle, to the
   **child manager** (`child_manager`). The child manager passes them to the
   **task send buffer** (`task_send_buffer`). From there the **task
   interconnect** (`task_interconnect`) delivers them to their home tiles.
   Each destination takes the oldest task offered to it.
4. **Commit.** A finished task commits once its timestamp is at or below
   the GVT (global virtual time). The GVT is the registered minimum, over
   all tiles, of the oldest timestamp each tile's three queues hold
   (`gvt_arbiter`, `ts_min_select`).
5. **Abort** (two phases):
   - the running PE is squashed;
   - the undo word is written back, and the task's instance id is broadcast
     to all tiles;
   - queued children with that parent id are dropped;
   - children already in a commit queue are aborted in turn.

   A conflict-aborted task is requeued. A child aborted because its parent
   was aborted is not requeued.

## Keeping the oldest task moving

The oldest task in the system (the GVT task) can never be aborted, so the
design gives it priority at every shared resource:

- **Tied and untied children.** A child of the GVT task, or of the host, is
  *untied* and can never be aborted. Other children are *tied*.
- **Task send buffer.** `UNTIED` entries are reserved for untied children.
  The buffer sends the oldest entry whose destination will accept it now,
  so one full destination does not block the rest.
- **Task queue.** `RSV` entries are reserved for untied tasks, GVT-time
  tasks and requeues. A tile advertises two signals, "can take a tied task"
  and "can take an untied task", to every sender.
- **Commit queue.** Slot 0 is reserved for the GVT task.
- **Child manager.**
  - Serves the PE whose parent is oldest.
  - After a tied child is refused, it may switch to a PE with untied
    children (preemption).
  - When its request queue is full, a GVT request evicts another request.
- **Resource abort.** If the GVT task waits in a task queue and no PE is
  free, the youngest running task is aborted and requeued.

**Limitation: the design can still deadlock.** These measures are not a
proof of deadlock freedom, and some inputs still deadlock. At the default
7×7 size, two of six evidence seeds tried (2 and 5) stop making progress.
In the stuck state, tied children are refused forever. Tight 2-tile
configurations deadlock more often. The design needs every initial task to
fit in the task queues: 42 per tile for 7×7, against 64 entries.

## Parameters (top: `chronos_rbp_top`)

| parameter | default | meaning |
|---|---|---|
| NTILES | 4 | tiles |
| NPE | 4 | PEs per tile |
| GRID | 7 | grid side |
| TQ_DEPTH / TQ_RSV | 64 / 8 | task queue entries / entries reserved for untied and GVT tasks |
| NCQ | 8 | commit queue slots, slot 0 reserved |
| TSB_DEPTH / UNTIED | 8 / 4 | send buffer entries / entries reserved for untied tasks |
| RQ_DEPTH, PREEMPT | 2, 1 | child manager request queue depth; preemption on or off |
| J, EPS, RES_CAP, PRIO_SHIFT | 64, 2, 255, 4 | model coupling, convergence threshold, residual-to-delay mapping |

Each tile's cache holds ⌈5·GRID²/NTILES⌉ words (62 by default). It holds
every local object, so it never misses, and there is no memory behind it.

## Using it

The host side is a set of ports:

- **Graph load and readback.** While `run` is low, write evidence and clear
  the messages through `host_we/host_obj/host_wdata`.
- **Initial tasks.** Inject one READ_REV task per message (timestamp 0,
  untied) through the valid/ready pair `host_valid/host_task/host_ready`.
- **Running.** Raise `run` and wait for `idle`.
- **Results.** Read them back through `host_obj/host_rdata`.
- **Statistics.** `ev[]` gives per-tile event strobes.

Simulate with Verilator:

```
verilator --binary --timing --assert rtl/chronos_pkg.sv rtl/*.sv \
  tb/tb_rbp_run.sv tb/tb_chronos_rbp_full.sv --top-module tb_chronos_rbp_full
```

The testbenches:

- **`tb_chronos_rbp_full`.** Runs the default 7×7 build in about 11k
  cycles.
- **`tb_chronos_rbp_top`.** Runs three configurations side by side and
  fails if any mechanism above never happened.
- **`tb_rbp_run`.** The shared driver. It draws evidence from a private
  linear congruential generator, so a run depends only on its SEED.

## Where this departs from the Chronos description it follows

- **PEs.** The PEs are hand-written RTL for one fixed binary model. They
  are not generated by high-level synthesis from C++.
- **Memory.** No memory network or DRAM banks: all objects live on chip.
- **Parent-abort cascade.** The cascade into a commit queue exists but has
  not been seen in the RBP runs, because children of aborted tasks were
  always still queued. It has no directed test.
- **Testing.** There are no unit testbenches: each block is verified only
  through the end-to-end runs.
- **Sizes and rules.** Queue sizes, the conflict rule, the timestamp
  stages and the residual-to-delay mapping are this design's own choices.
- **Synthesis.** Synthesizes as generic logic (about 53k cells at the
  defaults). It has not been timed on an FPGA.
