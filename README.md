# SEED instruction scheduler

SystemVerilog model of SEED (Scalable, Efficient Enforcement of Dependences).
SEED is the instruction scheduler of an out-of-order core. It takes renamed
instructions and hands them to the functional units.

A conventional issue queue broadcasts result tags to every waiting entry and
then selects among the ready ones. SEED does neither:

- Unready instructions wait in an indexed, banked **dependence table**
  (depTable). Each one sits behind one producer.
- When an instruction is woken, its **token** (its own depTable entry number)
  goes into a FIFO **token queue**. The next cycle that token indexes the
  table and wakes everything stored there.
- Woken instructions go into a small **in-order issue buffer**. A scoreboard
  there enforces exact latencies.

Wakeup is driven by wakeup, not by select. The loop contains no associative
search and no select logic.

The top module is `seed_scheduler` (`rtl/seed_scheduler.sv`). All sizes are in
the package `seed_pkg`. The defaults are the SEED(128) configuration.

## Pipeline

```
 rename ──► dispatch FIFO ──► dispatch ──┬──► depTable ──► wakeup ──┐
   │            (8)              ▲        │   128 x 4, 8 banks       │
   │                             │        └──────────────┐          │
 token alloc            re-dispatch queue (4) ◄──────────┼──────────┤
 (alias table,                                            ▼          ▼
  checkpoints)                             token queue ◄─ issue buffer (8) ──► FUs
                                           (128)          in order, 6 wide
```

| Stage | What happens |
|---|---|
| Rename (`seed_scheduler`, `token_alloc`, `load_hit_predictor`) | One instruction per cycle. A producer allocates a token, and the alias table records it under the logical destination. The sources look up their producers' tokens. Both scoreboards mark the new physical register not ready. Loads get a hit/miss prediction. The instruction enters the 8-entry dispatch FIFO. |
| Dispatch (`seed_dispatch`) | Two candidates per cycle: the head of the re-dispatch queue first, then the head of the dispatch FIFO. See below. |
| Wakeup (`seed_wakeup`) | Up to 2 tokens per cycle from the head of the token queue each read one depTable entry. The dependents found are routed onward. |
| Issue (`issue_stage`) | Issues in order from the head of the 8-entry buffer. Up to 6 per cycle: 3 load/store, 2 branch, 5 integer, 4 floating-point. |

## Tokens and the token allocator

The depTable is managed separately from the physical registers, because an
entry is only needed until its owner has woken its dependents. `token_alloc`
works like a register renamer:

- An alias table is indexed by logical register (64: 32 integer + 32 FP).
- A free list holds the 128 tokens.
- There are 8 checkpoints. A branch takes one at rename.

A token is released in the cycle its entry is read at wakeup.

**Recovery.** On a misprediction the alias table is restored from the
branch's checkpoint, and every token allocated since that checkpoint returns
to the free list. The free list is a bit vector, and each live checkpoint
keeps a mask of the tokens allocated after it. The mask is ORed back on
restore. This has the same effect as restoring a circular free list's read
pointer. It also stays correct when a wrong-path token had already been
released before the branch resolved.

## The depTable

`dep_table` has one entry per token. Each entry holds 4 sub-entries: the
dependents that token will wake. The entries are spread over 128/16 = 8
banks by the low bits of the token. Each bank is single-ported, allowing one
insertion or one wakeup read per cycle. Fill counts are kept in registers
beside the banks so that dispatch can see a full entry at once.

A wakeup read returns the entry's contents in the same cycle and empties it
at the clock edge. A newly allocated token also has its entry reset.

## Dispatch

`seed_dispatch` decides for each candidate:

1. **Wrong path.** If its basic block has been squashed, it is dropped.
2. **Direct.** If the dispatch scoreboard shows that both source producers
   have already woken, it goes straight to the issue buffer. Its own token
   goes to the token queue.
3. **One pending source.** It is appended to that producer's entry.
4. **Two pending sources.** One producer is picked by a 16-bit LFSR bit, and
   the instruction is queued there with its *speculative* bit set.
5. **Stalls.** A full target entry, or a bank already taken that cycle (by
   wakeup reads or the other lane), leaves the candidate in place. A full
   dispatch FIFO then stalls rename. A full entry empties when its owner
   wakes, after which the instruction goes direct.
6. **Re-dispatch meets a full entry.** This candidate does not wait. It is
   dropped and reported on `sx_v`/`sx_rob` for a soft exception, the same as
   a re-dispatch overflow. See the choices below for why.

The **dispatch scoreboard** (`dispatch_scoreboard`) holds one bit per
physical register (640 = 384 integer + 256 FP). The bit is cleared when the
register is allocated. It is set when the producer's token is pushed into the
token queue, which is the moment the producer performs its wakeup.

## Wakeup and the token queue

Each cycle `seed_wakeup` takes tokens from the head of the token queue in
order:

- A token whose owner belongs to a squashed block is dropped without a table
  access.
- Otherwise the token needs a free bank and room in the issue buffer and the
  token queue for up to all its dependents.
- Selection stops at the first token that cannot go. Wakeup reads take their
  banks before dispatch insertions do.

Each dependent read out is handled in one of three ways:

- **Dropped**, if its basic block has been squashed.
- **Re-dispatched**, if it is speculative and the dispatch scoreboard shows
  its other source still pending. It goes through the 4-entry re-dispatch
  queue and is dispatched again under the other source. If the queue has no
  room, the instruction is dropped and reported on `sx_v`/`sx_rob`. The ROB
  then raises a soft exception and refetches from it. On refetch all its
  sources are ready, so forward progress is guaranteed.
- **Sent to the issue buffer**, otherwise. Its own token enters the token
  queue, which wakes its dependents the following cycle, and its dispatch
  scoreboard bit is set.

## Issue buffer and issue scoreboard

Instructions reach `issue_stage` in dependence order but without exact
timing. The **issue scoreboard** (`issue_scoreboard`) supplies the timing. It
keeps a countdown per physical register:

- A producer of latency *n* issued in cycle *t* lets a consumer issue in
  cycle *t + n*. A single-cycle producer therefore feeds a back-to-back
  consumer.
- Allocation marks the register not ready.

The picker walks the buffer from its head:

- A squashed instruction is discarded.
- Otherwise an instruction issues if both sources are ready and a unit of
  its class is free.
- The walk stops at the first instruction that cannot issue (an interlock).
- Nothing issues while `exec_stall` is high.

## Load-hit speculation and variable-latency operations

`load_hit_predictor` holds 8K 3-bit counters indexed by PC[14:2]. A hit
increments the counter and a miss clears it. Only a saturated counter
predicts a hit.

- **Predicted-hit load:** it wakes its dependents like any other
  instruction, with the load-to-use latency. If it then misses, the
  execution side raises `exec_stall` until the data arrives.
- **Predicted-miss load, or variable-latency operation** (`long_lat`, for
  example a divide): it keeps its token. The token is pushed into the token
  queue, and the register marked ready, only when the result returns on
  `cmp_*`.

After reset the counters are cleared one per cycle, which takes 8192 cycles.
During that time every load is predicted to miss.

## Wrong-path filtering and recovery

`bbid_manager` gives each basic block a 6-bit ID. IDs rise monotonically with
wrap-around and are recycled in order at commit. Decode stalls when all 64
are live.

On a misprediction (`mp_*`):

- Every ID handed out after the mispredicted block is marked invalid.
- The token allocator is restored from the branch's checkpoint.

Wrong-path instructions that were queued under older, right-path producers
stay in the depTable. They are filtered out wherever they next appear: at
dispatch, at wakeup (both token and dependent), when a completion comes back,
and at issue. A `flush` input (the soft-exception restart) empties every
queue and scoreboard.

## Top-level interface (`seed_scheduler`)

| Port | Dir | Meaning |
|---|---|---|
| `ren_v`, `ren` (`ren_t`), `ren_rdy` | in/in/out | Renamed instruction: ROB index, basic-block ID, PC, unit class, latency, load / variable-latency / branch flags, logical and physical source and destination registers. `ren_rdy` is combinational. It falls when no token, checkpoint or dispatch FIFO slot is free, or during a misprediction or flush. |
| `ren_ckpt_id` | out | Checkpoint taken by a branch, to be returned on `mp_ckpt` / `br_ok_ckpt`. |
| `bb_alloc_v/id/ok`, `bb_commit_v/id` | in/out/out, in | Basic-block ID allocation and commit. |
| `mp_v`, `mp_ckpt`, `mp_bbid` | in | Branch misprediction. |
| `br_ok_v`, `br_ok_ckpt` | in | Branch resolved correctly; frees its checkpoint. |
| `cmp_v`, `cmp_tok`, `cmp_dst`, `cmp_bbid` | in | Result of a predicted-miss load or variable-latency operation. |
| `exec_stall` | in | A load predicted to hit missed; hold issue. |
| `lhp_upd_v/pc/hit` | in | L1 outcome of a load; trains the predictor. |
| `iss_v[6]`, `iss_inst[6]` | out | Instructions issued this cycle (`inst_t`, including token and ROB index). |
| `sx_v[9]`, `sx_rob[9]` | out | Dropped re-dispatches: lanes 0-7 from wakeup (queue full), lane 8 from dispatch (target entry full). Mark these ROB entries for a soft exception. |
| `flush` | in | Restart from the ROB head. |
| `ev` | out | Per-cycle counts of every scheduler event (direct dispatch, insertion, speculative queuing, bank conflict, full entry, tokens and instructions woken, re-dispatch, overflow, wrong-path drops, issue, interlock). |

Timing and reset:

- One clock domain with a synchronous active-low reset (`rst_n`).
- All table reads are combinational within the cycle. Updates land at the
  clock edge.
- An instruction accepted at rename can be dispatched the next cycle.
- A token pushed in cycle *t* wakes its dependents in cycle *t + 1*, and they
  can issue from *t + 2*.

## Parameters

| Name | Value | Origin |
|---|---|---|
| `DT_ENTRIES` (tokens, depTable entries) | 128 | SEED(128) configuration |
| `SUB_ENTRIES` | 4 | design |
| `DT_BANKS` | 8 (= entries / 16) | design |
| `ISSUE_BUF` / `ISSUE_WIDTH` | 8 / 6 | design |
| `NUM_LDST/BR/ALU/FPU` | 3 / 2 / 5 / 4 | design |
| `REDISP_Q` | 4 | design |
| `NUM_PREGS` | 640 (384 + 256) | core configuration |
| `ROB_ENTRIES` | 640 | core configuration |
| `LHP_ENTRIES`, `LHP_CTR_W` | 8192, 3 | design |
| `WAKE_TOKENS` (tokens read per cycle) | 2 | own choice |
| `DISP_FIFO` | 8 | own choice |
| token queue depth | 128 (one slot per token) | own choice |
| `NUM_CKPT` | 8 | own choice |
| `NUM_LREGS` | 64 | own choice |
| `NUM_BBID` | 64 | own choice |
| rename width | 1 per cycle | own choice |

## Choices where the description is silent or inconsistent

**Ports per bank.** The configuration table lists "2 ports" per depTable
bank. The energy study mentions a 1-read/1-write SRAM. The design text says
twice that each bank takes a single insertion *or* a single wakeup per cycle.
The single-ported reading is built. Two-port banks would change only the
per-bank conflict rule in `seed_wakeup` and `seed_dispatch`.

**When the dispatch scoreboard bit is set.** The text says "when an
instruction is sent to the issue buffer". It also says the bit "only tracks
whether the producer has performed a wakeup". The second is built: the bit is
set when the token enters the token queue. The two differ only for
predicted-miss loads and variable-latency operations. For those, setting the
bit early would let consumers bypass a wakeup that has not yet happened.

**Speculative queuing.**

- The random source choice uses an LFSR.
- Re-dispatch always passes through the queue, which gives the "following
  cycle" delay.
- The queue is served before new instructions.

**A re-dispatch never waits on a full entry.** The design text lets a
stalled instruction wait for a full entry to empty. That is safe for the
dispatch FIFO, but not for the re-dispatch queue. The owner of the full
entry may itself have been dropped for a soft exception. If an instruction
older than that owner sits behind the waiting one in the re-dispatch queue,
it can never issue. The owner then never reaches the head of the ROB, and no
refetch happens. This deadlock was seen in simulation. A re-dispatch that
meets a full entry is therefore dropped with a soft exception, which reuses
the document's own overflow mechanism. `sx_v`/`sx_rob` therefore has 9
lanes: 8 from wakeup and 1 from dispatch.

**Room reservations.** Wakeup reserves room in the issue buffer and the token
queue for all dependents of a token before reading it. This is so that a
woken instruction is never lost. Dispatch uses what is left.

**Token queue depth.** 128, one slot per live token, so the queue cannot
overflow.

## What is not built

The core around the scheduler is represented only by ports:

- fetch, decode and register renaming (physical register allocation)
- the reorder buffer and commit
- register files, functional units, caches and the branch predictor

The PC-indexed "last-arriving source" predictor, which was evaluated and
found to make no difference, is not built. Memory-dependence tracking through
the depTable (mentioned as possible) is not built either.

## Verification

Each block has a self-checking testbench in `tb/` that compares it with an
independent reference model and ends with a `TB_RESULT` line:

| Testbench | What it checks |
|---|---|
| `tb_seed_scheduler` | End to end, at the default sizes. See below. |
| `tb_dep_table` | Insertions, wakeup reads and entry resets over all 128 entries, including full entries. |
| `tb_token_alloc` | Renaming, release, checkpoints, nested restores and free-list exhaustion. |
| `tb_dispatch_scoreboard`, `tb_issue_scoreboard` | Set/clear priority; the exact n-cycle interlock and completion timing. |
| `tb_issue_stage` | In-order issue, unit limits, interlocks, discards, `exec_stall`. |
| `tb_seed_wakeup` | Token selection, bank and room limits, routing of every dependent, re-dispatch overflow. |
| `tb_seed_dispatch` | Direct / insert / stall decisions, bank sharing between lanes, LFSR choice (checked for balance). |
| `tb_mp_fifo`, `tb_load_hit_predictor`, `tb_bbid_manager` | Queue, predictor and basic-block ID behaviour. |

`tb_seed_scheduler` drives the unmodified top with a model of the rest of
the core:

- A renamer and ROB.
- A 20,000-instruction random program with planted fan-out and two-source
  patterns.
- Predicted-hit, predicted-miss and missing loads; variable-latency
  operations; branch mispredictions with checkpoint restore; soft-exception
  refetch.

Every issued instruction is checked for four things:

- it is on the right path;
- it is not issued twice;
- its sources were produced at least their latency earlier;
- the final program commits completely.

The testbench also counts each mechanism and fails if any of them never
occurred. The mechanisms are: direct dispatch, insertion, speculative
queuing, bank conflict, full entry, wakeup, re-dispatch, overflow, soft
exception, wrong-path drop, interlock, misprediction, predicted hit/miss,
`exec_stall`, completion wakeup and multi-issue. A run takes about 72,500
cycles, including the 8192-cycle predictor clear. It has been run with more than
30 random seeds (`+verilator+seed+N +verilator+rand+reset+2`), and every
unit testbench with 8 or more. Each seed gives a different program and a
different initial state, and all of them pass. Seed sweeps found two faults
that the default seed missed. Both are fixed:

- the re-dispatch deadlock described above;
- a misprediction in the oldest block while all 64 basic-block IDs were
  live, which invalidated nothing. The testbench now forces this case.

Each testbench has also been run against a deliberately broken copy of its
block (for example, a wakeup read that does not empty the entry, or an
interlock released one cycle early) and fails on it.

## Simulating and changing sizes

Any testbench runs with plain Verilator (5.x), from the folder holding `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/seed_pkg.sv \
          tb/tb_seed_scheduler.sv --top-module tb_seed_scheduler
./obj_dir/Vtb_seed_scheduler
```

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. The end-to-end
run takes a few seconds.

All sizes live in `seed_pkg`. The bank count follows the entry count (entries
/ 16), and the widths follow the sizes. Changing `DT_ENTRIES` gives the
SEED(16/32/64/256) points. Changing `SUB_ENTRIES` gives the 1/2/8 sub-entry
variants. Only the 128-entry, 4-sub-entry default has been simulated.

Coarse synthesis of the top (Yosys, memories kept as memory cells) gives:

- about 7,200 cells;
- 1,578 flip-flop bits;
- 81 kbit of memory, mostly the depTable (42 kbit) and the hit predictor
  (24 kbit).

## Files

- `rtl/seed_pkg.sv`: sizes, instruction and event types.
- `rtl/seed_scheduler.sv`: top.
- `rtl/seed_dispatch.sv`, `rtl/seed_wakeup.sv`, `rtl/issue_stage.sv`: stage control.
- `rtl/dep_table.sv`, `rtl/token_alloc.sv`, `rtl/dispatch_scoreboard.sv`,
  `rtl/issue_scoreboard.sv`, `rtl/load_hit_predictor.sv`,
  `rtl/bbid_manager.sv`, `rtl/mp_fifo.sv`: storage blocks.
- `tb/`: one testbench per block.
