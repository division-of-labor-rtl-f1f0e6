# TPC: a composite prefetcher built by division of labour

A single prefetcher that tries to cover every access pattern ends up
trading accuracy for coverage. TPC takes the opposite approach. It splits the
work among three small specialised components. Each one recognises one kind of
access pattern and prefetches only what it is confident about. A coordinator
with no storage of its own decides, per memory instruction, which component is
in charge:

| component | pattern it covers | prefetches into |
|-----------|-------------------|-----------------|
| **T2** | *canonical strided streams*: one static load or store in an inner loop whose address advances by a constant delta | L1 |
| **P1** | *pointer patterns*: arrays of pointers (`x = A[i]; ... *(x + off)`) and pointer chains (`p = p->next`) | L1 |
| **C1** | instructions that touch *dense regions* of memory, which are neither strided nor pointer-based | L2 (whole 16-line regions) |

An executed memory instruction goes to T2 first. If T2 does not own it, it goes
to P1. If neither owns it, it goes to C1. T2 and P1 work out *when* a prefetch
is due, not just *what* to fetch. They keep a stream a computed number of loop
iterations ahead of the program:

    d = (AMAT + m) / T_iter

- AMAT is the measured average miss latency.
- m is a margin.
- T_iter is the measured cycles per iteration of the current inner loop.

All storage is small: the main structures are 32, 20, 16 or 8 entries, plus a
few state bits per instruction kept beside the instruction cache.

The RTL is in `rtl/`, one module per file. Shared types and constants are in
`rtl/tpc_pkg.sv`. The top is `rtl/tpc_top.sv`. Each module has a self-checking
testbench in `tb/`.

## Block map

```
                  br_*  ──> loop_detector ──T_iter, iteration──┐
                  lat_* ──> amat_tracker  ──AMAT──> pf_distance ──d──┐
                                                                     │
 mem_* ──> tpc_coordinator (steers T2 > P1 > C1)                     │
             │          │            │                               │
             v          v            v                               │
       t2_prefetcher  p1_prefetcher  c1_prefetcher  <── d ───────────┘
       (t2_sit,       (p1_taint_unit (c1_region_monitor,
        t2_pf_engine,  <── dec_*)     inst_state_bits)
        inst_state_bits)
             │  cand / mark / ptr_fwd  │
             └────────<───────>────────┘
             │              │            │
             └──────> coordinator sets L1/L2 ──> pf_queue ──> pf_*
                                                  resp_* ──> T2, P1
```

`inst_state_bits` is instantiated once per component:

- 2 bits per instruction for T2;
- 1 bit per instruction for P1;
- 1 bit per instruction for C1.

It models a small array beside the I-cache, with 8192 instruction slots. When a
line is refilled into the I-cache, its bits are cleared.

## Loop hardware and prefetch distance

`loop_detector` finds the current inner loop from taken backward branches.

- **Loop register.** A single register holds the branch believed to close the
  inner loop. When that branch is taken again, one iteration has ended. The
  module emits `iter_pulse` and updates T_iter, a 1/4-weight running average
  of the cycles between iterations.
- **Non-loop table (NLPCT, 20 entries).** A different backward branch that
  appears *between* two instances of the loop branch cannot be the inner loop's
  branch. It is recorded in the NLPCT so that it is never taken for the loop
  branch again.
- **Inner-loop takeover.** A branch that is taken twice in a row with nothing
  in between is a tighter loop. It replaces the register's contents.

`amat_tracker` keeps a 1/8-weight running average of the latencies of completed
demand misses. `pf_distance` computes d with a small restoring divider. It clamps
d to 1..16 and uses d = 4 while no loop is known. A new d is ready at most 19
cycles after its inputs change.

## T2: strided streams

T2 keeps a 2-bit state per static memory instruction:

| state | meaning | on each instance |
|-------|---------|------------------|
| 0 unknown | never missed | ignored until it causes a primary L1 miss, then → 1 |
| 1 observation | being learned | updates its SIT entry; 16 equal deltas in a row → 2; 4 changed deltas in a row → 3; prefetching already starts after 4 equal deltas |
| 2 strided | owned by T2 | prefetches |
| 3 non-strided | given up | ignored |

**Stream Information Table (SIT, 32 entries, `t2_sit`).**

- **Key.** Entries are keyed by *mPC* = PC xor the top of the return-address
  stack. This keeps the same load reached from different call sites as
  separate streams.
- **Contents.** Each entry holds the last address, the delta, the
  equal-delta and changed-delta counters, and a *lead*. The lead is how many
  deltas ahead of the current instance have already been prefetched.
- **Replacement.** Round robin.

**Keeping a stream d iterations ahead.** Each instance of a strided
instruction moves the stream one delta forward, so the lead drops by one. T2
compares the lead with d. It then hands the missing addresses
`addr + k·delta` (from k = lead+1 up to d) to `t2_pf_engine` as one run. The
engine issues one request per cycle and skips addresses that fall in the line
it has just requested. A run offered while the engine is busy is refused, and
the next instance catches up. When d grows, extra run length fills the gap. When
d shrinks, nothing is issued until the stream has caught up.

**Hand-offs to P1.** When T2 classifies a load (strided or non-strided), it
offers that load to P1 as a candidate (`cand_*`). If P1 later marks a strided
load as an *array of pointers*:

- T2 doubles that load's distance;
- T2 tags its prefetches with `SRC_T2PTR` and the SIT index;
- when such a prefetch returns, T2 adds the stored pointer offset to the
  returned 64-bit word and forwards the sum to P1 (`ptr_fwd_*`).

## P1: pointer patterns

This is the most involved component. Pointer loads cannot be learned from
addresses alone. The dependence between two loads has to be seen in the
register dataflow first, and then confirmed with values.

**1. Dependence detection (`p1_taint_unit`).**

- P1 takes a candidate load *i* into its one-entry PtrPC register.
- At the decoder, on *i*'s next instance, the destination register of *i*
  becomes tainted. The taint unit has one bit for each of the 64 logical
  registers.
- Any instruction that reads a tainted register taints its own destination.
  Any load that reads one is reported as a dependent load *j*.
- When *i* is decoded again, the unit reports whether *i*'s own address came
  from a tainted register. If it did, *i* is a pointer chain.
- A hard limit (1024 instructions) ends a walk that never comes back to *i*.

**2. Confirmation (`p1_prefetcher`, detection side).**

- **Array of pointers (i is strided).** Up to 8 dependent loads *j* are held
  in a candidate table. Each instance of *i* records *i*'s loaded value. Each
  instance of a candidate *j* computes `addr(j) − value(i)`. After 4 equal
  offsets in a row, P1 marks *i* in T2's SIT with that offset and sets *j*'s
  P1 bit, so P1 now owns *j*.
- **Pointer chain.** The same check with *j = i*: `addr(n+1) − value(n)`.
  Once it is confirmed, *i*'s P1 bit is set and the chain state machine takes
  *i*.
- A check that has not confirmed within 32 instances of *i* is abandoned.

**3. Prefetching.**

- **Array of pointers.** Every T2 prefetch of *i*'s future elements comes
  back with the pointer it loaded. P1 prefetches `pointer + offset` into L1.
  Because T2 runs twice as far ahead for these loads, the dependent line
  arrives in time.
- **Pointer chain.** The next address is only known once the previous one has
  returned. The chain state machine (`C_ARMED → C_ISSUE ⇄ C_WAIT →
  C_STEADY`) handles this:
  - *Catch-up:* starting from the current value, it issues `value + offset`,
    waits for the data, and repeats until d steps are in flight.
  - *Steady state:* it keeps the last returned value and issues one more step
    per instance of *i*.
  - *Correction:* it keeps one issued address and compares it with the
    addresses of the next instances of *i*. If none matches within 64
    instances, the chain has been left. The state machine resets, *i*'s P1
    bit is cleared, and *i* is tested again.

## C1: dense regions

- **Region monitor (`c1_region_monitor`, RM).** It tracks the 16 most recent
  1 KB regions (16 lines of 64 bytes). For each region it keeps a touched-line
  vector and the set of instruction-table entries that touched it. It sees
  every executed memory access, including those of instructions that T2 or P1
  own, so density reflects all traffic to the region.
- **Region evaluation.** When a region is evicted, it counts as *dense* if
  more than 6 of its lines were touched.
- **Instruction table (IM, 16 entries).** Each instruction that touched the
  region counts the evicted region as dense or sparse.
- **Decision.** After 4 regions, an instruction is marked as a C1 instruction
  if more than 3/4 of them were dense.
- **Prefetching.** From then on, each execution of that instruction starts
  a prefetch of its whole region into L2. The other 15 lines go out one per
  cycle. The demand line itself is skipped. The region prefetched last is
  remembered and not requested again back to back. No new region starts while
  one is still being issued.

## Coordinator and prefetch queue

`tpc_coordinator` is combinational:

- It routes each executed memory instruction to T2, else P1 (if T2 does not
  own it), else C1.
- It merges the three request streams with priority T2 > P1 > C1.
- It sets the destination: L1 for T2 and P1, L2 for C1.

`pf_queue` (8 entries) holds requests until the memory system takes them on
`pf_valid`/`pf_ready`:

- When the queue is full, an arriving T2 or P1 request removes the youngest
  queued C1 request to make room. If no C1 request is queued, the arriving
  request is dropped.
- An arriving C1 request that finds no room is dropped.
- The top always accepts requests into the queue, so the components never
  stall.

## Interface and timing of `tpc_top`

All addresses and PCs are 64-bit. Instructions are 4 bytes and cache lines are
64 bytes. At most one event of each kind arrives per cycle.

| ports | meaning |
|-------|---------|
| `br_valid, br_pc, br_target` | taken branch (backward when `target <= pc`) |
| `dec_*` | decoded instruction: PC, load flag, up to two source and one destination logical register (6-bit ids) |
| `mem_valid, mem_pc, mem_ras_top, mem_addr, mem_value, mem_is_load, mem_l1_miss` | executed memory instruction |
| `lat_valid, lat` | latency of a completed demand miss |
| `ic_fill_valid, ic_fill_addr` | I-cache line fill |
| `pf_valid, pf_out, pf_ready` | prefetch request `{addr, src, tag, dest}` |
| `resp_valid, resp_src, resp_tag, resp_data` | a completed prefetch: its source and tag, and the 64-bit word at its address |
| `st_*` | status pulses and levels for observing each mechanism |

- Ownership (`handled`) and steering are combinational in the cycle of the
  memory event.
- A prefetch reaches `pf_*` a few cycles later: one or two cycles in the
  component, plus one cycle in the queue.
- `resp_*` must return the data word of every `SRC_T2PTR` prefetch and every
  P1 chain prefetch. Without it, pointer prefetching stops after the first
  step.

Default parameters:

| parameter | value |
|-----------|-------|
| `SIT_ENTRIES` | 32 |
| `NLPCT_ENTRIES` | 20 |
| `STATE_ENTRIES` | 8192 |
| `P1_CANDS` | 8 |
| `RM_ENTRIES` | 16 |
| `IM_ENTRIES` | 16 |
| `QUEUE_DEPTH` | 8 |

Thresholds are parameters of the components:

- T2: 16 equal deltas to become strided, 4 changed deltas to become
  non-strided, early prefetching after 4 equal deltas;
- P1: 4 confirmations;
- C1: more than 6 lines for a dense region, 4 regions per decision, more
  than 3/4 dense to mark an instruction;
- distance: margin m = 20 cycles, d ≤ 16.

Synthesised at the defaults, the top holds about 3.5 k flip-flop bits and
48 k bits of memory arrays, about 6.3 KB in all. That is more than the 4.57 KB
budget of the original design. The entry counts are the same, but every
address and PC here is stored at a full 64 bits.

## Simulating

Every testbench is self-contained. It prints
`TB_RESULT checks=<n> failures=<n>` and ends. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/tpc_pkg.sv tb/tb_tpc_top.sv \
          --top-module tb_tpc_top -o sim && ./obj_dir/sim
```

Replace `tb_tpc_top` with any other testbench in `tb/`, for example
`tb_t2_prefetcher` or `tb_pf_queue`.

`tb_tpc_top` runs the whole design at its default parameters in about
10 seconds. It drives synthetic programs and a behavioural memory that answers
prefetches with the stored word:

- a strided array walk;
- an array of pointers;
- a linked list that is later changed, to force a chain correction;
- stores in random line order within dense regions, and random stores with
  no pattern;
- a 300-cycle stall of the memory side, which overfills the queue.

It counts every mechanism: loop iterations, T2 and P1 ownership, pointer
marks, chain steady state and reset, C1 decisions, region prefetches, drops and
C1-first drops. It fails if any of them never happens. It also checks that every
prefetch lies on one of the program's patterns and goes to the right level:
T2 addresses on the strided stream ahead of the current element, P1 addresses
at a pointer target or a list node, and C1 addresses inside a dense region.

## How far it can be trusted

- Every module has a testbench that compares it with an independent model,
  worked out by hand or computed in the testbench. Where a module has a
  random mode (queue, taint unit, prefetch engine, loop averaging, region
  monitor, coordinator), it runs hundreds of random cases.
- Each testbench has been shown to fail on a deliberately broken copy of its
  module.
- Each request output (`t2_pf_engine`, `p1_prefetcher`, `c1_prefetcher`,
  `pf_queue`) carries a concurrent assertion that a presented request stays
  unchanged until it is accepted. Verilator checks these when run with
  `--assert`.
- The tests use synthetic access streams, not real programs. Nothing here
  measures speed-up, accuracy or coverage on benchmarks.
- The interface to a core (how events are delivered, how prefetch data comes
  back) is this design's own, and untested against a real pipeline.

## Where this design departs from the original description

- **NLPCT size.** The prose gives the non-loop table 20 entries and the
  storage table gives 16. This design uses 20.
- **Widths and storage.** Field widths are not specified. Everything is kept
  at 64 bits, which makes storage about 6.3 KB instead of 4.57 KB.
- **Instruction state bits.** These are a separate array with 8192
  instruction slots. The slot count follows from the stated 2 KB / 1 KB
  budgets. The bits are indexed by PC and cleared on an I-cache fill. The
  original keeps them inside the I-cache lines. Its 64 KB instruction cache
  would hold 16384 four-byte instructions, twice the number of slots the
  budget pays for. This design follows the budget.
- **Value delivery to P1.** Loaded values reach P1 in two ways: with the
  executed memory event, and as the data of returned prefetches (`resp_*`).
  How the values are delivered is this design's choice.
- **Pointer-chain rule.** The chain is followed as `A(n+1) = M[A(n)] + offset`,
  where A is the load's own address. Writing it with the pointer value instead
  gives `A(n+1) = M[A(n) + offset]`; both name the same nodes. The
  check and correction time-outs (32 and 64 instances), and the 1024-instruction
  taint-walk limit are this design's choices.
- **T2 run refusal.** A run that the busy prefetch engine refuses is dropped
  rather than queued. A strided instruction whose SIT entry is evicted goes
  back to observation.
- **Region monitor input.** One passage has the region monitor updated on
  every cache access. Another says each component may ignore addresses that
  belong to the others. This design follows the first: the monitor sees all
  accesses, but only instructions steered to C1 are monitored and prefetched
  for.
- **Drop policy.** Under memory pressure, C1 requests are dropped first. Here
  this policy is in the prefetch queue, not in a memory controller.
- **Not built:**
  - The variant that runs existing prefetchers as the components, with
    round-robin assignment. It is an alternative configuration, not the
    design's main one.
  - The multicore shared-memory system. For 4 cores, use one `tpc_top` per
    core.
