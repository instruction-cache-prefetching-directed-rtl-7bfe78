# BIB prefetching: an instruction fetch front end whose prefetches follow the branch predictor

A small on-chip instruction cache loses many cycles to misses. A classic remedy
is to prefetch the next sequential line. That works until the program branches.
Table-driven schemes instead key a prediction table on the current *line*
address, and they break down once a line holds several branches. This front end
keys the prefetch on the *branch* instead. Every entry of the branch target
buffer gets one extra field: a line address to prefetch when that branch is
fetched again. The field holds the first line of the basic block that followed
the block this branch led to, last time round. A hit in the buffer therefore
starts fetching code about two basic blocks ahead of the fetch unit. This
scheme is known as branch-instruction-based (BIB) prefetching. When the buffer
misses, moving into a new line prefetches the next sequential line, as usual.

This repository holds synthesizable SystemVerilog for the whole front end:
* the extended BTB (EBTB);
* the small index FIFO that keeps the EBTB's prefetch fields up to date;
* the instruction cache and the fully associative prefetch buffer;
* the prefetch controller, the fetch unit and the request port to the L2.

Self-checking testbenches come with it. The processor behind the front end
(decode and execute stages) and the L2 cache are not part of the RTL. The
testbenches model them.

## Block map

```
                 +--------+   lookup pc / prediction, index   +-------------+
 res (branch) -->|  ebtb  |<--------------------------------->| fetch_unit  |--> if_* (to decode)
                 +--------+                                    +-------------+
                   ^   | prefetch line (on hit)                 | block addr  | miss = !cache & !buffer
  pfw (line for    |   v                                        v             v
  previous branch) | +---------------+ candidate = EBTB line  +------------+  +------------+
                   | | prefetch_ctrl |<-- or block addr + 1 --| icache     |  | l2_arbiter |--> l2_req
 dec_* -> +-----------------+        |-- on-chip check ------>| + 2nd tag  |  |  miss first|<-- l2_resp
          | ebtb_index_fifo | +------|-- pending prefetch --------------------->|            |
          +-----------------+        |                        +------------+  +------------+
                                                   fill (next cycle) ^               | every line
                                                          +-----------------+        |
                                                          | prefetch_buffer |<-------+
                                                          +-----------------+
```

| file | role |
|---|---|
| `rtl/bib_pkg.sv` | widths (32-bit addresses, 16-byte lines, 10-bit EBTB index), `resolve_t`, `events_t`, helpers |
| `rtl/ebtb.sv` | 1024-entry, 4-way LRU branch target buffer with a prefetch-line field |
| `rtl/ebtb_index_fifo.sv` | two-entry FIFO (toggle T/T', check bit C) that writes the prefetch fields |
| `rtl/icache.sv` | instruction cache, `SIZE_BYTES` × `WAYS`, fetch port plus a second tag port |
| `rtl/prefetch_buffer.sv` | 8-entry fully associative landing buffer for every returned line |
| `rtl/prefetch_ctrl.sv` | candidate choice, on-chip check, one pending prefetch |
| `rtl/l2_arbiter.sv` | single outstanding, line-wide request port; misses beat prefetches |
| `rtl/fetch_unit.sv` | PC, one instruction per cycle, stall on miss, redirect, new-line detection |
| `rtl/bib_frontend.sv` | top level, wiring only |

## How the prefetch fields are learned (the index FIFO)

This is the part that is least obvious. Take three consecutive branches, A, B
and C, on the committed path:

* A's EBTB entry must come to hold the line that B jumped (or fell through) to.
* At the time B resolves, A's index must still be known.

The decode stage offers the EBTB index of every branch it sees. For a branch
that missed in the EBTB, this is the entry it will be given. The FIFO keeps
two index registers:

* **Insert (decode).** If the check bit C is set, the index goes into the
  register selected by T, and C is cleared. The front end answers
  `dec_queued`, and the pipeline carries that bit with the branch.
* **Update (the cycle after execution).** When a queued branch resolves, its
  next PC is known: the target if taken, else PC + 4. The line of that PC is
  written into the EBTB entry whose index sits in the register selected by
  T' (= not T), which is the previous queued branch. Then T flips and C is set.

Insertions and updates therefore alternate. A branch decoded while the previous
queued branch is still unresolved finds C clear and is simply not queued. This
happens when two branches follow each other closely. It costs little, because
such branches usually share a line, and the prefetch made for the first branch
brings in the second one too. If an update and an insertion fall in the same
cycle, the update is applied first. In a pipeline without stalls, that is the
only case in which a branch right behind a resolving one can still be queued.

An EBTB entry allocated to a branch starts with its prefetch field marked
invalid. The field becomes valid when the next queued branch resolves.

## Choosing and issuing a prefetch

Every fetch cycle at most one candidate is formed. Rules are in priority order:

1. The fetched instruction hits the EBTB and its prefetch field is valid: the
   candidate is that line.
2. Otherwise, if this is the first fetch in a line different from the last one
   delivered: the candidate is the next sequential line.

The candidate is looked up in the cache's second tag port and in the prefetch
buffer. It is also compared with the line currently in flight to the L2. If it
is found anywhere, it is dropped. Otherwise it goes into a one-entry pending
register. A newer candidate overwrites an older pending one. A fetch miss for
the pending line cancels it, because the miss fetches that line itself. The
pending prefetch is sent only when the L2 port is idle and no fetch miss is
waiting.

## Where lines live

All lines returned by the L2 land in the prefetch buffer, demand misses
included. The fetch unit looks in the cache and the buffer in the same cycle.
When it takes an instruction from the buffer, the line is written into the
cache during the next cycle, and the buffer entry is freed at the end of that
cycle. The buffer still answers during the move, so a line can always be found
in exactly one place. An assertion in the top level checks this. Buffer
replacement prefers an empty entry, then round robin, and never takes an entry
that is being moved. Cache replacement is LRU per set.

## Interface and timing

* `if_valid`, `if_pc`, `if_instr`, `if_ebtb_hit`, `if_pred_taken`,
  `if_pred_next`, `if_ebtb_idx`: one instruction per cycle, combinational from
  the PC register. The pipeline must carry `if_pred_next` and `if_ebtb_idx` to
  execution.
* `dec_branch`, `dec_idx` → `dec_queued`: FIFO insertion from decode.
  Wrong-path instructions must not assert it.
* `res` (`resolve_t`): one cycle per resolved branch, in program order and on
  the committed path only. It carries PC, direction, target, EBTB index and the
  `queued` bit. The testbench presents it in the cycle after the ALU stage.
* `redirect_valid`, `redirect_pc`: after a misprediction the fetch restarts at
  the next edge. Nothing is delivered in the redirect cycle.
* `l2_req_valid`, `l2_req_ready`, `l2_req_line`: one request at a time.
  `l2_resp_valid` marks the single cycle in which `l2_resp_data` holds the
  128-bit line.
* `events` (`events_t`): eleven one-cycle flags for performance counters
  (stalls, misses, prefetches, candidates, drops, buffer use, moves, FIFO
  writes and refusals).

A hit costs nothing. A miss with an idle L2 port and a 3-cycle L2 delivers
4 cycles after the fetch first asked: the request in cycle 0, the line in the
buffer at the end of cycle 3, delivery in cycle 4. The end-to-end test checks
this on the cold start. Reset is asynchronous and active low. It clears every
valid bit and all control state. Tag and data arrays have no reset, because
they are read only behind valid bits.

## Parameters

| parameter | default | other values the scheme was evaluated with |
|---|---|---|
| `bib_frontend.CACHE_BYTES` | 2048 | 4096, 8192, 16384 |
| `bib_frontend.CACHE_WAYS` | 1 | 2, 4 |
| `bib_frontend.PFB_ENTRIES` | 8 | |
| `bib_frontend.RESET_PC` | 0 | |
| `bib_pkg::EBTB_ENTRIES`, `EBTB_WAYS` | 1024, 4 | |
| `bib_pkg::LINE_BYTES` | 16 (bus width 128 bits) | |

The default is the smallest organisation, a 2 KB direct-mapped cache. This is
the case where the scheme gains the most: with it, a 2 KB cache does better
than a 16 KB direct-mapped cache without prefetching.

## What follows the published scheme and what is this design's own

These follow the published BIB scheme:
* the entry fields;
* EBTB size, associativity, LRU and 2-bit counters;
* the lookahead rule (prefetch the block after the predicted one, not the
  predicted one);
* the two-entry FIFO with T, T' and C;
* the candidate rules and their priority;
* the on-chip check over cache and buffer;
* the 8-entry fully associative buffer that moves a used line into the cache
  the next cycle;
* fetch misses beating prefetches;
* the non-pipelined, line-wide, 3-cycle L2;
* the cache sizes and associativities.

These are choices made here:
* Every resolved branch is allocated an EBTB entry, taken or not, so that it
  can receive a prefetch line. A new counter starts weakly biased to its first
  outcome.
* The prefetch field has a valid bit. An EBTB hit without a recorded line falls
  back to the sequential rule.
* Without an EBTB hit, a sequential prefetch starts only on entering a new
  line, not on every EBTB miss.
* Only queued branches update the FIFO. An update in the same cycle as an
  insertion is applied first.
* There is one pending prefetch register. A newer candidate replaces it. A line
  in flight counts as on chip.
* Demand lines also pass through the buffer. The buffer replaces round robin;
  the cache replaces LRU.
* Addresses are 32 bits, there is no branch delay slot, the handshakes are
  valid/ready, and reset is as described above.

The surrounding processor is not modelled in RTL (the scheme assumes an
R3000-class five-stage pipeline), and neither is the L2.

## Verification

Each block has a self-checking testbench in `tb/`. Each one has directed cases
plus a random phase checked against an independent reference model:
* EBTB: counter saturation, LRU eviction, a set model;
* FIFO: numbering of the accepted branches;
* cache: a direct-mapped tag model and a 2-way LRU case;
* buffer: move timing, round robin, a resident-line list;
* controller: the selection rule;
* arbiter: priority, no preemption, exact 3-cycle latency, with `tb/l2_model.sv`;
* fetch unit: a reference PC walk.

`tb/bib_frontend_tb.sv` runs the top at its default parameters for one million
instructions. A synthetic program is generated from hash functions over a
16 KB code region. About one instruction in five is a branch: loop branches,
biased forward branches and far jumps. The testbench models decode, ALU and MEM
stages, including redirects and flushes. It checks that every committed
instruction is the next one of the program and carries the right word. It also
checks the 4-cycle cold-start latency, and fails if any of the design's
mechanisms never occurred. It traces each prefetch back to the rule that chose
it and counts how many prefetched lines the fetch later used. On this program,
about 91% of EBTB-directed prefetches are used, against about 68% of sequential
ones. At least one in five EBTB-directed prefetches must be used, or the test
fails. `tb/bib_cache_sweep_tb.sv` runs the same program
through all twelve cache organisations (using `tb/bib_run.sv`). It checks that
larger caches stall less. On that synthetic program it measures these MCPI
values (fetch stall cycles per instruction):

| size | direct | 2-way | 4-way |
|---|---|---|---|
| 2 KB | 0.076 | 0.078 | 0.076 |
| 4 KB | 0.046 | 0.042 | 0.037 |
| 8 KB | 0.021 | 0.017 | 0.015 |
| 16 KB | 0.011 | 0.011 | 0.011 |

These numbers describe the synthetic program only. They are not a
reproduction of the published SPEC95 results, which came from traces that are
not included here. No comparison against sequential or table-based prefetching
is built in.

Run any testbench with plain Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/bib_pkg.sv tb/bib_frontend_tb.sv \
          --top-module bib_frontend_tb -Mdir obj && obj/Vbib_frontend_tb
```

Replace the testbench name as needed. Each test prints
`TB_RESULT checks=N failures=M` and finishes. The end-to-end test runs in a few
seconds and the sweep in about 20 seconds.

## Known limits

* The L2 and the processor pipeline exist only as testbench models.
* A prefetch-field write goes to the named EBTB entry without re-checking its
  tag. If that entry was reallocated in between, it receives a stale
  prefetch hint. This is harmless for correctness.
* The EBTB and cache lookups are combinational (one-cycle lookup, as the scheme
  assumes). A high-frequency implementation would move them onto synchronous
  RAM macros, with the next PC computed one cycle early.
