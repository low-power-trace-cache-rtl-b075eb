# Low power trace cache fetch unit

An embedded processor spends a large part of its power in the instruction
cache: every fetch drives a wide set-associative array, and every taken branch
throws away the rest of the line just read. This fetch unit replaces the
instruction cache with three much smaller structures, tried in order of their
access energy:

1. a **fast hit buffer** (one trace line, looked up on every fetch),
2. a **trace cache** of 256 lines, each holding a *trace* of up to 20
   instructions, enabled only when the fast hit buffer misses,
3. an **instruction buffer** of 32 single words, enabled together with the
   trace cache and refilled from the L2 cache when both miss.

Traces are not fetched from memory. They are built from the instructions the
core actually completes, by the **filling logic** and the **line fill
buffer**, and then written into the trace cache. The published design this RTL
follows ("Low Power Trace Cache for Embedded Processor") reports about 99 %
hit rate for 256 trace lines plus a 32-entry instruction buffer on SPEC2000
integer programs, and about 18 % less fetch power than a 32 KB instruction
cache. Those figures come from that paper's simulations. This RTL has not been
measured against them.

```
 L2 ──► instruction_buffer ───────────────┐
        trace_cache ──────────────────────┤
          │      ▲                        ├─► fetch_ctrl (mux, PC) ─► fetch_queue ─► core
          ▼      │                        │                                          │
   fast_hit_buffer ───────────────────────┘                                          │
                 line_fill_buffer ◄── filling_logic ◄──── completed instructions ────┘
```

## Traces, partial tag matching and folding

A trace line is a run of instructions at consecutive addresses, from `start`
to `last`. The tag of a line (`trace_tag_t` in `rtl/lptc_pkg.sv`) holds these
two addresses. It also holds a *folded* flag and a `next_pc`.

**Partial tag matching.** A line hits for *any* fetch address in
`start..last`, not only for `start`. The word is then
`words[(addr - start) / 4]`. So a loop that jumps back into the middle of a
trace still hits. The trace cache cannot be indexed by low address bits,
because a range has no single index. It is therefore fully associative: each
of the 256 lines has two 32-bit comparators. When several lines match, the one
with the lowest index wins. Lines are replaced round-robin.

**Branch folding.** Suppose the core completes an unconditional direct branch
(class `K_JUMP`) right after the last instruction of the trace being built.
The branch is then not stored. The trace is closed with `folded = 1` and
`next_pc` = the branch target. Later, when fetch reads the trace's last word,
its next fetch address is `next_pc` instead of `last + 4`. The branch never
goes through the pipeline, which saves a cycle. The fetch packet carries
`folded = 1`, so the core knows the packet also stands for the jump after it.

**How traces are built** (`rtl/filling_logic.sv`). The filling logic watches
the core's completion report `ret`, one instruction per cycle. It only
collects instructions that were fetched from the instruction buffer, i.e.
trace-cache misses, so a stored trace is never written twice. The trace being
built is appended to while each instruction follows the previous one in
address. It is finished and written to the trace cache when:

| event | the instruction | trace tag |
|---|---|---|
| taken conditional branch (`K_COND`, taken) | stored, last word | not folded |
| call, return or indirect jump (`K_OTHER`) | stored, last word | not folded |
| unconditional direct branch (`K_JUMP`) after the trace | not stored | folded, `next_pc` = target |
| 20th instruction | stored, last word | not folded |
| address not consecutive, or instruction came from a trace | starts the next trace / ignored | open trace written as it is |

A not-taken conditional branch stays inside the trace. A trace that is closed
by its own last instruction is written one cycle later. A trace cut by the
next instruction is written in the same cycle that the next trace begins. The
line fill buffer supports this: `clear` and `push` together restart it.

The fast hit buffer holds the trace line most recently read from the trace
cache. Every trace cache hit copies the whole line (tag and 20 words) into it.
A program that runs through a trace then reads only this one register line.
The trace cache is not enabled again until the program leaves the trace. It
needs no invalidation when the trace cache replaces a line, because
instructions do not change.

## Fetch sequencing and timing

`rtl/fetch_ctrl.sv` owns the fetch PC and pushes at most one instruction per
cycle into the 8-entry fetch queue:

* Cycle *n*: the PC is looked up in the fast hit buffer. Only if it misses are
  the trace cache and instruction buffer enabled, still in cycle *n*. On any
  hit the packet `{pc, instr, next_pc, folded, src}` enters the queue at the
  edge ending cycle *n*, and the PC moves on to `next_pc`. That is a one-cycle
  hit from every source.
* If all three miss, the unit asks the L2 for `L2_BURST` (4) words starting at
  the missing address. The request is held until `l2_req_ready`. The words
  come back in address order on `l2_rsp_valid` cycles and are written into
  the instruction buffer. Fetch then repeats the lookup, which now hits. With
  an L2 that returns its first word 32 cycles after the request and then one
  word per cycle, a miss takes 37 cycles from the missed lookup to the
  delivered word.
* Next PC is `pc + 4`, or `next_pc` at the end of a folded trace. Branches are
  not predicted. The core corrects the PC with `redirect_valid/redirect_pc`,
  which also flushes the fetch queue. A redirect during an L2 refill only
  changes the PC; the refill completes.
* Nothing is looked up while the queue is full.

`events` (type `lptc_events_t`) gives one-cycle strobes for every lookup, hit,
L2 request, trace write, fold and queue-full stall. A power model multiplies
each strobe count by the energy per access of that structure.

## Interface of `lptc_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (clears valid bits, pointers, PC = `RESET_PC`) |
| `l2_req_valid`, `l2_req_addr` / `l2_req_ready` | out / in | L2 refill request, held until accepted |
| `l2_rsp_valid`, `l2_rsp_data` | in | refill words, `L2_BURST` of them per request, in address order |
| `deq_valid`, `deq_pkt` / `deq_ready` | out / in | head of the fetch queue (`fetch_pkt_t`) to the core |
| `redirect_valid`, `redirect_pc` | in | the core's correct next PC after a wrong `next_pc`; flushes the queue |
| `ret` | in | instruction completed this cycle (`retire_t`): pc, word, class (`ctrl_kind_e`), taken, target, and the `src` field of its fetch packet |
| `events` | out | activity strobes |

The unit does not decode instructions. The core reports the class of each
completed instruction:

* `K_PLAIN`: no control transfer.
* `K_COND`: conditional direct branch.
* `K_JUMP`: unconditional direct branch with no side effect. Only this class
  can be folded.
* `K_OTHER`: call, return, indirect jump or anything else that must be
  executed.

When a packet has `folded = 1` and falls through, the core must treat the
jump after it as executed, with target `next_pc`.

## Parameters

| parameter | default | origin |
|---|---|---|
| `TC_ENTRIES` | 256 | paper's embedded configuration |
| `TRACE_LEN` | 20 | paper: line fill buffer of 20 instructions, best trace length 17–20 |
| `IB_ENTRIES` | 32 | paper's embedded configuration (it also cites 64 in its introduction) |
| `IFQ_DEPTH` | 8 | paper's simulated fetch queue |
| `L2_BURST` | 4 | own choice |
| `RESET_PC` | 0 | own choice |

The paper also evaluates 32–1024 trace lines and 8–128 instruction buffer
entries. Those sizes are parameter overrides.

## What follows the paper and what is this design's own

From the paper:
* the five structures and how they connect;
* the lookup order and the gating (TC and IB enabled only on a fast hit
  buffer miss);
* start/end tags with range matching;
* folding of unconditional branches;
* 20-word traces filled at completion;
* the sizes 256 / 32 / 8 and the one-cycle hit;
* the 32 + 1-per-word L2 timing used by the testbench.

Own choices, not given by the paper:
* a trace is one run of consecutive addresses, so range matching can select
  a word by offset;
* the exact end-of-trace rules in the table above;
* traces are built only from trace-cache misses, and every finished trace is
  stored;
* full associativity, lowest-index priority and round-robin replacement of
  the trace cache;
* the instruction buffer as a fully associative, one-word-per-entry FIFO;
* the 4-word refill;
* no branch prediction beyond folding, and the redirect protocol;
* reset behaviour, 32-bit addresses and instructions.

Departures and limits:
* The paper selects a "dominant set" of traces for the trace cache and
  leaves the rest to the instruction buffer, but does not say how. Here
  every trace built from misses is stored.
* The paper's fast hit buffer description is ambiguous about which line it
  keeps. Here it holds the most recently read line.
* All three lookups and the source multiplexer are in one combinational
  path. A real implementation may need to pipeline it.
* The core, the L2 cache and the power model are not part of the RTL.

## Files

`rtl/`:
* `lptc_pkg.sv`: types and default sizes.
* `lptc_top.sv`: the fetch unit.
* `fetch_ctrl.sv`: PC, lookup order, source multiplexer, L2 refill.
* `fast_hit_buffer.sv`, `trace_cache.sv`, `instruction_buffer.sv`.
* `line_fill_buffer.sv`, `filling_logic.sv`.
* `fetch_queue.sv`.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog.
`tb_lptc_top` runs the whole unit at its default sizes:

* A generated program of 80 loop regions with conditional branches, jumps,
  calls, returns and long straight-line blocks, about 8 000 instructions.
* A behavioural core that executes the program and compares every fetched word
  and the completed PC stream with a reference run.
* An L2 model: first word after 32 cycles, then one word per cycle.

It counts each mechanism and fails if one never occurs:

* hits in each structure, and partial (mid-line) hits;
* L2 refills;
* trace writes, including folded ones and ones cut at 20 words;
* trace cache replacement;
* folded fetches, queue-full stalls and redirects.

It also prints the hit rates. The synthetic program is small, so they are far
below the paper's.

`tb_lptc_configs` runs four copies of the unit side by side, at t32/i8,
t128/i16, t256/i32 and t512/i128 (*tN/iM* = N trace lines, M instruction
buffer words). Each copy sits in `tb/lptc_env.sv`, which holds the same kind of
environment. All copies run one fixed-seed program, about 23 000
instructions, made of the 80 regions repeated three times by an outer loop.
Each copy checks its own instruction stream. The testbench also checks that
the share of fetches served from traces does not fall as the trace cache
grows. A typical run prints:

| config | fast hit buffer | fhb + trace cache | all three |
|---|---|---|---|
| t32/i8 | 0.54 | 0.63 | 0.92 |
| t128/i16 | 0.55 | 0.65 | 0.93 |
| t256/i32 | 0.55 | 0.65 | 0.93 |
| t512/i128 | 0.71 | 0.86 | 0.97 |

This program needs about 313 trace lines. Any cache smaller than that thrashes
under round-robin replacement, so the jump only comes at 512 lines. These are
properties of the synthetic program. They do not reproduce the paper's
SPEC2000 results, which cannot be run without a processor core.

Running a testbench with Verilator 5 (package first):

```
verilator --binary --timing --assert --top-module tb_lptc_top \
    rtl/lptc_pkg.sv rtl/*.sv tb/tb_lptc_top.sv -Mdir obj && obj/Vtb_lptc_top
```

The unit testbenches need only the package, their module, and (for
`tb_filling_logic`) `line_fill_buffer.sv`.
