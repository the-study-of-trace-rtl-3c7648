# A trace cache for a 2-wide superscalar DLX

A trace cache stores instructions in the order in which they were *executed*,
not in the order in which they sit in memory. One cache line can then hold the
end of one basic block, a taken conditional branch, and the start of the block
it jumped to. A conventional instruction cache has to fetch those two pieces
separately.

This RTL implements such a trace cache for a small, 2-instruction-wide
superscalar DLX processor. Lines are short (4 or 8 instructions) and hold at
most two basic blocks. The trace cache is **passive**:

- It watches the processor's fetch stage.
- It builds traces from the instructions the dispatcher actually accepts.
- On every fetch it reports whether the fetched instruction would have been
  found in the trace cache, and counts hits and misses per line.

The processor is not changed, and no instruction from the trace cache is fed
back into its pipeline. The `hit_instr`/`hit_count` outputs show what a hit
would supply, for a designer who wants to close that loop.

```
 fetch regs A/B ─► tc_gather ─► tc_fill_buffer ─► tc_transfer ─► tc_memory
 dispatch strobes ┘                                    ▲  (sel port) │
                                                       └─────────────┤
 PC load / PC ───────────────────────────────► tc_hit_logic ◄────────┘ (lk, hl ports)
 all events ─────────────────────────────────► tc_stats
```

## Interface of the top, `trace_cache_system`

| group | signals | meaning |
|---|---|---|
| fetch stage | `a_valid a_instr a_addr`, `b_valid b_instr b_addr` | The two fetch stage registers; A is the older. Addresses are word addresses (byte address bits 31..2). |
| dispatcher | `a_dispatch b_dispatch` | The register's instruction is accepted this cycle. |
| access | `pc_write pc` | The fetch unit loads its PC with a new address. Each load is one trace cache *access*. |
| reference | `ic_hit` | The instruction cache hit for the same access. It is only counted, for comparison. |
| outcome | `first_tag_hit content_hit comp_miss conf_miss` | Exactly one is set in an access cycle (combinational). |
| supplied | `hit_line hit_slot hit_count hit_instr[2]` | On a hit: the line and slot that matched, and the one or two instructions from there on. |
| totals | `n_access n_ic_hit n_ftag_hit n_cont_hit n_comp_miss n_conf_miss n_write n_overwrite n_drop n_overflow space_used` | Running counters (`W` bits, wrap). |
| per line | `line_sel` → `l_comp_miss l_conf_miss l_write l_overwrite l_longest l_ftag_hit l_cont_hit` | Counters of one line, read combinationally. |
| events | `ev_rule1 ev_rule2 ev_rule3` | Fill-buffer rows closed by each termination rule this cycle (one bit per placed instruction). |

There is one clock, and the reset is synchronous and active high.

## Building traces

### Gathering (`tc_gather`)

The dispatcher may accept both fetched instructions, only A, or neither.
An instruction that is not accepted stays in its fetch register and is offered
again in a later cycle. To copy every instruction exactly once, the gathering
unit samples a register only in the cycle its dispatch strobe is high.

The accepted instructions are registered for one cycle, in program order. If
only B was accepted (A had gone earlier), B is presented in slot 0. The
instruction classifier tags each instruction as one of:

- **conditional branch**: BEQZ, BNEZ
- **delimiter**: J, JR, JAL, JALR, TRAP, RFE
- **plain**: everything else

The opcode numbers are the standard DLX encoding (`tc_pkg`).

### Fill buffer and fill policy (`tc_fill_buffer`)

The fill buffer has `ROWS` = 4 rows of `SLOTS` instruction/address pairs. Each
row also carries its trace information: a ready flag, the trace size, a
branch-existing flag and the branch position.

The one or two gathered instructions are placed one after the other into the
current row. The row is closed, becomes ready, and filling moves to the next
row, in three cases:

1. **Full.** An instruction fills the last slot. With two arrivals there are
   two cases:
   - The first arrival fills the row and the second starts the next row.
   - Both arrivals exactly fill the last two slots, and the next row starts
     empty.
2. **Delimiter.** The delimiter is placed, then the row closes. Traces never
   continue across an unconditional jump, trap or RFE.
3. **Second conditional branch.** A row may hold only one conditional branch,
   so a trace holds at most two basic blocks. When a second branch arrives,
   the row closes *without* it, and the branch becomes the first instruction
   of the next row.

Up to two rows can close in one cycle, for example with two delimiters.

**Draining.** The oldest ready row is shown to the transfer unit every cycle
and is always consumed in that cycle, so one row drains per cycle.

**Overflow.** The trace cache cannot stall the processor. If rows close faster
than they drain, the fill pointer can reach a row that is still waiting. That
waiting trace is then discarded and `n_overflow` counts it. With 4 rows this
needs a long run of back-to-back delimiters.

### Transfer into the cache (`tc_transfer`, `tc_memory`)

The cache is direct mapped. The line index is the low `log2(LINES)` bits of
the word address of the trace's first instruction, that is byte-address bits
2 and up.

A ready trace is written if it holds **more than one instruction** and one of
these holds:

- the selected line is empty;
- the line holds a trace that starts at a different address;
- the line holds a trace that starts at the same address and is **not longer**
  than the new one.

Otherwise the trace is dropped (`n_drop`). A drop keeps a longer trace that
starts at the same address from being replaced by a shorter one.

A line stores:

- a valid bit;
- `tag1`, the full word address of the first instruction;
- `tag2`, the word address of the instruction that follows the conditional
  branch inside the trace. It is a copy of `tag1` if there is no branch, or if
  the branch is the last instruction;
- trace size − 1;
- the branch-existing flag;
- the branch position;
- the instructions themselves.

The individual instruction addresses are *not* stored.

A write counts as an **overwrite** when it replaces a valid line with a
different trace: a different `tag1`, size or `tag2`.

## Finding instructions: the hit logic (`tc_hit_logic`)

This is the part that differs most from an instruction cache. An
instruction-cache tag covers every word of its line. A trace line covers a
run of consecutive addresses from `tag1`, up to and including the branch,
then a second run from `tag2`. And since the fetch path is only two
instructions wide, a 4- or 8-instruction line is consumed over several fetches.

Every PC load is classified as exactly one of:

- **First-tag hit.** The line indexed by the PC is valid and its `tag1`
  equals the PC. The hit logic then remembers this line: a line-hit flag, the
  line index, its `tag1`, and the next slot that may still hit (slot 1).
- **Content hit.** There was no first-tag hit, the line-hit flag is set, the
  remembered line still holds the same trace (valid, same `tag1`), and the PC
  equals the address of a slot `j` of that trace, with
  `next ≤ j < size`. The smallest such `j` is taken and `next` becomes
  `j+1`, so a trace can only be followed forwards.
- **Compulsory miss.** Neither hit, and the indexed line is empty.
- **Conflict miss.** Neither hit, and the indexed line holds another trace.

Any miss clears the line-hit flag.

Because per-slot addresses are not stored, the address of slot `j` is
rebuilt from the trace information:

```
no branch, or j <= br_pos :  addr(j) = tag1 + j
j > br_pos                :  addr(j) = tag2 + (j - br_pos - 1)
```

This is exact: inside a trace, the only place where the address stream can
jump is after the single conditional branch, because delimiters end traces.
If the branch was not taken, `tag2 = tag1 + br_pos + 1`, and the two formulas
agree.

Example with 4 slots. A trace holds `100, 101 (BNEZ, taken), 240, 241`. It
stores `tag1=100`, `br_pos=1`, `tag2=240`. A fetch from 100 is a first-tag
hit. A later fetch from 240 is a content hit on slot 2 and supplies
`240, 241`.

`hit_instr[0..1]` and `hit_count` give the instructions from the matched slot
on, up to the end of the trace.

## Statistics (`tc_stats`)

For each access the unit counts the outcome, and the instruction-cache hit for
reference. For each transfer it counts writes, overwrites and drops, plus
fill-buffer overflows. Per line it keeps:

- compulsory and conflict misses (booked on the indexed line);
- first-tag hits (indexed line);
- content hits (the line that hit);
- writes and overwrites;
- the longest trace ever written.

`space_used` is the sum of those longest traces. Space usage is
`space_used / (LINES × SLOTS)`, the share of the cache that traces ever filled.
The total hit rate is `(n_ftag_hit + n_cont_hit) / n_access`, and the hits of
one line are `l_ftag_hit + l_cont_hit`.

## Timing

| cycle | event |
|---|---|
| n | dispatcher accepts an instruction (`a_dispatch`/`b_dispatch`) |
| n+1 | the instruction is on the gather register, and is placed in the fill buffer at the edge ending n+1 |
| n+2 | a row closed at that edge is presented to the transfer unit and written at the edge ending n+2 |
| n+3 | the new line can hit |

Access outcomes are combinational in the cycle of `pc_write`. The hit logic's
line-hit state, and all counters, update at the following edge. Memory reads
show the contents before the write of the same cycle.

## Parameters and configurations

| parameter | default | range | meaning |
|---|---|---|---|
| `SLOTS` | 4 | 4 (TC_4) or 8 (TC_8); any power of two ≥ 2 | instructions per trace line and fill-buffer row |
| `LINES` | 4 | 4 … 512, power of two | trace cache lines |
| `ROWS`  | 4 | ≥ 2 | fill-buffer rows |
| `W`     | 32 | | counter width |

The design was studied at 4 and 8 instructions per line and 4 to 512 lines.
The defaults are the smallest point, TC_4 with 4 lines (16 instructions).
Storage is flip-flops with asynchronous read ports. A large configuration
would normally map the instruction part onto a RAM with a registered read.
That changes the hit timing by a cycle and is not done here.

## Where this implementation makes its own choices

- **Replacement test.** The write rule above replaces a same-start trace when
  the new one is *at least as long*. A strict "longer than the stored trace"
  rule would never let one full-length trace replace another in the same
  line. The rule here allows replacement and so lets lines be overwritten as
  the program moves on.
- **Line selector at bit 2.** Instructions are word aligned, so byte-address
  bit 2 is the lowest useful bit.
- **Overflow policy.** The oldest waiting trace is discarded. Nothing stalls.
- **Trace-size field** in the fill buffer is one bit wider than the branch
  position, so that it can count to `SLOTS`. The cache stores size − 1 in
  `log2(SLOTS)` bits.
- **Hit rule details.** These are all choices of this implementation:
  - the forward-only `next` pointer;
  - first-tag hits take priority over content hits;
  - rebuilding slot addresses from `tag1`/`tag2`/`br_pos`;
  - content hits count only on the line last hit by its first tag.
- **Dispatcher interface.** One accept strobe per fetch register, plus one
  register stage in the gathering unit.
- **Not built.** The processor itself, its fetch unit, instruction cache,
  address translation and branch target buffer, and a selector that would let
  the trace cache actually supply instructions. The top brings out the
  signals these would connect to.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_tc_instr_classify` | all 64 opcodes |
| `tb_tc_gather` | random A/B valid/dispatch patterns against an expected packing |
| `tb_tc_fill_buffer` | directed rule-1 cases and rule 3, then random traffic with delimiter bursts. Compared every cycle with a queue model (`tc_ref_pkg`), overflow included. |
| `tb_tc_transfer` | random rows and line states against the write/drop/overwrite rule |
| `tb_tc_memory` | writes and three read ports against a shadow array; reset |
| `tb_tc_hit_logic` | random traces with and without taken branches. The expected outcome is found by searching real per-slot addresses, not the reconstruction formula. |
| `tb_tc_stats` | random events against shadow counters, per-line values, `space_used`, reset |
| `tb_trace_cache_system` | End to end at default parameters, for 20,000 cycles. A synthetic DLX program (loops, biased branches, jumps, a chain of back-to-back jumps) is walked by a fetch/dispatch model that accepts 2, 1 or 0 instructions per cycle. Every access outcome, slot and supplied instruction is compared with the reference model in `tc_ref_pkg`, which keeps real addresses per slot. So do the final counters. Each mechanism must occur: both rule-1 cases, rules 2 and 3, single dispatch, write, overwrite, drop, overflow, both hit kinds, both miss kinds. |
| `tb_trace_cache_system_tc8` | the same, with 8-instruction lines and 16 lines |
| `tb_tc_workloads` | Small DLX programs run through four configurations side by side: TC_4 and TC_8, each with 4 and 64 lines (`tc_workload_lane`). The programs are a bubble sort on ascending, random and descending data, a prime sieve up to 20, 50 and 100, a permutation generator over 5 elements, and an integer 8-point DCT over the rows of an 8×8 block. A small instruction-set model executes them, and their results are checked. Every access of every lane is checked against the reference model. Hit, miss and space-usage rates are printed per program and configuration. |

The reference model `tb/tc_ref_pkg.sv` is written independently of the RTL.
Traces are queues of instruction/address pairs there.

### Running with Verilator

The package must come first on the command line:

```
verilator --binary --timing --assert rtl/tc_pkg.sv $(ls rtl/*.sv | grep -v tc_pkg) \
    tb/tc_ref_pkg.sv tb/tb_trace_cache_system.sv --top-module tb_trace_cache_system -o sim
./obj_dir/sim
```

Replace the last testbench file and `--top-module` to run another testbench.
The unit testbenches that do not use the model do not need `tb/tc_ref_pkg.sv`,
but including it does no harm. `tb_tc_workloads` also needs
`tb/tc_workload_lane.sv`. Each run takes a few seconds.

A sample of what `tb_tc_workloads` prints shows how the configurations
compare. The dispatch pattern is random, so the numbers move a little from run
to run:

```
pn-100   TC_4   4L  hit 60.6% (ftag 37.9 cont 22.7)  miss comp  6.8 conf 32.6  space 93.8%
pn-100   TC_4  64L  hit 81.0% (ftag 52.5 cont 28.5)  miss comp 19.0 conf  0.0  space 12.1%
pn-100   TC_8   4L  hit 74.7% (ftag 26.7 cont 47.9)  miss comp  1.2 conf 24.2  space 68.8%
pn-100   TC_8  64L  hit 82.9% (ftag 30.5 cont 52.4)  miss comp 17.1 conf  0.0  space  4.9%
```

More lines remove conflict misses, but most of the extra space is never used.
Wider lines shift hits from first-tag to content hits.
