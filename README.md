# RingBOOM-style banked out-of-order integer core

A wide out-of-order core spends much of its area and cycle time on a few
structures: the physical register file (about 2N read and N write ports for an
N-wide machine), the bypass network (N² paths) and the issue queues (a wakeup
port per result bus). This core cuts all three by arranging the execution
resources as a **ring of columns**:

* There are four columns. Each has its own issue queue, its own single-cycle
  ALU and its own **bank** of 32 physical registers (128 in total).
* Every result is written into the bank of the column that produced it. Two
  ALUs never compete for a bank's write port.
* A column hears fast wakeups only from its **left neighbour**. Its operands
  bypass only from the left neighbour's ALU and fast writeback register. Wakeup
  and bypass cost therefore stays the same whatever the width.
* Rename places a micro-op directly **to the right of** the producer it waits
  for. A chain of dependent single-cycle operations then walks around the ring
  and executes back to back, one per cycle.

Rename enforces this placement. Two extra mechanisms cover the cases it
cannot: a micro-op waiting on two different producers, and contention for
shared resources.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. Each block has its
own file in `rtl/` and a self-checking testbench in `tb/`.

## Pipeline

```
REN ─► DIS ─► ISS ─► ARB ─► RRD ─► EXE ─► WB ─► (ROB) CMT
```

| Stage | Blocks | What happens |
|-------|--------|--------------|
| REN | `rename_stage` (with `column_arbiter`, 4× `free_list`) | Up to 4 decoded micro-ops. Map/busy/load-table lookup with intra-bundle bypass, column choice, destination allocated from the chosen column's bank, ROB allocation. |
| DIS | `dispatch_queue`, `dispatch_xbar` | Two-entry compacting queue of bundles, then a crossbar giving each issue queue at most 2 micro-ops per cycle. |
| ISS | 4× `issue_queue` (each `SIZE+2` × `issue_slot`), `chain_xbar` | Wakeup and oldest-first selection, one micro-op per column. Index bumps have a high-priority request. Dummy micro-ops send chained wakeups. |
| ARB | `eu_arbiter`, `rf_read_arbiter`, `wb_arbiter` | Shared-unit, register-read-port and writeback-slot arbitration. Losers go back to their slot. |
| RRD | 4× `regfile_bank`, 4× 2 `bypass_select` | Bank read through the address/data crossbars and the operand bypass mux. |
| EXE | 4× `column_alu`; shared `mul_unit`, `divider`, memory port; `mispredict_sel` | ALUs in place; they also resolve branches. Shared units are reached through an operand crossbar. The oldest branch mispredict of the cycle is selected. |
| WB | `fast_wb_xbar`, `slow_wb_xbar` | Two write ports per bank: fast (ALUs, multiplier) and slow (loads, divider). |
| CMT | `rob` | In-order commit of up to 4 per cycle. The stale register goes back to its bank's free list. |

`ringboom_core` wires all of this together. `rb_pkg` holds the shared
constants, types and helper functions.

### Timing of one ALU micro-op (cycle numbers relative to its ARB cycle *A*)

| Cycle | Event |
|-------|-------|
| A-1 | Selected in ISS. This **fast wakeup** reaches the issue queue of the next column, so a dependent there can be selected in cycle A. |
| A | Arbitration. If the micro-op is killed, the dependent's operand is reverted to not ready (`kill_prev`). A dependent already selected is killed in its own ARB stage one cycle later, using the `spec` flags carried with it. |
| A+1 | Register read / bypass into the operand registers. |
| A+2 | ALU. The result bypasses straight into the next column's operand register. |
| A+3 | Fast writeback register, which is bypassable by the next column. The bank is written and the busy bit cleared. |

The multiplier (3-stage pipeline) reaches its fast writeback register at A+5.
`wb_arbiter` reserves that slot when the multiply passes ARB. An ALU micro-op in
the same column that would need the same slot is killed in ARB.

Loads are woken by the memory system (`ld_wk_*`). The wakeup goes to **every**
column. The data follows exactly 3 cycles later, which is when a consumer woken
by it reaches its operand registers, and it comes in through the load-hit
bypass.

## Column steering (rename)

For each micro-op of the bundle, `column_arbiter` applies these rules:

| prs1 waiting on a non-load? | prs2 waiting on a non-load? | Column |
|---|---|---|
| yes | – | producer of prs1 + 1 |
| no | yes | producer of prs2 + 1 |
| no | no | random |

* **Producer column.** The producer's column is the bank of the source
  register. If the producer sits earlier in the same bundle, it is that
  micro-op's chosen column.
* **Random choice.** A 16-bit LFSR supplies it, rotated per lane.
* **Load operands.** Operands that wait only on a load count as not waiting.
  Load wakeups and load data reach all columns, so the consumers of one load
  can spread over the columns and run in the same cycle.

The destination register is then allocated from the free list of the chosen
column. This bank = column rule is what removes writeback bank conflicts.

### Two-waiting micro-ops and chained wakeups

A micro-op can wait on two non-load producers in different columns. It then
cannot sit next to both. Rename splits it in two:

* The **main** micro-op goes to the right of prs1's producer.
* A **dummy** micro-op goes to the right of prs2's producer. The dummy never
  executes.

When prs2 becomes ready (and no longer speculative), the dummy asks its
queue's chain selection to forward the tag. `chain_xbar` carries it to the
main micro-op's column, which receives it on the fourth wakeup port of every
slot (the **chain** port). The dummy then leaves its queue.

Each issue slot thus has exactly four wakeup ports:

* **fast:** the previous column's ALU issue, speculative for one cycle;
* **load:** broadcast;
* **slow:** writes into the previous column's bank;
* **chain.**

### Dispatch limits

An issue queue accepts at most 2 micro-ops per cycle, dummies included.
Rename accepts the lanes of a bundle as an in-order prefix. It stops at the
first lane whose column (or dummy column) is already full for this cycle, whose
bank has no free register, or that finds the ROB full.

`dispatch_queue` is a two-entry queue. Rename therefore sees only "second entry
empty" and never waits on dispatch logic. Micro-ops keep snooping wakeups while
they sit in it.

## The ARB stage

Selection in ISS only looks at operand readiness. Every resource conflict is
settled one stage later, so the wakeup-select loop stays short.

* `eu_arbiter`: one micro-op per shared unit (memory port, multiplier,
  divider). The winner is chosen by rotating priority; the pointer moves past
  the last winner, which also keeps nearby loads and stores roughly fair. A
  divide that finds the divider busy is cancelled.
* `rf_read_arbiter`: an operand requests a read only if it is used, is not x0
  and will not come from a bypass.
  * A request takes any free port of its bank, so the ports are allocated
    flexibly rather than fixed to rs1 or rs2.
  * Columns are served in rotating order.
  * A request for a register that another request already reads this cycle
    shares that port (read sharing).
  * The default is 3 read ports per bank.
* `wb_arbiter`: the fast-writeback reservation described above.

A micro-op that loses any of these goes back to its slot as ready and
unissued. Its fast wakeup is reverted in the next column, and dependents that
were already selected are killed as well. An issued slot leaves the queue only
after the ARB verdict of the next cycle. Queue compaction therefore never
depends on the current cycle's grant.

## Register read and bypass

Each operand register picks its value from one of these sources, in order:

1. zero, for x0 / p0;
2. the previous column's ALU output (single cycle);
3. the previous column's fast writeback register;
4. the load-hit path;
5. the bank read port given by the arbiter.

The number of bypass inputs per operand does not grow with the number of
columns.

## Writeback

* **Fast crossbar** (`fast_wb_xbar`). Each ALU writes its own bank. The
  multiplier writes the bank of its destination, which is the bank of the
  column it issued from. Collisions are excluded in ARB, so this crossbar never
  stalls. Its registered output doubles as a bypass source.
* **Slow crossbar** (`slow_wb_xbar`). Loads and the divider use the second
  write port.
  * A load always wins.
  * The divider keeps its result until its bank's slow port is free of a load
    and that bank's fast port is idle in the same cycle. The next column
    therefore never gets a slow and a fast wakeup at once.
* **Busy bits.** They are cleared by the fast writes, the divider write and the
  load wakeup. The rename lookup bypasses clears from the same cycle.

## Commit and recovery

`rob` holds 128 entries and commits up to 4 per cycle, in order. Each commit:

* returns the stale physical register to its bank's free list;
* updates the committed copy of the map table.

**Commit-snapshot restore.** The committed map and the committed free-list
state are what the flush path uses. A `flush` input on rename, the free lists,
the queues and the arbiters restores the committed state in one cycle.

This core never flushes itself. It reports branch mispredicts but leaves the
redirect to the front end, and its memory system never fails a load. So the
top ties `flush` low. The restore itself is
exercised by the rename testbench.

## Branch resolution

Any column ALU can resolve a branch, so several mispredicts can appear in the
same cycle. Only the oldest one matters: it is the one that would redirect
fetch and discard everything younger.

`mispredict_sel` keeps this selection shallow:

* Each requester's age is its ROB index minus the ROB head.
* All pairwise "older than" comparisons are made at once.
* A requester wins when it is older than every other valid requester.

The result is a one-hot grant after one level of comparators and an AND per
requester, with no chain of comparisons that grows with width. The core reports
the winner on `br_mis_*`. It does not flush itself, because the front end that
would have fetched the wrong path lives outside it.

## Top-level interface (`ringboom_core`)

| Group | Signals | Meaning |
|-------|---------|---------|
| Front end | `in_valid[4]`, `in_uop[4]` (`dec_uop_t`), `in_accept` | Decoded micro-ops in program order; `in_accept` lanes were taken this cycle. |
| Memory request | `mem_v`, `mem_st`, `mem_addr`, `mem_wdata`, `mem_pdst`, `mem_rob` | One load or store per cycle (rs1 + imm). A store counts as complete at once. |
| Load return | `ld_wk_v`, `ld_wk_tag`, `ld_wk_rob`, then `ld_data` 3 cycles later | At most one load per cycle; any delay before the wakeup. |
| Branch resolution | `br_mis_v`, `br_mis_rob`, `br_mis_col` | The oldest branch that resolved against its prediction this cycle, for the front end to redirect. |
| Observation | `rf_fast_*`, `rf_slow_*`, `cmt_*` | Register writes and commits; a store is performed by memory when `cmt_is_st`. |
| Events | `ev` (`events_t`) | One bit per mechanism per cycle (split, chain, fast wakeup, each kind of ARB kill, divide cancel, each bypass path, read sharing, high-priority issue, divider wait, rename stall, dispatch stall). |

Micro-ops (`op_e`):

* ADD, SUB, AND, OR, XOR, SLL, SRL, SRA, SLT, SLTU (column ALU);
* BEQ, BNE, BLT, BGE (column ALU, no destination; `imm[0]` holds the predicted
  direction);
* MUL (shared, pipelined) and DIV (shared, iterative, 64 cycles);
* LD and ST (memory port).

Any of them except ST and the branches may take a 32-bit sign-extended
immediate in place of rs2.

Parameters of the top and their defaults:

| Parameter | Default | Meaning |
|-----------|---------|---------|
| `IQ_SIZE` | 8 | Slots per column (a 32-entry window). |
| `RD_PORTS` | 3 | Read ports per bank. |
| `DISP_PER_Q` | 2 | Micro-ops per issue queue per cycle. |
| `MUL_LAT` | 3 | Multiplier latency. |
| `READ_SHARE` | 1 | Read sharing on. |

The column count, the register counts and the ROB size are package constants
in `rb_pkg`.

## Where this design departs from the reference microarchitecture

* **Rename takes one cycle.** The reference splits rename into map, query and
  allocate stages and delays the table writes by a cycle. The decisions made
  here are the same, but the timing is not.
* **Not built:**
  * fetch, decode, branch prediction, jump execution and the JMP target
    check;
  * the flush and redirect on a mispredict (branches are resolved and the
    oldest mispredict is reported, but the core does not flush);
  * exceptions;
  * CSR and floating-point units;
  * the load/store unit. One memory port stands in for two memory pipelines,
    and loads are never speculative or replayed.
* **Own assumptions:**
  * the multiplier latency (3);
  * the load data delay (3);
  * the 64-bit datapath and the ALU operation set;
  * commit width 4;
  * the divider's waiting rule on the slow port;
  * the priorities inside each arbiter.

## Verification

Each block has a self-checking testbench (`tb/tb_<block>.sv`). It compares the
block against an independent model under random stimulus and prints
`TB_RESULT checks=N failures=M`. Timing checks include:

* the multiplier latency and the divider's 64-iteration latency;
* one-cycle wakeup-to-issue in the issue queue;
* the exact reservation slots of the writeback arbiter;
* the registered chained wakeup.

`tb_ringboom_core` runs the top at its default parameters:

* **Workload.** 3000 random micro-ops over a few architectural registers, so
  dependences are dense.
* **Checker.** A reference model and a memory model. Every committed register
  value and every stored word are checked. Branches carry random predictions.
  Every cycle, the reported mispredict must be the oldest one resolved, and
  every mispredicting branch must resolve as one.
* **Dependent chain.** A chain of 200 dependent adds must commit within a few
  cycles of 200; it commits in 206 cycles, about one per cycle.
* **Events.** Every entry of `ev` is counted, and one that never occurred is a
  failure.

To simulate any testbench with Verilator (run from the repository root):

```
verilator --binary --timing --assert -y rtl rtl/rb_pkg.sv tb/tb_ringboom_core.sv \
          --top-module tb_ringboom_core -o sim && ./obj_dir/sim
```

Replace the testbench name for a block test. All testbenches finish in well
under a second of simulated work on a desktop machine.

## Lint notes

Verilator reports three unused signals, all on purpose:

* the per-port enables of the read arbiter (the banks read every port each
  cycle);
* the top bit of the divider's partial remainder;
* the index bits ignored by `bank_of()`.

Linting `rb_pkg` on its own also lists two of its constants as unused; the
modules that import the package use them.
