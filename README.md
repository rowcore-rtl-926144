# RowCore: a row-oriented processor under a DRAM stack

Big-data machine-learning kernels (counting, variance, naive Bayes, k-means,
classification, PCA, GDA) stream billions of small records through a little
arithmetic. Each record updates a small state, such as a histogram or a set of
sums. On a conventional chip these kernels are limited by memory bandwidth.
A die-stacked DRAM has far more internal bandwidth, but only if whole DRAM
rows are used once they are opened. A multicore whose cores wander through
memory independently reopens the same row many times. A SIMT GPU keeps its
lanes together, but loses time on the data-dependent branches these kernels
are full of.

RowCore is a processing-near-memory processor on the logic die under a DRAM
stack. It combines the two approaches:

* **Row-oriented access.** The input is laid out so that every 2 KB DRAM row
  holds one 64-byte *slab* for each of the 32 *corelets*. The processor always
  prefetches whole rows, in order, one row per prefetch. Each row is opened
  once and read as 16 back-to-back 128-byte transfer units.
* **MIMD corelets.** Each corelet is a small in-order core with 4 hardware
  contexts, a 4 KB local memory and a 4 KB instruction store. Corelets branch
  independently and run at their own pace over their own slab of each row.
  They keep the partially reduced state of their records in local memory.
* **Cross-corelet flow control.** One shared prefetch buffer holds 16
  row-sized entries. The first corelet to reach a row triggers the prefetch of
  the next row for everyone. A per-entry counter stops a leading corelet from
  recycling an entry that a lagging corelet has not read yet.
* **Compute-memory rate matching.** The buffer's flow-control events show
  whether the processor is ahead of memory or behind it. "Empty" means a
  leading corelet is waiting for data. "Full" means a leading corelet is held
  back by laggards. A hill-climbing controller lowers or raises the compute
  clock in 5 % steps, so a memory-bound kernel does not burn energy idling.

The host CPU copies the input into the stack and broadcasts the kernel code to
all corelets. It starts the run and, at the end, reads every corelet's local
memory for the final Reduce.

## Block structure

```
             host: prog_*, hm_*, start/start_row/last_row, rm_enable, done
                |
  +-------------v--------------------------------------------------------+
  | rowcore_top                                                          |
  |                                                                      |
  |  corelet[0..31] --dem_req/dem_row--> prefetch_buffer --pq_*--> row_fetch_unit --cmd_*--> DRAM channel
  |        ^        <--dem_hit/slab---   (16 x 2 KB)     <-fill_*-                <--rsp_*--
  |        | ce                           | ev_empty / ev_full                                |
  |  dfs_clock_gen <--freq_mhz-- rate_matcher <-----+                                         |
  +----------------------------------------------------------------------+
```

| File | Role |
|---|---|
| `rtl/rowcore_pkg.sv` | Sizes, types, and the corelet instruction encoding with encoder functions |
| `rtl/corelet.sv` | 4-context, 2-stage in-order core with a FETCH (demand fetch) instruction |
| `rtl/prefetch_buffer.sv` | Row entries split into per-corelet slabs; tags, trigger bits, counters, per-unit valid bits; empty/full events |
| `rtl/row_fetch_unit.sv` | Turns a row prefetch into 16 ordered 128-byte unit reads; writes the returning beats into the entry |
| `rtl/rate_matcher.sv` | Hill-climbing frequency register (5 % steps, 175 to 700 MHz) |
| `rtl/dfs_clock_gen.sv` | Phase accumulator that turns a frequency into a clock enable on the 1200 MHz base clock |
| `rtl/rowcore_top.sv` | One processor: 32 corelets and the blocks above |

The DRAM stack, its memory controller and the host are not part of the RTL.
The top brings out the controller's command/data channel and the host ports.
`tb/dram_model.sv` is a behavioural channel model used by the testbenches.

## Flow-controlled prefetching (the part to understand first)

The prefetch buffer is a circular queue of `ENTRIES` (default 16) entries. An
entry holds one row: `N_CORELETS` × 64 B = 2 KB. Corelet *i* only ever reads
slab *i* of an entry, so each corelet sees a private 1 KB slice (16 × 64 B),
and the corelet-to-buffer wiring is a fixed set of point-to-point ports.
Each entry carries:

* `tag`: the row it holds, plus a valid bit;
* `trig`: the prefetch-trigger bit;
* `cnt`: the demand-fetch counter, saturating at `N_CORELETS`;
* `uvalid`: one valid bit per 128-byte transfer unit (16 per entry).

The rules work like this:

1. **Start.** `start` flushes the queue and allocates entry 0 for `start_row`.
   Its prefetch request goes out on `pq_*`.
2. **Fill.** The row fetch unit writes 128-bit beats into the entry. The first
   beat of a row sets the entry's trigger bit. The last beat of a unit sets
   that unit's valid bit.
3. **Demand fetch.** Corelet *i* executes FETCH for row *r*. The fetch hits if
   some entry's tag is *r* and the transfer unit that holds slab *i* is valid.
   A leading corelet can therefore start on a row whose tail is still
   arriving. A hit copies the 64-byte slab into the corelet's local memory and
   increments the entry's counter. A miss stalls the context, which retries on
   its next turn.
4. **Trigger.** The first hit on an entry whose trigger bit is set clears the
   bit and allocates the next entry for row *r*+1. Only one corelet does this,
   so no prefetch is ever issued twice. If several corelets hit the same entry
   in the same cycle, their counter increments are added together.
5. **Flow control.** The next entry can be reused only if its counter has
   saturated, meaning every corelet has fetched its old row. If it has not,
   the trigger bit stays set. Later demand fetches to the same (tail) entry
   keep testing it, and the first one after the head entry drains issues the
   prefetch.
6. **End.** No prefetch is issued beyond `last_row`.

Two events feed the rate matcher:

* **`ev_empty`** fires when a demand fetch finds its row absent, or its unit
  not yet arrived. It is reported once per row, for the leading corelet.
* **`ev_full`** fires when a trigger is held back by an unconsumed head entry.
  It is reported once per allocation.

**The one rule software must keep.** Rule 5 only works if every corelet asks
for its rows in increasing order. Every row is prefetched once, when the
previous row is first touched. Suppose a corelet skips ahead to row *r*+2
while row *r*+1 is not yet in the buffer. It then waits for a row that will
only be prefetched after it has consumed *r*+1, which it will never do. The
kernels in `tb/tb_kernels_pkg.sv` handle this with their 4 contexts, which
take interleaved rows: a "turn" word in local memory makes the contexts issue
their FETCHes in row order. The kernels also need no lookahead hint; the
prefetch distance is fixed at one row.

An assertion in `prefetch_buffer` flags any re-allocation of an entry whose
counter has not saturated.

## The corelet

* **Pipeline.** Four contexts share two stages: F (instruction read) and X
  (register read, execute, local memory, write-back). A round-robin scheduler
  picks the next context that has no instruction in flight. There is no
  bypassing and no branch prediction: a context's next instruction is not
  fetched until its previous one has completed.
  * With 2 or more ready contexts, the corelet retires one instruction per
    compute cycle.
  * A lone context retires one every other cycle.
* **Registers.** 32 registers, 8 per context. `r0` reads as zero.
* **Memories.**
  * The instruction store is 1024 words, written by the code broadcast.
    Every corelet receives the same program. Execution starts at address 0
    for all contexts.
  * The local memory is 4 KB, organised as 64 lines of 64 bytes. Instructions
    read and write it by 32-bit word; FETCH writes a whole line.
* **Instruction format.** Instructions are 32 bits: `op[31:26] rd[25:23]
  rs1[22:20] rs2[19:17] imm[15:0]`, with `imm` sign-extended.

| Group | Instructions |
|---|---|
| ALU | ADD SUB AND OR XOR SLL SRL SRA SLT SLTU MUL |
| Immediate | ADDI ANDI ORI XORI SLLI SRLI SLTI LUI |
| Memory | `LW rd, imm(rs1)`, `SW rs2, imm(rs1)` |
| Control | BEQ BNE BLT BGE (pc-relative `imm`), `JAL rd, imm`, `JR rs1` |
| Row access | `FETCH rs1, rs2, imm`: demand-fetch this corelet's slab of row `R[rs1]` into the line at byte address `R[rs2]+imm`; replays until present |
| Identity | `ID rd, k`: k=0 corelet number, 1 context number, 2 corelet count |
| Other | NOP, HALT |

`rowcore_pkg` provides `enc_r/enc_i/enc_b/enc` functions to assemble
programs in SystemVerilog. The corelet's `done` output is high when all four
contexts have halted.

## Clocking and rate matching

The whole design runs on one clock: the 1200 MHz DRAM channel clock.
`dfs_clock_gen` produces a clock enable whose average rate is
`freq_mhz / 1200`; at the nominal 700 MHz, 7 of every 12 cycles are enabled.
The corelets advance only on enabled cycles. The prefetch buffer, the row
fetch unit and the rate matcher run every cycle. A silicon implementation
would gate or synthesise the clock instead. The enable keeps the RTL in a
single clock domain and makes frequency changes glitch-free.

`rate_matcher` holds `freq_mhz`:

* each `ev_empty` lowers it by 5 % of its current value;
* each `ev_full` raises it by 5 % (steps are at least 1 MHz);
* it stays between 175 MHz and the 700 MHz nominal frequency;
* `start` resets it to nominal;
* `rm_enable = 0` holds it at nominal.

The controller does not converge to a fixed value. Once it reaches the rate
at which the corelets consume rows as fast as the DRAM delivers them, it
dithers within a step or two of that rate.

## Where this RTL departs from, or goes beyond, the published architecture

* **Instruction set, pipeline depth and register split.** These are this
  design's own. The architecture only asks for simple in-order multithreaded
  cores with round-robin scheduling, few registers per context, and no
  bypassing or branch prediction.
* **Instruction cache.** The 4 KB instruction store is a memory written by
  the code broadcast, so it never misses. Kernels of this class are well
  under 1 KB. The cache line size has no meaning here.
* **FETCH copies the slab into local memory.** The architecture mentions this
  as an option, as an alternative to reading the buffer in place.
* **Trigger timing.** The trigger bit is set by the first arriving beat of a
  row, not by the end of the fill, because a row arrives as staggered units.
* **Prefetch distance.** It is fixed at one row ahead. The architecture allows
  a software hint for a longer distance; that hint is not implemented.
* **Rate matcher details.** Relative steps, the 175 MHz floor and the
  reporting of the events once per row or allocation are this design's
  choices.
* **Clock enable.** The compute clock is an enable on the channel clock.
* **One processor only.** A full system has one such processor per memory
  array (or group of arrays), and the processors never talk to each other.
  Instantiate `rowcore_top` once per channel.
* **Arithmetic.** The corelet has 32-bit integer arithmetic only. Kernels
  that need floating point (PCA, GDA as usually written) would need
  fixed-point code.

## Testbenches

All testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it shows |
|---|---|
| `tb_rowcore_pkg` | Derived sizes (2 KB row, 16 units, beats per unit and slab) and the instruction encoders against shift-computed field positions |
| `tb_corelet` | Every instruction against a reference, context interleaving and issue rate, FETCH stalls and replays |
| `tb_prefetch_buffer` | 4 corelets at very different speeds, 4 entries. Data correctness, one in-order prefetch per row, prefetch issued the cycle after the first fetch, no early re-allocation, held-back triggers, full events only when the tail is fetched while the head is unconsumed, empty/full events, hits on partly arrived rows |
| `tb_row_fetch_unit` | Unit order, every beat written once to the right place, one DRAM row open per row, latency bound, back-pressure |
| `tb_rate_matcher` | Step sizes, limits, enable, start |
| `tb_dfs_clock_gen` | Enable rate at several frequencies, even spacing |
| `tb_rowcore_top` | 32 corelets, 2 entries, variance kernel over 32 rows. Two runs: (1) rate matching on, with the DRAM slowed for the first half, so the clock steps down and then back up; (2) rate matching off. It counts stalls, empty and full events, early hits, steps down and up, prefetches and row opens, and fails if any mechanism never occurs |
| `tb_rowcore_full` | The top with all defaults (32 corelets, 16 entries) over 128 rows, with results checked |
| `tb_rowcore_nbayes` | Default-size top running the naive Bayes counting kernel on slab-interleaved 64-byte records (one record per slab), memory-bound so the clock steps down; every count checked |
| `tb_rowcore_configs` | 64 corelets with 4 entries (4 KB entries, 32 units per row); 32 corelets with 32 entries; 32 corelets with 4 entries. Uses the helper `tb_config_run` |

`tb/tb_data_pkg.sv` defines the input data: word *w* of row *r* is a fixed
integer hash of (*r*, *w*), so no data files are needed.
`tb/tb_kernels_pkg.sv` holds the variance/count kernel and its reference
model:

* Each record is 8 bytes (a label and a value), word-interleaved, so a slab
  holds 8 records.
* Each context keeps per-bin count, sum and sum of squares in local memory.
* Outlier values take a data-dependent slow path, which makes the corelets'
  work unequal.

Each context's partial results sit at byte `ctx*256` of local memory. The
host adds up all contexts and corelets.

The naive Bayes kernel (`nbayes_prog`) uses the other layout, slab
interleaving:

* Each 64-byte slab is one record: a year word and 15 dimension words.
* The class is "year at or above a threshold".
* The kernel increments one count per dimension in the table of that class,
  selected by the dimension's value. It also counts the records per class.


### Running with Verilator

The packages must come first:

```
verilator --binary --timing -Wno-fatal --top-module tb_rowcore_full \
    rtl/rowcore_pkg.sv tb/tb_data_pkg.sv tb/tb_kernels_pkg.sv \
    rtl/corelet.sv rtl/prefetch_buffer.sv rtl/row_fetch_unit.sv \
    rtl/rate_matcher.sv rtl/dfs_clock_gen.sv rtl/rowcore_top.sv \
    tb/dram_model.sv tb/tb_rowcore_full.sv
./obj_dir/Vtb_rowcore_full
```

For `tb_rowcore_configs`, also add `tb/tb_config_run.sv`. The unit
testbenches need only `rtl/rowcore_pkg.sv`, `tb/tb_data_pkg.sv` (where used),
the module and the testbench.

To change the configuration, override the top's parameters:

* `N_CORELETS`: the row size is `N_CORELETS × 64 B`, and the channel carries
  `N_CORELETS/2` units per row;
* `ENTRIES`: a power of two;
* `LMEM_BYTES`, `IMEM_BYTES`;
* `BASE_MHZ`, `NOMINAL_MHZ`.

The rate-matcher step and floor are parameters of `rate_matcher`.

## Size

Synthesised with the default parameters, one processor has:

* about 12,600 cells;
* about 3,600 flip-flop bits outside the memories;
* about 2.4 Mbit of memory arrays: 32 × (4 KB local + 4 KB instruction store
  + 128 B registers), plus the 32 KB prefetch buffer.
