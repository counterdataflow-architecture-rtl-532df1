# CounterDataFlow core in SystemVerilog

An out-of-order processor usually finds the instructions that are ready to run
by broadcasting every result to a window of waiting instructions, and by
looking up producers in associative (CAM) structures. Those structures are large,
slow and power-hungry. A **CounterDataFlow (CDF)** core does the same work with
purely local communication instead. Instructions and results travel as
*tokens* through two pipelines that run in opposite directions around a ring of
identical stages. Whenever an instruction token passes a result token with the
tag it is waiting for, it copies the value. Execution units hang off the side of
the ring. An instruction that holds all its operands when it passes a unit's
entry stage drops into that unit. The result comes back into the result pipe
further along. No stage ever looks further than its neighbours, and nothing in
the core is associative.

This repository holds a synthesizable model of such a core: the ring, the
execution units, the issue and wrap-around logic, a non-associative reorder
buffer (ROB), and a two-level data memory. It also holds self-checking
testbenches for every module and for the whole core.

## The ring

`cdf_core` builds a ring of `NSTAGES` (default 9) copies of `cdf_stage`.
Each stage holds `IW` instruction slots and `RW` result slots in registers.

* **Instruction tokens** move *up* one stage per cycle, from stage 0 to stage
  `NSTAGES-1`. A token holds:
  * the operation;
  * its own tag, which is its ROB entry number;
  * a store sequence number;
  * two *consumers*, one per source operand. Each consumer either already holds
    its value, or names the tag of the instruction that will produce it.
* **Result tokens** move *down* one stage per cycle. A token holds a tag, a
  value, and for stores and branches a second word (the store address, or a
  corrected pc). Results leave stage 0 into the ROB.

Every cycle, each stage compares the tags of its waiting consumers with two
sets of results:

* the result tokens it holds;
* the result tokens that are about to enter it, coming from the stage above or
  from an execution unit.

Both sets are needed. The two pipes move in opposite directions, so a result
and an instruction can swap places between two adjacent stages in one clock.
Without the second comparison they would pass each other unseen.

The two pipes never stall:

* **Instruction pipe.** An instruction that reaches the top of the ring without
  having been launched is *wrapped*. It goes back through the decode unit into
  stage 0 and tries again on the next lap. Wrapped tokens keep their slot and
  take precedence over new instructions. A ring full of waiting instructions
  therefore slows fetch down instead of blocking the pipe.
* **Result pipe.** A result that finds no free result slot at its recovery
  stage stays in its execution unit, which simply holds its output register.

## Sidepanels: where instructions leave and rejoin the ring

Each execution unit (a *sidepanel*) has two fixed points on the ring:

* a **launch stage**, where ready instructions of its class can leave the
  instruction pipe;
* a **recovery stage**, where its results enter the result pipe.

A launched instruction frees its slot immediately. Units of any latency fit,
because results go back into the result pipe, not into the instruction that
produced them.

| # | unit | module | launch stage | recovery stage |
|---|---|---|---|---|
| 0-2 | single-cycle integer | `cdf_alu_unit` | 0, 1, 2 | 1, 2, 3 |
| 3 | single-cycle integer | `cdf_alu_unit` | 5 | 6 |
| 4 | branch | `cdf_branch_unit` | 4 | 5 |
| 5 | memory (L1 + L2) | `cdf_mem_unit` | 2 | 5 |
| 6 | multiply/divide | `cdf_muldiv_unit` | 6 | 8 |
| 7 | fast floating point | core ports `fpf_*` | 6 | 8 |
| 8 | slow floating point | core ports `fps_*` | 0 | 5 |

The kinds and the number of units follow the published layout of a CDF core.
The stage numbers are an estimate of that layout, scaled to nine stages; they
are one table (`LAUNCH_AT`, `REC_AT`) in `cdf_core.sv`. The floating-point
units are not modelled. Their launch and result handshakes are ports of the
core, so any unit with a valid/ready interface can be connected.

In each stage, each sidepanel takes the lowest-numbered slot that is ready and
of its class. A load launches only once every older store has committed. Each
load carries the number of stores issued before it, and the ROB counts
committed stores. With this rule, loads never need address disambiguation.

## Results must travel half the ring

The least obvious part of the design is how a result reaches the
instructions that need it.

A result token that came back into the pipe just above the ROB would reach the
ROB in a cycle or two. The instructions that need it may be anywhere in the
ring, so such a result could miss its consumers. The core therefore makes
**every result travel at least half the ring**:

* A result recovered in the lower half of the ring (`STAGE*2 < NSTAGES`,
  stages 0-4 here) is marked `pass_rob`. When it reaches the bottom, it does
  not finish. It wraps to the top stage with the mark cleared and goes down the
  ring once more.
* A result recovered in the upper half finishes when it reaches the ROB.

A waiting instruction moves up while the result moves down, so over half a
lap they meet. An instruction that is still waiting when the result finishes
was issued after the result had passed the bottom stage. That instruction
found the value at issue time, as described in the next section. The ROB is
thus never searched for consumers. It is only written by index when a result
finishes.

Results that wrap and results that are recovered share the `RW` slots of the
top stages. This is the main reason to give the core more result pipes than
instruction pipes.

## Issue, renaming and the wrap path

`cdf_decode` fills stage 0 every cycle:

1. Wrapped tokens from the top stage keep their slot positions.
2. New micro-ops from fetch fill the empty slots, in program order. At most as
   many are accepted as there are free slots and free ROB entries, and fetch
   sees the accepted prefix on `f_accept`.

Renaming is done by tagging. A new instruction's tag is the ROB entry it
allocates. A register table (`cdf_tagtable`) records, for each architectural
register, whether an uncommitted instruction writes it, and the tag of the
latest such instruction. For each source operand, decode takes the first case
that applies:

| case | source of the operand |
|---|---|
| an older micro-op in the same issue group writes the register | wait on that micro-op's tag |
| no pending writer | register file value |
| the pending writer's result finishes at the ROB this cycle | that value (bypass) |
| the pending writer has finished but not committed | indexed read of its ROB entry |
| otherwise | wait on the writer's tag |

All the lookups are indexed reads, with no associative search anywhere.

## Commit, stores and mispredictions

`cdf_rob` is a circular buffer of `ROB_DEPTH` entries, indexed by tag.

* It commits up to `IW` completed entries per cycle, in order, into
  `cdf_regfile`. Each commit is reported on the `cm_*` ports.
* A store commits by writing memory through the memory unit's commit port, at
  most one store per cycle.
* A branch carries its misprediction flag and the correct next pc in its
  result token.

Misprediction recovery happens in two steps:

1. **The result arrives.** When the result of a mispredicted branch reaches
   the ROB, the ROB records it as the oldest known misprediction
   (`kill_valid`, `kill_tag`). It keeps the older branch if two are known.
   From the next cycle, decode does two things:
   * It removes every wrapped instruction younger than that branch as the
     instruction passes. Age is the distance from the ROB head.
   * It stops accepting new micro-ops, since they are all on the wrong path.

   Wrong-path instructions therefore stop taking execution units and pipe
   slots long before the branch retires.
2. **The branch commits.** The core raises `flush` and `redirect_pc` for one
   cycle and clears the stages, sidepanels, tag table and ROB. Fetch restarts
   at `redirect_pc`.

The architectural state is always the committed one, so recovery is exact.

## Memory

* **`cdf_dcache`** is the L1 data cache:
  * 16 KB, 4-way set associative, 32-byte lines, 128 sets;
  * a hit answers in one cycle;
  * replacement is the 3-bit tree pseudo-LRU of the i486, after any invalid way;
  * write-through, no write-allocate;
  * a miss fills its line with eight pipelined reads and answers 21 cycles after
    the request.
* **`cdf_l2_mem`** is the L2, treated as main memory. It always hits, with a
  fixed pipelined latency of `L2_LAT` = 10 cycles. It holds 16K words.
* **`cdf_mem_unit`** does the following:
  * computes addresses;
  * runs loads through the cache;
  * passes a store's address and data to the ROB in the store's result token;
  * writes stores at commit, with priority over new loads.

## Configurations

The core is parameterised by the number of instruction pipes, result pipes and
ROB entries. These are the five configurations of the CDF study:

| name | `IW` | `RW` | `ROB_DEPTH` | tested by |
|---|---|---|---|---|
| CDF0 | 1 | 1 | 32 | `tb_cdf_configs` |
| CDF1 | 1 | 2 | 32 | `tb_cdf_configs` |
| CDF2 | 2 | 3 | 64 | `tb_cdf_configs` |
| CDF3 (default) | 2 | 4 | 64 | `tb_cdf_core` |
| CDF4 | 4 | 8 | 128 | `tb_cdf_configs` |

Other defaults:

* `NSTAGES` = 9.
* `XLEN` = 32.
* 64 architectural registers: 32 integer and 32 floating point. Register 0 reads
  as zero.
* `MUL_LAT` = 3. A divide takes 34 cycles.
* Tags are 7 bits wide, enough for 128 ROB entries. `ROB_DEPTH` must be a power
  of two.

## Instruction format

The core executes pre-decoded micro-ops (`uop_t` in `cdf_pkg`), each with:

* a class: integer, branch, load, store, multiply/divide, fast FP or slow FP;
* a function code;
* destination and source registers;
* an optional immediate;
* its pc, as a word address;
* the fetch unit's prediction, for branches.

Fetch is outside the core. It must deliver contiguous groups of up to `IW`
micro-ops and restart at `redirect_pc` on `flush`. Branch prediction is part
of fetch: the core only checks predictions.

## Departures from the CDF description

* **Load ordering.** Loads wait for all older stores to commit. The original
  design lets loads pass a limited number of stores to different addresses.
* **Misprediction recovery.** Wrong-path instructions are removed as they wrap
  past the ROB, as in the original. In addition, issue stops until the branch
  commits, and the whole core is then cleared. The original rebuilds the
  register table instead of clearing it, and does not say how the remaining
  wrong-path tokens disappear.
* **ROB structure.** The ROB is a single indexed buffer. The segmented ROB, one
  section per instruction slot, is not reproduced. It serves the same purpose,
  avoiding associative lookup, and this design already has none.
* **Issue-time operand reads.** Operands of finished-but-uncommitted producers
  are read from the ROB at issue. This is this design's own addition.
* **Pipe direction.** Instructions flow up from decode and results flow down
  to the ROB at the bottom, as in the text of the description. Its sidepanel
  diagram can be read with the opposite arrow directions.
* **Instruction set.** The core uses its own micro-op format instead of a full
  instruction set.
* **Not modelled:** the floating-point units, fetch and the instruction cache,
  and the branch predictor. Also not modelled are the proposed extensions:
  multithreading, data-value speculation, cracking of complex instructions, and
  running fetch and core at different clock rates.

## Behaviour and limits

Every configuration executes the test programs correctly; every commit is
compared with a reference model. On the 466-instruction synthetic program run
by `tb_cdf_configs`:

| configuration | cycles | IPC | wrapped tokens |
|---|---|---|---|
| CDF0 | 2560 | 0.182 | 955 |
| CDF1 | 2495 | 0.186 | 905 |
| CDF2 | 2345 | 0.198 | 1113 |
| CDF3 | 2345 | 0.198 | 1111 |
| CDF4 | 2329 | 0.200 | 1369 |

IPC rises with width, as it does for the original design. The absolute values
are low, for three reasons:

* The program is small and has many dependences.
* Its forward branches are predicted statically, so 19 flushes hit 466
  instructions.
* Loads wait for all older stores.

Removing wrong-path instructions as they wrap matters a great deal. Without it,
wrong-path work filled the wider cores, and on this program CDF4 took 3859
cycles, more than CDF0 (2845). Wrapping is the quantity to watch in general. A
ring where much of the traffic is wrapped instructions leaves no slots for
fetch. Wrapping grows with width and with the distance of the sidepanels from
the ROB. Relevant places to change:

* the sidepanel placement table in `cdf_core.sv`;
* the slot choice in `cdf_stage.sv`, lowest slot first with no age priority.

## Modules

| file | contents |
|---|---|
| `rtl/cdf_pkg.sv` | widths, token and micro-op structs, operation codes |
| `rtl/cdf_core.sv` | top: ring, sidepanel wiring, memory, ROB, decode |
| `rtl/cdf_stage.sv` | one ring stage: matching, launch, recovery, half-ring marking |
| `rtl/cdf_decode.sv` | issue, renaming, wrap-around into stage 0, wrong-path removal |
| `rtl/cdf_tagtable.sv` | per-register latest-writer tag table |
| `rtl/cdf_rob.sv` | reorder buffer, in-order commit, store commit, flush |
| `rtl/cdf_regfile.sv` | architectural register file |
| `rtl/cdf_alu_unit.sv` | single-cycle integer unit |
| `rtl/cdf_branch_unit.sv` | branch resolution and misprediction detection |
| `rtl/cdf_muldiv_unit.sv` | multiplier and restoring divider |
| `rtl/cdf_mem_unit.sv` | load/store unit |
| `rtl/cdf_dcache.sv` | L1 data cache |
| `rtl/cdf_l2_mem.sv` | L2 / main memory model |

The core's interfaces:

* **Fetch:** `f_valid`, `f_uop`, `f_accept`.
* **Redirect:** `flush`, `redirect_pc`.
* **Commit:** `cm_valid`, `cm_pc`, `cm_has_dst`, `cm_dst`, `cm_val`.
* **FP units:** the two floating-point sidepanel handshakes.
* **Statistics:** per-cycle event outputs `st_issued`, `st_wrapped`,
  `st_l1_miss`.

All flip-flops reset asynchronously on `rst_n` low. The memory arrays are not
reset.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each testbench
prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_cdf_core` runs the default core on a generated looping program. The
  loop body opens with a divide followed by a burst of independent adds, which
  fills the ROB and crowds the result pipe. The program covers every instruction class, cache misses and mispredicted
  branches. The testbench checks every commit, the final registers and memory.
  It also counts how often each mechanism happened, and fails if any never
  happened:
  * launch into each sidepanel;
  * instruction wrap;
  * half-ring result wrap;
  * blocked recovery;
  * fetch throttling;
  * full ROB;
  * L1 miss;
  * flush;
  * removal of a wrong-path instruction at the wrap;
  * operand read from the ROB at issue;
  * store commit.
* `tb_cdf_configs` runs five cores, CDF0 to CDF4, side by side on one program.
  It checks every commit of each core and that CDF4 is not slower than CDF0.
  Its per-core harness is `tb/cdf_core_run.sv`.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/cdf_pkg.sv tb/tb_cdf_core.sv --top-module tb_cdf_core -o sim
./obj_dir/sim
```

Replace `tb_cdf_core` with any other testbench name. The package must come
first; Verilator finds the other modules through `-I`. Compiling the core takes
about a minute. The simulations themselves run in seconds.
