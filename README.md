# B-Fetch: a branch-predictor-directed data cache prefetcher

An out-of-order core hides part of the latency of a cache miss. It cannot hide
all of it, and it cannot hide any of it when the miss is far ahead of the
instruction window. B-Fetch looks further ahead than the window by reusing a
structure the core already trusts: its branch predictor. A small auxiliary
pipeline walks the *predicted* control flow several basic blocks ahead of the
fetch stage. For each block it expects the program to execute, it recalls
which loads that block performed last time and from which base registers. It
then computes where those loads will go this time and prefetches those cache
lines into the L1 data cache.

Two observations make this cheap.

- **Addresses are correlated with register values.** A load's address is a
  base register plus a displacement. When the block runs again, the base
  register has usually moved by a predictable amount. So the prefetcher stores
  registers and displacements, not addresses.
- **The core already filters wrong paths.** Every prefetch is tagged with the
  branch that led to it. A branch misprediction or a commit removes stale
  work from the prefetcher just as it does from the core.

This repository holds synthesizable SystemVerilog for the prefetcher itself.
It also has a self-checking testbench for every block and an end-to-end
testbench that drives the whole unit from a model of a core running a loop.

## The auxiliary pipeline

```
 fetch / flush ──► ┌────────────────┐  ┌──────────────┐  ┌───────────────┐  ┌─────────────────┐  ┌──────────┐
                   │ 1 branch       │─►│ 2 register   │─►│ 3 mode        │─►│ 4 prefetch      │─►│ prefetch │─► L1D
  branch predictor◄┤   lookahead    │  │   lookup     │  │   generate    │  │   calculate     │  │ deque    │
  + BTB (core)    ►│ BTC, confidence│  │   MHT read   │  │ generate deque│  │ ERF, patterns   │  │ 100 ent. │
                   └────────────────┘  └──────────────┘  └───────────────┘  └─────────────────┘  └──────────┘
 commit ──► last committed branch ──► branch trace cache
        └─► unit allocation table ──► memory history table ◄── (genRegVal from stage 4)
 writeback ──► execution register file (read by stage 4)
```

| Stage | Module | Work per cycle |
|---|---|---|
| 1 branch lookahead | `lookahead_stage` | One basic block: finds the next branch, gets its prediction, updates the path confidence |
| 2 register lookup | memory history table read in `bfetch_top` | Reads the block's load summary. A block with no loads ends here |
| 3 mode generate | `generate_deque` | Queues the block. Decides per load group between offset and loop mode |
| 4 prefetch calculate | `prefetch_calculate` | Emits one cache-line address per cycle |
| issue | `prefetch_deque` | Sends one prefetch per cycle to the L1D, within its MSHR share |

The commit side learns from the instructions the core commits:

- `last_committed_branch` and `branch_trace_cache` learn the control flow.
- `unit_allocation_table` and `memory_history_table` learn the loads.
- `branch_confidence_estimator` learns how far each prediction can be trusted.

The core's integer writebacks keep `execution_register_file` up to date.
`bfetch_top` wires everything together and holds the one-entry buffer between
stages 2 and 3.

## Naming a basic block

A basic block is named by the branch that opens it: the triple (branch PC,
direction, target), type `br_key_t`. Including the direction and the target
gives the two exits of a conditional branch, and each target of an indirect
jump, separate identities.

**Branch trace cache (BTC), 256 entries.** It answers "after this outcome of
this branch, which branch comes next?". Each entry holds the next branch's PC
and its call, return and unconditional bits, which the predictor needs.

- It is indexed and tagged by a hash of the key: index = `pc ^ target ^ dir`,
  tag = the next higher bits of `pc ^ target`.
- It is written only from commit, so it only learns paths the program really
  took.

**Last committed branch buffer (LCB).** It holds the last committed branch.
When the next branch commits, the pair is written into the BTC as one link.
The LCB content is also the name of the block whose instructions are
committing, which the memory history table needs.

## Branch lookahead and path confidence

`lookahead_stage` keeps a *current* branch and advances one block per cycle:

1. The BTC gives the next branch's PC (`btc_*`).
2. The core's predictor gives its direction and target (`bp_pc` out;
   `bp_dir`, `bp_target` in, combinational).
3. The confidence estimator gives the probability that this prediction is
   correct, as an 8-bit fraction (255 ≈ 1.0).
4. The *path confidence* is the product of the probabilities of every
   looked-ahead branch the core has not fetched yet. It is multiplied by the
   new probability and compared with a threshold for the new depth. The
   thresholds rise with depth (0.1 at depth 1 up to 0.8 at depth 12), so a
   short walk is cheap and a long one must be well founded.
5. If it passes, the new branch becomes current. Its block, with a branch
   sequence number (BSN), goes to the register lookup stage.

The walk stalls, and reports which stall on `la_state`, in four cases:

| State | Cause | Ends when |
|---|---|---|
| `LA_STALL_CONF` | the product is below the threshold | fetch passes branches, whose factors leave the product |
| `LA_STALL_DEPTH` | 12 blocks ahead of fetch | fetch catches up |
| `LA_STALL_MISS` | the BTC has no next branch | fetch reaches the lookahead, which restarts from it |
| `LA_STALL_FULL` | the next stage cannot take a block | the generate deque drains |

**Synchronisation with fetch.** Every branch the core fetches reports its key
and BSN. If fetch has reached or passed the lookahead, or no walk is running,
the walk restarts from the fetched branch. A flush restarts it from the
corrected branch. The probabilities of the branches ahead of fetch sit in a
12-entry ring. The product is recomputed each cycle from the entries still
ahead of fetch.

**Confidence estimator.** `branch_confidence_estimator` combines four counters:

- a 1024 × 5-bit table indexed by the branch's local history: +1 when
  correct, halved on a misprediction;
- a 4096 × 3-bit table indexed by the global history: +1 when correct, reset
  on a misprediction;
- the tournament predictor's own local and global 2-bit counters.

Their sum, 0..44, picks one of 45 buckets. Each bucket counts resolved
predictions and how many were correct. Every 1024 resolved branches, a
sequential divider turns each bucket's counts into a fraction and then halves
the counts. The divider takes 45 × 9 cycles and runs alongside normal updates.

## The memory history table: loads summarised by register

This is the heart of the design and the hardest part to follow.

`memory_history_table` has 128 entries. Each is tagged by a block's key and
holds 4 **units**. A unit stands for every load of the block that uses one
base register, until that register is redefined.

| Field | Meaning |
|---|---|
| `reg_idx`, `reg_disp` | base register and displacement of the first such load |
| `neg_patt`, `pos_patt` | bit k: another load hits the line k+1 lines below / above the first load |
| `com_reg_val` | the base register's value when the load last committed |
| `gen_reg_val`, `gen_valid` | the register value the last prefetch for this unit used |
| `gen_offset` | commit value minus that prefetch-time value |
| `delta`, `skid`, `loop_valid` | loop behaviour of the committed value (below) |

**Learning at commit**, one committed instruction per cycle:

- A committed branch starts a new block. It clears the unit counter and the
  `unit_allocation_table` (UAT). The UAT maps each register to the unit it was
  given in the current block.
- A load off a register that the UAT maps to a unit adds a pattern bit to that
  unit: the line distance from the unit's first load.
- A load off an unmapped register takes the next unit. If that unit already
  holds the same register and displacement, the block is being seen again and
  the unit is updated in place. Otherwise the unit is started afresh. More
  than 4 registers in one block set `ev_unit_overflow`, and the extra loads
  are not recorded.
- Any committed instruction that writes a register removes its UAT mapping.
  The next load off that register then starts a new unit.

**Two address modes.** The prefetch must guess the base register's value at
the time the block will execute, which is later than commit.

- **Offset mode**, the default. It takes the value in the execution register
  file (ERF), the core's latest writeback, and adds the displacement and
  `gen_offset`. `gen_offset` corrects for the ERF being ahead of or behind
  commit. The calculate stage records the ERF value it used (`gen_reg_val`).
  When that instance of the load commits, the MHT learns the difference.
- **Loop mode.** Each in-place update computes `delta` (the change of the
  committed value since the last visit) and `skid` (the change of `delta`).
  When `skid` is 0, or equal to the last `skid`, the unit is a loop: its
  address moves by a regular stride. The address is then the address
  predicted for the previous instance of the same block, plus `delta + skid`.
  This works even when many instances of the block are in flight at once,
  where a single register value would be useless.

## Generate deque: forwarding loop addresses

`generate_deque` (64 entries) holds every looked-ahead block from lookup until
its branch commits. It keeps them in BSN order in a circular buffer. The
calculate stage takes the oldest uncalculated entry. Calculated entries stay
behind as history for loop mode.

A loop-mode unit needs the *running address* of the previous instance of its
block. Two paths provide it.

- **Front pull.** When a block is pushed, the youngest resident instance of
  the same block that has a running address supplies it, if that instance is
  already calculated or its branch has committed.
- **Back push.** When the calculate stage finishes a block, it writes the
  block's base addresses back. They are forwarded to the nearest younger
  instance that has not yet been taken for calculation.

Either way, the forwarded address is the old running address + `delta` +
`skid`, and the unit is marked `loop_fwd`.

## Calculate stage and prefetch deque

`prefetch_calculate` turns one block into line addresses, one per cycle. For
each unit it emits:

1. the base address: loop-mode running address, or ERF + displacement +
   `gen_offset`;
2. one address per set `neg_patt` bit, then per set `pos_patt` bit.

`prefetch_deque` (100 entries) issues one address per cycle to the L1D
(`pf_req_valid`/`pf_req_ready`). It stops while the prefetcher holds 7
MSHRs, 70 % of the 10 in the L1D, so demand misses always find one. The L1D
returns an MSHR with a one-cycle `pf_fill` pulse.

## Filtering: flush and retire

Every block, and every address made from it, carries the BSN of its opening
branch. BSNs are 12 bits and compared modulo 2¹², so fewer than 2048 branches
may be in flight.

- **Flush of branch f** (misprediction): everything with BSN ≥ f leaves the
  lookahead buffer, the lookup buffer, the generate deque (young end), the
  calculate buffer and the prefetch deque (back end).
- **Retire of branch r** (commit of that branch): everything with BSN < r
  leaves, because those loads have already issued. The generate deque keeps
  the entry with BSN = r, marked committed, for front pull.

## Interface of `bfetch_top`

All ports are plain signals with types from `bfetch_pkg`. Everything changes
on the rising edge of `clk`. `rst_n` is an asynchronous, active-low reset.

| Group | Ports | Contract |
|---|---|---|
| fetch | `fetch_valid`, `fetch_br`, `fetch_bsn` | every branch the core fetches, in order |
| flush | `flush_valid`, `flush_br`, `flush_bsn` | mispredicted branch with its corrected outcome |
| commit | `cm_valid`, `cm_is_branch`, `cm_br`, `cm_kind`, `cm_bsn`, `cm_is_load`, `cm_base_idx`, `cm_disp`, `cm_base_val`, `cm_wr_en`, `cm_wr_idx` | one committed instruction per cycle. A committed branch is also the retire signal |
| writeback | `wb_valid`, `wb_idx`, `wb_data` | integer register writeback |
| predictor | `bp_pc`, `bp_kind` out; `bp_dir`, `bp_target`, `bp_lhist`, `bp_ghist`, `bp_self_l`, `bp_self_g` in | combinational answer in the same cycle |
| resolve | `rs_valid`, `rs_lhist`, `rs_ghist`, `rs_self_l`, `rs_self_g`, `rs_correct` | a resolved prediction, to train the estimator |
| L1D | `pf_req_valid`, `pf_req_addr`, `pf_req_ready`, `pf_fill` | line-aligned prefetch request; fill returns an MSHR |
| status/events | `la_state`, `la_depth`, `la_path_conf`, `gd_count`, `pd_count`, `pf_mshr_used`, `conf_number`, `conf_refresh`, `gd_full`, `calc_busy`, `ev_*` | observation only |

## Sizes

| Structure | Size | Parameter |
|---|---|---|
| branch trace cache | 256 entries, 9-bit partial tag | `branch_trace_cache.ENTRIES`, `TAG_W` |
| memory history table | 128 entries × 4 units, 8-bit tag | `memory_history_table.ENTRIES`, `bfetch_pkg::NUM_UNITS` |
| line patterns | 4 lines below, 4 above | `bfetch_pkg::PATT_W` |
| generate deque | 64 entries | `generate_deque.DEPTH` |
| prefetch deque | 100 entries | `prefetch_deque.DEPTH` |
| prefetch MSHR share | 7 | `prefetch_deque.PF_MSHR_MAX` |
| execution register file / UAT | 32 registers × 64 bit | `NREGS` |
| confidence tables | 1024 × 5 bit local, 4096 × 3 bit global, 45 buckets | `branch_confidence_estimator` |
| lookahead depth | 12 | `lookahead_stage.MAX_DEPTH`, `THRESH` |
| address / line | 64-bit (Alpha), 64-byte lines | `bfetch_pkg::XLEN`, `LINE_OFF` |

These are the sizes of the published single-core configuration, which used a
2-wide out-of-order core with a 64 KB L1D and 10 MSHRs. The tables hold
history, not programs, so any program runs; how much of it is covered depends
on the program. A multicore system needs one instance per core.

## Where this design makes its own choices

The structure, the table sizes, the update rules and the two address modes
follow the published design. The following are this implementation's own
choices, because the description leaves them open:

- **BSN filtering.** Flush and retire are given only as "the young end" and
  "the old end" of each deque. Here every entry carries a 12-bit BSN. A
  committed branch is the retire point.
- **Per-depth thresholds.** Only their trend is specified: lower at small
  depths. The values are a parameter.
- **Estimator details.** The bucket ageing, the refresh interval (1024
  branches) and the 8-bit fixed-point fractions. There are 45 buckets, so
  that each confidence number 0..44 has one.
- **MHT details.** The MHT and BTC hash functions. The rule that a unit is
  updated in place when its register and displacement match. The pattern
  range of ±4 lines: loads further away, or in the same line, add nothing.
- **Unit count.** The description mentions both four and five units per
  entry. Four, the evaluated configuration, is built.
- **BTC next-PC width.** The BTC stores the full 64-bit next-branch PC, which
  is more than the published storage budget.
- **Stage buffers and timing.** One-entry buffers between stages, a one-cycle
  bubble between blocks in the calculate stage, and the handshakes to the
  L1D and to the core.
- **Unit and bit order.** Units are processed in order 0..3, and `neg_patt`
  comes before `pos_patt`.

Not included: the core, its branch predictor and BTB, and the L1D with its
MSHRs. They belong to the host processor, and their signals are ports of
`bfetch_top`.

## Verification and simulation

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
compares the module with an independent model and ends with a
`TB_RESULT checks=… failures=…` line. For example:

```
verilator --binary --timing -Irtl --top-module tb_prefetch_deque \
    rtl/bfetch_pkg.sv rtl/prefetch_deque.sv tb/tb_prefetch_deque.sv -Mdir obj -o sim
obj/sim
```

`tb_memory_history_table` also needs `rtl/unit_allocation_table.sv`.
`tb_bfetch_top` needs all of `rtl/*.sv`, with `bfetch_pkg.sv` first.

`tb_bfetch_top` runs the whole prefetcher at its default sizes for about
28,000 cycles. It models a core that runs a six-block loop:

- array walks that need loop mode;
- constant bases that need offset mode;
- neighbouring lines that fill the patterns;
- a block with five base registers, which overflows the units;
- a block with no loads;
- one poorly predicted branch;
- periodic mispredictions;
- a stretch where commit stalls while fetch runs on;
- an L1D with 40-cycle fills.

It checks that every prefetched line is one the program really loads, and
that most demand loads find their line prefetched. It also checks that each
mechanism happened at least once: every lookahead state, MHT hits and misses,
unit overflow, front pull, back push, loop, offset and pattern addresses,
flush and retire filtering, the MSHR limit and the estimator refresh.
