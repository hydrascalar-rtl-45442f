# HydraScalar-style multipath core in SystemVerilog

A processor that speculates past conditional branches loses every instruction fetched after a mispredicted one. **Multipath execution** limits that loss. When a conditional branch looks unreliable, the processor follows *both* directions at once, each in its own *path context*. When the branch resolves, the wrong side is thrown away and the right side is already in flight.

Branches the processor trusts are still predicted and followed down one path, as in a conventional core. A *confidence predictor* decides which branches are unreliable enough to be worth a spare path.

This repository holds synthesizable RTL for the part of such a core that multipath execution changes:

- fetch from up to four paths at once;
- the fork decision;
- per-path branch-prediction state (return stacks, global and local history);
- per-path register renaming;
- one instruction window shared by all paths, with *selective* squashing by path ID;
- in-order commit, which reclaims squashed slots;
- miss-status registers for non-blocking loads.

The instruction cache, data cache and execution semantics sit outside the top module (`hydra_mp`) and connect through ports.

All RTL is in `rtl/`, one module or package per file. Each file opens with a comment that gives its interface, timing, and which choices are this design's own. Testbenches are in `tb/`.

## 1. Path IDs and selective squashing

This is the central mechanism and the least conventional one.

Instructions from all live paths are interleaved in one window. A single-path core squashes "everything younger than the branch". That rule cannot work here, because younger instructions may belong to the correct path. Every instruction therefore carries a **path ID**, and the ID shows which fork decisions the path descends from.

**Encoding.** A path ID (`pid_t` in `hs_pkg`) is a bit string in binary-prefix form:

- Suppose a forking branch has ID `x`. The taken side gets `x1` and the not-taken side gets `x0`.
- A path that does not fork keeps its ID. Its unforked branches do not lengthen the ID.
- So *p* descends from *q* exactly when *q* is a prefix of *p*. `pid_descends()` is the one test the whole design uses for this.

**Storage.** IDs are stored as circular bitmaps of `PIDB` = 8 bits:

- A **global head pointer** (kept in `path_ctx`) marks the bit position of the oldest forked branch that has not retired. Bits before the head describe decisions that are already settled.
- Each ID carries its own **tail pointer**, which marks its end.
- The useful part of an ID is the range from head to tail. Its length is `tail − head` (mod `PIDB`).
- Retiring the forked branch at the head position advances the head, which frees one bit for reuse in every ID.

**Overflow.** Branches may resolve out of order. The head can only move when the *oldest* forked branch retires, so a deep chain of forks could let a tail catch up with the head. `path_ctx` therefore refuses a fork that would make an ID `PIDB−1` bits or longer. The branch is then simply predicted.

A bitmap needs at least log2(number of paths) = 2 bits. The choice of 8 leaves room for narrow, deep fork trees.

**Squash rules.** A resolving branch with ID `x` broadcasts a subtree root. Every structure that holds per-instruction state drops the entries that are *younger than the branch* and *inside that subtree*. The structures that do this are the window (`ruu`), the outstanding-branch queue (`lhist_obq`) and the path contexts (`path_ctx`).

- **Forked branch, real direction d.** The root is `x·!d`. The wrong side and everything forked from it are cancelled. The right side `x·d` and its children are untouched. A forked branch never counts as mispredicted.
- **Unforked branch, mispredicted.** The root is `x` itself. All younger instructions of this path and of paths forked from it after the branch are cancelled. Other branches of the fork tree, including older siblings, survive. One of the cancelled contexts, the lowest-numbered, is restarted at the correct target with ID `x`. It gets the register map, global history and return stack saved at the branch.

**Holes.** Cancelled window entries are not compacted. They become **holes**, which are never issued and are reclaimed when they reach the commit point. If a load is cancelled after it issued, its slot stays occupied until the load completes, so a late cache fill cannot land in a reused slot. Holes are what let the window stay a simple circular buffer while paths die in the middle of it.

## 2. Path contexts and the fork decision

`path_ctx` owns `NPATH` = 4 contexts. Each live context has:

- a path ID;
- a fetch PC (kept in `hydra_mp`);
- a register map, a return stack and a global history (in the units below);
- a *predicted-path* flag.

The predicted-path flag marks the context that followed every branch prediction. The favouring fetch policies need it.

**On a fork:**

- The forking context keeps the predicted direction.
- The lowest free context starts the other direction.
- The new context receives copies of the parent's register map, return stack and global history, all in the same cycle.
- At most one path forks per cycle.

**Fork control.** `fork_decide` decides per branch from three inputs:

- the number of free contexts (never fork without one);
- a dynamic confidence value from `conf_pred`;
- a two-bit profile category and a "fork aggressively" bit, both taken from predecode.

It supports these policies (`fork_pol`):

| policy | forks when |
|---|---|
| naive | always, if a context is free |
| conf | confidence ≤ `thr_conf` |
| resource | confidence ≤ `thr_res[free contexts]`, so thresholds can tighten as contexts run out |
| profile | the branch was profiled "fork aggressively" (no table needed) |
| profile + conf | confidence ≤ `thr_cat[category]` |
| profile + resource | category < free contexts |
| none | never; this is the single-path baseline |

A useful profile rule puts branches that mispredict more than about 35 % of the time into the aggressive class.

**Confidence predictor.** `conf_pred` is a 1024 × 4-bit table indexed by PC. `conf_kind` selects one of three cell types at run time:

- a *ones counter*, which counts correct predictions among the last four;
- a *saturating* up/down counter;
- a *resetting* counter, which counts up on correct predictions and clears on a miss.

The table is read combinationally, with one port per path, and updated when a branch resolves.

## 3. Fetching from several paths

**Fetch blocks.** A fetch block is up to `FETCH_W` = 4 instructions from one cache line (`fetch_block`). The block runs from the fetch PC to the first control instruction in the line, or to the end of the line.

**Arbitration.** `fetch_arb` splits `NBLK` = 2 blocks per cycle among the live, non-stalled paths. A path given more than one block fetches consecutive lines. `fetch_pol` selects one of four policies:

- **simple**: round robin from a pointer that advances each cycle. A lone path gets all blocks.
- **pred-pri**: the predicted path always gets a block first; then round robin.
- **pred-extra**: the predicted path gets a block first. Each other path gets at most one. The predicted path takes whatever is left.
- **pred-ruu**: like pred-extra, but the favoured path is the one with the fewest instructions in the window.

**Stalls.** Fetch stalls as a whole when any of these holds:

- the window cannot take a full dispatch group;
- fewer shadow maps are free than there are paths;
- the outstanding-branch queue is nearly full;
- a resolution is cancelling instructions in this cycle.

**Branches per cycle.** Each path handles at most one control instruction per cycle: the first block that ends in one stops that path's fetch for the cycle.

- A conditional branch is predicted, rated for confidence and may fork.
- A call pushes its return address.
- A return pops its predicted target.
- A jump redirects.

## 4. Branch-prediction state per path

Speculation corrupts prediction state, and with several paths a single copy would be corrupted by paths that later die. Each piece of state is therefore either private per path or repaired by path ID.

- **Return-address stacks (`ras_bank`).** Each context has its own 16-entry circular stack. Calls push and returns pop at fetch time. Every branch records the top-of-stack pointer and the top entry. A misprediction writes both back, which undoes the wrong path's pushes and pops in almost all cases. A fork copies the whole stack.
- **Global history (`ghist_bank`).** Each path has an 8-bit history, shifted speculatively with every predicted direction. Each branch carries the history it saw. On a misprediction the path's history becomes that value shifted with the real direction. A fork copies the parent's history, shifted with the new path's direction.
- **Local history (`lhist_obq`).** The branch history table (BHT) is tagged and 2-way set-associative, with 128 sets. It holds only committed per-branch histories. Speculative histories live in a 32-entry **outstanding-branch queue** (OBQ):
  - Each predicted branch appends its PC, its new speculative history and its path ID.
  - A lookup takes the newest live OBQ entry for that PC, otherwise the BHT.
  - Resolution fixes the entry's newest bit.
  - Squashes drop younger entries in the cancelled subtree, using the same rule as the window.
  - Commit moves the oldest entry into the BHT.
- **Direction predictors.** There are two, and `pred_sel` chooses between them:
  - `alloyed_pred` is a single table of 2-bit counters indexed by global history, local history and PC bits together (5 + 3 + 4 bits).
  - `hybrid_pred` holds a global two-level component and a local two-level component (8 history bits + 4 PC bits each). A 1024-entry chooser is trained only when the two disagree.

  Both are trained when a branch resolves, using the histories recorded with it.

## 5. Renaming and shadow maps

`rename_unit` keeps one map per path from the 32 architectural registers to the window slot of the newest in-flight producer. A register that is not busy has a committed value. There are no renaming dependences between paths.

**Within a group.** An instruction whose source is written earlier in the same group gets that producer's tag.

**Shadow maps.** The fetch group of a conditional branch or return that does not fork ends at that branch. The map after the group is saved in a **shadow map** taken from a shared pool of `NSH` = 8. The pool size is therefore the limit on in-flight unforked branches. A misprediction reloads the path's map from its shadow. A fork copies the parent's live map into the new context.

**Commit and release.** Commit clears "busy" wherever a map or shadow still names the committing slot. Shadows return to the pool when their branch, or the hole it became, is reclaimed at commit.

## 6. The shared window and commit

`ruu` is a 64-entry unified reorder buffer and issue window (a *register update unit*).

**Dispatch.** Up to 8 instructions per cycle enter in fetch order, from all paths together.

**Issue.** Issue selects the oldest ready entries regardless of path: up to 4 per cycle, at most one branch or return (one resolution port) and at most one load. Non-load instructions complete in one cycle. Loads complete when the data cache or an MSHR fill names their slot.

**Resolution.** A branch or return resolves when it issues. `hydra_mp` presents it on the `ex_*` ports and the outside world supplies the real direction or return address. The top then decides the outcome:

- forked-branch resolution;
- misprediction of an unforked branch (including a wrong return target);
- correct prediction, which needs no action.

It then drives the squash into the window, the OBQ and the path contexts. It also redirects and restores the surviving context.

**Commit.** Commit is in order, up to 4 entries per cycle, finished instructions or holes alike. It stops after each conditional branch. Commit drives these actions:

- retiring an OBQ entry into the BHT;
- clearing busy bits in the rename maps;
- freeing shadow maps;
- advancing the path-ID head when the retiring branch is the forked one at the head position.

`cm_*` reports each committed slot, with its PC and whether it was a hole.

## 7. Loads and MSHRs

Loads issue one per cycle to the data cache outside (`ld_*`). A hit completes on the next cycle. A miss goes to `mshr`:

- There are 8 registers, and each holds up to 4 waiting loads.
- A miss to a line that is already outstanding merges into the existing register.
- Each new register is sent to memory (`mem_req_*`) once.
- A returning line (`mem_fill_*`) releases its waiting loads one per cycle.

While every register is taken, loads are held at issue. This is how a finite number of outstanding misses limits the core.

## 8. Top-level interface

`hydra_mp` has five groups of ports. All are plain signals, arrays or `hs_pkg` structs.

- **Configuration:** `fork_pol`, `conf_kind`, `fetch_pol`, `pred_sel` and the thresholds `thr_conf`, `thr_cat[4]`, `thr_res[NPATH]`. Hold these steady, or change them only between runs.
- **Instruction fetch:**
  - `if_v`/`if_pc[path][block]` request a line, addressed by instruction index.
  - `if_pd[path][block][slot]` must return, in the same cycle, each instruction's predecode record: kind, direct target, destination and source register, profile category and aggressive-fork bit.
- **Resolution:** `ex_v`, `ex_pc`, `ex_tag` present one branch or return per cycle. `ex_taken` / `ex_ret_tgt` must answer combinationally.
- **Data side:**
  - `ld_v`, `ld_pc` and `ld_hit` / `ld_line` form the same-cycle cache lookup.
  - `mem_req_v`/`line`/`idx` and `mem_fill_v`/`idx` form the memory side of the MSHRs, with any latency.
- **Commit trace:** `cm_v`, `cm_hole`, `cm_pc`, `cm_tag`, `CMW` wide.

**Timing.** All state changes on the rising edge of `clk`. `rst_n` is an active-low asynchronous reset. After reset, context 0 starts fetching at PC 0 with an empty path ID.

## 9. Parameters

Package `hs_pkg`:

| name | default | meaning |
|---|---|---|
| `NPATH` | 4 | path contexts |
| `FETCH_W` | 4 | instructions per fetch block / cache line |
| `PIDB` | 8 | path-ID bitmap length |
| `PCW` | 32 | instruction-address width (counts instructions) |
| `NSH` | 8 | shadow maps = in-flight unforked branches |
| `OBQ_N` | 32 | outstanding-branch-queue entries |
| `GHW`, `LHW` | 8, 8 | global / local history bits |
| `RAS_D` | 16 | return-stack depth per path |

`hydra_mp`:

| name | default | meaning |
|---|---|---|
| `NBLK` | 2 | fetch blocks per cycle |
| `RUU_N` | 64 | window entries |
| `IW` | 4 | issue width |
| `CMW` | 4 | commit width |
| `NM` | 8 | MSHRs |

Of these values, only the 4 paths and the 4-instruction fetch block come from the design's original description. The other sizes are this implementation's choices. The submodules have further size parameters, listed in their headers.

## 10. Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and stops, and a watchdog ends a run that hangs. With Verilator 5:

```
verilator --binary --timing -Irtl rtl/hs_pkg.sv tb/tb_hydra_mp.sv --top-module tb_hydra_mp -Mdir obj -o sim
./obj/sim
```

Substitute any `tb/tb_<unit>.sv` to test one unit.

**`tb_hydra_mp`** runs the top at its default parameters. The testbench acts as instruction cache, execution oracle, data cache and 40-cycle memory.

- **Program.** The synthetic program has biased branches, loads, calls, a return that sometimes goes one past its call site, and a loop.
- **Policies.** It runs seven phases, covering every fork, confidence, fetch and predictor setting.
- **Checking.** Every committed PC is checked against the architectural successor of the previous committed instruction. Branch outcomes are remembered per window slot, so the check is exact even with several paths in flight.
- **Coverage.** It also counts these events and fails if any never happened: forks, forked-branch resolutions, misprediction restores, return mispredictions, holes, return-stack pushes and pops, multi-line grants, MSHR merges, MSHR-full stalls, shadow-map stalls, window-full stalls and head advances.

A run takes about a second.

## 11. Where this RTL departs from the original description

- **Resolution at issue.** The original model emulates instructions at fetch and resolves branches at the end of execute. Here a branch resolves the cycle it issues, with its outcome supplied from outside.
- **No functional units or data values.** There are no functional units, register values or store handling. In particular there is no load-store queue with path tags, so paths cannot see each other's stores. The core tracks only dependences, timing and control flow.
- **One control instruction per path per cycle.** The original lets a path predict several branches per cycle and fetch past not-taken ones. Here a path's fetch for the cycle ends at its first control instruction.
- **No fetch pipeline depth.** The front end is a single stage, and pipeline depths are not configurable. Fetch also pauses for the cycle in which a resolution cancels instructions.
- **Only the unified-window organisation.** The alternative with a separate reorder buffer and small issue queues is not built.
- **Only per-path return stacks.** The alternatives (one shared stack with per-path pointers, or a stack only the predicted path may change) are not built, because per-path copies performed best. Repair always restores the top-of-stack pointer and the top entry. Saving the whole stack, or only the pointer, is not offered. Likewise only speculative history update with repair is built, not a non-speculative variant.
- **No oracle forking.** "Fork exactly on mispredictions" needs an oracle. The `none` policy gives the single-path baseline.
- **No profiling.** Profiling happens outside the core: the profile category and aggressive-fork bit arrive as predecode bits.
