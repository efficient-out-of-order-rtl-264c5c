# Guard prediction for out-of-order execution of a guarded ISA (BO-BG / BoL front end)

In a guarded (predicated) instruction set such as 32-bit ARMv7, almost every instruction
carries a condition: it writes its destination only if the condition, evaluated on the
N, Z, C and V flags, is true. An out-of-order core renames registers before the flags are
known, so after a guarded write to `R1` it cannot tell whether a later reader of `R1` must
read the new physical register or the previous one. This is the *multiple-definition
problem*.

The classic fix turns every guarded instruction into a conditional move that always writes
its new physical register with either the new value or the old one (FPCM). In its *split*
form the instruction is cracked into two micro-ops: the operation writes a temporary, and a
select micro-op picks `guard ? temporary : old value`. This works, but it adds a micro-op
and a dependency to every guarded instruction.

This RTL implements the alternative: **predict guards the way branches are predicted**.
- A guard predicted true makes its instruction an ordinary, unguarded micro-op.
- A guard predicted false removes the instruction; only a check remains.
- Predictions are checked at execute. A wrong one flushes the pipeline and fetch restarts
  at the guarded group.

Guard predictions are less accurate than branch predictions, and every wrong one costs a
flush. So the predictor measures whether guard prediction is paying off and switches
between two modes:
- In *SY* mode every guard prediction is used.
- In *HCO* mode a guard prediction is used only when it is high confidence. The other
  guards fall back to split FPCM.

The design is the front-end part of such a core:
- the hybrid **BO-BG** branch-and-guard predictor;
- its **BoL** (benefit-or-loss) mode controller;
- the **guarded-group tracker**;
- the **split-FPCM cracker**;
- the **execute-side guard unit**.

Rename, issue, execution units, the reorder buffer, caches and branch target prediction are
outside it. The top module `bobg_frontend` has ports where they connect.

## Guards, guard pairs and guarded groups

The fourteen useful ARMv7 conditions form seven pairs, each a flag formula and its negation:

| pair | condition (true / false) | formula |
|------|--------------------------|---------|
| 0 | EQ / NE | Z |
| 1 | CS / CC | C |
| 2 | MI / PL | N |
| 3 | VS / VC | V |
| 4 | HI / LS | C & !Z |
| 5 | GE / LT | N == V |
| 6 | GT / LE | !Z & (N == V) |

With the ARMv7 encoding, `cond[3:1]` is the pair and `cond[0]` selects the negated form.
AL is unguarded. NV is treated as always true. `guard_eval` computes the formula and the
guard.

A *guarded group* is made of the instructions that use one occurrence of a guard pair.
It starts at the first instruction that uses the pair. It ends at the next instruction that
writes the flags. This matters because if-converted code interleaves the "taken"
(e.g. EQ) and "not taken" (NE) sides of a former branch: both sides share one flag
formula, so they share one prediction.

**The group's first instruction is the only one that is predicted.** Its prediction is the
formula value of the pair, not the polarity of the instruction. The predictor is looked up
once per group, and the value is appended once to the branch-and-guard history. Every later
member reuses the value and applies its own polarity.

`guard_group_tracker` holds the per-pair state, seven entries:
- *open*;
- the value;
- whether the prediction is used;
- the BO confidence;
- *known*: set when the value is a resolved one, not a prediction;
- *refetch*: set when the group is being refetched after a misprediction.

Any flag-writing instruction closes all seven groups. A guarded instruction that writes the
flags itself still belongs to its group (it reads the old flags), and then closes it.

Conditional branches are also guarded instructions. Here they are always predicted on their
own and neither open nor join a group. The tracker state is part of every checkpoint.

## How a guarded instruction becomes micro-ops

`split_fpcm_cracker` receives one instruction per cycle with the tracker's decision and emits
micro-ops one per cycle (`uop_kind_e`):

| situation | micro-ops |
|-----------|-----------|
| unguarded, or guard predicted true and used | one `OP`, executed unguarded. The group's first instruction also verifies the guard. |
| guard predicted false and used, first of group | one `CHECK`: computes only the guard and verifies it. |
| guard predicted false and used, later member | one `NOP`: needs no issue-queue entry or execution. It only retires so its commit-time update happens. |
| guard not predicted or not used | `OP` writing temporary register 16 (and temporary flags if it sets flags), then `SELECT`: `rd = guard ? tmp : rd`. |

A conditional branch is one `OP` micro-op.

A split instruction holds the cracker for two cycles, so `in_ready` drops for one cycle.
The end-to-end test reports these cycles as "split stalls". The `SELECT` micro-op reads the
old value of `rd` as an ordinary source, so a conventional renamer hands it the previous
physical register. This is the `P_before` of the FPCM rule.

Only the first micro-op of an instruction that was predicted carries the `verify` bit. Only
the micro-op marked `last` carries the commit update of the instruction.

## The BO-BG predictor

`bobg_predictor` has two TAGE components of identical geometry (`tage_predictor`):
- **BO** sees a global history of conditional-branch outcomes only. Guard mispredictions
  never corrupt it.
- **BG** sees a history of branch outcomes *and* first-of-group guard values. It is more
  accurate when guards correlate with branches. It is only correct if every guard that
  entered the speculative history was right, or was flushed when wrong.

A PC-indexed **META** table (`meta_predictor`, 1024 × 5-bit signed counters) chooses
between the two components:
- a counter ≥ 0 selects BG;
- it is trained towards the right component only when BO and BG disagree.

### TAGE component

Each component has:
- a 4096 × 2-bit bimodal base table;
- twelve tagged tables of 1024 entries each, with a 3-bit signed counter, 12-bit tag and
  2-bit useful counter per entry;
- history lengths 4, 6, 10, 16, 25, 40, 64, 101, 160, 254, 403, 640 (a geometric series).

Index and tag are the PC XORed with the history slice, folded to the needed width. The
folding is a fixed XOR tree, `^(hist & mask)` per output bit.

Prediction:
- The provider is the matching table with the longest history. The alternate is the next
  longer match below it, or the base table.
- A prediction is **high confidence** when the provider counter is saturated: 3 or −4 in a
  tagged table, 0 or 3 in the base table.

Guard training: for a non-branch guard, a correct prediction from a counter at 1, 2, −2 or −3
strengthens that counter only with probability 1/32. A 16-bit LFSR provides this (its
5 low bits equal to zero). So a guard only reaches high confidence after a long run of
correct predictions, which keeps high-confidence guard mispredictions rare. Branches train
normally.

Allocation and aging are the usual TAGE rules:
- On a misprediction, an entry is allocated in the lowest longer table whose useful counter
  is zero. If there is none, the useful counters of those tables are decremented.
- Useful counters follow whether the provider beat the alternate.
- Every 2^18 updates all useful counters are halved. A background sweep does this, one
  index per cycle.

After reset the tables are cleared by a 4096-cycle sweep, and `ready` rises when it is done.

### Histories and recovery

Each history is a `global_history` instance: a 1024-bit circular buffer and a head
pointer. A push decrements the pointer and writes the bit. The newest 640 bits, bit 0
newest, are a rotation of the buffer.

A checkpoint is just the two pointers (BO and BG) plus the tracker state. Restoring a
checkpoint and pushing the resolved outcome happen in one cycle. The buffer gives 384 pushes
of slack beyond the longest history, more than any realistic window of in-flight
instructions.

There are four histories:
- speculative BO and speculative BG, read at fetch;
- commit-time BO and commit-time BG, read at commit.

At commit both components are **re-read with the commit-time histories** and trained. META
and BoL are trained at the same time. This is the behaviour the core would see in SY mode
on the correct path, and it holds whichever mode is active. So the predictor needs no
per-instruction storage of predictions beyond the BO confidence bit.

## BoL: choosing between SY and HCO mode

BoL is an 11-bit signed saturating counter, updated at commit. `Penalty` = 64 is the
assumed cost of one extra misprediction, in instructions' worth of benefit.

| committed micro-op | update |
|--------------------|--------|
| conditional branch, BO-BG ≠ BO | +Penalty if BO-BG right, −Penalty if wrong |
| first of a guarded group, BO not high confidence | +1, and −Penalty if BO-BG wrong |
| first of a guarded group, BO high confidence, BO-BG ≠ BO | ±Penalty as for branches |
| later member of a group whose first had BO not high confidence | +1 |

The "+group size" of the rule is applied as +1 per committed member. This gives the same
total without waiting for the group to end.

The counter asks for HCO when it drops below −512 and for SY when it rises above +512.
The gap between the two avoids ping-ponging. The mode after reset is HCO.

Two cases use different guards (`lk_use`):
- **SY mode**: the prediction is META's choice of BO or BG, and every guard prediction is
  used.
- **HCO mode**: the prediction is BO's, and a guard prediction is used only if BO is high
  confidence. Unused guard predictions are still pushed into the speculative BG history,
  which may therefore be wrong.

Switching modes:
- **SY → HCO** happens at once.
- **HCO → SY** needs a correct speculative BG history. The predictor raises `drain_req`,
  and the front end stops accepting instructions. When the back end reports
  `backend_empty`, the commit-time histories are copied into the speculative ones and the
  mode becomes SY. An assertion checks that no lookup, recovery or update happens in the
  copy cycle.

## Recovery

- **Guard misprediction.** The micro-op with `verify` (first of its group) computes the
  guard at execute (`guard_exec_unit`). If it differs from the used prediction, it raises
  `redirect_valid` with its own PC. The front end then:
  - restores the checkpoint of that micro-op;
  - pushes the resolved value into the speculative BG history;
  - flushes the cracker;
  - reopens the group with the resolved value, marked *known* and *refetch*.

  The refetched first instruction therefore needs no new prediction and does not push the
  history twice. It is not verified again. Its commit update carries the resolved outcome.
- **Branch misprediction** (`br_mispredict`, resolved outside) restores the branch's
  checkpoint and pushes the resolved direction into both histories. The target is supplied
  by the core.

A guard recovery and a branch recovery in the same cycle are not allowed (asserted). The
back end must pick the older one.

## Top-level interface (`bobg_frontend`)

All handshakes are valid/ready, one item per cycle. Types are in `bobg_pkg`.

| group | signals | meaning |
|-------|---------|---------|
| `in_*` | `in_valid`, `in_instr` (`instr_t`), `in_ready` | decoded instructions: PC, opcode, condition, branch / sets-flags / writes-rd, register fields |
| `uop_*` | `uop_valid`, `uop` (`uop_t`), `uop_ready` | micro-ops with kind, verify, prediction, update kind, BO confidence, checkpoint |
| `ex_*` | `ex_valid`, `ex_uop`, `ex_flags`, `ex_tmp_val`, `ex_old_val`, `ex_tmp_flags` → `ex_guard`, `ex_base`, `ex_sel_val`, `ex_sel_flags` | execute-side select and guard check |
| redirect | `redirect_valid`, `redirect_pc` | guard misprediction, refetch from this PC |
| `br_*` | `br_mispredict`, `br_ckpt`, `br_taken` | resolved branch misprediction |
| `cm_*` | `cm_valid`, `cm_kind`, `cm_pc`, `cm_outcome`, `cm_bo_hc` | commit update (from the micro-op marked `last`) |
| status | `backend_empty` in; `mode`, `drain_req`, `bol` out | mode control |

`in_ready` is low in four cases:
- during the 4096-cycle table initialisation;
- while the cracker holds a split instruction;
- during a drain;
- in a recovery cycle.

Lookup is combinational in the accept cycle. The micro-op is registered and leaves one
cycle later.

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| TAGE tagged tables | 12 | `bobg_pkg::TAGE_NTAB` |
| tagged table size | 1024 (`TAGE_LOG_T`=10) | own choice |
| base table size | 4096 (`TAGE_LOG_BASE`=12) | own choice |
| tag / counter / useful widths | 12 / 3 / 2 bits | own choice |
| longest history | 640 (`HIST_LEN`), buffer 1024 | own choice |
| META | 1024 × 5 bits | as specified |
| BoL width / Penalty / thresholds | 11 bits / 64 / ±512 | as specified (`PENALTY`, `THRESH` on the top) |
| guard strengthening probability | 1/32 | as specified |
| useful-counter aging period | 2^18 updates | own choice |

Storage per TAGE component is 212 Kbit in 16K entries. The reference configuration budgets
256 Kbit in 15K entries. Power-of-two tables were kept here.

## Departures and limits

- **One instruction per cycle.** The reference core fetches and predicts a whole fetch group,
  4 or 8 wide. This front end takes one instruction per cycle, and a split instruction
  takes two cycles. The function is the same; the bandwidth is not.
- **TAGE internals** (table sizes, hashing, history lengths, allocation, aging) are standard
  TAGE choices. The design only fixes the component count and budget, the confidence
  scheme and the 1/32 guard rule.
- **The group-size term of BoL** is added incrementally (+1 per member), not once per group.
  The sum is the same; only saturation order may differ.
- **Branches are not group members**, even though they are guarded instructions in ARMv7.
- **Commit-time training re-reads the tables** instead of storing each prediction in the
  pipeline. If a table entry changed between fetch and commit, the training uses the newer
  state.
- **Predicted-false members** become NOP micro-ops that retire. They need no issue-queue
  slot, which gives the reduced queue pressure of guard prediction.
- **Not included:** renaming, issue queue, reorder buffer, execution units, caches, BTB and
  return stack. The front end expects the core to supply branch targets, execute micro-ops
  and report recoveries and commits.

## Verification

Each module has a self-checking testbench in `tb/` that compares it with an independent
model and prints `TB_RESULT checks=<n> failures=<n>`.

`tb_bobg_frontend` runs the whole front end at its default size. It has a small in-order
back end (six-cycle execute latency, in-order commit) and a golden ISA model. The program
is an if-converted loop, in three phases:
1. a data-dependent, poorly predictable guard phase (A);
2. a regular, predictable phase (B);
3. phase A again.

Each phase runs 300 iterations. The testbench checks that:
- the committed architectural state matches the model;
- every mechanism occurred: unguarded, select, check and NOP micro-ops, guard and branch
  recoveries, refetched group heads, split stalls, both mode switches and a drain.

A typical run commits about 12,900 instructions in 21,800 cycles, with two switches to SY,
one to HCO and 34 guard recoveries.

Simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/bobg_pkg.sv \
    $(ls rtl/*.sv | grep -v bobg_pkg) tb/tb_bobg_frontend.sv \
    --top-module tb_bobg_frontend -o sim
./obj_dir/sim
```

Replace `tb_bobg_frontend` with any other testbench name. All resets are synchronous and
active low (`rst_n`). All state that is read is reset or initialised.
