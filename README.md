# SPREPI: predicting and selectively replaying predicated instructions

On an out-of-order core, a predicated instruction such as `ADDEQ r1, r2, r3` creates
a problem for register renaming. Until the flags are known, nobody can say whether
`r1` after it is the new value or the old one. This is the *multiple-definition
problem*. The usual fix turns every predicated instruction into a *select* micro-op,
`dst = p ? op(a, b) : old_dst`. That needs a third source operand, and it serialises
every predicated instruction behind the previous writer of its destination.

This design predicts the predicate instead, and predicts it early, before rename:

* If the predicate is predicted true, the instruction is renamed normally.
* If it is predicted false, the instruction becomes a no-op that leaves the
  register map alone, so later readers see the previous definition directly.
* A prediction that is not trusted falls back to the select form.

A wrong prediction is not repaired by squashing the pipeline. The fetched
instructions are still the same; only their renaming is wrong. So the front end:

1. rewinds the register map;
2. renames the same instructions again from a buffer, this time with the correct
   predicate;
3. tells the back end which already executed micro-ops really need to run again.
   Everything outside the dependence chain of the wrong predicate keeps its result.

The RTL here is the front end that does all of this: grouping, prediction,
filtering, renaming, replay and result validation. The out-of-order back end,
caches and branch predictor are not part of it. They are represented by ports, and
by a behavioural model in the testbenches.

## Files

| file | contents |
|---|---|
| `rtl/sprepi_pkg.sv` | sizes, condition codes, instruction / micro-op / rename-record structs, TAGE history lengths |
| `rtl/sprepi_top.sv` | the front end: wiring, walk/replay state machine, commit logic, on/off drain |
| `rtl/pred_group_tracker.sv` | assigns fetched instructions to predicated groups |
| `rtl/group_table.sv` | one entry per in-flight group: prediction, real value, history snapshot |
| `rtl/tage_predictor.sv` | 1 + 12 component TAGE predictor with a confidence output |
| `rtl/global_history.sv` | speculative and committed 640-bit global history |
| `rtl/onoff_filter.sv` | periodic on/off decision for prediction use |
| `rtl/inst_buffer.sv` | 128-entry buffer of fetched instructions and their rename records |
| `rtl/pred_rename.sv` | renaming with symmetric allocation, no-op/select conversion, replay, walk-back, commit |
| `rtl/cond_eval.sv` | ARM condition evaluation from N, Z, C, V |
| `rtl/pred_exec_unit.sv` | one predicated ALU lane (normal / no-op / select), 1-cycle latency |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/tb_backend.sv` | behavioural back end and program generator used by the top-level testbenches |
| `tb/tb_sprepi_top.sv` | end-to-end test at reduced sizes, with both predictor variants |
| `tb/tb_sprepi_full.sv` | end-to-end test with every parameter at its default |

## Predicated groups

In if-converted ARM code, many instructions test the same flags with the same
condition (`EQ`) or its opposite (`NE`), until some instruction rewrites the flags. A
*predicated group* is such a run:

* It starts at the first instruction that uses a condition.
* Later instructions using the same condition or its opposite join it.
* Every open group ends at the next flag-defining instruction.

The whole group shares one prediction, made for its first instruction (the *head*).
Members with the opposite condition use the inverted value.

In ARM encoding, opposite conditions differ only in bit 0. `cond[3:1]` therefore
names the pair, and there are 7 pairs besides AL/NV. `pred_group_tracker` keeps one
open-group slot per pair.

* It accepts, each cycle, the longest prefix of the 4-wide fetch bundle that opens
  at most one new group.
* A flag-defining instruction closes all slots after its own membership is settled.
* Conditional branches never join groups, because the branch predictor handles them.

`group_table` holds, per in-flight group:

* the condition and the PC of the head;
* the prediction, and whether it is used;
* the real value once known;
* the buffer slot of the head, where a replay starts;
* the history seen by the head.

An entry is freed when the flag-defining instruction that closed the group commits.

## Predicting predicates: TAGE, the two histories and the two filters

Predictions come from a TAGE predictor with a 3072-entry bimodal base and 12 tagged
tables of 1024 entries, 15,360 entries in all.

* Tagged tables have 9-bit tags, 3-bit counters and 2-bit usefulness counters.
* History lengths grow geometrically from 4 to 640: `L(i) = round(4 * 160^((i-1)/11))`.
* Indices and tags are XOR-folds of the PC and the history.
* Training happens at commit: the provider counter is updated, usefulness changes
  when the provider and the alternate prediction disagree, and a misprediction
  allocates an entry in a longer table.
* `high_conf` means the provider's counter is saturated.

Two variants are built, selected by the `BRPRED` parameter of `sprepi_top`.

**BrPred-OnOff (`BRPRED=1`, default).**

* The history holds branch directions *and* one bit per predicated group: the
  predicate of the head's own condition.
* Confidence filtering is unusable with this history. When a prediction is not
  used, the speculative history after it is only a guess, and later lookups read
  the wrong entries.
* Instead, `onoff_filter` decides globally. Every 10,000 committed predicated
  instructions, prediction use is switched on if fewer than 500 committed group
  predictions were wrong, and off otherwise.
* Off means every group member is renamed as a select.
* Switching off happens at once. Switching on first drains the pipeline: fetch
  stops until the buffer is empty. The speculative history is then reloaded from
  the committed one, so it is exact again before predictions are used.

**BrO-HighConf (`BRPRED=0`).**

* The history holds branch directions only.
* A prediction is used only when `high_conf` is set.
* The on/off filter is not instantiated.

In both variants, the real predicate is used instead of any prediction when it is
already known at rename. The back end signals this by presenting the flags on
`cur_flags_v/cur_flags`.

## Renaming with symmetric allocation

`pred_rename` gives *every* instruction with a destination a new physical register
on its first renaming, whatever its predicate. It also always takes a buffer (ROB)
slot. Only the map update depends on the predicate:

| predicate at rename | micro-op kind | map of `dst` |
|---|---|---|
| unpredicated, or usable and true | `K_NORMAL` | moves to the new register |
| usable and false | `K_NOOP` | unchanged; the new register is released at commit |
| not usable | `K_SELECT`, with the old mapping as third source `ps3` | moves to the new register |

Because allocation never depends on the prediction, a replay needs no new registers
or slots. Each instruction keeps the destination register it was first given, so
results computed before the replay are still in the same place.

Each buffer entry stores a *rename record*:

* the destination register;
* the previous mapping;
* whether the map moved;
* the *rename form*: the kind plus the three source registers.

At commit, the register made dead returns to the free list. That is the previous
mapping for instructions that moved the map, and the instruction's own register for
no-ops. A full flush (`flush_all`, used for branch mispredictions) copies the
committed map back and rebuilds the free list from it.

## Replay after a predicate misprediction (the hard part)

The back end resolves a group by sending its flags on `res_v/res_grp/res_flags`.
`group_table` evaluates the condition. It reports a misprediction when the
prediction was used and was wrong.

### Walk back, then replay

`sprepi_top` then runs two phases, each handling up to 4 instructions per cycle.

**WALK.** The buffer is read backwards, from the youngest renamed instruction to the
mispredicted group's head. The rename records undo every map update
(`map[dst] = old_pdst`), which rebuilds the map as it was just before the head.

**REPLAY.** The buffer is read forwards from the head, and every instruction is
renamed again (`R_REPLAY`).

* The kept destination register is reused.
* The mispredicted group now reads its real value.
* In BrPred mode, the speculative history is first restored from the snapshot in
  the group's entry. Every later group head met during the replay is then
  predicted again with the repaired history, and the history is updated as it goes.
* At most one group head is handled per replay cycle, because the predictor has
  one read port.
* New rename records overwrite the old ones, and the micro-ops go out again with
  `replay=1`.
* Fetch is stalled throughout. When the replay reaches the buffer tail, normal
  renaming resumes.

### Nested mispredictions

A misprediction can arrive during a walk or a replay.

* If its group is older than the one being repaired, the walk simply restarts
  further back. It starts from wherever the map currently is: the walk pointer, or
  the replay pointer.
* If it is younger, it is ignored. The group is now resolved, so the replay will
  use its real value when it gets there.

Three details keep this correct:

* **Commit limit.** Commits stop at the head of a walk or replay in progress,
  because results from there on may still be recomputed.
* **Full buffer.** When all 128 entries are in flight, head and tail are equal. So
  the walk length is kept in its own counter, and the replay length is derived from
  the buffer occupancy, not from pointer differences.
* **Same-cycle resolution.** If the group the replay is about to re-predict is
  resolved in that very cycle, the replay waits one cycle and then uses the real
  value. This avoids checking a prediction that is being replaced.

### Which results stay valid

A replayed micro-op carries `reexec`. It is set when either:

* its new rename form differs from the recorded one (kind changed, or a source now
  maps to a different register); or
* one of its sources is a register written by an instruction already marked for
  re-execution in this replay.

The destination of a re-executed instruction joins an "invalid" set. That set is
cleared when a new replay starts.

Take a predicated instruction I1 that was predicted false but is true. Then:

* I1 is re-executed, and its dependents I2/I3 see a changed source register and are
  re-executed too.
* I4 reads unchanged register names, one of which I3 produces; it is re-executed
  because that register is invalid.
* An independent instruction keeps its result.

The back end must recompute only the `reexec` micro-ops. For the others it keeps the
value already in the physical register.

This validity rule is this design's own. The original scheme uses rename-sequence
tags from an earlier control-independence mechanism that is not described here. The
rule gives the same answers on the cases above, but it may re-execute somewhat more
than an exact scheme would.

## Timing and interfaces of `sprepi_top`

* **Single stage.** The front end is one combinational stage with array reads
  between registers. Grouping, prediction, group-table allocation, renaming and the
  buffer write all happen in the cycle an instruction is accepted. The micro-ops
  appear on `out_valid/out_uop` one cycle later (registered).
* **Fetch.** `in_valid[3:0]/in_inst` offer up to 4 instructions. `in_accept_n` says
  how many were taken this cycle.
* **Fetch stalls.** Fetch stalls during walk/replay and drain, and when a
  misprediction is being reported. It also stalls when fewer than 4 free registers
  or buffer slots remain.
* **Commit.** `commit_req_n` asks to retire up to 4 instructions from the buffer
  head. `commit_ack_n` grants a prefix of them. At most one group head commits per
  cycle, because the predictor has one training port.
* **Branch directions.** `cm_br_wrong[i]` reports that a committing branch went the
  other way from its fetched direction. The committed history then takes the real
  direction; the back end follows with `flush_all`.
* **Status outputs.** `mode_on`, `drain_req` and `replaying` are status outputs.
* **ALU lane.** `exec_*` is one predicated ALU lane (`pred_exec_unit`), brought out
  as an example of executing the three micro-op kinds.
* **Assertion.** An assertion checks that at most one group head is accepted per
  cycle.

## Sizes

| parameter | default | origin |
|---|---|---|
| rename width | 4 | 4-way core of the evaluated configuration |
| buffer / ROB entries (`DEPTH`) | 128 | equal to the maximum number of in-flight instructions |
| physical registers (`NPHYS`) | 256 | evaluated configuration |
| on/off interval, threshold | 10,000 / 500 | as specified for the filter |
| TAGE | 1 + 12 components, 15,360 entries | 15K entries total as specified; geometry chosen here |
| in-flight groups (`NGRP`) | 32 | this design |
| architectural registers | 16 | ARM r0–r15 |

All defaults are the full evaluated sizes; nothing was scaled down.

## Departures and choices to be aware of

* **Grouping.** At most one new group opens per fetch cycle and per replay cycle,
  and at most one group head commits per cycle.
* **Map repair.** The map is repaired by walking back over the buffer. Checkpoints
  were not used.
* **TAGE details.** The predictor's geometry, hashes, confidence rule and update
  policy are ordinary TAGE choices, not taken from a specification. There is no
  periodic usefulness reset.
* **Training.** The predictor is trained at commit, with the committed history.
* **Branches.** Branch mispredictions use a full flush. The branch predictor
  itself, the back end, the load/store queue and the memory system are outside
  this RTL.
* **Validity rule.** Result validity uses the rename-form / invalid-set rule
  described above.
* **Conditions.** Condition encoding is ARM's. NV is treated like AL.
* **Reset.** Prediction use is on after reset.
* **8-wide core.** An 8-wide core (256 in flight) was evaluated too, but is not
  built. `WIDTH` is a package constant; `DEPTH` and `NPHYS` are parameters.

## Simulating

Each module has a testbench that prints `TB_RESULT checks=N failures=M`. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/sprepi_pkg.sv rtl/cond_eval.sv rtl/pred_exec_unit.sv rtl/global_history.sv \
  rtl/tage_predictor.sv rtl/onoff_filter.sv rtl/pred_group_tracker.sv \
  rtl/group_table.sv rtl/inst_buffer.sv rtl/pred_rename.sv rtl/sprepi_top.sv \
  tb/tb_backend.sv tb/tb_sprepi_top.sv --top-module tb_sprepi_top
./obj_dir/Vtb_sprepi_top
```

For a block testbench, list the package, the module (plus `cond_eval.sv` where it is
used) and `tb/tb_<module>.sv`.

### End-to-end tests

`tb_backend` generates a looping program of plain, predicated, flag-setting and
branch instructions.

* Its flag patterns alternate between predictable and random phases.
* It executes micro-ops as they arrive, with select micro-ops using the real
  predicate.
* It resolves groups after random delays, sometimes out of order.
* It recomputes only replayed micro-ops flagged `reexec`.
* It injects branch-misprediction flushes.
* At every commit it checks the kind and the architectural register value
  against an in-order interpreter.

A replay that leaves a stale value, or a no-op with a true predicate, therefore
shows up as a failure.

`tb_sprepi_top` runs BrPred-OnOff and BrO-HighConf at reduced sizes: 32-entry
buffer, 8 groups, 64 registers, a small predictor, and a 200 / 20 on/off interval.
It counts each mechanism and fails if any never happened:

* fresh renames, group heads, used predictions;
* no-ops, selects;
* replays, re-executed and kept results;
* bundle splits, the one-head commit limit, fetch stalls;
* flushes;
* mode off/on and drain, and known-at-rename predicates (BrPred-OnOff only).

`tb_sprepi_full` runs 30,000 instructions through the default-size front end
(about 10 s in Verilator).

The block testbenches compare against reference models. They include the
two-group grouping example and the four-instruction replay example described
above, and exhaustive condition evaluation.
