# Low-energy dynamic branch prediction for the Cell SPU

The Synergistic Processor Unit (SPU) of the Cell processor has no branch
predictor. It fetches straight on past every branch and leans on
compiler-inserted hint instructions to fetch a branch's target early. A taken
branch that was not hinted, or a hint that was wrong, costs about 18 cycles.
This RTL adds a small dynamic predictor to the SPU front end: a bimodal
(two-bit counter) predictor whose counters and targets sit in a direct-mapped
Branch Target Buffer (BTB).

Most predictors read their table for every fetched instruction. Here the goal
is to read the BTB as rarely as possible. The table is read only when the
instruction pair entering the instruction buffer holds a branch, or, in the
third scheme, only when a hint or branch-warning instruction executes. Each
resolved branch writes its entry once. The rest of the time the BTB is idle.

## The three schemes

One parameter, `SCHEME` (type `spe_bp_pkg::scheme_t`), selects one of three
variants at build time:

| `SCHEME` | BTB read when | effect of a taken prediction |
|---|---|---|
| `SCHEME_SBP` (simple bimodal) | a branch is pre-decoded in the pair entering IB1 | IB2 flushes the ILB and refetches at the BTB target (`redirect_o`) |
| `SCHEME_SBP_OH_NLS` (**default**) | as above, and also when a hint executes | as above, plus hints are used unless the BTB says the hinted branch is strongly not taken |
| `SCHEME_BWP_OH_NLS` (branch warning) | only when a hint or a branch warning executes | the target line is prefetched into an extra ILB line, and the fetch switches to it when the branch arrives (`use_xline_o`) |

The default is the simple bimodal predictor combined with hints. It is the
variant expected to give the best speed-up for the energy spent. The
aggressive predictor, which reads the BTB for every fetched instruction and
buffers 8 speculative targets, is only a reference point. It is not included.

The names decode as follows. SBP is the simple bimodal predictor. OH means
the predictor may overrule hints. NLS means a hint is not loaded if its
branch is strongly not taken. BWP is the branch warning predictor.

## Where prediction happens in the pipeline

The SPU front end has the stages IF1–IF5 (fetch from local store), IB1–IB2
(instruction buffer), ID1–ID3 (decode) and IS1–IS2 (issue). Instructions
leave the Instruction Line Buffer (ILB) in pairs, one doubleword per pair.

* **IB1 (cycle t).** `branch_predecode` looks at the opcode bits of both
  instructions of the pair. If either is a branch, the controller sends the
  word address of the first branch to the BTB. The BTB is read synchronously.
* **IB2 (cycle t+1).** The BTB answers. On a tag hit whose counter says
  taken, `redirect_o` is raised with the stored target. The SPU then flushes
  the ILB and fetches from that target. `ib2_pred_o` carries the prediction
  (valid, branch address, direction, target, source) so it can travel down
  the pipeline with the branch.
* **Resolution.** When the branch executes, the SPU presents it on `res_i`
  together with the prediction it carried. The unit raises `mispredict_o`
  and `restart_addr_o` if the prediction was wrong. In every scheme the BTB
  entry is updated in the same cycle.

The pair that is in IB1 during a redirect or a misprediction is on the wrong
path, so its lookup is cancelled.

**Pairs with two branches.** Sometimes both instructions of a pair are
branches, for example a loop-exit test followed directly by the loop branch.
There is only one BTB read port, so the two are looked up in turn:

* The first branch is read in IB1.
* If the BTB predicts it not taken, the second branch is read in the next
  cycle. During that cycle `ib1_hold_o` asks the SPU to keep the following
  pair in IB1 for one more cycle.
* The second branch's prediction appears on `ib2_pred_o` one cycle after
  the first branch's, and `redirect_o` follows it if it is predicted taken.

The branch-warning scheme has no pre-decode and never holds.

## BTB and counter

`btb` is a direct-mapped array with `ENTRIES` = 256 by default. Addresses
are word addresses in the 256 KB local store, so they are 16 bits wide. The
low `log2(ENTRIES)` bits select the entry and the remaining
`16 - log2(ENTRIES)` bits form the tag. An entry holds the tag, a 16-bit
target and a 2-bit counter. That is 18 data bits beside the tag, plus a
valid bit that reset clears.

The counter is `bimodal_counter`. It counts up on a taken branch and down on
a not-taken one, and saturates at both ends:

| state | meaning |
|---|---|
| `00` | strongly not taken |
| `01` | weakly not taken |
| `10` | weakly taken |
| `11` | strongly taken |

The upper bit is the predicted direction. A state whose two bits are equal
is a strong state.

A lookup that misses predicts not taken and reports the counter as `01`.

The update port reads the entry and writes it back in the same cycle, so a
branch that was never looked up still trains its entry:

* **Hit.** The counter steps. A taken outcome also replaces the target.
* **Miss.** The entry is reallocated as if its old counter had been `01`.
  One taken outcome therefore gives `10` and predicts taken next time. One
  not-taken outcome gives `00`.

Allocating on not-taken outcomes matters. Without it, a branch that is
hinted but almost never taken could never reach `00`, and its hint could
never be overruled.

## Hints, overruling and the single hint register

This is the part that takes the most care.

A hint arrives on `hx_valid_i`, `hx_branch_i` and `hx_target_i`. It carries
the address of the branch it refers to and the branch's target. In the
branch-warning scheme, a hint whose target is 0 is a branch warning. The
simple bimodal scheme ignores all hints.

1. **Waiting for the BTB port.** An executed hint waits in a one-entry
   register until the BTB read port is free. Branch lookups from IB1 come
   first. A newer hint replaces one that is still waiting.
2. **Hint lookup.** One cycle after its BTB read, the hint is either
   overruled or loaded:
   * If the hinted branch hits in the BTB with counter `00` (strongly not
     taken), the hint is dropped and `hint_overruled_o` pulses.
   * Otherwise (a miss, or any other counter value), the hint is loaded:
     `hint_load_o` passes it to the SPU's own hint logic, and the unit
     records it in its *active hint* register.
3. **Warning lookup.** A warning is loaded only if the BTB predicts its
   branch taken. In that case the BTB target becomes the warning's target,
   the line holding that target is prefetched into the extra ILB line
   (`pf_valid_o`), and the active hint register records the warning.
4. **One active hint.** Only one hint can be active at a time, and hints and
   warnings share the register. Each executed hint or warning replaces the
   previous one. If it is not loaded, it leaves the register empty.
5. **Following a hint.** When the pair entering IB1 contains the active
   hint's branch address, the branch follows the hint. No BTB read is made
   for it, and `ib2_pred_o.src` is `SRC_HINT` or `SRC_WARN`. For a warning,
   `use_xline_o` is raised in IB1 itself, so the fetch can carry on from the
   extra line without losing a pair.
   If the other instruction of that pair is also a branch, it gets no
   prediction and is treated as not taken.

A compiler that treats warnings as hints can insert a warning that pushes
out the hint of a nearby loop branch, because only one hint is active. The
end-to-end test program shows this effect on purpose: its warning version
drops the hint of the loop branch.

## The extra ILB line

`ilb_extra_line` holds one 32-instruction line: the line-aligned block of
local store that contains a warned branch's predicted target.

* **Fill.** A prefetch issues one read on the `ls_*` port. The local store
  must answer in order with the whole line.
* **Repeated prefetch.** A prefetch of the line that is already held, or
  already on its way, is dropped.
* **Superseding prefetch.** A newer prefetch supersedes an older one, and
  answers to superseded requests are discarded.
* **Reading.** The fetch reads instruction pairs through `xl_rd_addr_i`,
  `xl_rd_hit_o` and `xl_rd_instr_o`.
* **Busy.** `xl_busy_o` shows that a fill is still outstanding. This is the
  case where a warning executed too close to its branch.

In the default scheme the line is built but never filled.

## Interface of `spe_bpu`

The top level contains `bp_control`, which holds the `btb` with its
`bimodal_counter` and two `branch_predecode` instances, and the
`ilb_extra_line`. The SPU pipeline, its existing ILB and hint logic, and the
local store are outside the unit. The ports below are the points where they
connect.

| port | dir | meaning |
|---|---|---|
| `ib1_valid_i`, `ib1_addr_i`, `ib1_instr_i[1:0]` | in | pair entering IB1 (pair word address, the two instruction words) |
| `hx_valid_i`, `hx_branch_i`, `hx_target_i` | in | executed hint (target 0 = warning in the BWP scheme) |
| `res_i` (`resolve_t`) | in | resolved branch: address, outcome, target, carried prediction |
| `ib2_pred_o` (`pred_t`) | out | prediction for the previous cycle's pair |
| `redirect_o`, `redirect_target_o` | out | IB2: flush the ILB and fetch the target |
| `ib1_hold_o` | out | present the IB1 pair again next cycle (second lookup of a two-branch pair) |
| `use_xline_o`, `xline_target_o` | out | IB1: continue fetching in the extra line |
| `xl_rd_addr_i`, `xl_rd_hit_o`, `xl_rd_instr_o`, `xl_busy_o` | in/out | read port of the extra line |
| `hint_load_o`, `hint_load_branch_o`, `hint_load_target_o` | out | hint to load into the SPU hint logic |
| `ls_req_valid_o`, `ls_req_line_o`, `ls_req_ready_i`, `ls_rsp_valid_i`, `ls_rsp_data_i` | out/in | local store line read for the extra line |
| `mispredict_o`, `restart_addr_o` | out | the branch on `res_i` was mispredicted, and the address to restart at |
| `btb_rd_o`, `btb_wr_o`, `hint_overruled_o`, `pf_valid_o` | out | activity, for energy accounting |

All addresses are 16-bit local-store word addresses. There is one clock
(`clk`) and an asynchronous active-low reset (`rst_n`). Reset clears the BTB
valid bits, the active hint register and the extra line.

## Choices made in this implementation

These are not fixed by the predictor's concept. Change them if your
integration needs something else.

* **Branch decoding.** Branches are recognised from the opcode bit patterns
  of the public SPU instruction set, documented in `branch_predecode.sv`.
* **Branches per pair.** Two branches in one pair are looked up one after
  the other, at the cost of one held IB1 cycle (see above).
* **Hint matching.** Hints are matched by the address of their branch, which
  is done in this unit rather than in the SPU.
* **Target-0 hints outside the warning scheme.** Only the branch-warning
  scheme reads a target of 0 as a warning. The other two treat it as an
  ordinary hint to address 0.
* **BTB allocation and reset.** Every resolved branch allocates an entry,
  with the initial state described above. A valid bit per entry is added.
* **BTB port priority.** Branch lookups get the single BTB read port before
  hint lookups.
* **Read-during-write.** A lookup and an update of the same entry in the
  same cycle return the old content.
* **Extra line.** Its fill protocol, the alignment of the fetched line, and
  the limit of `MAX_OUTST` = 4 outstanding reads.
* **Misprediction check.** The unit computes mispredictions from the
  prediction carried with the branch. The refetch penalty itself belongs to
  the SPU.

The cycle penalties that make the schemes pay off belong to the SPU pipeline,
not to this unit. They are 18 cycles for a miss, 7 cycles for a taken branch
found by pre-decode and BTB, and none for a hint or warning executed early
enough. The end-to-end testbench tallies them only as a model.

## Simulating

All files are SystemVerilog-2017. The package `rtl/spe_bp_pkg.sv` must be
compiled first. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl \
    --top-module tb_spe_bpu rtl/spe_bp_pkg.sv tb/tb_spe_bpu.sv
./obj_dir/Vtb_spe_bpu
```

Each testbench prints `TB_RESULT checks=N failures=M` at the end.

| testbench | what it checks |
|---|---|
| `tb_bimodal_counter` | counter against a saturating-integer reference, exhaustively |
| `tb_btb` | random lookups and updates against a model, including aliasing pairs; one-cycle lookup latency |
| `tb_branch_predecode` | every branch and hint opcode, plus random words |
| `tb_ilb_extra_line` | fill data, dropped duplicate prefetches, superseded prefetches (local store model with 6-cycle latency) |
| `tb_bp_control` | hand-worked sequence for all three schemes: cold miss, redirect timing, wrong-path cancel, overruled and loaded hints, warnings, port conflict, misprediction squash, two-branch pair with IB1 hold |
| `tb_spe_bpu` | all three schemes running a synthetic loop kernel, compared cycle by cycle with a reference predictor; counts each mechanism and prints the modelled stall totals |
| `tb_minigzip_loop` | the inner loop of a gzip decompressor, in its original hinted form and in a form with a branch warning, using the code's real word layout; brz and brnz share a pair. Prints modelled stalls: with the hint the loop branch costs nothing, pre-decode alone costs 7 cycles per iteration, and the warning version loses the hint and pays 18 |
| `tb_spe_bpu_full` | the default configuration (no parameter overrides) through a full train / predict / overrule / follow cycle, and a fill of all 256 BTB entries |

## Limits

* The unit has only been simulated against the testbench models above. It
  has not been connected to a real SPU pipeline.
* The benchmark programs the predictor is meant for cannot be run here,
  because there is no SPU core. The loop kernels in `tb_spe_bpu` and
  `tb_minigzip_loop` are stand-ins.
* The energy figures belong to the SPU integration. The unit only exposes
  its BTB read and write events (`btb_rd_o`, `btb_wr_o`) for such
  estimates.
