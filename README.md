# Cost-aware speculation control for a superscalar core

When a branch is mis-predicted, the core throws away every instruction it
fetched after the branch. How much work is lost depends on how many of those
instructions were already in the machine, and that number differs a lot from
branch to branch. This RTL calls it the **cost** of the branch. A few branches
cause most of the wasted work because many instructions pile up behind them
before they resolve: branches that wait on a cache miss, for example.

Cost turns out to be predictable from recent history. This design uses that in
two ways:

* **Fetch gating.** Classic pipeline gating stops fetch while too many
  low-confidence branches are in flight. Here only branches that are both
  **low-confidence and predicted high-cost** (LCHC) count. Cheap doubtful
  branches no longer stop fetch, so gating happens much less often.
* **Predictor power.** A combined (tournament) predictor runs a bimodal
  table, a gshare table and a chooser for every branch. Here a branch
  predicted **low-cost** uses gshare alone, and the other two tables stay
  idle for it.

The top module `spec_ctrl_top` is a unit that sits beside the
dispatch and write-back stages of an 8-wide out-of-order core with a 128-entry
re-order buffer (ROB). The core tells it what enters, resolves and retires.
The unit returns a direction, a confidence, a cost class, the measured cost
and a fetch-gate signal.

The ideas and main numbers (ROB size, thresholds, table sizes, counter types,
history length) follow the thesis *Assigning Cost to Branches for Speculation
Control in Superscalar Processors*. The cycle-level interface and a number of
details are this implementation's own. They are listed under
[Departures and own choices](#departures-and-own-choices).

## Measuring cost in the re-order buffer

The ROB is a circular queue. Instructions are allocated at one pointer and
retired at the other. In this RTL, as in the original description, the
allocation pointer is called **head** and the retire pointer **tail**.
(Many textbooks use the opposite names.)

The instructions a mis-predicted branch flushes are exactly the entries
allocated after it. For a branch in entry `idx`:

    cost = (head - idx - 1) mod 128

The branch is **high-cost** when `cost > threshold`. A cost equal to the
threshold counts as low. The cost is measured at write-back for every
resolved branch, correct or not, because every resolved branch trains the
cost predictors. `rob_cost_tracker` holds only the pointers, the occupancy
and one flag bit per entry. It does not hold the instructions, which stay in
the core's own ROB.

The default threshold is 32, a quarter of the ROB. The original study chose
a quarter rather than a half because branches are mostly cheap, so a
half-ROB threshold biases the counters towards "low".

## Predicting cost before the branch resolves

All cost predictors are tiny tables of 2-bit saturating counters. Every
table is read at dispatch. The index used is stored with the branch, and the
same counter is trained at write-back with the measured class. Two counter
kinds occur (`spec_pkg::ctr_next`):

* **up/down**: +1 on the tracked event and −1 otherwise, saturating.
* **up/reset**: +1 on the tracked event and cleared to 0 otherwise.

"High cost" is predicted at counter values 2 and 3.

| module | index | default |
|---|---|---|
| `pc_cost_predictor` | low PC bits | 16 × 2-bit, up/reset |
| `cost_pattern_predictor` | the **global cost history register** (GCHR): the classes of the last 4 resolved branches | 16 × 2-bit, up/reset |
| `local_cost_history_predictor` | per-branch 4-bit cost history (16 histories, PC-indexed), which selects one of 16 counters | 16 × 2-bit, up/down |
| `hclc_estimator` | low PC bits, 1-bit entries | 16 × 1-bit |

The GCHR shifts towards bit 0 and takes the newest class at bit 3. So `0100`
becomes `1010` after a high-cost branch, and `1010` becomes `0101` after a
low-cost one. The 4-bit value is the table index directly. This global
pattern predictor is the one used by default. It is the best of the three in
the original evaluation, and its table has only 16 entries.

The **HCLC estimator** works the other way round. Only high-cost branches
train it: an entry is set when the high-cost branches mapping to it were
low-confidence. A low-confidence branch whose entry is set is counted as
LCHC.

By default, confidence comes from `jrs_conf_estimator`. PC xor global
history indexes 1024 up/reset counters that count correct predictions. A
branch is high-confidence when its counter is saturated (3).

With `cfg_conf_pattern_i` set, confidence comes from
`pattern_conf_estimator` instead. This estimator has no table. It looks only
at the directions of the last four resolved branches and calls a branch
high-confidence when at least three of them were taken: "always taken" or
"almost taken". Setting `MIN_TAKEN=4` narrows this to "always taken" only.
Every other pattern, including `0000`, is low confidence.

## Gating fetch

`pg_controller` keeps the number of flagged branches in flight.
`fetch_gate_o` is high while that number is **greater than** the gating
threshold. Threshold *n* therefore stops fetch once *n*+1 flagged branches
are in flight. `cfg_gate_mode_i` (`spec_pkg::gate_mode_e`) selects which
branches are flagged:

| mode | flagged when | threshold | counter decremented when the branch |
|---|---|---|---|
| `GATE_OFF` | never | – | – |
| `GATE_ORIG_PG` | low confidence | `THR_PG_ORIG` = 2 | resolves (write-back) |
| `GATE_PC_COST` | low confidence and PC cost predictor high | `THR_PG` = 1 | retires or is flushed |
| `GATE_PATTERN` | low confidence and cost pattern predictor high | 1 | retires or is flushed |
| `GATE_LOCAL` | low confidence and local cost predictor high | 1 | retires or is flushed |
| `GATE_HCLC` | low confidence and HCLC entry set | 1 | retires or is flushed |
| `GATE_COMBINED` | low confidence, HCLC set and cost pattern predictor high | 1 | retires or is flushed |

The decrement rules are the hardest part to get right. A flagged branch can
leave in three ways: it resolves (original scheme only), it retires, or it
is flushed as the wrong-path victim of an older mis-prediction. To make this
exact, each ROB entry has a flag bit. `rob_cost_tracker` reports how many
flagged entries leave by retirement and how many by flush in each cycle. In
the original scheme the flag is cleared at write-back, so a branch is never
counted twice. `gate_events` in `stats_o` counts the cycles in which gating
starts, which is the gating frequency that cost filtering is meant to
reduce. `gated_cycles` counts every gated cycle.

## Thresholds that follow the program

* **Dynamic cost threshold** (`dyn_cost_threshold`, `cfg_dyn_cost_i`). Every
  flushing branch is sorted into one of four cost regions: 0–31, 32–63,
  64–95 and 96+. Every 8192 cycles, the region holding the most branches
  sets the threshold for the next window to 16, 32, 64 or 96. Ties go to
  the lower region. An empty window keeps the old threshold.
* **Dynamic gating threshold** (`pg_controller`, `cfg_dyn_pg_i`). The ROB
  occupancy picks the threshold: 3 below 32 entries, 2 below 64, 1 below 96
  and 0 above. An almost empty ROB is never starved, and an almost full one
  does not take in more doubtful work.

## The cost-gated combined predictor

`cost_combined_predictor` joins `bimodal_predictor` (p1),
`gshare_predictor` (p2) and a PC-indexed chooser. All three are 8192 × 2-bit
up/down tables. Chooser values 0/1 select p1 and 2/3 select p2. A second
`cost_pattern_predictor` decides the path. It has its own GCHR, counts
*low*-cost branches and classifies them at threshold 16 (`BP_COST_THR`).

* A branch predicted **high-cost** uses the full combined predictor, and all
  three tables are trained.
* A branch predicted **low-cost** uses gshare alone. The bimodal table and
  the chooser are neither read nor trained.

The path taken travels with the branch (`bp_pred_t.combined`), so training
follows the same path. The gshare history is shifted by every resolved
branch. `gshare_only_cnt` and `combined_cnt` in `stats_o` count the
predictions served by each path. Their ratio is what sets the predictor's
power.

## Cost analysis table

`cost_analysis_table` is the measuring instrument that shows cost is
predictable. It has 2048 entries. Each entry holds a PC tag and a 2-bit
counter, and is trained only by mis-predicted branches, here with their class
at threshold 64. The four counter variants (up/down or up/reset, tracking
high or low cost) are the parameters `KIND` and `TRACK_HIGH`. In the top it
is looked up at dispatch and trained on every flush. Two fields of `stats_o`
report how good it is: `study_hits` counts mis-predicted branches it had an
entry for, and `study_correct` counts those whose predicted class was right.
It does not influence gating or prediction.

## Interface and timing of `spec_ctrl_top`

| port | dir | meaning |
|---|---|---|
| `cfg_gate_mode_i` | in | gating mode (table above) |
| `cfg_dyn_cost_i`, `cfg_dyn_pg_i` | in | enable the dynamic cost / gating threshold |
| `cfg_conf_pattern_i` | in | take confidence from the outcome-pattern estimator instead of JRS |
| `ready_o` | out | table initialisation finished |
| `disp_cnt_i` [3:0] | in | instructions entering the ROB this cycle (≤ `rob_free_o`) |
| `disp_br_valid_i`, `disp_br_slot_i` [2:0], `disp_br_pc_i` [31:0] | in | the conditional branch of this group, its slot and PC |
| `disp_br_o` (`disp_resp_t`) | out | direction, low confidence, high cost, LCHC flag, combined path used, ROB index |
| `rob_count_o`, `rob_free_o` | out | ROB occupancy |
| `wb_valid_i`, `wb_rob_idx_i` [6:0], `wb_taken_i` | in | a branch resolves: its ROB index and real direction |
| `wb_o` (`wb_resp_t`) | out | mis-predicted, measured cost, high-cost class |
| `commit_cnt_i` [3:0] | in | oldest entries retiring this cycle |
| `fetch_gate_o` | out | stop fetching |
| `stats_o` (`stats_t`) | out | gating events and cycles, LCHC count, current thresholds, predictor path counts, mis-predictions, high-cost flushes, analysis-table hits |

* **Reset and initialisation.** Reset is synchronous and active low. After
  reset every table clears itself one entry per cycle, so no table needs
  resettable storage. `ready_o` rises after 8192 cycles. Dispatch no
  branch before then.
* **Dispatch.** The answer on `disp_br_o` is combinational in the same
  cycle. At most one branch per dispatch group is allowed.
* **Write-back.** At most one branch per cycle. `wb_o` is combinational. A
  mis-prediction flushes the younger entries at the clock edge, and a
  dispatch in that cycle is taken as wrong-path and dropped. Every table is
  trained at that edge.
* **Retire.** A branch may retire in the cycle after its write-back at the
  earliest. In a flush cycle, only entries older than the branch may retire.
* **Configuration.** Change the configuration only while nothing is in
  flight. The testbench resets the unit between modes.

Assertions in `rob_cost_tracker` and `pg_controller` flag allocation beyond
the free space, retirement of more entries than are present, and an
underflowing gating counter.

## Module map

* `spec_pkg`: counter rule, gating-mode enum, per-branch metadata and
  response structs.
* `ctr_table`: generic counter table with a self-clearing sweep. All
  predictors use it.
* `rob_cost_tracker`, `pg_controller`, `dyn_cost_threshold`: cost
  measurement and gating.
* `pc_cost_predictor`, `cost_pattern_predictor`,
  `local_cost_history_predictor`, `hclc_estimator`, `jrs_conf_estimator`,
  `pattern_conf_estimator`: cost and confidence.
* `bimodal_predictor`, `gshare_predictor`, `cost_combined_predictor`:
  branch direction.
* `cost_analysis_table`: the cost study table.
* `spec_ctrl_top`: wiring, per-branch metadata storage (one `br_meta_t` per
  ROB entry) and statistics.

The unit does not contain the fetch unit, the execution pipelines, the
instruction payload of the ROB, the caches or any power model. The
testbench plays those parts.

## Departures and own choices

* **Confidence estimator.** The evaluated core names a "2-bit pattern
  history, both strong" estimator, which is not specified further. Two
  described estimators are offered in its place. The default is JRS with
  2-bit counters, 1024 entries and a threshold of 3; the table size and the
  threshold are this implementation's choice. The other is the
  outcome-pattern estimator with the 3-of-4 rule. It reads the global
  sequence of resolved directions, which is also a choice.
* **Predictor size.** "8k combined predictor" is read as 8192 entries per
  table.
* **Branches per cycle.** At most one branch is dispatched and one resolved
  per cycle. Dispatch and decode are the same cycle.
* **History updates.** Branch history, the GCHR and the local cost
  histories are updated at resolve, not speculatively at fetch.
* **Combined mode.** `GATE_COMBINED` takes the logical AND of the HCLC
  estimator and the pattern predictor.
* **HCLC indexing.** The HCLC table is indexed by PC.
* **Local cost predictor.** It uses up/down counters and a 4-bit history.
* **Dynamic cost threshold.** It counts flushing branches, not flushed
  instructions. The tie-break and the start value of 32 are also choices.
* **Initial counter values.** Counters start weakly not-taken (directions)
  or at 0 (cost, confidence).
* **Chooser training.** The chooser is trained only on the combined path.
* **Which class skips the bimodal table.** One sentence of the original
  description says the bimodal table is disabled for *high*-cost branches.
  The rest of it, and the reasoning behind the scheme (expensive branches
  deserve the more accurate predictor), say the opposite. This design gives
  high-cost branches the full predictor.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=… failures=…` and has a watchdog. The end-to-end
test `tb/tb_spec_ctrl_top.sv` runs the top at its default parameters. It
plays a core with a synthetic stream of 16 static branches: biased,
alternating and random, some resolving late. It runs every gating mode, then
both dynamic thresholds, then two modes with the outcome-pattern confidence
estimator. It checks the ROB index, occupancy, cost, class,
mis-prediction flag, gating counter, gate and thresholds each cycle against
its own instruction-list model. It checks the analysis-table statistics
against a model of the table. It also fails if any mechanism never happened,
such as gating in some mode, a flush of either class, a full ROB or either
predictor path.

    verilator --binary --timing --top-module tb_spec_ctrl_top \
        -y rtl -y tb +libext+.sv -Irtl rtl/spec_pkg.sv tb/tb_spec_ctrl_top.sv
    ./obj_dir/Vtb_spec_ctrl_top

`tb/tb_threshold_sweep.sv` runs eight full-size copies of the unit on one
open-loop instruction stream. Four use original gating with thresholds 0–3,
and four use pattern-predictor gating with cost thresholds 16, 32, 64 and 96.
The testbench checks that the copies agree wherever they must. It checks
each copy's counter, gate and cost class against the model. It also checks
the expected orderings: a lower gating threshold gates whenever a higher one
does, and fewer flushes count as high-cost at a higher cost threshold. It
prints the gating statistics per setting.

`tb/tb_bp_cost_sweep.sv` runs two full-size copies, each with its own
closed-loop core model, with the predictor's cost threshold at 16 and 32.
It checks ROB indices, costs, mis-prediction flags and the path counters.
It also checks that threshold 32 sends a larger share of branches to gshare
alone.

Replace the top-module name to run a block testbench. The end-to-end run
takes under a second of wall time (about 130,000 cycles, including the table
clearing after each reset) and performs about 290,000 checks.

## How far it has been checked

* **Block tests.** Every block testbench compares the block with a reference
  model written independently inside the testbench. Each testbench was also
  run against a copy of its block with one deliberate bug, such as a history
  shifted the wrong way, an off-by-one cost or a `>=` in place of a `>`, and
  it reported failures every time.
* **Synthesis.** All modules lint cleanly in Verilator apart from
  unused-bit warnings. They synthesise in Yosys without latches. At default
  size the unit holds about 106 kbit of table storage, nearly all of it in
  the three 8k-entry predictor tables and the 2k-entry analysis table.
* **What no test can show.** The synthetic branch stream cannot reproduce
  the SPEC2000 behaviour the original evaluation used. The sweeps reproduce
  the direction of its trends, not its numbers, and nothing here models
  power.

