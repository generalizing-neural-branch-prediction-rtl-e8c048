# Piecewise linear branch predictor

A perceptron branch predictor gives each branch one linear function of the
global outcome history. Its prediction is the sign of a weighted sum, so
it can only learn branches whose outcome is linearly separable in that
history. A piecewise linear predictor gives each branch a *separate* linear
function for every path that leads to it. Which weight a history bit uses
depends on three things: the branch being predicted, the address of the
branch that produced the history bit, and that bit's position in the history.
Taken together, the per-path functions form a piecewise linear decision
surface, which can learn functions such as exclusive-or that a single
hyperplane cannot.

This repository holds synthesizable SystemVerilog for the practical,
ahead-pipelined form of the algorithm (Jiménez, "Generalizing Neural Branch
Prediction"). The default configuration is its largest hardware budget,
256 KB:

| symbol | meaning | default |
|---|---|---|
| h | history length | 51 |
| n | first index of W: branch being predicted, address mod n | 8 |
| m | second index of W: branch on the path, address mod m | 603 |
| weight | signed, saturating | 8 bits |
| partial sum | signed, saturating | 10 bits |
| θ | training threshold, ⌊2.14(h+1)+20.58⌋ | 131 |

The weights take n·m·(h+1) = 8·603·52 = 250,848 bytes. The two shift
matrices take 2·10·n·h = 2·4,080 bits.

Two settings of the same RTL give two well-known predictors. With m = 1 the
path addresses drop out, and the design becomes a perceptron predictor with
n weight vectors. With n = 1 all branches share the weights chosen along
the path, and it becomes the path-based neural predictor.

## The weight array and its banks

Conceptually there is one array `W[n][m][h+1]`. Entry `W[i][j][0]` is the
bias weight of a branch with `address mod n = i` and `address mod m = j`.
Entry `W[i][j][k]` says how strongly a branch with `address mod m = j`,
seen k branches back on the path, correlates with the outcome of a branch
in set i.

The array is split by its last index into h+1 independent memories
(`weight_bank`, one per history position). In bank k, block j holds the n
weights `W[0..n-1][j][k]` side by side. A single block read therefore serves
all n candidate branches at once. Each bank is read once per prediction
(one block) and once per training update (one block, read-modify-write of
one weight). Training writes back the whole block, with the other weights
unchanged.

## Ahead pipelining: the speculative shift matrix SR

Adding h+1 weights from h+1 memories after the branch address is known
would be far too slow. Instead, every branch's sum is built up during the
h branches that come before it. The catch is that it is not yet known which
branch will use the sum. The design therefore keeps one running sum for each
of the n possible values of `address mod n`.

`SR` is an n × h matrix of partial sums (`shift_matrix`). Row i belongs to
the future branch whose address is i mod n. Column c holds the sum for the
branch that will be predicted c predictions from when the sum started.

Making a prediction for address A, with i = A mod n and j = A mod m, takes
two steps:

1. **Finish this branch** (the critical path, in `predict_output`). The
   output is `SR[i][h] + W[i][j][0]`, a multiplexer followed by one adder.
   The branch is predicted taken if the output is at least 0.
2. **Advance every other sum by one column.** The predicted direction
   decides whether each weight is added or subtracted. For every row i′ and
   every column c, in parallel:

   `SR′[i′][c] = SR[i′][c−1] ± W[i′][j][h−c+1]`, with `SR[i′][0] = 0`.

   A sum that starts at column 1 gets the weight for history position h.
   When it reaches column h, h predictions later, it also holds the weights
   for positions h−1 … 1. Position 1 is the branch just before the one being
   predicted. This step needs n·h adders: 408 at the default size.

A small example with h = 3: a sum starts when branch b₁ is predicted and
gets b₁'s weight for position 3. Branch b₂ adds its weight for position 2,
and b₃ adds its weight for position 1. Branch b₄ then reads column 3 of row
(b₄ mod n), adds its bias weight and has its prediction. Each of those
weights came from block (bᵢ mod m) of the corresponding bank. The path to b₄
therefore chooses its weights, and the sum matches the idealised algorithm
for that path.

## Resolution, recovery and the nonspeculative matrix R

SR assumes that every prediction is correct. A second matrix, R, has the
same shape and advances only when branches resolve, in program order, with
their real outcomes. Each branch's entry in the in-flight queue
(`branch_queue`) keeps a copy of the weight block that SR used for it. R
advances with those same weights and the real outcome. After a correct
prediction, R therefore equals what SR computed. After a misprediction, R
equals what SR would have computed had the prediction been right.

On a misprediction, SR is overwritten with the value R takes in that same
cycle, and the queue is flushed. Every younger branch lies on the wrong path
and will be fetched and predicted again.

## Training

Training happens when a branch resolves, in `train_unit`. It uses the entry
at the head of the queue and the nonspeculative path history (`path_history`),
which holds the last h outcomes (GHR) and their addresses mod m (GA). If the
branch was mispredicted, or the magnitude of its output was below θ:

* the bias weight `W[i][j][0]` counts toward the outcome;
* for k = 1..h, weight `W[i][GA[k]][k]` counts up if history bit `GHR[k]`
  agrees with the outcome, and down otherwise.

All h+1 updates go to different banks in the same lane i, so they happen in
parallel. The outcome and address of the branch are then shifted into GHR
and GA.

## Overriding with a bimodal first level

The piecewise linear prediction arrives a cycle after the fetch address. The
design therefore pairs it with a 2K-entry table of 2-bit counters
(`bimodal_predictor`), which answers in the same cycle. Fetch follows the
bimodal prediction. `out_override` flags when the piecewise linear
prediction disagrees, so that the front end can drop what it fetched and
turn around.

## Interface and timing

`plbp_predictor` uses one clock and an asynchronous active-low reset.

| port | dir | meaning |
|---|---|---|
| `ready` | out | weight banks cleared; goes high M cycles after reset |
| `pred_valid`, `pred_addr` | in | predict the branch at this address (instruction-word address) |
| `pred_ready` | out | request accepted this cycle (queue has room) |
| `l1_taken` | out | bimodal prediction, same cycle |
| `out_valid`, `out_taken`, `out_sum` | out | piecewise linear prediction, one cycle after acceptance |
| `out_override` | out | that prediction differs from `l1_taken` |
| `res_valid`, `res_taken` | in | the oldest in-flight branch resolved with this outcome |
| `res_mispredict`, `res_trained` | out | same cycle: it was mispredicted / it trains the weights |
| `inflight` | out | branches predicted and not yet resolved |

```
cycle         t            t+1                    t+2
request       A accepted   B accepted
banks         read blk(A)  read blk(B)
output                     A: SR[i][h]+bias       B: ...
SR                         advance with A         advance with B
```

The predictor sustains one prediction per cycle. A branch may resolve once
its output has appeared, and branches resolve in order. In a cycle with a
misprediction, the prediction that is finishing and any new request are
discarded. A training update occupies the banks for two cycles (read, then
write), one update per cycle. A prediction read in the same cycle as the
write sees the new block.

## Parameters

`plbp_predictor` takes `H`, `N`, `M`, `WBITS`, `SBITS`, `ADDR_W`, `QDEPTH`
and `BIM_ENTRIES`. The defaults live in `plbp_pkg`. The tuned configurations
for smaller budgets are:

| budget | h | n | m | W bytes |
|---|---|---|---|---|
| 4 KB | 19 | 1 | 215 | 4,300 |
| 8 KB | 19 | 2 | 176 | 7,040 |
| 16 KB | 23 | 4 | 138 | 13,248 |
| 32 KB | 26 | 8 | 118 | 25,488 |
| 64 KB | 43 | 8 | 151 | 53,152 |
| 128 KB | 50 | 8 | 288 | 117,504 |
| 256 KB | 51 | 8 | 603 | 250,848 |

n is kept a power of two with 10·n·h ≤ 4,096, so that restoring SR costs
about as much as restoring a 32 × 64-bit register file. m need not be a
power of two: the index is the address modulo a constant.

## Departures and own choices

The algorithm, the bank organisation, the widths, the threshold formula and
the first-level table size are those of the published design. The
following are this implementation's own choices:

* **R has its own adders.** R advances with the weights stored per branch,
  so the n·h adders are duplicated. The queue also carries n·h weights per
  entry: 3,264 bits per entry, about 6.5 KB for 16 entries. Filling R from
  SR, which the published design suggests to save the adders, would need a
  separate way to handle the mispredicted branch itself.
* **Partial sums saturate** at the 10-bit limits. Only the width is given.
* **Timing.** The prediction comes one clock after the address. The
  published estimate for the 256 KB design is 4 cycles at 3.86 GHz, so a
  real implementation would pipeline the memory read and the final add.
* **GA** stores addresses mod m (10 bits), because they select the second
  index of W.
* θ is rounded down; for h = 51 it is 131.
* The in-flight queue depth (16), the reset behaviour (weights cleared by a
  sweep of M cycles, all other state zeroed), the bimodal counter encoding
  and reset state (weakly not taken), and the address convention are
  assumed.
* Not built: the unbounded "idealised" predictor of the limit study, and the
  processor around the predictor (the fetch redirect on an override, and
  the branch target buffer).

## Verification

Every module has a self-checking testbench in `tb/` that compares its
outputs with an independent model and ends by printing
`TB_RESULT checks=N failures=F`.

* `tb_plbp_predictor`: end to end at a reduced size (h=6, n=2, m=5, 5-bit
  weights, 7-bit sums, 4-entry queue) over a 3,000-branch synthetic trace.
  The driver `plbp_tb_driver` holds a transaction-level model of the
  algorithm (the full W array, SR, R, GHR, GA and the bimodal counters) and
  checks every output each cycle. It also counts each mechanism and fails
  any that never happened: overrides, misprediction recovery, training
  below θ, a full queue, prediction and resolution in the same cycle, and
  weight and partial-sum saturation. It checks that the misprediction rate
  over the last quarter of the trace is below 25%.
* `tb_plbp_full`: the same driver with the predictor at its default
  parameters, over a 20,000-branch trace. In its last quarter the
  misprediction rate is about 6%: the random branch, one branch in eight,
  accounts for all of it.
* `tb_plbp_configs`: several Table III configurations and the m = 1
  perceptron setting, run against the same model.
* Unit benches: `tb_weight_bank`, `tb_shift_matrix`, `tb_predict_output`,
  `tb_path_history`, `tb_train_unit`, `tb_branch_queue`,
  `tb_bimodal_predictor`.

The synthetic trace interleaves eight static branches: always taken, never
taken, alternating, a 3-in-4 loop, a copy of the alternating branch, an
exclusive-or of two earlier outcomes, a random branch, and a copy of the
random one. No benchmark traces are included.

To run a testbench with Verilator 5 (the package first, then the other
modules, then the bench and the shared driver):

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/plbp_pkg.sv $(ls rtl/*.sv | grep -v plbp_pkg) \
    tb/plbp_tb_driver.sv tb/tb_plbp_predictor.sv --top-module tb_plbp_predictor
./obj_dir/Vtb_plbp_predictor
```

The full-size bench (`tb_plbp_full`) takes a few seconds.

## Files

* `rtl/plbp_pkg.sv`: default sizes, θ, saturation helpers
* `rtl/plbp_predictor.sv`: top level
* `rtl/weight_bank.sv`: one of the h+1 weight memories
* `rtl/shift_matrix.sv`: SR / R with their adders
* `rtl/predict_output.sv`: select-and-add critical path
* `rtl/train_unit.sv`: threshold test and update commands
* `rtl/path_history.sv`: GHR and GA
* `rtl/branch_queue.sv`: in-flight branches
* `rtl/bimodal_predictor.sv`: first-level overriding predictor
* `tb/`: testbenches, and the shared driver and model `plbp_tb_driver.sv`
