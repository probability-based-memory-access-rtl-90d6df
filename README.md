# PMAC: a probability-based memory access controller

An out-of-order core runs far ahead of its oldest unresolved branch. When one of
those branches turns out to be mispredicted, the core can throw away the
registers it computed on the wrong path, but it cannot take back the loads and
stores that already went to the caches and DRAM. Those requests cost energy and
bandwidth and pollute the caches.

PMAC holds back memory instructions that are probably on a wrong path. It
does not guess per load. It computes, for every in-flight *program block*, the
probability that the core will really execute it:

    P(block j) = product of the correct-prediction rates of all unresolved
                 branches up to and including branch j

This probability can only fall from older to younger blocks. So a single
boundary separates "likely" from "unlikely" work: the oldest block whose
probability is at or below a threshold. That block is the *throttling block*.
The load-store unit does not issue any load or store from that block or a
younger one. When older branches resolve correctly, the probability of the
held blocks rises and the boundary moves younger, which releases them. When a
branch is mispredicted, the held instructions are flushed without ever having
touched memory.

This repository holds synthesizable SystemVerilog for the PMAC side of such a
core: the branch predictor and confidence estimator it relies on, the
prediction-rate tables, the throttling block estimator, the threshold
controller and the LSQ extension. The core's own pipeline, caches and memory
are not included. They connect through the ports of `pmac_top`.

## Contents

| file | unit |
|---|---|
| `rtl/pmac_pkg.sv` | sizes, types, BlockID comparison, log2 / probability code helpers |
| `rtl/bid_counter.sv` | BlockID counter (BIDC) |
| `rtl/hybrid_bp.sv` | McFarling hybrid predictor (GAg + PAg + chooser) |
| `rtl/conf_est.sv` | composite JRS + Up/Down + Self confidence estimator |
| `rtl/pred_rate_est.sv` | per-confidence fetch/commit counters and probability table (BFCT, BCCT, CBPT, PTAR) |
| `rtl/bbct.sv` | in-flight branch table, one entry per BlockID |
| `rtl/tbe.sv` | throttling block estimator (PPR, TBR, TC); contains `bbct` |
| `rtl/thr_ctrl.sv` | path probability threshold (PPTR), static or dynamic |
| `rtl/lsq_throttle.sv` | BlockID and stall bit per LSQ entry, issue pick filter |
| `rtl/pmac_top.sv` | everything wired together |
| `tb/tb_*.sv` | one self-checking testbench per unit, plus end-to-end tests and a threshold sweep |

## Program blocks and BlockIDs

A program block is a branch plus the instructions fetched after it, up to the
next branch. Each fetched conditional branch increments the 8-bit BlockID
counter and takes the new value. The instructions that follow it carry that
same value (`cur_bid`), and the core stores it in their LSQ entries.

BlockIDs wrap around. "Older" and "younger" are decided modulo 256: `a` is at
or after `b` when the 8-bit difference `a - b` has its top bit clear
(`bid_ge` in the package). This is correct while fewer than 128 BlockIDs lie
between the oldest unresolved branch and the newest fetched one. A 256-entry
window of ordinary code holds about 37 branches (one in seven instructions),
and on average about 9 are unresolved. A core that could have more than 127
branches in flight would need a wider BlockID.

After a misprediction the counter is not wound back. The flushed BlockIDs are
simply skipped, and their table entries are cleared.

## Where the probabilities come from

### Branch confidence

Every branch gets an integer confidence value between 0 and 44. It is the sum
of three counters that are looked up beside the prediction:

* **JRS**: 4K x 3-bit miss-distance counters, indexed by the low 12 bits of the
  global history *after* the new prediction has been shifted in. On a correct
  prediction the counter counts up and saturates. On a misprediction it is
  cleared.
* **Up/Down**: 1K x 5-bit counters, indexed by the low 10 bits of the branch's
  local history. They count up on a correct prediction and down on a
  misprediction, saturating at both ends.
* **Self**: the predictor's own 3-bit PAg counter, read as "how sure it is".
  The value is `c` when the final prediction is taken and `7 - c` otherwise.

The three together reach at most 7 + 31 + 7 = 45. The design has 45 buckets
(0..44), so the single value 45 is merged into bucket 44.

The predictor itself (`hybrid_bp`) follows McFarling's scheme:
* **GAg**: 8K x 2-bit counters indexed by a 13-bit global history.
* **PAg**: a 2K x 11-bit local history table and 2K x 3-bit counters.
* **Chooser**: 8K x 2-bit counters indexed by PC bits [14:2].

The global history is updated speculatively at fetch. It is restored from the
branch's checkpoint on a misprediction. All other tables are trained at
resolution.

Each fetched branch carries a small checkpoint (`bp_ckpt_t`) that the core
returns at resolution. It holds the global and local histories used for the
prediction and the component predictions. This lets both the predictor and the
estimator train the exact entries they read.

After reset, both units sweep their tables to zero, one entry per cycle.
`ready` rises after 8192 cycles. The core must not fetch or resolve branches
before that.

### From confidence to probability

A confidence value is not a probability. `pred_rate_est` measures one for each
bucket:

* **BFCT**: each fetched branch increments its bucket's fetch counter.
* **BCCT**: each correctly resolved branch increments its bucket's commit
  counter.
* **PTAR**: counts cycles. Every `PTAR_N` = 500000 cycles it starts a rewrite
  of the probability table CBPT. The rewrite takes one bucket per cycle over
  45 cycles. Each bucket gets `commits / fetches` and its two counters restart
  from zero. Counting continues during the rewrite.

Edge cases:
* A bucket with no fetches keeps its previous rate.
* A bucket with at least as many commits as fetches gets probability 1.
* A bucket with fetches but no commits gets probability 0.
* The counters are 16 bits and saturate. At one branch per cycle a single busy
  bucket can exceed 65535 in 500000 cycles. The ratio is then taken between
  saturated values.

### The probability code

Probabilities are never stored as fractions. They are stored as

    Enc(p) = round(-1024 * log2(p))      (16 bits; 0xFFFF stands for p = 0)

Under this code a product of probabilities is a sum of codes, and a quotient
is a difference. A *larger* code means a *smaller* probability. For example,
Enc(1) = 0, Enc(0.75) = 425 and Enc(0.25) = 2048.

The rate estimator computes `Enc(C/F) = 1024 * (log2 F - log2 C)` without a
divider (`log2_q12` in `pmac_pkg`):
* The integer part of each log2 is the position of the leading one.
* Twelve fraction bits come from repeated squaring of the normalised mantissa.
  Each squaring yields one bit: if the square is 2 or more, the bit is 1 and
  the value is halved.
* The difference has 12 fraction bits. It is rounded to 10 bits, which gives
  the factor 1024.

The function is combinational and unrolled: 12 squarers for each operand. The
sweep uses one instance per cycle. The threshold controller uses the same
function with a constant denominator.

The testbench checks each code against `$ln` and allows an error of one code
unit.

## The throttling block estimator

This is the core of the design, and the part to read carefully before
changing anything (`rtl/tbe.sv`).

### State and what it means

| register | meaning |
|---|---|
| `TBR` (8 bits) | throttling block register: a BlockID |
| `PPR` (64 bits) | path probability register: the sum of the codes of all **in-flight** branches from the oldest one up to and including `TBR` |
| `TC` | throttle control: `PPR >= PPTR` in code, i.e. the probability of block `TBR` is at or below the threshold |
| `bbct[256]` | valid bit and 6-bit confidence per BlockID: which branches are still in flight |

The estimator keeps one invariant:

* When `TC` is set, `TBR` is the *oldest* block at or below the threshold.
  The LSQ holds every memory instruction whose BlockID is at or after `TBR`.
* When `TC` is clear, `TBR` is moving towards the youngest fetched branch.
  `PPR` covers everything up to `TBR`.

The estimator never searches the whole window at once. Each event moves `TBR`
and `PPR` by a small amount, and the invariant is restored over the next few
cycles. Each step costs one table lookup and one add or subtract.

### Events

**Branch fetch.** The branch's entry in `bbct` is written with its confidence.
If `TC` is clear and `TBR` has caught up with the BlockID counter, three things
happen:
* The branch's code, taken from CBPT by its confidence, is added to `PPR`.
* `TBR` takes the branch's BlockID.
* `TC` is re-evaluated.

`TBR` moves on this fetch whether or not the new `PPR` sets `TC`. So the first
block to cross the threshold becomes the throttling block.

**Forward walk.** Suppose `TC` is clear but `TBR` lags behind the newest
BlockID. This happens after a release, after a rollback, or after a threshold
change. Each cycle, the walk does the following:
* Entry `TBR + 1` is looked up in `bbct`.
* If that branch is still in flight, its code is added to `PPR`.
* `TBR` advances by one.
* `TC` is re-evaluated.

The walk stops when `TC` sets or `TBR` reaches the newest BlockID. Branches
that have already resolved or been flushed leave invalid entries, which are
stepped over. One BlockID costs one cycle.

**Correct resolution.** The branch's entry is read for its confidence and then
invalidated.
* If the branch lies at or before `TBR`, its code is subtracted from `PPR`. This
  is the "division by its rate" in the probability domain.
* If `TC` is clear after the subtraction, the walk resumes.

The subtraction is also done when `TC` is clear, because `PPR` includes every
in-flight branch up to `TBR` either way.

**Misprediction after `TBR`.** Everything younger than the mispredicted branch
`r` is flushed. Its `bbct` entries, the range `(r, newest]`, are cleared in one
cycle. `PPR` and `TBR` do not involve those branches, so nothing else changes.

**Misprediction at or before `TBR`.** Now `PPR` contains the codes of `r` and of
some flushed branches. The estimator starts a **rollback**:
* It walks *down* from `TBR` to `r`, one BlockID per cycle.
* At each step it subtracts the code of any branch still valid there and clears
  its entry.
* Entries younger than `TBR` are cleared at once by the range clear.

When the rollback reaches `r`, `PPR` holds only the branches older than `r`.
`TC` is re-evaluated. `TBR` is set to the youngest flushed BlockID. From there
the forward walk carries on over the new, correct-path branches fetched in the
meantime, which have been written into `bbct` as usual.

A rollback of `TBR - r + 1` BlockIDs takes exactly that many cycles. The unit
testbench checks this for every rollback.

**Backward step.** When the threshold rises, `TC` may set at the current
`TBR`, but older blocks may now also lie at or below the threshold. So while
`TC` is set and no rollback runs, the estimator checks each cycle whether
`PPR - code(TBR)` is still at least `PPTR`. If it is, the block before `TBR` is
also throttled. `TBR` then steps back by one BlockID and drops that branch's
code from `PPR`. Invalid (already resolved) entries contribute code 0. The step
uses the same table read port as the forward walk, which is idle while `TC`
is set. It never goes back more than 126 BlockIDs from the newest one. The
result is that `TBR` is again the *oldest* block at or below the threshold.

**Nested events during a rollback.**
* Correct resolutions of older branches are applied to `PPR` as usual.
* A second misprediction, of a branch older than the one being rolled back to,
  moves the rollback's end point down to that branch. The flush range grows
  with it.
* A second misprediction, of a branch fetched *after* the first one, lies
  beyond `TBR`. It only clears that branch and everything younger, and the
  rollback goes on unchanged. The down-walk must never be pointed at such a
  younger branch: it would wrap around the BlockID space and wipe valid
  entries.

Fetches are accepted throughout. A fetch in the same cycle as a misprediction
belongs to the wrong path and is ignored.

### Numerical details

* `PPR` is 64 bits and saturates. It cannot wrap even with 256 branches at the
  maximum code.
* Codes are read from CBPT again at resolution, not stored per branch. If CBPT
  was rewritten between the fetch and the resolution of a branch, the
  subtracted code differs slightly from the one added. `PPR` is clamped at zero,
  and it is cleared whenever no branch is in flight, so the error cannot
  accumulate beyond the current burst of branches.
* When the threshold falls while `TC` is set, `TC` clears if `PPR` is now
  below the new threshold, and the forward walk resumes from `TBR`.

### Timing

All inputs act at the next clock edge. `TBR`, `TC` and `PPR` are registers.
The LSQ stall bits are registered from `TBR`, so the LSQ follows a new `TBR` one
cycle later.

## The threshold

`thr_ctrl` keeps the threshold in hundredths (1..100). On each change it
converts the threshold to a code with the same logarithm as CBPT, and it
registers the result as `PPTR`.

**Static mode** (`thr_static_en`): the threshold is `thr_static`. A value of 0
switches throttling off. This is the baseline.

**Dynamic mode** starts at 0.01. It moves by one step every `n` cycles,
depending on how full the instruction window is. Here `m` is the number of
memory instructions currently held.

| free window entries | threshold | move | interval `n` |
|---|---|---|---|
| at least 25% | <= 0.50 | + 0.10 | `K1 * 2^floor(m/C1)` |
| at least 25% | 0.51 .. 0.94 | + 0.01 | `K1 * 2^floor(m/C1)` |
| 16% .. 24% | any | hold | |
| at most 15%, m > 0 | any | - 0.10 (not below 0.01) | `K2 / 2^floor(m/C2)`, at least 1 |
| none (window full), m > 0 | any | back to 0.01 at once | |

The defaults are K1 = 128, K2 = 32 and C1 = C2 = 8. When the window is nearly
empty, the threshold rises quickly. When many loads are held, it rises slowly.
When the window fills up behind held loads, it falls quickly.

The interval counter restarts whenever the threshold has moved or the window
is in the hold band. The up interval saturates at 2^31 cycles.

## The LSQ side

`lsq_throttle` adds an 8-bit BlockID and a stall bit to each of 256 LSQ
entries.
* **Stall bits**: every cycle, an entry's stall bit is set when its BlockID is
  at or after `TBR`, and cleared otherwise.
* **Pick**: the filter picks the lowest-index entry that is valid, ready, and
  not held. An entry is held when its stall bit and `TC` are both set.
* **Count**: `n_stalled` is the number of held entries. It is the `m` of the
  threshold controller.

A real core has its own age-ordered pick. Only the "not held" qualifier belongs
to PMAC.

## Connecting a core (`pmac_top`)

| group | signals | protocol |
|---|---|---|
| start-up | `ready` | wait for it after reset |
| fetch | `br_fetch_valid`, `br_fetch_pc` -> `br_pred_taken`, `br_conf`, `br_ckpt`, `br_fetch_bid` | same cycle, at most one branch per cycle; keep `br_ckpt` and `br_fetch_bid` with the branch |
| block tag | `cur_bid` | BlockID for the non-branch instructions fetched after the branch |
| resolve | `br_res_valid`, `_pc`, `_bid`, `_taken`, `_ckpt` -> `br_res_mispred` | at most one per cycle, any order; on a misprediction the core flushes everything younger |
| LSQ | `lsq_alloc_*`, `lsq_free_mask`, `lsq_ready` -> `lsq_issue_valid`, `lsq_issue_idx`, `lsq_stall`, `lsq_n_stalled` | the core frees issued, committed and flushed entries |
| threshold | `win_free`, `thr_static_en`, `thr_static` -> `thr_pct` | |
| observation | `tbr`, `tc`, `ppr`, `walking`, `rollback`, `stepping_back`, `cbpt_rewrite` | |

`pmac_top` derives the misprediction flag itself. It compares the actual
outcome with the prediction held in the checkpoint. The confidence used to
count a commit is read back from the in-flight table.

Storage at the default sizes:

| structure | size |
|---|---|
| BFCT, BCCT, CBPT | 45 x 16 bits each |
| in-flight table | 256 x 7 bits |
| JRS + Up/Down counters | 1.5 KB + 640 B |
| LSQ extension | 256 x 9 bits |
| predictor | about 8 KB |

## Departures and interpretations

These are the places where this RTL makes a choice that the original PMAC
description leaves open or states in more than one way:

* **Widths**:
  * `TBR` is 8 bits, the width of a BlockID, rather than 9.
  * The probability tables and `PPTR` hold 16-bit codes rather than 32-bit
    entries. This matches the stated 90-byte table size.
* **In-flight table**: it is indexed by the full 8-bit BlockID, with 256
  entries.
* **Counting**: fetches are counted in BFCT at fetch time, and commits in BCCT
  at correct resolution.
* **Throttling condition**: a block is throttled when its probability is *at or
  below* the threshold, i.e. code >= `PPTR`.
* **Threshold table**:
  * At exactly 0.50, the threshold still takes the +0.10 step.
  * The fast-down interval applies at 15% free or less.
  * The interval for halving is read as `K2 >> floor(m/C2)`.
* **Correct resolutions**: they subtract from `PPR` whenever the branch is at or
  before `TBR`, not only while `TC` is set.
* **Threshold changes**: the backward step, which keeps `TBR` the oldest
  block at or below a changing threshold, is this design's own addition.
* **Mispredictions**: the rollback removes the flushed branches from `TBR` down
  to the mispredicted one. `TBR` then restarts the walk from the youngest
  flushed BlockID.
* **Log unit**: the unit that computes the codes is this design's own.
* **Rate**: the design takes one branch fetch and one resolution per cycle. An
  8-wide core that fetches two branches in one group must present them in two
  cycles.

## Verification

Each unit has a self-checking testbench driven by `$urandom`. It compares the
unit's outputs with a model written independently in the testbench, checks
cycle counts where the design promises them, and has a watchdog. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_bid_counter` | increments, wrap, hold |
| `tb_hybrid_bp` | predictions and training against a model of the three tables, history repair, 8192-cycle start-up |
| `tb_conf_est` | confidence sum against a model of the three counters, clamp to 44 |
| `tb_pred_rate_est` | CBPT codes against `-1024*log2(C/F)` within one code unit, rewrite period and counter restart (short `PTAR_N`) |
| `tb_bbct` | writes, single and range clears, priority, three reads |
| `tb_tbe` | after every burst of random fetch/resolve/mispredict traffic, `PPR`, `TBR` and `TC` equal a from-scratch computation, including nested mispredictions and threshold changes under traffic; each rollback lasts exactly `TBR - r + 1` cycles; back steps occur |
| `tb_thr_ctrl` | every rule of the threshold table, interval lengths, full-window reset, static codes |
| `tb_lsq_throttle` | stall bits, pick, held count |
| `tb_pmac_top` | end-to-end test with a short rewrite period (`PTAR_N` = 2000) |
| `tb_pmac_sweep` | the same synthetic program at static thresholds 0, 0.05, 0.10 ... 0.95 (20000 cycles each, `PTAR_N` = 20000); prints memory requests per threshold and checks that 0.95 holds loads and lets fewer wrong-path requests through than 0 |
| `tb_pmac_full` | end-to-end test with every parameter at its default: one full 500000-cycle rewrite period and then the four phases (about 580000 cycles, a few seconds) |

The end-to-end tests share `tb_pmac_env`. It models a core:
* A set of static branches with biased, patterned and random outcomes.
* Oldest-first resolution with random latencies.
* Wrong-path fetch after a misprediction.
* Loads and stores with random readiness.
* A 256-entry window.

It checks every stall bit, every pick and the held count each cycle. At the
end it checks that `TC` is clear and `PPR` is zero.

The test runs four phases:
1. Dynamic threshold with short latencies.
2. Dynamic threshold with long latencies, which fills the window.
3. Static threshold 0.90.
4. Static threshold 0 (baseline).

The test counts each mechanism and fails if any of them never occurs:
* throttling engaged
* a held load
* a release
* a held wrong-path load flushed
* walk steps
* rollbacks
* `TBR` back steps
* table rewrites
* threshold raised, lowered and reset
* static throttling

It also reports how many memory requests were issued on the correct path and
on the wrong path.

The sweep shows what throttling does to the synthetic program:
* At threshold 0, about 86% of issued memory requests are on the wrong path
  (5133 of 5986 in one run).
* At 0.05 the share falls to 33% (457 wrong-path requests).
* From 0.10 to 0.95 it stays at 37–48%, with 550–850 wrong-path requests.

Held correct-path loads are released and issued in every phase.

Roughly 10% of the wrong-path loads still get through at every nonzero
threshold. The likely reason is that they follow mispredictions of branches
whose confidence bucket measures a rate close to 1. No threshold below 1 can
hold such a block. The share does not fall further at higher thresholds, and
this model was not tuned to make it fall.

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        --top-module tb_pmac_full rtl/pmac_pkg.sv tb/tb_pmac_full.sv
    ./obj_dir/Vtb_pmac_full

Replace the top module and file to run any other testbench. All RTL passes
`verilator --lint-only -Wall` without errors. Two kinds of warning remain:
* Unused bits of the PC and history vectors.
* `SYNCASYNCNET` on `rst_n`. The reset is asynchronous in the flops, and it
  is also used in the `disable iff` of the assertions.

## Changing it

* The LSQ size, window size, rewrite period and dynamic-threshold constants are
  parameters of `pmac_top`.
* The table sizes of the predictor and the estimator are constants in
  `pmac_pkg`. If you change `NCONF`, keep `CONF_W` large enough to hold it.
* If you change `BID_W`, the in-flight table follows it. The BlockID distance
  limit becomes `2^(BID_W-1) - 1`.
