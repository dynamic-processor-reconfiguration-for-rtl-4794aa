# Runtime morphing control for a four-mode reconfigurable out-of-order core

A program's needs change every few thousand instructions. Some stretches are
limited by the instruction window, others by branch mispredictions or cache
misses. Others run at low ILP and would simply benefit from a faster clock.
One fixed core is therefore never the most efficient choice for the whole
program. Migrating a thread between different cores costs far too much to do
at that granularity. The alternative built here is to give one out-of-order
core several **modes**. In each mode the same pipeline works with a different:

- number of powered ROB, LSQ and IQ banks;
- fetch/decode/issue width;
- clock frequency and supply voltage.

Caches, register file and predictors stay where they are, so a mode switch
costs only hundreds of cycles.

This RTL is the control side of that core. It:

1. watches the core's performance counters;
2. predicts, from the counters of the mode it is in, how fast and how
   power-hungry every other mode would be;
3. decides with hysteresis whether another mode gives more performance per
   watt;
4. carries out the switch: drain, new voltage and frequency, bank-by-bank
   power gating.

Three related mechanisms sit beside it:

- a reliability-aware decision rule that weighs the soft-error rate against
  efficiency;
- the phase detector of a multi-core variant, in which a thread moves between
  separate cores only when it enters a stable new phase;
- the control of a simpler two-mode core that switches between out-of-order
  and in-order execution.

The out-of-order pipeline itself, the caches, the voltage regulator and the
PLL are not part of this RTL. Their signals are ports of the top module.

## The four modes

| Mode | Purpose | f / V | IQ, LSQ, ROB entries | Fetch/issue width | Avg. power |
|---|---|---|---|---|---|
| AC, average core | baseline, most phases | 1.6 GHz / 0.8 V | 36, 128, 128 | 4, 4 | 2.2 W |
| NC, narrow core | low-ILP phases; higher clock | 2.0 GHz / 1.0 V | 24, 64, 64 | 2, 2 | 1.7 W |
| LW, larger window | window-bound phases | 1.4 GHz / 0.8 V | 48, 128, 256 | 4, 4 | 2.4 W |
| SM, small core | phases where resources do not help | 1.2 GHz / 0.7 V | 12, 16, 16 | 1, 1 | 0.82 W |

The ROB and LSQ are built from 16-entry banks and the IQ from 8-entry banks.
The hardware therefore holds:

- 16 ROB banks (256 entries);
- 8 LSQ banks (128 entries);
- 6 IQ banks (48 entries);
- 4 fetch, 4 decode and 4 issue lanes.

A mode is a number of powered banks per structure and of lanes per stage. The
36-entry IQ of AC is not a whole number of banks, so five banks (40 entries)
are powered for it. The table lives in `rtl/morph_pkg.sv` (`mode_cfg`). The
per-mode power column is not used by the hardware, because power is
estimated at run time. The testbench uses it to build its workload.

## From counters to a recommendation

**Windows** (`pmc_counters`). The core reports per-cycle events on a packed
struct:

- committed and fetched instructions;
- L1 and L2 hits and misses;
- branch mispredictions;
- committed integer, FP, load, store and branch instructions;
- dispatch stalls.

The block sums them over a **window** of 500 committed instructions. It then
freezes the totals and computes the window IPC with a sequential divider. The
result is a vector of Q16.16 values:

- the counts;
- the IPC;
- a constant 1.0, which serves as the intercept.

Counting is paused while the core is being morphed.

**Estimates** (`ips2w_estimator` + `mac_unit`). Only the current mode's
counters can be observed, yet every mode has to be compared. The estimator
uses linear regressions trained offline:

- the power of every mode (four expressions);
- the IPC of every other mode (three expressions).

The current IPC is measured, not estimated. Each expression is a sum of
coefficient × counter terms. The terms are streamed through one pipelined
multiply-accumulate unit, one term per clock:

- each product is rounded back to Q16.16 and accumulated in 48 bits;
- each sum is saturated to 32 bits.

The coefficient table holds one set of expressions per current mode
(4 × 8 × 5 terms), and software can rewrite it through the `cfg_*` port. It
resets to the published fit for "currently in AC" in every row, because that
is the only fit available. Load real fits for the other rows before relying
on them.

**Metric**. For each mode the estimator forms IPS = IPC × f, using the mode
table's frequency, and compares modes by IPS²/Watt. That metric weighs
performance more heavily than energy per instruction does. Division is
avoided:

- each mode gets N = (IPC·f)² and its power P;
- mode *m* beats the best so far when N_m·P_best > N_best·P_m;
- the current mode enters the comparison with N × 1.05.

Another mode is therefore recommended only if it is at least **5 %** better.
Inputs are clamped (IPC to [0, 8], power to at least 0.01 W) so that a wild
regression output cannot win by a negative power.

**Vote** (`mode_history`). One window is too short to act on. Four
consecutive recommendations are collected, so a decision is made every
2000 instructions, and the most frequent one becomes the decision. A tie
goes to the current mode if it is among the leaders. The history is cleared
after every switch, so the next decision uses only windows measured in the
new mode.

## Morphing the core

`morph_controller` owns three registers:

- the **VCR**, the target voltage in mV, read by the regulator;
- the **FCR**, a PLL multiplier of a 100 MHz reference, so 12…20 for
  1.2…2.0 GHz;
- the **CCR**, the enable bit of every bank and lane.

A decision naming a new mode runs this sequence:

1. **Drain.** `drain_req` goes high. The core stops fetching and answers
   `drained` once its pipeline is empty.
2. **Set V/f.** The new VCR and FCR values are written.
3. **Gate.** Banks and lanes are switched one per clock across the whole
   core, so that no current surge occurs.
   - Each resizable unit is a `bank_group_ctrl` that proposes one change; a
     fixed-priority arbiter grants one of them per clock.
   - Growing: the lowest-numbered powered-off bank is switched on.
   - Shrinking: the powered bank with the fewest used entries is chosen, and
     switched off only when it is empty. Until then the unit waits, for
     example while committed stores still leave the LSQ. Occupancy per bank
     comes from the core (`rob_occ`, `lsq_occ`, `iq_occ`).
4. **Settle.** The controller waits for `vrm_ready` and `pll_locked`.
5. **Resume.** `cur_mode` changes, `mode_changed` pulses, `switches`
   increments and `last_overhead` records the cycles the switch took.

A decision for the current mode, or one arriving mid-switch, is ignored.

The time a switch takes depends almost entirely on the environment: drain
time, regulator and PLL settling (of the order of 200 cycles for an on-chip
regulator) and bank emptying. The controller itself adds only a handful of
cycles. A budget of about 500 cycles per switch is realistic. With a
decision every 2000 instructions, switches are rare enough that this budget
matters little.

## Reliability-aware policy (RPE)

With `rpe_policy` high, `rpe_selector` replaces the IPS²/Watt
recommendation. The vote and controller are unchanged. It scores each mode by

    RPE = (IPS²/W)^a · (AVF · Raw_SER)^-b,    a = 0.6, b = 0.4
    Raw_SER ∝ (f / fmax) · e^(c0 (vmax − v))

Lower voltage raises the raw soft-error rate. Fuller, larger buffers raise
the architectural vulnerability factor (AVF). The per-mode AVF estimates come
in on the `avf` port, from a counter regression outside this RTL. A switch
needs a 4 % gain in RPE.

Fractional powers are avoided by working in base-2 logarithms:

    log2 RPE = a(2·log2(IPC·f) − log2 P) − b(log2 AVF + log2(f/fmax) + c0·log2e·(vmax − v))

A 16-segment piecewise-linear log2 unit evaluates one logarithm per clock,
accurate to about 10⁻³. Constant factors and normalisations cancel when modes
are compared. The voltage sensitivity `C0_LOG2E_MV` has no published value.
The default of 0.01 per mV is this design's assumption: the raw error rate
doubles for every 100 mV of voltage reduction.

## Phase detection for the multi-core variant (BTV)

`btv_phase_detector` serves a different system, an asymmetric multi-core
with one core per type. There a migration is expensive, so a thread is moved
only when it enters a stable new phase. The detector works as follows:

- **Counting.** Over each interval of 50 000 committed instructions it counts
  the cycles stalled on I-cache, D-cache, L2, branch mispredictions, full
  buffers (resource stalls) and issue width.
- **Vector.** Each count is divided by the interval's cycles. Together with
  the IPC this gives a 7-entry **bottleneck type vector**.
- **Match.** The vector is compared with up to eight stored phases by the sum
  of absolute differences. A distance of 0.085 or less is a match.
- **New phase.** A vector further than that from every stored phase opens a
  *potential* phase. If most of the four intervals starting there are also
  far, the phase is stored and `new_phase` pulses; this is when the best core
  type is re-evaluated. Otherwise the potential phase is dropped
  (`unstable`).

It shares only clock and reset with the rest of the top.

## The two-mode core: out-of-order or in-order

`ooo_ino_manager` controls a simpler relative of the four-mode core, on the
top's `oi_*` ports with its own window counters. In this core the only choice
is between two modes:

- **OOO:** 4-wide out-of-order, the baseline;
- **InO:** the same pipeline run 2-wide and in order.

For InO the ROB, the RAT, the LSQ and the FP issue queue are switched off.
Fetch, decode, issue and integer ALUs go from 4 to 2, LS units from 3 to 1
and FP ALUs from 2 to 1. Registers, caches and predictors stay.

The decision follows the same pattern as the four-mode core:

- **Estimate.** After each window of 500 instructions, three regressions give
  the other mode's IPC and power and the current mode's power.
- **Compare.** Both modes run at the same clock, so IPC²/P ranks them as
  IPS²/Watt does. A window votes for the other mode only if it is better by
  4 %.
- **Vote.** Every 6 windows, the core switches if more than half of the votes
  were for the other mode. A tie keeps the current mode.

**The switch.** The unit enables change one per clock, from the load/store
units and ALUs up to the ROB. Into InO the units are gated first. Then the
pipeline is flushed (`oi_flush_req` until `oi_flushed`) and fetching restarts
in order. Back to OOO the units are powered on and `oi_rob_ptr_reset` pulses,
so that ROB head and tail start at the same slot. Each switch takes 15 clocks
of gating plus the flush.

The three regressions are fixed in the module, one set per current mode.
Unlike the four-mode core, they cannot be loaded at run time.

## Interface summary of `morph_mgmt_top`

| Group | Signals |
|---|---|
| from the core | `ev` (per-cycle events), `rob_occ`/`lsq_occ`/`iq_occ` (used entries per bank), `drained` |
| to the core | `drain_req`, CCR: `ccr_rob_en`, `ccr_lsq_en`, `ccr_iq_en`, `ccr_fetch_en`, `ccr_decode_en`, `ccr_issue_en` |
| regulator / PLL | `vcr`, `fcr`, `vrm_ready`, `pll_locked` |
| software | `cfg_we/src/expr/term/data` (regression table), `rpe_policy`, `avf` |
| status | `cur_mode`, `morphing`, `win_valid`, `rec_valid/rec_mode`, `dec_valid/dec_mode`, `switches`, `last_overhead`, `est_ipc`, `est_pwr`, `rpe_valid/rpe_mode/lrpe` |
| BTV detector | `btv_restart`, `btv_commit`, `btv_stall` → `btv_valid`, `btv`, `btv_match`, `btv_new_phase`, `btv_unstable`, `btv_phase_id`, `btv_num_phases` |
| two-mode core | `oi_ev`, `oi_flushed` → `oi_mode_ooo`, `oi_morphing`, `oi_mode_changed`, `oi_flush_req`, `oi_rob_ptr_reset`, unit enables `oi_rob_en` … `oi_ls_unit_en`, `oi_win_valid`, `oi_rec_valid/oi_rec_other`, `oi_dec_valid/oi_dec_switch`, `oi_est_*`, `oi_switches` |

Parameters with their defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `WINDOW_LEN` | 500 | instructions per window |
| `HISTORY_DEPTH` | 4 | windows per vote |
| `THRESH` | 5 % | IPS²/Watt switching threshold |
| `BTV_INTERVAL` | 50 000 | instructions per BTV interval |
| `BTV_THRESH` | 8.5 % | BTV match distance |
| `BTV_M` | 4 | intervals needed to confirm a new phase |
| `BTV_PHASES` | 8 | stored phases |
| `OI_WINDOW` | 500 | two-mode core: instructions per window |
| `OI_HISTORY` | 6 | two-mode core: windows per vote |
| `OI_THRESH` | 4 % | two-mode core: switching threshold |

All estimator quantities are signed Q16.16. Resets are asynchronous and
active low. After reset the core is in AC.

**Latencies.**

| Step | Latency |
|---|---|
| Window IPC (divider) | 49 clocks after the closing clock |
| IPS²/Watt estimate | 49 clocks after `start` |
| RPE selection | 22 clocks after `start` |
| Two-mode estimate | 19 clocks after the window's counters are valid |
| Vote output | 1 clock after the deciding recommendation |

The IPS²/Watt estimate breaks down as:

- 35 MAC terms (7 expressions × 5 terms);
- 4 clocks of MAC drain;
- 4 metric clocks;
- 5 compare clocks;
- 1 output clock.

## How far to trust it, and where it departs from the original

- **Estimator timing.** Each regression has four counter terms plus an
  intercept. The intercept is evaluated as a fifth MAC term, so an estimate
  takes 35 MAC cycles (49 in all) rather than the about 30 quoted for the
  original.
- **Regression coefficients.** Only the fit for "currently in AC" is
  published. The other rows of the coefficient table start as copies of it.
- **Power gating timing.** A real bank power switch takes tens of cycles. Here
  a CCR bit changes in one clock, and any settling belongs to the power
  switches. The MAC unit is not power-gated when idle.
- **Issue lanes.** Issue lanes are gated like fetch and decode lanes.
- **Switch sequence.** The order drain → V/f → gating → settle is this
  design's choice, as are the one-bit handshakes.
- **RPE inputs.** The AVF regression (its counters are known, its
  coefficients are not) and the RPE voltage constant are not part of the
  design; the AVF is a port and the constant a parameter.
- **Two-mode core.** The threshold is applied in both directions, not only
  for entering InO. Negative regression results are clamped to zero IPC or
  the smallest power.
- **Not built.** The reduced mode sets for 2 W and 1.5 W power budgets need
  edits to `mode_cfg`, and the 2 W set needs 12 LSQ banks.
- **Verification.** Every module has a self-checking testbench that compares
  against an independent model, and each testbench was shown to catch a
  deliberately broken copy of its module. The end-to-end test runs the top at
  its default parameters.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops on its
own. They use `$urandom` only. With Verilator 5, for example:

    verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/morph_pkg.sv \
              tb/tb_morph_mgmt_top.sv --top-module tb_morph_mgmt_top
    ./obj_dir/Vtb_morph_mgmt_top

(`-y rtl` lets Verilator find each module in the file of the same name.)

| Testbench | What it exercises |
|---|---|
| `tb_seq_div` | divider: random, zero-divisor and overflow cases, latency |
| `tb_pmc_counters` | window boundaries, counts, IPC, latency |
| `tb_mac_unit` | bit-exact sums, rounding, saturation, back-to-back expressions |
| `tb_ips2w_estimator` | bit-exact estimates, recommendations against a real-number model, threshold holds |
| `tb_mode_history` | votes, ties, flush |
| `tb_bank_group_ctrl` | one change per grant, least-occupied-and-empty rule |
| `tb_morph_controller` | switch sequence, one CCR bit per clock, mode table |
| `tb_rpe_selector` | log-domain RPE against a real-number model |
| `tb_btv_phase_detector` | bit-exact reference model of the classification |
| `tb_ooo_ino_manager` | two-mode estimates and votes against a real-number model, one unit per clock, flush handshake, ROB pointer reset |
| `tb_morph_mgmt_top` | end-to-end, at the default parameters |

`tb_morph_mgmt_top` drives a modelled core through phases that favour each
mode in turn, then near-ties that land inside the threshold. It then switches
to the RPE policy, including a mode that is best by IPS²/Watt but too
vulnerable to be chosen. It runs the BTV detector at its full 50 000-instruction
interval. Meanwhile it takes the two-mode core into InO and back twice. It
counts every mechanism (windows, votes, switches into each mode,
drains, waits for banks to empty, regulator/PLL waits, threshold holds, RPE
switches, new, matched and unstable phases, two-mode switches, flushes and
ROB pointer resets) and fails if one never happens.
It takes about ten seconds.

## Files

- `rtl/morph_pkg.sv`: modes, mode table, bank constants, counter numbering,
  fixed point, default regression terms.
- `rtl/pmc_counters.sv`, `rtl/seq_div.sv`: window counters and divider.
- `rtl/mac_unit.sv`, `rtl/ips2w_estimator.sv`: regression evaluation and
  IPS²/Watt recommendation.
- `rtl/mode_history.sv`: vote.
- `rtl/bank_group_ctrl.sv`, `rtl/morph_controller.sv`: switching and
  staggered gating.
- `rtl/rpe_selector.sv`: reliability-aware recommendation.
- `rtl/btv_phase_detector.sv`: phase detector of the multi-core variant.
- `rtl/ooo_ino_manager.sv`: control of the two-mode OOO/in-order core.
- `rtl/morph_mgmt_top.sv`: top.
- `tb/`: one self-checking testbench per module, plus the end-to-end test.
