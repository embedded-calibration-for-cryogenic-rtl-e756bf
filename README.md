# Embedded fuzzy calibration loop for a cryogenic quantum device

A quantum device drifts. The drive amplitude that gives the wanted
success probability today is wrong tomorrow, and the readout that shows
this is noisy, since each reading is a count of ones over a finite number
of shots. This RTL closes that calibration loop in hardware, next to the
device, with no host computer involved. Each iteration ("poll") does the
same fixed work:

1. take N_total readout shots and count the ones, giving `p_meas = N1 / N_total`;
2. form the error `e = p_target - p_meas` and its change `de = e - e(k-1)`;
3. map `(e, de)` to an amplitude step `Delta` with a 3x3 singleton Sugeno
   fuzzy controller;
4. apply `amp <- sat(amp + clip(Delta, -Delta_max, Delta_max))`.

A monitor watches a 16-poll moving average of `|e|`. When the loop has
settled it freezes `amp` (monitor mode). If the average later rises
clearly above the level it had when the loop settled, the monitor
restarts calibration. The latency of a poll never depends on the data,
so the worst case is the only case.

The design is a single channel. All blocks are synthesizable
SystemVerilog and are parameterised with the default sizes given below.

## Block structure

```
                 qcal_regs  (configuration / telemetry bus)
                     | cfg                     ^ telemetry
                     v                         |
 shots --> qcal_meas_est --> qcal_error_unit --+--> qcal_fuzzy --> qcal_param_update --> amp_out
           (p_meas)           (e, de, |e|,|de|) |    (Delta)         (clip, sat)
                                                +--> qcal_monitor (metric, conv, restart)
                 qcal_supervisor: starts each stage in turn, holds the modes, counts k
```

| File | Role |
|---|---|
| `rtl/qcal_pkg.sv` | fixed-point word, register map, status and config structs, reset values |
| `rtl/qcal_top.sv` | the complete loop; the top module |
| `rtl/qcal_supervisor.sv` | per-poll sequencer; update/monitor and autonomous/manual modes; poll index `k` |
| `rtl/qcal_meas_est.sv` | shot counter and `p_meas` |
| `rtl/qcal_error_unit.sv` | `e`, `de`, `|e|`, `|de|` |
| `rtl/qcal_membership.sv` | N/Z/P triangular membership functions |
| `rtl/qcal_fuzzy.sv` | rule weights, weighted sums, division |
| `rtl/qcal_seq_div.sv` | bit-serial restoring divider |
| `rtl/qcal_param_update.sv` | step clipping, range saturation, `amp` register |
| `rtl/qcal_monitor.sv` | moving average, convergence rules, baseline, drift restart |
| `rtl/qcal_regs.sv` | register file |

## Number format

Every signal value (probabilities, errors, `Delta`, `amp`, thresholds,
consequents) is a signed 16-bit word with 12 fractional bits (Q3.12):
1.0 is 4096, and the range is about ±8. Membership degrees and rule
weights are unsigned 13-bit values in [0, 1.0]. `p_meas` is exact
because N_total is a power of two (256 by default). So `e` lies in [-1, 1]
and `de` in [-2, 2], and neither can overflow.

## The fuzzy controller

This part needs the most explanation.

**Fuzzification.** Each input `x` (`e` or `de`) gets three degrees:

```
mu_N(x) = clip(-x, 0, 1)     mu_Z(x) = max(0, 1 - |x|)     mu_P(x) = clip(x, 0, 1)
```

These are triangles on [-1, 1]. Z peaks at 0. N is 1 at -1 and 0 from 0
upward, and P mirrors N. Neighbouring terms cross at ±0.5 with degree
0.5. Outside [-1, 1] the degrees are clipped, so a large error is fully N
or fully P. The hardware uses only a compare, a negation and a
subtraction, with no lookup table. For any `x` the three degrees add up
to exactly 1.0.

**Rules.** There are nine rules, one for each pair of terms. Rule (i, j)
has weight `w_ij = mu_i(e) * mu_j(de)`, which is rounded down to 12
fractional bits. Its consequent is a single signed number
`D[3*i + j]` (i: e term, j: de term; N = 0, Z = 1, P = 2):

| e \ de | N | Z | P |
|---|---|---|---|
| N | D0 | D1 | D2 |
| Z | D3 | D4 | D5 |
| P | D6 | D7 | D8 |

**Defuzzification.** `Delta = sum(w_ij * D_ij) / sum(w_ij)`. The
numerator is a 33-bit signed sum of nine 13x16-bit products. The
denominator is a 17-bit sum. The ratio comes from `qcal_seq_div`, a
restoring divider that makes one quotient bit per clock. It works on the
magnitude, applies the sign afterwards, and truncates toward zero. A
zero denominator forces `Delta = 0`. With these memberships the weights
always add up to about 1.0, so a zero denominator cannot occur, but the
divider handles it anyway. `Delta` is a weighted average of table
entries, so it never leaves the range of the table.

**Default table.** Row N is -0.5, -0.5, -0.25. Row Z is -0.125, 0,
+0.125. Row P is +0.25, +0.5, +0.5. These values are this design's own.
The table is meant to be retuned through registers `0x10`-`0x18` for each
device. The signs assume that the success probability rises with `amp`:
a positive `e` (too few ones) pushes `amp` up.

**Update.** `qcal_param_update` clips `Delta` to ±`Delta_max` (default
0.5). It adds the step to `amp` in 17 bits, so the sum cannot wrap, and
saturates the result to [`amp_min`, `amp_max`] (default [0, 4.0]).

## Convergence and drift monitoring

`qcal_monitor` keeps the last W = 16 values of `|e|` in a circular
buffer, with a running sum. The monitor metric is `sum / 16`. Empty
slots hold zero, so the metric ramps up over the first 16 polls.

*Update mode.* A poll counts as a **hit** when the metric is at most
`E_tol` (0.125) and `|de|` is at most `DE_tol` (0.0625). It counts as a
**plateau** poll when the metric changed by at most `eps` (1/256) since
the previous poll. Convergence is declared after H (4) consecutive hits
**or** H consecutive plateau polls. Both counts start only once the window
is full. The plateau rule lets the loop settle even when the target cannot
be reached, for example when `amp` is pinned at `amp_max` and a steady
residual remains. The status register records which rule fired.

*Mode change.* Convergence declared in poll k puts the loop into monitor
mode at the start of poll k+1. The update of poll k itself is still
applied. On entry the current metric is latched as the **baseline**. In
monitor mode, shots, `e`, `de`, `Delta` and the metric are still produced
every poll, but `amp` is frozen.

*Restart.* A poll deviates when `metric - baseline >= T_rst` (0.125).
After R (8) consecutive deviating polls the monitor pulses a restart, and
the loop goes back to update mode at the next poll. The CONV status
flag is set when convergence is declared and cleared by a restart. The test is
one-sided: a metric that falls below the baseline never causes a
restart.

## Scheduling and timing

`qcal_supervisor` runs the stages strictly in sequence: estimator, error
unit, then monitor and inference together, then the update. When
`enable` is set it loops immediately. When the readout returns one shot
per cycle, each poll takes `N_total + L + 44` cycles, where L is the
delay from `shot_req` rising to the first `shot_valid`. The inference
alone takes 35 cycles, most of them the 33-step division. With the
defaults and L = 2, a poll is 302 cycles, and the end-to-end test checks
that this count is the same for every poll.

Modes:
- **autonomous / manual** (CTRL bit 1). In manual mode the loop measures
  and reports but never changes `amp`. `amp` is set by writing
  `REG_AMP_SET`.
- **restart command** (write 1 to CTRL bit 2). At the next poll
  boundary this clears the error history, the monitor window, the
  counters and `k`, and returns to update mode.
- **enable** (CTRL bit 0). Clearing it stops the loop after the current
  poll.

## Register map

Writes take effect on the clock edge with `cfg_we` high. Reads are
combinational.

| Addr | Name | Access | Reset |
|---|---|---|---|
| 0x00 | CTRL: [0] enable, [1] manual, [2] restart (pulse) | RW | 0 |
| 0x01 | P_TARGET | RW | 0.5 |
| 0x02 | DMAX (Delta_max) | RW | 0.5 |
| 0x03 / 0x04 | AMP_MIN / AMP_MAX | RW | 0 / 4.0 |
| 0x05 | AMP_SET: write loads `amp` (saturated); read gives `amp` | RW | - |
| 0x06 / 0x07 | E_TOL / DE_TOL | RW | 0.125 / 0.0625 |
| 0x08 | EPS (plateau) | RW | 1/256 |
| 0x09 | HITS (H) | RW | 4 |
| 0x0A / 0x0B | T_RST / R_PERS (R) | RW | 0.125 / 8 |
| 0x10-0x18 | D0-D8 | RW | table above |
| 0x20-0x24 | P_MEAS, E, DE, DELTA, AMP | R | |
| 0x25 | STATUS: [0] busy [1] upd [2] mon [3] conv_hit [4] conv_plateau [5] manual [6] restart_seen [7] conv | R | |
| 0x26 / 0x27 / 0x28 | METRIC / K (low 16 bits) / BASELINE | R | |

The same telemetry also appears as ports of `qcal_top`.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `qcal_top.LOG2_NTOTAL` | 8 | N_total = 256 shots per poll (own choice) |
| `qcal_top.LOG2_W` | 4 | monitor window W = 16 |
| `qcal_pkg.DATA_W / FRAC_W` | 16 / 12 | fixed-point word |

## What is specified and what is chosen here

Taken from the method: the five-stage loop and its fixed order; the
p_meas, e and de definitions; the three symmetric triangular
memberships crossing at ±0.5 and clipped outside [-1, 1]; the 3x3 rule
table and its D0-D8 indexing; product weights and weighted-average
defuzzification by a sequential divider, with zero for a zero
denominator; the clip-then-saturate update; W = 16, E_tol = 0.125,
DE_tol = 0.0625; convergence by hits or by plateau; monitor entry one
poll after convergence; a baseline latched at entry, and a restart after
R consecutive polls with `metric - baseline >= T_rst`; a register
interface for the table, the limits, the modes and the telemetry; manual
and autonomous modes.

Chosen here, because the method leaves them open: the Q3.12 format;
N_total = 256; the default consequents, Delta_max, amp range, p_target,
H = 4, eps = 1/256, T_rst = 0.125 and R = 8; the rule that both
convergence counts wait for a full window; de = 0 on the first poll; the
readout handshake; the bus protocol and register map; the restart
command; the direct load of `amp`.

Known departures and gaps:
- Only one channel is built. A supervisor that schedules calibration
  windows across several channels is part of the intended architecture,
  but its policy is not defined, so it is left out.
- The reference evaluation mentions an "update cadence" of 40 that
  this design has no counterpart for. Here `amp` is updated once per poll
  in update mode.
- The reference runs report no restart during a ±0.3 drift. That
  depends on the plant, the target and the restart thresholds. With this
  design's defaults and test plant (a target of 0.5 that can be reached,
  so the baseline is small), a ±0.3 drift does trigger a restart, and the
  loop then re-tunes to the shifted optimum. Raise `T_RST` to keep `amp`
  frozen through such drift.
- The reference runs reach convergence at poll 20 and settle at amp =
  2.000. Here the poll of convergence (23-36 in the tests) and the
  settled value (within about 0.1 of the optimum) depend on the test
  plant, the shot count and the noise. Monitor entry one poll after
  convergence is the same.
- Area, timing and power have not been evaluated.

## Verification

Each block has a self-checking testbench in `tb/` that compares against
values computed independently in the testbench. Each prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it covers |
|---|---|
| `tb_qcal_membership` | sweep of x over [-1.5, 1.5] and the extreme codes; crossings at ±0.5; the degrees add up to 1 |
| `tb_qcal_seq_div` | random and corner divisions; zero denominator; latency of exactly NUM_W cycles; a start while busy is ignored |
| `tb_qcal_error_unit` | e, de and magnitudes; first-sample de = 0; clear |
| `tb_qcal_meas_est` | exactly N_total shots, with and without gaps; n1 and p_meas; done timing |
| `tb_qcal_fuzzy` | random (e, de) and tables against a reference model; latency of 35 cycles; single-rule cases |
| `tb_qcal_param_update` | clip and saturation, including overflow cases; load priority |
| `tb_qcal_monitor` | moving average; hit and plateau convergence; restart persistence; clear; random thresholds |
| `tb_qcal_supervisor` | stage order; mode changes at poll boundaries; manual mode; restart command; disable |
| `tb_qcal_regs` | reset values, readback, read-only addresses, pulses |
| `tb_qcal_top` | full-size closed loop with `tb/qcal_plant_model.sv` (below) |
| `tb_qcal_drift_monitor` | full-size drift experiment with a conservative restart threshold (below) |

`tb_qcal_top` runs the whole design at its default parameters against a
behavioural device model, `p = 0.5 + 0.25 (amp - 2.0) + n + drift`,
clipped to [0, 1]. Here n is uniform in ±0.02 and drawn once per poll,
and each shot is a Bernoulli draw. The run covers four scenarios:

- two 1300-poll runs with a +0.3 and a -0.3 drift over polls 800-1199;
- an unreachable target (p_target 0.95 with `amp_max` 2.5), which
  converges by the plateau rule with `amp` saturated;
- manual mode followed by the restart command.

Every poll is checked: e, de, the metric, the `amp` update rule, the
status flags, register readback and the 302-cycle poll length. Every
mechanism (both convergence rules, monitor entry, drift restart, step
clipping, saturation, manual hold, restart command) must occur at least
once. In the drift runs the loop settled in monitor mode after 30-36
polls, at `amp` ≈ 1.96-1.98. During the drift it restarted and
re-tuned to about 0.88 (for +0.3) or 3.19 (for -0.3). After the drift it
restarted again and returned to about 2.0. The whole test takes under a
second.

`tb_qcal_drift_monitor` repeats the ±0.3 drift runs with `T_RST` = 0.5.
With that threshold the drift cannot cause a restart. In both runs the
loop entered monitor mode one poll after convergence, at poll 24 or 25,
and `amp` stayed frozen to the end. The 16-poll metric averaged 0.028
and 0.034 before the drift, 0.29 and 0.33 during it, and 0.027 and 0.038
after it. So the monitor sees the drift clearly, and the parameter is
left alone. The drift can be changed at run time with
`+DRIFT_START=`, `+DRIFT_LEN=` and `+DRIFT_MILLI=` (in thousandths).

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/qcal_pkg.sv tb/tb_qcal_top.sv --top-module tb_qcal_top
./obj_dir/Vtb_qcal_top
```

Replace `tb_qcal_top` with any other testbench name to run that test.
`-Wno-fatal` keeps Verilator's width and unused-signal lint warnings
from stopping the build; none of them marks a functional problem.
