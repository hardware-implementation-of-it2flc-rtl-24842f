# PID-like interval type-2 fuzzy logic controller

This is a digital controller for a single-input, single-output plant. Once per
sampling period it measures the error between set point and plant output. It
turns that error into a control action with **interval type-2 (IT2) fuzzy
logic**. In an IT2 fuzzy set every membership grade is an interval, bounded by
an upper membership function (UMF) and a lower membership function (LMF). The
area between the two, the *footprint of uncertainty*, lets the controller
tolerate noise and model error better than an ordinary (type-1) fuzzy
controller.

The controller can act as a P-, PD-, PI- or PID-like controller, chosen by two
switch inputs. Three more switches pick 2 to 7 triangular sets per variable.
Six gains and the sampling time (0.01 s to 1024 s) can be tuned.

The main idea is that no three-input fuzzy system is needed for PID. A
three-input system with 7 sets per input would need 343 rules. Instead, two
identical **two-input** fuzzy systems of 49 rules each run side by side:

* the **PD branch** maps (e, Δe) to a control action in position form;
* the **PI branch** gets the same two inputs with other gains. Its output is
  read as the *increment* of the control action and then integrated.

The sum of the two branches gives the PID-like controller.

```
             +------------------------------------------------------------+
 setpoint -->| e = sp - y    de = (e - e_prev)/Ts                          |
 actual  --->|     |                 |                                     |
             |  kp_pd*e, kd_pd*de  kp_pi*e, kd_pi*de   (limited to [-1,1]) |
             |     |                 |                                     |
             |  [IT2 FIS]         [IT2 FIS] -> integrator Ts/(z-1)         |
             |     | *kout_pd        | *kout_pi                            |
             |     +-----> P / PD / PI / PID select (C1,C2) --> control_signal
             +------------------------------------------------------------+
 IT2 FIS = fuzzifier x2 -> inference (rule table, firing intervals)
           -> EIASC type reducer [yl, yr] -> defuzzifier (yl+yr)/2
```

## One sampling period

`pid_it2flc` is a small sequencer around the datapath. With the default 50 MHz
clock a 0.01 s period is 500,488 clocks; the computation takes about 160 of
them:

| step | block | clocks |
|---|---|---|
| tick every Ts | `sample_timer` | - |
| e(k), Δe(k) = (e(k) − e(k−1))/Ts | `error_rate` (32-step divider) | ~35 |
| four gain blocks, limited to the universe [−1, 1] | `input_scaler` ×4 | 0 |
| both fuzzy systems in parallel | `it2flc_core` ×2 | m² + 2m + ~55 (≈120 for m = 7) |
| ui(k) = ui(k−1) + Ts·du(k−1) | `pi_integrator` | 1 |
| output gains, structure select, saturation | `output_mux` | 1 |

`control_signal` changes once per sample and `sample_done` pulses for one
clock when it does. A tick that arrives while the previous computation is
still running is ignored. That cannot happen for any Ts of 0.01 s or more at a
practical clock rate.

## The interval type-2 fuzzy system (`it2flc_core`)

### Membership functions (`it2_fuzzifier`, tables in `it2flc_pkg`)

Each input is a number in the universe [−1, 1] (Q2.14). It is graded on m sets
(m = 2..7). Every set has an upper and a lower trapezoid (a, b, c, d, height).
Triangles have b = c. The outer sets are shoulders: they stay at full height
out to ±1. The partitions are symmetric about zero. The left half, in
hundredths of the universe, is:

| m | set | UMF (a, b, c, d) | LMF (a, b, c, d), height |
|---|---|---|---|
| 2 | N | −100, −100, −35, 100 | −100, −100, −100, 35; 1 |
| 3 | N | −100, −100, −70, −10 | −100, −100, −100, −40; 1 |
| 3 | Z | −100, 0, 0, 100 | −70, 0, 0, 70; 0.8 |
| 4 | NB | −100, −100, −80, −40 | −100, −100, −100, −60; 1 |
| 4 | NS | −100, −40, −40, 40 | −80, −40, −40, 0; 0.8 |
| 5 | NB | −100, −100, −80, −30 | −100, −100, −100, −50; 1 |
| 5 | NS | −90, −40, −40, 10 | −70, −40, −40, −10; 0.8 |
| 5 | Z | −50, 0, 0, 50 | −30, 0, 0, 30; 0.8 |
| 6 | NB | −100, −100, −80, −40 | −100, −100, −100, −60; 1 |
| 6 | NM | −100, −60, −60, −20 | −80, −60, −60, −40; 0.8 |
| 6 | NS | −60, −20, −20, 20 | −40, −20, −20, 0; 0.8 |
| 7 | NB | −100, −100, −100, −65 | −100, −100, −100, −75; 1 |
| 7 | NM | −105, −70, −70, −35 | −95, −70, −70, −45; 1 |
| 7 | NS | −85, −50, −50, −15 | −75, −50, −50, −25; 1 |
| 7 | Z | −35, 0, 0, 35 | −25, 0, 0, 25; 1 |

The peak positions (±0.35, ±0.7, ±0.4, ±0.8, ±0.6, ±0.2, ±0.5, ±1) come from
the source design. Other feet and the LMF heights are estimates from its
drawings. To change a shape, edit `mf_left_pts` in `it2flc_pkg.sv`.
Everything else is derived at elaboration time: Q2.14 breakpoints and the
rising and falling slopes (height·2¹⁴/run). At run time the fuzzifier only
subtracts, multiplies and compares. It evaluates 7 upper and 7 lower grades
(Q1.15) combinationally, and sets at or above m read zero.

### Rules and firing intervals (`inference_engine`)

Rule (i, j) combines set i of the first input with set j of the second. Its
firing interval is `[lo1[i]·lo2[j], up1[i]·up2[j]]` (product t-norm). Its
consequent is output set `(i + j)/2`. When i + j is odd, the tie goes toward
the first input's index, which keeps the table antisymmetric. Zero error and
zero rate therefore give exactly zero output. This diagonal table is this
design's default. It lives in `rule_out` in `it2flc_pkg.sv` and is the place
to put a tuned table.

Each output set is represented by one crisp point, the position where its
upper MF peaks nearest zero (e.g. −1, −0.7, −0.5, 0, 0.5, 0.7, 1 for m = 7).
Rules that share a consequent therefore share its point. For centre-of-sets
type reduction, summing their lower and upper firing strengths gives exactly
the same [yl, yr] as keeping the rules apart, because the optimal switch point
never falls between equal points. The engine exploits this. It walks the m²
rules one per clock, with two multipliers, and accumulates only m pairs of
sums `w_lo[k]`, `w_up[k]`. That cuts the type reducer's work from up to 49
sorted rules to at most 7 pre-sorted points.

### Type reduction with EIASC (`eiasc_reducer`)

The type-reduced set is the interval [yl, yr]:

* yl is the smallest weighted mean of the points. It takes the upper weight
  for the points left of a switch point and the lower weight for the rest.
* yr is the largest. It takes the lower weight on the left and the upper
  weight on the right.

Karnik–Mendel (KM) and enhanced KM (EKM) search for the switch point with a
division in every iteration. The Enhanced Iterative Algorithm with Stop
Condition (EIASC) is cheaper. The reducer runs it for both ends at once:

1. **INIT** (m clocks): a = Σ y_k·w_lo[k], b = Σ w_lo[k]. Both searches start
   from these values.
2. **ITER** (at most m−1 clocks): there are two searches.
   * The left search moves L = 0, 1, … upward. Each step adds y_L·(w_up[L] − w_lo[L])
     to a and the difference to b. It stops when a/b ≤ y_{L+1}, i.e. when
     yl has stopped decreasing.
   * The right search moves R = m−1, m−2, … downward. It stops when
     a/b ≥ y_{R−1}, i.e. when yr has stopped increasing.

   The tests are evaluated as `a ≤ y·b` and `a ≥ y·b` (b ≥ 0), so no step
   needs a division. Each search also stops at the last switch point.
3. **DIV** (48 clocks): two sequential dividers produce yl = a_l/b_l and
   yr = a_r/b_r in Q2.14.

If a denominator is still zero at the end, only the outermost set carries any
weight. yl then falls back to the last point and yr to the first.

The crisp output is the midpoint `(yl + yr)/2` (`defuzzifier`). Both the
interval and the midpoint are outputs of `it2flc_core`.

## PI branch, structures and gains

The PI branch is a second copy of the same fuzzy system. Its output du is
integrated by `pi_integrator` as `ui(k) = ui(k−1) + Ts·du(k−1)`, which is a
forward-Euler Ts/(z−1). The integral is Q12.28 and saturates. It holds its
value while neither PI nor PID is selected, so it does not wind up in P or PD
operation.

| {C1, C2} | structure | control_signal |
|---|---|---|
| 00 | P | kout_pd · FIS_pd(kp_pd·e, 0) |
| 01 | PD | kout_pd · FIS_pd(kp_pd·e, kd_pd·Δe) |
| 10 | PI | kout_pi · ui |
| 11 | PID | sum of the PD and PI terms |

In P mode the PD branch's rate gain is forced to zero. The user therefore need
not clear kd_pd to switch to P. The set count is m = {C3, C4, C5}, and codes 0
and 1 select 2 sets. The same m applies to both inputs and the output of both
branches.

## Ports and number formats

| port | dir | width | format / meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset (push button) |
| `setpoint`, `actual_output` | in | 16 | signed Q5.11 (range ±16) |
| `ts` | in | 25 | unsigned Q11.14 seconds (0.01 s = 164) |
| `kp_pi`, `kd_pi`, `kout_pi`, `kp_pd`, `kd_pd`, `kout_pd` | in | 16 each | unsigned Q8.8 gains |
| `c1`, `c2` | in | 1 each | structure select |
| `c3`, `c4`, `c5` | in | 1 each | number of sets |
| `control_signal` | out | 16 | signed Q5.11, saturated |
| `sample_done` | out | 1 | one-clock pulse when `control_signal` updates |

Parameter: `CLK_HZ` (default 50,000,000) converts Ts to clock cycles.

Internally the universe of discourse is Q2.14. Grades and firing strengths are
unsigned Q1.15. Per-set firing sums are 22 bits. The type reducer's
accumulators are 48 bits. Δe is Q21.11.

## Relation to the source design

Taken from the source design:

* the two-branch PD + PI structure and its six gains;
* the integrator of the PI branch;
* the four structures and the 2..7 triangular IT2 sets and their peak positions;
* the product firing intervals;
* centre-of-sets type reduction by EIASC and the midpoint output;
* 16-bit input and output words;
* the sampling-time range;
* the push-button reset.

This design's own choices:

* The schedule is sequential, with one rule per clock, parallel EIASC searches
  and restoring dividers. The original was a largely combinational circuit
  generated from a high-level model, with very few registers.
* All number formats and the 50 MHz clock.
* The control-code assignment for C1..C5.
* The diagonal rule table.
* Crisp consequent points for the output sets.
* The MF feet and LMF heights that are not on labelled ticks.
* The P-mode zeroing of the rate gain, the integrator hold and saturation, and
  output saturation.

The integrator follows the Ts/(z−1) form. A plain u(k−1) + Δu(k) form,
without Ts, is also a valid reading, but with the output gains shown for the
source design it gives a loop far too aggressive to use.

Only EIASC is implemented. KM and EKM type reducers, which the source design
measured against it, are not part of this RTL.

## Behaviour worth knowing

With the seven-set partition above, the PS and NS sets only start at ±0.15.
A scaled PI-branch input |kp_pi·e| below 0.15 therefore fires only the Z sets,
and the increment is exactly zero there. The PI- and PID-like loops settle
with a residual error of up to 0.15/kp_pi. With kp_pi = 1.4 that is about
0.11. With kp_pi = 10 it is 0.015. Raise kp_pi, or widen the Z/PS/NS feet in
`it2flc_pkg.sv`, if a tighter steady state is needed.

## Simulation

All testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M`
and has a watchdog. Build one with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/it2flc_pkg.sv tb/it2_ref_pkg.sv tb/tb_pid_it2flc.sv --top-module tb_pid_it2flc
./obj_dir/Vtb_pid_it2flc
```

`tb/it2_ref_pkg.sv` is a floating-point reference of the fuzzy system. It
fires every rule separately, sorts the rules and tries every switch point
exhaustively. The fixed-point hardware is compared against it.

| testbench | what it runs |
|---|---|
| `tb_sample_timer`, `tb_error_rate`, `tb_input_scaler`, `tb_defuzzifier`, `tb_pi_integrator`, `tb_output_mux` | unit checks against integer or floating-point arithmetic |
| `tb_it2_fuzzifier` | sweeps all six partitions against the float MF evaluation |
| `tb_inference_engine` | exact per-set sums and the m²+1 latency |
| `tb_eiasc_reducer` | EIASC against exhaustive switch-point search; counts early stops |
| `tb_it2flc_core` | whole fuzzy system vs. reference, within 0.003 |
| `tb_pid_it2flc` | closed loop, all structures and set counts, Ts of 0.01, 0.05 and 0.5 s with the tick spacing checked, load steps, resets |
| `tb_pid_it2flc_full` | default parameters (50 MHz, Ts = 0.01 s), four full sampling periods |
| `tb_workload_linear` | unit step of 0.00995z/(z−0.99), P/PD/PI/PID, 20 s, 10 % load at 10 s |
| `tb_workload_servo` | servo with stiction/Coulomb/viscous friction, PID, nominal and +10 % parameters |

The plant models exist only in the testbenches. The servo constants (J = 0.1,
Fs = 0.2, Fc = 0.1, v_s = 0.1, σ = 0.5) are illustrative. The closed-loop
testbenches scale `CLK_HZ` down to 20 kHz, i.e. 200 clocks per 0.01 s sample,
to keep runs short.

## Files

`rtl/`: one module or package per file.

* `it2flc_pkg`: formats, MF and rule tables
* `seq_divider`: helper
* `sample_timer`, `error_rate`, `input_scaler`
* `it2_fuzzifier`, `inference_engine`, `eiasc_reducer`, `defuzzifier`
* `it2flc_core`
* `pi_integrator`, `output_mux`
* `pid_it2flc`: top

`tb/`: the testbenches above and `it2_ref_pkg`.
