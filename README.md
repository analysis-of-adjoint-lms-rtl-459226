# Adjoint LMS adaptive noise canceller

This design removes noise from a signal when a separate reference of that
noise is available. It is built for active noise control, where the controller
does not reach the error sensor directly. Its output drives an actuator, and
the actuator reaches the sensor through a *secondary path* S, for example a
loudspeaker, air and a microphone. The adaptive filter W therefore cannot be
trained with the plain LMS rule. The error it sees has already passed
through S.

The adjoint LMS (ALMS) algorithm handles this by filtering the *error*, not the
reference input. The error is run backwards in time through an estimate of S,
which is the adjoint of S. The product of that filtered error with the
reference gives the gradient. Filtering one scalar error stream costs one
M-tap filter. The filtered-x alternative needs one filtered copy of the input
per weight.

The RTL takes one pair of 16-bit samples per clock and returns one 16-bit
error-corrected sample per clock, eight clock edges later. Its only pins are
`clk`, `rst`, `data1`, `data2` and `alms_out`, 50 in all.

## Signal chain

```
 data2 = x(n) ──┬──► Filter (W, adaptive) ── y ──► Secondary Filter (S) ── Out1 = ys ──┐
                │                                                                     ▼
 data1 = d(n) ──┼───────────────────────────────────────────────────────────────────► SUB ── e(n) ──► alms_out
                │                                                                     │
                │                                         m_error = fe               ▼
                ├──► MUL  ◄───────────────────────────────────────────────── Est.sec filter (mirrored S^)
                │     │ Out2 = mu·fe / (N·Px)
                ▼     ▼
             LMS Filter: w_k += Out2 · x(n − DELAY − k) ──── weights ──► Filter
```

| Block | Module | What it computes |
|---|---|---|
| Filter | `adaptive_filter` | `y(n) = Σ_k w_k x(n−k)`, 16 taps; weights rounded from Q2.30 to Q2.14 |
| Secondary Filter | `secondary_filter` | `ys(n) = Σ_j s_j y(n−j)`, a fixed 4-tap model of the secondary path |
| SUB | `alms_sub` | `e(n) = sat(d(n) − ys(n))`, with d delayed to meet ys |
| Est.sec filter | `est_sec_filter` | `fe(m) = Σ_j ŝ_j e(m+j)`, the adjoint filter |
| MUL | `alms_mul` | `Out2 = sat(μ·fe / (N·Px))`, the normalised step term |
| LMS Filter | `lms_filter` | the weight registers and their update |
| — | `fir_pipe` | the pipelined FIR shared by the three filters |
| — | `alms_pkg` | widths, types, default coefficients, saturate and round helpers |
| top | `alms_top` | wires the six blocks |

`data1` is the primary input d(n): the signal plus noise, as the sensor sees it.
`data2` is the noise reference x(n). `alms_out` is the error e(n). This is the
noise-cancelled signal and also the measure of how much noise is left. Once the
weights have converged, S·W·x matches the part of d that is correlated with x,
and e keeps the rest.

## Adjoint filtering and the timing of the update

Timing is the hard part of this design. Three delays have to line up.

**1. The adjoint look-ahead.** The gradient of the squared error with respect
to weight `w_k` works out to `Σ_p x(p−k)·g(p)`, where `g(p) = Σ_j ŝ_j e(p+j)`.
So g needs *future* errors, up to `e(p+M−1)`, with M = `S_TAPS`.
`est_sec_filter` produces `g(p)` once `e(p+M−1)` has arrived. It does this by
running an ordinary FIR over the error stream with its coefficients reversed,
`c_i = ŝ_{M−1−i}`. The cost is a fixed extra delay of M−1 samples.

**2. The pipeline.** Each block is registered. Take a sample captured at
clock edge n. It then goes through:

| stage | edges after capture | latency |
|---|---|---|
| input registers (`data1`, `data2`) | n | 1 |
| Filter: products, sum, round | n+1 … n+3 | 3 |
| Secondary Filter: products, sum, round | n+4 … n+6 | 3 |
| SUB (d has waited in a 6-deep line) | n+7 | 1 |
| Est.sec filter | +3, plus M−1 samples of look-ahead | 3 |
| MUL: multiply and power estimate, then shift and saturate | +2 | 2 |

`e(n)` appears on `alms_out` after edge n+7, which is the eighth edge that
touches the sample. That gives a latency of 8 clocks and a throughput of one
sample per clock. The step term Out2 that belongs to sample p reaches the LMS
Filter `DELAY = S_TAPS − 1 + 12` clocks after x(p) was captured. That is 15 at
the defaults.

**3. The alignment in the LMS Filter.** `lms_filter` keeps its own line of
past reference samples, `DELAY + N_TAPS − 1` long. At each clock it pairs Out2
with `x(t − DELAY − k)` for tap k. The weights used by the Filter are
therefore about DELAY samples older than the error that updates them. This is a
delayed LMS. It converges as the plain algorithm does as long as the step size
is small compared with 1/DELAY. If you change a pipeline depth, change the
`L_*` constants in `alms_top`, which derive DELAY. A mismatch of even one
sample between Out2 and x makes the gradient wrong.

## Normalisation

The step is normalised by the power of the reference, as in NLMS. `alms_mul`
keeps an exponential average `P ← P + (x² − P)/2^PWR_SHIFT` (Q2.30), with
PWR_SHIFT = 5. It then finds the leading one L of P and divides by
`N·P ≈ 2^(L−30+log2 N)` with a right shift instead of a divider. The effective
step is therefore between μ and 2μ of the exact NLMS step. L is held at 20 or
above, which puts a floor of 2⁻¹⁰ under the power estimate. Without the floor,
a silent reference would make the step blow up. `norm_clamp_o` reports when the
floor is in force. μ = `MU` = 0.125 (Q1.15 value 4096).

## Number formats

| quantity | format |
|---|---|
| all samples: data1, data2, y, ys, e, fe, Out2 | 16-bit signed Q1.15, saturating |
| filter coefficients (S, Ŝ, rounded weights) | 16-bit signed Q2.14 (range ±2) |
| adaptive weights | 32-bit signed Q2.30, saturating accumulate |
| products in the filters | full 32-bit, summed without loss, then rounded half-up |

Every block that can clip has a `sat_o` flag, and the LMS Filter has `wsat_o`.
`alms_top` leaves them unconnected at its pins, but a testbench can read them
through the hierarchy.

## Parameters of `alms_top`

| parameter | default | meaning |
|---|---|---|
| `N_TAPS` | 16 | length of the adaptive filter |
| `S_TAPS` | 4 | length of the secondary-path model and of its estimate |
| `S_COEF` | 0.5, 0.25, −0.125, 0.0625 | secondary-path model, Q2.14, tap 0 in bits [15:0] |
| `SHAT_COEF` | same as `S_COEF` | estimate used by the adjoint filter |
| `MU` | 4096 (0.125) | step size, Q1.15 |
| `PWR_SHIFT` | 5 | averaging constant of the power estimate |

Reset (`rst`) is synchronous and active high. It clears every register, so
the weights start at zero.

## How closely this follows the original design

These parts follow the published architecture:

- the six blocks and how they are wired;
- the names of the buses: data1, data2, Out1, error_out, m_error, Out2, ALMS_out;
- the 16-bit sample width;
- the four inputs and one output;
- the latency of 8 clocks and the throughput of one sample per clock;
- the algorithm: filter, secondary path, error, adjoint filter, normalised update.

These parts are this design's own, because the source gives none of them:

- the tap counts and the coefficients of the secondary path;
- the step size and the way normalisation is done;
- the fixed-point formats;
- the internal pipeline stages;
- the reset behaviour.

Known departures:

- **Sign of the error.** The algorithm description forms the error as
  `d + ys`, to match sensors that add the two fields. The block diagram draws
  a subtractor. This RTL subtracts, `e = d − ys`, and uses the matching
  update sign. To use the additive convention, change the sign in `alms_sub`
  and the sign of the update in `lms_filter`.
- **Where the output comes from.** The diagram draws the output leaving the
  LMS Filter block. Here the output is the error from SUB, registered. The LMS
  Filter holds the weights and feeds them back to the Filter, a path the
  diagram does not draw.
- **Unused diagram inputs.** Some of the diagram's extra inputs are not used.
  In the diagram, data1 also goes into the Filter, and a bus goes into the
  Secondary Filter and the Est.sec filter. The blocks here take only the
  signal that the algorithm needs.
- **Real signals only.** The algorithm is also described for complex signals.
  Only real 16-bit signals are built, which is what the 50-pin interface
  allows.
- **The clock is the sample clock.** There is no sample-enable input. To run
  at 1 kS/s, the rate the original system was used at, clock the design at
  1 kHz, or add an enable to every register.
- **Physical results.** Clock frequency, gate count, area and power were
  reported for a 130 nm ASIC implementation. They depend on the cell library
  and on the tap counts, and cannot be reproduced from this RTL.

## Verification

Each block has a self-checking testbench in `tb/`. It drives random stimulus
and compares every output with an independent model written in the testbench,
bit for bit and cycle for cycle. Each testbench ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_adaptive_filter`, `tb_secondary_filter` and `tb_est_sec_filter` check
  the FIR results, the rounding and the saturation at a latency of three edges.
  The adjoint filter is checked against the mirrored sum.
- `tb_alms_sub` checks the d alignment and both clip limits.
- `tb_alms_mul` checks the power estimate, the leading-one shift, the floor
  and clipping, with the reference silent, small and at full scale.
- `tb_lms_filter` checks all 16 weights every clock, including the clip limits
  of the weights.
- `tb_alms_top` runs the whole canceller at its default parameters, in three
  phases:
  1. It measures the 8-edge latency with an impulse, and checks that
     `alms_out` repeats data1 exactly while the reference is silent.
  2. It feeds white noise through a known primary path `S * Wo`. The residual
     must end at least 30 dB below the primary signal, and every weight must
     come within 0.01 of Wo. A typical run reaches about −53 dB.
  3. It holds data1 at full scale to make the error clip.
  The testbench counts the power floor, data-driven normalisation, adaptation
  and error clipping, and fails if any of them never happens.
- `tb_alms_snr` is a noise-cancellation workload at the default parameters.
  data1 carries a small tone buried in noise that reached it through a known
  path, and data2 carries the noise source. The SNR rises from about −2.5 dB at
  data1 to about 13.5 dB at `alms_out`. The test requires at least 12 dB of
  improvement.

  What remains at the output is LMS misadjustment. The tone is not correlated
  with the reference, but it still disturbs every weight update. A smaller
  `MU` lowers this floor but slows convergence. With `MU` = 512 (1/64) and
  60 000 samples, the output SNR is about 25.5 dB. The default favours fast
  convergence.

To simulate with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/alms_pkg.sv tb/tb_alms_top.sv --top-module tb_alms_top -o sim
./obj_dir/sim
```

Replace `tb_alms_top` with another testbench's name to run that test. The
end-to-end test takes about two seconds.
