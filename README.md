# Fault-tolerant adaptive feed-forward equalizer

A receiver's adaptive equalizer is sized for the worst channel it may ever
see, so on a typical channel it has margin to spare. This design turns that
margin into tolerance of permanent hardware faults. The 20-tap LMS
feed-forward equalizer (FFE) is built as two 10-tap halves. When one half
develops a stuck-at fault, the equalizer notices that its error has stopped
behaving and switches that half off. It then retrains and keeps working as a
10-tap equalizer with a small loss in SNR. If both halves fail, it raises
`fail`. The extra logic is a multiplexer, two small counters and a 4-state
controller, which is tiny next to the filter.

## The equalizer

Each sample `x[n]` enters a delay line. The output is
`y[n] = sum h_k x[n-k]`, and a slicer decides the symbol `d[n]`, which is +1
or -1 (one bit per symbol). The slicer error is `e[n] = y[n] - r[n]`. The
reference `r[n]` is the decision `d[n]` in normal operation. During training
it is a known training symbol `t[n]`.

Every coefficient has its own adaptation logic. It keeps a 30-bit
accumulator and applies the LMS rule `acc <- acc - alpha * e[n] * x[n-k]`.
The coefficient the filter uses is the top 10 bits of that accumulator.
`alpha` is 2^-12 during training and 2^-16 in steady state. Both are powers
of two, so the multiply by `alpha` is an arithmetic shift.

Number formats (two's complement):

| signal | bits | format | meaning |
|---|---|---|---|
| `x_in` | 8 | Q2.6 | received sample, range [-2, 2) |
| coefficient | 10 | Q2.8 | top bits of a 30-bit accumulator (28 fraction bits) |
| sub-FFE output `y1`, `y2` | 22 | 14 fraction bits | full-precision sum of 10 products |
| `y` | 23 | 14 fraction bits | `y1 + y2`, `y1` or `y2` |
| `e` | 24 | 14 fraction bits | the symbol levels +1 and -1 are +/-16384 |

These formats set the accumulator shift to `alpha_exp + 2*6 - 20`, which is
4 in training and 8 in steady state. The accumulator saturates instead of
wrapping.

## Splitting the filter

`sub_ffe` is one 10-tap block: a delay line, ten `coef_adapt` instances,
ten multipliers and an adder chain. There are two of them, FFE_1 and FFE_2,
and three configurations (`ffe_cfg_e`):

| configuration | FFE_2 delay-line input (`input_switch`) | slicer uses | adapting |
|---|---|---|---|
| `CFG_BOTH` | last register of FFE_1 | `y1 + y2` | both |
| `CFG_FIRST` | (don't care) | `y1` | FFE_1 |
| `CFG_SECOND` | `x[n]` directly | `y2` | FFE_2 |

In `CFG_BOTH`, FFE_2's delay line continues FFE_1's, so FFE_2's tap k holds
`x[n-10-k]`. The pair is then exactly a 20-tap filter. In `CFG_SECOND`,
FFE_2 sees `x[n]` itself and takes over the first 10 tap positions. So the
main tap sits at the same position in every configuration, and the training
alignment does not change. A disabled block keeps its coefficients frozen
and its output is left out of the sum.

## Telling a permanent fault from a passing disturbance

Deciding when to reconfigure is the part that needs the most care. In
steady state `|e|` is small. Many things can push it over the failure
threshold:

- channel noise;
- a soft error in a multiplier or adder, which lasts one sample;
- a soft error in a delay-line register, which lasts at most 20 samples;
- a soft error in a coefficient register, which LMS at `alpha = 2^-16`
  takes tens of thousands of samples to adapt away;
- a permanent fault, which never goes away.

Only the last one should cause a reconfiguration. `failure_counter`
therefore measures how long the disturbance lasts, not how large it is:

1. The first sample with `|e| > P_THRESH` starts the failure counter. From
   then on it counts every cycle, whatever `e` does.
2. A second counter counts consecutive samples with `|e| <= P_THRESH`. When
   it reaches `P_QUIET_CYCLES` (64), the disturbance is over and both
   counters are cleared and stopped.
3. If the failure counter reaches `P_FAIL_LIMIT` (2^17 = 131072) first, the
   error has lasted longer than any retraining could take. `fail_detect` is
   pulsed.

A faulty block does not give a large error on every sample. A stuck bit
only shows when the true value of that bit differs. The failure counter
therefore keeps running through short quiet stretches, and only a long
quiet run stops it. Detection is switched off during training, when large
errors are normal.

The threshold matters. The rule used is "a little more than twice the
steady-state error level". With these word widths, coefficient quantisation
alone leaves a peak error of about 0.007 to 0.009 on a mild channel, so the
default is 320/16384 = 0.0195. A system whose error settles more slowly
must set a higher threshold. An example is a long low-pass channel at
`alpha = 2^-16`, where the error takes hundreds of thousands of samples to
settle. Otherwise the slow convergence looks like a fault.
`tb_ffe_workloads` uses 0.25 for such a channel.

## Recuperation sequence

`ctrl_unit` advances one step on each `fail_detect` (`ctrl_state_e`):

```
ST_NORMAL (CFG_BOTH) --fail_detect--> ST_TRY1 (CFG_FIRST)
ST_TRY1              --fail_detect--> ST_TRY2 (CFG_SECOND)
ST_TRY2              --fail_detect--> ST_FAILED (CFG_SECOND, fail = 1)
```

On the moves into `ST_TRY1` and `ST_TRY2` the controller does two things.
It restarts `adapt_counter`, so the remaining block gets a new
35000-sample training phase at the high `alpha` against `t[n]`. It also
clears the failure counter. If the remaining block is healthy, its error
falls below the threshold and it stays in that state. If it is not, the next
detection moves on. `ST_FAILED` is final until reset. The equalizer keeps
running on FFE_2 and `fail` stays high. A reset always starts again with
all 20 taps. That gives a fault that has since disappeared (for example, a
long supply disturbance) a chance to prove itself gone.

On a healthy start the timeline is as follows. Training lasts 35000
samples. A fault in FFE_2 is detected 131073 samples after it first shows.
Then FFE_1 retrains alone. A fault in FFE_1 takes one more detection,
another 35000 + 131072 samples, before FFE_2 takes over.

## Partial triple modular redundancy

A fault in the small control part (slicer, input switch, counters,
controller) could still defeat the scheme. With `PARTIAL_TMR = 1`, that
part is built as three independent lanes. Each lane has its own slicer,
switch, adaptation counter, failure counter and controller. Every signal
that leaves the control part is majority-voted by `tmr_voter`: FFE_2's
input, `e`, `y`, the decision, the configuration, the adaptation enables,
training, state and fail. The two sub-FFEs are not triplicated. The
default, `PARTIAL_TMR = 0`, is the plain design.

## Interface and timing (`ffe_ft_top`)

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | one sample per clock; asynchronous active-low reset |
| `x_in` | in | 8 | received sample, Q2.6 |
| `t_sym` | in | 1 | training symbol (1 = +1); must be valid while `training` is high |
| `d_sym` | out | 1 | decision |
| `e` | out | 24 | slicer error |
| `y` | out | 23 | equalizer output |
| `training` | out | 1 | training phase (high `alpha`, reference = `t_sym`) |
| `cfg`, `state` | out | 2 | configuration and recuperation state |
| `fail` | out | 1 | unrecoverable failure |

There is no valid/ready handshake. `x_in` is registered into the delay line
on each rising edge. `y`, `d_sym` and `e` are combinational from the
registers and belong to that sample, so the latency is one cycle. The
adaptation step uses the error of the same cycle. If `t_sym` is the
transmitted symbol delayed by D samples, the equalizer converges with its
main tap at position D. D must be below 10 so that either half can carry
the main tap alone.

Parameters of `ffe_ft_top`: `PARTIAL_TMR`, `P_FAIL_THRESH`,
`P_QUIET_CYCLES`, `P_FAIL_LIMIT` and `P_ADAPT_CYCLES`. Word widths, tap
counts and `alpha` values are in `ffe_pkg`.

## Files

| file | content |
|---|---|
| `rtl/ffe_pkg.sv` | formats, sizes, `alpha`, detection constants, enums |
| `rtl/ffe_ft_top.sv` | the equalizer |
| `rtl/sub_ffe.sv` | one 10-tap block |
| `rtl/coef_adapt.sv` | LMS adaptation of one coefficient |
| `rtl/slicer.sv` | configuration-dependent sum, decision, error |
| `rtl/input_switch.sv` | FFE_2 input multiplexer |
| `rtl/adapt_counter.sv` | training-phase timer |
| `rtl/failure_counter.sv` | permanent-fault detector |
| `rtl/ctrl_unit.sv` | recuperation controller |
| `rtl/tmr_voter.sv` | 2-of-3 voter for the TMR variant |

## Verification

Every module has a self-checking testbench in `tb/` that compares it
against values computed in the testbench:

- `tb_coef_adapt` and `tb_sub_ffe` keep a 64-bit reference model of the
  accumulators, including saturation.
- `tb_failure_counter` runs directed cases plus a random run against a
  cycle model.

The system-level testbenches all use the default sizes:

- **`tb_ffe_ft_top`** uses the channel `1 + 0.25 z^-1`. It checks:
  start-up convergence (main tap 256 = 1.0, next tap -64 = -0.25, no
  decision errors, error under the threshold); that a 200-sample
  disturbance is rejected; that an FFE_2 fault leads to FFE_1-only
  operation; that an FFE_1 fault leads to FFE_2-only operation; and that
  faults in both halves raise `fail`. It also checks that detection takes
  at least `FAIL_LIMIT` cycles and counts every mechanism. About 0.8 M
  cycles, about a second.
- **`tb_ffe_workloads`** uses a long low-pass channel
  `0.75 * [1, 0.5, 0.25, 0.15, 0.1, 0.08, 0.06, 0.03, 0.01]` with the
  threshold raised to 0.25. It checks that one-sample delay-line upsets and
  coefficient-bit upsets are not treated as permanent. It also measures the
  converged SNR (noise-free): 40.1 dB with 20 taps and 38.2 dB with 10 taps,
  a loss of 1.9 dB. The published evaluation of the scheme (27.5 dB
  against 24.9 dB) used a different channel with noise.
- **`tb_ffe_ft_top_tmr`** uses `PARTIAL_TMR = 1`. It holds one lane's
  slicer error stuck at a large value, so that lane alone walks through
  every recuperation step to FAILED. It checks that the voted outputs stay
  at 20 taps with error-free decisions meanwhile. It then checks that an
  FFE_2 fault is still handled by the two healthy lanes.

Faults are injected by forcing a bit of a sub-FFE output (stuck-at) or by
flipping a register for one cycle. With plain Verilator:

```
verilator --binary --timing --assert -Irtl rtl/ffe_pkg.sv rtl/*.sv \
          tb/tb_ffe_ft_top.sv --top-module tb_ffe_ft_top
./obj_dir/Vtb_ffe_ft_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`. With
`--assert`, concurrent assertions in `ctrl_unit` (the state only moves on a
detection and FAILED is final) and `failure_counter` (a detection is a
one-cycle pulse, only while enabled) are checked too.

## Where the design goes beyond a published description

The following are choices of this design, not fixed by the scheme itself:

- The binary points of all signals.
- Reset of all registers to zero.
- Saturation of the accumulators.
- The sign convention `h <- h - alpha e x`, which pairs with `e = y - d`.
- A tie `y = 0` is decided as +1.
- The quiet count of 64 samples.
- The detection limit of 2^17. The only requirement is that it exceeds
  the worst-case adaptation time.
- A training length of 35000 samples, typical of the start-up of this
  equalizer.
- The threshold value of 0.0195, explained above.
- Retraining with the training sequence after each reconfiguration. This
  assumes the link partner can send the training sequence again.
- Continuing on FFE_2 after `fail`.
- An input register in front of the first tap.
- Where the voters sit in the TMR variant.

Both SNR values from `tb_ffe_workloads` are higher than the published
27.5 / 24.9 dB, and the gap between them is smaller (1.9 dB against
2.55 dB). The test channel is noise-free and only an approximation of a
typical cable response. With a channel this long, the slow steady-state
`alpha` needs about 1.5 M samples to converge fully.

Not included: the unprotected 20-tap equalizer and a fully triplicated one,
which serve only as area references for the scheme, and the suggested
extensions to more than two blocks or to a spare block.

## Reference

The technique is that of P. Reviriego, S. Liu and J. A. Maestro,
"Mitigation of permanent faults in adaptive equalizers". This RTL is an
independent implementation of it.

