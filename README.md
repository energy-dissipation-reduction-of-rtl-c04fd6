# Wavelet R-wave detector with a folded GLRT

This is synthesizable SystemVerilog for a cardiac event (R-wave / QRS)
detector of the kind used in an implantable pacemaker. The detector takes one
electrogram sample per millisecond. For each sample it outputs a decision
signal T(n), which is large when the recent samples look like a heartbeat.

The detector is meant for sub-threshold supply voltages. There, leakage
rather than switching sets the energy per sample, so the design saves energy
by saving gates. The detector has two parts:

* a small **wavelet filterbank** that stays fully parallel;
* a **generalized likelihood ratio test (GLRT)** that is *folded*: one
  multiplier and a few adders are reused over six clock cycles per sample.
  The six-fold version (FOLD = 6) is the default. Folding by 3 and the
  unfolded version (FOLD = 1) are parameter settings.

The cost of folding is a GLRT clock FOLD times the sample rate: 6 kHz for the
default, given 1 kHz samples. A few cycles are also added to the latency.

```
 x(n) ──► wavelet filterbank ──y1..y6──► column multiplier ──products──► folding unit ──► T(n)
  8 b     q = 2, 3, 4 (parallel)         (constant shift-add,            (6/FOLD lanes,
          biphasic + monophasic           holds products)                 1 multiplier per lane,
                                                   ▲                      accumulator)
                                                   └──── fold controller ──────┘
```

## The wavelet filterbank

The filterbank is undecimated: it works at the full sample rate and computes
each scale from the one before (Mallat's algorithm). It has three branches,
with scale factors q = 2, 3, 4. Branch k (module `wavelet_scale`) does three
things:

1. **Low-pass:** F(z) = (1 + z^-(q-1))^3, a third-order binomial spread out
   to the scale. Its output feeds the next branch, so the low-pass filters of
   successive branches multiply together.
2. **Biphasic band-pass:** G_b(z) = -1 + z^-q, applied to the low-pass
   output. This is a difference over q samples, which gives a response with
   two lobes of opposite sign.
3. **Monophasic band-pass:** the same G_b(z) applied once more to the
   biphasic output. The response has one dominant lobe with small side lobes.

The low-pass pairs its symmetric taps: F = (x0 + x3d) + 3·(xd + x2d), with
d = q-1. The factor 3 is a shift plus an add. A branch therefore needs six
adders (four for F, one for each G_b), and the filterbank needs 18. Together
with the 17 adders of the unfolded GLRT, that gives the 35 adders quoted for
the unfolded design. With FOLD = 6 the total is 21, which also matches the
published figure.

**Centring.** The six responses have different lengths. Each output is
therefore delayed so that all six are centred on the longest response, the
monophasic output of q = 4. An output of span s (length − 1) gets
floor((26 − s)/2) extra samples of delay:

| output | y1 | y2 | y3 | y4 | y5 | y6 |
|---|---|---|---|---|---|---|
| shape, q | biphasic 2 | biphasic 3 | biphasic 4 | monophasic 2 | monophasic 3 | monophasic 4 |
| span s | 5 | 12 | 22 | 7 | 15 | 26 |
| extra delay | 10 | 7 | 2 | 9 | 5 | 0 |

The biphasic responses are antisymmetric over an odd span, so their centres
fall half a sample before the others.

`wavelet_filterbank` registers the six outputs one cycle after `x_valid`.
Folding the filterbank was judged not worth it: its control and register
overhead would cost more than the adders it saves.

## The GLRT as a quadratic form

The filterbank outputs are the projections Hᵀx of the signal onto the six
wavelet shapes. The test statistic is

    T(n) = yᵀ C y,   C = (HᵀH)⁻¹

C is symmetric and block-diagonal: the biphasic and monophasic triples do not
interact. Its entries are rounded to integers (half away from zero):

    biphasic block            monophasic block
    [ 4 -3  1]                [ 5 -2  1]
    [-3  5 -2]                [-2  4 -1]
    [ 1 -2  2]                [ 1 -1  2]

The rounded matrix is still positive definite, so T ≥ 0. Because the
coefficients are small integers, multiplying by them takes only shifts and
adds. The only true (generic) multiplications are y_i · s_i, where
s_i = Σ_j c_ji y_j is the column sum for column i:

    T = Σ_i y_i · s_i

Computed in parallel, this takes six generic multipliers, 12 adders for the
column sums and 5 adders to sum the six products.

## Folding the GLRT

This is the core of the design. The GLRT is split into three blocks.

* **Column multiplier (`column_multiplier`).** When `y_valid` arrives, it
  forms all 18 constant products c_ji·y_j at once (three per column) and
  registers them together with y. It is not folded, because its
  multiplications are cheap shift-adds. It holds the products for the FOLD
  cycles the folding unit needs.
* **Fold controller (`fold_controller`).** This is a two-state FSM (IDLE, RUN)
  with a step counter. A start pulse launches a pass of FOLD steps. The
  controller outputs the step number, plus `first` and `last` flags for the
  first and last steps.
* **Folding unit (`folding_unit`).** It has 6/FOLD lanes. In step k, lane m
  handles column i = k·(6/FOLD) + m. Multiplexers route that column's three
  products and y_i into the lane. Two adders form s_i, and the lane's generic
  multiplier forms y_i·s_i. The lane results are added together and
  accumulated. `first` restarts the accumulator. At `last` the total is
  written to `t` and `t_valid` pulses.

Schedule for the default FOLD = 6, with one lane:

| cycle after `x_valid` | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|---|
| activity | filterbank | CM loads | col 1 | col 2 | col 3 | col 4 | col 5 | col 6 | `t_valid` |

With FOLD = 3 there are two lanes, which take columns (1,2), (3,4), (5,6).
With FOLD = 1, six lanes handle all columns in one cycle.

**Throughput.** A new sample may arrive in the last step of the previous
pass. The column multiplier reloads at the end of that cycle, and the
controller goes straight into the next pass. The design therefore sustains
one sample every FOLD cycles. A sample that arrives earlier is a protocol
error, and an assertion in `fold_controller` reports it.

**Hardware per configuration**, counting GLRT arithmetic only:

| FOLD | generic multipliers | GLRT adders | whole design adders |
|---|---|---|---|
| 1 | 6 | 17 | 35 |
| 3 | 2 | 6 (4 column, 1 lane sum, 1 accumulate) | 24 |
| 6 (default) | 1 | 3 (2 column, 1 accumulate) | 21 |

Published cost figures for the original design are 35 / 25 / 21 adders and
6 / 2 / 1 multipliers. The FOLD = 3 version here saves one more adder than
that. The muxes and the controller are the overhead that folding adds.

## Interface of `cardiac_event_detector`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | GLRT clock, FOLD × sample rate (6 kHz for 1 kHz samples) |
| `rst_n` | in | 1 | asynchronous, active low; clears all filter history to zero |
| `x_valid` | in | 1 | one-cycle pulse; at most one every FOLD cycles |
| `x` | in | `IN_W` = 8 | signed electrogram sample |
| `t_valid` | out | 1 | one-cycle pulse, FOLD + 2 cycles after `x_valid` |
| `t` | out | 2·(IN_W+11)+7 = 45 | T(n), signed (never negative); held until the next result |

The filterbank runs on the same clock as the GLRT. `x_valid` acts as the
filterbank's sample-rate enable, in place of a separate slow clock.

The end-to-end delay from an R peak to the peak of T is about 13 samples. This
is the centring delay of the filterbank.

**Word widths.** Every width is full precision, computed from `IN_W` by the
functions in `detector_pkg`, so nothing can overflow:

* low-pass outputs grow by 3 bits per branch;
* each G_b stage adds 1 bit;
* the six y are sign-extended to 19 bits;
* column sums are 23 bits;
* T is 45 bits.

A smaller implementation would trim these widths to the range of real
signals. That saving is not made here.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `IN_W` | 8 | top and all datapath blocks | input sample width (the original gives none; 8 is a choice) |
| `FOLD` | 6 | top, `glrt_folded`, `fold_controller`, `folding_unit` | folding factor; must divide 6 (1, 2, 3, 6) |

The number of scales (3), the scale factors (2, 3, 4) and the integer matrix
are constants in `detector_pkg`.

## What is interpreted, and what is left out

The following points are choices or readings of this implementation, not
taken as given from the original:

* **Low-pass form.** The low-pass is read as the binomial
  (1 + z^-(q-1))^3 for every scale. For q = 2 this is the ordinary
  (1 + z^-1)^3.
* **Monophasic outputs.** They are built by a second G_b(z) on the biphasic
  output of the same scale.
* **Centring delays.** The amounts are the rounding rule in the table above.
* **Output order.** y1..y3 are biphasic and y4..y6 monophasic.
* **Coefficient rounding.** Entries are rounded half away from zero, so
  4.5 → 5 and 1.5 → 2.
* **Clocking and control.** This covers:
  * the single clock with a sample enable;
  * the valid-pulse handshake;
  * the asynchronous reset;
  * the controller's FSM;
  * the order in which columns are visited.
* **Word widths.** All widths are full precision, as above.

Not in the RTL:

* **The ADC** that delivers x(n). Its samples enter through `x` / `x_valid`.
* **The threshold comparison** that turns T(n) into a detected event. The
  testbench does this step, and the RTL leaves it to the user of `t`.
* **Sub-threshold operation.** Supply voltage selection, energy modelling
  and power gating are implementation and characterisation steps, not logic.

## Files

`rtl/`:

| file | contents |
|---|---|
| `detector_pkg.sv` | constants, integer matrix, width and delay functions |
| `sample_delay.sv` | tapped delay line, advanced per sample |
| `wavelet_scale.sv` | one filterbank branch |
| `wavelet_filterbank.sv` | three branches and the output registers |
| `column_multiplier.sv` | constant products, held |
| `fold_controller.sv` | pass and step sequencing |
| `folding_unit.sv` | muxes, lanes, multipliers, accumulator |
| `glrt_folded.sv` | the three GLRT blocks together |
| `cardiac_event_detector.sv` | top |

`tb/`:

* **`tb_ref_pkg.sv`** is the reference model, written independently of the
  RTL structure. It builds the six impulse responses by polynomial
  multiplication and convolves them with the input history. It computes
  yᵀCy from the real matrix, rounded. It also generates a synthetic
  electrogram: Q/R/S Gaussian lobes, a T wave, baseline wander and noise.
* **One testbench per block.** Each compares every output with the
  reference, checks latency and hold behaviour, and exercises extreme values.
  The GLRT, controller and folding-unit tests run FOLD = 6, 3, 2 and 1.
* **`tb_cardiac_event_detector.sv`** runs the top at its default parameters
  on 12 synthetic beats, which is 9300 samples. It checks:
  * every T(n) and its FOLD + 2 latency;
  * samples arriving both at the full rate and after gaps;
  * that all six fold steps are used;
  * event decisions against a threshold of half the smallest R-peak T, scored
    with a ±50 ms window. All 12 beats are found with no false alarm.
* **`tb_detector_configs.sv`** runs the whole detector with FOLD = 3 and
  FOLD = 1.

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

## Simulating

Use Verilator 5. From the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/detector_pkg.sv tb/tb_ref_pkg.sv tb/tb_cardiac_event_detector.sv \
  --top-module tb_cardiac_event_detector -o sim
./obj_dir/sim
```

For another test, replace the testbench file and the top-module name. Every
test finishes in seconds.

## Trust

* Every module lints cleanly with `verilator -Wall`, apart from notes about
  the ports of zero-length delay lines and about the reset also disabling the
  controller's assertion.
  It also elaborates in a second, independent SystemVerilog front end.
* The testbenches agree bit for bit with the reference model.
* Each testbench was also run against a copy of its block with one
  deliberate bug, and each caught the bug.

The reference model encodes the same readings listed above, such as the form
of the monophasic outputs and the centring rule. Where those readings differ
from the original detector, the RTL and the model will agree with each other
and both differ from it. Detection quality has only been shown on synthetic
signals, not on recorded electrograms.
