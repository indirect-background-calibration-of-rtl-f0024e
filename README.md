# Decision Boundary Gap Estimation: background calibration of a pipelined ADC

A pipelined ADC builds its output code by adding up the decisions of a chain
of stages. Each decision is weighted by a power of two. Capacitor mismatch,
finite op-amp gain, comparator offset and charge injection make the real
weight of a stage differ from the ideal one. At every decision boundary of
that stage, the code then jumps by more (or less) than one step. The result is
a *gap*: a run of missing codes, or an overlap where two input voltages give
the same code. These gaps are the main static non-linearity of a pipelined
ADC.

Decision Boundary Gap Estimation (DBGE) measures each gap from the normal
output stream, with no test signal and no extra analog hardware. Then it
subtracts the gap from every code above the boundary. Samples whose stage
decision is "above" form one set, samples with "below" form the other. The
smallest code of the upper set and the largest of the lower set lie on either
side of the gap. Their difference is the gap plus one code. The input only has
to visit the codes near each boundary now and then. A boundary the input never
reaches causes no error in the output anyway.

This repository holds synthesizable SystemVerilog for the calibrator, plus a
behavioural model of a 13-stage 1.5 bit/stage pipeline converter to drive it.
The default configuration is that converter with a fixed set of stage errors,
of which the 7 most significant stages are calibrated.

## The gap estimator

### Plain min/max estimate

Take one decision boundary. Let `X1` be the raw codes of the samples whose
stage decision is above it, and `X0` those below it. Then:

    e1~ = min X1        e0~ = max X0        gap = e1~ - e0~

This works perfectly without noise. With noise added before quantization, the
edges of the two histograms smear out. Over a long window the minimum of `X1`
drops a couple of codes below the true edge, and the maximum of `X0` rises
above it. So the gap is underestimated, and the longer the window, the worse
this gets (`tb_dbge_fig6` shows the plain estimate 3–4 codes short at 0.5 LSB
of noise).

### Super-bin correction

Near an edge, the histogram of a uniform-ish input rises from zero to its
plateau. Two *super bins* of `s` codes each are counted: one starting at the
extreme (`h_near`) and the next `s` codes (`h_far`). If `h_near` is only a
fraction of `h_far`, the true edge sits that fraction of the way into the
first super bin:

    e1^ = e1~ + s * (1 - h_near1 / h_far1)
    e0^ = e0~ - s * (1 - h_near0 / h_far0)
    gap = e1^ - e0^

The ratio is clipped at 1, so the adjustment is between 0 and `s`. Without
noise the same formula recovers the fractional part of the gap from the
partly filled edge code. `tb_dbge_fig6` checks both cases against a gap of
4.25 codes.

The catch in hardware is that the super bins must sit at the *final* extreme
of the window, which is only known when the window ends. `dbge_superbin`
solves this without storing a full histogram. It keeps `2s` per-code counters
relative to the running extreme. When a new extreme arrives, the counters
shift by the distance it moved. A code pushed out of the range can never
return to it, because the edge only moves outward. The cost is `2s` counters
per edge instead of 2.

Placing the bins at the *previous* window's edge would be cheaper, but it
biases the correction by up to two codes whenever the edge moves between
windows.

### Windows, division and timing

`dbge_boundary_est` counts valid samples. Every `WIN` samples (default
100,000) the window closes:
- the extremes, super-bin counts and tags are latched;
- two serial restoring dividers (`dbge_serial_div`, one quotient bit per
  clock, `F` = 6 fractional bits) form the two ratios;
- the new estimate is published `F+3` = 9 clocks after the window's last
  sample, with a one-clock `update` pulse.

Sampling is never stalled: the next window starts with the very next sample.
If one side saw no sample in a window, the old estimate stays. With
`train_en = 0` the estimate is frozen.

## Chaining calibrated stages

The raw sample is built bottom-up: `x_k = x_(k-1) + D_k * 2^k` (CAT). In
1.5 bit/stage form, `D` is in {0, 1, 2} and the weights overlap.

Each calibrated stage (`dbge_corr_stage`) has one estimator per boundary
(two for 1.5 bit/stage: 0|1 and 1|2). It also subtracts the corrections of
the boundaries its decision lies above (COR).

A subtle point: if the *corrected* sample of stage k fed stage k+1's
estimator, every update of stage k would suddenly shift stage k+1's
statistics partway through a window. So the estimators of every stage see
only the *raw* sample, and the corrected sample is built in a parallel adder
chain. The estimate then has to be referred to the corrected signal.

### Bookkeeping: referring a raw gap to the corrected signal

The raw gap of stage k is measured between two particular samples: the one
that set `min X1` and the one that set `max X0`. In the corrected signal,
those two samples have also had the lower stages' corrections subtracted.
Those corrections depend on the lower stages' decisions, which generally
differ between the two samples. So every edge sample is stored with a *tag*,
the decisions of all calibrated stages below it. The correction subtracted
for boundary b is:

    c_b = g_b - 1 LSB + sum over lower calibrated stages j of
                        [ cor_j(tag0_j) - cor_j(tag1_j) ]
    cor_j(d) = c_lo_j * (d >= 1) + c_hi_j * (d >= 2)

The `-1 LSB` is there because an error-free boundary still shows
`min X1 - max X0 = 1`, and that step must remain.

For a 1 bit/stage pipeline the two edge samples have the lower stages at all
ones and all zeros. The sum is then the running total of the lower
corrections, which is just two adders per stage. The tag form is general
because in a 1.5 bit/stage pipeline the edge samples may have any lower
decisions.

The bookkeeping uses the *current* lower corrections. So a change in a lower
stage is reflected at once, without waiting for the upper stage's next window.

## Blocks

| module | what it does |
|---|---|
| `dbge_pkg` | default sizes, decision type, the converter's error table |
| `dbge_cat` | `x_out = x_in + d << (K+SHIFT)` |
| `dbge_minmax` | window min of the upper set and max of the lower set, with the tag of each |
| `dbge_superbin` | sliding `2s`-code histogram at the running edge, giving `h_near` and `h_far` |
| `dbge_serial_div` | restoring divider, `min(num/den, 1)` with `F` fractional bits, `F+1` clocks |
| `dbge_boundary_est` | one boundary: window control, min/max, super bins, two dividers, super-bin estimate |
| `dbge_cor` | subtracts `c_lo` if `d >= 1` and `c_hi` if `d >= 2` |
| `dbge_corr_stage` | one calibrated stage: raw CAT, estimators, bookkeeping, corrected CAT + COR |
| `dbge_calibrator` | back-end sum plus a chain of `NCORR` calibrated stages, input and output registers |
| `adc_stage` | behavioural 1.5 bit/stage MDAC with mismatch, finite gain, offsets and noise input |
| `adc_pipeline` | behavioural 13-stage converter, one sample per clock, aligned decisions |
| `dbge_adc_top` | converter model followed by the calibrator |

`adc_stage`, `adc_pipeline` and `dbge_adc_top` use `real` ports and are
simulation models. Everything named `dbge_*` except the top is synthesizable.

### Top-level interface and timing

`dbge_adc_top` has the following ports:
- inputs `clk`, `rst_n` (asynchronous, active low), `vin` (real, units of
  Vref, full scale ±1), `sample_en`, `train_en` and `cor_en`;
- outputs `raw_out` (14-bit raw code), `y_out` (signed, 22 bits, 6 fractional
  bits, in codes of the 14-bit scale), `y_valid`, `corr[14]` (current
  corrections, `[2j]` lower and `[2j+1]` upper boundary of calibrated stage j,
  0 being the least significant calibrated stage), `est_update` and
  `all_valid`.

It takes one sample per clock. `y_out` appears 3 clocks after the sampling
edge: one clock in the converter model, one for the calibrator's input
register and one for its output register. With `cor_en = 0`, `y_out` is
`raw_out` shifted left by 6 bits.

Two operating styles:
- **Continuous (default).** Leave `train_en = 1`. The estimates follow
  drift, replaced at each window end.
- **Train, then hold.** Train with `train_en = 1`, then clear it. The same
  data (or new data) is then corrected with fixed estimates.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `NSTAGES` | 13 | pipeline stages; raw code is `NSTAGES+1` bits |
| `NCORR` | 7 | most significant stages that are calibrated |
| `NDEC` | 2 | boundaries per stage (2 = 1.5 bit/stage, 1 = 1 bit/stage) |
| `F` | 6 | fractional bits of estimates and corrected code |
| `WIN` | 100000 | samples per estimation window |
| `SPREAD` | 2 | super-bin width `s` in codes |
| `NOISE_LSB` | 0.22 | converter model: noise per stage, LSB of the 14-bit scale |
| `USE_TABLE` | 1 | converter model: apply the stage error table (0 = ideal) |

Widths follow from these: the raw word is `NSTAGES+NDEC-1` bits, estimates
and corrected words are `W+F+2` signed. Counters are sized by `$clog2(WIN+1)`.

## The converter model

Each stage samples `v = vin + noise`. It compares `v` with `±Vref/4` (both
shifted by the stage's comparator offset) and produces:

    vres = ((1+r)·v - r·(D-1)·Vref) / (1 + (1+r)/A) + Voffset,   r = 1 + mismatch

The default error set gives each of the 13 stages its own capacitor mismatch,
op-amp gain (106 to 499), comparator offset and voltage offset. Noise of 0.22
LSB of the 14-bit scale is added at the input of each stage for each sample.
Referred to the converter input, a later stage's noise is divided by the gain
in front of it, so the total is 0.25 LSB rms.
The stage list is indexed with 0 as the last, least significant stage.

## Results and how far to trust them

`tb_dbge_adc_top` runs the whole design with every parameter at its default
(a few seconds of simulation with verilator). The run:
- trains on two windows of 100,000 Gaussian samples with σ = Vref/5.5;
- freezes the estimates;
- measures linearity over 110,000 uniform samples and ENOB with a full-scale
  sine.

| | raw code | calibrated code |
|---|---|---|
| max deviation from best straight line | 21.5 codes | 2.2 codes (noise included) |
| rms deviation | 7.8 codes | 0.59 codes |
| ENOB, full-scale sine | 9.1 bits | 13.0 bits |

The published results for this error set are about ±20 LSB INL and 9
effective bits raw. Calibrated, they are ±1 LSB INL and 13.5 effective bits.
The raw figures here agree. The calibrated code comes within half a bit.

The figure that matters most for the calibrated result is the spread `s`:

| `s` | 1 | 2 (default) | 3 | 4 |
|---|---|---|---|---|
| calibrated ENOB (bits) | 13.3 | 13.0 | 12.5–13.1 | 12.5 |

Two limits bound `s`:
- **Noise.** The super bins must be wide enough to contain the edge smeared by
  noise. The total noise here is 0.25 LSB rms.
- **The stage below.** The `2s` codes beside an edge of stage k must not reach
  the nearest decision boundary of stage k−1. That boundary sits only about
  `2^(k-3)` codes from the edge, and its raw gap is not yet removed in the raw
  sample. For the lowest calibrated stage (k = 6) this leaves 8 codes.

The same limit stops calibration from paying off further down the pipeline.
With `s` = 2, calibrating 8, 9 or 10 stages gives 13.1–13.2 bits. 11 and 12
stages give 12.7 and 12.2 bits, because the stages at k = 2 and 1 have almost
no room for their super bins. With `s` = 4, even 10 stages drop to 11.4 bits.

Other checks:
- `tb_dbge_calibrator`: an 8-stage converter with 3 calibrated stages and
  larger errors, modelled inside the testbench. It checks linearity, the raw
  code and the 2-clock latency.
- `tb_dbge_calibrator` also changes two stages' errors mid-run. The old
  estimates then leave about 6 codes of error, and three more training
  windows bring it back under one code.
- `tb_dbge_calibrator_1bps`: the 1 bit/stage form (`NDEC` = 1) on a converter
  whose three calibrated stages have a gain below 2.
- `tb_dbge_fig6`: a single boundary with a 4.25-code gap, with and without
  0.5 LSB noise.
- Every block has its own self-checking testbench against an independent
  reference model in the testbench.

### Departures and choices of this design

- Window length, spread `s` = 2, `F` = 6 fractional bits, the clipping of the
  super-bin ratio at 1, and keeping the old estimate when a side is empty are
  this design's choices.
- The bookkeeping formula above is derived here from the structure of the
  chain. It reduces to a running sum for 1 bit/stage stages.
- The super bins follow the running edge with `2s` counters per edge, rather
  than two registers per edge.
- The subtracted amount is gap − 1 LSB, so that an error-free boundary is left
  alone.
- The converter model's circuit equations (flip-around MDAC, finite-gain
  factor, thresholds at ±Vref/4) are standard textbook forms chosen here.
- Stages are 1 bit (`NDEC` = 1) or 1.5 bit (`NDEC` = 2). Multi-bit stages
  with more than two decision boundaries per stage are not supported.
- Latencies (3 clocks end to end, estimates `F+3` clocks after a window
  closes) are this design's own.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. The
package must be read first. For example, the full-size run:

    verilator --binary --timing -Wno-fatal -Irtl -Itb \
        rtl/dbge_pkg.sv tb/tb_dbge_adc_top.sv --top-module tb_dbge_adc_top
    ./obj_dir/Vtb_dbge_adc_top

Any other testbench works the same way (`tb/tb_<module>.sv`). Module files
are found through `-Irtl`, one module per file named after the module.

Lint reports a few warnings that are intentional:
- The pipeline model leaves the last stage's residue unconnected.
- The package defines default constants that not every file uses.
- The assertion `disable iff (!rst_n)` mixes the asynchronous reset into
  checker logic.
