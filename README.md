# DVB-S2 frame and frequency synchronizer with a shared autocorrelator

A DVB-S2 receiver must find the start of each physical-layer frame and
remove the carrier frequency offset. It has to do this at very low SNR
(down to about −2.35 dB) and with offsets up to 20 % of the symbol rate
(5 MHz at 25 Mbaud). Two good algorithms for these jobs are:

* **D-GPDI** (differential generalized post-detection integration) for the
  start of frame (SOF);
* **Mengali & Morelli (M&M)** for the frequency.

Both need the same quantity: correlations of the received SOF symbols,
derotated by the known SOF, taken at different symbol distances ("spans").
This design computes those correlations once, in a **common autocorrelator**,
and gives them to both synchronizers, which run in parallel. The frequency
estimate feeds a compensator at the input, so every frame is seen with less
offset than the frame before. Because the metric is differential, the SOF
is found even before any offset has been removed.

The RTL follows the architecture of *Low Complexity Synchronizer Using
Common Autocorrelator for DVB-S2 System*. That publication gives the
algorithms, the block partitioning and the sharing idea. It does not give
word widths, interfaces, the compensator or SNR estimator internals, or the
detection rule. Those are this implementation's choices, listed in
[Departures and own choices](#departures-and-own-choices).

## Signal flow

```
 in_i/in_q ──► freq_compensator ──► out_i/out_q (compensated symbols)
 (symbols)     (NCO + CORDIC)   │
                 ▲              ▼
                 │     common_autocorrelator ── R(1), R(2) every symbol
                 │              │
                 │      ┌───────┴────────────┐
                 │      ▼                    ▼
                 │ frame_synchronizer ──sof──► frequency_synchronizer
                 │  |R1|+|R2| > thr     R(1),R(2) of (M&M, CORDIC)
                 │      ▲  │          the SOF window     │
                 │      │  └─sof,metric──► snr_estimator │
                 │      └────threshold───────┘           │
                 └──────────── freq_est ─────────────────┘
```

The input is one complex symbol per `in_valid`. It comes from a matched
filter and symbol-timing recovery, which are not part of this design. All
blocks run at the symbol rate, one symbol per clock at most. Gaps in
`in_valid` are allowed; there is no back-pressure.

| File | Role |
|---|---|
| `rtl/dvbs2_sync_pkg.sv` | SOF pattern, widths, CORDIC table, SOF weight and M&M weight functions |
| `rtl/dvbs2_synchronizer.sv` | top level: the loop above |
| `rtl/freq_compensator.sv` | NCO and derotator; accumulates the frequency estimates |
| `rtl/cordic_rotator.sv` | pipelined rotation CORDIC (used by the compensator) |
| `rtl/common_autocorrelator.sv` | span-1 and span-2 SOF autocorrelations for every window |
| `rtl/frame_synchronizer.sv` | SOF detection |
| `rtl/frequency_synchronizer.sv` | M&M estimator |
| `rtl/cordic_vectoring.sv` | iterative arctangent CORDIC (used by the M&M estimator) |
| `rtl/snr_estimator.sv` | power, signal and noise estimates; detection threshold |

## The common autocorrelator

This block is the heart of the design, and the least obvious part.

**SOF symbols.** The DVB-S2 SOF has 26 π/2-BPSK symbols carrying the bits
`0x18D2E82`, sent MSB first. Symbol *i* is

  c_i = s_i · (1+j)/√2 · j^(i mod 2),  s_i = 1 − 2·b_i,

so it is a whole number of quarter turns of (1+j)/√2. The quarter-turn index
is q_i = (i mod 2) + 2·b_i.

**What both synchronizers need.** Take a 26-symbol window that ends at
symbol *m*. Strip the SOF from it: x_i = r_(m−25+i) · c_i\*. Then form the
span-k correlation

  R(k) = Σ_{i=k}^{25} x_i · x_(i−k)\*

* The frame synchronizer uses |R(1)| and |R(2)|. These are the 1-span and
  2-span DPDI terms of D-GPDI (coherent length 1, 26 terms).
* The M&M estimator uses the arguments of R(1) and R(2).

**Computing R(k) directly is costly.** The derotation x_i depends on where
the window sits. A direct circuit would need 26 complex multipliers per
window position, plus one product per term.

**The trick: split each term in two.**

  x_i · x_(i−k)\* = [ r_(m−25+i) · r_(m−25+i−k)\* ] · [ c_i\* · c_(i−k) ]

* The first factor, d_k = r_n · r_(n−k)\*, belongs to the received stream
  only. It does not depend on the window. It is computed **once per
  symbol**, with one complex multiplier per span (two in total), and then
  shifted down a delay line.
* The second factor is a constant of the SOF. It is always j^(q_(i−k) − q_i),
  which is one of +1, +j, −1 or −j. Applying it takes a swap and a negation,
  that is a multiplexer, not a multiplier. The weights are computed at
  elaboration time by `span_coef()` in the package.

**What this costs.** For span 1 there are 25 weighted taps; for span 2 there
are 24. Each span has its own adder tree. In total: two complex multipliers
(four real products each) and 24 + 23 = 47 complex additions in the trees.
The output is registered.

For comparison, the published architecture counts 2 multipliers and 78
adders for its common autocorrelator. A direct implementation needs 104
multipliers, and all of D-GPDI needs about 1,455 multipliers. This design
matches the published multiplier count. Its adder count is of the same
order, but it was counted differently (complex additions, not LUT-level
adders).

**Timing.** A symbol taken at clock edge *n* gives the R values of the window
ending at that symbol after edge *n*+2, with `out_valid` high. This repeats
for every symbol. `out_valid` stays low until 26 symbols have been seen.

**Widths.** Symbols are 10-bit. Products d_k are 21 bits. Sums R(k) are
26 bits. Nothing wraps at full scale.

## SOF detection

For each window, the metric is

  Λ(m) = |R(1)| + |R(2)|

This is D-GPDI (2·Σ_n |R(n)|) cut down to its first two spans, with the
factor 2 dropped. A frequency offset ω turns R(k) by k·ω but does not change
its size. So Λ at the SOF is about 49·S (S = signal power per symbol)
whatever the offset is.

The magnitudes use |z| ≈ max(|re|,|im|) + 3/8·min(|re|,|im|), which
overestimates by 0 to 6.8 %.

A SOF is declared at window *m*−1 when all of these hold:

* the detector is enabled;
* Λ(m−1) > threshold;
* Λ(m−1) ≥ Λ(m−2) and Λ(m−1) > Λ(m), that is, a local peak.

So `sof` pulses one symbol after the window that holds the SOF: at the clock
after the next `corr_valid`. Together with it, the block latches that
window's R(1), R(2) and Λ for the frequency synchronizer and the SNR
estimator.

## Frequency estimation (Mengali & Morelli)

The 26 SOF symbols serve as the pilot block (L_p = 26), with M = 2
correlation spans:

  ŵ = l_1 · arg R(1) + l_2 · arg{R(2) R(1)\*}

The weights follow the M&M formula:

  l_k = 3[(L_p−k)(L_p−k+1) − M(L_p−M)] / [M(4M² − 6M·L_p + 3L_p² − 1)]

which gives l_1 = 0.5217 and l_2 = 0.4783. The weights are stored in Q1.15
and computed at elaboration time by `mm_weight_q15()`.

Two simplifications of the M&M form:

* Its first term is arg{R(1) R(0)\*}. R(0) is real and positive, so that
  term is simply arg R(1).
* M&M divides each R(k) by (L_p − k). That scaling does not change any
  argument, so it is left out.

ŵ is the phase advance per symbol (2π·f·T_s). It is handled as a 16-bit
fraction of a turn, which is exactly the unit the NCO uses. To avoid a
complex multiply, arg{R(2)R(1)\*} is computed as arg R(2) − arg R(1);
two's-complement wrap-around does the modulo-2π for free. One iterative
vectoring CORDIC (15 iterations) computes both arguments in turn, and one
constant multiplier accumulates the weighted terms.

From `sof` to `freq_est_valid` takes NS·(ITERS+3)+1 = 37 clocks. A `sof` that
arrives while an estimate is in progress is ignored.

With two spans the estimate is unambiguous for |f·T_s| < 0.25. That covers
the 20 % requirement.

## Frequency compensation loop

`freq_compensator` holds a 24-bit frequency word and a phase accumulator.
The phase advances by the word on every symbol. Each symbol is multiplied by
e^(−jθ) in a 14-stage pipelined CORDIC. The CORDIC gain is removed with
shifts and adds (×0.6074), and the result is saturated to 10 bits. Latency
is 16 clocks.

Each new estimate is **added** to the frequency word, scaled by
2^−LOOP_SHIFT (LOOP_SHIFT = 0 by default). The estimator always sees
compensated symbols, so it measures only the residual, and the loop
converges. The first detected SOF, taken at the full offset, corrects most
of it. Later frames only trim what is left.

## SNR estimation and the adaptive threshold

The detection threshold follows the noise power:

* Total power P is the mean |r|² over blocks of 256 compensated symbols.
* Signal power S comes from each detected SOF: S ≈ Λ_SOF/49. It is
  implemented as Λ·20/1024, which also removes the 4 % mean bias of the
  magnitude estimate. S is smoothed from frame to frame with a gain of 1/8.
* Noise power is N = max(P − S, 0).
* threshold = 34·P + 6·N, in metric units.

Before the first detection, S = 0 and N = P, so the threshold starts at its
most cautious value. Detection is disabled until the first power block is
complete. The weights 34 and 6 come from a floating-point model of the
metric:

* at 10 dB and above, a SOF gives about 49–54·S;
* data windows stay below about 30·S.

## Number formats

| Quantity | Format |
|---|---|
| symbols `in_*`, `out_*` | signed 10-bit |
| R(k) | signed 26-bit, same scale as \|r\|² |
| metric, threshold | unsigned 27 / 30 bits, \|r\|² units |
| `freq_est` | signed 16-bit, turns/symbol × 2¹⁶ |
| `freq_word` | signed 24-bit, turns/symbol × 2²⁴ |
| powers | unsigned 20-bit, \|r\|² units |

## Departures and own choices

These follow the publication:

* the sharing of one autocorrelator by the frame and frequency
  synchronizers;
* coherent length 1 and 26 SOF symbols;
* the use of only the 1-span and 2-span DPDI terms;
* multiplexers in place of multipliers for the SOF weights;
* the M&M estimator on the SOF;
* a threshold driven by an SNR estimator;
* a compensator that keeps removing the offset.

These are this implementation's choices:

* the factorisation r_n r_(n−k)\* × SOF weight used to get down to two
  multipliers;
* all word widths, reset (asynchronous, active-low) and the valid-only
  interface;
* M = 2 for M&M, matching the two spans;
* the (L_p − k) form of the M&M weight numerator, whose weights sum to one;
* the max + 3/8 min magnitude and the local-peak detection rule;
* the NCO + CORDIC compensator with the "add every estimate" update;
* the whole SNR estimator and the threshold formula;
* the SOF bit pattern, taken from the DVB-S2 standard.

## Limits to be aware of

* **Low-SNR detection.** With the default threshold, a single 26-symbol
  window does not detect SOFs reliably at −2.35 dB with a 20 % offset.
  - On average the SOF still stands out: simulated SOF windows average
    about 52·S and other windows about 24·S.
  - But the largest of the ~690 other windows in a frame is comparable with
    the SOF window.
  - The threshold, about 100·S there, lies above both.

  The design detects reliably at roughly 12 dB and above. The publication
  claims low-SNR operation, but it does not give its detection rule.
  Lowering THR_P/THR_N trades missed SOFs for false alarms.
* **SOF look-alikes.** The metric only looks at symbol-to-symbol phase
  steps, so it cannot tell the SOF from a stretch of π/2-BPSK whose bits
  match the SOF with every other symbol inverted. That stretch is
  indistinguishable from a SOF arriving at half a turn per symbol of
  offset. In a random header, such a stretch turns up now and then, even at
  high SNR, and causes a false alarm. Its frequency estimate is wrong. The
  next true SOF corrects the loop.
* **No frame flywheel.** The detector does not use the known frame length.
  A false alarm at low SNR is passed to the frequency loop. With
  LOOP_SHIFT = 0, one false estimate can throw the loop off until the next
  good SOF. A larger LOOP_SHIFT makes the loop more robust but slower.
* **No PLS-code use.** Only the SOF is used. The 64-symbol PLS code that
  follows it is not correlated.
* **Untested on a device.** Resource and timing figures on an FPGA have not
  been checked against the publication's results.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_common_autocorrelator` | every window against R(k) recomputed by direct complex arithmetic with the SOF from its definition; random gaps; full-scale inputs; latency |
| `tb_frame_synchronizer` | a cycle-level reference of the peak/threshold rule on random R streams with peaks, plateaus, sub-threshold peaks, threshold changes and a disabled period |
| `tb_frequency_synchronizer` | 65 estimates against the floating-point M&M formula (±3 LSB), including wrap-around and left half-plane cases; latency 37; a sof while busy is ignored |
| `tb_freq_compensator` | every output against r·e^(−jθ) in floating point (≤ 2 LSB), accumulation of two estimates, latency 16 |
| `tb_snr_estimator` | P, S, N and threshold exactly against the stated rules over several power blocks and SOFs |
| `tb_dvbs2_synchronizer` | end to end at default parameters, described below |
| `tb_sync_convergence` | loop acquisition at ±20 % offset, described below |
| `tb_sync_low_snr` | metric statistics at −2.35 dB and 20 % offset, described below |

`tb_dvbs2_synchronizer` runs 16 frames. Each frame is a SOF, a 64-symbol
π/2-BPSK header and 600 QPSK symbols, with noise and random input gaps. The
offset starts at +0.2 turn/symbol and later jumps to 0.05, while the noise
rises from about 16 dB to 12 dB SNR. The test checks that:

* every SOF after the first power block is found at its exact window, and
  nothing else is found;
* the frequency word settles within 0.008 turn/symbol of the true offset;
* the threshold equals 34·P + 6·N and rises with the noise.

It also counts the SOF detections, the frequency updates and the input gaps.
With the default random seed it passes. Over 30 seeds, two runs had a
statistical false alarm or a wide estimate at the 12 dB point.

`tb_sync_convergence` also runs at default parameters. It performs two
acquisitions, at +0.2 and at −0.2 turn/symbol, which is 5 MHz at 25 Mbaud.
Each has seven frames at about 14 dB SNR, and the synchronizer is reset
between them. The test checks that:

* each SOF after the first power block is found;
* from the fourth estimate on, the residual offset is below
  0.004 turn/symbol (100 kHz at 25 Mbaud);
* at every SOF, the SOF window's metric is more than 1.3 times the largest
  other window of the frame.

It classifies each detection as a true SOF or a false alarm. It allows at
most one false alarm per acquisition, and does not check the estimate taken
at a false alarm.

Typical results:

* residuals of 3–35 kHz after four frames;
* peak ratios of 1.6–2.1;
* a false alarm in about one run in seven, always a header look-alike.

`tb_sync_low_snr` runs 12 frames at −2.35 dB SNR and +0.2 turn/symbol.
Because it knows where each SOF is, it can put every window into one of two
groups: SOF windows and other windows. It checks that:

* the mean SOF-window metric is more than 1.1 times the mean of the other
  windows (typically 2.0–2.7 times);
* the mean SOF-window metric is near 49·S;
* the power estimate is within 20 % of S + N;
* the threshold follows 34·P + 6·N.

It reports detections but does not check them; see the limits above.

To run a testbench with plain Verilator from the repository root:

```
verilator --binary --timing -Irtl -Itb -y rtl --top-module tb_dvbs2_synchronizer \
    rtl/dvbs2_sync_pkg.sv tb/tb_dvbs2_synchronizer.sv -o sim
./obj_dir/sim
```

Use `tb_<block>` and its file for the other testbenches. The package must
come first on the command line. Any module in `rtl/` can be linted on its
own with `verilator --lint-only -Wall -Irtl -y rtl rtl/dvbs2_sync_pkg.sv
rtl/<module>.sv`.

## Parameters of the top level

| Parameter | Default | Meaning |
|---|---|---|
| `W` | 10 | symbol I/Q width |
| `LOOP_SHIFT` | 0 | frequency update gain 2^−LOOP_SHIFT |
| `AVG_LOG2` | 8 | power block length 2^AVG_LOG2 symbols |
| `THR_P`, `THR_N` | 34, 6 | threshold = THR_P·P + THR_N·N |

The SOF length (26) and the number of spans (2) are constants in
`dvbs2_sync_pkg`. The autocorrelator and the M&M estimator are written for
any number of spans. The frame synchronizer uses spans 1 and 2.
