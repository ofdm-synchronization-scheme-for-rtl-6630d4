# Burst synchroniser for OFDM power-line modems

A power-line modem receives its data in OFDM bursts. Each burst starts with
a known preamble. Before any burst can be demodulated, the receiver must
answer three questions from the preamble alone:

* Is there a burst at all? Noise and other modems' data must not trigger it.
* Where exactly does each OFDM symbol start? The answer must be correct to
  the sample.
* How far apart are the transmitter and receiver oscillators? The offset
  turns every sample a little further than the one before.

This RTL answers all three with one small block, here called the HSM
("Hypersynch Module"), in three steps:

1. **Coarse timing.** A cheap auto-correlation on the first preamble section
   finds the burst to within a few samples.
2. **Fine timing.** A bank of nine matched filters on the second section fixes
   the timing exactly.
3. **Frequency.** A delayed self-correlation on the same second section gives
   the frequency offset. The module then removes that offset from every
   following sample.

The method follows a published synchronisation scheme for power-line OFDM,
built for a single-chip modem and first prototyped on an FPGA. Where that
description stops, the RTL makes its own choices. Each choice is named below
and in the header comment of the file concerned.

## The preamble

```
 | A | A | A | A | A | -A |   B   |   B   |   B   |   B   |   C ...
   16  16  16  16  16  16     32      32      32      32
 |<----- section A ------>|<---------- section B ---------->|<- section C
```

* **Section A** repeats a 16-sample field five times, then sends it once
  inverted.
* **Section B** repeats a 32-sample field four times.
* **Section C** follows. It is meant for channel estimation, which is not part
  of this block.

The scheme does not say what the fields contain. Here both are QPSK
sequences (±4096 ± j4096) whose signs come from a 16-bit LFSR
(x^16+x^14+x^13+x^11+1), with seed `0xACE1` for A and `0x1D2F` for B. They
are defined by `a_field()` and `b_field()` in `rtl/hsm_pkg.sv`. To use
another preamble, change these two functions. The B field also fills the
matched filters' coefficient memory.

## Data path

```
 in_s ──► delay_line ──┬─ r(n), r(n-D) ──► autocorr_a ──► peak_search ──► fsm_sincro
          (D = 16 / 32)│                    │ conj. product              │ t0, b_go
                       │                    └────────────► freq_est ◄────┤
                       ├─ r(n) ─────────────────────────► fine_timing ◄──┘
                       │                                    │ b_start → out_sof position
                       └─ r(n) ──► freq_corrector ◄── dphi ─┘(freq_est)
                                       │
                                       └──► out_s, out_sof
```

Every sample is numbered from reset (32-bit, wrapping). All positions passed
between blocks, such as the peak, t0 and b_start, are these numbers. That
way, idle clocks between samples (`in_valid` low) never disturb timing.

### Sharing between the two sections

Coarse timing (section A) and fine timing (section B) never run at the same
time, and the design uses that:

* **One sample memory.** `delay_line` is a single 32-entry memory. It returns
  each sample together with the one 16 samples older during the search, and
  32 samples older during section B.
* **One conjugate multiplier.** With the delay at 32, the auto-correlator's
  first stage computes r(n)·r*(n-32). That is exactly the product the
  frequency estimator needs, so `freq_est` has no multiplier of its own.

The three fine-timing multipliers, the squarers and the window adders are not
shared. Sharing them would save area but not change behaviour.

## Coarse timing: auto-correlation and peak search

`autocorr_a` computes two sums over a 64-sample window:

* X(i) = Σ r(k)·r*(k-16)
* Y(i) = Σ |r(k)|²

The detection metric is R = |X|/Y. In the repeated A fields, R approaches 1.
In random data it stays near 1/√64.

Square roots and dividers are avoided:

* **Squared quantities.** The threshold R ≥ 0.55 is tested as
  |X|²·1024 ≥ 310·Y² (310/1024 ≈ 0.55²). Multiplying by a constant costs only
  shifts and adds. The test is also gated by an energy floor, Y ≥ `MIN_E`,
  so that silence (X = Y = 0) does not pass as a preamble.
* **Power-of-two division.** The value handed to the maximum search is
  |X|²·1024 / 2^(2e), where 2^e is Y rounded down to a power of two (its
  leading one). The division is therefore a right shift. The result is R² in
  1024ths: exactly 1024 for a noise-free preamble, and up to 4× too high in
  general.

**Why the exponent is frozen.** If e were chosen anew for every sample, the
metric would jump by a factor of 4 whenever Y crosses a power of two. Y sits
near such a boundary for long stretches, so this would wreck the maximum
search. Instead, `peak_search` raises `hold_e` from the first metric above the
threshold until it decides, and the exponent stays frozen meanwhile. Over the
peak the metric is then simply |X|² scaled by a constant.

**Where the peak falls.** The products keep adding up until the window holds
exactly the last four A fields paired with the ones before them. That happens
on the last sample of the fifth A field. The next sample pairs -A with A, and
|X| starts falling by two products per sample. This gives a sharp,
single-sample peak.

**When the search ends.** This is the tightest timing in the design:

* The threshold alone is not crossed until about 15 samples after the peak.
  That is too late, because fine timing needs its first sample at t0 + 4,
  which is peak + 21.
* A fixed hold-off ("8 samples without a new maximum") fails too: in noise the
  rising edge has flat stretches that long.
* What works: the search ends when the metric falls below half of its
  maximum, about 10 samples after the peak, or below the threshold, whichever
  comes first.

With samples arriving on every clock, the decision then reaches `fsm_sincro`
about 17 samples after the peak, a few samples of margin. The controller sets
t0 = peak + 17, the expected first sample of section B.

## Fine timing: nine matched filters from three multipliers

The coarse t0 can be off by up to ±4 samples. Hypothesis h (h = 0…8) assumes
section B really starts at t0 + e, with e = h − 4. Its matched filter is:

    acc[h] = Σ r(n) · conj(c[(n − t0 − e) mod 32]),   32 consecutive n

Here c is the B field. Because section B repeats the same 32 samples, any 32
consecutive samples inside it give the same ideal result for a hypothesis.
So the hypotheses can be spread out in time instead of run side by side:

| window m | samples (relative to t0) | multiplier 0 | multiplier 1 | multiplier 2 |
|---|---|---|---|---|
| 0 | 4 … 35  | h = 0 | h = 1 | h = 2 |
| 1 | 36 … 67 | h = 3 | h = 4 | h = 5 |
| 2 | 68 … 99 | h = 6 | h = 7 | h = 8 |

Three complex multiply-accumulates per sample thus cover nine filters. A full
32-tap correlator would need 32 per sample. The windows start at t0 + 4, so
that for every true offset in ±4 they lie inside section B.

After the last window, a serial comparator reads the nine accumulators, one
per clock. It keeps the largest |acc|², again with no square root. The
result is `fine_offset` = h − 4 and `b_start` = t0 + offset. Section C then
starts at `b_start` + 128, and that sample is flagged with `out_sof` on the
output stream.

## Frequency estimation and correction

`freq_est` sums the 96 products r(n)·r*(n−32) for n = t0+32 … t0+127. These
are all the pairs whose delayed sample already lies in section B, up to the
end of section B. A frequency offset of Δω rad/sample turns every product by
32·Δω, so Δω = angle(Y)/32.

* **The angle.** `cordic_vec` computes it: an iterative CORDIC with 18
  micro-rotations. It first normalises the input so that small sums keep
  their precision.
* **The /32.** This is an arithmetic shift.
* **Range.** The estimate is unambiguous for |Δω| < π/32 rad/sample, about
  1.6 % of the sample rate.

Angles use a binary format: 2^20 units per full turn, signed, so wrap-around
is free. `dphi` is the phase step per sample in that format.

`freq_corrector` removes the offset from every sample:

* A phase accumulator (NCO) adds `dphi` for each sample.
* A 16-stage pipelined CORDIC turns the phase into cos/sin.
* A complex multiplier forms r(n)·e^(−jφ(n)), rounded and saturated to
  16 bits.

The correction starts, at phase 0, as soon as the estimate is known. This is
shortly after section C begins. The remaining constant phase is left to the
channel estimator. `restart` switches the correction off.

## Sequencing

`fsm_sincro` runs four phases:

| phase | what happens | left when |
|---|---|---|
| BLANK | the 64-sample windows refill after reset or restart | 80 samples have entered |
| SEARCH | delay 16, peak search armed | the peak is found; t0 is loaded and fine timing and frequency estimation start |
| SECB | delay 32, both section-B blocks running | both have reported |
| LOCK | `locked` high | `restart` |

A `restart` in any phase returns the controller to BLANK and clears the
windows.

## Interface of `hsm_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `restart` | in | 1 | one clock: drop the lock and search for the next burst |
| `in_valid`, `in_s` | in | 1, 2×16 | sample strobe (at most one sample per clock) and sample (`cplx_t`: signed `re`, `im`) |
| `out_valid`, `out_s` | out | 1, 2×16 | frequency-corrected samples, 19 clocks after input, same order |
| `out_sof` | out | 1 | with the output sample that is the first of section C |
| `detect` | out | 1 | pulse: preamble found |
| `coarse_idx`, `coarse_metric` | out | 32, 16 | index of the auto-correlation peak and its metric (1024 = perfect); valid the clock after `detect` |
| `fine_done` | out | 1 | pulse: `fine_offset` (−4…+4) and `b_start` (index of the first sample of section B) valid |
| `freq_valid`, `dphi` | out | 1, 20 | frequency estimate known; phase step per sample (2^20 per turn) |
| `locked`, `searching` | out | 1 | controller phase |

The input level is expected to be set beforehand by an automatic gain control
outside this block. With the default `MIN_E` (2^24 over the 64-sample
window), the RMS amplitude per rail must be at least about 360 LSB for
detection to be possible.

## Parameters

The shared constants live in `hsm_pkg`:

* **From the scheme:** delay 16, window 64, delay 32, 96 products, nine
  hypotheses, three multipliers, threshold 0.55, and the preamble layout.
* **Own choices:** the 16-bit sample width, the 20-bit angle format and the
  preamble amplitude.

Module parameters with a default include:

* `moving_sum`: `W`
* `autocorr_a`: `MIN_E`
* `peak_search`: `DROP`
* `cordic_vec`: `ITER`
* `freq_corrector`: `NS`
* `fsm_sincro`: `BLANK`

The fine-timing schedule assumes B_LEN is a power of two and that N_HYP is a
multiple of N_MULT. Elaboration-time assertions check both.

## Verification

Each block has a self-checking testbench in `tb/`. Each one ends with a
`TB_RESULT checks=N failures=M` line and has a watchdog. Expected values are
computed in the testbench, in real or 64-bit arithmetic, from the stimulus.
`tb/tb_chan_pkg.sv` builds bursts and applies a frequency offset and noise.

| testbench | what it shows |
|---|---|
| `tb_hsm_top` | six bursts at default sizes, each with its own offset up to 0.8·π/32, 20 dB SNR, and section B shifted −4…+4 against section A. Three bursts arrive with idle clocks. Checks per burst: one detection; the peak within ±1 sample of the end of the A fields; the exact start of section B; the offset; the frequency estimate to 2·10⁻³ rad/sample; the section-C marker; no phase drift left after correction. It counts detections, non-zero fine corrections, frequency corrections, restarts and input stalls, and fails if any of them never happened. |
| `tb_autocorr_a` | metric, threshold, exponent freeze, shared product and the 4-clock latency, all against a reference model |
| `tb_peak_search` | ramp with a flat stretch, end by half-drop, end by threshold, disarmed input, a second peak, `hold_e`, and `found` one clock after the deciding metric |
| `tb_fine_timing` | every offset −4…+4, twice each, with noise and a small frequency offset; `done` within N_HYP + 4 clocks of the last sample used |
| `tb_freq_est` | offsets across ±0.95·π/32, noise-free (to 2·10⁻⁵ rad/sample) and with noise (to 10⁻³) |
| `tb_cordic_vec`, `tb_freq_corrector`, `tb_delay_line`, `tb_moving_sum`, `tb_fsm_sincro` | the building blocks against direct models |

To run one with Verilator 5, from the top directory:

```
verilator --binary --timing -y rtl -y tb +libext+.sv \
    rtl/hsm_pkg.sv tb/tb_chan_pkg.sv tb/tb_hsm_top.sv --top-module tb_hsm_top
./obj_dir/Vtb_hsm_top
```

Replace `tb_hsm_top` with any other testbench name. Every testbench finishes
within seconds.

## What follows the scheme and what is added

The scheme fixes the structure:

* the preamble layout;
* delay 16 with a 64-sample window and threshold 0.55 for section A;
* nine matched filters from three complex multipliers for a ±4 sample
  coarse error;
* delay 32 over 96 products for the frequency estimate, run in parallel with
  fine timing;
* correction by a complex multiplication per sample;
* squared quantities instead of square roots, and power-of-two coding
  instead of division;
* one memory and the multipliers shared between sections A and B.

The following are this design's own choices or readings:

* **Preamble contents.** The QPSK/LFSR fields.
* **Word widths and number formats.** All of them, including the binary
  angle format.
* **How the power-of-two normalisation works.** The leading-one exponent,
  its freeze during the peak, and the exact squared threshold test that
  sits beside it.
* **The search end rule and the energy floor.**
* **The fine-timing schedule.** Three hypotheses per 32-sample window,
  windows from t0 + 4.
* **The angle extraction.** A CORDIC; the scheme only says that the angle of
  the sum is proportional to the offset.
* **The sin/cos generator and phase accumulator.**
* **The controller, its blanking period and the `restart` input.**
* **Sums, not averages.** The 96 products are summed, not averaged. The
  angle is the same.
* **Sign of the correction.** The scheme writes the correction as a
  multiplication by e^(+jΔω·n). Here Δω is the measured rotation of the
  received signal, so the correction multiplies by e^(−jΔω·n). This is the
  same operation under the opposite sign convention.
* **Shared memory size.** The scheme's block diagrams show separate memories
  for sections A and B. As the scheme intends for the final chip, this RTL
  uses one.

Not included: the gain control ahead of the block (assumed external), the
channel estimation on section C, and the rest of the OFDM receiver.

## How far to trust it

* **What is verified.** Everything above has been simulated, with the
  end-to-end test at the default sizes. Timing closure, area and FPGA
  resource use have not been checked against a 33 MHz target.
* **What is not tested.** Detection probability against SNR, false-alarm
  rate, and multipath channels.
* **The half-drop end rule depends on the preamble.** It relies on the −A
  field to make the peak sharp. A preamble without the inverted field would
  need a different end condition.
* **The search decision runs close to its deadline.** With samples on every
  clock it leaves only a few samples of margin before section B must be
  processed. Adding pipeline stages to `autocorr_a` or `peak_search` eats into
  this margin.
* **Frequency estimation starts from the coarse t0,** as in the scheme, where
  it runs in parallel with fine timing. With a coarse error of ±4, four of its
  96 products reach outside section B, which slightly degrades the estimate.
* **Fine timing must tolerate the frequency offset.** Its windows are 32
  samples long and run before the correction, so a large offset (near π/32)
  lowers the matched-filter peak. In the tests it was still found reliably.
* **Full word widths are kept throughout** (33-bit products, 39-bit sums,
  79-bit squares). A real implementation would truncate them. That would not
  change the structure.

## Files

`rtl/`, one module or package per file:

* `hsm_pkg`
* `delay_line`
* `moving_sum`
* `autocorr_a`
* `peak_search`
* `fine_timing`
* `freq_est`
* `cordic_vec`
* `freq_corrector`
* `fsm_sincro`
* `hsm_top`

`tb/`: the testbenches listed above and `tb_chan_pkg`.
