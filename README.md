# Spread-spectrum clock generator with built-in jitter and modulation-profile measurement

A spread-spectrum clock (SSC) deliberately sweeps its frequency: here the 1.2 GHz clock goes
down by up to 0.5 % (5000 ppm) and back, along a triangle repeated at about 30 kHz. That
lowers its peak emission. It also makes the clock's phase drift by many unit intervals (UI) over
each sweep. That drift is intended, so a jitter histogram taken the usual way is flat and says
nothing about the clock's real timing jitter.

This design measures the jitter anyway, on chip, using only the reference clock. The PLL's VCO
already has ten evenly spaced phases. Ten flip-flops clocked by the 20 MHz reference sample them
and tell, to 0.1 UI, where in its cycle the VCO was at each reference edge. The change in that
position from one edge to the next is the phase shift. Summing the shifts gives the absolute
phase of the SSC, sampled at 20 MHz. Two filters then split that phase:

* a **low-pass** filter keeps the slow, intended drift. Its derivative is the frequency profile:
  the sweep depth and the modulation frequency.
* a **high-pass** filter keeps the fast part. That part is the jitter, plus the detector's own
  quantisation noise, which is known and is subtracted.

The repository holds the digital logic of both halves as SystemVerilog:

* the spread-spectrum clock generator (SSCG): profile generator, sigma-delta modulator,
  clock-MUX control and feedback divider;
* the built-in self test (BIST): phase detector, accumulator, filters, and the statistics and
  power spectrum that turn the filter outputs into numbers.

The analog PLL parts (phase-frequency detector, charge pump, loop filter, ring VCO) are not
included. The glitch-free clock MUX comes as a behavioural model.

## How the clock is spread: fractional division by phase selection

The PLL compares a 20 MHz reference with the VCO output divided by 60. The divider does not
count the VCO directly. It counts the output of a 10:1 clock MUX that picks one of the VCO's ten
phases, and each phase lies 0.1 UI after the previous one. If the MUX steps to the phase 0.1 UI
*earlier*, one feedback period is cut short by 0.1 UI. The loop answers by slowing the VCO until
60 feedback cycles again last exactly one reference period. Steps of s × 0.1 UI per reference
period therefore lower the VCO frequency by s × 0.1 / 60. Three steps per reference period give
0.3 / 60 = 0.5 %, the full 5000 ppm.

One step per reference period is not enough for that, so the step source runs at three times
the reference rate. The divider gives a tick every 20 MUX-clock cycles, which is 60 MHz. On each
tick three things happen:

1. `tri_profile` moves a 10-bit triangle one count up or down. A full triangle is 2048 ticks,
   60 MHz / 2048 = 29.3 kHz. Level 1023 means the full spread, and 0 means none.
2. `mash111_sdm`, a third-order MASH 1-1-1 modulator, turns that fraction into an integer
   stream in -3..+4 whose mean equals the fraction. Its quantisation noise is pushed to high
   frequencies by (1 − z⁻¹)³, where the PLL filters it out.
3. `mux_ctrl` moves the selected phase by that integer, modulo 10. A positive value moves the
   selection to an earlier phase, which spreads downwards.

The three values of one reference period add up to the phase step that the PLL sees, y[k];
`mux_ctrl` outputs this sum as `ref_sum`. With `ssc_en` low the triangle is held at 0. The
modulator then outputs only zeros and the clock is an ordinary integer-N clock (non-SSC mode).

## Reading the phase with the reference clock: the multiphase phase detector

This is the part of the design worth understanding in detail.

**Sampling.** Phase j (j = 0..9) is a copy of the VCO clock delayed by j × 0.1 UI. At any
moment the five phases that rose in the last half period are high, and the other five are low.
So the ten flip-flops (`mpd_sampler`) always capture a *circular thermometer code*: five
adjacent ones, five adjacent zeros.

**Encoding.** The phase that rose last is the one whose bit is 1 while the next bit (j+1,
modulo 10) is 0. `mpd_encoder` outputs that j, which is the VCO's position within its cycle
rounded down to 0.1 UI. An all-ones or all-zeros code (impossible with a running VCO) is flagged
invalid. If a bubble gives two transitions, the lower index is taken.

**Shift.** `phase_shift_detector` subtracts the previous index and folds the difference into
-5..+4. The fold is what makes the scheme work even though the VCO makes 60 full cycles
between reference edges. Only the fractional part of the phase is visible, and the fold assumes
that it moved by less than half a UI per reference period. The nominal maximum is 0.3 UI at full
spread, and jitter adds a little. A deeper spread or a slower reference would break this; the
cure is a faster reference.

Example: phase 5 is seen at one edge and phase 7 at the next, a shift of +0.2 UI. Phase 0 after
phase 7 is +0.3 UI, across the wrap.

**Accumulation.** `phase_accumulator` sums the shifts. The sum is the SSC's phase relative to
an ideal 1.2 GHz clock, in units of 0.1 UI (83.3 ps). Without jitter it is the time integral of
the triangular frequency profile, a series of parabolic arcs that fall by about 0.15 UI per
reference period on average. `mpd` wraps these four stages. Each stage is registered: a
reference edge appears on `shift` three clocks later and on the accumulated phase four clocks
later, at one sample per reference clock.

The detector's resolution is its weakness. Every sample carries a rounding error of up to
0.1 UI. Treated as white noise, this error has a power of Δ²/12 = 1/12 LSB², spread evenly from
0 to 10 MHz, and the jitter path removes it.

## From phase to numbers

All filter arithmetic uses signed 48-bit samples with 16 fraction bits, in units of 0.1 UI.
The accumulated phase enters with its fraction bits at zero. Filters are cascades of
direct-form-I biquads (`iir_sos`, `iir_cascade`) with Q4.28 coefficients. The coefficients are
listed in `ssc_pkg`. They are Butterworth designs for fs = 20 MHz, obtained by the bilinear
transform, with each section scaled to unit passband gain:

| Filter | Order | Corner | Purpose |
|---|---|---|---|
| `LPF500K` | 5 | 500 kHz | keeps the 29.3 kHz drift and its harmonics: the modulation profile |
| `HPF500K` | 5 | 500 kHz | removes the drift (the residue is about 0.003 UI RMS): jitter |
| `HPF3M6`  | 3 | 3.6 MHz | 6 Gb/s ÷ 1667, the corner of the SATA jitter definition |

**Jitter** (`jitter_stats`, one per high-pass). After `meas_start`, the unit takes a record of
10⁴ samples. For each sample it:

* rounds the sample down to 8 fraction bits;
* adds its square to a sum;
* counts it in one of 32 histogram bins. Each bin is 1/8 LSB (0.0125 UI) wide, and the bins
  are centred on zero.

At the end, a bit-serial divider forms the mean square. The mean square is the integral of
the jitter's power spectrum over ±10 MHz. The unit then subtracts the part of it that is
quantisation noise:

    EH_VAR = (1/12) · Σ h[n]²   (h = impulse response of the high-pass)

The noise gain Σ h[n]² is 0.9492 for the 500 kHz filter and 0.6350 for the 3.6 MHz filter, so
EH_VAR is 5184/65536 and 3468/65536 LSB². What remains is the jitter variance. A bit-serial
square root gives the RMS value:

* `jit_var`: LSB² with 16 fraction bits; it can be negative when the jitter is below the
  quantisation floor;
* `jit_rms`: LSB with 8 fraction bits; multiply by 0.1 to get UI.

The results are ready about 90 clocks after the last sample.

**Jitter spectrum** (`psd_dft`, on the 500 kHz high-pass). The histogram and the RMS value
say how much jitter there is. The spectrum says where it sits in frequency. For example, it
shows the peak that the PLL's loop response puts near its natural frequency. After
`meas_start` the unit stores the first 1024 samples of the record, again at 8 fraction bits.
It then evaluates one DFT bin at a time with the Goertzel recursion:

    s[n] = x[n] + c·s[n−1] − s[n−2],   c = 2·cos(2πk/1024)
    |X_k|² = s[1023]² + s[1022]² − c·s[1023]·s[1022]

A bin takes 1026 clocks. All 513 bins, from 0 to 10 MHz in steps of 19.5 kHz, take about
26 ms. The unit needs no cosine table. The next coefficient comes from the previous two by the
Chebyshev recurrence c(k+1) = c(1)·c(k) − c(k−1), in Q40. The recursion also keeps 8 guard
fraction bits, so its own rounding stays far below the quantisation of the samples.

Each bin streams out as `psd_bin` / `psd_pow` with `psd_valid`. The power is |X_k|²/1024²,
in LSB² with 32 fraction bits. Bin 0 plus twice bins 1 to 511 plus bin 512 is exactly the
mean square of the 1024 samples, which ties the spectrum to the RMS value.

**Modulation profile** (`profile_extract`). The first difference of the low-pass output,
`freq_dev`, is the clock's frequency offset. One unit is 0.1 UI per 50 ns, which is 2 MHz at
1.2 GHz. After `meas_start` the unit works in three windows:

1. it skips 256 samples while the filters settle;
2. it takes the minimum and maximum of `freq_dev` over 2048 samples, giving `dev_pp`, the
   sweep depth;
3. for 4096 more samples it times upward crossings of the mid level, with a hysteresis of a
   quarter of `dev_pp`. This gives `period_sum` / `period_cnt`, the modulation period in
   reference periods.

The modulation frequency is 20 MHz / (`period_sum` / `period_cnt`), and the deviation is
`dev_pp` × 2 MHz.

## Module map

```
ssc_bist_top
├── fb_divider          ÷60 for the phase detector, 60 MHz tick        (clock: mux_clk)
├── tri_profile         29.3 kHz triangle, 10 bits                     (mux_clk, tick)
├── mash111_sdm         MASH 1-1-1, output -3..+4                      (mux_clk, tick)
├── mux_ctrl            phase selection, ref_sum                       (mux_clk, tick)
├── clk_phase_mux       behavioural glitch-free 10:1 clock MUX
├── mpd                 multiphase phase detector                      (clock: clk_ref)
│   ├── mpd_sampler, mpd_encoder, phase_shift_detector, phase_accumulator
├── iir_cascade ×3      LPF 500 kHz, HPF 500 kHz, HPF 3.6 MHz          (clk_ref)
│   └── iir_sos
├── jitter_stats ×2     one per high-pass                              (clk_ref)
├── psd_dft             1024-point spectrum of the 500 kHz high-pass   (clk_ref)
└── profile_extract                                                    (clk_ref)
ssc_pkg                 constants, sample and coefficient types, filter coefficients
```

There are two clock domains, and no data crosses between them inside the design:

* The SSCG logic runs on the MUX output, 1.2 GHz, with a 60 MHz enable.
* The BIST runs on the reference, which the description also names as the BIST clock.

The VCO phases enter the BIST only through the sampling flip-flops. `rst_n` is an asynchronous
active-low reset for both domains.

Top-level ports:

* Inputs: `clk_ref`, `rst_n`, `ssc_en` (1 = spread), `vco_ph[9:0]` (from the VCO),
  `mpd_clear` (restart the accumulator) and `meas_start` (start one record).
* To the analog PLL: `div_clk` goes to the phase-frequency detector. `mux_clk` is the MUX
  output.
* Observation ports: every intermediate signal (profile, SDM output, selection, detected
  phase, shift, accumulated phase, filter outputs) and the results of the four measurement
  units.

## Simulating

Each testbench in `tb/` checks itself. It prints `TB_RESULT checks=N failures=M` and stops on a
watchdog if something hangs. With Verilator 5 (the 1 ns / 1 ps timescale matters, because the
VCO model works in nanoseconds):

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/ssc_pkg.sv tb/tb_ssc_bist_top.sv --top-module tb_ssc_bist_top -o sim
    ./obj_dir/sim

`tb_ssc_bist_top` runs the whole design at its default parameters. The PLL around the digital
logic is behavioural:

* `tb/vco10_model.sv` is a ten-phase VCO with random-walk jitter.
* At every reference edge the testbench sets the VCO's frequency to 20 MHz × (60 − 0.1 ×
  ybar). Here ybar is `ref_sum` passed through a first-order low-pass, which stands in for the
  PLL's loop response.

The run goes through these stages:

1. 600 reference periods in non-SSC mode;
2. the switch to SSC mode;
3. a settling time;
4. one record of 10⁴ samples;
5. the spectrum. While it is computed, the VCO model is stopped to save simulation time, since
   the spectrum works on stored samples.

It takes about 10 s and checks the following:

* the divider keeps pace with the reference: 11291 edges each;
* every one of the ~11 000 accumulated-phase samples equals the VCO model's true phase,
  counted in 0.1 UI steps;
* the non-SSC mode does not spread;
* the measured sweep is 2.92 steps (5.84 MHz; the target is 6 MHz);
* the measured modulation frequency is 29.27 kHz (the target is 29.3 kHz);
* the mean squares of both high-pass outputs match a double-precision computation;
* the spectrum has 513 bins. Their sum equals the mean square of the same 1024 samples. The
  power per bin below 250 kHz is far below that above 1 MHz, as expected from the high-pass;
* the mechanisms of the design each occur: mode switch, negative modulator outputs, MUX
  moves both ways, phase-index wraps.

The measured sweep is a little under the full 3 steps because the 500 kHz low-pass and the loop
response round the corners of the triangle.

### How well the jitter measurement works

`tb/tb_jitter_workloads.sv` repeats the measurement at three jitter levels: 0.0034, 0.0042 and
0.0298 UI RMS in the 3.6 MHz band. These are the jitter levels
predicted from non-SSC measurements for a PLL with natural frequencies of 0.4, 0.9 and 2.2 MHz. White timing jitter is put on the reference edges. The
truth is taken from the VCO model's exact, unquantised phase, passed through double-precision
copies of the two high-pass filters.

| Case | True, 3.6 MHz HPF | BIST, 3.6 MHz | True, 500 kHz HPF | BIST, 500 kHz |
|---|---|---|---|---|
| low    | 0.00598 UI | 0.00547 UI | 0.01297 UI | 0.01250 UI |
| medium | 0.00648 UI | 0.00664 UI | 0.01342 UI | 0.01367 UI |
| high   | 0.02987 UI | 0.02969 UI | 0.03789 UI | 0.03789 UI |

The true values exceed the injected jitter. The extra part is real jitter: the modulator's
0.1 UI phase steps, smoothed by the loop, leave a residue on the VCO. That residue is strongest
below 3.6 MHz, so the 500 kHz band carries much more of it. Even at 0.006 UI, well below the
quantisation noise the detector adds (about 0.023 UI after the 3.6 MHz filter), the BIST stays
within about 0.0005 UI of the truth. That shows the quantisation-noise subtraction working.
Phase mismatch between real VCO phases is not modelled, and on silicon it adds a floor of its
own.

The same run checks the spectrum in three bands. In each band, the design's PSD must equal
two parts: the true signal's power from a direct DFT, plus the expected quantisation noise,
Δ²/12 shaped by the filter. The tolerance allows for the randomness of a single periodogram.
For the low case, in LSB²:

| Band | Design | True | Quantisation |
|---|---|---|---|
| 0.5–1 MHz  | 0.0079 | 0.0053 | 0.0039 |
| 1–3.6 MHz  | 0.0303 | 0.0082 | 0.0217 |
| 3.6–10 MHz | 0.0543 | 0.0039 | 0.0534 |

At this level the spectrum above a few MHz is mostly detector quantisation noise. A single
PSD cannot separate it from jitter there. The subtraction in `jitter_stats` can, because it
works on the variance, where the noise's expected value is known.

The block testbenches check each module against an independent model:

* an integer MASH 1-1-1 model;
* modulo-10 selection arithmetic;
* the exact integer sums, root and histogram of a record;
* the ideal Butterworth magnitude at 50 kHz to 3.6 MHz for each filter;
* a direct double-precision DFT for every bin of the spectrum.

They also check the latency of each stage.

To change the design:

* Widths and sizes are parameters with the values above as defaults.
* For new filter corners, compute new second-order sections. The formula is in the `ssc_pkg`
  header comment. Update the `EH_VAR_*` constants with the new noise gains Σ h².
* The record length is `N_SAMPLES`. The histogram counters are 16 bits wide, so keep it
  below 65536.
* The spectrum length is `NPSD`, a power of two. Computing the spectrum takes
  (NPSD/2 + 1)·(NPSD + 2) clocks.

## Where this RTL departs from, or adds to, the design it follows

The design description fixes the architecture and these numbers:

* 20 MHz reference, ÷60, ten phases, 0.1 UI steps;
* MASH 1-1-1 at 60 MHz, and three modulator samples per reference period;
* a triangular down-spread of 5000 ppm with a 29.3 kHz target;
* a ten-flip-flop phase detector with encoder, shift detector and accumulator;
* fifth-order 500 kHz low- and high-pass filters and a third-order 3.6 MHz high-pass;
* 10⁴-sample records;
* removal of the quantisation-noise power Δ²/12 · Σ h².

Everything else was chosen here:

* **Filters and statistics in hardware.** The original system recorded the detector output
  with a logic analyser and did the filtering and statistics on a PC. Here they are logic. The power spectrum is a
  single 1024-point, rectangular-window DFT computed by the Goertzel method rather than an
  FFT; the length, the window and the method were chosen here.
* **Filter response.** Only the order and the corner were given. Butterworth is an assumption.
* **Sign and clocking of the MUX control.** A positive modulator value selects an earlier
  phase, and the modulator is clocked by a tick derived from the feedback divider.
* **Profile resolution and period.** The profile has 10 bits and a period of 2048 modulator
  ticks. 60 MHz / 2048 matches the 29.3 kHz target exactly.
* **Encoder bubble handling, shift fold range, accumulator width (24 bits) and all fixed-point
  formats.**
* **Clock MUX.** It is a behavioural model. A real glitch-free multiphase switch is a timing
  circuit and has to be designed at transistor level.
* **Not included:** the reference oscillator, the phase-frequency detector and charge pump, the
  third-order RC loop filter and the ten-phase ring VCO. These are analog. The same goes for
  the off-line procedure that predicts SSC jitter from non-SSC phase-noise measurements and
  calibrates the loop parameters; it is a lab method, not hardware.

Limits to keep in mind:

* **Phase imbalance.** Mismatch between the ten VCO phases turns into extra noise at the
  detector output. That noise is indistinguishable from jitter, and nothing here removes it. On
  silicon it sets the floor of the measurable jitter, around 0.005 UI RMS.
* **Accumulator wrap.** The accumulated phase wraps after 2²³ steps: about 2.8 s of operation
  at full spread. Use `mpd_clear` and let the filters settle (about 200 samples) before a
  record.
* **No synchroniser on the sampling flip-flops.** Metastability in them is rare and only costs
  one sample. An encoder output marked invalid is skipped.
