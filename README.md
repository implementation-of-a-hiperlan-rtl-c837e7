# CMF-DFE equaliser for a HIPERLAN/1 receiver

HIPERLAN/1 sends 23.5 Mb/s over indoor radio channels whose echoes spread
each symbol over several neighbours. A channel matched filter decision
feedback equaliser (CMF-DFE) removes that intersymbol interference cheaply.
It rests on one observation. A multipath channel followed by its own matched
filter has a known shape: symmetric about a real peak, at a fixed position.
So the equaliser's timing does not wander from channel to channel. The
training math is small, and the 5 x 5 system for the feedforward filter is
Toeplitz and Hermitian.

This repository holds the receive datapath of such an equaliser in
synthesizable SystemVerilog:

* sample-phase selection;
* channel estimation with frame synchronisation;
* matched-filter and feedback coefficient calculation;
* a real-time equaliser filter that decides one QPSK symbol per clock.

One training step, solving the 5 x 5 system, stays outside as a software
"training engine" (a DSP in the reference receiver). The top module has a
port interface for it.

## The receive chain

```
ADC, 2 samples/symbol
  |
phase_select -- even or odd stream, whichever carries more energy
  |  T-spaced samples
  +--> channel_est -- PN correlation at 16 lags, best 5-symbol window
  |        |  h[0..4], sync
  |     cmf_coef  -- g = conj(mirror(h)) and q = h * conj(h), both 8-bit scaled
  |        |  g ----------------------------------------+
  |        |  q ---> training engine (external):        |
  |        |         solve T(q) w = e; send w, shifts   |
  |     fb_coef <--- w                                  |
  |        |  b = postcursors of w * q                  |
  v        v                                            v
eq_filter: matched filter g -> feedforward w -> feedback b + QPSK slicer
  |
decisions, soft values, frame-aligned symbol index
```

| module | role |
|---|---|
| `cmfdfe_pkg` | widths, sizes, the complex sample/coefficient/estimate types |
| `phase_select` | even/odd split of the 2x-oversampled input; energy choice |
| `channel_est` | PN correlator (16 lags, 31 or 62 symbols) and window search |
| `cmf_coef` | block-floating-point estimate, matched coefficients g, response q |
| `fb_coef` | convolution w * q, feedback taps b, cursor value |
| `cfir` | complex 5-tap FIR with run-time shift and saturation |
| `dfe_fb` | decision feedback filter and QPSK slicer |
| `eq_filter` | coefficient bank plus CMF -> FF -> DFE chain |
| `cmfdfe_top` | everything above, wired, with the training-engine ports |

## Training, step by step

A packet starts with 450 training symbols: five different 31-chip
m-sequences, each sent three times, the last one cut short. After that come
the 496-symbol information blocks. Only the first m-sequence is used. Its
three repeats span 93 symbols, which covers the 62-symbol correlation plus
its 15 extra lags. The testbenches send that first sequence throughout the
training section. The training runs on the
start of the training section. It is finished long before the information
symbols arrive, while the filter is already streaming.

**1. Phase selection.** The ADC samples at twice the symbol rate.
`phase_select` writes each (even, odd) sample pair into a 31-entry circular
buffer. Over the first 31 symbols it sums |x|^2 for each stream. Then it
reads out the stronger stream, one sample per symbol, 31 symbols behind the
input. So the chosen stream is output from its first symbol on; nothing is
lost while the choice is made. On a tie, even wins.

**2. Channel estimation and frame sync.** `channel_est` correlates the
T-spaced stream with the PN sequence at 16 lags at once. The chips are +-1,
so each of the 16 accumulators just adds or subtracts the incoming sample.
The correlation is complete when the last sample arrives. It then scans the
16 lags, one per clock. It keeps a running sum of |h|^2 over 5 lags and
keeps the first window with the largest sum. The 5 taps of that window are
the channel estimate. Its starting lag, `sync`, is the frame
synchronisation: it says where symbol 0 sits in the stream.

The correlation length is chosen per packet, by `gmsk_mode` (top) /
`long_corr` (estimator), sampled at `start`:

* 31 symbols (one PN period), enough for QPSK;
* 62 symbols for HIPERLAN/1's GMSK. GMSK carries each chip on only one of
  the two rails, so the correlation needs twice as many symbols for the same
  gain.

The search covers a 16-symbol uncertainty in the coarse timing given by
`start`.

**3. Matched coefficients.** `cmf_coef` first brings the 16-bit estimate into
8 bits. It applies the smallest right shift (`est_shift`) that fits every
rail in +-127. It then forms the matched filter taps g[i] = conj(h[4-i]).
It also forms the one-sided matched response q[m] = sum_i h[i+m] conj(h[i]),
m = 0..4, which is the channel as seen through its own matched filter.
Because q is Hermitian, five values describe all nine taps.

**4. Feedforward solve (external).** `acf_valid` presents `q` and
`est_shift`. The training engine builds the 5 x 5 Toeplitz system from q,
solves it, and truncates w to 8 bits. It then pulses `w_load` with `w_in`
and three shifts (next section). The testbench shows one way to do this: a
regularised least-squares solve by Gauss elimination, forcing the
precursors of the overall response to 0 and its cursor to 1.

**5. Feedback coefficients.** On `w_load`, `fb_coef` convolves w with the
full q. The result is the 13-tap overall response p of
channel -> matched filter -> feedforward filter. Its cursor is p[6]. Its six
postcursors p[7..12], shifted by `fb_shift` and saturated to 8 bits, are the
feedback taps. They are loaded into the filter one clock later. From then on
`coef_ready` is high and decisions are marked valid.

Timing in symbols, from the first training symbol (GMSK):

* 31 symbols of phase measurement;
* 62 + 15 symbols of correlation;
* about 20 clocks of window search and matched-coefficient calculation;
* the engine's solve time;
* 2 clocks for the feedback taps.

That is about 110 symbols plus the solve, against 450 training symbols.

## The equaliser filter

`eq_filter` has three registered stages, so a decision leaves 3 clocks after
its newest input sample. Each stage takes one symbol per clock, so a clock
at the symbol rate (23.5 MHz) keeps up with HIPERLAN/1. The phase selector
takes one ADC sample per clock, so at 2 samples per symbol the top needs a
47 MHz clock for real time.

* Matched filter: `cfir` with taps g. The output is shifted by `cmf_shift`,
  saturated to 12 bits.
* Feedforward filter: `cfir` with taps w, shifted by `ff_shift`, 12 bits.
* Feedback and slicer: `dfe_fb` subtracts sum_k b[k] d[n-k] and decides
  d = sign(Re) + j sign(Im). A decision is +-1+-j, so the products are only
  additions and subtractions of coefficient rails. The loop closes within
  one clock.

All coefficients are 8 bits. Truncating trained coefficients this far costs
about 0.1 dB when the training itself runs at 16 bits, and 6 bits still
works with little loss. `COEF_W` (package) changes the width for all blocks.
Only the 8-bit default has been simulated.

`flush` (driven by `start`) empties the delay lines and the decision
history, and clears the loaded flags. The filter then needs a complete new
coefficient set.

### Frame alignment

The filter runs on the stream from its first sample on. Decisions count up
in `dec_index`. The overall response puts symbol n's cursor at output index
n + sync + 6, so the top reports

    dec_sym = dec_index - 6 - sync

which is the index of the decided symbol within the packet (0 = first
training symbol, 450 = first information symbol).

## Scaling

The estimator's sums are L times the channel, with L = 31 or 62. They are
not divided by L. Instead each stage has a right shift, chosen by the
training engine, that holds each stage's signal in range. The targets below
are the ones the testbench's engine uses:

* `est_shift` (computed in hardware): estimate -> 8-bit taps.
* `cmf_shift`: matched filter output -> about 200..400 at its peak.
* `ff_shift`: feedforward output -> cursor about 50..100. This is the
  tightest rule. The feedback taps are 8-bit numbers in the units of the
  feedforward output, so a cursor of 100 lets postcursors up to 1.27 x the
  cursor be cancelled. With the cursor at 400, any postcursor above 0.32 x
  the cursor saturates its tap. On fading channels that raised the symbol
  error rate more than tenfold.
* `fb_shift`: p is in units of (8-bit h)^2 x 8-bit w. The feedforward
  output is that divided by 2^(cmf_shift + ff_shift) x L / 2^est_shift. So
  `fb_shift = cmf_shift + ff_shift + log2(L) - est_shift`, with log2(L)
  rounded (5 or 6).

All shifts truncate (arithmetic shift right). All stage outputs saturate.
`cursor_re/cursor_im` give the engine the full-precision cursor p[6], if
it wants to check or refine its choice.

## Ports of `cmfdfe_top`

| port | dir | meaning |
|---|---|---|
| `start` | in | new packet; the next ADC sample is the even sample of training symbol 0 (within 16 symbols) |
| `gmsk_mode` | in | 62-symbol (1) or 31-symbol (0) correlation, sampled at `start` |
| `adc_valid`, `adc_sample` | in | one complex 10-bit sample per strobe, 2 per symbol |
| `phase_decided`, `odd_sel`, `energy_even/odd` | out | phase choice |
| `est_busy`, `est_valid`, `sync`, `h_est`, `win_energy` | out | channel estimate and frame sync |
| `acf_valid`, `est_shift`, `q` | out | request to the training engine |
| `w_load`, `w_in`, `cmf_shift`, `ff_shift`, `fb_shift` | in | engine's answer |
| `coef_ready`, `cursor_re/im` | out | coefficients loaded; overall cursor |
| `dec_valid`, `dec`, `soft_re/im`, `dec_sym` | out | QPSK decision, soft value, symbol index |

## Where this design departs from the reference receiver

* **Partitioning.** The reference trains entirely in DSP software and
  proposes a hardware accelerator for the filter only. Here the channel
  estimate, matched coefficients and feedback taps are hardware as well.
  Only the Toeplitz solve remains in software.
* **Decision device.** Only a QPSK slicer is built. GMSK, as HIPERLAN/1
  transmits it, is precoded so that I and Q arrive like offset QPSK. The
  half-symbol offset and de-rotation that a GMSK receiver needs in front of
  this datapath are not modelled. Nor are the 8-PSK and MSK decision
  devices the method was also evaluated with.
* **PN sequence.** The generator polynomial is this design's choice:
  x^5 + x^2 + 1, all-ones seed, chip 1 = -1. Training symbols are taken as
  real +-1. Change `SEED` and the LFSR line in `channel_est` for another
  sequence.
* **Sizes chosen here:** the 31-symbol phase measurement, the tie rules,
  the cursor position (centre of the feedforward span), 6 feedback taps,
  the 12-bit stage outputs and all shift rules.
* **Fixed point.** Estimates are 16 bits as in the reference training. The
  correlation and q accumulators are wider so nothing inside can overflow.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against
values it computes itself and prints `TB_RESULT checks=N failures=M`.

* `tb_cfir`: random coefficients and data, with gaps in the strobe, against
  an integer convolution with the same shift and saturation; 1-clock latency.
* `tb_dfe_fb`: random inputs and feedback taps against a model with its own
  decision history, including flush; 1-clock latency.
* `tb_phase_select`: energy choice for the even phase, the odd phase and a
  tie, and the exact 31-symbol delay of every selected sample.
* `tb_channel_est`: 48 random channels, delays and both correlation lengths,
  with gaps in the input strobe. Checks the exact latency (done 17 clocks
  after the last sample).
* `tb_cmf_coef`, `tb_fb_coef`: block scaling, conjugate mirror, q,
  convolution and saturation against direct models.
* `tb_eq_filter`: the whole filter against a model; the 3-clock latency,
  gating of decisions until all three coefficient sets are loaded, flush.
* `tb_cmfdfe_top`: end to end at the default sizes. Six packets, each 450
  training + 496 random QPSK symbols, through random 5-tap complex channels
  with a delay of 0..8 symbols and no noise. The good phase alternates between even and
  odd, and both correlation lengths are used. The testbench plays the
  training engine in floating point. It checks every information decision
  by its `dec_sym` index, the phase choice, the sync lag and the eye
  opening. It also counts that each mechanism occurred. With 31-symbol
  correlation and a weak last path, the window can start one lag early
  (sidelobes of -1 per lag). The decisions stay correct because the
  alignment follows `sync`, and the test allows this.

* `tb_rayleigh_50ns` is a performance run rather than a unit test. Packets
  cross random Rayleigh fading channels: 7 symbol-spaced complex Gaussian
  taps, exponential power profile with 50 ns rms delay spread, 10-bit ADC
  clipping. There are 1500 channels at each of 10, 15, 20, 25 and 30 dB SNR.
  It counts symbol errors:

  | SNR (dB) | 10 | 15 | 20 | 25 | 30 |
  |---|---|---|---|---|---|
  | symbol error rate | 13 % | 3.8 % | 1.3 % | 0.72 % | 0.52 % |
  | packets lost (>20 % errors) | 379 | 62 | 13 | 5 | 4 |

  The floor at high SNR comes from channel energy outside the 5-symbol
  window and from deep fades the 5-tap feedforward filter cannot equalise.
  The test fails if the rate does not fall with SNR, or at 20 dB if it
  exceeds 2 % SER or 2 % lost packets. Those limits guard against
  regressions; they are not a published performance figure. Change `NCH`,
  `NPKT` or the sweep to explore. It runs in about 40 s.

### Running a test

With Verilator 5, from the repository root:

    verilator --binary --timing -Wno-fatal -Irtl -y rtl \
        rtl/cmfdfe_pkg.sv tb/tb_cmfdfe_top.sv --top-module tb_cmfdfe_top -Mdir obj
    ./obj/Vtb_cmfdfe_top

Replace the testbench name for another block. The end-to-end run takes well
under a second. Testbenches use only `$urandom` and plain two-state logic.
