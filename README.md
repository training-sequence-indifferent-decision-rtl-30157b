# A decision-feedback equalizer that does not trust its training sequence

A decision-feedback equalizer (DFE) removes inter-symbol interference (ISI):
each received sample carries echoes of the symbols before it, and the DFE
subtracts those echoes using the bits it has already decided. A *blind* DFE
learns the size of each echo (its tap weight) from the data itself, usually
by correlating the received signal with the earlier decisions. That only
works if the training bits are balanced and uncorrelated. Real training
sequences often are not:

* some have slightly more zeros than ones (a 49/51 split);
* some over-balance their ones and zeros, so that a bit is followed by its
  complement much more often than by a repeat.

On such a sequence the plain correlation of tap *k* also picks up the main
signal through the correlation of the bits themselves, and the error grows
with the number of taps. With the default test channel and a sequence that
changes bit 75% of the time, the plain blind DFE sets tap 1 to about -1.1
codes when the channel's echo is +2.5.

This design measures the statistics of the training bits while it trains
(how many ones, how often a bit equals the one 1, 2, ... 5 symbols earlier),
and uses them to remove the bias from the tap estimates. The result is a
5-tap DFE whose trained taps do not depend on what kind of sequence it was
trained on. It is written for an FPGA: 5-bit samples at 10 MHz from a
sigma-delta input, one decided bit out per sample.

## Signal chain

```
 pattern_gen ──tx_bit──► isi_channel ──5-bit──┐            ┌──────────── dfe_core ─────────────┐
  (PRBS, biased,                              ├─ src_sel ─►│ centre ─► subtract ─► slicer ─► rx_bit
   transitions,   tx_bit pin ─► cable ─► ADC  │            │ point     taps+dc      │           │
   external)          sd_cmp_in ─► sd_adc_if ─┘            │   ▲         ▲          ▼           │
                      sd_dac_out ◄─┘                       │   │   5 x dfe_tap ◄── decision     │
                                                           │   │  (delay, corr, coef, ±)        │
                                                           │ train_stats ─► decision_block ──►  │
                                                           └─────────────────────────────────────┘
                                                    eq_code / raw_code ─► 2 x quant_hist
                                                                              │ counts
                                        rx_bit, raw decision ─► video_out ◄───┘ ──► VGA
```

Everything runs on one 80 MHz clock. A symbol strobe every `OSR` = 8 clocks
sets the 10 Mbit/s symbol rate. The receiver (`dfe_core`) accepts a sample
on any clock, so it does not limit the rate.

## Receiver datapath (`dfe_core`)

For each sample `y` (a code 0..31), on the clock it arrives:

1. **Centre.** `x = y - c`, where `c` is the tracked 50% point
   (`center_tracker`), carried with 6 fractional bits.
2. **Subtract the echoes.** `z = x - dc - Σ ±coef[k]`, with `+coef[k]` if the
   decision `k` symbols back was 1 and `-coef[k]` if it was 0. `dc` is the
   centre correction from the last training solve.
3. **Decide.** The decision is `z >= 0`. It enters tap 1's delay register on
   the same clock edge, so the feedback loop closes within one sample. This
   is the critical path: an adder tree of six 17-bit terms and a sign bit.

`dout` is registered and appears one clock after the sample. With `bypass`
high, `dout` is the unequalized decision `x >= 0` instead. Training still
uses the equalized decision. `eq_code` is `z` rounded back to a code around
mid-scale 16, and `raw_code` is the received code. Both feed the display
histograms.

### Taps (`dfe_tap`)

Each tap holds three things:

* the decision `k` symbols back, taken from the tap before it (the one-symbol
  delay between taps);
* a coefficient register (the "adjustment") loaded by the decision block;
* a window accumulator of `±x`: `+x` when its held decision is 1, `-x` when
  it is 0.

The product `±coef` is a sign select, because decisions are ±1.

### Centre point (`center_tracker`)

This register moves one step (1/64 code) towards every sample while training
is on. It settles where half the samples lie above it, at the running median.
On unbalanced data the median is not the midpoint between the two signal
levels. The `dc` correction described below removes that error, so the
tracker can stay this simple.

## How the compensation works (`train_stats`, `decision_block`)

Training runs continuously in windows of `N = 2^WIN_LOG2` = 4096 samples.
Over each window the receiver collects the following, where `s` is the
decision as ±1:

| sum | meaning |
|---|---|
| `Σ x` | mean of the centred signal |
| `Σ x·s(n-k)`, k = 0..5 | correlation of the signal with each decision (k = 0 is the main cursor) |
| ones count | balance `m = E[s] = (2·ones − N)/N` |
| equal pairs at lag l, l = 1..5 | agreement `ρ_l = E[s(n)·s(n-l)] = (2·same − N)/N` |

Model the sample as `x(n) = δ + Σ_j h_j·s(n-j)`. Here `h_0` is the main
cursor, `h_1..h_5` are the echoes the taps must cancel, and `δ` is the
centre error. Taking expectations gives a set of linear equations in the
unknowns `δ, h_0..h_5`:

```
E[x]          = δ + m·Σ_j h_j
E[x·s(n-k)]   = δ·m + Σ_j h_j·ρ_|k-j|        (ρ_0 = 1),   k = 0..5
```

These are the least-squares (minimum mean-square-error) normal equations for
the regressors `[1, s(n), ..., s(n-5)]`.

A plain blind DFE assumes `m = 0` and `ρ_l = 0`, and takes
`h_k = E[x·s(n-k)]` directly. On a sequence with `ρ_1 ≈ −0.5`, tap 1 then
picks up about `−0.5·h_0`, which is the error quoted at the top.

`decision_block` solves the full system by **Gauss-Seidel** sweeps. Each
unknown in turn (δ, then h_0, h_1, ... h_5) is recomputed from the current
values of all the others:

```
δ   ← E[x] − m·Σ_j h_j
h_k ← E[x·s(n-k)] − δ·m − Σ_{j≠k} h_j·ρ_|k-j|
```

So each later tap is corrected with the already-corrected earlier ones. The
matrix is an autocorrelation matrix, so it is symmetric positive definite and
the sweeps converge for any sequence that is not degenerate. The starting
point is the plain correlation. The block computes one unknown per clock, so
`ITER` = 16 sweeps over 7 unknowns take 113 clocks, far less than a window.
The results (`coef`, `dc`, `main`) are registered when the solve finishes.
If `train_en` is high, they are then loaded into the taps and the `dc`
register. With `comp_en` low, the block returns the plain correlations and no
`dc`, which makes the design behave as a conventional blind DFE. The
testbenches use this mode to show the difference.

Training is decision-directed. After reset all taps are zero, so the first
window's decisions come from a plain slicer. The first solve is therefore
built on decisions that contain errors, but it opens the eye enough for the
next windows to be error-free. With the default test channel, five
windows of training are enough for the taps to reach their final values.

Fixed-point formats (in `dfe_pkg`):

* samples, coefficients and `dc` are signed, 13 bits, with 6 fractional bits
  (±64 codes);
* statistics are signed, 12 bits, with 10 fractional bits;
* the solver keeps 17-bit intermediate values and saturates them.

Window sums are divided by `N` with shifts, which is why the window length is
a power of two.

Limits worth knowing:

* The model covers a main cursor and five post-cursors. Echoes beyond five
  symbols, and pre-cursors, are not modelled.
* If the bits are almost constant, the equations become singular. For
  example, with no transitions at all, `ρ_l → 1`. The taps are then
  meaningless, as they are for any blind DFE.
* 5-bit quantization of the input shifts the least-squares taps slightly
  from the true echoes. With the test channel the shift is up to about 0.3
  code on the smallest taps. The solution is still the best fit to the
  quantized data.

## Input interface (`sd_adc_if`)

The sigma-delta converter is split between the board and the FPGA:

* **On the board:** an analog second-order loop filter with a comparator.
* **In the FPGA:** the comparator output is registered at 80 MHz and sent
  straight back out as the 1-bit DAC level (`sd_dac_out`). This closes the
  loop. The same bit stream is decimated by 8 with a sinc³ (three-stage CIC)
  filter, and its 0..512 output is scaled to a 5-bit code.

Second-order shaping at 8x oversampling corresponds to roughly 5.4 effective
bits, so 5-bit samples are justified. The decimator spreads each symbol over
about three output samples, which adds post-cursor ISI of its own. The DFE
cancels it along with the channel's. In the end-to-end test this path runs
error-free after retraining.

## Bit source and channel emulation

`pattern_gen` produces one bit per symbol:

* a PRBS31 bit;
* a 1 with probability `p_one/256` (125 gives the 49/51 split);
* a transition with probability `p_flip/256`;
* an external bit, such as image data.

`isi_channel` emulates a channel digitally. It maps the last six bits to ±1,
weights them by a pulse response (default 6, 2.5, 1.5, 0.875, 0.5 and 0.25
codes), adds mid-scale 16 and a noise input, then rounds and clips to 5 bits.
Without equalization this channel's eye is only 0.375 code open. The
pattern generator's bit also leaves the chip on `tx_bit`, so a physical
channel can be used instead.

## Display histograms (`quant_hist`)

There are two histograms with 32 bins and 18-bit saturating counts: one of
the equalized codes and one of the received codes. A histogram frame ends
at every start of a video frame, or when `hist_clear` is raised. At that
point the counts are copied to a display copy and counting starts again
from zero. About 157 500 symbols fall in one 63.5 Hz video frame, so
18 bits hold a full frame even if all of them land in one bin. `hist_addr`
reads the running count of one bin of each histogram. With the equalizer
trained, the equalized histogram shows two separate humps with an empty
middle. The raw histogram is spread across the middle.

## Video output (`video_out`)

A VGA stage shows what the link carries. The screen is 640x480 with
800x525 totals. One pixel lasts three 80 MHz clocks, so the pixel rate is
26.7 MHz and the refresh rate is 63.5 Hz. Outputs are 3-bit colour (one bit
each of red, green and blue), active-low `hsync` and `vsync`, and
`blank_n`. They are registered together and change on `vga_pix_en`.

The screen holds four 300x200 tiles:

| position | content |
|---|---|
| top left | picture built from the equalized bits (`rx_bit`) |
| top right | bar chart of the equalized-sample histogram |
| bottom left | picture built from the unequalized decisions |
| bottom right | bar chart of the received-sample histogram |

**Pictures.** Every three received bits form one pixel: the first is red,
then green, then blue. Pixels fill a 300x200 frame buffer in row-major
order and wrap after 60 000 pixels. There is one buffer per stream (two
60 000 x 3-bit memories). To see a picture, send image bits as the external
source (`mode` = external, `ext_bit`) with the taps frozen (`train_en` low)
after training. The unequalized picture comes from `dout_raw`, the plain
slicer decision `x >= 0` that `dfe_core` makes alongside the equalized one.
With `bypass` high the top-left picture shows the unequalized bits as well.

**Bar charts.** Each of the 32 bins is a white bar 9 pixels wide, drawn
from the bottom of the tile. Its height is the bin's count from the last
completed frame divided by 512 (`HSHIFT` = 9), clipped to 200 pixels.
`video_out` drives the bin address and reads both display copies.

## What is not here

* **Analog and external parts.** The sigma-delta loop filter and comparator,
  the cable and the resistor network that turns the 3-bit colour into VGA
  voltages are outside the FPGA. `tb/sd_loop_model.sv`
  is a behavioural discrete-time model of the loop, used only in
  simulation.
* **Baseline.** A separate 2-tap "standard" DFE for side-by-side comparison
  is not built. `comp_en = 0` gives the uncompensated behaviour with all
  five taps instead.
* **Non-linear channel compensation** is not attempted.
* **Throughput.** At 10 Mbit/s the link carries slightly less than a
  300x200, 3-bit, 60 frame/s video stream (10.8 Mbit/s). The pictures are
  therefore updated at about 55 frames per second while the screen refreshes
  at 63.5 Hz; a full-rate video link would need a faster symbol rate.
* **Side-by-side displays.** Only the equalized and unequalized views are
  shown. Pictures and histograms from a separate 2-tap equalizer are not,
  because that equalizer is not built.

## What is given and what is chosen

The description this design follows fixes its structure and rates:

* five taps, each holding the decision one symbol later than the tap before
  it, each with an "adjustment" coefficient that multiplies it, all summed
  into the output;
* tap 1 also keeping a centre-point register, the 50% point, that keeps
  adjusting during training;
* three units that gather statistics of the training bits: ones against
  zeros, equal pairs (00/11) against transitions (01/10), and other
  statistics; a decision block turns them into the adjustments;
* 5-bit samples in and 1 bit out at 10 MHz; a sigma-delta input with a
  1-bit DAC, second-order shaping and 8x oversampling at 80 MHz;
* a simulated ISI channel in front of the receiver;
* 300x200-pixel pictures with 3-bit colour and quantization histograms on
  a screen, for the equalized and the unequalized data.

The rest is this design's own. That covers the window length, the
running-median centre, the "other statistics" (agreement at lags 2..5), the
normal equations and their Gauss-Seidel solution, the sinc³ decimator, the
test channel, the screen mode and tile layout, the bit-to-colour order, the
bar scaling and all number formats.

One point differs from the block diagram it follows. There, the statistics
units take the incoming signal. Here, they count the receiver's decided bits.
The received signal is blurred by the very ISI being trained out, so the bit
statistics can only be read from the decisions.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `dfe_pkg` | `SAMPLE_W` | 5 | sample code width |
| `dfe_pkg` | `NTAPS` | 5 | feedback taps |
| `dfe_pkg` | `FRAC` / `SFRAC` | 6 / 10 | fractional bits of samples / statistics |
| `dfe_top` | `OSR` | 8 | clocks per symbol (oversampling) |
| `dfe_top`, `dfe_core` | `WIN_LOG2` | 12 | log2 of training window length |
| `dfe_top`, `dfe_core` | `ITER` | 16 | Gauss-Seidel sweeps per solve |
| `dfe_core` | `STEP` | 1 | centre step, 1/64 code |
| `dfe_top` | `CNT_W` | 18 | histogram counter width |
| `isi_channel` | `NH`, `H`, `MID` | 6, {96,40,24,14,8,4}, 16 | test channel, H in 1/16 code |
| `sd_adc_if` | `ORDER` | 3 | CIC stages |
| `video_out` | `PIX_DIV` | 3 | clocks per pixel (26.7 MHz pixel rate) |
| `video_out` | `HSHIFT` | 9 | bar height = count >> HSHIFT |

A window must be longer than a solve: `2^WIN_LOG2 > ITER·(NTAPS+2)+1`. An
assertion in `dfe_core` checks this.

## Simulating

Every testbench in `tb/` is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops with a watchdog if it hangs. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dfe_pkg.sv tb/tb_dfe_top.sv \
          --top-module tb_dfe_top -y rtl -y tb +libext+.sv
./obj_dir/Vtb_dfe_top
```

| testbench | what it shows |
|---|---|
| `tb_dfe_top` | Whole design at default sizes, several hundred thousand symbols (a few seconds). Compensated training on transition-heavy, biased and PRBS bits gives taps within 0.4 code of the channel and error-free 4096-bit windows. The blind mode mistrains. Frozen taps carry image-like data without error. Bypass makes errors. The equalized histogram has an empty middle. The sigma-delta path with the loop model runs error-free. The VGA output runs whole frames with lines of the right length and with pictures and bars drawn. Each of these mechanisms is counted. |
| `tb_dfe_core` | Receiver alone: one-clock latency, tap accuracy, error-free window, freeze, bypass, blind mistraining |
| `tb_decision_block` | Solver against a floating-point least-squares reference for balanced, biased and transition-heavy bits, within 0.1 code; exact solve time |
| `tb_dfe_tap`, `tb_train_stats`, `tb_center_tracker` | Cycle-exact comparison with reference models |
| `tb_pattern_gen` | PRBS31 bit-exact; biased and transition proportions |
| `tb_isi_channel`, `tb_quant_hist` | Exact comparison with reference models, clipping, clear, saturation |
| `tb_video_out` | Sync pulse widths and positions, frame period, every pixel of both picture tiles and both bar-chart tiles against a reference model |
| `tb_sd_adc_if` | DC levels to codes within ±1 with the loop model; decimation period; DAC loop bit |

## How far to trust it

All modules pass Verilator lint and the Yosys/slang front end, and synthesize
without latches. The testbenches compare against independent reference
models and floating-point solutions, not against the RTL's own arithmetic.
Each testbench has been seen to fail on a deliberately broken copy of its
module.

The design has not run on hardware. The analog loop is a simple
discrete-time model. The test channels are synthetic, chosen so that
equalization is clearly needed.
