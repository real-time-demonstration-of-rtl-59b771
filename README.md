# Multiplierless time-domain chromatic dispersion equalizer, 16 samples per clock

In a coherent optical receiver, chromatic dispersion smears every symbol over
many neighbouring symbols. Fibre dispersion is a pure phase response, so a
fixed all-pass FIR filter undoes it. Applied directly, that filter needs one
complex multiplication per tap and per sample. At 83 taps and 2.5 GSa/s, a
mid-range FPGA cannot hold that many multipliers.

This RTL implements the cheaper variant. Each tap coefficient is quantized
to one of only four values. Samples that meet the same coefficient are added
together first, and each of these few sums is scaled once, by a shift and an
add. The equalizer therefore contains adders and registers but no
multipliers. Around it sits the rest of a real-time FPGA receiver chain:

```
 I cores a/b ─► adc_interleave ─┐                       ┌─► eq_re / eq_im (stream out)
                                 ├─► md_fir_cde ─────────┤
 Q cores a/b ─► adc_interleave ─┘         │              └─┐
                      │ raw samples       │ equalized      ├─► capture_fifo (I) ─► readout
                      └──────────── mode_raw at arm ───────┴─► capture_fifo (Q) ─► readout
```

Default configuration, taken from a published real-time demonstration
(2.5 Gb/s QPSK, Virtex-6 FPGA):

| quantity | value |
|---|---|
| sample rate | 2.5 GSa/s: 16 lanes × 156.25 MHz |
| converter | 8 bits, two 1.25 GSa/s cores interleaved per channel |
| equalizer taps | 83, complex |
| coefficient levels | 4 for the real part, 4 for the imaginary part |
| link | 1.6 µs/nm accumulated dispersion at 1549.32 nm |
| capture window | 2^15 samples (2048 words of 16) per I/Q unit |

## The quantized taps

The ideal time-domain compensating filter for accumulated dispersion `D·z`
at wavelength `λ` and sample period `T` is

    h[k] = sqrt(j/K) · exp(-j·π·k²/K),   K = D·z·λ² / (c·T²),   k = -41 … +41

With the default link, `K ≈ 80.07`. The common rule of thumb asks for about
`2·floor(K/2)+1 = 81` taps, so 83 taps are enough. All taps have the same
magnitude, so only the phase `φ_k = π/4 − π·k²/K` matters. The common gain
`sqrt(1/K)` is dropped, which makes the output a fixed scale factor larger
than the ideal filter's.

Each of `cos φ_k` and `sin φ_k` is quantized on its own to one of four
levels. The levels are `{−3, −1, +1, +3}` (times a common gain). The
thresholds sit at 0 and ±0.5 of the tap magnitude:

| cos φ (or sin φ) | level | index |
|---|---|---|
| ≥ 0.5 | +3 | 3 |
| 0 … 0.5 | +1 | 2 |
| −0.5 … 0 | −1 | 1 |
| ≤ −0.5 | −3 | 0 |

For a cosine of a uniformly spread phase, this is close to the best
four-level quantizer. The level values are also what makes the datapath
multiplierless:

- ±1 is a pass or a negation.
- ±3 is `(x<<1)+x`, optionally negated.

The coefficients are elaboration-time constants. `cde_pkg::cd_tap_code` works
out each 2-bit index from the phase alone, using no trigonometry. For
example, `cos φ ≥ 0.5` holds exactly when `φ mod 2π` lies within `π/3` of
zero. To target another link, override `DISP_K` on `md_fir_cde`, or change
the link constants in `cde_pkg`.

## Distributive evaluation

For output sample `n`, the filter is regrouped by coefficient level instead
of by tap:

    y[n] = Σ_m c[m]·x[n−m]
         = Σ_l v_l · (A_l[n] + j·B_l[n])
    A_l[n] = Σ { x[n−m] : real part of c[m] has level l }
    B_l[n] = Σ { x[n−m] : imaginary part of c[m] has level l }

Both `A_l` and `B_l` are complex sums of complex samples. Every tap adds its
sample into exactly one `A` bin and one `B` bin. The output then needs:

- 8 complex bins per output sample: 83 additions into `A`, 83 into `B`;
- 4 level scalings, each on `A_l.re − B_l.im` (real part) and
  `A_l.im + B_l.re` (imaginary part);
- a 4-input sum per output component.

Since the taps are constants, synthesis turns the bin assignment into fixed
adder trees.

Output width and overflow: the real part of a bin is at most `83·128` in
magnitude. The bins of one output partition the taps, so
`|y| ≤ 3·2·83·128 = 63744`. That fits the 18-bit output
(`IN_W + clog2(NTAPS) + 3`). The output is not rounded, so it carries the
full precision.

## Sixteen samples per clock

`md_fir_cde` takes one word of `LANES` samples per clock. Lane 0 is the
earliest sample in time. The block keeps a delay line of the current word
plus `ceil((NTAPS−1)/LANES) = 6` past words (112 samples). Output lane `p`
uses window positions `96+p` down to `96+p−82`, so every lane computes its
own complete 83-tap sum. There is no block processing and no overlap buffer.

Pipeline:

| clock edge | what happens |
|---|---|
| 1 | the offered word enters the delay line |
| 2 | the level bins are registered |
| 3 | the scaled and combined output word is registered |

`out_valid` follows `in_valid` three edges later, and gaps in the input
stream reach the output unchanged. A gap does not advance the delay line,
so a gap is never filtered as zeros.

## From converter to equalizer

Each channel (I and Q) is digitized by two 1.25 GSa/s cores. They sample on
alternate instants, giving 2.5 GSa/s per channel. `adc_interleave` builds
each word as follows:

- Core `a` supplies the even lanes and core `b` the odd lanes:
  `out[2i] = a[i]`, `out[2i+1] = b[i]`.
- Offset-binary codes become two's complement by inverting the sign bit.
  `OFFSET_BINARY = 0` turns this conversion off.
- The result is registered once.

The I word is the real part of the equalizer input and the Q word the
imaginary part.

## Capture windows

Each of the two `capture_fifo` units (I and Q) records one window at a time:

- **Arming:** a pulse on `cap_arm` clears the unit and opens a window.
- **Filling:** while the window is open, every valid word is stored.
- **Closing:** after 2048 words (2^15 samples) the window closes by itself
  and `cap_done` rises. Later words are ignored, so the memory can never
  overflow. `cap_arm` is ignored while a window is open.
- **Reading:** the memory reads out in FIFO order, one word one clock after
  `cap_rd_en`. Reading may start while the window is still filling.

The source of a window is latched from `mode_raw` when the window is armed:

| `mode_raw` at arm | stored samples |
|---|---|
| 0 | equalized samples |
| 1 | raw interleaved converter samples, sign-extended to 18 bits |

Raw mode feeds a reference equalizer running outside the device from the
same hardware. Two QPSK samples per symbol (2.5 GSa/s at 1.25 GBd) mean
that one window holds 2^15 bits. That is the block length used for
bit-error counting.

## Interfaces and timing (`cde_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | one clock (156.25 MHz), synchronous active-low reset |
| `adc_valid` | in | 1 | converter words valid |
| `adc_i_a`, `adc_i_b`, `adc_q_a`, `adc_q_b` | in | 8 × 8 | offset-binary core words, index 0 earliest |
| `eq_valid`, `eq_re`, `eq_im` | out | 1, 16 × 18 | equalized stream, 4 clocks after the converter word |
| `mode_raw`, `cap_arm` | in | 1 | capture source and start |
| `cap_capturing`, `cap_done`, `cap_empty` | out | 1 | capture status |
| `cap_rd_en` | in | 1 | read one word |
| `cap_rd_valid`, `cap_rd_i`, `cap_rd_q` | out | 1, 288 | captured I and Q words, lane `p` in bits `[18p +: 18]` |

Latency from a converter word to its equalized word is 4 clocks: 1 for
interleaving and 3 in the equalizer. A raw sample reaches the capture units
one clock after entry.

## What follows the source and what does not

Taken from the demonstration:

- the chain converter → equalizer → capture;
- 16 lanes at 156.25 MHz;
- 8-bit converters interleaved two per channel;
- 83 taps with four quantization levels;
- the distributive, multiplierless evaluation;
- 2^15-sample capture units, and a raw capture path that serves as the
  reference.

Choices made for this RTL, because the source leaves them open:

- the level values {−3,−1,+1,+3} and their thresholds;
- the tap formula, and the dropped common gain;
- fixed rather than loadable coefficients;
- the pipeline depth and the full-precision output width;
- the core-to-lane order and the offset-binary input coding;
- one clock for converter and logic, with no clock-domain crossing;
- the arm/done capture control, the mode latch and the readout port;
- synchronous reset.

Not included:

- The converter board itself.
- The host link that carries captures off the chip.
- Bit-error counting. It needs timing recovery, carrier phase recovery and
  decisions, and the source does not describe those.

The source reports an occupation of 21 % of the LUTs, 9 % of the registers
and no DSP blocks on an XC6VLX240T. This RTL also uses no multiplier. Its
LUT count has not been mapped to that device.

## Verification

Each block has a self-checking testbench in `tb/`. Each testbench ends by
printing `TB_RESULT checks=N failures=M`. A watchdog ends a run that hangs.
The references are computed inside the testbenches and are independent of
the RTL: the taps come from `$cos`/`$sin` of the filter phase, and the
outputs from a plain convolution.

| testbench | size | what it checks |
|---|---|---|
| `tb_md_fir_cde` | full (16 lanes, 83 taps) | impulse response equals the quantized taps; random full-scale words with random input gaps; constant extreme words (overflow); all four levels in use; 3-edge latency on every word |
| `tb_adc_interleave` | full | even/odd lane placement, offset-binary conversion at the code extremes, valid timing, output held during gaps |
| `tb_capture_fifo` | full (2048 × 288 bits) | window closes after exactly 2048 words, later words and a repeated arm ignored, reading while capturing, FIFO order and 1-clock read latency, level/empty flags, re-arm clears |
| `tb_cde_pkg` | package | tap codes from the phase comparison equal `$cos`/`$sin` quantization for 5 dispersion constants and 301 tap offsets; default `K`; centre tap +3+3j |
| `tb_cde_top` | full default parameters | three complete 2^15-sample windows (equalized; raw, so the mode switches; equalized with reads overlapping the capture); every equalized word checked, 4-clock latency checked; counts that each mechanism happened |

The end-to-end test checks about 200,000 values and runs in about a second.

`tb_cde_link` runs the link the defaults were chosen for. The signal is set
up as follows:

- a 2^15−1 PRBS (`x^15 + x^14 + 1`) mapped to QPSK;
- 2 samples per symbol, rectangular pulses;
- 1.6 µs/nm of dispersion, applied as the conjugate of the ideal 83-tap
  filter;
- 8-bit offset-binary codes on both interleaved cores.

It captures one raw window and twelve equalized windows of 2^15 bits. It
then counts sign-decision errors against the PRBS.

| window | bit errors | BER |
|---|---|---|
| raw, no equalization | 14333 of 32768 | 44 % (the eye is fully closed) |
| 12 equalized, noise-free | 12 of 393216 | 3.1·10⁻⁵ |

All twelve equalized errors are the same symbol of the PRBS period, where
the coarse taps leave a small residual ISI. The test requires every
equalized window to stay below the 10⁻³ FEC limit.

## Simulating and changing it

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/cde_pkg.sv tb/tb_cde_top.sv --top-module tb_cde_top
./obj_dir/Vtb_cde_top
```

Replace `tb_cde_top` with any other testbench name to run that one.
`cde_pkg.sv` must come first because the other files import it.

Parameters:

- `LANES`: any even number, provided the clock rate times `LANES` covers the
  sample rate.
- `NTAPS`: must be odd.
- `DISP_K`: sets the dispersion.
- `CAP_DEPTH`: window length in words.

Widths follow from these parameters.
