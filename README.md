# Polyphase power-of-two subband filter bank for an HDTV codec

This is synthesizable SystemVerilog for the filter bank of a subband video
codec. It follows the architecture of the paper "A VLSI Filter Architecture for
Digital HDTV Codecs".

An image is split into ten frequency bands by repeated two-channel filtering,
and the bands are merged back into the image. Three ideas keep the hardware
small and fast:

* **Separable 2-D filtering.** Each 2-D step is a horizontal (X) 1-D filter
  followed by vertical (Y) 1-D filters. The Y filter is the X filter with its
  pel delays replaced by line delays.
* **Polyphase form.** The output is subsampled by two, so the filter is split
  into two half-length branches, one fed with the even samples and one with the
  odd samples. A single adder and a single subtractor (the *butterfly*) then
  produce the low-pass and the high-pass output together. The arithmetic runs at
  half the input rate.
* **Power-of-two coefficients.** Every tap is 0 or ±2^-k, so a multiplication is
  a wired shift. A filter is nothing but shifts and pipelined adders.

The analysis side and the synthesis side are independent. In the source design
they are two separate chips. Here they sit side by side in one top module,
`hdtv_filter_bank`.

## The filter pair

The coefficients are the low-pass prototypes below, counted from 0. The
registers reset to these values, and they can be reprogrammed.

| k | analysis h[k] | synthesis f[k] |
|---|---------------|----------------|
| 0 | 2^-6  | 2^-7 |
| 1 | 0     | 2^-3 |
| 2 | -2^-3 | 1    |
| 3 | -2^-7 | 1    |
| 4 | 1     | 2^-3 |
| 5 | 1     | 2^-7 |
| 6 | -2^-7 |      |
| 7 | -2^-3 |      |
| 8 | 0     |      |
| 9 | 2^-6  |      |

The high-pass filters are never stored. The analysis high-pass is
g[k] = (-1)^(k+1) h[k]. The polyphase butterfly produces this sign pattern, so
both filters need only the ten low-pass registers.

### Analysis (one dimension)

The input is x[n], n = 0, 1, ... along a line (or down a column). Samples before
n = 0 count as zero. For every output index m the filter computes

    F1[m] = sum_j h[2j]   x[2m - 2j]        (branch 1: even samples, h0 h2 h4 h6 h8)
    F2[m] = sum_j h[2j+1] x[2m - 1 - 2j]    (branch 2: odd samples,  h1 h3 h5 h7 h9)
    lp[m] = (F1 + F2) / 2
    hp[m] = (F2 - F1) / 2

This equals the full 10-tap convolution evaluated at every even position. The
halving is an arithmetic right shift. It gives the analysis/synthesis pair unit
gain: the DC gain of the analysis low-pass is about 0.883, and each phase of the
synthesis low-pass has about 1.133.

### Synthesis (one dimension)

The synthesis filter is the transpose of the analysis filter. The butterfly
comes first, and each input pair gives two output samples:

    s[m] = lp[m] + hp[m]        d[m] = lp[m] - hp[m]
    out0[m] = sum_j f[2j]   s[m - j]        (f0 f2 f4)
    out1[m] = sum_j f[2j+1] d[m - j]        (f1 f3 f5)

Put behind the analysis filter above, this rebuilds the input delayed by 8
samples: out0[m] ≈ x[2m - 7] and out1[m] ≈ x[2m - 6]. Each output pair is
therefore an odd-position sample followed by the next even one. Both this
phase and the sign of the high band were derived from the coefficient table.
The source does not state them; other phase and sign
combinations do not reconstruct the signal. The coefficients are only approximations of a
perfect-reconstruction pair, so the error is small but not zero. On a synthetic
720x576 test frame, three analysis steps followed by three synthesis levels give
58.3 dB SNR. The source reports more than 46 dB on its own images.

## Number format

* Samples between filters are 16-bit two's complement with 5 fraction bits
  (`filt_pkg::DATA_W`, `FRAC_BITS`). An 8-bit pixel p enters as p·32.
* Inside a filter, sums are 18 bits wide (2 guard bits). A tap is the
  sign-extended sample shifted right arithmetically by k, with the low bits
  dropped. The tap's sign is applied by the adder/subtractor that adds it in.
* Outputs are the low 16 bits of the sum, after the halving on the analysis
  side. No saturation is needed for 8-bit input. The worst-case gain per 1-D
  analysis pass is sum|h|/2 ≈ 1.15, so after six passes a sample stays below
  about 600, well inside the ±1024 range.

## Vertical filters and line delays

`vfilter_analysis` keeps the nine previous rows of the current column in a
cascade of nine line delays (`line_delay`, LINE_W samples each). The cascade
advances with every input sample. Every delay output is therefore the sample of
the current column, k rows up. The arithmetic is done only while an even row
streams in:

* branch 1 takes rows 2m, 2m-2, ..., 2m-8;
* branch 2 takes rows 2m-1, ..., 2m-9.

So one branch delay of the published block diagram spans two line delays of the
cascade. Odd rows only fill the delays.

`vfilter_synthesis` holds two rows of s and two rows of d: four line delays,
each 18 bits wide. For every input column it gives the samples of two output
rows at once.

Rows above the first row and samples left of the first column count as zero.
Those taps are masked through a small saturating row or column counter.

## The pyramid and band numbering

    step 1 (720 wide): X -> LPx, HPx ; Y on each
        LPx,LPy -> step 2 input     LPx,HPy = VIII   HPx,LPy = IX   HPx,HPy = X
    step 2 (360 wide): same         -> step 3 input, V, VI, VII
    step 3 (180 wide): same         -> I (low/low), II, III, IV

`analysis_stage` is one step: one X filter and two Y filters. It takes an
IMG_W-wide stream and emits one `bands_t` (ll, lh, hl, hh) for each 2x2 input
pixels. In `bands_t`, `lh` means low-X/high-Y. `analysis_pyramid` chains three
steps, each with its own hardware. Step 2 is busy a quarter of the time and
step 3 a sixteenth. The low/low outputs of steps 1 and 2 (`ana_step1.ll`,
`ana_step2.ll`) are also the two low-pass images a motion estimator can use.

`synthesis_stage` is one synthesis level. Two Y synthesis filters rebuild the
low-X image from (ll, lh) and the high-X image from (hl, hh), two rows at a
time. Two X synthesis filters, one per output row, merge the two images. Each
band sample (row m, column n) yields a 2x2 block `blk.px[r][c]`. With the
analysis stage above, this block holds original rows 2m-7+r and columns
2n-7+c. The top has three levels with band widths 360, 180 and 90. Each level
has its own band input: in a codec the bands pass through band memory and the
quantiser between the two sides. To rebuild a full frame, place the blocks of
level 3 into an image, then feed that image with bands V..VII to level 2, and so
on. `tb/tb_hdtv_filter_bank.sv` does exactly this. The last few band samples at
the right and bottom edges are never produced, so the last ~8 samples per level
are not rebuilt.

## Pipelined prefix adder/subtractor

Every addition in the design is a `prefix_addsub`, with one register stage
per level:

1. Per bit, P = A xor B' and G = A and B'. For a subtraction, B' = not B, and
   the carry-in slice is folded into bit 0 as G0 | P0·sub.
2. One stage per prefix level, Kogge-Stone style: bit i combines its
   (G, P) group with the group 2^l bits below through the Δ operator,
   (g, p) Δ (g', p') = (g | p·g', p·p').
3. S = P xor carry.

The latency is clog2(WIDTH) + 2 cycles. That is 6 cycles for 16 bits and 7 for
20 and 24 bits, the pipeline depths of the original adders. The filters use
18-bit adders (7 cycles). A branch of n taps is a chain of n adders (`branch_sum`).
Each tap is delayed by one adder latency per position so that it meets the
running sum.

## Stream interface and timing

All filters use the same stream:

* one sample per clock, qualified by `valid`;
* `sol` marks the first sample of a line;
* `sof` marks the first sample of a frame (with `sol`).

Idle cycles may appear anywhere. Every line must have the module's line width
of valid samples. Lines must have an even length, and frames an even number of
rows. The arithmetic pipeline runs freely; a reset tag pipeline (`tag_pipe`)
carries valid/sol/sof alongside the data. Latencies count from the input
sample that completes an output to that output:

| module | latency (cycles) |
|---|---|
| `prefix_addsub` (16 / 18 / 20 / 24 bits) | 6 / 7 / 7 / 7 |
| `hfilter_analysis`, `vfilter_analysis` | 1 + 6·7 = 43 |
| `analysis_stage` | 86 |
| `hfilter_synthesis`, `vfilter_synthesis` | 7 + 1 + 3·7 = 29 |
| `synthesis_stage` | 58 |

Throughput is one input sample per clock for every module.

## Coefficient programming

Each coefficient is a 5-bit `coef_t`: `{nz, neg, shift[2:0]}`, with value
`nz ? (neg ? -1 : 1) · 2^-shift : 0`. `coef_bank` holds one set: 10 analysis
taps or 6 synthesis taps. It resets to the table above. The top writes a set
with `coef_we`, `coef_sel` (0 analysis, 1 synthesis), `coef_addr` and
`coef_wdata`. All analysis filters share one set, and so do all synthesis
filters. Write the coefficients before a frame starts. Changing them mid-frame
mixes the two sets in the pipelines.

## Files

| file | content |
|---|---|
| `rtl/filt_pkg.sv` | widths, `coef_t`, `tag_t`, `bands_t`, `block_t`, default coefficients, Δ operator |
| `rtl/hdtv_filter_bank.sv` | top: coefficient banks, analysis pyramid, three synthesis levels |
| `rtl/analysis_pyramid.sv`, `rtl/analysis_stage.sv` | three analysis steps; one step |
| `rtl/synthesis_stage.sv` | one synthesis level |
| `rtl/hfilter_analysis.sv`, `rtl/vfilter_analysis.sv` | X and Y polyphase analysis filters |
| `rtl/hfilter_synthesis.sv`, `rtl/vfilter_synthesis.sv` | X and Y polyphase synthesis filters |
| `rtl/analysis_core.sv`, `rtl/synthesis_core.sv` | tap shifting, branches and butterfly shared by the X and Y filters |
| `rtl/branch_sum.sv` | shift-and-add chain of one branch |
| `rtl/prefix_addsub.sv` | pipelined prefix adder/subtractor |
| `rtl/line_delay.sv` | line delay (enabled shift register) |
| `rtl/coef_bank.sv` | coefficient registers |
| `rtl/pipe_delay.sv`, `rtl/tag_pipe.sv` | data and tag alignment delays |
| `tb/filt_ref_pkg.sv` | bit-exact reference model (direct convolutions) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
ends the run if it hangs. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_hdtv_filter_bank \
        rtl/filt_pkg.sv tb/filt_ref_pkg.sv rtl/*.sv tb/tb_hdtv_filter_bank.sv
    ./obj_dir/Vtb_hdtv_filter_bank

What each testbench does:

* The unit testbenches compare every output with the reference model. They also
  check the exact cycle at which each output appears. Their inputs are random
  data with random idle cycles, run over two frames.
* `tb_prefix_addsub` checks the adder at 16, 20 and 24 bits.
* `tb_hdtv_filter_bank` runs the whole design at its default size, 720x576, in
  four parts:
  1. It programs the coefficients. A short run with an altered analysis set
     checks that the new set takes effect.
  2. It decomposes a frame, with random idle cycles, and checks all ten bands
     bit-exactly.
  3. It rebuilds the frame through the three synthesis levels. Level 3's blocks
     are checked bit-exactly.
  4. It requires a reconstruction SNR above 46 dB, measured away from the right
     and bottom borders.

  The run takes about a minute after a two-minute build.

## Departures from the source and limits

* **Circuit level.** The source builds everything in a single-clock dynamic
  logic style (DOMINO/TSPC "MIX" sections), with TSPC-latch line delays and
  about 200 MHz from 1.2 µm CMOS. This RTL uses ordinary edge-triggered
  registers. The line delays become enabled shift registers, and nothing here
  predicts clock speed or area.
* **Nine line delays.** The source counts 10 line delays for the analysis Y
  filter and 6 for the synthesis one. This design needs 9 and 4 (18 bits wide).
* **Coefficient range.** The text lists the programmable values as 0 and
  2^-1..2^-7. The coefficient table also needs 2^0 and negative values, so the
  code covers ±2^0..2^-7 and 0.
* **Design choices.** The source gives none of the following; they are choices
  of this design:
  * word widths and the fixed-point format;
  * the analysis halving;
  * border handling (zero padding);
  * the synthesis phase and butterfly sign;
  * the stream protocol;
  * the Kogge-Stone prefix tree;
  * the adder chain that starts from zero;
  * the 2x2-block output of the synthesis levels.
* **Outside this RTL.** There is no reordering or band memory between synthesis
  levels, and no motion estimation or vector quantiser. These belong to the
  codec around the filters.
