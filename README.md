# Polymorphic 5/3 – 9/7 wavelet filter, folded and multiplier-free

JPEG 2000-style image coding uses two wavelet filter pairs: Le Gall's 5/3, which is exact
in integers, and the Daubechies 9/7, which compresses better but has irrational taps. This
design computes both pairs with one small datapath that has no multipliers, and switches
between them on the fly. It follows the polymorphic wavelet architecture of "High Speed,
Low complexity, Folded, Polymorphic Wavelet Architecture using Reconfigurable Hardware"
(Int. J. Computer Applications 2(5), 2010). The main ideas:

* **Rational 9/7 taps.** The 9/7 pair comes from a Lagrange half-band design with one free
  factor α. At α = −2 every tap is a sum of powers of two, so every product is a shift.
* **9/7 = 5/3 + correction.** At α = −2 the 9/7 pair differs from the 5/3 pair by only two
  power-of-two terms per band. The 5/3 result is computed in every mode. In 9/7 mode a
  correction is added to it.
* **Folding.** A DWT makes one low-pass and one high-pass output per pair of input samples.
  Both are computed by the same adders on alternate cycles. A band-select line chooses
  which one the adders compute in a given cycle.
* **Scheduling.** The additions are ordered by when their inputs become available and by
  adder delay. The 9/7 correction is therefore formed beside the 5/3 sums, not after them.
  The 9/7 result costs one adder level more than the 5/3 result, not a second filter
  chain.

A 2-D transform (`dwt2d`) wraps the filter. It sends every image row and then every
column through the same filter.

## The filter pair

All taps are multiples of 1/64. Below, `wk = x(n−k) + x(n+k)` is the sum of a symmetric
pair of samples around the centre sample `x(n)`.

| band | 5/3 | 9/7, α = −2 |
|------|-----|-------------|
| low  | [−1, 2, 6, 2, −1] / 8 | [1, 0, −8, 16, 46, 16, −8, 0, 1] / 64 |
| high | [−1, 2, −1] / 2 (centre +1) | [1, 0, −9, 16, −9, 0, 1] / 32 |

The 9/7 low-pass is the α = −2 analysis low-pass. The 9/7 high-pass is the modulated
complementary filter, `H1(z) = z⁻¹ F0(−z)`. `F0` = [−1, 0, 9, 16, 9, 0, −1]/16 is the
7-tap filter whose product with the low-pass is half-band. This design follows the
published correction equation and delivers the 9/7 high-pass at **half scale**: its centre
tap is 1/2, while the 5/3 high-pass centre tap is 1.
A decoder or quantiser that uses this output must allow for the factor of two.

Written as corrections to the 5/3 pair:

```
low97  = low53        − x(n)/32 + w4/64
high97 = high53 / 2   − w1/32   + w3/32
```

## The folded datapath (`poly_dwt_filter`)

Every value inside the filter is held exactly, at 64 times its true value. Each adder is a
`folded_adder`: one add/subtract unit with two operand sets. Slot 0 holds the low-pass
operation and slot 1 the high-pass operation.

| adder | slot 0 (low-pass) | slot 1 (high-pass) | module |
|-------|------------------|--------------------|--------|
| A1 | w1 = x(n−1) + x(n+1) | same | `poly_dwt_filter` |
| A2 | w2 | w3 | `poly_dwt_filter` |
| A3 | w4 | same (unused) | `poly_dwt_filter` |
| A4 | 2x + x | 2x − w1 | `lg53_core` |
| A5 | 16·A4 + 16·w1 | 16·A4 (9/7) or 32·A4 (5/3), + 0 | `lg53_core` |
| A6 | A5 − 8·w2 → 64·low53 | A5 → 64·high53 (÷2 in 9/7) | `lg53_core` |
| A7 | w4 − 2x | 2·w3 − 2·w1 | `cdf97_correction` |
| A8 | base + (9/7 ? A7 : 0) | same | `cdf97_correction` |
| A9 | +32, then arithmetic shift right by 6 (round) | same | `poly_dwt_filter` |

That is nine adders and no multipliers. An unfolded version needs twelve filter adders
besides rounding: separate low-pass and high-pass paths that share only the pair sum w1.
Adders A3 and A5 do no useful work in the high-pass slot. Every adder on the high-pass
path is also needed by the low-pass path.

Pipeline and schedule:

```
cycle c     sample with in_valid (and in_emit/in_band/in_mode)
edge  c+1   tap_window holds x(n+4) .. x(n−4); select lines registered
edge  c+2   A1–A3 pair sums registered                     (DFG level 1)
edge  c+3   A4, A7 → A5 → A6 → A8 → A9, output registered  (levels 2–5)
```

Every output appears exactly three cycles after it was requested, whatever its band and
wavelet. The filter accepts one sample per cycle. It never stalls. The band and the
wavelet select travel with each request, so both may change on any sample.

The request interface is the part most likely to surprise a user. The window completed by
a sample is centred **four samples back**. An output for centre `x(n)` is therefore
requested with `in_emit = 1` on the cycle that delivers `x(n+4)`. `in_band` says whether
that centre gives a low-pass (even centre) or a high-pass (odd centre) output. The
controller decides which centres produce outputs. The filter itself does not downsample.

### Number format

* Samples are signed 16-bit words with 4 fractional bits (`dwt_pkg::DATA_W`, `FRAC_BITS`).
  An 8-bit pixel `p` enters as `p·16`.
* The internal width is 24 bits (`ACC_W`), which is exact for every tap set.
* Outputs are rounded to the nearest value, with ties going upward, back to the 16-bit
  sample format.
* The largest gain of any band is 2. Two passes over 8-bit pixels therefore stay within
  ±1020, well inside the 12 integer bits. A simulation assertion fires if an output would
  not fit.

## The 2-D transform (`dwt2d`)

Frame buffer A holds the image. Frame buffer B holds the row-pass result.

1. **Row pass.** Each row of A is streamed through the filter. Low-pass outputs go to the
   left half of the same row of B, high-pass outputs to the right half.
2. **Column pass.** Each column of B is streamed through the same filter. Low-pass outputs
   go to the top half of the column in A, high-pass outputs to the bottom half.

Afterwards A holds four quarters: LL (top left), HL (top right), LH (bottom left) and
HH (bottom right).

Each line of `N` samples is fed as `x(4) x(3) x(2) x(1) x(0) x(1) … x(N−1) x(N−2) …
x(N−5)`. This is whole-sample symmetric extension by four samples at each end, which is
the reach of the 9-tap filter. The first eight samples of a line only fill the window.
After that, every sample requests an output, for centres 0 … N−1. Lines follow each other
with no gap. A pass waits until its last output is written before the next pass starts
reading.

A frame takes `ROWS·(COLS+8) + COLS·(ROWS+8) + 8` cycles: 9224 cycles at the default
64 × 64.
Ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `start` | in | 1 | one-cycle pulse, accepted while `busy` is low |
| `mode` | in | `wavelet_t` | `WAV_53` or `WAV_97`, captured at `start` for the whole frame |
| `busy`, `done` | out | 1 | frame in progress; one-cycle pulse at the end |
| `host_we`, `host_addr`, `host_pixel` | in | 1, 12, 8 | load a pixel into A (address `row·COLS + col`) |
| `host_raddr` → `host_rdata` | in → out | 12 → 16 | read a coefficient from A, one cycle later |

The host port may only be used while `busy` is low. `ROWS` and `COLS` must be even and at
least 6.

## Files

| file | contents |
|------|----------|
| `rtl/dwt_pkg.sv` | band and wavelet enums, word widths |
| `rtl/folded_adder.sv` | two-slot shared add/subtract unit |
| `rtl/tap_window.sv` | 9-sample serial delay line |
| `rtl/lg53_core.sv` | 5/3 part shared by both filters (A4–A6) |
| `rtl/cdf97_correction.sv` | 9/7 correction and filter switch (A7, A8) |
| `rtl/poly_dwt_filter.sv` | the complete folded, pipelined filter |
| `rtl/frame_buffer.sv` | one-frame synchronous dual-port memory |
| `rtl/dwt2d.sv` | top: controller, two frame buffers, one filter |

## Simulation

Every testbench checks its own results and ends by printing
`TB_RESULT checks=N failures=M`. Each compares the RTL with values worked out in a
different way: direct convolution with the tap tables, not the shift-and-add
decomposition.

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dwt_pkg.sv tb/tb_dwt2d.sv \
          --top-module tb_dwt2d
./obj_dir/Vtb_dwt2d
```

| testbench | what it shows |
|-----------|---------------|
| `tb_dwt2d` | default 64 × 64 frame, once in 9/7 and once in 5/3, every coefficient against a software 2-D DWT; frame time; counts both passes, bands, wavelets and boundary extensions |
| `tb_dwt2d_rect` | the same on a 10 × 16 image, which would expose a row/column mix-up |
| `tb_filter_impulse` | impulse response of the four filters equals the tap tables; 3-cycle latency |
| `tb_poly_dwt_filter` | random stream with gaps and per-sample band and wavelet switching |
| `tb_lg53_core`, `tb_cdf97_correction`, `tb_folded_adder`, `tb_tap_window`, `tb_frame_buffer` | each unit against its equations |

The full-size frame test runs in well under a second.

## How far it follows the published architecture

These parts follow the published architecture:

* the α = −2 taps
* the 5/3-plus-correction equations
* nine adders and no multipliers
* the low/high and 5/3 / 9/7 select lines
* serial 8-bit image input
* rows filtered first, then columns, with the same filter

These parts are this design's own choices:

* **Missing drawings.** The block diagram of the folded filter and the folded-adder
  drawing are not available. The adder assignment and the pipeline cut above are
  reconstructed from the equations and from the published adder counts (9 folded,
  12 unfolded).
* **Word widths, rounding, reset and the per-sample request interface.**
* **The 2-D wrapper.** This covers the image size (64 × 64), the two frame buffers, the
  subband layout, the symmetric extension and the host port. Only one decomposition level
  is built. Further levels would run the same frame flow again on the LL quarter; no
  controller for that is included.
* **Scheduling.** This was an off-line step on the data-flow graph, weighted by FPGA adder
  delays. Its outcome is built in as the order of the adders. The published
  scheduled/unscheduled timings (for example 16 µs against 28 µs for the 9/7 low-pass)
  are FPGA measurements and are not reproduced. Here all four filters have the same
  3-cycle latency and a throughput of one output per cycle.
* **Not built.** The unfolded and unscheduled variants, which exist only as baselines.
  The LUT and power figures are not reproduced.
