# Discrete wavelet transform engines for image compression

Wavelet image coders start by splitting an image into frequency bands: a
coarse low-pass copy and detail (high-pass) bands, repeated on the low-pass
copy for several resolution levels. Neighbouring pixels are strongly
correlated, so most detail coefficients come out near zero and compress well.
This repository holds two hardware engines that compute this discrete wavelet
transform (DWT) on small image tiles:

* **Lifting engine** (`dwt_lift_top`, the main design). It computes the 5/3
  wavelet by *lifting*: the line is split into even and odd samples, the odd
  samples are predicted from their even neighbours, and the even samples are
  updated from the prediction errors. The engine works on integers and is exactly
  reversible. It does 1D (rows), 2D (rows and columns) or 3D (rows, columns and
  frames of a volume), at one to three resolution levels, forward or inverse.
* **Convolution engine** (`conv_dwt_top`). It filters with four-tap low-pass
  (H) and high-pass (G) filters and keeps every second output. One pipelined
  single-precision floating-point multiply-accumulate unit (MAC) does all the
  arithmetic. A table of multiplexer select lines, read at an address that
  counts up every clock, sequences it. It does 1D or 2D at one to three levels,
  forward only.

The lifting scheme exists to be cheaper than convolution: a 5/3 line costs two
adds and a shift per sample, where the filter bank needs four multiply-adds per
output. The convolution engine is the floating-point reference point that the
lifting engine is compared with. `dwt_top` puts the two side by side; apart
from the clock and reset they share nothing.

Both engines work on 8 x 8 tiles by default. The lifting engine always
loads a volume of 8 such tiles (frames). In 1D and 2D mode it transforms each
frame as its own tile. In 3D mode it also transforms along the frame axis.

## The 5/3 lifting step (`lift53_line`)

For a line `x[0..len-1]` with `half = len/2`, split it into even samples
`e[i] = x[2i]` and odd samples `o[i] = x[2i+1]`, then compute:

```
predict  d[i] = o[i] - floor((e[i] + e[i+1]) / 2)          high-pass
update   s[i] = e[i] + floor((d[i-1] + d[i] + 2) / 4)      low-pass
scale    y[i] = round(s[i] / k),   y[half+i] = round(d[i] * k)
```

The neighbours that fall off the ends of the line are mirrored:
`e[half]` is replaced by `e[half-1]`, and `d[-1]` by `d[0]`. This is the
whole-sample symmetric extension used with the 5/3 wavelet in JPEG 2000.

The output puts the low-pass half first and the high-pass half after it. The
inverse undoes the scaling, subtracts the update, adds the prediction back and
interleaves the halves. Because both steps use the same floor expressions, the
integer transform is exactly reversible.

`k` and `1/k` are parameters in unsigned fixed point with 14 fraction bits.
Both default to 1.0, which gives the reversible integer transform. If you set
`k` to any other value, such as the energy-normalising sqrt(2), the round trip
is no longer exact.

The block is purely combinational and transforms all of a line at once. Words
at positions `len..N-1` pass through unchanged, so the shorter lines of later
levels use the same hardware. Inside the block, sums carry 3 bits of headroom.
Results are truncated to `W` bits on output.

## Lifting engine (`dwt_lift_top`)

```
                 +-------------------+
 in stream ----->|  line buffer      |-----> out stream
                 |  (N*N*F words)    |
                 +---+-----------^---+
              read   |           | write back
                     v           |
                 +---------------+---+      +--------------+
                 |  PIPO line reg.   |<---->| lifting block|
                 |  (N words)        |  q / par_in (1 clock)
                 +-------------------+      +--------------+
                        ^ control: dwt_ctrl
```

* **Line buffer** (`dwt_line_buffer`). A single-port synchronous RAM that
  holds the whole tile or volume, addressed `f*N*N + r*N + c` (raster order,
  column fastest). Row passes read consecutive words. Column and frame passes
  read with a stride of `N` or `N*N`, which gives the transposition between
  passes without a separate transpose buffer.
* **PIPO** (`pipo_reg`). A parallel-in, parallel-out register of one line. It
  is filled word by word from the buffer, presented to the lifting block as a
  whole, and overwritten by the result in one clock. The line is then written
  back to the same addresses, so every pass works in place.
* **Controller** (`dwt_ctrl`). Runs load, then the transform passes, then
  unload.

### Passes and levels

`cfg.dims` chooses which axes are transformed: rows (1), plus columns (2),
plus frames (3). At level `l`, the active region along a transformed axis is
its size shifted right by `l`, which is the low-pass corner left by the
previous level. Along an axis that is not transformed, the active region is the
full size.

* **Forward.** Level 0 first. Within a level, rows, then columns, then frames.
* **Inverse.** The same passes in exactly the reverse order: highest level
  first, and frames, then columns, then rows within a level.

After a forward run, the coarsest low-pass band sits in the corner at
index 0. Each transformed line holds its low band before its high band (the
usual Mallat layout), so a 2D two-level result is laid out as:

```
LL2 HL2 | HL1
LH2 HH2 |
--------+----
  LH1   | HH1
```

`cfg.levels` is clamped to log2 of the smallest transformed size: 3 for the
default sizes. `dims = 0` or `levels = 0` passes the data through unchanged.

### Timing

Each line costs `2*len + 3` cycles:

* `len` reads;
* one cycle for the last read word to arrive;
* one cycle in which the PIPO takes the lifting result;
* `len` writes;
* one cycle to step to the next line.

A load takes one cycle per accepted sample. An unload takes two cycles per
word, because the RAM has one cycle of read latency.

From the last load handshake to the first output word, a run takes the sum of
`2*len + 3` over all lines, plus one cycle.

For example, take a 2D transform at two levels on the default volume, where
each of the 8 frames is transformed as its own tile:

* level 0 has 128 lines of length 8;
* level 1 has 64 lines of length 4.

That gives:

```
128 x 19 + 64 x 11 + 1 = 3137 cycles
```

## Convolution engine (`conv_dwt_top`)

### Filters

The four-tap filters use the Daubechies D4 wavelet:

```
h = [1+sqrt3, 3+sqrt3, 3-sqrt3, 1-sqrt3] / (4 sqrt2)
g = [h3, -h2, h1, -h0]
```

Each coefficient is rounded to single precision and stored in `conv_pkg`. For a
line of length `L`, output `j` is:

* low-pass, for `j < L/2`: `sum_k h[k] * x[(2n+k) mod L]` with `n = j`
* high-pass, for `j >= L/2`: `sum_k g[k] * x[(2n+k) mod L]` with `n = j - L/2`

The line is extended periodically. Eight samples therefore give 4 + 4 outputs
at the first level, 2 + 2 at the second and 1 + 1 at the third.

### MAC (`fp_mac`, `fp_mul`, `fp_add`)

The MAC has one pipeline stage: `product_q <= a*b`, then `acc <= init ?
product_q : acc + product_q`. With `init = 1` it only multiplies, which starts
a new sum. It rounds once after the multiply and once after the add, to
nearest-even, in IEEE 754 single precision.

The multiplier and adder are simplified:

* zero and subnormal inputs are treated as zero;
* results below the normal range are flushed to zero;
* results above it become infinity;
* NaN and infinity get no special treatment.

DWT data never reaches those cases.

### Select-line table and address counter (`conv_sel_lut`, `conv_dwt1d`)

This is the least obvious part of the design. The 1D unit has no state machine
of its own. An address register `Addr` starts at the table section for the line
length and goes up by one every clock. Each table word drives the datapath for
that clock:

| field        | meaning                                                    |
|--------------|------------------------------------------------------------|
| `mac_en`     | issue a tap to the MAC                                     |
| `init`       | first tap of a sum (multiply only)                         |
| `s0`         | sample multiplexer: which word of the working line         |
| `s1`         | coefficient multiplexer: h0..h3 (0-3) or g0..g3 (4-7)      |
| `wr`, `widx` | store the accumulator into output register `widx`          |
| `commit`, `clen` | copy the first `clen` outputs over the working line    |
| `last`       | end of a level                                             |

A section for length `L` lasts `4L + 3` clocks:

* **Clocks `4j .. 4j+3`.** The four taps of output `j`.
* **Clock `4j+1` (for `j > 0`).** Output `j-1` is stored. With the one-stage
  pipeline, a tap issued in clock `c` reaches the accumulator at the end of
  clock `c+1`. So the finished sum of output `j-1` is in the accumulator during
  clock `4j+1`, one clock before the first tap of output `j` replaces it.
* **Clock `4L`.** Idle, while the last product drains.
* **Clock `4L+1`.** Output `L-1` is stored.
* **Clock `4L+2`.** The outputs replace the working line (commit).

Sections for `L = N, N/2, ..., 2` are stored back to back: 35 + 19 + 11 = 65
words for `N = 8`. A run that starts at address 0 and keeps counting therefore
performs the complete `8 -> 4 -> 2 -> 1` decomposition of a line.

The table is computed at elaboration from the expressions above, so no data
file is needed.

The 1D unit takes `1 + sum(4L + 3)` clocks:

* one clock for `start`;
* one section per level it runs.

### Tile schedule (`conv_ctrl`)

The controller uses the same line-buffer, PIPO and write-back scheme as the
lifting engine, with a 32-bit-wide 8 x 8 buffer.

* **2D.** For each level: the rows of the active corner, then its columns
  (read with stride `N`), one level per line.
* **1D.** Each row once, with the 1D unit running all levels itself through
  consecutive table sections.

Each line costs `2*len + 4` cycles plus the 1D unit's own time. For example,
the 8 x 8 2D transform at two levels takes:

```
16 x (20 + 36) + 8 x (12 + 20) + 1 = 1153 cycles
```

## Run protocol (both engines)

| port | dir | meaning |
|------|-----|---------|
| `start_i`, `cfg_i` | in | pulse while idle. `cfg_i` is `{inverse, dims[1:0], levels[2:0]}` (`dwt_pkg::dwt_cfg_t`) |
| `in_valid_i`, `in_ready_o`, `in_data_i` | in/out/in | load stream: N*N*F (lifting) or N*N (convolution) words, raster order |
| `out_valid_o`, `out_ready_i`, `out_data_o`, `out_last_o` | out/in/out/out | unload stream, raster order. `out_last_o` marks the final word |
| `busy_o`, `done_o` | out | run in progress. `done_o` pulses once after the last word |

The lifting engine takes signed 16-bit words; pixels are zero-extended.

The convolution engine takes and returns IEEE single-precision bit patterns.
It ignores `cfg_i.inverse`, and treats `dims` other than 1 as 2D.

Reset `rst_n` is asynchronous and active low. The buffers are not reset;
every word is written by the load before it is read.

## Parameters

| module | parameter | default | note |
|--------|-----------|---------|------|
| `dwt_lift_top` | `N` | 8 | tile side (the 8 x 8 example tile) |
| | `F` | 8 | frames in a 3D volume (own choice) |
| | `W` | 16 | signed word width (own choice) |
| | `K_Q`, `KINV_Q` | 16384 | k and 1/k, Q2.14 (1.0) |
| `conv_dwt_top` | `N` | 8 | tile side; table fields are sized for N <= 8 |

`N` and `F` must be powers of two.

## Where this implementation makes its own choices

The source describes the lifting architecture as three parts: line buffers, a
PIPO and a lifting block. It gives the 5/3 lifting equations and the
floating-point MAC convolution structure. A good deal is left open, and is
decided here as follows:

* **Filter constants.** No coefficient values are given. The lifting engine
  uses the standard 5/3 constants (predict -1/2, update 1/4) with JPEG 2000
  rounding and `k = 1`. The convolution engine uses Daubechies D4.
* **Update step.** The update is taken as `s[i] = e[i] + (d[i-1] + d[i])/4`,
  the standard 5/3 form. The printed update step uses a different neighbour.
* **Split phase.** Samples are numbered from 0, and the odd-numbered ones are
  predicted from their even neighbours, as in JPEG 2000. Numbering from 1 and
  predicting the odd-numbered samples gives the same split with the other
  phase predicted.
* **One MAC for both filters.** The high-pass filter is drawn as a unit of its
  own, but its insides are not specified. Here a single MAC computes the
  low-pass and the high-pass outputs of a line in turn, in the order the
  select-line table gives.
* **Separable processing.** The lifting engine is described as working in a
  non-separable fashion, but only the row-then-column procedure is spelled
  out. This implementation is separable: rows, columns and frames in turn,
  through one line path.
* **Inverse scaling.** "k negated" for the inverse is read as scaling by the
  reciprocal.
* **Single lifting block.** One lifting block transforms a whole line per
  clock. Line buffering is a full tile or volume buffer with strided access,
  and the transform works in place.
* **Own choices.** The line-end extensions (symmetric for lifting, periodic for
  convolution), the word widths, the 3D volume depth, the stream interfaces,
  level clamping and the output layout are all this implementation's own
  choices.
* **Floating-point format.** IEEE single precision, with the simplifications
  listed above.
* **Input format.** The convolution engine takes floating-point input. No
  integer-to-float converter is included.
* **Vector quantisation not included.** The surrounding compression flow
  applies a self-organising-map vector quantiser before the wavelet stage. No
  hardware for it is described, so none is included.
* **FPGA figures not reproduced.** Area and timing figures quoted for FPGA
  implementations (LUT counts, critical paths of a few ns) are not reproduced
  or targeted here. For reference, a coarse generic synthesis of `dwt_top`
  gives about 840 word-level cells, 1046 flip-flop bits and 10.5 kbit of
  memory.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_lift53_line` | random lines of length 8/4/2, forward and inverse, k = 1 and k = sqrt2, against `dwt_ref_pkg`; exact round trip |
| `tb_pipo_reg` | word writes, parallel loads, priority, reset |
| `tb_dwt_line_buffer` | random writes and reads, read latency and hold |
| `tb_dwt_ctrl` | every line-buffer access, PIPO load length and direction against an independently built schedule; 2*len+3 cycles per line; clamping; pass-through |
| `tb_dwt_lift_top` | all modes and level counts on random 8-bit volumes against the reference, inverse round trip, cycle counts, input gaps and output stalls |
| `tb_fp_mac` | 3000 four-tap dot products, bit-exact against a model rounding to single precision after every operation |
| `tb_conv_sel_lut` | replays the table through a model datapath and compares with the D4 sums; section lengths and depth |
| `tb_conv_dwt1d` | lines of length 8/4/2 for 1-3 levels, bit-exact against the reference; 1 + sum(4L+3) cycles |
| `tb_conv_ctrl` | tile-buffer accesses, lengths and level counts per line, with a stand-in 1D unit of random latency |
| `tb_conv_dwt_top` | 1D and 2D at 0-4 levels (clamped), bit-exact, cycle counts, stream gaps and stalls |
| `tb_dwt_top` | both engines at full size at the same time: lifting 1D/2D/3D forward and inverse, convolution 2D 2 levels, 1D 3 levels, 2D 3 levels |

The reference models in `tb/dwt_ref_pkg.sv`, `tb/conv_ref_pkg.sv` and
`tb/fp_ref_pkg.sv` are plain behavioural code. They share no code with the RTL.
`fp_ref_pkg` converts reals to single precision itself.

To run a testbench with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/dwt_pkg.sv rtl/conv_pkg.sv tb/fp_ref_pkg.sv tb/conv_ref_pkg.sv tb/dwt_ref_pkg.sv \
    tb/tb_dwt_top.sv --top-module tb_dwt_top
./obj_dir/Vtb_dwt_top
```

Replace `tb_dwt_top` with any other testbench name. Every testbench finishes in
a few seconds.

To lint the design:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/dwt_pkg.sv rtl/conv_pkg.sv rtl/dwt_top.sv
```

Lint prints these expected warnings:

* **Unused package constants.**
* **Inverse bit unused.** `cfg_i.inverse` is not read by the convolution
  controller.
* **Reset used both ways.** `rst_n` is used both as an asynchronous reset and
  in assertion `disable iff` clauses.
