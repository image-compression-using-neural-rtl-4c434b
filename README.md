# Multiplier-free 9/7 DWT processor (distributed arithmetic)

This RTL computes the two-dimensional 9/7 discrete wavelet transform of a
256 x 256, 8-bit image without a single multiplier. It runs one level, or up to five
levels in which every sub-band is split again until the image is 1024 sub-blocks of
8 x 8. The transform is the front end of an image-compression scheme. The image is
split into sub-bands, and the sub-bands (rather than raw 8 x 8 pixel blocks, which
cause blocking artefacts) are passed on to a small neural-network coder. The coder
is not part of this RTL.

Every FIR product is replaced by **distributed arithmetic (DA)**. Samples enter
bit-serially. In each cycle, one bit from each sample forms an address into a
small ROM of precomputed coefficient sums. A shift-and-add accumulator turns those
partial sums into the filter output. Two refinements keep the ROMs tiny:

* **Symmetry.** The 9/7 taps are symmetric, so the two samples that share a
  coefficient are added *before* the DA stage. The 9-tap low pass then needs 5
  address bits and the 7-tap high pass 4.
* **Split LUTs.** Instead of one ROM with 2^5 = 32 entries, the address bits are
  split over two ROMs: 4 + 8 = 12 entries for the low pass and 4 + 4 = 8 for the high
  pass.

A second filter variant replaces the first taps' ROM with one 2:1 multiplexer per
tap. It is selectable by a parameter and described below.

## The filters in integers

| tap        | 0  | 1   | 2    | 3   | 4   | 5    | 6   | 7   | 8  | scale |
|------------|----|-----|------|-----|-----|------|-----|-----|----|-------|
| low pass h | 27 | -17 | -80  | 273 | 617 | 273  | -80 | -17 | 27 | 2^10  |
| high pass g| 47 | -29 | -303 | 569 | -303| -29  | 47  |     |    | 2^9   |

The values are the CDF 9/7 analysis coefficients times 1024 (low pass) or 512 (high pass),
rounded. The centre high-pass tap is 569, although 1.1150870 x 512 rounds to 571,
so the high-pass taps sum to -1 instead of 0. A DC input therefore leaks about
0.2 % into the high band. To restore an exact zero-DC high pass, change the
569 in `dwt_pkg.sv` to 571 or 570.

Filter outputs are exact integer sums. The 1D processor divides them by 2^10 or 2^9,
with round-half-up, so every pass stays on the pixel scale. The low-pass gain at DC is
1023/1024.

## Modified DA filter (`da_sym_filter`)

```
ser_in ─► SISO[0] ─► SISO[1] ─► … ─► SISO[TAPS-1]        (W bits each, one long shift register)
             │  pre-adders: SISO[k] + SISO[TAPS-1-k], centre passed on
             ▼
          PISO[0..NP-1]  (W+1 bits, loaded on `start`, shift right each cycle)
             │ LSBs
     ┌───────┴────────┐
  top ROM (2 bits)   bottom ROM (3 bits LP / 2 bits HP)
     │                 │
  acc_top            acc_bot      acc <= (acc + rom << B) >>> 1, B = W+1 cycles
     └──── + ──────────┘ ─► y
```

* **Loading.** Samples are shifted in LSB first, one bit per cycle. After W shifts every
  sample has moved one register down the chain.
* **Start (1 cycle).** The pre-adders' outputs are latched into the PISO registers.
  Because the SISO chain and the PISO registers are separate, the next sample can be
  shifted in while the current window is accumulated.
* **Accumulate (W+1 cycles).** Bit n of every pre-added sum addresses the ROMs. Each
  accumulator adds its ROM word at the top and shifts right, so after W+1 steps it
  holds Σ rom_n·2^n exactly. The ROM words are integers and the accumulators carry
  the full width, so nothing is rounded. With `IN_SIGNED=1` the last (sign) slice
  is subtracted. This is two's-complement DA, used for the column passes.
* **Timing (W = 8, unsigned).** The first low-pass output comes 9·8 + 1 + 9 = **82 cycles**
  after the first shift, and the first high-pass output 7·8 + 1 + 9 = **66 cycles**
  after it. After that there is one output every **9 cycles** (8 shifts + 1 start).
  `y_valid` pulses in the cycle after the last accumulation step.

ROM contents are generated at elaboration by `da_lut` from the coefficient parameter.
Entry *a* is the sum of the coefficients whose address bit is set in *a*. The two
outer tap pairs go to the top ROM. The two inner pairs and the centre tap go to the
bottom ROM.

## Multiplexer + split-DA filter (`mux_da_filter`)

This variant does not use symmetry. The filter sum is split into two parts:

* **First TAPS−4 taps (5 for the low pass, 3 for the high pass).** Each tap has a
  2:1 multiplexer that outputs its coefficient when the sample's current bit is 1,
  and zero otherwise. The multiplexer outputs are summed into one accumulator.
* **Last four taps.** Split DA with two 4-entry ROMs, each addressed by two samples,
  feeding a second accumulator.

This variant has no PISO stage, so the SISO registers themselves present the bits:
each one rotates in place for W cycles during the computation. One more cycle adds
the two accumulators. Loading therefore has to wait while the filter computes
(`busy`). The first output comes 9·8 + 8 + 1 = **81 cycles** after the first shift
(65 for the high pass), and after that there is one output every **17 cycles**.

## 1D DWT processor (`dwt1d`)

The low-pass and high-pass filters share one serial input. The high-pass chain is 2
registers shorter, so its window is always the newest 7 of the low-pass window's 9
samples. The processor takes one word per `in_valid`/`in_ready` handshake and
shifts it out in W cycles. If the word carries `in_emit`, the processor spends one
more cycle starting both filters. The caller sets `in_emit` on every second
sample, which is the downsampling by two. If the stream is x[2k−4] … x[2k+4], the
pair produced is

    L[k] = Σ h[n]·x[2k+n−4]      H[k] = Σ g[n]·x[2k+n−2]

which is the standard centred 9/7 analysis. `out_lo` and `out_hi` are rescaled,
rounded and saturated to `OUT_W` bits. With fully available input and the default
filters, the processor produces one pair every 2W+1 = 17 cycles.

`ARCH` selects the filter type: `ARCH_MODIFIED_DA` is the default, and
`ARCH_MUX_DA` selects the multiplexer variant. With `ARCH_MUX_DA`, a pair takes
3W+1 cycles because loading stalls while the filters compute.

## 2D processor (`dwt2d`, `dwt2d_ctrl`)

```
load port ─► input memory (N·N × 8) ─► 1D DWT #1 (level-0 rows, unsigned 8-bit)
                  coefficient memory ─┐      │ L, H
                                      └──────┤ (rows of later levels go to #2)
                                  row buffers L, H (N·N/2 × 16 each)
                                     │                 │
                             1D DWT #2 (cols of L)  1D DWT #3 (cols of H)   (signed 16-bit)
                                     │ LL, LH          │ HL, HH
                  coefficient memory: N·N × 16 in four banks ─► read port
```

The transform works on **tiles**. Level 0 has one tile, the whole image. Each
further level takes every sub-band of the level before as a tile of its own, so
the tile side halves and the number of tiles grows four times. With the `levels`
input at its maximum of log2(N) − 3, a 64 × 64 image ends as 64 sub-blocks of
8 × 8 and a 256 × 256 image as 1024. Each tile of side n at origin (r0, c0) goes
through two passes:

1. **Row pass.** Each tile row is read as the extended stream x[−4] … x[n+2] with
   whole-sample symmetric extension (x[−i] = x[i], x[n−1+i] = x[n−1−i]).
   `in_emit` is set on x[4], x[6], …, x[n+2]. Level 0 reads the input memory
   and uses processor #1. Later levels read signed coefficients from the
   coefficient memory and use processor #2. Row r's L[k] and H[k] go to the two
   row buffers at address r·N/2 + k.
2. **Column pass.** Columns of the two buffers are streamed in the same way, in
   lockstep, to processors #2 and #3. Output row k of column c gives four words.
   They are written in one cycle into the tile's quadrants: LL at (r0+k, c0+c),
   LH at (r0+n/2+k, c0+c), HL at (r0+k, c0+n/2+c) and HH at (r0+n/2+k, c0+n/2+c).

A tile is fully read into the row buffers before its results overwrite it, so the
levels run in place. The coefficient memory is one N × N array. The bank of word
(r, c) is the pair (XOR of all bits of r, XOR of all bits of c). The four quadrant
words differ in one bit of r, one bit of c, or both, so they always land in four
different banks.

Memory reads are synchronous. The next address is presented as soon as a sample
is accepted, and a processor needs at least W cycles per sample, so reading never
stalls it. Writes are tracked with their own counters, so feeding the next line
overlaps the last results of the previous line.

**Time per tile** (default filters): n·((n+7)·Wr + n/2) cycles for the rows, with
Wr = 8 at level 0 and 16 above it, plus n/2·((n+7)·16 + n/2) cycles for the
columns. About 40 more cycles per tile go to draining the pipelines. Measured
times at N = 256 are 1,126,435 cycles for one level (4.2 ms at 268 MHz) and
8,919,019 cycles for all five levels (33 ms).

### Using it

1. Write the pixels with `load_we`/`load_addr`/`load_data` (address = row·N + column).
2. Set `levels` (1 … log2(N) − 3; 0 counts as 1, larger values are clamped) and
   pulse `start`. `busy` is high during the transform. `done` rises at the end and
   stays high until the next `start`. The input memory is not changed, so another
   `start` transforms the same image again.
3. Read coefficient (row, column) of the N × N result with `rd_addr` = row·N + column.
   The data appears on `rd_data` one cycle later. After one level, LL is the top-left
   quadrant, LH (low-pass rows, high-pass columns) the bottom-left, HL the
   top-right and HH the bottom-right. Every further level splits each quadrant the
   same way.

Do not write the input memory while `busy` is high. The read port reads the
coefficient memory only while `busy` is low. Reset is asynchronous and active-low,
and clears only the control state.

### Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| dwt2d | N | 256 | image side (power of two, at least 16) |
| dwt2d | W | 8 | pixel width |
| dwt2d | OUT_W | 16 | width of row results and coefficients |
| dwt2d | ARCH | ARCH_MODIFIED_DA | filter type of all three 1D processors |
| da_sym_filter / mux_da_filter | W, TAPS, IN_SIGNED, COEFS | 8, 9, 0, LP_COEF | sample width, taps, signedness, coefficient set |
| da_sym_filter | TOP_PAIRS | 2 | PISO registers on the top ROM |

From 8-bit pixels, level-0 row results stay within ±331 and level-0 sub-band values
within about ±860. Later levels grow the high-pass bands further; results are
saturated at 16 bits, which only extreme patterns reach.

## What is fixed by the architecture and what is chosen here

The architecture fixes these points:

* the SISO → pre-add → PISO → split-LUT structure and its 82 / 66 / 9-cycle timing;
* the multiplexer + split-DA filter and its 81 / 17-cycle timing;
* 8-bit samples and a 256 × 256 image;
* an input memory, three 1D processors and an output memory.

The following are choices of this implementation:

* LSB-first bit order;
* which tap pairs share a ROM;
* per-ROM accumulators of exact width;
* signed mode for the column passes;
* rescaling by 2^10 / 2^9 with rounding;
* the valid/ready handshake;
* the two row buffers between the passes;
* running the levels tile by tile in place, with rows of later levels on processor #2;
* the banked coefficient memory;
* whole-sample symmetric boundary extension;
* the host ports and address maps.

Other points to know:

* In the multiplexer variant the low pass uses five multiplexers, one for each of
  taps 0–4, so that together with the four DA taps all nine taps are covered.
* Decomposition repeated until the sub-blocks are 8 × 8, with every sub-band split
  again, follows the compression scheme. Each tile is extended symmetrically on
  its own.
* The inverse transform and the neural-network coder are not included.

## Verification

Every testbench is self-checking and ends with `TB_RESULT checks=… failures=…`.

| testbench | what it checks |
|---|---|
| `tb_da_sym_filter` | low/high pass, unsigned 8-bit and signed 12-bit, against direct convolution; latency 82 / 66, one output per 9 cycles |
| `tb_mux_da_filter` | the same for the multiplexer filter; latency 81 / 65, one output per 17 cycles |
| `tb_dwt1d` | both architectures on symmetric-extended lines; rounding, saturation, pair spacing 17 / 25 cycles |
| `tb_frame_mem` | random traffic, read latency, read-during-write |
| `tb_dwt2d_ctrl` | control unit at N = 32 against modelled processors with random stalls: level-0 sample order, mirroring and emit marks; the whole coefficient memory after 1 and 2 levels against a tag model of the schedule; clamping of `levels` |
| `tb_dwt2d` | whole processor on a 64 × 64 image (N = 64), one level and then three levels down to 64 sub-blocks of 8 × 8, against a software model; cycle counts; counts boundary mirroring, stalls, line overlap, tiles, later-level rows on #2 |
| `tb_dwt2d_mux` | the same with the multiplexer filters at N = 32 (one and two levels) |
| `tb_dwt2d_full` | default parameters on a 256 × 256 image: one level, then all five levels (341 tiles); all 65,536 coefficients compared after each (about 10 s) |

To run one testbench with Verilator (from the directory that holds `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/dwt_pkg.sv \
    rtl/da_lut.sv rtl/da_sym_filter.sv rtl/mux_da_filter.sv rtl/dwt1d.sv \
    rtl/frame_mem.sv rtl/dwt2d_ctrl.sv rtl/dwt2d.sv tb/tb_dwt2d_full.sv \
    --top-module tb_dwt2d_full
./obj_dir/Vtb_dwt2d_full
```

## Files

* `rtl/dwt_pkg.sv`: coefficients, architecture enum, ROM-entry function
* `rtl/da_lut.sv`: DA ROM built from the coefficients
* `rtl/da_sym_filter.sv`: modified DA filter
* `rtl/mux_da_filter.sv`: multiplexer + split-DA filter
* `rtl/dwt1d.sv`: 1D DWT processor
* `rtl/frame_mem.sv`: synchronous-read RAM
* `rtl/dwt2d_ctrl.sv`: control unit
* `rtl/dwt2d.sv`: top level
* `tb/`: the testbenches listed above
