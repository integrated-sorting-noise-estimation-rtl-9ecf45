# Video object segmentation on one FPGA: sorting, noise estimation, object detection and contour analysis

This RTL turns a grey-level video stream into a stream of labelled, filled
moving objects. The whole chain runs in hardware, one pixel per clock on the
pixel-rate parts:

```
 I(n), I(n-1), BK(n) ──► motion_detect ──► D(n) ──► st_threshold ──► T(n)
        │                              └─► d_* port (to frame memory)
        └─► noise_estimator ──► sigma_n^2 ──────────────┘ (noise adaptation)

 D(n-1) from frame memory ──► edge_detect (B = D > T, 2x2 erosion) ──► E
 E ──► hs_cache ──► contour_tracer ──► chain codes ──► contour_filler ──► SRAM ──► labelled frame
```

Four ideas carry the design:

* **A counting sort that needs no comparisons.** It sorts the block
  homogeneity values inside the noise estimator, and it is a block of its own
  (`counting_sort`).
* **Noise estimation from the most homogeneous blocks.** The frame's noise
  variance comes from the blocks whose high-pass energy is smallest. It feeds
  the threshold.
* **A threshold that adapts in space and time.** It is computed from
  per-stripe histograms, raised by the noise variance, quantised to three
  levels, and moved one level at a time from frame to frame.
* **A 16-BRAM cache.** Any 4x4 group of pixels can be read from it in one
  cycle. The contour tracer gets a whole 3x3 neighbourhood per cycle, and the
  raster scan can skip three black pixels per step.

All code is synthesizable SystemVerilog. There is one module per file in
`rtl/` and one testbench per block in `tb/`.

## Modified counting sort (`counting_sort`, `sort_hist_unit`, `sort_init_addr`)

A sequence of up to `N_MAX` keys of `KEY_W` bits (defaults 16384 and 12) is
sorted in four passes:

1. **Load.** Keys are written into one of two key buffer banks. At the same
   time the histogram unit counts them. It does a read-modify-write on a
   2^KEY_W-bin RAM, and a forwarding register lets it count equal keys in
   consecutive cycles.
2. **Running sums.** The histogram is read out, and each bin is cleared as it
   is read. Exclusive running sums go into the INIT ADDR RAM, so each entry
   holds the first output position of its key value.
3. **Scatter.** The buffered keys are read again. Each key looks up its
   position in INIT ADDR, which then increments the entry. The key and its
   arrival index are written to that position of the indexing RAM. Because
   positions are handed out in arrival order, the sort is stable.
4. **Output.** The indexing RAM is read in address order, giving
   `out_key`, `out_idx` and `out_last`. It is cleared behind the read.

Because there are two key banks, sequence k+1 can load while sequence k
scatters and outputs. The time per sequence is about 3N + 2^KEY_W cycles.

## Noise estimation (`noise_estimator`, `log2_fx`)

The frame is cut into non-overlapping 5x5 blocks. Four line buffers and a
5x5 register window do this. For every block:

* **Variance.** `(25·Σp² − (Σp)²)/625`. The division is a multiply by
  round(2^22/625).
* **Homogeneity ξ.** The sum over eight directions of |4·centre − the other
  four taps on a 5-tap line through the centre|. The horizontal line is the
  classic mask. The six oblique tap sets are this design's own choice.

The variance is stored at the block index in a double-banked variance RAM. ξ
goes through a FIFO into `counting_sort`. The key width is 13 bits, because
the largest ξ for 8-bit pixels is 8160. With `N_BLK = 8192`, a CIF frame
(3990 blocks) fits.

When the sorted indexes come out, the first 10 % of them (at least three)
address the variance RAM, and their variances are kept. The reference
variance is the median of the first three. Each kept variance is compared
with the reference in the log2 domain:

* `log2_fx` gives the leading-one position plus four linear fraction bits.
* A variance is accepted when the difference is below `cfg_tsig`.

Accepted variances are summed and divided by their count with a sequential
restoring divider. If none is accepted, the reference itself is returned.
`sigma2_valid` pulses once per frame, about 2^13 + 2.1·blocks cycles after
the last block.

## Object detection

### Motion detection (`motion_detect`, `win5_filter`)

`|I(n) − R(n)|` is computed, where R is `in_bk` or `in_prev` depending on
`cfg_ref_bk`. It then passes through two 5x5-capable streaming filters:

* an average filter, whose radius (`cfg_avg_rad`) is 0, 1 or 2, giving 1x1,
  3x3 or 5x5;
* a max filter, with its own radius (`cfg_max_rad`).

Both sizes can be changed between frames. Pixels outside the frame count as
0. The average divides by the full window area.

### Spatio-temporal thresholding (`st_threshold`, `iha`, `threshold_estimator`, `sta`)

The block extractor splits D(n) into `M` vertical stripes, each `cfg_blk_w`
pixels wide. Each stripe goes to its own `iha`:

* The `iha` builds a 256-bin histogram and the pixel mean μ.
* It splits the histogram into `L` equal sections. λ is the sum of the
  counts of the most frequent grey level in each section (ties keep the
  lowest level).

`threshold_estimator` then forms `T_g = Σ(λ_k + μ_k)/(K·L + K)`. `sta` adds
`a·σ²`, with `a = cfg_a/256`. It quantises the result down to the highest of
the three levels `cfg_q[]` that does not exceed it, and moves T(n) at most
one level per frame towards that level. T(n) starts at the middle level.

### Edge detection (`edge_detect`)

`B = D > T`. A white pixel of B is kept as an edge pixel unless its whole
3x3 neighbourhood is white. Equivalently, it is kept when at least one of the
four 2x2 squares containing it has a black pixel. Pixels outside the frame
are black.

## The high-speed cache (`hs_cache`)

The cache is four stacks of four `sdp_ram`s, 18432 words deep:

* line y goes to stack y mod 4;
* pixel x goes to RAM x mod 4 of that stack, at word `(y/4)·2^(X_BITS−2) + x/4`.

Any 4x4 group of pixels therefore lies in 16 different RAMs. One read cycle
gives two outputs, both valid one cycle after `rd_en`:

* the 3x3 window around `(rd_x, rd_y)`;
* the start pixel array, which is pixels x−1 … x+2 of line y.

Coordinates are signed, and anything outside the frame reads as 0. Every
pixel holds 2 bits:

* bit 0: edge pixel;
* bit 1: visited or contour mark.

Writes are one pixel per cycle, and a read sees a write from the previous
cycle. With `X_BITS = 9`, lines up to 512 pixels are supported. That covers
CIF, which needs 9216 words per RAM.

## Contour tracing (`contour_tracer`)

Directions follow the Freeman code: 0 is east, 2 is north (y decreasing),
4 is west and 6 is south. The tracer is an FSM that works on the cache.

* **Scan.** The raster scan looks for a white pixel with a white neighbour.
  It uses the start pixel array to skip up to three black pixels per step.
* **Follow.** From the current point, it searches for the rightmost white,
  unvisited neighbour. The search starts at direction
  `(ds + 6 + ((ds+1) mod 2)) mod 8`, where ds is the last step. It tries
  five candidates for even ds and six for odd ds. Each new point is marked
  visited, and its code is pushed on a chain code stack of `MAX_LEN` entries.
  At a start point, ds = 6.
* **Dead end.** The point is deleted from the edge frame, and the tracer backs
  up one step by popping the stack.
* **Close.** Reaching the start point or a visited point closes the contour.
* **Walk.** The stack is then read back. The walk removes the contour's points
  from the cache. If the length is at least `cfg_min_len`, it also emits the
  contour; otherwise the contour is dropped.

The tracer needs about two cycles per traced point.

### Chain code stream

The stream is made of 4-bit nibbles (`cc_valid`/`cc_nib`, with no
back-pressure). Codes 0–7 are moves. The value 8 marks a descriptor, and the
nibble after it says which one:

| nibbles | meaning |
|---|---|
| 8, 0 | frame header |
| 8, 2, x[3], y[3], P[4], c1 … cP, 8, 3 | one contour: start point (12 bits each, MSB first), length P (16 bits), P codes, tail |
| 8, 1 | frame tail |

Only accepted contours are sent.

## Contour filling (`contour_filler`, `sync_fifo`)

The chain code stream is buffered in a FIFO of 16384 nibbles. The filler
only pops it while `hold` is low, which is when the cache is no longer used
by the tracer. For each frame, the label generator controller does the
following:

1. Clear the SRAM. This can overlap tracing.
2. Pop one contour into a local buffer. Rebuild its points from the start
   point and the codes. Mark each point in the cache and write the contour's
   label to the SRAM. Labels start at 1 and count up.
3. Walk the chain again with two seed tests on the code into a point (p)
   and the code out of it (n):
   * PE-0 fires for p ∈ {5,6,7} and n > p mod 5;
   * PE-1 fires for p ∈ {0,1} and n = 7.

   At a seed, pixels to the right of the point are labelled. Filling stops at
   the next marked contour point or at the frame edge.
4. Remove the marks.
5. At the frame tail, read the SRAM in raster order and stream it out as
   `ff_*`. Label 0 is background.

The SRAM model is one access per cycle, with read data one cycle after the
read. The label is 16 bits and the address 20 bits.

## Top level (`vos_top`)

The frame memories are not part of the RTL, and the DMA is not inside
`vos_top`. Their streams are ports:

| Ports | Stream |
|---|---|
| `in_*` | I(n), I(n−1) and BK(n), in step |
| `d_*` | D(n) out |
| `dprev_*` | D(n−1) back in |
| `sram_*` | external SRAM |
| `cc_*` | chain codes |
| `ff_*` | labelled frame |
| `sigma2_*`, `t_*` | per-frame results |

Timing:

* T(n) is latched at the end of each frame. Edge detection thresholds the
  D frame it reads back with the latest T.
* The contour stage works on one frame at a time, in three steps: load the
  edge frame into the cache, trace, then fill. During trace and fill the edge
  stream is held (`dprev_ready` low).
* The front end (motion, noise and threshold) never waits.

All settings come from `cfg_*` ports.

## Frame memory traffic (`dma`)

`dma` moves pixel streams to and from one external memory port, where the DDR
controller sits. It has NR read channels (default 3) and NW write channels
(default 2). Every channel has its own FIFO of 4096 words. A channel is
started with a base address and a length in words. A write channel asks for
service once its FIFO holds a whole burst (2048 words) or the rest of its
transfer. A read channel asks once its FIFO has room for a burst, which means
half empty at the defaults. A round-robin arbiter picks one requesting
channel, and the controller serves it for one burst.

The memory port takes one word per `mem_gnt`. Read data comes back in order
on `mem_rvalid`, with any latency. Room in the FIFO is reserved before a read
burst starts, so returning data is never refused.

`dma` is a stand-alone block: `vos_top` does not instantiate it. To build a
system, put it between the top's `in_*`, `d_*` and `dprev_*` streams and the
memory controller.

## Departures from the original description and open points

* **Starting addresses.** The description gives two forms for the
  INIT ADDR update: an increment (table and text of the sort chapter) and a
  decrement of the entry after each lookup. This design uses the increment
  with exclusive sums, which keeps the sort stable.
* **Key width.** The sort inside the noise estimator uses 13-bit keys rather
  than the stand-alone 12-bit size, so that every ξ value fits.
* **Oblique filters.** The six oblique high-pass tap sets are this design's
  own. Only the horizontal mask is specified.
* **Block size.** The noise estimator supports 5x5 blocks only.
* **Logarithm.** The logarithm is a simple leading-one plus linear-fraction
  form. The original refers to an external logarithm architecture.
* **Threshold values.** The values of M, L, the quantisation levels and the
  temporal rule of the threshold are this design's own: M = 4, L = 4, and a
  step of one level per frame.
* **Edge detection.** It computes each pixel once from two line buffers. The
  original updates a dual-port line buffer twice; the result frame is the
  same.
* **Cache writes.** The cache stores 2 bits per pixel and writes one pixel
  per cycle. The original reads and writes up to 16 pixels per cycle.
* **Contour rejection.** The tracer applies only the length measure.
  Rejection by correspondence with the previous frame's contours, and
  rejection of contours inside already traced ones, are not built.
* **Remaining dead points.** When a contour closes on a visited point that is
  not its start point, the remaining dead points are not removed.
* **Stream content.** The stream format beyond the 0x8 marker is this
  design's own. Dead branches are never sent, so no dead-branch flag exists.
* **Nested contours.** Internal contours get their own label instead of
  being filled with zero. No reconstructed-contour frame is produced.
* **Missing pieces.** There is no DDR controller, no SRAM controller and no
  configuration register file. These are ports. The DMA exists, but it is
  not connected inside `vos_top`, and it has no single-word access for
  processing units.
* **Contour start points.** These come from the raster scan, and the scan
  resumes to the right of each start point.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints a
`TB_RESULT` line with its pass and fail counts.

* **Units.** The unit testbenches compare against behavioural models:
  * sorted order and stability with random and adversarial keys;
  * histogram and running sums;
  * filter outputs against a reference loop;
  * λ, μ, T_g and STA against their formulas;
  * the edge frame against a direct computation;
  * cache windows against a shadow array;
  * chain codes, dead-point removal and rejection on hand-made frames;
  * filled frames against the shape masks.
* **`tb_dma`.** Runs two concurrent write transfers and then two reads,
  against a memory that grants at random and answers with a random delay.
  The reads go to random-ready sinks while another write runs. It checks
  every word, that bursts interleave, and that busy falls after each
  transfer.
* **`tb_noise_estimator`.** Compares σ² with a reference model on frames with
  known added noise. It also checks that the internal sort delivers every
  block once per frame, with keys in non-decreasing order.
* **`tb_vos_top`.** An end-to-end run on a 48x32 frame with reduced sizes.
  * It checks σ² limits and T(n), and that every chain closes.
  * It checks the contour count and that the labels match the shape masks.
  * It counts 21 mechanisms, and each one must occur: filters larger than
    1x1, noise block selection, Rule 3 dead ends, rejection by length, both
    seed elements, hold of the edge stream, and others. The reference is
    the background throughout; the previous-frame reference is exercised in
    `tb_motion_detect`.
* **`tb_vos_top_full`.** Runs the top with all defaults (MAX_W = 2048,
  N_BLK = 8192, an 18432-word cache) on three synthetic CIF frames
  (352x288).

Simulate any testbench with plain Verilator:

```
verilator --binary --timing -Wno-fatal --top-module tb_vos_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/vos_pkg.sv tb/tb_vos_top.sv
./obj_dir/Vtb_vos_top
```

## Parameters worth knowing

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| counting_sort | KEY_W, N_MAX | 12, 16384 | key width, longest sequence |
| noise_estimator | N_BLK, MAX_W | 8192, 2048 | blocks per frame, line length |
| vos_top | M, L | 4, 4 | threshold stripes, histogram sections |
| hs_cache | X_BITS, DEPTH | 9, 18432 | log2 max line, words per RAM |
| contour_tracer | MAX_LEN | 4096 | longest contour |
| contour_filler | LABEL_W, SRAM_AW | 16, 20 | label and SRAM address width |
| dma | FIFO_DEPTH, BURST | 4096, 2048 | words per channel FIFO, words per burst |
