# Block-based MoFREAK feature extraction for 1080p video

This RTL extracts MoFREAK features from full-HD video (1920x1080). A MoFREAK feature combines
two 128-bit binary descriptors: a FREAK appearance descriptor and a MIP-style motion
descriptor. The design follows a published ASIC architecture that targets 120 frames/s at
200 MHz. The engine is built around two ideas.

* **Binary-mask screening.** Candidate pixels ("salient points") are not found by reading
  the gray-level frame. They are read from a 1-bit-per-pixel mask instead, so one 128-bit bus
  word covers 128 pixels. A 1080p frame is then screened in 16,200 bus reads instead of
  129,600.
* **Block-based keypoints.** Corners cluster, so 10 horizontally adjacent pixels are grouped
  into one block. All of a block's pixels are tested and described from a single fetched
  window. The description patterns slide across the window instead of fetching a new patch
  for every keypoint.

Detection and description run as two decoupled phases with a FIFO between them, because
their throughputs differ a lot and vary with the content.

```
           128-bit image bus (read only, shared via bus_arbiter)
   ┌──────────────┬──────────────────┬─────────────────────────┐
   │ mask words   │ 7 words/block    │ 204 + 38 words/block    │
rapid_screen ─▶ fast_detector ─▶ kp_fifo ─▶ image_preload ─▶ feature_desc ─▶ features
 (blocks with     (FAST 9-16 on    (16 block  (ping-pong        ├ freak_desc  (appearance)
  a salient px)    10 px at once)   keypoints) register array)  └ motion_desc (motion)
```

## Interface and memory layout

`mofreak_top` has these parameters: `IMG_W` = 1920, `IMG_H` = 1080 and `FIFO_DEPTH` = 16.

* `start` begins a frame. `mask_base`, `cur_base` and `prev_base` are byte addresses and must
  stay stable while `busy` is high.
* Frames hold 8-bit pixels, row-major, with a pitch of `IMG_W` bytes. The mask holds one bit
  per pixel with a pitch of `IMG_W/8` bytes. Bit *i* of a 128-bit mask word is pixel
  128·word + *i*, and byte 0 of every bus word is in bits 7:0.
* `mem_req_*` is a read-only bus:
  * `mem_req_valid`/`mem_req_ready` carry a byte address, and each read returns 16 bytes.
  * Responses come back in request order on `mem_rsp_valid`/`mem_rsp_data`, with any latency
    and no back-pressure.
  * Addresses need not be 16-byte aligned. The window fetches start 3, 25 and 11 pixels left
    of a block, so the memory side must serve unaligned 16-byte reads.
* `feat_*` is a valid/ready stream of `feat_pkg::feature_t`: pixel `x` and `y`, `app` (128
  appearance bits) and `mot` (128 motion bits). There is one feature per detected keypoint,
  in raster order of the blocks and left to right within a block.
* `busy` falls after the last feature of the frame has been accepted.

A block is processed only when its whole 64x51 description patch lies inside the frame.
The patch covers columns x0−25…x0+38 and rows y−25…y+25, where x0 is the block's first
pixel. Salient pixels in blocks nearer the border are ignored.

## Detection phase

**`rapid_screen`** reads the mask row by row into two alternating 1920-bit row buffers. A
complete row becomes a 192-bit vector in one cycle, with one bit per 10-pixel block: the OR
of its mask bits, gated by the border rule. The lowest pending block is emitted each cycle,
together with its 10-bit salient mask. Reads go on while a row's blocks are emitted, so a
sparse frame takes about 16,200 cycles plus memory latency. A row with more salient
blocks than it has mask words (15) costs about one cycle per block instead.

**`fast_detector`** fetches 7 bus words per block: rows y−3…y+3 and columns x0−3…x0+12, which
is the block plus the radius-3 circle on both sides. Ten `fast_corner` instances share this
window. `fast_corner` is the FAST 9-16 test:
* The centre plus 30 is compared (≥) with the 16 circle pixels.
* Every run of 9 circularly contiguous results is ANDed, and the 16 runs are ORed.
* The darker side (pixel + 30 ≤ centre) is built the same way.

Only pixels that are salient in the mask are accepted. Blocks with no corner are dropped.
The others go into `kp_fifo` as `{bx, y, mask}`.

## Description phase

**`image_preload`** takes a block from the FIFO and fetches two patches:

| patch | frame | size | columns | rows | bus words |
|---|---|---|---|---|---|
| appearance + motion | current | 64 x 51 | x0−25 … x0+38 | y−25 … y+25 | 204 |
| motion reference | previous | 32 x 19 | x0−11 … x0+20 | y−9 … y+9 | 38 |

Both patches serve all 10 keypoint positions of the block. The spare columns (64 − 51 = 13
and 32 − 19 = 13) make room for the pattern to slide. Storage is a ping-pong pair of banks
(2 × 3,872 bytes) selected by two signals. `wsel` picks the bank being loaded and `rsel`
picks the bank being described. A new block starts loading as soon as the bank under `wsel`
is free, so a block's 242 reads overlap the description of the previous block.
`bank_release` from the describer frees the read bank and flips `rsel`.

**`feature_desc`** walks the 10 positions of the read bank. For each set keypoint bit it
starts both descriptors with `kx` = the position (0…9). It waits for both results, emits the
feature, and releases the bank at the end.

### Appearance descriptor (`freak_desc`)

This is the most involved block. The FREAK-style pattern has 43 sampling circles in 8
layers: 7 rings of 6 circles plus a centre circle. A circle's value is the image smoothed by
a Gaussian whose size depends on its layer.

* **Separable, shared filters.** Each layer has one `gauss_filter` and one input selector.
  The selector visits the layer's circles one after another. For each circle it sends the
  2H+1 rows of the window, one row segment per cycle. The filter:
  1. applies binomial weights C(2H, i) across the segment (the horizontal pass);
  2. accumulates the rows with weights C(2H, r) (the vertical pass);
  3. divides by 2^(4H) with rounding.
* **Geometry.** Circle *c* of layer *l* lies at angle `circle_angle(l,c)` in 1/256 turn:
  round(c·256/6), plus 21 on odd layers. The layer parameters are:

  | layer | radius | H | kernel | circles |
  |---|---|---|---|---|
  | 0 | 21 | 4 | 9x9 | 6 |
  | 1 | 16 | 3 | 7x7 | 6 |
  | 2 | 11 | 3 | 7x7 | 6 |
  | 3 | 8 | 2 | 5x5 | 6 |
  | 4 | 5 | 2 | 5x5 | 6 |
  | 5 | 4 | 1 | 3x3 | 6 |
  | 6 | 3 | 1 | 3x3 | 6 |
  | 7 (centre) | 0 | 1 | 3x3 | 1 |

  The radii are FREAK's ring ratios scaled so that the outer ring plus its kernel reaches
  exactly the 25-pixel half-size of the patch.
* **Rotation.** A circle centre is (round(R·cos a), round(R·sin a)), where a = circle angle +
  θ. The cosine and sine come from a 256-entry Q14 table built at elaboration by
  `feat_pkg::sin512`, an integer Taylor series. The offset is rounded as (R·t + 2^13) >>> 14.
  Image y grows downwards.
* **Schedule.** A keypoint takes two passes:
  1. Sample all 43 circles with θ = 0.
  2. Compute the orientation vector from the 12 opposite-circle pairs (c, c+3) of the even
     rings: x = Σ (I_c − I_c+3)·cos(angle_c) and y = Σ (I_c − I_c+3)·sin(angle_c), in Q8.
  3. Convert it to an angle with `atan_div`.
  4. Resample all 43 circles with θ = that angle.
  5. Form 128 bits, where bit p = I(p mod 43) > I((p mod 43 + 1 + 13·⌊p/43⌋) mod 43).

  Layer 0 dominates: 6 circles × 9 rows = 54 cycles per pass. One keypoint takes at most
  133 cycles.
* **Arctangent by long division (`atan_div`).** The smaller of |x| and |y| is divided by the
  larger with a restoring long division: one subtractor and one quotient bit per cycle, with
  12 fraction bits. The quotient is compared with the 32 tangents of the half-step angles
  (2k−1)·π/256. This rounds it to one of 256 equal parts of the circle. The octant is then
  unfolded from the swap flag and the two signs. The result arrives 15 cycles after `start`,
  and (0, 0) gives angle 0. The published design first compared the components against precomputed ratio
  bounds by cross-multiplication. Those wide multiplications formed its critical path, and
  the long division replaced them in the optimised 200 MHz version built here.

### Motion descriptor (`motion_desc`, `mip_pe_array`, `mip_pe`)

The descriptor measures SAD (sum of absolute differences) at 16 locations around the
keypoint, with dx and dy each in {−3, −1, 1, 3}:
* The 3x3 current-frame patch at each location is compared with 8 previous-frame 3x3 patches.
  Each is displaced 4 pixels in one of the directions E, SE, S, SW, W, NW, N and NE.
* The 8 SADs come from an 8 × 9 array of `mip_pe`. Each PE takes both differences pt−pi and
  pi−pt, keeps the one selected by pt > pi, adds it to the partial sum from below, and
  registers the result.
* Column *i* accumulates direction *i* over the 9 pixels, starting from 0 at the bottom. The
  current pixels Pt[j] are broadcast along row *j*. Row *j*'s inputs are delayed *j* cycles,
  so a new location enters every cycle and its 8 SADs (12 bits each) come out 9 cycles
  later.
* Each location gives one byte, where bit *i* = SAD_i < SAD_(i+1 mod 8). Location *n* fills
  bits 8n+7:8n.
* The descriptor finishes 26 cycles after `start`, hidden under the appearance descriptor.

## Throughput and sizes

The budget at the design's target is 200 MHz / 120 fps = 1,666,667 cycles per frame:
* **Worst-case blocks.** A block with all 10 pixels detected takes 1,363 describer
  cycles in simulation. That is about 10 × (133 + 3) plus the release. So 1,200 such blocks take about 1.64 M cycles
  and fit.
* **240 fps.** The budget is 833,333 cycles, and 500 full blocks (0.68 M cycles) fit.
* **Image bus.** It carries 16,200 mask reads per frame, 7 reads per salient block and 242
  per keypoint block. For 1,200 keypoint blocks that is 0.29 M reads.
* **Storage.** The ping-pong patch banks hold 7,744 bytes, against about 7.9 KB of memory in
  the published design. The design also keeps two 240-byte mask row buffers, a 112-byte FAST
  window and the 16-entry FIFO.

These figures are estimates from the cycle counts measured in simulation. No gate-level
timing was done.

## Choices not fixed by the original description

The architecture fixes the partition, the 128-bit bus, 16,200 mask reads and 10-pixel blocks.
It also fixes 7/204/38 words per fetch, the 64x51 and 32x19 patches, and the ping-pong
preload. The descriptor side it fixes is:
* FAST 9-16 with threshold 30;
* 43 circles in 8 layers with one separable filter per layer;
* 256 orientations found by long division;
* 16-byte descriptors;
* SAD in place of SSD, over 8 directions with an 8 × 9 PE array.

Everything below is this design's choice. Change it there if you need to match a reference
implementation:

* the bus protocol, the memory layout, the arbitration (preload > FAST > screening, fixed
  priority) and the feature stream port;
* the border rule, the patch placement around a block, and dropping blocks without a corner;
* the darker-side FAST comparison (pixel + 30 ≤ centre);
* ring radii, binomial kernels in place of true Gaussians, odd-ring phase, orientation pairs
  and the 128 description pairs. FREAK's trained pair list is not reproduced;
* the octant folding and rounding of the arctangent;
* the motion sample locations, the 4-pixel displacement and the neighbour-comparison bit
  encoding;
* the FIFO depth (16).

Two simplifications apply to the detector and the input:
* MoFREAK itself detects with a multi-scale FAST, as in BRISK. The hardware here follows the
  single-scale FAST 9-16 mask of the published architecture, and counts 9 or more contiguous
  pixels as a corner.
* MoFREAK describes absolute-difference gray-level frames. The engine takes whatever
  gray-level frames it is given for the current and previous frame, so the difference frames
  must be formed upstream if that is wanted.

The binary mask is an input. How the absolute-difference frame is thresholded into the mask
is outside this design.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each prints
`TB_RESULT checks=N failures=M`. The frame memory is a behavioural model,
`tb/frame_mem_model.sv`. It generates its contents from functions in `tb/tb_ref_pkg.sv`:
* a hashed texture;
* 24 bright 12x12 squares, whose corners are FAST corners;
* a previous frame equal to the current one shifted by (2, 1);
* a sparse hashed mask that also marks the square corners.

The same package holds independent reference models: FAST by run length, the Gaussian as a
direct 2-D sum, FREAK sampling, orientation with a real-valued `$atan2`, and SAD.

* `tb_mofreak_top` runs one 640x80 frame end to end. It compares every feature with the
  reference models and checks the read counts. It fails unless each mechanism occurs at
  least once: FAST drops, a full FIFO, both ping-pong banks loaded, bus contention and
  output back-pressure.
* `tb_mofreak_top_full` runs one 1920x1080 frame with all parameters at their defaults. The
  frame must finish within 1,666,666 cycles, one frame time at 120 fps and 200 MHz.
* Unit tests check latencies:
  * the arctangent takes 15 cycles;
  * the PE array takes 9 cycles;
  * the motion descriptor takes 26 cycles;
  * an appearance keypoint takes at most 138 cycles, the 120 fps budget per keypoint;
  * a block whose 10 pixels are all keypoints is described within 1,388 cycles. That is the
    share of one block when 1,200 such blocks fill a 120 fps frame;
  * screening takes about one cycle per mask word.
* The orientation is accepted within one step of the real-valued reference, because a
  quotient near a bin boundary may round either way. The 128 descriptor bits must then match the
  reference exactly for one of those angles.

To run a testbench with Verilator 5, name the two packages and the testbench. The other
modules are found in the library directories:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
  --top-module tb_mofreak_top rtl/feat_pkg.sv tb/tb_ref_pkg.sv tb/tb_mofreak_top.sv
./obj_dir/Vtb_mofreak_top +verilator+rand+reset+2
```

`+verilator+rand+reset+2` starts every register at a random value. All state that is read
is reset, so the results do not depend on the seed.

The full-size frame takes about 80,000 cycles for the sparse test mask and builds in under a
minute.

## Files

| file | content |
|---|---|
| `rtl/feat_pkg.sv` | shared types (`blk_kp_t`, `feature_t`), patch geometry, pattern tables, sine |
| `rtl/mofreak_top.sv` | top level |
| `rtl/bus_arbiter.sv` | image bus sharing with in-order response routing |
| `rtl/rapid_screen.sv` | binary-mask screening |
| `rtl/fast_detector.sv`, `rtl/fast_corner.sv` | FAST 9-16 window, 10 detectors, keypoint packing |
| `rtl/kp_fifo.sv` | keypoint FIFO |
| `rtl/image_preload.sv` | patch fetch into ping-pong banks |
| `rtl/feature_desc.sv` | per-block keypoint sequencing |
| `rtl/freak_desc.sv`, `rtl/gauss_filter.sv`, `rtl/atan_div.sv` | appearance descriptor |
| `rtl/motion_desc.sv`, `rtl/mip_pe_array.sv`, `rtl/mip_pe.sv` | motion descriptor |
