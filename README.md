# Two-octave SIFT keypoint detector

This is a streaming hardware detector for SIFT (Scale Invariant Feature Transform) keypoints. It takes a grey-level camera
frame (1280 x 720 by default) one pixel per clock, in raster order. For each pixel it decides whether the pixel is a
stable extremum of the Difference-of-Gaussian (DoG) scale space. Keypoints come out of the design as
`{x, y, scale}` records in two small FIFOs, one per octave.

The design implements the FPGA architecture described in "Modified SIFT Algorithm for Image Feature
Detection", a detector built from separable Gaussian filters. That architecture fixes the block structure,
the kernel length, the 1024 kernel sum and the 8.10 pixel format. Where it leaves a detail open, this RTL
makes its own choice, and the sections below say which parts are which.

## Data flow

```
pixel stream ──► DoG module, octave 0 ──► keypoint detection ──► feature store 0
                 │  image buffer (15 rows)      5 window generators
                 │  6 Gaussian filters          3 detection units
                 │  5 subtractors
                 └─ Gaussian image 3 ──► down sampler (÷2 in x and y)
                                           │
                                           ▼
                 DoG module, octave 1 ──► keypoint detection ──► feature store 1
```

Each octave has six Gaussian scales, with σ_j = 1.6·2^(j/3) for j = 0..5. Consecutive scales are subtracted
to give five DoG images, DoG_i = G_{i+1} − G_i. Three detection units each look at three adjacent DoG
images (0-1-2, 1-2-3 and 2-3-4). A unit reports a keypoint at the centre of its middle image when all of
these hold:

* the pixel is a strict maximum or a strict minimum of its 26 neighbours in scale space (`extremum_detect`);
* it is not edge-like (`edge_response`);
* it is not low-contrast (`low_contrast`).

Octave 1 takes the octave-0 Gaussian image at σ = 3.2 (scale 3), keeps every other pixel of every other
row, and runs the same pipeline on it at the smaller width. The two octaves run concurrently. Octave 0
takes a pixel every clock and octave 1 one pixel every four clocks, so the frame rate is set only by the
pixel clock: 921,600 clocks per 1280 x 720 frame.

## The Gaussian filter

A 15 x 15 Gaussian is applied as two 15-tap passes:

1. **Column pass.** The image buffer presents a column of 15 vertically adjacent pixels, D0 (the newest
   row) to D14. The filter uses the kernel's symmetry: it adds D_i + D_(14−i) first, then multiplies by
   one weight. A 15-tap column therefore needs 8 multipliers.
2. **Row pass.** The column results go through a 15-deep shift register and are folded and weighted in
   the same way.

Weights are named K0..K7. K7 is the centre tap and K0 the outermost pair. Every kernel is scaled so that
K7 + 2·(K0 + … + K6) = 1024, which turns the division by the kernel sum into a 10-bit shift. The weights
are computed from

    K_i = round(1024 · exp(−(7−i)² / 2σ²) / Σ_{d=−7..7} exp(−d² / 2σ²)),  i = 0..6

and K7 is then adjusted so that the sum is exactly 1024. For σ_0..σ_5 this gives the table in
`rtl/sift_pkg.sv` (`gauss_k`). The testbenches recompute the table from the formula, independently.

Multiplications use an explicit array multiplier (`array_mult`): AND-gated partial-product rows, added
one row at a time.

### Number formats

| quantity | format | notes |
|---|---|---|
| input pixel | 8-bit unsigned | |
| column-pass result | 18-bit, read as 8.10 | Σ K·p ≤ 1024·255, so it is the column mean with 10 fraction bits and nothing is dropped |
| Gaussian pixel | unsigned 8.10 (18 bits) | row-pass sum shifted right by 10, truncated |
| DoG pixel | 9-bit signed, whole grey levels | floor((G_{i+1} − G_i) / 1024); always fits in 9 bits |
| octave-1 input pixel | 8-bit | integer part of Gaussian image 3 |

The 9-bit DoG bus follows the architecture. It has one side effect worth knowing: a DoG that keeps only
whole grey levels is coarse, so neighbouring values often tie. Strict extrema are therefore rarer than in
a floating-point SIFT. On the synthetic test frames used here, only about 150 keypoints per 1280 x 720 frame
are found, mostly in the finer scales.

## Timing, coordinates and borders

This is the part most worth reading before changing the code.

* **Enables.** Every delay element (line delays, the row shift register, window registers) moves only when
  a valid pixel arrives. The arithmetic pipelines (pre-add, multiply, sum) run every clock and carry a
  valid bit. So the input may have gaps. Once the last pixel of a frame has gone in, the pipeline drains
  within a few clocks without more input.
* **Tags instead of sync signals.** The image buffer counts raster coordinates (`in_sof` resets them to
  (0,0); otherwise they wrap at IMG_W x IMG_H). That coordinate, the *tag* of the newest input pixel,
  travels alongside the data through every stage. The record coordinates are derived from it, in place of
  delayed horizontal/vertical sync pulses.
* **Offsets.** A Gaussian or DoG output tagged (x, y) belongs to the pixel (x−7, y−7). A 3x3 DoG window
  tagged (x, y) is centred on (x−8, y−8).
* **Latency**, for a pixel accepted at clock t:

  | output | clock |
  |---|---|
  | image buffer taps | t+1 |
  | Gaussian pixel | t+8 |
  | DoG | t+9 |
  | window | t+10 |
  | detection flags | t+11 |
  | record readable from the feature store | t+12 |

* **Borders.** No padding is done. A Gaussian pixel is meaningful only when its whole 15 x 15 window lies
  in the frame, i.e. centres 7..W−8. A keypoint is reported only where all 3 x 3 neighbours have such a
  window, i.e. centres 8..W−9 and 8..H−9. Pixels nearer the edge are never reported.
* **Octave 1 size.** The down sampler uses only Gaussian pixels whose window is inside the frame, at
  centres 7, 9, 11, … So octave 1 is ((W−13)/2) x ((H−13)/2), which is 633 x 353 for 1280 x 720, rather
  than a plain half-size image. The octave-1 pixel (x1, y1) sits at octave-0 position (7 + 2·x1, 7 + 2·y1).

## Keypoint tests

Windows are row-major, with w[4] the centre.

* **Extremum:** the centre of the middle scale is strictly greater than, or strictly less than, all 26
  neighbours. A tie is not an extremum.
* **Edge response** (parameter `EDGE_R`, default 10): the Hessian is formed by finite differences:

      Dxx = w3 + w5 − 2w4
      Dyy = w1 + w7 − 2w4
      4Dxy = w8 − w6 − w2 + w0

  The point is rejected when Det ≤ 0 or when r·Tr² ≥ (r+1)²·Det. Both sides are multiplied by 16 so that
  everything stays an integer.
* **Low contrast** (parameter `LC_TH`, default 1 grey level): the point is rejected when |D| ≤ LC_TH.

The result is `extremum AND NOT edge AND NOT low`, for each of the three units.

## Feature store interface

There is one first-word-fall-through FIFO per octave, `FIFO_DEPTH` (default 1024) records deep. A record
is written for every reportable pixel where at least one unit fired:

```
kp_rec_t = { x[15:0], y[15:0], scale_hit[2:0] }   // scale_hit[u]: keypoint in DoG image u+1
```

The read side works like this:

* `kp_avail[o]` is high while a record is waiting;
* `kp_rec[o]` is the oldest record;
* pulsing `kp_rd[o]` pops it (an assertion flags a pop from an empty store);
* when a record arrives at a full store it is dropped, and the sticky flag `kp_overflow[o]` is set (reset
  clears it).

Two more outputs per octave help with counting: `kp_pulse[o]` (the units that wrote a record this clock)
and `kp_interior[o]` (a reportable centre was tested).

## Top-level ports and parameters

`sift_top` ports:

| port | width | meaning |
|---|---|---|
| `clk`, `rst_n` | 1 | clock, synchronous active-low reset |
| `pix_valid`, `pix_sof`, `pix` | 1, 1, 8 | camera stream; `pix_sof` on pixel (0,0) |
| `kp_rd` | [1:0] | pop per octave |
| `kp_avail`, `kp_overflow` | [1:0] | store status per octave |
| `kp_rec` | 2 x `kp_rec_t` | head record per octave |
| `kp_pulse` | 2 x 3 | units that wrote a record this clock |
| `kp_interior` | [1:0] | a reportable centre was tested |

`sift_top` parameters:

| parameter | default | origin |
|---|---|---|
| `IMG_W`, `IMG_H` | 1280, 720 | frame size of the architecture |
| `FIFO_DEPTH` | 1024 | this design's choice |
| `EDGE_R` | 10 | Lowe's curvature ratio; a choice |
| `LC_TH` | 1 | a choice (DoG values are whole grey levels) |

Fixed in `sift_pkg`: 15 taps, 6 scales, kernel sum 1024, 8.10 Gaussian pixels, 9-bit DoG.

The memory is line delays: 14 lines of IMG_W−1 x 8 bits in the image buffer, plus 2 lines of IMG_W−1 x 9
bits in each of the 5 window generators, per octave. That comes to about 460 kbit in total at 1280
pixels.

## What follows the architecture and what is a choice here

Taken from the architecture:

* two octaves with six scales each;
* twelve Gaussian filters;
* one shared line buffer per octave giving taps D0..D14;
* separable filtering, column first, with symmetric pre-adders;
* array multipliers;
* kernel sum 1024 with division by shifting;
* 8.10 Gaussian pixels and 9-bit DoG buses;
* down-sampling of the fourth Gaussian image;
* five window generators and three extremum/edge/contrast units per octave, ANDed;
* a feature information store.

Choices made here:

* **Kernel weights.** σ_0 = 1.6 and k = 2^(1/3).
* **Weight order.** In the architecture's drawing, the column pass pairs K6 with the outermost rows and
  K0 with the innermost. Here both passes use the row-pass order (K7 centre, K0 outermost), so the 2-D
  filter is a true outer product of one 1-D kernel.
* **Row pass.** Drawn as a folded chain of forward and backward registers. Here it is written as one
  15-deep shift register, which produces the same pairs.
* **Delay lines.** Each Z^-W is a circular RAM of W−1 words plus the tap register.
* **Formats.** Truncation in the row-pass shift. The DoG is floored to whole grey levels.
* **Borders.** The border rules above and the 633 x 353 octave-1 frame.
* **Tags.** Coordinate tags replace delayed sync signals.
* **Tests.** Ties are not extrema. The edge ratio test and both threshold values.
* **Store.** FIFO form, depth and drop-on-full policy.

Not included:

* the camera, which supplies the pixel stream;
* remote access to the keypoints over Ethernet, which is only mentioned and not designed.

The store read ports are where such an interface would attach. There is no descriptor stage: orientation
and descriptors are not computed.

## Verification

Every testbench in `tb/` checks itself and ends with a line `TB_RESULT checks=N failures=M`. The software
reference, `tb/sift_ref_pkg.sv`, has its own implementations of everything it checks:

* the kernels, recomputed with `$exp`;
* the 2-D convolution, as plain loops;
* the DoG;
* the 26-neighbour extremum test;
* the edge test, with real-valued ratios;
* down-sampling;
* the complete two-octave detector.

| testbench | what it checks |
|---|---|
| `tb_array_mult` | products at the two widths used, corner and random operands |
| `tb_image_buffer` | every tap D_k after every pixel, coordinate tags, no movement while idle |
| `tb_line_buffer_5x5` | a 5 x 5 demonstration image through a 5-pixel-line image buffer, tap by tap |
| `tb_gaussian_filter` | three scales against the reference convolution, 7-clock latency, output count |
| `tb_dog_module` | all five DoG images and Gaussian image 3, 9-clock latency |
| `tb_down_sampler` | kept pixels, order, `out_sof`, octave-1 frame size |
| `tb_window_generator` | all nine window positions after every pixel |
| `tb_extremum_detect`, `tb_edge_response`, `tb_low_contrast` | random and constructed cases against the reference (ties, ridges, blobs, every DoG value) |
| `tb_feature_store` | queue model, full-and-drop, push+pop when full, sticky overflow |
| `tb_keypoint_detect` | record list for planted blobs, ridges and weak peaks |
| `tb_sift_top` | two 128 x 128 frames (one with gaps, one at full rate), both octaves record-for-record, plus a second instance with 2-deep stores (overflow); see below |
| `tb_sift_full` | one full 1280 x 720 frame at default parameters: every record of both octaves, exactly 921,600 clocks per frame, pipeline drained within 40 clocks, no overflow (about 10 s of simulation) |

`tb_sift_top` also counts how often each mechanism occurred:

* keypoints from each scale unit;
* keypoints in octave 1;
* edge rejections;
* contrast rejections;
* down-sampled pixels;
* store overflow.

On its test frames, octave-1 keypoints appear only in the finest unit. No image tried produced octave-1
keypoints in the two coarser units, because the coarse 9-bit DoG ties there.

To run a testbench with plain Verilator from the top of the tree:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sift_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/sift_pkg.sv tb/sift_ref_pkg.sv tb/tb_sift_top.sv
./obj_dir/Vtb_sift_top
```

Any testbench works the same way. Initialise everything a simulation reads: the design resets all control
state, but the line-delay RAMs are not cleared. The first rows of a frame read stale RAM words, which
only ever reach outputs that the border rules discard.

## Files

* `rtl/sift_pkg.sv`: widths, `kp_rec_t`, kernel table.
* `rtl/sift_top.sv`: the two-octave top.
* `rtl/dog_module.sv`, `rtl/image_buffer.sv`, `rtl/line_delay.sv`, `rtl/gaussian_filter.sv`,
  `rtl/array_mult.sv`: DoG pyramid of one octave.
* `rtl/down_sampler.sv`: octave-1 source.
* `rtl/keypoint_detect.sv`, `rtl/window_generator.sv`, `rtl/extremum_detect.sv`, `rtl/edge_response.sv`,
  `rtl/low_contrast.sv`, `rtl/feature_store.sv`: keypoint detection of one octave.
* `tb/`: the testbenches above and the reference model.
