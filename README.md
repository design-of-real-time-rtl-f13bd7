# Real-time edge detection pipelines: Canny and nonlinear Laplace

This RTL implements two classic edge detectors for 8-bit grayscale video. Both are
written as pixel pipelines: one pixel goes in per pixel enable and one result comes out.
Line FIFOs hold the few image rows that each 3x3 or 5x5 neighbourhood needs, so nothing
but the final Canny threshold stores a whole frame.

* **Canny**: Gaussian smoothing, then horizontal and vertical gradients and their
  magnitude. Next comes nonmaximum suppression along the quantised gradient
  direction. Last is a double (hysteresis) threshold. The threshold is normally a
  recursive search; here it is a two-pass labeling with an equivalence table.
* **Nonlinear Laplace**: Gaussian smoothing, then the nonlinear Laplace operator
  `NL = max(3x3) + min(3x3) - 2I` and the edge strength `E = min(max-I, I-min)`. The
  zero crossings of NL are found as the contour of its sign image. That contour is
  multiplied by E and thresholded.

The architecture follows a published multi-FPGA prototype of these two detectors. In that
prototype each stage was one partition on a board of FPGAs and SRAMs. Here each stage is a
synthesizable SystemVerilog module, and the line stores are on-chip memory arrays.

## Files

| file | role |
|---|---|
| `rtl/edge_pkg.sv` | shared types: `pixel_t` (8 bit), `grad_t` (9-bit signed), direction enum `dir_t`, `magdir_t` |
| `rtl/line_delay.sv` | line FIFO: fixed delay of `DEPTH` pixel enables |
| `rtl/gauss_conv1d.sv` | 1D (1,3,4,3,1)/12 convolver, transposed form; `STRIDE` = tap spacing |
| `rtl/gauss_filter2d.sv` | 5x5 Gaussian as horizontal + vertical 1D convolvers |
| `rtl/gradient.sv` | Sx, Sy (9-bit signed) and saturated magnitude |
| `rtl/find_direction.sv` | gradient direction quantised to four (dx,dy) |
| `rtl/nonmax_suppress.sv` | 3x3 window, two comparisons per pixel over a shared bus |
| `rtl/hyst_threshold.sv` | double threshold by two-pass labeling |
| `rtl/canny_top.sv` | Canny pipeline |
| `rtl/nl_laplace.sv` | nonlinear Laplace filter and edge strength |
| `rtl/zero_cross.sv` | zero crossing, multiplication by E, threshold |
| `rtl/laplace_top.sv` | Laplace pipeline |
| `rtl/edge_detect_top.sv` | both pipelines side by side (top level) |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/edge_ref_pkg.sv` | reference models (stream-level, written from the algorithm definitions) |
| `tb/canny_driver.sv`, `tb/laplace_driver.sv` | frame schedules and checkers used by the pipeline testbenches |

## Stream timing: how the pipelines line up

This section matters most when connecting or changing the blocks.

Every stage has `clk`, `rst_n` and a pixel enable `en`. A stage moves forward only on
clocks where `en` is high. Enables may come irregularly, and every stage sees the same
enable. Call the pixel presented on enable *k* `s[k]`. A stage's output is registered on
the enable, and the next stage reads it on the following enable. So each stage boundary
adds exactly one enable of delay, whatever the spacing of the enables.

Neighbourhoods are taken from a raster stream: the pixel above is `s[k-W]` and the pixel to
the left is `s[k-1]`, where `W` is the line length `IMG_W`. Borders are not handled
specially. A window that crosses the end of a line reads the end of the neighbouring line,
and the first lines of a frame read the end of the previous frame. Only the outermost
2–4 pixels of the border differ from a padded implementation.

The output latched on enable *k* belongs to these input pixels:

| stage | output on enable k belongs to |
|---|---|
| `gauss_conv1d` (stride S) | window `s[k] ... s[k-4S]`, centre `s[k-2S]` |
| `gauss_filter2d` | input pixel `k-2W-3` |
| `gradient` | its input `s[k]` (Sx = s[k]-s[k-1], Sy = s[k]-s[k-W]) |
| `nonmax_suppress` | its input `s[k-W-2]` |
| `nl_laplace` | its input `s[k-W-1-TREE_REGS]` (`s[k-W-3]` by default) |
| `zero_cross` | its input `s[k-W-1]` |
| `canny_top.nms_mag` | input pixel `k-3W-7` |
| `laplace_top` outputs | input pixel `k-4W-9` |

## Gaussian smoothing

`gauss_conv1d` is the convolver in transposed form. The incoming pixel is multiplied by
1, 3, 4, 3 and 1; the multiplications are shifts and adds. Each product is added to a
chain of four delay elements, 8, 11, 12 and 12 bits wide. The critical path is one
adder plus the final adder, and the 12-bit sum is exact. A registered divider by 12
(the coefficient sum, truncating) brings the result back to 8 bits.

The delay elements are `line_delay` instances of length `STRIDE`. With `STRIDE=1` the
module is the horizontal convolver. With `STRIDE=IMG_W` it is the vertical convolver, and
its four line FIFOs hold the intermediate image. `gauss_filter2d` chains one of each.
Because both passes normalise to 8 bits, the two convolvers are identical. The net kernel
is (1,3,4,3,1)ᵀ(1,3,4,3,1)/144, with truncation after each pass.

## Gradient and magnitude

`gradient` extends pixels to 9 bits and forms `Sx = p(x)-p(x-1)` (one register) and
`Sy = p(y)-p(y-1)` (one line FIFO). The magnitude `Sx²+Sy²` would need 17 bits. It is kept
in 8 bits and saturates at 255, which keeps the weak end of the range where the thresholds
work. Which operand is subtracted from which is this design's choice.

## Nonmaximum suppression

`find_direction` quantises the gradient direction with slope 0.5 (26.6°) instead of
tan 22.5°, so the tests are shifts and compares:

```
(1,0)   if |Sy| < |Sx|/2
(0,1)   if |Sx| < |Sy|/2
(1,-1)  if Sx·Sy < 0
(1,1)   otherwise
```

Each magnitude travels through the window together with its 2-bit direction. Two line
FIFOs and 3x3 registers hold the window; x points right and y points down, so the
newest line is `y+1`. The centre's direction selects which neighbour drives a single
comparison bus. In the original board design this was a 3-state bus; here it is a
one-hot AND-OR bus. The two comparisons are made one after the other:

1. On the clock after a pixel enable, the neighbour M+ in the gradient direction is on
   the bus. `M > M+` and `M ≥ M+` are stored.
2. From then until the next pixel enable, the opposite neighbour M− is on the bus. On
   that enable the output becomes M if `(M>M+ ∧ M≥M−) ∨ (M>M− ∧ M≥M+)`, and 0 otherwise.

So **Canny pixel enables must be at least two clocks apart**. An assertion in
`nonmax_suppress` checks this. Latching the decision on the next enable, rather than on
a fixed clock, keeps the stage latency at one enable for any enable spacing.

## Double threshold by two-pass labeling (`hyst_threshold`)

A pixel is an edge if its magnitude is above `th_low` and it is 8-connected, through such
pixels, to a pixel above `th_high`. The usual recursive search does not fit a pipeline, so
the unit works on a frame in three steps:

1. **Pass 1** (streaming, one pixel per enable). Each candidate pixel (`> th_low`) takes a
   label from its causal neighbours: above, else left or upper-left, else upper-right,
   else a new label. When "above" is empty and both a left-side label and "upper-right"
   are set, and they differ, the pair is written to the equivalence table. With
   8-connectivity no other new equivalence can arise at a pixel. A label is marked strong
   if any of its pixels is above `th_high`. Every pixel's label goes to the frame store.
   The previous line's labels are kept in a line buffer.
2. **Resolve** (between the passes). For each stored pair a small state machine walks
   both labels to their roots in a union-find table, one step per clock. It then hangs
   the larger root under the smaller. Parents always point to smaller labels. So one
   ascending sweep can point every label directly at its root and OR its strong flag into
   the root.
3. **Pass 2.** The frame store is read back at one pixel per clock. A pixel is an edge if
   its label is non-zero and its root is strong. Outputs: `out_valid`, `out_edge`, and
   `out_last` on the last pixel.

The frame store, union-find table, strong flags and pair table exist twice (two banks).
Pass 1 of a frame fills one bank, while resolve and pass 2 of the previous frame work on
the other. The banks swap when pass 1 reaches the last pixel. A frame starts with `sof` on
its first pixel; a `sof` in the middle of pass 1 is ignored. If pass 1 ends while the other
bank is still being resolved or read out, the new frame is discarded and `frame_dropped`
pulses. With enables two or more clocks apart, pass 1 takes at least `2*IMG_W*IMG_H`
clocks, and pass 2 takes `IMG_W*IMG_H` plus the resolve, so in the Canny pipeline this
happens only with a very long resolve. If labels
(`MAX_LABELS-1` usable) or table entries (`MAX_PAIRS`) run out, `overflow` is set for that
frame. Pixels that could not be labeled are then treated as background, and a lost
equivalence can turn weak edges off.

`canny_top` starts the threshold's frame `3*IMG_W+8` enables after `sof`. That is when the
suppressed value of input pixel (0,0) arrives, so the edge image lines up with the input
image. Frames can follow each other with no gap. The last `3*IMG_W+8` pixels of a frame
reach the threshold only while further pixels are pushed in, so after the last frame of a
sequence the source must give `3*IMG_W+8` more enables (any pixel value, no `sof`). The
original design states two passes per image but not how pass 2 overlaps the next frame;
the two banks are this design's answer.

## Nonlinear Laplace filter and zero crossing

`nl_laplace` takes a 3x3 window from two line FIFOs and two registers per row. It
computes maximum and minimum with two trees of 8 compare-and-select cells. It outputs
`NL = (max-I)+(min-I)` (9-bit signed) and `E = min(max-I, I-min)` (8 bits). The max/min
trees are the slow path: four levels of pairwise selects (9, 5, 3, 2, 1 values). The
parameter `TREE_REGS` chooses how many register ranks cut them: 0 (none), 2 (after levels
2 and 4, the default) or 4 (after every level). NL and E are registered once more in every
case, and each rank adds one enable of latency. The original work reports all three
options with their area and speed, but not exactly where the registers of the fastest
one sit; here they follow levels 1 and 3.

`zero_cross` takes the sign bit of NL (1 = negative) as a binary image. It erodes the image
with the 4-connected cross and XORs the result with the centre. What remains is the
8-connected contour of each negative region. E passes through a line FIFO and a register
of the same length as the centre of the binary window, so both refer to the same pixel.
The contour bit selects E or 0 (the "multiplication"). `edge_out` is `strength_out >
threshold`. This stage accepts a pixel on every clock.

## Top level (`edge_detect_top`)

The two detectors are independent. They share only `clk` and `rst_n`.

| port | dir | width | meaning |
|---|---|---|---|
| `c_pix_en`, `c_sof`, `c_pix` | in | 1,1,8 | Canny pixel input; enables ≥ 2 clocks apart, `sof` with pixel (0,0) |
| `c_th_low`, `c_th_high` | in | 8,8 | Canny thresholds (strictly "above") |
| `c_nms_mag` | out | 8 | suppressed magnitude stream |
| `c_edge_valid`, `c_edge`, `c_edge_last` | out | 1 | Canny edge image (pass 2), one pixel per clock |
| `c_busy`, `c_frame_dropped`, `c_overflow` | out | 1 | threshold unit status |
| `l_pix_en`, `l_pix`, `l_threshold` | in | 1,8,8 | Laplace pixel input and threshold |
| `l_edge`, `l_strength` | out | 1,8 | Laplace edge bit and E·zero-crossing |

Parameters: `IMG_W` (line length, default 256) and `IMG_H` (default 256). `canny_top` and
`hyst_threshold` also have `MAX_LABELS` and `MAX_PAIRS` (default 1024 each). The defaults
are this design's own, because the original gives no image size. A 256x256 frame fills
exactly the 64k-word SRAM of one prototyping module. At the default size the label store
has two banks of 65536 x 10 bits, and each line FIFO is 255 words.

## Where this RTL departs from or goes beyond the original

* On-chip memory arrays replace the board SRAMs for line FIFOs and the label store. The
  board itself is not modelled: FPGA modules, the 32-bit inter-module bus, and the PC
  parallel-port link used for hardware verification.
* The 3-state comparison bus is a one-hot AND-OR bus.
* Chosen here: the labeling mask, the union-find resolve, the table sizes, the frame
  handshake and the two banks of the Canny threshold. The original only outlines
  the two-pass method and refers elsewhere for details. The two banks double the label
  store to 2 x 65536 x 10 bits, more than the 64k x 16 SRAM of one prototyping module.
* Also chosen here: the default of two register ranks in the Laplace max/min tree, the
  image size, the thresholds as run-time inputs, truncating division, subtraction order of the gradients, border handling (wrap), reset behaviour,
  and where the pipeline registers of the fastest max/min tree sit.

## Simulating

Each testbench is self-contained and prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/edge_pkg.sv tb/edge_ref_pkg.sv \
    tb/edge_detect_top_tb.sv --top-module edge_detect_top_tb -o sim
./obj_dir/sim
```

Replace `edge_detect_top_tb` with any other `*_tb` to run one block. The tools find the
other files through `-Irtl -Itb`. Lint warnings can be silenced with `-Wno-fatal`.
The reference models in `tb/edge_ref_pkg.sv` work on whole streams. Each one shifts its
input by one enable per stage boundary and tracks which outputs still depend on data from
before the first pixel, so the comparisons skip those outputs.

* `edge_detect_top_tb` runs the whole design at the default size (256x256). The Canny side
  runs six frames back to back, with no blanking between them, and checks all of them. One
  is a grid-of-dots frame that must overflow the 1024-entry label table; no frame may be
  dropped. The Laplace side runs three frames at the same time. It checks
  every suppressed magnitude, every edge pixel of the checked Canny frames, and every
  Laplace output. It fails if any mechanism was never exercised: magnitude saturation,
  each of the four directions, suppression, weak pixels kept and rejected, label merges,
  pass 2 running while the next frame streams in, overflow, contour pixels above and below the threshold, and eroded
  interiors. It takes about 15 seconds.
* `canny_top_tb` and `laplace_top_tb` run the same schedules at 24x16 and 16x12 pixels.
* The unit testbenches use short lines (6–8 pixels) and random or exhaustive stimulus.
  `find_direction_tb` covers all 511x511 gradient pairs. `hyst_threshold_tb` compares
  300 random frames against a flood fill and checks overflow with a 4-label table. Every
  seventh frame comes with an enable on every clock, so it ends before the previous frame's
  pass 2 and must be dropped; all others must not be.
  `nonmax_suppress_tb` runs at the two-clock minimum enable spacing. `nl_laplace_tb`
  runs all three `TREE_REGS` options side by side.
