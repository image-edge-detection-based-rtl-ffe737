# Streaming Sobel enhancement edge detector

This design finds edges in an 8-bit grey image as the image streams past, one
pixel per clock. It needs no frame buffer. Two line buffers hold the two
previous image lines. A 3x3 neighbourhood is formed around each pixel. An
enhanced Sobel operator then measures the edge strength there. The classic
operator uses two kernels. This one uses four (0, 45, 90 and 135 degrees) and
keeps the strongest response, which places edges more precisely and thins
them. The strength can be used as it is, or thresholded into a black and
white edge map (0 or 255).

At the default size of 1024 x 1024 pixels, a frame takes 1,048,576 clocks.
That is 20.97 ms at 50 MHz, about 48 frames per second.

## Block structure

```
            +--------------+  P1..P9  +-----------+  mag   +--------------+ data_out  +------------+
data_in --->| pixel_window |--------->| sobel_enh |------->| edge_control |---------->| binary_seg |--> result
en -------->| (2 x         |          | 4 x       |        | position,    | data_valid|            |--> result_valid
            |  line_fifo)  |          | direction_|        | border = 0,  |           +------------+
            +--------------+          |   conv    |        | output valid |                 ^
                  |                   +-----------+        +--------------+             threshold
                  +------------------------ en (turn) ----------^
```

| File | Role |
|---|---|
| `rtl/edge_pkg.sv` | Window tap names `P1`..`P9` and pipeline latency constants |
| `rtl/line_fifo.sv` | One-line delay: a RAM of `IMG_W-1` words with a registered read |
| `rtl/pixel_window.sv` | 3x3 window: three 3-pixel shift registers fed by the input and two line FIFOs |
| `rtl/direction_conv.sv` | One orientation kernel: six pixels, x2 by shifting, \|difference\|, 2 stages |
| `rtl/sobel_enh.sv` | Four `direction_conv` in parallel, then a two-level maximum, saturated to 255 |
| `rtl/edge_control.sv` | Works out which pixel each result belongs to, zeroes the border, produces the valid strobe |
| `rtl/binary_seg.sv` | `result = (data > threshold) ? 255 : 0` |
| `rtl/sobel_edge_top.sv` | Connects the blocks above |

## The four-orientation operator

The window is numbered row by row, P1 at the top left and P9 at the bottom
right (the newest pixel). The kernels are:

```
     0 deg          45 deg         90 deg         135 deg
   -1  0 +1       0 +1 +2       -1 -2 -1       +2 +1  0
   -2  0 +2      -1  0 +1        0  0  0       +1  0 -1
   -1  0 +1      -2 -1  0       +1 +2 +1        0 -1 -2
```

Each kernel has three zero coefficients. The other six are `+1 +2 +1` on one
side and `-1 -2 -1` on the other. So every orientation reduces to the same
unit, `|(a + 2b + c) - (d + 2e + f)|`, and only the wiring differs. The doubling
is a left shift. The centre pixel P5 is never used.

`direction_conv` computes the two three-term sums in its first register stage.
The second stage forms the absolute difference, which is at most 4 x 255 = 1020
(10 bits). `sobel_enh` then takes the maximum of the four in two registered
comparison levels. Any value above 255 is saturated to 255, so the strength
fits in one pixel. The operator latency is `SOBEL_LAT = 4` clocks. It accepts
a new window every clock.

The kernel signs do not matter, since only absolute values are compared.

## Window generation

`line_fifo` is a dual-port RAM of `IMG_W-1` words. It uses one circular address
with read-before-write: each push reads the oldest word into the output
register and writes the new pixel in its place. The RAM plus the register give
a delay of exactly `IMG_W` pushes. Just before pushing pixel `k`, `dout` holds
pixel `k - IMG_W`, which is the pixel directly above. The two FIFOs are
chained:

* The input pixel enters the bottom shift register and FIFO 1.
* FIFO 1's output enters the middle shift register and FIFO 2.
* FIFO 2's output enters the top shift register.

After the push of pixel (r, c), the window covers rows r-2..r and columns
c-2..c. Its centre P5 is pixel (r-1, c-1). The window only moves on a push
(`en` high), so gaps in the input stream are allowed.

Windows that straddle a line end mix two image lines, and the RAMs hold stale
data after reset. Both cases only affect windows centred on border pixels,
which are discarded (see below). This is why the design has no line-end logic
and does not clear the RAMs.

## Border handling and output order (edge_control)

This is the least obvious part of the design.

A 3x3 operator has no result for the first and last row and column.
`edge_control` sends out one result for every image pixel, in raster order.
For border pixels the result is 0. For all other pixels it is the operator
output.

**Fixed lag.** Output pixel `k` can first be computed when input pixel
`k + IMG_W + 1`, its bottom-right neighbour, is pushed. The controller counts
`lag`, the number of pixels pushed minus the number of results sent.

* After reset, the first `IMG_W + 1` pushes send nothing, and `lag` rises to
  `IMG_W + 1`.
* From then on, every push sends exactly one result, the one `IMG_W + 1`
  pixels behind it.

Output and input positions are kept as separate row/column counters, and the
border test is made on the output position.

**Frames are a continuous stream.** There is no start-of-frame signal. Pixel
(0,0) is the first pixel after reset, and each frame follows straight after
the previous one. Pushing the first `IMG_W + 1` pixels of the next frame sends
out the last `IMG_W + 1` results of the frame before. All of those results are
border pixels (the right end of the second-to-last row and the whole last
row), so they never need window data.

**Flush.** If input stops after a complete frame, those last `IMG_W + 1` border
results are sent one per idle clock instead. `lag` counts down to 0. When the
next frame starts, `lag` builds up again before results flow.

The decision to send a result, and whether that result is a border pixel, are
computed when the pixel is pushed. A delay line of `SOBEL_LAT` stages carries
both to the operator output. The controller registers the final value.

## Interface and timing (sobel_edge_top)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock (50 MHz target) |
| `rst` | in | 1 | synchronous, active-high reset |
| `en` | in | 1 | `data_in` holds the next pixel, in raster order |
| `data_in` | in | 8 | grey pixel |
| `threshold` | in | 8 | segmentation level |
| `data_valid` / `data_out` | out | 1 / 8 | edge strength, 0 on the border |
| `result_valid` / `result` | out | 1 / 8 | binary edge map, 0 or 255 |

Latency: the result for pixel `k` appears on `data_out` `SOBEL_LAT + 1 = 5`
clock edges after the edge that pushes pixel `k + IMG_W + 1`. It appears on
`result` one edge later. `threshold` is sampled when each result reaches
`binary_seg`. To change it cleanly, change it between frames, after the flush.

Parameters on the top, with their defaults: `IMG_W = 1024`, `IMG_H = 1024`,
`PIX_W = 8`. `IMG_W` and `IMG_H` must each be at least 3. `PIX_W` also sets
the saturation level and the "on" value of `result` (all ones).

Coarse synthesis of the default top gives 319 flip-flops and 16,368 RAM bits
(two 1023 x 8 buffers, which fit two 18-kbit block RAMs). A 4-LUT device of
the Spartan-3 class holds the whole detector in a small part of its fabric.

## Design choices to be aware of

These behaviours were chosen here; they are not given by the underlying
architecture description:

* **Kernels.** The four kernels are the standard 0/45/90/135-degree Sobel
  kernels.
* **Combining the orientations.** The absolute value of each orientation is
  taken before the comparison. The maximum is saturated to 8 bits.
* **Pipeline.** It has 2 stages per orientation and 2 comparison stages.
* **Output timing.** The fixed-lag output order, the flush on idle cycles and
  the continuous frame stream belong to this design, as does the
  synchronous, active-high reset.
* **Threshold.** The comparison is strict (`>`). The threshold is a run-time
  input, not a constant.
* **`data_out` port.** The edge strength before thresholding is brought out as
  its own port.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. All of them pass. The reference arithmetic in
`tb/sobel_ref_pkg.sv` is written straight from the kernel matrices, as full
3x3 signed dot products, so it does not share the RTL's structure.

| Testbench | What it shows |
|---|---|
| `line_fifo_tb` | delay of exactly one line with idle gaps; output holds while idle |
| `pixel_window_tb` | all nine taps equal the right stream offsets after every push |
| `direction_conv_tb` | random and extreme inputs, 2-cycle latency, one result per clock |
| `sobel_enh_tb` | random, flat, step edges in all orientations, saturation; 4-cycle latency |
| `edge_control_tb` | 5x4 image, 3 frames: raster order, border zeroing, latency, flush on idle, back-to-back frames |
| `binary_seg_tb` | strict comparison, including equality and extremes |
| `sobel_edge_top_tb` | 10x7 image, 3 frames, input gaps, back-to-back frames, flush, threshold change; every pixel and its latency checked; each mechanism counted |
| `sobel_edge_top_full_tb` | one 1024x1024 frame at the default parameters: every pixel checked, one pixel per clock, frame time 1,049,605 clocks including the drain (20.99 ms at 50 MHz) |

To simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/edge_pkg.sv tb/sobel_ref_pkg.sv tb/sobel_edge_top_tb.sv \
  --top-module sobel_edge_top_tb -o sim
./obj_dir/sim
```

The full-size test builds the same way with `tb/sobel_edge_top_full_tb.sv`. It
runs in a few seconds.
