# Skin-colour face detection and tracking for a VGA video pipeline

This RTL finds a human face in live video and follows it from frame to frame
with almost no arithmetic. The idea is that skin of every tone clusters in a
small region of the Cb-Cr chrominance plane once brightness (Y) is set aside.
The design converts every pixel to YCbCr and marks it as skin when its Cb and
Cr fall inside a fixed window. It then cleans that binary mask with a 3x3
majority filter and takes the centroid of the remaining skin pixels as the face
position. A box centred on that position is drawn over the picture sent to a
VGA monitor.

Everything runs at one pixel per clock, and there is no frame memory inside the
design. Only two lines of 1-bit mask and a few accumulators are stored. At the
default 640 x 480, 60 Hz mode, the pixel clock is 25.175 MHz.

The method comes from a real-time FPGA face tracker built around a camera
board and a VGA monitor. Its algorithm is described in outline:

- YCbCr conversion with a given matrix;
- skin segmentation with given Cb/Cr ranges;
- "filtering";
- the centroid as the face location;
- display on VGA.

Most of the hardware detail is this design's own. The section
"What is taken from the original and what is not" lists each choice.

## Data path

```
             request x,y                 +------------------+
 vga_timing ----------------------------> external frame   |
     |                                    | source (camera   |
     |  delay SRC_LATENCY                 | frame buffer)    |
     v                                    +--------+---------+
   t_src <---------------- src_rgb ----------------+
     |        |
     |        v
     |    rgb2ycbcr (2 clk) -> skin_segment (1 clk) -> mask_filter (1 clk)
     |                                                       |
     |                                              centroid_tracker
     |                                                       | face_x, face_y, face_found
     v                                                       v
  box_overlay (1 clk) <--------------------------------------+
     |
  vga_r/g/b, vga_hs, vga_vs, vga_blank_n
```

Every stage passes a `face_pkg::vid_t` along with its data. It holds the
active flag, the sync flags, start- and end-of-frame markers and the x/y
coordinates. Each module therefore delays the timing by exactly its own
latency, and no stage has to know the latency of the others.

## Modules

| file | what it does |
|---|---|
| `rtl/face_pkg.sv` | shared types: `rgb_t`, `ycbcr_t`, `vid_t`, `coord_t` (11-bit coordinates) |
| `rtl/vga_timing.sv` | raster counters giving active video, hsync, vsync, sof, eof and x, y |
| `rtl/rgb2ycbcr.sv` | RGB to YCbCr with Q8 fixed-point coefficients, 2-stage pipeline |
| `rtl/skin_segment.sv` | Cb/Cr window test, giving a 1-bit skin mask |
| `rtl/line_buffer.sv` | read-before-write line memory (array, maps to RAM) |
| `rtl/mask_filter.sv` | 3x3 binary majority filter over the mask |
| `rtl/seq_divider.sv` | restoring divider, one quotient bit per clock |
| `rtl/centroid_tracker.sv` | per-frame count and coordinate sums, then division in vertical blanking |
| `rtl/box_overlay.sv` | draws the tracking box on the outgoing video; black in blanking |
| `rtl/face_detect_top.sv` | top level wiring all of the above |

## Colour conversion

The matrix is

```
Y  =  0.299 R + 0.587 G + 0.114 B
Cb = -0.169 R - 0.331 G + 0.500 B   (+128)
Cr =  0.500 R - 0.419 G - 0.081 B   (+128)
```

The coefficients are scaled by 256 and rounded to 77, 150, 29 / -43, -85, 128 /
128, -107, -21. Each row keeps its exact sum: 256 for Y and 0 for the chroma
rows. White therefore gives Y = 255 and grey gives Cb = Cr = 128 exactly. The
result is rounded to nearest and clamped to a byte. Against a floating-point
model the outputs are within one code; the testbench checks this on 5000
random colours.

## Skin window

A pixel is skin when 95 <= Cb <= 126 and 140 <= Cr <= 168, with both bounds
inclusive. Y is ignored. These ranges are the only values the original gives,
and they belong to an earlier indoor face detector. They are parameters
(`CB_MIN`, `CB_MAX`, `CR_MIN`, `CR_MAX`) because lighting and the camera will
usually call for retuning. The +128 chroma offset above is what makes these
ranges meaningful.

## Cleaning the mask: the 3x3 majority filter

This is the least obvious part of the pipeline. A raw skin mask has two kinds
of error:

- isolated background pixels that happen to have skin-like colour;
- small non-skin holes inside the face (eyes, nostrils, shadows).

Both would bias the centroid. The original only says that the mask is
"filtered". This design uses a 3x3 binary median: the output is 1 when at
least `THRESH` = 5 of the 9 pixels in the neighbourhood are 1.

How the window is built without a frame store:

- `line_buffer` is one memory of `H_ACTIVE` words of 2 bits. At column x it
  holds the mask of lines y-1 and y-2.
- When input pixel (x, y) arrives, the word is read and the new word
  `{mask(x,y), old line y-1 bit}` is written back at the same clock. The y-1
  bit moves into the y-2 slot, so one memory acts as two delay lines.
- The read word plus the incoming bit form a 3-high column. Two registers hold
  the two previous columns, which gives the 3x3 window.
- Neighbours outside the image count as non-skin. The column registers are
  masked for x < 2 and the line-buffer bits are masked for y < 2, so stale
  memory from the last frame is never used. The memory needs no clearing.

The window centred on (x-1, y-1) is complete when pixel (x, y) arrives, so the
filter emits centre (x-1, y-1) one clock later. No input follows the last
column or line, so those centres are never emitted. The filtered mask is
therefore (H_ACTIVE-1) x (V_ACTIVE-1), which is 639 x 479 at the defaults. This
costs one pixel row and column at the right and bottom edges. In exchange the
filter needs no flushing and no extra pixels after the frame.

## From mask to position: the centroid tracker

While the frame streams in, `centroid_tracker` accumulates three values over
the filtered skin pixels: the pixel count, the sum of x and the sum of y. At
640 x 480 these are 19 bits for the count and 28 bits for each sum.

At the end-of-frame marker it does three things:

1. It captures the totals, including the last pixel itself.
2. It clears the accumulators for the next frame.
3. It starts two restoring dividers, one for x and one for y, that run in lock
   step.

The dividers produce one quotient bit per clock. The result (`face_update`
pulse) therefore comes `SUM_W + 3` clocks after the eof pixel, which is 31
clocks at the defaults. That is far inside the 45-line (36,000-clock) vertical
blanking. No multi-cycle path or hardware divider is needed, and the result is
stable long before the next frame starts.

A frame with fewer than `MIN_PIXELS` (256) skin pixels reports `face_found = 0`
and leaves `face_x`/`face_y` at their last value. The centroid is
floor(sum / count).

## Drawing the box, and which frame it belongs to

`box_overlay` samples `face_found`, `face_x` and `face_y` on the first pixel of
every frame and holds them for the whole frame, so a box is never torn. The box
drawn in frame N is therefore the centroid computed from frame N-1, a
one-frame lag. It is a square outline, `BOX_THICK` = 2 pixels thick, whose
outer edge lies `BOX_HALF` = 48 pixels from the centroid. That makes a 97 x 97
box. It is pure green by default and is clipped at the image edges.

The box does not scale with the size of the skin region. Outside the active
region the overlay drives black, as a VGA DAC expects.

## Raster, frame source and pins

`vga_timing` walks an 800 x 525 raster. Each line is 640 active pixels followed
by a front porch of 16, a sync pulse of 96 and a back porch of 48. Each frame
is 480 active lines followed by 10, 2 and 33 lines of porch and sync. Syncs are
active low (`HSYNC_POL` = `VSYNC_POL` = 0), as the 640 x 480 mode requires.

The design is the raster master. It does not receive a camera stream; it
requests pixels:

| signal | direction | meaning |
|---|---|---|
| `src_req`, `src_x`, `src_y` | out | colour of pixel (x, y) wanted; high over the active area |
| `src_rgb` | in | that colour, exactly `SRC_LATENCY` (default 2) clocks later |
| `vga_r/g/b`, `vga_hs`, `vga_vs`, `vga_blank_n` | out | display, `SRC_LATENCY + 1` clocks after the request |
| `face_update` | out | one-clock pulse per frame, in vertical blanking |
| `face_found`, `face_x`, `face_y`, `face_pixels` | out | last result; change only with `face_update` |

The intended source is a frame buffer in external SDRAM that a camera capture
path fills, scaled to the display size. Neither the buffer nor the capture
path is part of this RTL. The same goes for the camera itself, the VGA DAC and
the pixel-clock oscillator or PLL: these are board parts, and the top level
exposes their signals as ports.

## Parameters (top level)

| parameter | default | notes |
|---|---|---|
| `H_ACTIVE`, `H_FP`, `H_SYNC`, `H_BP` | 640, 16, 96, 48 | line timing in pixels |
| `V_ACTIVE`, `V_FP`, `V_SYNC`, `V_BP` | 480, 10, 2, 33 | frame timing in lines |
| `HSYNC_POL`, `VSYNC_POL` | 0, 0 | 1 = active-high sync |
| `SRC_LATENCY` | 2 | read latency of the frame source, 0 allowed |
| `CB_MIN`, `CB_MAX`, `CR_MIN`, `CR_MAX` | 95, 126, 140, 168 | skin window |
| `FILTER_THRESH` | 5 | majority threshold out of 9 |
| `MIN_PIXELS` | 256 | smallest skin area reported as a face |
| `BOX_HALF`, `BOX_THICK`, `BOX_COLOUR` | 48, 2, green | tracking box |

Coordinates are `face_pkg::COORD_W` = 11 bits, so line and frame totals up to
2047 are supported. For larger rasters, raise `COORD_W`. Accumulator and
divider widths follow `H_ACTIVE` and `V_ACTIVE` automatically.

## What is taken from the original and what is not

From the original design:

- the processing chain (YCbCr skin segmentation, filtering, centroid as the
  face location, display on a VGA monitor);
- the conversion matrix;
- the Cb/Cr skin ranges;
- 8-bit colour channels;
- the video structure of active region plus blanking made of front porch,
  sync pulse and back porch;
- the idea of using blanking time for processing.

Choices made here, where the original is silent:

- the filter type (3x3 majority) and its edge handling;
- the +128 chroma offset, rounding and clamping;
- the raster numbers (standard 640 x 480 at 60 Hz) and sync polarity;
- the pull interface to an external frame source and its fixed latency;
- the minimum-area presence test;
- a fixed-size box that follows with a one-frame lag;
- all pipeline latencies;
- asynchronous active-low reset.

The original's skin ranges were taken from other work and were never tuned
for this pipeline.

Not included:

- the camera capture and the SDRAM frame buffer;
- the VGA DAC and the clocking;
- any feature-based check against skin-coloured non-face objects. Like the
  original, this detector returns the centroid of all skin in the picture, so
  hands, arms or wood-coloured backgrounds pull the box.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_face_detect_top \
    -Irtl -y rtl -y tb rtl/face_pkg.sv tb/tb_face_detect_top.sv -o sim
./obj_dir/sim
```

Replace the top-module and file name for the other testbenches:

- `tb_vga_timing`: every timing field on a small raster; the 420,000-clock
  frame period and counts at the default raster.
- `tb_rgb2ycbcr`: corner and random colours against floating point,
  within +-1; the 2-clock latency.
- `tb_skin_segment`: every window edge; random values.
- `tb_line_buffer`: read-before-write over 20 lines; enable-low blanking.
- `tb_mask_filter`: random masks against the 3x3 majority rule; the number of
  emitted pixels; removal and filling both seen.
- `tb_centroid_tracker`: count, found flag and floor-mean centroid; the
  below-threshold and empty frames; the 15-clock update latency at 16 x 12.
- `tb_box_overlay`: every output pixel; the centroid sampled only at sof; no
  box while not found.
- `tb_face_detect_top`: the whole design at its default 640 x 480 size (about
  2 s of simulation, 6 frames). It plays the frame source with synthetic
  pictures: a moving skin-coloured rectangle with holes, isolated skin-coloured
  noise, and one frame without a face. A floating-point model of the whole
  chain checks every tracker result and every VGA pixel, plus the sync pulse
  widths and counts. It also requires each behaviour to occur at least once:
  - a face found and a frame without a face;
  - noise removed and holes filled by the filter;
  - a box drawn, a box moved, and a frame shown without a box.

The end-to-end test uses pictures whose colours lie well away from the window
edges. It therefore checks the data path exactly, but says nothing about how
well the skin window works on real camera images.
