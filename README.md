# Viola-Jones face detector with camera input and VGA output

This RTL finds faces in live camera frames with the Viola-Jones method: a
cascade of Haar-feature classifiers evaluated on integral images. An OV7670
camera delivers 320x240 frames in 12-bit RGB. The detector converts each frame
to gray and builds integral images of it. It then tests every 24x24 window,
16 windows at a time, and paints a rectangle around every window that passes
the whole cascade. A VGA monitor shows the frame with its boxes.

The architecture follows the FPGA design described in "An FPGA Synthesis of
Face Detection Algorithm using HAAR Classifier" (a Nexys 4 / Artix-7 port of
an earlier DE2-115 demo). From that description it takes:

- the block structure and the port use of the frame memory;
- the 320x240 12-bit frame and the 8-bit gray conversion;
- the 21-bit and 29-bit integral-image words;
- the 32-word buffer reads and the 16-word data muxes;
- the 16 parallel sub-windows;
- the weak/strong classifier structure and the 44-bit signed comparator;
- the face-box painter.

Everything the description leaves open was decided here. The main items are
the strip organisation, the command protocol of the sub-windows, all timing,
the clocking and the cascade contents. Each is listed under
[Departures and open points](#departures-and-open-points).

## Block map

```
 OV7670 --SCCB--  ov7670_controller
        --bytes-> ov7670_capture --port B--> image_buffer <--port A-- vga_driver --> VGA
                                            (320x240x12)  <--port A-- face_box (box writes)
                                                 | port B
                                                 v
                                  ii_gen (uses rgb2gray)
                                   | port A            | port A
                                   v                   v
                      ii_buffer (sum, 21 b)    ii_buffer (squares, 29 b)
                                   | 32 words          | 32 words
                                   v                   v
                   subwindow_top: ii_data_mux x2 -> subwindow x16 <- classifier_rom
                                   | detections
                                   v
                                face_box
 capture_ctrl (SW15, btnc) --> control_logic (frame sequencer, clk_b)
```

| module | role |
|---|---|
| `fd_top` | the whole system |
| `fd_pkg` | sizes, cascade record types, sub-window command encoding |
| `ov7670_controller` | writes the camera registers over SCCB after reset |
| `ov7670_capture` | turns the camera byte stream into pixels; writes one frame |
| `capture_ctrl` | video mode or snapshot on button press (debounced) |
| `image_buffer` | dual-clock, true dual-port frame memory |
| `rgb2gray` | RGB444 to 8-bit gray |
| `ii_gen` | integral and squared integral image of one strip |
| `ii_buffer` | strip buffer with a 1-word port and a 32-word port |
| `ii_data_mux` | picks 16 consecutive words out of 32 |
| `subwindow` | one window classifier (variance, weak and strong decisions) |
| `isqrt_seq` | bit-serial integer square root (used by `subwindow`) |
| `subwindow_top` | sequencer, ROM, muxes and the 16 sub-windows |
| `classifier_rom` | cascade tables |
| `face_box` | detection list and rectangle painter |
| `control_logic` | frame schedule: capture, strips, painting |
| `vga_driver` | 640x480 timing, 2x upscaled picture |

## One frame, step by step

`control_logic` runs each frame to completion before it takes the next one:

1. **Capture.** `capture_ctrl` requests a frame. In video mode (SW15 low) it
   does so whenever the detector is idle. In snapshot mode (SW15 high) it
   waits for a debounced press of btnc. `ov7670_capture` waits for the next
   frame start (VSYNC falling) and writes 76,800 pixels into port B of
   `image_buffer`.
2. **Detection, strip by strip.** For every strip top row
   `strip_y = 0, 1, ..., 216`:
   - `ii_gen` builds the integral images of rows `strip_y .. strip_y+23`.
   - `subwindow_top` then classifies all 297 window positions of that strip.
3. **Painting.** `face_box` has collected the top-left corner of every
   detected window. It now draws a red 24x24 outline for each one into port
   A of the frame memory.

Painting comes last so that a box never feeds back into the gray image of a
later strip.

At 100 MHz a frame takes about 3.6 M detector clocks, about 36 ms, plus the
camera frame time. The exact count depends on how early the windows are
rejected.

## Integral images in strips

The integral word is 21 bits wide and the squared-integral word 29 bits. A
sum over the whole 320x240 frame can reach 19.6 M, which is far too large for
21 bits. So the integral image is built over a **strip of 24 rows by 320
columns**, one window high:

- maximum sum: 24 x 320 x 255 = 1,958,400 < 2^21
- maximum sum of squares: 24 x 320 x 255^2 = 499,392,000 < 2^29

Both widths are exactly the smallest that fit such a strip.

The strip is stored with a leading zero row and a leading zero column.
`S(r, c)` is the sum of gray levels in strip rows `< r` and columns `< c`,
for `r = 0..24` and `c = 0..320`. The sum over a rectangle with corners
`(x, y)` and `(x+w, y+h)` is then

```
S(y+h, x+w) - S(y, x+w) - S(y+h, x) + S(y, x)
```

with no special case at the image edge. `Q` is the same for squared gray
levels.

`ii_gen` walks the strip row by row and spends two clocks per pixel on the
single-word port A of the two buffers:

- **read clock:** it addresses the pixel in the frame memory and reads
  `S(r-1, c)` and `Q(r-1, c)`;
- **write clock:** it writes `S(r, c) = S(r-1, c) + rowsum` and the matching
  `Q(r, c)`.

`rowsum` and `rowsq` are the running sums along the current row. A strip takes
`(25 x 321) + (24 x 320) = 15,705` clocks.

## Feeding 16 windows from one read

This is the core of the throughput. The 16 sub-windows `sw[0..15]` sit at
window columns `16g .. 16g+15` (group `g`, with `g = 0..18`). They always need
the *same* corner of their own window at the same moment. Corner
`(row, cx)` of window `16g+i` is strip word `(row, 16g + cx + i)`, for
`i = 0..15`: a run of 16 consecutive words that starts at an arbitrary column.

- Port B of `ii_buffer` returns the **32 words** of one row that start at
  column `16 x blk`. The sequencer sets `blk = g + cx/16`.
- `ii_data_mux` keeps words `cx mod 16 .. cx mod 16 + 15` of those 32 and
  registers them. Word `i` goes to `sw[i]`.

To read 32 consecutive words in one clock, `ii_buffer` spreads the strip over
32 banks by `column mod 32`. Each bank sees one address per clock. The
chunk's word order is rotated by 16 when `blk` is odd. Columns past 320 are
padding; only windows that do not exist (marked invalid) read them.

Both buffers get the same port-B address. The sum and square words of a corner
therefore arrive together.

## The cascade engine

`subwindow_top` drives all 16 sub-windows with one command per clock. The
commands are `sw_ctrl_t` from `fd_pkg`. Each command travels with its buffer
read and reaches the sub-windows two clocks later: one clock for the buffer
and one for the mux. Per window group the sequence is:

| commands | clocks | effect in each `subwindow` |
|---|---|---|
| `OP_START` | 1 | `alive` = window lies inside the image; clear sums |
| `OP_VAR` x4 | 4 | window sum `S` and square sum `Q` from 4 corners |
| `OP_VAR_DONE` + wait | 21 | start `sqrt(576*Q - S^2)` = 576 x standard deviation (18 clocks) |
| per feature: `OP_CORNER` x4 per rectangle | 8 or 12 | `feat += (+/-) weight x corner` |
| per feature: `OP_FEAT` | 1 | weak classifier: vote `left` if `feat x 2^12 < thr x 576*std`, else `right` |
| per stage: `OP_STAGE`, then 4 clocks | 5 | strong classifier: stay alive only if the vote sum is **greater than** the stage threshold |
| report | 16 | surviving windows go to `face_box`, one per clock |

The weak decision divides by the window's standard deviation, as in the
original Viola-Jones method, so that the result does not depend on lighting.
The division is avoided by multiplying the threshold by the deviation
instead. The comparison is a 44-bit signed compare. Thresholds are Q4.12.

After every stage the sequencer looks at the 16 `alive` flags. If none is
set, the rest of the cascade is skipped for that group (early exit). With the
built-in cascade, a group rejected at stage 0 costs about 44 clocks and a group
that runs all stages about 102.

The last group of a strip holds windows 288..303. Windows 297..303 would run
past the right edge, so they are marked invalid at `OP_START` and never
report.

## Cascade contents

`classifier_rom` is an asynchronous-read table with two parts:

- **stages:** first feature, number of features, stage threshold;
- **features:** up to 3 rectangles, each `x, y, w, h` within the 24x24
  window and a signed 4-bit weight; a weak threshold; a left vote and a right
  vote.

The index widths allow 16 stages and 256 features.

**The shipped contents are not a trained face detector.** They are a
hand-written 3-stage, 4-feature cascade. It fires on a bright window with:

- a dark eye band (stage 0);
- a bright nose bridge and a dark mouth (stage 1);
- a bright mid-forehead above two dark eyes (stage 2).

Every feature is balanced: its weighted rectangle areas add up to zero. The
cascade exercises two- and three-rectangle features, weights -1, 2 and 3, and
rejection at every stage.

To detect real faces, replace the two `case` tables with a trained cascade,
for example one converted from the usual 24x24 frontal-face Haar cascade.
Convert its floating-point thresholds to Q4.12 and its leaf values to 16-bit
integers. Also widen `stage_idx` and `feat_idx` if the cascade needs more
than 16 stages or 256 features. Update `NUM_STAGES` and `NUM_FEATS` in
`fd_pkg`.

## Clocks, camera and display

**Clocks.** There are two clock domains. The board PLL that makes them is not
part of this RTL.

- `clk_a`, 25 MHz, serves the VGA driver, image port A and the face painter.
  It is also the camera's XCLK.
- `clk_b`, nominally 100 MHz, serves everything else.

**Crossings.** `rst_n` is synchronised into each domain. Two signals cross
domains:

- **Paint request.** `face_box` takes the request through a four-phase
  req/ack handshake with two-flop synchronisers. Its detection list is
  written in `clk_b` and read in `clk_a`, but only while the request holds
  the list still.
- **Camera signals.** They are oversampled in `clk_b` and taken on the
  detected PCLK rising edge. This needs PCLK at most `clk_b/4`. The
  controller sets the camera's clock divider so that PCLK = XCLK/2 = 12.5 MHz.

**Camera.** `ov7670_controller` writes six registers, about 10 ms after
reset, at 100 kHz SIOC:

1. soft reset;
2. QVGA + RGB;
3. RGB444 "xR GB";
4. full output range;
5. internal clock = XCLK/2;
6. normal PCLK.

SIOD is released during each byte's don't-care bit, as `siod_oe = 0`. The
board pin is `siod_oe ? siod_o : 'z`.

**Display.** `vga_driver` produces standard 640x480 at 60 Hz timing (800 x
525 clocks, negative syncs). Every stored pixel is shown as 2x2 screen
pixels. Port A is shared: a face-box write takes the port for one clock, and
the VGA pixel of that clock is lost. This only happens during the short
painting phase.

## Departures and open points

- **Cascade.** The cascade is a placeholder (see above), so detection quality
  says nothing about real faces.
- **Arithmetic.** The published design reports floating-point multiplications
  for the variance path. This design uses integers: an exact integer square
  root and Q4.12 thresholds.
- **Window size, scale and step.** The description gives none of them. This
  design uses 24x24 windows, one scale (no image pyramid) and a step of one
  pixel in both directions (`STEP_Y` in `control_logic`). Larger faces are
  not found.
- **Overlapping detections.** They are all painted; there is no merging. The
  list holds 128 entries (`MAX_FACES`). Further detections set
  `face_overflow` and are not painted.
- **Pipelining.** Capture, detection and painting run one after another. The
  integral buffers are single (one strip at a time), not double-buffered, so
  a strip's integral build and its classification do not overlap.
- **Camera registers.** The register list comes from the OV7670 datasheet
  conventions, not from the description.
- **Unused clocks.** The 40 MHz and 50 MHz clocks of the original clock
  module have no user here.
- **Lint.** The frame memory is written from two clocks. Lint tools flag
  this as a multiply driven signal; it is inherent to a true dual-port RAM.
- **Resources.** The memories total 1.36 Mbit: 921,600 bits of frame memory
  and 2 x 8,800 strip words. That is about 38 of the 135 36-Kbit block RAMs
  of an XC7A100T, while the published implementation uses 94.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

| testbench | what it checks |
|---|---|
| `tb_fd_top` | the full design at default sizes, against a reference model (see below) |
| `tb_subwindow_top` | the 16-wide array on reference strips: every window's verdict |
| `tb_subwindow` | random command streams: standard deviation, votes, survival |
| `tb_ii_gen` | every integral and square word of four strips (one all-white, at the word-width limit); strip time 15,705 clocks |
| `tb_ii_buffer`, `tb_ii_data_mux`, `tb_image_buffer` | memory and routing against models |
| `tb_rgb2gray` | all 4,096 inputs |
| `tb_classifier_rom` | table consistency |
| `tb_ov7670_capture` | a whole random frame from the camera model |
| `tb_ov7670_controller` | SCCB decoded like a camera would |
| `tb_capture_ctrl` | both modes and bounce rejection |
| `tb_vga_driver` | timing and every pixel of two frames |
| `tb_face_box` | outlines, overflow, handshake |
| `tb_control_logic` | strip order |

`tb_fd_top` runs the full-size design with all parameters at their defaults:

- A camera model sends one frame with four faces in video mode.
- Then, in snapshot mode, it sends a frame with a grid of 108 faces, taken
  after a bouncing press and then a real one.
- A behavioural reference model (`tb/fd_ref_pkg.sv`) supplies the expected
  detection list. For each frame the testbench checks that list, every pixel
  of the painted frame memory, and every pixel of one VGA screen.
- It requires each mechanism to occur at least once: video and snapshot
  capture, early exit, full passes, the partly valid last group, list
  overflow, and port-A sharing.

It needs about 40 M simulated clocks and about a minute of wall time.

Simulate with plain Verilator (5.x), from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/fd_pkg.sv tb/fd_ref_pkg.sv tb/tb_fd_top.sv --top-module tb_fd_top
./obj_dir/Vtb_fd_top
```

Replace `tb_fd_top` with any other testbench name. The test image generators
and the expected-value model live in the testbenches and `fd_ref_pkg`. No data
files are needed.
