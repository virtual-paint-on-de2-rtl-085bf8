# Virtual paint: drawing in the air with two coloured markers

A camera watches the user's hand, which wears two coloured markers: a yellow
one on the drawing finger and a red one on the little finger. The hardware
finds both markers in every camera frame and computes their centres. The
yellow centre becomes a cursor on a VGA screen. While the red marker is
visible the pen is up and the cursor only moves. When the user folds the
little finger and the red marker disappears, the pen goes down and the
cursor leaves a trail on a canvas.

A palette strip on the left edge of the screen holds four colour boxes: red,
green, blue and white. White is an eraser. The user picks a colour by
"clicking" on a box: folding and unfolding the little finger while the
cursor is over it.

Everything is plain synthesizable SystemVerilog in one clock domain, except
for the frame store. On the target board the frame store is an external
SDRAM; here it is modelled by on-chip arrays (see *Frame buffer* below).

## Data path at a glance

```
 sensor ─► ccd_capture ─► raw2rgb ─► mirror_col ─► frame_buffer
 (12-bit Bayer, FVAL/LVAL)  (2x2 → 1 RGB) (left↔right)   (2 x 16-bit words/pixel)
                                                          │ raster read
                                                          ▼
                      ┌──────────────── main_ctrl ───────────────────────┐
                      │ color_detect ─► centroid (red)   ─┐               │
                      │              └► centroid (yellow) ┴► paint_ctrl ─► line_drawer ─┐
                      └─────────────────────────────────────────────────────────────────┘
                                                                                   │ writes
 i2c_ccd_config ─► sensor registers (exposure from switches)                       ▼
 reset_delay    ─► holds everything in reset after power-up          canvas_mem (2 bits/pixel)
                                                                                   │ reads
                                                            vga_ctrl ◄─────────────┘
                                                (640x480, palette strip, crosshair cursor)
```

`virtual_paint_top` wires these blocks together. `vp_pkg` holds the shared
types: a 30-bit RGB pixel (10 bits per channel) and the 2-bit pen colour code.

## Camera front end

**ccd_capture** registers the sensor's 12-bit data together with its frame
valid (FVAL) and line valid (LVAL) flags. A sample is a pixel when both flags
are high. The block counts columns, rows and frames.

**raw2rgb** turns the Bayer mosaic into RGB. The sensor rows alternate
`G R G R …` and `B G B G …`. Each 2x2 tile becomes one RGB pixel, so the image
is half the sensor size in each direction (1280x960 → 640x480).

- Red and blue take the top 10 of their 12 bits.
- Green is the sum of the tile's two greens, shifted right by 3.

One line buffer keeps the even row until the odd row below it arrives.

**mirror_col** flips every line left to right. This makes the screen behave
like a mirror, so moving the hand to the right moves the cursor to the right.

- It writes one line into one of two line buffers.
- It reads the other buffer back in reverse order.
- The output therefore lags one line behind the input.

## Frame buffer

The original system stores each 30-bit pixel in the SDRAM as two 16-bit
words. **frame_buffer** keeps that layout: word A is `{0, R, G[9:5]}` and word
B is `{0, G[4:0], B}`. The address is `y*W + x` and a read takes one clock.

It is built from two on-chip arrays, not an SDRAM controller. At 640x480 that
is 9.8 Mbit, which is too much for the FPGA's on-chip memory. The full-size
top is therefore a simulation model of the system, not a bitstream for the
board. To build for hardware, replace `frame_buffer` with an SDRAM
controller that has the same write and read ports. It must return read data
with a valid flag; `main_ctrl` already waits for `rd_valid`.

## Main control: from pixels to strokes

`main_ctrl` works in *rounds*. It scans the whole frame buffer once, one pixel
per clock. When the scan ends it decides on at most one stroke segment and
draws it. Only when that is finished does the next round start. A round at
640x480 takes about 307,000 clocks plus the drawing time.

**color_detect** classifies each pixel by fixed thresholds and by how much
one channel beats the others:

| class  | condition (10-bit channels)                                          |
|--------|----------------------------------------------------------------------|
| red    | R ≥ 512, R > G + 256, R > B + 256                                    |
| yellow | R ≥ 512, G ≥ 512, R > B + 256, G > B + 256, R ≤ G + 256              |

The two classes cannot both be true for one pixel; an assertion checks this.
A white background fails both tests, because B is never 256 below R.

**centroid** (one per colour) counts the pixels of its colour and sums their
x and y. At the end of the scan, two sequential dividers (`seq_divider`) turn
the sums into the mean position.

- The result is ready SUM_W+1 clocks after `frame_end`. That is 32 clocks at
  the default sizes.
- A colour with fewer than `MIN_PIXELS` (64) pixels counts as absent. This
  keeps a few stray pixels from moving the cursor.

**paint_ctrl** turns the two centres into pen actions. It runs once per round:

1. The yellow centre is scaled from image to canvas coordinates
   (`>> SHIFT`). It is then smoothed: the new position is the mean of the
   previous smoothed position and the new centre. The result is the cursor.
   Because of the rounding, a still marker leaves the cursor up to one canvas
   pixel short of the exact centre.
2. The pen is down when yellow is present and red is absent.
3. **Click:** if the pen was down and now comes up over the palette strip, the
   box under the cursor becomes the pen colour. The boxes are red, green,
   blue and white, from top to bottom, each a quarter of the height. The pen
   starts out red.
4. **Draw:** with the pen down outside the palette, the first point of a
   stroke draws a single point. After that, each round draws a line from the
   last point to the new one.
5. **Jump filter:** if the new point is more than `MAX_JUMP` (20) canvas
   pixels from the last one in x or in y, nothing is drawn. The new point
   starts a fresh stroke. This removes the long streaks that a
   mis-detection in a single frame would otherwise paint.
6. With the white colour the segment is drawn with the 3x3 eraser.

**line_drawer** is a Bresenham line generator that writes one canvas pixel
per clock. With the eraser it writes the 3x3 square around every point of the
line, which is nine clocks per point. It skips points that fall off the
canvas.

## Canvas and display

**canvas_mem** holds 2 bits per canvas pixel:

| code | colour |
|------|--------|
| 00   | white  |
| 01   | red    |
| 10   | green  |
| 11   | blue   |

The canvas is 320x240, so each canvas pixel covers 2x2 screen pixels. That
needs 153,600 bits and fits the 483,840 bits of the EP2C35's M4K blocks,
which a full 640x480 canvas (614,400 bits) would not. After reset the memory
is swept to white, one word per clock, taking W*H clocks. Writes are ignored
while `clearing` is high.

**vga_ctrl** generates standard 640x480 timing: horizontal 640/16/96/48,
vertical 480/10/2/33, both syncs active low. It needs a 25 MHz pixel clock
for 60 Hz.

- The canvas is read one clock ahead of the pixel it is shown on.
- The colour code is mapped to RGB.
- Two overlays are multiplexed on top:
  - the palette strip, for x < `PAL_W` (64 screen pixels);
  - a grey crosshair through the cursor.
- All outputs are registered. They appear two clocks after the counters.

## Configuration and reset

**reset_delay** holds the system in reset for `DELAY` (1,000,000) clocks
after the reset key is released. This gives the sensor and the board time to
settle.

**i2c_ccd_config** is then the first block to run. It writes two sensor
registers over I2C:

- device address 0xBA;
- register 0x09 (shutter width), set to the exposure value on the toggle
  switches;
- register 0x35 (global gain), set to 0x0008.

Each SCL bit takes four phases of `CLK_DIV` (125) clocks, which is 100 kHz at
50 MHz. A missing acknowledge restarts the transfer. A new exposure value
takes effect only after a reset. The register map is that of the common
Terasic 5 MP camera sensor; adjust `DEV_ADDR` and the table for another part.

## Parameters of the top

| parameter   | default   | meaning |
|-------------|-----------|---------|
| SENSOR_W    | 1280      | sensor columns read out (image is half) |
| IMG_W/IMG_H | 640/480   | RGB image and VGA active size |
| CW/CH       | 320/240   | canvas size; IMG_W/CW must be a power of two |
| PAL_W       | 64        | palette strip width in screen pixels |
| MAX_JUMP    | 20        | largest step drawn as a line, canvas pixels |
| MIN_PIXELS  | 64        | fewest pixels for a marker to count |
| RESET_DELAY | 1,000,000 | power-on reset delay, clocks |
| I2C_DIV     | 125       | clocks per quarter I2C bit |

## What comes from the original design and what does not

From the original system description:

- the block chain (capture, Bayer conversion, mirror, frame buffer, main
  control, on-chip canvas, VGA);
- 12-bit sensor data and 10-bit colour channels, with two 16-bit words per
  pixel;
- the 2-bit canvas and its colour codes;
- the roles of the two markers: yellow for the cursor, red for pen up;
- colour detection by thresholds and relative intensity;
- the centre as the mean of the detected coordinates;
- smoothing between successive frames;
- the 20-pixel length limit;
- the 3x3 eraser;
- a palette on the left of the screen, chosen by clicking;
- exposure from the switches, taking effect at reset.

The original description gives no numbers for several choices. The following
are this design's own:

- all threshold values;
- the Bayer phase;
- the 2x2 tile conversion;
- the canvas size;
- the smoothing formula;
- the click gesture;
- the palette order;
- `MIN_PIXELS`;
- the VGA overlay style;
- the I2C register values;
- the scan-then-draw round structure.

The original description also mentions detecting green. This design detects
only the two marker colours.

One passage of the original description suggests that the camera picture is
shown on the screen. The block diagram routes only the canvas memory to the
VGA controller, and this design follows the diagram: the screen shows the
canvas, the palette and the cursor, never the live camera image.

Not built:

- the SDRAM controller and SDRAM (stood in for by `frame_buffer`);
- the camera sensor;
- the VGA DAC;
- the clock PLL.

The top brings out the sensor and DAC signals as ports.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_paint_ctrl -y rtl -y tb +libext+.sv -Irtl \
  rtl/vp_pkg.sv tb/tb_paint_ctrl.sv -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Two testbenches exercise the whole system:

- **tb_virtual_paint_top** runs it at reduced size: a 128-column sensor, a
  64x48 image and a 32x24 canvas. It takes under a second.
- **tb_virtual_paint_full** runs it at the default sizes. It takes about 150
  million clocks, roughly 45 s.

Both use `tb/cmos_sensor_model.sv`. That model draws a yellow and a red
square marker on a near-white background, mirrored the way a real sensor would
see them. It outputs a Bayer stream with FVAL/LVAL timing.

The end-to-end scenario:

1. Move the cursor with the pen up.
2. Draw a red stroke.
3. Jump (the jump is not drawn).
4. Click green and draw.
5. Click white and erase.
6. Lose the marker.

The testbenches check:

- the cursor against the marker position;
- the pen colour;
- the canvas contents;
- the red and green pixels on the VGA output.

They also count each mechanism, and fail if one never happens:

- reset;
- I2C configuration;
- canvas clear;
- rounds;
- strokes;
- rejected jumps;
- clicks;
- erasing;
- marker loss;
- camera frames;
- VGA frames.
