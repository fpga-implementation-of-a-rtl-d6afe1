# Cubido3D: a wireframe 3D viewer built as a hardware pipeline

Cubido3D draws a rotating wireframe solid (cube, square pyramid, octahedron
or triangular prism) on a 640x480 VGA screen with no processor involved.
Five push buttons turn the model in azimuth and elevation, change the
perspective (from a strong wide-angle view down to a flat orthographic one)
and select the model. Every frame the whole picture is recomputed from
scratch: a projection matrix is built from the three angles, the model's
vertices are projected to the screen, and its edges are drawn as lines into
a one-bit frame buffer. A 7-segment display shows how many pictures are
drawn per second.

The design targets a small FPGA (it was sized against a Spartan-6 class
device with 100 MHz logic and a 25 MHz pixel clock). It is written in
synthesizable SystemVerilog, with one module per file in `rtl/` and a
self-checking testbench for each module in `tb/`.

## Data flow

```
 buttons ─► resync + debounce ─► angle counters ──────────────┐ az, el, view angle, model
                                                              ▼
            ┌──────────────────────────── GrxGraphicUnit ─────────────────────────────┐
            │ GrxGenerateProjectionMatrix ─► GrxVertexProjection ─► Vertex2DBank      │
            │   (CORDIC, divider, 2 MACs)     (2 MACs, divider)        │              │
            │ ModelDescriptionROM ──────────────────────────► GrxDrawWireframe        │
            │                                                   └► GrxDrawLine2D ───┼─► GrxVideoRAM
            └─────────────────────────────────────────────────────────────────────────┘    (640x480x1)
                                                                                                │
   BackgroundVisualizer ─┐                                                                      │
   PanelImageROM ────────┼──► compositor (4 stages) ◄── pixel requests ── GrxAdapterVGA ◄───────┘
                         └──────────────────────────────► line cache (dual-clock FIFO) ─► VGA
```

Two clocks exist: `clk_sys` (100 MHz) for everything that computes, and
`clk_pix` (25 MHz) for the VGA timing only. They come in as ports; the
clock manager that makes them on a board is not part of the RTL.

## Numbers: 10Q8 fixed point

Every geometric quantity is an 18-bit two's-complement number with 8
fraction bits (1.0 = 256), declared as `fxp_t` in `rtl/grx_pkg.sv`. Angles
are radians in the same format, so a full turn is 1608 counts. A 4x4 matrix
is a flat 288-bit vector (`matrix_t`, element (r,c) at index 4r+c). All
multiplications go through one arithmetic primitive, `GrxDsp`, which
computes `R = A + (B - C) * D` in one clock and truncates the product by an
arithmetic shift of 8 bits. Divisions use `GSerialDivider`, a restoring
divider that needs 2·WIDTH+2 cycles.

## The projection matrix

The model is normalised to the unit cube [0,1]³. The camera looks at the
model's centre from azimuth `az` and elevation `el`, on a sphere that just
encloses the cube, and a viewing angle φ sets the amount of perspective.
The matrix is A = P·T·R:

* R rotates the world into camera coordinates. With `sa, ca, se, ce` the
  sines and cosines of az and el, its rows are
  `[ca, sa, 0]`, `[-se·sa, se·ca, ce]` and `[ce·sa, -ce·ca, se]`.
* T moves the point where the view plane touches the enclosing sphere to
  the origin. Since T is applied after R, its column is
  `t = -0.5·R·[1,1,1] - [0, 0, 0.8660]` (0.866 = √3/2, the sphere radius).
* P is the perspective: rows 0–2 stay the identity, row 3 becomes
  `-X·row2 + [0,0,0,1]` with `X = 1.4142·tan(φ/2)`. φ = 0 gives X = 0,
  which is the orthographic view.

`GrxGenerateProjectionMatrix` computes this with one CORDIC (`CordicSinCos`,
16 iterations, run three times for φ, el and az), one serial divider for
tan = sin/cos, and two multiply-add units working side by side. The
arithmetic is a table of 10 steps, each giving both units one operation
over a small register file. Each unit's output can feed the next step
directly, before it is written back, so sums like `t` are accumulated over
several steps. The divider runs during the first seven steps (rotation
products and translation column). The last three steps (X and row 3) wait
for it.
A matrix is ready in under 100 cycles after start. The centre of the cube
(0.5, 0.5, 0.5) always lands on the screen centre at depth -0.866; the
testbench checks this and every element against floating point.

## Vertex projection and the 2D bank

`GrxVertexProjection` multiplies a vertex [x, y, z, 1] by A with two
multiply-add units: first the homogeneous row D (three cycles), then the
reciprocal M = 2¹⁶/D on the divider while rows 0 and 1 are formed, and
finally Q0 = P0·M and Q1 = P1·M. `GrxGraphicUnit` turns Q into screen
coordinates `x = 320 + Q0`, `y = 224 - Q1` (the raw 10Q8 value is the pixel
offset, so the model fills about ±220 pixels around the centre of the
picture area) and stores them, clamped to 0..1023, in `Vertex2DBank`, a
64-entry two-port memory indexed by the vertex's number in its model.

Vertices are independent of each other, so the graphics unit can hold
several identical vertex units (parameter `N_VU`, default 1). It then starts
a batch of up to `N_VU` vertices, one every two clocks, waits for all of
them and stores the results one per clock. Each vertex takes about 60
clocks, mostly the division. For a cube, three units save only about 250
of some 15,000 cycles, because clearing the buffer and drawing the lines
dominate.

## Drawing lines

`GrxDrawWireframe` walks the model's edge list (pairs of vertex numbers from
`ModelDescriptionROM`), reads both end points from the bank and starts
`GrxDrawLine2D` for each edge.

The line unit is where most of the care went:

1. The segment is folded into the first octant: the end points are
   ordered, the axes swapped if the line is steep, and the minor direction
   mirrored if it falls, so that the major coordinate u grows by one per
   pixel and the minor coordinate v grows by a slope between 0 and 1.
2. The slope dv/du is computed once with the serial divider, with
   F = bitlength(du) + 1 fraction bits. That is enough for the error summed
   over the whole line to stay under half a pixel, so the last pixel lands
   exactly on the end vertex.
3. An accumulator (`GAccumulator`) starts at one half and adds the slope
   each step; its integer part is the rounded v.
4. Each point is unfolded back to screen coordinates and written, one pixel
   every two clocks. A `hold` input freezes the unit while the frame buffer
   is busy.

A line of n pixels takes about 55 + 2n cycles; most of the fixed part is
the 21-bit division.

## The frame buffer

`GrxVideoRAM` keeps 640x480 one-bit pixels as 9600 pages of 32 bits in a
two-port block RAM. The pixel address y·640+x splits into a page number
and a bit number. Wide pages make clearing fast (one page per clock, 9600
cycles for the whole picture). A single-pixel write is a read-modify-write
of its page. The page last used is held in a register: a write to that
page completes in one clock and is written through to the RAM at once; a
write to another page first reads it (two extra clocks with `busy` high).
Lines touch the same page for many pixels, so most writes hit. The second
RAM port serves the display, addressed by pixel coordinates, with a
one-clock read.

There is only one frame buffer, so the picture must be redrawn while the
screen is blank. The top starts a redraw on each vertical sync pulse; the
graphics unit clears the buffer (while the matrix is being computed), then
projects and draws. A cube takes 13,000–15,500 cycles (130–155 µs), and the
largest views measured take under 19,000 cycles. The vertical blanking after
the sync pulse lasts about 112,000 system cycles, so the redraw is finished
long before line 0 is fetched. Run free, the same pipeline could draw more
than 6,000 cubes per second; locked to the display it draws 60.

## VGA output across two clock domains

`GrxAdapterVGA` generates standard 640x480 at 60 Hz timing (800x525 pixel
clocks, sync pulses 96 clocks and 2 lines, negative polarity) in the pixel
domain. Pixels are not fetched one at a time across the clock boundary;
instead a dual-clock FIFO (`GAsyncFifo`, 1024 entries, Gray-coded pointers)
serves as a line cache:

* At the end of each visible line the pixel side toggles a line strobe,
  and at the end of the last blanking line a frame strobe.
* The toggles cross to the system domain through two-flop synchronisers
  and both-edge detectors.
* The system side then walks the requested line (the next one, or line 0),
  one coordinate per clock on `req_valid/req_x/req_y`. Whatever answers
  returns a colour a fixed number of clocks later on `pix_valid/pix_color`,
  and it goes into the FIFO. 640 requests take 640 system clocks, well
  inside the 160-pixel-clock (640 system clock) horizontal blanking.
* The pixel side pops one colour per visible pixel. An empty FIFO shows
  black and increments `underflows`. This happens only in the first frame
  after a reset, before the first frame strobe.

In the top, the answer to a request comes from a four-stage compositor: the
panel image in rows 448–479, white where the frame buffer has a pixel, and
the background elsewhere.

## Background and panel

`BackgroundVisualizer` colours the picture area with a vertical gradient
whose hue follows the view: per channel `I = y·(2 + k)/2048 + noise/4`, with
k = -cos az - cos el for red, cos az - cos el/2 for green and
cos el - cos az/2 for blue. The noise is a 16-bit LFSR value; it dithers
the gradient so that 8-bit colour (RGB 3-3-2) shows no bands. A small
controller keeps its own CORDIC busy, alternating between the azimuth and
the elevation, so the cosines follow the buttons within a few dozen
clocks. The colour comes three clocks after the row number.

`PanelImageROM` holds a 640x32 image of two-bit colour indices at address
y·640+x, followed by a four-entry colour table (00 → 0x00, 01 → 0x75,
10 → 0x4E, 11 → 0xFF). The original panel artwork is not included. The ROM
is filled at elaboration by the function `panel_pixel()`, which draws a
border and a row of blocks. Replace that function, or load a file, to show
a real image.

## Controls and the frame counter

| Buttons            | Action                                             |
|--------------------|----------------------------------------------------|
| left / right       | azimuth down / up, wraps around                    |
| up / down          | elevation up / down, wraps around                  |
| centre + up / down | viewing angle up / down, stops at 0 and 511 (2 rad)|
| centre + left / right | previous / next model                           |
| centre + left + right | global reset (view, model, display)             |

All buttons are synchronised (`GResynchronizer`) and debounced for 10 ms
(`GDebounceFilter`). The angles come from `GAccelerateCounter` (one step per
5 ms while held, with a step that grows the longer the button is held) and
`GNonOverflowCounter` (saturating). At reset the view is azimuth 0,
elevation π/4, viewing angle 1 rad, cube. Completed redraws are counted in
BCD (`GBcdCounter`) over one second and shown on a multiplexed 4-digit
display (`GBcd7Display`, active-low segments and anodes).

## Where this design makes its own choices

What follows the original description: the pipeline structure and its
module names, the 10Q8 format, the A + (B − C)·D arithmetic unit, the
matrix formulas, the tangent computed as sin/cos on a serial divider, the
vertex unit's order of operations, the line unit (octant folding, slope by
division, 2 clocks per pixel, hold input), the paged frame buffer with a
cached page, the redraw on vertical sync, the line cache with line and
frame strobes, the background formula and its own CORDIC, and the panel
ROM and colour table. The following are this design's own:

* The matrix step table (10 steps on two units) is shorter than the
  original 17-step schedule, and the controller has 8 states rather
  than 28. The vertex unit has
  10 states instead of 12, and the line unit 9 instead of 12.
* CORDIC, dual-clock FIFO and block RAMs are plain RTL instead of vendor
  cores.
* Screen mapping (centre 320/224, scale 256), the four models, the
  640x480@60 timing, RGB 3-3-2 colour, the button timings and counter
  ranges, and the write-through policy of the page cache.
* The clearing of the frame buffer overlaps the matrix computation.
* Line overhead is about 55 cycles rather than about 40.
* The panel image is a placeholder pattern.
* Resource use has not been measured on an FPGA, and timing closure at
  100 MHz has not been checked.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes;
each has a watchdog. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/grx_pkg.sv tb/tb_GrxDrawLine2D.sv --top-module tb_GrxDrawLine2D
./obj_dir/Vtb_GrxDrawLine2D
```

The simulator has two states, so all registers are reset or initialised.
Notable testbenches:

* `tb_GrxGraphicUnit` draws every model from several views, including the
  orthographic one. It checks the projected vertices against floating
  point (±3 pixels), that every drawn pixel is within 1.5 pixels of an
  edge, that every edge and vertex appears, and the redraw time.
* `tb_Cubido3D` runs the whole top with full-size VGA timing and shortened
  button and counter timings. A scripted user presses every button
  combination. It checks sync pulses, captured frames (panel, wireframe
  against the frame buffer, vertex positions), that a redraw never
  overlaps the visible picture, and the 7-segment output. It also counts
  redraws, clears, page-miss stalls, angle and model changes and resets,
  and fails if any never happens.
* `tb_Cubido3D_full` runs the top with every parameter at its default for
  just over one simulated second (about 30 s of Verilator time). It turns
  the model, checks frames and the one-second frame counter (60 per
  second).
* The block testbenches compare each module against an independent
  reference model written in the testbench. Where timing matters they
  also check cycle counts, for example divider and CORDIC latency, two
  clocks per line pixel, and matrix time.
