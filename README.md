# Two-camera arm motion capture with an FPGA prism renderer

A person wears four coloured bands on their arms: red and green on one arm,
yellow and blue on the other. A band sits at each wrist and each elbow. Two
cameras at right angles watch them. The front camera gives each band's
horizontal position and height. The side camera gives its depth and height.
Each camera feeds its own FPGA board. Each board finds the centre of every
colour in its own picture. The side board sends its four centres to the front
board over six wires. The front board joins the two views into one 3D point
per band. It pairs the points into two bones, wrist to elbow. It then draws
each bone as a shaded rectangular prism, in perspective, into an SRAM frame
buffer that drives a VGA monitor.

Everything runs on one 40 MHz clock. The RTL is SystemVerilog (IEEE
1800-2017) and synthesisable. The two boards are modelled as two halves of the
top module, `mocap_top`. They share nothing but the six link wires.

```
 side camera HSV ─► 4 × (colour match ─► centre of mass) ─► 4 serial senders ─┐
                                                                 6 link wires │
 front camera HSV ─► 4 × (colour match ─► centre of mass)                     ▼
                          │                   4 serial receivers ◄────────────┘
                          └───────────────► 4 × 3D point (hold while hidden)
                                                   │
                                          skeleton (2 bones)
                                                   │ render
                            model generator: map → prism → shade → view →
                            projection → divide by w → viewport
                                                   │ 8 screen vertices, 6 shades
                            renderer: 6 × polygon drawer → memory converter →
                            pixel FIFO → memory controller (depth test) → ZBT
                                                   │
                                               ZBT → VGA
```

The camera decoders and the RGB-to-HSV converters are not part of the RTL.
Each camera's HSV pixel enters the top as `cam*_h/s/v`. It must belong to the
scan position the top puts out on `cam*_hcount/vcount`: an 800×600 SVGA scan
with totals of 1056×628. The 512K×36 ZBT SRAM is external too. A behavioural
model of it is in `tb/zbt_sram_model.sv`.

## Capture: colour, centre, averaging

**Colour matching** (`point_detect`). Each colour's detector has four limits:
HUE_MAX, HUE_MIN, SAT_MIN and VAL_MIN. A pixel matches when
HUE_MIN < h < HUE_MAX, s > SAT_MIN and v > VAL_MIN, with all compares strict.
It must also lie inside the window 80 < x < 717, 108 < y < 542. Red's hue range
wraps through zero, so red tests h > HUE_MIN *or* h < HUE_MAX. The top uses
these limits:

| band   | HUE_MAX | HUE_MIN | SAT_MIN | VAL_MIN | wraps |
|--------|---------|---------|---------|---------|-------|
| red    | 0x01    | 0xFA    | 0xF5    | 0xB6    | yes   |
| yellow | 5       | 0       | 0       | 0xFA    | no    |
| green  | 89      | 73      | 0       | 160     | no    |
| blue   | 0xBA    | 0xA3    | 0x00    | 0x02    | no    |

A black background matches nothing, because its saturation and value are 0.

**Centre of mass** (`center_of_mass`). Over one frame it sums x and y of the
matching pixels and counts them, in 25-bit accumulators. At row 543, below the
window, two sequential dividers form sum/count. A frame with 100 or fewer
matching pixels yields 0. That zero is how a hidden band shows up. The result
goes into a four-entry history, and the output is the history's sum divided by
4. This smooths the jitter, but it also means a position takes four frames to
settle. The 25-bit sums hold a band of up to about 46,800 pixels, which is
roughly a 216×216 square.

**Cross hairs** (`cross_hairs`). This is a debug overlay for the front camera.
Each centre's row and column are painted in the band's colour, as an 18-bit
RGB666 value on `debug_pixel`. When `show_detect` is 1, every matched pixel is
shown in its band's colour instead, so you can see what is being taken for a
band.

## The board-to-board link

The side board drives six wires (`link[5:0]`): red data on 0, the interface
clock on 1, frame on 2, and yellow, green and blue data on 3, 4 and 5.

- **Interface clock** (`interface_clock_div`). An 8-bit counter toggles a
  register each time it wraps. The result is a 40 MHz / 512 ≈ 78 kHz square
  wave. A one-cycle `rise` strobe lets the sender stay on the system clock.
- **Sender** (`serial_sender`). At the start of each side-camera frame it
  latches the colour's averaged centre. At the next interface-clock rising
  edge it raises the frame wire for one interface period and starts shifting.
  The 23-bit record is sent LSB first: colour index (2 bits), x (11 bits),
  y (10 bits). Data changes on rising edges.
- **Receiver** (`serial_receiver`). The receiver lives on the other board's
  clock. It passes the three wires through two-flop synchronisers. It samples
  data on the *falling* edge of the synchronised interface clock, which is
  mid-bit. The first sample taken while the frame wire is high is bit 0. After
  23 samples the record is complete and `valid` pulses.

One record takes 23 × 512 = 11,776 clocks, under 2 % of a 663,168-clock frame.

## 3D points and bones

`coord3d_gen` forms (x, y, z) for one colour:
- x is the front camera's horizontal centre;
- y is the side camera's horizontal centre;
- z is the side camera's vertical centre, taken from the link.

If any of the three is zero, the band was hidden in one camera for four
frames. The last complete point is then kept and `hidden` is raised. Because
of the four-frame average, the kept point is the last non-zero average: a
quarter of the true centre when one band vanishes at once.

`skeleton_gen` picks the joints by their colour field, so they may arrive in
any order. It builds bone 0 = (red, green) and bone 1 = (yellow, blue). A bit
of `found` says whether both colours of that bone are present.

## Fixed-point arithmetic

The graphics side works on 18-bit two's-complement numbers with 6 fraction
bits, covering ±2048 in steps of 1/64. The type is `fx_t` in `mocap_pkg`.
Vectors are packed {x, y, z, w} structs and matrices are 4×4 arrays. The
package holds the combinational helpers:
- a saturating add, subtract and multiply (multiply truncates towards −∞);
- vector sum, difference, scale, dot and cross product;
- the 4×4 matrix-vector product.

Three sequential units do the rest:
- `fx_divider`: a restoring divider with a saturated quotient, 25 clocks.
- `vec_magnitude`: sum of squares followed by a bit-serial square root,
  20 clocks.
- `vec_divider`: three dividers side by side for x, y and z, 27 clocks.

Six fraction bits were chosen so that pixel coordinates (up to 2047) fit. The
price is coarse angles and coarse shading. A 1/64 step in a unit vector is
about a degree.

## Graphics pipeline

`model_generator` takes one bone through these steps:

1. **Input mapping.** A second `viewport_transformer` turns camera pixels into
   world units: world = ((x − 400)/16, (300 − z)/16, (y − 400)/16). World x is
   the front camera's horizontal axis, world y points up, and world z is depth.
2. **Prism** (`prism_generator`). The bone vector p1 − p2 is normalised (U).
   Its cross product with the x axis gives the second vector, A, after
   normalising. A × U gives the third, B. The eight vertices are p1 or p2 plus
   or minus ½-width·A and ½-width·B. A bone along x falls back to the y and z
   axes.
   ```
       v4-----v5        v0 = p1 + a − b   v1 = p1 + a + b
       |\     |\        v2 = p1 − a + b   v3 = p1 − a − b
       | v0-----v1      v4..v7: the same around p2
       v7-|---v6 |      faces: front 0123, back 4567, top 4510,
        \ |    \ |             bottom 7623, left 4037, right 1562
         v3-----v2      normals: U, −U, A, −A, −B, B
   ```
3. **Shader** (`shader`). It works per face, on world coordinates. The face's
   distance d is the mean z of its four vertices, at least 1/64. The light
   shines along +z, so the brightness is max(0, n.z · 2000 / d²) + 0.4, capped
   at 1. The 4-bit shade is floor(15 · brightness). The division is done as
   (n.z · 2000 / d) / d, so d² never has to fit in 18 bits.
4. **View** (`view_transformer`). The vertex is rotated about x, then y, then
   z, then translated by (dx, dy, dz). These are four `matrix_mult` stages in
   a row: latency 4, one vertex per clock. Sine and cosine come from
   `sin_cos_lut`, a quarter-wave table of 101 entries. It is computed at
   elaboration time from a Taylor series, so no data file is needed.
5. **Projection** (`projection_transformer`). The constant matrix is
   [e 0 0 0; 0 e/a 0 0; 0 0 q33 q34; 0 0 1 0], with e = 1/0.3, a = 0.75,
   q33 = −(f+n)/(n−f) and q34 = 2fn/(n−f), for n = 0.1 and f = 5. The camera
   looks along +z, and w becomes the camera-space depth.
6. **Normaliser** (`normalizer`). An 8-entry queue feeds one `vec_divider`
   that divides x, y and z by w.
7. **Viewport** (`viewport_transformer`). x·25 + 400, −y·25 + 300 and z·50
   give 800×600 screen pixels and a depth.

The eight vertices stream through steps 4–7 while the shader runs. The
screen spans about ±83·x/z pixels about the centre for world x at depth z, so
bones need a positive depth after the view translation. The top's
`view_dz` input sets that depth.

## Rasterisation and the frame buffer

`renderer` draws the six faces of one prism, one after another. Each face is
a four-vertex polygon in its bone's colour, with the face's shade.

**Polygon drawer** (`polygon_drawer`). Set-up:
- The plane through three vertices gives A, B and C, as a cross product in
  wide integers. C = 0 means the face is seen edge-on, and it is skipped.
- One divider then computes A/C, B/C and, for every side, the slope and
  intercept of x = M·y + B. These have 16 fraction bits. Set-up takes about
  300 clocks.

Scan:
- Rows run from y_min to y_max − 1.
- A side crosses row y when one end is above y and the other at or below it.
- The smallest and largest crossings, clipped to the bounding box, bound the
  span.
- Pixels start+1 … end−1 are emitted, one per clock.
- Each pixel's depth is z = z0 − (A/C)(x − x0) − (B/C)(y − y0). Negative depth
  is skipped, and depths over 2047 are clamped.

**Memory converter** (`memory_converter`). It drops pixels outside 800×600.
The rest become a ZBT address {y[9:0], x[9:1]}, a half selector x[0], and an
18-bit pixel word: {0, colour[1:0], shade[3:0], depth[10:0]}. One 36-bit word
holds two horizontal neighbours. Dropped pixels do not stall the drawer.

**Pixel buffer** (`pixel_buffer`). This is a 16-entry valid/ready FIFO. When
it is full, the drawer waits.

**Memory controller** (`memory_controller`). It owns the ZBT and steps through
four states:

| state | what happens | leaves when |
|-------|--------------|-------------|
| CLEAR | writes all 600 × 400 visible words with two black pixels at depth 2047 | done (240,000 clocks) |
| WAIT  | idle | a vertical sync has been seen and `draw_en` is 1 |
| WRITE | per pixel: read the word, compare depths, write back the half if the new pixel is nearer (depth test) | `all_drawn` and the FIFO is empty |
| READ  | the display's address drives the memory | `redraw` (back to CLEAR) |

WRITE takes 4 clocks per pixel with the model's 2-clock read latency. The
pipeline produces pixels faster than that, so the FIFO fills and the drawer
stalls often.

**Display** (`zbt_to_vga`). It generates 800×600 @ 60 Hz timing (1056×628
totals). At each even column it requests the word for the next pair of
pixels. It turns each half into RGB: the base colour of the colour index, with
its lit 8-bit channels set to shade × 17. The outputs lag the counters by
4 clocks.

### The render sequence in the top

Pulsing `render` does three things:
- It latches the current bones and `found`.
- It sends `redraw` to the memory controller, which clears the frame buffer.
- It starts the drawing: every found bone goes through `model_generator`,
  then through `renderer`.

After the last bone, `all_drawn` hands the memory to the display. The picture
then stays until the next `render`.

## Timing summary (40 MHz clock)

| step | clocks |
|------|--------|
| colour match | 1 |
| centre of mass, after row 543 | ≈ 30 |
| position settles (four-frame average) | 4 frames |
| one serial record | 11,776 |
| prism generator | ≈ 100 |
| shader (6 faces, 12 divisions) | ≈ 330 |
| normaliser, per vertex | 28 |
| polygon set-up | ≈ 300 |
| frame-buffer clear | 240,000 |
| written pixel | 4 |

## Where this design departs from the original system

- **Serial record length.** The record is 2 + 11 + 10 = 23 bits. The original
  mentions both 24 and 23 bits.
- **Receiver clocking.** The receiver runs on its own board's clock with
  synchronisers, and samples on the falling edge. The original clocks the
  receiver with the interface clock itself. The one-bit offset the original
  had to correct for is absent here.
- **Hidden bands.** A hidden band holds the whole previous point when any
  coordinate is zero, rather than each coordinate separately.
- **Unit latencies.** The vector divider takes 27 clocks, against the
  original's 32. It is not pipelined, so it accepts a new vector only every
  28 clocks, not every 4. The magnitude unit takes 20 clocks, against 9,
  because its square root keeps all fraction bits.
- **Prism generator.** It is a sequencer around one magnitude unit and one
  vector divider, not a throughput pipeline.
- **Plane and depth.** The plane comes from a cross product, not from
  inverting a 3×3 matrix, so there is no matrix-inverse unit. Depth uses A/C
  and B/C.
- **Depth test.** The depth test in the memory controller is built. The
  original intended it but did not finish it.
- **Assumed constants.** Prism half-widths (1.0), buffer depths and
  cross-hair colours are assumed. So is the camera-to-world mapping, which is
  not specified.
- **Shading.** The shader uses world coordinates, as the original's software
  model does. A stationary prism therefore keeps its shading whatever the
  view.

## Using and simulating it

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/mocap_pkg.sv tb/tb_mocap_top.sv --top-module tb_mocap_top
./obj_dir/Vtb_mocap_top
```

Most tests compare against reference models written in the testbench, in
integer or `real` arithmetic. The full-size tests are:

- `tb_zbt_to_vga`: two whole VGA frames.
- `tb_renderer`: prisms at 800×600, with depth rejections, off-screen drops
  and FIFO stalls. It checks that the displayed frame shows exactly the stored
  pixels.
- `tb_mocap_top`: the whole system with no parameter overrides, over 12
  camera frames (about 8 M clocks, 15–25 s in Verilator). Its synthetic
  cameras show 16×16 bands. It checks:
  - every joint against the band centres, and the bone pairing;
  - the cross hairs and the detection view;
  - a complete render and its displayed frame;
  - that a band hidden for four frames is flagged and held.

  It also counts each mechanism and fails if one never happened: serial
  records, frame pulses, hidden points, drawn pixels, depth rejections,
  off-screen drops, FIFO stalls and the switch to read mode.

`tb_polygon_drawer` and `tb_renderer` include the rhombus (50,50), (200,50),
(250,100), (100,100). `tb_prism_generator` includes the bone from (−1,−1,−1)
to (1,1,1). `tb_view_transformer` applies the translation (−2, 2, −4) to it.
`tb_shader` checks brightness falling with distance.

Simulation is two-state. Every register that is read is reset.
