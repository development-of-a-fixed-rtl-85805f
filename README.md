# A fixed-function 3D pipeline with a bufferless rasterizer

This design draws a solid, spinning, four-faced pyramid on a 640x480 VGA
monitor. It uses a classic fixed-function graphics pipeline:

    model ROM -> world transform -> view transform -> projective transform
              -> screen-space transform -> vertex list -> rasterizer -> VGA

The design has no frame buffer. Once per video frame, during vertical
blanking, the transformation pipeline turns the twelve model vertices into
twelve screen positions. As the VGA beam then sweeps the screen, the
rasterizer works out the colour of each pixel on the fly. It tests the pixel
against the triangles in that twelve-entry list. The only pixel-related state
in the whole design is 24 screen vertices: two banks of twelve. The viewer
can move the object, change its spin speed, and move the eye point and the
point the camera looks at.

All arithmetic is fixed point. Coordinates are signed Q16.16 numbers
(32 bits, with 16 fraction bits). Screen positions are 12-bit signed
integers.

## What happens in one frame

`vga_controller` scans 800 x 525 clocks per frame at a 25 MHz pixel clock.
That is 640 x 480 visible pixels plus the porches and sync pulses.
`frame_tick` pulses when the scan enters line 480, which is the first line of
vertical blanking. From that point the `scheduler` has 45 lines, or 36,000
clocks, before the next picture starts. It uses them as follows:

1. It adds the spin speed to the spin angle (an 8-bit angle, 1/256 of a turn
   per step).
2. It starts `view_setup`, which builds the camera basis from the eye point
   and the look-to point. This takes 475 clocks.
3. It streams ROM addresses 0..11 into the pipeline and writes each result,
   in order, into the back bank of `vertex_buffer`.
4. After the twelfth result, it swaps the banks.

A frame measures 1,299 clocks from tick to swap. The new list is therefore
shown from the very next picture, and every frame of the 60 Hz display shows
a new position. A frame tick that arrives while a frame is still being built
is ignored and reported on `frame_skip`. This cannot happen at the default
sizes.

## The transformation stages

Each stage has a valid/ready handshake. A stage holds its output until
`out_ready` is high. A full stage stalls the stage in front of it.

| stage | what it computes | timing |
|---|---|---|
| `world_transform` | `p' = T + Rz*Ry*Rx*(S*p)`: scale, rotate about X, then Y, then Z, then translate | 4 clocks, 1 vertex/clock |
| `view_transform` | `(u.(p-eye), v.(p-eye), n.(p-eye))` | 2 clocks, 1 vertex/clock |
| `projective_transform` | `depth = -z`, `x_p = F*x/depth`, `y_p = F*y/depth` with `F = 2` (about a 53 degree field of view) | 67 clocks, one vertex at a time |
| `screen_transform` | `x_s = 320 + round(240*x_p)`, `y_s = 240 - round(240*y_p)`, clamped to +-2047 | 1 clock, 1 vertex/clock |

Sine and cosine come from `sincos_rom`. This is a 65-entry quarter-wave table
that a constant function fills at elaboration time, from the Taylor series of
sin x. It needs no data file. The world transform has three of these ROMs,
one per axis. In the top, Y is the spinning axis. The X and Z tilts and the
scale are parameters of `gpu_top`.

The camera basis built by `view_setup` is the usual look-at frame:

- `n = unit(eye - look)`
- `u = unit(UP x n)`
- `v = n x u`

Here `UP = (0,1,0)`. A camera looks along `-n`, so points in front of it have
negative `z` in camera space. Normalisation uses an iterative integer square
root (`fx_isqrt`, which turns the Q32.32 sum of squares into a Q16.16 length)
and an iterative divider (`fx_div`, one quotient bit per clock). One of each
is shared across all six divisions. If a vector has zero length, the previous
basis is kept. This happens when the eye sits on the look-to point or looks
straight up or down.

The projective stage forms one reciprocal `F/depth` with `fx_div` (64
clocks). It then multiplies both coordinates by that reciprocal. While the
division runs it refuses new input, so the view and world stages stall behind
it. This is the main stall in the design, and it limits throughput to one
vertex per 67 clocks. A vertex nearer than `NEAR = 0.25`, or behind the
camera, is not divided. It leaves at once, flagged invisible.

## Rasterizing without a frame buffer

`rasterizer` gets the current scan position `(px, py)` every clock, together
with all twelve vertices of the front bank. Vertices `3t, 3t+1, 3t+2` form
triangle `t`. For each of the four triangles it evaluates the three edge
functions and the signed area in parallel:

    E(a, b, p) = (b.x - a.x)(p.y - a.y) - (b.y - a.y)(p.x - a.x)
    area       = E(v0, v1, v2)

Screen y points down. The model triangles are listed counter-clockwise as
seen from outside the solid, so a triangle that faces the viewer has
`area < 0`. A pixel lies inside such a triangle when all three edge
functions are `<= 0`. Triangles that face away (`area >= 0`) are dropped.
For a convex solid, removing the back faces is all the hidden-surface removal
needed, so the design needs no depth buffer either. Triangles with an
invisible vertex are also dropped.

Each face has a flat colour (red, green, blue, yellow for triangles 0..3).
Pixels covered by no face get the background colour (black), and pixels
outside the picture are black. The coordinates are 12 bits, so the
differences are 14 bits and the products 28 bits. This costs eight small
multipliers per triangle, which is cheap next to a 640x480 frame buffer.

The check takes two clocks. Stage 1 registers the coverage bits and stage 2
registers the colour. The sync and blank signals are delayed by the same two
clocks so that they stay aligned with the colour. The VGA outputs of
`gpu_top` therefore lag the internal scan by two pixel clocks, which a
monitor does not notice.

The vertex list is double-buffered (`vertex_buffer`). The scheduler writes
the back bank during blanking. Because the banks swap before the next
picture starts, a half-updated list is never displayed.

## User controls

`user_control` holds ten settings:

- the translation (x, y, z)
- the spin speed
- the eye point (x, y, z)
- the look-to point (x, y, z)

`sel` selects one setting, and a one-clock pulse on `inc` or `dec` steps it.

| `sel` | setting | step | limit | reset value |
|---|---|---|---|---|
| 0, 1, 2 | translation x, y, z | 0.25 | +-16 | 0 |
| 3 | spin speed (angle steps per frame) | 1 | +-16 | 1 |
| 4, 5, 6 | eye point x, y, z | 0.25 | +-16 | (0, 1.5, 5) |
| 7, 8, 9 | look-to point x, y, z | 0.25 | +-16 | (0, 0, 0) |

The pulses must already be debounced and one clock long. A key-scanning or
keyboard front end is not part of this RTL. Settings are read at frame start,
so a change shows from the next frame on.

## Top-level interface (`gpu_top`)

| port | dir | meaning |
|---|---|---|
| `clk` | in | pixel clock, 25 MHz for the default timing |
| `rst_n` | in | asynchronous reset, active low |
| `sel[3:0]`, `inc`, `dec` | in | user controls, see above |
| `vga_r/g/b[3:0]` | out | colour, 4 bits each |
| `vga_hsync_n`, `vga_vsync_n` | out | sync pulses, active low |
| `vga_blank_n` | out | high inside the 640x480 picture |
| `busy` | out | a frame is being built |
| `frame_skip` | out | a frame start found the previous frame unfinished |

The top's parameters are:

- the eight VGA timing numbers (640/16/96/48 horizontal, 480/10/2/33
  vertical); the screen transform follows `H_ACTIVE` and `V_ACTIVE`
- `SCALE`
- `TILT_X` and `TILT_Z`

On an FPGA board the pixel clock comes from a PLL. The PLL is vendor IP and is
not included, so `clk` must be driven at the pixel rate.

## Files

- `rtl/gpu_pkg.sv`: Q16.16 types (`fix_t`, `vec3_t`), the screen vertex
  (`svert_t`) and `fmul`
- `rtl/gpu_top.sv`: the wiring described above
- stage modules, one per file: `world_transform`, `view_setup`,
  `view_transform`, `projective_transform`, `screen_transform`
- tables: `model_rom` (the pyramid) and `sincos_rom`
- arithmetic helpers: `fx_div` and `fx_isqrt`
- `scheduler`, `vertex_buffer`, `rasterizer`, `vga_controller`,
  `user_control`
- `tb/tb_<module>.sv`: one self-checking testbench per block

## How far it is verified

Every block has a testbench that compares the block against a model written
independently, mostly in real arithmetic. Each testbench prints
`TB_RESULT checks=N failures=M`.

- The transform stages are checked to within 0.002 under random
  back-pressure. Their latencies (4, 2, 67 and 1 clocks) are checked too.
- The rasterizer is checked pixel by pixel over whole frames against a
  barycentric coverage test. Pixels that lie exactly on an edge are skipped.
- The VGA timing is checked pulse by pulse over two frames.

`tb_gpu_top` runs the whole design at its default size for ten frames, while
it works every control. Once, it uses the controls during a frame build, and
the change must show only in the next frame. For each frame it does three
things:

- It recomputes the twelve screen vertices with its own real-valued pipeline
  and checks them to within 2 pixels.
- It checks every one of the 2.7 million non-edge pixels shown against the
  displayed vertex list.
- It checks that each frame is built within vertical blanking.

It also counts the pipeline stalls, culled back faces, near-plane rejections
and bank swaps, and each kind of control, and it fails if any of them never
happens. Each testbench was also run against a deliberately broken copy of its
block, and each one caught the fault.

Not verified: behaviour on real hardware and monitors, and timing closure at
25 MHz. The 64-bit multiplies of the world and view stages are
single-cycle and may need pipelining on a slow FPGA.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/gpu_pkg.sv tb/tb_gpu_top.sv --top-module tb_gpu_top -o sim
    ./obj_dir/sim

Any other block is simulated the same way, using `tb/tb_<block>.sv`. The
full-size run takes a few seconds. For lint, run
`verilator --lint-only -Wall -Irtl -y rtl rtl/gpu_pkg.sv rtl/<module>.sv`.
The remaining lint warnings fall into these groups:

- Unused bits: the upper half of the 64-bit quotients, and `z`, which the
  screen stage does not use.
- `SYNCASYNCNET`: raised by the handshake assertions, whose `disable iff`
  uses the asynchronous reset.
- `PINCONNECTEMPTY`: deliberately open `busy` outputs.

## What is given and what was chosen

These parts follow the published description of the design:

- the stage sequence (world, view, projective, screen-space, rasterization)
- a scheduler driving the transformation units
- a VGA controller
- fixed-point arithmetic in place of floating point
- a twelve-coordinate pyramid
- a rasterizer that needs no buffer
- translation, rotation-speed, eye-point and look-to-point control
- the symbols S, R and T for scaling, rotation and translation, and u, v, n
  for the camera basis

These are this implementation's own choices:

- Q16.16 number format and 8-bit angles
- filled, flat-coloured faces with back-face culling (rather than, for
  instance, a wireframe)
- the exact pyramid: its four sides, without a base
- the rotation order, the field of view, the near plane and the up vector
- the valid/ready handshake and the iterative divider and square root
- the double-buffered vertex list and sampling all settings at frame start
- the 640x480@60 timing, 4-bit colour and the sel/inc/dec control interface

To change the model, edit `model_rom`. Keep the counter-clockwise winding and
the count of `NUM_VERTS` in `gpu_pkg`. The rasterizer handles
`NUM_VERTS / 3` triangles in parallel, so its cost grows with every triangle
you add.
