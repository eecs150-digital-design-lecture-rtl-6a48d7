# Memory-mapped framebuffer video subsystem with a Bresenham line engine

A processor draws on a screen by writing memory. A range of its address
space is the screen: a word store to `0x8000_0000 + Y*4096 + X*4` sets the
pixel at column X, row Y, with (0,0) at the top left. The display needs no
handshake. A separate process, the video interface, re-reads the whole
framebuffer in scan-line order, once per frame, and streams the pixels to
the DVI transmitter. The processor can write pixels in any order and at
any time.

Drawing long lines one store at a time is slow, so the subsystem also has a
small 2-D accelerator. The CPU writes two end points and a colour into
registers, and a hardware Bresenham engine draws the line at up to one
pixel per clock. The CPU and the engine share the framebuffer's single
write port. The CPU always wins, and the engine stalls in any cycle in
which the CPU stores.

Default configuration: 1024 x 768 visible pixels, 24 bits per pixel
(`{Red[7:0], Green[7:0], Blue[7:0]}`), one pixel per 32-bit word, and
standard 1024x768 at 60 Hz frame timing (65 MHz pixel clock).

## Block structure

```
 CPU word load/store
        |
   cpu_mmio ---- address decode ----+-------------------+-------------+
        |                           |                   |             |
        | status (ready)      line_engine          color_map      fb stores
        |                           | pixel request      |             |
        |                           v                    |             v
        |                    fb_write_arbiter <----------+---- (CPU has priority)
        |                           | one write port     |
        |                           v                    |
        |                      framebuffer               |
        |                           | one read port      |
        |                           v                    v
        |                    video_interface ---> (5-6-5 widening or palette lookup)
        |                           |
        |                 vid_data, vid_de, vid_hsync_n, vid_vsync_n  --> DVI transmitter
```

| file | module | role |
|---|---|---|
| `rtl/video_pkg.sv` | package | address map, coordinate type, register and state enums |
| `rtl/cpu_mmio.sv` | `cpu_mmio` | decodes CPU stores and loads |
| `rtl/line_engine.sv` | `line_engine` | engine registers and Bresenham datapath |
| `rtl/fb_write_arbiter.sv` | `fb_write_arbiter` | CPU-first sharing of the write port |
| `rtl/framebuffer.sv` | `framebuffer` | dual-port pixel memory |
| `rtl/video_interface.sv` | `video_interface` | raster counters, sync, scan-out reads |
| `rtl/color_map.sv` | `color_map` | 16 x 24-bit palette for 4-bit pixels |
| `rtl/video_subsystem_top.sv` | `video_subsystem_top` | wires the above together |

The whole design runs on one clock, `clk`, which is also the pixel
clock. Reset, `rst`, is synchronous and active high.

## Address map

All accesses are 32-bit words. Byte lanes are ignored.

| address | access | meaning |
|---|---|---|
| `0x8000_0000`-`0x803F_FFFC` | store | pixel; X = addr[11:2], Y = addr[21:12] |
| `0x8040_0000`-`0x8040_003C` | store | colour-map entry addr[5:2], data[23:0] |
| `0x8040_0040` / `44` / `48` / `4C` | store | engine x0 / y0 / x1 / y1, bits [10:0] |
| `0x8040_0050` / `54` / `58` / `5C` | store | the same registers, and start the engine |
| `0x8040_0060` | store | engine colour, 32 bits; the low PIX_W bits are drawn |
| `0x8040_0064` | load | bit 0 = engine ready (idle) |

Every row starts on a 4 KB boundary. As a result, the word address is
just `{Y[9:0], X[9:0]}`, and X and Y never have to be multiplied together.
The window covers 1024 rows, but only the first `V_ACTIVE` rows have memory
behind them. Stores to the other rows, or to columns at or beyond
`H_ACTIVE`, are dropped. Loads from the framebuffer return 0, because the
CPU only writes it. Loads from the status word return data one cycle
after `cpu_re`.

To draw a line, store the colour and three of the coordinates at the
plain addresses. Then store the fourth coordinate at its trigger address.
Poll `0x8040_0064` until bit 0 reads 1. A trigger store that arrives while
a line is being drawn still updates its register, but it does not restart
the engine. Wait for ready before starting the next line.

## The line engine

The engine uses the general integer form of Bresenham's algorithm. It
needs only additions, subtractions and comparisons, with no multiply or
divide:

1. **Octant folding.** If |y1-y0| > |x1-x0| the line is *steep*: X and Y
   are exchanged, so the loop always runs along the longer axis (the
   "major" axis, `a`). If the start is past the end on that axis, the two
   end points are exchanged, so `a` always counts up.
2. **Initialisation.** `deltax = a1-a0` and `deltay = |b1-b0|`.
   `error = deltax/2`. `ystep` is +1 if the minor coordinate `b` grows
   and -1 if it falls.
3. **Per pixel.** The engine plots (a,b), or (b,a) for a steep line.
   Then `error -= deltay`. If error becomes negative, `b += ystep` and
   `error += deltax`. It stops after the pixel at `a == a1`.

A line therefore has `deltax + 1` pixels, where deltax is the length
along the major axis. The minor coordinate steps `deltay` times, spread
evenly along the line. Example: from (1,1) to (11,5), deltax = 10,
deltay = 4 and error starts at 5. The pixels are
(1,1) (2,1) (3,2) (4,2) (5,3) (6,3) (7,3) (8,4) (9,4) (10,5) (11,5).

In hardware, step 1 and step 2 take one `SETUP` cycle. They are
combinational logic on the register values, and the results are
registered. The per-pixel step is a single cycle: one subtraction, a
sign test, and a conditional add and increment. Timing:

- A trigger store is sampled at edge *t*. `ready` falls after that edge.
- `SETUP` occupies cycle *t+1*. The first pixel request (`px_valid`) is
  presented in cycle *t+2*.
- Each cycle in which the request is granted writes one pixel and
  advances the engine. In a cycle in which the CPU stores to the
  framebuffer, the grant is withheld. The engine then holds the same pixel
  and `le_stall` is high.
- `ready` rises after the last pixel is granted. An undisturbed line is
  busy for `deltax + 2` cycles, counted from the trigger edge to the edge
  that sees ready.

The end points and colour are copied when the line starts. Register
writes during a line therefore prepare the next line without disturbing
the current one. Coordinates are 11-bit unsigned values. Pixels that fall
off the screen are requested like any others and then dropped by the
framebuffer, so lines are clipped for free, at the cost of cycles.

## Framebuffer and scan-out

`framebuffer` is a plain dual-port memory. It has one write port and one
read port. The read is synchronous, with one cycle of latency. If a read
and a write hit the same location in one cycle, the read returns the old
pixel. The contents are not reset: software clears the screen. Clearing
takes one store per cycle, which is 786,432 cycles at full size, about
0.73 of a frame.

`video_interface` runs two counters over the whole frame, including
blanking: `H_ACTIVE+H_FP+H_SYNC+H_BP` clocks per line and
`V_ACTIVE+V_FP+V_SYNC+V_BP` lines per frame. It issues a read for every
visible position. Because the memory answers one clock later,
`vid_de`, `vid_hsync_n`, `vid_vsync_n` and `frame_start` are registered
once, so they line up with the returned pixel. `vid_data` is 0 outside
the visible area. Both syncs are active low.

The CPU and the line engine never wait for the display, and the display
never waits for them. A pixel written during a frame appears in that
frame if its position has not been scanned yet, and otherwise in the next
frame.

### Narrower pixels: 16-bit and 4-bit configurations

The framebuffer memory is `H_ACTIVE*V_ACTIVE*PIX_W` bits. At the default
size and 24 bits per pixel, that is more than block RAM on an FPGA of this
class can hold. Two narrower formats are therefore built in. Each keeps
one pixel per CPU word address, and takes the low `PIX_W` bits of the
store:

- **`PIX_W = 16`**, for 800 x 600 pixels (7.68 Mbit, which fits a board's
  8 Mbit SRAM). Each pixel is `{Red[4:0], Green[5:0], Blue[4:0]}`. On the
  way out, each field is widened to 8 bits by repeating its top bits, so
  full scale maps to 255.
- **`PIX_W = 4`** (3 Mbit). Each pixel is a colour index. It passes
  through `color_map`, a 16-entry table of 24-bit colours that the CPU
  writes at `0x8040_0000 + 4*i`. Software picks 16 colours out of 2^24.

With the default `PIX_W = 24` the pixel goes out directly. The colour map
stays on the bus in every configuration, but it only affects the picture
when `PIX_W = 4`.

## Parameters of `video_subsystem_top`

| parameter | default | meaning |
|---|---|---|
| `H_ACTIVE`, `V_ACTIVE` | 1024, 768 | visible pixels per line, visible lines |
| `H_FP`, `H_SYNC`, `H_BP` | 24, 136, 160 | horizontal front porch, sync, back porch (clocks) |
| `V_FP`, `V_SYNC`, `V_BP` | 3, 6, 29 | vertical front porch, sync, back porch (lines) |
| `PIX_W` | 24 | bits per framebuffer pixel: 24 = direct RGB, 16 = 5-6-5 RGB, 4 = colour-map index |

`H_ACTIVE` must not exceed 1024, and `V_ACTIVE` must not exceed 1024,
because the CPU address carries 10 bits of each coordinate. The memory
holds `H_ACTIVE*V_ACTIVE` words. `PIX_W` is meant to be 24, 16 or 4.

## What is modelled, and what departs from the original system

These parts come from the system description: the address map and
register layout, the 4 KB row pitch, the 24-, 16- and 4-bit pixel formats, the
colour map, the Bresenham algorithm for any quadrant and slope, one pixel
per cycle, the single shared write port with CPU priority, and the
engine's ready flag.

These are this implementation's own choices:

- **The framebuffer is an on-chip memory.** In the original board system
  the 24-bit framebuffer (3 MB with 4-byte pixels) lives in external DDR2
  DRAM, behind a DRAM controller that arbitrates among its users. That
  controller and the DRAM are not part of this RTL. In its place,
  `framebuffer` is an ideal dual-port memory with a fixed one-cycle read.
  On an FPGA of that class, block RAM is only large enough for the 4-bit
  configuration. Fitting the 24-bit frame needs a memory controller, and
  the video interface would then need a prefetch FIFO to absorb DRAM
  latency.
- **Only the write side is arbitrated.** `fb_write_arbiter` implements the
  one write-sharing rule that was specified. The scan-out has a read port
  of its own.
- **The video output is 24-bit parallel.** The DVI transmitter on that
  board (Chrontel CH7301C) takes 12-bit double-data-rate data with a
  differential clock, and is configured over a serial port. Neither the
  DDR output stage nor the configuration sequence is included.
- **Frame timing and sync polarity** are the standard VESA 1024x768 at
  60 Hz values. They were not part of the description. The widths are
  parameters. The syncs are always active low, including at 800 x 600,
  where the standard uses active-high syncs.
- **One clock domain.** CPU, engine and scan-out share one clock. A real
  system would run the CPU at its own clock and cross into the pixel
  clock.
- **The external SRAM is not modelled.** In the original system, the
  800 x 600 x 16 configuration keeps its framebuffer in an external ZBT
  SRAM with 32-bit words. Here it uses the same on-chip memory model as
  the other configurations, and no SRAM controller is included.
- **Not supported.** There are no byte stores, and there are no
  framebuffer reads by the CPU.
- Undefined situations are resolved as follows. A trigger while busy is
  ignored. Load data arrives one cycle after the load. The colour map
  clears to black at reset.

## Testbenches

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. A watchdog stops a hung run.

| testbench | what it checks |
|---|---|
| `tb/tb_line_engine.sv` | the three example lines against hand-written pixel lists; about 300 random lines with random stalls against a software model; busy-cycle count = pixels + 1 + stalls; busy trigger ignored; colour held |
| `tb/tb_fb_write_arbiter.sv` | random CPU/engine traffic: owner, grant, stall, data |
| `tb/tb_framebuffer.sv` | random reads and writes against a reference image, dropped out-of-range writes, read-before-write |
| `tb/tb_video_interface.sv` | pixel order and values, pixels per frame, frame period, sync widths and position |
| `tb/tb_color_map.sv` | reset contents, write timing, lookups |
| `tb/tb_cpu_mmio.sv` | every documented address and random addresses against a range-based decode, status read-back |
| `tb/tb_video_subsystem_top.sv` | end to end at 32 x 24, in a 24-bit, a 16-bit and a 4-bit/colour-map copy side by side: clear, pixels, palette, lines in all directions, CPU stores during lines (engine stalls), full frame compared with a reference image; counts each mechanism and fails if one never happened |
| `tb/tb_video_subsystem_full.sv` | the same at the default 1024 x 768 x 24 size, with no parameter overrides: full-screen clear (reports its cycle count), the screen diagonal and other lines, and a complete 1,083,264-cycle frame checked pixel by pixel |

| `tb/tb_video_subsystem_configs.sv` | the two narrower configurations at full size, side by side: 800 x 600 x 16 bits with 800x600 frame timing, and 1024 x 768 x 4 bits through the colour map; each one clears, draws, stalls the engine and checks a whole frame (`tb/video_config_run.sv` holds the per-configuration run) |

`tb/line_ref_pkg.sv` holds the software Bresenham model that the
end-to-end tests use.

Each testbench runs with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/video_pkg.sv tb/tb_video_subsystem_full.sv \
    --top-module tb_video_subsystem_full -o sim
./obj_dir/sim
```

The full-size test needs a few seconds and about 100 MB of memory.
