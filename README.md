# Interactive Fractal Viewer

A hardware renderer for quadratic Julia sets. Each pixel (x, y) of a 640 × 480 window is mapped to a point
z0 = a + bi of the complex plane. Four iteration units then apply z ← z² + c in parallel, one iteration per
clock, until |z|² > 4 or 127 iterations have passed. The number of iterations, the *breakaway count* k, goes
into an SRAM frame buffer. A VGA controller reads the buffer continuously and turns each count into a colour.
An optional mode scrolls the colours for an animated picture.

A processor sets up the picture over a memory-mapped bus. It writes the window and the constant c into a
small parameter RAM, then sets a *refresh* bit in an instruction register. The hardware copies the
parameters into working registers, restarts the pixel generator, and redraws the frame buffer while the
display keeps scanning it. At 25 MHz a full picture takes at most 0.41 s. Typical pictures take a few tens of
milliseconds.

```
 bus ─► param_ram ─► rammer ─► param_select ─► fractal_engine ──────────────► coord_lut ◄──► SRAM
 bus ─► instr_reg ─┘ (load)      (presets)     window_gen ► ifm_controller      ▲   │
          │                                      (4 × ifm_wrapper/ifm)          │   ▼ count
          └─ colour scheme, cycling, engine reset ───────────────────────────► vga_mod ─► VGA DAC
```

Everything runs on one clock, the 25 MHz pixel clock. `ifv_top` ties the blocks together. Its ports are the
two bus slaves, the SRAM pins and the VGA DAC pins. A few status outputs come out too:
- `frame_done`: the picture is complete.
- `rammer_busy`: the parameter copy is running.
- `read_missed`: a display read was dropped for a write.
- `cache_hit`: a pixel was served from the held byte.
- `end_of_frame`: the last clock of a VGA frame.
- `color_cycle`: the current colour offset.

## Number format

Every real value is a 36-bit two's-complement fixed-point number with 6 integer bits and 30 fraction bits
(Q6.30, type `fix_t` in `ifv_pkg`). The range is [−32, 32) and one LSB is 2⁻³⁰ ≈ 9.3·10⁻¹⁰. The width
matches the FPGA's 36-bit multiplier mode. Six integer bits are enough because an iterate is tested as soon
as it exceeds |z| = 2.

In hexadecimal, −2.0 is `F80000000`, −1.5 is `FA0000000`, and 0.00625 (4/640) is about `000666666`.

## The iteration unit (`ifm`)

Each step needs three real products of 36 × 36 bits:

```
PA = a·a    PB = b·b    PC = a·b                (72-bit products, bits 65:30 kept)
a' = PA − PB + c_re
b' = 2·PC + c_im
escape when PA + PB > 4
```

The escape sum uses the products at full width (bits 71:30), not the truncated 36-bit squares. An iterate
that has just left the disc can have a square too large for 6 integer bits. Truncated, that square would
wrap to a small number and hide the escape.

The unit is a four-state Moore machine: RESET, WAIT (`ready`), COMPUTE and DONE (`done`).
- `start` in WAIT latches (x, y, a, b) and begins iterating.
- A point with count k spends k + 1 cycles in COMPUTE.
- The result (x, y, k) is held in DONE until the unit is cleared.
- k = 127 means the point never escaped.

`ifm_wrapper` puts a two-state wrapper (W_RESET, W_WAIT) around each unit. The controller then only issues
*assign* and *retire*, and the wrapper turns them into the unit's clear and start. A unit is ready again
k + 4 edges after it was assigned, which gives the "three cycles of setup and tear-down" of the original
design.

## Producing the pixels without multipliers (`window_gen`, `diff_counter`)

The pixel coordinates come from two *differential counters*, one for a and one for b. Together they form the
window generator, which scans left to right along each row, top row first. Row 0 is `b_min`, and b grows
downwards.

A window of width R spread over N pixels needs a step of R/N. That step is rarely a whole number of LSBs.
The counter therefore adds `v_diff` = ⌊R/N⌋ on most steps and `v_diff + 1` on periodic *leap* steps, so that
the rounding error does not build up across the row:

```
leap step  ⇔ iter_count == v_leap   → v += v_diff + 1, iter_count ← 0
otherwise                           → v += v_diff,     iter_count ← iter_count + 1
```

There is one leap every `v_leap + 1` steps. Software picks `v_leap` from the remainder r = R mod N: about
N/r − 1 for r > 0, or a value above N when r = 0, so that no leap happens.

The counter also counts pixels. It raises `at_max` when its index reaches `max_itr` (N − 1). `init` reloads
`v_min`, and `ready` (the data flag) rises on that same edge.

The window generator offers one (x, y, a, b) tuple at a time with `valid`. The consumer takes it with
`next_val`, and the next tuple appears on the following edge. After the last tuple has been taken,
`at_max` goes high and stays high until the next `init`. Each pixel is delivered exactly once.

## Keeping four units busy (`ifm_controller`)

Points finish out of order: one may escape after 2 iterations while its neighbour runs to 127. The
controller decouples the generator from the units:

- **Input buffer.** Two tuple registers sit in series. Stage 1 takes the generator's tuple whenever it is
  empty (`next_val` = stage 1 empty). Stage 0 refills from stage 1 once it is empty.
- **Assignment.** While stage 0 holds a tuple, the lowest-numbered ready unit gets it. At most one unit is
  assigned per cycle, and because stage 0 must empty before it refills, assignments are at least two cycles
  apart. When every unit is busy, the buffer is full and `next_val` stays low, which stalls the generator.
- **Collection.** Each cycle the lowest-numbered done unit is retired. Its (x, y, k) goes into the one output
  register with `we` = 1. Results come out in completion order, not scan order; each carries its own
  coordinates.

Two assertions check the handshake: at most one unit is assigned per cycle and at most one is retired.

In the worst case every point runs the full 127 iterations. The original analysis then gives 133 cycles per
4 results (33.25 cycles per pixel). This controller measures 33.03 cycles per pixel in that case.

`fractal_engine` is the window generator plus the controller. Its `frame_done` output means the window is
exhausted, every unit is idle and the last result has been written. `start` restarts the window and
clears the controller, which drops any result still in flight from the previous picture.

## Sharing one SRAM port (`coord_lut`)

The frame buffer is an external asynchronous 256K × 16 SRAM. A pixel's byte address is `{y[8:0], x[9:0]}`.
The top 18 bits select the word, and x[0] selects the byte lane (`ub_n`/`lb_n`). A 640 × 480 picture
takes 300 KiB of the 512 KiB.

The display reads one pixel per clock, and during a redraw the engine may also write one per clock. Two
rules fit both on one port:

1. **Held byte.** The display reads pixels in order, so an even-x read fetches the whole word. The block
   serves the even pixel from the low byte and keeps the high byte. On the next cycle the odd pixel comes
   from that register (`cache_hit`) and the SRAM is free. A write to that byte updates the register.
2. **Writes first.** A write always goes through. If it collides with a display read, the read is dropped
   (`read_missed`) and `rv` repeats the previous value for that pixel. The error lasts a single frame,
   because the next scan reads the new value.

There is one cycle of latency from (`rx`, `ry`, `re`) to `rv`. The SRAM data bus is split into `dq_o`,
`dq_oe` and `dq_i`; the tri-state buffer belongs in the pad ring.

## Display and colour (`vga_raster`, `color_lut`, `vga_mod`)

`vga_raster` generates standard 640 × 480 at 60 Hz timing: 800 clocks per line (96 sync, 48 back porch,
640 visible, 16 front porch) and 525 lines (2 sync, 33 back porch, 480 visible, 10 front porch).
- It asks the frame buffer for each visible pixel one cycle ahead.
- It registers sync, blank and colour, so they line up.
- `blank_n` is low outside the visible area, and `sync_n` is held at 0.

`color_lut` turns a count into 30-bit RGB. It computes the colour instead of storing a table:
- t = k folded at 128 (k for k < 128, else 255 − k).
- The 10-bit level is {t, t[6:4]}.
- Scheme 0 is grey, scheme 7 is inverted grey.
- Schemes 1–6 light the channels named by the scheme number's bits: bit 2 red, bit 1 green, bit 0 blue.

In colour-cycling mode, `vga_mod` adds an offset to every count before the lookup. The offset steps by one
each time a `SPACER_W`-bit counter wraps. With the default of 20 bits that is about 24 steps per second at
25 MHz.

## Programming model

**Parameter RAM** (`param_ram`, word-addressed rows, low 18 bits of each 32-bit write used):

| row | contents | row | contents |
|---|---|---|---|
| 0, 1 | a_min [35:18], [17:0] | 8 | a_leap [9:0] |
| 2, 3 | b_min [35:18], [17:0] | 9 | b_leap [9:0] |
| 4, 5 | a_diff [35:18], [17:0] | 10, 11 | c_re [35:18], [17:0] |
| 6, 7 | b_diff [35:18], [17:0] | 12, 13 | c_im [35:18], [17:0] |

**Instruction register** (`instr_reg`, 8 bits, readable, also shown on `ledg`):

| bit | name | effect |
|---|---|---|
| 0 | reset | holds the engine in reset while 1 |
| 1 | iterate | colour cycling on |
| 4:2 | color | colour scheme 0–7 |
| 5 | refresh | a rising edge copies rows 0–13 into the working set and redraws |
| 7:6 | fract | 00 = the loaded set; 01, 10, 11 = built-in presets |

The presets share the window [−2, 2) × [−1.5, 1.5) with diff `000666666` and leap 2. Their constants are
c = 0 (01), c = `FCA8F5C29` + `FF125460B`i ≈ −0.835 − 0.232i (10), and c = `FCA8F5C29` + `FFF25460B`i (11).

A redraw goes like this:
- A refresh edge starts the `rammer`.
- The rammer reads one row per cycle into a shadow set and publishes it all at once.
- It pulses *generate* 16 cycles after the refresh edge.
- One cycle later the engine restarts, so the preset selector's registered output carries the new set.
- `frame_done` is brought out as a pin, for a status register or an interrupt.

## Performance and accuracy

| case | result |
|---|---|
| worst case, all 307200 pixels at 127 iterations | 10,137,628 cycles, 0.4055 s at 25 MHz (analytic bound 0.4086 s) |
| preset 10, full 640 × 480 | 892,386 cycles, 0.036 s |
| preset 10, counts vs. double precision | 99.99% within ±5 (307166 of 307200) |

Julia iteration is chaotic near the set's boundary. A fixed-point count can therefore differ from a
floating-point one by more than a few iterations at isolated pixels; the ±5 tolerance allows for that.

## Departures from the original design

- **One clock.** The original ran the bus at 50 MHz, the engine and display at 25 MHz, and the SRAM at half
  a 50 MHz cycle. Here the bus slaves are synchronous to the pixel clock. A crossing is needed if the
  processor runs on another clock.
- **Sign of c_im.** The original's written equation subtracts c_im, but its datapath drawing adds it, and
  z² + c needs the addition. The addition is used.
- **Write priority.** The original's description gives writes priority, but its LUT state diagram gives
  reads priority. Writes win here.
- **No write buffer.** The original fed writes through a small shift register that advanced only when the
  display was not reading. Since writes win and at most one result arrives per cycle, no buffer is needed.
- **Scan direction.** Row 0 is b_min, scanning downwards. An original implementation counted b down from
  the top.
- **Colours.** The original colour ROM was filled by an external tool, and its contents are unknown. The
  eight computed schemes are this design's own.
- **Handshakes.** The wrapper/controller handshakes, the instruction bit map, the refresh edge detection,
  `frame_done` and the reset defaults are this design's own.
- **Not included.** The processor, keyboard, bus fabric, PLL and program SDRAM. The SRAM itself is included
  only as a simulation model (`tb/sram_model.sv`).

## Files

`rtl/` holds one module or package per file:
- `ifv_pkg` holds the shared types: `fix_t`, `tuple_t`, `result_t`, `frac_params_t`, `instr_t`.
- The blocks, from the bottom up: `diff_counter`, `window_gen`, `ifm`, `ifm_wrapper`, `ifm_controller`,
  `fractal_engine`, `param_ram`, `instr_reg`, `rammer`, `param_select`, `coord_lut`, `vga_raster`,
  `color_lut`, `vga_mod`.
- `ifv_top` is the top.

`tb/` holds one self-checking testbench per block (`tb_<block>`) and two shared files:
- `ifv_ref_pkg` is the reference model: a bit-exact fixed-point Julia count, a double-precision count, and
  the differential-counter formula.
- `sram_model` is the asynchronous SRAM model.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. Two of them are system tests:
- `tb_ifv_top` runs the whole viewer on a 32 × 24 window with the real VGA timing. It holds the engine in
  reset, loads a set, switches to a preset and back, and compares every stored count with the reference.
  It then checks every visible pixel of whole frames in two colour schemes and turns colour cycling on. It
  counts each mechanism (load, restart, reset hold, preset switch, writes colliding with display reads,
  display reads dropped for a write, odd pixels from the held byte, renders slowed by generator stalls,
  scheme change, cycling) from the pins alone and fails if one never happened.
- `tb_ifv_full` runs the top with all defaults: one complete 640 × 480 picture, checked pixel by pixel
  against both references and on one full VGA frame. It takes a few seconds under Verilator.
- `tb_ifv_worst` renders, with all defaults, a full picture in which no pixel escapes. It checks the render
  time against the 307200 × 133 / 4 cycle bound and checks that every count sits at the cap. It takes
  about half a minute.

## Simulating

With Verilator 5 (two-state simulation; everything that is read is reset):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ifv_pkg.sv tb/ifv_ref_pkg.sv tb/tb_ifv_top.sv --top-module tb_ifv_top
./obj_dir/Vtb_ifv_top
```

Replace `tb_ifv_top` with any other testbench name. The block testbenches override parameters to stay short:
`tb_fractal_engine` renders 20 × 15 windows, and `tb_vga_mod` uses a reduced raster. To render another
window, compute the diff and leap values as described above and write them with the bus tasks of
`tb_ifv_top`.
