# VGA colour-pattern generator, 640 x 480 at 60 Hz

A VGA monitor does not ask for pixels. It expects a steady stream, one pixel per
pixel clock, framed by two sync pulses that tell it when a line and a frame begin.
No software loop can keep up with that rate: a 640 x 480 picture at 60 Hz needs
about 18 million pixels per second, and 25 million clock slots once the blanking
intervals are counted. A small dedicated circuit can do it easily. This RTL is
such a circuit. It is a raster timing generator built from two chained counters,
plus two picture generators that compute each pixel's colour from its screen
position, so no frame memory is needed:

* **Part 1**: eight vertical colour bars, 80 pixels wide and 480 lines high, in
  the eight colours that one on/off bit per gun can make.
* **Part 2**: the same bars, with the leftmost one cut into a column of eight
  80 x 60 blocks that show the same eight colours.

The two parts were originally separate FPGA builds for a board with a 12-bit
(4 bits per gun) VGA connector. `vga_top` holds both side by side. Each part has
its own timing generator and its own VGA port.

## The raster

Everything is counted in pixel clocks of a 25 MHz clock (40 ns).

| | visible | front porch | sync pulse | back porch | total |
|---|---|---|---|---|---|
| horizontal (clocks) | 640 (25.6 us) | 16 (640 ns) | 96 (3.84 us) | 48 (1.92 us) | 800 (32 us) |
| vertical (lines) | 480 (15.36 ms) | 10 (320 us) | 2 (64 us) | 29 (928 us) | 521 (16.67 ms) |

A frame is 800 x 521 = 416,800 clocks. At 25 MHz that is 59.98 frames per
second. Both syncs are active low.

Inside each period the counters run in this order: **sync, back porch, visible,
front porch**. Count 0 is the first clock of the sync pulse. So the visible
columns are horizontal counts 144..783 (96 + 48 = 144), and the visible lines
are vertical counts 31..510 (2 + 29 = 31). A monitor sees only the periodic
waveform, so which interval is numbered 0 is an internal choice. Starting the
pulse at 0 lets a plain "count == 0" comparator start each sync pulse.

## Timing generator (`sync_gen`, `vga_controller`)

`sync_gen` handles one axis. It has three parts:

1. a modulo-`TOTAL` counter with a clock enable;
2. two equality comparators: a **zero detect** (`count == 0`) and a
   **pulse-width detect** (`count == PULSE`);
3. a **set/reset flip-flop**. The zero detect sets it and the width detect clears
   it. Its inverse is the sync output.

The flip-flop is therefore high for exactly `PULSE` counts at the start of each
period. `vga_controller` uses two instances:

* the **horizontal** instance runs on every clock (`TOTAL = 800`, `PULSE = 96`);
* the **vertical** instance is enabled by the horizontal `wrap` output, which is
  high on the last clock of each line (`TOTAL = 521`, `PULSE = 2` lines). The
  vertical count therefore advances at the same clock edge that starts each
  horizontal sync pulse.

Neither sync is made by decoding a whole range of counts. Each pulse comes from
two single-value comparators and one flip-flop. This keeps the decode logic
small, and it is why the sync pulse sits at count 0.

The controller also decodes the counters into `video_on` and the pixel
coordinates: `x = hcount - 144` and `y = vcount - 31` inside the visible window,
and 0 outside it. The raw `hcount`/`vcount` and a `frame_start` strobe are
brought out as well, for a video-memory address generator if one is added.
Neither picture generator here uses them.

### Alignment between colour and sync

This is the one subtle timing point in the design. The sync outputs come from
flip-flops that are set or cleared by comparing the counter, so they lag the
counter by one clock. `video_on`, `x` and `y` are decoded combinationally from the
counter, so they do **not** lag. Each picture generator therefore registers its
colour output. Colour and syncs then both lag the counters by exactly one clock,
and the first visible pixel reaches the port 144 clocks after the falling edge of
HS. If you add a picture generator with a different latency, delay the syncs to
match. If you use `x`/`y` to address a synchronous RAM, the RAM read adds a
second clock.

After a synchronous reset (`rst` high), both counters are 0 and the syncs are
inactive. One clock after `rst` falls, HS and VS fall together, and the first
frame begins.

## The two pictures (`colour_bars`, `colour_grid`)

The colour code is 3 bits, `{R, G, B}`, one bit per gun (`vga_pkg::colour_t`):

| code | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---|---|---|---|---|---|---|---|---|
| colour | black | blue | green | cyan | red | magenta | yellow | white |

On the 12-bit port, each code bit drives its 4-bit channel to either `4'hF` or
`4'h0` (`vga_pkg::expand_colour`).

* `colour_bars`: colour code = `x / 80`. Bar 0 (leftmost) is black and bar 7
  (rightmost) is white, in table order.
* `colour_grid`: for `x < 80`, colour code = `y / 60`, with black at the top and
  white at the bottom. Elsewhere it is `x / 80`, as in Part 1. The screen is thus
  an 8 x 8 grid of 80 x 60 cells. Only the left column of cells varies in colour
  from top to bottom.

Both generators output black whenever `video_on` is low. A monitor uses the
blanking intervals to find its black level, and a CRT's beam is flying back
during them.

## The analog side (not RTL)

On the board, each 4-bit colour channel drives a resistor ladder: 4 kOhm, 2 kOhm,
1 kOhm and 510 Ohm from the least to the most significant bit. Together with the
monitor's 75 Ohm termination, this gives 16 levels between 0 V and about 0.7 V
(0.72 V with 3.3 V outputs and all bits high). HS and VS pass through 100 Ohm
series resistors. Each of `vga_top`'s two ports (`pN_red`, `pN_green`, `pN_blue`,
`pN_hsync_n`, `pN_vsync_n`, 14 signals) connects straight to such a network. The
pixel clock is an input. On an FPGA board it would be made from the board
oscillator, for example by dividing 100 MHz by four, or with a clock manager.

## Files

| file | contents |
|---|---|
| `rtl/vga_pkg.sv` | timing constants, `colour_t`, `rgb12_t`, `expand_colour` |
| `rtl/sync_gen.sv` | one axis: counter, zero / width detect, set/reset sync flop |
| `rtl/vga_controller.sv` | horizontal + vertical `sync_gen`, visible-window and x/y decode |
| `rtl/colour_bars.sv` | Part 1 picture |
| `rtl/colour_grid.sv` | Part 2 picture |
| `rtl/vga_top.sv` | both parts side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/vga_monitor_model.sv` | testbench-only monitor model: locks to the syncs and returns pixels with coordinates |

The timing parameters of `vga_controller` and the picture generators default to
the 640 x 480 values in `vga_pkg`. Another VESA mode needs only new parameter
values, provided `CW` (counter width, 10 bits) still holds the totals. The
picture generators assume the visible width and height divide evenly by 8.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs.

* `tb_sync_gen`: the horizontal configuration, plus a short configuration with a
  random clock enable. Counts, `wrap` and sync are checked every cycle against a
  reference counter. The 96-clock width and 800-clock period are measured.
* `tb_vga_controller`: a little over one full frame. Every output is checked every
  cycle against the timing table written out independently. HS 800/96 clocks, VS
  416,800/1,600 clocks and 307,200 visible pixels per frame are measured.
* `tb_colour_bars`, `tb_colour_grid`: the full visible area plus blanked
  positions, checked pixel by pixel, with per-bar and per-block pixel counts.
* `tb_vga_top` (the full-size, end-to-end test, with no parameters overridden):
  each port feeds a monitor model. Two complete frames per port are compared pixel
  by pixel, 614,400 pixels each. The monitor also checks sync periods and widths,
  that VS falls with HS, and that colour is black during blanking. The test
  reports the number of HS pulses, VS pulses, blanking cycles and frames, and the
  pixels of every bar and block. Each must be nonzero and exact.

Each testbench was also run against a copy of its module with a deliberate bug,
such as a sync pulse one count short, an off-by-one visible window, a wrong bar
divisor or a swapped colour channel. Each copy was caught.

To run with Verilator 5 (from the directory above `rtl/` and `tb/`):

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/vga_pkg.sv tb/tb_vga_top.sv --top-module tb_vga_top
./obj_dir/Vtb_vga_top
```

Replace `tb_vga_top` with any other testbench name. The full-size run takes about
10 seconds to build and 1 to 2 seconds to simulate.

## Design choices and deviations

These points are choices made in this implementation:

* **Colour order.** The bars follow the colour-table order, black on the left.
  The blocks follow the same order, black at the top.
  No other order is specified.
* **Part 2 layout.** Only the leftmost bar is subdivided into blocks, and the
  other seven bars stay as in Part 1.
* **Interval order and sync polarity.** The order is sync, back porch, visible,
  front porch, and the syncs are active low (the usual polarity for 640 x 480).
* **Reset.** A synchronous, active-high reset has been added. Both designs start
  at the first clock of a frame.
* **Registered colour output.** The colour is registered to line up with the
  registered syncs, as described above.
* **Pixel clock.** Exactly 25 MHz, not the 25.175 MHz of the VESA standard. Most
  monitors accept it, and the frame rate is 59.98 Hz.
* **Colour depth.** Only the 8 full-on/full-off colours are used, although the
  port could carry 4,096.
