# SimpleVGA: a VGA picture from two counters

An FPGA can drive a VGA monitor directly, with no frame buffer and no
processor. All it takes is a pixel clock and two counters. One counter says
which pixel of the line the monitor's beam is on. The other says which line.
Both sync pulses, and the colour of every pixel, are simple comparisons on
these two numbers.

This RTL does that for an 800x600 picture, using a 50 MHz board clock as the
pixel clock. It draws a checkerboard of red and blue 32x32 squares. Each of the
three colour pins is a single bit. On the board, a 270 Ω series resistor on
each colour pin brings the 3.3 V FPGA level down to the 0.7 V full-scale VGA
level. So each colour is either off or at full brightness.

Two very small teaching circuits come with the VGA generator:

- a gate-level circuit, `x = (a | b) ^ (c | d)`;
- a one-bit clocked register, `pixel <= draw`.

They share nothing with the VGA generator except the clock. They sit beside it
in the top level.

## The raster: where the numbers come from

A VGA monitor expects the picture as a stream: pixel after pixel, line after
line. Between lines and between frames there are blanking periods. A sync
pulse sits inside each blanking period. Here one pixel lasts one 20 ns clock.

| | visible | front porch | sync pulse (low) | back porch | total |
|---|---|---|---|---|---|
| horizontal, in clocks | 0 – 799 | 800 – 855 | 856 – 975 (120) | 976 – 1039 | 1040 |
| vertical, in lines | 0 – 599 | 600 – 636 | 637 – 642 (6) | 643 – 665 | 666 |

A line takes 1040 × 20 ns = 20.8 µs. A frame takes 666 lines = 13.85 ms, which
gives about 72.2 frames per second. These are the timings of the standard
800x600 mode at 72 Hz, which a 50 MHz clock fits exactly. Both syncs are
active low.

The counter widths follow from the totals. The horizontal counter has 11 bits
(0 to 2047) and holds 0 to 1039. The vertical counter has 10 bits (0 to 1023)
and holds 0 to 665.

## How the counters make the syncs

`h_timing` adds one to `xpos` on every clock. At 1039 it returns to 0. Its
output `line_end` is high during that last pixel.

`v_timing` counts only on clocks where `line_end` is high. So `ypos` moves on
at the same edge where `xpos` returns to 0. It returns to 0 after line 665.

The syncs are combinational, taken straight from the counters:

    hsync = !(856 <= xpos < 976)
    vsync = !(637 <= ypos < 643)

Counting clock edges from power-up, the first hsync falling edge comes after
edge 856. Falling edge k comes after edge 856 + 1040·(k−1). A frame holds
exactly 666 hsync pulses and one vsync pulse.

## How the checkerboard is coloured

`checkerboard` uses bit 5 of each counter to pick a square. Bit 5 is the
lowest bit that changes every 32 counts: it is 0 for 0–31 and 1 for 32–63.
Inside the visible area:

    square = xpos[5] ^ ypos[5]
    red    = ~square      (top-left square is red)
    blue   =  square
    green  = 0

Outside 800x600, all three colours are 0. Monitors use the black level during
blanking as their reference, so the colours must be 0 there.

800 is not a multiple of 64, and 600 is not a multiple of 32. So there are 25
squares across and 18¾ down: the bottom row of squares is cut at 24 lines.

### The one-pixel lag

The colours are registered, but the syncs are not. The colour pins therefore
show the pixel that the counters held one clock earlier. The picture sits one
pixel to the right of the hsync timing:

- visible colours appear on clocks 1 to 800 of a line;
- blanking starts on clock 801.

A monitor does not notice this. It is kept on purpose, because it is how the
circuit is specified. If you want the colours aligned with the syncs, register
`hsync` and `vsync` too, and change the testbenches' colour model, which
expects the lag.

## No reset

None of the circuits has a reset input. Every register (the two counters, the
three colour bits and `pixel`) gets its starting value of 0 from its
declaration, like an FPGA register after configuration. This works on FPGAs
and in simulation. Verilator's lint notes it (`PROCASSINIT`). For an ASIC, or
for any target without initial values, add a synchronous reset to `h_timing`,
`v_timing`, `checkerboard` and `pixel_reg`.

Because the VGA generator runs freely, its timing cannot drift. Even from an
arbitrary starting state, both counters are back inside their ranges within
one frame.

## Files

| file | what it is |
|---|---|
| `rtl/vga_pkg.sv` | timing constants, counter widths, square size |
| `rtl/h_timing.sv` | pixel counter, `line_end`, `hsync` |
| `rtl/v_timing.sv` | line counter, `frame_end`, `vsync` |
| `rtl/checkerboard.sv` | registered colour generator |
| `rtl/simple_vga.sv` | the VGA generator: the three blocks above wired together |
| `rtl/or_xor_schematic.sv` | `x = (a | b) ^ (c | d)` |
| `rtl/pixel_reg.sv` | `pixel <= draw` at every rising clock edge |
| `rtl/fpga_examples_top.sv` | top level: the three circuits side by side |
| `tb/*_tb.sv` | one self-checking testbench per module |

Ports of `simple_vga`: `clk` in, `hsync`, `vsync`, `red`, `green`, `blue` out.
`fpga_examples_top` adds `a`, `b`, `c`, `d` → `x` and `draw` → `pixel`.

### Parameters

Every timing number is a parameter of `simple_vga`, and of the top, with the
values above as defaults:

- `H_VISIBLE`, `H_SYNC_START`, `H_SYNC_END`, `H_TOTAL`;
- the matching `V_` parameters;
- `SQUARE_BIT`, where the squares are 2^SQUARE_BIT pixels wide.

Other modes can be built by changing these, as long as the totals fit the
11-bit and 10-bit counters. Assertions checked at the start of simulation
catch a sync pulse that is out of order or a total that does not fit. For a
wider mode, change
`X_WIDTH` or `Y_WIDTH` in `vga_pkg`. The sync polarity is fixed at active low.

## Simulating

Each testbench is self-contained and ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Irtl --top-module fpga_examples_top_tb \
        rtl/vga_pkg.sv tb/fpga_examples_top_tb.sv
    ./obj_dir/Vfpga_examples_top_tb

Replace `fpga_examples_top` with any other module name to run that module's
test. `-Irtl` lets Verilator find the sub-modules by name.

What the tests establish:

- **`fpga_examples_top_tb`** runs the top at full size, with default
  parameters, for one whole frame plus three lines (695,760 clocks, about one
  second). Every clock it compares all VGA outputs with a model built from the
  clock count. It checks the hsync falling-edge times against a reference log,
  in half-clock units with the first rising edge at time 1: 1711, 3791, 5871,
  …, 1380751, 1382831, 1384911. It checks that the 666th pulse is the last one
  before 1385280, the length of one frame. It also drives the gate and the
  register with random inputs. Each mechanism must occur at least once: hsync
  and vsync pulses, line and frame wrap, red, blue and blanked pixels, and both
  values of `x` and `pixel`.
- **`simple_vga_tb`** builds the generator on a 56x26 raster with 4-pixel
  squares. It checks three frames clock by clock, which shows the parameters
  work.
- **`h_timing_tb`** checks the pulse period (1040) and width (120) and the
  position of the first pulse.
- **`v_timing_tb`** checks the line counter and vsync. It drives `line_end`
  with random spacing, including back-to-back pulses.
- **`checkerboard_tb`** checks square edges (31/32, 63/64), area edges
  (799/800, 599/600) and 3000 random positions.
- **`or_xor_schematic_tb`** checks all 16 input combinations.
- **`pixel_reg_tb`** checks random `draw` values. It also changes `draw`
  between edges to confirm that `pixel` holds its value.

## What is not here

The following parts of a working setup are not logic, and are not included:

- the resistor network and VGA connector;
- the FPGA's PLLs, which could derive other pixel clocks (25, 100 or 200 MHz)
  from the 50 MHz input; the generator does not need them;
- the SoC's hard ARM processor.

To drive a real monitor:

1. Connect `clk` to a 50 MHz clock pin.
2. Connect the five outputs to I/O pins.
3. Fit a series resistor of about 270 Ω in each colour line.
4. Wire `hsync`, `vsync` and ground directly to the connector.
