# VGA monitor controller

A VGA monitor draws its picture one pixel at a time, left to right and top to
bottom, and relies on the source for two timing signals. Horizontal sync marks
the start of each scan line. Vertical sync marks the start of each frame. The
source must also switch the red, green and blue lines on and off at the moment
the beam passes each pixel. This design makes all five signals from one pixel
clock. The rest of it is two counters and four flip-flops. It reports the
column and row it is drawing, so a picture can be made with plain compares on
those two numbers. Two such pictures are included: a red border around the
screen, and the same border with the large block letters "CS".

Each colour line is a single on/off bit, so a pixel has one of eight colours.

## Scan timing

A line and a frame are each split into four regions. The counters visit them
in this order after reset:

| direction | visible | front porch | sync (low) | back porch | total |
|---|---|---|---|---|---|
| horizontal, clocks at 25.175 MHz | D = 640 | E = 20 | B = 95 | C = 45 | 800 |
| vertical, lines | R = 480 | S = 14 | P = 2 | Q = 32 | 528 |
| horizontal, clocks at 12 MHz | 305 | 10 | 45 | 21 | 381 |

- At 25.175 MHz a line lasts 31.78 µs and a frame 16.78 ms, which is 59.6 frames per second.
- Both sync signals idle high. They go low only in the sync region.
- The colour outputs are forced off in the porches and the sync region, in both directions.

The 12 MHz row keeps the same microsecond timing with a slower clock. Only 305
pixels fit in the visible part of the line. The sync and porch lengths in that
row are the 25.175 MHz microsecond values times 12 MHz, rounded. The front porch
is rounded up to 10 so that a line is 381 clocks (31.75 µs). Vertical timing is
counted in lines, so it does not change.

These constants live in `vga_pkg` as `region_t` structs: `H_25MHZ`, `V_25MHZ`,
`H_12MHZ` and `V_12MHZ`. A different mode needs only a new pair of structs.
Every region must be at least one step long, and a total must not exceed 1024.

## How counts become sync and blanking

`vga_controller` contains two instances of `scan_counter`:

- **HCount** counts every clock, from 0 to 799.
- **VCount** counts once per line, from 0 to 527. HCount's `roll_over` is its
  count enable.

Count 0 is the first visible pixel, or the first visible line. So
`column_out`/`row_out` are pixel coordinates while the beam is in the visible
area. Outside it they keep counting: columns 640 to 799, rows 480 to 527.

Each counter flags the four region boundaries: `at_front`, `at_sync`,
`at_back` and `at_active`. Four set/reset flip-flops turn these one-step
strobes into levels:

| flip-flop | reset when entering | set when entering | drives |
|---|---|---|---|
| H_Sync | B (horizontal sync) | C (back porch) | `h_sync_out` |
| H_data_on | E (front porch) | D (visible) | colour gate |
| V_Sync | P (vertical sync) | Q (back porch) | `v_sync_out` |
| V_data_on | S (front porch) | R (visible) | colour gate |

The timing is the subtle part. A strobe is raised on the **last count before**
a boundary, not on the boundary count itself. For example, `at_front` is high
at count D−1 = 639. The flip-flop therefore changes on the same clock edge as
the counter enters the new region. H_data_on is then exactly
`column_out < 640`, and h_sync_out is low for exactly counts 660 to 754. There
is no one-pixel skew between the coordinates and the blanking, so a pattern
generator can work combinationally from `column_out`/`row_out`. Assertions in
`vga_controller` check this alignment during every simulation.

VCount's strobes are already qualified by its enable, which is HCount's
`roll_over`. The vertical flip-flops therefore change only on the clock edge
that starts a new line, at column 0.

The colour gate (`rgb_gate`) ANDs each colour input with H_data_on and
V_data_on.

On reset (asynchronous, active high):

- Both counters go to 0.
- All four flip-flops are preset to 1: syncs inactive, data on.

The first line after reset is therefore a normal line starting at pixel (0, 0).

Latency: the colour inputs are combinational through to the colour outputs.
The syncs and coordinates are registered. All outputs for a pixel appear in the
same clock cycle.

## Pictures

The pattern generators are purely combinational functions of (column, row).

- `border_pattern` returns the colour for any pixel within `BORDER` pixels of
  an edge of the visible area, and black elsewhere. The defaults are red and 8
  pixels.
- `cs_letters` divides the visible area into a 13 × 9 grid of cells. At
  640 × 480 a cell is 49 × 53 pixels; at 305 × 480 it is 23 × 53. The grid is
  counted from the top left; it is not centred, so the 3 pixels left over on
  the right of a 640-pixel line stay unused. Each letter is a 3 × 5-cell glyph
  with strokes one cell thick. C fills grid columns 3–5 and S fills grid
  columns 7–9, both in grid rows 2–6. Only compares against elaboration-time
  constants are used.

`vga_top` ORs the two generators and feeds the result to the controller's
colour inputs. `show_letters` selects the picture:

- `show_letters = 0`: border only.
- `show_letters = 1`: border plus letters.

The letters are red, like the border.

## Interfaces

`vga_top` has these parameters:

- `H_TIMING` and `V_TIMING`: default `H_25MHZ` and `V_25MHZ`.
- `BORDER`: default 8.

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | pixel clock (25.175 MHz, or 12 MHz with the 12 MHz timing) |
| reset | in | 1 | asynchronous, active high |
| show_letters | in | 1 | 0: border; 1: border and "CS" |
| h_sync, v_sync | out | 1 | active-low syncs to the monitor |
| red, green, blue | out | 1 | colour lines, blanked outside the picture |
| column, row | out | 10 | current scan position |

`vga_controller` is the reusable core. It has the same clock, reset, sync,
colour and position ports as `vga_top`, plus the `red`/`green`/`blue` inputs.
Drive those inputs from any function of `column_out` and `row_out`.

## Departures from a classic schematic implementation

A textbook version of this circuit clocks the row counter from the column
counter's roll-over output, and clears the four flip-flops to 0. This design
differs in three ways:

- **One clock.** The row counter runs on the pixel clock, and roll-over is its
  enable. The design is fully synchronous.
- **Preset flip-flops on reset.** Clearing them to 0 would hold the syncs low
  and the picture dark for part of the first line and frame after reset.
  `sr_ff` has a `CLEAR_VALUE` parameter; the controller uses 1.
- **Compare one count early.** This gives the alignment described above.

Several values are this design's own choices:

- the border width;
- the letter shapes, size, position and colour;
- the 12 MHz rounding;
- the picture select input.

Vertical timing is 528 lines per frame (2 + 32 + 480 + 14). That is three more
than the common 525-line industry mode, and the frame rate is 59.6 Hz rather
than exactly 60 Hz. Most monitors lock to both.

Only one bit per colour is provided. Analog intensity levels would need a DAC
outside this logic.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The reference models are in
`tb/vga_ref_pkg.sv`. They use division and modulo, or bitmaps, rather than the
RTL's compare structure.

| testbench | what it covers |
|---|---|
| tb_scan_counter | count and all strobes every cycle, with a random enable; 800-clock line period; asynchronous clear |
| tb_sr_ff | random set/reset against a one-bit model, both clear values |
| tb_rgb_gate | all 32 input combinations |
| tb_border_pattern | every position of the 800 × 528 frame; pixel count 640·480 − 624·464 |
| tb_cs_letters | every position, at both resolutions; pixel count 20 cells × 49 × 53 |
| tb_vga_controller | two full frames cycle by cycle: coordinates, syncs, blanking with random colours; pulse widths 95 clocks and 1600 clocks, periods 800 and 422,400 clocks |
| tb_vga_top | four frames at the default parameters, seen as a monitor would see them (see below) |
| tb_vga_top_12mhz | the same end-to-end test at 305 × 480 |

In the two end-to-end tests, the picture is recovered from the sync edges
alone, not from the column and row outputs. All 640 × 480 pixels of each
frame are compared with the reference image. The picture select is switched
during vertical blanking. Each mechanism is counted and must occur at least
once: horizontal and vertical retrace, border pixels, letter pixels, the mode
switch, and blanked clocks.

All testbenches pass. Each one was also run against a copy of its module with
one deliberate bug, and each caught it.

## Simulating

Verilator 5 example (the full-size top test takes a few seconds):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/vga_pkg.sv tb/vga_ref_pkg.sv tb/tb_vga_top.sv --top-module tb_vga_top
./obj_dir/Vtb_vga_top
```

Replace `tb_vga_top` with any other testbench name. Pass the packages first.

## Files

- `rtl/vga_pkg.sv` — `region_t`, `rgb_t`, timing presets
- `rtl/scan_counter.sv` — HCount / VCount
- `rtl/sr_ff.sv` — set/reset flip-flop
- `rtl/rgb_gate.sv` — colour blanking
- `rtl/vga_controller.sv` — sync generator and colour gating
- `rtl/border_pattern.sv`, `rtl/cs_letters.sv` — picture generators
- `rtl/vga_top.sv` — complete display
- `tb/` — the testbenches listed above and the reference package
