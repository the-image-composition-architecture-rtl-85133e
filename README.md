# Image composition with a tree of Compositors

This design renders a 3-D scene in parallel by splitting it into objects, not
into screen regions. Each of N graphics processors draws one object into its own
full-screen raster. The raster holds a depth Z, a coverage α and premultiplied
R, G, B for every pixel, with transparent black wherever the object is absent.
All processors stream their rasters out at the same time, pixel for pixel.

A binary tree of N-1 identical *Compositor* chips merges the streams two at a
time. The root delivers the finished picture to the frame buffer. The result
has hidden surfaces removed and edges anti-aliased. Each Compositor is a
Z-buffer merge plus an alpha blend. Its key element is a cheap estimate of how
much of each pixel is covered by which of its two inputs. That estimate lets the
tree resolve intersecting surfaces correctly inside a pixel, which a plain
per-pixel Z test cannot do.

```
 GP0 GP1  GP2 GP3  GP4 GP5  GP6 GP7        (graphics processors, outside this RTL)
   \ /      \ /      \ /      \ /
  Comp     Comp     Comp     Comp          level 3   (10 clocks each)
     \     /           \     /
      Comp              Comp               level 2
          \            /
              Comp                         root -> frame buffer
```

The default configuration is the one described here: eight processors, seven
Compositors, and 513 x 513 rasters. That is a 512 x 512 picture plus one extra
row and column, which supply only the corner depths.

## Pixels on the wire

Every stream is one byte wide and carries a pixel as six bytes, in this order:

| byte | 0    | 1    | 2 | 3 | 4 | 5 |
|------|------|------|---|---|---|---|
|      | Z low | Z high | α | R | G | B |

- **Z** is a 16-bit unsigned depth. Smaller means nearer.
- **α** is 8 bits outside the chip, where 255 means fully covered.
- **Colours** are 8 bits each and already multiplied by α.

A new pixel enters every six clocks. The output stream has the same format, so
a Compositor's output can feed the next one directly.

Inside the chip, α is widened to 9 bits so that 1.0 is exactly 256:

- **On entry** ("A+"), α ≥ 128 is incremented, so that 255 becomes 256.
- **On exit** ("A-"), the value is decremented when bit 8 or bit 7 is set.

The two maps are inverses. The coverage fraction β is a 5-bit number in
sixteenths, where 16 means 1.0.

## The coverage estimate β

The two inputs of a Compositor are called **Front** and **Back**. Front is only
a priority name: whichever surface is nearer at a point wins that point.

β is the fraction of the pixel where Front is nearer. The chip never sees the
surfaces themselves. It sees only the Z values of both rasters at the pixel's
four corners, and estimates β from nine samples.

### Sample values

- **Corners.** For each corner TL, TR, BR, BL, form the difference
  `Z_Back - Z_Front`. The sample is 1 when the sign is non-negative, that is
  when Front is nearer or equally near.
- **Edges.** Each edge sample uses the sum of the differences at that edge's
  two corners:
  - T = TL + TR
  - R = TR + BR
  - B = BR + BL
  - L = BL + TL

  This sum is twice the difference at the edge's midpoint if Z is linear along
  the edge.
- **Centre.** The centre sample is the sign of R + L. That is four times the
  difference at the pixel's centre.

### Weights

The weights form a 3 x 3 Bartlett (tent) filter:

- 1/16 per corner
- 1/8 per edge
- 1/4 for the centre

```
   TL ---- T ---- TR          1/16  1/8  1/16
   |              |
   L      centre  R           1/8   1/4  1/8
   |              |
   BL ---- B ---- BR          1/16  1/8  1/16
```

Adding the weights of the samples that vote for Front gives β in sixteenths:

- 16 means the whole pixel is Front.
- 0 means the whole pixel is Back.
- Anything in between is a "confused" pixel that gets blended.

### Where the corner depths come from

The pixel's own Z is its **bottom-right** corner. The other three corners come
from neighbours:

- **BL** is the previous pixel's Z.
- **TL and TR** are from the previous scan line.

Each Compositor therefore keeps one row of Z for each input in an external
memory, the previous-row buffer. It reads the two old bytes at a column and
writes the current pixel's two bytes back to the same place. The first row and
the first column of a raster have no real upper or left neighbours. Their Z
output is still correct, but their colours use whatever the buffer held. This
is why the raster carries one extra row and column.

### How the arithmetic is built

The comparisons are byte-serial, like the data:

- Each corner subtractor handles the low bytes in one clock and the high bytes
  in the next, with a carry flip-flop in between.
- The differences are 17 bits wide and the edge sums 18 bits, so nothing can
  overflow.
- The centre adder keeps only its sign.
- The corner and edge signs are delayed so that all nine arrive at the β adder
  together.

A separate flip-flop keeps the bottom-right corner's sign. It selects which
input's Z goes to the output, because the output Z is `min(Z_Front, Z_Back)`.

## Composition arithmetic

With α in 9 bits and β in sixteenths, every output pixel is computed as
follows:

```
F_B = 256 - (β · α_F) >> 4                 share of Back that remains visible
F_F = 256 - ((16 - β) · α_B) >> 4          share of Front that remains visible
α   = α_F + α_B - (α_F · α_B) >> 8
C   = (C_B · F_B) >> 8 + (C_F · F_F) >> 8  for C = R, G, B (low 8 bits kept)
Z   = min(Z_F, Z_B)
```

This is the "over" operator applied in both directions and weighted by β. When
β = 1 it reduces to Front over Back, and when β = 0 to Back over Front.

All products are truncated.

### Overflow of α_F + α_B

- When both α values are 1.0, the 9-bit sum α_F + α_B wraps to 0.
- The following subtraction of α_F·α_B = 256 wraps back to 256, which is the
  correct result.

The design relies on this on purpose.

### The multipliers

Two multipliers do all the products:

- The **Back** multiplier forms β·α_F, then α_B·α_F, then C_B·F_B.
- The **Front** multiplier forms (1-β)·α_B, then C_F·F_F.

Each has these parts:

- An A-operand register and a B-operand register.
- A two-stage multiplier core.
- An **INC** circuit (`1.0 - x`) in the path from the product back to the A
  register. It turns β·α into the factor F used for the three colour bytes.

When one operand is exactly 1.0 (bit 8 set), the core passes the other operand
through instead of multiplying. This case is common, because opaque pixels have
α = 1.0 and uncontested pixels have β of 0 or 16.

## One pixel's path through a Compositor

Cycle k = 0 is the clock in which a pixel's Z low byte is on the input pins.
Bytes are registered one clock after they appear.

| k | what happens |
|---|---|
| 0 – 5 | the six bytes of Front and Back arrive |
| 0, 1 | previous-row Z (TL/TR bytes) is read from the buffers |
| 1, 2 | corner subtractors run on the low and then the high byte; the Z circuits shift (current Z → BL, old row → TL) |
| 2, 3 | the current Z is written back to the previous-row buffers |
| 3 | edge stage; α widened (A+); bottom-right sign kept as the Z-min select |
| 4 | centre sign; first α adder forms α_F + α_B |
| 5 | β ready; loaded into both multipliers (Back: β, Front: 16 - β) |
| 7 | β·α products ready; Back multiplier loads α_B for α_B·α_F |
| 8 | INC forms F_B and F_F, which load into the A registers |
| 9 – 11 | R, G, B of both streams go through the multipliers |
| 10 | second adder: (α_F + α_B) - α_F·α_B |
| 11 – 13 | second adder: colour sums |
| 10 – 15 | output bytes Z low, Z high, α, R, G, B on OUT_DATA |

The latency is therefore **10 clocks** from input Z low to output Z low, and a
new pixel is accepted every 6 clocks. No circuit is busy for more than six
clocks of any pixel, so consecutive pixels overlap without stalls.

The `sequencer` produces six one-hot phase signals, and these drive every
register enable and mux select.

The output mux sends, in order:

1. the two bytes of the Z-min register
2. α, after A-
3. the three colour sums

### Pins

| signal | dir | width | meaning |
|---|---|---|---|
| `front_data`, `back_data` | in | 8 | input streams |
| `in_addr` | out | 16 | byte offset within the current row, for the memories feeding the inputs |
| `prev_front_in/out`, `prev_back_in/out`, `prev_oe` | in/out | 8 | previous-row data buses, split into in/out/enable |
| `prev_addr` | out | 14 | `{column, byte}` into the previous-row buffers |
| `prev_rd_strb`, `prev_wr_strb` | out | 1 | buffer strobes: read in cycles 0–1, write in cycles 2–3 |
| `out_data` | out | 8 | output stream |
| `out_addr` | out | 16 | byte offset within the row of the output byte |
| `start_row` | in | 1 | high for one clock: the next clock is byte 0 of a new row |
| `out_start_row` | out | 1 | `start_row` delayed by 10 clocks, for the next tree level |
| `clk`, `rst` | in | 1 | clock and synchronous active-high reset |

In the tree, a child's `out_data` feeds its parent's `front_data` or
`back_data`, and its `out_start_row` feeds the parent's `start_row`. Each level
adds 10 clocks, so the 8-leaf tree has 30 clocks of latency. Only the leaf
level uses `in_addr`: every processor must return the addressed byte within
the same clock.

### Rows and frames

A frame is simply a sequence of rows. Pulse `start_row` once per row, every
6 × width clocks, and stream the row's pixels.

At a 45 ns clock, a 513 x 513 raster runs at 14.1 frames per second. Thirty
frames per second would need a clock of about 21 ns.

## Source files

`rtl/`:

| file | block |
|---|---|
| `comp_pkg.sv` | widths, pixel byte order, pixel struct |
| `compositor_tree.sv` | **top**: tree of `N_LEAVES-1` Compositors with their previous-row buffers |
| `compositor.sv` | one Compositor chip |
| `sequencer.sv` | modulo-6 cycle counter and one-hot phases |
| `beta_unit.sv` | byte-serial corner, edge and centre comparators, Z-min select |
| `beta_adder.sv` | sums the nine weighted sign bits into β |
| `mult_unit.sv` | one multiplier with operand registers and the INC feedback path |
| `mult_core.sv` | two-stage 9 x 9 multiplier with 1.0 bypass |
| `one_minus.sv` | `1.0 - x` (9-bit INC, 5-bit β negation) |
| `alpha_inc.sv`, `alpha_dec.sv` | α 8 ↔ 9 bit maps (A+, A-) |
| `z_pair.sv` | two-byte shift register holding one Z |
| `prev_z_ram.sv` | previous-row Z buffer, written as a memory array |

The top's parameters are `N_LEAVES` (8, must be a power of two) and
`ROW_PIXELS` (513, which sizes the previous-row buffers).

`tb/`:

- **Testbenches.** There is one `tb_<block>.sv` per block. Each prints
  `TB_RESULT checks=… failures=…`.
- **`comp_ref_pkg.sv`.** An independent integer reference model of the
  composition, with a test-raster generator: discs with anti-aliased rims on
  tilted depth planes.
- **`tree_bench.sv`.** The end-to-end tree bench, used by:
  - `tb_compositor_tree` (16 x 10 rasters)
  - `tb_tree_full` (full 513 x 513 rasters, default parameters)

  Both check the following:
  - every output Z
  - every interior α and colour
  - the 30-clock latency per row
  - the row count
  - that each mechanism occurred at least once: confused, all-Front and
    all-Back pixels, Z-min from either side, the α wrap, the 1.0 bypass, the
    α widening, and corner differences beyond 16 bits
- **`tb_chevron.sv`.** Composes a flat white square with a blue square whose
  depth is a corrugated "chevron" pattern, at eleven slopes from 7 down to
  1/15. It:
  - checks every pixel bit-exactly
  - requires white, blue and blended pixels at every slope
  - prints, for information, how far the result is from an ideal blend with
    supersampled coverage (standard deviation of the non-zero colour errors is
    about 7 to 16 levels, largest for the shallowest slopes)

To run a testbench with Verilator, for example the full-size one:

```
verilator --binary --timing -Wno-fatal -Irtl --top-module tb_tree_full \
    rtl/comp_pkg.sv tb/comp_ref_pkg.sv rtl/*.sv tb/tree_bench.sv tb/tb_tree_full.sv
./obj_dir/Vtb_tree_full
```

The full-size run composes eight 513 x 513 rasters. It builds in about 25 s
and simulates in about 2 s. A block testbench needs only its block's files plus
`comp_pkg.sv`, and `comp_ref_pkg.sv` where it uses the model.

## What is this design's own

The following come from the original architecture:

- the tree organisation
- the pixel format and byte order
- the α and β number formats
- the nine-sample coverage estimate with its weights, operand widths and
  byte-serial comparators
- the composition equations
- the two multipliers with INC feedback and bypass
- the list of sub-circuits, the cycle schedule, the 6-clock pixel period and
  the 10-clock latency
- the pin list and bus widths

The following are choices made here:

- **Clocking.** One rising clock edge with one-hot phase enables. The original
  control used load-enable and mux-select registers on opposite clock edges.
- **Multiplier timing.** Every product takes two clocks. Originally only β·α
  took two clocks and the other products three. The shorter schedule is the
  one that fits six clocks per pixel.
- **Multiplier core.** The two-stage split (low four bits of one operand, then
  the rest) is a plain choice. The original array was not available.
- **Addresses.** `in_addr`/`out_addr` restart at 0 on every `start_row` and
  count bytes within the row. `prev_addr` is `{column, byte}`. Only the bus
  widths were given.
- **Pins.** The bidirectional previous-row buses are split into input, output
  and output enable.
- **Previous-row buffer.** It is a plain memory array with combinational read.
  In hardware it would be an external dual-ported RAM.
- **Tree wiring.** Even-numbered processors feed Front inputs. On exact Z ties
  Front wins, so processor 0 has the highest priority.
- **Colour sums.** They keep their low 8 bits. Premultiplied inputs do not
  overflow.
- **Borders.** There is no special treatment. The first row and column are
  border pixels, as described above.
- **Reset.** It is synchronous and clears every register. The previous-row
  buffers are not cleared.

## Limits

- The graphics processors, the host that feeds them and the frame buffer are
  outside this RTL. The testbenches model the processors' output memories as
  arrays.
- Nothing in this RTL has been checked against a gate budget or a clock
  target. The original aimed at about 10,000 gates, 224 pins and a 45 ns clock
  in a gate array.
- The coverage estimate is an approximation. Thin slivers that pass between
  the nine sample points are missed, and nearly horizontal or vertical
  intersections show small regular errors. The chevron bench measures both
  effects.
