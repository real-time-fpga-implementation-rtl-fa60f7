# MRS video up-scaler: 480p to 720p with trained, content-adaptive filters

This is synthesizable SystemVerilog for a real-time video scaler that turns
720x480 standard-definition video into a 1080x720 picture, placed in the middle
of a 1280x720 high-definition frame. The scaler does not use one fixed
interpolation filter. For every input pixel it looks at the local texture,
decides which of a few trained *context classes* that texture belongs to, and
interpolates with that class's own 5x5 filter. This method is called
Modified Resolution Synthesis (MRS). A bicubic scaler blurs edges and fine
detail; trained filters restore some of it.

The filters and class descriptions come from an offline training step that is
not part of the hardware. The core takes them as tables, loaded at run time.

## The algorithm in hardware terms

Each SD luminance pixel Y(m,n) is handled in three steps.

1. **Features.** Take the 3x3 neighbourhood of the pixel. For each of the 8
   neighbours, FV_i = |Yc - Y_i|^4, where Yc is the centre. Normalise the
   vector: phi_i = FV_i / (sum_j FV_j^2)^0.75. A perfectly flat window gives
   phi = 0. The normalisation makes phi depend on the *shape* of the texture
   more than on its contrast.
2. **Classification.** For each of the 5 classes, compute the distance
   d_c = sum_i (phi_i - C_c,i)^2 * w_c,i. Here C_c is the class prototype and
   w_c the inverse of the class's spread. The class with the smallest d_c wins.
   On a tie the lower index wins.
3. **Interpolation.** The 5x5 window around the pixel is convolved with the
   class's kernel. Each class has four kernels, one per output phase (vp, hp),
   each 0 or 1. One SD pixel covers at most a 2x2 group of HD pixels.

The scaling ratio is L = 1.5. An SD pixel therefore maps to 4, 2, 2 or 1 HD
pixels, depending on the parities of its row and column. The design always
computes all four phases and drops those whose HD pixel does not exist. HD
pixel z belongs to SD pixel floor(z / L). Its phase is floor(2 (z - mL) / L).
The package `mrs_pkg` evaluates this with exact integer arithmetic
(`axis_map`), so no rounding error builds up along a line.

Chroma is not interpolated. The centre pixel's Cb/Cr is copied onto every HD
pixel made from that window.

## Pipeline and resource sharing

Everything from the input memory to the output memory runs on one core clock
of 108 MHz. That is DR = 4 times the 27 MHz SD pixel rate. An SD pixel arrives
as a one-clock strobe (`in_en`) every fourth clock. Each unit uses those four
clocks to do its work with a quarter of the hardware:

| unit | per SD pixel | hardware |
|---|---|---|
| `rgb2ycbcr` | 1 conversion | constant multiplies (shift-add) |
| `input_memory` | write 1 pixel, read a 5x1 column | 4 luma + 2 chroma line buffers of 720 |
| `control_unit` | shift the column into a 5x5 window, compute the HD mapping | counters, window registers |
| `feature_extractor` | 8 features, in 2 lanes x 4 phases | 2 subtract/square/4th power/square paths, 1 table |
| `classifier` | 5 distances, in 2 elements x 4 phases | 20 multipliers |
| `interpolator` | 4 phases, 1 per clock | 25 multipliers, coefficient table of 5 x 4 words x 25 taps |
| `output_memory` | store kept HD pixels, read HD lines in order | 2 HD line buffers of 1080 |
| `ycbcr2rgb` | 1 conversion per HD pixel | constant multiplies |

The feature extractor's latency is DR + 9 clocks, and the classifier's is
4 clocks after its last phase. While a window waits for its class, the window
and its HD mapping sit in a small FIFO (`sync_fifo`, 8 entries). The
interpolator starts when the class arrives. From the input strobe of the pixel that completes a window to its class
result takes 25 clocks, and the four HD pixels follow 5 to 8 clocks later:
about 33 clocks of pipeline, against the 37 quoted for the reference design
at the same DR. Add to that the wait for the window's lines and the HD line
reordering.

### The 0.75 power

The term (sum FV^2)^-0.75 is the only non-linear operation. The sum S is up
to 67 bits wide. Write S = 2^p * (1 + f), with p = 4s + q. Then

    S^-0.75 = 2^(-3s) * 2^(-0.75 q) * (1 + f)^-0.75

`pow075_lut` finds p with a leading-one search. It looks up the last two
factors in a 128-entry table, indexed by q (2 bits) and the top 5 bits of f.
The factor 2^(-3s) becomes a right shift. The table holds
round(65536 * 2^(-0.75 q) * (1 + (f + 0.5)/32)^-0.75). It is computed during
elaboration by a constant function, so no data file is needed. phi is
FV * entry >> shift, saturated to 9 bits, with 8 fractional bits. The
table quantisation error is at most about 1.2%.

## Number formats

| quantity | format |
|---|---|
| Y, Cb, Cr, R, G, B | 8-bit unsigned |
| phi | 9-bit unsigned, 8 fractional bits |
| class prototype C | 9-bit, same scale as phi |
| inverse spread w | 8-bit unsigned integer |
| distance | 29-bit |
| filter coefficient | 10-bit two's complement, 8 fractional bits |
| filter output | rounded to nearest, clamped to 0..255 |

Colour conversion uses the BT.601 coefficients, scaled by 256:
- Y = (77R + 150G + 29B) >> 8
- Cb = ((-44R - 87G + 131B) >> 8) + 128
- Cr = ((131R - 110G - 21B) >> 8) + 128

The inverse conversion uses 351, 179, 86 and 443 over 256, with rounding.

## Input memory and window

Line m is written into luma buffer m mod 4. Before it is overwritten, the
same column of the other three buffers, plus the old contents of this one,
gives lines m-4 .. m-1. The incoming pixel is passed straight through as
line m. A rotation by m mod 4 puts the five values in line order. Two chroma
buffers, selected by line parity, return the Cb/Cr of line m-2. That is the
row of the window centre.

`control_unit` counts columns on active pixels. It counts lines on the
falling edge of data enable and clears both counters during vertical sync.
With every column it shifts the 5x5 window. It issues a window once the
newest pixel is at line 4 or later and column 4 or later. The window centre is
then (m-2, n-2), and its whole aperture lies inside the picture. The two
outermost SD rows and columns at each edge therefore produce no HD pixels:
- HD rows 3..716 are produced.
- HD columns 3..1076 are produced.

## Output memory: back to raster order

The interpolator produces HD pixels in SD order: up to two HD rows
interleaved, column by column. `output_memory` writes each pixel into one of
two 1080-pixel line buffers, chosen by HD row parity.

When an SD line ends, the interpolator reports which HD rows that line has
finished, one or two of them. The output memory queues these rows and reads
each out in column order, one pixel per clock, flagging the first and last
pixel. The queue holds 4 rows. If it overflows, the sticky `om_overflow`
flag is set. At the design rates this never happens: an SD line lasts 3432
clocks, and reading two HD rows takes 2148 clocks.

## Interfaces of `mrs_top`

- **SD input** (core clock): `in_en` strobe, `in_de`, `in_vsync`
  (active low), `in_rgb`.
- **Tables** (core clock): write one word per `cfg_we` pulse.
  - `cfg_sel` = 0 writes a prototype element. `cfg_class` selects the class
    and `cfg_addr` the element 0..7.
  - `cfg_sel` = 1 writes an inverse spread, addressed the same way.
  - `cfg_sel` = 2 writes a filter tap. `cfg_addr` is the tap 0..24. Tap
    5(i+2) + (j+2) weights pixel (m-2+i, n-2+j) around the centre (m-2, n-2),
    and `cfg_phase` is {vp, hp}.
  - Write the tables before video starts. After reset they are all zero.
- **Frame buffer write port** (core clock): `fb_wr_en`, `fb_wr_rgb`, and the
  HD row and column of the pixel with start/end-of-line flags. HD lines come
  out complete and in order.
- **Frame buffer read port and 720p output** (`clk_out`, 74.25 MHz):
  `output_timing` generates the 1650 x 750 raster, with sync polarity high.
  - It asserts `fb_rd_en` for the 1080 middle pixels of each active line.
  - It expects first-word fall-through data on `fb_rd_data`.
  - It drives black in the 100 columns at each side.
- **Status**: `cls_valid`/`cls_idx` (the class of each window) and
  `om_overflow`.

The frame buffer itself is not part of this RTL. In the reference
implementation it was a vendor DDR controller with two ping-pong frame banks,
between a write FIFO and an asynchronous read FIFO. It absorbs two things:
- the clock change;
- the small rate difference: the scaler makes 1.5 HD lines per SD line time,
  while the display takes 1.05 lines per line time.

## What is this design's own choice

These points are decisions of this implementation, not taken from the
reference design:
- A single core clock with a pixel strobe, instead of a separate input pixel
  clock for the line buffers.
- Windows only where the full aperture is inside the picture.
- The number formats in the table above, except the 9-bit phi and the 8-bit
  colour data.
- The 2+5-bit table for the 0.75 power. The reference describes a piecewise
  approximation without giving it.
- The token FIFO, the row queue and its read-out policy in the output memory.
- Loading the trained tables over a configuration port. No trained values
  are included, so a real deployment needs its own training run.
- The sync polarities.
- Four kernels per class, one per (vp, hp). One drawing of the reference
  shows a 9-word table; the text describes four phases, and four are used.

## Verification

Each module has a self-checking testbench in `tb/`. It compares the module
against an independent integer model and ends with a
`TB_RESULT checks=N failures=M` line. The end-to-end test is `tb_mrs_core`:
- It sends generated video with real blanking and sync through `mrs_top`.
- The test picture has flat areas, weak and strong texture, and edges.
- It loads tables under which every class wins somewhere.
- It builds the complete expected HD frame with a bit-exact model of the
  whole algorithm.
- It checks every frame buffer write: value, position, order, and no
  duplicates.
- It checks the 720p output: timing, border and picture data.
- It measures the pipeline latency from input strobe to class result and
  requires it to be constant and within 37 clocks.
- It counts how often each mechanism occurs and fails if one never does:
  - each class chosen;
  - flat windows;
  - dropped phases;
  - SD lines giving two HD rows and lines giving one;
  - border pixels.

Two testbenches wrap `tb_mrs_core`:
- `tb_mrs_top` runs two 48x24 frames in well under a second.
- `tb_mrs_full` runs five full 720x480 frames at default parameters. It
  compares 766,836 HD pixels per frame and takes about 30 seconds.

To run a test with Verilator:

    verilator --binary --timing --assert -Irtl -yrtl -ytb +libext+.sv \
        rtl/mrs_pkg.sv tb/tb_mrs_full.sv --top-module tb_mrs_full
    obj_dir/Vtb_mrs_full

## Changing it

- The input size is the `IMG_W`/`IMG_H` parameters of `mrs_top` (package
  defaults `SD_W`/`SD_H`). The line buffer sizes follow automatically.
- The scaling ratio is `L_NUM/L_DEN` in `mrs_pkg`. The mapping functions
  support any ratio between 1 and 2. Ratios of 2 or more need a larger
  output memory and are not supported.
- DR = 4 is the tested value. The feature extractor and classifier also
  accept DR = 2 or 8, but the interpolator needs 4 clocks per window, so
  input strobes must never come closer than 4 clocks apart.
