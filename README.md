# Edge-adaptive 2x video scaler

This hardware takes a live interlaced video picture and shows it on an LCD at
twice the resolution. It does not use plain bilinear interpolation everywhere.
Instead, it looks at every 4x4 neighbourhood of the picture and decides how a
human viewer would see it:

- **Visible, simple edge:** new pixels are computed along the edge direction,
  with a set of weights chosen by that direction. This keeps edges sharp and
  free of staircase effects.
- **Anything else** (flat area, texture, noise): cheap bilinear interpolation
  is used, because a viewer would not see a difference there.

The decision uses three crisp versions of fuzzy measures: visibility,
structure and complexity. The edge direction comes from Sobel gradients and a
small CORDIC arctangent.

The default configuration follows the published FPGA design:

| Item | Value |
|---|---|
| Capture window | 161 x 121 pixels from an NTSC ITU-R BT.656 stream (27 MHz) |
| Output image | 321 x 241 pixels, scaled at a 95.73 MHz system clock |
| Processing time | 326 371 clocks (3.41 ms) per frame |
| Display | 320 x 240 LCD on an 18.42 MHz dot clock |

Everything is luminance only (8-bit Y).

```
 itu_data ─► itu656_decoder ─► capture_addr_gen ─► frame_buffer (in, 161x121)
 (clk_video)                                              │ clk_sys
                                                          ▼
                        interp_circuit ◄──── win ──── dataflow_ctrl ───► frame_buffer (out, 321x241)
                        (fuzzy_decision,                                         │ clk_lcd
                         angle_eval, weight_table,                               ▼
                         bilinear / edge_adaptive)                        lcd_timing_gen ─► HD VD DEN DIN
```

## Sliding block and window

The picture is scaled by 2 in each direction:

- Every original pixel O lands on an even output position (2x, 2y).
- Each anchor pixel O(1,1) gets three new pixels: P(1,0) to its right, P(0,-1)
  below it, and P(1,-1) diagonally below-right.

All three are computed from the 4x4 *sliding block* O(0..3, 0..3) around the
anchor, with `i` the column and `j` the row.

The Sobel operator and the complexity measure need the 3x3 neighbourhood of
every block pixel. So the engine holds a **6x6 window** (`win6_t`, `[row][col]`),
with `O(i,j) = win[j+1][i+1]`. The block steps one column at a time across the
image, so consecutive windows overlap in 30 of their 36 pixels.

## Data flow and timing (`dataflow_ctrl`)

One finite-state machine on `clk_sys` drives the whole scaling pass. Its
states and clock counts per visit:

| State | Clocks | Visits per frame | What happens |
|---|---|---|---|
| WAIT_FOR_START | 1 | 1 | idle until a captured frame is ready |
| LOAD_MEM_36 | 37 | 115 | first block of a row: read all 36 window pixels (36 reads plus one clock of read latency) |
| LOAD_MEM_6 | 7 | 17 825 | next block: shift the window one column left, read the 6 new right-column pixels |
| COMPUTE | 7 (`COMPUTE_CYCLES`) | 17 940 | wait for the combinational interpolation circuit |
| DATA_OUT | 3 | 17 940 | write P(1,0), P(0,-1), P(1,-1) to the output buffer |
| CHECK_FINISH | 1 | 17 940 | step to the next block or row, or finish |

There are 156 blocks per row and 115 rows, so one frame takes
1 + 115·37 + 17825·7 + 17940·(7+3+1) = **326 371 clocks**. That is 3.41 ms at
95.73 MHz, or about 293 frames/s.

**Writing originals during loads.** Each pixel read into the window is also
written to its even output position (2x, 2y) in the same pass. No separate copy
pass is needed. Pixels of the last input row and column are never the anchor
of a block, so the output ring they would fill (row 240) stays black.

**COMPUTE has no internal pipeline.** The interpolation circuit is fully
combinational, from the registered window to the three pixels. COMPUTE simply
waits `COMPUTE_CYCLES` clocks, then latches the result. The original
implementation quotes about 69–70 ns for this path, which is 7 clocks at
10.446 ns. If your synthesis result is faster or slower, change the
parameter. The cycle count above changes by 17 940 clocks per clock of
COMPUTE.

The read port of the input buffer has one clock of latency. The controller
therefore issues an address in one clock and stores the returned byte in the
next, which is where the "+1" in 37 and 7 comes from.

## Fuzzy decision: bilinear or edge-adaptive (`fuzzy_decision`)

The algorithm was designed with fuzzy membership functions. The hardware turns
each of the three variables into one crisp bit, with integer arithmetic only:

- **Visibility degree, VD (`vd_module`).** Contrast is the block's max − min.
  The block counts as visible when the contrast exceeds a fixed visibility
  threshold (`VIS_TH`). The eye's visibility threshold depends on background
  luminance. Over mid-grey backgrounds it lies between about 3 and 4.5 grey
  levels, so the default `VIS_TH = 4` is a single fixed value from that range.
- **Structure degree, SD (`sd_module`).** SD = |max + min − 2·mean| / (max − min).
  SD is near 0 for a two-level edge and near 1 for an isolated outlier
  (noise). Only the question "SD ≥ 0.5?" matters, so the hardware avoids the
  divider and compares (max − min) >> 1 with the 8-bit numerator. `sd_big` is
  true when the half-denominator is *not* larger than the numerator.
- **Complexity degree, CD (`cd_module`).**
  1. Each pixel of the window is binarised against the block mean:
     1 if pixel ≥ mean.
  2. For each of the 16 block pixels, count its 4-neighbours that differ from
     it. The neighbours come from the outer window ring at the block border.
  3. CD is the sum of the 16 counts, 0..64.
  
  A straight edge gives a small CD and a texture gives a large one. The block
  counts as simple when CD ≤ `CD_TH` (default 11, where the "small" and
  "medium" fuzzy sets of the original algorithm cross).

  One consequence is worth knowing. A horizontal or vertical edge through a
  block gives CD = 4 to 8, a shallow slope a little more, and a
  checkerboard texture 30 or more. But a clean 45° staircase gives CD = 14,
  which is "medium", so such blocks are interpolated bilinearly. Diagonal
  edges still get edge-adaptive treatment in blocks that they only clip at a
  corner. Raising `CD_TH` to 15 ("not big") includes them, at the risk of
  treating fine textures as edges.

The rule is **edge-adaptive (AA) iff VD positive, SD not big and CD small**.
Everything else is bilinear (BL). In fuzzy terms, this keeps the rule "visible,
structured, simple → edge". It sends the other cases to bilinear: smooth areas
(VD negative), noise (SD big) and texture (CD medium or big).

Two more details:

- The mean is the 16-pixel sum shifted right by 4 (truncated).
- `interp_circuit` adds one more condition: AA also needs a usable edge
  direction (next section). If all 16 gradients of a block are zero, the
  block uses bilinear.

## Edge direction: Sobel, CORDIC and the main angle (`angle_eval`)

For each of the 16 block pixels, two 3x3 Sobel sums give the gradients Dx and
Dy. Both are signed 11-bit values, ±1020. Their angle
A = −(180/π)·atan(Dy/Dx) is measured without a divider or a lookup table, by a
**5-iteration vectoring CORDIC** (`cordic_atan`). One CORDIC is instantiated
per pixel, 16 in parallel, all combinational.

The CORDIC works in three steps:

1. **Pre-rotation** puts the vector in the right half-plane:
   - Dx ≥ 0: unchanged, z0 = 0°.
   - Dx < 0, Dy ≥ 0: rotated by −90°, z0 = +90°.
   - Dx < 0, Dy < 0: rotated by +90°, z0 = −90°.
2. **Five micro-rotations** by ±atan(2^-i) drive y towards zero, adding the
   rotated angle to z.
3. **Fixed-point format.** x and y carry 4 fraction bits. z is in 1/16 degree,
   with the table 45°, 26.57°, 14.04°, 7.13° and 3.58° stored as 720, 425,
   225, 114 and 57.

The worst-case angle error is about 3.6°. That is well inside half a sector
(11.25°), so it only matters for angles close to a sector boundary.

**Quantisation.** The angle is negated (the minus sign in A) and rounded to
the nearest multiple of 22.5°. It is then taken modulo 180°, because an edge
at 10° and one at 190° are the same edge. This gives a sector k = 0..7:

```
k = floor((A + 11.25°) / 22.5°) mod 8
  = floor((−z + 180 + 8·360) / 360) mod 8      with z in 1/16 degree
```

The 8·360 offset only keeps the dividend positive.

**Main angle (`main_angle_decision`).**

- A pixel with Dx = Dy = 0 has no direction. Its angle is marked invalid and
  discarded.
- The valid angles vote in an 8-bin histogram. The fullest bin is the block's
  edge direction, and ties go to the lower sector number.
- A direction counts only with more than `VOTE_TH` votes. The default of 0
  means any valid vote is enough.

## Edge-adaptive and bilinear pixels

**Edge-adaptive (`edge_adaptive_interp`, `weight_table`).** Each new pixel is
a 16-tap weighted sum of the block:

`P = clip(floor(Σ w[sector][pos][t] · O_t / 256), 0, 255)`

with t = 4·j + i.

- There are 8 sectors × 3 positions × 16 taps = 384 weights.
- Each weight is signed 10-bit with a resolution of 1/256, a range of −2..+2.
  The 1/256 resolution is what the original design found good enough: at most
  5 grey levels off the floating-point result.
- In the original design, the weights were trained offline with a
  back-propagation network. They are not part of this RTL.
- `weight_table` is a register file loaded through `wt_we`/`wt_waddr`/`wt_wdata`.
  The write address is `{sector[2:0], position[1:0], tap[3:0]}`, and
  position 3 is ignored.
- After reset, every sector holds the bilinear kernel. An unloaded scaler
  therefore produces bilinear output everywhere.

**Bilinear (`bilinear_interp`).** Adds and shifts, truncating:

- P(1,0) = (O11 + O21) / 2
- P(0,-1) = (O11 + O12) / 2
- P(1,-1) = (O11 + O21 + O12 + O22) / 4

## Video capture (`itu656_decoder`, `capture_addr_gen`)

**Decoder.** The 8-bit BT.656 stream enters a 4-byte shift window, newest byte
in [7:0]. When the three older bytes are FF 00 00, the newest one is a timing
reference, and its bits 6..4 are F (field), V (vertical blanking) and H
(0 = SAV, 1 = EAV). A three-state machine follows the codes:

- BLANK → ODD on SAV with F,V = 0,0.
- BLANK → EVEN on SAV with F,V = 1,0.
- A field state stays on its own SAV/EAV codes. Any other code returns it to
  BLANK.

**Capture.** The capture stage counts Y samples after each SAV (`count_h`).
The bytes come as Cb Y Cr Y, and a 2-bit phase counter picks phases 1 and 3.
It also counts active lines in the field (`count_v`).

Samples inside the window set by `start_x`/`start_y` are written interleaved:

- odd-field line n → buffer row 2n;
- even-field line n → row 2n+1.

So address = (count_v − start_y)·2·161 + (count_h − start_x), plus 161 for
the even field.

**Handshake between the clock domains.** The capture handshake is this design's
own:

1. A frame is captured only if the scaler is idle when its odd field starts
   (`arm`, from `busy` passed through a two-flop synchroniser).
2. The end of the even field produces `frame_done`. A toggle synchroniser
   carries it to `clk_sys` as the start pulse.
3. Frames that start while the scaler is busy are skipped, so the input
   buffer never changes under the reader.

With NTSC at 29.97 frames/s and 3.4 ms of processing, one frame in two is
scaled.

## Frame buffers (`frame_buffer`)

There are two simple dual-clock memories:

- **Input buffer:** 161 × 121 bytes (155 848 bits), written on `clk_video`
  and read on `clk_sys`.
- **Output buffer:** 321 × 241 bytes (618 888 bits), written on `clk_sys` and
  read on `clk_lcd`.

Both have a registered read with one clock of latency, so they map onto FPGA
block RAM. The memory content is zeroed at start-up.

## LCD output (`lcd_timing_gen`)

The generator counts DCLK in a 1171 × 262 frame. Each line has 152 blanking
clocks and 960 data clocks, and each frame has 14 blanking lines and 240
active lines. HD and VD are one-clock, active-low pulses.

- The panel takes R, G, B serially, so each of the 320 pixels of a line
  occupies 3 DCLK, and the grey level is sent as R = G = B.
- The read address leads the data by one DCLK to cover the buffer's latency.
- HD, VD and DEN are delayed to match.
- The top holds the generator in reset until the first image is finished.
  A sticky flag is set on the scaler's `frame_done` and passed to DCLK
  through a two-flop synchroniser. Before that the panel sees no sync and no
  data, so it never shows an empty buffer.

## Parameters of the top (`video_scaler_top`)

| Parameter | Default | Meaning |
|---|---|---|
| `IN_W`, `IN_H` | 161, 121 | capture window; the output is (2·IN_W−1) × (2·IN_H−1) |
| `BLOCK_COLS`, `BLOCK_ROWS` | 156, 115 | sliding-block sweep (must fit in IN_W−5 × IN_H−5) |
| `COMPUTE_CYCLES` | 7 | clocks given to the combinational interpolation |
| `VIS_TH` | 4 | visibility threshold on max − min |
| `CD_TH` | 11 | largest CD still counted as "simple" |
| `VOTE_TH` | 0 | votes a main angle must exceed |
| `H_TOTAL`, `H_BLANK`, `H_VALID` | 1171, 152, 960 | LCD line timing in DCLK |
| `V_TOTAL`, `V_BLANK`, `V_VALID` | 262, 14, 240 | LCD frame timing in lines |

The observation outputs `blk_done`, `blk_mode` and `blk_sector` report, for
every block, which interpolator was used and in which direction.

## Size

A generic Yosys synthesis of the top at its default parameters gives:

- **Memory:** 774 776 bits. That is 155 848 + 618 888 for the two frame
  buffers. The original FPGA build reports 775 760 bits for the same two
  buffers plus a little more.
- **Flip-flops:** about 4 350 bits. Of these, 3 840 are the loadable weight
  table, which a build with fixed, trained weights would turn into
  constants. The original build has 2 089 registers.
- **Logic:** about 2 650 generic cells. Most are the 16 Sobel + CORDIC lanes,
  the histogram and the 48 multiply-accumulates of the edge-adaptive
  interpolator. The original reports about 19 900 logic elements and 52 9-bit
  multipliers on a Cyclone II. The cell counts of the two tools are not
  comparable one to one.

## Verification

Each module has a self-checking testbench in `tb/`, and `tb/scaler_ref_pkg.sv`
holds the reference functions. Each testbench prints
`TB_RESULT checks=N failures=M`. The highlights:

- **Arithmetic blocks** (VD, SD, CD, bilinear, weighted sum, CORDIC):
  - checked against floating-point or plain integer models over tens of
    thousands of random and corner-case inputs;
  - the CORDIC additionally against `$atan2` within 4°.
- **Angle evaluation and interpolation circuit:** random and synthetic edge,
  texture and noise windows, compared with an independent sector and fuzzy
  model. Blocks whose angle falls within the CORDIC error of a sector
  boundary are not judged on the sector.
- **Decoder and capture:** generated BT.656 lines and fields, compared with a
  clocked reference model. The capture buffer contents are checked for both
  fields.
- **Data-flow controller:** a small image checked pixel by pixel. The frame's
  clock count is checked against the formula above.
- **LCD generator:** every HD/VD/DEN edge and data byte over a full frame at
  the default timing.
- **Top (`tb_video_scaler_top`), at the default parameters:**
  - sends a complete 525-line NTSC frame, then a second, inverted frame that
    must be skipped because the scaler is still busy;
  - checks the mode and sector of all 17 940 blocks and the 326 371-clock
    processing time;
  - compares a whole LCD field, pixel by pixel, with a reference image;
  - counts each mechanism and fails if one never occurs: odd and even fields,
    a skipped frame, capture, LOAD_MEM_36, LOAD_MEM_6, bilinear and
    edge-adaptive blocks, discarded zero gradients, weight writes, an LCD
    field, and the display held idle until the first image is done.

  It runs in about 15 s.
- **Two more end-to-end runs, with the same stimulus and checks**
  (generated from the top testbench):
  - `tb_scaler_sys27`: the system clock lowered to 27 MHz with
    `COMPUTE_CYCLES = 2`. It takes 236 671 clocks, 8.77 ms, 114 frames/s.
  - `tb_scaler_ntsc`: an NTSC-size output. The capture window is 361 × 241
    and the output 721 × 481, with 356 × 236 blocks. It takes
    1 519 369 clocks, 15.9 ms, 63 frames/s at 95.73 MHz. The unchanged LCD
    shows the top-left 320 × 240.

To simulate with Verilator 5, for example the top:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/scaler_pkg.sv tb/scaler_ref_pkg.sv tb/tb_video_scaler_top.sv \
  --top-module tb_video_scaler_top -o sim
./obj_dir/sim
```

For other testbenches, replace the last file and the top-module name.

## Departures from the original design, and limits

- **Weights:** the trained edge-adaptive weights are not available. The table
  is loadable and resets to bilinear weights, so edge-adaptive quality
  depends on the weights you load.
- **Thresholds:** the original gives no numbers for the fixed visibility
  threshold, the CD "small" limit or the minimum vote count. The defaults
  above are reasoned choices; see each module's header.
- **Block count:** the original performance table counts 17 980 data-out
  steps, while 115 + 17 825 loads give 17 940 blocks. This design processes
  17 940 blocks (156 × 115).
- **Window size:** the capture window is described as 160 × 120, but the buffer
  size is 161 × 121; the latter is used.
- **SD bits:** the SD comparison uses the full 8-bit numerator, not only its
  low 7 bits, so numerators of 128 and above are also handled correctly.
- **Compute time:** it is a parameter (`COMPUTE_CYCLES`) rather than a measured
  combinational delay.
- **Clock-domain handshake:** the arm/skip handshake is this design's own.
- **Later frames:** the display waits for the first image only. After that
  it runs on and shows the output buffer as it is, so a frame being written
  appears top to bottom, with no double buffering.
- **Not built:**
  - the colour path (Cb/Cr capture and YCbCr→RGB conversion);
  - the clock PLLs (clocks are ports);
  - the external video decoder chip and the LCD panel (their signals are the
    top's `itu_data` and `lcd_*` ports);
  - the proposed extensions: other scale factors, pipelining, I2C set-up of
    the decoder.
- **Larger pictures:** NTSC-size output (720 × 480) needs the parameters
  `IN_W = 361`, `IN_H = 241`, `BLOCK_COLS = 356` and `BLOCK_ROWS = 236`. The
  buffers then hold 87 001 + 346 801 bytes. This configuration is tested by
  `tb_scaler_ntsc`, but the LCD timing still shows only 320 × 240 of it.
  At 63 frames/s it is slightly slower than the original's claim of more than
  66, because COMPUTE takes 7 whole clocks rather than about 70 ns.
