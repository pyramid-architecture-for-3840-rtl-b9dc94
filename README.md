# PTISP: a pyramid, tile-based image pipeline for 3840 x 2160 video

A camera pipeline turns the 10-bit Bayer mosaic of an image sensor into YUV for a
video encoder. Three of its stages need a neighbourhood of pixels: noise
reduction, colour interpolation and edge enhancement, each with a 7 x 5 window.
A raster-scan pipeline keeps a window's worth of whole image lines on chip for
every such stage (12 lines of 3840 pixels here). The memory grows with the image
width, and the encoder still needs the picture reordered into 16 x 16 blocks.

This design works on tiles instead. It reads the raw frame from external memory
one tile at a time and runs the whole pipeline on that tile. It delivers 16 x 16
YUV 4:4:4 blocks in the order an encoder wants them. The on-chip memory is a
small tile buffer per filter, and its size does not depend on the image width.
Neighbouring tiles overlap, because each filter needs a border around its
output. Two schemes keep that overlap from being computed twice:

- **Immediate result reuse (IRR).** Partial results are kept and used again.
  Horizontally they stay in the tile buffer. Vertically they go out to external
  memory and come back.
- **Vertical snake scan.** The filter window moves down one tile column and up
  the next, so it almost never has to be reloaded.

The RTL is SystemVerilog (IEEE 1800-2017) and can be synthesized. Everything
has a self-checking testbench. One of these runs a complete 3840 x 2160 frame.

## The pyramid of floors

Each 2-D filter uses up a border of m = 6 columns and n = 4 rows of its input:
3 columns on each side and 2 rows on each side. A 16 x 16 output tile therefore
grows by (6, 4) per filter on the way down. These are the floors:

| floor | holds | frame size (QFHD) | produced by |
|---|---|---|---|
| 1 | raw Bayer, 10 bit | 3858 x 2172 | external memory → black level → lens shading |
| 2 | Bayer after NR, 8 bit after gamma | 3852 x 2168 | TPE f3 → white balance → gamma |
| 3 | RGB → YUV, 24 bit | 3846 x 2164 | TPE f6 → colour correction → colour conversion |
| 4 | YUV output | 3840 x 2160 | TPE f8 |

The stages run in this order:

black level (f1) → lens shading (f2) → **noise reduction (f3)** → white balance
(f4) → gamma (f5) → **colour interpolation (f6)** → colour correction →
RGB-to-YUV (f7) → **edge enhancement (f8)**

- The bold stages are *tile processing elements* (TPEs), one per 2-D filter.
- The others are *pixel processing elements* (PPEs): one-pixel-per-cycle
  pipelines.

Every element moves one pixel per cycle. They are linked by valid/ready
streams. Each pixel carries a side band (`pix_meta_t`) with these fields:

- `sof`: start of frame;
- `sor`: start of tile row;
- `sot`: start of tile;
- its x, y position on the floor-1 (source) grid.

Lens shading uses the position for the radius. White balance and demosaicing
use it for the Bayer phase (RGGB: red at even x and even y).

**Tile shapes.** A tile on floor j is 16 + (4-j)·6 columns wide if it is the
first of its row, and 16 wide otherwise. The wide first tile brings in the left
border. Later tiles reuse the last 6 columns of their left neighbour from the
tile buffer.

The first tile row is 16 + (4-j)·4 rows high. Later tile rows are 20 rows high
on every floor:

- the top 4 rows are the bottom 4 rows of the tile row above, read back from
  external memory;
- the other 16 rows are new.

So the source is read exactly once. Floor 1 sees:

- 34 x 28 pixels for the top-left tile;
- 16 x 28 for the rest of the top row;
- 34 x 16 (+4 reloaded rows) for the rest of the left column;
- 16 x 16 (+4) elsewhere.

## Tile processing element (`tpe`)

The TPE is the heart of the design and the hardest part to follow. One module
serves all three filters. It is specialised by `KIND` (the NR, CI or EE core),
`FLOOR`, and the input and output widths.

### Tile buffer (`tile_buffer`)

The buffer holds 40 columns x 28 rows. It is split into 8 two-port banks.
Column c lives in bank c mod 8 and in strip c / 8, so there are 5 strips of 8
columns. Each bank holds 5 strips x 28 rows = 140 words.

- A write stores one pixel.
- A read returns one row of 8 consecutive columns, starting at any column and
  wrapping at 40. Each bank computes its own address. The registered outputs
  are then rotated so that lane j is column `rcol + j`.

The column space is a circular buffer. Logical column numbers increase for the
whole tile row, and the physical column is the logical one modulo 40.

### Loading

Pixels arrive in vertical snake order from the floor below:

- even columns come top to bottom;
- odd columns come bottom to top.

For tile rows after the first, a second port (SEQI) delivers the 4 reloaded top
rows of each column. Only one of the two is written per cycle.

For every column it loads, the TPE sends that column's bottom 4 rows out on
IRRO, tagged with the x position and the row index k. The sequencer stores them
for the next tile row.

Loading of the next tile runs at the same time as filtering of the current
one. The only limit is a hazard rule: logical column L may be written only when
L < (oldest column the filter still needs) + 40. The loader stops when the
filter falls behind, and restarts when it catches up.

### Filtering: active and shadow registers

The filter sees a 7 x 5 window of *active* registers. An eighth column of 5
*shadow* registers sits beside it. Each buffer read brings one row of 8 columns.

1. **Column 0.** Rows 0 .. h-1 are read going down. Each read shifts the
   8-wide register array up by one row. The first output appears after 5 reads.
2. **Moving to the next column.** The shadow column already holds the next
   column's 5 edge rows, because the previous scan read 8 columns wide. One
   left shift makes the window ready at once.
3. **Odd columns.** These scan upward. Each read brings the row above, and the
   array shifts down.
4. **Even columns.** These scan downward again.

After the first column, every cycle yields one output, including the column
change. A tile of 16 x 16 outputs therefore leaves in 256 consecutive cycles.
The unit testbench checks this count.

### Filter cores

Each core has 3 pipeline stages and all stages advance together.

- **`nr_core`** takes the nine same-colour pixels (rows 0, 2, 4 and columns
  1, 3, 5 of the window).
  - The *impulse detector* fires if the centre differs from the mean of its
    eight neighbours by more than `thr`. The core then outputs the median of
    the nine.
  - Otherwise it outputs a bilateral average, sum(w·x)/sum(w). The range
    weight is 64 >> (|x_j - x_c| >> rs), and 0 once the shift reaches 7. The
    spatial weight is 64, 64 >> ss or 64 >> 2ss for the centre, the straight
    neighbours and the diagonal neighbours.
  - The result is rounded by a divider.
- **`ci_core`** does bilinear demosaicing on the centre 3 x 3, chosen by the
  Bayer phase.
  - At R or B sites: G is the mean of the 4 straight neighbours; the other
    colour is the mean of the 4 diagonals.
  - At G sites: the mean of W/E and the mean of N/S.
  - The output is {R, G, B}.
- **`ee_core`** computes the luma high pass z = Y - blur.
  - The blur is a separable binomial 7 x 5 kernel, [1 6 15 20 15 6 1] ⊗
    [1 4 6 4 1] / 1024.
  - Where |z| > thr, Y becomes Y + alpha·z/16, rounded and saturated.
  - U and V pass through.

## Sequencer, memory layout and the AHB ports

`sequencer` walks the source frame tile by tile in snake order. For each pixel
it issues a read of word `SRC_BASE + y·(W+18) + x`, one pixel per 32-bit word,
and tags the pixel with its side band.

For TPE j it keeps two banks of 4 rows x (W + (3-j)·6) words at `IRR_BASEj`:

- Tile row r is written into bank r mod 2.
- Tile row r+1 reads it back, column by column in tile order.
- The read-back of row r waits until all of row r-1 has been stored.

All traffic shares one request port, in this priority order: IRR writes, then
IRR reads, then source reads. Each read stream has an 8-entry return FIFO and
never issues more reads than it has room for.

`ahb_master` issues these requests as single NONSEQ word transfers on a
pipelined AHB-Lite bus. This gives one transfer per cycle without wait states.

Memory traffic per QFHD frame:

- 8,379,576 source reads;
- 6,240,240 IRR writes;
- 6,194,016 IRR reads.

That is 20.8 M transfers, and the full-size testbench measured 20,814,455
cycles per frame.

### Register map (`ahb_slave_regs`, 32-bit AHB-Lite slave, zero wait states)

| offset | name | fields (reset) |
|---|---|---|
| 0x00 | CTRL | [0] start (write 1) |
| 0x04 | STATUS | [0] busy |
| 0x08 | SRC_BASE | word address of the raw frame |
| 0x0C / 0x10 / 0x14 | IRR_BASE1..3 | word address of each TPE's IRR store, 2·4·(W+(3-j)·6) words |
| 0x18 | BLC | [9:0] black level (64) |
| 0x1C | LSC_CENTER | [11:0] x (1929), [27:16] y (1086) |
| 0x20 | LSC_K | [15:0] gain slope (0): gain = 1 + k·r²/2^24, max 4 |
| 0x24 / 0x28 / 0x2C | WB_R/G/B | [9:0] gains, 256 = 1.0 |
| 0x30 | NR | [9:0] impulse threshold (64), [18:16] rs (3), [25:24] ss (1) |
| 0x34 | EE | [7:0] threshold (4), [15:8] gain, 16 = 1.0 (16) |
| 0x38 | FRAME | [7:0] output tiles across, [23:16] tile rows (0 = the build maximum `IMG_W/16` x `IMG_H/16`) |
| 0x3C .. 0x5C | CCM | [11:0] signed colour-matrix coefficient, 256 = 1.0; nine words, row R (inputs R, G, B), then row G, then row B (identity) |

To start a frame:

1. Write the bases and settings.
2. Write CTRL = 1.
3. Wait for STATUS.busy to go low and for the last output tile.

## Pixel stages

| module | function | latency |
|---|---|---|
| `ppe_blc` | y = max(x - blc, 0) | 1 |
| `ppe_lsc` | gain = min(256 + (r²·k >> 16), 1023); y = sat10((x·gain + 128) >> 8) | 2 |
| `ppe_wb` | per-phase gain, y = sat10((x·g + 128) >> 8) | 1 |
| `ppe_gamma` | 10 → 8 bit, 255·(x/1024)^0.45 as 32 linear segments | 1 |
| `ppe_ccm` | 3x3 matrix, out_i = clip8((Σ m_ij·in_j + 128) >> 8), signed 12-bit m | 1 |
| `ppe_csc` | BT.601 full range: Y = (77R + 150G + 29B + 128) >> 8, U/V offset 128 | 1 |

`ppe_gamma` computes its knot table at elaboration time.

## Where this design departs from the original architecture

- **One pixel per memory word, no bursts.** The original packs 10-bit and
  8-bit pixels and writes the vertical reuse data of all three TPEs as one
  burst per tile. Here every pixel is a 32-bit single transfer. The datapath
  keeps up with 3840 x 2160 at 30 frames/s at 266 MHz, because that needs
  249 Mpixel/s. The memory port does not: it needs 624 M transfers/s and
  reaches about 12.8 frames/s at 266 MHz (1920 x 1088: about 50 frames/s,
  not 120). A wider or bursting memory path would be the next step.
- **Colour interpolation is bilinear.** The original uses an eight-direction,
  edge-adaptive algorithm that is only cited, not given.
- **Colour correction is placed by this design.** It is named once among the
  pixel stages but is missing from the pipeline's list of eight functions, so
  its position is not given. Here it sits between colour interpolation and
  RGB-to-YUV, where the pixels are RGB. Its reset value is the identity, so by
  default the pipeline computes exactly the eight listed functions.
- **The bilateral weights are powers of two** rather than exponentials.
- **The edge test uses |z|**, so dark and bright edges are both sharpened.
- **The tile buffer has 8 banks.** The original text mentions both "t+2" and
  eight SRAMs. Eight, one per column of an 8-column strip, is what the memory
  organisation needs.
- **The leftmost tile of a row is not processed separately.** Its loading also
  overlaps the filtering of the previous tile. The column hazard rule makes
  this safe.
- **Frames are whole tiles.** `IMG_W` and `IMG_H` (multiples of 16) set the
  largest frame at build time. The FRAME register picks any smaller number of
  tiles at run time. So 1920 x 1080 runs as 1920 x 1088, with 8 padded rows
  for the encoder to crop.
- **The register map, reset values, handshakes and the side band** are this
  design's own choices.
- **No HRESP error handling.**

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_ppe_blc`, `tb_ppe_lsc`, `tb_ppe_wb`, `tb_ppe_gamma`, `tb_ppe_ccm`, `tb_ppe_csc` | random pixels, random gaps and back-pressure against an integer model; one pixel per cycle and fixed latency at full rate |
| `tb_nr_core`, `tb_ci_core`, `tb_ee_core` | random windows with the enable dropped at random; latency of 3 and one result per cycle; both outcomes of each core's decision |
| `tb_tile_buffer` | random writes and 8-column reads against an array model, including wrap-around and unaligned reads |
| `tb_tpe` | EE TPE on 3 x 2 tiles: every pixel, order, positions, IRRO rows and SEQI use; 256 consecutive cycles per tile at full rate |
| `tb_sequencer` | source order and flags, IRR store and read-back for three TPE models, transfer counts, one transfer per cycle unstalled |
| `tb_ahb_slave_regs`, `tb_ahb_master` | AHB-Lite protocol with wait states and back-to-back transfers, register model, in-order read data |
| `tb_ptisp_top` | 64 x 48 frame end to end: AHB host, memory with 20% wait states, 25% output stalls; every pixel against a frame-based model of all nine stages, with a non-identity colour matrix; every mechanism counted |
| `tb_ptisp_full` | one full 3840 x 2160 frame at default parameters: flat field with per-colour gains, every pixel, tile order, transfer counts, frame time (about 40 s in Verilator) |
| `tb_ptisp_sizes` | the same build run at 640 x 480, 1280 x 720 and 1920 x 1088 through the FRAME register, back to back |

`tb_ptisp_top` requires every mechanism to occur at least once:

- leftmost, topmost and inner tiles;
- median and bilateral results;
- sharpened and unchanged luma;
- IRR stores and read-backs;
- bus wait states;
- output stalls;
- TPE load stalls.

To simulate with Verilator 5:

```
verilator --binary --timing -Irtl rtl/ptisp_pkg.sv $(ls rtl/*.sv | grep -v ptisp_pkg) \
    tb/tb_ptisp_top.sv --top-module tb_ptisp_top
./obj_dir/Vtb_ptisp_top
```

Use the same command for any other testbench. `rtl/ptisp_pkg.sv` must come
first. The testbenches use `$urandom`; no constraint solver is needed.

## Files

- `rtl/ptisp_pkg.sv`: constants (m, n, tile size, buffer geometry), the side
  band and settings structs, the Bayer-phase helper.
- `rtl/ptisp_top.sv`: the whole pipeline.
- `rtl/tpe.sv`, `rtl/tile_buffer.sv`, `rtl/nr_core.sv`, `rtl/ci_core.sv`,
  `rtl/ee_core.sv`: the tile processing elements.
- `rtl/ppe_*.sv`: the pixel stages.
- `rtl/sequencer.sv`, `rtl/ahb_master.sv`, `rtl/ahb_slave_regs.sv`,
  `rtl/stream_fifo.sv`: memory traffic and control.
- `tb/`: one testbench per module, plus the full-size frame test
  (`tb_ptisp_full`) and the frame-size test (`tb_ptisp_sizes`).
