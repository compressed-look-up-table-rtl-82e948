# Compressed look-up-table stereo rectification (CLUT-R)

Before two camera images can be stereo-matched, each image has to be
*rectified*: lens distortion and the misalignment of the cameras are removed so
that matching pixels sit in the same row of both images. The usual hardware way
is a look-up table that gives, for every pixel of the rectified image, where to
fetch it in the camera image. At 1024x768 such tables take megabytes and end up
in external DRAM.

This design follows the compressed look-up-table rectification described in
*"Compressed Look-Up-Table based Real-Time Rectification Hardware"* (Akin, Baz,
Gaemperle, Schmid, Leblebici). It turns the problem around and makes the table
small enough for on-chip block RAM:

* It uses **forward mapping**: each incoming camera pixel is sent to one
  integer target position in the rectified image. It is not interpolated from
  fractional source positions. No input line buffer is needed: pixels go
  straight from the camera interface to the line buffers of the stereo matcher.
* Integer target coordinates change very slowly. Along a source row the target
  row Y_rec stays constant for long runs, then steps by +1 or -1. Down a source
  column the target column X_rec behaves the same way. So the table stores only
  the **breakpoints**, the positions where the target steps, plus a 3-bit
  behaviour code.
* Forward mapping can leave holes in the rectified image. Offline, such holes
  are filled by marking the source pixel that lands just above the hole as
  **double targeted (DT)**. The hardware raises a `dt` flag with that pixel.
  The line-buffer controller then writes it at (Y_rec, X_rec) and also one row
  below.

At 1024x768, one camera needs 768x24 words of Y table and 1024x20 words of X
table, 18 bits each (about 700 kbit), plus a 1024x15-bit state memory. That is
22.5 block RAMs of 18 kbit, against megabytes for an uncompressed map. The
decompressor consumes one pixel per clock and never stalls. At 273 MHz that
gives 273e6 / (1024*768) = 347 frames/s.

## Top level

`clutr_stereo_top` holds two identical `rect_module`s, one for the left camera
and one for the right. Both run on one clock, so the cameras are assumed to be
synchronised. Every port is a 2-element array or a 2-bit vector, index 0 = left.

Each `rect_module` contains:

```
            +--> y_decomp  <--> forwt_y_rom   (768 x 24 x 18 bit, 2 read ports)  --> y_rec, dt
 y_ori,  ---+--> x_decomp  <--> forwt_x_rom   (1024 x 20 x 18 bit)               --> x_rec
 x_ori,     |       ^-----> x_last_data_ram   (1024 x 15 bit)
 ori_pix ---+--> pixel_delay (6 registers)                                        --> rec_pix
```

Interface of one module (the top duplicates it per camera):

| signal | dir | width | meaning |
|---|---|---|---|
| `in_valid`, `y_ori`, `x_ori`, `ori_pix` | in | 1, 10, 10, PIX_W | source pixel in raster order |
| `out_valid`, `y_rec`, `x_rec`, `rec_pix`, `dt` | out | 1, 10, 10, PIX_W, 1 | target position of that pixel, its value, double-target flag |
| `tbl_we`, `tbl_sel`, `tbl_addr`, `tbl_data` | in | 1, 1, TBL_AW, 18 | table loading: `tbl_sel` 0 = Y table, 1 = X table |

Timing:

* Each result appears exactly **6 clocks** after its pixel.
* `in_valid` may be high on every clock, also across the end of a row. It may
  also drop for any number of clocks.
* There is no back-pressure.
* Pixels must arrive in raster order with every coordinate present. A new row
  is recognised by `x_ori == 0`, a new frame by `y_ori == 0`.
* Rows must be at least 5 pixels wide (the 5x4 example runs with rows back to back).

Parameters (defaults = the main configuration):

* `IMG_W` = 1024, `IMG_H` = 768.
* `BP_Y` = 24 words per row, `BP_X` = 20 words per column.
* `PIX_W` = 8 (an assumption: the pixel width is not given).
* `TBL_AW`, derived from the table sizes.

Coordinates are 10 bits wide, so images can be up to 1024 pixels on each side.

## The compressed tables

Every table word is 18 bits, `{dt, dec, inc, loc[14:0]}`:

| bits 17..15 | Y table (one group of `BP_Y` words per source row) | X table (one group of `BP_X` words per source column) |
|---|---|---|
| `000` | word 0: initialisation, `loc` = target row of column 0; later: dummy edge word | word 0: initialisation, `loc` = target column of row 0; later: dummy edge word |
| `010` | at column `loc`, Y_rec -= 1 | at row `loc`, X_rec -= 1 |
| `001` | at column `loc`, Y_rec += 1 | at row `loc`, X_rec += 1 |
| `100` | at column `loc`, pixel is DT, Y_rec unchanged (word 0: DT on column 0) | - |
| `110` / `101` | DT and -1 / DT and +1 | - |

Rules for building the tables:

* Row `r` of the Y table starts at address `r*BP_Y`. Column `c` of the X table
  starts at `c*BP_X`.
* After word 0 come the breakpoints, in increasing position.
* After the last breakpoint comes a dummy word `{000, IMG_W}` (Y table) or
  `{000, IMG_H}` (X table), which is never matched. The remaining words of the
  group may hold anything.
* A row can therefore hold `BP_Y-2` = 22 breakpoints and a column `BP_X-2` = 18.
  The reference calibration needed at most 21 and 17.
* Breakpoints may sit in adjacent columns or rows.

Building a table from an integer forward map `Ymap(y,x)`, `Xmap(y,x)`,
`DT(y,x)`:

* Y word 0 of row `y`: `{DT(y,0),0,0,Ymap(y,0)}`.
* Y breakpoint at every `x > 0` where `Ymap(y,x) != Ymap(y,x-1)` or
  `DT(y,x) = 1`:
  `{DT(y,x), Ymap(y,x) < Ymap(y,x-1), Ymap(y,x) > Ymap(y,x-1), x}`.
* X word 0 of column `x`: `{000, Xmap(0,x)}`.
* X breakpoint at every `y > 0` where `Xmap(y,x) != Xmap(y-1,x)`:
  `{0, Xmap(y,x) < Xmap(y-1,x), Xmap(y,x) > Xmap(y-1,x), y}`.

Steps must be exactly +1 or -1. Producing the map itself (calibration,
extracting the integer forward map, filling unmapped pixels and holes) is
offline software and is not part of this RTL. The tables are loaded through
the `tbl_*` port before pixels are streamed. On an FPGA they could just as well
be preset in the block RAM contents.

## Y decompression (`y_decomp`)

This is the part with real timing pressure. Pixels of a row come one per clock.
Each pixel must be compared with the next breakpoint of its row, and after a hit
the breakpoint after it is needed on the very next clock. The table is a
synchronous RAM with one clock of read latency.

* **Row preload.** When a pixel with `x_ori == 0` enters, port A of the Y table
  reads words 0, 1 and 2 of that row on three consecutive clocks. They go into
  shadow registers. Meanwhile the pixel crosses a 4-stage delay line.
* **Decode stage.** The first pixel of a row loads the `Y_rect` register from
  word 0 and takes over words 1 and 2 as *cur* (next breakpoint to meet) and
  *nxt* (the one after). Each later pixel compares `x_ori` with `cur.loc[10:0]`.
  On a hit:
  * `Y_rect` steps by -1, +1 or not at all;
  * `dt` follows bit 17;
  * *nxt* becomes *cur*;
  * port B reads the word after *nxt*.
* **Forwarding.** The word read on a hit arrives one clock later. If the next
  pixel hits again, that word goes straight from the RAM output into *cur*.
  Otherwise it is parked in *nxt*. So breakpoints in adjacent columns decode at
  full rate.
* **Back-to-back rows.** The preload for row y+1 uses port A and shadow
  registers. The decode stage may still be finishing row y with port B and the
  working registers, so nothing waits at the row boundary.

Then one register stage brings `y_rec`/`dt` to the 6-clock latency.

## X decompression (`x_decomp`)

The X table is coded per column, but a column gets only one pixel per row. The
decompressor keeps per-column state in `x_last_data_ram`:
`{next breakpoint number[14:10], last X_rec[9:0]}`. For each pixel:

1. The column's state word is read.
2. The table address `x*BP_X + k` is formed. `k` = 0 on row 0, otherwise the
   stored breakpoint number.
3. On row 0 the target comes from word 0 and `{1, target}` is written back.
   On other rows, the word's row location is compared with `y_ori`:
   * on a match, the stored target is stepped and `{k+1, new target}` is written
     back;
   * otherwise the stored target is used and nothing is written.

A column's state is written back two clocks after it is read and is read again
one row later, so there is no hazard for rows of 4 pixels or more. The RAM
needs no reset, because row 0 of each frame initialises it.

## Where this RTL departs from the published design, or goes beyond it

* **Second read port on the Y table.** The published design uses single-port
  ROMs and does not say how it handles breakpoints in adjacent columns or rows
  sent without blanking. Here the Y table has two read ports and a two-word
  lookahead, so any legal table decodes at one pixel per clock. The X table is
  single-port, as published.
* **Pipeline.** The stage boundaries are this design's own. Only the total
  latency of 6 clocks and the one-pixel-per-clock rate follow the published
  design.
* **Initialisation word.** The Y initialisation word is recognised by
  `x_ori == 0` and not by its code, because code `100` means both "DT only" and
  "initialisation with DT".
* **X comparators.** The published X-decompressor diagram shows "less-than"
  comparators whose use is not explained. This RTL uses an equality compare,
  like the Y side.
* **X mux codes.** The mux codes drawn in that diagram disagree with the
  published code table. The code table is followed.
* **Added here.** The table load port, the valid bit travelling with each pixel
  and the asynchronous active-low reset (valid and control registers only) are
  additions.
* **Not included.** The camera interfaces, the line-buffer ("BRAM")
  controllers that act on `dt`, and the stereo matcher are not part of this RTL.
  Their signals are the top-level ports.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

`clutr_tb_pkg` draws a random integer forward map and codes it into tables
using the rules above. The map's random walks use random DT flags, adjacent
breakpoints and groups filled to the last word. The testbenches compare the
hardware output with the **uncompressed** map. They also require every result
exactly 6 clocks after its pixel.

| testbench | what it runs |
|---|---|
| `tb_forwt_y_rom`, `tb_forwt_x_rom`, `tb_x_last_data_ram`, `tb_pixel_delay` | memory read/write and latency, delay |
| `tb_y_decomp`, `tb_x_decomp` | one decompressor with its table; 2 frames, back to back and with idle clocks |
| `tb_rect_module` | one module, reduced table geometry (12/10 words), 40x30 image |
| `tb_clutr_stereo_top` | both cameras, 64x48, default table geometry. Counts every mechanism (Y -1/+1, DT only, DT with step, DT on column 0, adjacent breakpoints, full rows and columns, X -1/+1, back-to-back rows, idle clocks) and fails if one never occurs |
| `tb_clutr_worked_example` | one module on a hand-worked 5x4 example: fixed tables of (position, step) pairs with 3-4 words per row/column, checked against the expected 5x4 target maps, rows back to back |
| `tb_clutr_full` | the top at its defaults: one 1024x768 frame per camera, about 20 Y breakpoints per row and 17 X per column. Checks all 1.57 M results and the frame time (786432 + 6 clocks) |

All pass. The full-size frame simulates in about a second.

Simulating with Verilator, for example the full-size test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/clutr_pkg.sv tb/clutr_tb_pkg.sv rtl/*.sv tb/tb_clutr_full.sv \
  --top-module tb_clutr_full -Mdir obj_full
./obj_full/Vtb_clutr_full
```

For another testbench, change the testbench file and `--top-module`. Each
testbench needs only the `rtl/` files its module uses.

What is not verified here:

* the clock frequency on any FPGA;
* tables produced from a real camera calibration. The tests use random maps
  that follow the same coding rules.

## Files

* `rtl/clutr_pkg.sv`: word layouts (`bp_entry_t`, `last_data_t`), widths,
  default sizes.
* `rtl/clutr_stereo_top.sv`, `rtl/rect_module.sv`: top level and one camera.
* `rtl/y_decomp.sv`, `rtl/x_decomp.sv`: the two decompressors.
* `rtl/forwt_y_rom.sv`, `rtl/forwt_x_rom.sv`, `rtl/x_last_data_ram.sv`: the
  tables and the per-column state.
* `rtl/pixel_delay.sv`: the 6-clock pixel delay.
* `tb/`: testbenches and the table-generating reference model.
