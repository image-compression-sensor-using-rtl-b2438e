# Compressing image sensor with inter-frame and intra-frame prediction

A high-frame-rate image sensor produces far more pixel data than it can send. This
design cuts that data at the sensor. Most pixels change little from one frame to the
next, or look like their neighbours. Such pixels are not output. A pixel is output,
with its row and column address, only when **both** of two predictions fail:

1. **Inter-frame prediction (conditional replenishment).** The present value `x` is
   compared with the value stored for that pixel in a frame memory, `M`. If
   `|x - M| < th1`, the pixel is skipped and its memory is left alone.
2. **Intra-frame prediction.** Otherwise `x` is compared with
   `P = (M_up + M_left) / 2`, the mean of the memory values of the pixel above and
   the pixel to its left. If `|x - P| < th2`, the pixel is skipped and its memory
   is set to `P`.
3. Otherwise the pixel is output and its memory is set to `x`.

The frame memory therefore always holds a reconstructed image: the last value sent for
each pixel, or the prediction that replaced it. The two thresholds trade output rate
against image quality. With `th1 = 0` every pixel goes on to the intra-frame test
(intra-only operation). With `th2 = 0` every pixel that fails the inter-frame test is
output (inter-only, plain conditional replenishment).

The RTL implements the digital core of a 64 x 64 pixel sensor. It uses a column-parallel
organisation: every column has its own predictor and comparators, and a whole row is
decided in one clock cycle. A skipping horizontal shift register then reads out only
the flagged pixels of the row, one per clock.

## Block structure

```
                 pd_row_sel ──► (photodiode array + A/D, outside) ──► pd_pixels[64]
                      ▲                                                   │
 timing_controller ─► v_shift (array)                                     ▼
        │        └──► v_shift (memory) ──► frame_memory ──m_old──► column_array ──► flags, held pixels
        │                                       ▲                  (64 x average_circuit
        │                                       └────── m_new ─────  + comp_circuit)
        │                                                                 │ flag_and[64]
        └─ hin ──────────────────────────────────────────────────► h_shift_skip
                                                                          │ select[64]
                                             column_readout, address_encoder ──► pix_data, pix_row, pix_col
```

| Module | Role |
|---|---|
| `image_compression_sensor` | top level; wires the blocks below |
| `timing_controller` | per-row sequencing: LOAD, then skip-scan, then next row |
| `v_shift` | one-hot row select; one copy for the pixel array, one for the memory |
| `frame_memory` | 64 x 64 x 8-bit memory `M`, one row read and written at a time |
| `column_array` | previous-row registers, 64 average and comp circuits, held flags and pixels |
| `average_circuit` | `P = (M_up + M_left) / 2`, with border rules |
| `comp_circuit` | `flag1`, `flag2`, output decision and new memory value of one pixel |
| `h_shift_skip`, `h_shift_stage` | skipping horizontal shift register |
| `column_readout` | output line: the selected column's pixel value |
| `address_encoder` | one-hot select to binary row or column address |
| `sensor_pkg` | pixel type (8 bits), array size (64 x 64), `abs_diff` |

## How a row is decided: the prediction chain

This is the least obvious part of the design.

The intra-frame prediction uses **memory values**, not raw pixel values. The memory holds
what a receiver can reconstruct, so the prediction must use those values too. Two
neighbours are involved:

* **The pixel above** was decided when its row was processed. `column_array` keeps that
  row's new memory values in a register per column, the *previous-row register*. It is
  loaded at the end of every row.
* **The pixel to the left** lies in the same row, and all columns are decided in the same
  cycle. So column `j` uses column `j-1`'s *new* memory value. That value is itself the
  result of column `j-1`'s decision. The 64 columns form a combinational ripple chain:
  an add, two compares and a multiplexer per column, from column 0 to column 63.

The memory value after the frame is:

| flag1 (`\|x-M\| >= th1`) | flag2 (`\|x-P\| >= th2`) | pixel output | new memory |
|---|---|---|---|
| 0 | don't care | no | `M` (unchanged) |
| 1 | 0 | no | `P` |
| 1 | 1 | yes | `x` |

`flag2` is computed for every pixel, so the intra-frame flags can be watched on their
own. They reach the output only through the table above.

Border rules (this design's choice): in row 0 the prediction is the left neighbour alone.
In column 0 it is the pixel above alone. At pixel (0,0) it is the pixel's own memory
value. The average is rounded down (`(a + b) >> 1` on a 9-bit sum). A high flag means
"greater than or equal" to the threshold.

After reset the memory reads as zero until each row has been written once. The first
frame is therefore coded against a black image.

## Reading out only the flagged pixels: the skipping shift register

`h_shift_skip` is a chain of 64 `h_shift_stage` cells. Each cell has two paths:

* **flag_and high:** the token arriving on `hin` is stored in a flip-flop for one clock.
  The stored token raises that column's `select` and is passed on to the next cell.
* **flag_and low:** the cell is a wire. The token passes straight through in the same
  cycle, and `select` stays low.

A one-cycle token at the start of the scan therefore jumps, within one cycle, over every
skipped column to the first flagged one. On each later clock it jumps to the next
flagged one. A row with `k` output pixels has its selects in the `k` cycles right after
the token is injected, in column order. `row_done` is the token leaving the last cell.
It is high in the cycle of the last select, or in the injection cycle itself if
`k = 0`. The original circuit uses two non-overlapping shift clocks (H1, H2) for the
storage path. Here that pair is one flip-flop on a single clock.

## Timing

| Phase | Cycles | What happens |
|---|---|---|
| LOAD | 1 | selected row read from the array and the memory; the column array decides all 64 pixels; at the clock edge the memory row is written, the previous-row registers are loaded, and flags and pixel values are held |
| scan | k + 1 | token injected (`hin`); one output pixel per cycle for the k flagged columns |

* A row takes `k + 2` cycles, and a frame takes the sum of `k_i + 2` over its 64 rows.
* Bounds:
  * The shortest frame is 128 cycles: nothing is output.
  * The longest frame is 64 x 66 = 4224 cycles: everything is output.
* At 1000 frames/s, the fastest rate the sensor was evaluated at, the longest frame needs
  a 4.2 MHz clock.

## Top-level interface (`image_compression_sensor`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `frame_start` | in | 1 | start a frame; ignored while `busy` |
| `th1`, `th2` | in | 8 | inter- and intra-frame thresholds; hold stable during a frame |
| `pd_row_sel` | out | 64 | one-hot row select to the pixel array |
| `pd_pixels` | in | 64 x 8 | 8-bit codes of the selected row, valid in the same cycle |
| `pix_valid`, `pix_data` | out | 1, 8 | output pixel value, one per cycle while valid |
| `pix_row`, `pix_col` | out | 6, 6 | address of the output pixel |
| `row_flags_valid`, `row_flag1`, `row_flag2` | out | 1, 64, 64 | flags of the row being scanned |
| `busy`, `frame_done` | out | 1, 1 | frame in progress; pulse at the end of the last row |

Parameters `ROWS` and `COLS` (default 64) set the array size; the pixel width is 8 bits
(`sensor_pkg::PIX_W`).

## Departures from the original sensor

* **Digital instead of analog processing.** The original chip works on analog voltages:
  * the memory is a capacitor per pixel;
  * averaging is done by charge sharing between two capacitors;
  * the comparators are analog;
  * only the output pixels are A/D converted.

  Here every value is an 8-bit code, which is the resolution of the chip's A/D
  converter. The frame memory is a RAM of 64 words, each 512 bits wide.
* **Not in the RTL:**
  * The photodiode array (3-transistor active pixels).
  * The 8-bit A/D converter. Its structure is not known.

  The top brings out the row select and expects digitised row values in return.
* **Assumed, because the original gives no details:**
  * the controller and its cycle timing;
  * the binary address format;
  * the one-hot vertical shift registers;
  * rounding, border handling and memory initialisation (see above).
* **Column order within a row.** The source defines the left neighbour by its memory
  value. It does not say how the column-parallel circuit sequences the columns within
  a row. The ripple chain follows that definition exactly.

## Simulation

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and stops
itself with a watchdog. Build and run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sensor_pkg.sv tb/tb_image_compression_sensor.sv \
    --top-module tb_image_compression_sensor -Mdir obj -o sim
./obj/sim
```

Verilator finds the other modules in `rtl/` by file name. To run another testbench,
replace the testbench file and `--top-module`.

| Testbench | What it checks |
|---|---|
| `tb_image_compression_sensor` | Full 64 x 64 design, nine frames of a bright "T" moving across a noisy background. Threshold settings: normal, intra-only, inter-only, output-all and output-none. A reference model checks the output pixel stream (value, row, column, order), every row's flags, the whole memory after each frame, and the frame length. Each mechanism must occur at least once: inter skip, intra skip, output, empty row, full row, border prediction, `frame_start` while busy. |
| `tb_workload_sweep` | Threshold sweep (`th1` 0..5 against `th2` 0..16) and a frame-rate sweep (1 to 32 pixels of motion per frame, standing for 1000 down to 31 frames/s), full size, synthetic scene. Output count and memory are checked against the model in every frame. It prints the output ratio and PSNR of each setting and checks their trends (see below). |
| `tb_column_array` | New memory values, flags and held pixels of whole frames against a pixel-by-pixel model |
| `tb_comp_circuit` | Threshold boundaries and 20 000 random cases |
| `tb_average_circuit` | All 65 536 neighbour pairs and the border cases |
| `tb_h_shift_skip` | Select order, one per cycle, and `row_done` timing for random, empty and full flag patterns |
| `tb_timing_controller` | Row phases, row steps, `frame_done`, frame length, `frame_start` ignored while busy |
| `tb_frame_memory` | Read-as-zero before the first write, write enable, row isolation, reset |
| `tb_v_shift`, `tb_address_encoder`, `tb_column_readout` | Row stepping; one-hot to binary; output line |

The full-size end-to-end test runs in well under a second, and the sweep in a few seconds.

### What the sweep shows

The sweep uses a synthetic scene: a textured block moving over a textured background,
with ±1 code of noise. On it:

* Raising `th2` lowers the output rate and the PSNR.
* Adding the inter-frame test to intra-only operation removes most outputs. For
  example, at `th2 = 4` the output rate falls from about 61 % to about 19 %.
* Slower motion per frame (a higher frame rate) lowers the output rate, from about 26 %
  at 32 pixels/frame to about 19 % at 1 pixel/frame.

At equal `th1` the combined method is not always below inter-only (`th2 = 0`). Here
is why:

* When a pixel is skipped by the intra-frame test, its memory takes the prediction.
* That prediction can differ from the true value by up to `th2`.
* So the same pixel can fail the inter-frame test in a later frame. Inter-only
  operation would have kept that pixel's memory exact.

How much the intra-frame step gains therefore depends on the scene and on the
thresholds chosen together.

## Changing the design

* **Array size:** `ROWS` and `COLS` on the top. Row and column addresses widen
  automatically.
* **Pixel width:** `PIX_W` in `sensor_pkg`. Thresholds and memory widen with it.
* **Prediction rule:** `average_circuit` holds the predictor; `comp_circuit` holds the
  decision and the update rule.
* **Critical path:** the column ripple chain in `column_array` is the long combinational
  path. To shorten it, split the row into groups. This changes the predictor at group
  borders, and a receiver would have to follow the same rule.
