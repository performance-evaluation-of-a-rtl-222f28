# BPMM: per-pixel best-prediction-matrix intra 4x4 predictor for H.264 luma

A standard H.264 encoder predicts a 4x4 luma block with one of nine modes and
uses that mode for all 16 pixels. Vertical, horizontal and DC are by far the
most used of the nine. The best prediction matrix mode (BPMM) merges them
and decides **per pixel** instead of per block. Each pixel P(i,j) gets
whichever of four reference values is closest to it:

| code | source     | reference value                               |
|------|------------|-----------------------------------------------|
| 0    | horizontal | L_i, the reconstructed pixel left of row i     |
| 1    | vertical   | U_j, the reconstructed pixel above column j    |
| 2    | corner     | M, the reconstructed pixel above-left of the block |
| 3    | DC         | the average of the U and L references          |

Per pixel, "closest" means the smallest |P - reference|. When two references
are equally close, the lower code wins: horizontal, then vertical, then
corner, then DC. The result per block is:

- the prediction matrix;
- a 2-bit source code per pixel;
- the residual P - prediction, which the encoder's transform and quantisation
  loop codes.

Residuals come out smaller than with any single block mode. The cost is that a
decoder needs 32 bits of source codes per block instead of one mode number.
That side information is not handled here.

This repository holds synthesizable SystemVerilog for the predictor. It takes
macroblocks from a 32-bit pixel bus and returns one predicted 4x4 block at a
time. It then waits for the encoder to return the reconstructed version of
that block, because the next block is predicted from reconstructed pixels,
not original ones.

## Where the references come from

This is the hard part of the design. The arithmetic is trivial; keeping the
right reconstructed pixels at hand across block and macroblock boundaries is
not. Macroblocks arrive in raster order over the frame. Inside a macroblock
the 4x4 blocks are handled in the H.264 scan order: the four 8x8 quadrants in
raster order, and the four 4x4 blocks of each quadrant in raster order. Block
index k lies at block column `{k[2],k[0]}` and block row `{k[3],k[1]}`.

Four small stores hold everything needed:

- **Upper line (`upper_buffer`).** One 32-bit word per 4-pixel column of the
  frame: 88 words for CIF. Each word holds the bottom row of the most recently
  reconstructed block in that column. When a block is processed, its word is
  exactly U0..U3. That is true whether the row above is in the same macroblock
  or in the previous macroblock row. After reconstruction the block's own
  bottom row replaces the word.
- **Left column (`left_buffer`).** One entry per 4-line band of the macroblock
  row (four entries). Each holds the right-hand column of the most recently
  reconstructed block in that band. In both the H.264 scan and macroblock
  raster order, that block is the left neighbour of the next block processed
  in the band, including across a macroblock boundary.
- **Corner (`corner_buffer`).** One pixel per band. The corner M of a block is
  the bottom-right pixel of the block above its left neighbour. That pixel is
  U3 of the left neighbour. So when a block finishes, its U3 (still in the
  upper-line read register) is saved for the next block in the band. No
  separate corner storage per column is needed.
- **Average (`avg_buffer`).** Registers the DC value using the H.264 intra
  4x4 rule: `(ΣU + ΣL + 4) >> 3`, or `(ΣU + 2) >> 2` or `(ΣL + 2) >> 2` when
  only one side exists, or 128 when neither does.

Frame edges: there is no upper reference on the first pixel row of the frame
and no left reference on the first pixel column. A corner exists only when
both do. A reference that does not exist is left out of the comparison. DC is
always a candidate, so every pixel gets a prediction. The upper line and the
macroblock buffer are never reset: the availability flags guarantee that
nothing unwritten is ever used.

## Datapath

`bpmm_datapath` has 16 lanes, one per pixel, so a whole block is evaluated in
one cycle. Each lane is:

- an `abs_diff_unit`, which forms the four 8-bit absolute differences;
- a `bpmm_comparator`, which picks the winner by the priority rule.

The lane outputs are registered as the prediction matrix, the source codes
and the residuals. The original pixels come from the 4x4 block buffer
(`blk_buffer`). It is loaded one row per cycle from the macroblock buffer
(`mb_buffer`, 64 words). In that buffer every word is one row of one 4x4
block: row r of block (bx, by) is word `(4*by + r)*4 + bx`.

## Schedule

`bpmm_ctrl` runs each macroblock through these steps:

| step  | cycles | action |
|-------|--------|--------|
| LOAD  | 64     | accept the macroblock words (`in_valid`/`in_ready`) |
| FETCH | 4      | read the block's four rows; the first cycle also reads the upper-line word |
| AVG   | 1      | register the DC value (the last row lands in the block buffer) |
| PRED  | 1      | evaluate the 16 lanes, register the result |
| OUT   | ≥1     | `out_valid` is held until `out_ready` |
| REC   | ≥1     | `rec_ready` is held until `rec_valid`, then the upper, left and corner stores are written |

FETCH to REC repeats for the 16 blocks. With no waiting on either handshake,
a block takes 8 cycles and a macroblock takes 64 + 16 x 8 = 192 cycles. A CIF
frame (396 macroblocks) then takes 76,032 cycles, about 1.1 ms at 70 MHz,
plus whatever time the reconstruction loop adds.

The schedule is deliberately one block at a time. The next block cannot start
until the previous block's reconstruction is back, and input loading does not
overlap processing.

## Interface (`bpmm_top`)

Parameters are `FRAME_W` and `FRAME_H`. The defaults are 352 and 288 (CIF).
Both must be multiples of 16.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | input word handshake; `in_ready` is high only while a macroblock is being loaded |
| `in_data` | in | 32 | four pixels; the least significant byte is the leftmost; raster order inside the macroblock |
| `out_valid`, `out_ready` | out/in | 1 | one predicted block; held stable until taken |
| `out_pred` | out | 128 | prediction matrix; row i in bits `32i+31:32i`, pixel j in byte j of the row |
| `out_sel` | out | 32 | source code per pixel (`sel_t`), same indexing |
| `out_resid` | out | 144 | signed 9-bit residual per pixel |
| `out_mb_x`, `out_mb_y`, `out_blk` | out | - | macroblock position and block index (scan order) |
| `rec_valid`, `rec_ready` | in/out | 1 | reconstructed block handshake |
| `rec_data` | in | 128 | reconstructed block, same layout as `out_pred` |

The shared types (`pix_t`, `row_t`, `blk_t`, `sel_t`, `res_t`, `avail_t`) and
the block-scan helpers are in `rtl/bpmm_pkg.sv`. An assertion in `bpmm_ctrl`
checks that an offered output block stays offered until it is taken.

## Files

| file | role |
|------|------|
| `rtl/bpmm_pkg.sv` | types, constants, block-scan functions |
| `rtl/bpmm_top.sv` | top level: wires the blocks below |
| `rtl/bpmm_ctrl.sv` | sequencer, frame position, availability flags |
| `rtl/mb_buffer.sv` | 64-word original-macroblock buffer (block-RAM shape, 1-cycle read) |
| `rtl/blk_buffer.sv` | original 4x4 block registers |
| `rtl/upper_buffer.sv` | frame-wide reconstructed upper line (block-RAM shape) |
| `rtl/left_buffer.sv` | per-band reconstructed left column |
| `rtl/corner_buffer.sv` | per-band corner pixel |
| `rtl/avg_buffer.sv` | DC average |
| `rtl/abs_diff_unit.sv` | four absolute differences of one pixel |
| `rtl/bpmm_comparator.sv` | minimum with priority, predictor select |
| `rtl/bpmm_datapath.sv` | 16 parallel lanes and the output register |

## Verification

Each module has a self-checking testbench in `tb/<module>_tb.sv`. Each one
compares against values computed independently in the testbench and ends by
printing `TB_RESULT checks=N failures=M`.

Two end-to-end testbenches act as the rest of the encoder. They stream
generated frames and rebuild each block's reconstruction by rounding the
residual to a multiple of 6, a stand-in for the quantiser. A reference model
recomputes every pixel's prediction, code and residual from its own copy of
the reconstructed frame.

- `tb/bpmm_top_tb.sv` covers two full CIF frames at the default parameters.
  - The first frame runs with no waiting, and the test checks the 192-cycle
    macroblock time.
  - The second frame adds random gaps on the input, back-pressure on the
    output and a random reconstruction delay.
  - It counts each source code, ties, the four DC cases, the three kinds of
    waiting and the return to the start of the frame. A mechanism that never
    occurs fails the test.
- `tb/bpmm_top_sizes_tb.sv` runs QCIF (176x144, two frames), 1280x720 and
  3840x2160 (one frame each), through `tb/bpmm_frame_harness.sv`. It takes
  about 20 s.

To run one with Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -Irtl -y rtl -y tb rtl/bpmm_pkg.sv tb/bpmm_top_tb.sv --top-module bpmm_top_tb
./obj_dir/Vbpmm_top_tb
```

`-Wno-fatal` is needed because the testbenches compute with `int`, and
Verilator reports the resulting width conversions as warnings.

Replace `bpmm_top_tb` with any other testbench name. Pass
`+verilator+rand+reset+2` to the binary to start unreset state at random
values.

## How far to trust it, and where it departs from the scheme

These parts are taken from the published scheme:

- the per-pixel rule and its tie priority;
- the four references and the DC average;
- the split into an original-macroblock buffer, an original-block buffer,
  upper, left, corner and average buffers, absolute-difference units and a
  comparator;
- the 32-bit, least-significant-pixel-first input bus;
- the CIF default frame size.

These are this design's own choices:

- the H.264 block scan inside the macroblock;
- leaving references outside the frame out of the comparison;
- the valid/ready handshakes and the reconstruction port;
- sizing the upper store as one frame-wide line, and taking the corner from
  the previous block's U3;
- evaluating all 16 pixels in one cycle;
- the strictly sequential schedule and its 192-cycle macroblock time.

The published area, power and clock figures (about 4,900 FPGA slices for a
whole encoder, 70.4 MHz) describe a different implementation. They have not
been reproduced with this RTL.

Not included:

- the encoder around the predictor (integer transform, quantisation, entropy
  coding, and the inverse path that produces `rec_data`);
- any signalling of the per-pixel source codes in the bitstream;
- use of the scheme for 16x16 luma or chroma blocks;
- a pipelined version that overlaps blocks.

A frame size other than the synthesized one needs a rebuild with new
`FRAME_W`/`FRAME_H`: QCIF and HD streams do not run on the CIF build.
