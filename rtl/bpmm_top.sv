// bpmm_top: BPMM intra 4x4 predictor for 8-bit luma.
//
// Every pixel of a 4x4 block is predicted on its own from one of four
// references: the left neighbour of its row (L_i), the upper neighbour of its
// column (U_j), the upper-left corner (M) or the DC average of U and L. The
// reference closest to the original pixel wins, ties going to horizontal,
// vertical, corner, DC in that order. The block leaves with its prediction
// matrix, a 2-bit source code per pixel and the residual.
//
// Structure: macroblock buffer -> 4x4 block buffer -> 16 parallel
// absolute-difference and comparator lanes, fed by the upper line, left,
// corner and average reference buffers, all sequenced by bpmm_ctrl.
//
// Interface:
//   in_*   one macroblock = 64 words of 4 pixels, LSB = leftmost pixel,
//          raster order inside the macroblock; macroblocks in raster order
//          over a FRAME_W x FRAME_H frame (default CIF, 352x288).
//   out_*  one 4x4 block at a time in H.264 scan order, with its position.
//   rec_*  the reconstructed block returned by the transform/quantisation
//          loop of the encoder, which lies outside this module; the next
//          block is predicted from it.
// Timing: 192 cycles per macroblock when neither handshake waits.
//
// The prediction rule, the tie priority, the six buffers, the
// absolute-difference units, the comparator, the 32-bit bus and the CIF frame
// size follow the published scheme. The handshakes, the H.264 block scan
// inside the macroblock, the exclusion of references outside the frame, the
// one-block-at-a-time schedule and the reconstruction port are this design's
// choices. Its assertion samples rst_n on the clock, which lint reports as
// a reset used both ways; that is intended.
module bpmm_top
  import bpmm_pkg::*;
#(
  parameter int unsigned FRAME_W = 352,
  parameter int unsigned FRAME_H = 288,
  localparam int unsigned MBW = FRAME_W / MB_SIZE,
  localparam int unsigned MBH = FRAME_H / MB_SIZE,
  localparam int unsigned XW  = (MBW > 1) ? $clog2(MBW) : 1,
  localparam int unsigned YW  = (MBH > 1) ? $clog2(MBH) : 1,
  localparam int unsigned CW  = $clog2(FRAME_W / 4)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  row_t          in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output blk_t          out_pred,
  output sel_blk_t      out_sel,
  output res_blk_t      out_resid,
  output logic [XW-1:0] out_mb_x,
  output logic [YW-1:0] out_mb_y,
  output logic [3:0]    out_blk,
  input  logic          rec_valid,
  output logic          rec_ready,
  input  blk_t          rec_data
);

  logic          mb_wr_en, mb_rd_en, blk_ld_en, up_rd_en, ref_wr_en;
  logic          avg_ld_en, dp_en;
  logic [5:0]    mb_wr_addr, mb_rd_addr;
  logic [1:0]    blk_ld_row, band;
  logic [CW-1:0] up_col;
  avail_t        avail;
  row_t          mb_rd_data, upper, left, rec_right;
  pix_t          corner, avg;
  blk_t          orig;
  logic          dp_valid;

  bpmm_ctrl #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready,
    .mb_wr_en, .mb_wr_addr, .mb_rd_en, .mb_rd_addr,
    .blk_ld_en, .blk_ld_row,
    .up_rd_en, .ref_wr_en, .up_col, .band, .avg_ld_en,
    .dp_en, .avail,
    .out_valid, .out_ready,
    .rec_valid, .rec_ready,
    .mb_x(out_mb_x), .mb_y(out_mb_y), .blk_idx(out_blk)
  );

  mb_buffer u_mb (
    .clk,
    .wr_en(mb_wr_en), .wr_addr(mb_wr_addr), .wr_data(in_data),
    .rd_en(mb_rd_en), .rd_addr(mb_rd_addr), .rd_data(mb_rd_data)
  );

  blk_buffer u_blk (
    .clk, .rst_n,
    .ld_en(blk_ld_en), .ld_row(blk_ld_row), .ld_data(mb_rd_data),
    .blk(orig)
  );

  // Right-hand column of the reconstructed block, top pixel first.
  for (genvar i = 0; i < 4; i++) begin : g_right
    assign rec_right[i] = rec_data[i][3];
  end

  upper_buffer #(.FRAME_W(FRAME_W)) u_up (
    .clk,
    .wr_en(ref_wr_en), .wr_col(up_col), .wr_data(rec_data[3]),
    .rd_en(up_rd_en), .rd_col(up_col), .rd_data(upper)
  );

  left_buffer u_left (
    .clk, .rst_n,
    .wr_en(ref_wr_en), .wr_band(band), .wr_col(rec_right),
    .rd_band(band), .rd_col(left)
  );

  corner_buffer u_cor (
    .clk, .rst_n,
    .wr_en(ref_wr_en), .wr_band(band), .wr_pix(upper[3]),
    .rd_band(band), .rd_pix(corner)
  );

  avg_buffer u_avg (
    .clk, .rst_n,
    .ld_en(avg_ld_en), .upper(upper), .left(left),
    .up_avail(avail.up), .left_avail(avail.left),
    .avg(avg)
  );

  bpmm_datapath u_dp (
    .clk, .rst_n,
    .en(dp_en), .orig(orig), .upper(upper), .left(left),
    .corner(corner), .avg(avg), .avail(avail),
    .out_valid(dp_valid), .pred(out_pred), .sel(out_sel), .resid(out_resid)
  );

  // The datapath result is registered the cycle the sequencer starts
  // offering it.
  a_dp_then_out: assert property (@(posedge clk) disable iff (!rst_n)
    dp_valid |-> out_valid);

endmodule
