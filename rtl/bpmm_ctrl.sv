// bpmm_ctrl: sequencer of the BPMM intra 4x4 predictor.
//
// Runs one macroblock at a time, macroblocks in raster order over the frame:
//   LOAD   accept 64 words of the macroblock from the 32-bit input bus into
//          the macroblock buffer (in_valid/in_ready handshake, one word per
//          accepted cycle).
//   FETCH  four cycles: read the four rows of the next 4x4 block (H.264 scan
//          order) into the block buffer; the first cycle also reads the upper
//          reference word from the line buffer.
//   AVG    register the DC value from the upper and left references.
//   PRED   run the 16 difference/compare lanes; the result is registered.
//   OUT    hold out_valid until the consumer takes the block (out_ready).
//   REC    wait for the reconstructed block (rec_valid/rec_ready) and write
//          its bottom row into the upper line, its right column into the left
//          buffer and the block's U3 into the corner buffer.
// With no waiting on either handshake a block takes 8 cycles and a macroblock
// 64 + 16*8 = 192 cycles. The neighbour availability flags follow the frame
// edges: no upper reference on the first pixel row of the frame, no left
// reference on the first pixel column, and a corner only when both exist.
//
// The document gives the order of the data (4 pixels per bus word, raster
// order, macroblocks split into 4x4 blocks) but not the control; the state
// sequence, the handshakes and the wait for the reconstruction are this
// design's own. The handshake assertion at the end samples rst_n on the
// clock, which lint reports as a reset used both ways; that is intended.
module bpmm_ctrl
  import bpmm_pkg::*;
#(
  parameter int unsigned FRAME_W = 352,
  parameter int unsigned FRAME_H = 288,
  localparam int unsigned MBW  = FRAME_W / MB_SIZE,
  localparam int unsigned MBH  = FRAME_H / MB_SIZE,
  localparam int unsigned XW   = (MBW > 1) ? $clog2(MBW) : 1,
  localparam int unsigned YW   = (MBH > 1) ? $clog2(MBH) : 1,
  localparam int unsigned CW   = $clog2(FRAME_W / 4)
) (
  input  logic          clk,
  input  logic          rst_n,
  // macroblock input bus
  input  logic          in_valid,
  output logic          in_ready,
  // macroblock buffer
  output logic          mb_wr_en,
  output logic [5:0]    mb_wr_addr,
  output logic          mb_rd_en,
  output logic [5:0]    mb_rd_addr,
  // original 4x4 block buffer
  output logic          blk_ld_en,
  output logic [1:0]    blk_ld_row,
  // reference buffers
  output logic          up_rd_en,
  output logic          ref_wr_en,   // upper, left and corner write together
  output logic [CW-1:0] up_col,      // line-buffer word of the current block
  output logic [1:0]    band,        // 4-pixel band of the current block
  output logic          avg_ld_en,
  // datapath
  output logic          dp_en,
  output avail_t        avail,
  // prediction output handshake
  output logic          out_valid,
  input  logic          out_ready,
  // reconstruction input handshake
  input  logic          rec_valid,
  output logic          rec_ready,
  // position of the current block
  output logic [XW-1:0] mb_x,
  output logic [YW-1:0] mb_y,
  output logic [3:0]    blk_idx
);

  typedef enum logic [2:0] {
    S_LOAD, S_FETCH, S_AVG, S_PRED, S_OUT, S_REC
  } state_t;

  state_t     state;
  logic [5:0] wcnt;      // words loaded into the macroblock buffer
  logic [1:0] row;       // block row being read in FETCH
  logic       ld_pend;   // a macroblock-buffer read is returning this cycle
  logic [1:0] ld_row_q;

  logic [1:0] bx, by;
  assign bx   = blk_col(blk_idx);
  assign by   = blk_row(blk_idx);
  assign band = by;

  assign up_col = CW'(mb_x) * CW'(4) + CW'(bx);

  assign avail.up     = (mb_y != '0) || (by != 2'd0);
  assign avail.left   = (mb_x != '0) || (bx != 2'd0);
  assign avail.corner = avail.up && avail.left;

  assign in_ready   = (state == S_LOAD);
  assign mb_wr_en   = in_valid && in_ready;
  assign mb_wr_addr = wcnt;

  assign mb_rd_en   = (state == S_FETCH);
  assign mb_rd_addr = {by, row, bx};        // (4*by + row)*4 + bx
  assign up_rd_en   = (state == S_FETCH) && (row == 2'd0);

  assign blk_ld_en  = ld_pend;
  assign blk_ld_row = ld_row_q;

  assign avg_ld_en  = (state == S_AVG);
  assign dp_en      = (state == S_PRED);
  assign out_valid  = (state == S_OUT);
  assign rec_ready  = (state == S_REC);
  assign ref_wr_en  = rec_valid && rec_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_LOAD;
      wcnt     <= '0;
      row      <= '0;
      ld_pend  <= 1'b0;
      ld_row_q <= '0;
      blk_idx  <= '0;
      mb_x     <= '0;
      mb_y     <= '0;
    end else begin
      ld_pend  <= mb_rd_en;
      ld_row_q <= row;
      unique case (state)
        S_LOAD: if (mb_wr_en) begin
          wcnt <= wcnt + 6'd1;
          if (wcnt == 6'(MB_WORDS - 1)) begin
            state   <= S_FETCH;
            blk_idx <= '0;
            row     <= '0;
          end
        end
        S_FETCH: begin
          row <= row + 2'd1;
          if (row == 2'd3) state <= S_AVG;
        end
        S_AVG:  state <= S_PRED;
        S_PRED: state <= S_OUT;
        S_OUT:  if (out_ready) state <= S_REC;
        S_REC:  if (rec_valid) begin
          if (blk_idx == 4'(BLKS_PER_MB - 1)) begin
            state <= S_LOAD;
            if (mb_x == XW'(MBW - 1)) begin
              mb_x <= '0;
              mb_y <= (mb_y == YW'(MBH - 1)) ? '0 : mb_y + 1'b1;
            end else begin
              mb_x <= mb_x + 1'b1;
            end
          end else begin
            state <= S_FETCH;
          end
          blk_idx <= blk_idx + 4'd1;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // A block offered on the output stays offered until it is taken.
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid);

endmodule
