// upper_buffer: reconstructed upper reference line (U0..U3 of every block).
//
// Stores the bottom row of the most recently reconstructed 4x4 block in each
// 4-pixel column of the frame, so it spans the frame width: FRAME_W/4 words
// of four pixels. When a block is processed its word is the row just above
// it, U0..U3, whether that row lies in the same macroblock or in the
// macroblock row above. After the block is reconstructed its own bottom row
// overwrites the word for the block below.
//
// Interface: synchronous write, read with one cycle of latency (block RAM
// shape). The contents need no reset: the upper reference is flagged
// unavailable on the first block row of a frame, before anything was written.
// The document names this buffer; sizing it as one frame-wide line is this
// design's choice.
module upper_buffer
  import bpmm_pkg::*;
#(
  parameter int unsigned FRAME_W = 352
) (
  input  logic                             clk,
  input  logic                             wr_en,
  input  logic [$clog2(FRAME_W/4)-1:0]     wr_col,
  input  row_t                             wr_data,
  input  logic                             rd_en,
  input  logic [$clog2(FRAME_W/4)-1:0]     rd_col,
  output row_t                             rd_data
);

  localparam int unsigned COLS = FRAME_W / 4;

  row_t line [COLS];

  always_ff @(posedge clk) begin
    if (wr_en) line[wr_col] <= wr_data;
    if (rd_en) rd_data <= line[rd_col];
  end

endmodule
