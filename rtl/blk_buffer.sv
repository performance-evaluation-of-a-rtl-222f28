// blk_buffer: original 4x4 block buffer.
//
// Collects the 16 original pixels of the block being predicted, one row of
// four pixels per load, so that all 16 absolute-difference lanes can read
// their pixel in parallel. Rows are written by index; a row keeps its value
// until it is written again. A clear on reset zeroes the block.
//
// Interface: ld_en/ld_row/ld_data write row ld_row at the clock edge; blk is
// the registered block, valid the cycle after the last load. The buffer is one
// of the six named in the document; its row-wise loading is this design's
// choice.
module blk_buffer
  import bpmm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ld_en,
  input  logic [1:0] ld_row,
  input  row_t       ld_data,
  output blk_t       blk
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     blk <= '0;
    else if (ld_en) blk[ld_row] <= ld_data;
  end

endmodule
