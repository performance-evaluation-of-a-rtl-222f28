// corner_buffer: reconstructed upper-left corner reference (M).
//
// The corner pixel of a block is the bottom-right pixel of the block above its
// left neighbour. That pixel is U3 of the left neighbour, so when a block
// finishes, its U3 is saved here for the next block of the same 4-pixel band.
// One entry per band of the macroblock row, as in left_buffer.
//
// Interface: wr_en/wr_band/wr_pix write at the clock edge, rd_band selects
// rd_pix combinationally. Reset clears the entries. The document names the
// buffer; deriving M from the previous block's upper row is this design's
// choice.
module corner_buffer
  import bpmm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  logic [1:0] wr_band,
  input  pix_t       wr_pix,
  input  logic [1:0] rd_band,
  output pix_t       rd_pix
);

  pix_t m [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 4; b++) m[b] <= '0;
    end else if (wr_en) begin
      m[wr_band] <= wr_pix;
    end
  end

  assign rd_pix = m[rd_band];

endmodule
