// left_buffer: reconstructed left reference column (L0..L3).
//
// One entry per 4-pixel band of the macroblock row (four bands for a 16-line
// macroblock). Each entry holds the right-hand column of the most recently
// reconstructed block in that band, which is the left neighbour of the next
// block processed in the band, including across a macroblock boundary.
//
// Interface: wr_en/wr_band/wr_col write the column (L0 = top pixel at index
// 0) at the clock edge; rd_band selects the entry seen on rd_col
// combinationally. Reset clears the entries; the left reference is flagged
// unavailable in the first block column of a frame anyway. The document names
// the buffer; the band organisation is this design's choice.
module left_buffer
  import bpmm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,
  input  logic [1:0] wr_band,
  input  row_t       wr_col,
  input  logic [1:0] rd_band,
  output row_t       rd_col
);

  row_t col [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 4; b++) col[b] <= '0;
    end else if (wr_en) begin
      col[wr_band] <= wr_col;
    end
  end

  assign rd_col = col[rd_band];

endmodule
