// mb_buffer: original macroblock buffer.
//
// Holds one 16x16 luma macroblock as 64 words of four pixels, filled from the
// 32-bit input bus in raster order inside the macroblock (word w holds row
// w/4, columns 4*(w%4) .. 4*(w%4)+3, least significant byte first). With this
// layout every word is exactly one row of one 4x4 block: row r of the block at
// block column bx, block row by is word (4*by + r)*4 + bx.
//
// Interface: one synchronous write port and one read port with a registered
// output (one cycle of latency), the shape of an FPGA block RAM. Reset is not
// needed for the contents: a macroblock is always written before it is read.
// The buffer itself comes from the document; the word layout and the read
// latency are this design's choice.
module mb_buffer
  import bpmm_pkg::*;
#(
  parameter int unsigned WORDS = MB_WORDS
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(WORDS)-1:0] wr_addr,
  input  row_t                     wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(WORDS)-1:0] rd_addr,
  output row_t                     rd_data
);

  row_t mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
