// bpmm_pkg: types and helpers shared by the BPMM (best prediction matrix mode)
// intra 4x4 predictor.
//
// A pixel is an 8-bit luma sample. A 4x4 block row is four pixels packed into
// 32 bits with pixel 0 (the leftmost) in the least significant byte, the same
// byte order as the 32-bit macroblock input bus. A block is four rows, row 0 in
// the low 32 bits. Each predicted pixel carries a 2-bit code naming the
// reference it was taken from; the code values follow the tie-break priority
// (horizontal first, DC last), which is this design's own encoding.
package bpmm_pkg;

  typedef logic [7:0] pix_t;
  typedef pix_t [3:0] row_t;   // [j] = column j
  typedef row_t [3:0] blk_t;   // [i] = row i

  // Source of a predicted pixel. Lower value wins a tie.
  typedef enum logic [1:0] {
    SEL_HOR = 2'd0,  // left reference L_i
    SEL_VER = 2'd1,  // upper reference U_j
    SEL_COR = 2'd2,  // upper-left corner M
    SEL_DC  = 2'd3   // average of the available U and L
  } sel_t;

  typedef sel_t [3:0] sel_row_t;
  typedef sel_row_t [3:0] sel_blk_t;

  // Signed residual (original minus prediction), -255..255.
  typedef logic signed [8:0] res_t;
  typedef res_t [3:0] res_row_t;
  typedef res_row_t [3:0] res_blk_t;

  // Which neighbours of the current 4x4 block exist inside the frame.
  typedef struct packed {
    logic up;
    logic left;
    logic corner;
  } avail_t;

  localparam int unsigned MB_SIZE   = 16;   // luma macroblock is 16x16 pixels
  localparam int unsigned MB_WORDS  = 64;   // 256 pixels / 4 per bus word
  localparam int unsigned BLKS_PER_MB = 16; // 4x4 blocks per macroblock

  // H.264 4x4 block scan inside a macroblock: block k lies at block column
  // {k[2],k[0]} and block row {k[3],k[1]} (8x8 quadrants in raster order,
  // 4x4 blocks in raster order within each quadrant).
  function automatic logic [1:0] blk_col(input logic [3:0] k);
    return {k[2], k[0]};
  endfunction

  function automatic logic [1:0] blk_row(input logic [3:0] k);
    return {k[3], k[1]};
  endfunction

endpackage
