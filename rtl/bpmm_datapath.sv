// bpmm_datapath: builds the best prediction matrix of a 4x4 block.
//
// Sixteen lanes, one per pixel, each an abs_diff_unit followed by a
// bpmm_comparator, evaluate all pixels of the block at once. Lane (i,j) sees
// original pixel P(i,j), left reference L_i, upper reference U_j, the corner M
// and the DC value. Its results are registered when en is high: the
// prediction matrix, the per-pixel source codes (2 bits each) and the signed
// residual P - prediction. out_valid follows en by one cycle.
//
// The lane structure (buffers feeding absolute-difference units feeding a
// comparator) follows the document; evaluating all 16 pixels in one cycle and
// the single output register are this design's choice. The comparator's
// minimum output is left unused here: the residual already carries it.
module bpmm_datapath
  import bpmm_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  blk_t     orig,
  input  row_t     upper,
  input  row_t     left,
  input  pix_t     corner,
  input  pix_t     avg,
  input  avail_t   avail,
  output logic     out_valid,
  output blk_t     pred,
  output sel_blk_t sel,
  output res_blk_t resid
);

  blk_t     pred_c;
  sel_blk_t sel_c;
  res_blk_t resid_c;

  for (genvar i = 0; i < 4; i++) begin : g_row
    for (genvar j = 0; j < 4; j++) begin : g_col
      pix_t d_hor, d_ver, d_cor, d_dc, dmin;

      abs_diff_unit u_ad (
        .p(orig[i][j]), .l(left[i]), .u(upper[j]), .m(corner), .avg(avg),
        .d_hor(d_hor), .d_ver(d_ver), .d_cor(d_cor), .d_dc(d_dc)
      );

      bpmm_comparator u_cmp (
        .d_hor(d_hor), .d_ver(d_ver), .d_cor(d_cor), .d_dc(d_dc),
        .l(left[i]), .u(upper[j]), .m(corner), .avg(avg), .avail(avail),
        .sel(sel_c[i][j]), .pred(pred_c[i][j]), .dmin(dmin)
      );

      assign resid_c[i][j] = $signed({1'b0, orig[i][j]}) - $signed({1'b0, pred_c[i][j]});
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pred      <= '0;
      sel       <= sel_blk_t'('1);
      resid     <= '0;
    end else begin
      out_valid <= en;
      if (en) begin
        pred  <= pred_c;
        sel   <= sel_c;
        resid <= resid_c;
      end
    end
  end

endmodule
