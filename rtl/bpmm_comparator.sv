// bpmm_comparator: picks the predictor of one pixel.
//
// Finds the smallest of the four absolute differences and outputs the
// reference value that produced it, with the 2-bit code of that reference and
// the minimum itself. When two or more differences are equal the document's
// priority applies: horizontal, then vertical, then corner, then DC. A
// reference whose neighbour lies outside the frame takes no part; DC is always
// available (it falls back to 128), so there is always a winner. Excluding
// missing neighbours is this design's choice. Purely combinational.
module bpmm_comparator
  import bpmm_pkg::*;
(
  input  pix_t   d_hor,
  input  pix_t   d_ver,
  input  pix_t   d_cor,
  input  pix_t   d_dc,
  input  pix_t   l,
  input  pix_t   u,
  input  pix_t   m,
  input  pix_t   avg,
  input  avail_t avail,
  output sel_t   sel,
  output pix_t   pred,
  output pix_t   dmin
);

  always_comb begin
    // Start from DC, the lowest priority, and let each higher-priority
    // candidate take over when it is no worse; the last one checked has the
    // highest priority.
    sel  = SEL_DC;
    pred = avg;
    dmin = d_dc;
    if (avail.corner && d_cor <= dmin) begin
      sel = SEL_COR; pred = m; dmin = d_cor;
    end
    if (avail.up && d_ver <= dmin) begin
      sel = SEL_VER; pred = u; dmin = d_ver;
    end
    if (avail.left && d_hor <= dmin) begin
      sel = SEL_HOR; pred = l; dmin = d_hor;
    end
  end

endmodule
