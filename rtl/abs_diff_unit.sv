// abs_diff_unit: the four absolute differences of one pixel.
//
// For original pixel P(i,j) it forms, in parallel and combinationally,
//   |P - L_i|  (horizontal), |P - U_j| (vertical),
//   |P - M|    (corner),     |P - avg| (DC),
// the four differences of the document's prediction procedure. Each is an
// 8-bit unsigned magnitude computed from a 9-bit signed subtraction.
module abs_diff_unit
  import bpmm_pkg::*;
(
  input  pix_t p,      // original pixel
  input  pix_t l,      // left reference of the pixel's row
  input  pix_t u,      // upper reference of the pixel's column
  input  pix_t m,      // upper-left corner reference
  input  pix_t avg,    // DC reference
  output pix_t d_hor,
  output pix_t d_ver,
  output pix_t d_cor,
  output pix_t d_dc
);

  function automatic pix_t absdiff(input pix_t a, input pix_t b);
    logic signed [8:0] d;
    d = $signed({1'b0, a}) - $signed({1'b0, b});
    return (d < 0) ? pix_t'(-d) : pix_t'(d);
  endfunction

  assign d_hor = absdiff(p, l);
  assign d_ver = absdiff(p, u);
  assign d_cor = absdiff(p, m);
  assign d_dc  = absdiff(p, avg);

endmodule
