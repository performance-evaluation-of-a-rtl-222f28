// avg_buffer: DC (average) reference of the current block.
//
// Computes the H.264 intra 4x4 DC value from the upper row U0..U3 and the left
// column L0..L3 and holds it for the comparator:
//   both available : (sum(U) + sum(L) + 4) >> 3
//   only upper     : (sum(U) + 2) >> 2
//   only left      : (sum(L) + 2) >> 2
//   neither        : 128
// The value is registered when ld_en is high, giving one cycle of latency.
// The document takes the average from the standard DC rule; the handling of
// missing neighbours is the standard's.
module avg_buffer
  import bpmm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ld_en,
  input  row_t upper,
  input  row_t left,
  input  logic up_avail,
  input  logic left_avail,
  output pix_t avg
);

  logic [9:0] sum_u, sum_l;
  logic [10:0] sum_all;
  pix_t avg_next;

  always_comb begin
    sum_u = '0;
    sum_l = '0;
    for (int k = 0; k < 4; k++) begin
      sum_u += 10'(upper[k]);
      sum_l += 10'(left[k]);
    end
    sum_all = 11'(sum_u) + 11'(sum_l) + 11'd4;
    unique case ({up_avail, left_avail})
      2'b11:   avg_next = pix_t'(sum_all >> 3);
      2'b10:   avg_next = pix_t'((sum_u + 10'd2) >> 2);
      2'b01:   avg_next = pix_t'((sum_l + 10'd2) >> 2);
      default: avg_next = 8'd128;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     avg <= 8'd128;
    else if (ld_en) avg <= avg_next;
  end

endmodule
