// avg_buffer_tb: random upper and left rows under all four availability
// cases; the DC value is recomputed here from the H.264 rule and compared one
// cycle after the load. Also checks that the value holds while ld_en is low,
// and runs extreme rows (all 0, all 255) for rounding.
`timescale 1ns/1ps
module avg_buffer_tb;
  import bpmm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic ld_en = 1'b0, up_avail = 1'b0, left_avail = 1'b0;
  row_t upper = '0, left = '0;
  pix_t avg;
  int checks = 0, failures = 0;
  int cases [4];

  avg_buffer dut (.*);

  function automatic int ref_avg(row_t u, row_t l, bit ua, bit la);
    int su = 0, sl = 0;
    for (int k = 0; k < 4; k++) begin su += u[k]; sl += l[k]; end
    if (ua && la) return (su + sl + 4) / 8;
    if (ua)       return (su + 2) / 4;
    if (la)       return (sl + 2) / 4;
    return 128;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    repeat (2) @(negedge clk);
    checks++; if (avg !== 8'd128) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      case (n % 3)
        0: begin upper = $urandom; left = $urandom; end
        1: begin upper = '1; left = (n % 2) ? '1 : '0; end
        default: begin upper = {4{8'($urandom_range(0, 3))}}; left = $urandom; end
      endcase
      up_avail = $urandom; left_avail = $urandom; ld_en = 1'b1;
      cases[{up_avail, left_avail}]++;
      e = ref_avg(upper, left, up_avail, left_avail);
      @(negedge clk); ld_en = 1'b0;
      checks++;
      if (avg !== 8'(e)) begin failures++; $display("FAIL n=%0d got %0d want %0d", n, avg, e); end
      upper = ~upper; up_avail = ~up_avail;
      @(negedge clk);
      checks++;
      if (avg !== 8'(e)) begin failures++; $display("FAIL hold n=%0d", n); end
    end
    for (int c = 0; c < 4; c++) begin
      checks++; if (cases[c] == 0) begin failures++; $display("FAIL case %0d unused", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
