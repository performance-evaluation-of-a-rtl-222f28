// abs_diff_unit_tb: drives random pixels and references, including the
// extremes 0 and 255, and checks the four absolute differences against values
// computed here with integer arithmetic.
`timescale 1ns/1ps
module abs_diff_unit_tb;
  import bpmm_pkg::*;
  pix_t p, l, u, m, avg, d_hor, d_ver, d_cor, d_dc;
  int checks = 0, failures = 0;

  abs_diff_unit dut (.*);

  function automatic int ad(int a, int b);
    return (a > b) ? a - b : b - a;
  endfunction

  function automatic pix_t pick();
    case ($urandom_range(0, 5))
      0: return 8'd0;
      1: return 8'd255;
      default: return 8'($urandom);
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      p = pick(); l = pick(); u = pick(); m = pick(); avg = pick();
      #1;
      checks++;
      if (d_hor != 8'(ad(p, l)) || d_ver != 8'(ad(p, u)) ||
          d_cor != 8'(ad(p, m)) || d_dc != 8'(ad(p, avg))) begin
        failures++;
        if (failures < 10)
          $display("FAIL p=%0d l=%0d u=%0d m=%0d a=%0d -> %0d %0d %0d %0d",
                   p, l, u, m, avg, d_hor, d_ver, d_cor, d_dc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
