// bpmm_comparator_tb: random differences drawn from a small range, so ties
// are frequent, under every availability pattern. The expected winner is the
// first available reference, in the order horizontal, vertical, corner, DC,
// whose difference equals the minimum over the available ones. Checks the
// source code, the selected value and the minimum, and counts ties.
`timescale 1ns/1ps
module bpmm_comparator_tb;
  import bpmm_pkg::*;
  pix_t d_hor, d_ver, d_cor, d_dc, l, u, m, avg, pred, dmin;
  avail_t avail;
  sel_t sel;
  int checks = 0, failures = 0, ties = 0;

  bpmm_comparator dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 8000; n++) begin
      int d[4], v[4], mn, win, cnt;
      bit ok[4];
      automatic int hi = (n % 2) ? 3 : 255;
      for (int c = 0; c < 4; c++) begin d[c] = $urandom_range(0, hi); v[c] = $urandom_range(0, 255); end
      avail.left = $urandom; avail.up = $urandom; avail.corner = $urandom;
      ok[0] = avail.left; ok[1] = avail.up; ok[2] = avail.corner; ok[3] = 1'b1;
      d_hor = 8'(d[0]); d_ver = 8'(d[1]); d_cor = 8'(d[2]); d_dc = 8'(d[3]);
      l = 8'(v[0]); u = 8'(v[1]); m = 8'(v[2]); avg = 8'(v[3]);
      mn = 999;
      for (int c = 0; c < 4; c++) if (ok[c] && d[c] < mn) mn = d[c];
      win = -1; cnt = 0;
      for (int c = 0; c < 4; c++) if (ok[c] && d[c] == mn) begin cnt++; if (win < 0) win = c; end
      if (cnt > 1) ties++;
      #1;
      checks++;
      if (sel != sel_t'(win) || pred != 8'(v[win]) || dmin != 8'(mn)) begin
        failures++;
        if (failures < 10)
          $display("FAIL d=%0d,%0d,%0d,%0d avail l%0d u%0d c%0d -> sel %0d, want %0d",
                   d[0], d[1], d[2], d[3], ok[0], ok[1], ok[2], sel, win);
      end
    end
    checks++;
    if (ties == 0) begin failures++; $display("FAIL no ties"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
