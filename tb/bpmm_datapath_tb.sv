// bpmm_datapath_tb: random 4x4 blocks and references, drawn close to each
// other so ties occur, under every availability pattern. Each of the 16
// pixels is recomputed here (minimum absolute difference over the available
// references, ties to horizontal, vertical, corner, DC) and the registered
// prediction, source codes and residuals are checked one cycle after en.
`timescale 1ns/1ps
module bpmm_datapath_tb;
  import bpmm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic en = 1'b0, out_valid;
  blk_t orig = '0, pred;
  row_t upper = '0, left = '0;
  pix_t corner = '0, avg = '0;
  avail_t avail = '0;
  sel_blk_t sel;
  res_blk_t resid;
  int checks = 0, failures = 0;
  int nsel [4];

  bpmm_datapath dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pix_t near(int base, int spread);
    int v = base + $urandom_range(0, 2 * spread) - spread;
    return 8'((v < 0) ? 0 : (v > 255) ? 255 : v);
  endfunction

  initial begin
    blk_t e_pred; sel_blk_t e_sel; res_blk_t e_res;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      automatic int base = $urandom_range(0, 255);
      automatic int spread = (n % 3 == 0) ? 128 : 4;
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        upper[k] = near(base, spread); left[k] = near(base, spread);
        for (int j = 0; j < 4; j++) orig[k][j] = near(base, spread);
      end
      corner = near(base, spread); avg = near(base, spread);
      avail = 3'($urandom);
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          int cand[4], d[4], mn, win;
          bit ok[4];
          cand[0] = left[i]; cand[1] = upper[j]; cand[2] = corner; cand[3] = avg;
          ok[0] = avail.left; ok[1] = avail.up; ok[2] = avail.corner; ok[3] = 1'b1;
          mn = 999; win = -1;
          for (int c = 0; c < 4; c++) begin
            d[c] = (orig[i][j] > cand[c]) ? orig[i][j] - cand[c] : cand[c] - orig[i][j];
            if (ok[c] && d[c] < mn) begin mn = d[c]; win = c; end
          end
          e_sel[i][j] = sel_t'(win);
          e_pred[i][j] = 8'(cand[win]);
          e_res[i][j] = 9'(int'(orig[i][j]) - cand[win]);
          nsel[win]++;
        end
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      checks++;
      if (!out_valid || pred !== e_pred || sel !== e_sel || resid !== e_res) begin
        failures++;
        if (failures < 5) $display("FAIL n=%0d v=%b\n pred %h want %h\n sel %h want %h",
                                   n, out_valid, pred, e_pred, sel, e_sel);
      end
      orig = ~orig;
      @(negedge clk);
      checks++;
      if (out_valid || pred !== e_pred) begin failures++; $display("FAIL hold n=%0d", n); end
    end
    for (int c = 0; c < 4; c++) begin
      checks++; if (nsel[c] == 0) begin failures++; $display("FAIL source %0d never chosen", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
