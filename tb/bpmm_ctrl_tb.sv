// bpmm_ctrl_tb: runs the sequencer alone over two frames of a small 48x32
// picture (3x2 macroblocks) with random handshake timing and checks what it
// drives: 64 input words per macroblock written to consecutive addresses, the
// four macroblock-buffer reads of each block at the word of its row, the
// loads of the block buffer one cycle later, the upper-line column and band of
// the block, the availability flags at the frame edges, the H.264 block scan
// and the macroblock raster order with the return to the top of the frame.
// With no waiting it must take exactly 8 cycles per block (192 per
// macroblock).
`timescale 1ns/1ps
module bpmm_ctrl_tb;
  import bpmm_pkg::*;
  localparam int W = 48, H = 32, MBW = W / 16, MBH = H / 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, in_ready, mb_wr_en, mb_rd_en, blk_ld_en, up_rd_en, ref_wr_en;
  logic avg_ld_en, dp_en, out_valid, out_ready = 1'b0, rec_valid = 1'b0, rec_ready;
  logic [5:0] mb_wr_addr, mb_rd_addr;
  logic [1:0] blk_ld_row, band;
  logic [3:0] up_col;
  avail_t avail;
  logic [1:0] mb_x;
  logic mb_y;
  logic [3:0] blk_idx;
  int checks = 0, failures = 0;

  bpmm_ctrl #(.FRAME_W(W), .FRAME_H(H)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit stall;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 2; f++) begin
      stall = (f == 1);
      for (int mb = 0; mb < MBW * MBH; mb++) begin
        int t0, t1;
        // load
        t0 = $time;
        for (int w = 0; w < 64; w++) begin
          in_valid = !stall || $urandom_range(0, 1);
          while (!in_valid) begin
            @(negedge clk);
            check(in_ready && !mb_wr_en, "idle input cycle");
            in_valid = $urandom_range(0, 1);
          end
          #1;
          check(in_ready && mb_wr_en && mb_wr_addr == 6'(w), $sformatf("load word %0d", w));
          @(negedge clk);
        end
        in_valid = 1'b0;
        for (int k = 0; k < 16; k++) begin
          automatic int bx = blk_col(4'(k)), by = blk_row(4'(k));
          automatic int X = (mb % MBW) * 16 + bx * 4, Y = (mb / MBW) * 16 + by * 4;
          t1 = $time;
          check(!in_ready, "input ready outside load");
          check(mb_x == 2'(mb % MBW) && mb_y == 1'(mb / MBW) && blk_idx == 4'(k), "position");
          check(avail.up == (Y > 0) && avail.left == (X > 0) && avail.corner == (X > 0 && Y > 0),
                $sformatf("avail at (%0d,%0d)", X, Y));
          check(up_col == 4'(X / 4) && band == 2'(by), "column/band");
          for (int r = 0; r < 4; r++) begin
            check(mb_rd_en && mb_rd_addr == 6'((4 * by + r) * 4 + bx) && (up_rd_en == (r == 0)),
                  $sformatf("fetch blk %0d row %0d", k, r));
            check(blk_ld_en == (r > 0) && (r == 0 || blk_ld_row == 2'(r - 1)), "block load");
            @(negedge clk);
          end
          check(!mb_rd_en && blk_ld_en && blk_ld_row == 2'd3 && avg_ld_en, "avg cycle");
          @(negedge clk);
          check(dp_en && !out_valid, "predict cycle");
          @(negedge clk);
          out_ready = !stall || $urandom_range(0, 1);
          while (!out_ready) begin
            check(out_valid && !rec_ready, "holding output");
            @(negedge clk);
            out_ready = $urandom_range(0, 1);
          end
          check(out_valid, "output offered");
          @(negedge clk);
          out_ready = 1'b0;
          rec_valid = !stall || $urandom_range(0, 1);
          while (!rec_valid) begin
            check(rec_ready && !ref_wr_en, "waiting for reconstruction");
            @(negedge clk);
            rec_valid = $urandom_range(0, 1);
          end
          #1;
          check(rec_ready && ref_wr_en && up_col == 4'(X / 4) && band == 2'(by), "write back");
          @(negedge clk);
          rec_valid = 1'b0;
          if (!stall) check(($time - t1) == 80, $sformatf("block took %0t", $time - t1));
        end
        if (!stall) check(($time - t0) == 1920, $sformatf("macroblock took %0t", $time - t0));
      end
    end
    check(mb_x == 0 && mb_y == 0 && in_ready, "back at frame start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
