// bpmm_top_tb: end-to-end test of the BPMM predictor over two full CIF frames
// at the default parameters.
//
// The test bench plays the rest of the encoder. It streams every macroblock of
// a generated frame over the 32-bit bus, takes each predicted 4x4 block and
// returns a reconstructed block made by a simple model of the transform and
// quantisation loop: residuals are rounded to a multiple of QSTEP and added
// back to the prediction. A reference model written here from the prediction
// rule (per pixel, the available reference closest to the original, ties to
// horizontal, vertical, corner, DC) recomputes every prediction, source code
// and residual from its own copy of the reconstructed frame.
//
// Frame 0 runs with no waiting on any handshake and checks that each
// macroblock takes exactly 192 cycles. Frame 1 adds random gaps on the input
// bus, random back-pressure on the output and random reconstruction delay.
// The test counts how often each mechanism occurs (each source code, ties
// broken by priority, each DC case, missing neighbours at the frame edges,
// the three kinds of waiting, the return to the top of the frame) and fails
// a mechanism that never occurred.
`timescale 1ns/1ps
module bpmm_top_tb;
  import bpmm_pkg::*;

  localparam int W = 352;
  localparam int H = 288;
  localparam int MBW = W / 16;
  localparam int MBH = H / 16;
  localparam int NMB = MBW * MBH;
  localparam int FRAMES = 2;
  localparam int QSTEP = 6;
  localparam int CYC_PER_MB = 192;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic     in_valid, in_ready, out_valid, out_ready, rec_valid, rec_ready;
  row_t     in_data;
  blk_t     out_pred, rec_data;
  sel_blk_t out_sel;
  res_blk_t out_resid;
  logic [$clog2(MBW)-1:0] out_mb_x;
  logic [$clog2(MBH)-1:0] out_mb_y;
  logic [3:0] out_blk;

  bpmm_top dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_pred, .out_sel, .out_resid,
    .out_mb_x, .out_mb_y, .out_blk,
    .rec_valid, .rec_ready, .rec_data
  );

  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  byte unsigned orig  [FRAMES][H][W];
  byte unsigned recon [H][W];

  // mechanism counters
  int n_sel [4];
  int n_tie, n_dc_both, n_dc_up, n_dc_left, n_dc_none;
  int n_in_stall, n_out_stall, n_rec_wait, n_wrap;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // Test picture: 32x32 tiles of different character: flat, horizontal
  // stripes, vertical stripes, ramps and noise, so every predictor wins
  // somewhere and exact ties are common.
  function automatic byte unsigned gen_pix(int f, int x, int y);
    int t = ((x / 32) + 3 * (y / 32) + f) % 6;
    case (t)
      0: return 8'(100 + 20 * f);
      1: return 8'(40 + 10 * (y % 7));
      2: return 8'(200 - 9 * (x % 5));
      3: return 8'(x + y);
      4: return 8'($urandom_range(0, 255));
      default: return 8'(128 + (($urandom_range(0, 6)) - 3));
    endcase
  endfunction

  function automatic int clip8(int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  function automatic int quant(int r);
    int a = (r < 0) ? -r : r;
    int q = ((a + QSTEP / 2) / QSTEP) * QSTEP;
    return (r < 0) ? -q : q;
  endfunction

  // ---------------------------------------------------------------- input
  int  in_f = 0, in_mb = 0, in_w = 0;
  bit  stall_mode = 1'b0;
  int  mb_start_cycle = -1;

  function automatic row_t word_of(int f, int mb, int w);
    int x0 = (mb % MBW) * 16 + (w % 4) * 4;
    int y  = (mb / MBW) * 16 + w / 4;
    row_t r;
    for (int k = 0; k < 4; k++) r[k] = orig[f][y][x0 + k];
    return r;
  endfunction

  always_comb in_data = word_of(in_f < FRAMES ? in_f : 0, in_mb, in_w);

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) begin
        if (in_w == 0) begin
          if (!stall_mode && mb_start_cycle >= 0)
            check(cycle - mb_start_cycle == CYC_PER_MB,
                  $sformatf("macroblock took %0d cycles", cycle - mb_start_cycle));
          mb_start_cycle = cycle;
        end
        if (in_w == 63) begin
          in_w = 0;
          if (in_mb == NMB - 1) begin in_mb = 0; in_f++; end
          else in_mb++;
        end else in_w++;
      end else if (in_ready && !in_valid) n_in_stall++;
      in_valid <= (in_f < FRAMES) && (!stall_mode || $urandom_range(0, 3) != 0);
    end
  end

  // --------------------------------------------------- output and recon
  int out_f = 0, out_mb = 0, out_k = 0;
  int rec_delay = 0;
  bit rec_pend = 1'b0;
  bit done = 1'b0;

  task automatic check_block(int f, int mb, int k);
    int bx = (k & 1) | ((k >> 1) & 2);
    int by = ((k >> 1) & 1) | ((k >> 2) & 2);
    int X = (mb % MBW) * 16 + bx * 4;
    int Y = (mb / MBW) * 16 + by * 4;
    bit up = (Y > 0), left = (X > 0), cor = up && left;
    int U[4], L[4], M, avg, su, sl;
    su = 0; sl = 0;
    for (int q = 0; q < 4; q++) begin
      U[q] = up   ? recon[Y-1][X+q] : 0;
      L[q] = left ? recon[Y+q][X-1] : 0;
      su += U[q]; sl += L[q];
    end
    M = cor ? recon[Y-1][X-1] : 0;
    if (up && left)  begin avg = (su + sl + 4) >> 3; n_dc_both++; end
    else if (up)     begin avg = (su + 2) >> 2;      n_dc_up++;   end
    else if (left)   begin avg = (sl + 2) >> 2;      n_dc_left++; end
    else             begin avg = 128;                n_dc_none++; end

    check(out_mb_x == mb % MBW && out_mb_y == mb / MBW && out_blk == k,
          $sformatf("position: got mb (%0d,%0d) blk %0d, want mb %0d blk %0d",
                    out_mb_x, out_mb_y, out_blk, mb, k));
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        int p = orig[f][Y+i][X+j];
        int cand[4], d[4], mn, nmin, win;
        bit ok[4];
        cand[0] = L[i]; ok[0] = left;   // horizontal
        cand[1] = U[j]; ok[1] = up;     // vertical
        cand[2] = M;    ok[2] = cor;    // corner
        cand[3] = avg;  ok[3] = 1'b1;   // DC
        mn = 1000;
        for (int c = 0; c < 4; c++) begin
          d[c] = (p > cand[c]) ? p - cand[c] : cand[c] - p;
          if (ok[c] && d[c] < mn) mn = d[c];
        end
        win = -1; nmin = 0;
        for (int c = 0; c < 4; c++)
          if (ok[c] && d[c] == mn) begin
            nmin++;
            if (win < 0) win = c;
          end
        if (nmin > 1) n_tie++;
        n_sel[win]++;
        check(out_sel[i][j] == sel_t'(win) && out_pred[i][j] == 8'(cand[win]) &&
              out_resid[i][j] == 9'(p - cand[win]),
              $sformatf("f%0d mb%0d blk%0d pix(%0d,%0d): sel %0d pred %0d res %0d, want %0d %0d %0d",
                        f, mb, k, i, j, out_sel[i][j], out_pred[i][j], out_resid[i][j],
                        win, cand[win], p - cand[win]));
        recon[Y+i][X+j] = 8'(clip8(cand[win] + quant(p - cand[win])));
      end
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (rec_valid && rec_ready) begin
        rec_valid <= 1'b0;
        rec_pend = 1'b0;
      end else if (rec_ready && !rec_valid) n_rec_wait++;

      if (out_valid && !out_ready) n_out_stall++;
      if (out_valid && out_ready) begin
        int bx, by, X, Y;
        bx = (out_k & 1) | ((out_k >> 1) & 2);
        by = ((out_k >> 1) & 1) | ((out_k >> 2) & 2);
        X = (out_mb % MBW) * 16 + bx * 4;
        Y = (out_mb / MBW) * 16 + by * 4;
        if (out_f > 0 && out_mb == 0 && out_k == 0) n_wrap++;
        check_block(out_f, out_mb, out_k);
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) rec_data[i][j] <= recon[Y+i][X+j];
        rec_pend = 1'b1;
        rec_delay = stall_mode ? $urandom_range(0, 3) : 0;
        if (out_k == 15) begin
          out_k = 0;
          if (out_mb == NMB - 1) begin
            out_mb = 0; out_f++;
            stall_mode = 1'b1;
            mb_start_cycle = -1;
            if (out_f == FRAMES) done = 1'b1;
          end else out_mb++;
        end else out_k++;
      end
      if (rec_pend && !(rec_valid && rec_ready)) begin
        if (rec_delay == 0) rec_valid <= 1'b1;
        else rec_delay--;
      end
      out_ready <= !stall_mode || $urandom_range(0, 2) != 0;
    end
  end

  always @(posedge clk) cycle++;

  // Watchdog
  initial begin
    repeat (FRAMES * NMB * 600 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; out_ready = 1'b0; rec_valid = 1'b0; rec_data = '0;
    n_tie = 0; n_dc_both = 0; n_dc_up = 0; n_dc_left = 0; n_dc_none = 0;
    n_in_stall = 0; n_out_stall = 0; n_rec_wait = 0; n_wrap = 0;
    for (int c = 0; c < 4; c++) n_sel[c] = 0;
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) orig[f][y][x] = gen_pix(f, x, y);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    repeat (2) @(posedge clk);
    $display("sel hor=%0d ver=%0d cor=%0d dc=%0d ties=%0d", n_sel[0], n_sel[1], n_sel[2], n_sel[3], n_tie);
    $display("dc both=%0d up=%0d left=%0d none=%0d", n_dc_both, n_dc_up, n_dc_left, n_dc_none);
    $display("stalls in=%0d out=%0d rec=%0d wraps=%0d", n_in_stall, n_out_stall, n_rec_wait, n_wrap);
    check(n_sel[0] > 0, "horizontal never chosen");
    check(n_sel[1] > 0, "vertical never chosen");
    check(n_sel[2] > 0, "corner never chosen");
    check(n_sel[3] > 0, "DC never chosen");
    check(n_tie > 0, "no tie occurred");
    check(n_dc_both > 0 && n_dc_up > 0 && n_dc_left > 0 && n_dc_none > 0, "a DC case never occurred");
    check(n_in_stall > 0, "input never stalled");
    check(n_out_stall > 0, "output never back-pressured");
    check(n_rec_wait > 0, "reconstruction never waited");
    check(n_wrap > 0, "frame never wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
