// bpmm_frame_harness: drives one bpmm_top of a given frame size through
// FRAMES frames and checks every block against a reference model written
// here. The first frame runs with no waiting and checks 192 cycles per
// macroblock; later frames add random waiting on all three handshakes. The
// reconstruction is modelled by rounding each residual to a multiple of QSTEP.
// It reports its check and failure counts, the mechanisms it saw and done.
`timescale 1ns/1ps
module bpmm_frame_harness
  import bpmm_pkg::*;
#(
  parameter int W = 176,
  parameter int H = 144,
  parameter int FRAMES = 2
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_sel [4],
  output int   n_tie,
  output int   n_stall,
  output bit   done
);
  localparam int MBW = W / 16;
  localparam int MBH = H / 16;
  localparam int NMB = MBW * MBH;
  localparam int QSTEP = 6;
  localparam int CYC_PER_MB = 192;


  logic     in_valid, in_ready, out_valid, out_ready, rec_valid, rec_ready;
  row_t     in_data;
  blk_t     out_pred, rec_data;
  sel_blk_t out_sel;
  res_blk_t out_resid;
  logic [$clog2(MBW)-1:0] out_mb_x;
  logic [$clog2(MBH)-1:0] out_mb_y;
  logic [3:0] out_blk;

  bpmm_top #(.FRAME_W(W), .FRAME_H(H)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_pred, .out_sel, .out_resid,
    .out_mb_x, .out_mb_y, .out_blk,
    .rec_valid, .rec_ready, .rec_data
  );

  int unsigned cycle = 0;

  byte unsigned orig  [FRAMES][H][W];
  byte unsigned recon [H][W];

  // mechanism counters
  int n_dc_both, n_dc_up, n_dc_left, n_dc_none;
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
            if (out_f == FRAMES) begin
              done = 1'b1;
              check(n_dc_both > 0 && n_dc_up > 0 && n_dc_left > 0 && n_dc_none > 0, "a DC case never occurred");
              check(FRAMES < 2 || (n_wrap > 0 && n_in_stall > 0 && n_out_stall > 0 && n_rec_wait > 0), "a handshake wait or the frame wrap never occurred");
            end
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

  assign n_stall = n_in_stall + n_out_stall + n_rec_wait;

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    in_valid = 1'b0; out_ready = 1'b0; rec_valid = 1'b0; rec_data = '0;
    n_tie = 0; n_dc_both = 0; n_dc_up = 0; n_dc_left = 0; n_dc_none = 0;
    n_in_stall = 0; n_out_stall = 0; n_rec_wait = 0; n_wrap = 0;
    for (int c = 0; c < 4; c++) n_sel[c] = 0;
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) orig[f][y][x] = gen_pix(f, x, y);
  end

endmodule
