// bpmm_top_sizes_tb: runs the predictor at the other frame sizes evaluated
// for this scheme, each in its own instance configured for that size:
// QCIF 176x144 (two frames, the second with random handshake waits),
// 1280x720 and 3840x2160 (one frame each, no waits). Every block of every
// frame is checked against the reference model of bpmm_frame_harness, and
// each instance must have chosen every source and broken ties.
`timescale 1ns/1ps
module bpmm_top_sizes_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 3;
  int checks_i [N], failures_i [N], tie_i [N], stall_i [N];
  int sel_i [N][4];
  bit done_i [N];
  int checks = 0, failures = 0;

  bpmm_frame_harness #(.W(176),  .H(144),  .FRAMES(2)) u_qcif (
    .clk, .rst_n, .checks(checks_i[0]), .failures(failures_i[0]), .n_sel(sel_i[0]),
    .n_tie(tie_i[0]), .n_stall(stall_i[0]), .done(done_i[0]));
  bpmm_frame_harness #(.W(1280), .H(720),  .FRAMES(1)) u_720p (
    .clk, .rst_n, .checks(checks_i[1]), .failures(failures_i[1]), .n_sel(sel_i[1]),
    .n_tie(tie_i[1]), .n_stall(stall_i[1]), .done(done_i[1]));
  bpmm_frame_harness #(.W(3840), .H(2160), .FRAMES(1)) u_2160p (
    .clk, .rst_n, .checks(checks_i[2]), .failures(failures_i[2]), .n_sel(sel_i[2]),
    .n_tie(tie_i[2]), .n_stall(stall_i[2]), .done(done_i[2]));

  task automatic sum_up();
    checks = 0; failures = 0;
    for (int k = 0; k < N; k++) begin checks += checks_i[k]; failures += failures_i[k]; end
  endtask

  initial begin
    repeat (8_000_000) @(posedge clk);
    sum_up();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_i[0] && done_i[1] && done_i[2]);
    repeat (2) @(posedge clk);
    sum_up();
    for (int k = 0; k < N; k++) begin
      $display("instance %0d: checks=%0d failures=%0d sel %0d/%0d/%0d/%0d ties %0d waits %0d",
               k, checks_i[k], failures_i[k], sel_i[k][0], sel_i[k][1], sel_i[k][2], sel_i[k][3],
               tie_i[k], stall_i[k]);
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (sel_i[k][c] == 0) begin failures++; $display("FAIL instance %0d never chose source %0d", k, c); end
      end
      checks++;
      if (tie_i[k] == 0) begin failures++; $display("FAIL instance %0d saw no tie", k); end
    end
    checks++;
    if (stall_i[0] == 0) begin failures++; $display("FAIL no handshake wait at QCIF"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
