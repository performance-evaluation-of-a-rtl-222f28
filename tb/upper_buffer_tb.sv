// upper_buffer_tb: random writes and reads of the frame-wide upper reference
// line at its default CIF width (88 words), checked against a copy kept here.
// Each read is checked one cycle after it is issued; a write and a read of the
// same word in one cycle must return the old word.
`timescale 1ns/1ps
module upper_buffer_tb;
  import bpmm_pkg::*;
  localparam int COLS = 352 / 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [6:0] wr_col = '0, rd_col = '0;
  row_t wr_data = '0, rd_data;
  row_t model [COLS];
  int checks = 0, failures = 0;

  upper_buffer dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < COLS; a++) begin
      @(negedge clk); wr_en = 1'b1; wr_col = 7'(a); wr_data = $urandom; model[a] = wr_data;
    end
    for (int n = 0; n < 1000; n++) begin
      row_t expect_q;
      @(negedge clk);
      rd_en = 1'b1; rd_col = 7'($urandom_range(0, COLS - 1));
      wr_en = $urandom_range(0, 1);
      wr_col = ($urandom_range(0, 3) == 0) ? rd_col : 7'($urandom_range(0, COLS - 1));
      wr_data = $urandom;
      expect_q = model[rd_col];
      if (wr_en) model[wr_col] = wr_data;
      @(negedge clk); rd_en = 1'b0; wr_en = 1'b0;
      checks++;
      if (rd_data !== expect_q) begin failures++; $display("FAIL n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
