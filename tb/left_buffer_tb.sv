// left_buffer_tb: random writes of the four per-band left columns with
// combinational reads of every band after each clock, checked against a copy
// kept here; checks the reset value too.
`timescale 1ns/1ps
module left_buffer_tb;
  import bpmm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic wr_en = 1'b0;
  logic [1:0] wr_band = '0, rd_band = '0;
  row_t wr_col = '0, rd_col;
  row_t model [4];
  int checks = 0, failures = 0;

  left_buffer dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 4; b++) model[b] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 2) != 0; wr_band = 2'($urandom); wr_col = $urandom;
      if (wr_en) model[wr_band] = wr_col;
      @(negedge clk); wr_en = 1'b0;
      for (int b = 0; b < 4; b++) begin
        rd_band = 2'(b); #1;
        checks++;
        if (rd_col !== model[b]) begin failures++; $display("FAIL n=%0d band %0d", n, b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
