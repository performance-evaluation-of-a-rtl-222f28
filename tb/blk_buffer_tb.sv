// blk_buffer_tb: loads rows of the 4x4 block buffer in random order and
// checks after each clock that the written row changed and the other rows
// kept their values; also checks that reset clears the block.
`timescale 1ns/1ps
module blk_buffer_tb;
  import bpmm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic ld_en = 1'b0;
  logic [1:0] ld_row = '0;
  row_t ld_data = '0;
  blk_t blk, model;
  int checks = 0, failures = 0;

  blk_buffer dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (blk !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    model = '0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      ld_en = $urandom_range(0, 3) != 0; ld_row = 2'($urandom); ld_data = $urandom;
      if (ld_en) model[ld_row] = ld_data;
      @(negedge clk); ld_en = 1'b0;
      checks++;
      if (blk !== model) begin failures++; $display("FAIL n=%0d %h vs %h", n, blk, model); end
    end
    rst_n = 1'b0; #1;
    checks++; if (blk !== '0) begin failures++; $display("FAIL reset 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
