// mb_buffer_tb: fills the macroblock buffer with random words, then reads
// every address back in a shuffled order and checks each word against a copy
// kept here, one cycle after the read is issued. A read with rd_en low must
// leave the output unchanged.
`timescale 1ns/1ps
module mb_buffer_tb;
  import bpmm_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [5:0] wr_addr = '0, rd_addr = '0;
  row_t wr_data = '0, rd_data;
  row_t model [64];
  int checks = 0, failures = 0;

  mb_buffer dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [64];
    for (int pass = 0; pass < 3; pass++) begin
      for (int a = 0; a < 64; a++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_addr = 6'(a); wr_data = $urandom; model[a] = wr_data;
      end
      @(negedge clk); wr_en = 1'b0;
      for (int a = 0; a < 64; a++) order[a] = a;
      for (int a = 63; a > 0; a--) begin
        automatic int b = $urandom_range(0, a); automatic int t = order[a]; order[a] = order[b]; order[b] = t;
      end
      for (int a = 0; a < 64; a++) begin
        @(negedge clk); rd_en = 1'b1; rd_addr = 6'(order[a]);
        @(negedge clk); rd_en = 1'b0;
        checks++;
        if (rd_data !== model[order[a]]) begin
          failures++; $display("FAIL addr %0d: %h vs %h", order[a], rd_data, model[order[a]]);
        end
        rd_addr = 6'(order[a] ^ 1);
        @(negedge clk);
        checks++;
        if (rd_data !== model[order[a]]) begin failures++; $display("FAIL hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
