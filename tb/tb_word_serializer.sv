// tb_word_serializer: loads a random word each 10-cycle slot (load and start
// together) and checks that the word loaded in the previous slot leaves
// MSB first, one bit per clock, with no gap.
`timescale 1ns/1ps
module tb_word_serializer;
  logic clk = 0, rst_n = 0, load = 0, start = 0, sout;
  logic [9:0] din = '0;
  int checks = 0, failures = 0;
  word_serializer #(.WIDTH(10)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    logic [9:0] prev;
    repeat (3) @(negedge clk);
    rst_n = 1;
    prev = '0;
    for (int w = 0; w < 200; w++) begin
      logic [9:0] cur;
      cur = 10'($urandom);
      load = 1; start = 1; din = cur;
      @(negedge clk);
      load = 0; start = 0;
      for (int b = 9; b >= 0; b--) begin
        if (w > 0) begin
          checks++;
          if (sout != prev[b]) begin failures++; $display("FAIL word %0d bit %0d", w, b); end
        end
        if (b > 0) @(negedge clk);
      end
      prev = cur;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
