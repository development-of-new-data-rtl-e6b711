// tb_ebc_deserializer: random bit stream; start is pulsed at random points
// and every following group of 10 bits must come out as one word (first bit
// in bit 9) until stop; no word may appear outside start..stop.
`timescale 1ns/1ps
module tb_ebc_deserializer;
  logic clk = 0, rst_n = 0, din = 0, start = 0, stop = 0, word_valid;
  logic [9:0] word;
  int checks = 0, failures = 0;
  ebc_deserializer dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 50; f++) begin
      int nw;
      repeat ($urandom_range(1, 15)) begin
        din = 1'($urandom); @(negedge clk);
        checks++; if (word_valid) begin failures++; $display("FAIL: word outside frame"); end
      end
      nw = $urandom_range(1, 8);
      for (int w = 0; w < nw; w++) begin
        logic [9:0] v;
        v = 10'($urandom);
        for (int i = 9; i >= 0; i--) begin
          start = (w == 0 && i == 9);
          din = v[i];
          @(negedge clk);
          start = 0;
        end
        checks++;
        if (!word_valid || word != v) begin failures++; $display("FAIL frame %0d word %0d: %h vs %h", f, w, word, v); end
      end
      stop = 1; din = 1'($urandom); @(negedge clk); stop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
