// tb_word_clock_enable: tick must come every 10th cycle, pre_tick exactly
// one cycle before each tick, neither anywhere else.
`timescale 1ns/1ps
module tb_word_clock_enable;
  logic clk = 0, rst_n = 0, pre_tick, tick;
  int checks = 0, failures = 0;
  word_clock_enable #(.DIV(10)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    int last = -1, n_ticks = 0;
    bit prev_pre = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      if (tick) begin
        checks++;
        if (!prev_pre) begin failures++; $display("FAIL: tick without pre_tick"); end
        if (last >= 0) begin checks++; if (c - last != 10) begin failures++; $display("FAIL: period %0d", c - last); end end
        last = c; n_ticks++;
      end
      if (tick && pre_tick) failures++;
      prev_pre = pre_tick;
    end
    checks++; if (n_ticks != 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
