// tb_level1_detector: drives a random command bit stream with embedded
// 11101 commands and compares the lv1 pulses with a scan of the same bits
// (a match on 5 consecutive bits, restarting after every match), one cycle
// after the last command bit.
`timescale 1ns/1ps
module tb_level1_detector;
  logic clk = 0, rst_n = 0, dti = 0, lv1;
  int checks = 0, failures = 0, pulses = 0;
  bit bits[$];
  level1_detector dut (.*);
  always #5 clk = ~clk;

  initial begin
    int since, n, exp_pulses;
    bit expect_now[$];
    // stream: random noise (with no 1-run longer than 2) and commands
    for (int k = 0; k < 200; k++) begin
      if ($urandom_range(0, 2) == 0) begin bits.push_back(1); bits.push_back(1); bits.push_back(1); bits.push_back(0); bits.push_back(1); end
      else repeat ($urandom_range(1, 6)) bits.push_back(($urandom_range(0, 3) == 0));
      bits.push_back(0);
    end
    // reference: window of the last 5 bits since the previous match
    since = 0; exp_pulses = 0;
    foreach (bits[i]) begin
      bit m;
      since++;
      m = (since >= 5) && bits[i-4] && bits[i-3] && bits[i-2] && !bits[i-1] && bits[i];
      expect_now.push_back(m);
      if (m) begin since = 0; exp_pulses++; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (bits[i]) begin
      dti = bits[i];
      @(negedge clk);
      checks++;
      if (lv1 != expect_now[i]) begin failures++; $display("FAIL bit %0d", i); end
      if (lv1) pulses++;
    end
    checks++;
    if (pulses != exp_pulses || pulses == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
