// tb_mcc_deserializer: random event windows (sending_event high for 1..120
// bits of random data); after each window the FIFO is drained and the bytes
// must be the window's bits, first bit as MSB, the last byte filled with
// zeros. busy must fall only after the last byte is stored.
`timescale 1ns/1ps
module tb_mcc_deserializer;
  logic clk = 0, rst_n = 0, raw_in = 0, sending_event = 0, rd_en = 0;
  logic [7:0] dout;
  logic empty, busy, overflow;
  int checks = 0, failures = 0;
  mcc_deserializer #(.DEPTH(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 100; w++) begin
      bit bits[$];
      int n, nbytes;
      bits.delete();
      n = $urandom_range(1, 120);
      for (int i = 0; i < n; i++) bits.push_back(1'($urandom));
      while (bits.size() % 8 != 0) bits.push_back(0);
      nbytes = bits.size() / 8;
      for (int i = 0; i < n; i++) begin
        sending_event = 1; raw_in = bits[i];
        @(negedge clk);
      end
      sending_event = 0; raw_in = 0;
      while (busy) @(negedge clk);
      for (int b = 0; b < nbytes; b++) begin
        logic [7:0] e;
        for (int i = 0; i < 8; i++) e[7 - i] = bits[8 * b + i];
        checks++;
        if (empty) begin failures++; $display("FAIL: missing byte %0d of %0d", b, nbytes); break; end
        rd_en = 1; @(negedge clk); rd_en = 0;
        if (dout != e) begin failures++; $display("FAIL: byte %0h expected %0h", dout, e); end
      end
      checks++; if (!empty) begin failures++; $display("FAIL: extra bytes"); end
      while (!empty) begin rd_en = 1; @(negedge clk); rd_en = 0; end
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    checks++; if (overflow) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
