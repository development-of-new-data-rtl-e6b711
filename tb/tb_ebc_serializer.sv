// tb_ebc_serializer: models the two FIFOs (registered reads) with queues,
// stores events of random length, and checks that each event leaves as its
// bytes MSB first with no gap between bytes, events in order, the line at 0
// between events, and that a length of zero is skipped.
`timescale 1ns/1ps
module tb_ebc_serializer;
  logic clk = 0, rst_n = 0, len_rd, data_rd, sout, busy;
  logic [7:0] len = '0, data = '0;
  logic len_empty;
  int checks = 0, failures = 0;
  byte unsigned dq[$];
  int lq[$];
  bit expect_bits[$];
  int n_events = 0;

  ebc_serializer #(.LEN_W(8)) dut (.*);
  always #5 clk = ~clk;
  assign len_empty = (lq.size() == 0);
  always @(posedge clk) begin
    if (len_rd) len <= 8'(lq.pop_front());
    if (data_rd) begin
      if (dq.size() == 0) begin failures++; $display("FAIL: read of empty data FIFO"); end
      else data <= dq.pop_front();
    end
  end

  // output checker: an event is a run of bits that begins with the first 1
  initial begin
    forever begin
      @(posedge clk); #1;
      if (busy === 1'b0) begin
        checks++;
        if (sout) begin failures++; $display("FAIL: line not 0 when idle"); end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < 40; e++) begin
      int n;
      bit got[$];
      got.delete();
      n = (e == 7) ? 0 : $urandom_range(1, 32);
      for (int i = 0; i < n; i++) begin
        byte unsigned v;
        v = 8'($urandom) | 8'h80;  // MSB set: the event starts on a 1
        dq.push_back(v);
        for (int k = 7; k >= 0; k--) expect_bits.push_back(v[k]);
      end
      lq.push_back(n);
      if (n == 0) begin repeat (10) @(negedge clk); continue; end
      // wait for the first 1, then take 8n bits without a gap
      while (!sout) @(negedge clk);
      for (int i = 0; i < 8 * n; i++) begin
        got.push_back(sout);
        @(negedge clk);
      end
      checks++;
      if (got != expect_bits) begin failures++; $display("FAIL: event %0d bits", e); end
      expect_bits.delete();
      n_events++;
      repeat (3) @(negedge clk);
      checks++; if (busy) begin failures++; $display("FAIL: busy after event"); end
    end
    checks++; if (lq.size() != 0 || dq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
