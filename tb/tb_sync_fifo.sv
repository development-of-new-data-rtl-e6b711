// tb_sync_fifo: random pushes and pops against a queue model; checks the
// registered read data, empty/full/count, simultaneous read and write, and
// that the FIFO holds exactly DEPTH words.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int W = 8, D = 32;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, full, empty;
  logic [W-1:0] din = '0, dout;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  logic [W-1:0] expect_out;
  bit expect_valid;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    // fill completely
    for (int i = 0; i < D; i++) begin
      wr_en = 1; din = W'(i * 7 + 3);
      @(negedge clk);
      model.push_back(W'(i * 7 + 3));
    end
    wr_en = 0;
    @(negedge clk);
    check(full && count == D, "full after DEPTH writes");
    // random traffic
    for (int t = 0; t < 3000; t++) begin
      wr_en = ($urandom_range(0, 1) == 1) && !full;
      rd_en = ($urandom_range(0, 1) == 1) && !empty;
      din   = W'($urandom);
      @(posedge clk);
      expect_valid = rd_en;
      if (rd_en) expect_out = model.pop_front();
      if (wr_en) model.push_back(din);
      @(negedge clk);
      if (expect_valid) check(dout == expect_out, $sformatf("data %0h expected %0h", dout, expect_out));
      check(count == model.size(), "count");
      check(empty == (model.size() == 0) && full == (model.size() == D), "flags");
    end
    // drain
    wr_en = 0;
    n = model.size();
    for (int i = 0; i < n; i++) begin
      rd_en = 1;
      @(posedge clk); expect_out = model.pop_front();
      @(negedge clk); check(dout == expect_out, "drain data");
    end
    rd_en = 0;
    check(empty, "empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
