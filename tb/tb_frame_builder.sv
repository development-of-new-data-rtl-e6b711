// tb_frame_builder: the testbench supplies the word slots (pre_tick/tick
// every 10 cycles) and plays the deserializer FIFO (registered read) that
// receives one byte every 8 cycles during an event. Every word at tick is
// decoded and checked: K.28.1 idle words alternating between their two forms
// outside frames, then K.28.7, the event bytes in order (K.28.1 fillers only
// while the FIFO is empty), K.28.5, and idle again; the running disparity of
// the word stream must stay legal and idle must be low during a frame.
`timescale 1ns/1ps
module tb_frame_builder;
  import readout_pkg::*;
  logic clk = 0, rst_n = 0, pre_tick = 0, tick = 0, sending_event = 0, deser_busy = 0;
  logic fifo_empty, fifo_rd, cw_load, idle;
  logic [7:0] fifo_dout = '0;
  logic [9:0] cw;
  logic [7:0] dbyte;
  logic dk;
  int checks = 0, failures = 0;
  byte unsigned fifo[$];
  int phase = 0;

  frame_builder dut (.*);
  decoder_8b10b u_dec (.din(cw), .dout(dbyte), .k(dk));
  always #5 clk = ~clk;

  assign fifo_empty = (fifo.size() == 0);
  always @(posedge clk) if (fifo_rd) fifo_dout <= fifo.pop_front();

  int cnt = 0;
  always @(posedge clk) cnt <= (cnt == 9) ? 0 : cnt + 1;
  always_comb begin pre_tick = (cnt == 8); tick = (cnt == 9); end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // word checker
  byte unsigned expect_q[$];
  int sofs = 0, eofs = 0, idles = 0, fills = 0, datas = 0, rd_s = 0;
  bit in_frame = 0;
  logic [9:0] last_idle = '0;
  always @(posedge clk) if (rst_n && tick) begin
    int ones, disp;
    ones = 0; for (int i = 0; i < 10; i++) ones += cw[i];
    disp = 2 * ones - 10;
    check(disp == 0 || (disp == 2 && rd_s == 0) || (disp == -2 && rd_s == 1), "running disparity");
    if (disp != 0) rd_s = (disp > 0);
    if (!in_frame) begin
      if (dk && dbyte == K28_7) begin sofs++; in_frame = 1; end
      else begin
        check(dk && dbyte == K28_1, "idle word");
        check(cw != last_idle, "idle words alternate");
        last_idle = cw; idles++;
      end
    end else begin
      check(!idle, "idle low during frame");
      if (dk && dbyte == K28_5) begin eofs++; in_frame = 0; last_idle = '0; check(expect_q.size() == 0, "all bytes before EOF"); end
      else if (dk) begin check(dbyte == K28_1, "filler is K.28.1"); fills++; end
      else begin
        datas++;
        check(expect_q.size() > 0 && dbyte == expect_q[0], $sformatf("data byte %0h", dbyte));
        if (expect_q.size() > 0) void'(expect_q.pop_front());
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (60) @(negedge clk);
    for (int e = 0; e < 10; e++) begin
      int nb;
      nb = $urandom_range(1, 40);
      repeat ($urandom_range(0, 9)) @(negedge clk);
      sending_event = 1; deser_busy = 1;
      if (e % 2 == 1) repeat (25) @(negedge clk);  // late first byte: filler words
      for (int b = 0; b < nb; b++) begin
        byte unsigned v;
        v = 8'($urandom);
        repeat (8) @(negedge clk);
        fifo.push_back(v); expect_q.push_back(v);
      end
      sending_event = 0;
      @(negedge clk) deser_busy = 0;
      wait (idle);
      repeat (30) @(negedge clk);
    end
    check(sofs == 10 && eofs == 10, $sformatf("frames %0d/%0d", sofs, eofs));
    check(idles > 10 && datas > 10 && fills > 0, $sformatf("idles %0d data %0d fills %0d", idles, datas, fills));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
