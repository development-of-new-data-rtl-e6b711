// tb_stream_analyser: an 8b10b frame source (idle words, SOF, bytes, EOF)
// drives the analyser together with the deserializer and decoder. For each
// frame exactly one start, one stop and one length write equal to the number
// of bytes must appear, data_wr must fire once per byte and never for idle
// words; with the data FIFO reported full, bytes are dropped, overflow
// pulses and the length counts only what was stored.
`timescale 1ns/1ps
module tb_stream_analyser;
  import readout_pkg::*;
  logic clk = 0, rst_n = 0, din;
  logic word_valid, word_is_k, data_full = 0, len_full = 0;
  logic [9:0] word;
  logic [7:0] dbyte;
  logic start, stop, sof_rd_pos, data_wr, len_wr, overflow, in_frame;
  logic [7:0] len;
  int checks = 0, failures = 0;
  int n_start = 0, n_stop = 0, n_wr = 0, n_len = 0, n_ovf = 0, last_len = -1;
  byte unsigned got[$];

  frame_source u_src (.clk, .rst_n, .sout(din));
  ebc_deserializer u_des (.clk, .rst_n, .din, .start, .stop, .word_valid, .word);
  decoder_8b10b u_dec (.din(word), .dout(dbyte), .k(word_is_k));
  stream_analyser #(.LEN_W(8)) dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (start) n_start++;
    if (stop) n_stop++;
    if (data_wr) begin n_wr++; got.push_back(dbyte); end
    if (len_wr) begin n_len++; last_len = len; end
    if (overflow) n_ovf++;
  end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (40) @(negedge clk);
    for (int f = 0; f < 12; f++) begin
      byte unsigned b[$];
      int n, s0, w0, l0, o0;
      n = $urandom_range(1, 40);
      b.delete();
      for (int i = 0; i < n; i++) b.push_back(8'($urandom));
      s0 = n_start; w0 = n_wr; l0 = n_len; o0 = n_ovf;
      got.delete();
      data_full = (f == 11);
      u_src.send_frame(b);
      check(n_start == s0 + 1 && n_stop == s0 + 1, "one start and one stop per frame");
      check(n_len == l0 + 1, "one length per frame");
      if (f < 11) begin
        check(n_wr == w0 + n && last_len == n, $sformatf("bytes %0d length %0d expected %0d", n_wr - w0, last_len, n));
        check(got == b, "decoded bytes");
        check(n_ovf == o0, "no overflow");
      end else begin
        check(n_wr == w0 && last_len == 0 && n_ovf == o0 + n, "full FIFO: bytes dropped, overflow counted");
      end
      repeat ($urandom_range(0, 30)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
