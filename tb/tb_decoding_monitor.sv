// tb_decoding_monitor: after a SOF of either form, a long run of correctly
// encoded words (random data and control symbols, encoded here with the
// running disparity continued from the SOF) must raise no error. Words with
// a single flipped bit, an unbalanced word against the RD and a word of
// disparity 4 must each raise err for exactly one cycle.
`timescale 1ns/1ps
module tb_decoding_monitor;
  import readout_pkg::*;
  logic clk = 0, rst_n = 0, sof = 0, sof_rd_pos = 0, word_valid = 0, err;
  logic [9:0] word = '0;
  logic [7:0] e_din; logic e_k, e_rd, e_rd_out; logic [9:0] e_dout;
  int checks = 0, failures = 0, errs = 0;
  decoding_monitor dut (.*);
  encoder_8b10b u_enc (.din(e_din), .k(e_k), .rd_in(e_rd), .dout(e_dout), .rd_out(e_rd_out));
  always #5 clk = ~clk;
  always @(posedge clk) if (err) errs++;

  task automatic put(input logic [9:0] w);
    @(negedge clk); word = w; word_valid = 1;
    @(negedge clk); word_valid = 0;
  endtask

  task automatic start_frame(input bit pos);
    @(negedge clk); sof = 1; sof_rd_pos = pos;
    @(negedge clk); sof = 0;
    e_rd = pos;
  endtask

  task automatic good_word();
    e_din = 8'($urandom); e_k = 0; #1;
    put(e_dout); e_rd = e_rd_out;
  endtask

  initial begin
    int e0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      start_frame(f % 2);
      repeat (50) good_word();
      e_din = K28_5; e_k = 1; #1; put(e_dout); e_rd = e_rd_out;
    end
    @(negedge clk);
    checks++; if (errs != 0) begin failures++; $display("FAIL: %0d errors on a clean stream", errs); end
    // single bit flips: caught by the next unbalanced word at the latest
    for (int f = 0; f < 30; f++) begin
      start_frame(0);
      repeat (5) good_word();
      e0 = errs;
      e_din = 8'($urandom); e_k = 0; #1;
      put(e_dout ^ (10'd1 << $urandom_range(0, 9))); e_rd = e_rd_out;
      repeat (5) good_word();
      e_din = K28_5; e_k = 1; #1; put(e_dout); e_rd = e_rd_out;
      @(negedge clk);
      checks++; if (errs == e0) begin failures++; $display("FAIL: flip %0d not seen", f); end
    end
    // +2 word at RD+ and a disparity-4 word: one-cycle pulse each
    start_frame(1);
    @(negedge clk); word = 10'b0011111001; word_valid = 1;   // +2 at RD+
    @(negedge clk); word_valid = 0;
    checks++; if (!err) begin failures++; $display("FAIL: +2 at RD+"); end
    @(negedge clk);
    checks++; if (err) begin failures++; $display("FAIL: pulse longer than one cycle"); end
    start_frame(0);
    e0 = errs;
    put(10'b1111101100);
    @(negedge clk);
    checks++; if (errs != e0 + 1) begin failures++; $display("FAIL: disparity 4"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
