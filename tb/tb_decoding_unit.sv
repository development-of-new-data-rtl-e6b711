// tb_decoding_unit: an 8b10b frame source drives the decoding unit. Each
// clean frame of 1 to 32 bytes must come out on dec_out as exactly its bytes,
// MSB first without gaps, with no debug pulse and no overflow. A frame with
// one flipped bit must give at least one debug pulse (its output is not
// compared). A 40-byte frame must report 8 dropped bytes on overflow, and
// the next frame must pass intact.
`timescale 1ns/1ps
module tb_decoding_unit;
  logic clk = 0, rst_n = 0, enc_in, dec_out, debug, overflow, in_frame;
  int checks = 0, failures = 0, n_dbg = 0, n_ovf = 0;

  frame_source u_src (.clk, .rst_n, .sout(enc_in));
  decoding_unit dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (debug) n_dbg++;
    if (overflow) n_ovf++;
  end

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // the event starts with a 1 (first byte has its MSB set); take nbits then
  task automatic capture(input int nbits, output bit got[$]);
    got.delete();
    @(negedge clk);
    while (!dec_out) @(negedge clk);
    for (int i = 0; i < nbits; i++) begin
      got.push_back(dec_out);
      @(negedge clk);
    end
  endtask

  task automatic run_frame(input int n, input int flip, input int n_out);
    byte unsigned b[$];
    bit exp_bits[$], got[$];
    for (int i = 0; i < n; i++) b.push_back(i == 0 ? (8'($urandom) | 8'h80) : 8'($urandom));
    for (int i = 0; i < n_out; i++)
      for (int k = 7; k >= 0; k--) exp_bits.push_back(b[i][k]);
    u_src.flip_bit = flip;
    if (n_out == 0) begin
      u_src.send_frame(b);
      return;
    end
    fork
      u_src.send_frame(b);
      capture(8 * n_out, got);
    join
    if (flip < 0) check(got == exp_bits, $sformatf("frame of %0d bytes decoded", n));
  endtask

  initial begin
    int d0, o0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (30) @(negedge clk);
    for (int f = 0; f < 30; f++) begin
      int n;
      d0 = n_dbg; o0 = n_ovf;
      n = (f < 4) ? 32 - f : $urandom_range(1, 32);
      run_frame(n, -1, n);
      check(n_dbg == d0 && n_ovf == o0, "clean frame: no debug, no overflow");
    end
    for (int f = 0; f < 20; f++) begin
      int n;
      n = $urandom_range(4, 20);
      d0 = n_dbg;
      run_frame(n, $urandom_range(10, 10 * (n + 2) - 1), 0);
      repeat (5) @(negedge clk);
      check(n_dbg > d0, "flipped bit reported on debug");
    end
    // a flip in an EOF word leaves the frame open until the next EOF: close
    // it with one more frame and let everything drain before going on
    run_frame(3, -1, 0);
    repeat (600) @(negedge clk);
    o0 = n_ovf;
    run_frame(40, -1, 32);
    check(n_ovf == o0 + 8, $sformatf("40-byte frame: %0d dropped", n_ovf - o0));
    d0 = n_dbg; o0 = n_ovf;
    run_frame(17, -1, 17);
    check(n_dbg == d0 && n_ovf == o0, "frame after overflow is clean");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
