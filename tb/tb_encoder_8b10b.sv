// tb_encoder_8b10b: the twelve control symbols in both disparities against
// the printed control-symbol table, the 3b/4b column of the data table for
// x = 3 (balanced 6-bit part), the A7 alternate cases, a few well-known code
// words, and for all 512 data inputs the disparity rules: word disparity 0 or
// +-2 against the RD, rd_out consistent, and no run longer than 5 bits in a
// long random data stream.
`timescale 1ns/1ps
module tb_encoder_8b10b;
  logic [7:0] din;
  logic k, rd_in, rd_out;
  logic [9:0] dout;
  int checks = 0, failures = 0;
  encoder_8b10b dut (.*);

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int ones(input logic [9:0] w);
    int n = 0; for (int i = 0; i < 10; i++) n += w[i]; return n;
  endfunction

  task automatic enc(input logic [7:0] d, input logic kk, input logic rd);
    din = d; k = kk; rd_in = rd; #1;
  endtask

  // control symbols: {byte, RD- word, RD+ word}
  logic [7:0] kb [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC, 8'hF7, 8'hFB, 8'hFD, 8'hFE};
  logic [9:0] kn [12] = '{10'b0011110100, 10'b0011111001, 10'b0011110101, 10'b0011110011,
                          10'b0011110010, 10'b0011111010, 10'b0011110110, 10'b0011111000,
                          10'b1110101000, 10'b1101101000, 10'b1011101000, 10'b0111101000};
  logic [9:0] kp [12] = '{10'b1100001011, 10'b1100000110, 10'b1100001010, 10'b1100001100,
                          10'b1100001101, 10'b1100000101, 10'b1100001001, 10'b1100000111,
                          10'b0001010111, 10'b0010010111, 10'b0100010111, 10'b1000010111};
  // 3b/4b table (x = 3 keeps RD): RD- and RD+ columns
  logic [3:0] t4n [8] = '{4'b1011, 4'b1001, 4'b0101, 4'b1100, 4'b1101, 4'b1010, 4'b0110, 4'b1110};
  logic [3:0] t4p [8] = '{4'b0100, 4'b1001, 4'b0101, 4'b0011, 4'b0010, 4'b1010, 4'b0110, 4'b0001};

  initial begin
    int run, rd_s, last;
    for (int i = 0; i < 12; i++) begin
      enc(kb[i], 1, 0); check(dout == kn[i], $sformatf("K %h RD-", kb[i]));
      check(rd_out == (ones(kn[i]) != 5), "K rd_out RD-");
      enc(kb[i], 1, 1); check(dout == kp[i], $sformatf("K %h RD+", kb[i]));
    end
    for (int y = 0; y < 8; y++) begin
      enc({3'(y), 5'd3}, 0, 0); check(dout == {6'b110001, t4n[y]}, $sformatf("D.3.%0d RD-", y));
      enc({3'(y), 5'd3}, 0, 1); check(dout == {6'b110001, t4p[y]}, $sformatf("D.3.%0d RD+", y));
    end
    enc({3'd7, 5'd17}, 0, 0); check(dout[3:0] == 4'b0111, "D.17.7 uses A7 at RD-");
    enc({3'd7, 5'd20}, 0, 0); check(dout[3:0] == 4'b0111, "D.20.7 uses A7 at RD-");
    enc({3'd7, 5'd11}, 0, 1); check(dout[3:0] == 4'b1000, "D.11.7 uses A7 at RD+");
    enc({3'd7, 5'd17}, 0, 1); check(dout[3:0] == 4'b0001, "D.17.7 uses P7 at RD+");
    enc({3'd5, 5'd21}, 0, 0); check(dout == 10'b1010101010, "D.21.5");
    enc(8'h00, 0, 0); check(dout == 10'b1001110100, "D.0.0 RD-");
    enc(8'h00, 0, 1); check(dout == 10'b0110001011, "D.0.0 RD+");
    for (int d = 0; d < 256; d++) for (int r = 0; r < 2; r++) begin
      int disp;
      enc(8'(d), 0, 1'(r));
      disp = 2 * ones(dout) - 10;
      check(disp == 0 || (disp == 2 && r == 0) || (disp == -2 && r == 1), $sformatf("disparity D%0d rd%0d", d, r));
      check(rd_out == ((disp == 0) ? 1'(r) : ~1'(r)), "rd_out");
    end
    // run length in a random data stream
    rd_s = 0; run = 0; last = 2;
    for (int n = 0; n < 5000; n++) begin
      enc(8'($urandom), 0, 1'(rd_s));
      for (int b = 9; b >= 0; b--) begin
        if (dout[b] == last) run++; else run = 1;
        last = dout[b];
        if (run > 5) begin failures++; $display("FAIL: run of %0d", run); end
      end
      rd_s = rd_out;
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
