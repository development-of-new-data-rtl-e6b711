// tb_decoder_8b10b: decodes the printed control symbols in both forms and,
// through the encoder, every data byte in both disparities; each must give
// back the byte with the right control flag.
`timescale 1ns/1ps
module tb_decoder_8b10b;
  logic [9:0] din, ew;
  logic [7:0] dout, ed;
  logic k, ek, erd, erd_out;
  int checks = 0, failures = 0;
  decoder_8b10b dut (.*);
  encoder_8b10b u_ref (.din(ed), .k(ek), .rd_in(erd), .dout(ew), .rd_out(erd_out));

  logic [7:0] kb [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC, 8'hF7, 8'hFB, 8'hFD, 8'hFE};
  logic [9:0] kn [12] = '{10'b0011110100, 10'b0011111001, 10'b0011110101, 10'b0011110011,
                          10'b0011110010, 10'b0011111010, 10'b0011110110, 10'b0011111000,
                          10'b1110101000, 10'b1101101000, 10'b1011101000, 10'b0111101000};

  initial begin
    for (int i = 0; i < 12; i++) begin
      din = kn[i]; #1;
      checks++; if (dout != kb[i] || !k) begin failures++; $display("FAIL K%0d RD-", i); end
      din = ~kn[i]; #1;
      checks++; if (dout != kb[i] || !k) begin failures++; $display("FAIL K%0d RD+", i); end
    end
    for (int d = 0; d < 256; d++) for (int r = 0; r < 2; r++) begin
      ed = 8'(d); ek = 0; erd = 1'(r); #1;
      din = ew; #1;
      checks++;
      if (dout != 8'(d) || k) begin failures++; $display("FAIL D%0h rd%0d -> %0h k%0d", d, r, dout, k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
