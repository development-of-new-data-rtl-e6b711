// decoder_8b10b: combinational 10b-to-8b decoder.
//
// abcdei is matched against both running-disparity forms of every 5b/6b code
// and fghj against the 3b/4b codes, giving the byte {HGF, EDCBA}. A word whose
// 6-bit part is 001111/110000 is K.28.y; a word ending in 1000/0111 after the
// 6-bit code of 23, 27, 29 or 30 is K.x.7; k is then set. For K.28.y in its
// RD+ form the 4-bit part is complemented before lookup. The decoder does no
// error checking: an invalid word yields some byte, and disparity errors are
// left to decoding_monitor, as in the eBOC decoding unit. Pure
// combinational; din = {a,b,c,d,e,i,f,g,h,j}, a in bit 9.
module decoder_8b10b
  import readout_pkg::*;
(
  input  logic [9:0] din,
  output logic [7:0] dout,
  output logic       k
);
  logic [5:0] s6;
  logic [3:0] s4, s4k;
  logic [4:0] x;
  logic [2:0] y;
  logic       is_k28, is_kx7;

  assign s6 = din[9:4];
  assign s4 = din[3:0];

  always_comb begin
    x = '0;
    for (int i = 0; i < 32; i++) begin
      logic [5:0] c;
      c = enc6_rdn(5'(i));
      if (s6 == c) x = 5'(i);
      if ((disparity6(c) != 0 || i == 7) && s6 == ~c) x = 5'(i);
    end
    is_k28 = (s6 == 6'b001111) || (s6 == 6'b110000);
    is_kx7 = !is_k28 && (s4 == 4'b1000 || s4 == 4'b0111) &&
             (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30);
    s4k = (s6 == 6'b110000) ? ~s4 : s4;
    y = '0;
    if (is_k28) begin
      for (int j = 0; j < 8; j++)
        if (s4k == k28_fghj_rdn(3'(j))) y = 3'(j);
      x = 5'd28;
    end else begin
      case (s4)
        4'b1011, 4'b0100:                   y = 3'd0;
        4'b1001:                            y = 3'd1;
        4'b0101:                            y = 3'd2;
        4'b1100, 4'b0011:                   y = 3'd3;
        4'b1101, 4'b0010:                   y = 3'd4;
        4'b1010:                            y = 3'd5;
        4'b0110:                            y = 3'd6;
        4'b1110, 4'b0001, 4'b0111, 4'b1000: y = 3'd7;
        default:                            y = 3'd0;
      endcase
    end
    k    = is_k28 || is_kx7;
    dout = {y, x};
  end
endmodule
