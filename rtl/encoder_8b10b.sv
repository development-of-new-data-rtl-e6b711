// encoder_8b10b: combinational 8b10b encoder.
//
// The byte is split into EDCBA (x, 5 bits) and HGF (y, 3 bits). x is mapped
// to a 6-bit sub-block abcdei and y to a 4-bit sub-block fghj. Each sub-block
// has an RD- form; where that form is unbalanced (or is 111000 / 1100) the
// complement is sent when the running disparity (RD) before the sub-block is
// positive, so the stream never drifts by more than one. For y = 7 the
// alternate code A7 is used after x = 17, 18, 20 at RD- and x = 11, 13, 14 at
// RD+, to avoid a run of five equal bits. With k = 1 the byte must be one of
// the twelve control symbols K.28.0-7, K.23.7, K.27.7, K.29.7, K.30.7; the
// RD+ form of a control word is the complement of its RD- form.
//
// rd_in / rd_out: 0 = RD -1, 1 = RD +1. dout = {a,b,c,d,e,i,f,g,h,j}, a in
// bit 9 and sent first. No clock: the caller keeps the RD register.
// The 3b/4b table, the control symbols and the A7 rule follow the thesis; the
// 5b/6b table is the standard one.
module encoder_8b10b
  import readout_pkg::*;
(
  input  logic [7:0] din,
  input  logic       k,
  input  logic       rd_in,
  output logic [9:0] dout,
  output logic       rd_out
);
  logic [4:0] x;
  logic [2:0] y;
  logic [5:0] s6;
  logic [3:0] s4;
  logic       rd_mid;
  logic       use_a7;

  assign x = din[4:0];
  assign y = din[7:5];

  always_comb begin
    s6     = enc6_rdn(x);
    s4     = '0;
    rd_mid = rd_in;
    use_a7 = 1'b0;
    if (k) begin
      // control symbol: build the RD- form, complement all for RD+
      if (x == 5'd28) begin
        s6 = 6'b001111;
        s4 = k28_fghj_rdn(y);
      end else begin
        s4 = 4'b1000;  // K.23/27/29/30.7
      end
      dout = rd_in ? ~{s6, s4} : {s6, s4};
    end else begin
      if (rd_in && (disparity6(s6) != 0 || x == 5'd7)) s6 = ~s6;
      rd_mid = (disparity6(s6) != 0) ? ~rd_in : rd_in;
      if (y == 3'd7)
        use_a7 = (!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                 ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14));
      s4 = use_a7 ? 4'b0111 : enc4_rdn(y);
      if (rd_mid && (disparity4(s4) != 0 || y == 3'd3)) s4 = ~s4;
      dout = {s6, s4};
    end
    rd_out = (disparity10(dout) != 0) ? ~rd_in : rd_in;
  end
endmodule
