// readout_pkg: constants and types shared by the MCC module emulator and the
// eBOC 8b10b decoding unit.
//
// 8b10b code words are held as logic [9:0] in transmission order
// {a,b,c,d,e,i,f,g,h,j}: bit 9 (a) is sent first. Data bytes are {H,G,F,E,D,C,B,A}.
// The three comma symbols follow the FE-I4 output framing: K.28.7 starts a
// frame, K.28.5 ends it and K.28.1 is the idle word. Their 10-bit forms for
// both running disparities are the standard ones.
//
// The MCC event format constants (header 11101, field widths, 22-zero trailer)
// follow the MCC-to-ROD data format; the trigger record type is this design's own.
package readout_pkg;

  // 8b10b control bytes (K.x.y = {y[2:0], x[4:0]})
  localparam logic [7:0] K28_1 = 8'h3C;  // idle / NOP
  localparam logic [7:0] K28_5 = 8'hBC;  // end of frame
  localparam logic [7:0] K28_7 = 8'hFC;  // start of frame

  // 10-bit forms, RD- and RD+
  localparam logic [9:0] SOF_RDN  = 10'b0011111000;
  localparam logic [9:0] SOF_RDP  = 10'b1100000111;
  localparam logic [9:0] EOF_RDN  = 10'b0011111010;
  localparam logic [9:0] EOF_RDP  = 10'b1100000101;
  localparam logic [9:0] IDLE_RDN = 10'b0011111001;
  localparam logic [9:0] IDLE_RDP = 10'b1100000110;

  // MCC event format
  localparam logic [4:0] MCC_HEADER  = 5'b11101;  // event header
  localparam logic [4:0] LV1_COMMAND = 5'b11101;  // Level-1 trigger command on DTI
  localparam logic [3:0] FE_PREFIX   = 4'b1110;   // upper nibble of the FE# word
  localparam int unsigned TRAILER_ZEROS = 22;
  localparam int unsigned ROW_W = 8;
  localparam int unsigned COL_W = 5;
  localparam int unsigned TOT_W = 8;
  localparam int unsigned N_ROWS = 240;
  localparam int unsigned N_COLS = 24;
  // header + LV1 + sync + BCID + sync + FE# + sync
  localparam int unsigned EVENT_HEAD_BITS = 32;
  // Row + Col + ToT + sync
  localparam int unsigned BITS_PER_HIT = 22;

  // A buffered Level-1 trigger
  typedef struct packed {
    logic [3:0] skipped;  // triggers lost because the buffer was full
    logic [3:0] l1id;     // Level-1 ID
    logic [7:0] bcid;     // bunch crossing ID at trigger arrival
  } trigger_t;

  // Number of ones in a 10-bit word minus the number of zeros
  function automatic int signed disparity10(input logic [9:0] w);
    int signed ones;
    ones = 0;
    for (int i = 0; i < 10; i++) ones += int'(w[i]);
    return 2 * ones - 10;
  endfunction

  // 5b/6b sub-block, RD- form, abcdei with a as bit 5 (standard 8b10b table)
  function automatic logic [5:0] enc6_rdn(input logic [4:0] x);
    case (x)
      5'd0:  return 6'b100111;  5'd1:  return 6'b011101;
      5'd2:  return 6'b101101;  5'd3:  return 6'b110001;
      5'd4:  return 6'b110101;  5'd5:  return 6'b101001;
      5'd6:  return 6'b011001;  5'd7:  return 6'b111000;
      5'd8:  return 6'b111001;  5'd9:  return 6'b100101;
      5'd10: return 6'b010101;  5'd11: return 6'b110100;
      5'd12: return 6'b001101;  5'd13: return 6'b101100;
      5'd14: return 6'b011100;  5'd15: return 6'b010111;
      5'd16: return 6'b011011;  5'd17: return 6'b100011;
      5'd18: return 6'b010011;  5'd19: return 6'b110010;
      5'd20: return 6'b001011;  5'd21: return 6'b101010;
      5'd22: return 6'b011010;  5'd23: return 6'b111010;
      5'd24: return 6'b110011;  5'd25: return 6'b100110;
      5'd26: return 6'b010110;  5'd27: return 6'b110110;
      5'd28: return 6'b001110;  5'd29: return 6'b101110;
      5'd30: return 6'b011110;  default: return 6'b101011;
    endcase
  endfunction

  // 3b/4b sub-block for data, RD- form, fghj with f as bit 3 (Table 4.1);
  // y = 7 gives the primary code P7, the alternate A7 is 4'b0111.
  function automatic logic [3:0] enc4_rdn(input logic [2:0] y);
    case (y)
      3'd0: return 4'b1011;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b1100;
      3'd4: return 4'b1101;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1110;
    endcase
  endfunction

  // fghj of K.28.y in its RD- form (Table 4.2)
  function automatic logic [3:0] k28_fghj_rdn(input logic [2:0] y);
    case (y)
      3'd0: return 4'b0100;  3'd1: return 4'b1001;
      3'd2: return 4'b0101;  3'd3: return 4'b0011;
      3'd4: return 4'b0010;  3'd5: return 4'b1010;
      3'd6: return 4'b0110;  default: return 4'b1000;
    endcase
  endfunction

  function automatic int signed disparity6(input logic [5:0] w);
    int signed ones;
    ones = 0;
    for (int i = 0; i < 6; i++) ones += int'(w[i]);
    return 2 * ones - 6;
  endfunction

  function automatic int signed disparity4(input logic [3:0] w);
    int signed ones;
    ones = 0;
    for (int i = 0; i < 4; i++) ones += int'(w[i]);
    return 2 * ones - 4;
  endfunction

endpackage
