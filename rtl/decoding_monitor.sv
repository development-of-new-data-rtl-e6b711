// decoding_monitor: running-disparity check of the received 8b10b words.
//
// The monitor keeps its own running disparity (RD). A start of frame seeds it
// from the form of the K.28.7 word (RD- form leaves RD at -1, RD+ form at
// +1). For every later word: a balanced word keeps RD; a +2 word is legal only
// at RD -1 and a -2 word only at RD +1, each flipping RD; anything else,
// including |disparity| > 2, is an error. An error raises err (the debug
// channel) for exactly one clock; RD then follows the received word so one
// fault is reported once. Since any single bit error shifts the disparity
// sum by two, it is caught at the latest by the unbalanced EOF word.
// The RD check and the one-cycle debug pulse follow the eBOC decoding
// monitor; the resynchronisation after an error is this design's choice.
module decoding_monitor
  import readout_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sof,
  input  logic       sof_rd_pos,
  input  logic       word_valid,
  input  logic [9:0] word,
  output logic       err
);
  logic rd;  // 1 = RD +1
  int signed d;

  assign d = disparity10(word);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd  <= 1'b0;
      err <= 1'b0;
    end else begin
      err <= 1'b0;
      if (sof) begin
        rd <= sof_rd_pos;
      end else if (word_valid) begin
        if (d == 2) begin
          if (rd) err <= 1'b1;
          rd <= 1'b1;
        end else if (d == -2) begin
          if (!rd) err <= 1'b1;
          rd <= 1'b0;
        end else if (d != 0) begin
          err <= 1'b1;
          rd  <= (d > 0);
        end
      end
    end
  end
endmodule
