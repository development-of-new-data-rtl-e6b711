// stream_analyser: frame detection and event length counting (eBOC side).
//
// HUNT: the incoming encoded bits run through a 10-bit window; when the
//       window equals K.28.7 (start of frame) in either disparity form, start
//       is pulsed for the deserializer, sof_rd_pos tells which form it was
//       (needed to seed the disparity check) and the analyser enters FRAME.
//       The search works at any bit offset, which gives the word alignment.
// FRAME: for every word from the deserializer: K.28.5 (end of frame) pulses
//       stop and writes the number of stored data words into the Event Length
//       FIFO, then back to HUNT; any other control word (idle filler) is
//       skipped; a data word is written into the Event Data FIFO and counted.
// A data word that finds the data FIFO full (or the count at its maximum) is
// dropped and overflow pulses; the stored length then matches what was kept.
// An EOF that finds the length FIFO full is lost and also pulses overflow.
// SOF/EOF detection and length counting follow the eBOC decoding unit; the
// handling of fill words and of a full FIFO is this design's choice.
module stream_analyser
  import readout_pkg::*;
#(
  parameter int unsigned LEN_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             din,
  input  logic             word_valid,
  input  logic [9:0]       word,
  input  logic             word_is_k,
  input  logic             data_full,
  input  logic             len_full,
  output logic             start,
  output logic             stop,
  output logic             sof_rd_pos,
  output logic             data_wr,
  output logic             len_wr,
  output logic [LEN_W-1:0] len,
  output logic             overflow,
  output logic             in_frame
);
  typedef enum logic {HUNT, FRAME} sa_state_e;

  sa_state_e        state;
  logic [9:0]       win;
  logic [LEN_W-1:0] cnt;
  logic             is_eof, is_data;

  assign in_frame   = (state == FRAME);
  assign start      = (state == HUNT) && (win == SOF_RDN || win == SOF_RDP);
  assign sof_rd_pos = (win == SOF_RDP);
  assign is_eof     = (word == EOF_RDN || word == EOF_RDP);
  assign is_data    = (state == FRAME) && word_valid && !word_is_k;
  assign stop       = (state == FRAME) && word_valid && is_eof;
  assign data_wr    = is_data && !data_full && (cnt != '1);
  assign len_wr     = stop && !len_full;
  assign len        = cnt;
  assign overflow   = (is_data && !data_wr) || (stop && len_full);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      win   <= '0;
      state <= HUNT;
      cnt   <= '0;
    end else begin
      win <= {win[8:0], din};
      if (start) begin
        state <= FRAME;
        cnt   <= '0;
      end else if (stop) begin
        state <= HUNT;
      end else if (data_wr) begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
