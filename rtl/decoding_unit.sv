// decoding_unit: 8b10b decoding unit placed in one eBOC data channel.
//
// The encoded module stream enters the stream analyser, which finds the SOF
// comma and starts the deserializer. Each 10-bit word is decoded to a byte
// (decoder_8b10b) and, if it is data, stored in the Event Data FIFO (8 bits x
// DATA_DEPTH); at EOF the analyser writes the number of stored bytes into the
// Event Length FIFO. Only complete events are sent on: the serializer pops a
// length and shifts exactly that many bytes to dec_out, recreating the raw
// MCC stream. The decoding monitor watches the running disparity of the
// received words and pulses debug for one clock on a violation. overflow
// pulses when a byte or length had to be dropped because a FIFO was full, so
// events longer than DATA_DEPTH bytes do not pass (32 bytes hold 9 hits).
// Structure and the 8x32 event FIFO follow the eBOC decoding unit; the length
// FIFO depth and width are this design's choices.
module decoding_unit #(
  parameter int unsigned DATA_DEPTH = 32,
  parameter int unsigned LEN_DEPTH  = 4,
  parameter int unsigned LEN_W      = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enc_in,
  output logic dec_out,
  output logic debug,
  output logic overflow,
  output logic in_frame
);
  logic       start, stop, sof_rd_pos;
  logic       word_valid;
  logic [9:0] word;
  logic [7:0] dec_byte;
  logic       dec_k;
  logic       data_wr, data_rd, data_full, data_empty;
  logic [7:0] data_dout;
  logic       len_wr, len_rd, len_full, len_empty;
  logic [LEN_W-1:0] len_din, len_dout;
  logic       ser_busy;
  logic [$clog2(DATA_DEPTH+1)-1:0] data_count;
  logic [$clog2(LEN_DEPTH+1)-1:0]  len_count;

  stream_analyser #(.LEN_W(LEN_W)) u_sa (
    .clk, .rst_n, .din(enc_in), .word_valid, .word, .word_is_k(dec_k),
    .data_full, .len_full, .start, .stop, .sof_rd_pos,
    .data_wr, .len_wr, .len(len_din), .overflow, .in_frame
  );

  ebc_deserializer u_des (.clk, .rst_n, .din(enc_in), .start, .stop, .word_valid, .word);

  decoder_8b10b u_dec (.din(word), .dout(dec_byte), .k(dec_k));

  decoding_monitor u_mon (
    .clk, .rst_n, .sof(start), .sof_rd_pos, .word_valid, .word, .err(debug)
  );

  sync_fifo #(.WIDTH(8), .DEPTH(DATA_DEPTH)) u_data_fifo (
    .clk, .rst_n, .wr_en(data_wr), .din(dec_byte), .rd_en(data_rd),
    .dout(data_dout), .full(data_full), .empty(data_empty), .count(data_count)
  );

  sync_fifo #(.WIDTH(LEN_W), .DEPTH(LEN_DEPTH)) u_len_fifo (
    .clk, .rst_n, .wr_en(len_wr), .din(len_din), .rd_en(len_rd),
    .dout(len_dout), .full(len_full), .empty(len_empty), .count(len_count)
  );

  ebc_serializer #(.LEN_W(LEN_W)) u_ser (
    .clk, .rst_n, .len_empty, .len(len_dout), .len_rd,
    .data(data_dout), .data_rd, .sout(dec_out), .busy(ser_busy)
  );

  a_data_present: assert property (@(posedge clk) disable iff (!rst_n) data_rd |-> !data_empty)
    else $error("decoding_unit: event data missing for the stored length");
endmodule
