// frame_builder: 8b10b frame builder and state machine of the module emulator.
//
// Once per 10-bit word slot (tick) one word is chosen and encoded:
//   IDLE : K.28.1 idle words; their disparity alternates on its own. When
//          sending_event has been seen, a K.28.7 start-of-frame is sent and
//          the builder moves to DATA.
//   DATA : one byte of the deserializer FIFO per slot, fetched at pre_tick
//          (the FIFO read is registered). If the FIFO is momentarily empty
//          while the event is still arriving, a K.28.1 filler is sent and
//          ignored by the receiver. When the event has been fully collected
//          (deser_busy low) and the FIFO is empty, a K.28.5 end-of-frame is
//          sent and the builder returns to IDLE.
// The running disparity starts at -1 and is updated with every word.
// cw/cw_load present the word in the tick cycle; idle tells the event
// generator that a new event may start. The SOF/data/EOF/idle sequence follows
// the emulator; the filler word is this design's choice.
module frame_builder
  import readout_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pre_tick,
  input  logic       tick,
  input  logic       sending_event,
  input  logic       fifo_empty,
  input  logic [7:0] fifo_dout,
  input  logic       deser_busy,
  output logic       fifo_rd,
  output logic [9:0] cw,
  output logic       cw_load,
  output logic       idle
);
  typedef enum logic {FB_IDLE, FB_DATA} fb_state_e;

  fb_state_e  state;
  logic       rd;        // running disparity, 1 = +1
  logic       rd_next;
  logic       pending;   // sending_event seen, SOF not yet sent
  logic       fetched;   // a FIFO byte is on fifo_dout for this slot
  logic [7:0] byte_sel;
  logic       k_sel;
  logic       to_data, to_idle;

  assign fifo_rd = pre_tick && (state == FB_DATA) && !fifo_empty;
  assign idle    = (state == FB_IDLE) && !pending && !sending_event;

  always_comb begin
    byte_sel = K28_1;
    k_sel    = 1'b1;
    to_data  = 1'b0;
    to_idle  = 1'b0;
    if (state == FB_IDLE) begin
      if (pending || sending_event) begin
        byte_sel = K28_7;
        to_data  = 1'b1;
      end
    end else if (fetched) begin
      byte_sel = fifo_dout;
      k_sel    = 1'b0;
    end else if (!deser_busy && fifo_empty) begin
      byte_sel = K28_5;
      to_idle  = 1'b1;
    end
  end

  encoder_8b10b u_enc (.din(byte_sel), .k(k_sel), .rd_in(rd), .dout(cw), .rd_out(rd_next));

  assign cw_load = tick;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= FB_IDLE;
      rd      <= 1'b0;
      pending <= 1'b0;
      fetched <= 1'b0;
    end else begin
      if (fifo_rd) fetched <= 1'b1;
      if (state == FB_IDLE && sending_event) pending <= 1'b1;
      if (tick) begin
        rd      <= rd_next;
        fetched <= 1'b0;
        if (to_data) begin
          state   <= FB_DATA;
          pending <= 1'b0;
        end
        if (to_idle) state <= FB_IDLE;
      end
    end
  end
endmodule
