// mcc_emulator: FE-I3 pixel module (MCC) emulator with an 8b10b output.
//
// The module answers Level-1 trigger commands on DTI with FE-I3/MCC events and
// sends every event twice: as the raw MCC bit stream on DTO1 and as an 8b10b
// encoded, SOF/EOF framed stream on DTO0, so a receiver can compare the two.
// Path: level1_detector -> fei3_event_emulator -> (raw) DTO1 and
// mcc_deserializer (bytes + FIFO) -> frame_builder (+ encoder_8b10b) ->
// word_serializer -> DTO0. word_clock_enable gives the 10-bit word slots on
// the single 40 MHz clock. DTO0 carries K.28.1 idle words between frames,
// DTO1 is 0 between events.
//
// hit_step (a debounced button pulse) steps the hits per event 0,1,...,15,0;
// after reset it is INIT_HITS. bcr/ecr clear the bunch and event counters.
// The encoded stream lags the raw one by a fixed offset plus 2 bit periods per
// byte of event (8 bits take a 10-bit slot). All structure follows the module
// emulator; INIT_HITS and the clock-enable scheme are this design's choices.
module mcc_emulator
  import readout_pkg::*;
#(
  parameter int unsigned INIT_HITS  = 1,
  parameter int unsigned LEAD_BITS  = 2,
  parameter int unsigned FIFO_DEPTH = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       dti,
  input  logic       bcr,
  input  logic       ecr,
  input  logic       hit_step,
  input  logic [3:0] fe_id,
  output logic       dto0,
  output logic       dto1,
  output logic [7:0] hit_count,
  output logic       fifo_overflow
);
  logic       lv1, raw, sending_event, start_ok;
  logic       fifo_rd, fifo_empty, deser_busy;
  logic [7:0] fifo_dout;
  logic       pre_tick, tick, cw_load;
  logic [9:0] cw;

  always_ff @(posedge clk) begin
    if (!rst_n)        hit_count <= 8'(INIT_HITS);
    else if (hit_step) hit_count <= (hit_count >= 8'd15) ? 8'd0 : hit_count + 1'b1;
  end

  level1_detector u_l1 (.clk, .rst_n, .dti, .lv1);

  fei3_event_emulator #(.LEAD_BITS(LEAD_BITS)) u_evt (
    .clk, .rst_n, .lv1, .bcr, .ecr, .hit_count, .fe_id, .start_ok,
    .raw_out(raw), .sending_event
  );

  mcc_deserializer #(.DEPTH(FIFO_DEPTH)) u_deser (
    .clk, .rst_n, .raw_in(raw), .sending_event,
    .rd_en(fifo_rd), .dout(fifo_dout), .empty(fifo_empty), .busy(deser_busy),
    .overflow(fifo_overflow)
  );

  word_clock_enable #(.DIV(10)) u_wce (.clk, .rst_n, .pre_tick, .tick);

  frame_builder u_fb (
    .clk, .rst_n, .pre_tick, .tick, .sending_event,
    .fifo_empty, .fifo_dout, .deser_busy, .fifo_rd,
    .cw, .cw_load, .idle(start_ok)
  );

  word_serializer #(.WIDTH(10)) u_ser (
    .clk, .rst_n, .load(cw_load), .din(cw), .start(tick), .sout(dto0)
  );

  assign dto1 = raw;
endmodule
