// mcc_deserializer: cuts the raw MCC event stream into bytes and buffers them.
//
// While sending_event is high every raw bit is shifted into an 8-bit register
// (first bit becomes the MSB); each full byte is written into a FIFO. When
// sending_event falls with a partial byte left, that byte is filled up with
// zeros and written in the following cycle. busy is high while an event is
// being collected or the last byte is still to be written; the frame builder
// closes the frame only when busy is low and the FIFO is empty.
// The FIFO uses registered reads (dout valid the cycle after rd_en).
// The byte cutting without regard to the MCC fields follows the emulator; the
// zero fill and the FIFO depth are this design's choices. Because bytes are
// read out at 8/10 of the rate they are written, the FIFO only has to hold
// one fifth of an event.
module mcc_deserializer #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       raw_in,
  input  logic       sending_event,
  input  logic       rd_en,
  output logic [7:0] dout,
  output logic       empty,
  output logic       busy,
  output logic       overflow
);
  logic [7:0] sh;
  logic [2:0] cnt;
  logic       push;
  logic [7:0] push_data;
  logic       full;
  logic [$clog2(DEPTH+1)-1:0] count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sh        <= '0;
      cnt       <= '0;
      push      <= 1'b0;
      push_data <= '0;
    end else begin
      push <= 1'b0;
      if (sending_event) begin
        sh  <= {sh[6:0], raw_in};
        cnt <= cnt + 1'b1;
        if (cnt == 3'd7) begin
          push      <= 1'b1;
          push_data <= {sh[6:0], raw_in};
        end
      end else if (cnt != 3'd0) begin
        push      <= 1'b1;
        push_data <= sh << (4'd8 - {1'b0, cnt});
        cnt       <= '0;
      end
    end
  end

  assign busy     = sending_event || (cnt != 3'd0) || push;
  assign overflow = push && full;

  sync_fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en(push && !full), .din(push_data),
    .rd_en, .dout, .full, .empty, .count
  );
endmodule
