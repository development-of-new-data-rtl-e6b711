// ebc_deserializer: word deserializer of the eBOC decoding unit.
//
// start (from the stream analyser, in the cycle in which its window holds the
// SOF word) marks the bit on din in that same cycle as bit a of the next
// word. From then on every 10 bits are gathered, first bit into bit 9, and
// presented as word with a one-cycle word_valid, until stop (in the cycle of
// the EOF word_valid) ends the frame. Outside a frame nothing is produced.
module ebc_deserializer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       din,
  input  logic       start,
  input  logic       stop,
  output logic       word_valid,
  output logic [9:0] word
);
  logic [8:0] sh;
  logic [3:0] cnt;
  logic       active;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sh         <= '0;
      cnt        <= '0;
      active     <= 1'b0;
      word_valid <= 1'b0;
      word       <= '0;
    end else begin
      sh         <= {sh[7:0], din};
      word_valid <= 1'b0;
      if (start) begin
        active <= 1'b1;
        cnt    <= 4'd1;
      end else if (stop) begin
        active <= 1'b0;
        cnt    <= '0;
      end else if (active) begin
        if (cnt == 4'd9) begin
          word       <= {sh, din};
          word_valid <= 1'b1;
          cnt        <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
