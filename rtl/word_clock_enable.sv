// word_clock_enable: word-rate strobe for the 8b10b stream.
//
// The 10-bit words leave the emulator at 1/10 of the 40 MHz bit clock. Instead
// of a second (divided) clock from an FPGA clock manager, this counter runs on
// the bit clock and gives tick in the last cycle of every DIV-cycle word slot
// and pre_tick one cycle earlier, so the single clock domain is kept. The
// 40/10 MHz word rate follows the emulator; using an enable is this design's
// choice.
module word_clock_enable #(
  parameter int unsigned DIV = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic pre_tick,
  output logic tick
);
  logic [$clog2(DIV)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n)                           cnt <= '0;
    else if (cnt == ($clog2(DIV))'(DIV-1)) cnt <= '0;
    else                                  cnt <= cnt + 1'b1;
  end

  assign tick     = (cnt == ($clog2(DIV))'(DIV-1));
  assign pre_tick = (cnt == ($clog2(DIV))'(DIV-2));
endmodule
