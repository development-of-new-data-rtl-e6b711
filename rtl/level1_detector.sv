// level1_detector: finds the Level-1 trigger command in the DTI bit stream.
//
// Every clock the incoming command bit is shifted into a 5-bit register, the
// first received bit ending up as the MSB. When the register holds 11101 a
// one-cycle lv1 pulse is produced in the following cycle and the register is
// cleared, so the bits of one command cannot be reused for a second match.
// Detecting 11101 through a 5-bit shift register is as the module emulator
// does it; clearing after a match is this design's choice.
module level1_detector
  import readout_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic dti,
  output logic lv1
);
  logic [4:0] sr, sr_next;

  assign sr_next = {sr[3:0], dti};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr  <= '0;
      lv1 <= 1'b0;
    end else if (sr_next == LV1_COMMAND) begin
      sr  <= '0;
      lv1 <= 1'b1;
    end else begin
      sr  <= sr_next;
      lv1 <= 1'b0;
    end
  end
endmodule
