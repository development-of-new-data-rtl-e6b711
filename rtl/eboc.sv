// eboc: routing FPGA of the electrical back-of-crate card (eBOC).
//
// N_CH command channels are forwarded from the ROD to the modules and N_CH
// data channels from the modules to the ROD, each through one register.
// Channel DEC_CH carries an 8b10b encoded module stream: it passes through
// the decoding unit, and the ROD receives the decoded, unframed raw stream on
// that channel instead. Channel DBG_CH is taken over by the decoding unit's
// debug line (one-clock pulses on running-disparity errors). The clock comes
// from the board oscillator (clk). overflow reports an event the decoding
// unit could not buffer completely. Channel count and the routing follow the
// eBOC; the channel numbers and the register stage are this design's choices.
module eboc #(
  parameter int unsigned N_CH       = 32,
  parameter int unsigned DEC_CH     = 0,
  parameter int unsigned DBG_CH     = 2,
  parameter int unsigned DATA_DEPTH = 32
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_CH-1:0] rod_cmd,
  output logic [N_CH-1:0] mod_cmd,
  input  logic [N_CH-1:0] mod_data,
  output logic [N_CH-1:0] rod_data,
  output logic            overflow,
  output logic            debug
);
  logic dec_out, in_frame;

  decoding_unit #(.DATA_DEPTH(DATA_DEPTH)) u_du (
    .clk, .rst_n, .enc_in(mod_data[DEC_CH]), .dec_out, .debug, .overflow, .in_frame
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mod_cmd  <= '0;
      rod_data <= '0;
    end else begin
      mod_cmd <= rod_cmd;
      for (int c = 0; c < N_CH; c++) begin
        if (c == DEC_CH)      rod_data[c] <= dec_out;
        else if (c == DBG_CH) rod_data[c] <= debug;
        else                  rod_data[c] <= mod_data[c];
      end
    end
  end
endmodule
