// word_serializer: parallel-to-serial converter of the module emulator.
//
// Two registers as in the classic serializer: load writes din into the
// Data_In register; start copies Data_In into the Data_Out shift register.
// On every other clock Data_Out shifts by one place toward its MSB, and the
// output is always the MSB of Data_Out, so a WIDTH-bit word leaves MSB first
// in WIDTH clocks. When load and start come in the same cycle, Data_Out gets
// the word loaded earlier: the word stream has one word of latency. Reset
// clears both registers (output 0).
module word_serializer #(
  parameter int unsigned WIDTH = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] din,
  input  logic             start,
  output logic             sout
);
  logic [WIDTH-1:0] data_in_q, data_out_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_in_q  <= '0;
      data_out_q <= '0;
    end else begin
      if (load)  data_in_q <= din;
      if (start) data_out_q <= data_in_q;
      else       data_out_q <= {data_out_q[WIDTH-2:0], 1'b0};
    end
  end

  assign sout = data_out_q[WIDTH-1];
endmodule
