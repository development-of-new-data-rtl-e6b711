// frame_source: testbench model of an 8b10b frame transmitter.
//
// Sends one bit per clock on sout, words MSB (bit a) first. Between frames
// it sends K.28.1 idle words; send_frame() queues K.28.7, the given bytes and
// K.28.5 and returns when the frame has left. flip_bit, when not negative,
// inverts the bit with that index counted from the first bit of the next
// frame's SOF (a transmission error). Encoding uses encoder_8b10b with a
// running disparity kept here.
`timescale 1ns/1ps
module frame_source
  import readout_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  output logic sout
);
  typedef struct packed { logic k; logic [7:0] b; } sym_t;
  sym_t q[$];
  logic [7:0] e_din;
  logic e_k, e_rd, e_rd_out;
  logic [9:0] e_dout;
  int flip_bit = -1;
  int frame_bit = -1;
  int busy_words = 0;

  encoder_8b10b u_enc (.din(e_din), .k(e_k), .rd_in(e_rd), .dout(e_dout), .rd_out(e_rd_out));

  task automatic send_frame(input byte unsigned bytes[$]);
    q.push_back('{k: 1'b1, b: K28_7});
    foreach (bytes[i]) q.push_back('{k: 1'b0, b: bytes[i]});
    q.push_back('{k: 1'b1, b: K28_5});
    wait (q.size() == 0);
    repeat (12) @(posedge clk);
  endtask

  initial begin
    sym_t s;
    logic [9:0] w;
    bit from_q;
    sout = 0;
    e_rd = 0;
    wait (rst_n);
    forever begin
      from_q = (q.size() > 0);
      if (from_q) s = q[0]; else s = '{k: 1'b1, b: K28_1};
      e_din = s.b; e_k = s.k;
      #1;
      w = e_dout;
      if (s.k && s.b == K28_7) frame_bit = 0;
      for (int i = 9; i >= 0; i--) begin
        @(negedge clk);
        sout = w[i] ^ ((frame_bit >= 0 && frame_bit == flip_bit) ? 1'b1 : 1'b0);
        if (frame_bit >= 0 && frame_bit == flip_bit) flip_bit = -1;
        if (frame_bit >= 0) frame_bit++;
      end
      e_rd = e_rd_out;
      if (s.k && s.b == K28_5) frame_bit = -1;
      if (from_q) void'(q.pop_front());
    end
  end
endmodule
