// tb_eboc: random levels on the command and data channels must reach the
// other side one clock later, except on the decoded channel and the debug
// channel. An 8b10b frame on the decoded channel must appear decoded on the
// same ROD channel; a frame with a flipped bit must pulse the debug channel.
`timescale 1ns/1ps
module tb_eboc;
  localparam int N_CH = 32, DEC_CH = 0, DBG_CH = 2;
  logic clk = 0, rst_n = 0;
  logic [N_CH-1:0] rod_cmd = '0, mod_cmd, mod_data_rnd = '0, mod_data, rod_data;
  logic enc, overflow, debug;
  int checks = 0, failures = 0, n_dbg_line = 0;

  frame_source u_src (.clk, .rst_n, .sout(enc));
  assign mod_data = {mod_data_rnd[N_CH-1:1], enc};
  eboc dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && rod_data[DBG_CH]) n_dbg_line++;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [N_CH-1:0] c_prev, d_prev;
    byte unsigned b[$];
    bit got[$], exp_bits[$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      rod_cmd = $urandom; mod_data_rnd = $urandom;
      #1; c_prev = rod_cmd; d_prev = mod_data;
      @(negedge clk);
      check(mod_cmd == c_prev, "command channels pass with one clock delay");
      for (int c = 0; c < N_CH; c++)
        if (c != DEC_CH && c != DBG_CH)
          check(rod_data[c] == d_prev[c], $sformatf("data channel %0d passes", c));
    end
    // a clean frame: decoded on the ROD side of DEC_CH
    for (int i = 0; i < 12; i++) b.push_back(i == 0 ? 8'hE5 : 8'($urandom));
    foreach (b[i]) for (int k = 7; k >= 0; k--) exp_bits.push_back(b[i][k]);
    fork
      u_src.send_frame(b);
      begin
        while (!rod_data[DEC_CH]) @(negedge clk);
        repeat (8 * b.size()) begin got.push_back(rod_data[DEC_CH]); @(negedge clk); end
      end
    join
    check(got == exp_bits, "decoded frame on the ROD channel");
    check(n_dbg_line == 0, "no debug pulse on a clean frame");
    // a flipped data bit: pulse on the debug channel
    u_src.flip_bit = 25;
    u_src.send_frame(b);
    repeat (200) @(negedge clk);
    check(n_dbg_line > 0, "debug pulse on the debug channel");
    check(!overflow, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
