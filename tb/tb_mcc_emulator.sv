// tb_mcc_emulator: sends Level-1 commands (11101) on DTI and checks both
// outputs. DTO1 events are cut out by their trailer and checked for header,
// FE number and length (32 bits from the header on, plus 22 bits per hit, the
// hit count being the button value when the command was sent). DTO0 is word-aligned on the
// K.28.7 comma and decoded; between frames only K.28.1 may appear, and the
// bytes of each frame, turned back into bits, must equal the raw event
// (with its lead and trailing zeros). The hit button must step 1..15 and
// wrap to 0.
`timescale 1ns/1ps
module tb_mcc_emulator;
  import readout_pkg::*;
  logic clk = 0, rst_n = 0, dti = 0, bcr = 0, ecr = 0, hit_step = 0;
  logic [3:0] fe_id = 4'd3;
  logic dto0, dto1, fifo_overflow;
  logic [7:0] hit_count;
  logic [9:0] win = '0;
  logic [7:0] dbyte;
  logic dk;
  int checks = 0, failures = 0;

  mcc_emulator dut (.*);
  decoder_8b10b u_dec (.din(win), .dout(dbyte), .k(dk));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // raw events
  bit raw_q[$][$];
  int exp_hits[$];
  initial begin
    bit b[$];
    int zeros;
    bit on;
    on = 0;
    forever begin
      @(posedge clk); #1;
      if (!on && dto1) begin on = 1; b.delete(); b.push_back(1); zeros = 0; end
      else if (on) begin
        b.push_back(dto1);
        zeros = dto1 ? 0 : zeros + 1;
        if (zeros == 22) begin
          repeat (22) void'(b.pop_back());
          if (exp_hits.size() > 0) begin
            int nh;
            nh = exp_hits.pop_front();
            check(b.size() == 32 + 22 * nh, $sformatf("raw length %0d for %0d hits", b.size(), nh));
            check({b[0], b[1], b[2], b[3], b[4]} == MCC_HEADER, "raw header");
            check({b[23], b[24], b[25], b[26]} == 4'b1110 &&
                  {b[27], b[28], b[29], b[30]} == fe_id, "raw FE number");
          end else check(0, "raw event without a command");
          raw_q.push_back(b);
          on = 0;
        end
      end
    end
  end

  // encoded frames
  int frames = 0, idle_words = 0, bad_idle = 0;
  initial begin
    bit aligned, in_frame;
    int bitc;
    bit fb[$];
    aligned = 0; in_frame = 0; bitc = 0;
    forever begin
      @(posedge clk); #1;
      win = {win[8:0], dto0};
      #1;
      if (!aligned) begin
        if (win == SOF_RDN || win == SOF_RDP) begin aligned = 1; bitc = 0; in_frame = 1; fb.delete(); end
      end else begin
        bitc++;
        if (bitc == 10) begin
          bitc = 0;
          if (in_frame) begin
            if (dk && dbyte == K28_5) begin
              bit r[$];
              int i;
              in_frame = 0;
              frames++;
              wait (raw_q.size() > 0);
              r = raw_q.pop_front();
              // strip leading zeros of the frame, compare, rest must be zero
              i = 0;
              while (i < fb.size() && !fb[i]) i++;
              check(i == 2, $sformatf("lead zeros %0d", i));
              for (int j = 0; j < r.size(); j++)
                if (i + j >= fb.size() || fb[i + j] != r[j]) begin check(0, $sformatf("frame bit %0d", j)); break; end
              for (int j = i + r.size(); j < fb.size(); j++) if (fb[j]) begin check(0, "tail not zero"); break; end
              check(fb.size() - i - r.size() >= 22, "trailer in frame");
              checks++;
            end else if (dk) begin
              if (dbyte == K28_7) in_frame = 1; else check(dbyte == K28_1, "filler");
            end else begin
              for (int k = 7; k >= 0; k--) fb.push_back(dbyte[k]);
            end
          end else begin
            if (dk && dbyte == K28_7) begin in_frame = 1; fb.delete(); end
            else begin idle_words++; if (!(dk && dbyte == K28_1)) bad_idle++; end
          end
        end
      end
    end
  end

  task automatic command();
    exp_hits.push_back(hit_count);
    for (int i = 4; i >= 0; i--) begin @(negedge clk); dti = LV1_COMMAND[i]; end
    @(negedge clk); dti = 0;
  endtask

  task automatic press();
    @(negedge clk) hit_step = 1;
    @(negedge clk) hit_step = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (50) @(negedge clk);
    check(hit_count == 8'd1, "initial hit count");
    for (int n = 0; n < 12; n++) begin
      command();
      repeat (1200) @(negedge clk);
      if (n == 5) begin command(); command(); repeat (2500) @(negedge clk); end
      press();
    end
    while (hit_count != 8'd15) press();
    press();
    check(hit_count == 8'd0, "button wraps to 0");
    command();
    repeat (800) @(negedge clk);
    check(frames == 15, $sformatf("frames %0d", frames));
    check(raw_q.size() == 0, "every raw event had a frame");
    check(idle_words > 100 && bad_idle == 0, "idle words");
    check(!fifo_overflow, "no FIFO overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
