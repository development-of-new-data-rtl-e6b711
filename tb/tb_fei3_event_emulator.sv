// tb_fei3_event_emulator: sends Level-1 pulses and captures raw_out while
// sending_event is high. Each event must be LEAD_BITS zeros, header 11101,
// skipped/L1ID with sync, BCID with sync, 1110+FE with sync, the hits
// (Row = i, Col = i mod 24, ToT = 7i + 16*L1ID, sync) and 22 zeros. BCIDs
// must differ by the trigger spacing; no event may start while start_ok is
// low; a burst of 20 triggers must report skipped triggers and the number of
// events plus skipped triggers must equal the triggers sent; ECR and BCR are
// checked on the next event.
`timescale 1ns/1ps
module tb_fei3_event_emulator;
  import readout_pkg::*;
  localparam int LEAD = 2;
  logic clk = 0, rst_n = 0, lv1 = 0, bcr = 0, ecr = 0, start_ok = 1;
  logic [7:0] hit_count = 8'd3;
  logic [3:0] fe_id = 4'd6;
  logic raw_out, sending_event;
  int checks = 0, failures = 0;
  longint cyc = 0;
  longint trig_at[$];
  int n_events = 0, sum_skipped = 0, n_trig = 0, l1_model = 0;
  longint ref_cyc = 0, lat = -1;

  fei3_event_emulator #(.LEAD_BITS(LEAD), .TRIG_DEPTH(16)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  task automatic trigger();
    @(negedge clk) lv1 = 1;
    trig_at.push_back(cyc + 1);
    n_trig++;
    @(negedge clk) lv1 = 0;
  endtask

  // event capture and check
  initial begin
    bit b[$];
    forever begin
      @(posedge clk); #1;
      if (sending_event) b.push_back(raw_out);
      else if (b.size() > 0) begin
        int nh, pos, l1, sk, bc;
        longint tc;
        bit ok;
        nh = int'(hit_count);
        check(b.size() == LEAD + 32 + 22 * nh + 22, $sformatf("event length %0d", b.size()));
        ok = 1;
        for (int i = 0; i < LEAD; i++) if (b[i]) ok = 0;
        check(ok, "lead zeros");
        pos = LEAD;
        check({b[pos], b[pos+1], b[pos+2], b[pos+3], b[pos+4]} == 5'b11101, "header");
        sk = 0; l1 = 0; bc = 0;
        for (int i = 0; i < 4; i++) sk = (sk << 1) | b[pos + 5 + i];
        for (int i = 0; i < 4; i++) l1 = (l1 << 1) | b[pos + 9 + i];
        for (int i = 0; i < 8; i++) bc = (bc << 1) | b[pos + 14 + i];
        check(b[pos + 13] && b[pos + 22] && b[pos + 31], "sync bits");
        check({b[pos+23], b[pos+24], b[pos+25], b[pos+26]} == 4'b1110, "FE prefix");
        check({b[pos+27], b[pos+28], b[pos+29], b[pos+30]} == fe_id, "FE id");
        for (int s = 0; s < sk; s++) void'(trig_at.pop_front());
        sum_skipped += sk;
        tc = trig_at.pop_front();
        check(l1 == l1_model % 16, $sformatf("L1ID %0d expected %0d", l1, l1_model % 16));
        l1_model++;
        if (lat < 0) lat = (bc - (tc - ref_cyc)) & 255;
        check(bc == ((tc - ref_cyc + lat) & 255), $sformatf("BCID %0d", bc));
        ok = 1;
        for (int h = 0; h < nh; h++) begin
          int p, row, col, tot;
          p = pos + 32 + 22 * h;
          row = 0; col = 0; tot = 0;
          for (int i = 0; i < 8; i++) row = (row << 1) | b[p + i];
          for (int i = 0; i < 5; i++) col = (col << 1) | b[p + 8 + i];
          for (int i = 0; i < 8; i++) tot = (tot << 1) | b[p + 13 + i];
          if (row != h % 240 || col != h % 24 || tot != ((7 * h + 16 * l1) & 255) || !b[p + 21]) ok = 0;
        end
        check(ok, "hits");
        ok = 1;
        for (int i = b.size() - 22; i < b.size(); i++) if (b[i]) ok = 0;
        check(ok, "trailer zeros");
        n_events++;
        b.delete();
      end
    end
  end

  initial begin
    int ev0;
    repeat (3) @(negedge clk);
    ref_cyc = cyc;
    rst_n = 1;
    repeat (5) @(negedge clk);
    // single events with various hit counts
    for (int i = 0; i < 4; i++) begin
      hit_count = (i == 0) ? 8'd3 : (i == 1) ? 8'd0 : (i == 2) ? 8'd1 : 8'd12;
      repeat ($urandom_range(0, 20)) @(negedge clk);
      trigger();
      repeat (500) @(negedge clk);
    end
    // start_ok low holds the event back
    start_ok = 0;
    ev0 = n_events;
    trigger();
    repeat (200) @(negedge clk);
    check(n_events == ev0 && !sending_event, "no event while start_ok is low");
    start_ok = 1;
    repeat (500) @(negedge clk);
    check(n_events == ev0 + 1, "event after start_ok");
    // burst: 20 triggers in 40 cycles
    hit_count = 8'd1;
    for (int t = 0; t < 20; t++) trigger();
    repeat (20 * 150) @(negedge clk);
    // one more event to report skipped triggers at the end of the burst
    trigger();
    repeat (300) @(negedge clk);
    check(sum_skipped > 0, "skipped triggers reported");
    check(n_trig == n_events + sum_skipped, $sformatf("triggers %0d = events %0d + skipped %0d", n_trig, n_events, sum_skipped));
    // ECR and BCR
    @(negedge clk) begin ecr = 1; bcr = 1; end
    ref_cyc = cyc + 1;
    l1_model = 0;
    @(negedge clk) begin ecr = 0; bcr = 0; end
    repeat (40) @(negedge clk);
    trigger();
    repeat (300) @(negedge clk);
    check(n_events > 10, "events seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
