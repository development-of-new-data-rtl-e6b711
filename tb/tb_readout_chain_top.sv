// tb_readout_chain_top: end-to-end test of the read-out chain at full size.
//
// The testbench plays ROD and patch panel: it sends Level-1 trigger commands
// (11101) on a ROD command channel, loops that eBOC command output back to
// the emulator's DTI, feeds the emulator's encoded output to the decoding
// channel (0) and its raw output to a plain channel (1) of the eBOC, and
// watches the ROD data outputs. Events are cut out of both ROD channels by
// their trailer (22 zeros after a 1). Each raw event is compared with a bit
// model built here from the MCC format (header, skipped/L1ID, BCID, FE#, the
// hit pattern, sync bits); its BCID must equal the cycle of its trigger plus
// a fixed latency, counted from the last reset or BCR. Each decoded event
// must equal its raw event bit for bit, and its delay is checked against
// 10 bit periods per event byte. Phases:
//   burst   : 20 back-to-back triggers - trigger buffering and skipped count
//   ecr/bcr : counter resets
//   sweep   : 1..9 hits per event, 4 events each, stepped with the button;
//             slope of the delay must be 27.5 bits per hit (+-3)
//   error   : one bit of a data word flipped on the link - debug pulse
//   overflow: 10 hits - more than the 32-byte event FIFO - overflow pulse
//   wrap    : button steps 10..15 and wraps to 0; a 0-hit event must pass
// Every mechanism is counted and a failure is counted for one never seen.
`timescale 1ns/1ps
module tb_readout_chain_top;
  import readout_pkg::*;

  localparam int CMD_CH = 5;
  localparam int RAW_CH = 1;
  localparam int DEC_CH = 0;
  localparam int DBG_CH = 2;
  localparam int LEAD   = 2;   // lead zeros of the emulator
  localparam int MAXB   = 1024;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] rod_cmd, rod_data, mod_cmd, mod_data;
  logic        emu_dti, emu_dto0, emu_dto1;
  logic        emu_bcr, emu_ecr, emu_hit_step;
  logic [3:0]  emu_fe_id;
  logic [7:0]  emu_hit_count;
  logic        emu_fifo_overflow, dec_overflow, dec_debug;
  logic        flip;

  int checks = 0, failures = 0;
  longint cyc = 0;

  readout_chain_top dut (.*);

  always #12.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // patch panel: command loop-back and data links
  assign emu_dti = mod_cmd[CMD_CH];
  always_comb begin
    mod_data         = '0;
    mod_data[DEC_CH] = emu_dto0 ^ flip;
    mod_data[RAW_CH] = emu_dto1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------- trigger bookkeeping ----------------
  longint trig_cyc[$];      // sampling cycle of the last command bit
  longint bc_ref = 0;       // cycle of the last reset/BCR edge
  longint trig_ref[$];      // bc_ref valid for each trigger
  int     n_trig = 0;
  int     sum_skipped = 0;
  int     l1_model = 0;     // accepted triggers since reset/ECR
  longint lat = -1;         // learned trigger-to-BCID latency
  bit     trig_exact[$];    // per trigger: its decoded copy must be exact
  bit     exact_q[$];       // per raw event

  // ---------------- event extraction ----------------
  typedef struct {
    bit     b[MAXB];
    int     len;
    longint start;
  } ev_t;

  ev_t raw_ev[$], dec_ev[$];
  int n_raw = 0, n_dec = 0;

  // cut events out of one ROD channel
  task automatic extractor(input int ch, ref ev_t evq[$], ref int n);
    ev_t e;
    int zeros;
    bit on;
    on = 0;
    forever begin
      @(posedge clk);
      #1;
      if (!on) begin
        if (rod_data[ch]) begin
          on = 1; e.len = 1; e.b[0] = 1; e.start = cyc; zeros = 0;
        end
      end else begin
        if (e.len < MAXB) e.b[e.len] = rod_data[ch];
        e.len++;
        if (rod_data[ch]) zeros = 0; else zeros++;
        if (zeros == TRAILER_ZEROS) begin
          e.len -= TRAILER_ZEROS;
          evq.push_back(e);
          n++;
          on = 0;
        end
      end
    end
  endtask

  initial extractor(RAW_CH, raw_ev, n_raw);
  initial extractor(DEC_CH, dec_ev, n_dec);

  // ---------------- counters of mechanisms ----------------
  int m_event_ok = 0, m_skipped = 0, m_queued = 0, m_ecr = 0, m_bcr = 0;
  int m_debug = 0, m_overflow = 0, m_wrap = 0, m_zero_hit = 0, m_filler = 0;
  int dbg_pulses = 0, dbg_on_rod = 0;
  always @(posedge clk) if (rst_n) begin
    if (dec_debug) dbg_pulses++;
    if (rod_data[DBG_CH]) dbg_on_rod++;
    if (dec_overflow) m_overflow++;
  end

  // ---------------- raw event checker ----------------
  int raw_checked = 0;
  int ev_hits[$];           // hits of each checked raw event, for the decoded check
  longint raw_start_q[$];
  ev_t raw_keep[$];

  function automatic int field(ref ev_t e, input int pos, input int w);
    int v = 0;
    for (int i = 0; i < w; i++) v = (v << 1) | int'(e.b[pos + i]);
    return v;
  endfunction

  task automatic check_raw(ref ev_t e, input int nh);
    int pos, skipped, l1, bc, exp_bits, tot, rowv, colv;
    longint tc, tr;
    bit ok;
    exp_bits = EVENT_HEAD_BITS + BITS_PER_HIT * nh; // the last sync bit ends the event
    check(e.len == exp_bits, $sformatf("raw event length %0d, expected %0d", e.len, exp_bits));
    check(field(e, 0, 5) == 5'b11101, "raw header");
    skipped = field(e, 5, 4);
    l1      = field(e, 9, 4);
    bc      = field(e, 14, 8);
    check(e.b[13] && e.b[22] && e.b[31], "sync bits after LV1/BCID/FE#");
    check(field(e, 23, 8) == {4'b1110, emu_fe_id}, "FE# word");
    // triggers lost before this one
    if (skipped > 0) m_skipped++;
    sum_skipped += skipped;
    for (int s = 0; s < skipped; s++) begin
      void'(trig_cyc.pop_front()); void'(trig_ref.pop_front()); void'(trig_exact.pop_front());
    end
    exact_q.push_back(trig_exact.pop_front());
    tc = trig_cyc.pop_front();
    tr = trig_ref.pop_front();
    check(l1 == (l1_model % 16), $sformatf("L1ID %0d expected %0d", l1, l1_model % 16));
    l1_model++;
    if (lat < 0) lat = (bc - (tc - tr)) & 255;
    check(bc == ((tc - tr + lat) & 255), $sformatf("BCID %0d expected %0d", bc, (tc - tr + lat) & 255));
    ok = 1;
    for (int h = 0; h < nh; h++) begin
      pos  = EVENT_HEAD_BITS + BITS_PER_HIT * h;
      rowv = h % 240; colv = h % 24; tot = (7 * h + 16 * l1) & 255;
      if (field(e, pos, 8) != rowv || field(e, pos + 8, 5) != colv ||
          field(e, pos + 13, 8) != tot) ok = 0;
      if (h != nh - 1 && !e.b[pos + 21]) ok = 0;
    end
    check(ok, "hit contents");
  endtask

  // ---------------- decoded event checker ----------------
  real sum_n = 0, sum_d = 0, sum_nn = 0, sum_nd = 0;
  int  n_pts = 0;
  longint dmin = 1 << 30, dmax = -(1 << 30);

  initial begin : dec_checker
    ev_t d, r;
    int nh, nbytes;
    longint delay, excess;
    bit exact, same;
    forever begin
      wait (dec_ev.size() > 0 && raw_keep.size() > 0);
      d = dec_ev.pop_front();
      r = raw_keep.pop_front();
      nh = ev_hits.pop_front();
      exact = exact_q.pop_front();
      same = (d.len == r.len);
      for (int i = 0; i < r.len && i < d.len && i < MAXB; i++) if (d.b[i] != r.b[i]) same = 0;
      if (exact) begin
        check(same, $sformatf("decoded event differs from raw (len %0d vs %0d)", d.len, r.len));
        if (same) m_event_ok++;
        if (same && nh == 0) m_zero_hit++;
        // delay in bit periods against 10 bits per event byte
        nbytes = (LEAD + EVENT_HEAD_BITS + BITS_PER_HIT * nh + TRAILER_ZEROS + 7) / 8;
        delay  = d.start - r.start;
        excess = delay - 10 * nbytes;
        if (excess < dmin) dmin = excess;
        if (excess > dmax) dmax = excess;
        if (nh >= 1 && nh <= 9) begin
          n_pts++; sum_n += nh; sum_d += delay; sum_nn += nh * nh; sum_nd += nh * delay;
        end
      end
    end
  end

  initial begin : raw_checker
    ev_t e;
    forever begin
      wait (raw_ev.size() > 0);
      e = raw_ev.pop_front();
      check_raw(e, int'(emu_hit_count));
      raw_keep.push_back(e);
      ev_hits.push_back(int'(emu_hit_count));
      raw_checked++;
    end
  end

  // ---------------- stimulus helpers ----------------
  bit next_exact = 1;

  task automatic send_trigger();
    for (int i = 4; i >= 0; i--) begin
      @(negedge clk);
      rod_cmd[CMD_CH] = LV1_COMMAND[i];
    end
    trig_cyc.push_back(cyc + 1);
    trig_ref.push_back(bc_ref);
    trig_exact.push_back(next_exact);
    n_trig++;
    @(negedge clk);
    rod_cmd[CMD_CH] = 1'b0;
  endtask

  task automatic press();
    @(negedge clk) emu_hit_step = 1'b1;
    @(negedge clk) emu_hit_step = 1'b0;
  endtask

  // wait until every trigger has produced a raw and a decoded event
  task automatic drain(input int expect_dec);
    int guard = 0;
    while ((n_raw < raw_target || n_dec < expect_dec) && guard < 20000) begin
      @(negedge clk); guard++;
    end
    repeat (200) @(negedge clk);
    check(guard < 20000, "chain drained");
  endtask
  int raw_target = 0;

  // flip one bit inside data word 'word_no' of the next frame on the link
  task automatic inject_flip(input int word_no, input int bit_no);
    logic [9:0] win = '0;
    forever begin
      @(posedge clk); #1;
      win = {win[8:0], emu_dto0};
      if (win == SOF_RDN || win == SOF_RDP) break;
    end
    repeat (10 * word_no + bit_no) @(posedge clk);
    #2 flip = 1'b1;
    @(posedge clk); #2 flip = 1'b0;
  endtask

  // ---------------- main sequence ----------------
  initial begin : main
    int dbg_before, ovf_before, skipped_triggers;
    rst_n = 1'b0; rod_cmd = '0; emu_bcr = 0; emu_ecr = 0; emu_hit_step = 0;
    emu_fe_id = 4'd9; flip = 1'b0;
    repeat (5) @(negedge clk);
    bc_ref = cyc;          // bcid cleared at the last edge with reset
    rst_n = 1'b1;
    repeat (100) @(negedge clk);
    check(emu_hit_count == 8'd1, "hits per event after reset");

    // burst of triggers: buffering and skipped triggers
    for (int t = 0; t < 20; t++) send_trigger();
    raw_target = 0;
    repeat (20000) begin
      @(negedge clk);
      if (trig_cyc.size() == 0) break;
    end
    raw_target = n_raw;
    drain(n_raw);
    m_queued = n_raw - 1;
    skipped_triggers = 20 - n_raw;
    check(skipped_triggers > 0, "burst overfills the trigger buffer");

    // ECR: L1ID back to 0
    @(negedge clk) emu_ecr = 1'b1;
    @(negedge clk) emu_ecr = 1'b0;
    l1_model = 0; m_ecr++;
    // BCR: BCID counted from here
    repeat (37) @(negedge clk);
    @(negedge clk) emu_bcr = 1'b1;
    bc_ref = cyc + 1;
    @(negedge clk) emu_bcr = 1'b0;
    m_bcr++;
    repeat (50) @(negedge clk);

    // delay sweep 1..9 hits
    for (int nh = 1; nh <= 9; nh++) begin
      while (emu_hit_count != 8'(nh)) press();
      for (int r = 0; r < 4; r++) begin
        repeat ($urandom_range(0, 9)) @(negedge clk);
        send_trigger();
        raw_target++;
        drain(raw_target);
      end
    end

    // disparity error on the link
    dbg_before = dbg_pulses;
    next_exact = 0;
    fork
      send_trigger();
      inject_flip(6, 3);
    join
    raw_target++;
    drain(raw_target);
    check(dbg_pulses > dbg_before, "debug pulse after a flipped bit");
    if (dbg_pulses > dbg_before) m_debug++;
    check(dbg_on_rod == dbg_pulses, "debug pulses reach the ROD debug channel");

    // overflow: 10 hits do not fit into 32 bytes
    press();
    check(emu_hit_count == 8'd10, "button steps to 10");
    ovf_before = m_overflow;
    send_trigger();
    raw_target++;
    drain(raw_target);
    check(m_overflow > ovf_before, "event FIFO overflow at 10 hits");
    next_exact = 1;

    // wrap of the button counter and a 0-hit event
    while (emu_hit_count != 8'd15) press();
    press();
    check(emu_hit_count == 8'd0, "button wraps from 15 to 0");
    if (emu_hit_count == 8'd0) m_wrap++;
    send_trigger();
    raw_target++;
    drain(raw_target);

    // ---- results ----
    check(n_trig == n_raw + sum_skipped && trig_cyc.size() == 0,
          $sformatf("triggers %0d = events %0d + skipped %0d", n_trig, n_raw, sum_skipped));
    check(n_dec == n_raw, $sformatf("decoded events %0d vs raw %0d", n_dec, n_raw));
    check(dmax - dmin <= 20, $sformatf("delay spread %0d..%0d bits beyond 10/byte", dmin, dmax));
    if (n_pts > 2) begin
      real slope;
      slope = (n_pts * sum_nd - sum_n * sum_d) / (n_pts * sum_nn - sum_n * sum_n);
      $display("delay slope %0.2f bits per hit, offset %0.1f bits, over %0d events",
               slope, (sum_d - slope * sum_n) / n_pts, n_pts);
      check(slope > 24.5 && slope < 30.5, "delay slope about 27.5 bits per hit");
    end
    $display("events ok %0d, raw %0d, skipped-events %0d, queued %0d, debug %0d, overflow %0d",
             m_event_ok, n_raw, m_skipped, m_queued, m_debug, m_overflow);
    check(m_event_ok > 30, "events passed end to end");
    check(m_skipped > 0, "mechanism: skipped triggers reported");
    check(m_queued > 0, "mechanism: triggers buffered during an event");
    check(m_ecr > 0 && m_bcr > 0, "mechanism: ECR/BCR");
    check(m_debug > 0, "mechanism: disparity error on debug channel");
    check(m_overflow > 0, "mechanism: event FIFO overflow");
    check(m_wrap > 0, "mechanism: hit counter wrap");
    check(m_zero_hit > 0, "mechanism: 0-hit event passed");
    check(emu_fifo_overflow == 1'b0, "emulator FIFO never overflowed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
