// tb_random_trigger_run: long event-error-rate run of the whole read-out
// chain under randomly timed triggers, at default parameters.
//
// N_EVENTS Level-1 commands are sent with exponentially distributed spacing,
// dt = -TAU * ln(x) for x uniform in (0,1], which gives Poisson-distributed
// trigger arrivals. TAU (700 clocks) keeps the run short; much longer gaps
// would only add idle time, since even a 9-hit event has left the chain
// (decoded copy included) about 650 clocks after it started. Shorter gaps
// make triggers queue in the emulator, which is exercised as well.
//
// The hits per event are stepped with the button through 0..9 (values 10..15
// are stepped over, since such events do not fit the eBOC buffer); the button
// is only pressed while the emulator has no event queued or in flight, which
// the testbench reads from inside the design. The emulator's raw output goes
// to one eBOC data channel, its encoded output to the decoding channel; the
// testbench plays the ROD and
// cuts events out of both ROD channels by their trailer.
//
// Checks:
// - every decoded event equals its raw event bit for bit (an event error
//   otherwise) and the error count is zero;
// - each raw event has a legal length (32 + 22 per hit) and header 11101;
// - triggers sent = events + skipped triggers reported in the events;
// - no debug pulse and no overflow anywhere;
// - the delay of the decoded copy grows by 27.5 bit periods per hit (+-1);
// - the mean generated trigger spacing is TAU within 10 %.
`timescale 1ns/1ps
module tb_random_trigger_run;
  import readout_pkg::*;

  localparam int     N_EVENTS = 27000;
  localparam real    TAU      = 700.0;  // mean trigger spacing in clocks
  localparam int     CMD_CH   = 5;
  localparam int     RAW_CH   = 1;
  localparam int     DEC_CH   = 0;
  localparam int     MAXB     = 512;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [31:0] rod_cmd = '0, rod_data, mod_cmd, mod_data;
  logic        emu_dti, emu_dto0, emu_dto1;
  logic        emu_bcr = 1'b0, emu_ecr = 1'b0, emu_hit_step = 1'b0;
  logic [3:0]  emu_fe_id = 4'd9;
  logic [7:0]  emu_hit_count;
  logic        emu_fifo_overflow, dec_overflow, dec_debug;

  int     checks = 0, failures = 0;
  longint cyc = 0;

  readout_chain_top dut (.*);

  always #12.5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  assign emu_dti = mod_cmd[CMD_CH];
  always_comb begin
    mod_data         = '0;
    mod_data[DEC_CH] = emu_dto0;
    mod_data[RAW_CH] = emu_dto1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------- event extraction from the ROD channels ----------------
  typedef struct {
    bit     b[MAXB];
    int     len;
    longint start;
  } ev_t;

  ev_t raw_ev[$], dec_ev[$];
  int  n_raw = 0, n_dec = 0;

  task automatic extractor(input int ch, ref ev_t evq[$], ref int n);
    ev_t e;
    int  zeros;
    bit  on;
    on = 0;
    forever begin
      @(posedge clk);
      #1;
      if (!on) begin
        if (rst_n && rod_data[ch]) begin
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

  int n_debug = 0, n_overflow = 0;
  always @(posedge clk) if (rst_n) begin
    if (dec_debug) n_debug++;
    if (dec_overflow) n_overflow++;
  end

  // ---------------- pairing raw and decoded events ----------------
  int     n_pairs = 0, n_event_errors = 0, sum_skipped = 0;
  real    sum_n = 0, sum_d = 0, sum_nn = 0, sum_nd = 0;
  int     hits_seen[16];

  initial begin
    ev_t r, d;
    int  nh;
    bit  same;
    forever begin
      wait (raw_ev.size() > 0 && dec_ev.size() > 0);
      r = raw_ev.pop_front();
      d = dec_ev.pop_front();
      n_pairs++;
      nh = (r.len - EVENT_HEAD_BITS) / BITS_PER_HIT;
      check(r.len >= EVENT_HEAD_BITS && (r.len - EVENT_HEAD_BITS) % BITS_PER_HIT == 0 && nh <= 9,
            $sformatf("raw event length %0d", r.len));
      check({r.b[0], r.b[1], r.b[2], r.b[3], r.b[4]} == MCC_HEADER, "raw header");
      sum_skipped += int'({r.b[5], r.b[6], r.b[7], r.b[8]});
      same = (d.len == r.len);
      for (int i = 0; i < r.len && i < MAXB && same; i++) same = (d.b[i] == r.b[i]);
      if (!same) n_event_errors++;
      check(same, $sformatf("decoded event %0d differs from raw", n_pairs));
      if (nh >= 0 && nh < 16) hits_seen[nh]++;
      sum_n += nh; sum_d += real'(d.start - r.start);
      sum_nn += nh * nh; sum_nd += nh * real'(d.start - r.start);
    end
  end

  // ---------------- stimulus ----------------
  task automatic lv1_command();
    for (int i = 4; i >= 0; i--) begin
      @(negedge clk);
      rod_cmd[CMD_CH] = LV1_COMMAND[i];
    end
    @(negedge clk);
    rod_cmd[CMD_CH] = 1'b0;
  endtask

  task automatic press();
    @(negedge clk) emu_hit_step = 1'b1;
    @(negedge clk) emu_hit_step = 1'b0;
  endtask

  initial begin
    int     n_trig;
    real    x, dt, sum_dt;
    longint t_last;
    int     next_press;
    n_trig = 0; sum_dt = 0.0; next_press = 7;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (50) @(negedge clk);
    t_last = cyc;
    while (n_trig < N_EVENTS) begin
      x  = real'($urandom_range(1, 1 << 30)) / real'(1 << 30);
      dt = -TAU * $ln(x);
      sum_dt += dt;
      // the wait is measured from the start of the previous command
      while (real'(cyc - t_last) < dt) @(negedge clk);
      // step the button about every 7th trigger, but only while no event is
      // queued, being sent or still on its way through the command path, so
      // that no event can pick up a count of 10..15
      if (n_trig >= next_press && cyc - t_last > 20 && dut.u_emu.u_evt.trig_empty &&
          dut.u_emu.start_ok && !dut.u_emu.sending_event) begin
        press();
        while (emu_hit_count > 8'd9) press();
        next_press = n_trig + 7;
      end
      t_last = cyc;
      lv1_command();
      n_trig++;
    end
    // let the chain drain
    repeat (20000) @(negedge clk);
    $display("run: %0d triggers, %0d raw events, %0d decoded, %0d event errors, %0d skipped",
             n_trig, n_raw, n_dec, n_event_errors, sum_skipped);
    $write("events per hit count 0..9:");
    for (int h = 0; h <= 9; h++) $write(" %0d", hits_seen[h]);
    $write("\n");
    check(n_raw == n_dec && n_pairs == n_raw, "every raw event has a decoded copy");
    check(n_trig == n_raw + sum_skipped, $sformatf("triggers %0d = events %0d + skipped %0d",
                                                  n_trig, n_raw, sum_skipped));
    check(n_event_errors == 0, "event error count is zero");
    check(n_debug == 0, $sformatf("no debug pulse (%0d seen)", n_debug));
    check(n_overflow == 0 && !emu_fifo_overflow, "no overflow");
    for (int h = 0; h <= 9; h++) check(hits_seen[h] > 0, $sformatf("events with %0d hits", h));
    begin
      real slope;
      slope = (n_pairs * sum_nd - sum_n * sum_d) / (n_pairs * sum_nn - sum_n * sum_n);
      $display("delay slope %0.2f bits per hit", slope);
      check(slope > 26.5 && slope < 28.5, "delay slope 27.5 bits per hit");
    end
    $display("mean trigger spacing %0.1f clocks (TAU %0.1f)", sum_dt / n_trig, TAU);
    check(sum_dt / n_trig > 0.9 * TAU && sum_dt / n_trig < 1.1 * TAU, "mean trigger spacing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N_EVENTS * 3000 + 100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
