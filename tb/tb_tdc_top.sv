// tb_tdc_top: end-to-end testbench of the multi-channel converter.
//
// Three channels with the default delay lines and decoder, a short
// calibration (K = 2^12) and a 10-bit coarse counter, so that the counter
// wraps every 1024 clock periods. Phase 1 drives every channel with its own
// random events (START high and low for 1 to 3 clock periods at random
// instants, down to one event every two clock periods). Phase 2 drives the
// same events into all channels at once. The testbench knows the true time
// of every event and checks each channel's timestamps against it: one per
// event, in order, within 130 units of T_CLK / 2^12 once the channel is
// calibrated, RMS error below 45 units. Simultaneous events must also agree
// across channels within the same limit.
//
// It counts how often each mechanism of the converter acted and fails if
// one never did: calibration rounds (curve swaps) on every channel, bubble
// corrections by the BEC stages, coarse-counter wrap-arounds, events that
// arrive while a calibration is being integrated (and are therefore not
// histogrammed), events two clock periods apart, and events shared by all
// channels.
module tb_tdc_top;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N_CH = 3, K_LOG2 = 12, N_CC = 10;
  localparam realtime TCLK = 2400.0;
  localparam int unsigned N_EV1 = 3 * (1 << K_LOG2) + 300;
  localparam int unsigned N_EV2 = 600;
  localparam int unsigned W_TS = N_CC + K_LOG2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_CH-1:0] start = '0;
  logic [N_CC-1:0] count;
  logic [N_CH-1:0] ts_valid, ts_err, calibrated, cal_swap;
  logic [N_CH-1:0][W_TS-1:0] ts;
  logic [N_CH-1:0][10:0] vbin;
  int checks = 0, failures = 0;

  tdc_top #(.N_CH(N_CH), .K_LOG2(K_LOG2), .N_CC(N_CC)) dut (.*);

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #(TCLK * 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t0;
  always @(posedge clk) if (!rst_n) t0 = $realtime;

  // ------------------------------------------------------------ counters
  int swaps [N_CH];
  int n_wrap = 0, n_bubble = 0, n_during_integ = 0, n_fast = 0, n_shared = 0;
  int n_ts [N_CH];
  int n_cal = 0, n_bad = 0;
  real sum_sq = 0.0;

  always @(posedge clk) if (rst_n) begin
    if (count == '1) n_wrap++;
    for (int c = 0; c < int'(N_CH); c++) if (cal_swap[c]) swaps[c]++;
    // Bubble corrections on channel 0 (all lines, both edges).
    if (dut.g_ch[0].u_ch.u_decoder.g_line[0].u_bec_dn.in_valid) begin
      if (dut.g_ch[0].u_ch.u_decoder.g_line[0].u_bec_dn.zeros != 0) n_bubble++;
      if (dut.g_ch[0].u_ch.u_decoder.g_line[1].u_bec_dn.zeros != 0) n_bubble++;
      if (dut.g_ch[0].u_ch.u_decoder.g_line[2].u_bec_up.zeros != 0) n_bubble++;
      if (dut.g_ch[0].u_ch.u_decoder.g_line[3].u_bec_up.zeros != 0) n_bubble++;
    end
    if (dut.g_ch[0].u_ch.u_cal.in_valid &&
        dut.g_ch[0].u_ch.u_cal.state == 2'd3) n_during_integ++;
  end

  // ------------------------------------------------------------- checking
  realtime t_ev [N_CH][$];
  logic [W_TS-1:0] shared_ts [N_CH][$];

  function automatic real ts_err_units(logic [W_TS-1:0] v, realtime t);
    real span, want, err;
    span = real'(longint'(1) << W_TS);
    want = (t - t0) / TCLK * real'(1 << K_LOG2);
    err  = real'(v) - want;
    err  = err - span * $floor(err / span + 0.5);
    return err;
  endfunction

  bit phase2 = 0;

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < int'(N_CH); c++) if (ts_valid[c]) begin
      realtime t;
      real err;
      checks++;
      n_ts[c]++;
      if (t_ev[c].size() == 0) begin
        failures++;
        $display("channel %0d: timestamp without event", c);
        continue;
      end
      t = t_ev[c].pop_front();
      if (ts_err[c]) begin failures++; $display("channel %0d: edge error", c); end
      if (phase2) shared_ts[c].push_back(ts[c]);
      if (calibrated[c]) begin
        err = ts_err_units(ts[c], t);
        n_cal++;
        sum_sq += err * err;
        checks++;
        if (err > 130.0 || err < -130.0) begin
          failures++; n_bad++;
          if (n_bad < 10) $display("channel %0d: event %0.1f ps, error %0.1f units", c, t, err);
        end
      end
    end
  end

  // --------------------------------------------------------------- stimulus
  task automatic one_event(int c);
    realtime t_hi;
    #($urandom_range(0, 2399) * 1.0 + $urandom_range(0, 999) * 0.001);
    start[c] = 1'b1;
    t_ev[c].push_back($realtime);
    t_hi = TCLK * (1.0 + real'($urandom_range(0, 2000)) / 1000.0);
    #(t_hi) start[c] = 1'b0;
    #(TCLK * (1.0 + real'($urandom_range(0, 2000)) / 1000.0));
  endtask

  task automatic channel_stream(int c);
    for (int k = 0; k < int'(N_EV1); k++) begin
      one_event(c);
      if (c == 0 && t_ev[c].size() > 1 && t_ev[c][$] - t_ev[c][$-1] < 2.5 * TCLK) n_fast++;
    end
  endtask

  initial begin
    foreach (swaps[c]) swaps[c] = 0;
    foreach (n_ts[c]) n_ts[c] = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2100) @(posedge clk);
    // Phase 1: independent streams.
    fork
      channel_stream(0);
      channel_stream(1);
      channel_stream(2);
    join
    repeat (20) @(posedge clk);
    // Phase 2: the same events on every channel.
    phase2 = 1;
    for (int k = 0; k < int'(N_EV2); k++) begin
      realtime t;
      #($urandom_range(0, 2399) * 1.0 + $urandom_range(0, 999) * 0.001);
      start = '1;
      t = $realtime;
      for (int c = 0; c < int'(N_CH); c++) t_ev[c].push_back(t);
      #(TCLK * 2.0) start = '0;
      #(TCLK * 2.0);
    end
    repeat (30) @(posedge clk);
    // Shared events: all channels must agree.
    for (int k = 0; k < int'(N_EV2); k++) begin
      for (int c = 1; c < int'(N_CH); c++) begin
        real d;
        d = real'(shared_ts[c][k]) - real'(shared_ts[0][k]);
        d = d - real'(longint'(1) << W_TS) * $floor(d / real'(longint'(1) << W_TS) + 0.5);
        checks++;
        if (d > 130.0 || d < -130.0) begin
          failures++;
          $display("shared event %0d: channel %0d differs by %0.1f units", k, c, d);
        end
      end
      n_shared++;
    end
    // One timestamp per event.
    for (int c = 0; c < int'(N_CH); c++) begin
      checks++;
      if (n_ts[c] != int'(N_EV1 + N_EV2)) begin
        failures++;
        $display("channel %0d: %0d timestamps for %0d events", c, n_ts[c], N_EV1 + N_EV2);
      end
      checks++;
      if (swaps[c] < 2) begin failures++; $display("channel %0d: %0d calibration rounds", c, swaps[c]); end
    end
    checks++;
    if (n_cal == 0 || sum_sq / real'(n_cal) > 45.0 * 45.0) begin
      failures++; $display("RMS error too large");
    end
    $display("mechanisms: swaps=%0d/%0d/%0d bubble_corrections=%0d counter_wraps=%0d events_during_integration=%0d fast_events=%0d shared_events=%0d",
             swaps[0], swaps[1], swaps[2], n_bubble, n_wrap, n_during_integ, n_fast, n_shared);
    if (n_cal > 0) $display("calibrated timestamps %0d, RMS error %0.2f units", n_cal, $sqrt(sum_sq / real'(n_cal)));
    checks++;
    if (n_bubble == 0 || n_wrap == 0 || n_during_integ == 0 || n_fast == 0 || n_shared == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
