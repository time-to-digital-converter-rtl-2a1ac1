// tb_drift: delay drift and its compensation by the periodic recalibration.
//
// The delays of a carry chain change with temperature and supply. The
// converter does not correct them by a model: it keeps rebuilding its
// calibration from the measured events and swaps in a new curve every K
// samples, so a drift is followed within one or two calibration rounds.
// This testbench runs one channel (default delay lines, K = 2^12, 16-bit
// counter) with events at random times and knows the true time of each:
//   1. while the first curve is live, the timestamp error is measured at the
//      nominal delays (phase A);
//   2. right after the second curve (also built at nominal delays) goes
//      live, every delay of the four lines is made 8 % longer at once (the
//      delay-line model's `drift` scale), and the error is measured with
//      this now stale curve (phase B, events before the next swap);
//   3. the third curve is built from events taken with the new delays; once
//      it is live the error is measured again (phase C).
// Checked: one timestamp per event; the RMS error in phases A and C within
// 70 units of T_CLK/2^12 (one curve's calibration error: its RMS is about
// sqrt(K/6) = 26 units on average but varies much from curve to curve); the
// RMS error in phase B above 70 units and at least three times that of
// phase A (the drift is visible); at least 500 events in each phase.
module tb_drift;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned K_LOG2 = 12, N_CC = 16;
  localparam realtime TCLK = 2400.0;
  localparam real DRIFT = 1.08;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N_CC-1:0] count;
  logic ts_valid, ts_err, calibrated, cal_swap;
  logic [N_CC+K_LOG2-1:0] ts;
  logic [10:0] vbin;
  int checks = 0, failures = 0;

  coarse_counter #(.N_CC(N_CC)) u_cc (.clk, .rst_n, .count);
  tdc_channel #(.K_LOG2(K_LOG2), .N_CC(N_CC)) dut (.*);

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #(TCLK * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t0;
  always @(posedge clk) if (!rst_n) t0 = $realtime;

  // phase of the events being sent: 0 = not measured, 1 = A, 2 = B, 3 = C
  int phase = 0;
  int swaps = 0;
  always @(posedge clk) if (rst_n && cal_swap) swaps++;

  realtime t_ev[$];
  int      ph_ev[$];
  int      n_ev = 0, n_ts = 0;
  int      n_ph [4];
  real     sq_ph [4];

  initial for (int p = 0; p < 4; p++) begin n_ph[p] = 0; sq_ph[p] = 0.0; end

  always @(posedge clk) if (rst_n && ts_valid) begin
    realtime t;
    int      p;
    real     want, err, span;
    n_ts++;
    checks++;
    if (t_ev.size() == 0) begin
      failures++;
      $display("timestamp without event");
    end else begin
      t = t_ev.pop_front();
      p = ph_ev.pop_front();
      if (ts_err) begin failures++; $display("edge error flagged"); end
      if (p > 0) begin
        span = real'(longint'(1) << (N_CC + K_LOG2));
        want = (t - t0) / TCLK * real'(1 << K_LOG2);
        err  = real'(ts) - want;
        while (err >  span / 2.0) err -= span;
        while (err < -span / 2.0) err += span;
        n_ph[p]++;
        sq_ph[p] += err * err;
      end
    end
  end

  task automatic one_event();
    @(posedge clk);
    #($urandom_range(1, 2399) * 1.0 + $urandom_range(0, 999) * 0.001);
    start = 1'b1;
    t_ev.push_back($realtime);
    ph_ev.push_back(phase);
    n_ev++;
    repeat ($urandom_range(2, 3)) @(posedge clk);
    #($urandom_range(1, 2399) * 1.0);
    start = 1'b0;
    repeat ($urandom_range(1, 2)) @(posedge clk);
  endtask

  initial begin
    int s0;
    real rms [4];
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2100) @(posedge clk);
    // Until the first curve is live.
    while (swaps < 1) one_event();
    // Phase A: nominal delays, until the curve is about to be replaced.
    phase = 1;
    s0 = swaps;
    while (swaps == s0) one_event();
    // Phase B: all delays 8 % longer, the second (nominal) curve in use.
    dut.g_tdl[0].u_tdl.drift = DRIFT;
    dut.g_tdl[1].u_tdl.drift = DRIFT;
    dut.g_tdl[2].u_tdl.drift = DRIFT;
    dut.g_tdl[3].u_tdl.drift = DRIFT;
    phase = 2;
    s0 = swaps;
    for (int k = 0; k < 1500 && swaps == s0; k++) one_event();
    phase = 0;
    // Phase C: once the curve built with the new delays is live.
    while (swaps == s0) one_event();
    phase = 3;
    for (int k = 0; k < 1500; k++) one_event();
    phase = 0;
    repeat (30) @(posedge clk);

    checks++;
    if (n_ts != n_ev) begin failures++; $display("%0d timestamps for %0d events", n_ts, n_ev); end
    for (int p = 1; p < 4; p++) begin
      rms[p] = n_ph[p] > 0 ? $sqrt(sq_ph[p] / real'(n_ph[p])) : 0.0;
      checks++;
      if (n_ph[p] < 500) begin failures++; $display("phase %0d: only %0d events", p, n_ph[p]); end
    end
    checks += 3;
    if (rms[1] > 70.0) begin failures++; $display("nominal delays: RMS too large"); end
    if (rms[3] > 70.0) begin failures++; $display("after recalibration: RMS too large"); end
    if (rms[2] < 70.0 || rms[2] < 3.0 * rms[1]) begin failures++; $display("drift not visible with the stale curve"); end
    $display("RMS error, units of T_CLK/2^%0d: nominal %0.2f (%0d events), drifted with stale curve %0.2f (%0d), recalibrated %0.2f (%0d)",
             K_LOG2, rms[1], n_ph[1], rms[2], n_ph[2], rms[3], n_ph[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
