// tb_tdc_channel: end-to-end testbench of one converter channel.
//
// A channel with the default delay lines (4 x 256 taps, bubble length 4) but a
// short calibration (K = 2^12) and a 16-bit coarse counter receives time
// events at random instants, each START held high for 2 to 4 clock periods
// and low for 2 to 4. The testbench knows the true time of every event and
// the instant the coarse counter left 0, so it can compute the exact
// timestamp in units of T_CLK / 2^12 and compare it with the channel's.
// Checked: one timestamp per event, in order; each one exactly 13 clock edges
// after the edge that sampled the event; once calibrated, every timestamp
// within 130 units (about 76 ps) of the truth and the RMS error below 45
// units (about 26 ps); at least two calibration rounds completed. The limits
// follow from the calibration statistics: a histogram of K events places the
// bin edges with a spread of sqrt(K * p * (1 - p)) counts, 32 units at mid
// period for K = 2^12; the quantisation of the virtual bins adds little.
module tb_tdc_channel;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned K_LOG2 = 12, N_CC = 16;
  localparam int unsigned LAT = 13;
  localparam realtime TCLK = 2400.0;
  localparam int unsigned N_EVENTS = 3 * (1 << K_LOG2) + 500;

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

  // Time base: the last reset edge is where the counter took the value 0.
  // Rising clock edges fall at TCLK/2 + n * TCLK.
  realtime t0;
  always @(posedge clk) if (!rst_n) t0 = $realtime;

  function automatic realtime next_edge(realtime t);
    real n;
    n = $ceil((t - TCLK / 2.0) / TCLK);
    return TCLK / 2.0 + n * TCLK;
  endfunction

  realtime t_ev[$];
  int n_ts = 0, n_cal = 0, n_bad = 0, swaps = 0;
  real sum_sq = 0.0;

  always @(posedge clk) if (rst_n && cal_swap) swaps++;

  always @(posedge clk) if (rst_n && ts_valid) begin
    realtime t;
    int      lat;
    real     want, err, span;
    n_ts++;
    checks++;
    if (t_ev.size() == 0) begin
      failures++;
      $display("timestamp without event");
    end else begin
      t = t_ev.pop_front();
      // The value seen now was set by the previous edge.
      lat = int'(($realtime - next_edge(t)) / TCLK) - 1;
      if (lat != int'(LAT)) begin
        failures++;
        $display("latency %0d edges, want %0d", lat, LAT);
      end
      if (ts_err) begin failures++; $display("edge error flagged"); end
      if (calibrated) begin
        span = real'(longint'(1) << (N_CC + K_LOG2));
        want = (t - t0) / TCLK * real'(1 << K_LOG2);
        err  = real'(ts) - want;
        while (err >  span / 2.0) err -= span;
        while (err < -span / 2.0) err += span;
        n_cal++;
        sum_sq += err * err;
        checks++;
        if (err > 130.0 || err < -130.0) begin
          failures++;
          n_bad++;
          if (n_bad < 10) $display("event at %0.1f ps: ts=%0d want %0.1f (err %0.1f)", t, ts, want, err);
        end
      end
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2100) @(posedge clk);     // calibrator clears its table
    for (int k = 0; k < int'(N_EVENTS); k++) begin
      @(posedge clk);
      #($urandom_range(1, 2399) * 1.0 + $urandom_range(0, 999) * 0.001);
      start = 1'b1;
      t_ev.push_back($realtime);
      repeat ($urandom_range(2, 4)) @(posedge clk);
      #($urandom_range(1, 2399) * 1.0);
      start = 1'b0;
      repeat ($urandom_range(1, 3)) @(posedge clk);
    end
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (n_ts != int'(N_EVENTS)) begin failures++; $display("%0d timestamps for %0d events", n_ts, N_EVENTS); end
    checks++;
    if (swaps < 2) begin failures++; $display("only %0d calibration rounds", swaps); end
    checks++;
    if (n_cal == 0 || sum_sq / real'(n_cal) > 45.0 * 45.0) begin
      failures++;
      $display("RMS error too large over %0d events", n_cal);
    end
    if (n_cal > 0) $display("calibrated events %0d, RMS error %0.2f units of T_CLK/2^%0d", n_cal, $sqrt(sum_sq / real'(n_cal)), K_LOG2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
