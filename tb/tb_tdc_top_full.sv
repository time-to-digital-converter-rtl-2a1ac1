// tb_tdc_top_full: the converter at its full default size through one
// complete calibration and measurement cycle.
//
// All parameters of the top are left at their defaults: 16 channels, each
// with 4 x 256-tap lines, 2048 virtual bins, K = 2^16 and a 32-bit coarse
// counter. The same random events are sent to all 16 channels (START high
// and low for one to three clock periods). After 2^16 + 2500 events every
// channel has built and switched to its first calibration curve; the events
// after that are checked against their true time: within 512 units of
// T_CLK / 2^16 (about 19 ps) and RMS below 200 units (about 7 ps). A
// code-density calibration over K events places each bin edge with a spread
// of sqrt(K * p * (1 - p)) counts, 128 units at mid period for K = 2^16, so
// the limits are four and about one and a half times that. Every event must
// give exactly one timestamp on every channel, in the same cycle.
module tb_tdc_top_full;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N_CH = 16, K_LOG2 = 16, N_CC = 32;
  localparam int unsigned W_TS = N_CC + K_LOG2;
  localparam realtime TCLK = 2400.0;
  localparam int unsigned N_EV = (1 << K_LOG2) + 2500;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_CH-1:0] start = '0;
  logic [N_CC-1:0] count;
  logic [N_CH-1:0] ts_valid, ts_err, calibrated, cal_swap;
  logic [N_CH-1:0][W_TS-1:0] ts;
  logic [N_CH-1:0][10:0] vbin;
  int checks = 0, failures = 0;

  tdc_top dut (.*);

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #(TCLK * 2000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t0;
  always @(posedge clk) if (!rst_n) t0 = $realtime;

  realtime t_ev[$];
  int n_ts [N_CH];
  int n_cal = 0, n_bad = 0, swaps = 0;
  real sum_sq = 0.0;

  function automatic real err_units(logic [W_TS-1:0] v, realtime t);
    real span, want, err;
    span = real'(longint'(1) << W_TS);
    want = (t - t0) / TCLK * real'(longint'(1) << K_LOG2);
    err  = real'(v) - want;
    err  = err - span * $floor(err / span + 0.5);
    return err;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (cal_swap[0]) swaps++;
    if (ts_valid != '0) begin
      realtime t;
      checks++;
      if (ts_valid != '1) begin failures++; $display("channels out of step: %b", ts_valid); end
      if (t_ev.size() == 0) begin
        failures++; $display("timestamp without event");
      end else begin
        t = t_ev.pop_front();
        for (int c = 0; c < int'(N_CH); c++) begin
          n_ts[c] += int'(ts_valid[c]);
          if (ts_err[c]) begin failures++; $display("channel %0d: edge error", c); end
          if (calibrated[c]) begin
            real err;
            err = err_units(ts[c], t);
            n_cal++;
            sum_sq += err * err;
            checks++;
            if (err > 512.0 || err < -512.0) begin
              failures++; n_bad++;
              if (n_bad < 10) $display("channel %0d: error %0.1f units", c, err);
            end
          end
        end
      end
    end
  end

  initial begin
    foreach (n_ts[c]) n_ts[c] = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2100) @(posedge clk);
    for (int k = 0; k < int'(N_EV); k++) begin
      #($urandom_range(0, 2399) * 1.0 + $urandom_range(0, 999) * 0.001);
      start = '1;
      t_ev.push_back($realtime);
      #(TCLK * (1.0 + real'($urandom_range(0, 2000)) / 1000.0)) start = '0;
      #(TCLK * (1.0 + real'($urandom_range(0, 2000)) / 1000.0));
    end
    repeat (30) @(posedge clk);
    for (int c = 0; c < int'(N_CH); c++) begin
      checks++;
      if (n_ts[c] != int'(N_EV)) begin
        failures++; $display("channel %0d: %0d timestamps for %0d events", c, n_ts[c], N_EV);
      end
    end
    checks++;
    if (swaps != 1 || calibrated != '1) begin
      failures++; $display("calibration rounds %0d, calibrated %b", swaps, calibrated);
    end
    checks++;
    if (n_cal < 1000 * int'(N_CH) || sum_sq / real'(n_cal) > 200.0 * 200.0) begin
      failures++; $display("%0d calibrated timestamps, RMS too large or too few", n_cal);
    end
    if (n_cal > 0) $display("calibrated timestamps %0d, RMS error %0.2f units of T_CLK/2^16", n_cal, $sqrt(sum_sq / real'(n_cal)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
