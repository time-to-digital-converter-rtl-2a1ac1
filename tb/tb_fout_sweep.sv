// tb_fout_sweep: sub-interpolation sweep F = 2 x f_OUT, f_OUT = 1, 2, 4, 8, 10.
//
// The converter was evaluated with one, two, four, eight and ten delay lines
// per channel (two edges each), trading area for finer virtual bins and
// better precision. This testbench builds one channel of each of those sizes
// (default 256-tap lines, K = 2^12, 16-bit counter), feeds them all the same
// random START events and checks, for each:
//   * one timestamp per event, with the latency the parameters imply,
//     log2(N_R) + ceil(log2(2 f_OUT)) + 2 clock edges after the sampling edge;
//   * once calibrated, every timestamp within 130 units of T_CLK/2^12 of the
//     true time and the RMS error below 45 units (the calibration statistics
//     for K = 2^12, as in the single-channel test);
//   * the number of distinct virtual bins seen grows with f_OUT (finer bins),
//     reported together with the mean virtual-bin width T_CLK / bins seen.
//     With about 5000 calibrated events the larger sizes cannot show every
//     bin, so the reported mean width is an upper bound for them.
// f_OUT = 10 gives F = 20, which is not a power of two: the tree adder pads
// to 32 inputs and the virtual-bin code has 13 bits, of which a part is used.
module tb_fout_sweep;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned K_LOG2 = 12, N_CC = 16, N_R = 256;
  localparam int unsigned NCFG = 5;
  localparam int unsigned FO [NCFG] = '{1, 2, 4, 8, 10};
  localparam realtime TCLK = 2400.0;
  localparam int unsigned N_EVENTS = 2 * (1 << K_LOG2) + 1500;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N_CC-1:0] count;
  int checks = 0, failures = 0;

  coarse_counter #(.N_CC(N_CC)) u_cc (.clk, .rst_n, .count);

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #(TCLK * 100000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  realtime t0;
  always @(posedge clk) if (!rst_n) t0 = $realtime;

  function automatic realtime next_edge(realtime t);
    real n;
    n = $ceil((t - TCLK / 2.0) / TCLK);
    return TCLK / 2.0 + n * TCLK;
  endfunction

  // Per-configuration results, each written by its own checker only.
  int  n_ts [NCFG], n_cal [NCFG], n_bad [NCFG], n_lat [NCFG], n_seen [NCFG], c_chk [NCFG];
  real sum_sq [NCFG];
  realtime t_ev[NCFG][$];

  for (genvar g = 0; g < int'(NCFG); g++) begin : g_cfg
    localparam int unsigned F_OUT = FO[g];
    localparam int unsigned WV    = $clog2(N_R) + $clog2(2 * F_OUT);
    localparam int unsigned LAT   = $clog2(N_R) + $clog2(2 * F_OUT) + 2;
    logic ts_valid, ts_err, calibrated, cal_swap;
    logic [N_CC+K_LOG2-1:0] ts;
    logic [WV-1:0] vbin;
    logic seen [1 << WV];

    tdc_channel #(.F_OUT(F_OUT), .K_LOG2(K_LOG2), .N_CC(N_CC), .CH_ID(g)) u_ch (
      .clk, .rst_n, .start, .count, .ts_valid, .ts, .ts_err, .calibrated,
      .cal_swap, .vbin);

    initial begin
      n_ts[g] = 0; n_cal[g] = 0; n_bad[g] = 0; n_lat[g] = 0; n_seen[g] = 0;
      c_chk[g] = 0; sum_sq[g] = 0.0;
      for (int i = 0; i < (1 << WV); i++) seen[i] = 1'b0;
    end

    always @(posedge clk) if (rst_n && ts_valid) begin
      realtime t;
      real     want, err, span;
      n_ts[g]++;
      c_chk[g]++;
      if (t_ev[g].size() == 0) n_lat[g]++;
      else begin
        t = t_ev[g].pop_front();
        if (int'(($realtime - next_edge(t)) / TCLK) - 1 != int'(LAT) || ts_err) n_lat[g]++;
        if (calibrated) begin
          if (!seen[vbin]) n_seen[g]++;
          seen[vbin] = 1'b1;
          span = real'(longint'(1) << (N_CC + K_LOG2));
          want = (t - t0) / TCLK * real'(1 << K_LOG2);
          err  = real'(ts) - want;
          while (err >  span / 2.0) err -= span;
          while (err < -span / 2.0) err += span;
          n_cal[g]++;
          c_chk[g]++;
          sum_sq[g] += err * err;
          if (err > 130.0 || err < -130.0) n_bad[g]++;
        end
      end
    end
  end

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (8300) @(posedge clk);     // the largest calibrator clears its table
    for (int k = 0; k < int'(N_EVENTS); k++) begin
      @(posedge clk);
      #($urandom_range(1, 2399) * 1.0 + $urandom_range(0, 999) * 0.001);
      start = 1'b1;
      for (int g = 0; g < int'(NCFG); g++) t_ev[g].push_back($realtime);
      repeat ($urandom_range(2, 3)) @(posedge clk);
      #($urandom_range(1, 2399) * 1.0);
      start = 1'b0;
      repeat ($urandom_range(1, 2)) @(posedge clk);
    end
    repeat (30) @(posedge clk);
    for (int g = 0; g < int'(NCFG); g++) begin
      real rms;
      checks += c_chk[g] + 3;
      failures += n_lat[g] + n_bad[g];
      rms = n_cal[g] > 0 ? $sqrt(sum_sq[g] / real'(n_cal[g])) : 1.0e9;
      if (n_ts[g] != int'(N_EVENTS)) begin failures++; $display("F = 2x%0d: %0d timestamps", FO[g], n_ts[g]); end
      if (rms > 45.0) begin failures++; $display("F = 2x%0d: RMS error too large", FO[g]); end
      if (g > 0 && n_seen[g] <= n_seen[g-1]) begin failures++; $display("F = 2x%0d: bins not finer", FO[g]); end
      $display("F = 2x%-2d  latency/err faults %0d  calibrated %0d  RMS %6.2f units (%5.2f ps)  bins seen %4d  mean bin %5.2f ps  out of limits %0d",
               FO[g], n_lat[g], n_cal[g], rms, rms * TCLK / real'(1 << K_LOG2),
               n_seen[g], TCLK / real'(n_seen[g] > 0 ? n_seen[g] : 1), n_bad[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
