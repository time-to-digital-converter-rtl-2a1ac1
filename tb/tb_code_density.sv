// tb_code_density: code-density test of one channel at its default size.
//
// Linearity of a TDC is measured by sending it events uniformly distributed
// in time and histogramming its output codes: every code should be hit
// equally often. This testbench does that for one channel with every
// parameter at its default (4 x 256-tap lines, K = 2^16, 32-bit counter).
// After the first calibration (2^16 events plus the integration time) it
// sends N_CDT = 2^17 further events at uniformly random phases and
// histograms the fine part of each timestamp, ts[15:0] (units T_CLK/2^16),
// into 64 groups of 1024 codes (37.5 ps each, wider than any virtual bin, so
// that a bin's events are not forced onto one side of a group edge). From the
// group counts:
//   dnl[g] = count[g] / mean - 1            (fraction of a group)
//   inl[g] = running sum of dnl up to g
// both reported in picoseconds. For comparison the same events are also
// grouped by raw virtual bin, mapped linearly onto the clock period (the
// converter without calibration).
// Limits: with 2048 events per group the statistical noise of dnl is 0.022 of
// a group; a virtual bin (up to about 16 ps) straddling a group edge moves up
// to half its width; the calibration curve itself is off by up to about
// 5 ps (sqrt(K p (1 - p)) counts). So |dnl| <= 0.4 group (15 ps) and
// |inl| <= 0.4 group, and the calibrated INL must be at most half the raw one.
// Also checked: one timestamp per event and no edge errors.
module tb_code_density;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned K_LOG2 = tdc_pkg::K_LOG2;
  localparam int unsigned N_CC   = tdc_pkg::N_CC;
  localparam int unsigned W_VBIN = tdc_pkg::W_VBIN;
  localparam realtime TCLK = 2400.0;
  localparam int unsigned N_CAL = (1 << K_LOG2) + 200;
  localparam int unsigned N_CDT = 1 << 17;
  localparam int unsigned NG = 64;                    // code groups
  localparam int unsigned GSH = K_LOG2 - $clog2(NG);  // codes per group = 2^GSH

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N_CC-1:0] count;
  logic ts_valid, ts_err, calibrated, cal_swap;
  logic [N_CC+K_LOG2-1:0] ts;
  logic [W_VBIN-1:0] vbin;
  int checks = 0, failures = 0;

  coarse_counter u_cc (.clk, .rst_n, .count);
  tdc_channel dut (.*);

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #(TCLK * 1500000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  grp [NG];
  int  raw [1 << W_VBIN];
  logic cdt = 1'b0;          // set while the code-density events are sent
  int  n_ev = 0, n_ts = 0, n_err = 0, n_cdt_ts = 0;
  int  tags[$];

  initial begin
    for (int g = 0; g < int'(NG); g++) grp[g] = 0;
    for (int b = 0; b < (1 << W_VBIN); b++) raw[b] = 0;
  end

  always @(posedge clk) if (rst_n && ts_valid) begin
    int tag;
    n_ts++;
    tag = tags.size() > 0 ? tags.pop_front() : -1;
    if (ts_err || tag < 0) n_err++;
    if (tag == 1) begin
      n_cdt_ts++;
      grp[ts[K_LOG2-1:GSH]]++;
      raw[vbin]++;
    end
  end

  task automatic event_at_random_phase(int tag);
    @(posedge clk);
    #($urandom_range(1, 2399) * 1.0 + $urandom_range(0, 999) * 0.001);
    start = 1'b1;
    tags.push_back(tag);
    n_ev++;
    repeat ($urandom_range(2, 3)) @(posedge clk);
    #($urandom_range(1, 2399) * 1.0);
    start = 1'b0;
    repeat ($urandom_range(1, 2)) @(posedge clk);
  endtask

  initial begin
    real mean, d, inl, dnl_max, inl_max, sd_cal, rinl_max, gps;
    int  nz, vmin, vmax;
    int  rgrp [NG];
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat ((1 << W_VBIN) + 20) @(posedge clk);
    for (int k = 0; k < int'(N_CAL); k++) event_at_random_phase(0);
    repeat ((1 << W_VBIN) + 50) @(posedge clk);
    checks++;
    if (!calibrated) begin failures++; $display("not calibrated after %0d events", N_CAL); end
    cdt = 1'b1;
    for (int k = 0; k < int'(N_CDT); k++) event_at_random_phase(1);
    repeat (30) @(posedge clk);

    checks += 2;
    if (n_ts != n_ev) begin failures++; $display("%0d timestamps for %0d events", n_ts, n_ev); end
    if (n_err != 0)   begin failures++; $display("%0d edge errors or stray timestamps", n_err); end

    gps  = TCLK / real'(NG);                 // ps per group
    mean = real'(n_cdt_ts) / real'(NG);
    inl = 0.0; dnl_max = 0.0; inl_max = 0.0; sd_cal = 0.0;
    for (int g = 0; g < int'(NG); g++) begin
      d = real'(grp[g]) / mean - 1.0;
      inl += d;
      sd_cal += d * d;
      if (d > dnl_max || -d > dnl_max) dnl_max = d < 0.0 ? -d : d;
      if (inl > inl_max || -inl > inl_max) inl_max = inl < 0.0 ? -inl : inl;
      checks += 2;
      if (d > 0.4 || d < -0.4) begin failures++; $display("group %0d: dnl %0.3f", g, d); end
      if (inl > 0.4 || inl < -0.4) begin failures++; $display("group %0d: inl %0.3f", g, inl); end
    end
    sd_cal = $sqrt(sd_cal / real'(NG));
    // Raw virtual bins vmin..vmax mapped linearly onto the period, grouped
    // the same way.
    vmin = -1; vmax = 0; nz = 0;
    for (int b = 0; b < (1 << W_VBIN); b++) if (raw[b] > 0) begin
      if (vmin < 0) vmin = b;
      vmax = b;
      nz++;
    end
    for (int g = 0; g < int'(NG); g++) rgrp[g] = 0;
    for (int b = vmin; b <= vmax; b++)
      rgrp[(b - vmin) * int'(NG) / (vmax - vmin + 1)] += raw[b];
    inl = 0.0; rinl_max = 0.0;
    for (int g = 0; g < int'(NG); g++) begin
      inl += real'(rgrp[g]) / mean - 1.0;
      if (inl > rinl_max || -inl > rinl_max) rinl_max = inl < 0.0 ? -inl : inl;
    end
    checks++;
    if (inl_max > rinl_max / 2.0) begin failures++; $display("calibration does not linearise"); end
    $display("code density: %0d events, %0d groups of %0.3f ps", n_cdt_ts, NG, gps);
    $display("  calibrated: max |dnl| %0.3f ps, max |inl| %0.3f ps, rms dnl %0.3f of a group",
             dnl_max * gps, inl_max * gps, sd_cal);
    $display("  raw bins:   %0d bins in use (%0d..%0d), max |inl| %0.3f ps without calibration",
             nz, vmin, vmax, rinl_max * gps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
