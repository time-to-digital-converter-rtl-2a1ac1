// tb_rate_deadtime: channel rate and dead-time test of one converter channel.
//
// Reproduces the two timing measurements made on the converter: a START
// square wave whose frequency is raised until measures fail (here 150 MHz,
// the rate the converter is rated for), and two START pulses brought as close
// as possible (here 5 ns apart, the rated dead time).
// The channel (default delay lines, K = 2^12, 16-bit counter) is first
// calibrated with events at random phases, because the square wave alone hits
// only a few phases of the clock. Then it receives:
//   * a 150 MHz square wave (period 6666.667 ps, 50 % duty) for 400 periods;
//   * 200 pairs of START pulses 2.5 ns high, 2.5 ns low, 2.5 ns high, i.e.
//     rising edges 5 ns apart, separated by idle gaps.
// Checked: one timestamp per rising edge of START; in the square wave every
// difference of consecutive timestamps equals the period, and in each pair
// the difference equals 5 ns, both within 260 units of T_CLK/2^12 (two times
// the per-event limit of the calibration statistics, about 150 ps); at least
// one calibration round before the timed part begins.
// A pulse is only seen if START is high across a rising clock edge and
// the next one is only separated if START is low across one, so this design
// reaches 150 MHz (3.33 ns per level) and a 5 ns dead time with 2.5 ns levels.
module tb_rate_deadtime;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned K_LOG2 = 12, N_CC = 16;
  localparam realtime TCLK = 2400.0;
  localparam realtime T_SQ = 1.0e6 / 150.0;   // 150 MHz period in ps
  localparam realtime T_DT = 5000.0;          // dead time between the pair
  localparam int unsigned N_CAL = (1 << K_LOG2) + 400;
  localparam int unsigned N_SQ = 400, N_PAIR = 200;
  localparam real UNITS = real'(1 << K_LOG2) / TCLK;  // units per ps
  localparam real TOL = 260.0;

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
    #(TCLK * 60000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase: 0 = calibration events, 1 = square wave, 2 = pairs (first pulse
  // of a pair), 3 = pairs (second pulse); tagged per event.
  int tags[$];
  int n_events = 0, n_ts = 0, n_sq = 0, n_pair = 0, n_bad = 0;
  logic have_prev = 1'b0;
  logic [N_CC+K_LOG2-1:0] prev_ts;
  int prev_tag = 0;

  function automatic real wrap_diff(logic [N_CC+K_LOG2-1:0] a, logic [N_CC+K_LOG2-1:0] b);
    logic [N_CC+K_LOG2-1:0] d;
    d = a - b;
    return real'(d);
  endfunction

  always @(posedge clk) if (rst_n && ts_valid) begin
    int  tag;
    real d, want;
    n_ts++;
    checks++;
    if (tags.size() == 0) begin
      failures++;
      $display("timestamp without event");
      tag = -1;
    end else tag = tags.pop_front();
    if (ts_err) begin failures++; $display("edge error flagged"); end
    if (have_prev && (tag == 1 && prev_tag == 1 || tag == 3 && prev_tag == 2)) begin
      want = (tag == 1 ? T_SQ : T_DT) * UNITS;
      d    = wrap_diff(ts, prev_ts);
      checks++;
      if (tag == 1) n_sq++; else n_pair++;
      if (!calibrated || d - want > TOL || want - d > TOL) begin
        failures++;
        n_bad++;
        if (n_bad < 10) $display("%s: interval %0.1f units, want %0.1f",
                                 tag == 1 ? "square wave" : "pair", d, want);
      end
    end
    have_prev = 1'b1;
    prev_ts   = ts;
    prev_tag  = tag;
  end

  task automatic rise(int tag);
    start = 1'b1;
    tags.push_back(tag);
    n_events++;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2100) @(posedge clk);
    // Calibration: random phases, random widths of 2 to 4 periods.
    for (int k = 0; k < int'(N_CAL); k++) begin
      @(posedge clk);
      #($urandom_range(1, 2399) * 1.0 + $urandom_range(0, 999) * 0.001);
      rise(0);
      repeat ($urandom_range(2, 3)) @(posedge clk);
      #($urandom_range(1, 2399) * 1.0);
      start = 1'b0;
      repeat ($urandom_range(1, 3)) @(posedge clk);
    end
    repeat (2200) @(posedge clk);      // last integration completes
    checks++;
    if (!calibrated) begin failures++; $display("not calibrated before the timed part"); end
    // 150 MHz square wave.
    @(posedge clk);
    #(777.0);
    for (int k = 0; k < int'(N_SQ); k++) begin
      rise(1);
      #(T_SQ / 2.0);
      start = 1'b0;
      #(T_SQ / 2.0);
    end
    // Pairs 5 ns apart.
    for (int k = 0; k < int'(N_PAIR); k++) begin
      repeat ($urandom_range(3, 6)) @(posedge clk);
      #($urandom_range(1, 2399) * 1.0 + $urandom_range(0, 999) * 0.001);
      rise(2);
      #(T_DT / 2.0);
      start = 1'b0;
      #(T_DT / 2.0);
      rise(3);
      #(T_DT / 2.0);
      start = 1'b0;
    end
    repeat (30) @(posedge clk);
    checks++;
    if (n_ts != n_events) begin failures++; $display("%0d timestamps for %0d events", n_ts, n_events); end
    checks++;
    if (n_sq != int'(N_SQ) - 1 || n_pair != int'(N_PAIR)) begin
      failures++;
      $display("checked %0d square-wave and %0d pair intervals", n_sq, n_pair);
    end
    $display("150 MHz intervals %0d, 5 ns pairs %0d, out of limits %0d", n_sq, n_pair, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
