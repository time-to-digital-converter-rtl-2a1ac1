// tdc_top: multi-channel TDL time-to-digital converter.
//
// N_CH independent channels share one coarse counter driven by the TDC clock,
// so every timestamp is on the same time base (Nutt interpolation, the
// counter gives the clock period, the calibrated delay lines the position
// inside it). Each channel time-stamps the rising edges of its `start` input.
//
// Per channel c, ts[c] is valid for one cycle when ts_valid[c] is 1; it is a
// fixed-point time in units of T_CLK / 2^K_LOG2 since the coarse counter was
// last 0 (N_CC + K_LOG2 = 48 bits: 32 bits of clock periods and 16 bits of
// fraction by default). calibrated[c] goes to 1 once the channel has built its
// first calibration from 2^K_LOG2 of its own events; cal_swap[c] pulses each
// time a fresh calibration goes live. `count` is the shared coarse counter.
// Defaults: 16 channels of 4 x 256-tap lines, 2048 virtual bins, K = 2^16,
// a 32-bit counter, which at the 2.4 ns clock of the 28-nm device covers
// 10.3 s.
module tdc_top #(
  parameter int unsigned N_CH   = tdc_pkg::N_CH,
  parameter int unsigned N_R    = tdc_pkg::N_R,
  parameter int unsigned F_OUT  = tdc_pkg::F_OUT,
  parameter int unsigned N_BL   = tdc_pkg::N_BL,
  parameter int unsigned K_LOG2 = tdc_pkg::K_LOG2,
  parameter int unsigned N_CC   = tdc_pkg::N_CC
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic [N_CH-1:0]                     start,
  output logic [N_CC-1:0]                     count,
  output logic [N_CH-1:0]                     ts_valid,
  output logic [N_CH-1:0][N_CC+K_LOG2-1:0]    ts,
  output logic [N_CH-1:0]                     ts_err,
  output logic [N_CH-1:0]                     calibrated,
  output logic [N_CH-1:0]                     cal_swap,
  output logic [N_CH-1:0][$clog2(N_R)+$clog2(2*F_OUT)-1:0] vbin
);
  timeunit 1ps;
  timeprecision 1fs;

  coarse_counter #(.N_CC(N_CC)) u_cc (.clk, .rst_n, .count);

  for (genvar c = 0; c < int'(N_CH); c++) begin : g_ch
    tdc_channel #(
      .N_R(N_R), .F_OUT(F_OUT), .N_BL(N_BL), .K_LOG2(K_LOG2), .N_CC(N_CC),
      .CH_ID(c)
    ) u_ch (
      .clk, .rst_n,
      .start      (start[c]),
      .count,
      .ts_valid   (ts_valid[c]),
      .ts         (ts[c]),
      .ts_err     (ts_err[c]),
      .calibrated (calibrated[c]),
      .cal_swap   (cal_swap[c]),
      .vbin       (vbin[c])
    );
  end
endmodule
