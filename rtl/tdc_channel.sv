// tdc_channel: one channel of the TDL time-to-digital converter.
//
// A time event on `start` is turned into a timestamp T = T_COARSE - T_FINE
// (Nutt interpolation):
//   * the launcher (swul) makes a short 2-edge pulse from the event and, by
//     sampling the event on the TDC clock, the STOP signal;
//   * F_OUT delay lines (tdl), each fed the pulse a little later than the
//     previous one (Super Wave Union), are sampled on STOP, giving
//     2*F_OUT edge positions per event;
//   * the decoder turns the F_OUT codes into one virtual bin n_V (the sum of
//     the 2*F_OUT bubble-corrected edge positions), which grows with the time
//     from the event to STOP;
//   * the calibrator maps n_V to T_FINE in units of T_CLK / 2^K_LOG2, using a
//     code-density histogram it keeps refreshing from the events themselves;
//   * the coarse TDC (c_tdc) captures the shared coarse counter on STOP,
//     giving T_COARSE in clock periods.
// The timestamp is ts = T_COARSE * 2^K_LOG2 - T_FINE, i.e. a fixed-point time
// in units of T_CLK / 2^K_LOG2 (the integer part is the counter, the fraction
// the calibrated fine time); it is N_CC + K_LOG2 bits wide and wraps with the
// counter.
//
// Timing: `ts_valid` is set by the clock edge that comes
// LAT = log2(N_R) + log2(2*F_OUT) + 2 edges after the edge that sampled the
// event (13 with the defaults), one cycle per event; events need START low
// for at least one clock edge between them. `calibrated` is 0 until the first
// calibration has completed; timestamps before that carry no valid fine part.
// `ts_err` flags a measure in which some delay line showed no edge.
//
// The structure is the converter's. The per-line pulse offset, the pairing of
// the coarse value with its fine value by a delay line of the decoder's
// latency, and the fixed-point timestamp format are this design's choices.
module tdc_channel #(
  parameter int unsigned N_R         = tdc_pkg::N_R,
  parameter int unsigned F_OUT       = tdc_pkg::F_OUT,
  parameter int unsigned N_BL        = tdc_pkg::N_BL,
  parameter int unsigned K_LOG2      = tdc_pkg::K_LOG2,
  parameter int unsigned N_CC        = tdc_pkg::N_CC,
  parameter int unsigned CH_ID       = 0,      // seeds the delay-line model
  parameter realtime     LINE_OFS_PS = 4.0     // extra pulse delay per line
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [N_CC-1:0]          count,        // shared coarse counter
  output logic                     ts_valid,
  output logic [N_CC+K_LOG2-1:0]   ts,
  output logic                     ts_err,
  output logic                     calibrated,
  output logic                     cal_swap,     // a new CC went live
  output logic [$clog2(N_R)+$clog2(2*F_OUT)-1:0] vbin  // raw n_V of ts
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned W_VBIN  = $clog2(N_R) + $clog2(2 * F_OUT);
  localparam int unsigned LAT_DEC = $clog2(N_R) + 1 + $clog2(2 * F_OUT);

  logic pulse, stop, hit;
  logic [F_OUT-1:0][N_R-1:0] codes;

  swul u_swul (.clk, .rst_n, .start, .pulse, .stop);

  for (genvar k = 0; k < int'(F_OUT); k++) begin : g_tdl
    tdl #(
      .N_R       (N_R),
      .SEED      (CH_ID * 64 + k + 1),
      .OFFSET_PS (LINE_OFS_PS * k)
    ) u_tdl (
      .start (pulse),
      .stop  (stop),
      .code  (codes[k])
    );
  end

  // Coarse part.
  logic            c_valid;
  logic [N_CC-1:0] c_coarse;

  c_tdc #(.N_CC(N_CC)) u_c_tdc (
    .clk, .rst_n, .stop, .count,
    .hit, .valid(c_valid), .coarse(c_coarse)
  );

  // Fine part.
  logic              d_valid, d_err;
  logic [W_VBIN-1:0] d_vbin;

  decoder #(.N_R(N_R), .F_OUT(F_OUT), .N_BL(N_BL)) u_decoder (
    .clk, .rst_n,
    .in_valid (hit),
    .n_tdl    (codes),
    .out_valid(d_valid),
    .n_v      (d_vbin),
    .edge_err (d_err)
  );

  logic            f_valid;
  logic [K_LOG2:0] f_fine;

  calibrator #(.W_VBIN(W_VBIN), .K_LOG2(K_LOG2)) u_cal (
    .clk, .rst_n,
    .in_valid  (d_valid && !d_err),
    .in_bin    (d_vbin),
    .out_valid (f_valid),
    .out_fine  (f_fine),
    .calibrated,
    .swap_pulse(cal_swap)
  );

  // The coarse value waits for its fine value; the error flag and the raw bin
  // wait one cycle for the calibrator.
  logic [LAT_DEC-1:0][N_CC-1:0] coarse_dly;
  logic                         err_q;
  logic [W_VBIN-1:0]            vbin_q;

  always_ff @(posedge clk) begin
    coarse_dly[0] <= c_coarse;
    for (int i = 1; i < int'(LAT_DEC); i++) coarse_dly[i] <= coarse_dly[i-1];
    err_q  <= d_err;
    vbin_q <= d_vbin;
  end

  assign ts_valid = f_valid;
  assign ts       = {coarse_dly[LAT_DEC-1], K_LOG2'(0)} - (N_CC+K_LOG2)'(f_fine);
  assign ts_err   = err_q;
  assign vbin     = vbin_q;

  // The coarse and fine streams stay in step.
  a_pair: assert property (@(posedge clk) disable iff (!rst_n)
                           c_valid |-> ##(LAT_DEC) f_valid);
endmodule
