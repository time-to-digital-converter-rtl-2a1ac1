// tdc_pkg: sizes shared by the TDL-TDC blocks.
//
// The defaults describe the 28-nm (7-series) build of the converter: 256-tap
// delay lines, a Super Wave Union of E = 2 edges over f_OUT = 4 lines (F = 8
// real bins per measure, 2048 virtual bins), bubble length 4, calibration
// over K = 2^16 samples, a 32-bit coarse counter and 16 channels. All of these
// numbers are the ones the converter was characterised with; the derived
// widths below are this design's own bookkeeping.
package tdc_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  parameter int unsigned N_R    = 256;  // taps per delay line
  parameter int unsigned F_OUT  = 4;    // delay lines per channel
  parameter int unsigned E_EDGE = 2;    // edges per delay line (DN and UP)
  parameter int unsigned F_SUB  = E_EDGE * F_OUT;   // sub-interpolation factor
  parameter int unsigned N_BL   = 4;    // bubble length corrected by BEC
  parameter int unsigned K_LOG2 = 16;   // calibration length K = 2^K_LOG2
  parameter int unsigned N_CC   = 32;   // coarse counter width
  parameter int unsigned N_CH   = 16;   // channels

  // Derived widths.
  parameter int unsigned W_BIN  = $clog2(N_R);                 // real bin, w = 8
  parameter int unsigned W_VBIN = W_BIN + $clog2(F_SUB);       // virtual bin, 11 (2048 bins)
endpackage
