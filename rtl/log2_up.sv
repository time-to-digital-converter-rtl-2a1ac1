// log2_up: edge detector for the UP edge of a delay-line code.
//
// The tail of the launched pulse is the lowest 1 of the sampled word. The word
// is bit-reversed (swap), its floor(log2) is found by the same pipelined LOG2
// engine as the DN detector, and the result is mirrored back:
// n_UP = (N_R - 1) - floor(log2(swap(n_TDL))). Latency log2(N_R) cycles.
//
// `up_win` holds the N_BL code bits n_UP .. n_UP+(N_BL-1) (bit N_BL-1 is the
// bit at n_UP, lower bits go up the line), for the bubble corrector. Guard
// bits beyond the last tap read as 1. `found` is 0 for an all-zero word.
module log2_up #(
  parameter int unsigned N_R  = tdc_pkg::N_R,
  parameter int unsigned N_BL = tdc_pkg::N_BL
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [N_R-1:0]         n_tdl,
  output logic                   out_valid,
  output logic [$clog2(N_R)-1:0] n_up,
  output logic [N_BL-1:0]        up_win,
  output logic                   found
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [N_R-1:0]         swapped;
  logic [$clog2(N_R)-1:0] idx;

  always_comb begin
    for (int i = 0; i < int'(N_R); i++) swapped[i] = n_tdl[N_R-1-i];
  end

  log2_engine #(.N(N_R), .G(N_BL - 1)) u_log2 (
    .clk, .rst_n,
    .in_valid,
    .in_word   (swapped),
    .out_valid,
    .out_idx   (idx),
    .out_win   (up_win),
    .out_found (found)
  );

  // N_R is a power of two, so (N_R - 1) - idx is the bitwise complement.
  assign n_up = ~idx;
endmodule
