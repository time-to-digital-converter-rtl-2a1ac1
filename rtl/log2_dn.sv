// log2_dn: edge detector for the DN edge of a delay-line code.
//
// The delay line is sampled into a word in which tap 0 is bit 0. The front of
// the launched pulse is the highest 1 in the word; its index,
// n_DN = floor(log2(n_TDL)), is the DN edge position (the code goes from 1 to
// 0 there). The work is done by a pipelined LOG2 engine, so the latency is
// log2(N_R) clock cycles, one word per cycle, as in the converter.
//
// Besides n_DN the block hands on the N_BL code bits n_DN-(N_BL-1) .. n_DN
// (`dn_win`, bit N_BL-1 is the bit at n_DN), which the bubble corrector
// needs. `found` is 0 for an all-zero word.
module log2_dn #(
  parameter int unsigned N_R  = tdc_pkg::N_R,
  parameter int unsigned N_BL = tdc_pkg::N_BL
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [N_R-1:0]         n_tdl,
  output logic                   out_valid,
  output logic [$clog2(N_R)-1:0] n_dn,
  output logic [N_BL-1:0]        dn_win,
  output logic                   found
);
  timeunit 1ps;
  timeprecision 1fs;

  log2_engine #(.N(N_R), .G(N_BL - 1)) u_log2 (
    .clk, .rst_n,
    .in_valid,
    .in_word   (n_tdl),
    .out_valid,
    .out_idx   (n_dn),
    .out_win   (dn_win),
    .out_found (found)
  );
endmodule
