// bec_dn: bubble-error correction (compression) at the DN edge.
//
// Between the clean 1s and 0s of the sampled code lies a twilight zone of up
// to N_BL random bits. The corrector counts the zeros among the N_BL bits that
// end at n_DN (N_BL - sum of the bits, a small look-up in hardware) and moves
// the edge down by that amount: n_DN- = n_DN - (N_BL - sum). Different bubble
// patterns with the same number of zeros give the same correction.
// One pipeline register: result one clock after the input. The result is
// clamped at 0 (only reachable for an all-zero word, flagged by `found`).
module bec_dn #(
  parameter int unsigned N_R  = tdc_pkg::N_R,
  parameter int unsigned N_BL = tdc_pkg::N_BL
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [$clog2(N_R)-1:0] n_dn,
  input  logic [N_BL-1:0]        dn_win,
  input  logic                   in_found,
  output logic                   out_valid,
  output logic [$clog2(N_R)-1:0] n_dn_corr,
  output logic                   out_found
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned WB = $clog2(N_R);
  localparam int unsigned WZ = $clog2(N_BL + 1);

  logic [WZ-1:0] zeros;

  always_comb begin
    zeros = '0;
    for (int i = 0; i < int'(N_BL); i++) zeros += WZ'(!dn_win[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    out_found <= in_found;
    if (n_dn >= WB'(zeros)) n_dn_corr <= n_dn - WB'(zeros);
    else                    n_dn_corr <= '0;
  end
endmodule
