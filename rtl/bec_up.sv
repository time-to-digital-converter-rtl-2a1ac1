// bec_up: bubble-error correction (compression) at the UP edge.
//
// Counts the zeros among the N_BL code bits that start at n_UP and go up the
// line, and moves the edge up by that amount: n_UP+ = n_UP + (N_BL - sum).
// One pipeline register: result one clock after the input. The result is
// clamped at N_R - 1 (only reachable for an all-zero word).
module bec_up #(
  parameter int unsigned N_R  = tdc_pkg::N_R,
  parameter int unsigned N_BL = tdc_pkg::N_BL
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [$clog2(N_R)-1:0] n_up,
  input  logic [N_BL-1:0]        up_win,
  input  logic                   in_found,
  output logic                   out_valid,
  output logic [$clog2(N_R)-1:0] n_up_corr,
  output logic                   out_found
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned WB = $clog2(N_R);
  localparam int unsigned WZ = $clog2(N_BL + 1);

  logic [WZ-1:0] zeros;
  logic [WB:0]   sum;

  always_comb begin
    zeros = '0;
    for (int i = 0; i < int'(N_BL); i++) zeros += WZ'(!up_win[i]);
    sum = {1'b0, n_up} + (WB+1)'(zeros);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
    out_found <= in_found;
    if (sum > (WB+1)'(N_R - 1)) n_up_corr <= WB'(N_R - 1);
    else                        n_up_corr <= sum[WB-1:0];
  end
endmodule
