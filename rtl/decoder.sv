// decoder: thermometric-to-binary decoder of one channel.
//
// Turns the F_OUT sampled delay-line words of one measure into a single
// virtual bin n_V in three pipelined phases:
//   EDP  - per delay line a LOG2-DN and a LOG2-UP engine find the two pulse
//          edges (log2(N_R) cycles);
//   BECP - per edge a bubble-error corrector compresses the twilight zone of
//          N_BL bits around the edge (1 cycle);
//   SIP  - a tree adder sums the 2*F_OUT corrected real bins into n_V
//          (log2(2*F_OUT) cycles).
// With the defaults (N_R = 256, F_OUT = 4) the latency is 8 + 1 + 3 = 12
// cycles, one measure per cycle, and n_V is 11 bits (0 .. 2040 of 2048
// virtual bins). Adder inputs are ordered UP1, DN1, UP2, DN2, ... as in the
// converter. The structure is the converter's; `edge_err` (some edge not
// found, i.e. an all-zero word) is this design's addition.
module decoder #(
  parameter int unsigned N_R   = tdc_pkg::N_R,
  parameter int unsigned F_OUT = tdc_pkg::F_OUT,
  parameter int unsigned N_BL  = tdc_pkg::N_BL
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   in_valid,
  input  logic [F_OUT-1:0][N_R-1:0]              n_tdl,
  output logic                                   out_valid,
  output logic [$clog2(N_R)+$clog2(2*F_OUT)-1:0] n_v,
  output logic                                   edge_err
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned WB = $clog2(N_R);
  localparam int unsigned F  = 2 * F_OUT;
  localparam int unsigned LAT_TA = $clog2(F);

  logic [F-1:0][WB-1:0] real_bins;
  logic [F-1:0]         bec_valid;
  logic [F-1:0]         bec_found;

  for (genvar k = 0; k < int'(F_OUT); k++) begin : g_line
    logic          dn_v, up_v, dn_f, up_f;
    logic [WB-1:0] dn_n, up_n;
    logic [N_BL-1:0] dn_w, up_w;

    log2_up #(.N_R(N_R), .N_BL(N_BL)) u_log2_up (
      .clk, .rst_n, .in_valid, .n_tdl(n_tdl[k]),
      .out_valid(up_v), .n_up(up_n), .up_win(up_w), .found(up_f)
    );
    log2_dn #(.N_R(N_R), .N_BL(N_BL)) u_log2_dn (
      .clk, .rst_n, .in_valid, .n_tdl(n_tdl[k]),
      .out_valid(dn_v), .n_dn(dn_n), .dn_win(dn_w), .found(dn_f)
    );
    bec_up #(.N_R(N_R), .N_BL(N_BL)) u_bec_up (
      .clk, .rst_n, .in_valid(up_v), .n_up(up_n), .up_win(up_w), .in_found(up_f),
      .out_valid(bec_valid[2*k]), .n_up_corr(real_bins[2*k]), .out_found(bec_found[2*k])
    );
    bec_dn #(.N_R(N_R), .N_BL(N_BL)) u_bec_dn (
      .clk, .rst_n, .in_valid(dn_v), .n_dn(dn_n), .dn_win(dn_w), .in_found(dn_f),
      .out_valid(bec_valid[2*k+1]), .n_dn_corr(real_bins[2*k+1]), .out_found(bec_found[2*k+1])
    );
  end

  tree_adder #(.F(F), .W(WB)) u_ta (
    .clk, .rst_n,
    .in_valid (bec_valid[0]),
    .in_bins  (real_bins),
    .out_valid,
    .out_sum  (n_v)
  );

  // The found flags travel beside the adder tree with its latency.
  logic [LAT_TA:0] err_pipe;
  assign err_pipe[0] = ~&bec_found;
  for (genvar l = 1; l <= int'(LAT_TA); l++) begin : g_err
    always_ff @(posedge clk) err_pipe[l] <= err_pipe[l-1];
  end
  assign edge_err = err_pipe[LAT_TA];

  // All lanes run in lock step.
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
                               (bec_valid == '0) || (bec_valid == '1));
endmodule
