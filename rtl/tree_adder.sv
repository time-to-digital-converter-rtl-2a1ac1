// tree_adder: pipelined tree adder (TA) of the sub-interpolation phase.
//
// Adds F unsigned W-bit real bins into one virtual bin. Inputs are added in
// pairs, one pipeline register per level, so F = 8 takes log2(F) = 3 cycles
// and the result is W + log2(F) bits wide (w+1, w+2, w+3 over the levels).
// When F is not a power of two the missing leaves are zero (this design's
// choice). `in_valid` is carried alongside with the same latency.
module tree_adder #(
  parameter int unsigned F = tdc_pkg::F_SUB,
  parameter int unsigned W = tdc_pkg::W_BIN
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [F-1:0][W-1:0]         in_bins,
  output logic                        out_valid,
  output logic [W+$clog2(F)-1:0]      out_sum
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned L  = $clog2(F);
  localparam int unsigned FP = 1 << L;

  for (genvar l = 0; l <= L; l++) begin : g_lv
    logic [(FP >> l)-1:0][W+l-1:0] s;
    logic                          vld;
  end

  for (genvar i = 0; i < int'(FP); i++) begin : g_leaf
    if (i < int'(F)) begin : g_in
      assign g_lv[0].s[i] = in_bins[i];
    end else begin : g_zero
      assign g_lv[0].s[i] = '0;
    end
  end
  assign g_lv[0].vld = in_valid;

  for (genvar l = 1; l <= L; l++) begin : g_add
    always_ff @(posedge clk) begin
      if (!rst_n) g_lv[l].vld <= 1'b0;
      else        g_lv[l].vld <= g_lv[l-1].vld;
      for (int j = 0; j < int'(FP >> l); j++)
        g_lv[l].s[j] <= {1'b0, g_lv[l-1].s[2*j]} + {1'b0, g_lv[l-1].s[2*j+1]};
    end
  end

  assign out_valid = g_lv[L].vld;
  assign out_sum   = g_lv[L].s[0];
endmodule
