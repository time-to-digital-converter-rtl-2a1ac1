// tb_decoder: self-checking testbench of the thermometric-to-binary decoder.
//
// Feeds sets of four 256-tap codes (runs of 1s with random bubbles near both
// ends, now and then an all-zero line) with random gaps, and checks the
// virtual bin against a reference written straight from the edge equations:
// per line n_DN = top 1, n_UP = bottom 1, each corrected by the number of 0s
// in the N_BL = 4 bits next to it (down for DN, up for UP), all eight summed.
// The result must appear exactly 8 + 1 + 3 = 12 cycles after the input, and
// `edge_err` must flag exactly the sets with an empty line.
module tb_decoder;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N_R = 256, F_OUT = 4, N_BL = 4, LAT = 12;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [F_OUT-1:0][N_R-1:0] n_tdl = '0;
  logic out_valid, edge_err;
  logic [10:0] n_v;
  int checks = 0, failures = 0;

  decoder #(.N_R(N_R), .F_OUT(F_OUT), .N_BL(N_BL)) dut (.*);

  always #1200 clk = ~clk;

  initial begin
    #(2400 * 50000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N_R-1:0] gen_line(int empty_pct);
    logic [N_R-1:0] w;
    int lo, hi;
    if ($urandom_range(0, 99) < empty_pct) return '0;
    lo = $urandom_range(0, 120);
    hi = $urandom_range(lo, N_R - 1);
    w = '0;
    for (int i = lo; i <= hi; i++) w[i] = 1'b1;
    for (int j = 1; j < int'(N_BL); j++) begin
      if (hi - j > lo && $urandom_range(0, 2) == 0) w[hi - j] = 1'b0;
      if (lo + j < hi && $urandom_range(0, 2) == 0) w[lo + j] = 1'b0;
    end
    return w;
  endfunction

  task automatic reference(input logic [F_OUT-1:0][N_R-1:0] c, output int sum, output bit err);
    sum = 0; err = 0;
    for (int k = 0; k < int'(F_OUT); k++) begin
      int dn, up, z;
      bit any;
      dn = 0; up = N_R - 1; any = 0;
      for (int i = 0; i < int'(N_R); i++) if (c[k][i]) begin dn = i; any = 1; end
      for (int i = N_R - 1; i >= 0; i--) if (c[k][i]) up = i;
      if (!any) err = 1;
      z = 0;
      for (int j = 0; j < int'(N_BL); j++) if (dn - j >= 0 && !c[k][dn - j]) z++;
      sum += (dn - z < 0) ? 0 : dn - z;
      z = 0;
      for (int j = 0; j < int'(N_BL); j++) if (up + j < int'(N_R) && !c[k][up + j]) z++;
      sum += (up + z > int'(N_R) - 1) ? int'(N_R) - 1 : up + z;
    end
  endtask

  int   hs [int];
  bit   he [int];
  logic hv [int];
  int cyc = 0, n_out = 0, n_err = 0;

  always @(posedge clk) begin
    int s; bit e;
    reference(n_tdl, s, e);
    hs[cyc] = s; he[cyc] = e;
    hv[cyc] = in_valid && rst_n;
    if (cyc >= int'(LAT) + 3) begin
      checks++;
      if (out_valid !== hv[cyc-LAT]) begin
        failures++;
        $display("cycle %0d: valid %b want %b", cyc, out_valid, hv[cyc-LAT]);
      end else if (out_valid) begin
        n_out++;
        if (he[cyc-LAT]) n_err++;
        if (edge_err !== he[cyc-LAT] || (!he[cyc-LAT] && int'(n_v) != hs[cyc-LAT])) begin
          failures++;
          $display("cycle %0d: n_v=%0d err=%b want %0d %b", cyc, n_v, edge_err, hs[cyc-LAT], he[cyc-LAT]);
        end
      end
    end
    cyc++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3000) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      for (int k = 0; k < int'(F_OUT); k++) n_tdl[k] = gen_line(2);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    checks++;
    if (n_out < 1500 || n_err == 0) begin
      failures++;
      $display("coverage: %0d outputs, %0d with an empty line", n_out, n_err);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
