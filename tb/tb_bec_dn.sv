// tb_bec_dn: self-checking testbench of the DN-edge bubble corrector.
//
// Drives random edge positions and N_BL-bit windows, including every window
// pattern at small positions, and checks that one cycle later the corrected
// position is n_DN minus the number of zeros in the window (never below 0).
module tb_bec_dn;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N_R  = 256;
  localparam int unsigned N_BL = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_found = 1'b0;
  logic [7:0] n_dn = '0;
  logic [N_BL-1:0] dn_win = '0;
  logic out_valid, out_found;
  logic [7:0] n_dn_corr;
  int checks = 0, failures = 0;

  bec_dn #(.N_R(N_R), .N_BL(N_BL)) dut (.*);

  always #1200 clk = ~clk;

  initial begin
    #(2400 * 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q[$];
  logic expv_q[$];
  logic expf_q[$];

  always @(posedge clk) if (rst_n) begin
    int z, e;
    z = 0;
    for (int i = 0; i < int'(N_BL); i++) z += (dn_win[i] == 1'b0);
    e = int'(n_dn) - z;
    if (e < 0) e = 0;
    exp_q.push_back(e);
    expv_q.push_back(in_valid);
    expf_q.push_back(in_found);
  end

  always @(posedge clk) if (rst_n && exp_q.size() > 1) begin
    int e; logic v, f;
    e = exp_q.pop_front(); v = expv_q.pop_front(); f = expf_q.pop_front();
    checks++;
    if (out_valid !== v || (v && (int'(n_dn_corr) != e || out_found !== f))) begin
      failures++;
      $display("got v=%b n=%0d f=%b want v=%b n=%0d f=%b", out_valid, n_dn_corr, out_found, v, e, f);
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 8; p++)
      for (int w = 0; w < (1 << N_BL); w++) begin
        @(negedge clk);
        in_valid = 1'b1; in_found = 1'b1; n_dn = 8'(p); dn_win = N_BL'(w);
      end
    repeat (2000) begin
      @(negedge clk);
      in_valid = 1'($urandom_range(0, 1));
      in_found = 1'($urandom_range(0, 1));
      n_dn     = 8'($urandom_range(0, N_R - 1));
      dn_win   = N_BL'($urandom);
    end
    repeat (3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
