// tb_tree_adder: self-checking testbench of the pipelined tree adder.
//
// Eight 8-bit inputs (F = 8, w = 8, the defaults) change every cycle with
// random valid; the sum is checked against a plain addition made here, exactly
// log2(F) = 3 cycles later. Corner cases: all zeros and all inputs at 255.
module tb_tree_adder;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned F = 8, W = 8, LAT = 3;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [F-1:0][W-1:0] in_bins = '0;
  logic out_valid;
  logic [W+2:0] out_sum;
  int checks = 0, failures = 0;

  tree_adder #(.F(F), .W(W)) dut (.*);

  always #1200 clk = ~clk;

  initial begin
    #(2400 * 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int   hs [int];
  logic hv [int];
  int cyc = 0;

  always @(posedge clk) begin
    int s;
    s = 0;
    for (int i = 0; i < int'(F); i++) s += int'(in_bins[i]);
    hs[cyc] = s;
    hv[cyc] = in_valid && rst_n;
    if (cyc >= int'(LAT) + 3) begin
      checks++;
      if (out_valid !== hv[cyc-LAT] || (out_valid && int'(out_sum) != hs[cyc-LAT])) begin
        failures++;
        $display("cycle %0d: got %b/%0d want %b/%0d", cyc, out_valid, out_sum, hv[cyc-LAT], hs[cyc-LAT]);
      end
    end
    cyc++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) begin in_valid = 1'b1; in_bins = '0; end
    @(negedge clk) begin in_valid = 1'b1; in_bins = '1; end
    repeat (2000) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int i = 0; i < int'(F); i++) in_bins[i] = W'($urandom);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
