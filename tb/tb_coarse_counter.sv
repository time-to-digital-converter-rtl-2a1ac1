// tb_coarse_counter: self-checking testbench of the coarse counter.
//
// Checks the default 32-bit counter against a cycle count kept here, and a
// 4-bit instance through several wrap-arounds, including a mid-run reset.
module tb_coarse_counter;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] count;
  logic [3:0]  count4;
  int checks = 0, failures = 0;
  longint n = 0;
  int wraps = 0;

  coarse_counter dut (.clk, .rst_n, .count);
  coarse_counter #(.N_CC(4)) dut4 (.clk, .rst_n, .count(count4));

  always #1200 clk = ~clk;

  initial begin
    #(2400 * 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      @(posedge clk); #1;
      n++;
      checks++;
      if (count !== 32'(n) || count4 !== 4'(n)) begin
        failures++;
        $display("cycle %0d: count=%0d count4=%0d", n, count, count4);
      end
      if (count4 == 4'd0) wraps++;
      if (k == 150) begin
        @(negedge clk) rst_n = 1'b0;
        @(posedge clk); #1;
        checks++;
        if (count !== 0 || count4 !== 0) begin failures++; $display("reset failed"); end
        @(negedge clk) rst_n = 1'b1;
        n = 0;
      end
    end
    checks++;
    if (wraps < 10) begin failures++; $display("only %0d wraps", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
