// tb_c_tdc: self-checking testbench of the coarse TDC.
//
// A counter made here advances on every clock edge. STOP rises a little after
// random clock edges (as it does behind the launcher flip-flop) and stays high
// for 1 to 4 cycles. For each STOP rise the testbench notes the counter value
// taken on that edge; the block must assert `hit` in the following cycle and,
// on the next edge, `valid` with exactly that value as `coarse`. No other
// cycle may show `hit` or `valid`.
module tb_c_tdc;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst_n = 1'b0, stop = 1'b0;
  logic [31:0] count = '0;
  logic hit, valid;
  logic [31:0] coarse;
  int checks = 0, failures = 0;
  int events = 0;

  c_tdc dut (.*);

  always #1200 clk = ~clk;
  always @(posedge clk) count <= count + 1;

  initial begin
    #(2400 * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prev_val = '0;
  logic        prev_hit = 1'b0;
  logic        stop_prev = 1'b0;

  // Reference: STOP seen high on an edge after being low on the previous one;
  // the counter value read on the following edge is the coarse time.
  always @(posedge clk) begin
    logic h;
    h = stop && !stop_prev && rst_n;
    if (rst_n) begin
      checks++;
      if (hit !== h) begin failures++; $display("hit %b want %b", hit, h); end
      if (valid !== prev_hit || (valid && coarse !== prev_val)) begin
        failures++;
        $display("valid %b coarse %0d, want %b %0d", valid, coarse, prev_hit, prev_val);
      end
    end
    prev_hit = h;
    if (h) begin prev_val = count; events++; end
    stop_prev = stop && rst_n;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (500) begin
      repeat ($urandom_range(1, 4)) @(posedge clk);
      #400 stop = 1'b1;
      repeat ($urandom_range(1, 4)) @(posedge clk);
      #400 stop = 1'b0;
    end
    repeat (4) @(posedge clk);
    checks++;
    if (events < 400) begin failures++; $display("only %0d events", events); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
