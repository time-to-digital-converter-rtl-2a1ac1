// coarse_counter: the shared coarse counter (CC) of the Nutt interpolation.
//
// An N_CC-bit binary counter that advances by one on every TDC clock edge and
// wraps around. All channels read the same counter, which is what keeps their
// timestamps on a common time base. With N_CC = 32 and a 2.4 ns clock the
// counter spans 2^32 * 2.4 ns = 10.3 s, the full-scale range of the converter.
// `count` is the value after the most recent clock edge; synchronous active-low
// reset to 0 (the reset is this design's choice).
module coarse_counter #(
  parameter int unsigned N_CC = tdc_pkg::N_CC
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [N_CC-1:0] count
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk) begin
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;
  end
endmodule
