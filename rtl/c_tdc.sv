// c_tdc: coarse time-to-digital converter of one channel.
//
// STOP is the channel input sampled on the TDC clock, so it rises on the first
// clock edge after the event. The coarse counter also advances on that edge,
// and its new value is the coarse timestamp T_COARSE: the event lies within the
// clock period that ends at that edge, and the fine measure T_FINE is the time
// from the event to the edge, so T = T_COARSE - T_FINE.
//
// The block detects the rising edge of STOP on the TDC clock (STOP high, not
// high on the edge before) and on that edge captures the counter, which then
// still shows the value it took when STOP rose. `hit` is combinational and
// marks the cycle in which the delay lines hold a fresh sample; `valid` and
// `coarse` are registered on the same edge. Capturing the counter one edge
// after STOP rose, rather than with STOP itself as a clock, is this design's
// choice and gives the same number.
module c_tdc #(
  parameter int unsigned N_CC = tdc_pkg::N_CC
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            stop,
  input  logic [N_CC-1:0] count,
  output logic            hit,
  output logic            valid,
  output logic [N_CC-1:0] coarse
);
  timeunit 1ps;
  timeprecision 1fs;

  logic stop_q;

  assign hit = stop & ~stop_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stop_q <= 1'b0;
      valid  <= 1'b0;
      coarse <= '0;
    end else begin
      stop_q <= stop;
      valid  <= hit;
      if (hit) coarse <= count;
    end
  end
endmodule
