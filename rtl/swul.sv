// swul: Super Wave Union launcher (behavioural model).
//
// This is a behavioural model: the launcher is an asynchronous one-shot whose
// pulse width is set by the physical reset path of a flip-flop, which has no
// synthesizable equivalent. On each rising edge of the channel input `start`
// it emits on `pulse` a square wave with two edges, an up-going one at the
// START instant and a down-going one PULSE_PS later; this pulse is what the
// delay lines of the channel propagate. The same input is sampled by a
// flip-flop on the TDC clock to give `stop`, which clocks the sampling
// flip-flops of all delay lines and marks the event for the coarse counter.
// `stop` leaves the flip-flop STOP_DLY_PS after the clock edge (clock-to-Q
// plus routing).
//
// The structure (a flip-flop with D tied to 1 and clocked by START, and a
// second flip-flop sampling START on the TDC clock to make STOP) is the
// converter's; the pulse width, the STOP delay and the reset are this model's
// choices. The pulse is written as START AND NOT (START delayed), which gives
// the same waveform as the self-resetting flip-flop as long as START stays
// high for longer than PULSE_PS.
// A synthesis tool that ignores delays reduces `pulse` to 0; on a device
// this model is replaced by the placed flip-flops.
module swul #(
  parameter realtime PULSE_PS    = 200.0,  // width of the launched pulse
  parameter realtime STOP_DLY_PS = 400.0   // clock-to-STOP delay
) (
  input  logic clk,    // TDC clock
  input  logic rst_n,  // synchronous, active low
  input  logic start,  // channel input (the time event)
  output logic pulse,  // 2-edge square wave into the delay lines
  output logic stop    // START sampled on the TDC clock
);
  timeunit 1ps;
  timeprecision 1fs;

  logic start_dly;
  logic stop_q;

  assign #(PULSE_PS) start_dly = start;
  assign pulse = start & ~start_dly;

  always_ff @(posedge clk) begin
    if (!rst_n) stop_q <= 1'b0;
    else        stop_q <= start;
  end

  assign #(STOP_DLY_PS) stop = stop_q;
endmodule
