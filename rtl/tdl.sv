// tdl: tapped delay line with its sampling flip-flops (behavioural model).
//
// This is a behavioural model. In the device the line is a chain of carry
// primitives (CARRY4, four taps each) climbing through the slices, and every
// tap output is captured by a D flip-flop clocked by STOP; the tap delays are
// physical and uneven, and it is these delays the rest of the converter
// measures. Here the line is modelled in time: the model records when the
// launched pulse rises and falls at its input and, on each rising edge of
// `stop`, sets code bit i to 1 when the pulse front has passed tap i but its
// tail has not. Bit 0 is the first tap. The result is the thermometric code of
// the real line: a run of 1s whose length grows with the START-to-STOP time.
//
// Non-ideal behaviour, all of it set by parameters (this model's own numbers
// where the converter gives only figures of merit):
//   * tap delays spread uniformly over TP_MIN_PS .. TP_MIN_PS + TP_SPAN_PS
//     (default 8..24 ps, mean 16 ps as measured on 28-nm devices), drawn from
//     a fixed hash of SEED and the tap number;
//   * one ultra-bin of TP_ULTRA_PS (default 50 ps, the 28-nm worst tap) at tap
//     ULTRA_TAP, standing for a crossing between clock regions;
//   * each flip-flop sees its tap SKEW_MAX_PS * u later (u in 0..1), which
//     reorders neighbouring taps and produces the bubbles of the real code;
//   * the whole line sees the pulse OFFSET_PS late, so that parallel lines of
//     a Super Wave Union sample the pulse at different points.
//   * `drift` (a model variable, 1.0 by default) scales every delay of the
//     line at once, as a change of temperature or supply does; a testbench
//     may set it through the hierarchy to exercise the recalibration.
// Only the latest pulse is modelled. Timing: `code` changes right after each
// rising edge of `stop` and holds until the next one.
module tdl #(
  parameter int unsigned N_R         = tdc_pkg::N_R,
  parameter int unsigned SEED        = 1,
  parameter realtime     OFFSET_PS   = 0.0,
  parameter realtime     TP_MIN_PS   = 8.0,
  parameter realtime     TP_SPAN_PS  = 16.0,
  parameter realtime     TP_ULTRA_PS = 50.0,
  parameter int unsigned ULTRA_TAP   = N_R / 2,
  parameter realtime     SKEW_MAX_PS = 40.0
) (
  input  logic           start,   // launched pulse (from the launcher)
  input  logic           stop,    // sampling clock of the flip-flops
  output logic [N_R-1:0] code     // sampled taps, bit 0 = first tap
);
  timeunit 1ps;
  timeprecision 1fs;

  // Uniform number in [0, 1) from a small integer hash.
  function automatic real hash01(int unsigned a, int unsigned b);
    int unsigned x;
    x = a * 32'h9E37_79B1 ^ (b + 32'h7F4A_7C15) * 32'h85EB_CA6B;
    x = x ^ (x >> 15);
    x = x * 32'h2C1B_3C6D;
    x = x ^ (x >> 12);
    x = x * 32'h297A_2D39;
    x = x ^ (x >> 15);
    return real'(x & 32'hFFFF) / 65536.0;
  endfunction

  realtime arrive [N_R];   // pulse edge to flip-flop i, from the line input
  realtime t_rise, t_fall;
  logic    have_rise;
  real     drift = 1.0;   // common scale of all delays (temperature, supply)

  initial begin
    realtime acc;
    acc = OFFSET_PS;
    for (int unsigned i = 0; i < N_R; i++) begin
      if (i == ULTRA_TAP) acc += TP_ULTRA_PS;
      else                acc += TP_MIN_PS + TP_SPAN_PS * hash01(SEED, i);
      arrive[i] = acc + SKEW_MAX_PS * hash01(SEED + 32'h1000, i);
    end
  end

  initial have_rise = 1'b0;

  always @(posedge start) begin
    t_rise    <= $realtime;
    have_rise <= 1'b1;
  end
  always @(negedge start) t_fall <= $realtime;

  always @(posedge stop) begin
    realtime t;
    t = $realtime;
    for (int unsigned i = 0; i < N_R; i++) begin
      logic front, tail;
      front = have_rise && (t - t_rise >= arrive[i] * drift);
      tail  = have_rise && (t_fall >= t_rise) && (t - t_fall >= arrive[i] * drift);
      code[i] <= front && !tail;
    end
  end
endmodule
