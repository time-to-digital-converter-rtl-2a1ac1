// log2_engine: pipelined floor(log2(word)) with a guard window.
//
// Finds the index of the most significant 1 of an N-bit word in log2(N)
// pipeline stages. Each stage looks at the upper half of the window left by the
// previous stage: if it holds a 1 the upper half is kept and the next index bit
// is 1, otherwise the lower half is kept and the bit is 0. After the last stage
// the window is a single bit and the collected bits are the index. This is the
// successive-halving form of the shift loop `while (w >>= 1) ++n`, which is
// how the converter's LOG2 engine is organised (latency ceil(log2 N)).
//
// Each window carries along the G bits immediately below it (`G` guard bits),
// so that at the end `win` holds the bit at the found index and the G bits
// under it, which is exactly what bubble-error correction needs without
// keeping a full copy of the word in the pipeline. Guard bits below bit 0 are
// filled with 1s, so they never count as bubbles. Carrying the guard bits
// through the engine is this design's choice.
//
// Timing: `in_valid`/`in_word` are taken on a clock edge and the matching
// `out_*` appear N_LOG2 = log2(N) edges later; one word per cycle.
// `found` is 0 when the word was all zeros (then idx is 0).
module log2_engine #(
  parameter int unsigned N = 256,   // word width, a power of two >= 2
  parameter int unsigned G = 3      // guard bits carried below the window
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [N-1:0]         in_word,
  output logic                 out_valid,
  output logic [$clog2(N)-1:0] out_idx,
  output logic [G:0]           out_win,   // [G] = bit at idx, [G-1:0] below it
  output logic                 out_found
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned L = $clog2(N);

  // Stage s holds a window of N >> s bits plus G guard bits.
  for (genvar s = 0; s <= L; s++) begin : g_st
    localparam int unsigned W = N >> s;
    logic [W+G-1:0] ext;
    logic [L-1:0]   idx;
    logic           vld;
  end

  assign g_st[0].ext = {in_word, {G{1'b1}}};
  assign g_st[0].idx = '0;
  assign g_st[0].vld = in_valid;

  for (genvar s = 1; s <= L; s++) begin : g_pipe
    localparam int unsigned WP = N >> (s - 1);   // window width entering
    localparam int unsigned WH = WP / 2;         // window width leaving
    logic upper_hit;
    assign upper_hit = |g_st[s-1].ext[WP+G-1 : WH+G];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        g_st[s].vld <= 1'b0;
      end else begin
        g_st[s].vld <= g_st[s-1].vld;
      end
      if (upper_hit) g_st[s].ext <= g_st[s-1].ext[WP+G-1 : WH];
      else           g_st[s].ext <= g_st[s-1].ext[WH+G-1 : 0];
      g_st[s].idx <= g_st[s-1].idx | (L'(upper_hit) << (L - s));
    end
  end

  assign out_valid = g_st[L].vld;
  assign out_idx   = g_st[L].idx;
  assign out_win   = g_st[L].ext;
  assign out_found = g_st[L].ext[G];
endmodule
