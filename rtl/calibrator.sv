// calibrator: periodic bin-by-bin code-density calibration.
//
// Virtual bins of a delay line differ in width, so the raw bin number is not
// linear in time. Events that arrive uniformly within the clock period hit each
// bin in proportion to its width; a histogram of K such events (the
// calibration table CT) therefore measures every bin, and its running sum (the
// characteristic curve CC) maps a bin to the time at its centre, in units of
// T_CLK / K. With K = 2^16 the CC value is a 16-bit fraction of the clock
// period (the value K itself can occur, hence W_CAL = 17 bits).
//
// Operation, all in the TDC clock domain:
//   INIT  - after reset, CT is cleared (N_V cycles).
//   HIST  - every valid bin increments CT[bin] (read-modify-write with a
//           one-cycle read, forwarding back-to-back hits on the same bin)
//           until K samples are counted; then one DRAIN cycle.
//   INTEG - CT is read in order and integrated with the half-bin rule
//             2*CC[n] = 2*CC[n-1] + CT[n-1] + CT[n],   2*CC[0] = CT[0]
//           kept at double scale, rounded ((2CC + 1) / 2) and written into the
//           CC bank that is not in use; CT is cleared as it is read. Takes
//           N_V + 1 cycles, then the two CC banks swap roles and HIST resumes.
// Every valid input is translated through the CC bank in use, one cycle
// later (`out_valid`, `out_fine`). `calibrated`, valid with the same delay,
// is 0 for answers given before the first CC was built, which are
// meaningless. Samples arriving during
// INIT, DRAIN or INTEG are translated but not counted.
//
// The CT histogram, the integration rule with doubled values, the rounding and
// the two swapped CC banks follow the converter. The state machine, the
// clearing of CT during integration and dropping samples while integrating
// are this design's choices. CT and the CC banks are plain arrays without
// reset, to map onto block RAM.
module calibrator #(
  parameter int unsigned W_VBIN = tdc_pkg::W_VBIN,  // virtual-bin width
  parameter int unsigned K_LOG2 = tdc_pkg::K_LOG2   // calibration length 2^K_LOG2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [W_VBIN-1:0] in_bin,
  output logic              out_valid,
  output logic [K_LOG2:0]   out_fine,
  output logic              calibrated,
  output logic              swap_pulse   // one cycle when a new CC goes live
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned NV = 1 << W_VBIN;
  localparam int unsigned WC = K_LOG2 + 1;       // counts 0 .. K
  localparam logic [K_LOG2:0] K_CNT = WC'(1) << K_LOG2;

  typedef enum logic [1:0] {S_INIT, S_HIST, S_DRAIN, S_INTEG} state_t;
  state_t state;

  // Memories.
  logic [WC-1:0] ct      [NV];
  logic [WC-1:0] cc_bank0[NV];
  logic [WC-1:0] cc_bank1[NV];

  logic              active;       // CC bank used for translation
  logic              cal_done;     // a CC has been built
  logic [WC-1:0]     n_samples;    // samples counted in this histogram
  logic [W_VBIN:0]   idx;          // INIT / INTEG address counter

  // CT port signals.
  logic              ct_we;
  logic [W_VBIN-1:0] ct_waddr, ct_raddr;
  logic [WC-1:0]     ct_wdata, ct_rdata;

  // Histogram pipeline stage (read issued, data next cycle).
  logic              h_valid;
  logic [W_VBIN-1:0] h_addr;
  logic              last_we;
  logic [W_VBIN-1:0] last_waddr;
  logic [WC-1:0]     last_wdata;
  logic [WC-1:0]     h_old;

  // Integration pipeline stage.
  logic              i_valid;
  logic [W_VBIN-1:0] i_addr;
  logic [WC-1:0]     prev_ct;
  logic [WC:0]       acc2;          // 2 * CC, up to 2K
  logic [WC:0]       acc2_next;
  logic              cc_we;
  logic [WC-1:0]     cc_wdata;

  wire take = (state == S_HIST) && in_valid;

  // ---------------------------------------------------------------- CT port
  always_comb begin
    h_old      = (last_we && last_waddr == h_addr) ? last_wdata : ct_rdata;
    acc2_next  = acc2 + {1'b0, prev_ct} + {1'b0, ct_rdata};
    cc_we      = i_valid;
    cc_wdata   = WC'((acc2_next + 1'b1) >> 1);
    ct_raddr   = (state == S_INTEG) ? idx[W_VBIN-1:0] : in_bin;
    ct_we      = 1'b0;
    ct_waddr   = h_addr;
    ct_wdata   = h_old + 1'b1;
    if (state == S_INIT || state == S_INTEG) begin
      ct_we    = (state == S_INIT) || !idx[W_VBIN];
      ct_waddr = idx[W_VBIN-1:0];
      ct_wdata = '0;
    end else if (h_valid) begin
      ct_we    = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    ct_rdata <= ct[ct_raddr];
    if (ct_we) ct[ct_waddr] <= ct_wdata;
  end

  // ------------------------------------------------------------- CC banks
  always_ff @(posedge clk) begin
    if (cc_we && active)  cc_bank0[i_addr] <= cc_wdata;
    if (cc_we && !active) cc_bank1[i_addr] <= cc_wdata;
  end

  always_ff @(posedge clk) begin
    out_fine <= active ? cc_bank1[in_bin] : cc_bank0[in_bin];
  end

  // `calibrated` travels with the answer it qualifies.
  always_ff @(posedge clk) begin
    if (!rst_n) calibrated <= 1'b0;
    else        calibrated <= cal_done;
  end

  // --------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_INIT;
      idx        <= '0;
      n_samples  <= '0;
      active     <= 1'b0;
      cal_done   <= 1'b0;
      swap_pulse <= 1'b0;
      out_valid  <= 1'b0;
      h_valid    <= 1'b0;
      h_addr     <= '0;
      last_we    <= 1'b0;
      last_waddr <= '0;
      last_wdata <= '0;
      i_valid    <= 1'b0;
      i_addr     <= '0;
      prev_ct    <= '0;
      acc2       <= '0;
    end else begin
      out_valid  <= in_valid;
      swap_pulse <= 1'b0;
      h_valid    <= take;
      h_addr     <= in_bin;
      last_we    <= h_valid && state != S_INIT && state != S_INTEG;
      last_waddr <= h_addr;
      last_wdata <= ct_wdata;
      i_valid    <= (state == S_INTEG) && !idx[W_VBIN];
      i_addr     <= idx[W_VBIN-1:0];
      if (i_valid) begin
        acc2    <= acc2_next;
        prev_ct <= ct_rdata;
      end
      unique case (state)
        S_INIT: begin
          idx <= idx + 1'b1;
          if (idx == (W_VBIN+1)'(NV - 1)) begin
            idx   <= '0;
            state <= S_HIST;
          end
        end
        S_HIST: begin
          if (take) begin
            n_samples <= n_samples + 1'b1;
            if (n_samples == K_CNT - 1'b1) state <= S_DRAIN;
          end
        end
        S_DRAIN: begin
          idx     <= '0;
          acc2    <= '0;
          prev_ct <= '0;
          state   <= S_INTEG;
        end
        S_INTEG: begin
          if (!idx[W_VBIN]) idx <= idx + 1'b1;
          else if (!i_valid) begin
            // Last CC entry was written on this edge's predecessor.
            idx        <= '0;
            n_samples  <= '0;
            active     <= ~active;
            cal_done   <= 1'b1;
            swap_pulse <= 1'b1;
            state      <= S_HIST;
          end
        end
        default: state <= S_INIT;
      endcase
    end
  end

  // A histogram never holds more than K counts in total.
  a_ncount: assert property (@(posedge clk) disable iff (!rst_n) n_samples <= K_CNT);
endmodule
