// tb_log2_up: self-checking testbench of the UP-edge LOG2 detector.
//
// Streams random delay-line words (a run of 1s with bubbles at both ends, plus
// all-zero, all-one and single-bit words) into the block with random gaps,
// and checks on every clock edge that the output matches a reference computed
// here by scanning the word from its bottom bit, exactly log2(N_R) cycles after
// the input. N_R = 256 and N_BL = 4 (the defaults).
module tb_log2_up;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N_R  = 256;
  localparam int unsigned N_BL = 4;
  localparam int unsigned LAT  = 8;
  localparam int unsigned WB   = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [N_R-1:0] n_tdl = '0;
  logic out_valid, found;
  logic [WB-1:0] n_up;
  logic [N_BL-1:0] up_win;

  int checks = 0, failures = 0;

  log2_up #(.N_R(N_R), .N_BL(N_BL)) dut (.*);

  always #1200 clk = ~clk;

  initial begin
    #(2400 * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N_R-1:0] gen_word();
    logic [N_R-1:0] w;
    int unsigned lo, hi, kind;
    kind = $urandom_range(0, 19);
    if (kind == 0) return '0;
    if (kind == 1) return '1;
    if (kind == 2) begin w = '0; w[$urandom_range(0, N_R-1)] = 1'b1; return w; end
    lo = $urandom_range(0, N_R - 1);
    hi = $urandom_range(lo, N_R - 1);
    w = '0;
    for (int unsigned i = lo; i <= hi; i++) w[i] = 1'b1;
    for (int j = 0; j < 3; j++) begin
      w[(hi + N_R - j) % N_R] = 1'($urandom_range(0, 1));
      w[(lo + j) % N_R]       = 1'($urandom_range(0, 1));
    end
    return w;
  endfunction

  // Reference: index of the bottom 1 and the N_BL bits starting there.
  // An all-zero word reports the last tap, as the mirrored LOG2 does.
  task automatic ref_up(input logic [N_R-1:0] w, output int idx,
                        output logic [N_BL-1:0] win, output logic f);
    idx = N_R - 1; f = 1'b0;
    for (int i = 0; i < int'(N_R); i++) if (w[i]) begin idx = i; f = 1'b1; break; end
    for (int j = 0; j < int'(N_BL); j++) begin
      int p = idx + j;
      win[N_BL-1-j] = (p < int'(N_R)) ? w[p] : 1'b1;
    end
  endtask

  logic [N_R-1:0] hist_w [int];
  logic           hist_v [int];
  int cyc = 0;
  int seen = 0;

  always @(posedge clk) begin
    hist_w[cyc] = n_tdl;
    hist_v[cyc] = in_valid && rst_n;
    if (cyc >= int'(LAT) + 3) begin
      int idx; logic [N_BL-1:0] win; logic f;
      checks++;
      if (out_valid !== hist_v[cyc-LAT]) begin
        failures++;
        $display("valid mismatch at cycle %0d", cyc);
      end else if (out_valid) begin
        ref_up(hist_w[cyc-LAT], idx, win, f);
        seen++;
        if (n_up != WB'(idx) || up_win != win || found != f) begin
          failures++;
          $display("cycle %0d: got n_up=%0d win=%b f=%b, want %0d %b %b",
                   cyc, n_up, up_win, found, idx, win, f);
        end
      end
    end
    cyc++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3000) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      n_tdl    = gen_word();
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    if (seen < 1000) begin failures++; $display("too few outputs: %0d", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
