// tb_calibrator: self-checking testbench of the code-density calibrator.
//
// A small instance (32 virtual bins, K = 256) runs through three calibration
// rounds. In each round the testbench sends K bins drawn from an uneven
// distribution (with bursts that hit the same bin on consecutive cycles),
// keeps its own histogram, and keeps sending while the block integrates;
// those samples must not be counted. When the new curve goes live it reads
// every bin back and compares the block's answer with the characteristic
// curve computed here from the histogram, CC[n] = sum of the bins below n plus
// half of bin n, rounded half up. It also checks that `calibrated` rises only
// after the first round, that the new curve goes live N_V + 3 cycles after the
// K-th sample, and that every answer comes one cycle after its query.
module tb_calibrator;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned W_VBIN = 5, K_LOG2 = 8;
  localparam int unsigned NV = 1 << W_VBIN, K = 1 << K_LOG2;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [W_VBIN-1:0] in_bin = '0;
  logic out_valid, calibrated, swap_pulse;
  logic [K_LOG2:0] out_fine;
  int checks = 0, failures = 0;

  calibrator #(.W_VBIN(W_VBIN), .K_LOG2(K_LOG2)) dut (.*);

  always #1200 clk = ~clk;

  initial begin
    #(2400 * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [NV];
  int expect_cc [NV];

  // Query checking: a query driven before an edge is answered after it.
  bit  q_pending = 0, q_now = 0;
  int  q_bin, q_bin_now;
  logic prev_valid = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== prev_valid) begin failures++; $display("out_valid latency"); end
      if (q_now) begin
        checks++;
        if (int'(out_fine) != expect_cc[q_bin_now]) begin
          failures++;
          $display("bin %0d: CC %0d, want %0d", q_bin_now, out_fine, expect_cc[q_bin_now]);
        end
      end
    end
    prev_valid = in_valid && rst_n;
    q_now      = q_pending;
    q_bin_now  = q_bin;
    q_pending  = 0;
  end

  function automatic int draw(int round);
    // Uneven distribution: wide bins in the middle, a few very narrow ones.
    int r;
    r = $urandom_range(0, 99);
    if (r < 40 + round * 5) return $urandom_range(NV / 4, NV / 2);
    if (r < 45) return 3;
    return $urandom_range(0, NV - 1);
  endfunction

  task automatic send(int b, bit count_it);
    @(negedge clk);
    in_valid = 1'b1;
    in_bin   = W_VBIN'(b);
    if (count_it) hist[b]++;
  endtask

  task automatic idle();
    @(negedge clk) in_valid = 1'b0;
  endtask

  task automatic make_expect();
    int acc2, prev;
    acc2 = 0; prev = 0;
    for (int n = 0; n < int'(NV); n++) begin
      acc2 += prev + hist[n];
      prev = hist[n];
      expect_cc[n] = (acc2 + 1) / 2;
    end
  endtask

  initial begin
    int sent, waited;
    foreach (hist[i]) hist[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (NV + 4) @(negedge clk);
    sent = 0;
    for (int round = 0; round < 3; round++) begin
      checks++;
      if (calibrated !== (round > 0)) begin failures++; $display("calibrated=%b in round %0d", calibrated, round); end
      while (sent < int'(K)) begin
        int b;
        b = draw(round);
        if ($urandom_range(0, 3) == 0) begin
          repeat ($urandom_range(2, 4)) if (sent < int'(K)) begin send(b, 1); sent++; end
        end else if ($urandom_range(0, 4) == 0) begin
          idle();
        end else begin
          send(b, 1); sent++;
        end
      end
      make_expect();
      // Samples sent while the block integrates must be ignored.
      waited = 0;
      do begin
        send($urandom_range(0, NV - 1), 0);
        waited++;
      end while (!swap_pulse && waited < 10 * int'(NV));
      checks++;
      if (waited != int'(NV) + 4) begin
        failures++;
        $display("round %0d: swap after %0d cycles, want %0d", round, waited, NV + 4);
      end
      // The sample driven while the new curve went live already counts.
      foreach (hist[i]) hist[i] = 0;
      hist[in_bin]++;
      sent = 1;
      for (int n = 0; n < int'(NV); n++) begin
        @(negedge clk);
        in_valid  = 1'b1;
        in_bin    = W_VBIN'(n);
        hist[n]++;
        sent++;
        q_pending = 1;
        q_bin     = n;
      end
      @(negedge clk) in_valid = 1'b0;
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
