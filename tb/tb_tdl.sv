// tb_tdl: self-checking testbench of the delay-line model.
//
// Launches 200 ps pulses into a 256-tap line and samples it at random times
// after the pulse, from before the pulse tail has entered the line to 3 ns
// later. From the model's delay limits alone (taps 8..24 ps, one 50 ps
// ultra-bin at tap 128, up to 40 ps flip-flop skew) the testbench works out
// which taps must read 1 (front surely passed, tail surely not) and which
// must read 0, and checks every such tap. It also checks that the code's
// front moves up the line as the sampling time grows and that bubbles (a 0
// below the front inside the pulse) do occur.
module tb_tdl;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N_R = 256;

  logic start = 1'b0, stop = 1'b0;
  logic [N_R-1:0] code;
  int checks = 0, failures = 0;

  tdl #(.N_R(N_R), .SEED(7)) dut (.*);

  initial begin
    #(1.0e9);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real amin(int i);
    return (i >= 128) ? real'(i) * 8.0 + 50.0 : real'(i + 1) * 8.0;
  endfunction
  function automatic real amax(int i);
    return ((i >= 128) ? real'(i) * 24.0 + 50.0 : real'(i + 1) * 24.0) + 40.0;
  endfunction

  function automatic int top_one(logic [N_R-1:0] w);
    for (int i = N_R - 1; i >= 0; i--) if (w[i]) return i;
    return -1;
  endfunction

  int bubbles = 0;
  int last_top;

  initial begin
    #1000;
    for (int k = 0; k < 400; k++) begin
      real d;
      int ones_bad, zeros_bad, top;
      d = 50.0 + real'($urandom_range(0, 3000));
      fork
        begin start = 1'b1; #200 start = 1'b0; end
        begin #(d) stop = 1'b1; end
      join
      #1;
      ones_bad = 0; zeros_bad = 0;
      for (int i = 0; i < int'(N_R); i++) begin
        bit must1, must0;
        must1 = (amax(i) <= d) && (amin(i) > d - 200.0);
        must0 = (amin(i) > d) || (amax(i) <= d - 200.0);
        if (must1 && !code[i]) ones_bad++;
        if (must0 &&  code[i]) zeros_bad++;
      end
      checks++;
      if (ones_bad != 0 || zeros_bad != 0) begin
        failures++;
        $display("d=%0.1f: %0d taps wrongly 0, %0d wrongly 1", d, ones_bad, zeros_bad);
      end
      top = top_one(code);
      for (int i = top - 1; i > top - 4 && i > 0; i--) if (!code[i] && d > 300.0) begin bubbles++; break; end
      #10 stop = 1'b0;
      #5000;
    end
    // The front moves with the sampling time.
    for (int k = 0; k < 2; k++) begin
      start = 1'b1;
      #200 start = 1'b0;
      #((k == 0 ? 800.0 : 2400.0) - 200.0) stop = 1'b1;
      #1;
      checks++;
      if (k == 0) last_top = top_one(code);
      else if (top_one(code) < last_top + 60) begin
        failures++;
        $display("front at %0d after 800 ps and %0d after 2400 ps", last_top, top_one(code));
      end
      #10 stop = 1'b0;
      #5000;
    end
    checks++;
    if (bubbles == 0) begin failures++; $display("no bubbles seen"); end
    $display("bubbles in %0d of 400 codes", bubbles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
