// tb_swul: self-checking testbench of the Super Wave Union launcher model.
//
// START rises at random times and stays high for a few clock periods. The
// testbench measures, with the simulation clock, that every START rise gives
// exactly one pulse on `pulse` that rises with START and is PULSE_PS wide, and
// that `stop` rises STOP_DLY_PS after the first clock edge at which START is
// high, and falls likewise after START is low again.
module tb_swul;
  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime TCLK = 2400.0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic pulse, stop;
  int checks = 0, failures = 0;

  swul dut (.*);

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #(TCLK * 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  realtime t_start, t_pr, t_pf, t_sr, t_edge;
  int n_pulse = 0;

  always @(posedge pulse) begin t_pr = $realtime; n_pulse++; end
  always @(negedge pulse) t_pf = $realtime;
  always @(posedge stop)  t_sr = $realtime;

  function automatic bit near(realtime a, realtime b);
    return (a - b < 0.5) && (b - a < 0.5);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      @(posedge clk);
      #($urandom_range(1, 2399) * 1.0);
      start   = 1'b1;
      t_start = $realtime;
      // first clock edge after the START rise
      @(posedge clk) t_edge = $realtime;
      repeat (3) @(posedge clk);
      checks++;
      if (!near(t_pr, t_start) || !near(t_pf - t_pr, 200.0)) begin
        failures++;
        $display("pulse %0t..%0t for start at %0t", t_pr, t_pf, t_start);
      end
      checks++;
      if (!near(t_sr, t_edge + 400.0)) begin
        failures++;
        $display("stop at %0t, edge at %0t", t_sr, t_edge);
      end
      start = 1'b0;
      repeat (2) @(posedge clk);
      #1;
      checks++;
      if (stop !== 1'b0) begin failures++; $display("stop stuck high"); end
    end
    checks++;
    if (n_pulse != 300) begin failures++; $display("%0d pulses for 300 starts", n_pulse); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
