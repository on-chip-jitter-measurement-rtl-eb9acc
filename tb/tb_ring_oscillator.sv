`timescale 1ps/1ps
// Testbench of the ring oscillator model. A jitter-free instance must rest
// high while disabled, fall one half period after the enable and toggle every
// half period, and return high after the enable drops. A jittery three-stage
// instance must keep the mean period and show the specified per-period
// standard deviation.
module tb_ring_oscillator;

  int checks = 0, failures = 0;

  logic en = 1'b0;
  logic osc0, osc3;

  ring_oscillator #(.JITTER_PS(0)) dut0 (.en, .osc(osc0));
  ring_oscillator #(.STAGES(3), .STAGE_DELAY_PS(400), .JITTER_PS(3), .SEED(77)) dut3 (.en, .osc(osc3));

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_range(input string what, input real got, input real lo, input real hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s: got %f expected %f..%f", what, got, lo, hi);
    end
  endtask

  initial begin : watchdog
    #(200_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // period statistics of dut3, rising edge to rising edge
  longint last_rise3 = -1;
  int     n3 = 0;
  real    s1 = 0.0, s2 = 0.0;
  always @(posedge osc3) begin
    if (en && last_rise3 >= 0) begin
      real p;
      p = real'($time - last_rise3);
      s1 += p;
      s2 += p * p;
      n3++;
    end
    last_rise3 = en ? $time : -1;
  end

  initial begin
    longint t0, t;
    #5000;
    check("idle high", osc0, 1);
    check("idle high 3", osc3, 1);
    en = 1'b1;
    t0 = $time;
    for (int k = 1; k <= 50; k++) begin
      @(osc0);
      t = $time - t0;
      check($sformatf("toggle %0d time", k), t, k * 632);
      check($sformatf("toggle %0d level", k), osc0, k % 2 == 0);
    end
    #(1_000_000);
    en = 1'b0;
    #2000;
    check("high after disable", osc0, 1);
    check("high after disable 3", osc3, 1);
    #5000;
    check("stays high", osc0, 1);
    begin
      real mean, sd;
      mean = s1 / n3;
      sd = $sqrt(s2 / n3 - mean * mean);
      // half-period std sqrt(3*(7*7-1)/12) = sqrt(12); per period sqrt(24) = 4.9 ps
      check_range("mean period 3-stage", mean, 2399.0, 2401.0);
      check_range("period std 3-stage", sd, 4.3, 5.5);
      $display("3-stage model: %0d periods, mean %f ps, std %f ps", n3, mean, sd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
