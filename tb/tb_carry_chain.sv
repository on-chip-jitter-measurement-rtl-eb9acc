`timescale 1ps/1ps
// Testbench of carry_chain: launches rising and falling steps and pulses into
// the line and checks that every tap changes exactly at the cumulative delay
// of the stages before it, computed from the specified stage delays.
module tb_carry_chain;
  import tb_jitter_ref_pkg::*;

  localparam int N = 256;
  localparam int NOM = 17;

  int checks = 0, failures = 0;
  logic ci = 1'b0;
  logic [N-1:0] tap;

  carry_chain dut (.ci, .tap);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #(10_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input bit v);
    longint t0;
    ci = v;
    t0 = $time;
    for (int j = 0; j < N; j++) begin
      if (tap[j] != v) wait (tap[j] == v);
      check($sformatf("tap %0d arrival", j), $time - t0, cum_delay(NOM, j));
    end
  endtask

  initial begin
    longint t0;
    #10000;
    check("settled low", tap, 0);
    step(1'b1);
    #1000;
    check("settled high", tap, {N{1'b1}});
    step(1'b0);
    #1000;
    // snapshot of a travelling 600 ps pulse
    ci = 1'b1; t0 = $time;
    #600 ci = 1'b0;
    #1400;
    for (int j = 0; j < N; j++) begin
      longint t;
      t = $time - t0 - cum_delay(NOM, j);
      check($sformatf("pulse tap %0d", j), tap[j], (t >= 0 && t < 600));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
