`timescale 1ps/1ps
// Testbench of tapped_delay_line: drives the line with an ideal square wave
// of known period, samples it on many clock edges at varying phases, and
// compares every snapshot bit with the level the input had one cumulative
// stage delay earlier. Also checks the capture enable, the clear, the reset
// value and the line output that feeds the counter.
module tb_tapped_delay_line;
  import tb_jitter_ref_pkg::*;

  localparam int  N    = 256;
  localparam int  NOM  = 17;
  localparam longint HALF = 632;   // square wave half period
  localparam longint TCLK = 10000;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, sample_en = 1'b0;
  logic osc_in = 1'b1;
  logic [N-1:0] snapshot;
  logic line_out;
  longint t_start;

  tapped_delay_line dut (.clk, .rst_n, .clear, .sample_en, .osc_in, .snapshot, .line_out);

  always #(TCLK/2) clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #(20_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // square wave: high, first fall HALF after t_start, then toggling
  initial begin
    wait (t_start > 0);
    forever #(HALF) osc_in = ~osc_in;
  end

  initial begin
    longint t_s;
    logic [N-1:0] held;
    int bad;
    t_start = 0;
    #(3*TCLK + 1234);
    check("reset value", snapshot, 0);
    rst_n = 1'b1;
    t_start = $time;
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      sample_en = 1'b1;
      @(posedge clk);
      t_s = $time;
      @(negedge clk);
      sample_en = 1'b0;
      bad = 0;
      for (int j = 0; j < N; j++) begin
        longint t;
        t = t_s - t_start - cum_delay(NOM, j);
        if (!osc_ambiguous(t, HALF)) begin
          checks++;
          if (snapshot[j] != osc_level(t, HALF)) begin
            bad++;
            failures++;
          end
        end
      end
      if (bad != 0) $display("FAIL snapshot %0d: %0d bits wrong", k, bad);
      // line output follows the last tap
      check("line_out", line_out, osc_level($time - t_start - cum_delay(NOM, N-1), HALF));
      // hold without enable
      held = snapshot;
      repeat (2) @(posedge clk);
      @(negedge clk);
      check("hold", snapshot == held, 1);
    end
    clear = 1'b1;
    @(posedge clk);
    @(negedge clk);
    clear = 1'b0;
    check("clear", snapshot, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
