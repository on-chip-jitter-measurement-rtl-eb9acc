`timescale 1ps/1ps
// Testbench of measurement_controller with the measurement circuit replaced
// by two counters standing in for the ripple counters. A monitor, sampling at
// the falling clock edge, checks the experiment sequence cycle by cycle: a
// preset cycle with the oscillators off and the snapshots cleared, exactly
// acc_cycles enabled cycles with the capture strobe in the last one, counter
// values recorded on the capture edge, records held unchanged under
// back-pressure, n_exp records numbered from 0 and one done pulse. In
// MODE_CHAR the enable must stay high for the whole run, with a single preset
// at its start and a capture every acc_cycles cycles after each handshake.
module tb_measurement_controller;
  import jitter_pkg::*;

  localparam int CNT_W = 18, ACC_W = 16, EXP_W = 17;

  int checks = 0, failures = 0;
  int stalls = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  meas_mode_e mode = MODE_T0;
  logic [ACC_W-1:0] acc_cycles = '0;
  logic [EXP_W-1:0] n_exp = '0;
  logic busy, done, osc_en, ctr_pre, snap_clear, sample_en;
  logic [CNT_W-1:0] acnt1 = '0, acnt2 = '0;
  logic rec_valid, rec_ready = 1'b0;
  logic [EXP_W-1:0] rec_index;
  logic [CNT_W-1:0] rec_acnt1, rec_acnt2;

  measurement_controller dut (.*);

  always #5000 clk = ~clk;

  // stand-in counters, changing on every clock at different rates
  always_ff @(posedge clk) begin
    acnt1 <= acnt1 + 18'd7;
    acnt2 <= acnt2 + 18'd11;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #(500_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // run settings and monitor state
  meas_mode_e       run_mode;
  int               eff_acc, eff_n;
  bit               backpressure = 0;
  bit               in_run = 0;
  int               presets, records, dones, en_run, since, samples;
  bit               en_dropped, en_seen;
  logic [CNT_W-1:0] exp1, exp2;
  bit               stalled;
  logic [CNT_W-1:0] held1;
  logic [EXP_W-1:0] held_idx;

  always @(negedge clk) if (in_run) begin
    if (done) dones++;
    if (ctr_pre) begin
      presets++;
      check("oscillators off during preset", osc_en, 0);
      check("snapshots cleared with preset", snap_clear, 1);
      en_run = 0;
    end
    if (osc_en) begin
      en_run++;
      since++;
      en_seen = 1;
    end else if (en_seen && busy && run_mode == MODE_CHAR) begin
      en_dropped = 1;
    end
    if (sample_en) begin
      samples++;
      check("capture only while enabled", osc_en, 1);
      if (run_mode == MODE_CHAR) check("char: capture spacing", since, eff_acc);
      else                       check("capture ends accumulation", en_run, eff_acc);
      exp1 = acnt1;
      exp2 = acnt2;
    end
    if (stalled) begin
      check("record held: valid", rec_valid, 1);
      check("record held: acnt", rec_acnt1, held1);
      check("record held: index", rec_index, held_idx);
    end
    if (rec_valid) begin
      check("record acnt1", rec_acnt1, exp1);
      check("record acnt2", rec_acnt2, exp2);
      check("record index", rec_index, records);
      check("oscillator state in report", osc_en, run_mode == MODE_CHAR);
      rec_ready <= backpressure ? ($urandom % 3 == 0) : 1'b1;
      #1;
      stalled = !rec_ready;
      held1 = rec_acnt1;
      held_idx = rec_index;
      if (rec_ready) begin
        records++;
        since = 0;
      end else begin
        stalls++;
      end
    end else begin
      rec_ready <= 1'b0;
      stalled = 0;
    end
  end

  task automatic run(input meas_mode_e m, input int acc, input int n, input bit bp);
    int cyc;
    @(negedge clk);
    run_mode = m; eff_acc = (acc == 0) ? 1 : acc; eff_n = (n == 0) ? 1 : n;
    backpressure = bp;
    presets = 0; records = 0; dones = 0; en_run = 0; since = 0; samples = 0;
    en_dropped = 0; en_seen = 0; stalled = 0;
    mode = m; acc_cycles = ACC_W'(acc); n_exp = EXP_W'(n);
    start = 1'b1;
    in_run = 1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (dones == 0 && cyc < 200000) begin
      @(negedge clk);
      cyc++;
    end
    @(negedge clk);
    in_run = 0;
    check("run finished", dones, 1);
    check("records", records, eff_n);
    check("captures", samples, eff_n);
    check("presets", presets, (m == MODE_CHAR) ? 1 : eff_n);
    check("idle after run", busy, 0);
    check("oscillators off after run", osc_en, 0);
    if (m == MODE_CHAR) check("char: enable never dropped", en_dropped, 0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check("idle after reset", busy, 0);
    run(MODE_T0, 20, 5, 0);
    run(MODE_JITTER, 8, 10, 1);
    run(MODE_JITTER, 1, 4, 1);
    run(MODE_JITTER, 0, 0, 0);
    run(MODE_CHAR, 3, 12, 1);
    run(MODE_T0, 8192, 2, 0);
    for (int k = 0; k < 10; k++)
      run(meas_mode_e'($urandom % 3), 1 + $urandom % 30, 1 + $urandom % 8, $urandom % 2);
    check("back-pressure exercised", stalls > 0, 1);
    // start is ignored while busy
    @(negedge clk);
    mode = MODE_JITTER; acc_cycles = 4; n_exp = 2; start = 1'b1;
    repeat (3) @(negedge clk);
    check("busy while running", busy, 1);
    start = 1'b0;
    rec_ready = 1'b1;
    wait (done);
    @(negedge clk);
    check("one run for a held start", busy, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
