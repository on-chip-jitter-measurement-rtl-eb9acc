`timescale 1ps/1ps
// Full-size testbench: jitter_measurement_top with all parameters at their
// defaults (256-stage lines, oscillators of 1264 ps and 1260 ps with white
// jitter of about 4.9 ps per period, 100 MHz clock).
//
// 1. Period measurement: two experiments of 512 accumulation cycles; T0 of
//    each oscillator from T0 = N_acc * N_exp * Tclk / sum(Acnt) must lie
//    within 0.2 % of the modelled period.
// 2. Differential jitter measurement at t_m = 80 ns (8 cycles), NEXP
//    experiments. For each record and channel the host reconstruction
//    T = (Acnt + 1) * T0 + (delay of the stages the oldest rising edge has
//    crossed, taken at the middle of its stage) gives the edge time; t_diff
//    is the difference between the channels. Its mean must be near zero and
//    its variance must match what the oscillator model accumulates: each
//    half period carries jitter of variance 12 ps^2, so about
//    2 * 2 * (t_m / T0) * 12 ps^2 plus the quantisation of two stages.
//    The noise strength sigma^2 / t_m is printed in femtoseconds.
//    Pairing: when an edge reaches the end of a line at the very instant of
//    the capture edge, the snapshot already shows it as gone while the
//    captured count does not include it yet, and that channel's time comes
//    out one period short. As the accumulated jitter is far below half a
//    period, the two channels' corresponding edges are paired by folding
//    t_diff into +-T0/2; such records must stay rare (at most 5 %).
module tb_jitter_full;
  import jitter_pkg::*;
  import tb_jitter_ref_pkg::*;

  localparam int     N     = 256;
  localparam int     NOM   = 17;
  localparam longint HALF1 = 632;
  localparam longint HALF2 = 630;
  localparam longint TCLK  = 10000;
  localparam int     NEXP  = 250;
  localparam int     NACC  = 512;
  localparam int     TM    = 8;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  meas_mode_e mode = MODE_T0;
  logic [15:0] acc_cycles = '0;
  logic [16:0] n_exp = '0;
  logic busy, done, rec_valid, rec_ready = 1'b0;
  logic [16:0] rec_index;
  logic [N-1:0] rec_snapshot1, rec_snapshot2;
  logic [17:0] rec_acnt1, rec_acnt2;

  jitter_measurement_top dut (.*);

  always #(TCLK/2) clk = ~clk;

  task automatic check_range(input string what, input real got, input real lo, input real hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("FAIL %s: got %f expected %f..%f", what, got, lo, hi);
    end
  endtask

  initial begin : watchdog
    #(2_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // time of the oldest rising edge's entry into the line, from the snapshot
  function automatic real in_line(input logic [N-1:0] snap, output bit found);
    int p = -1;
    for (int j = 0; j < N - 1; j++) if (snap[j] && !snap[j+1]) p = j;
    found = (p >= 0);
    if (p < 0) return 0.0;
    return (real'(cum_delay(NOM, p)) + real'(cum_delay(NOM, p + 1))) / 2.0;
  endfunction

  longint sum1, sum2;
  real    s1, s2;
  int     nrec;
  int     n_eq, n_plus, n_minus, n_missing, n_wrap;
  bit     jitter_phase;

  always @(negedge clk) begin
    if (rec_valid && !rec_ready) begin
      if (!jitter_phase) begin
        sum1 += rec_acnt1;
        sum2 += rec_acnt2;
      end else begin
        bit f1, f2;
        real t1, t2, d;
        t1 = real'(longint'(rec_acnt1) + 1) * real'(2 * HALF1) + in_line(rec_snapshot1, f1);
        t2 = real'(longint'(rec_acnt2) + 1) * real'(2 * HALF2) + in_line(rec_snapshot2, f2);
        if (!f1 || !f2) n_missing++;
        d = t1 - t2;
        // pair corresponding edges: fold into +-T0/2 (see header)
        if (d > real'(HALF1 + HALF2) / 2.0) begin d -= real'(HALF1 + HALF2); n_wrap++; end
        if (d < -real'(HALF1 + HALF2) / 2.0) begin d += real'(HALF1 + HALF2); n_wrap++; end
        s1 += d;
        s2 += d * d;
        if (rec_acnt1 == rec_acnt2) n_eq++;
        else if (rec_acnt1 == rec_acnt2 + 1) n_plus++;
        else if (rec_acnt1 + 1 == rec_acnt2) n_minus++;
      end
      nrec++;
    end
    rec_ready <= rec_valid && !rec_ready;
  end

  task automatic run(input meas_mode_e m, input int acc, input int n);
    @(negedge clk);
    nrec = 0;
    mode = m; acc_cycles = 16'(acc); n_exp = 17'(n); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (done);
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (nrec != n) begin
      failures++;
      $display("FAIL records: got %0d expected %0d", nrec, n);
    end
  endtask

  initial begin
    real t0_1, t0_2, mean, var_, expv, tm;
    sum1 = 0; sum2 = 0; s1 = 0.0; s2 = 0.0;
    n_eq = 0; n_plus = 0; n_minus = 0; n_missing = 0; n_wrap = 0;
    jitter_phase = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // 1. period measurement (eq. T0 = N_acc N_exp / (f sum Acnt))
    run(MODE_T0, NACC, 2);
    t0_1 = real'(NACC) * 2.0 * real'(TCLK) / real'(sum1);
    t0_2 = real'(NACC) * 2.0 * real'(TCLK) / real'(sum2);
    $display("T0 measurement: sum Acnt %0d / %0d, T0 = %f ps / %f ps", sum1, sum2, t0_1, t0_2);
    check_range("T0 oscillator 1", t0_1, 1264.0 * 0.998, 1264.0 * 1.002);
    check_range("T0 oscillator 2", t0_2, 1260.0 * 0.998, 1260.0 * 1.002);
    // 2. differential measurement at t_m = 80 ns
    jitter_phase = 1;
    run(MODE_JITTER, TM, NEXP);
    tm = real'(TM) * real'(TCLK);
    mean = s1 / NEXP;
    var_ = (s2 - NEXP * mean * mean) / (NEXP - 1);
    expv = 2.0 * 2.0 * (tm / 1262.0) * 12.0 + 2.0 * 24.0;
    $display("jitter measurement: %0d experiments, mean t_diff %f ps, sigma %f ps (model about %f ps), sigma^2/t_m = %f fs",
             NEXP, mean, $sqrt(var_), $sqrt(expv), var_ / tm * 1000.0);
    $display("Acnt equal %0d, Acnt1=Acnt2+1 %0d, Acnt1=Acnt2-1 %0d, re-paired %0d", n_eq, n_plus, n_minus, n_wrap);
    check_range("records needing re-pairing", real'(n_wrap), 0.0, real'(NEXP) / 20.0);
    checks++;
    if (n_missing != 0) begin
      failures++;
      $display("FAIL %0d records without a rising edge in the line", n_missing);
    end
    check_range("mean t_diff", mean, -20.0, 20.0);
    check_range("t_diff variance", var_, 0.65 * expv, 1.5 * expv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
