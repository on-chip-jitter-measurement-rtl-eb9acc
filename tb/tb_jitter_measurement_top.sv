`timescale 1ps/1ps
// End-to-end testbench of jitter_measurement_top with jitter-free oscillator
// models, so that every output bit can be predicted exactly.
//
// For each record the testbench knows when the oscillators were enabled and
// when the capture edge came, and computes independently:
//   - every snapshot bit: the ideal oscillator level one cumulative stage
//     delay before the capture edge (bits that fall exactly on an oscillator
//     toggle are skipped);
//   - each counter value: the number of rising edges that reached the end of
//     the line before the capture edge;
//   - the edge-time reconstruction the host performs, (Acnt+1)*T0 plus the
//     delay of the stages the oldest rising edge in the line has crossed,
//     which must bracket the true accumulation time.
// It runs all three experiment kinds, applies random back-pressure, sweeps the
// accumulation time so that the two counters both agree and differ by one,
// and runs the delay-line characterisation (per-stage transition histograms,
// period width W, per-stage delay estimates) on MODE_CHAR snapshots.
module tb_jitter_measurement_top;
  import jitter_pkg::*;
  import tb_jitter_ref_pkg::*;

  localparam int     N     = 256;
  localparam int     NOM   = 17;
  localparam longint HALF1 = 632;
  localparam longint HALF2 = 630;
  localparam longint TCLK  = 10000;
  localparam int     CNT_W = 18, ACC_W = 16, EXP_W = 17;
  localparam int     NCHAR = 150;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  meas_mode_e mode = MODE_T0;
  logic [ACC_W-1:0] acc_cycles = '0;
  logic [EXP_W-1:0] n_exp = '0;
  logic busy, done, rec_valid, rec_ready = 1'b0;
  logic [EXP_W-1:0] rec_index;
  logic [N-1:0] rec_snapshot1, rec_snapshot2;
  logic [CNT_W-1:0] rec_acnt1, rec_acnt2;

  jitter_measurement_top #(.JITTER_PS(0)) dut (.*);

  always #(TCLK/2) clk = ~clk;

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #(200_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_t0 = 0, n_char = 0, n_jit = 0, n_stall = 0;
  int n_eq = 0, n_plus = 0, n_minus = 0, n_edge = 0;

  // characterisation data
  logic [N-1:0] char_snap [NCHAR];
  int           n_char_snaps = 0;

  longint last_pos = 0;
  always @(posedge clk) last_pos = $time;

  meas_mode_e cur_mode;
  int         cur_acc;
  bit         bp = 0;
  bit         prev_valid = 0;
  longint     t_en;
  bit         t_en_known;

  function automatic longint exp_count(input longint t, input longint half);
    longint x;
    x = t - cum_delay(NOM, N-1);
    if (x <= 0) return 0;
    return x / (2 * half);
  endfunction

  function automatic bit count_ambiguous(input longint t, input longint half);
    longint x;
    x = t - cum_delay(NOM, N-1);
    return (x > 0) && (x % (2 * half) == 0);
  endfunction

  task automatic check_channel(input int ch, input logic [N-1:0] snap,
                               input logic [CNT_W-1:0] acnt, input longint t, input longint half);
    int bad = 0;
    int p = -1;
    longint el;
    for (int j = 0; j < N; j++) begin
      longint tj;
      tj = t - cum_delay(NOM, j);
      if (!osc_ambiguous(tj, half)) begin
        checks++;
        if (snap[j] != osc_level(tj, half)) begin
          bad++;
          failures++;
        end
      end
    end
    if (bad != 0) $display("FAIL channel %0d snapshot at t=%0d: %0d bits wrong", ch, t, bad);
    if (!count_ambiguous(t, half))
      check($sformatf("channel %0d Acnt at t=%0d", ch, t), acnt, exp_count(t, half) % (1 << CNT_W));
    // host-side reconstruction: oldest rising edge in the line
    for (int j = 0; j < N - 1; j++) if (snap[j] && !snap[j+1]) p = j;
    if (t > 2 * half + cum_delay(NOM, N-1)) begin
      check($sformatf("channel %0d rising edge found", ch), p >= 0, 1);
      if (p >= 0) begin
        el = t - longint'(acnt + 1) * 2 * half;
        n_edge++;
        checks++;
        if (el < cum_delay(NOM, p) || el >= cum_delay(NOM, p + 1)) begin
          failures++;
          $display("FAIL channel %0d reconstruction: elapsed %0d not in stage %0d", ch, el, p);
        end
      end
    end
  endtask

  // record monitor, sampled at the falling edge
  always @(negedge clk) begin
    if (rec_valid && !prev_valid) begin
      longint t;
      if (!t_en_known) begin
        t_en = last_pos - cur_acc * TCLK;
        t_en_known = (cur_mode == MODE_CHAR);
      end
      t = last_pos - t_en;
      check_channel(1, rec_snapshot1, rec_acnt1, t, HALF1);
      check_channel(2, rec_snapshot2, rec_acnt2, t, HALF2);
      if (cur_mode == MODE_JITTER) begin
        if (rec_acnt1 == rec_acnt2) n_eq++;
        else if (rec_acnt1 == rec_acnt2 + 1) n_plus++;
        else if (rec_acnt1 + 1 == rec_acnt2) n_minus++;
      end
      if (cur_mode == MODE_CHAR && n_char_snaps < NCHAR) begin
        char_snap[n_char_snaps] = rec_snapshot1;
        n_char_snaps++;
      end
    end
    if (rec_valid) begin
      rec_ready <= bp ? ($urandom % 2 == 0) : 1'b1;
      #1;
      if (!rec_ready) n_stall++;
      prev_valid = !rec_ready;
    end else begin
      rec_ready <= 1'b0;
      prev_valid = 0;
    end
  end

  task automatic run(input meas_mode_e m, input int acc, input int n, input bit backp);
    int cyc = 0;
    @(negedge clk);
    cur_mode = m; cur_acc = acc; bp = backp; t_en_known = 0;
    mode = m; acc_cycles = ACC_W'(acc); n_exp = EXP_W'(n); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && cyc < 100000) begin
      @(negedge clk);
      cyc++;
    end
    check("run completes", done, 1);
    case (m)
      MODE_T0:   n_t0++;
      MODE_CHAR: n_char++;
      default:   n_jit++;
    endcase
    repeat (2) @(negedge clk);
  endtask

  // delay-line characterisation from the MODE_CHAR snapshots of channel 1
  task automatic characterise();
    int c10 [N], c01 [N];
    real wsum = 0.0, wcnt, dsum10 = 0.0, dsum01 = 0.0, true_sum;
    int nw = 0;
    for (int j = 0; j < N; j++) begin c10[j] = 0; c01[j] = 0; end
    for (int i = 0; i < n_char_snaps; i++)
      for (int j = 0; j < N - 1; j++) begin
        if (!char_snap[i][j] &&  char_snap[i][j+1]) c10[j]++;
        if ( char_snap[i][j] && !char_snap[i][j+1]) c01[j]++;
      end
    // W(m): first full period (falling edge, rising edge, next falling edge)
    for (int i = 0; i < n_char_snaps; i++) begin
      int e10a = -1, e01 = -1, e10b = -1;
      int w = 0;
      for (int j = 0; j < N - 1; j++) begin
        bit f, r;
        f = !char_snap[i][j] && char_snap[i][j+1];
        r = char_snap[i][j] && !char_snap[i][j+1];
        if (e10a < 0) begin
          if (f) e10a = j;
        end else if (e01 < 0) begin
          if (r) e01 = j;
        end else if (e10b < 0) begin
          if (f) e10b = j;
        end
      end
      if (e10b >= 0) begin
        for (int x = e10a; x < e01; x++) w += c01[x];
        for (int x = e01; x < e10b; x++) w += c10[x];
        wsum += w;
        nw++;
      end
    end
    check("characterisation has full periods", nw > NCHAR / 2, 1);
    wcnt = wsum / nw;
    for (int j = 0; j < N - 1; j++) begin
      dsum10 += c10[j] / wcnt * real'(2 * HALF1);
      dsum01 += c01[j] / wcnt * real'(2 * HALF1);
    end
    true_sum = real'(cum_delay(NOM, N - 2));
    $display("characterisation: %0d snapshots, W_cnt %f, line delay estimate %f / %f ps, model %f ps",
             n_char_snaps, wcnt, dsum10, dsum01, true_sum);
    checks += 2;
    if (dsum10 < 0.85 * true_sum || dsum10 > 1.15 * true_sum) begin
      failures++; $display("FAIL 1->0 delay estimate");
    end
    if (dsum01 < 0.85 * true_sum || dsum01 > 1.15 * true_sum) begin
      failures++; $display("FAIL 0->1 delay estimate");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // step 1: period measurement
    run(MODE_T0, 100, 2, 0);
    // step 3: differential measurement, sweeping t_m
    for (int acc = 2; acc <= 24; acc++) run(MODE_JITTER, acc, 1, acc % 3 == 0);
    // step 2: characterisation, oscillators left running
    run(MODE_CHAR, 1, NCHAR, 1);
    characterise();
    // back to a differential measurement after the mode switch
    run(MODE_JITTER, 8, 3, 1);
    $display("mechanisms: T0 runs %0d, char runs %0d, jitter runs %0d, stalls %0d, Acnt equal %0d, Acnt1=Acnt2+1 %0d, Acnt1=Acnt2-1 %0d, edges reconstructed %0d",
             n_t0, n_char, n_jit, n_stall, n_eq, n_plus, n_minus, n_edge);
    check("mechanism: period measurement", n_t0 > 0, 1);
    check("mechanism: characterisation", n_char > 0, 1);
    check("mechanism: differential measurement", n_jit > 0, 1);
    check("mechanism: back-pressure stall", n_stall > 0, 1);
    check("mechanism: equal counts", n_eq > 0, 1);
    check("mechanism: counts one apart", n_minus > 0, 1);
    check("mechanism: edge reconstruction", n_edge > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
