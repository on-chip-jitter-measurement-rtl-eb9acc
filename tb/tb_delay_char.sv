`timescale 1ps/1ps
// Delay-line characterisation at full size: jitter_measurement_top with all
// parameters at their defaults, MODE_CHAR, one snapshot every two clock
// cycles while oscillator 1 (1264 ps) keeps running, NSNAP snapshots.
//
// The host-side estimate is computed from the snapshots of channel 1:
// per-stage counts of falling (0,1) and rising (1,0) transitions, the width
// W of the first full period of every snapshot in count units, its mean
// W_cnt, and d_j = c_j / W_cnt * T0 for both edge types. Checked:
//   - the mean estimated stage delay is within 3 % of the model's mean;
//   - averaged over the 64 carry blocks, the estimate for each of the four
//     positions inside a block is within 2 ps of the model's delay for that
//     position (the model's in-block offsets are -3, +1, -1, +3 ps), so the
//     characterisation resolves the line's non-uniformity.
module tb_delay_char;
  import jitter_pkg::*;
  import tb_jitter_ref_pkg::*;

  localparam int     N     = 256;
  localparam int     NOM   = 17;
  localparam longint T0    = 1264;
  localparam longint TCLK  = 10000;
  localparam int     NSNAP = 1000;

  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  meas_mode_e mode = MODE_CHAR;
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
    #(1_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] snaps [NSNAP];
  int nsnap = 0;

  always @(negedge clk) begin
    if (rec_valid && !rec_ready) begin
      if (nsnap < NSNAP) snaps[nsnap] = rec_snapshot1;
      nsnap++;
    end
    rec_ready <= rec_valid && !rec_ready;
  end

  initial begin
    int  c10 [N], c01 [N];
    real wsum, wcnt, est [N], pos_est [4], pos_mod [4], mean_est, mean_mod;
    int  nw;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    mode = MODE_CHAR; acc_cycles = 16'd1; n_exp = 17'(NSNAP); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (done);
    @(negedge clk);
    checks++;
    if (nsnap != NSNAP) begin
      failures++;
      $display("FAIL snapshots: got %0d expected %0d", nsnap, NSNAP);
    end
    for (int j = 0; j < N; j++) begin c10[j] = 0; c01[j] = 0; end
    for (int i = 0; i < NSNAP; i++)
      for (int j = 0; j < N - 1; j++) begin
        if (!snaps[i][j] &&  snaps[i][j+1]) c10[j]++;
        if ( snaps[i][j] && !snaps[i][j+1]) c01[j]++;
      end
    wsum = 0.0; nw = 0;
    for (int i = 0; i < NSNAP; i++) begin
      int e10a, e01, e10b, w;
      e10a = -1; e01 = -1; e10b = -1; w = 0;
      for (int j = 0; j < N - 1; j++) begin
        bit f, r;
        f = !snaps[i][j] && snaps[i][j+1];
        r = snaps[i][j] && !snaps[i][j+1];
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
    checks++;
    if (nw < NSNAP * 9 / 10) begin
      failures++;
      $display("FAIL only %0d snapshots hold a full period", nw);
    end
    wcnt = wsum / nw;
    // a transition at (j, j+1) means the edge sits in stage j+1
    mean_est = 0.0; mean_mod = 0.0;
    for (int k = 0; k < 4; k++) begin pos_est[k] = 0.0; pos_mod[k] = 0.0; end
    for (int j = 0; j < N - 1; j++) begin
      est[j] = (c10[j] + c01[j]) / 2.0 / wcnt * real'(T0);
      mean_est += est[j];
      mean_mod += real'(stage_delay(NOM, j + 1));
      pos_est[(j + 1) % 4] += est[j];
      pos_mod[(j + 1) % 4] += real'(stage_delay(NOM, j + 1));
    end
    mean_est /= (N - 1);
    mean_mod /= (N - 1);
    $display("characterisation: %0d snapshots, W_cnt %f, mean stage delay %f ps (model %f ps)",
             NSNAP, wcnt, mean_est, mean_mod);
    check_range("mean stage delay", mean_est, 0.97 * mean_mod, 1.03 * mean_mod);
    for (int k = 0; k < 4; k++) begin
      int n_k;
      n_k = 0;
      for (int j = 0; j < N - 1; j++) if ((j + 1) % 4 == k) n_k++;
      pos_est[k] /= n_k;
      pos_mod[k] /= n_k;
      $display("  in-block position %0d: estimate %f ps, model %f ps", k, pos_est[k], pos_mod[k]);
      check_range($sformatf("in-block position %0d delay", k), pos_est[k], pos_mod[k] - 2.0, pos_mod[k] + 2.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
