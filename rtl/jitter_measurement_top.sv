`timescale 1ps/1ps
// Differential on-chip jitter measurement of two free-running ring
// oscillators.
//
// Two identical channels, each a ring oscillator, a tapped delay line and a
// ripple counter, run side by side from the same enable and are captured on
// the same system clock edge. Per experiment a channel reports where its
// latest edges sit inside the delay line (the snapshot, a few-picosecond
// time-to-digital conversion) and how many rising edges have already left the
// line (Acnt). From these the host rebuilds the time of an oscillator edge
// as (count of whole periods) * T0 + (delay of the stages it has crossed).
// The difference of that time between the two channels cancels what both
// oscillators share (supply noise, the clock, slow drift); its variance over
// many experiments gives the white jitter accumulated during the
// accumulation time t_m. The same hardware also runs the period (T0)
// measurement and the delay-line characterisation; see measurement_controller
// for the sequences.
//
// Interface: `start`, `mode`, `acc_cycles` (t_m or N_acc in clock cycles)
// and `n_exp` start a run. Each experiment produces one record on the
// valid/ready port: index, both snapshots and both counter values. `busy`
// is high during a run, `done` pulses after its last record.
//
// As in the published design: the channel structure, the shared enable and
// capture clock, the 256-stage lines, the two oscillators of about 1.264 ns
// and 1.260 ns (Spartan-6), the 100 MHz clock the numbers assume. This
// design's choices: the record port, the widths, and that the ring
// oscillators and carry chains are simulation models (their delays are set by
// silicon and placement, not by logic).
module jitter_measurement_top
  import jitter_pkg::*;
#(
  parameter int unsigned N_STAGES       = N_STAGES_DEFAULT,
  parameter int unsigned CNT_W          = CNT_W_DEFAULT,
  parameter int unsigned ACC_W          = ACC_W_DEFAULT,
  parameter int unsigned EXP_W          = EXP_W_DEFAULT,
  parameter int unsigned STAGE_DELAY_PS = 17,    // carry stage delay (model)
  parameter int unsigned RO_STAGES      = 1,     // stages per ring oscillator
  parameter int unsigned RO1_DELAY_PS   = 632,   // ring oscillator 1 stage delay (model)
  parameter int unsigned RO2_DELAY_PS   = 630,   // ring oscillator 2 stage delay (model)
  parameter int unsigned JITTER_PS      = 3      // jitter amplitude (model)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  meas_mode_e          mode,
  input  logic [ACC_W-1:0]    acc_cycles,
  input  logic [EXP_W-1:0]    n_exp,
  output logic                busy,
  output logic                done,
  output logic                rec_valid,
  input  logic                rec_ready,
  output logic [EXP_W-1:0]    rec_index,
  output logic [N_STAGES-1:0] rec_snapshot1,
  output logic [N_STAGES-1:0] rec_snapshot2,
  output logic [CNT_W-1:0]    rec_acnt1,
  output logic [CNT_W-1:0]    rec_acnt2
);

  logic             osc_en, ctr_pre, snap_clear, sample_en;
  logic             osc1, osc2;
  logic             line_out1, line_out2;
  logic [CNT_W-1:0] acnt1, acnt2;

  measurement_controller #(
    .CNT_W(CNT_W),
    .ACC_W(ACC_W),
    .EXP_W(EXP_W)
  ) u_ctrl (
    .clk, .rst_n, .start, .mode, .acc_cycles, .n_exp, .busy, .done,
    .osc_en, .ctr_pre, .snap_clear, .sample_en,
    .acnt1, .acnt2,
    .rec_valid, .rec_ready, .rec_index, .rec_acnt1, .rec_acnt2
  );

  // Channel 1
  ring_oscillator #(
    .STAGES        (RO_STAGES),
    .STAGE_DELAY_PS(RO1_DELAY_PS),
    .JITTER_PS     (JITTER_PS),
    .SEED          (32'h1234_5678)
  ) u_ro1 (
    .en (osc_en),
    .osc(osc1)
  );

  tapped_delay_line #(
    .N_STAGES      (N_STAGES),
    .STAGE_DELAY_PS(STAGE_DELAY_PS)
  ) u_tdl1 (
    .clk, .rst_n,
    .clear    (snap_clear),
    .sample_en(sample_en),
    .osc_in   (osc1),
    .snapshot (rec_snapshot1),
    .line_out (line_out1)
  );

  ripple_counter #(.WIDTH(CNT_W)) u_cnt1 (
    .clk_in(line_out1),
    .pre   (ctr_pre),
    .acnt  (acnt1)
  );

  // Channel 2
  ring_oscillator #(
    .STAGES        (RO_STAGES),
    .STAGE_DELAY_PS(RO2_DELAY_PS),
    .JITTER_PS     (JITTER_PS),
    .SEED          (32'h9abc_def1)
  ) u_ro2 (
    .en (osc_en),
    .osc(osc2)
  );

  tapped_delay_line #(
    .N_STAGES      (N_STAGES),
    .STAGE_DELAY_PS(STAGE_DELAY_PS)
  ) u_tdl2 (
    .clk, .rst_n,
    .clear    (snap_clear),
    .sample_en(sample_en),
    .osc_in   (osc2),
    .snapshot (rec_snapshot2),
    .line_out (line_out2)
  );

  ripple_counter #(.WIDTH(CNT_W)) u_cnt2 (
    .clk_in(line_out2),
    .pre   (ctr_pre),
    .acnt  (acnt2)
  );

endmodule
