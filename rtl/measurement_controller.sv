`timescale 1ps/1ps
// Sequencer of the jitter measurement experiments.
//
// One run is `n_exp` experiments of the kind selected by `mode`
// (jitter_pkg::meas_mode_e). For MODE_T0 and MODE_JITTER each experiment
// follows the published measurement timing:
//   PRESET  one cycle: ripple counters preset (`ctr_pre`), snapshots and the
//           recorded counter values cleared (`snap_clear`); oscillators off.
//   ACCUM   `acc_cycles` cycles with `osc_en` high (t_m, or N_acc for the
//           period measurement). `sample_en` is high in the last of them,
//           so both delay lines capture on the edge that ends the
//           accumulation; the counter values are recorded on the same edge
//           and `osc_en` drops on it.
//   REPORT  the record (index, counter values; the snapshots sit in the
//           delay lines' registers) is offered with `rec_valid` until
//           `rec_ready`; the next experiment then starts with PRESET.
// For MODE_CHAR the counters are preset once, the oscillators stay enabled
// for the whole run and every `acc_cycles` cycles of ACCUM (plus any REPORT
// stall) a snapshot is taken: the system clock samples the running
// oscillator at unrelated phases, as the characterisation needs.
// After the last record is accepted `done` pulses for one cycle and the
// controller returns to IDLE; `start` is ignored while `busy`.
//
// As in the published design: the order preset - enable for t_m - capture at the
// end - oscillator off, snapshots and counts reading zero after reset, the
// N_exp repetition and the three measurement steps. This design's choices:
// the valid/ready record port, recording the counter values on the capture
// edge, one PRESET cycle, and treating acc_cycles = 0 as 1 and n_exp = 0
// as 1. With a 100 MHz clock the oscillators have been off for at least one
// cycle (10 ns) before the next preset, long enough for the 4.3 ns line to
// drain.
module measurement_controller
  import jitter_pkg::*;
#(
  parameter int unsigned CNT_W = CNT_W_DEFAULT,
  parameter int unsigned ACC_W = ACC_W_DEFAULT,
  parameter int unsigned EXP_W = EXP_W_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,        // asynchronous reset, active low
  // run control
  input  logic             start,        // start a run (pulse or level)
  input  meas_mode_e       mode,         // experiment kind, sampled at start
  input  logic [ACC_W-1:0] acc_cycles,   // accumulation cycles, sampled at start
  input  logic [EXP_W-1:0] n_exp,        // experiments per run, sampled at start
  output logic             busy,
  output logic             done,         // one-cycle pulse at the end of a run
  // measurement circuit control
  output logic             osc_en,       // ring oscillator enable (registered)
  output logic             ctr_pre,      // ripple counter preset (registered)
  output logic             snap_clear,   // clear snapshots
  output logic             sample_en,    // capture snapshots on this edge
  input  logic [CNT_W-1:0] acnt1,        // ripple counter 1
  input  logic [CNT_W-1:0] acnt2,        // ripple counter 2
  // experiment record
  output logic             rec_valid,
  input  logic             rec_ready,
  output logic [EXP_W-1:0] rec_index,    // experiment number, from 0
  output logic [CNT_W-1:0] rec_acnt1,
  output logic [CNT_W-1:0] rec_acnt2
);

  typedef enum logic [1:0] {S_IDLE, S_PRESET, S_ACCUM, S_REPORT} state_e;

  state_e           state;
  meas_mode_e       mode_q;
  logic [ACC_W-1:0] acc_q;
  logic [EXP_W-1:0] nexp_q;
  logic [ACC_W-1:0] rem;        // accumulation cycles left, current included

  logic last_cycle;
  logic last_exp;

  assign last_cycle = (state == S_ACCUM) && (rem <= 1);
  assign last_exp   = (rec_index + 1'b1 >= nexp_q);
  assign sample_en  = last_cycle;
  assign snap_clear = (state == S_PRESET);
  assign busy       = (state != S_IDLE);
  assign rec_valid  = (state == S_REPORT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      mode_q    <= MODE_T0;
      acc_q     <= '0;
      nexp_q    <= '0;
      rem       <= '0;
      osc_en    <= 1'b0;
      ctr_pre   <= 1'b0;
      done      <= 1'b0;
      rec_index <= '0;
      rec_acnt1 <= '0;
      rec_acnt2 <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          osc_en <= 1'b0;
          if (start) begin
            mode_q    <= mode;
            acc_q     <= (acc_cycles == '0) ? ACC_W'(1) : acc_cycles;
            nexp_q    <= (n_exp == '0) ? EXP_W'(1) : n_exp;
            rec_index <= '0;
            ctr_pre   <= 1'b1;
            state     <= S_PRESET;
          end
        end
        S_PRESET: begin
          ctr_pre   <= 1'b0;
          osc_en    <= 1'b1;
          rec_acnt1 <= '0;
          rec_acnt2 <= '0;
          rem       <= acc_q;
          state     <= S_ACCUM;
        end
        S_ACCUM: begin
          if (last_cycle) begin
            rec_acnt1 <= acnt1;
            rec_acnt2 <= acnt2;
            if (mode_q != MODE_CHAR) osc_en <= 1'b0;
            state <= S_REPORT;
          end else begin
            rem <= rem - 1'b1;
          end
        end
        S_REPORT: begin
          if (rec_ready) begin
            if (last_exp) begin
              osc_en <= 1'b0;
              done   <= 1'b1;
              state  <= S_IDLE;
            end else begin
              rec_index <= rec_index + 1'b1;
              if (mode_q == MODE_CHAR) begin
                rem   <= acc_q;
                state <= S_ACCUM;
              end else begin
                ctr_pre <= 1'b1;
                state   <= S_PRESET;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A record, once offered, stays unchanged until it is taken.
  property p_rec_stable;
    @(posedge clk) disable iff (!rst_n)
      rec_valid && !rec_ready |=> rec_valid && $stable(rec_acnt1)
                                 && $stable(rec_acnt2) && $stable(rec_index);
  endproperty
  a_rec_stable: assert property (p_rec_stable);

  // The oscillators never run while the counters are preset.
  a_no_run_in_preset: assert property (@(posedge clk) disable iff (!rst_n)
                                       ctr_pre |-> !osc_en);

endmodule
