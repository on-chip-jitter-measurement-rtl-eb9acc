`timescale 1ps/1ps
// Shared types and default sizes of the differential ring-oscillator jitter
// measurement circuit.
//
// The circuit runs three kinds of experiment, selected per run:
//   MODE_T0     - enable both oscillators for a fixed number of system clock
//                 cycles and record the ripple-counter values (average
//                 oscillator period T0).
//   MODE_CHAR   - leave the oscillators running and take snapshots of the
//                 tapped delay lines with the system clock, which is not
//                 related to the oscillators (delay-line characterisation).
//   MODE_JITTER - preset, enable both oscillators for the accumulation time
//                 t_m, then take both snapshots and both counter values on
//                 the same clock edge (differential jitter measurement).
// The sizes below are the Spartan-6 implementation's: 256 delay stages
// (64 cascaded four-bit carry blocks), a 100 MHz system clock, N_acc = 2^13
// cycles for the period measurement, t_m = 80 ns (8 cycles) and
// N_exp = 100000 experiments. Counter, accumulation and experiment-counter
// widths are this design's choice, sized to hold those numbers.
package jitter_pkg;

  typedef enum logic [1:0] {
    MODE_T0     = 2'd0,
    MODE_CHAR   = 2'd1,
    MODE_JITTER = 2'd2
  } meas_mode_e;

  // Delay-line length: 64 carry blocks of 4 stages.
  parameter int unsigned N_STAGES_DEFAULT  = 256;
  // Ripple counter width. About 64.8k oscillator periods fit into
  // N_acc = 8192 cycles of 10 ns, so 18 bits leave headroom.
  parameter int unsigned CNT_W_DEFAULT     = 18;
  // Width of the run-time accumulation-cycle setting (holds N_acc = 8192).
  parameter int unsigned ACC_W_DEFAULT     = 16;
  // Width of the experiment counter (holds N_exp = 100000).
  parameter int unsigned EXP_W_DEFAULT     = 17;
  // Numbers used by the published experiments, for reference by users.
  parameter int unsigned N_ACC_DEFAULT     = 8192;
  parameter int unsigned N_EXP_DEFAULT     = 100000;
  parameter int unsigned TM_CYCLES_DEFAULT = 8;       // 80 ns at 100 MHz
  parameter int unsigned CLK_PERIOD_PS     = 10000;   // 100 MHz

endpackage
