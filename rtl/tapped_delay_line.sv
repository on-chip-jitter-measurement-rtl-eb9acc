`timescale 1ps/1ps
// Tapped delay line time-to-digital converter.
//
// The oscillator signal runs down a carry chain (carry_chain); every stage
// output feeds one capture flip-flop clocked by the system clock. On a clock
// edge with `sample_en` high the flip-flops take a snapshot of the whole line,
// a thermometer-like picture of the last one to three oscillator periods:
// snapshot[0] is the stage next to the oscillator (the most recent value),
// snapshot[N_STAGES-1] the end of the line (the oldest). A rising oscillator
// edge that has travelled to stage p shows as snapshot[p] = 1,
// snapshot[p+1] = 0. The end of the line, `line_out`, clocks the ripple
// counter, so the counter and the snapshot see each edge in turn.
//
// As in the published design: carry-chain line, one register per tap, a common
// system clock, a capture enable ("Enable tapped delay line") and a snapshot
// that reads zero after the experiment reset. This design's choices: the
// synchronous `clear` and the asynchronous active-low `rst_n` both zero the
// snapshot, and the snapshot holds between captures.
//
// Timing: capture on the clock edge that ends a cycle with sample_en high;
// snapshot valid right after that edge. A single register stage is used, as
// on the FPGA, so on silicon a tap changing at the clock edge may resolve
// either way (one source of bubbles).
module tapped_delay_line #(
  parameter int unsigned N_STAGES       = 256,
  parameter int unsigned STAGE_DELAY_PS = 17
) (
  input  logic                clk,        // system clock
  input  logic                rst_n,      // asynchronous reset, active low
  input  logic                clear,      // zero the snapshot (experiment reset)
  input  logic                sample_en,  // capture on this clock edge
  input  logic                osc_in,     // oscillator output
  output logic [N_STAGES-1:0] snapshot,   // captured taps
  output logic                line_out    // end of the line, to the counter
);

  logic [N_STAGES-1:0] tap;

  carry_chain #(
    .N_STAGES      (N_STAGES),
    .STAGE_DELAY_PS(STAGE_DELAY_PS)
  ) u_chain (
    .ci (osc_in),
    .tap(tap)
  );

  assign line_out = tap[N_STAGES-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         snapshot <= '0;
    else if (clear)     snapshot <= '0;
    else if (sample_en) snapshot <= tap;
  end

endmodule
