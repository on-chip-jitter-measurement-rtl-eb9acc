`timescale 1ps/1ps
// Asynchronous ripple counter of positive-edge D flip-flops with preset.
//
// Counts the rising edges of `clk_in` (the end of a tapped delay line, which
// carries the ring oscillator's signal). Each stage is a toggle flip-flop
// (D fed by its own inverted output). Stage 0 is clocked by `clk_in`; stage
// k is clocked by the true output Q of stage k-1. Q of the chain therefore
// counts down, and the count is read from the inverted outputs:
// acnt = ~Q counts up. Presetting every flip-flop to 1, as the method
// prescribes before each experiment, makes acnt read 0, so after the
// experiment acnt is the number of rising edges that left the line.
//
// As in the published design: n positive-edge D flip-flops, all preset to 1,
// rippled so that the counter runs at the oscillator's speed without a clock
// tree. This design's choices: which flip-flop output clocks the next stage
// and which one is read (the published schematic shows the stage chain, not the polarity),
// the width, and an active-high asynchronous preset.
//
// Timing: no clock of its own; bit k settles k flip-flop delays after an
// edge of clk_in. A reader in another clock domain must sample it when the
// input is quiet or accept that a sample taken during a ripple may be off.
module ripple_counter #(
  parameter int unsigned WIDTH = 18   // counter bits (n)
) (
  input  logic             clk_in,   // edges to count
  input  logic             pre,      // asynchronous preset of all stages, high
  output logic [WIDTH-1:0] acnt      // number of rising edges since preset
);

  logic [WIDTH-1:0] q;
  logic [WIDTH-1:0] stage_clk;

  assign stage_clk = {q[WIDTH-2:0], clk_in};

  for (genvar k = 0; k < WIDTH; k++) begin : g_stage
    logic q_k;
    always_ff @(posedge stage_clk[k] or posedge pre) begin
      if (pre) q_k <= 1'b1;
      else     q_k <= ~q_k;
    end
    assign q[k] = q_k;
  end

  assign acnt = ~q;

endmodule
