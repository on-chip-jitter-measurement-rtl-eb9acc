`timescale 1ps/1ps
// Behavioural model (not synthesizable): the fast carry chain used as a
// tapped delay line.
//
// On Spartan-6 the line is 64 cascaded four-bit carry blocks, 256 stages in
// all, each stage's carry output being one tap; on Cyclone IV it is the
// dedicated carry LUTs of neighbouring logic elements. Stage delays are set by
// silicon and routing, so the line is modelled with delayed assignments: the
// input reaches tap j after the sum of the delays of stages 0..j. Tap 0 is the
// stage next to the oscillator, tap N_STAGES-1 the end of the line, which
// also clocks the ripple counter.
//
// The stage delays are deliberately uneven, as measured on the real chain:
//   d(j) = STAGE_DELAY_PS + OFS(j mod 4) + ((j div 4) mod 3) - 1
// with OFS = {-3, +1, -1, +3} ps for the four positions inside a carry
// block. With STAGE_DELAY_PS = 17 the mean is about 17 ps, close to the
// 16.8 ps measured on Spartan-6, and the 256-stage line spans about 4.3 ns,
// more than one and a half periods of a 1.26 ns oscillator. Rising and
// falling edges see the same delay here, and taps are in order: the bubbles
// of the real chain are not modelled.
module carry_chain #(
  parameter int unsigned N_STAGES       = 256,  // stages (taps)
  parameter int unsigned STAGE_DELAY_PS = 17    // nominal stage delay
) (
  input  logic                ci,   // line input (oscillator output)
  output logic [N_STAGES-1:0] tap   // tap j = ci delayed by stages 0..j
);

  function automatic int stage_delay(input int j);
    int ofs;
    case (j % 4)
      0:       ofs = -3;
      1:       ofs = 1;
      2:       ofs = -1;
      default: ofs = 3;
    endcase
    return int'(STAGE_DELAY_PS) + ofs + ((j / 4) % 3) - 1;
  endfunction

  logic [N_STAGES:0] node;
  assign node[0] = ci;

  for (genvar j = 0; j < N_STAGES; j++) begin : g_stage
    localparam int D = stage_delay(j);
    assign #(D) node[j+1] = node[j];
  end

  assign tap = node[N_STAGES:1];

endmodule
