`timescale 1ps/1ps
// Behavioural model (not synthesizable): free-running ring oscillator with
// enable, the source of timing jitter that the circuit measures.
//
// On the FPGA the oscillator is a loop of inverting elements closed through
// an enable gate: one LUT per oscillator on Spartan-6, three stages on
// Cyclone IV. Its period is set by placement and process, so it cannot be
// written as logic; this model reproduces its behaviour for simulation.
// While `en` is low the output rests high (the enable gate forces it). After
// `en` rises the output toggles every half period, the first fall coming one
// half period after the enable, so rising edge r (r >= 1) comes at about
// r * T0 after the enable. When `en` falls the output returns high at the
// next toggle time and stays there.
//
// Each half period is STAGES * STAGE_DELAY_PS plus white (independent,
// zero-mean) jitter: the sum of three integers drawn uniformly from
// [-JITTER_PS, JITTER_PS], whose standard deviation is
// sqrt(JITTER_PS*(JITTER_PS+1)) ps per half period. JITTER_PS = 3 gives about
// 4.9 ps per period, close to the 5.26 ps reported for the Spartan-6 ring
// oscillators. The random numbers come from a xorshift generator seeded by
// SEED so that runs repeat. Flicker noise, supply noise and temperature drift
// are not modelled.
module ring_oscillator #(
  parameter int unsigned STAGES         = 1,    // stages in the loop
  parameter int unsigned STAGE_DELAY_PS = 632,  // delay of one stage
  parameter int unsigned JITTER_PS      = 3,    // jitter amplitude per half period
  parameter int unsigned SEED           = 1     // non-zero generator seed
) (
  input  logic en,   // enable; high lets the loop oscillate
  output logic osc   // oscillator output
);

  localparam int HALF_PS = int'(STAGES * STAGE_DELAY_PS);

  logic        osc_q;

  function automatic int unsigned xorshift(input int unsigned s);
    int unsigned x;
    x = s;
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  // One uniform draw in [-JITTER_PS, JITTER_PS]; advances the generator.
  function automatic int draw(ref int unsigned state);
    state = xorshift(state);
    return int'(state % (2 * JITTER_PS + 1)) - int'(JITTER_PS);
  endfunction

  initial begin : oscillate
    int half;
    int unsigned rng;
    rng = (SEED == 0) ? 32'h1 : SEED;
    forever begin
      if (!en) begin
        osc_q = 1'b1;
        @(posedge en);
      end
      half = HALF_PS;
      if (JITTER_PS != 0) half = half + draw(rng) + draw(rng) + draw(rng);
      if (half < 1) half = 1;
      #(half);
      osc_q = en ? ~osc_q : 1'b1;
    end
  end

  assign osc = osc_q;

endmodule
