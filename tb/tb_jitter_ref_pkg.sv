`timescale 1ps/1ps
// Reference arithmetic shared by the testbenches: the stage delays the carry
// chain model is specified with, their running sums, and the waveform of an
// ideal (jitter-free) ring oscillator. The testbenches compare the circuit's
// outputs with values computed from these formulas.
package tb_jitter_ref_pkg;

  // Specified delay of carry stage j: nominal + in-block offset
  // {-3,+1,-1,+3} + ((j div 4) mod 3) - 1.
  function automatic int stage_delay(input int nominal, input int j);
    int ofs[4] = '{-3, 1, -1, 3};
    return nominal + ofs[j % 4] + ((j / 4) % 3) - 1;
  endfunction

  // Time for an edge at the line input to reach tap j (stages 0..j).
  function automatic longint cum_delay(input int nominal, input int j);
    longint s = 0;
    for (int i = 0; i <= j; i++) s += stage_delay(nominal, i);
    return s;
  endfunction

  // Ideal oscillator output at time t after its enable rose (t may be
  // negative): high before the enable and for the first half period, then
  // toggling every half period.
  function automatic bit osc_level(input longint t, input longint half);
    if (t < half) return 1'b1;
    return ((t / half) % 2) == 0;
  endfunction

  // True when t falls exactly on an oscillator toggle (sampling is then a
  // race and the bit is not checked).
  function automatic bit osc_ambiguous(input longint t, input longint half);
    return (t > 0) && (t % half == 0);
  endfunction

endpackage
