# Differential on-chip jitter measurement for ring-oscillator TRNGs

A ring-oscillator true random number generator draws its entropy from the
white (Gaussian) timing jitter that each oscillator period picks up. To claim
an entropy rate, you have to measure how fast that jitter builds up:
σ²/t_m, the variance gained per unit of running time. The measurement has to
leave out the other things that move an oscillator edge. These include
supply noise shared by the whole chip, slow temperature drift, flicker noise,
and the quantisation of the measuring circuit itself.

This RTL measures it on the chip itself:

* Two ring oscillators start together from one enable.
* After an accumulation time t_m (20 to 80 ns), the system clock captures
  where each oscillator's latest edges are. It does this with a tapped delay
  line built from the FPGA's fast carry chain, which has steps of about 17 ps.
* A ripple counter on each line counts the whole periods that have already
  passed through it.

Together, the snapshot and the count give the time of an oscillator edge to
within one carry stage. The measured quantity is the **difference** between
the two oscillators' edge times. This cancels whatever the two oscillators
share, so the variance of that difference over many experiments is the white
jitter of both oscillators. The accumulation time is kept short, so flicker
noise and drift have no time to act.

The numbers used throughout come from a Spartan-6 implementation:

* 256 carry stages (64 four-bit carry blocks), about 16.8 ps each.
* Single-LUT oscillators of 1.264 ns and 1.260 ns.
* A 100 MHz system clock.

A Cyclone IV variant differs only in its primitives: three-stage oscillators
and carry LUTs as delay stages.

## Channels and data path

```
          osc_en (common)                     clk (common)
              |                                   |
   ring_oscillator 1 --osc1--> tapped_delay_line 1 --line_out--> ripple_counter 1
                               |  snapshot1[255:0]               |  Acnt1
   ring_oscillator 2 --osc2--> tapped_delay_line 2 --line_out--> ripple_counter 2
                               |  snapshot2[255:0]               |  Acnt2
                               +---------> measurement_controller <------+
                                              | record: index, snapshots, Acnt1/2
                                              v  valid/ready
```

* **ring_oscillator**: a loop closed through an enable gate. While it is
  disabled, its output rests high. After the enable rises, the output
  first falls half a period later. Rising edge *r* therefore arrives about
  *r*·T0 after the enable.
* **tapped_delay_line**: the oscillator signal runs down a `carry_chain`.
  One flip-flop per tap, all clocked by the system clock, captures the whole
  line on the capture edge.
  * `snapshot[0]` is the stage next to the oscillator, so it holds the
    newest value.
  * Bit 255 is the end of the line, so it holds the oldest value.
  * A rising edge that has travelled as far as stage *p* shows up as
    `snapshot[p]=1, snapshot[p+1]=0`. A falling edge shows up as `0,1`.
* **ripple_counter**: toggle flip-flops with preset, clocked by the end of
  the delay line rather than by the oscillator itself. Each oscillator edge
  therefore first crosses the line, where a snapshot can catch it, and only
  then increments the counter. The counter is preset to all ones, which
  reads as a count of 0.
* **measurement_controller**: a four-state FSM (IDLE, PRESET, ACCUM,
  REPORT). It produces the experiment timing and hands each experiment's
  record to the host.

## One experiment, cycle by cycle

For `MODE_JITTER` and `MODE_T0`, the controller runs these steps (cycles of
the 10 ns system clock):

| cycle(s) | `ctr_pre` | `osc_en` | `sample_en` | what happens |
|---|---|---|---|---|
| PRESET (1) | 1 | 0 | 0 | Counters are preset. Snapshots and recorded counts are cleared. |
| ACCUM 1 … A−1 | 0 | 1 | 0 | The oscillators run and edges stream through the lines. |
| ACCUM A | 0 | 1 | 1 | At the end of this cycle, both lines and both counters are captured on the same edge, and `osc_en` drops on that edge. |
| REPORT (≥1) | 0 | 0 | 0 | `rec_valid` is high until `rec_ready`. The lines drain (4.3 ns). |

A = `acc_cycles`. It is t_m in clock cycles (t_m = 80 ns is 8 cycles), or
N_acc for the period measurement (2¹³ in the reference setup). The capture
therefore happens exactly A·10 ns after the oscillators were enabled. After
`n_exp` records, `done` pulses.

The three modes are the three steps of the method:

1. **`MODE_T0`: period measurement.** Sum Acnt over N_exp experiments of
   N_acc cycles each. Then T0 = N_acc·N_exp / (f_clk·ΣAcnt). Acnt falls
   short of the true number of periods by less than the time an edge takes
   to cross the line. With N_acc = 8192 cycles, that bias is below 0.01 %.
2. **`MODE_CHAR`: delay-line characterisation.** The counters are preset
   once and the oscillators stay enabled for the whole run. A snapshot is
   taken every `acc_cycles` cycles after each handshake. Because the
   100 MHz clock and the oscillator are unrelated, the snapshots land at
   effectively random phases. A stage catches an edge in proportion to its
   own delay.
3. **`MODE_JITTER`: differential measurement**, as in the table above.

## Turning records into jitter (host side)

The circuit only collects data; all arithmetic happens on the host. The
testbenches carry this arithmetic as their reference model.

**Stage delays (from `MODE_CHAR` records).**

1. For each stage *j*, count how many snapshots show a falling edge there
   (`0,1` at *j, j+1*): c↓ⱼ. Count rising edges (`1,0`) the same way:
   c↑ⱼ.
2. In each snapshot, take the first full period: the first falling edge,
   the following rising edge, and the next falling edge.
3. Sum the counts of the stages it spans. Use c↑ for the stretch from the
   first falling edge to the rising edge, and c↓ from the rising edge to
   the next falling edge. That sum, W, is the number of count units that
   make up one period.
4. Average W over all snapshots to get W̄.
5. Then d↓ⱼ = c↓ⱼ/W̄·T0 and d↑ⱼ = c↑ⱼ/W̄·T0.

**Edge time (from one `MODE_JITTER` record, per channel).**

1. Acnt edges have already left the line. The oldest rising edge still in
   the line is therefore number Acnt+1.
2. Let *p* be the largest index with `snapshot[p]=1, snapshot[p+1]=0`.
3. That edge entered the line between D(p) and D(p+1) before the capture,
   where D(p) is the sum of the delays of stages 0..p.
4. Its time since the enable is estimated as
   T = (Acnt+1)·T0 + D(p) + ½·d(p+1).

**Jitter.**

1. For each experiment, t_diff = T₁ − T₂.
2. Over N_exp experiments, the sample variance of t_diff is σ²(t_m).
3. σ²/t_m is the noise strength.

Because the two oscillators' periods differ slightly, their counts may
differ by one. The formula above handles that without special cases.
Whichever edge is taken, it is numbered consistently with its own count.
Pairing corresponding edges amounts to keeping t_diff within ±T0/2. This
also absorbs the rare record in which a count and its snapshot disagree at
the end of the line (see the timing caveats below).

The end-to-end testbench also checks the reconstruction directly. With
jitter-free models it must hold exactly:
D(p) ≤ A·T_clk − (Acnt+1)·T0 < D(p+1).

## What is synthesizable and what is a model

| module | kind | role |
|---|---|---|
| `jitter_pkg` | package | mode enum and default sizes |
| `measurement_controller` | RTL | experiment sequencer, records, assertions |
| `tapped_delay_line` | RTL (plus the model below) | capture flip-flops with enable and clear |
| `ripple_counter` | RTL | asynchronous counter, one clock per stage |
| `jitter_measurement_top` | RTL | two channels and the controller |
| `ring_oscillator` | behavioural model | period, enable behaviour and white jitter |
| `carry_chain` | behavioural model | per-stage delays |

The oscillator and the carry chain have no logic function of their own:
their timing comes from silicon and placement. The models exist so that the
whole circuit can be simulated. On an FPGA, you replace them as follows:

* `ring_oscillator`: one LUT configured as NAND(enable, feedback) on
  Spartan-6, or three LUT stages on Cyclone IV, with a keep/loop constraint.
* `carry_chain`: a cascade of the vendor's carry primitive, with each carry
  output taken as a tap (CARRY4 ×64 on Spartan-6).

Both channels should be placed side by side, with the counters next to the
end of their lines. Synthesis tools drop the models' delays and reduce them
to wires.

Model details, chosen for this RTL:

* **Oscillator.** Each half period is STAGES·STAGE_DELAY_PS plus the sum of
  three integers drawn uniformly from ±JITTER_PS, using a seeded xorshift
  generator. With JITTER_PS = 3, the variance is 12 ps² per half period, or
  about 4.9 ps per period. The white-noise deviation reported for the
  Spartan-6 oscillators is 5.26 ps. Flicker noise, supply noise and drift
  are not modelled.
* **Carry chain.** The delay of stage *j* is
  `STAGE_DELAY_PS + {-3,+1,-1,+3}[j mod 4] + ((j div 4) mod 3) − 1` ps,
  with a mean of 17 ps and a total of 4.35 ns for 256 stages. The line
  therefore spans more than 1.5 oscillator periods, which a snapshot needs
  in order to show a full period. Rising and falling edges see the same
  delay. Taps are in order: the real chain's out-of-order taps ("bubbles",
  which are fixed by reordering bits on the host) are not modelled.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_STAGES` | 256 | delay-line length (64 × 4 carry stages) |
| `CNT_W` | 18 | ripple counter bits; 2¹³ cycles × 10 ns / 1.26 ns ≈ 64.8k periods |
| `ACC_W` | 16 | width of `acc_cycles`, holds N_acc = 8192 |
| `EXP_W` | 17 | width of `n_exp` and `rec_index`, holds N_exp = 100000 |
| `STAGE_DELAY_PS` | 17 | carry stage delay (model) |
| `RO_STAGES` | 1 | oscillator stages (model; 3 for the Cyclone IV variant) |
| `RO1_DELAY_PS`, `RO2_DELAY_PS` | 632, 630 | oscillator stage delays, giving periods of 1264 / 1260 ps (model) |
| `JITTER_PS` | 3 | oscillator jitter amplitude (model) |

The accumulation time and the number of experiments are run-time inputs
(`acc_cycles`, `n_exp`), not parameters. A value of 0 is treated as 1.

## Interface of `jitter_measurement_top`

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | system clock (100 MHz assumed by the numbers above); asynchronous reset, active low |
| `start` | in | 1 | starts a run; ignored while `busy` |
| `mode` | in | `meas_mode_e` | `MODE_T0`, `MODE_CHAR`, `MODE_JITTER`; sampled at start |
| `acc_cycles` | in | `ACC_W` | accumulation time in clock cycles; sampled at start |
| `n_exp` | in | `EXP_W` | experiments per run; sampled at start |
| `busy`, `done` | out | 1 | run in progress; one-cycle pulse after the last record |
| `rec_valid`, `rec_ready` | out, in | 1 | record handshake; a record is held unchanged until taken (asserted) |
| `rec_index` | out | `EXP_W` | experiment number from 0 |
| `rec_snapshot1/2` | out | `N_STAGES` | the two snapshots |
| `rec_acnt1/2` | out | `CNT_W` | the two counts, taken on the capture edge |

## Timing caveats for silicon

* The counters are asynchronous and are read on the same clock edge as the
  snapshots. An edge can reach the end of a line right at the capture edge.
  The snapshot then shows that edge as gone, while the captured count does
  not include it yet, so that channel's reconstructed time is one period
  short.
  * The models show this too. A count changes one scheduling step after its
    clock input, so a coincidence within the same picosecond is enough.
  * On silicon the window is wider: the counter's clock-to-output time plus
    the capture flip-flops' aperture.
  * In the full-size test, fewer than 2 % of the records are affected. The
    host fixes them by pairing corresponding edges: because the accumulated
    jitter is far below half a period, it folds t_diff into ±T0/2.
  * This RTL adds no synchroniser or coarse/fine consistency logic.
* Between the capture and the next preset, the controller keeps the
  oscillators off for at least two cycles (20 ns). This lets the line drain
  before the counters are preset. At clocks much faster than 100 MHz, check
  that this time is longer than the line delay.
* `ctr_pre` is registered, and the design asserts that it is never high
  while the oscillators run.

## Simulation

Everything is plain SystemVerilog and runs on Verilator 5 with timing
support. For example, for the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/jitter_pkg.sv tb/tb_jitter_ref_pkg.sv tb/tb_jitter_measurement_top.sv \
    --top-module tb_jitter_measurement_top -o sim
./obj_dir/sim
```

Every testbench ends with one line, `TB_RESULT checks=N failures=M`.
`tb/tb_jitter_ref_pkg.sv` holds the reference arithmetic: the specified
stage delays and the ideal oscillator waveform.

| testbench | checks |
|---|---|
| `tb_ring_oscillator` | rest level, exact toggle times and disable behaviour of a jitter-free instance; mean period and per-period deviation of a jittery 3-stage instance |
| `tb_carry_chain` | arrival time of rising and falling steps at each of the 256 taps; a travelling pulse |
| `tb_tapped_delay_line` | every bit of 40 snapshots of a known square wave; capture enable, hold, clear, reset, line output |
| `tb_ripple_counter` | random bursts up to 3000 edges, accumulation, preset, wrap-around of a 4-bit instance |
| `tb_measurement_controller` | experiment sequence cycle by cycle in all modes, back-pressure, record contents, done, busy/start |
| `tb_jitter_measurement_top` | whole design with jitter-free oscillators: every snapshot bit and count predicted exactly, the edge-time reconstruction, all three modes, stalls, equal and one-apart counts, and a delay-line characterisation from 150 snapshots |
| `tb_jitter_cyclone` | three-stage oscillators of 2394 ps and 2532 ps (the Cyclone IV configuration), smallest model jitter: T0 of both, then 200 differential experiments at t_m = 40 ns with a variance check |
| `tb_delay_char` | all defaults, oscillator 1 running with jitter: 1000 characterisation snapshots; the estimated mean stage delay and the estimate for each position inside a four-stage carry block must match the model |
| `tb_jitter_full` | all defaults and jittery oscillators: T0 from two 512-cycle experiments, then 250 differential experiments at t_m = 80 ns; the t_diff mean must be near 0, its variance must match what the model injects, and at most 5 % of the records may need re-pairing |

`tb_jitter_full` takes about four minutes. The ring oscillator runs at
1.26 GHz and every edge crosses 256 modelled stages, so simulation runs at
roughly 170 ns of circuit time per second. A period measurement with the
reference N_acc = 8192 cycles takes about 80 µs of circuit time per
experiment: about eight minutes per experiment. The testbenches therefore
use 512 cycles. Runs of 100000 experiments, as in a real characterisation,
are meant for hardware.

With the model's jitter of 12 ps² per half period, 80 ns of accumulation
gives about 4 × 63 × 12 ps² + quantisation ≈ (55 ps)² for the
difference of two oscillators. The full-size test measures σ(t_diff) =
50.4 ps over 250 experiments, which is within its statistical spread. The
mean is 5.8 ps and σ²/t_m is 32 fs. Its T0 estimates are 1265.1 ps and
1261.1 ps, for oscillators modelled at 1264 ps and 1260 ps. The Cyclone IV
test measures 13.6 ps against an expected 13.3 ps. The characterisation
test estimates a mean stage delay of 17.04 ps (model 17.00 ps). Its
in-block estimates are 14.0, 18.2, 15.9 and 20.0 ps, against model values
of 14.0, 18.0, 16.0 and 20.0 ps. For comparison, the Spartan-6 hardware measurement
reported σ(t_diff) = 41.9 ps at 80 ns, or σ²/t_m ≈ 22 fs.

## Departures and open points

* The counter width, the widths of the run-time settings, and the record
  port (in place of a PC link) are choices of this RTL.
* The FSM and the exact cycle at which the counts are recorded are also
  choices of this RTL. The counts are recorded on the capture edge.
* In the ripple counter, which flip-flop output clocks the next stage, and
  which output is read as the count, is a choice. The choice made here is Q
  to the next clock and the inverted outputs as the count, so that the
  preset to all ones reads as zero.
* The period measurement uses the same counters, behind the delay lines.
  A counter fed directly by the oscillator, the simplest form of that
  measurement, is not used. The line adds a constant delay of about
  4.3 ns to every count window, which is negligible against N_acc·10 ns.
* Bubble correction, the per-stage histograms, and the t_diff and variance
  computation are host software. They are not part of the RTL.
* The Cyclone IV variant is covered by parameters of the models only. Its
  delay-line length and stage delay are not known, so its oscillators
  (2394 ps and 2530 ps) at t_m = 40 ns are not modelled with real numbers.
