# TERA09-style 64-channel current-to-frequency converter

Ionization chambers used to monitor particle-therapy beams deliver currents
that range from a few hundred pA up to hundreds of uA. This design turns each
of 64 such currents into a count of fixed charge packets. Each channel
integrates its input. Whenever the integrator crosses a threshold, the channel
removes one charge quantum Q_c (200 fC) and counts one. So the count rate is
f = I_in / Q_c, and the count itself is the collected charge in units of Q_c.
The quantum is removed while the integrator keeps running, so no charge is
lost between counts (there is no dead time). Currents of either polarity are
measured: a negative current makes the counter count down.

The digital back end snapshots all 64 counters at once on an external latch
signal. An adder tree then forms the sums of 4, 16 and 64 channels, and any of
the 85 resulting registers can be read through a 38-bit multiplexer. The sums
extend the range: if one large current is wired to several inputs, it divides
among them, and the sum register reads it as a whole. With all 64 inputs tied
together, the range reaches about 800 uA.

## Numbers

| quantity | value |
|---|---|
| channels | 64 |
| master clock | 250 MHz (4 ns) |
| charge quantum Q_c | 200 fC (set in silicon by C_sub * (V_pulse+ - V_pulse-)) |
| maximum count rate per channel | f_clk / 4 = 62.5 MHz, i.e. +-12.5 uA at 200 fC |
| channel counter | 32-bit up/down, two's complement |
| registers | 64 x 32-bit channel, 16 x 34-bit sum of 4, 4 x 36-bit sum of 16, 1 x 38-bit sum of 64 |
| readout | 7-bit address, 38-bit data, sign-extended |

## One channel: charge recycling

Files: `tera09_afe_model.sv` (analog, behavioural), `tera09_pulse_gen.sv`,
`tera09_updown_counter.sv`, `tera09_channel.sv`.

The analog part is an OTA integrating the input current on C_int. Two clocked
comparators watch the integrator, one against an upper threshold and one
against a lower one. The charge is removed by a switched capacitor C_sub. This
is the least obvious part of the design. A voltage step on the top plate of
C_sub pushes a current spike of charge C_sub * dV through its bottom plate. A
step up gives +Q_c and a step down gives -Q_c. A second signal, `pulse_sel`,
steers that spike. While it is high, the spike goes to the integrator input.
While it is low, the spike goes to the OTA reference and is lost harmlessly.
Each `pulse` has a rising and a falling edge, so exactly one of the two edges
must happen while `pulse_sel` is high. Which edge that is decides the sign of
the quantum.

The pulse generator is a Moore state machine that makes these sequences:

```
positive (integrator above V_th+, counter +1):
  state    IDLE  P1  P2  P3  IDLE
  pulse_sel  0    1   1   0   0
  pulse      0    0   1   1   0      rising edge with pulse_sel=1 -> -Q_c into the integrator
  cnt_up               ^

negative (integrator below V_th-, counter -1):
  state    IDLE  N1  N2  N3  IDLE
  pulse_sel  0    0   1   1   0
  pulse      0    1   1   0   0      falling edge with pulse_sel=1 -> +Q_c into the integrator
  cnt_dn               ^
```

In the positive sequence, `pulse_sel` is in effect an early copy of `pulse`.
The mirrored negative sequence is this design's own construction: the
original chip is described only as driving the switches with one pulse and a
delayed copy of it, which is the positive sequence.
Because every sequence returns through IDLE, one conversion takes 4 clocks.
That gives the f_clk/4 ceiling, and above +-12.5 uA the channel saturates at
exactly one count per 4 clocks.

The counter counts up or down on the one-clock strobes and wraps at 32 bits.

`tera09_afe_model` models the analog part in charge units (fC) instead of
volts. Each clock it adds I_in * 4 ns and applies any quantum that a `pulse`
edge has steered in. It clamps the charge to +-1000 fC (the OTA output swing)
and registers the two comparator outputs at +-100 fC. The thresholds, the
swing and the ideal, mismatch-free behaviour are this model's own choices. The
model reproduces the channel's transfer function (count = I*t/Q_c to within
about one quantum, saturation at f_clk/4). It does not reproduce the analog
imperfections (switch charge injection, channel-to-channel gain spread of 1-3 %,
leakage).

## Count and sum logic

Files: `tera09_ws_register.sv`, `tera09_adder4.sv`, `tera09_readout_mux.sv`,
`tera09_count_sum.sv`, shared constants in `tera09_pkg.sv`.

```
 latch --sync(2 FF)--edge--> load0 --> load1 --> load2 --> load3
                              |         |         |         |
 64 counters --> 64 x 32b reg --(+4)--> 16 x 34b --(+4)--> 4 x 36b --(+4)--> 1 x 38b
                              \___________\___________________\______________\
                                                 85:1 mux, addr[6:0] --> dout[37:0]
```

- **Latch.** `latch` is asynchronous to the master clock. It passes a two-flop
  synchronizer, and its rising edge loads all 64 channel registers on the same
  clock edge. The counters keep counting, so a snapshot costs no counts.
- **Adder tree.** Each level adds four registers of the level below into a
  register two bits wider, so no level can overflow. The tree is pipelined
  one level per clock. The channel registers hold the new snapshot 3 clocks
  after the latch rises (2 for the synchronizer, 1 to load). The sum of 64
  holds it 3 clocks after that. Group g of the sums of 4 covers channels
  4g..4g+3, and sum of 16 number g covers channels 16g..16g+15. The pipelining
  and this grouping are this design's choices.
- **Warnings.** Each of the 85 registers has a warning flag. A load that takes
  the register's most significant bit from 0 to 1 sets the flag, and it stays
  set until Reset_D. The OR of all flags (`ws_any`) warns that an overflow is
  near. The counts are two's complement, so a register also sets its flag when
  its value first goes negative. The flag is sticky (held until Reset_D) so
  that a slow readout cannot miss it; that is this design's choice.
- **Multiplexer.** It is combinational, so a register can be read at any time.
  Address map: 0-63 channel registers, 64-79 sums of 4, 80-83 sums of 16, 84 the
  sum of 64. Addresses 85-127 read 0. Narrower registers are sign-extended to
  38 bits. The address map is this design's choice.

## Top level and resets

`tera09.sv` instantiates the 64 channels and the count and sum logic.

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | 250 MHz master clock |
| reset_d_n | in | 1 | Reset_D, active low, asynchronous: clears counters, pulse generators, registers and warnings |
| reset_a | in | 1 | Reset_A, active high: holds every integrator discharged |
| iin_na | in | 64 x real | input currents in nA (model inputs) |
| latch | in | 1 | rising edge takes a snapshot |
| addr | in | 7 | register address |
| dout | out | 38 | selected register |
| ws_any | out | 1 | OR of all warnings |
| ws | out | 85 | the individual warnings, in address order |

The polarity of Reset_D and the fact that it also resets the pulse
generators are choices of this design. Parameters: `CLK_PERIOD_NS` (4.0) and
`QC_FC` (200.0), used only by the analog model.

Because the inputs are real-valued currents driving a behavioural model, the
top simulates but does not synthesize as a whole. Everything except
`tera09_afe_model` is synthesizable. For a netlist, replace the model with
the real comparator outputs and bring `pulse`/`pulse_sel` out to the analog
macro.

## Simulating

Every testbench in `tb/` checks itself and ends with a
`TB_RESULT checks=N failures=M` line. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/tera09_pkg.sv tb/tb_tera09.sv --top-module tb_tera09 -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| tb_tera09_afe_model | integration step, quantum steering by pulse_sel, thresholds, clamp, Reset_A |
| tb_tera09_pulse_gen | both sequences clock by clock against a reference, f_clk/4 rate, reset |
| tb_tera09_updown_counter | random up/down, wrap below zero, asynchronous Reset_D |
| tb_tera09_channel | counts vs I*t/Q_c from 10 nA to 12 uA, both polarities; saturation at f_clk/4, Reset_A, Reset_D |
| tb_tera09_ws_register | loads, warning on MSB 0->1, stickiness, Reset_D |
| tb_tera09_adder4 | signed sums at 32/34/36-bit inputs, extremes |
| tb_tera09_readout_mux | all 128 addresses, sign extension |
| tb_tera09_count_sum | latch latency, snapshot stability, all 85 registers, warnings, Reset_D |
| tb_tera09 | whole chip at default sizes: positive, negative and saturated channels, a 40 uA input shared by 4 channels, warnings, two snapshots with no lost counts, Reset_A, Reset_D |
| tb_tera09_workloads | the characterization set-ups: a 10 nA-12 uA transfer curve of both polarities, 700 uA over 64 channels in parallel, 1 uA per channel, 10 uA shared by 64 channels |

All of them run at the design's default sizes (64 channels, 32-bit counters)
and each finishes within seconds.

## Limits and departures

- The analog front end is an ideal behavioural model. Thresholds (+-100 fC),
  output swing (+-1000 fC), the sign convention (upper threshold means
  positive current and an increment) and units are its own. Gain spread,
  charge injection and leakage are not modelled.
- The states and encoding of the pulse generator and the whole negative
  sequence are this design's own. Only the Moore style, the positive edge order
  and the 4-clock minimum period are fixed by the original chip.
- The latch synchronizer, the adder pipeline timing, the address map, the
  sign extension and the sticky warnings are this design's own choices.
- The original block diagram draws warning outputs only on the sum registers.
  Here every register, including the 64 channel registers, has one, following
  the rule that each register provides a warning.
- Pads, the package (MQFP 160) and the 0.35 um process are not represented.
