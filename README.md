# Digital PWM generators for a DC-DC buck converter

A buck converter sets its output voltage by the fraction of each switching
period for which its power switch is on: ideally `Vout = D * Vin`, with `D =
T_on / T`. This RTL makes that switching signal digitally. A controller
supplies an N-bit duty word, and the circuit turns it into a pulse train whose
period is `2^N` clocks. The pulse's high time is set by the duty word, to one
clock of resolution.

There are three ways to build such a digital PWM (DPWM) generator, and this
RTL has all three. They share the clock and the duty word, and a selector
chooses which one drives the switch:

| generator | idea | state at N = 8 | high time per 256-clock period |
|-----------|------|----------------|--------------------------------|
| `cdpwm`, counter based | an 8-bit counter is the carrier; match comparators set and reset a flip-flop | 17 flip-flops | `duty` clocks (0 … 255) |
| `ddpwm`, delay-line based | a 256-tap one-hot ring counter is the "delay line"; a 256:1 multiplexer picks the tap that ends the pulse | 521 flip-flops | `duty + 1` clocks (1 … 256) |
| `hdpwm`, hybrid | a 32-tap ring gives the 5 fine bits; a 3-bit counter of ring revolutions gives the 3 coarse bits | 79 flip-flops | `duty + 1` clocks (1 … 256) |

The default resolution is 8 bits. At the intended 16 MHz switching frequency
every generator therefore needs `F_clk = 2^8 * 16 MHz = 4.096 GHz`. These are
cycle-accurate synchronous models, so the hybrid generator does not lower this
clock rate, but it needs far less logic than the delay-line generator.

## Common structure: SET, RESET and an SR flip-flop

Each generator ends in the same clocked SR flip-flop (`sr_ff`). A SET event
starts the pulse and a RESET event ends it. Q changes one clock after the
event, and Q' is its complement. The generators differ only in how they
produce the two events. They also differ in which event wins when both arrive
in the same clock:

* `cdpwm` lets RESET win. Duty 0 puts SET and RESET on the same clock, so the
  output stays low (0 %). The largest code, 255, gives 255/256.
* `ddpwm` and `hdpwm` let SET win. The largest code puts RESET on the same
  tap as SET, so the output stays high (100 %). The smallest code, 0, gives a
  one-clock pulse.

In all three generators, the duty word is copied into a holding register at
the end of each period. A change made mid-period therefore takes effect at
the next period boundary and never produces a pulse of intermediate length.
After a synchronous reset (`rst_n` low), all outputs are low. The first
period then runs with duty 0, and with any duty word applied at reset the
first rising edge comes 257 clocks after reset is released.

## Counter-based generator (`cdpwm`)

`mod_counter` counts 0 … 2^N−1 and wraps, one count per clock. It drives two
equality comparators:

* zero value match, `count == INIT_VALUE` (0 by default), drives SET;
* DC value match, `count == duty`, drives RESET.

If the counter is 0 in cycle t, Q is high from t+1 to t+duty. The circuit is
small, but the clock must run at 2^N times the switching frequency.

## Delay-line generator (`ddpwm`)

`ring_counter` holds a single 1 that moves one tap per clock around 2^N taps.
Each tap goes through its own flip-flop in `tap_dff_bank`. Then:

* the flip-flop of the last tap (255) drives SET;
* `tap_mux`, a 2^N:1 multiplexer whose select is the duty word, drives RESET
  when the ring reaches the selected tap.

The distance from tap 255 round to tap d is d+1 clocks, hence the `duty + 1`
transfer. All taps pass through the same flip-flop stage, so SET and RESET
stay aligned. The cost is that the ring, the flip-flop bank and the
multiplexer all grow as 2^N.

## Hybrid generator (`hdpwm`)

This generator is the hardest to follow. The 8-bit duty word is split into
two fields:

```
duty[7:5] -> coarse field, compared with a 3-bit revolution counter
duty[4:0] -> fine field, selects one of 32 ring taps
```

The 32-tap ring advances every clock, so one revolution takes 32 clocks. The
revolution counter (`mod_counter`, enabled by the ring's last tap) advances
once per revolution, so 8 revolutions make one 256-clock period. Each half
produces its own SET and RESET, and the two SETs are ANDed, as are the two
RESETs:

```
SET   = ring tap 31 (registered)      AND  revolution count == 7
RESET = tap selected by duty[4:0]     AND  revolution count == duty[7:5]
```

Two details make this work:

1. **The revolution count passes through the same flip-flop stage as the
   ring taps.** The count changes as the ring leaves tap 31. Registering it
   with the taps means that the count seen next to a given tap is always the
   count of that tap's revolution.
2. **The frame starts in the revolution with count 7**, at its last tap, which
   is the point where the count is about to wrap to zero. Counted from there,
   RESET in revolution `duty[7:5]` at tap `duty[4:0]` is exactly `duty + 1`
   clocks later. So the hybrid generator has the same transfer as the
   delay-line generator, with 32 taps instead of 256.

Which bits are coarse and which fine is this design's own choice. The
split sizes (5 bits for the ring part, 3 for the counter part) follow the
published design.

## Top level (`dpwm_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | DPWM clock, 2^N × switching frequency |
| `rst_n` | in | 1 | synchronous, active-low reset |
| `duty` | in | N | duty word, e.g. from the loop's ADC |
| `gen_sel` | in | `dpwm_pkg::gen_sel_e` | 0 counter, 1 delay line, 2 hybrid |
| `pwm_q`, `pwm_qn` | out | 1 each | selected generator's Q and Q'; drive the power switch |
| `pwm_all` | out | 3 | Q of cdpwm (bit 0), ddpwm (bit 1), hdpwm (bit 2) |

The parameters are `N` (resolution, default 8) and `HYB_ND` (the hybrid's ring
bits, default 5; its counter gets `N − HYB_ND`, so N must exceed `HYB_ND`).
N = 10 gives 1024 steps and is tested; at that size the delay-line generator
alone needs 2048 flip-flops. Each generator can also be used on its own.

## What is outside the RTL

In the converter's control loop, the output voltage is compared with a set
value. A continuous-time PID compensator and an 8-bit ADC then produce the
duty word. The power stage is a MOSFET, a diode, L = 16 µH, C = 15 nF, a
10 Ω load and Vin = 20 V. None of this is digital logic, so the RTL starts
at the duty word. The testbench folder contains a behavioural model of the
power stage with these component values (`tb/buck_converter_model.sv`,
forward-Euler, one step per DPWM clock). Two testbenches use it:

* `tb_buck_open_loop`: each generator at a fixed duty word, with a line step
  (20 V → 24 V) and a load step (10 Ω → 5 Ω). The settled output is checked
  to be within 1 % of D·Vin.
* `tb_buck_closed_loop`: start-up from 0 V to a 10 V set value for each
  generator. A bench-side PI compensator (gains chosen for this bench)
  updates an 8-bit duty word once per period. The bench prints delay, rise,
  peak and settling times, overshoot and steady-state error, and checks
  settling within 20 µs, overshoot below 20 % and error below 0.1 V.
  Because the loop gains are the bench's own, these timings only show that
  the loop works. They are not a comparison between the generators.

## Departures and own choices

The published design fixes the block structure: counter plus ZVM/DCVM
comparators plus SR flip-flop; ring counter plus one D flip-flop per tap plus
multiplexer, with SET from the last tap; a hybrid with a 5 + 3 bit split and
AND-combined SET and RESET. It also fixes the 8-bit resolution and the
16 MHz switching frequency. The following are this design's own choices:

* synchronous active-low reset everywhere; ring starts at tap 0, counters at 0;
* tie-breaking in the SR flip-flop (RESET wins in `cdpwm`, SET wins in the
  ring-based generators), and with it the `duty` versus `duty + 1` transfers;
* duty holding registers loaded at the period boundary;
* in the hybrid: high bits to the counter, one revolution counter instead of
  the two counters of the published block diagram (both would count the same
  revolutions), the registered count and the frame start at count 7;
* the delay line is a clocked ring counter, as in the published model. Its
  taps are one clock apart, not a sub-clock analog delay;
* `gen_sel` and the three generators side by side (the published models use
  one generator at a time);
* 8 bits as the default, although a 10-bit build is also reported for the
  simulations; 10 bits is available as `N = 10`.

## Files

`rtl/`: `dpwm_pkg` (constants, `gen_sel_e`), `sr_ff`, `mod_counter`,
`ring_counter` (with a one-hot assertion), `tap_dff_bank`, `tap_mux`,
`cdpwm`, `ddpwm`, `hdpwm`, `dpwm_top`.

`tb/`: one self-checking testbench per module (`tb_<module>`). Each prints
`TB_RESULT checks=… failures=…` and has a watchdog. The generator benches
sweep all 256 duty words, check the high time, the period, the 257-clock
start-up latency and that no pulse is split by a duty change. `tb_dpwm_top`
runs all three generators at default parameters and counts that 0 %,
100 %, duty updates, and short and multi-revolution hybrid pulses each occur.
The others are `tb_dpwm_top_10bit`, `tb_buck_open_loop` and
`tb_buck_closed_loop`, plus `buck_converter_model`.

To simulate, for example, the top-level bench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/dpwm_pkg.sv tb/tb_dpwm_top.sv --top-module tb_dpwm_top
./obj_dir/Vtb_dpwm_top
```

Replace `tb_dpwm_top` with any other bench name. Each runs in well under a
second. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/dpwm_pkg.sv rtl/<module>.sv`.
