# Quadrature-encoder DC motor velocity controller

This is a small motor-control core. It keeps a DC motor at a commanded speed.
An incremental optical encoder on the shaft gives two square waves, A and B,
90° apart. The core counts their edges, measures the speed once per
millisecond, compares it with the destination speed and corrects the PWM duty
cycle through a digital PID filter. All of it runs on one 8 MHz clock.

```
 cha,chb ─► digital_filter ─► qep_decoder ─► counter_reg ─► qep_latch ─► dva_calc ─► act_d / act_v / act_a
              ▲ 1 MHz enable     ▲ 1 MHz          (33 bit)     │ irq_qep   (per 1 ms)        │
              └──── clk_divider ─┘                             │ every 1 ms                  ▼ v (signed by dir_in)
                                                               └───────────────────────► subt ◄── dest_v
                                                                                             │ err (10 bit)
 pwm_out, dir_out ◄── pwm_timer (10 bit, 1024 clocks) ◄── y (10 bit) ◄── pid_compensator ◄─┘ (update per 1 ms)
```

## Operating point

| quantity | value |
|---|---|
| system clock | 8 MHz |
| encoder | 500 lines, x4 decoding → 2000 counts per revolution |
| highest encoder rate | 100 kHz per phase, i.e. 400 counts per ms (12 000 rpm) |
| encoder sampling | 1 MHz (system clock / 8) |
| speed sampling and control update | every 1 ms (8000 clocks) |
| speed unit | counts per 1 ms sample, 0…400 in normal use |
| PWM | 10 bit, period 1024 clocks → 7.8 kHz |
| position counter | 33 bit (up to 2^33−1 = 8 589 934 591 counts) |
| distance / velocity / acceleration outputs | 32 bit, two's complement |

The destination speed is meant to be renewed by a motion-profile source about
every 10 ms. That is ten control updates per command. The profile source is
outside this core: it drives `dest_v` and `dir_in`.

## Encoder front end: filter and x4 decoder

This part is the least obvious, and it limits what the core can measure.

**Noise filter (`digital_filter`).** Each phase is sampled into an input
flip-flop on the 1 MHz enable. It then shifts through a three-stage register.
The output flop acts like a J-K flip-flop:

- it is set when all three stages hold 1;
- it is cleared when all three hold 0;
- otherwise it keeps its value.

A spike shorter than three samples (3 µs) never reaches the decoder. A clean
edge reaches the output four samples after it is first sampled.

**Decoder (`qep_decoder`).** Each filtered (A,B) pair maps to one of four states:

| A | B | state |
|---|---|---|
| 1 | 0 | S1 |
| 1 | 1 | S2 |
| 0 | 1 | S3 |
| 0 | 0 | S4 |

- One step S1→S2→S3→S4→S1 is a count up.
- One step the other way is a count down.
- Any edge of either phase counts, which gives four counts per encoder line.
- A jump of two states means both phases changed within one sample. The
  direction of such a jump cannot be known, so it is dropped.

The outputs `cnt` with `up` or `dn` are one system clock wide, so the counter
counts each step once.

**Timing limits.** At the top rate of 400 counts/ms:

- an edge arrives every 2.5 µs;
- each phase level lasts 5 µs (5 samples);
- edges of A and B are 2–3 samples apart.

That is enough for the filter (which needs 3 samples) and for the decoder.
The closed-loop test runs at up to ~416 counts/ms and loses no counts.

The margin is thin, though. A noise spike that lands right after a real edge
restarts the three-sample wait, and can delay that edge by up to five samples.
Above roughly 200 counts/ms the delayed edge can then fall on the same sample
as the next edge of the other phase. The decoder sees a two-state jump, and
two counts are lost. Spikes that fall on a settled level (more than ~6 µs
after an edge) are always rejected. If your encoder is noisy near its edges,
sample faster (lower `DIV` relative to the clock) or lower the top speed.

## Measurement chain: 1 ms latch and distance / velocity / acceleration

`qep_latch` counts 8000 clocks. On the last one it copies the position count
to `dout` and pulses `irq_qep` for one clock. That pulse is the sample strobe
for everything after it.

`dva_calc` uses the fixed-sampling-period estimate v(k) = x(k) − x(k−1), with
T = one sample. So velocity comes out in counts per millisecond with no
division. The other estimate, position interval divided by time, is not used.
On each strobe it does:

```
d <= din                 (distance: latched position, low 32 bits)
v <= din - d_previous    (velocity)
a <= v - v_previous      (acceleration, one sample behind v)
```

Acceleration comes one sample late. Take a steadily accelerating input
0, 2, 6, 12, 20, 30, …:

- v = 2, 4, 6, 8, 10, …
- a = 0, 2, 2, 2, …

This is the reference behaviour the design follows, and the testbench checks
exactly this sequence.

## Error and compensator

`subt` forms `err = dest_v − v`. The velocity given to it is the measured
velocity in the commanded direction: `v` when `dir_in = 1`, `−v` otherwise.
The result is saturated to the 10-bit signed range −512…511 and registered.

`pid_compensator` computes the incremental (velocity-form) PID

```
y[n] = y[n-1] + ( C0·x[n] + C1·x[n-1] + C2·x[n-2] ) / S
```

It updates once per millisecond, two clocks after `irq_qep`, once the error
register has settled. The datapath:

- `x` is 10 bit and the coefficients are 16 bit signed;
- three 10×16 multipliers give 26-bit products;
- their sum is kept at 28 bits so it cannot overflow;
- `/S` is an arithmetic right shift by `S_SHIFT` (rounding toward −∞);
- the step is saturated to ±511 and added to `y[n-1]`;
- `y` is clamped to 0…1023, because it is the PWM duty and the direction
  travels separately.

The coefficients relate to textbook gains as follows:

- C0 = Kp + Ki + Kd
- C1 = −Kp − 2·Kd
- C2 = Kd

The defaults are a PI setting: C0 = 384, C1 = −256, C2 = 0, S = 256, which is
Kp = 1.0 and Ki = 0.5 in duty units per count/ms. They were tuned against the
motor model in the testbench, where 500 counts/ms is reached at full duty and
the time constant is about 4 ms. A real motor needs its own values. Set them
with the `C0`, `C1`, `C2` and `S_SHIFT` parameters of `motor_ctrl_top`.

The shift truncates, so a steady-state error of one or two counts/ms is normal
at low speed.

## PWM and direction

`pwm_timer` runs a free 10-bit counter. At the start of each 1024-clock period
it captures the duty word and `sign_in`. `pwm` is high for exactly `duty`
clocks at the start of the period:

- 0 gives a constant low;
- 1023 gives 1023 of 1024 clocks high.

`dir_out` is the captured direction. A duty change therefore never cuts a pulse
short, and direction and duty always change together at a period boundary.

## Top-level pins (`motor_ctrl_top`)

| pin | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | 8 MHz clock; synchronous active-high reset |
| `cha`, `chb` | in | 1 | raw encoder phases (asynchronous; the filter's input flop samples them) |
| `clear_cnt` | in | 1 | zeroes position, latch, d/v/a history and error; restarts the 1 ms timer (the PID output is kept). Pulse it once after reset: the filter starts from A = B = 0, so an encoder resting in S1 or S3 adds one count in the first microseconds |
| `dest_v` | in | 10 | destination speed magnitude, counts per ms |
| `dir_in` | in | 1 | commanded direction, 1 = counting up (A leads B) |
| `pwm_out` | out | 1 | PWM drive |
| `dir_out` | out | 1 | direction to the bridge, updated at PWM period start |
| `act_d` | out | 32 | position at the last sample |
| `act_v` | out | 32 | signed speed, counts per ms |
| `act_a` | out | 32 | signed acceleration, counts per ms per sample (one sample late) |
| `irq_qep` | out | 1 | one-clock pulse every 1 ms; `act_*` are valid from the next clock |

The `act_*` outputs are only 32 bits wide, while the counter has 33. Distance
therefore wraps at ±2^31, but velocity and acceleration are exact for any
realistic speed.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `mc_pkg` | `SYS_CLK_HZ`, `SAMPLE_RATE_HZ`, `IRQ_RATE_HZ` | 8 MHz, 1 MHz, 1 kHz | give `SAMPLE_DIV` = 8 and `IRQ_PERIOD` = 8000 |
| `motor_ctrl_top` | `SAMPLE_DIV_P`, `IRQ_PERIOD_P` | 8, 8000 | encoder sampling divider, sample interval in clocks |
| `motor_ctrl_top`, `pid_compensator` | `C0`, `C1`, `C2`, `S_SHIFT` | 384, −256, 0, 8 | PID tuning |
| `digital_filter` | `TAPS` | 3 | samples a level must persist |
| `counter_reg`, `qep_latch`, `dva_calc` | `CNT_W` | 33 | position counter |
| `qep_latch` | `PERIOD` | 8000 | clocks per interrupt |

Keep the widths in mind if you lengthen the sample interval. At 10 ms there
are up to 4000 counts per sample. That exceeds both the 10-bit `dest_v` and
the 10-bit error, so `DEST_W` and `X_W` in `mc_pkg` would have to grow to
13 bits.

## What is specified and what is chosen here

These points follow the specification:

- the block set and its order;
- the clock and sampling rates, the 1 ms interval and the counter size;
- the three-sample filter with its J-K output stage;
- the four-state table and count direction;
- the difference equations for velocity and for the PID filter;
- the 10/16/26-bit compensator widths;
- the 10-bit PWM at clock/1024;
- the top-level pin names.

These are this design's own choices:

- one clock domain with enables, instead of a divided 1 MHz clock;
- synchronous active-high reset;
- two-state jumps are ignored;
- the counter wraps and is read as two's complement;
- `clear_cnt` behaviour in each block;
- a strobe input on `dva_calc`;
- `d` takes the latched count on the strobe (no extra pipeline stage);
- error saturation and the direction-signed velocity fed to the subtractor;
- the 28-bit compensator sum, `S` as a power of two, the clamp of `y` to 0…1023
  and the default coefficients (no tuned values are specified);
- PWM capture at period start, high-first pulse;
- the extra `irq_qep` pin.

A published VHDL implementation of the same specification synthesized to 315 flip-flops and
3 multipliers. This RTL uses about 284 flip-flop bits and the same three
multipliers.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_clk_divider`: enable period and width.
- `tb_digital_filter`: random levels held 1–6 samples, compared sample by
  sample with the rule "output follows three equal samples"; spikes rejected.
- `tb_qep_decoder`: random walk with forward and backward steps, holds and
  two-state jumps; one-clock pulses.
- `tb_counter_reg`: random up/down/clear, including wrap below zero, against
  a 64-bit model.
- `tb_qep_latch`: exact 8000-clock period, latched value, `clear_cnt`.
- `tb_dva_calc`: the 0, 2, 6, 12, … reference sequence, random positions and
  clear.
- `tb_subt`: random and extreme inputs, both saturation limits.
- `tb_pid_compensator`: the default PI setting and a full PID setting, against
  an integer model, with both output clamps reached.
- `tb_pwm_timer`: high-clock count per period for duty words 0…1023, capture
  at period start, direction.
- `tb_motor_ctrl_top`: the whole core at default parameters, in closed loop
  with a behavioural DC motor and encoder (`tb/motor_model.sv`).
  - It runs the profile 50 → 100 → 200 → 400 counts/ms forward, then 100
    in reverse, then stop, clear, 150 and stop, with noise spikes on phase A.
  - Speed is checked every millisecond against the model, within 2 counts.
  - Each step of the profile must settle within 2 %.
  - At each stop the position must match the model exactly.
  - It also counts spikes, up counts, down counts, interrupts, clear and
    direction changes; a mechanism that never occurred is a failure.
  - About 350 ms of simulated time; it runs in a few seconds.
- `tb_velocity_measure`: the whole core with the encoder driven open loop at
  exactly 50, 100, 200 and 400 counts/ms, both directions. `act_v` must equal
  the speed exactly, `act_d` must advance by it every sample and `act_a`
  must be zero; across a 400 → 100 step the acceleration samples must sum
  to −300.

To simulate one testbench with Verilator 5 (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb rtl/mc_pkg.sv tb/tb_motor_ctrl_top.sv \
          --top-module tb_motor_ctrl_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The simulator's two-state
model means every register is reset; all testbenches also pass with random
initial values (`+verilator+rand+reset+2`).
