# FPGA speed controller for a small DC motor

This design holds a brushed DC motor at a speed set on eight switches. The
motor carries an incremental encoder with 1000 pulses per revolution. The FPGA
does four jobs:

- it counts encoder pulses in a fixed time window to measure the speed;
- it compares that speed with the switch setting;
- it corrects the width of a PWM signal that switches the motor's supply;
- it shows the measured speed on a three-digit seven-segment display.

Everything works on one 8-bit scale. A switch setting of N asks for the speed
that the display shows as N. The PWM width, the set-point and the measured
speed are all unsigned numbers from 0 to 255.

The logic is small: about 130 flip-flops. It runs from one 25 MHz clock
(40 ns).

```
 sw[7:0] (R) ──┬─────────────────────────────┐ open loop
               │                             ▼
               │   ┌──────────────┐  pw   ┌──────┐       ┌──────────────┐
               └──►│ p_controller ├──────►│ mux  ├──────►│ pwm_generator├──► pwm ──► driver ──► motor
                   └──────▲───────┘       └──▲───┘       └──────────────┘                        │
                          │ C, sample        │ closed_loop                                       │
                   ┌──────┴───────┐                                                             │
    si ◄───────────┤ speed_meter  │◄──────────────────── encoder square wave ◄──────────────────┘
                   └──────┬───────┘
                          │ speed
                   ┌──────▼───────┐
                   │display_driver├──► bcd[3:0], digit_en[2:0] ──► BCD-to-7-segment chip, display
                   └──────────────┘
```

## Files

| file | contents |
|------|----------|
| `rtl/mc_pkg.sv` | shared widths, the 8-bit type `byte_t`, and the controller state enum |
| `rtl/pwm_generator.sv` | clock divider, 8-bit `pw_counter`, comparator |
| `rtl/speed_meter.sv` | sampling clock `Ts-clk`, encoder edge counter, speed register |
| `rtl/p_controller.sv` | four-state proportional controller |
| `rtl/display_driver.sv` | binary-to-BCD conversion and multiplexing of the 3 digits |
| `rtl/motor_controller_top.sv` | top level; wires the four blocks together |
| `tb/*_tb.sv` | one self-checking testbench per block, the end-to-end bench, a bench at full size, and two benches that repeat the original measurements |
| `tb/motor_encoder_model.sv` | behavioural model of the driver, motor and encoder (simulation only) |

## Measuring speed: the window counter (`speed_meter`)

Speed is measured by counting encoder pulses, not by timing single pulses. A
frame counter makes a sampling clock, `Ts-clk`. In every sampling period `Ts`
it is high for a window `Tm` and low for the rest.

- The rising edge of `Ts-clk` clears the 10-bit `s_counter`.
- While `Ts-clk` is high, each rising edge of the encoder signal adds one.
- The falling edge of `Ts-clk` ends the window. The top 8 bits of the count
  are then loaded into the speed register, and a one-clock pulse,
  `ts_negedge`, tells the controller that a new measurement is ready.

The window is sized so that the count reaches about 1024 at the motor's top
speed. Dropping the two low bits gives a 0..255 reading that is steadier on
the display. The counter saturates at 1023 and does not wrap. A motor faster
than full scale therefore reads 255, not a small number. The `overflow`
output flags every pulse lost this way.

The encoder input is asynchronous. It goes through a two-flop synchroniser
and an edge detector, so the encoder's half-periods must be at least about
two clocks long. At 25 MHz that is no limit: the motor's fastest encoder
rate, about 37 kHz, has a period of 680 clocks.

Default timing, in 25 MHz clocks:

| parameter | default | meaning |
|-----------|---------|---------|
| `TM_CYCLES` | 687,500 (27.5 ms) | measurement window `Tm`. A reading `D` means an encoder frequency of `4*D / 27.5 ms`, so full scale is 37.2 kHz (about 2230 rpm). |
| `TS_CYCLES` | 1,250,000 (50 ms) | sampling period `Ts`: 20 measurements and 20 controller updates per second. |

The window was chosen so that readings agree with measurements of the real
motor under closed-loop control. For example, an encoder period of 27.38 µs
must read 251, and 49.5 µs must read 138. Across all ten measured periods the
readings agree to within 7 counts. The 50 ms sampling period is this
design's own choice. It must be longer than the window plus the few hundred
clocks that the controller needs.

## Correcting the width: the controller (`p_controller`)

This is the part that takes the most care to follow. The controller is a
four-state machine. It runs once per measurement and is idle in between:

| state | action |
|-------|--------|
| S0 | Wait for `sample` (the falling edge of `Ts-clk`). Then `C ← speed`. |
| S1 | `E ← 0`. If `R > C`: `C ← R − C`, go to S2. Otherwise: `C ← C − R`, go to S3. |
| S2 (too slow) | While `C > KP_INV`: `E ← E + 1`, `C ← C − KP_INV`, one step per clock. Then `pw ← min(pw + E, 255)` and go to S0. |
| S3 (too fast) | Same loop. Then `pw ← max(pw − E, 0)` and go to S0. |

Four points matter when you change or use this block:

- **Kp without a multiplier.** The gain is `Kp = 1/KP_INV`. The loop in S2
  and S3 divides the error by `KP_INV` by repeated subtraction, so one update
  takes `E + 3` clocks. That is at most 258 clocks, against 1.25 million
  clocks between measurements. The default is `KP_INV = 7`. With `KP_INV = 2`
  the real motor's speed oscillated after a step. With 1/7 it settled
  smoothly.
- **Dead band.** The loop test is strict (`C > KP_INV`). For an error `d ≥ 1`
  this gives `E = (d − 1) div KP_INV`. Any error of `KP_INV` or less
  therefore causes no correction. With the default, the speed settles
  anywhere within ±7 of the set-point.
- **It integrates.** The controller does not set the width to `Kp·error`. It
  adds `Kp·error` to the width it already has. So the width keeps moving until
  the error is inside the dead band, and there is no steady-state offset. In
  control terms the loop acts as an integral controller with gain `Kp` per
  sample. That is why one `Kp` serves the whole speed range even though the
  motor's speed-versus-width curve is far from linear.
- **Clamping.** The width stops at 0 and 255. When the motor cannot reach the
  set-point, the width rests at 255 and the speed settles at what the motor
  can do.

`R` is read once per update, in S1. `C` is captured only on the `sample`
clock. A `sample` pulse that arrives while an update is still running is
ignored. That cannot happen with the default sizes.

## Driving the motor: `pwm_generator`

The clock is divided by `DIV_M`. Each divided tick advances the 8-bit
`pw_counter`, which runs 1, 2, …, 255 and then starts again. The output is
high while `pw_count ≤ width`. The duty cycle is therefore exactly
`width/255`: width 0 is always off and width 255 is always on. The period is
`τ = 255 · DIV_M · 40 ns`.

The default `DIV_M = 101` gives 970.7 Hz, close to the ~969 Hz measured on the
original board. To choose a different PWM frequency, set
`DIV_M = τ / (255 · T)`.

Two details:

- The width is latched when a period starts, so a change never produces a
  shortened or doubled pulse.
- The output is registered, one clock behind the comparator.

The pin is active high: high means the motor is on. The external driver (an
inverter and a small MOSFET that switch a 12 V power MOSFET, with a
freewheeling diode across the motor) is not part of this RTL.

## Showing the speed: `display_driver`

The display needs only seven FPGA pins: one 4-bit BCD bus shared by all three
digits and one enable line per digit. The speed is converted to three BCD
digits with the shift-and-add-3 method. The digits are then shown one at a
time, for `SCAN_CYCLES` = 25,000 clocks (1 ms) each, in the order ones, tens,
hundreds. That refreshes the whole display at 333 Hz.

The value is sampled at the start of each round, so one round never mixes two
readings. `digit_en` is one-hot and active high; the board inverts these lines
before they reach the digits. An external BCD-to-seven-segment chip does the
segment decoding. Leading zeros are not blanked.

## Top level and modes (`motor_controller_top`)

`closed_loop = 1` lets the controller set the PWM width. `closed_loop = 0`
passes the switches straight to the PWM. That is the open-loop arrangement,
used to measure the motor's own speed-versus-width curve. The controller keeps
running in both modes.

The outputs `speed`, `pw` and `ts_clk` are test points. All resets are
synchronous and active low. After reset the width is 0.

Parameters of the top, all passed down to the blocks:

| parameter | default | block |
|-----------|---------|-------|
| `DIV_M` | 101 | `pwm_generator` |
| `TS_CYCLES` | 1,250,000 | `speed_meter` |
| `TM_CYCLES` | 687,500 | `speed_meter` |
| `KP_INV` | 7 | `p_controller` |
| `SCAN_CYCLES` | 25,000 | `display_driver` |

If you change the clock, scale `DIV_M`, `TS_CYCLES`, `TM_CYCLES` and
`SCAN_CYCLES` with it. If you change the motor, set `TM_CYCLES` to about 1024
times its shortest encoder period.

## What follows the original design and what does not

These come from the original design:

- the block structure;
- the divide-by-m, 8-bit-counter and comparator PWM, with its 255-step period
  and `≤` compare;
- the window counter, with its three events: clear on the rising edge of
  `Ts-clk`, count only while `Ts-clk` is high, load on the falling edge;
- the 10-bit count of which the top 8 bits are kept;
- the seven-pin multiplexed display;
- all four states of the controller, with their transfers, strict comparisons
  and clamps;
- `Kp = 1/7`.

These are this implementation's own choices:

- all the cycle counts in the tables above. The original fixes only the
  40 ns clock and gives the PWM frequency and the motor measurements they
  were derived from;
- saturating the speed counter instead of letting it wrap;
- the encoder synchroniser;
- latching the PWM width once per period;
- the scan order and rate, and the conversion method, of the display;
- reset behaviour;
- the open/closed-loop select;
- the test points.

Outside the RTL:

- the motor driver stage;
- the motor and encoder;
- the BCD-to-seven-segment chip and inverter;
- the switches and LEDs;
- an analog frequency-to-voltage converter (LM2907) that the original used
  only to watch step responses on an oscilloscope.

## Simulation

Every testbench checks its own results. Each one ends by printing
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5, for
example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/mc_pkg.sv tb/motor_controller_top_tb.sv --top-module motor_controller_top_tb
./obj_dir/Vmotor_controller_top_tb
```

| testbench | what it shows |
|-----------|---------------|
| `pwm_generator_tb` | Sweeps 40 widths and checks period length, high time and deferred width changes. Checks the 25,755-clock period at the default divider. |
| `speed_meter_tb` | Feeds encoder waves of known period and checks the readings against `min(edges, 1023)/4`, the shape of `Ts-clk`, when the register loads, and saturation. At default size, a 27.36 µs encoder period reads 251. |
| `speed_meter_table_tb` | The default window is fed the ten encoder periods measured on the real motor in closed loop, from 125.2 µs to 27.38 µs. Each reading matches its own edge count exactly. Each is also within 7 of the reading the real board showed; the largest difference is 232 against 225 at 29.63 µs. |
| `p_controller_tb` | Checks about 300 updates with Kp = 1/7 and 1/2 against a closed-form reference: new width, latency of exactly `E + 3` clocks, and both clamps. |
| `display_driver_tb` | Checks all 256 values digit by digit, plus slot timing and order. |
| `motor_controller_top_tb` | Runs the whole loop at reduced sizes with the motor model. Covers open loop, set-points 64 and 192, a heavy load that saturates the width, over-speed, and stop. It checks every measurement, PWM period and display round. It also counts each mechanism (raise, lower, both clamps, counter saturation, mode switch) and fails if any never happened. Runs in about 5 s. |
| `closed_loop_workloads_tb` | Two copies of the design, one with Kp = 1/7 and one with Kp = 1/2. Each steps from standstill to 192, 128 and 64. The bench prints the speed trace, peak and error sign changes of each run. It checks that 1/7 ends inside its dead band and that 1/2 peaks at least as high. It then sweeps set-points 8 to 255 with Kp = 1/7 and checks that each settles within the dead band. With the model, 1/2 overshoots (peak 73 for a step to 64) and 1/7 approaches without overshoot. Runs in about 12 s. |
| `motor_controller_full_tb` | The top at its default sizes: 38 sampling periods, 1.9 s of motor time, about 48 million clocks. Runs in about 25 s. |

The motor model filters the PWM with a first-order lag. It maps the filtered
duty to a speed through a curve measured on the real motor in open loop:
width 8 → 19, 16 → 34, 32 → 68, 64 → 128, 128 → 180, 192 → 219,
255 → 255, linearly interpolated. It then produces the matching encoder
square wave. It has a `gain` variable for heavier or lighter loads. It shows
that the loop closes and settles; it does not predict the real motor's
transient.

## Known limits

- **Dead band.** The closed loop settles within ±`KP_INV` of the set-point,
  not exactly on it.
- **Defaults are estimates.** The window and PWM defaults reproduce the
  original board's measurements, but they are derived values, not stated
  ones.
- **Slow response.** The controller acts only once per sampling period, and
  the width changes by at most `255/KP_INV` per update (36 with the
  default). A large step takes several hundred milliseconds to settle.
