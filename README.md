# Sensorless six-step commutation IC for BLDC motors

A brushless dc motor driven in six steps has, at any moment, one phase that carries
no current. The back-EMF on that floating phase crosses zero 30 electrical degrees
before the next commutation is due. This design turns that fact into commutation
timing without Hall sensors. It works from the three sensed terminal voltages:

1. a switched-capacitor residue amplifier computes the floating phase's back-EMF as
   `vx - (va + vb + vc)/3`;
2. a hysteresis comparator turns that voltage into a zero-crossing signal `z`;
3. two 16-bit up/down counters, sampled at 200 kHz, delay `z` by 30 degrees at any
   speed, with no divider and no speed measurement;
4. a six-step table turns each delayed edge into the next gate pattern.

Around that path sit a programmable phase advance, a mask for the diode-conduction
interval after each commutation, an open-loop start-up sequencer and a speed
estimator. A microcontroller configures the chip and reads the speed over a
four-wire serial port. It also supplies the PWM (current control) and Brake inputs.

The digital part (`sc_digital` and everything below it) is synthesizable
SystemVerilog. The analog front end is written as behavioural models with
real-valued signals. The top level, `sensorless_ic`, joins the two and is therefore
a simulation model.

```
 va,vb,vc ──► bemf_mux ──vx──► residue_amp ──vout──┬─► zc_detector ──zcs──┐
   (S1,S0 from delay_circuit)      ▲               └─► algo_adc ──12b──┐  │
                          clk_gen ─┘ (clk1, clk2)                      │  │
 ┌──────────────────────── sc_digital ───────────────────────────────┐ │  │
 │ serial_if ─ Dth, gamma_i, dtheta ─► phase_comp ─ gamma_d ─┐       │ │  │
 │                                                           ▼       │ │  │
 │ startup ─ mode, open-loop steps ─► commutation_ctrl ◄─ phase_shifter ◄─┘
 │                                         │   ▲                     │ │
 │                               gates, FG │   └── comm              │ │
 │        delay_circuit ◄── step changes ──┘       speed_est ◄───────┼─┘
 │        (mask, S1/S0)                            (speed → serial)  │
 └───────────────────────────────────────────────────────────────────┘
```

## The counter phase shifter

The traditional way to get the 30 degree delay is an analog filter. A filter's
phase lag changes with frequency, so the delay is only correct at one speed. The
digital alternative measures how long `z` stayed in one state, then waits for a
fixed fraction of that time. Done directly, that needs a wide divider. This design
avoids the divider by letting a counter run down at a different rate from the one
it ran up at.

`phase_shifter` keeps two counters, `cp` and `cn`, updated on every 200 kHz sample:

| `z` | `cp`          | `cn`          |
|-----|---------------|---------------|
| 1   | `+= gamma_i`  | `-= gamma_d`  |
| 0   | `-= gamma_d`  | `+= gamma_i`  |

Both counters are clamped to `0..L`, with `L` = 65535. During a high phase of `z`,
`cp` climbs to `N*gamma_i`, where `N` is the length of the phase in samples. After
`z` falls, `cp` runs down and reaches zero after `N*gamma_i/gamma_d` samples. With
`gamma_d = 2*gamma_i` that is half of the previous phase of `z`. The signal `z`
changes state every 60 degrees, so the delay is 30 degrees. `cn` does the same for
the opposite edge.

A commutation pulse fires when a counter that was above zero reaches zero or would
go below it; the counter is then held at zero. A counter already at zero only
stays there, so only one counter fires per edge. One spurious toggle of `z` gives
one wrong commutation at most. The next complete phase of `z` sets up the correct
count again.

Sizes: with the default `gamma_i = 20`, one 60 degree interval costs `20*N`
counts. The 16-bit counters saturate below about 102 rpm for a 12-pole motor, where
`N` exceeds 3277 samples. At the top end, one sample per 60 degrees (about
333 krpm) still gives one commutation per sample. For slower motors, write a smaller
`gamma_i`.

### Phase advance (`phase_comp`)

A decrement other than `2*gamma_i` moves the commutation away from 30 degrees. For
an advance of `dtheta` tenths of a degree:

    gamma_d = round(600 * gamma_i / (300 - dtheta))

`phase_comp` recomputes this whenever `gamma_i` or `dtheta` is written. It uses a
constant multiply and a 24-bit sequential divider, so it needs about 25 clocks; until
then the old `gamma_d` stays in use. `dtheta` is clamped to -300..299, because +300
would divide by zero. Around 0 degrees one step of `gamma_d` moves the commutation by
about 0.73 degree. The advance can also give field weakening at high speed.

The terminal voltages normally pass an RC filter on the board before they reach the
chip. That filter delays the zero crossings by an angle that grows with speed, so
`phase_comp` adds a lag term to `dtheta`:

    theta_LP = |speed| * LP_K / 2^12        (0.1 degree, at most 60 degrees)

Here `speed` is the estimated mechanical speed in rad/s. For a first-order filter of
time constant `tau`, `LP_K = 2^12 * (1800/pi) * (P/2) * tau`. This is the filter's
small-angle lag, `omega_e * tau`. The summed angle is what is clamped, and `gamma_d`
is recomputed every time the sum changes. `LP_K` is a parameter of the top, with
default 0 (no filter).

## Masking the diode-conduction interval (`delay_circuit`)

Right after a commutation, the phase that was just switched off keeps conducting
through a free-wheeling diode until its current decays. Its terminal is clamped to
a rail during that time, so the back-EMF estimate is wrong. `delay_circuit` starts
at every change of step. It holds `mask` high for `Dth` microseconds, counting a
1 MHz tick, and then switches the multiplexer select (S1,S0) to the new floating
phase.

While `mask` is high, the phase shifter sees the value `z` had before the mask
started, and the speed estimator drops its samples. `Dth` <= 0 switches the select
at once without masking. `Dth` must be shorter than a 60 degree interval at the
highest speed: 208 us at 8000 rpm for 12 poles.

## Six-step table, PWM and Brake (`commutation_ctrl`)

The six steps, for forward rotation:

| step | upper on | lower on | floating | h_a h_b h_c |
|------|----------|----------|----------|-------------|
| 0    | A        | B        | C        | 1 0 1       |
| 1    | A        | C        | B        | 1 0 0       |
| 2    | B        | C        | A        | 1 1 0       |
| 3    | B        | A        | C        | 0 1 0       |
| 4    | C        | A        | B        | 0 1 1       |
| 5    | C        | B        | A        | 0 0 1       |

The step advances on an open-loop step pulse while starting, and on a phase-shifter
pulse in sensorless mode. Align and idle hold step 0. The PWM input is ANDed into
the three upper switches. Brake turns on all three lower switches and holds the
start-up sequencer idle. FG toggles at every commutation, so its frequency is three
times the electrical frequency. An assertion checks that no leg ever has both
switches on.

## Start-up (`startup`)

At standstill there is no back-EMF. Releasing Brake starts a fixed sequence:

- **Align.** Step 0 is applied for `ALIGN_SAMPLES` = 10000 samples (50 ms at
  200 kHz), so the rotor settles at a known angle.
- **Open-loop stepping.** The external current loop holds a constant current. That
  gives a roughly constant acceleration, so the commutation times follow
  `theta = a*t^2/2`. Two accumulators advance at 200 kHz: the velocity `v += ACCEL`
  and the angle `theta += v`. A step is issued each time `theta` passes a multiple
  of `STEP_ANGLE` = 2^28, which stands for 60 degrees.
- **Hand-over.** When `v` reaches `VEL_MIN`, the chip switches to sensorless mode.
  The default, 241592, is 300 rpm for a 12-pole motor. It is reached after about
  0.1 s and nine steps.

`ACCEL` must suit the motor and the start-up current. Reversing the direction is not
built: no pin or register selects the direction.

## Speed estimation (`speed_est`)

The speed register is signed 12-bit, in rad/s. It has two sources.

**Interval estimate.** The time `Tc` between commutations (60 degrees) is counted in
200 kHz samples. At each commutation a sequential divider computes
`w~ = 2*pi*200000/(3*P*Tc)`. This updates only six times per electrical turn.

**Slope estimate.** A 12-bit A/D converter samples the back-EMF at 20 kHz. Over one
60 degree interval, the floating phase's back-EMF ramps from `-K_E*w` to `+K_E*w`.
The per-sample slope `de` times `Tc` therefore predicts that swing at every sample:

    w^(k) = |de(k)| * Tc / K_E  -  w~(last commutation)

This yields a new value every 50 us. A slope is only taken from two samples whose
conversions started at least 10 us (`SETTLE` = 2 phase-shifter samples) after the
mask ended, once the multiplexer and the amplifier have settled on the new phase.
Otherwise the slope register keeps its last value. The slope magnitude is limited
to 2047. The factor `1/K_E` is `SCALE_NUM/2^SCALE_SHIFT` = 0.5, which assumes 2 A/D
counts per rad/s. Set it from the motor's back-EMF constant and the sensing gain.
`Tc` is counted in 200 kHz samples and scaled by 20000/200000, because a count in
speed samples would be too coarse at high speed.

The interval estimate is used when a commutation interval is no longer than one
20 kHz sample; otherwise the slope estimate is used. The chosen value passes a
500 Hz second-order Butterworth low-pass (`iir2`, direct form I, Q16 coefficients
at 20 kHz). It is then signed with the direction, taken from whether the step
counts up or down.

Departure: the published recursion subtracts the slope estimate's own value at the
last commutation, not `w~`. Built that way, the loop has a pole at -1 and oscillates
at half the commutation rate, so this design subtracts the interval estimate of the
same instant.

Accuracy in simulation: 104 rad/s read at 1000 rpm (true 104.7), and 813 rad/s at
8000 rpm (true 837.8). The loss at high speed comes from the few clean samples left in
each 208 us interval after a 30 us mask.

## Serial port and registers (`serial_if`)

A frame starts on the falling edge of EN and lasts 14 SCLK cycles: 2 address bits,
then 12 data bits, MSB first. DATA is sampled on the rising edge of SCLK. R/W = 1
reads: after the address bits, the chip drives DATA (`data_oe`) and shifts the
register out on the falling edges. A write takes effect after the 14th bit. A frame
that ends early (EN rising first) is discarded. Pins are synchronised to the system
clock, so SCLK must stay below clk/8.

| addr | register | access | reset | range, unit |
|------|----------|--------|-------|-------------|
| 00   | `Dth`     | RW | 10 | -2048..2047 us (mask time) |
| 01   | `gamma_i` | RW | 20 | 0..4095 (counter increment) |
| 10   | `dtheta`  | RW | 0  | -300..300, 0.1 degree (advance) |
| 11   | speed     | R  | —  | -2048..2047 rad/s |

Writes to address 11 are ignored. The published register table gives 10 as the
reset value of `gamma_i`, while the default configuration is described with an
increment of 20. This design resets it to 20, the value the speed range above is
worked out for.

## Analog front end (behavioural models)

- `bemf_mux`: selects `va`, `vb` or `vc` for S1,S0 = 00, 01, 10.
- `clk_gen`: makes non-overlapping `clk1`/`clk2` and phase-advanced
  `clk1a`/`clk2a` from a 200 kHz square wave produced by the digital part. The
  non-overlap gap is `TD1` and the advance is `TD2`, both 5 ns.
- `residue_amp`: in the reset phase (`clk1`), it stores `vx - voff` on the feedback
  capacitor. In the output phase (`clk2`), it gives
  `vcm + voff + (vx - voff) - (C1a*va + C1b*vb + C1c*vc)/C2`, so the op-amp offset
  cancels. With `C1x/C2 = 1/3` this is `vcm + vx - (va+vb+vc)/3`. The output is
  held between phases. `vcm` is VDD/2, which is also the comparator threshold.
- `zc_detector`: comparator with a 10 mV hysteresis band around the threshold,
  feeding an SR latch (an intended latch, written with `always_latch`).
- `algo_adc`: 12-bit algorithmic converter. It takes one bit per clock, starting
  from the MSB: compare the held residue with VREF/2, then form `2*v - bit*VREF`. A
  result is valid 13 clocks after `start`. Conversions start at 20 kHz.

There is no model of the bias generator. The op-amp's settling and the
charge-transfer dynamics are not modelled.

## Clocks and time bases

All rates derive from `CLK_HZ` (10 MHz assumed; the original chip's oscillator
frequency is not specified). `tick_gen` dividers make a 1 MHz tick (delay circuit),
a 200 kHz tick (phase shifter, start-up) and a 20 kHz tick (A/D start and speed
estimate). The `CLK_HZ` divisions must be exact: 10, 12 or 20 MHz all work. The
zero-crossing input is asynchronous and passes a two-flip-flop synchroniser.

## What to trust, and what is this design's own choice

These follow the published design:

- the block split;
- the 16-bit counters and their reset-to-zero and stop rules;
- the 200 kHz and 20 kHz rates, and the default increment 20;
- the `gamma_d` formula;
- the register map, the 14-clock frame, and the reset values of `Dth` and `dtheta`;
- the residue-amplifier equations, the 50 % comparator threshold;
- the 12-bit converter, and the 500 Hz second-order speed filter.

These are this design's own choices, and worth checking against a real motor:

- the system clock;
- the counter limit `L`;
- the bit order, sampling edge and read timing of the serial port;
- the step table beyond its first transition, and the meaning of the PWM, Brake and
  FG pins;
- the start-up constants;
- the linear model of the filter lag;
- the speed scale factor and the limiter;
- the settling time after the mask;
- the hysteresis width;
- the A/D reference;
- the capacitor ratios and offset of the amplifier model.

Not built:

- direction reversal through the stepping mode;
- the bias circuit.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/bldc_pkg.sv \
    tb/tb_sensorless_ic.sv --top-module tb_sensorless_ic
./obj_dir/Vtb_sensorless_ic
```

Substitute any other testbench module for `tb_sensorless_ic`. `-y rtl` lets Verilator
find each module in the file of the same name. The package file must be listed
explicitly, before the testbench.

- `tb_sensorless_ic`: the whole chip at its default parameters. It drives a
  12-pole motor model with trapezoidal back-EMF, a sensing divider and 40 us of
  diode clamping after every commutation. The test reads the reset values,
  programs `Dth` = 100 us and releases Brake. It then checks the 50 ms align, the
  open-loop ramp (about nine steps in 0.1 s) and the hand-over. It accelerates to
  1000 rpm and checks every commutation angle from 10 ms after hand-over: mean
  error about 1 degree, limit 5 degrees. It also checks:
  - the speed read back over the serial port;
  - that a 10 degree advance moves the commutations by 10 degrees;
  - that every diode clamp is masked;
  - PWM chopping and Brake.

  It simulates about 270 ms and takes seconds.
- `tb_high_speed`: the same model with `Dth` = 30 us. It ramps from 300 to
  8000 rpm in 0.5 s and holds the rated 8000 rpm. Every commutation must stay
  within 5 degrees (worst seen 4.9), and the speed read must be within 5 %.
- One testbench per block: `tb_serial_if`, `tb_phase_comp`, `tb_phase_shifter`,
  `tb_delay_circuit`, `tb_commutation_ctrl`, `tb_startup`, `tb_speed_est`,
  `tb_bemf_mux`, `tb_residue_amp`, `tb_zc_detector`, `tb_algo_adc`,
  `tb_clk_gen`. Some shorten time constants through parameters, for example a
  short align and fast ticks.

## Changing it

- Motor pole count: `POLES` in `sc_digital`, which sets the speed constant. Also
  recompute `VEL_MIN` = hand-over speed in electrical deg/s
  × 2^28 / (60 × 200000).
- A different system clock: `CLK_HZ` on the top.
- Start-up profile: `ALIGN_SAMPLES`, `ACCEL` and `VEL_MIN`.
- Speed scale: `SCALE_NUM`/`SCALE_SHIFT` in `speed_est`.
- Terminal-filter lag: `LP_K` on the top (formula under Phase advance).
- Low-speed limit: lower `gamma_i` at run time over the serial port.
