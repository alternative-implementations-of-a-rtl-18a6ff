# Fractional-order PI speed controller for a DC motor

This RTL is a digital speed controller for a DC motor. It uses a
fractional-order PI (FO-PI) law instead of a classical PI:

    C(s) = Kp * (1 + Ki / s^mu),   Kp = 0.09,  Ki = 7.85,  mu = 0.7371

A non-integer integration order gives one more tuning knob than a PI
controller. Here it was used to make the phase flat around the 15 rad/s
crossover, so the overshoot stays close to its nominal value when the loop
gain changes. The motor model that the controller was tuned for is
`H(s) = 27.5 / (0.26 s + 1)`.

An operator `s^mu` cannot be built directly. It is replaced by a 9th-order
recursive Tustin approximation at a sampling period of T = 15 ms. That
turns the controller into an ordinary 10th-order IIR filter, which is
evaluated once per sample:

    c(k) = a0*e(k) + a1*e(k-1) + ... + a10*e(k-10)
                   - b1*c(k-1) - ... - b10*c(k-10)

Here `e` is the speed error (reference minus measured, in rpm) and `c` is
the command, read as the PWM duty ratio in percent. Each sample takes
21 multiplications. The hardware questions are how many multipliers to
spend on them and which number format to use. The RTL lets you choose both
with parameters.

## The coefficients

| i | a_i | b_i |
|---|-----|-----|
| 0 | 0.10111236572265625 | (1) |
| 1 | -0.0458221435546875 | -0.722198486328125 |
| 2 | -0.02462005615234375 | 0.243499755859375 |
| 3 | 0.00385284423828125 | -0.0606842041015625 |
| 4 | -0.0074920654296875 | 0.074066162109375 |
| 5 | 0.00231170654296875 | -0.03646087646484375 |
| 6 | -0.00439453125 | 0.04343414306640625 |
| 7 | 0.00170135498046875 | -0.026763916015625 |
| 8 | -0.0032501220703125 | 0.032135009765625 |
| 9 | 0.00141143798828125 | -0.0222930908203125 |
| 10 | -0.00312042236328125 | 0.0308685302734375 |

Every value is an exact multiple of 2^-17. `fopi_pkg` therefore stores
each value as an integer n, where the coefficient is n * 2^-17. Every word
the hardware uses is computed from n when the design is elaborated.

The sign of b1 is an interpretation. The denominator signs alternate, and
a recursive Tustin expansion starts with `1 - mu*z^-1`. So b1 is taken as
negative, about -mu.

## Number representations (`FMT`)

Two formats are built. The reference configuration is fixed point.

* **Fixed point, `FMT_FXP`.** The default is a 32-bit word with 15 integer
  bits and 17 fractional bits, called "FXP 15.32". At 17 fractional bits
  every coefficient is exact. Each product keeps its full 64 bits, and the
  21 products are summed in a 69-bit accumulator. The sum is then shifted
  right by 17 bits (truncating toward minus infinity) and saturated to 32
  bits. The error enters as `err << 17`. For speeds this limits it to
  ±16383 rpm.
* **Scaled integer, `FMT_INT`.** Every coefficient is multiplied by a
  decimal scale `SCALE` (10^2 to 10^7) and rounded to an integer. Errors
  and commands are plain integers. After the sum, a sequential divider
  divides by `SCALE`, truncating toward zero, and the result becomes the
  command. The command history also holds these divided integers.
  Commands are therefore quantised to whole percent, and small scales lose
  small coefficients entirely. At SCALE = 100, a3, a5, a7 and a9 round to
  zero.
  This quantisation is why small scales track the reference worse. The
  word width `W` can be 16 or 32.

A double-precision version of the controller is not built as hardware.
The closed-loop testbench runs it in simulation as the reference.

Other fixed-point splits are a parameter change. For example, `FRAC = 16`
gives a word with 16 integer bits ("FXP 16.32"). The coefficients are then
rounded to 2^-16.

## Sum engines (`ARCH`)

* **`ARCH_SEQ`, `fopi_mac_seq` (default).** One W x W multiplier is shared
  by all 21 products. It works as a two-stage pipeline: select the operand
  and coefficient, multiply and register, then add or subtract into the
  accumulator. One product is issued per clock. The coefficients come from
  `fopi_coef_rom` through an address counter. This engine fits small FPGAs,
  because the multiplier count does not grow with the filter order.
* **`ARCH_PAR`, `fopi_parallel`.** One constant-coefficient multiplier per
  term and a single-cycle adder tree. It is fast, but 21 products of
  32 x 32 bits need about 84 18x18 hard multipliers.

Both engines produce the same bits. The closed-loop test runs them side by
side and compares them.

## Sample timing

`sample_timer` divides the clock by `SAMPLE_DIV`. The default is
600000 = 15 ms at 40 MHz. On each strobe the top does four things:

1. It forms `e = ref_rpm - speed_rpm`, saturated to `EW` = 16 bits.
2. `fopi_core` shifts e(k) into its error delay line (`fopi_history`).
3. The core starts the sum engine and, for integer formats, the divider.
4. It saturates the result to W bits, presents it on `cmd` with a
   one-cycle `cmd_valid`, and pushes it into the command delay line.

The top then clamps the command to 0..100 %, truncates it to a whole
percent (`duty_pct`) and passes it to `pwm_gen`.

Latency is counted from the strobe to `cmd_valid`:

| format / engine | cycles | at 40 MHz |
|---|---|---|
| FXP, ARCH_SEQ | 26 | 0.65 µs |
| FXP, ARCH_PAR | 4 | 0.10 µs |
| Int32, ARCH_SEQ | 97 (26 + 71 for the divider) | 2.4 µs |
| Int16, ARCH_PAR | 43 | 1.1 µs |

Even the slowest case is far below the 15 ms period. An assertion in the
top checks that a strobe never arrives while the core is busy.

`pwm_gen` has a period of 100 x `PWM_STEP` clocks. The default is 2000
clocks, which gives 20 kHz at 40 MHz. The output is high for
duty x `PWM_STEP` clocks at the start of each period. The duty value is
sampled at the start of a period, so a new value never cuts a pulse short.

## Compared with the published FPGA implementations

The control law was first implemented on FPGAs with a graphical high-level
tool. Those implementations ran at 40 MHz on a Virtex-II and at 50 MHz on
a Spartan-3E. Their reported figures:

* **Fully parallel.** It used 87 18x18 multipliers and took 50 to 275 ns
  per sample. The Spartan-3E has only 20 multipliers, so this form did not
  fit there.
* **Shared-multiplier form (FXP 15.32).** It used 15 multipliers and took
  1675 ns per sample (67 cycles) at 40 MHz.
* **Shared-multiplier form (Int32, scale 10^4).** It used 10 multipliers
  and took 2575 ns per sample (103 cycles) at 40 MHz.

This RTL keeps the same two structures and number formats, but the
schedule is its own:

* `ARCH_SEQ` takes 26 cycles for FXP and 97 cycles for Int32. It needs a
  single 32 x 32 multiplier, which is about 4 hard 18x18 blocks.
* `ARCH_PAR` takes 4 cycles.

As in the published versions, the integer format costs extra logic and
time for the division by the scale.

## Modules

| file | role |
|---|---|
| `rtl/fopi_pkg.sv` | Coefficient table, the `fmt_e` and `arch_e` types, and the coefficient-word functions |
| `rtl/fopi_coef_rom.sv` | Constant ROM of the 21 coefficient words in the chosen format |
| `rtl/fopi_history.sv` | Delay lines for e(k)..e(k-10) and c(k-1)..c(k-10), cleared by reset |
| `rtl/fopi_mac_seq.sv` | Single-multiplier pipelined sum engine |
| `rtl/fopi_parallel.sv` | Fully parallel sum engine |
| `rtl/int_divider.sv` | Restoring signed divider, one bit per clock, DW+2 cycles |
| `rtl/fopi_core.sv` | Control law: sequencing, format conversion, rescaling, saturation |
| `rtl/sample_timer.sv` | Sampling strobe |
| `rtl/pwm_gen.sv` | PWM output stage |
| `rtl/fopi_speed_ctrl_top.sv` | Error, core, duty clamp and PWM |

The top has these ports:

* `clk`, and `rst_n` (asynchronous, active low)
* `ref_rpm` and `speed_rpm`: signed 16-bit inputs
* `sample_tick`
* `cmd` and `cmd_valid`: the raw command word in the chosen format
* `duty_pct` (0..100) and `pwm`

The speed sensor and the motor's power stage are outside the design. The
sensor delivers `speed_rpm`, and the power stage takes `pwm`.

## Closed-loop behaviour and how far to trust it

`tb/tb_fopi_speed_ctrl_top.sv` closes the loop around the motor model
above, discretised exactly at 15 ms. It checks every command bit-exactly
against an independent integer model of the equation. It runs eight
formats side by side: Int16 with scale 10^2, Int32 with scales 10^2 to
10^7, and FXP with both engines. A double-precision copy of the whole loop
runs next to them. The testbench requires the fixed-point loop to follow
the double loop to within 1 % of 1400 rpm. At the end of the step the two
agree to 0.1 rpm.

With the coefficients above, the discrete controller is not a true
integrator. Its DC gain, sum(a) / (1 + sum(b)), is about 0.039 % per rpm.
With a plant gain of 27.5 rpm per % of duty, the loop gain at DC is close
to 1. So in this model every representation, including double precision,
settles about 49 % below a 1400 rpm reference:

| format | speed after the 500→1400 rpm step | 2 % settling |
|---|---|---|
| Int16(10^2), Int32(10^2), Int32(10^3) | 687.5 rpm | 0.42 s |
| Int32(10^4) | 713.0 rpm | 0.45 s |
| Int32(10^5..10^7) | 712 rpm | 0.53 s |
| FXP 15.32, double | 712.8 rpm | 0.47 s |

The ranking matches expectations: the smallest scales are the worst, and
FXP equals double. The absolute tracking does not match a well-tuned PI
loop. That is a property of the coefficient set combined with this plant
model, not of the arithmetic. If you use this controller on real hardware,
check the coefficients and the scaling of the command (here, percent duty)
first.

What is this design's own choice, not taken from the control law:

* the cycle schedule
* rounding: truncation in both formats, and round-half-away-from-zero for
  integer coefficients
* saturation at every width
* zero history after reset
* the percent-duty interpretation and its clamp
* the PWM frequency and resolution
* one multiplier in the shared engine

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module tb_fopi_speed_ctrl_top \
        -y rtl -y tb -Irtl -Itb +libext+.sv rtl/fopi_pkg.sv tb/tb_fopi_speed_ctrl_top.sv
    ./obj_dir/Vtb_fopi_speed_ctrl_top

Replace the testbench name to run another one. The available testbenches:

* One per module: `tb_fopi_coef_rom`, `tb_fopi_history`, `tb_fopi_mac_seq`,
  `tb_fopi_parallel`, `tb_int_divider`, `tb_fopi_core`, `tb_sample_timer`
  and `tb_pwm_gen`.
* `tb_fopi_speed_ctrl_top`, the closed loop. It uses a 300-clock sampling
  period and a 100-clock PWM period, so it finishes in well under a second.
* `tb_fopi_speed_ctrl_top_full`. It runs the top at its defaults (40 MHz,
  15 ms, 20 kHz PWM) for 30 samples, which is 18 million clocks and takes
  a few seconds.

`tb/tb_fopi_ref.svh` is the shared reference model. It starts from the
coefficients as real numbers and computes in 64-bit integers.

To change the configuration, set the top's parameters:

* `FMT`, `ARCH` and `W`
* `FRAC` (for fixed point) or `SCALE` (for integers)
* `SAMPLE_DIV` for another clock or sampling period
* `PWM_STEP` for another PWM frequency

The coefficients live in one function, `fopi_pkg::coef_q17`. Any other
controller of the same order can be loaded by replacing that function's
values.
