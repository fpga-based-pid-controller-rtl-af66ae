# PID control building blocks for an FPGA

Closed-loop controllers for small motors need only a few kinds of hardware around the control
law: converters to and from the analog world, a power switch driven by pulse-width modulation, a
position sensor, a way for a person to enter a set-point and read it back, and a digital filter
that runs the controller's transfer function. This RTL provides each of those as a small,
self-contained SystemVerilog block clocked at 50 MHz. It then builds two controllers from them:

* a **DC-motor speed controller**: a proportional loop with set-point feed-forward. It reads a
  tachometer through a serial A/D converter and drives the motor through PWM.
* a **dual-rotor helicopter controller**: elevation from a potentiometer, slope angle from an
  optical encoder, one first-order digital filter per axis, and two PWM rotor drives.

All arithmetic uses integers. The part that needs the most care is the filter, which avoids
division and floating point. It scales the equation by a power of two and keeps its state at a
higher resolution than its output (see *The integer filter* below).

## Block map

| module | role | key numbers |
|---|---|---|
| `adia` | A/D interface adapter, AD7823-style 8-bit serial ADC | 1 us CONVST, 4 us wait, 8 bits at 25 MHz, 5.4 us per sample (185 kS/s) |
| `daia` | D/A interface adapter, AD7303-style dual 8-bit serial DAC | 16-bit packet, 25 MHz SCLK, 680 ns per packet (1.47 MHz) |
| `pwmd` | PWM device | 20-bit counter, 8-bit duty × 2^12, 47.7 Hz |
| `oeia` | optical encoder adapter | ±1 per channel-A rising edge, index clears |
| `pbia` | push-button adapter (UP/DOWN) | 167.77 ms scan, 41.9 ms after 5 equal samples, BCD out |
| `ssia` | seven-segment adapter | 4 digits, common anode, 1 ms per digit |
| `iir_filter` | first-order filter in scaled integers | N = 16, 21-bit N²·y state |
| `speed_controller` | speed loop: pbia, ssia, adia, pwmd, control law | K = 64, 500 Hz sampling |
| `position_controller` | helicopter loop: adia, oeia, 2 × iir_filter, 2 × pwmd | G(z) = (9.639 − 9.543 z⁻¹)/(1 − 0.865 z⁻¹) |
| `pid_fpga_top` | both controllers and the D/A adapter, side by side | |
| `pid_pkg` | shared constants, `dac_ctrl_t`, `bin_to_bcd`, `sat_u8` | |

All blocks use one clock, `clk` (50 MHz), and a synchronous, active-high `rst`. External
inputs that are really asynchronous (encoder channels, buttons) pass through two flip-flops
inside the block that reads them.

## The integer filter (`iir_filter`)

The controller transfer function is a first-order section

    y(k) = b0·u(k) + b1·u(k−1) − a1·y(k−1)

With the helicopter coefficients (b0 = 9.639, b1 = −9.543, a1 = −0.865), plain rounding to
integers is useless, because the coefficients are small numbers close to each other.
Multiplying every coefficient by N = 16 and dividing the sum by N (a shift) keeps the
coefficients. It fails for another reason: y is rounded to an integer every step, and that error
feeds back through the recursion. The step response of that crude version stalls near 3.6, while
the exact response decays towards 0.71.

The block therefore keeps **N²·y(k)** as its state and feeds back **N·y(k−1)**:

    N²y(k) = C0·u(k) + C1·u(k−1) + CA·⟨N²y(k−1) / N⟩

    C0 = ⟨N²·b0⟩ = 2468   (13-bit signed)
    C1 = ⟨N²·b1⟩ = −2443  (13-bit signed)
    CA = ⟨−N·a1⟩ = 14     (5-bit signed)

Here ⟨⟩ is rounding. Both divisions are taken straight from bits of the 21-bit N²y register,
with the next lower bit added to round:

| quantity | bits of N²y(k) | rounding bit |
|---|---|---|
| N·y(k−1), 12-bit register fed back | [15:4] | [3] |
| y(k), 8-bit output | [15:8] | [7] |

For a unit step this gives N²y = 2468, 2181, 1929, … and settles at 249, i.e. y ≈ 0.97. That is
within 0.4 of the exact response at every step (`tb_iir_filter` checks this).

**Range.** The taps read bits 15:0 only. Results are therefore correct only while
|N²y| < 2^15, i.e. |y| < 128. Because C0 ≈ −C1, a jump of the input by d moves N²y by about
2468·d, so input steps must stay below about ±13. There is no saturation: values outside the range
wrap. The position controller limits its error inputs to ±6 for this reason.

**Interface.** Pulse `en` with the new signed sample on `u`. One clock later `y`, `n2y` and a
one-clock `valid` appear. The coefficients and N are parameters (`C0`, `C1`, `CA`, `LOG2N`).

## Converter adapters

**`adia`.** A rising edge on `sample` (treated as synchronous) starts one acquisition:

| clocks after start | action |
|---|---|
| 0–49 | `convst_n` low (1 µs) |
| 50–249 | wait for the converter (4 µs) |
| 250–265 | 8 × (`sclk` high 1 clock, low 1 clock); the bit is shifted in as `sclk` falls, MSB first |
| 267 | input shift register copied to `db`; `intr` high for 2 clocks |
| 270 | the next `sample` edge can start |

The converter is expected to present each bit after a rising `sclk`. Edges on `sample` during an
acquisition are ignored.

**`daia`.** It has no start input; it transmits continuously. Every 34 clocks `sync_n` is high
for 2 clocks. When it falls, `{cb, db}` is captured and shifted out MSB first over the next 32
clocks. `sout` changes while `sclk` is low, so it is stable at each rising `sclk`. The control
byte has the layout of `pid_pkg::dac_ctrl_t`:

| bit | field | meaning |
|---|---|---|
| 15 | `ext_ref` | 0 internal, 1 external reference |
| 14 | `unused` | — |
| 13 | `ldac` | update both outputs together |
| 12 | `pdb` | power down B |
| 11 | `pda` | power down A |
| 10 | `sel_b` | 0 = converter A, 1 = B |
| 9, 8 | `cr1`, `cr0` | data-loading function |

`load` pulses when the buses are sampled. To write both channels, change `cb`/`db` after each
`load`.

## Actuator and sensor adapters

**`pwmd`.** `pwm_out = ({db, 12'b0} > counter)`, with a free-running 20-bit counter. The duty
cycle is exactly db/256, and the period is 2^20 clocks (20.97 ms).

**`oeia`.** On each rising edge of A, the count goes up if B is low (clockwise: A leads B) and
down if B is high. While `index` is high, the count is held at zero; this takes priority over
counting. The count is 8-bit two's complement and wraps. `db` follows an A edge by 3 clocks.

## User interface

**`pbia`.** `pb[1]` is UP and `pb[0]` is DOWN, both active high. The buttons are sampled once
per scan period of 2^23 clocks (167.77 ms). This is longer than contact bounce, so no bounce
filter is needed. Each scan with exactly one button pressed moves the value by one, saturating at
0 and `MAX_VAL`. If the current sample and the four before it all show the same button, the
next scan comes after 2^21 clocks (41.9 ms), so a held button speeds up. One sample without that
button restores the slow period; `fast` shows which period is in use. `bcd` is the 4-digit BCD
of the value.

**`ssia`.** `bcd[3:0]` is shown on column 0 (rightmost). One column is lit per 50 000 clocks
(1 ms). `col` is active low, one bit at a time. `row` is active low (common-anode display), with
bit 6 = a (top), 5 = b, 4 = c, 3 = d, 2 = e, 1 = f, 0 = g (middle) and 7 = decimal point, which
is always off. Nibbles above 9 are blank.

## Speed controller

    PsiRef ──┬──(+)── K ──(+)── Ybuf ── clamp 0..255 ── Y ── pwmd ── motor
             │   −↑         ↑+
             │  Psi ◄── adia ◄── tachometer (divider: rated speed → code 250)
             └──────────────┘

* `PsiRef` comes from `pbia` with `MAX_VAL` = 250, i.e. 250 steps of 10 rpm up to 2500 rpm.
  The display shows it in rpm: the three BCD digits shifted up one place, with a trailing 0.
* A 500 Hz square wave (CLK_HZ/`SAMPLE_CYC`) drives `adia.sample`.
* On the rising edge of `int`: `Ybuf = PsiRef + 64·(PsiRef − Psi)`, stored unclamped (18-bit
  signed).
* On the falling edge of `int`: `Y = clamp(Ybuf, 0, 255)`, which sets the PWM duty.

The `PsiRef` term means the loop needs no error to hold a speed whose duty equals `PsiRef`.
The motor's own gain (volts per rpm) is compensated in the analog domain: the divider maps rated
speed to code 250, so the digital loop contains no extra scaling block.
`Y` changes 3 clocks after a new A/D result.

## Helicopter position controller

* Elevation `h`: a potentiometer read through `adia`, 500 Hz.
* Slope `theta`: `oeia` count.
* On each A/D result both errors are formed and clamped to ±`ERR_LIM` (6):
  `h_ref − h` and `theta_ref − theta`. Each goes through its own `iir_filter` with the G(z)
  coefficients.
* Mixing: `v1 = clamp(Gh + Gθ)` and `v2 = clamp(Gh − Gθ)`, both to 0..255. Elevation acts on
  both rotors alike; slope acts on them in opposite directions (rotor 1 raises θ).
* `v1` and `v2` drive two `pwmd`.

This controller is less certain than the speed controller (see below).

## How far to trust it, and where it departs from the published design

Built as published: the adapter timings (1 µs / 4 µs / 5.4 µs, 25 MHz and 680 ns on the D/A
side), the D/A packet format, the PWM counter and compare, the encoder counting and index rule,
the 167.77 ms scan and 5-sample history, the display geometry and 1 kHz multiplexing, the filter
structure with its widths and rounding taps, and the speed loop with K = 64, feed-forward and
clamp.

This design's own choices:

* the ADC serial clock (25 MHz) and the bit sampling edge;
* `int` 2 clocks wide;
* continuous D/A transmission and the `load` output;
* encoder synchronisers, 8-bit count width and wrap-around;
* the fast scan period (41.9 ms) and the "five equal samples" rule;
* saturation of the button value;
* active-low rows and columns and blanking of non-decimal nibbles;
* the 500 Hz sampling rate;
* the rpm display format;
* signed filter data and the single-cycle filter step with `en`/`valid`;
* the 2-process int-edge sequencing, done as edge detectors in the 50 MHz domain.

The **position controller** is a reconstruction from a prose description. The published loop
diagram, gains, hover offset and reference sources are not available. Treat the following as
placeholders:

* one G(z) for both axes;
* mixing by sum and difference;
* the ±6 error clamp;
* `h_ref`/`theta_ref` as plain inputs.

The filter arithmetic itself is exact to the published structure.

The **D/A adapter** is not used by either controller. `pid_fpga_top` brings its ports out
separately.

Not RTL: the converter chips, the MOSFET/motor/tachometer circuit, the encoder and the
buttons/display hardware. `tb/ad7823_model.sv` is a behavioural ADC model for simulation only.

## Verification

Each block has a self-checking testbench `tb/tb_<block>.sv` that ends with a
`TB_RESULT checks=N failures=M` line:

* `tb_adia`: random codes through the ADC model, the 50/267/270-clock timing, ignored
  re-triggers, back-to-back sampling at 185 kS/s.
* `tb_daia`: decodes every packet while the buses change at random; checks the 34-clock frame
  and the 25 MHz clock.
* `tb_pwmd`: a duty sweep on a 12-bit instance, plus two full 2^20-clock periods at the default
  size.
* `tb_oeia`: random quadrature motion against a reference count; index alone and overlapping
  an A edge.
* `tb_pbia`: a cycle-by-cycle reference model with bounce at every press, both limits, the fast
  scan and BCD.
* `tb_ssia`: one-cold columns, column order, dwell time and segment patterns taken from a
  letter table.
* `tb_iir_filter`: a unit step against an integer model and against the exact floating-point
  response; 2000 random samples.
* `tb_speed_controller`: the closed loop with a first-order motor model. It checks the control
  law every sample, both clamp limits, settling on the set-point, PWM duty and the display.
* `tb_position_controller`: both filters and the mixer against an independent model; the error
  clamp, output clamp, index reset and PWM.
* `tb_pid_fpga_top`: all three parts at once with shortened timers. It counts every mechanism
  and fails if one never happens.
* `tb_pid_fpga_top_full`: the top at its real-time defaults. The UP button steps the set-point
  to 7, crossing into the fast scan; it then checks the 100 000-clock sample period, the
  50 000-clock display dwell and one full 2^20-clock PWM period. This takes about 50 M clocks,
  roughly a minute of simulation.

The module-level testbenches shorten the slow timers through parameters, such as the scan
periods, the display dwell and the PWM width.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
        rtl/pid_pkg.sv tb/tb_iir_filter.sv --top-module tb_iir_filter
    ./obj_dir/Vtb_iir_filter

Replace `tb_iir_filter` with any testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/pid_pkg.sv rtl/<module>.sv --top-module <module>`.
The slow timers are all parameters of `pid_fpga_top` (`SAMPLE_CYC`, `PB_SLOW`, `PB_FAST`,
`DIGIT_CYC`, `PWM_CNT_W`). If the clock is not 50 MHz, change `pid_pkg::CLK_HZ` and the cycle
counts in `adia` (`CONVST_CYC`, `WAIT_CYC`) and `daia` (`FRAME_CYC`).
