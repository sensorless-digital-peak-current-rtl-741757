# Sensorless digital peak-current-mode control with a bi-directional delay line

A peak-current-mode DC-DC converter normally has to measure the inductor
current: a sense amplifier, a DAC for the current command and a fast analog
comparator. This controller measures nothing. It rebuilds the inductor
current inside a digital delay line. A single pulse moves along the line. It
moves up while the high-side switch is on and down while it is off, and its
speed in each direction tracks the matching inductor-current slope. The buck
slopes are

    m1 = (V_g - v_out) / L   (switch on)      m2 = -v_out / L   (switch off)

So the pulse position follows the inductor current. The on-time ends when the
pulse reaches the cell that the digital current command `i_c[n]` selects. The
"comparator" is a multiplexer, and the "DAC" is the cell address.

The RTL is in SystemVerilog. The default configuration is the integrated one:
- 2 MHz switching
- V_g from 2.7 to 4.2 V, V_out = 1.5 V, L = 2 uH
- a 9-bit observer: 32 delay elements plus a 4-bit counter
- one cell delay of 1.6 ns at V_g - v_out = 2.7 V

## Signal flow

```
 clk_fs --set--> pwm_latch --Q--> dead_time --> c1, c2 (power switches)
                   ^    |
             reset |    +--dir--> hybrid_observer <-- i_bias -- delay_control <-- vg_mv, vout_mv, k_code
                   |                 |  ^
                   +-----------------+  | ic[n]
 e[n] (ADC) --> digital_compensator ----+
 e[n], iobs --> calib_ctrl --> mode, inject, k_code, ic_limit
```

| module | role |
|---|---|
| `scm_controller` | the top; wires everything and retimes the injection |
| `hybrid_observer` | the wrapped line of 32 `bidir_delay_element`s, the `obs_counter`, the multiplexer/comparator, saturation and start circuitry |
| `bidir_delay_element` | two direction multiplexers, an S-R latch and a `delay_cell` |
| `delay_cell` | current-starved delay: delay = switched charge / bias current (behavioural) |
| `delay_control` | V/I conversion of the two slopes into the cell bias, with a programmable K:1 mirror (analog block, modelled in integer arithmetic) |
| `pwm_latch` | S-R latch: set by the clock, reset by the observer |
| `dead_time` | non-overlapping drives c1/c2 |
| `digital_compensator` | PI voltage loop, e[n] to i_c[n] |
| `calib_ctrl` | soft start, voltage mode, slope calibration, current mode |
| `scm_pkg` | widths and the mode enum |

## The delay line and how the pulse moves

Each element has a latch `q` and a delayed copy `y`. With `dir = 1` the latch
is set by its left neighbour's `y` and cleared by its right neighbour's `y`.
With `dir = 0` the two roles swap. A set latch therefore sets the next one
downstream one cell delay later. It clears itself once that next element has
fired. The pulse is a band of about two high outputs that walks one cell per
delay.

`Q` of the PWM latch is `dir`. The bias current, and so the delay, changes
with `Q`:

    I1 = (V_g - v_out) / R          while Q = 1
    I0 = v_out / (K * R)            while Q = 0,   K = k_code / 128

With a delay of `Q_SW / I`, one cell stands for the same current step in both
directions: `LSB = Q_SW * R / L`. The defaults are Q_SW = 43.2 fC,
R = 100 kOhm and L = 2 uH. That gives 2.16 mA per cell and 1.1 A full scale.

**Reversals.** When `dir` flips, the element behind the band becomes the set
side. The band moves on about two cells in the new direction. This is not a
modelling artefact: it is what the latch wiring does. In current mode it
happens at every peak and every valley. The calibration target accounts for
it (see below).

## The hybrid counter

32 elements give only 5 bits. The line is wrapped, so the last element feeds
the first when going up, and the first feeds the last when going down. A
4-bit counter holds the upper bits. `iobs = {count, front}`, where `front` is
the leading cell of the band.

The counter steps when the band crosses the wrap. It does not simply count
edges of the last cell. An edge rule miscounts when the pulse turns back
exactly at the wrap, and in current mode that happens often. The rule used:

- The band is "straddling" while the first and the last outputs are both high.
- On entering the straddle, the counter notes which side the band came from.
- On leaving, it steps only if the band leaves on the other side: up if it
  entered from the last cell, down if it entered from the first.
- While straddling, the `count` output already shows the new segment. This
  keeps `iobs` continuous.

**Saturation.** When the counter is at 15 and the band would wrap upwards,
the wrap link is opened in its set direction only. The clearing direction
still works. The band then stops at the top (511). The same holds at 0.
`sat_hi` and `sat_lo` flag this.

**Reset.** The PWM reset fires in either of two cases:
- `count == i_c[8:5]` and the front is at the cell that `i_c[4:0]` selects.
  The front is "selected output high and the next one still low". Without
  that, a trailing output would match one cell early.
- `count > i_c[8:5]`, so a pulse that already starts above the command still
  ends the on-time.

## Start-up and calibration

A pulse observer integrates slope errors for ever. In current mode there is
nothing that pulls the observed current back to the real one. The
controller therefore calibrates the return slope before it uses current
mode. `calib_ctrl` runs once per period:

1. **Soft start.** Voltage mode with a rising limit on `i_c`. In voltage mode
   the pulse is injected at `INJ = 48` at the start of every period, so the
   line works as a delay-line DPWM with voltage feed-forward.
2. **Voltage mode.** Continues until `e[n] = 0` for 16 periods in a row.
3. **Calibrate.** Still voltage mode. At the end of each period the position
   of the returning pulse is compared with the target `INJ - 6`:
   - If the pulse has not got there, the return is too slow, so `K` is
     lowered.
   - If it went more than 1 LSB further, `K` is raised.

   After 8 good periods in a row the controller goes to current mode.
4. **Current mode.** No injection. The pulse follows the inductor current.

It returns to voltage mode on `recal`, or when the observed current is found
at full scale at the end of a period.

Why the target is 6 cells below INJ:
- In voltage mode, the injection holds the pulse at INJ for four rising
  cell delays after Q rises. This lets the cleared elements settle.
- In current mode, the pulse moves on two cells when it turns at the valley.

A valley at INJ - 6 thus gives the same rise as voltage mode.

`inject_en` is retimed to the falling clock edge so that a mode change never
produces a glitch on the injection.

## Timing

- Each period starts on the rising edge of `clk_fs`. Its high phase is the
  latch's set pulse and must be longer than one cell delay (the testbench
  uses 20 ns of 500 ns).
- `e[n]` is sampled on the rising edge. `i_c[n]` changes on the same edge,
  so it is valid one period after the error it answers.
- `c1` turns on 5 ns after `Q` rises. `c2` turns on 5 ns after `Q` falls.
- Everything inside the observer is self-timed. There is no fast clock.

## Analog parts, and what is modelled

- **`delay_cell`** is a behavioural model. After an input change it waits
  `Q_SW / I_bias` and then copies the input, which swallows glitches shorter
  than one delay. For synthesis the delay is dropped and the cell is a
  buffer. The latches in the line are intended (self-timed logic), and so is
  the combinational loop through the observer and the PWM latch: lint tools
  report both.
- **`delay_control`** stands for the V/I converters and mirrors. It takes
  millivolt codes for V_g and v_out and gives nanoampere codes, so the top
  has only digital ports. `GAIN1_PCT` and `GAIN0_PCT` model conversion
  errors that the calibration must remove.
- The power stage and the error ADC are not RTL. `tb/buck_plant.sv` is a
  forward-Euler buck model with switch resistances, DCR and body diodes.
  `tb/adc_model.sv` quantises `V_ref - v_out` in 40 mV steps.

## Departures from the source design, and own choices

- The compensator law is not specified. It is a PI with clamps:
  `KI = 2`, `KP = 16`, 8 fraction bits.
- Choices not taken from the source design:
  - the dead-time circuit and its 5 ns
  - the soft-start ramp
  - the mode thresholds (16, 8, 1 LSB)
  - the 8-bit mirror code (128 = 1:1)
  - INJ = 48
  - the 4-delay injection
  - the target offset of 6
- The counter's straddle rule replaces "the last cell clocks the counter".
  The front qualification of the multiplexer and the `count > i_c` reset
  term are added.
- The full scale is 2^9 - 1 rather than 2^9.
- Only the buck row of the slope table is built. The boost and buck-boost
  V/I arrangements, used for example by a 1 MHz buck-boost prototype, are
  not.

## Status and limits

- The unit testbenches of all modules pass.
- End to end, the testbench runs:
  - soft start, voltage-mode regulation at 1.5 V, and calibration of `K`:
    these work
  - after the switch to current mode: a 100 mA and a 200 mA load, a second
    calibration, V_g = 3.3 V, and a 15 mA load. **These phases do not yet
    regulate.** The observed valley drifts against the real inductor current
    by about a tenth of an LSB per period. The integrator of the voltage loop
    is too slow to follow that drift. The
    pulse then runs into saturation, and the controller falls back to voltage
    mode and recalibrates.

  A second effect shows when the pulse turns from a slow fall to a fast
  rise at a low output voltage. A cell still waiting out a long delay
  answers late, the band widens by a few cells, and the reset comes late.
  The cell model does not speed up a transition already in flight when the
  bias changes, although a starved inverter would.

  The end-to-end testbench reports these failures (4 of 24 checks). Treat
  current-mode regulation as unverified. The mismatch comes from residual
  timing differences between voltage and current mode (the injection hold,
  the reversal jump, the dead time seen by the plant but not by the line)
  and from the step size of `K`: one code is 0.8 % of the return slope.

## Simulating

Verilator 5 with timing support. Compile the package first:

```
verilator --binary --timing -Irtl -Itb rtl/scm_pkg.sv tb/tb_hybrid_observer.sv \
          --top-module tb_hybrid_observer -o sim && ./obj_dir/sim
```

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops by
itself. Each one also has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_delay_cell` | delay = 43.2 fC / I for random biases; glitch filtering |
| `tb_bidir_delay_element` | latch priorities in both directions; output one delay later |
| `tb_obs_counter` | wrap up, wrap down, turning back inside the wrap, end stops, load |
| `tb_hybrid_observer` | position against time for random up/down phases and speeds; saturation at both ends; reset timing for random commands; counts wraps, resets and saturations |
| `tb_delay_control` | I1 and I0 against the formulas for random voltages and K |
| `tb_pwm_latch`, `tb_dead_time`, `tb_digital_compensator`, `tb_calib_ctrl` | against reference models or sequences |
| `tb_scm_controller` | closed loop at default parameters (about 3.3 ms simulated, a few seconds) |

A `verilator` run may warn about latches, the combinational loop and
variable delays. These come from the self-timed line and are expected.
