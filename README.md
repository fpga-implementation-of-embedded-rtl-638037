# Cruise control and anti-collision radar on one FPGA

A car carries a radar that emits a pseudo-random code continuously and listens for its echo.
An obstacle shows up as a copy of the code in the received signal, delayed by the round trip.
The classic detector correlates the received wave with the code, and it stops working beyond
about 100 m. This design uses a third-order Higher Order Statistics (HOS) correlation instead: a
modified form of Tugnait's estimator, aimed at 150 m. Its output peak gives the obstacle
distance directly.

Next to the radar, on the same chip, an Intelligent Cruise Control with GPS (ICCG) drives the
accelerator. A 15-state automaton picks the mode: alarm, speed limit, cruise, the GPS-assisted
variants, or following a lead car. A corrector then turns the chosen target speed into a
throttle command.

The RTL has three hardware components:

| component | module | what it does |
|---|---|---|
| Generator | `radar_generator` | 1023-chip LFSR code for the emitter and the detector; modulo-1023 time base |
| Detection | `hos_detector` (`hos_s`, `hos_cycc`, `hos_cycy`, `hos_j32`, `peak_detect`) | HOS correlation, peak search, interrupt with the distance |
| ICCG | `iccg` (`control_automaton`, `mode_computation`, `regulator_throttle`) | mode automaton, target speed, throttle |

`radar_cc_top` wires them together. The fourth part of the system is a soft-core processor. It
runs software that turns interrupts into an environment map, tracks obstacles and brakes, and it
is not part of this RTL. Its signals are ports of the top: the detector's results and the time
base go out, and the tracking speed and the detection threshold come in.

## The HOS detector

### What it computes

Let `y(i)` be one frame of N = 1023 received samples and `c(i)` the code, with the code bit read
as +1 (bit 1) or -1 (bit 0). The detector evaluates:

```
s(i)     = y(i) * c(i+1)                         i = 0 .. N-1, c index modulo N
Cycc(j)  = sum_i s(i) * c(i+j)                   j = 0 .. 2L-2
Cycy(j)  = sum_i s(i) * y(i+j)
J32(i0)  = sum_{j=0}^{L-1} Cycc(j) * Cycy(j+i0)   i0 = 0 .. L-1
```

Here L = 150 and one lag is one metre, so `i0` is the distance in metres. The 1/N normalisation
of the estimator is left out because it does not move the peak.

For an echo delayed by `d` samples, `Cycc` peaks at `j = 1`, since `c(i+1)c(i+1) = 1`. `Cycy`
peaks at `j = d+1`, so their correlation `J32` peaks at `i0 = d`. The testbenches confirm this
for delays from 0 to 149 with noise, and the peak stands well above the rest of the sweep.

### Widths

The received sample is 4-bit **unsigned** (0..15), and that choice fixes every width after it:

| signal | range | width |
|---|---|---|
| `s(i)` | -15..15 | 5 signed |
| `Cycc` | ±15·1023 = ±15 345 | 15 signed |
| `Cycy` | ±15·15·1023 = ±230 175 | 19 signed |
| `Cycc·Cycy` | | 34 signed |
| `J32` | ±150·15 345·230 175 | 40 signed |

So the final stage needs 150 multipliers of 15 × 19 bits.

### How the lags are produced (the part to read twice)

The detector takes one sample and one code chip per clock. It never needs a barrel shifter,
because two shift registers do the indexing:

* `ywin` and `cwin` are N-deep shift registers of the latest samples and chips. Lane `i` holds
  the value that arrived `N-1-i` clocks ago.
* A modulo-N counter marks the last sample of each frame. At that edge both windows are copied
  into the frame registers `yfrm` and `cfrm`, which hold `y(i)` and `c(i)` for the whole frame.
  `hos_s` forms `s(i)` from them once, and both branches share it.
* The windows keep shifting. `j` clocks after the frame end, lane `i` of `ywin` holds `y(i+j)`,
  and lane `i` of `cwin` holds `c(i+j)`. So plain fixed wiring gives one new lag per clock.
  Beyond the frame, `y(i+j)` is the sample that really arrived, not a wrapped copy.
* For `j = 0 .. 2L-2` (299 clocks), `hos_cycc` and `hos_cycy` each sum 1023 terms. The results
  are registered and streamed to `hos_j32`.

`hos_j32` keeps the last L values of `Cycy` in a register bank, written at a modulo-L pointer. It
also keeps the L values of `Cycc` in a shift register: during the first L lags this register
fills, and afterwards it rotates one place per lag. Bank entry `q` therefore always meets
`Cycc((q - i0) mod L)`, which is what the sum for `i0` needs. One wide adder then gives one
`J32(i0)` per clock for `i0 = 0..149`.

`peak_detect` keeps the running maximum and its lag. On the last lag, if the maximum is above the
programmable threshold, it pulses `obstacle.irq` for one clock with `distance = i0` and the peak
value.

### Timing

* A frame is 1023 clocks. The 299 lag clocks overlap the next frame, so there is one result per
  frame and nothing stalls. `2L-1 <= N` is asserted.
* Counting from the edge that takes a frame's last sample, the interrupt is seen `2L+2` = 302
  clocks later.
* After reset the detector's frame counter and the generator's counter start together, so
  frames line up with code periods. The arithmetic does not need that, though: any period of a
  periodic code works.

### Size

Synthesised at full size, the whole top is about 9 400 word-level cells and 10 500 flip-flop
bits, plus 8 700 bits of register bank. Most of it is in the two 1023-lane sums and the 150
multipliers.

This full algorithm is known not to fit a 60 000 logic-element device: the published estimate is
about 101 000 LE. A cheaper variant "based on averages instead of additions" exists, but its
definition is not available, so it is not provided here.

## The cruise control (ICCG)

### Automaton (`control_automaton`)

The driver can select six modes: **Alarm, Limit, Cruise, Limit_GPS, Cruise_GPS,
Cruise_Tracking**. Pressing a mode button (`driver.mode_req`) moves from any of them to the
requested one.

Nine safety states guard the modes that depend on something that can go away:

| mode | exits to | returns when |
|---|---|---|
| Alarm | Alarm_Fail on GPS_Fail | not GPS_Fail |
| Limit / Cruise | *_StdB on StdB | not StdB |
| Limit_GPS / Cruise_GPS | *_StdB on StdB, *_Fail on GPS_Fail | not StdB and not GPS_Fail |
| Cruise_Tracking | *_StdB on StdB, *_Fail on Tracking_Fail | not StdB and not Tracking_Fail |

Between a mode's two safety states:

* StdB → Fail on `Fail and not StdB`.
* Fail → StdB on `not Fail and StdB`.

Rules this design chose:

* The reset state is Alarm, where the driver keeps full control.
* StdB has priority over a failure, and a failure over a mode request.
* Safety states ignore mode requests.
* `StdB` is taken as an input condition; its physical source is not defined.

### Mode computation (`mode_computation`, `regulator_throttle`)

| state | target speed | throttle to the car |
|---|---|---|
| Cruise | Driver_Speed | computed |
| Cruise_GPS | min(Driver_Speed, GPS_Speed) | computed |
| Cruise_Tracking | Tracking_Speed (from the processor) | computed |
| Limit | Driver_Speed | min(pedal, computed) |
| Limit_GPS | min(Driver_Speed, GPS_Speed) | min(pedal, computed) |
| all others | measured speed | pedal |

In Alarm, `info_driver.alarm` is set while the measured speed is above the GPS limit.

The corrector is a saturated PI loop in fixed point, updated on each `tick`:

```
e      = target - measured                     (km/h)
integ' = sat(integ + KI*e)                     0 .. 100% << FRAC
thr    = sat(integ' + KP*e) >> FRAC            0 .. 100%
```

The defaults are `KP = 32`, `KI = 2` and `FRAC = 4`. Outside the regulating states the
integrator follows the pedal, so engaging a mode causes no jump. Speeds are 8-bit km/h and the
throttle is a 7-bit percentage.

## Top-level interface (`radar_cc_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock (one radar sample per clock), asynchronous active-low reset |
| `ctrl_tick` | in | control-period strobe for the speed regulator |
| `gps` | in | `{fail, speed}` |
| `driver` | in | `{mode_req, stdb, speed}` |
| `car` | in | `{speed, throttle}`: measured speed and the driver's pedal |
| `cruise_radar` | in | `{fail, speed}`: tracking result from the processor |
| `info_driver` | out | `{state, alarm, limiting}` |
| `car_throttle` | out | accelerator command, percent |
| `radar_reception` | in | received sample, 4-bit unsigned |
| `radar_emission` | out | code chip to the emitter |
| `detect_threshold` | in | 40-bit signed peak threshold |
| `obstacle_detection` | out | `{irq, distance, peak}` |
| `counter` | out | time base, 0..1022 |

The struct types live in `rtl/radar_cc_pkg.sv`.

## Where this RTL departs from, or adds to, the published design

* **y(i+j) store.** The published schematic stores `y(i+j)` in latches written by a modulo-1023
  counter. Here it is a shift register, which gives the same values to fixed wiring with no
  read multiplexer. The counter still marks frames.
* **Cycc realignment.** The `Cycc` register rotates so that it lines up with the modulo-150
  `Cycy` bank. The published schematic does not show how this alignment is done.
* **Code polarity.** The published formula is used as printed, including `c(i+1)`. The 1-bit
  code is read as ±1.
* **Generator.** The generator itself is only outlined in the published description. The
  polynomial, seed and chip rate are this design's own choices.
* **Peak rule.** The threshold test and the one-clock interrupt are this design's way of
  "finding the peak in the noise".
* **Limit modes.** These cut the throttle to keep the car under the limit, as the text describes.
  The published regulation figure covers only the cruise modes, where Limit falls under
  "others".
* **Corrector and ICCG sizes.** The PI law, its gains and all ICCG widths are this design's own
  choices.
* **Not provided.** The soft-core processor and its software are not part of this RTL. That
  covers distance averaging over 16 radar orientations, the VGA display, obstacle tracking,
  collision prediction and the brake command.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_hos_s`, `tb_hos_cycc`, `tb_hos_cycy` check the lane arithmetic and the full-scale extremes
  against sums computed in the testbench.
* `tb_hos_j32` checks every `J32` of random and full-scale sweeps at L = 150, the two-clock
  latency and a pause inside a sweep.
* `tb_peak_detect` checks the maximum and its lag, the threshold, and the pulse timing.
* `tb_hos_detector` runs the full N = 1023, L = 150 detector on echoes at 0, 20, 73, 111 and
  149 m. A reference model, `tb/hos_ref_pkg.sv`, evaluates the formulas directly. The test
  compares all lags of `Cycc` and `Cycy`, every `J32`, the interrupt distance (which equals the
  echo delay) and the fixed 302-clock interrupt timing.
* `tb_radar_generator` checks a maximal-length period of 1023 (512 ones, all 10-bit windows
  distinct) and the time base.
* `tb_control_automaton` walks every printed transition and all 30 mode-to-mode requests.
* `tb_regulator_throttle` checks tick by tick against a PI model and settles a closed loop.
* `tb_mode_computation` checks both multiplexers in every state.
* `tb_iccg` runs a drive with a car model.
* `tb_radar_cc_top` runs the whole chip at its default sizes. The radar loop is closed through
  the emitter, one frame has no echo, and the drive covers every mode and safety state. It
  counts each mechanism and fails if one never occurs.
* `tb_radar_workload` repeats the kind of run used to validate the algorithm: a cyclic code
  with noise that grows frame by frame. It checks every frame's result against the reference
  until the echo is lost in the noise.

Simulate with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_radar_cc_top \
    rtl/radar_cc_pkg.sv tb/hos_ref_pkg.sv rtl/*.sv tb/tb_radar_cc_top.sv
./obj_dir/Vtb_radar_cc_top
```

The full-size end-to-end run takes a few seconds. To explore, change `N_CODE`, `L_LAGS` or the
widths in `radar_cc_pkg`, or override `N` and `L` on `hos_detector`. `N` must stay
`2^10 - 1` for the generator's LFSR, and `2L-1 <= N` must hold.
