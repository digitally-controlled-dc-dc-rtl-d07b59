# Digital buck-converter controllers with inductor self-test and lossless current sensing

A switching buck converter's loop dynamics depend on parts the controller chip
cannot see: the off-chip inductor (its inductance L and DC resistance DCR) and
the load current. A controller designed for worst-case values of these is slow.
This RTL implements two digital controllers that measure these quantities on
chip and use the results:

* **VMC converter** (voltage-mode control, 500 kHz). At start-up an inductor
  self-test (BIST) forces a triangular current through the inductor and
  measures L and DCR. During regulation the average load current is sensed
  without a series resistor. A small RC filter across the inductor gives a
  voltage whose average exceeds V_OUT by I_LOAD·DCR. Dividing that excess by
  the measured DCR gives the current. The sensed current picks one of several
  pre-stored Type-III compensator coefficient sets. This keeps the loop
  response nearly independent of the load.
* **ACMC converter** (average-current-mode control, 375 kHz). It uses the same
  lossless current sensing, now as the inner-loop feedback of a two-loop
  controller. Its hybrid DPWM gets the fine delay from a mixed-mode DLL: a
  digital bang-bang phase detector and up/down counter bias an analog
  current-controlled delay line.

Both controllers digitise voltages with **frequency-domain delta-sigma ADCs**.
An analog VCO turns the voltage into a frequency. A two-flip-flop XOR
discriminator gives a first-order noise-shaped bit stream. A two-stage CIC
decimator (R = 64) returns one 13-bit code per switching period. The decimation
ratio ties the ADC code rate to the switching frequency, so each code is the
average over exactly one switching period. The CIC nulls remove the switching
ripple for free.

The analog parts are not RTL: the VCOs, the DLL delay lines and DAC, the sense
amplifier, the triangular current generator, the level shifters and the power
stage. They connect through ports. The testbenches contain behavioural models
of them.

## Block map

```
            fm_fb ─► ds_adc ─┐
            fm_ref ─► ds_adc ─┼─► adc_gain_cal (g = VREF_NOM / VREF_D)
            fm_diff ─► ds_adc ─┤
                               ├─► bist_processor ─► L, DCR      (VMC start-up)
                               └─► current_sense_processor ─► I_LOAD
 V_REF,D − V_FB,D ─► tdf2_compensator (coeffs from pid_coeff_table[I_LOAD]) ─► duty
 duty ─► dpwm_hybrid (5-bit counter + 16-tap delay line) ─► power_stage_driver ─► N1/N2
 vmc_mode_controller: RESET → BIST → OFFSET_CAL → REGULATE
 ACMC: acmc_controller (voltage PI → I_REF, current PI → duty);
       mdll_phase_detector + mdll_updn_counter ─► I_SW (delay-line bias)
```

| File | Role |
|---|---|
| `buck_pkg.sv` | Shared widths, coefficient types, VMC mode enum |
| `fd_modulator.sv` | Frequency discriminator (2 DFF + XOR) |
| `cic_decimator.sv` | 2-stage CIC, R = 64, 13-bit output |
| `ds_adc.sv` | Discriminator + CIC |
| `adc_gain_cal.sv` | ADC gain factor from the reference code |
| `seq_divider.sv` | Bit-serial divider (helper) |
| `bist_processor.sv` | A/B/C code capture, L and DCR |
| `current_sense_processor.sv` | Offset calibration, I_LOAD = (code − offset)·g·k_i / DCR |
| `tdf2_compensator.sv` | Transposed direct-form II compensator, order 1–3 |
| `pid_coeff_table.sv` | Load-current-selected coefficient sets |
| `vmc_mode_controller.sv` | Start-up sequencer with 200 µs BIST time-out |
| `dpwm_hybrid.sv` | 9-bit counter + delay-line DPWM |
| `mdll_phase_detector.sv`, `mdll_updn_counter.sv` | Digital half of the mixed-mode DLL |
| `acmc_controller.sv` | Two cascaded compensators |
| `power_stage_driver.sv` | Behavioural dead-time driver with BIST blocking |
| `vmc_buck_controller.sv`, `acmc_buck_controller.sv` | The two controllers |
| `buck_converters_top.sv` | Both controllers side by side, all ports prefixed `vmc_` / `acmc_` |

## The delta-sigma ADC and its timing

The VCO is centred near f_spl/2. The discriminator outputs 1 whenever the
number of VCO edges in a sampling period is odd. The CIC output is
`code ≈ R² · 2·f_vco / f_spl`, so full scale (f_vco = f_spl) is 4096 and the
centre is 2048. Thirteen bits hold this without overflow. The sampling clock is
f_spl = 64·f_s: 32 MHz for the VMC converter and 24 MHz for the ACMC converter.
A code appears every 64 clocks. The first code after reset is valid once the
2R−1 sample window is full.

Everything digital except the DPWM runs on the sampling clock. The DPWM runs on
CK_REF = f_spl/2 (16 MHz or 12 MHz). The duty word crosses between the two
domains as a quasi-static word: it changes once per period, away from the
DPWM's sampling point. This holds when both clocks come from one source, which
is how the design is clocked.

## Inductor self-test (VMC)

During BIST the power switches are held off and the output capacitor is
shorted. A symmetric triangular current flows through the inductor. The
inductor voltage is then `L·dI/dt + DCR·I`. The sense amplifier adds gain and
offset. Three codes are taken:

* **A**: the last code of the falling ramp.
* **B**: the third code of the rising ramp (the first whose CIC window is
  entirely on the ramp).
* **C**: the last code of the rising ramp.

Then `B − A ∝ 2·L·Slope` and `C − B ∝ DCR·(I_max − I_min)`. The offset and
any common level cancel. Both differences are multiplied by the ADC gain
factor g (Q12). They are then scaled by the programmable constants k_l and k_r
(Q12). These constants fold in the slope, the amplifier gain and the current
swing. Outputs: `l_meas` in 0.01 µH and `dcr_meas` in 0.1 mΩ, if k_l and k_r
are chosen for those units.

A test on a falling ramp uses that ramp if enough of it remains. Otherwise it
waits one more ramp. So a test takes at most 1.5 triangle periods plus a few
codes: about 150 µs with a 10 kHz triangle. The mode controller aborts BIST
after 200 µs (6400 clocks).

## Lossless current sensing

Each sense-ADC code is already a period average, so no extra filter is needed.
After BIST, the sense-amplifier inputs are shorted (`offset_sw`). The mean of 4
codes is stored as the read-out offset. Each later code then gives

```
i_load = ((code − offset) · g >> 12) · k_i / dcr      (mA, signed)
```

It is computed with a sign-magnitude bit-serial division. The result arrives
34 clocks after the code, within the 64-clock code period. The DCR comes from
the self-test in the VMC converter. In the ACMC controller it is an input.

## Compensators

`tdf2_compensator` implements `H(z) = (a0 + a1 z⁻¹ + … ) / (1 + b1 z⁻¹ + …)`
in transposed direct form II. Coefficients are signed 18-bit Q12. The
accumulator is 40 bits wide. The output is clamped to the 9-bit duty range
(or the current-reference range in the ACMC outer loop). The clamped value is
fed back with its 12 fractional bits kept. As a result:

* Errors smaller than one output LSB still integrate.
* The loop cannot wind up past the clamp.

The stored products are floored. One update is made per ADC code.

* **VMC:** `pid_coeff_table` holds two coefficient sets (a0..a3, b1..b3) and a
  current threshold. While the global update enable is high, each new current
  sample selects set 0 (below the threshold) or set 1 (above). While the
  enable is low the choice holds.
* **ACMC:** `acmc_controller` runs a voltage loop (V_REF − V_FB → I_REF) and a
  current loop (I_REF − I_LOAD → duty). Both are Type-II. The current loop
  waits each period for the sensed current of that period.

No coefficient values are built in. All coefficients are written through
ports after reset. Values that stabilise the testbench plants are in
`tb_vmc_buck_controller.sv` and `tb_acmc_buck_controller.sv`.

## Hybrid DPWM and the mixed-mode DLL

A 5-bit counter on CK_REF makes the switching clock (CK_REF/32) and starts
each pulse. When the count reaches the duty MSBs, the comparator raises CR.
The first edge of the tap selected by the 4 LSBs ends the pulse. The pulse
width is `MSB·T_ref + LSB·T_ref/16`, so the duty is code/512.

The pulse is built from three toggle flags, each in a single clock domain, so
that the tap multiplexer's switching glitches cannot end a pulse. Known
corner: if a period with MSB = 31 is followed by one with MSB = 0, that one
pulse may end early.

In the ACMC converter the 16 taps come from a current-starved delay line. The
bang-bang phase detector samples the delay line's last output against CK_REF,
and the 5-bit up/down counter (I_SW) biases the line. The counter has no end
stops and resets to mid-scale. The loop has 2–3 cycles of latency, so after
lock it dithers by about ±3 codes around the lock point. The mean error of
that dither is well under one code.

## Driver

`power_stage_driver` is a behavioural model, not RTL. It produces the PMOS
gate N1 and the NMOS gate N2 from the PWM with a 10 ns dead time at both
transitions. The dead time is an assumed value. In BIST mode N1 is high and
N2 is low, so both switches are off, and the PWM is blocked. The model uses a
single delayed copy of the PWM instead of cross-coupled delay chains, so it has
no combinational loop.

## Parameters and formats

| Item | Value |
|---|---|
| DPWM | 9 bits = 5 MSB counter + 4 LSB taps |
| CIC | N = 2, R = 64, 13-bit output |
| Coefficients | signed 18-bit, 12 fractional bits |
| ADC gain g | unsigned Q12 (VREF_NOM / VREF_D) |
| VMC clocks | f_spl 32 MHz, CK_REF 16 MHz, f_s 500 kHz |
| ACMC clocks | f_spl 24 MHz, CK_REF 12 MHz, f_s 375 kHz |
| BIST time-out | 6400 clocks = 200 µs |
| Offset average | 4 codes |
| Current | 16-bit signed, mA |

The published design sizes fit these widths:

* load current up to 1 A
* inductance 3.7–22.3 µH
* DCR 15–80 mΩ
* ACMC output 1–11.5 V at up to 3 W

The 40-bit compensator accumulator holds an 18-bit × 22-bit product plus
growth.

## Departures and limitations

* **Analog blocks are not included.** These are the VCOs, the DLL/VCDL, the
  current-controlled delay line and its DAC, the sense amplifier, the
  triangular current generator, the level shifters, the transmission-gate
  multiplexer of the modified driver, and the power switches. The driver
  exists only as a behavioural model.
* **No coefficient values are known.** Compensator coefficients, current
  thresholds and the scale constants k_l, k_r and k_i are inputs. They must be
  computed for the actual amplifier gain, triangle slope and VCO gain.
* **The ACMC controller does not run the self-test.** Its DCR is an input; the
  BIST sequencing exists only in the VMC controller.
* **Self-test accuracy in simulation is mixed.** In the end-to-end model the
  self-test measured 18.1 µH for an 18 µH inductor. It measured 55 mΩ for a
  60 mΩ DCR, about 8% low: the CIC window is partly on the ramp, and k_r only
  partly corrects this. The published results are 2.1% and 3.6% average error.
  A finer triangle or a fitted k_r improves this.
* **The DPWM has a known corner:** a pulse may end early when MSB changes
  from 31 to 0.
* **The MDLL dithers** by ±3 codes after lock (see above).
* **Design choices not specified in the original description:**
  * the bit-serial dividers
  * the 4-code offset average
  * the B code taken three codes into the rising ramp
  * reset values

## Simulation

Every block has a self-checking testbench in `tb/`. Each one:

* prints `TB_RESULT checks=N failures=M` at the end
* has a watchdog
* uses `$urandom` stimulus

With Verilator 5:

```
verilator --binary --timing -Irtl rtl/buck_pkg.sv \
    $(ls rtl/*.sv | grep -v buck_pkg) tb/tb_cic_decimator.sv \
    --top-module tb_cic_decimator -o sim && ./obj_dir/sim
```

Replace the testbench name for other blocks.

`tb_buck_converters_top` is the end-to-end test. It runs at the top's default
parameters. It runs both converters on behavioural plants (LC filter with
ESR, DCR, RC sense filter, sense amplifier with offset, VCOs, delay lines):

* VMC: a self-test, offset calibration, regulation to 3.3 V at two loads with a
  coefficient-set switch, and a restart.
* ACMC: MDLL lock and regulation to 3.3 V at two loads.

It counts each of these mechanisms and fails if one never happens. It takes about
20 seconds of simulator time on a desktop machine.

The controller-level testbenches `tb_vmc_buck_controller` and
`tb_acmc_buck_controller` contain the plant models with their component values:

* VMC: 18 µH, 60 mΩ, 22 µF / 70 mΩ, V_IN 5 V, V_OUT 3.3 V
* ACMC: 18 µH, 62 mΩ, 330 µF / 25 mΩ

They are the place to start when changing loop coefficients.
