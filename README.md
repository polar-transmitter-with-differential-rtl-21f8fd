# Polar transmitter with a differential delta-sigma phase path and a digital PWM envelope path

This is the digital part of a low-power polar transmitter for EDGE 8PSK.
It splits the complex baseband into a **phase** and an **envelope** and sends them down two separate paths:

- **Phase path.** The phase is differentiated into an instantaneous frequency. A 1-bit, 200 MHz delta-sigma modulator (DSM) drives a differential RC filter. The filter sets the modulation voltage of an LC VCO.
- **Envelope path.** The envelope is turned into a 256-level pulse width on a 3.25 MHz IF clock. A power switch and an LC filter turn that into the PA supply.

Three digital blocks make this work with cheap analog parts:

1. A tuning-curve compensator linearises the VCO's modulation gain.
2. A second-order IIR filter in the envelope path makes the envelope's LC filter look like the phase path's RC filter. This lines the two paths up in time.
3. A dual-mode frequency-locked loop (FLL) sets the carrier. It can run only 10% of the time to save power.

The analog parts are not RTL: the VCO, the RC and LC filters, the CML prescaler, the power switch and the class-E PA. Their signals are ports of the top module.

## Signal flow and clocks

```
 sym --> iq_gen --> cordic --+--> phase_diff --> kvco_div --> tuning_comp --> sl_dsm ==> vmod_p/n  (to RC filter, VCO)
   6.5 MHz (clk_bb/4)        |                                  |  200 MHz (clk_dsm)
                             |                                  +--- freq_req / freq_val
                             |                                                      |
                             +--> iir_align --> pwm_mod --> deadzone_buffer ==> gate_p/n (power switch)
                                  26 MHz       ^   |  3.25 MHz F_IF                 |
                                               |   v                                |
                                            pwm_delay_line (255 x 0.601 ns)         |
 fc_clk (VCO) --> fll: /4 --> /8 --> freq_detector (vs N_CAL x F_REF) --> fll_ctrl --+--> s_word (cap bank)
                    duty_gen (2 kHz, 10%) gates the dividers          cal_dac (40 MHz) ==> vcal_p/n
```

| clock    | rate    | used by |
|----------|---------|---------|
| `clk_bb` | 26 MHz  | the IIR filter, the PWM and the F_IF divider (26/8 = 3.25 MHz); a 1-in-4 enable gives the 6.5 MHz sample rate of `iq_gen`, `cordic`, `phase_diff`, `kvco_div` and `tuning_comp` |
| `clk_dsm` | 200 MHz | phase `sl_dsm` |
| `clk_ref` | 1 MHz   | F_REF: the `duty_gen` control clock (500 cycles = 0.5 ms) |
| `clk_dac` | 40 MHz  | the FLL's delta-sigma DAC |
| `fc_clk`  | f_C     | the FLL dividers; `freq_detector` runs on f_C/32 |

Signals cross clock domains as follows:
- Single-cycle requests use toggle synchronisers (`pulse_sync`).
- The DAC code crosses through a Gray-code synchroniser (`gray_sync`).
- The DSM input word is re-registered in the 200 MHz domain one synchronised pulse after it changes.

## Number formats

These types and constants live in `rtl/polar_pkg.sv`.

| quantity | format |
|---|---|
| I/Q | signed Q1.15 |
| phase | 16-bit binary angle (2^16 = 2π) |
| envelope | unsigned 16 bits (65536 = 1.0) |
| DSM input | unsigned 16 bits, 0.5 = 32768, legal range 0.25–0.75 |
| gains and filter coefficients | Q2.14 |

## The phase path

**Differentiator (`phase_diff`).** A five-point central difference turns phase into frequency:

    D[k] = 8 (p[k+1] - p[k-1]) - (p[k+2] - p[k-2])        f_in = fs * D / (12 * 2^16)

The differences wrap modulo 2π, so phase wrap-around needs no unwrapping. The result refers to the centre sample, so it is two samples late.

**1/(2K_VCO) (`kvco_div`).** The word D is multiplied by `kvco_recip`, shifted right by 16 and saturated. `kvco_recip` folds together three factors: fs/12, the 2^16 phase scale and the VCO gain. With the default `kvco_recip = 7310`, the EDGE peak deviation of ±340 kHz gives V_in = ±0.07 of the DSM full scale. That is well inside the DSM's ±0.25.

**Tuning-curve compensation (`tuning_comp`).** The block has two modes:
- **Mode "1" (measure).** This is a rare, open-loop calibration.
  - It applies nine equally spaced test voltages around mid-scale, one at a time.
  - For each one, it waits `SETTLE` cycles and asks the FLL's frequency detector for the average frequency.
  - It computes each point's gain error against the straight line through the end points: `gain_i = ((f8 - f0)(i - 4)) / (8 (f_i - f4))`.
  - A sequential restoring divider (`seq_div`) does the division.
  - The centre point has no secant, so it takes the mean of its neighbours.
  - Any result that is implausible stores 1.0.
- **Mode "2" (normal).** Every sample is multiplied by the gain of its nearest table point. Then 0.5 is added and the result is clamped to 0.25..0.75.

**Delta-sigma modulator (`sl_dsm`).** This is a second-order, 1-bit, single-loop modulator:
- The first integrator accumulates input minus output.
- The second accumulates the first minus twice the output.
- The input is also fed forward to the quantiser.
- The signal transfer function is (1 - 2z⁻¹ + 1.5z⁻²)/(1 - z⁻¹ + 0.5z⁻²).
- The noise transfer function is (1 - z⁻¹)²/(1 - z⁻¹ + 0.5z⁻²).
- The modulator is stable over the 0.25..0.75 input range.

`dout` and `dout_n` are the two complementary streams that drive the differential RC filter.

## The envelope path

**Alignment filter (`iir_align`).** The phase reaches the VCO through an RC filter, modelled as two real poles at 1.554 MHz (1 MHz overall). The envelope reaches the PA through a second-order LC filter, modelled as a 1 MHz Butterworth. The IIR runs at 26 MHz:
- Its **fixed** poles (`A1 = -22510`, `A2 = 7732`) equal the RC poles.
- Its **programmable** zeros (`b0`..`b2`, defaults `IIR_B0..B2`) cancel the LC poles.
- The DC gain is 1.

So envelope → IIR → LC has the same transfer function as phase → RC, and the two paths stay aligned in time without a delay trim. The zeros are run-time inputs so that they can follow the real LC filter.

**PWM (`pwm_mod`, `pwm_delay_line`).**
- The envelope is quantised to a code 0..255, rounded and held for one IF period.
- F_IF is 26 MHz / 8 = 3.25 MHz.
- The delay line has 255 cells of 1/(2 · 256 · 3.25 MHz) = 0.601 ns. It delays F_IF by `code` cells.
- A multiplexer picks that tap, and an XOR with F_IF gives a pulse of width `code x 0.601 ns` at each IF edge.
- So the mean duty cycle is code/256.

The delay line is a behavioural model using transport delays: in silicon it is a chain of inverters.

**Dead-zone buffer (`deadzone_buffer`).** This is also a behavioural model. Every PWM edge turns both power devices off at once. The device that matches the new level turns on only after the level has held for 0.3 ns, so the PMOS and NMOS are never on together.

## Carrier calibration: the dual-mode FLL

`fll` is built from `duty_gen`, two `clk_div` dividers (/4 stands in for the CML prescaler, then /8), `freq_detector`, `fll_ctrl` and `cal_dac`.

**Frequency detector (`freq_detector`).** This runs on f_C/32. Each reference period it counts f_C/32 cycles:
- A count below `N_CAL` gives UP.
- A count above `N_CAL` gives DN.
- The first window after the dividers restart is thrown away.

On request, it also sums the counts over `MEAS_REFS` reference periods for the tuning-curve measurement. With the default of 8192 periods, the resolution at the carrier is 3.9 kHz.

**Integral counter and mode FSM (`fll_ctrl`).**
- **Coarse mode "1".** This starts at reset or on `fll_recal`.
  - The 8-bit counter moves in steps of 8, so its top five bits drive the capacitor bank word S4~0 directly.
  - When the detector reverses direction, or the bank reaches its end, the word is frozen.
  - The counter then restarts at mid-scale 128 in **fine mode "2"**.
- **Fine mode "2".** The counter moves by ±1 and saturates. Its value is the DAC code.

**Delta-sigma DAC (`cal_dac`).** This re-uses `sl_dsm` at 40 MHz. The code maps to 0.25..0.75 of full scale. An external 100 Hz RC filter and buffer turn the stream into V_CAL.

**Quasi-continuous operation (`duty_gen`).** When `quasi_en` is set and the loop is in fine mode:
- The dividers are enabled for 50 of every 500 reference cycles. That is a 2 kHz control clock at 10% duty.
- The frequency detector only decides inside that slot.
- For the other 90%, the counter and the DAC code hold.

A tuning-curve measurement overrides the duty cycling, because it needs the dividers running.

## Parameters of the top (`polar_tx_top`)

| parameter | default | meaning |
|---|---|---|
| `SPS` | 24 | samples per symbol at 6.5 MHz (≈ 270.8 ksym/s) |
| `L` | 256 | PWM levels / delay-line length |
| `PERIOD`, `ACTIVE` | 500, 50 | FLL control period and active slot, in F_REF cycles |
| `MEAS_REFS` | 8192 | reference periods per tuning-curve frequency reading |
| `SETTLE` | 256 | 6.5 MHz samples to wait after applying a test voltage |

These are run-time inputs:
- `kvco_recip`
- `iir_b0..b2`
- `n_cal`, a 7-bit word with f_C = N_CAL × 32 MHz at F_REF = 1 MHz, covering 1.62–1.98 GHz with N_CAL = 51..62
- `quasi_en`
- `fll_recal`
- `curve_meas`

## Where this design makes its own choices

The transmitter description fixes the following:
- the block structure;
- the clock rates (26, 6.5, 200 and 40 MHz);
- the five-point differentiator;
- the DSM topology and its 0.25–0.75 range;
- L = 256 and f_IF = 3.25 MHz;
- the 0.3 ns dead zone;
- the ÷32 comparison with N_CAL × F_REF;
- the 8-bit integral counter, the coarse 5-bit and fine 8-bit modes;
- the 40 MHz DAC;
- the 2 kHz / 10% duty control;
- the two modes of the tuning-curve compensation.

These are choices made for this implementation:
- **`iq_gen`:** only a LUT-based 8PSK generator is specified, and EDGE pulse shaping is not reproduced. This block uses a 16-point constellation table with the EDGE 3π/8 symbol rotation and linear interpolation between symbols.
- **`cordic`:** a standard 16-stage vectoring CORDIC.
- **Tuning-curve measurement:**
  - nine points spaced 1/64 of full scale apart;
  - the gain formula above;
  - frequency readings from the FLL detector.
- **IIR coefficients:** derived from the 1 MHz RC and LC filter cut-offs, assuming an RC filter with two equal real poles and a Butterworth LC filter.
- **`fll_ctrl`:** the coarse-to-fine hand-over rule, and the sign convention that UP raises the code.
- **Fixed values:** F_REF = 1 MHz, every word width and every clock-domain crossing.

## Testbenches

Each block has a self-checking testbench `tb/tb_<block>.sv`, checked against a model computed independently in the bench. Each prints `TB_RESULT checks=N failures=M`.

`tb/vco_model.sv` is a behavioural VCO used only by the benches. It has:
- a cap-bank step per S unit;
- a V_CAL gain through a first-order 100 Hz filter;
- a V_MOD gain through two real poles (the RC filter);
- an adjustable cubic nonlinearity.

There are two end-to-end benches:
- **`tb_polar_tx_top`** runs at a shortened FLL slot (5 of every 50 reference cycles) and with 256-period frequency readings. It covers everything:
  1. lock;
  2. 60 symbols with phase and envelope tracking checks;
  3. quasi-continuous operation;
  4. 60 more symbols;
  5. a tuning-curve measurement (with these short readings it checks that the gains are stored, not how accurate they are);
  6. 20 symbols with a four times larger `kvco_recip`, which must drive the DSM input into its clamp.

  It counts every mechanism (coarse/fine mode, UP/DN, curve measurement, duty slots, DSM clamp, PWM pulses, gate drive, IIR pre-emphasis).
- **`tb_polar_tx_full`** runs the top at its default parameters through the same steps except the 74 ms tuning-curve measurement.

In both benches:
- The carrier is scaled to 256 MHz (N_CAL = 8) to keep the simulation short.
- The model VCO is linear, so any phase error comes from the digital path. It integrates the exact pulse widths of the DSM stream.
- The phase error is about 1° RMS.
- Phase tracking is judged by integrating the model VCO's frequency deviation and comparing it with the ideal phase through the RC filter.
- The envelope is judged by passing the PWM duty through an LC filter model and comparing it with the ideal envelope through the RC filter.

To simulate with Verilator 5:

    verilator --binary --timing rtl/polar_pkg.sv rtl/*.sv tb/vco_model.sv tb/tb_fll.sv --top-module tb_fll
    ./obj_dir/Vtb_fll

Put `rtl/polar_pkg.sv` first, and do not list it twice. Substitute any testbench name for `tb_fll`.

## Limits

- `pwm_delay_line` and `deadzone_buffer` are delay-based models. A synthesised chip needs real delay cells and a buffer chain.
- They also make `polar_tx_top` a simulation top.
- The unit delay of the delay line is fixed. Nothing calibrates it against process variation.
- The tuning-curve gain table is a register file filled by mode "1". Nothing times how often the measurement repeats.
- EDGE pulse shaping is not reproduced, so spectrum and EVM figures of a real EDGE signal cannot be reproduced with this I/Q source.
