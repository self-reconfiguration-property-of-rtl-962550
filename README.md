# Self-reconfiguring mixed signal controller for a hybrid active power filter

A shunt power quality compensator (here a three-phase four-wire hybrid
active power filter, HAPF) is normally designed for full load. At light load
the currents it has to measure use only a small part of the A/D converter's
range. The hysteresis band of the current controller cannot be narrower than
about half an LSB, so relative to the small current it becomes wide, and the
compensated current gets a large ripple: its THD can exceed the 20 % limit.

This design puts a programmable analog front end (an FPAA, field-programmable
analog array) in front of the ADC and lets the FPGA reprogram its gain on the
fly:

* At light load the current signals are amplified by an integer gain G before
  conversion, so they again fill the ADC range.
* The band stays fixed in ADC codes. In amperes it therefore shrinks by G, and
  the ripple falls with it.
* The FPGA decides when to change G with an instantaneous quality index, the
  *approximate THD* (ATHD). It needs no spectrum, only the band and the
  instantaneous power.

The RTL covers the digital controller. It also includes behavioural models of
the FPAA and the ADC, so the whole signal chain can be simulated from sensor
voltages to gate signals.

```
 sensors ──► FPAA #1 (voltages, gain 1) ─┐
 (v, iL, ic)                             ├─► 9-ch ADC ─► FPGA controller ─► 6 gate signals
         ──► FPAA #2 (currents, gain G) ─┘   25 kHz      │
                  ▲                                       │
                  └──── serial reconfiguration (88 bits) ◄┘
```

## The control period

Everything runs from one 20 MHz clock. `sample_timer` starts a conversion
every 800 clocks, i.e. every 40 µs (25 kHz). When the nine codes arrive
(three phase voltages, three load currents, three compensator currents), the
controller does the following:

| step | block | clocks (default) |
|---|---|---|
| ADC conversion (model) | `adc_model` | 20 |
| offset removal, p, \|v\|², moving average, divide | `pq_reference` | ~56 |
| hysteresis decision, gates updated | `hysteresis_pwm` | 1 |
| square root and divide for ATHD (in parallel with the gates) | `athd_calc` | ~60 |
| range tracking (in parallel) | `gain_calc` | 1 |
| gain frame, only when G changes | `fpaa_cfg_tx` | 88 |

A whole pass takes about 80 of the 800 clocks, so the control loop always
finishes inside one sample period. A gain frame (4.4 µs) also fits easily,
so reprogramming the front end never costs a control period.

## Reference current (pq theory)

`pq_reference` uses the simplified three-phase instantaneous power theory.
The compensator must supply whatever part of the load current is not active
current:

    p      = va·iLa + vb·iLb + vc·iLc              (instantaneous power)
    p̄      = mean of p over one mains period
    |v|²   = va² + vb² + vc²
    ic*(x) = iL(x) − (p̄ / |v|²)·v(x)

p̄ is a true moving average. A 500-entry circular buffer (one 50 Hz period at
25 kHz, about 13 kbit of memory) feeds a running sum. Until the buffer has
filled, missing entries count as zero, so for the first 20 ms after reset
the reference is not yet meaningful. The ratio k = sum / (500·|v|²) is formed
once per sample by a bit-serial divider. It has 16 fractional bits and is
saturated to 32 bits. The references come out with one fractional bit, in
units of half an ADC LSB.

Only phases a, b and c are computed. In the centre-split topology the neutral
current returns through the split dc-link capacitors and has no switched
leg.

## Hysteresis current control and the band

`hysteresis_pwm` compares each measured compensator current with its
reference once per sample:

* error > +HB: the upper switch turns off and the current falls;
* error < −HB: the upper switch turns on and the current rises;
* inside the band: the leg keeps its state.

The two switches of a leg are always complementary. No dead time is
inserted. `en` low turns every switch off. An assertion checks that the two
switches of a leg are never on together.

The band input `hb` is in half-LSB units, so `hb = 1` is the smallest band a
B-bit converter can resolve, HB_min = W / 2^(B+1).

The key point: reference and measurement both pass through the same FPAA
gain G, so the comparison happens on G·ic* and G·ic. A fixed `hb` then means
a band of HB/G in real amperes. Raising G is equivalent to narrowing the band
below what the ADC could otherwise resolve.

## The approximate THD index

Under hysteresis control, the current error is roughly a triangle wave of
amplitude HB. The rms value of a regular triangle is HB/√3 whatever its
period, so the harmonic content relative to the fundamental rms current I1 is:

    ATHD = HB / (√3 · I1) = √(2/3) · HB / I1p

Here I1p is the fundamental peak. For balanced sinusoidal voltages the active
fundamental peak follows from instantaneous quantities alone:

    I1p = √2 · p̄ / (√3 · |v|)

Substituting, the constants cancel exactly:

    ATHD = HB · |v| / p̄

`athd_calc` computes this form with one integer square root (|v|, 12
clocks) and one division. The result is in units of 0.01 %:

    athd = hb · √(v2) · 500 · 5000 / p_sum

The factor 5000 instead of 10000 is there because `hb` is in half LSB.
`athd_high` is set above 16.00 % (the `TARGET` parameter). That is the target
used for a 20 % THD limit, with margin for the approximation error. If the
average power is zero or negative (no load, or regeneration), the result
saturates at 655.35 % and the flag is set.

The index is valid only while the switching compensator is actually
controlling the current. It also ignores fundamental reactive current and
assumes balanced, sinusoidal supply voltages.

Reference values, all reproduced by `tb_athd_calc`:

| HB (pu) | I1p (pu) | ATHD |
|---|---|---|
| 0.1 | 0.5 | 16.33 % |
| 0.2 | 0.5 | 32.66 % |
| 0.1 | 1.0 | 8.165 % |

## Adaptive gain and on-the-fly reconfiguration

`gain_calc` looks for the smallest and largest code on the six current
channels over a window of `WIN` samples. The default is 1 500 000 samples,
one minute, long enough to ride through short load fluctuations. The
observed range R is amplified by the present gain g. The gain that would
just fill the converter is:

    G = INT(W / (R/g)),   W = 2^B codes,   clamped to 1 … 8

It is found without a divider, as the largest G with G·R ≤ W·g.

The decision rule at the end of each window:

* if G < g: apply G. This only happens if the signal already clipped.
* if G > g: apply G only if `athd_high` is set, i.e. only if performance
  misses the target. A compensator that already meets the target is left
  alone.
* The FPAA's saturation flag overrides everything. As soon as it is seen
  with g > 1, a request for G = 1 is issued, without waiting for the window.

Each accepted request:

* makes the new value the current gain;
* restarts the window, so R is never measured across two gains;
* is sent by `fpaa_cfg_tx` as an 11-byte frame, MSB first, one bit per clock,
  with `cfg_cs_n` low for exactly 88 clocks.

The frame layout is this design's own:

| byte | 0 | 1–2 | 3 | 4–5 | 6 | 7 | 8 | 9 | 10 |
|---|---|---|---|---|---|---|---|---|---|
| content | D5 | device id | 01 (control) | gain register address | 02 (count) | G | ~G | 2A | XOR of bytes 0–9 |

A real FPAA needs its vendor's dynamic-update format. Only
`msc_pkg::cfg_frame` and the FPAA model's check would need changing.

## Analog parts (behavioural models)

`fpaa_gain_limiter` and `adc_model` stand for analog or bought parts. They
are not meant for synthesis. Voltages are signed 32-bit integers in
microvolts.

* **FPAA** (`fpaa_gain_limiter`): out = 1.5 V + G·in, limited to 0…3 V, with
  `sat` high while any channel clips. Power-on gain is 1. It accepts a frame
  only if its length, sync byte, device id, address, checksum and gain range
  are all correct, and counts refused frames in `rejects`.
* **Two FPAAs in the top**: device 1 conditions the voltages and keeps gain 1.
  Device 2 conditions the six current signals and is the one being
  reprogrammed. Both listen on the same bus, and device 1 refuses the frames.
* **ADC** (`adc_model`): nine channels sampled together. Each code is
  floor(v·4096/3 V), clamped to 0…4095, and `drdy` follows 20 clocks (1 µs)
  after the sampling edge. The controller turns the offset-binary code into
  two's complement by inverting the MSB.

## Number formats

| quantity | format |
|---|---|
| ADC samples in the FPGA | signed 12 bit, mid-scale = 0 |
| `icref2`, `hb` | half-LSB units (one fractional bit) |
| p | 26 bit signed |
| `p_sum` | 35 bit signed (500 × p) |
| \|v\|² `v2` | 24 bit |
| k = p̄/\|v\|² | signed 32 bit, 16 fractional bits |
| `athd` | 16 bit unsigned, 0.01 % per LSB |
| gain | 4 bit, 1 … 8 |

## Where this design departs from, or fills in, the published one

The published design names more than it specifies. These are the main
choices made here:

- **Gain formula.** The gain formula G = INT(W/R) is taken from its verbal
  description. Using ATHD as the trigger for raising the gain, the immediate
  fall-back on saturation and the clamp to 8 are this design's choices.
- **Converter and frame.** ADC resolution (12 bits), conversion time, the
  mid-scale offset in the FPAA and the whole frame layout are not given by
  the source and are this design's own.
- **Channel split.** Which signals each of the two FPAAs conditions, and that
  voltages are not amplified, are this design's choices.
- **Sign convention.** The source writes the reference as
  iL − (p̄/|v|²)·v, but also writes the source current as iL + ic*. The
  reference formula is followed. Here the source current is iL − ic.
- **Sampled hysteresis.** The hysteresis comparator decides once per 40 µs
  sample, not continuously, because it sees the current only through the
  ADC. The real ripple therefore also depends on how far the current moves
  in one sample.
- **Band input.** The band `hb` is a run-time input rather than fixed at
  HB_min, so the same hardware can be evaluated at any band.
- **Not built.** The supervisory "backer" program for self-test and
  self-repair, and FPAA-to-FPGA protection signals other than saturation,
  are only named in the source and are not built. Neither is the power
  stage.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it establishes |
|---|---|
| `tb_sample_timer` | strobe every 800 clocks, one clock wide |
| `tb_pq_reference` | bit-exact against an integer model; after one period the reference equals the non-active load current to within 6 LSB; result inside a sample period |
| `tb_hysteresis_pwm` | 3000 random cases of the switching law, complementary gates, enable |
| `tb_athd_calc` | the full 10 × 10 grid of HB against I1p (0.1…1.0 pu) against √(2/3)·HB/I1p, the 16 % flag, zero or negative power |
| `tb_gain_calc` | raise to INT(W/R), hold when the target is met, clamp, saturation fall-back (window shortened to 40 samples) |
| `tb_fpaa_cfg_tx` | frame contents byte by byte, exactly 88 clocks |
| `tb_fpaa_gain_limiter`, `tb_adc_model` | the models' transfer functions, frame acceptance and refusal, conversion latency |
| `tb_fpga_controller` | controller against an emulated ADC: sampling rate, gates, ATHD, gain frame, saturation (window 600 samples) |
| `tb_msc_top` | end to end on a plant model (window 1000 samples): light load raises G (4), ATHD drops from 19.9 % to 5.0 %, source-current error from 0.21 A to 0.09 A rms; a step to 90 % load clips and G returns to 1; frames accepted and refused; every mechanism counted |
| `tb_msc_loads` | 20/50/70/90 % load cases (window 1200 samples): only the 20 % case misses the 16 % target; its gain rises to 4 and the measured THD of the source current falls from 24.7 % to 10.4 %; the other cases (THD 10.2, 7.5, 5.9 %) keep gain 1 |
| `tb_msc_top_full` | all parameters at their defaults: 0.2 s (5000 control periods) at 50 % load, ATHD 8.0 %, source-current error under the band |

`hapf_plant_model` (testbench only) is a deliberately crude plant:

* ideal sinusoidal 110 V supply;
* a load made of an active fundamental, 30 % reactive current and 25 % 5th
  harmonic;
* a compensator current that ramps at ±3000 A/s according to its leg's
  switch.

The plant shows the mechanism. It says nothing about the exact THD figures of
a real HAPF. On this plant ATHD reads about 20–25 % lower than the measured
THD. The controller decides once per sample, so the current overshoots the
band by up to one sample's ramp, and the triangle approximation leaves that
out.

Not simulated: a complete one-minute gain window at the default `WIN`. That
is 1.2·10⁹ clocks, roughly 11 minutes of simulation. Windows of up to 1000
samples were simulated, and the window length is only a counter limit.

## Simulating

With Verilator 5 (the testbenches use timing control and `real`), from the
directory above `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_msc_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/msc_pkg.sv tb/tb_msc_top.sv
./obj_dir/Vtb_msc_top
```

Replace `tb_msc_top` with any testbench name. The package `rtl/msc_pkg.sv`
must come first.

The parameters worth changing:

| parameter | where | default | meaning |
|---|---|---|---|
| `WIN` | `msc_top`, `fpga_controller`, `gain_calc` | 1 500 000 | gain window, samples |
| `N_AVG` | same modules | 500 | averaging length, samples |
| `DIV` | same modules | 800 | sample period, clocks |
| `TARGET` | `athd_calc`, `fpga_controller` | 1600 | ATHD target, 0.01 % |
| `ADC_BITS`, `G_MAX` | `msc_pkg` | 12, 8 | ADC resolution, largest gain |

## Files

* `rtl/msc_pkg.sv`: constants, types, frame builder
* `rtl/msc_top.sv`: FPAAs + ADC + controller
* `rtl/fpga_controller.sv`: digital controller
* `rtl/pq_reference.sv`, `rtl/hysteresis_pwm.sv`, `rtl/athd_calc.sv`,
  `rtl/gain_calc.sv`, `rtl/fpaa_cfg_tx.sv`, `rtl/sample_timer.sv`: the
  controller's blocks
* `rtl/seq_div.sv`, `rtl/seq_isqrt.sv`: bit-serial divider and square root
* `rtl/fpaa_gain_limiter.sv`, `rtl/adc_model.sv`: behavioural models
* `tb/`: testbenches and the plant model
