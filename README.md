# Dual self-tuning-filter pq controller for a single-phase shunt active filter

A shunt active power filter (SAPF) is an inverter connected in parallel with
a non-linear load. It injects the load's harmonic and reactive current
itself, so the grid only supplies a sinusoidal current in phase with its
voltage. This RTL is the digital controller of such a filter for a
single-phase 50 Hz grid. It takes samples of the source voltage `us`, the
load current `il`, the DC-link voltage `udc` and the inverter current `ic`.
It produces the gate pulses of the inverter's four switches.

The controller uses instantaneous power (pq) theory. pq theory is defined for
a two-axis (alpha-beta) frame, so each single-phase signal gets a fictitious
second axis: the same signal delayed by a quarter period. The classical
method separates powers with a low-pass filter, which adds phase delay at
50 Hz. This design uses two self-tuning filters (STFs) instead. An STF is a
band-pass tracker with exactly zero phase shift and unity gain at the
fundamental. One STF extracts the fundamental of the voltage, the other the
fundamental of the load current.

The method is the one published by P. G. Bhat, D. R. Shetty, V. N. Jayasankar
and U. Vinatha as "Design and FPGA Implementation of Dual Self-Tuning Filter
based Controller for Single Phase Shunt Active Filter". That publication gives
the structure and equations but no word lengths, sample rate, gains or
hysteresis band. All of those, and the hardware architecture of each block,
are this design's own.

## Signal flow

```
us ─► quarter_delay ─► stf ─► V' ───────────────┬──────────────┐
il ─► quarter_delay ─► stf ─► I'                │              │
          │ I=(Ia,Ib)          │                ▼              ▼
          ├──────────► Ih = I − I' ───────► pq_calc ─► p − u, q ─► ref_current_calc ─► Ia_ref
          └──────────────────────────────────►  ▲        ▲                              │
udc, vref ─► pi_controller ─► u ─────────────────────────┘                              ▼
ic ─────────────────────────────────────────────────► err = ic − Ia_ref ─► hysteresis_ctrl ─► pulse1, pulse2
```

The top module is `sapf_controller`. For each controller sample:

1. `quarter_delay` (two of them) passes the sample on as alpha. It outputs as
   beta the sample from `DELAY_DEPTH` = Fs/(4·50 Hz) = 125 samples earlier.
2. `stf` (two of them) returns the fundamental V' = (Va', Vb') and
   I' = (Ia', Ib').
3. The top subtracts I' from the load current to get the harmonic current
   Ih = I − I'.
4. `pq_calc` forms `p = Va'·Iah + Vb'·Ibh` and `q = Va'·Ib − Vb'·Ia`. p uses
   the harmonic current. q uses the whole load current.
5. `pi_controller` regulates the DC link. The top subtracts its output `u`
   from p.
6. `ref_current_calc` evaluates
   `Ia_ref = (Va'·p − Vb'·q)/(Va'²+Vb'²)` and
   `Ib_ref = (Vb'·p + Va'·q)/(Va'²+Vb'²)`.
   Only `Ia_ref` is a physical current: the single phase is the alpha axis.
7. `hysteresis_ctrl` compares `ic − Ia_ref` with a band of ±HB on every
   `ic_valid`. Below −HB it turns on S1 and S4. Above +HB it turns on S2 and
   S3. Inside the band the switches keep their state.

### What the reference current is

The formulas in steps 4 and 6 give a result that is not obvious. Write
V' = Vm(cos θ, sin θ) and the load's fundamental as Im(cos(θ−φ), sin(θ−φ)).
Take the PI output as zero. Then

    Ia_ref = Iah + Im·sin φ·sin θ

This is the load's harmonic current plus the reactive part of its
fundamental. So `Ia_ref` is the current the filter must supply, and the grid
is left with `is = il − ic`, the active fundamental. A non-zero PI output adds
`−u·Va'/|V'|²`. That is an in-phase term which makes the inverter draw
(u > 0) or deliver (u < 0) active power.

Because of this, the PI error is taken as `e = vref − udc`. A DC link below
its reference gives u > 0, the inverter draws active power, and the capacitor
charges. Take care if you change this sign: the loop only regulates with the
signs as they are.

## The self-tuning filter

Let X = xa + j·xb be the complex input. The STF is

    Y(s) = K / (s + K − j·ω1) · X(s)   ⇔   dy/dt = K·(x − y) + j·ω1·y

This is a complex integrator resonant at +ω1, closed in a loop of gain K. At
ω1 the gain is exactly 1 and the phase exactly 0. Elsewhere the gain falls
roughly as K/|ω − ω1|. Real and imaginary parts give the cross-coupled
structure: s/(s²+ω1²) on the direct paths and ∓ω1/(s²+ω1²) on the cross
paths.

The quarter-period delay makes xb = x(t − T/4). The input sets that sign, so
a 50 Hz input is a positive-sequence phasor and the filter passes it. At the
default K = 50 rad/s, harmonics are attenuated as follows:

| Input | Sequence | Attenuation |
|---|---|---|
| 3rd harmonic | negative | ≈ K/(4ω1) = 4 % |
| 5th harmonic | positive | ≈ K/(4ω1) = 4 % |
| 7th harmonic | negative | ≈ K/(8ω1) = 2 % |

The settling time constant is 1/K = 20 ms.

The RTL discretises the filter in two steps. First a correction,
`u = y + K·Ts·(x − y)`. Then an exact rotation by one sample,
`y_next = e^{jω1Ts}·u`, implemented as four multiplications by cos(ω1Ts) and
sin(ω1Ts). For x = A·e^{jω1kTs} the fixed point is u = x exactly. So
discretisation does not give up the zero-phase, unity-gain property. A plain
Euler step would detune it slightly. The output is `u`, the estimate aligned
with the sample just taken.

## Number formats and timing

- Samples (volts, amperes, watts) are 32-bit Q16.16: range ±32768,
  resolution 1.5·10⁻⁵. Coefficients are Q2.30. Products are rounded to
  nearest and saturated (`sapf_pkg`).
- Each block takes a sample on `in_valid` and pulses `out_valid` when its
  result is ready.
- Latency from `sample_valid`:

  | Result | Clocks after `sample_valid` |
  |---|---|
  | alpha-beta pairs | 1 |
  | STF outputs | 2 |
  | p, q | 3 |
  | `i_ref_valid` | 85 |

  The reference current uses two restoring dividers, one quotient bit per
  clock. They divide an 80-bit numerator magnitude by the 64-bit |V'|², and
  a division takes 82 clocks.
- `sample_valid` pulses must be at least 90 clocks apart. An assertion
  flags a new sample that arrives while a division is still running. At the
  default 25 kHz sample rate this means any clock above about 2.25 MHz.
- The hysteresis comparator has its own strobe `ic_valid` and may run every
  clock. Its pulses are registered, one clock after the compare.
- Reset is asynchronous and active low. Out of reset all four switches are
  off until the current error first leaves the band. The reference is 0
  while |V'|² is 0, which `den_zero` reports.
- While fewer than 125 samples have been written, the delay lines output a
  beta of zero.

## Parameters of the top

| Parameter | Default | Meaning |
|---|---|---|
| `DELAY_DEPTH` | 125 | quarter period in samples, Fs/(4·f1) |
| `STF_KTS` | 2147484 | K·Ts in Q2.30 (K = 50 rad/s, Ts = 40 µs) |
| `STF_COS`, `STF_SIN` | 1073657046, 13492683 | cos, sin of ω1·Ts = 2π·50·40 µs, Q2.30 |
| `PI_KP` | 1310720 | Kp = 20, Q16.16 |
| `PI_KITS` | 42949673 | Ki·Ts = 1000·40 µs, Q2.30 |
| `PI_UMAX` | 131072000 | output and integrator limit, 2000 (Q16.16) |
| `HB` | 13107 | hysteresis half-band, 0.2 A (Q16.16) |

The fixed parameters come from the application: 50 Hz grid, 30 Vrms source
and a 60 V DC-link reference (`vref` is an input port). The rest are this
design's choices: sample rate, K, Kp, Ki, HB, word formats, the output limit
and the division method.

If you change the sample rate, recompute `DELAY_DEPTH`, `STF_KTS`, `STF_COS`,
`STF_SIN` and `PI_KITS` from the formulas in the table. A Q2.30 value is
round(x·2³⁰).

25 kHz was chosen over lower rates because the reference current is held for
a whole sample. In the closed-loop test, 10 kHz gave about 7 % source-current
THD and 25 kHz about 2.5 %.

## Departures and points to check

- The published description of q also defines the fundamental load
  currents Ia', Ib', but its q equation and block diagram use the load
  current itself. The RTL follows the equation and the diagram.
- The PI error sign is derived from the reference-current equations, as
  explained above. It is not stated directly.
- These are additions with no counterpart in the method itself:
  - the output limit of the PI controller;
  - the zero-denominator rule;
  - saturation of the quotient;
  - the all-off reset state of the switches.
- No dead time is inserted between the two switches of a leg. The two
  pulses are complementary once switching has started. An assertion checks
  that they are never high together.
- Sensing, scaling to Q16.16 and the power stage are outside the RTL.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares the block
against floating-point arithmetic written from the equations above, not from
the RTL.

- `quarter_delay_tb`: checks the exact delay and the zeros during fill-up.
- `stf_tb`: feeds a 40 V fundamental with 20 % fifth and 10 % seventh
  harmonic. The output must match a model to 0.01 V and the true
  fundamental to 2 % after 0.2 s.
- `pq_calc_tb`: random operands, two LSB tolerance.
- `pi_controller_tb`: DC-link steps, output sign, saturation.
- `ref_current_calc_tb`: random operands, 10⁻⁴ A tolerance, 82-clock
  latency, zero voltage, overflow.
- `hysteresis_ctrl_tb`: band edges, holding, enable, random sequences.

`sapf_controller_tb` runs the top at its default parameters for 0.8 s of
plant time, closed around a floating-point power circuit:

- a 30 Vrms source;
- a load with 27 % THD;
- a 5 mH inductor;
- inverter legs fed from a prescribed DC-link voltage.

It goes through an ideal source, a 50 % load decrease, DC-link dips above and
below 60 V, and then a 100 % load increase together with a distorted source
(7 % fifth, 3.87 % seventh harmonic). It checks every reference current
against a floating-point model of the whole chain; the largest difference is
below 1 mA. It also checks the extracted fundamentals and the tracking of
`ic`. The measured source-current THD is 2.5 %, 2.8 % and 2.5 % in the three
phases, and each must be under 5 %. Finally it counts that every mechanism
occurred: zero-voltage start-up, both switching transitions, holds in the
band, both load steps, the distorted source, and PI outputs of both signs.
The simulation takes a few seconds.

`sapf_dclink_tb` closes the DC-link loop as well. The link is a 2.35 mF
capacitor with a 300 Ω loss resistor, charged and discharged by the inverter
current. It starts precharged to 52 V. The PI controller brings it to 60 V.
The test then applies a 50 % load decrease at 0.6 s, and a 100 % load
increase together with the distorted source at 0.9 s. The mean of the link
voltage over one cycle must be within 0.5 V of 60 V before each event and
again 0.1 s after it, and the source THD must stay under 5 %. The measured
results:

- mean link voltage 0.1 s after the load steps: 59.54 V and 60.47 V;
- ripple: about ±0.4 V at 100 Hz;
- source THD: about 3 %.

The PI gains were chosen on this model. Larger gains settle faster but pass
more of the 100 Hz ripple into the reference. For example, Kp = 30 and
Ki = 2000 raise the THD to about 4 %.

The plant model is an idealised test fixture: a prescribed DC-link voltage,
no switching losses and no sensor delay. It is not a model of a particular
power stage.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal --top-module sapf_controller_tb \
        -y rtl -y tb +libext+.sv -Irtl rtl/sapf_pkg.sv tb/tb_util_pkg.sv \
        tb/sapf_controller_tb.sv -o sim
    ./obj_dir/sim

Replace the top module and the last source file for the other testbenches.
Each ends with `TB_RESULT checks=N failures=M`.

## Files

- `rtl/sapf_pkg.sv`: formats, `ab_t` alpha-beta struct, fixed-point helpers
- `rtl/quarter_delay.sv`: 90° delay line forming the alpha-beta pair
- `rtl/stf.sv`: self-tuning filter
- `rtl/pq_calc.sv`: instantaneous active and reactive power
- `rtl/pi_controller.sv`: DC-link PI controller
- `rtl/ref_current_calc.sv`: reference current equations, with
  `rtl/seq_divider.sv`
- `rtl/hysteresis_ctrl.sv`: hysteresis current controller and gate pulses
- `rtl/sapf_controller.sv`: top
- `tb/tb_util_pkg.sv`: real/fixed conversion, STF and PI reference models
- `tb/*_tb.sv`: testbenches
