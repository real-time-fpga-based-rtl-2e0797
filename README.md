# Real-time FPGA emulator of a DFIG wind-turbine converter

This design is a hardware-in-the-loop (HIL) plant model. A real converter
control board for a 2.5 MW, 690 V, 50 Hz doubly-fed induction generator
(DFIG) drives it with the same signals it would send to a real turbine:

- the 12 IGBT gate signals of the grid-side converter (GSC) and the
  rotor-side converter (RSC);
- the DC-link precharge, GSC contactor, stator contactor and chopper
  commands.

Every 5 µs the FPGA advances a switched electrical model of the whole
power stage. That model covers:

- the grid;
- the precharge rectifier;
- the GSC and its choke;
- the DC link with chopper;
- the RSC;
- the rotor dv/dt filter;
- the DFIG itself;
- the stator RC filter.

Each step, it returns what the board's sensors would measure: voltages,
currents and the DC-link voltage. Eight of these are also scaled into
±10 V analog-output DAC words.

Beside the model, two more parts run in the FPGA:

- an incremental encoder simulator on its own 100 MHz clock, which gives
  the board its A/B/Z speed feedback;
- two logging channels that stream selected model variables, as IEEE
  single-precision values, into DMA FIFOs towards a host.

The wind turbine and the gearbox are not part of this RTL. The rotor speed
arrives as an input (`wr`). The filtered torque and powers go back out
(`te_f`, `ps_f`, `qs_f`) for a turbine model running elsewhere.

## The model step and its timing

`step_timer` divides the 40 MHz clock by `TICKS` = 200. That gives one
`step_en` strobe every 5 µs, a 200 kHz model rate. The control board's own
loop runs at 142.8 µs with a 3.5 kHz PWM, so one PWM period spans about 57
model steps.

All model state sits in registers that load only on `step_en`. These are:

- the integrator states (inductor currents, capacitor voltages and machine
  fluxes);
- the angles;
- the filter histories.

Everything between those registers is combinational. This includes the
switching functions, the voltage equations, the Park transforms, the
flux-to-current algebra and the per-unit scaling. It is meant to be
constrained as a 200-cycle multicycle path. Outputs are valid from the
clock after a strobe until the next one.

This way of organising the model is what makes it cheap. A few hundred
multipliers do all the work once per step, and no scheduler or pipeline is
needed. The cost is a long combinational path, which a timing constraint
has to accept.

Gate inputs are sampled at the step edge, so PWM edges are resolved to
5 µs. The logging channels and the encoder are fully synchronous, single
cycle logic.

## Number formats

Everything is defined in `rtl/hil_pkg.sv`.

| type | format | use |
|------|--------|-----|
| `fx_t` | signed Q16.16 (±32768, resolution 1.5e-5) | every signal |
| `coef_t` | signed Q8.24 | step-scaled coefficients (`TS*R/L`, `TS/C`, …), computed from `real` parameters at elaboration |
| `st_t` | signed Q16.32, 48 bit | integrator states, so that tiny per-step increments (slow time constants at a 5 µs step) are not lost |
| `angle_t` | unsigned 32 bit, 2^32 = one turn | grid, rotor and slip angles, encoder phase |

Products and sums saturate. The converter models work in SI units: volts
and amperes. The machine model works in per unit, with these bases:

| base | value |
|------|-------|
| stator/grid voltage (`VS_BASE`) | 563 V, phase peak of 690 V |
| stator current (`IS_BASE`) | 2953 A |
| rotor current (`IR_BASE`) | 965.6 A |
| rotor voltage | `VS_BASE·IS_BASE/IR_BASE` ≈ 1722 V, so that rotor and stator power share one base |

The Park and inverse-Park blocks carry the base as their `GAIN`. Unit
changes therefore happen exactly where a signal crosses between the
converter and the machine.

## The blocks

### Converter legs: `switching_function`

Each leg becomes a switching function k: 1 means the AC terminal is on
the positive rail, 0 means it is on the negative rail.

| gates | k |
|-------|---|
| upper on | 1 |
| lower on | 0 |
| both off (blanking time, blocked pulses) | set by the freewheeling diode that carries the current, i.e. by the sign of the leg current |
| both on | 1, and the `shoot_through` flag is raised |

Because of the both-off case, the GSC behaves as a diode rectifier while
its pulses are blocked. The DC link can then charge from the grid through
the GSC diodes once the contactor closes.

### Grid side: `grid_source`, `dc_precharge`, `gsc_model`

`grid_source` accumulates the 50 Hz grid angle and applies the grid
amplitude. On `dip_start` it replaces the amplitude with `dip_level` for
`dip_steps` steps. This is used for low-voltage ride-through tests, for
example a 0.2 pu dip.

`dc_precharge` models a transformer plus a half-wave diode path. It
charges the DC link with current `(max(e_abc)·KTR − Udc)/RPRE` while that
is positive. `KTR` is chosen so that the link settles at 896 V from a 690 V
grid. `done` signals that the set-point is reached.

`gsc_model` integrates the three choke currents and the DC-link voltage
with forward Euler. Each phase sees the grid voltage minus the leg voltage
`Udc·(2Ka−Kb−Kc)/3` across its R–L choke. The DC-link capacitor is driven
by these terms:

- the rectified current `Σ K·i`;
- minus the RSC DC current;
- plus the precharge current;
- minus the chopper current `Udc/RCHOP` while the chopper is commanded;
- minus the bleed current of a 220 kΩ discharge resistor.

The choke currents are held at zero while the GSC contactor is open.

### Rotor side: `rsc_model`, `rlc_filter`

`rsc_model` is pure combinational logic. From Udc and the switching
functions it computes the leg, line-to-line and phase voltages, and the DC
current that the RSC draws from the link (`Σ SF·i_r`).

`rlc_filter` is the dv/dt filter between the RSC and the rotor. It is a
series R–L followed by a damped shunt R–C branch in each phase. It is
integrated semi-implicitly: the current is updated first, then the
capacitor with the new current. This keeps the lightly damped
100 µH / 5 µF resonance stable at a 5 µs step.

### The machine: `dfig_model`, `rc_filter_dq`

`dfig_model` is the classical per-unit flux-linkage model. It runs in the
synchronous frame, with the d axis on the grid voltage, and has two modes.

- **`synch = 1` (loaded):** the stator is on the grid. Four flux
  integrators (stator and rotor, d and q) are driven by the stator
  voltage, the rotor voltage, the speed terms `ωe` and `ωe−ωr`, and the
  resistive terms through the mutual flux `Ψm`. The block outputs:
  - currents `(Ψ − Ψm)/Xl`;
  - torque `Ψds·iqs − Ψqs·ids`;
  - stator and rotor P and Q.
- **`synch = 0` (unloaded):** the stator is open. The stator current is
  zero, and only the rotor fluxes are integrated. The stator flux follows
  `Xm/Lr` times the rotor flux. The stator terminal voltage `e_s` is the
  open-circuit EMF. Because the stator flux keeps tracking the rotor flux,
  switching to the loaded mode starts from consistent states.

`rc_filter_dq` is the stator RC filter in the dq frame, including the
`±ωe` cross-coupling terms. It smooths the open-circuit EMF, which becomes
the stator voltage shown to the board while the stator contactor is open.

In `hil_dfig_top` the rotor voltage is converted to dq, in per unit, with
the slip angle `θs − θr`. The rotor angle `θr` integrates `wr`. Stator and
rotor currents go back to abc, in amperes, with `θs` and `θs − θr`.

### Power filters: `lpf_bw`

Torque, stator P and stator Q each pass a first-order Butterworth
low-pass filter at 30 Hz before going to the turbine model:

    y[n] = A·y[n−1] + B·(x[n] + x[n−1])

A = 1072730222 and B = 505751, both in Q2.30, are the bilinear-transform
coefficients for 30 Hz at a 5 µs step. The accumulator is 64 bit (Q16.46),
because B is only 4.7e-4.

### Encoder: `encoder_sim`

This is a numerically controlled oscillator on the 100 MHz clock. A 32-bit
phase accumulator adds `freq`, in periods per clock (Q0.32, signed for
reverse rotation).

| output | rule |
|--------|------|
| A | `(pos + phase_a) < duty` |
| B | `(pos + phase_b) < duty` |
| Z | one pulse every `z_count` lines |

Typical settings: `phase_b` = 0.75 period (B in quadrature), duty = 0.5,
2048 lines. At 1.158 pu speed this gives `freq` ≈ 0.000395 periods per
clock.

### Logging: `fx_to_sgl`, `dma_fifo`, `log_channel`

Each channel works like this:

- It selects `NVAR` of the 32 variables on the top's variable bank with
  `sel`. The list is in `rtl/hil_dfig_top.sv`: DC link, the abc
  quantities, filtered torque and powers, dq currents and voltages,
  chopper and precharge currents, rotor speed.
- At a step it latches them.
- It converts each one to IEEE-754 single precision. `fx_to_sgl` uses
  leading-one detection and truncation.
- It writes them as two 16-bit elements each, upper half first, one
  element per clock.

Channel 1 has 8 variables every 5 µs into 65535 elements. Channel 2 has
16 variables every 5 µs or every 10 µs (`decim`) into 262143 elements.

A sample that does not fit whole into the FIFO is dropped and counted
(`missed`). The FIFO's sticky `overflow` alarm stays set until
`alarm_clr`. The FIFO read port has one clock of latency (`rd_valid`).
Only the FPGA side of the DMA channel is modelled. The host drains the
FIFO through `rd_en`.

### Breakers and check-backs: `breaker_status`

The board commands four switches and expects a check-back from each:

- the main circuit breaker (MCB), without which the grid voltage is zero;
- the precharge contactor;
- the GSC contactor;
- the stator (synchronisation) contactor, which selects the machine
  model's mode.

From the host panel, an operator can force the last three closed, or trip
the emulator, which opens everything. The resulting states load only on
the step strobe, so a switch never changes in the middle of a model
update. The check-back is exactly the state the model used.

Each converter also gets a pulses-active flag. It stays set while any of
its gates was on during the last 200 steps (1 ms).

### Analog outputs: `ao_scale`

The board reads most feedbacks as analog sensor signals. Eight of them go
to DAC channels:

| channel | signal |
|---------|--------|
| AO0 | grid current |
| AO1–AO3 | rotor currents |
| AO4 | GSC current |
| AO5 | DC link voltage |
| AO6 | grid voltage |
| AO7 | stator voltage |

Each signal is first converted to per unit with its base in the top. The
host then sets a gain per channel, in output volts per pu, and the block
produces a 16-bit two's-complement DAC word for a ±10 V output:

    code = x · gain · 32768 / 10

The words are registered on the step strobe, so they lag the model
outputs by one step. A `clip` flag marks a channel that saturated. Any
up-sampling or further analog processing belongs to the I/O hardware
after this point.

## Where the design departs from the usual textbook form, and why

These points were settled by consistency with the rest of the equation set,
not by copying one formula.

- **Phase coupling in the GSC.** Phases b and c use the same symmetric form
  as phase a: `2Kb−Ka−Kc` and `2Kc−Ka−Kb`.
- **Stator flux equations.** The rotation term is `+ωe/ωb·Ψqs` in the d
  equation. The resistive term is `Rs/Xls·(Ψm − Ψ)`, which is what the
  current definition `i = (Ψ − Ψm)/Xl` implies.
- **RC filter coupling.** The filter's two cross-coupling terms have
  opposite signs, as the physics of a dq rotation requires.
- **Rotor filter loading.** The rotor dv/dt filter is driven by the RSC
  phase voltages, and its output becomes the machine's rotor voltage. The
  rotor current is not fed back into the filter's series branch, so the
  filter's voltage drop under load is not modelled.
- **Assumed component values.** The text gives no value for the choke,
  DC-link, chopper, rotor filter, stator RC filter and machine constants.
  The parameter defaults are typical values for a 2.5 MW machine:
  - Lg = 0.3 mH and Cd = 20 mF;
  - Lr = 100 µH, Cf = 5 µF and Rf = 0.5 Ω;
  - Rs = 0.023, Rr = 0.016, Xls = 0.18, Xlr = 0.16 and Xm = 2.9 pu.

  All of them are parameters and can be overridden.
- **Critical path.** The reference implementation met a 40 ns critical path
  through its generated model. Here the model is one combinational cloud
  per step, so it needs the multicycle constraint described above.
- **Not included:**
  - the turbine and gearbox model;
  - the host software;
  - the up-sampling of the analog outputs on a second I/O card;
  - the interface board (level shifters, amplifiers, fiber optics).

  Their signals are the top's ports.

## Simulating

Every block has a self-checking testbench in `tb/`. Each compares the block
with a real-number model and prints `TB_RESULT checks=N failures=M`. Using
plain verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
        rtl/hil_pkg.sv tb/tb_gsc_model.sv --top-module tb_gsc_model
    ./obj_dir/Vtb_gsc_model

`tb/tb_hil_dfig_top.sv` runs the full design at its default sizes. It plays
a control board through a start-up and operation sequence:

1. MCB closure, then precharge to 800 V;
2. diode charging, then GSC PWM boosting the link;
3. chopper;
4. RSC PWM with the stator open, building the stator EMF;
5. stator contactor closed;
6. a 0.2 pu grid dip;
7. a shoot-through;
8. a forced stator contactor, then a trip that opens everything.

Meanwhile the encoder runs, channel 1 is left unread until it overflows,
channel 2 is read back and decoded, and the eight analog output codes are
checked at every step, including channels driven to full scale. The
testbench counts each of these mechanisms and fails if one never happens. It takes about 25 s on a
workstation (about 42,000 model steps).

The PWM in this testbench is open loop: there is no current controller.
The machine is therefore connected to the grid unsynchronised, and the
stator currents after closing are large. The test checks only that they
stay within range. A closed-loop controller belongs to the device under
test, not to this design.

Reduced parameter sets used by the unit tests:

- `dma_fifo` with 37 elements;
- `log_channel` with 3 of 6 variables and 64 elements;
- `breaker_status` with a 10-step pulse window.

To change a machine or component value, override the parameter on the
block instance in `hil_dfig_top.sv`. All coefficients are recomputed at
elaboration.
