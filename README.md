# Fixed-point IGBT chip-temperature estimator

A power inverter is usually sized so that its IGBTs reach their maximum
allowed junction temperature at full load. A sensor on the silicon would let
that margin shrink, but it is too expensive for a product. A heatsink or
baseplate sensor only follows the chip slowly, through the module's thermal
time constants. This design instead *computes* the chip temperature in real
time:

1. Each IGBT's conduction and switching losses are worked out from its
   measured output current.
2. These losses drive a third-order thermal impedance model.
3. The model's temperature rise is added to the measured heatsink
   temperature.

The model is a well-known floating-point simulation model (one 100 us step,
interpolated datasheet tables, three R–τ thermal stages). It is recast as
logic for an FPGA:

* **Fixed-point signals:** every signal is an unsigned per-unit fraction in
  [0, 1). It is 16 bits wide in the datapath and 24 bits in the integrators.
* **Fixed step:** the model runs on a fixed step h = 100 us, two decades below
  the shortest thermal time constant (10 ms).
* **Power-of-two table gaps:** in every look-up table, neighbouring
  breakpoints are a power of two apart, so interpolation needs no divider.
* **Forward-Euler integrators:** each thermal stage is a first-order discrete
  integrator.

The conversion aims to stay within 5 % of the floating-point model. In the
included tests the design does so (see *How close it is*).

## Signal flow

```
           step (every h = STEP_CYCLES clocks)
              |
i_adc ---> [ad_block] --i_pu--+--> [cond_loss]   V_ce(I)*I ---------p_con--+
                              |                                             |
cfg_vdc,cfg_fsw,cfg_rg -------+--> [switch_loss] E_sw(I)*k(Rg)*Vdc*fsw p_sw-+
                                                                            v
                                     [power_sum]  p_in = K_T*(p_con + K_SW*p_sw)
                                                                            |
ths_adc -> [ad_block] --ths_pu-------> [delta_t_calc] 3 x thermal_integrator
                                          dt = sum of stages, tj = ths + dt
```

There is one register per box. `dt`, `tj` and `out_valid` appear 5 clocks
after the `step` strobe. At the default 5000-clock step (100 us at an assumed
50 MHz clock) the datapath is idle almost all the time. A design that must
save area could share one multiplier over these clocks. This design keeps
the stages parallel, for clarity.

The chip temperature is **not** fed back into the conduction loss. The V_ce
table takes only the current (valid at 25 °C), as in the fixed-point model
this design follows. Adding that dependency would make the V_ce table
two-dimensional.

## The per-unit number system

This is the part that needs the most care. Each quantity is stored as a
fraction of its own nominal value ("base"). The bases are chosen so that
nothing reaches 1.0 in normal operation and so that the products come out in a
useful base.

| quantity | base | notes |
|---|---|---|
| output current | 176 A | 88 A = 1/2 pu |
| conduction voltage V_ce | 16 V | |
| conduction loss | 16 V × 176 A = 2816 W | product of the two above, no factor needed |
| switching energy | 64 mJ | tables refer to 600 V blocking voltage |
| gate-resistance factor | 2 | factor 1.0 = 0.5 pu |
| blocking voltage `cfg_vdc` | 1024 V | |
| switching frequency `cfg_fsw` | 32 kHz | |
| gate resistance `cfg_rg` | 64 Ω | |
| switching loss | 64 mJ · 2 · (1024/600) · 32 kHz = 6990.5 W | product of the four above |
| thermal-network power `p_in` | 1024 W | |
| temperature, ΔT | 256 K (°C for absolute values) | heatsink and chip share it, so Tj = Ths + ΔT is a plain add |

The losses come out in different bases, so they cannot be added directly.
`power_sum` applies two constant scaling factors, each an unsigned Q2.14
number (`pu_scale`):

* **K_SW = 6990.5 / 2816 = 2.482** moves the switching loss into the
  conduction-loss base.
* **K_T = 2816 / 1024 = 2.75** moves the total into the thermal network's
  base.

Both saturate just below 1 pu, and the `p_saturated` output reports it. A
factor above 1 trades a few bits of headroom for resolution. At 31 A the
instantaneous loss is still around 0.05 pu, which is over 3000 LSB.

All products truncate. Q0.16 × Q0.16 keeps the upper 16 bits, and the
integrator keeps the upper 24 of 48 bits. Truncation tends to make the
estimate slightly low.

To change a base, change its constant in `thermal_pkg` (tables, `K_SW`,
`K_T`) and, for the inputs, the `GAIN` of the matching `ad_block` instance.
Keep every value below 1.0.

## A/D-blocks

Each input passes through an `ad_block`. The block has three jobs:

1. **Discretize:** it samples on the step strobe.
2. **Convert to per unit:** it multiplies the signed input code by
   `GAIN / 2^GFRAC`.
3. **Quantize:** it truncates the result to Q0.16.

Results below 0 become 0, and results of 1 pu or more become 0xFFFF.

* **Current** (1/128 A per code, ±256 A range): gain 65536/(128·176) = 2.909.
  Clamping the negative half-wave to zero leaves the half in which the
  modelled IGBT conducts. The anti-parallel diode is not modelled.
* **Heatsink temperature** (1/64 °C per code): gain 4.

## Look-up tables with power-of-two gaps (`pow2_lut`)

A table is a list of breakpoints `XS` (Q1.16, from 0 to exactly 1.0 pu) and
outputs `YS`. The gaps between breakpoints may differ, but each must be a
power of two. For example, the refined switching-energy table uses gaps of
1/8, 1/4, 1/8 and 1/2. The module:

1. finds the segment with one comparator per breakpoint;
2. computes `YS[k] + ((YS[k+1]−YS[k]) · (x − XS[k])) >>> log2(gap)`.

So the only arithmetic is one signed multiply and a variable shift. The shift
amounts are fixed when the design is built, and a gap that is not a power of
two stops elaboration with an error.

Only some of the table values below are known from the source study. The
others are this design's own:

| table | breakpoints | values | source |
|---|---|---|---|
| switching energy vs current, refined (default) | 0, 22, 66, 88, 176 A | 0, 4.655, 17.99, 25, 53 mJ | first three points from the study; 88 A from its coarse table; 176 A extrapolated |
| switching energy vs current, first (coarse) | 0, 88, 176 A | 0, 25, 50 mJ | first two from the study; last extrapolated |
| V_ce vs current | 0, 5.5, 11, 22, 44, 88, 176 A | 0, 0.95, 1.77, 2.22, 3.09, 4.84, 8.34 V | fitted |
| switching-energy factor vs gate resistance | 0, 8, 16, 32, 64 Ω | 0.8, 1.0, 1.25, 1.7, 1.95 | assumed |

The study publishes its model's cycle-averaged conduction losses, but not its
V_ce table. The V_ce values here were fitted so that this design reproduces
those losses. They are therefore an *effective* voltage, which includes the
share of each PWM period in which the IGBT conducts. They are not datasheet
V_ce(sat) values.

Replace the tables with the module's real datasheet data for real use.
`ESW_IMPROVED = 0` selects the coarse energy table. That table overestimates
the switching loss by about 25–35 %, and it is kept to show the effect of
table resolution.

## Loss calculation

* `cond_loss`: `p_con = V_ce(i) · i`.
* `switch_loss`: `p_sw = E_sw(i) · k(R_g) · V_dc · f_sw`. The switching loss is
  taken to scale linearly with blocking voltage and switching frequency.
  Blocking voltage, switching frequency and gate resistance are static
  configuration inputs, already in per unit. For example, 480 V is 30720,
  10 kHz is 20480 and 8 Ω is 8192.

## Thermal network (`delta_t_calc`, `thermal_integrator`)

The chip-to-heatsink impedance is the sum of three first-order stages,
Z_th(s) = Σ R_i / (1 + s τ_i). Forward Euler turns each stage into

    y[n] = B·y[n−1] + A·x[n−1],   A = h·R_pu/τ,   B = 1 − h/τ,
    R_pu = R[K/W] · 1024 W / 256 K

For τ = 1 s, B = 0.9999. With 16 bits this coefficient would be only about
7 LSB away from 1, and the steady-state truncation error (LSB / (1−B)) would be
large. This is why the integrators, their states and A and B are 24 bits wide.

`delta_t_calc` computes A and B during elaboration, rounded to WI bits. It uses
the functions `coef_a` and `coef_b` in `thermal_pkg`, the step time `STEP_S`,
and the arrays `R_KW` and `TAU_S`. The stage outputs are added with saturation,
and the top W bits of the sum form `dt`.

The module's real R and τ values are not used here. The defaults are assumed:
R = 0.05 / 0.20 / 0.20 K/W and τ = 10 ms / 100 ms / 1 s. The 10 ms shortest
time constant is the only one taken from the study. R_pu must stay below 1,
so each R must be below 0.25 K/W with the 1024 W / 256 K bases. For a module
with a larger thermal resistance, raise the thermal power base and K_T with it.

## Interface and timing (`thermal_model_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (all state to 0) |
| `i_adc` | in | 16 signed | output current, 1/128 A per LSB |
| `ths_adc` | in | 16 signed | heatsink temperature, 1/64 °C per LSB |
| `cfg_vdc`, `cfg_fsw`, `cfg_rg` | in | W | blocking voltage, switching frequency and gate resistance, in pu |
| `step` | out | 1 | one-clock strobe every `STEP_CYCLES` clocks; inputs are sampled on it |
| `i_pu`, `ths_pu` | out | W | sampled inputs in pu |
| `p_con`, `p_sw`, `p_in` | out | W | the two losses and the scaled total |
| `dt`, `tj` | out | W | ΔT (pu of 256 K) and chip temperature (pu of 256 °C) |
| `out_valid` | out | 1 | `dt`/`tj` updated, 5 clocks after `step` |
| `i_clamped` | out | 1 | last current sample clipped to 0 or to 1 pu |
| `p_saturated` | out | 1 | a scaling or the loss sum clipped |

The top has these parameters:

* `STEP_CYCLES` (default 5000) sets the step period in clocks.
* `STEP_S` (default 100e-6) is the model step that the integrator coefficients
  are computed from. `STEP_CYCLES` must equal `STEP_S × f_clk`. Most
  testbenches shorten `STEP_CYCLES` to 8 clocks to simulate faster, without
  changing the model's notion of time.
* `W` (default 16) is the word width.
* `WI` (default 24) is the integrator width.
* `ESW_IMPROVED` (default 1) selects the energy table.

Both A/D-blocks must sample on the same strobe, and both loss paths must have
the same latency. Assertions in the top check both.

## How close it is

Three testbenches compare the design with the results of the source study
and with a floating-point model of the same network. The operating points are
a sinusoidal current with amplitude proportional to frequency, 10 kHz
switching, 480 V and 8 Ω.

| current | switching loss, refined table (study) | conduction loss (study) |
|---|---|---|
| 31 A / 50 Hz | 17.75 W (17.91) | 22.51 W (22.52) |
| 18.6 A / 30 Hz | 9.99 W (9.99) | 10.91 W (10.91) |
| 3.1 A / 5 Hz | 1.63 W (1.51) | 0.40 W (0.41) |

The conduction losses match by construction, because the V_ce table was
fitted to them. The switching losses follow from the published energy table
and the 480 V / 8 Ω operating point. They agree within 1 % at high current and
within 8 % at the smallest current.

With the coarse table the study reports 22.58 W at 31 A, and this design gives
22.39 W.

For a 31 A / 50 Hz current step, ΔT stays within 1 % of the floating-point
model over 0.4 s. At 0.395 s it is 12.24 K against 12.32 K. The fixed-point
result is slightly lower, as truncation predicts.

The same step, run at other widths (largest ΔT error after 50 ms):

| W / WI | largest ΔT error |
|---|---|
| 16 / 24 (default) | 0.7 % |
| 12 / 24 | 4.0 % |
| 16 / 16 | 42 % |
| 20 / 28 | 1.1 % |

The remaining ~1 % comes from forward Euler and sampling, not from bits.
16-bit integrators are not enough. With τ = 1 s, B = 0.9999 is only 7 LSB
away from 1. The slow stage's per-step increment of about 0.2 LSB is then
lost to truncation.

## Departures from the source model

* The step time `STEP_S` and the widths `W` and `WI` are top-level
  parameters, as in the source model. The per-unit bases are fixed constants
  in `thermal_pkg`. The table constants there are written at 16 bits and
  rescaled to `W` during elaboration. The clock rate (50 MHz) is assumed.
* Tables, thermal R and τ, and the operating-point voltage and gate
  resistance are partly assumed (see above).
* The chip-temperature dependence of V_ce is left out, and so is the
  freewheeling diode.
* Reset puts the thermal states at zero, meaning the chip starts at heatsink
  temperature. Clamping, saturation and truncation are this design's choices.

## Files

`rtl/`:

| file | what it is |
|---|---|
| `thermal_pkg.sv` | types, bases, tables, K factors, coefficient functions |
| `step_timer.sv` | step strobe |
| `ad_block.sv` | A/D-block |
| `pow2_lut.sv` | power-of-two-gap interpolating table |
| `cond_loss.sv` | conduction loss |
| `switch_loss.sv` | switching loss |
| `pu_scale.sv` | scaling factor K |
| `power_sum.sv` | loss sum and base change |
| `thermal_integrator.sv` | one discrete thermal stage |
| `delta_t_calc.sv` | third-order network and Tj |
| `thermal_model_top.sv` | the whole estimator |

`tb/`:

* One self-checking testbench per module (`tb_<module>.sv`).
* `tb_ref_pkg.sv`: the reference model that the testbenches share.
* `tb_thermal_model_full.sv`: default size, with the loss operating points
  and the temperature step. It takes about 30 s.
* `tb_workload_first_table.sv`: the operating points with the coarse table.
* `tb_workload_bitwidth.sv`: the width comparison above.

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/thermal_pkg.sv tb/tb_ref_pkg.sv tb/tb_thermal_model_top.sv \
    --top-module tb_thermal_model_top
./obj_dir/Vtb_thermal_model_top
```

Replace the testbench file and the top-module name to run another testbench.
