# Real-time PMSM drive emulator with inter-turn stator faults

This is synthesizable SystemVerilog for a hardware-in-the-loop (HIL) emulator
of a permanent-magnet synchronous machine (PMSM) and its inverter. A motor
controller under test drives six gate signals into the emulator. The emulator
sends back the phase currents and the rotor angle, just as a real inverter and
machine would. What sets it apart from an ordinary motor model is this: the
machine can carry a short circuit between a few turns of one stator phase, and
the model stays accurate under magnetic saturation. So fault-detection and
post-fault control algorithms can be developed without damaging a real
machine.

Two ideas make this possible at a 1.25 us step:

* **Flux states, with current looked up.** The machine is integrated in terms
  of its flux linkages, psi_d, psi_q and psi_f, where psi_f is the flux of the
  shorted turns. The nonlinear link from flux to current (saturation, slotting,
  harmonics, the fault coil) is precomputed offline from finite-element
  analysis. It is stored as three four-dimensional tables:
  i_d, i_q, i_f = f(psi_d, psi_q, psi_f, theta).
  The emulator never has to invert a nonlinear relation at run time.
* **Parallel subsystems on a common step.** The angle, the flux integration,
  the table interpolation and the output transform all run at the same time.
  Each one uses the results the others produced in the previous step. The
  step is as long as the slowest subsystem, 50 clocks at 40 MHz.

The structure, the equations, the table sizes and the cycle budgets follow a
published FPGA design. Word formats, handshakes, the table-load port, the
generator-load mode and several details that the source leaves open are this
design's own choices. They are listed in
[Where this design makes its own choices](#where-this-design-makes-its-own-choices).

## Data flow

```
 pwm_in[5:0] --> pwm_sampler --> converter_emulation --> v_alpha, v_beta --+
   (5 MHz samples)     (switching state -> phase voltages)                  |
                                                                            v
 omega_e, dt --> angle_calc --------- sin/cos(theta) ----------------> flux_equations
                 (theta, eq.9 shift)  sin/cos(theta_f + 2pi/3) ------>  psi_d, psi_q, psi_f
                      |   theta_fault                                       |
                      v                                                     v
                 current_maps  <----------------------------------------- psi
                 (3 x 4D tables) --> i_d, i_q, i_f --> flux_equations (next step)
                      |
                      v
                 dq_to_abc --> i_a, i_b, i_c --> output_measure --> dac_code, dac_stb
                                                       theta ----> enc_angle
                 i_q, sin/cos(2 theta) --> fourier_tracker --> fault_mag
```

`step_scheduler` sends one `step` pulse every 50 clocks to `angle_calc`,
`flux_equations`, `current_maps` and `dq_to_abc`. Each of them captures its
inputs on that pulse. Each finishes well before the next pulse:

| subsystem       | module           | cycles here | budget in the source design |
|-----------------|------------------|-------------|-----------------------------|
| current maps    | `current_maps`   | 13          | 50                          |
| angle + CORDIC  | `angle_calc`     | 38          | 43                          |
| flux equations  | `flux_equations` | 4           | 8                           |
| dq to abc       | `dq_to_abc`      | 3           | 10                          |
| output          | `output_measure` | period 349  | 349                         |

The top module has an assertion that fires if any subsystem is still working
when the next step begins. The source design's step is fixed by its 50-cycle
interpolation, so the step here stays at 50 clocks (`STEP_CYCLES`) even though
the interpolation is faster. This keeps the emulated timing the same.

Because the subsystems work in parallel, every dependency adds one step of
delay. For example, the currents used in the flux update of step k come from
the flux of step k-1. At 1.25 us this is far below the machine's electrical
time constants.

## The machine model

Phase c is split into a healthy part and a faulted part. A fraction `mu` of
its turns is shorted through a resistance `Rf`, and `i_f` is the current in
the shorted loop. In the rotor dq frame, the forward-Euler update of each
step is:

```
psi_d += dt * ( v_d - Rs*i_d + w*psi_q + 2/3*mu*Rs*sin(thf)*i_f )
psi_q += dt * ( v_q - Rs*i_q - w*psi_d + 2/3*mu*Rs*cos(thf)*i_f )
psi_f += dt * ( Rf*i_f - mu*Rs*( i_d*sin(thf) + i_q*cos(thf) - i_f ) )
thf    = theta_fault + 2*pi/3
```

`w` is the electrical speed. It is an input: the emulated machine turns at a
speed set from outside, as on a dynamometer. `v_d` and `v_q` depend on the mode:

* **Motoring** (`cfg.gen_mode = 0`): the Park transform of the inverter
  voltages `v_alpha`, `v_beta`.
* **Generator** (`cfg.gen_mode = 1`): the terminals feed a balanced resistive
  load, so `v_d = -R_load*i_d` and `v_q = -R_load*i_q`.

**Moving the fault to another phase.** The tables describe a fault in phase c
only. A fault in phase a or b is emulated by shifting the angle at which the
tables and the fault terms are evaluated: `theta_fault = theta - 2*pi/3` for
phase a, `theta - 4*pi/3` for phase b, and `theta` for phase c. The Park and
inverse-Park transforms keep the unshifted angle. Relabelling the phases
changes neither i_d nor i_q, so only the fault-dependent parts need the shift.

**Healthy machine.** With `cfg.fault_en = 0`, `i_f` is taken as zero
everywhere and `psi_f` is held at `cfg.psi_f0`. Load `psi_f0` with the
fault-coil flux that gives zero fault current.

## The current tables and their interpolation

This is the heart of the design and the part that takes the most care.

**Grid.** Each table has 12 points along each flux axis and 61 points in
angle, so 12 x 12 x 12 x 61 = 105,408 entries. The three tables together fill
most of a mid-size FPGA's block RAM. The 61 angle points span one electrical
revolution, with both ends stored. Each flux axis is set by two run-time
inputs (`map_axis_t`): an origin `psi_min` and an inverse step `inv_step`.
With those, tables of other machines can be loaded without rebuilding.

**Grid coordinates** (`current_maps`, pipeline stages 1 and 2):

```
g_flux  = (psi - psi_min) * inv_step       clamped to [0, 11]
g_theta = theta / 2^32 * 60
```

Each coordinate splits into an integer index and a 16-bit fraction. A point
beyond the grid is clamped to the edge cell, with fraction 1.0 at the top
edge. So the fraction fields are 17 bits wide, and 65536 means 1.0.

**Flattening.** FPGA memories are one-dimensional. The base node of the cell
containing the point sits at

```
base = ix + 12*iy + 144*iz + 1728*it
```

Its four neighbours along the axes sit at the fixed offsets
x = 1, y = 12, z = 144 and t = 1728.

**Interpolation** (`interp4d_map`). Five words are read from one memory port,
one per clock: the base node `I0` and the four axis neighbours `Ix`, `Iy`,
`Iz`, `It`. The result is

```
I = I0 + fx*(Ix - I0) + fy*(Iy - I0) + fz*(Iz - I0) + ft*(It - I0)
```

This is a first-order expansion about the base node, with one correction
term per axis. It is exact for any function that is affine in the four
coordinates. It is not full multilinear interpolation, which would need 16
nodes: the cross terms between axes are dropped. The testbenches rely on the
exactness for affine tables.

**Entries** are signed 16-bit currents with 6 fraction bits (range +-512 A,
LSB 15.6 mA). Outputs are Q16.16 amperes. To change the range, change
`ENTRY_W` and `MAP_FRAC`. The three tables take 5.06 Mbit at 16 bits. That is
slightly more than the 4.8 Mbit of block RAM in a Spartan-6 LX150, which the
original design filled almost completely. On that device, set `ENTRY_W` to 15
(4.74 Mbit).

**Loading.** The host writes the tables through `lut_we`, `lut_sel`
(0 = i_d, 1 = i_q, 2 = i_f), `lut_addr` and `lut_wdata`, using the flattened
address above, normally while `run` is low. The table contents come from
offline finite-element analysis of the machine, which is outside this RTL.

## Angle and trigonometry

`angle_calc` keeps the electrical angle as a 32-bit binary angle (2^32 = one
turn) with 16 extra guard bits. Each step it adds `omega_e * dt`, converted
to turns. Two `cordic_sincos` units then run side by side for 33 clocks:

* one on `theta`, giving sin and cos for the Park transforms;
* one on `theta_fault + 2*pi/3`, giving sin and cos for the fault terms.

sin(2 theta) and cos(2 theta) for the fault indicator come from the first
unit by the double-angle identities. With 30 iterations (`ITER`) the CORDIC error
stays below 1e-6, which the testbench checks.

## Inverter, outputs and fault indicator

* `pwm_sampler` passes Q1..Q6 through two-flop synchronisers and samples them
  every 8 clocks (5 MHz). Q1/Q3/Q5 are the upper switches of legs a/b/c. Dead
  time is not modelled: only the upper switch decides the leg state.
* `converter_emulation` numbers the switching state 0..7: 0 = (0,0,0),
  1 = (1,0,0), 2 = (1,1,0), 3 = (0,1,0), 4 = (0,1,1), 5 = (0,0,1),
  6 = (1,0,1), 7 = (1,1,1) for legs (a,b,c). Each state gives phase voltages
  in thirds of Vdc. The output is `v_alpha`, `v_beta`, using the
  amplitude-invariant Clarke transform.
* `dq_to_abc` applies the inverse Park and inverse Clarke transforms to
  i_d and i_q.
* `output_measure` samples the three phase currents every 349 clocks
  (8.725 us, about 115 kS/s). It scales them by `dac_gain` (codes per ampere),
  saturates them to signed 16-bit DAC codes and pulses `dac_stb`. The DAC
  itself is external. `enc_angle` is the top 16 bits of the angle.
* `fourier_tracker` is a fault indicator. A stator turn fault raises the
  third harmonic in the phase currents, which shows up as a second harmonic
  in i_q. For each sample (strobe `fault_sample`), the tracker:
  1. multiplies i_q by sin(2 theta) and by cos(2 theta);
  2. keeps running sums of both products;
  3. subtracts the sums from `FD_WINDOW` samples earlier, which gives a
     sliding window;
  4. scales by `fault_f` (2/window for amplitude);
  5. outputs the root of the sum of squares, `fault_mag`.

  The window must span whole periods of the second harmonic for a clean
  reading. Samples must be at least 41 clocks apart, the length of the
  tracker's pipeline and square root; an assertion checks this. In the source design this indicator runs in the controller; here
  it sits beside the emulator and takes the emulated i_q.

## Number formats

All internal variables are 32-bit fixed point (`pmsm_pkg`):

| quantity                     | format            |
|------------------------------|-------------------|
| current, voltage, speed, R_load | Q16.16         |
| flux linkage                 | Q4.28 Wb          |
| Rs, Rf                       | Q8.24 ohm         |
| sin, cos, mu                 | Q2.30             |
| dt                           | unsigned Q0.32 s  |
| angle                        | 32-bit binary angle |

The flux format is fine enough that one step's increment, around 1e-4 Wb, is
resolved to about 1e-5 of itself.

## Top-level interface (`pmsm_hil_emulator`)

| port | meaning |
|------|---------|
| `clk`, `rst_n`, `run` | 40 MHz clock; asynchronous active-low reset. `run` low stops the steps and holds the flux at `cfg.psi_*0` |
| `pwm_in[5:0]` | Q1..Q6 from the controller |
| `dac_code[3]`, `dac_stb`, `enc_angle` | to the DAC and the controller |
| `cfg` (`emu_cfg_t`) | Rs, Rf, mu, fault_en, fault_phase, dt, Vdc, omega_e, gen_mode, r_load, psi_d0/q0/f0 |
| `axis_d/q/f`, `lut_*` | table axes and table load port |
| `fault_sample`, `fault_f`, `fault_mag`, `fault_mag_valid` | fault indicator |
| `step`, `step_count`, `sw_state`, `v_alpha/beta`, `theta`, `psi[3]`, `i_dqf[3]`, `i_abc[3]` | model state for monitoring |

Parameters and their defaults: `STEP_CYCLES` 50, `SAMPLE_DIV` 8,
`DAC_PERIOD` 349, `N_PSI` 12, `N_THETA` 61, `ENTRY_W` 16, `MAP_FRAC` 6,
`CORDIC_ITER` 30, `FD_WINDOW` 1024.

## Where this design makes its own choices

Compared with the source design, these points are this design's own. Weigh
them when you judge how far the model can be trusted:

* All fixed-point splits, the CORDIC form, and the pipelining inside each
  subsystem. The source gives only "32-bit fixed point" and cycle counts.
* The interpolation uses the five-node first-order form (base node plus one
  neighbour per axis). The source describes its look-up both as this
  five-node form and as "four successive one-dimensional interpolations".
  The five-node form was built.
* The angle grid spans one electrical revolution. The order of the axes in
  the flattened address is psi_d fastest. Points outside the table are
  clamped.
* Healthy operation is selected by `fault_en`: i_f is zero and psi_f is held.
* Generator mode uses an ideal resistive load. True open circuit (no load) is
  not available. A large `r_load` approximates it, provided `r_load*dt/L`
  stays below 1. Forward Euler alone would allow 2, but the one-step delay
  between flux and current halves the range. With L = 1 mH and the 1.25 us
  step, 500 ohm runs and 1000 ohm diverges.
* The source's block diagram multiplies the i_d term of the fault-coil
  equation by cos(theta + 2pi/3), but its equations use sin. The equations are
  followed, as written in [The machine model](#the-machine-model).
* The fault current does not enter the terminal currents. Only i_d and i_q
  are transformed to abc.
* The angle word is 16 bits, as in the block-diagram version of the set-up.
  One of the source's set-ups uses 8 bits; change `ENC_W` in
  `output_measure` if needed.
* The PWM inputs pass a synchroniser, adding 2 clocks of delay.
* The fault indicator is placed in the emulator rather than in the
  controller.

Not included: the DAC, the controller under test (FOC, PWM generation), the
host user interface, and the offline finite-element flux maps with their
inversion. The host is represented by the `cfg` and `lut_*` ports.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares against
values worked out independently in floating point, prints
`TB_RESULT checks=N failures=M` and has a watchdog:

* `tb_converter_emulation`: all 8 leg states at several DC-link voltages.
* `tb_pwm_sampler`: 5 MHz strobe period, synchroniser delay.
* `tb_cordic_sincos`: quadrant edges and random angles to 1e-6; latency.
* `tb_angle_calc`: the integrated angle, the shift for each faulted phase,
  and all six sines/cosines; the 43-cycle budget.
* `tb_flux_equations`: equations (a)-(c) step by step, healthy, faulted and
  generator mode; the 8-cycle budget.
* `tb_interp4d_map`: random tables and fractions on a small grid against the
  five-node formula.
* `tb_current_maps`: the full 12x12x12x61 grid, loaded with affine tables.
  Checks interior points, clamping and the whole angle range; the 50-cycle
  budget.
* `tb_dq_to_abc`, `tb_output_measure`, `tb_step_scheduler`,
  `tb_fourier_tracker`.
* `tb_pmsm_hil_emulator`: the whole design at its default parameters. It
  loads all three full-size tables and runs about 14,000 steps:
  * a generator into 2.2 ohm, healthy and then with a fault in phase c;
  * then motoring from sine-triangle PWM at 10 kHz, with the fault moved to
    phase a and then b.

  Every step is compared with a floating-point model of one step of the
  parallel schedule. The test also counts that each mechanism occurred: all 8
  switching states, PWM samples, the fault switch-on, each faulted phase,
  both modes and the switch between them, DAC updates and indicator updates.

* `tb_generator_sweep`: the whole design at its defaults, in generator mode,
  at 500, 1500, 3500, 5500 and 6500 r/min of a 6-pole machine. It uses
  2.2 ohm, 0.69 ohm and a near-open 500 ohm load. At each point it runs
  healthy, then switches a phase-c fault on, with the same per-step
  reference. It prints the peak and rms fault current at each point.

The end-to-end tests check the wiring and the arithmetic against the
equations above. They do not check against a real machine's behaviour: the
tables in the tests are synthetic, not finite-element data.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/pmsm_pkg.sv tb/tb_util_pkg.sv tb/tb_pmsm_hil_emulator.sv \
    --top-module tb_pmsm_hil_emulator -o sim
./obj_dir/sim
```

Replace the testbench name to run another test; every testbench needs
`rtl/pmsm_pkg.sv` and `tb/tb_util_pkg.sv` first. The full-size end-to-end run
takes a few seconds. Each file holds one module or package, named after the
file. `-y rtl` lets Verilator find the submodules.
