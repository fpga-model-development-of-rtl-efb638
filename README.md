# FPGA PMSM drive model for hardware-in-the-loop testing of an inverter ECU

An inverter control unit (ECU) for an electric car is normally tested on the
road or on a motor test bench. In a hardware-in-the-loop (HiL) rig the ECU's
high-voltage power stage is removed and everything behind its logic pins is
simulated: the IGBT bridge, the permanent-magnet synchronous machine (PMSM),
the rotor's mechanics, the resolver and the current sensors. The ECU switches
its gates at around 10 kHz and expects phase currents that respond within
microseconds, which is too fast for the 1 ms real-time PC of the rig. So the
fast part runs on an FPGA. This RTL is that FPGA model, written in
SystemVerilog.

The structure follows the thesis *FPGA Model Development of PMSM for
Hardware-in-the-Loop Testing System* (CTU Prague, 2020). That design has six
submodels: inverter, coordinate transformation, PMSM, mechanics, resolver and
I/O. It then adds inductance tables that depend on the rotor angle. The thesis
gives the equations and the block structure but no RTL, step time or number
formats, so those parts are this design's own. They are marked as such below
and in each file's header.

```
           gate_in[5:0]          exc_in            ao[0..2]        ao[3..4]
 ECU  ----------+-------------------+-------------------^---------------^----
                |                   |                   |               |
            io_model (2-flop sync)  |        current sensors    resolver SIN/COS
                |                   |        u = k*i + q, clamped       |
                v                   v                   |               |
          inverter_model        resolver_model <--------+---- sin/cos(theta_r)
          ua,ub,uc | ^ ea,eb,ec                         |
                   v |                                  |
              abc_to_dq   dq_to_abc (emf)   dq_to_abc (currents) --> ia,ib,ic
               ud,uq |      ^ uemf               ^ id,iq
                     v      |                    |
                   pmsm_model  <-- Ld,Lq,Ts/Ld,Ts/Lq --  ldlq_tables (3D)
                     | torque                               ^ id,iq,theta_e
                     v                                      |
                  mechanic_model --> wm, rpm, theta_m, theta_e
                                          |
                           cordic_sincos x2 (theta_e, theta_r)

  param_regs: 32-bit register bus to the real-time processor (parameters,
  load torque, battery voltage, table loading, read-back)
```

## One model step

Everything is synchronous to one clock. `step_timer` issues a one-clock strobe
every `STEP_CLKS` clocks. The default is 100, or a 1 µs step at 100 MHz. Only
the two integrating blocks hold state that belongs to the physics:

* `pmsm_model` holds the d/q stator currents.
* `mechanic_model` holds the rotor speed and angle.

They update together on the strobe, and each uses the previous step's values
of the other. This is an explicit (forward) Euler scheme across the whole
loop. All other blocks are registered pipelines that run every clock. Between
two strobes they settle to the new state:

| path | latency (clocks) |
|---|---|
| angle → CORDIC sin/cos | 26 |
| gates → synchroniser → inverter → abc_to_dq | 5 |
| id/iq → table lookup | 3 |
| d/q → phase currents / back-EMF | 2 |

The longest chain is about 35 clocks, which is why `STEP_CLKS` must stay above
about 40. Read-back values are stable from about 40 clocks after a strobe
until the next strobe. The test bench reads them in that window. `step_o`
brings the strobe out so the processor side can do the same.

The integration order is worth knowing when comparing with an offline
simulation:

* The angle advances with the speed from *before* the step.
* The currents use the voltages, speed and inductances present at the strobe.

## Fixed-point formats

Every quantity is a 32-bit word. There are three formats:

| type | format | used for |
|---|---|---|
| `q16_t` | signed Q15.16 | volts, amperes, newton-metres, rad/s (range ±32768) |
| `q30_t` | signed Q1.30 | inductance (H), flux (Wb), resistance (Ω), Ts/L, sin/cos, K |
| `ang_t` | unsigned 32-bit | angle; 2^32 is one full turn, so it wraps by itself |

Some quantities get their own scaling:

* `Ts/J` is Q23.40, because it is around 1e-3 or smaller.
* The angle increment constant `kth` is Ts/(2π)·2^48. Speed (Q16) times `kth`
  is then the angle step in units of 2^-64 turn.
* The current integrators keep 16 extra fraction bits (Q31.32). The speed
  integrator is Q23.40 and the angle accumulator is 64 bits wide. Increments
  of a few millionths per step are therefore not lost.

All products go through `pmsm_pkg::fmul(a, b, shift)`, which keeps a 64-bit
intermediate and returns the low 32 bits of the shifted product. Nothing
saturates except the sensor outputs and the table indices. Parameters that
would overflow a format are the processor's responsibility. An example is a
table inductance at or above 2 H.

## The machine model

`pmsm_model` integrates the d/q voltage equations of a PMSM with interior
magnets (Ld ≠ Lq):

```
Ld did/dt = ud - Rs id + w Lq iq
Lq diq/dt = uq - Rs iq - w Ld id - w Psi_p
```

Each step it computes `i += (Ts/L) * rhs`. The processor supplies Ts/Ld and
Ts/Lq already divided, so the FPGA needs no divider. In table mode every table
entry carries both L and Ts/L for the same reason. Every clock it also forms:

* the torque `M = 3/2 K (Psi_p + (Ld - Lq) id) iq`
* the back-EMF `uemf = w Psi_p`

The torque equation has no pole-pair factor, and `kt` is Q1.30, so it cannot
hold 3/2·K·p for a machine with several pole pairs. For such a machine the
factor p moves into the mechanics. Write Ts/J multiplied by p into `R_TSJ`,
and the load torque divided by p into `R_MLOAD`. The speed then follows the
true shaft equation, and the read-back torque is the shaft torque divided by
p.

When Ld and Lq come from the angle-dependent tables, they enter these same
equations as they are. The equations have no dL/dt term. This is the thesis's
formulation, and it is the first thing to revisit if the model is extended.

`mechanic_model` integrates `J dΩ/dt = M - M_load`. The load torque comes from
the processor, where the vehicle model runs. From the speed it forms:

* the mechanical angle
* the electrical speed and angle (times the pole-pair count, plus an offset
  register for the resolver offset)
* the speed in rpm

The coordinate transformations use the thesis's Clarke form for a balanced
star connection: `x_alpha = 3/2 K xa`, `x_beta = K(√3/2 xa + √3 xb)`. This is
followed by the usual rotation into the rotor frame. `dq_to_abc` is the
matrix inverse. It needs `2/(3K)` as a register, and produces:

* the phase currents, for the sensors and the inverter's diode logic
* the phase back-EMFs, for the inverter's open-leg case

With K = 2/3 both gains (`kt` = 3/2·K and `kinv`) are 1.

`cordic_sincos` produces sine and cosine with a 24-stage pipelined CORDIC
(error below 2e-6). Two instances run: one for the electrical angle and one
for the resolver angle.

## Angle-dependent inductance tables

Magnetic saturation makes Ld and Lq depend on the currents. Slotting and
winding distribution add ripple over the rotor angle. The thesis handles both
with 3D tables, `L = f(id, iq, θ)`. It fills them as the product
`L_2D(id, iq) · L_norm(θ)`, where:

* `L_2D` is the saturation map.
* `L_norm` is a normalised angle profile (mean 1), fitted from measured
  torque ripple.

The angle changes every step, so the lookup has to be on the FPGA.

`ldlq_tables` holds one table per axis. The defaults are 16 id points × 16 iq
points × 32 angle sectors, 8192 entries of 64 bits each:

* The current index is `(i >>> 22) + 8`. This is a 64 A grid from −512 A,
  saturated at both edges.
* The angle index is the top 5 bits of the electrical angle.

The entry at the grid point at or below the operating point is used, with no
interpolation. The grid size, spacing and the nearest-lower rule are this
design's choices. The thesis gives no table dimensions. Bit 1 of `R_CTRL`
selects table mode. With it clear, the constant Ld/Lq/Ts/Ld/Ts/Lq registers
are used, as in the model without angle-dependent inductance.

## Inverter legs

`inverter_model` turns the six gate signals into phase voltages. Gate 2k is
the high side and gate 2k+1 the low side of phase k (a, b, c). From its two
gates and its current, each leg is in one of six states. Each state gives a
pole voltage against the DC-link midpoint:

| state | condition | pole voltage |
|---|---|---|
| HSD | high side on | +Udc/2 |
| LSD | low side on | −Udc/2 |
| shorted | both on | 0, and the sticky shoot-through flag is set |
| open, current positive | both off, i > Imin | −Udc/2 − Uf (low-side diode) |
| open, current negative | both off, i < −Imin | +Udc/2 + Uf (high-side diode) |
| open, no current | both off, \|i\| ≤ Imin | the phase back-EMF |

The phase voltages applied to the machine are the pole voltages minus their
mean. The six states and their inputs are the thesis's. The inputs are gates,
battery voltage, minimal switching current, diode forward voltage and
back-EMF. The voltage assigned to each state is this design's reading.

Because the model is sampled, an opened leg chatters near zero current. The
current settles within one step's increment of zero, not exactly at zero.

## Resolver and sensors

`resolver_model` produces the SIN and COS winding voltages:
`k·u0sin·carrier·sin θ` and `k·u0cos·carrier·cos θ`. The two amplitudes are
separate registers, so unequal winding gains can be set. The thesis feeds the
excitation into the FPGA as one digital input, so the carrier here is ±1
following that bit: a square-wave carrier. The ECU decodes the angle from the
envelope exactly as with a sine carrier.

The resolver angle is the mechanical angle times the resolver pole pairs, plus
an offset.

`io_model` does two things:

* It synchronises the seven digital inputs: six gates and the excitation.
* It drives the five analogue outputs. Three are current sensors,
  `u = k·i + q` limited to [u_min, u_max]. The defaults are 0.003 V/A, 2.5 V,
  0.5 V and 4.5 V, from the thesis's sensor table. The other two are the
  resolver windings.

Outputs are Q15.16 volts. The DAC and the comparator thresholds belong to the
I/O board and are not modelled.

## Register map and bring-up

`param_regs` exposes one 32-bit register per parameter. The addresses are in
`pmsm_pkg::reg_addr_e`, and the map is this design's own. At reset:

* The model is held in reset (`R_CTRL` bit 0 = 1).
* The sensor registers hold their defaults.
* Everything else is zero.

A typical start:

1. Write `R_RS, R_LD, R_LQ, R_GD (=Ts/Ld), R_GQ, R_PSI, R_K, R_KT (=3/2K),
   R_KINV (=2/(3K)), R_PP, R_TSJ (=Ts/J·2^40), R_KTH (=Ts/(2π)·2^48), R_UDC,
   R_UF, R_IMIN, R_RES_AMP, R_RES_AMPC, R_RES_PP`, and the offsets if needed.
2. Optionally load the tables. For each entry:
   * write `R_TBL_L` (L) and `R_TBL_G` (Ts/L)
   * then write `R_TBL_CMT = {axis(bit 31: 0 = d, 1 = q), 15'b0, address}`

   The address is `{id index, iq index, angle index}`. Each entry takes
   three writes per axis.
3. Write `R_CTRL = 2` to release the model with tables, or `0` without them.
4. Update `R_MLOAD` and `R_UDC` from the vehicle and battery models as they
   run.

The read-back registers `R_IA … R_STATUS` return:

* the phase currents and the d/q currents
* the torque, the d/q voltages and the back-EMF
* the speed, the rpm and the angle
* a status word with the shoot-through flag and the three leg states

## Simulating

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M`. With plain Verilator 5, from the directory
that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/pmsm_pkg.sv tb/tb_hil_fpga_top.sv --top-module tb_hil_fpga_top
./obj_dir/Vtb_hil_fpga_top
```

The block benches compare against floating-point references:

* `tb_pmsm_model`, `tb_mechanic_model`: Euler solutions of the same equations
* `tb_abc_to_dq`, `tb_dq_to_abc`, `tb_cordic_sincos`: the transformations
  evaluated with `$sin`/`$cos`
* `tb_inverter_model`: all 64 gate patterns × 27 current-sign combinations
* `tb_ldlq_tables`: a filled table with saturating indices
* `tb_io_model`, `tb_resolver_model`, `tb_param_regs`, `tb_step_timer`

`tb_hil_fpga_top` runs the whole model at its default size, in a few
seconds. It acts as both the processor and a behavioural ECU, with an
interior-magnet machine of its own choosing: 20 mΩ, 0.2/0.4 mH, 80 mWb,
4 pole pairs, J = 1e-3 kg·m², 800 V. The ECU:

* decodes the rotor angle from the resolver outputs
* decodes the currents from the sensor outputs
* applies six-step commutation with hysteresis current limiting and one step
  of dead time

Every step the bench checks:

* ia+ib+ic = 0
* the sensor equation
* the torque equation, with the table inductances
* the speed against its own integration of the read-back torque
* the d/q voltages against the applied voltage vector
* the decoded resolver angle against the rotor angle

It also checks:

* the standstill current rise in both inductance modes
* current decay through the diodes
* sensor clipping
* the shoot-through flag
* the model reset

It counts each of these mechanisms and fails if one never occurred.

`tb_workload_500rpm` runs the operating point at which the thesis compares its
model with a real test bench: 500 rpm with a 280 Nm torque request. The
machine is again of the bench's own choosing: Psi = 0.15 Wb, 4 pole pairs,
J = 0.08 kg·m². It is chosen so that the 467 A this torque needs stays inside
the sensor range. The ECU side controls each phase current by hysteresis
around sinusoidal references for id = 0. The processor side holds the speed
with a load model that it updates every 0.5 ms. Over 12000 steps at speed,
the bench checks:

* every phase current against its reference
* the resolver angle
* the means of iq, id, shaft torque and rpm

It then repeats the thesis's comparison of the constant-inductance model with
the angle-dependent one. It sets id = −100 A and measures the 6th electrical
harmonic of the torque, once with constant Ld/Lq and once with tables loaded
with L0·(1 + 0.1·cos 6θ):

* With constant Ld/Lq the harmonic is about 0.4 Nm, which is hysteresis
  noise.
* With the tables it is about 3.0 Nm. The expectation from the table contents
  is 3.5 Nm. The difference comes from the ripple of the controlled currents.

The whole bench takes a few seconds.

## Departures and limits

* **Step time, clock, number formats, register map, table grid and lookup
  rule** are not given by the thesis. They are chosen here.
* **No interpolation** in the 3D tables. The nearest-lower grid point is
  used.
* **No dL/dt term** in the machine equations when L varies. This follows the
  thesis's equations.
* **Square resolver carrier.** It follows from the excitation being a single
  digital input.
* **Inverter voltages per state** are this design's reading of the six named
  states. There are no device drops other than the diode forward voltage, and
  no dead-time modelling beyond the gate pattern itself.
* **Not included.** The real-time-PC models are not part of the FPGA. These
  are the vehicle load torque, battery with DC-link discharge, rest-bus
  simulation and the 2D Ld/Lq processor model. Also not included: the
  optical register link, the bus cards (CAN, FlexRay with E2E counter/CRC),
  and the analogue I/O hardware. Their signals appear as the register bus and
  the top-level ports.
* The design has been simulated and linted. It has not been synthesised or
  timing-closed on an FPGA. The multiply chains inside `pmsm_model` and
  `inverter_model` are combinational within one clock and would need
  pipelining for 100 MHz. The step length leaves room for that.
