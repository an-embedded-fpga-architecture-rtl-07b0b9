# Embedded model predictive control loop for an FPGA

This RTL closes a control loop around a two-input, two-output plant, a
quadruple water tank with two pumps and two measured tank levels, on a
single FPGA. Once per control period it does four things. It samples the
setpoints and level sensors through two Digilent PMOD AD1 converter boards. It
estimates the plant state and an output disturbance. It solves a
box-constrained quadratic program (QP) for the pump voltages with a primal-dual
iteration. It writes the first move to the pumps through a PMOD DA2 board. The
whole controller is sequenced by small FSMs and uses one multiplier for the
solver and one for the observer. At the default horizon of 10 steps, a control
decision takes about 8.4 ms at 100 MHz. The plant's sampling time is 5 s.

The architecture follows *An Embedded FPGA Architecture for Real-Time Model
Predictive Control*, in which the observer and solver were generated with a
high-level synthesis tool. Here every block is written as hand-written
SystemVerilog RTL. The main choices this design makes where the published
description is silent are covered in "Where this design departs" below.

## Signal chain and sequencing

```
 setpoints r1,r2 ──► PMOD AD1 #0 ─┐                      ┌─► fxp_descaler x2 ─► PMOD DA2 ─► pumps
 levels   y1,y2 ──► PMOD AD1 #1 ─┼─► fxp_scaler x4 ─► mpc_controller ─┘
                                 │          ▲               ▲
                          master_fsm ───────┴───────────────┴── enables / done, once per period
```

| module | role |
|---|---|
| `mpc_fpga_top` | wires the chain together. Its ports are the board pins and a port for loading the problem data. |
| `master_fsm` | Starts a control cycle right after reset and then every `CTRL_PERIOD` clocks (5 s). It waits for a fresh ADC frame, then pulses the scaler enable, then MPC-START (waiting for MPC-DONE), then the de-scaler enable, then DAC-ENABLE (waiting for the DAC frame). No stage is enabled before its input is valid. |
| `pmod_ad1_ctrl` | Runs AD7476A frames at 95.06 kHz (`SAMPLE_DIV` = 1052). Each frame has 16 SCLK periods at 16.7 MHz: four leading zeros, then 12 bits MSB first. It returns two 12-bit codes and a `done` pulse. |
| `fxp_scaler` | Changes a code into Q8.8 volts: it zero-pads the code to 16 bits and multiplies by 13517/2^16 = 3.3·256/4096. |
| `mpc_controller` | Holds the observer, the register stack, the QP solver and the MPC FSM (see below). |
| `fxp_descaler` | Changes Q8.8 volts into a code by multiplying by 19859/2^12 = 4096/(3.3·256). The result is clamped to 0..4095. |
| `pmod_da2_ctrl` | Sends one 16-bit frame to both DAC121S101 converters (bits: 00, power-down 00, 12-bit code) with SCLK at 25 MHz. `done` comes 65 clocks after the enable. |

Inside `mpc_controller`:

1. `mpc_fsm` receives MPC-START and starts `state_observer`.
2. When the observer signals done, `register_stack` saves the new estimate.
3. One clock later `pd_qp_solver` starts, with the parameter vector
   [estimate; setpoints].
4. When the solver finishes, the stack saves the first move u0 and MPC-DONE
   pulses.
5. The stack feeds the saved estimate and moves back to the observer on the
   next run.

All start, done and enable signals are one-clock pulses. Reset is synchronous
and active high.

Timing at the default sizes. The counts run from the clock edge that samples
the start pulse to the edge that raises done:

| step | clocks |
|---|---|
| wait for an ADC frame | up to 1052 + 100 |
| observer | `NS*NV + 1` = 67 |
| solver | `(NZ+NL)*NP + 2 + ITER*(NZ*(NZ+NL) + NL*NZ + 4)` = 841,302 |
| MPC total | observer + solver + 5 = 841,375 |
| whole control cycle (measured) | 841,549 |

## Number formats

- **Data.** Every value that crosses the controller boundary is signed Q8.8
  (16 bits, 1/256 V resolution, ±128 V range). So are the observer state, the
  solver's primal and dual variables, and the bounds.
- **Coefficients.** They are signed Q5.12 in 18 bits (range ±32, resolution
  2.4e-4), one multiplier input wide.
- **Arithmetic.** Products are accumulated exactly in 48 bits. Each row result
  is then floored back to Q8.8 and saturated once (`mpc_pkg::acc_to_q88`).
  These formats are set in `mpc_pkg`.

## The primal-dual QP solver (`pd_qp_solver`)

This is the part that needs the most explanation.

**The problem.** With the state and input trajectory stacked as
z = [u0; x1; u1; x2; …; u(N-1); xN], the MPC problem is

    min ½ zᵀHz + zᵀq   subject to   Ez = e,   z_lo ≤ z ≤ z_hi

- H is block diagonal with the weights R, Q, …, R, P.
- E holds the model equations x(i+1) − A x(i) − B u(i) = 0, so e = [A x̂; 0; …].
- q pulls the trajectory towards a steady-state target (x̄, ū). The target
  solves [A−I B; C 0][x̄; ū] = [0; r − d̂], which makes the controller
  offset-free.

Because the target is linear in (r − d̂), both q and e are affine in the
parameter vector θ = [x̂; d̂; r; 1]. Write them as q = F_q θ and e = F_e θ.

**The iteration.** The solver runs a projected primal-descent, dual-ascent
iteration:

    z ← clip( z − αD⁻¹ (H z + Eᵀλ + q) )      every row uses the old z
    λ ← λ + ωW⁻¹ (E z − e)                     uses the new z

Here D and W are diagonal conditioning matrices and α, ω are relaxation
factors. The update of λ sees the freshly projected z (Gauss-Seidel order
between the primal and dual steps). The rows of z are updated from the old z
(Jacobi order within the primal step). The solver runs `ITER` iterations
(100), starting from z = 0 and λ = 0 on every solve.

**What is stored.** All scaling is folded into the data offline, so the
hardware needs only multiply-accumulate, subtract and clip. The coefficient RAM
holds three row-major matrices. Each phase reads its matrix in order, so the
RAM address only ever increments:

| base | contents | size at N = 10 |
|---|---|---|
| 0 | G = [αD⁻¹H  αD⁻¹Eᵀ], NZ × (NZ+NL) | 6,000 |
| NZ·(NZ+NL) | E_w = ωW⁻¹E, NL × NZ | 2,400 |
| + NL·NZ | F = [αD⁻¹F_q; ωW⁻¹F_e], (NZ+NL) × NP | 900 |
| MEM_WORDS | z_lo (Q8.8 in bits 15:0), NZ words | 60 |
| MEM_WORDS + NZ | z_hi, NZ words | 60 |

Here NZ = (NU+NX)·N = 60, NL = NX·N = 40 and NP = NX+2·NY+1 = 9.

**The schedule.** A setup phase forms αD⁻¹q and ωW⁻¹e from θ. Each
iteration then has a z phase and a λ phase. Each phase walks its matrix with a
two-stage pipeline: first a RAM read together with the operand fetch, then a
multiply-accumulate. At the end of each row, the result is:

- projected, for z rows,
- added to the old λ, for λ rows, or
- stored, for setup rows.

The new z goes into a shadow buffer and is committed when its phase ends. Each
phase costs 2 clocks of drain. The matrices are stored dense even though H and
E are sparse. That is simple, but the solve takes 8,400 multiplies per
iteration where a sparse schedule would need far fewer. Sparsity is the
obvious next optimisation.

**Trust.** The iteration has no convergence test. Whether 100 iterations are
enough, and which α, ω, D and W to use, depend on the problem data. The
testbench data (α = 1, ω = 0.5, D = diag(H), W = diag(E D⁻¹ Eᵀ)) tracks
setpoints in closed loop (see `tank_experiment_tb`). It is not tuned to full
convergence.

## The observer (`state_observer`)

The estimate s = [x̂; d̂] uses an output-disturbance model, y = Cx + d. The
update is

    x̂⁺ = A x̂ + B u + L_x (y − C x̂ − d̂),   d̂⁺ = d̂ + L_d (y − C x̂ − d̂)

This update is affine in [x̂; d̂; u; y]. It is therefore computed as one
product, s⁺ = M·[x̂; d̂; u; y; 1]. M is NS × NV = 6 × 11, and its last column
holds any linearisation offsets. The observer uses the same read-then-MAC
pipeline as the solver. Forming M from A, B, C, L_x and L_d is done offline.

## Loading problem data

All matrices are written through `cfg_we/cfg_sel/cfg_addr/cfg_data` while
reset is held (the RAMs are not reset):

- `cfg_sel = 0` addresses M, row-major.
- `cfg_sel = 1` addresses the solver map above.

Coefficients go in as Q5.12 words and bounds as Q8.8 words. The function
`build_tank_data` in `tb/mpc_tb_pkg.sv` shows the complete construction, using
real arithmetic:

1. the steady-state target matrix from a 6 × 6 inverse,
2. H, E, D and W,
3. the folded matrices G, E_w and F,
4. the bounds (pumps 0..3.3 V),
5. the observer matrix M.

Its tank model is a textbook linearised four-tank system (Euler discretisation,
5 s step), not a measured plant.

## Where this design departs from, or adds to, the published architecture

- **Observer.** The form (output disturbance, gains L_x and L_d) matches the
  published steady-state condition. Folding it into a single matrix is this
  design's choice. No numerical gains or model matrices are given, so none are
  built in.
- **QP data.** The solver takes any data of the right shape. H, E, D, W, α
  and ω are loaded, not fixed.
- **Iterations.** The count is fixed (`ITER`), with a cold start on each solve.
  Storage is dense, and the formats are Q8.8 data and Q5.12 coefficients.
- **Four analog inputs.** The loop needs four (two setpoints, two levels), so
  two PMOD AD1 controllers run side by side. Serial timings follow the
  converters' data sheets.
- **Converter range.** The level sensors span 0–4.2 V, but the ADC path covers
  0–3.3 V. Any attenuation happens outside the FPGA.
- **Scaling.** The scaler and de-scaler constants assume 3.3 V full scale. The
  output is in converter volts, not in the pump amplifier's volts (gain 3).
- **Not included.** The PI controller used as a baseline for comparison, and
  the analog parts (converters, filters, amplifier, plant).
- **Sizing.** At N = 10 the design uses about 175 kbit of RAM and two
  multipliers (observer and solver), plus the constant multipliers of the
  scalers. This is far below a mid-size FPGA, so longer horizons fit. The
  solve time grows as N².

## Parameters

`mpc_fpga_top` has these parameters: `SAMPLE_DIV` (1052), `CTRL_PERIOD`
(500,000,000), `N` (10), `NX` (4), `NU` (2), `NY` (2) and `ITER` (100). The
board wiring fixes NU = NY = 2. `pmod_ad1_ctrl` and `pmod_da2_ctrl` also take
`SCLK_HALF`.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. The testbenches for the observer, the solver,
the controller and the top compare bit for bit against integer reference models
(`obs_ref`, `qp_ref` in `tb/mpc_tb_pkg.sv`). They also check the cycle counts
above. The converter testbenches use behavioural models of the AD7476A and the
DAC121S101 (`tb/ad7476a_model.sv`, `tb/dac121s101_model.sv`).

| testbench | what it covers |
|---|---|
| `mpc_fpga_top_tb` | Six control cycles at N = 3, with the setpoint square wave. It counts ADC frames, observer feedback, active projection, DAC clamping and DAC updates, and fails if any never happened. |
| `mpc_fpga_top_full_tb` | One control cycle with every parameter at its default (under 1 s of simulation). |
| `tank_experiment_tb` | A 140 s closed-loop run (28 cycles) against a tank model, at N = 10. The control period is shortened to 900,000 clocks for simulation. Setpoint 1 is 1.3 V and setpoint 2 is a 0/1.8 V square wave, with a 0.1 V sensor offset. It checks pump limits and that tank 1 settles within 0.15 V of its setpoint. |

To run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
      rtl/mpc_pkg.sv tb/mpc_tb_pkg.sv tb/mpc_fpga_top_tb.sv --top-module mpc_fpga_top_tb
    ./obj_dir/Vmpc_fpga_top_tb

Replace the testbench name to run any other. Unit testbenches that do not use
the reference package can leave out `tb/mpc_tb_pkg.sv`.
