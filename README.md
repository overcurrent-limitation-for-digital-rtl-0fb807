# Overcurrent limitation for a digital peak-current-mode buck converter

A digitally controlled buck converter cannot easily do peak current mode
control: sampling the inductor current with an A-D converter and processing it
takes too long to catch the peak within the switching period. This design
sidesteps the A-D converter on the current path. A small analog detector (an
RC integrator, a comparator and an SR flip-flop) is started by the controller
shortly before the expected current peak, and it ends the on-time as soon as
the integrated current reaches a threshold. The length of the detector's
pulse, T_CS, is therefore an immediate measure of the peak current:

    I_peak ≈ tau * V_th / (A_c * R_s * T_CS)

The overcurrent limiter is built on that observation. A current above the
limit shows up as a *short* T_CS, which the controller measures with a
counter. When T_CS is shorter than a reference time T_CS*, the controller
stops regulating the output voltage. Instead it computes, from the
converter's steady-state equations, the drive value that holds the load
current at a chosen limit I_o_set. The current then settles on the limit
with no inductor-current overshoot. The limit is a run-time input
(`i_set_ma`).

The RTL covers the whole digital controller (synthesizable) and a behavioural
model of the analog detector. Together they form the control side of a
15 V → 5 V, 10 µs switching-period converter. The power stage, the output-voltage
A-D converter and the gate driver are outside the RTL. Behavioural models of
the power stage and the A-D converter are included with the testbenches.

## One switching period

Everything runs on one clock `clk` with a period of Ts/N_TS = 1 ns, so one
switching period is N_TS = 10 000 cycles. The delay circuit counts these
cycles. The sequence within one period n:

| cycle (typical)        | event |
|------------------------|-------|
| 0                      | period start: S_w goes on, the A-D converter is triggered (`adc_trig`), N_Drive for this period is in use |
| N_Drive (≈ 2700)       | the delay circuit pulses S_D low for 10 cycles; the detector flip-flop sets, S_CS rises and the integrator starts |
| N_Drive + T_CS (≈ 3300)| the integrator voltage reaches V_th; S_CS falls |
| + 3                    | S_w goes off (2 synchronizer stages + DPWM register); N_CS is latched and S_oc re-evaluated |
| 500 after the start    | the A-D sample of e_o arrives (latency set by the A-D model) |
| N_TS − 256             | the PID controller and, in overcurrent mode, the N_oc calculation start from the latest sample and N_CS |
| N_TS − 256 + 109       | N_oc is ready; the MUX output settles |
| N_TS − 1               | the delay circuit registers N_Drive for the next period |

So the digital control value is only the sensing delay T_D = N_Drive/N_TS·Ts.
The on-time is T_D + T_CS: it ends when the current peak is detected.
With the reference values, N_Drive = 2746 regulates 5 V into 10 Ω in
simulation (2687 is reported for the hardware prototype).

## Regulation mode

`pid_controller` evaluates, once per period,

    N_PID[n] = N_B − K_P·(e[n−1] − N_R) − K_I·Σ(e[n−1] − N_R) − K_D·(e[n−1] − e[n−2])

with N_B = 2950, N_R = 2500 (5 V at 500 counts/V), K_P = 5, K_I = 0.06 and
K_D = 1. The gains are held as Q16.16 constants, so K_I = 0.059998. The error
sum is a saturating 32-bit integer, and N_PID is clamped to 0..N_TS−1.

The error sum has no anti-windup, as in the method this design follows.
While the limiter holds the output voltage low, N_PID keeps rising and
reaches its clamp after a few milliseconds. It does not disturb the limiter,
because the MUX takes the smaller value. It does slow the recovery when the
overload goes away. In the closed-loop test the load returns from 3 Ω to
10 Ω after 6 ms of limiting. The output then rises to about 7.9 V (1 ms
average), and is back within 1 % of 5 V only after about 5 ms. Add a clamp on
the error sum in `pid_controller` if fast recovery matters.

## Overcurrent detection

`oc_detector` watches the synchronized S_CS:

* **N_CS**: a prescaler restarted at the rising edge of S_CS counts internal
  clock periods T_clk = 10 cycles = 10 ns while S_CS is high. So
  T_CS = N_CS·T_clk, truncated.
* **S_CS\***: a reference pulse that starts with S_CS and lasts
  T_CS* = 330 ns (33·T_clk).
* **S_oc**: at each falling edge of S_CS, S_oc is set if S_CS* is still high
  (T_CS < T_CS*, a current above the detection level I_M) and cleared
  otherwise. It holds through periods without an S_CS pulse.

By the linear approximation above, T_CS* = 330 ns corresponds to I_M ≈ 1.04 A.
The detector model integrates the exact RC exponential, so its pulse is
somewhat longer. In simulation the detection level is a peak current of about
1.1 A, which is roughly a 1 A load current plus half the ripple.

## The N_oc calculation

`noc_calc` finds the drive value that, in steady state, makes the load
current equal to I_o_set. It proceeds in three steps:

1. Peak current from the sensing count: I_peak = K_PEAK / N_CS, with
   K_PEAK = tau·V_th/(A_c·R_s·T_clk) = 34 375 mA·counts.
2. Load estimate and the output voltage that the limit implies:
   R_o_est = E_o / I_peak and E_o_oc = R_o_est · I_o_set. In counts this
   becomes E_o_oc = e_o · N_CS · I_o_set / K_PEAK. The peak current stands in
   for the load current, which is not measured; the error is half the ripple
   (≈ 0.1 A).
3. The steady-state drive value of the buck converter:

       V_on  = E_o_oc + (r + R_s)·I_o_set
       N_oc  = V_on/E_i · N_TS  −  C3 / (I_o_set + (E_i − E_o_oc)·V_on·Ts/(2·L·E_i))

   The first term is the on-time needed for V_on. The second is the time the
   detector takes to see the peak current, because
   I_peak = I_o + ½·ripple. C3 = tau·V_th·N_TS/(A_c·R_s·Ts) = 343 750 mA·counts.

Voltages are carried in A-D counts with 8 fractional bits, and currents in mA.
All the factors that depend only on the circuit (E_i, L, r, R_s, tau, V_th,
A_c, G_v, Ts, T_clk) are computed in `ocl_pkg` at elaboration time from
real-valued constants. The two true divisions (by K_PEAK and by the bracketed
current) share one 50-bit restoring divider, `seq_divider`. A result takes 109
cycles, well inside the 256 cycles reserved before the period boundary; an
assertion in `dpcm_controller` checks this. E_o_oc is clamped to E_i, and N_oc
to 0..N_TS−1. Against a floating-point evaluation of the same formulas,
N_oc is within ±3 counts (3 ns of T_D).

## Mode selection

`drive_mux` passes N_PID while S_oc is low. While S_oc is high it passes
min(N_PID, N_oc). The changeover is gradual: the limiter takes over only once
the voltage loop asks for a longer on-time than the limit allows. N_oc is
computed only while S_oc is high, and the MUX ignores it until the first
result of the current overload episode is ready.

## Files and hierarchy

    ocl_converter_ctrl            top: controller + detector model
    ├── peak_current_detector     behavioural model (real-valued input, #delays)
    └── dpcm_controller           synthesizable FPGA part
        ├── pid_controller
        ├── oc_detector
        ├── noc_calc
        │   └── seq_divider
        ├── drive_mux
        ├── delay_circuit
        └── dpwm
    ocl_pkg                       constants, derived fixed-point factors, status struct

Top-level ports of `ocl_converter_ctrl`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | 1 ns clock, asynchronous active-low reset |
| ac_es | in | real | amplified sense voltage A_c·R_s·i_L, volts |
| eo_data, eo_valid | in | 14, 1 | output-voltage sample (500 counts/V) and its strobe |
| i_set_ma | in | 16 | current limit I_o_set in mA |
| s_w | out | 1 | switch command to the gate driver |
| adc_trig | out | 1 | A-D conversion request, once per period |
| s_d, s_cs | out | 1 | sensing start and detector pulse, for observation |
| status | out | `ctrl_status_t` | N_PID, N_oc, N_Drive, N_CS, E_o_oc, S_CS*, S_oc, N_oc-selected |

For an FPGA, use `dpcm_controller`. Its `s_cs` input is asynchronous and is
synchronized inside.

## Verification

Each module has a self-checking testbench in `tb/` that compares against
values computed independently (floating-point formulas, cycle counts):

| testbench | what it shows |
|-----------|---------------|
| tb_pid_controller | N_PID against the PID law in real arithmetic (±2), one-cycle latency, both clamps |
| tb_drive_mux | selection rule on random and corner vectors |
| tb_delay_circuit | 10 000-cycle period; S_D falls exactly N_Drive cycles after the period start, 10 cycles wide; no pulse for N_Drive ≥ N_TS |
| tb_dpwm | S_w edges relative to period start and S_CS |
| tb_oc_detector | N_CS = ⌊T_CS/10 ns⌋, S_CS* width 330 ns, S_oc exactly for T_CS < 330 ns |
| tb_seq_divider | quotients against `/` for corner and random operands, 33-cycle latency, all-ones result for a zero divisor |
| tb_noc_calc | N_oc and E_o_oc against the floating-point formulas at the reference operating points and random ones; latency 109 cycles |
| tb_peak_current_detector | T_CS against the exact RC charging time |
| tb_dpcm_controller | controller with a pulse-source detector: T_D, S_w timing, mode entry and exit, N_oc value, MUX rule |
| tb_ocl_converter_ctrl | closed loop with the power stage model at default parameters: 5 V regulation at 10 Ω; step to 3 Ω with I_o_set = 1.2 A (first load estimate above 3 Ω, N_PID rising while N_oc limits), then 1.4 A; then back to 10 Ω and 5 V |
| tb_ocl_unlimited_step | comparison case: the same 10 Ω → 3 Ω step with I_o_set = 10 A, so the limit never takes over; 5 V is restored at 1.67 A after an inductor-current overshoot |
| tb_ocl_steady_state | output characteristic: regulation at 25/10/6/5 Ω, limited current at 3/2/1 Ω for 1.2 A and 1.4 A |

Closed-loop results, using the plant model in `tb/buck_plant_model.sv` (ideal switch and diode,
r + R_s = 0.25 Ω, L = 175 µH, C_o = 285 µF):

| R_o | I_o_set | E_o | I_o | R_o_est |
|-----|---------|-----|-----|---------|
| 3 Ω | 1.2 A | 3.55 V | 1.185 A | 2.93 Ω |
| 2 Ω | 1.2 A | 2.40 V | 1.200 A | 1.97 Ω |
| 1 Ω | 1.2 A | 1.22 V | 1.222 A | 1.00 Ω |
| 3 Ω | 1.4 A | 4.09 V | 1.363 A | 2.89 Ω |
| 2 Ω | 1.4 A | 2.76 V | 1.381 A | 1.95 Ω |
| 1 Ω | 1.4 A | 1.41 V | 1.406 A | 0.99 Ω |

The limited current stays within 3 % of I_o_set. Right after detection the
load estimate is too high (4.1 Ω for a 3 Ω load), because the output
capacitor still holds the voltage up. It settles to the true load within a
few periods. After the 10 Ω → 3 Ω step
the inductor current peaks at 1.27 A. The same step with the limit out of
reach (`tb_ocl_unlimited_step`) peaks at 2.52 A before the regulator settles
at 5 V and 1.67 A. Every switching period in overload uses
N_oc.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with
Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/ocl_pkg.sv \
        tb/tb_ocl_converter_ctrl.sv --top-module tb_ocl_converter_ctrl
    ./obj_dir/Vtb_ocl_converter_ctrl

The closed-loop tests simulate about 1 ms of converter time per second of
wall time. The longest, `tb_ocl_steady_state` (40 ms), takes about 40 s.

## Choices this design makes on its own

The control law, the detector, the overcurrent test with T_CS* and the
steady-state formula for N_oc follow the published method. These points are
not specified there and are chosen here:

* **Clock.** The method needs 1 ns resolution for T_D (N_TS = 10 000 per 10 µs)
  but a 10 ns internal clock for N_CS. Here a single 1 ns clock is used, with a
  1-in-10 prescaler for N_CS. A real FPGA would need a fine-delay scheme
  (phase-shifted clocks or a delay line) for the S_D edge, and could run the
  arithmetic at a slower clock.
* **Schedule.** PID and N_oc are evaluated 256 cycles before the period
  boundary from the most recent A-D sample, and the new N_Drive takes effect
  at the boundary.
* **Arithmetic.** The fixed-point formats, the 12-bit N_CS counter, the 16-bit
  mA current limit and the sequential divider are this design's choices.
* **S_oc release.** S_oc is re-evaluated at every S_CS pulse, so the controller
  returns to regulation when the peak current falls below the detection level.
* **Robustness additions.** These are a 2-stage synchronizer on S_CS, a 10 ns
  S_D pulse, S_w forced off at the end of a period with no S_CS edge, and
  N_Drive reset to 0 (immediate sensing, shortest on-time) after reset.
* **No slope compensation.** None is built. The duty ratio stays below 0.5 at
  these operating points.
* **Detector model.** It integrates the exact RC exponential with a 0.25 ns
  step. When set and reset are both active, reset wins.

## Changing it

The circuit values live in `rtl/ocl_pkg.sv` as real constants (E_i, L, C_o,
R_s, r, A_c, tau, V_th, G_v, Ts, T_clk, T_CS*) together with N_TS, N_B, N_R
and the PID gains. The derived integer factors (K_PEAK, RDROP_Q, EI_Q, C1_Q,
C2_Q, C3) are recomputed from them. Keep Ts/N_TS equal to the clock period
and T_clk a whole number of clock periods (CLK_DIV). A smaller N_TS (for
example, for faster simulation) needs N_B, N_R and the PID gains rescaled
with it.
