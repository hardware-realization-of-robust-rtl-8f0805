# Robust fixed-point speed controller for a DC motor

This is an FPGA implementation of a small digital controller that holds the
speed of a DC motor at a set value. The motor's parameters are only known to
lie in intervals: gain K between 25 and 25.5 rpm/V, time constant T1 between
4.5 and 5.2 ms, plus 1 ms of dead time. The controller coefficients were
computed offline so that the closed loop stays stable over that whole
uncertainty box. The method places the closed-loop characteristic polynomial
inside a polytope of polynomials known to be stable, built from the
polynomial's *reflection vectors* (its Schur–Cohn reflection coefficients
pushed to ±1 one at a time), and picks the best point by quadratic
programming. That design step happens once, on a PC. The hardware only runs
the resulting difference equation.

The RTL follows the controller published as *Hardware Realization of Robust
Controller Designed Using Reflection Vectors* (Spartan-6 FPGA, Xilinx System
Generator). It is an independent implementation. Where that publication is
silent, the choices made here are listed under
[Choices not fixed by the source](#choices-not-fixed-by-the-source).

## The control law

The feedback controller is

    G_FB(z^-1) = (0.025 + 0.0231 z^-1) / (1 + 0.0159 z^-1 + 0.013 z^-2)

and it runs in hardware in the recursive form

    e(k) = w(k) - y(k)
    u(k) = q1·e(k-1) + q2·e(k-2) - p1·u(k-1) - p2·u(k-2),   limited to [-12 V, +12 V]

with q1 = 0.025, q2 = 0.0231, p1 = 0.0159, p2 = 0.013. The hardware uses e(k-1) where the
transfer function has e(k). This is one sample of computational delay: the error taken at a clock edge
affects u from that edge on, and is then counted as the previous sample. A feed-forward
gain of 2 is applied to the speed reference before it becomes the set-point w.
The sampling period is T = 1 ms.

## Datapath

The datapath is fully parallel: every operation has its own unit, and the
whole update is combinational between four registers.

```
 ref_in ──► [×2, saturate] ──► w ──►(−)──► e(k) ──► REG1 ──► e(k-1) ──► REG2 ──► e(k-2)
                     y ──────────────┘                     │                       │
                                                        ×q1                       ×q2
                                                           └─────────► (+) ◄───────┘
                                                                        │ s1
                                                                        ▼
                                                     s2 ──────────────►(−)──► s3 ──► BOUNDER ──► u(k)
                                                                        ▲                          │
                                                           ┌─────────► (+) ◄───────┐              │
                                                        ×p1                       ×p2             │
                                                           │                       │              │
              u(k) ──────────────────────────────────► REG3 ──► u(k-1) ──► REG4 ──► u(k-2)         │
                ▲                                                                                  │
                └──────────────────────────────────────────────────────────────────────────────────┘
```

| module | role |
|---|---|
| `feedforward_shift` | w = 2·ref as a one-bit left shift, saturated to 12 bits |
| `error_subtractor` | e = w − y, 13-bit result |
| `delay_pair` | two-stage delay; one instance is REG1/REG2, another REG3/REG4 |
| `product_sum` | two multipliers and an adder: s1 = q1·e(k-1)+q2·e(k-2), s2 = p1·u(k-1)+p2·u(k-2) |
| `bounder` | comparators against U_MIN/U_MAX, two multiplexers, cut to the output format |
| `control_algorithm` | the feedback controller: all of the above except the feed-forward |
| `robust_controller_top` | feed-forward plus controller |
| `rc_pkg` | widths, fixed-point formats, default coefficients and limits |

**Anti-windup.** REG3 stores the bounded output, not the raw sum s3.
While the output is saturated, the recursion therefore sees the value that
actually went to the motor, and it cannot run away beyond the limits.

## Fixed-point formats

This is the part that needs the most care. All numbers are two's complement.
Every width is chosen so that no intermediate result can overflow. Sums grow
one integer bit over the wider operand and keep the finer fraction. Products
add the integer widths and the fraction widths.

| signal | bits | integer MSB index | fraction bits | meaning |
|---|---|---|---|---|
| w, y | 12 | 11 | 0 | speed, rpm, −2048..2047 |
| e | 13 | 12 | 0 | error, rpm |
| q1, q2, p1, p2 | 18 | 1 | 16 | coefficients |
| q·e | 31 | 14 | 16 | |
| u | 12 | 4 | 7 | volts: sign, 4 integer bits, 7 fraction bits |
| p·u | 30 | 6 | 23 | |
| s1 | 32 | 15 | 16 | |
| s2 | 31 | 7 | 23 | |
| s3 = (s1 ≪ 7) − s2 | 40 | 16 | 23 | |

Examples of the output format: +12 V is `0_1100.0000000` (0x600, 1536 LSB),
−12 V is `1_0100.0000000`, and 2.875 V is `0_0010.1110000`. One LSB of u is
2⁻⁷ V ≈ 7.8 mV.

The coefficients are stored as round(c·2¹⁶):

| | value | stored | effective |
|---|---|---|---|
| q1 | 0.025 | 1638 | 0.0249939 |
| q2 | 0.0231 | 1514 | 0.0231018 |
| p1 | 0.0159 | 1042 | 0.0158997 |
| p2 | 0.013 | 852 | 0.0130005 |

The bounder compares s3 with ±12·2²³. If s3 is in range, it drops the 16
lowest bits to reach 7 fraction bits. This rounds toward −∞.

## Timing

`clk` is the sampling clock, with one rising edge per sample (1 ms in the
motor application). On each edge, REG1 takes w − y, REG2 takes REG1, REG3
takes the current u and REG4 takes REG3. u depends only on the four registers.
It settles shortly after the edge and stays constant for the rest of the
period. w and y only need to be stable at the edge. A change in the error
reaches u exactly one edge after it is applied. The longest path is
multiplier → adder → subtractor → 40-bit comparator → two multiplexers. It is
trivially short against 1 ms. It also allows a fast clock if the controller
is driven with a clock enable instead, which is not provided here.

`reset` is synchronous and active high. It clears all four registers, so u
is 0 V after reset.

## Top-level interface (`robust_controller_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | sampling clock |
| reset | in | 1 | synchronous, active high |
| ref_in | in | 12 | speed reference, rpm (signed) |
| y | in | 12 | measured speed, rpm (signed) |
| w | out | 12 | set-point after feed-forward (2·ref_in) |
| u | out | 12 | control voltage, 7 fraction bits |
| at_max / at_min | out | 1 | the output is held at +12 V / −12 V this period |
| ref_sat | out | 1 | \|ref_in\| too large to double in 12 bits; w saturated |

Parameters (`Q1`, `Q2`, `P1`, `P2` of type `coef_t`; `U_MAX`, `U_MIN` of type
`u_t`) default to the values above. To load a different controller, pass
round(c·65536) for each coefficient. The hardware form has no q0 term and no
p0 (p0 = 1).

## Choices not fixed by the source

- **Coefficient format.** 18-bit signed with 16 fraction bits, which is the
  width of an FPGA DSP multiplier. With the width rules above, this
  reproduces the published 40-bit width of s3. The source also says that s3
  has "16 bits" of fraction. With a 12-bit u carrying 7 fraction bits, a
  40-bit s3 works out to 23 fraction bits. Here, 16 is the coefficients'
  fraction and the number of bits the bounder drops.
- **Mapping of the coefficients.** The hardware equation has no q0, so the
  designed numerator 0.025 + 0.0231 z⁻¹ is assigned to q1 and q2. This adds
  the one-sample delay described above. A second, rounded form of the law
  in the source has −0.016 for p1. The more precise 0.0159 is used.
- **Rounding.** The output is truncated, not rounded.
- **Reset.** Synchronous, active high, and clears everything. The source only
  shows a reset input.
- **Feed-forward width.** w stays 12 bits, and the doubled reference
  saturates. The shift is exact for references in −1024..1023 rpm.
- **Flags.** The at_max, at_min and ref_sat outputs are added for observation.

Not part of the RTL: the motor, the simulation environment's gateway and
JTAG co-simulation blocks, the FPGA board, and the offline coefficient
design (reflection vectors, quadratic programming).

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` at the end and has a cycle watchdog.

- `tb_error_subtractor`, `tb_product_sum`, `tb_feedforward_shift` and
  `tb_bounder` check exhaustively or with random operands against integer
  or real arithmetic. The operands include the range corners and values
  within ±3 LSB of each limit.
- `tb_delay_pair` checks a random stream against a model history, including a
  reset in mid-stream.
- `tb_control_algorithm` runs about 4000 samples against a floating-point
  model of the control law. The coefficients are multiples of 2⁻¹⁶, so the
  model is exact and the comparison is bit for bit. The testbench also
  checks the one-edge latency from an error step to u, both limits, and
  reset.
- `tb_robust_controller_top` closes the loop around a model of the motor.
  The model is the sampled plant
  y(k) = 0.8139·y(k−1) + 0.4228·u(k−1) + 4.282·u(k−2), with the speed
  rounded to whole rpm. The testbench runs the top at its default
  parameters:
  - A 100 rpm reference step at 10 ms, observed to 50 ms. The speed
    starts to move at 12 ms and settles within 3 rpm of the loop's static
    value 2·ref·L/(1+L) ≈ 108.3 rpm, where L = K·(q1+q2)/(1+p1+p2). The
    controller has no integrator, so a steady-state offset remains. The
    feed-forward gain of 2 compensates for most of it.
  - The same step on the four corner plants of the uncertainty box. All
    settle within 3 rpm of their static values (107.8–108.8 rpm).
  - Large steps that hold u at +12 V and at −12 V, an out-of-range
    reference that saturates the feed-forward, and a reset in operation.
    Each of these mechanisms is counted, and each must occur.

  In this model, the nominal step peaks at about 147 rpm before it settles.
  The published step response shows a smaller overshoot, about 117 rpm, and
  a final value near 102 rpm. It was recorded with the plant simulated in
  Simulink, and its exact loop set-up is not known. The testbench therefore
  checks the start time and the final value, not the shape.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rc_pkg.sv tb/tb_robust_controller_top.sv --top-module tb_robust_controller_top
./obj_dir/Vtb_robust_controller_top
```

Replace the testbench name to run another one. Every testbench finishes in
well under a second.
