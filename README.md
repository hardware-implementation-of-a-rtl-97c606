# Inverse Park transformation in four clock cycles

Field-oriented control of a permanent-magnet synchronous motor works in the rotor's
d-q frame. Before the PWM stage can use the controller's voltage commands, they have to
be rotated back into the stator's alpha-beta frame by the rotor angle theta:

    Valpha = Vd*cos(theta) - Vq*sin(theta)
    Vbeta  = Vd*sin(theta) + Vq*cos(theta)

This design does the whole job in hardware, including sin and cos: a rotation-mode
CORDIC produces sin(theta) and cos(theta) with no lookup table, and a small multiply-add
stage finishes the rotation. The result appears four clock cycles after `start`. A PLL
multiplies the 24 MHz board clock to the 144 MHz datapath clock.

```
 clk_in 24 MHz ──► pll ──► clk_out 144 MHz ─────────────┬──────────────┐
                                                        ▼              ▼
 theta, start, reset ───────────────────────────────► cordic ──sin,cos──► ipark_arith ──► valpha, vbeta, done
 vd, vq ──► 3-stage delay line (aligns with cordic) ─────────────────────►
```

## Number formats

Everything is fixed point, signed, two's complement.

| signal | width | format | real value |
|---|---|---|---|
| `theta` | 16 | Q1.14, radians | word / 2^14, -2.0 ... +2.0 rad |
| `vd`, `vq` | 16 | Q1.14 | word / 2^14, -2.0 ... +2.0 |
| sin, cos (internal) | 20 | Q1.18 | word / 2^18 |
| `valpha`, `vbeta` | 32 | scale 2^29 | word / 2^29 |

The output scale follows from the datapath: a Q1.14 voltage times a Q1.18 sine has
scale 2^32, and the ARITHMETIC stage shifts the sum right by 3, leaving 2^29. For
example, Vd = -0.9, Vq = 1.25 and theta = 75° enter as -14745, 20480 and 21447, and
come out as Valpha = -773267284 (-1.440323) and Vbeta = -293032094 (-0.545815).
The exact values are -1.440344 and -0.545809. With |Vd|, |Vq| < 2 the result is below
2·√2, so it always fits in 32 bits.

## The four-cycle pipeline

The latency is counted from the rising edge of `clk_out` that samples `start` high:

| edge | register | content |
|---|---|---|
| 1 | `cordic` stage 0 | folded angle z0, start vector (K, 0), mirror flag |
| 2 | `cordic` stage 1 | after micro-rotations 0 to 9 |
| 3 | `cordic` outputs | after micro-rotations 10 to 19, rounded to Q1.18 with the mirror sign applied; `done_o` |
| 4 | `ipark_arith` outputs | `valpha`, `vbeta`; `done` |

Each of edges 2 and 3 is preceded by ten unrolled micro-rotations, which are adders and
fixed shifts with no multiplier. Those two chains are the critical paths. The multipliers
sit alone in the last stage.

Every stage loads new data on every cycle, so the datapath is fully pipelined: a burst of
starts on consecutive cycles gives results on consecutive cycles, four cycles later.
For that to work, `vd` and `vq` are sampled in the same cycle as `theta`. A three-stage
delay line in `ipark_top` then carries them to the ARITHMETIC stage alongside their sin
and cos. The outputs hold their last value between results. `done` is a one-cycle pulse.

`reset` is asynchronous and active high, and sets every datapath register to 0. An
operation that is in flight when reset arrives produces no result. The datapath is also
held in reset until the PLL reports lock.

## CORDIC (`cordic`, `cordic_iter`)

Rotation mode: the vector starts at (K, 0), K = ∏ 1/√(1+2^-2i) ≈ 0.60725, the inverse
of the CORDIC gain. Each micro-rotation i turns it by ±atan(2^-i), with the sign chosen
to drive the residual angle z to zero. After 20 steps x ≈ cos(theta) and y ≈ sin(theta).
Starting from K rather than 1 means no gain correction is needed afterwards.

CORDIC converges only for |theta| up to about 1.74 rad. Angles are therefore folded into
±π/2 first, using the mirror identities:

- for theta > π/2, take theta' = π − theta
- for theta < −π/2, take theta' = −π − theta

In both cases sin(theta) = sin(theta') and cos(theta) = −cos(theta'). A flag carried
down the pipeline negates cos at the end. This covers the whole Q1.14 input range
(±2 rad ≈ ±114.6°). Angles beyond that need wrapping by the caller.

Internal precision:

- x and y have 21 fraction bits, 3 guard bits below the Q1.18 output.
- The angle accumulator has 20 fraction bits.
- The arctangent table and K are computed at elaboration by constant functions in
  `ipark_pkg`: ATAN[i] = round(atan(2^-i)·2^20) and K = round(K(20)·2^21).
  No table is stored.

Measured error over random angles is at most 2 LSB of Q1.18, about 8·10^-6.

## ARITHMETIC (`ipark_arith`)

This stage has four signed 16×20 multipliers, one subtractor and one adder. Each
37-bit sum is shifted right by 3 with an arithmetic shift, so the sign fills the top,
and truncated to 32 bits. The output register loads through a hold multiplexer that is
driven by `in_valid`.

## PLL (`pll`, `pll_pfd`, `pll_loop_filter`, `pll_vco`, `pll_divider`)

The loop is the textbook one:

1. A phase-frequency detector compares the reference with the fed-back clock.
2. A loop filter turns its pulses into a control value.
3. That value sets the frequency of a VCO.
4. A divide-by-6 counter closes the loop, so the VCO locks at 6 × 24 MHz = 144 MHz.

The PFD and the divider are synthesizable logic. The PFD is the usual two flip-flops
whose AND clears both.

The filter and the VCO are analog parts. They are modelled behaviourally with real
numbers and a 10 ps time step:

- The filter is a charge pump into a series R-C filter: a proportional plus an integral
  term.
- The VCO has a free-running frequency of 120 MHz and gains phase in proportion to its
  control value.

The model locks in about 4 µs. A behavioural lock detector asserts `locked` after 16
reference cycles with a feedback-edge error below 0.1 ns.

`pll` and `ipark_top` are therefore simulation models. To implement the design on an
FPGA, replace `pll` with the vendor's PLL primitive: 24 MHz in, ×6, with areset and
locked. Everything from `clk_out` onward is synthesizable.

## How far to trust it, and where it departs from the original description

These points follow the original description:

- the three-module structure
- the word widths: 16-bit angle and voltages, 20-bit sin/cos, 32-bit outputs
- the Q1.14 inputs
- the 3-bit arithmetic right shift and the 2^29 output scale
- the mirror handling of angles outside ±90°
- the start and reset inputs with registers cleared to 0
- the 24 → 144 MHz PLL
- the four-cycle latency

The two reference vectors (75° and 50°) reproduce the published results to within
0.002 %. These are this design's own choices:

- the Q1.18 sin/cos format, which is implied by the output scale but never stated
- the 20 iterations and their precision
- the split of the CORDIC into three register stages
- asynchronous reset
- the Vd/Vq delay line and the fully pipelined operation. The original description shows
  only single operations with inputs held steady.
- holding the datapath in reset until lock
- the extra ports `done`, `locked`, `clk_out` and `pll_areset`. Without them the top has
  the original 115 pins: clock, start, reset, three 16-bit inputs and two 32-bit outputs.
- every detail of the PLL model: loop gains, VCO range and lock detector

The published latency figure is ambiguous about which clock the four cycles refer to.
It quotes 160 ns "at 24 MHz", while the datapath runs from the 144 MHz PLL output. Here
the four cycles are cycles of `clk_out`, which is 27.8 ns at 144 MHz. No timing closure
at 144 MHz has been done. The ten-deep adder chains per stage are the place to look if
it fails.

## Files

| file | content |
|---|---|
| `rtl/ipark_pkg.sv` | formats, widths, constant functions for the atan table, gain and π |
| `rtl/ipark_top.sv` | top level: PLL, CORDIC, Vd/Vq alignment, ARITHMETIC |
| `rtl/cordic.sv`, `rtl/cordic_iter.sv` | sin/cos CORDIC and one micro-rotation |
| `rtl/ipark_arith.sv` | multiply, add/subtract, shift |
| `rtl/pll.sv` | PLL model: PFD, filter, VCO, divider, lock detector |
| `rtl/pll_pfd.sv`, `rtl/pll_divider.sv` | synthesizable PLL parts |
| `rtl/pll_loop_filter.sv`, `rtl/pll_vco.sv` | behavioural analog parts |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A watchdog
counts a failure if it hangs. The end-to-end test runs the complete design at its
default configuration. It locks the PLL and runs both reference vectors, 240 single
operations (including the mirror region), a 24-deep back-to-back burst, and a reset
in mid-operation. It checks every result and the four-cycle latency, and counts each
mechanism. It takes under a second:

```
verilator --binary --timing -Irtl rtl/ipark_pkg.sv tb/ipark_top_tb.sv --top-module ipark_top_tb
./obj_dir/Vipark_top_tb
```

For the other testbenches, replace the testbench and top-module names, for example
`tb/cordic_tb.sv` and `cordic_tb`. The behavioural parts need `--timing`, and all files
use `timescale 1ns/1ps`.

## Changing it

- **Precision.** Change `CORDIC_ITERS`, `XY_FRAC` and `Z_FRAC` in `ipark_pkg`, or the
  matching `cordic` parameters. The atan table and gain follow automatically. The
  pipeline cut is always after ITERS/2 iterations.
- **Output format.** Change `SC_FRAC` or `ARITH_SHIFT`. The output scale is
  2^(14 + SC_FRAC − ARITH_SHIFT).
- **Clock ratio.** Change the `N` parameter of `pll`. `F0_GHZ` of the VCO should stay
  close to the target frequency so that the loop can pull in.
