# Multimode DSP datapaths with control-similar schedules

A *multimode* core runs one of several data flow graphs (its *modes*) on a
single shared datapath. The modes are never active at the same time — think of
a decoder that follows one communication standard or another — so the
functional units and registers can be shared between them. Sharing has a
price: every shared register needs a load command that is the OR of the load
commands it had in each mode, and every shared unit input needs a multiplexer.

The idea behind these cores is to pay as little of that price as possible by
scheduling the secondary modes against the resource usage of the main one.
When every mode uses the same unit in the same control step (c-step), a merged
register's load command `Sk.mode0 + Sk.mode1` collapses to the bare c-step
`Sk`, and one small controller that only counts c-steps serves all modes. The
only per-mode logic left is the operand multiplexers.

This repository holds three such cores, written as synthesizable
SystemVerilog, and a top level that places them side by side:

| core | modes | rate | units |
|---|---|---|---|
| `fig2_multimode` | two small graphs: `((p+q)-(r+s))*t` and `((p+q)-t)*(r+s)` | 1 sample / 2 cycles | 2 adders, 1 subtractor, 1 multiplier |
| `eq_multimode` | `x = ((a+b)*(c-d) + e*f - shr(g,h)) * (i+j)` and `y = ((a*b) + (c-d) + (e+f)) * ((g+h)*(i-j))` | 1 sample / 2 cycles | 3 multipliers, 2 adders, 1 subtractor, 1 shifter |
| `fft4_multimode` | 4-point radix-2 FFT, decimation in time (DIT) or in frequency (DIF) | 1 transform / 3 cycles | 4 multipliers, 2 adders, 2 subtractors |

## Timing model: c-steps, stages and load commands

Each core is a pipeline that accepts a new sample every `NSTEPS` cycles (2 or
3). The cycles of one sample period are the c-steps `S0 .. S(NSTEPS-1)`; a
sample's computation spans several such periods (*pipeline stages*), and
stages of consecutive samples overlap, so in any c-step a unit may be working
for an older sample. A resource count "per c-step" therefore sums over all
stages.

Adders and subtractors take one cycle. Multipliers and the shifter take two:
they are combinational units whose operand registers stay unchanged across two
consecutive c-steps, and whose result register captures at the end of the
second one. In a real implementation these are **two-cycle paths** and need a
multicycle timing constraint (or a pipelined multiplier with the same
latency). The cores assert in simulation that the operands of every two-cycle
unit are indeed stable over both of its c-steps.

The convention for registers, used in every header comment:

* "load command `Sk`" means the register captures at the clock edge that
  *begins* c-step `Sk`, so it holds the new value during `Sk`.
* "cycle 0" of a sample is the cycle after the edge that loaded its inputs
  (the edge that begins `S0`).

The shared controller, `mm_controller`, is a c-step counter plus a mode
register. It outputs `cstep` and `enter`, a one-hot vector naming the c-step
that starts at the next edge; the datapath decodes each register's load enable
from `enter` and, where the modes differ, from the mode. With the schedules
used here almost every load enable is a bare `enter[k]`.

## Interface common to all cores

* `in_valid` / `in_ready`: `in_ready` is high only in the last c-step of a
  period, because the input registers load at the edge that begins `S0`. A
  sample is taken when both are high. Holding `in_valid` high streams at the
  full rate.
* `out_valid` is high for exactly one cycle per sample, a fixed number of
  cycles after the accepting edge; the output must be taken in that cycle.
* `mode_req` / `mode`: `mode_e` from `mm_pkg` — `MODE0` (value 1) and
  `MODE1` (value 0). A change of `mode_req` is not applied while any sample is
  in flight: `switch_wait` goes high, `in_ready` stays low, the pipeline
  drains, and the new mode starts at the next `S0`. No output is lost.
* `busy` is high from the accepting edge until the longer of the core's two
  latencies has passed, i.e. at least until the sample's output.
* `rst_n` is a synchronous active-low reset of the controller; the datapath
  registers are not reset (their contents are never presented without
  `out_valid`).

Arithmetic is W-bit (default 16) modulo 2^W: sums, differences and the low W
bits of products, valid for unsigned or two's-complement data alike.

## `fig2_multimode`: the smallest case

Two graphs of four operations each. Both put their two additions in `S0` of
the first stage, the subtraction in `S1`, and the multiplication over both
c-steps of the second stage. The second graph's right-hand addition could
have gone in `S1`; moving it to `S0` is exactly what lets the four adder
input registers R1..R4 load on `S0` in both modes. The core brings these four
load commands out on `ld_r` so the property can be observed. The adder inputs
come from the same sources in both modes; the only multiplexers are on the
subtractor's right operand and on the multiplier's right operand register.
Latency 4 cycles in both modes.

## `eq_multimode`: two expressions, different pipeline depths

The second expression (`MODE1`) is the main graph, scheduled first in 3
stages; the first (`MODE0`) follows it in 4 stages, placed so that per c-step
both use 3 multipliers, 2 adders and 1 subtractor. The binding:

| unit | c-step | `MODE1` (y) | cycle | `MODE0` (x) | cycle |
|---|---|---|---|---|---|
| MUL0 | S0-S1 | a*b | 0-1 | e*f | 0-1 |
| SHR0 | S0-S1 | – | | g >> h | 0-1 |
| ADD0 | S0 | e+f | 0 | a+b | 0 |
| ADD0 | S1 | g+h | 1 | – | |
| SUB0 | S0 | c-d | 0 | c-d | 0 |
| SUB0 | S1 | i-j | 1 | e*f - (g>>h) | 3 |
| ADD1 | S0 | a*b + (c-d) | 2 | i+j | 0 |
| ADD1 | S1 | (…) + (e+f) | 3 | (a+b)(c-d) + (…) | 5 |
| MUL1 | S0-S1 | (g+h)*(i-j) | 2-3 | (a+b)*(c-d) | 2-3 |
| MUL2 | S0-S1 | final product | 4-5 | final product | 6-7 |

Latency is 6 cycles for y and 8 for x. Values that must outlive the register
that first holds them travel through stage registers (`p_add0`, `p_sub0`, and
the three-deep `p_o7` chain that carries `i+j` to the last multiplication of
x). `shr(g,h)` is a logical right shift of `g` by `h` bit positions (zero once
`h >= W`).

## `fft4_multimode`: graphs with different dependencies

DIT and DIF each need 4 additions, 4 subtractions and 4 multiplications, but
a DIT butterfly multiplies first and a DIF butterfly last. Each butterfly has
one coefficient input `coef[k]`:

```
DIT: a0 = x0 + c0*x2   a1 = x0 - c0*x2   b0 = x1 + c1*x3   b1 = x1 - c1*x3
     X0 = a0 + c2*b0   X2 = a0 - c2*b0   X1 = a1 + c3*b1   X3 = a1 - c3*b1
DIF: g0 = x0 + x2      h0 = c0*(x0-x2)   g1 = x1 + x3      h1 = c1*(x1-x3)
     X0 = g0 + g1      X2 = c2*(g0-g1)   X1 = h0 + h1      X3 = c3*(h0-h1)
```

With three c-steps, the two butterfly stages use the adders and subtractors
in `S2` and `S0`, MUL0/MUL1 run over `S0-S1` and MUL2/MUL3 over `S1-S2`, in
both modes. Every register therefore loads in the same c-step in both modes,
and the controller's load commands do not depend on the mode at all. DIF
starts its first stage two cycles late to reach this alignment, so its
latency is 9 cycles against 7 for DIT. Outputs are in natural order.

The data are real and each twiddle multiplication is one real
multiplication. With all coefficients 1, X0 and X2 are the DFT bins 0 and 2
of a real input. A complex 4-point DFT would need complex multipliers, which
this core does not have. The coefficients are configuration: change them only
while the core is idle (an assertion checks this).

## How far to trust it, and what is this design's own

Taken from the published method: the graphs of the small example and of the
two expressions, their c-step schedules, the unit counts and latencies, the
rates, the merged load commands of R1..R4, the unit counts for the FFT, and
the principle of binding the main graph first and the other graph's
compatible operations onto the same units.

This design's own choices: the word length; the valid/ready handshake, the
reset and the drain-before-switch rule; the exact pairing of operations onto
units and all stage registers in `eq_multimode`; the whole FFT schedule,
binding, flow graphs and coefficient ports; and the meaning of `shr`. The
small example uses one more register than the minimum of 9, to hold the
shared input `t` for the second stage.

Not reproduced: the FPGA area and cycle-time figures that motivate the
method. The scheduling algorithm itself (control-similarity list scheduling)
is a design-time tool, not hardware; its results are written into the cores
by hand.

Every core has a self-checking testbench that compares all outputs with the
graphs evaluated independently in the testbench, checks the latency and the
rate, and goes through several mode changes. `tb_mm_top` runs all three cores
at their default sizes at once.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -y rtl rtl/mm_pkg.sv tb/tb_mm_top.sv --top-module tb_mm_top
./obj_dir/Vtb_mm_top
```

Replace `tb_mm_top` by `tb_eq_multimode`, `tb_fig2_multimode`,
`tb_fft4_multimode` or `tb_mm_controller` to test one block. Each prints
`TB_RESULT checks=N failures=M` and counts of the mechanisms it exercised.

## Files

* `rtl/mm_pkg.sv` — the mode type.
* `rtl/mm_controller.sv` — shared c-step controller, handshake, output valid, mode switching.
* `rtl/fig2_multimode.sv`, `rtl/eq_multimode.sv`, `rtl/fft4_multimode.sv` — the three cores.
* `rtl/mm_top.sv` — the three cores side by side, ports prefixed `f2_`, `eq_`, `fft_`.
* `tb/tb_*.sv` — one testbench per module.
