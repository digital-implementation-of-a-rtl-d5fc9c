# A generalized threshold operator as a universal logic connective

A McCulloch–Pitts neuron with one threshold can act as many different logic
gates. It adds up its excitatory inputs, subtracts its inhibitory inputs, and
fires when the result reaches a threshold *h*. "At least 1 of 2" is OR,
"at least 2 of 2" is AND, "at most 0 of 1" is NOT, "at most 0 of 2" is NOR,
and one excitatory input against one inhibitory input with *h* = 0 is
implication. The inputs can also carry weights. So one fixed circuit can stand
in for a whole gate network, and a new Boolean function needs only a new
threshold, with no rewiring. If the threshold changes over time, the same
circuit moves from one connective to another while its inputs stay the same.
That is the "time-dependent" behaviour this design shows.

This repository holds synthesizable SystemVerilog for two forms of that operator:

* **The 8-bit operator** (`generalized_operator`). It has two excitatory 8-bit
  words A and B, two inhibitory 8-bit words C and D, and a 10-bit threshold M:

      Salida(t+1) = ( ((A+B) − (C+D)) mod 1024  >=  M )   unsigned, 10 bits

  It can take its threshold from a built-in periodic ramp (255 down to 0), which
  makes the connective change over time.
* **The weighted one-bit operator** (`weighted_operator`). It has four
  excitatory and four inhibitory single-bit inputs, each with a fixed weight,
  and a 4-bit threshold. With the weights 8, 4, 2, 1, threshold 11 gives
  F = A(B + CD) and threshold 13 gives F = AB(C + D).

## The 8-bit datapath

```
 A ─┐                   S_a (9b)
    ├─[operand_adder]───────────┐
 B ─┘                           │   R (10b)           R_q (10b)
                     [difference_subtractor]──[result_register]──┐
 C ─┐                           │                     clk, clrn   │
    ├─[operand_adder]───────────┘                                 ├─[magnitude_comparator]── salida
 D ─┘                   S_b (9b)                                  │   (R_q >= M)
                                        M (10b) ──────────────────┘
```

| Stage | Module | Width | Behaviour |
|---|---|---|---|
| Excitatory adder | `operand_adder` | 8+8 → 9 | S_a = A + B; the carry out is bit 8 |
| Inhibitory adder | `operand_adder` | 8+8 → 9 | S_b = C + D |
| Subtractor | `difference_subtractor` | 9−9 → 10 | R = S_a − S_b, two's complement |
| D register | `result_register` | 10 | samples R on the rising clock edge; active-low asynchronous clear |
| Comparator and output gate | `magnitude_comparator` | 10 vs 10 | `gt`, `eq`, and `ge = gt | eq`, which drives `salida` |

### Timing: where the unit delay comes from

The D register is the operator's delay D, the step from *t* to *t+1*. The data
inputs are sampled at a rising clock edge, and `salida` shows the result right
after that edge. The intended way to drive the operator is to change the data
on the falling edge. The result then appears half a clock period later (500 µs
at the 1 kHz reference clock). The threshold M is **not** registered: it goes
straight to the comparator, so a change of M acts on `salida` at once. This is
how the circuit is built, and it means a swept threshold acts without delay on
the last sampled R.

### The unsigned compare: read this before using it

The comparator takes R as an **unsigned** 10-bit number. When the inhibitory
sum is larger, R wraps round: 0x117 − 0x119 gives 0x3FE, and 0x080 − 0x129
gives 0x357. These values are larger than any 8-bit threshold, so the operator
**fires**. This matches the behaviour recorded for the reference circuit:
R = 3FE fires against M = B2, and R = 357 fires against M = 7F. So in this
circuit, strong inhibition makes the output 1 and does not suppress it.
Written as a signed fire rule (excitation − inhibition ≥ h), the formula would
predict the opposite. The RTL follows the recorded hardware. Some consequences:

* With a threshold in the range 1–255, the output is 1 exactly when
  (A+B)−(C+D) ≥ M **or** (A+B)−(C+D) < 0 (the difference wraps to 512 or more).
* NOT, NOR and implication need a signed compare against h = 0. They cannot be
  built on this datapath: with M = 0 the 8-bit operator always fires. They work
  on `weighted_operator`, which compares signed.
* For a signed 8-bit operator, compare `$signed(r_q)` against a
  sign-extended M in `magnitude_comparator`. That is a one-line change. The
  testbench expectations (`tb_generalized_operator`, `tb_logical_functor_top`)
  would have to change with it.

## The ramp threshold

`threshold_ramp` is an 8-bit down counter. It steps down by one every
`STEP_CYCLES` = 2 clocks, from 255 to 0, then starts again at 255. It also
gives a one-cycle `wrap` pulse at the restart. With the 1 kHz reference clock,
that is one step every 2 ms and a period of 512 ms. Its output is zero-extended
to the 10-bit threshold, so M[9:8] is always 0. While the ramp sweeps and the
inputs stay fixed, the output of the operator changes from one connective to
another. For example, with one-bit inputs on A and B (C = D = 0), the output is
"at least M of 2". At M = 2 it is the AND of the two inputs, at M = 1 their OR,
and above 2 it never fires. Over one period the ramp takes the operator through
all three. The `en` input holds the ramp.

## The weighted one-bit operator

`weighted_operator` computes

    net = Σ EXC_WEIGHT[i]·x_exc[i] − Σ INH_WEIGHT[j]·x_inh[j]      (signed)
    y(t+1) = net >= h

The bit order follows how the inputs are listed: `x_exc[3]` is input A with
weight `EXC_WEIGHT[0]` = 8, and `x_exc[0]` is D with weight 1. With these
binary weights, `net` is the 4-bit number ABCD when no inhibitory input is
active. Threshold 11 (1011) then picks out exactly the patterns of
F = A(B + CD), and threshold 13 (1101) those of F = AB(C + D). Going from one
function to the other changes only `h`. A gate-level version would have to be
rewired. The inhibitory weights are 1 by default. Both weight sets are array
parameters, so other weightings take no code change. The output is registered,
like the 8-bit operator's.

## Top level

`logical_functor_top` puts both operators side by side:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; active-low asynchronous reset (clears R, the ramp and `w_y`) |
| `a`, `b` / `c`, `d` | in | 8 | excitatory / inhibitory operands |
| `m_ext` | in | 10 | external threshold |
| `thr_sel` | in | 1 | 1: threshold from the ramp, 0: from `m_ext` |
| `ramp_en` | in | 1 | ramp count enable |
| `s_a`, `s_b` | out | 9 | the two pair sums |
| `r`, `r_q` | out | 10 | difference before and after the register |
| `m` | out | 10 | threshold in use |
| `ramp_wrap` | out | 1 | ramp restart pulse |
| `salida` | out | 1 | 8-bit operator output |
| `w_exc`, `w_inh`, `w_h` | in | 4 | weighted operator inputs and threshold |
| `w_net` | out | 8 | weighted signed sum |
| `w_y` | out | 1 | weighted operator output |

To work on continuous signals, the operator needs analog-to-digital converters
on its inputs and a digital-to-analog converter on its output. Those are
external parts and are not modelled. Their digital sides connect to `a`–`d`,
and to `salida` or `s_a`.

## Where this RTL makes its own choices

* The adders, subtractor and comparator are written as behavioural `+`, `−` and
  `>=`. Their gate structure is left to synthesis.
* The reference circuit has two comparator outputs that feed an AND/OR gate
  pair. Here the output gate is modelled by its function, R ≥ M. The names
  `gt`/`eq` for the two comparator outputs are this design's own.
* All registers reset to zero, and the ramp resets to 255. The clear is
  asynchronous and active low.
* The threshold selector `thr_sel` and the ramp enable are additions. They let
  one top run both the swept-threshold experiment and the fixed-threshold
  applications.
* The weighted operator is a block of its own, with signed arithmetic and
  inhibitory weights of 1. The same two Boolean functions are also checked on
  the 8-bit operator, by packing the four bits into its operands
  (A = 8a + 4b, B = 2c + d, C = D = 0).
* Not included: a stochastic threshold function. It is mentioned only as a
  possible extension of the concept.

## Files

`rtl/`: `functor_pkg.sv` (widths), `operand_adder.sv`,
`difference_subtractor.sv`, `result_register.sv`, `magnitude_comparator.sv`,
`generalized_operator.sv`, `threshold_ramp.sv`, `weighted_operator.sv`,
`logical_functor_top.sv`.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), and
`tb_workload_connectives.sv`. Each ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_logical_functor_top` runs the whole design at its default sizes. It
  runs two full ramp periods (1024 clocks). The data inputs count as in the
  reference experiment: A = 255 − t/2, B = 255 − t, C = 255 − t/3, D = t/2. It
  reproduces the recorded compare points: R = 0FF against M = FF fires,
  R = 3FE against B2 fires, R = 054 against 7F does not. Then it switches to an
  external threshold, holds the ramp and resets in the middle of operation. A
  reference model predicts every output on every clock. The testbench also
  counts each mechanism (fire by excitation, fire by wrapped inhibition, fire
  on R = M, ramp wrap and hold, threshold switch, clear, both Boolean examples)
  and fails if one never happens.
* `tb_workload_connectives` runs OR and AND (thresholds 1 and 2 on two one-bit
  signals), F = A(B + CD) and F = AB(C + D) on both operators, and NOT, NOR and
  implication on the weighted operator.

Simulation with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/functor_pkg.sv tb/tb_logical_functor_top.sv --top-module tb_logical_functor_top
./obj_dir/Vtb_logical_functor_top
```

Replace the testbench name to run any other test. Every test finishes in well
under a second.

## Sizes

After generic synthesis, the whole top has 20 flip-flop bits: 10 for R,
8 + 1 for the ramp and its prescaler, and 1 for the weighted output. It also
has about 40 word-level cells. The design is meant for a small PLD. The widths
come from `functor_pkg` and from the parameters (`IN_W`, `W`, `STEP_CYCLES`,
`M_EXC`, `N_INH`, weights) and can be widened for more or wider inputs.
