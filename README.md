# At-speed testable parallel IIR filter

Linear filters are usually hard to test. Their state registers sit inside feedback loops, so a
sequential test generator cannot set them to chosen values. The usual fix is to put some of those
registers on a scan chain, which costs area and stops the datapath from being tested at full
speed. This design avoids that with two rewrites of the computation, and no test hardware is
added:

1. **Unfolding.** The recursion is unrolled twice. Each iteration then takes two input samples
   and produces two outputs and the next state. The outputs and the new state are still linear
   combinations of the two inputs and the old state.
2. **Sharing adders between input-only and state additions.** Each sum is built as a balanced
   tree, and its first addition joins the two input products. Some adders are then shared. In
   one control step such an adder adds values that come only from the primary inputs. In the
   other step it adds the partial sums that form the next state. The registers in front of that
   adder therefore hold values that can be set directly from the input pins every iteration. The
   state registers are loaded from the same adder, so they too can be reached from the inputs.

The RTL applies this to an eighth-order IIR filter in parallel form. That is four independent
second-order sections plus a direct path. The parallel form is chosen because it is numerically
well behaved, so an 11-bit word is enough. Its sections never interact, so unfolding adds no
hardware between them.

## The unfolded second-order section (`tsect`)

A section computes

    w[n] = u[n] + A1*w[n-1] + A2*w[n-2]
    y[n] = B0*w[n] + B1*w[n-1]

Let the state be S1 = the newest w and S2 = the one before it. Unfolded twice, one iteration maps
the input pair (u0, u1) and the state to:

| row          | × u0      | × u1 | × S1                    | × S2             |
|--------------|-----------|------|-------------------------|------------------|
| y0 (Out1)    | B0        | 0    | B0·A1 + B1              | B0·A2            |
| y1 (Out2)    | B0·A1 + B1| B0   | B0·(A1²+A2) + B1·A1     | (B0·A1 + B1)·A2  |
| S1' (= w1)   | A1        | 1    | A1² + A2                | A1·A2            |
| S2' (= w0)   | 1         | 0    | A1                      | A2               |

These 16 constants are computed at elaboration (`lin_pkg::unfold2`). Each one is computed exactly
from the section coefficients and rounded once, half up, to the coefficient format. Each row is a
tree of four constant multipliers and three adders. The first adder joins the u0 and u1
products, and the second joins the S1 and S2 products. Zero constants still get a multiplier, so
the structure is the same for every coefficient set.

### Shared adders, register files and the two-step schedule

Every register file feeds exactly one adder input (a dedicated register file). Two adders are
shared:

* **Adder A**, fed by register files R1 and R2, does the input-only addition of the y0 tree and
  the final addition of the S1 tree.
* **Adder B**, fed by register files R3 and R4, does the same for the y1 and S2 trees.

All other additions have their own adder. An iteration takes two clock cycles:

| step       | adder A / B compute                         | R1, R2 / R3, R4 load                   | other registers           |
|------------|---------------------------------------------|----------------------------------------|---------------------------|
| `ST_OUT`   | previous iteration's c1·u0 + c2·u1 (c5·u0 + c6·u1), added to the held state half → y0 / y1 | partial sums of the S1 / S2 trees | O1/O2 ← state half of the output trees |
| `ST_STATE` | final sums of the S1 / S2 trees → S1, S2     | input-only products c1·u0, c2·u1 / c5·u0, c6·u1 | — |

The two values that share a register file are never alive at the same time, so each register file
holds a single word. After every `ST_STATE` edge, R1..R4 hold products of the current inputs only.
This is the controllability the method relies on. The section testbench checks it on every
iteration. It also checks that a single input pair, applied from the reset state, loads any
chosen value into S1 and S2: u0 = S2 and u1 = S1 − ⌊A1·S2 / 2^COEF_F⌋.

`tsect` contains two assertions for its schedule. One requires the input pair to stay stable
across an iteration, and the other requires `ST_STATE` to be followed by `ST_OUT`.

Timing of one section:

* u0 and u1 must stay stable for both cycles of the iteration.
* S1 and S2 are updated at the end of `ST_STATE`.
* The output pair of an iteration is registered at the end of the next iteration's `ST_OUT`
  cycle, and stays on the outputs for two cycles.

## The parallel filter (`par_iir`)

    u      = K · in
    out    = D · u + Σ_s y_s
    section s: coefficients SEC[s] = {B0, A1, B1, A2}

The pair of consecutive samples (`in1` is the earlier one, `in2` the later one) is held in an input
register. The gain K and the direct-path gain D are built once for each sample of the pair. The
four sections work in parallel, and each output of the pair has its own summation chain.
`step_ctrl` runs the two-step sequence.

Interface timing, counted in clock cycles:

* `take_in` is high in every `ST_STATE` cycle. The pair on `in1`/`in2` is sampled at the end of
  that cycle.
* That pair's outputs are loaded 4 cycles after its sampling edge. They appear on `out1`/`out2` in
  the next cycle, with `out_valid` high for that one cycle, and they stay for two cycles.
* Throughput is one sample per clock (a pair every two cycles).
* After reset, the first `out_valid` comes 6 cycles after reset is released. Reset is
  asynchronous and active low, and it clears every state, register-file and pipeline register.

## One sample per clock on shared pins (`par_iir_serial`, top)

Unfolding seems to double the number of pins, because each iteration takes two input samples
and returns two outputs. The two samples of a pair never need to be on the pins at the same time,
so they share them:

* **Input.** The first sample of a pair comes in the `ST_OUT` cycle and is delayed one cycle by
  a register. The second comes in the `ST_STATE` cycle and goes straight into `par_iir`, which
  samples the pair at the end of that cycle.
* **Output.** The pair is held for two cycles. `out1` is driven in the first of them and `out2` in
  the second.

Ports: `in_sample` (one sample per clock), `in_first` (high when the sample on the pin is the first
of a pair), `out_sample` and `out_valid`.

Timing:

* The input stream starts in the first cycle after reset.
* Every output sample appears exactly 6 cycles after its input sample.
* After the pipeline fills, one sample leaves per clock.

## Number format

* All words (inputs, state and outputs) are `DATA_W` = 11 bits, two's complement. This is the
  word length the parallel structure needs for the reference bandpass filter.
* Coefficients are `COEF_W` = 11 bits with `COEF_F` = 8 fraction bits, so their range is ±4.
* The unfolded constants get two extra bits (`TCOEF_W`). Elaboration stops with an error if any
  constant does not fit.
* Products and tree sums are kept at full precision. A tree result is brought back to a data word
  by an arithmetic right shift of `COEF_F` bits (floor), then wrapped to `DATA_W` bits. The same
  applies to K·in, D·u and the final sums.
* Wrap-around keeps every operation linear modulo 2^11. It gives no protection against overflow,
  so scale the input with K.

The unfolded filter rounds at different places than the original one-sample-at-a-time filter, so
the two are not bit-identical. With the example coefficients, the testbenches measured at most
about 6 LSB between the RTL and an exact real-valued run of the original filter. The distance grows slowly with the number of sections (about 8 LSB at nine sections).

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `DATA_W`  | 11      | data and state word length |
| `COEF_W`  | 11      | section coefficient word length |
| `COEF_F`  | 8       | fraction bits of every coefficient |
| `TCOEF_W` | `COEF_W`+2 | word length of the unfolded constants |
| `NSECT`   | 4       | second-order sections (filter order = 2·NSECT) |
| `K`, `D`  | 128, 64 | input gain 0.5, direct-path gain 0.25 |
| `SEC`     | see `rtl/par_iir.sv` | per section {B0, A1, B1, A2}, 16-bit fields, section 0 first |

The default coefficients are a stable example filter, not a particular published design. To
realise a given transfer function, expand it into partial fractions of second order. Quantise
each section's {B0, A1, B1, A2} and the gains K and D to `COEF_F` fraction bits, and pass them as
parameters. A first-order term is a section with A2 = B1 = 0. If `NSECT` changes, `SEC` must
have `NSECT` entries.

## What is and is not shown

* The RTL builds the testable structure: unfolding by two, balanced trees with the input products
  next to each other, and shared adders whose register files are loaded from the inputs every
  iteration. No fault simulation or sequential test generation was run on it. The claim that it
  is fully testable without scan is the method's claim, not a result measured here.
* Only the dedicated register-file form of the section is built. A variant for a general
  register model, where single registers on adder outputs are shared instead of register files,
  is not included.
* The method asks that *every* adder perform at least one input-only addition. Unfolded twice,
  each of the four trees has only one such addition. A design that fully follows that rule would
  therefore have at most four adders for the twelve additions and at least three control steps
  per iteration. This design keeps one sample per clock and shares only the two adders A and B.
  Adders A and B and the two input-pair adders of the state trees have an input-only addition.
  The other six adders do not: the state halves of all four trees and the two output roots. The
  operands of those six adders are products of S1 and S2, and a single input pair can load S1 and
  S2 from reset, so their inputs can still be set from the pins within one iteration.
* The unfolding level is fixed at two. In the method, the level is chosen to meet a throughput
  target and to give every shared adder an input-only addition. A higher level would need a
  different section module.
* The two-cycle schedule, which additions are shared, the widths, the rounding, the reset and
  the `take_in`/`out_valid` handshake are this design's own choices. The method fixes the
  sharing principle, not these details.
* The method also covers multi-input multi-output linear systems. Only the single-input
  single-output parallel form is built.

## Files

| file | content |
|------|---------|
| `rtl/lin_pkg.sv` | shared constants, control-step type, unfolded-constant functions |
| `rtl/step_ctrl.sv` | two-step sequencer, `take_in` and `out_valid` |
| `rtl/tsect.sv` | unfolded, testable second-order section |
| `rtl/par_iir.sv` | the parallel filter, pair interface |
| `rtl/par_iir_serial.sv` | top: the filter with shared input and output pins |
| `tb/step_ctrl_tb.sv` | sequence, sampling and fill behaviour of the sequencer, across resets |
| `tb/tsect_tb.sv` | two sections against a bit-exact model and the real-valued original section; state, register-file contents, output latency |
| `tb/par_iir_tb.sv` | the pair-interface filter at default parameters: impulse, step, random and silence; latency, rate, mid-run reset |
| `tb/par_iir_serial_tb.sv` | the whole design at default parameters, one sample per clock, same checks plus pin sharing |
| `tb/par_iir_harness.sv`, `tb/par_iir_orders_tb.sv` | the filter at 5th order (one first-order section) and at 10th, 12th and 18th order (5, 6 and 9 sections) |

Every testbench prints `TB_RESULT checks=N failures=M` at the end.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/lin_pkg.sv tb/par_iir_serial_tb.sv --top-module par_iir_serial_tb
    ./obj_dir/Vpar_iir_serial_tb

Replace `par_iir_serial_tb` with `par_iir_tb`, `tsect_tb`, `step_ctrl_tb` or `par_iir_orders_tb`
to run the others (use a fresh `--Mdir` or remove `obj_dir` in between). Lint only the RTL with:

    verilator --lint-only -Wall -y rtl +libext+.sv rtl/lin_pkg.sv rtl/par_iir_serial.sv \
        --top-module par_iir_serial
