# XOR multilayer perceptron on two sequential MAC units

A single-layer perceptron cannot separate XOR: (0,0) and (1,1) must give 0,
(0,1) and (1,0) must give 1, and no single line splits those points. One hidden
layer solves it. This design evaluates a trained 2-2-1 network in hardware:

```
             bias 1.0                       bias 1.0
                | -1.5                         | -0.5
   in1 --+1--> (A: AND) ------ -2 ------\      v
      \ /+1                              >--> (O) --> result7, result1
      / \+1                             /
   in2 --+1--> (B: OR)  ------ +1 ------/
                ^ -0.5
             bias 1.0
```

Each neuron adds a bias term and two weighted inputs, then applies a hard
limiter: the output is 1.0 if the sum is zero or more, else 0.

- Neuron A computes -1.5 + x1 + x2 and acts as an AND.
- Neuron B computes -0.5 + x1 + x2 and acts as an OR.
- The output neuron computes -0.5 - 2A + B. That is 1 only for "OR and not AND", which is XOR.

The weights are fixed when the design is elaborated. Nothing is trained on chip.

Rather than one multiplier per connection, the design has two serial
multiply-accumulate (MAC) units and one activation unit. A small state machine
reuses them for all three neurons. This trades time (117 clock cycles per
evaluation) for area (about 140 flip-flops, and one 8-bit add/subtract path in each
multiplier).

## Number format

All neuron signals and weights are 7-bit two's complement with four fraction
bits (Q3.4). The range is -4.0 to +3.9375 in steps of 1/16.

| value | code |
|------:|-----:|
| 1.0   | 16   |
| 0.5   | 8    |
| -0.5  | -8   |
| -1.5  | -24  |
| -2.0  | -32  |

A product of two Q3.4 values is Q6.8 and fits in 14 bits. The accumulators and
the activation input are therefore 14 bits wide. The hard limiter only looks at
the sign, so the scale of the sum does not matter to it. Its output is 16 (1.0)
or 0, back in Q3.4. `result1` is `result7 >= 8`, meaning the output is at least 0.5.

The accumulators wrap on overflow and do not saturate. With the default weights
and any 7-bit inputs, no neuron sum can exceed ±2432. That is well inside the
14-bit range of ±8191, so wrapping never happens in the XOR network. It can happen
if you supply other weights.

The constants and types are in `rtl/xor_nn_pkg.sv`.

## The serial signed multiplier (`three_ip_mac`)

This is the least obvious part. A MAC request multiplies `mr` (the neuron input)
by `md` (the weight). It uses one adder, one multiplier bit at a time.

A 15-bit register `P` holds `{partial product (8 bits), multiplier (7 bits)}`.
It is loaded with `{0, mr}`, and `md` is sign-extended to 8 bits. For each of the
7 multiplier bits, two cycles follow:

1. **ADD_SUB** – if `P[0]` is 1, add `md` to the upper 8 bits of `P`. For the
   last bit, which is the sign bit of `mr` and has weight -2^6, subtract `md` instead.
2. **SHIFT** – shift all of `P` right by one, copying the top bit (arithmetic
   shift). The used multiplier bit drops out at the bottom.

After 7 bits, `P[13:0]` holds the exact signed product. One more cycle
(**ACCUM**) adds it to the 14-bit accumulator, and then `done` rises. Why 8 upper
bits are enough: after each shift the partial product lies in [-64, 63]. Adding
or subtracting a 7-bit value gives at most ±128, which 8 signed bits hold. The
worst case, (-64)·(-64) = 4096, is covered by the testbench.

Handshake: `enable` is a level request.

- At the first rising edge with `enable` high, the unit captures the operands.
- After the 16th such edge (2·7+2), `done` is high and `mac_result` already holds the new sum.
- `done` stays high while `enable` stays high, and no more products are added.
- Dropping `enable` for one cycle returns the unit to idle, ready for the next request.
- `clear` zeroes the accumulator synchronously.
- `rst_n` is an asynchronous reset of everything.

The published description of this unit raises `done` one cycle before the
accumulator is updated. Here the two coincide, so the controller never sees a
stale sum.

## Evaluation schedule (`xor_nn`)

The top level holds the state machine, the input registers and the two
hidden-neuron output registers (`h1`, `h2`). One evaluation runs:

| phase | MAC A | MAC B | activation |
|-------|-------|-------|------------|
| clear | clear | clear | – |
| term 0 | 1.0 × b-weight of A (-1.5) | 1.0 × b-weight of B (-0.5) | – |
| term 1 | in1 × 1 | in1 × 1 | – |
| term 2 | in2 × 1 | in2 × 1 | – |
| limit A, limit B | – | – | sum A → `h1`, then sum B → `h2` |
| clear | clear | – | – |
| term 0..2 | 1.0 × -0.5, `h1` × -2, `h2` × 1 | idle | – |
| limit output | – | – | sum → `result7`, `result1`, `done` |

Each term holds the MAC request for 17 cycles: 16 cycles of the MAC plus one for
the controller to register `done`. One gap cycle with the request low follows
each term. The total from the starting edge to `done` is

    3 + 6·(2·7 + 4) + 6 = 117 rising edges

The 6·18 part covers six MAC terms, because the two hidden neurons share their
three terms. The remaining 9 cycles are start, two clears and three activate/capture pairs.

The bias is treated as an input fixed at 1.0 multiplied by a bias weight, so
all three terms of a neuron use the same datapath.

## Interface of the top level

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `enable` | in | 1 | high: evaluate once, then hold; low: clear outputs, abort |
| `in1`, `in2` | in | 7 | inputs, Q3.4 (use 0 and 16 for logic 0/1) |
| `result7` | out | 7 | output neuron, 0 or 16 |
| `result1` | out | 1 | `result7 >= 8` |
| `done` | out | 1 | results valid |

`in1` and `in2` are sampled at the first edge where `enable` is high. While
`enable` stays high after `done`, the outputs hold and no new evaluation
starts. To evaluate again, drop `enable` for at least one cycle. That also
clears `done`, `result7` and `result1`. Dropping `enable` during an evaluation
abandons it. Parameters:

- `WEIGHTS` (`xor_weights_t`): the twelve bias inputs and weights. It defaults to the XOR network above.
- `THRESH`: the decision level for `result1`. It defaults to 0.5.

Any other 2-2-1 hard-limiter network with Q3.4 weights can be loaded through
`WEIGHTS`.

## What departs from the original design, and what is missing

Taken over as published:

- the topology and weights
- the Q3.4 and 14-bit formats
- the shift-and-add multiplier with a subtract on the sign bit
- the order of operations, including one activation unit shared by all neurons
- the enable/done behaviour of the top level

Choices of this implementation:

- **MAC `done` timing.** `done` now rises with the updated sum (see above). The
  controller waits one extra cycle per term.
- **Reset.** A system reset `rst_n` was added. The accumulator clear is a
  synchronous `clear` input instead of an asynchronous reset.
- **Input capture.** `in1`/`in2` are registered at the start, not read live
  throughout the evaluation.
- **State machine.** It loops over a term counter instead of having one state
  per operation. It has one gap cycle between MAC requests.

Not built:

- **Training.** The original work describes initialising random weights,
  computing the output and hidden deltas, and updating with learning rate 0.5.
  The hardware it presents only evaluates a network with fixed, already-trained
  weights. The delta rule it relies on uses the sigmoid derivative y(1-y). That
  derivative is zero for every hard-limiter output, so a unit built to that rule
  would never change a weight. There is no training datapath here.
- **Sigmoid activation.** Only the hard limiter is implemented. No smooth
  transfer function is implemented.

## Files

| file | content |
|------|---------|
| `rtl/xor_nn_pkg.sv` | Q3.4 types, constants, weight struct and default XOR weights |
| `rtl/three_ip_mac.sv` | serial signed multiply-accumulate unit |
| `rtl/activation_function.sv` | registered hard limiter |
| `rtl/xor_nn.sv` | top level: controller, two MACs, shared activation |
| `tb/three_ip_mac_tb.sv` | MAC: corner and random products, wrapped sums, 16-cycle latency, clear, handshake |
| `tb/activation_function_tb.sv` | limiter: values around zero and extremes, enable hold |
| `tb/xor_nn_tb.sv` | full design at default parameters: truth table, 200 random Q3.4 inputs, 117-cycle latency, aborts and clears |

Every testbench compares against values it computes itself and prints
`TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl \
  rtl/xor_nn_pkg.sv rtl/three_ip_mac.sv rtl/activation_function.sv rtl/xor_nn.sv \
  tb/xor_nn_tb.sv --top-module xor_nn_tb -Mdir obj_xor
./obj_xor/Vxor_nn_tb
```

For a unit test, replace the top file and the testbench, for example
`rtl/three_ip_mac.sv tb/three_ip_mac_tb.sv --top-module three_ip_mac_tb`. The
package must come first on the command line. Each testbench finishes in well
under a second. The top-level testbench runs the design with no parameter
overrides.

Verilator's lint reports `SYNCASYNCNET` on `rst_n` in `xor_nn` and
`three_ip_mac`. The warning appears because `rst_n` is both the asynchronous
reset of the flip-flops and the `disable iff` condition of the assertions. It
is harmless. The assertions check three things: the limiter emits only 0 or 1.0,
`result1` agrees with `result7`, and a MAC holds `done` while its request stays
high.
