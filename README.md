# Carry cut-back approximate adder

A binary adder is slow only because of one rare event: a carry that has to ripple
through every bit position. The carry cut-back (CCB) adder makes that event
impossible. Short detectors sit on a few high-significance bit positions. When such a
slice would let a carry through from end to end (every bit "propagates"), the detector
replaces the carry a few positions lower down by a guess. No operand pair can then
activate the full carry chain. The long chain becomes a false path, and the effective
critical path is only a few segments long.

What makes the idea useful is how errors behave. A wrong guess at bit `m` makes the
result off by exactly `2^m`. It can only happen when the watched slice, which lies
above `m`, holds non-zero operand bits. So the exact sum is always large compared
with the error. The worst-case *relative* error depends on how the modules are sized.
It does not depend on the adder width. The result is a fixed-point adder with a
guaranteed relative precision, the kind of guarantee a floating-point mantissa gives.

The RTL is an unsigned, purely combinational adder. It is fully parameterised over the
design space. The default is a 32-bit adder with four cut-back modules and a
worst-case relative error of 2.08 %.

## Structure

Segments from the least significant bit upwards:

```
 MSB                                                                LSB
 | ADD_last | ADD2 | ADD1 |cut| ADD3 | ... | ADD2 | ADD1 |cut| ADD_first |
              ^^^^ PROP ----'                 ^^^^ PROP ----'   ^^^ SPEC (optional)
```

* **Segments** (`ccb_segment`) are ordinary `a + b + cin` sum generators chained by
  their carries. The whole carry chain exists physically.
* **A cut-back module** (`ccb_module`) covers one ADD1/ADD2 pair.
  * **PROP** (`ccb_prop`) is the AND of `a_i XOR b_i` over the ADD2 slice. It raises
    `cut` when a carry could cross the whole slice.
  * On `cut = 1`, the carry entering ADD1 is replaced. In the *straight cut* the cut
    signal itself is the guess: with `GUESS = 1` it is an OR gate, `carry_in | cut`,
    and with `GUESS = 0` it is `carry_in & ~cut`.
  * With a **SPEC** slice (`ccb_spec`, `SPEC_W > 0`), the replacement is a prediction
    instead. It is the carry out of the `SPEC_W` bits right below the cut, computed in
    lookahead form with `GUESS` as their carry in. A multiplexer picks it when
    `cut = 1`.
* **The top** (`ccb_adder`) places `N_CUT` modules with `ADD3_W` bits between them.
  `ADD_first` fills the bottom and `ADD_last` takes the rest.

A configuration is written as the quintuple `(N_CUT, ADD1, PROP, ADD3, SPEC)`. For
example, `(4,4,2,0,0)` means four modules, each with a 4-bit ADD1 and a 2-bit PROP,
placed back to back with no SPEC. That configuration is the default here. Its cuts
sit at bits 4, 10, 16 and 22, and its PROP slices at bits 9:8, 15:14, 21:20 and 27:26.

### Why the long path cannot happen

Take a carry that starts below cut `k` and runs through ADD1. To go on, it must cross
the ADD2 slice, and that needs every ADD2 bit to propagate. But in that case PROP has
already cut, so the carry entering ADD1 came from the cut gate and not from below.
So the longest path that can really be activated has one of two shapes:
* it starts below a cut and dies inside the next PROP slice;
* it starts at a cut gate and runs on up to the next PROP slice.

Static timing analysis cannot see this. A synthesis flow therefore needs false-path
exceptions, from the segment inputs below each cut, through that module's ADD1, into
and beyond its ADD2. Without them, the tool will try to make the full chain meet
timing. This repository holds no constraint file. Write the exceptions for your tool
from the layout above. `ccb_pkg` gives the bit positions.

## Error behaviour

An error needs three things at once:
1. the PROP slice fully propagates, so the cut fires;
2. with SPEC, the SPEC slice also fully propagates, so its prediction depends on the
   guess;
3. the guess differs from the real carry.

* **Size of an error.** A wrong carry at bit `m` makes a run of wrong sum bits. These
  bits cancel out to exactly `2^m`. If every module guesses in the same direction,
  several errors simply add up. Each one is a distinct power of two at a cut position.
* **Same direction for every module.** If two modules guessed in opposite
  directions, one could undo the other's carry. The wrong bits would then all point the
  same way, and the error could grow to `2^(p+1) - 2^m`. That is why one `GUESS` drives
  every module.
* **Worst-case relative error.** Take `m` as the cut position and `PROP` and `SPEC` as
  the summed bit weights of those slices:
  * guess 0: `2^m / (2^m + PROP)`;
  * guess 1: `2^m / (SPEC + PROP)`.

  For the straight cut this reduces to `1 / (2^ADD1 * (2^PROP_W - 1))`. Only ADD1 and
  PROP set the precision. Making ADD1 one bit wider halves the worst-case error. The
  width of the adder sets only the dynamic range.

| configuration | worst-case RE |
|---|---|
| (4,4,1,0,0) | 6.25 % |
| **(4,4,2,0,0)**, the default | 2.08 % |
| (2,8,1,0,0) | 0.39 % |
| (1,10,1,-,0) | 0.098 % |
| (1,12,3,-,1) | 0.0035 % |

**Multiple errors with guess 0.** With guess 1, the guess-1 bound holds for any
number of simultaneous errors, because the PROP slices of different modules do not
overlap. With guess 0 it is different. The `2^m` term in the guess-0 bound stands for
the carry-generating bits below the cut. A second error higher up can count the same
bits. Random testing of a 32-bit (4,4,2,0,0) adder with guess 0 finds rare results a
little above `2^m/(2^m+PROP)`, for example 2.07 % against 2.04 %. All of them stay
below `2^m/PROP`. The guess-1 forms (OR-cut, SPEC with carry-in 1) have no such
exception. They are also the forms used in every configuration characterised below.

## Parameters (`ccb_adder`)

| parameter | default | meaning |
|---|---|---|
| `WIDTH`   | 32 | operand width; `sum` is `WIDTH+1` bits |
| `N_CUT`   | 4  | number of cut-back modules |
| `ADD1_W`  | 4  | bits between a cut and its PROP slice |
| `PROP_W`  | 2  | PROP slice width |
| `ADD3_W`  | 0  | bits between one module's PROP and the next module's cut |
| `SPEC_W`  | 0  | SPEC slice width; 0 selects the straight cut |
| `GUESS`   | 1  | carry guess, shared by all modules |
| `FIRST_W` | `ceil(spare/2)` = 4 | width of ADD_first; ADD_last gets the remaining bits |

The ports are `a` and `b` (unsigned, `WIDTH` bits), `sum` (`WIDTH+1` bits, carry out on
top) and `cut` (one flag per module, for observation). There is no carry in. The
module has no clock and no reset: wrap it in registers as the datapath needs.
In simulation, two assertions inside `ccb_adder` check the error rules on every
addition:
* with no cut, the sum is exact;
* any error is made only of cut-position weights, in the direction of `GUESS`.

Elaboration fails with an error if the layout does not fit into `WIDTH`, or if a SPEC
slice would reach below the segment under its cut.

## How far it follows the design, and what is chosen here

Taken from the CCB design:
* the segment order;
* the PROP and SPEC behaviour;
* the OR straight cut;
* the multiplexer for SPEC;
* one guess direction for all modules;
* the quintuple parameterisation;
* the 32-bit default configuration.

Both worked examples of the technique are reproduced bit for bit:
* a 17-bit adder with SPEC and guess 0 computes `0x09EFF + 0x00A02` as 43249 instead
  of 43265;
* a 16-bit OR-cut adder computes `0x4A72 + 0x4020` as 35476 instead of 35474.

Chosen here:
* **The ADD_first/ADD_last split.** The method only says to size them so that the
  boundary paths match the middle ones. Here ADD_first simply takes the upper half of
  the spare bits. This choice does not change the worst-case error. It does change
  the RMS error.
* **The AND gate for a straight cut that guesses 0.**
* **Zero carry in, and a `WIDTH+1`-bit sum.**
* **Plain `+` in every segment.** This leaves the segment architecture to synthesis.
  The ADD2 segments keep their carry out, because the segment above needs it.

Not included: timing constraints, and any cost figures (energy, area, delay). These
come from a cell library and a synthesis flow, not from RTL.

## Measured behaviour

The testbenches use random operands from two distributions:
* uniform;
* log-uniform: a random word shifted right by a random amount, which reaches the
  small sums where the worst cases live.

| configuration | bound | measured RE_MAX | RE_RMS (uniform) |
|---|---|---|---|
| (4,4,2,0,0), 10 M pairs | 2.0833 % | 2.0833 % | 0.066 % |
| (4,4,1,0,0) | 6.25 % | 6.25 % | 0.059 % |
| (2,8,1,0,0) | 0.39 % | 0.39 % | 0.0020 % |
| (1,10,1,-,0) | 0.098 % | 0.098 % | 0.00006 % |
| (7,1,1,2,0) | 50 % | 50 % | 2.9 % |

The worst case is reached exactly. For example, in the default adder `0x300 + 0` gives
`0x310`. For (7,1,1,2,0) the worst case (`a = 2^(m+1)`, `b = 0`) is 50 %. A
characterisation from random samples that happens to miss that pattern reports a
smaller figure, around 35 %.

## Files

```
rtl/ccb_pkg.sv       layout functions (cut positions, ADD_first default, ADD_last width)
rtl/ccb_segment.sv   sum-generator segment
rtl/ccb_prop.sv      PROP detector
rtl/ccb_spec.sv      SPEC carry speculator
rtl/ccb_module.sv    one cut-back module: PROP + cut gate or SPEC + multiplexer
rtl/ccb_adder.sv     the adder (top)
tb/ccb_ref_pkg.sv    bit-serial reference model and error bounds for the testbenches
tb/tb_ccb_*.sv       self-checking testbenches
```

Testbenches. Each one prints `TB_RESULT checks=N failures=M` and stops itself through
a watchdog if it hangs.

| testbench | what it does |
|---|---|
| `tb_ccb_prop`, `tb_ccb_spec`, `tb_ccb_module` | exhaustive over their inputs |
| `tb_ccb_segment` | exhaustive for small widths, random for a 10-bit segment |
| `tb_ccb_adder` | default 32-bit adder, 5 M uniform plus 5 M log-uniform pairs, about 10 s |
| `tb_ccb_examples` | the two worked examples, an AND-cut adder and a SPEC adder that guesses 1 |
| `tb_ccb_workloads` | 30 configurations of the 32-bit design space side by side, with the RE table, about 15 s |

What `tb_ccb_adder` checks:
* sum and cut flags against the reference model;
* that an error needs a cut;
* the sign and power-of-two shape of each error;
* the bound;
* that each mechanism occurs: a harmless cut, an erroneous cut, several cuts at once,
  no cut, and a carry out.

To run one, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal rtl/ccb_pkg.sv rtl/ccb_*.sv \
    tb/ccb_ref_pkg.sv tb/tb_ccb_adder.sv --top-module tb_ccb_adder
./obj_dir/Vtb_ccb_adder
```

To try another configuration, override the parameters, for example
`ccb_adder #(.N_CUT(2), .ADD1_W(8), .PROP_W(1)) u (...)`. The reference model in
`ccb_ref_pkg` takes the same values in a `ccb_cfg_t` struct. Give it the same
`first` as the RTL's `FIRST_W`.
