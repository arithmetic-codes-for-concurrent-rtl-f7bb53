# Self-checking neurons with AN and AN+B arithmetic codes

A digital neural network can check itself while it runs: every neuron can flag
its own faults, with no test phase and no duplicated hardware. The trick is to
carry weights and signals in an **arithmetic code**. A value N is stored and
moved as `C(N) = A*N + B`. Multipliers and adders work unchanged on coded
operands. The result of a correct computation is again a multiple of a known
constant (after known offsets are removed), so a non-zero remainder of one
division by a constant exposes the fault.

This RTL implements that scheme for fixed-point, fully parallel feed-forward
networks (one hardware neuron per network neuron). It follows the
architectures of V. Piuri, M. Sami and R. Stefanelli, *Arithmetic codes for
concurrent error detection in artificial neural networks: the case of AN+B
codes*. It contains:

* eight neuron architectures, which differ in what is coded and how errors
  are reported;
* the coder, the decoder/checker and the staircase evaluation function they
  share;
* per-neuron weight storage that codes weights as they are written;
* two fault-location networks;
* a network wrapper, and a top level that runs all eight variants side by side
  on the same inputs.

The code generator is `A = 3` and the displacement `B = 1`.

## The codes in brief

* **AN code** (`B = 0`). Take a product of an AN operand and a plain operand,
  or any sum of AN operands. If nothing is wrong, it is a multiple of `A`. A
  product of two AN operands is a multiple of `A*A`. With `A = 3`, a single
  fault that adds `+-2^k` to a result can never produce a multiple of 3. Each
  coded word costs about `log2(A)` extra bits.
* **AN+B code.** This adds an odd displacement `B` that is prime to `A`.
  Zero is then not a codeword, which removes the cases where an AN code
  cannot see an error. The cost is that products gain cross terms, such as
  `(A*w)(A*x + B) = A^2*w*x + A*B*w`. These terms must be subtracted before
  the check, and producing them is most of the extra hardware.

The decoder/checker (`an_checker`) subtracts a constant offset and divides by
a constant `D`. The quotient is the nominal value. A remainder other than zero
raises `err`.

## The eight neuron architectures

Notation: `x` is a neuron input, `w` a weight, `sigma = sum w*x`, `k` the
number of synapses, and `f` the evaluation function.

| arch (`ced_pkg::arch_e`) | inputs | weights | check | output to next layer | module |
|---|---|---|---|---|---|
| LDCW   | `x`       | `A*w`     | sum / A                        | `y` (plain)  | `neuron_ld_an` (A1=1, A2=A) |
| LDCI   | `A*x`     | `w`       | sum / A                        | `A*y`        | `neuron_ld_an` (A1=A, A2=1) |
| LDCWI  | `A*x`     | `A*w`     | sum / A^2                      | `A*y`        | `neuron_ld_an` (A1=A2=A) |
| LDCWAI | `A*x+B`   | `A*w`     | (sum - A*B*sum w) / A^2        | `A*y+B`      | `neuron_ldcwai` |
| LDAWCI | `A*x`     | `A*w+B`   | sum / A, then (sum - A*B*sum x) / A^2 | `A*y` | `neuron_ldawci` + `ldawci_layer_corr` |
| LDAWAI | `A*x+B`   | `A*w+B`   | sum / A, then (sum - correction) / A^2 | `A*y+B` | `neuron_ldawai` |
| LPCI   | `A*x`     | `w`       | sum / A; error bit added to output | `A*y` or `A*y+1` | `neuron_lpci` |
| GPCI   | `A*x`     | `w`       | none in the neuron; checked at the network outputs | `A*f` keeping the residue | `neuron_gpci` + `g_eval` |

What each one catches with single `+-2^k` errors. The testbenches check every
line of this list.

* **LDCW.** Catches arithmetic errors. A weight-memory error stays *latent*
  while the input on that synapse is a multiple of `A`. Input lines are not
  protected.
* **LDCI.** Catches arithmetic errors. An error on an input line is caught
  unless the weight it meets is a multiple of `A`. Weight memory is not
  protected at all.
* **LDCWI.** Combines the two: weight errors can be latent and line errors can
  be masked under the same conditions.
* **LDCWAI.** Every weight-memory error is caught at once. The error term
  `2^k*(A*x + B)` cannot be a multiple of `A^2`, whatever `x` is.
* **LDAWCI.** Every input-line error is caught by the first check, which tests
  that the raw sum is a multiple of `A`. Weight errors can be latent, as in
  LDCW.
* **LDAWAI.** Catches every single error listed, without latency.
* **LPCI and GPCI.** No error wires. A faulty result travels on as a
  non-codeword and is caught where the network's outputs are decoded. It is
  lost if every weight it meets downstream is a multiple of `A`.

### The correction terms (the least obvious part)

* **LDCWAI.** Each product is `A^2*w*x + A*B*w`. The term `A*B*sum(w)` does
  not change while the weights are fixed. It is stored per neuron as `corr`,
  equal to `-A*B*sum(w)`, and enters the main adder as one more operand.
* **LDAWCI.** The sum is `A^2*sigma + A*B*sum(x)`. The correction depends on
  the inputs, but it is the same for every neuron of a layer. So one
  `ldawci_layer_corr` per layer adds the coded inputs (giving `A*sum x`),
  multiplies by `B`, and broadcasts the result. Each neuron first checks the
  raw sum against `A`. That check is what catches a corrupted input line,
  because the subtraction that follows would otherwise cancel most of the
  error. The neuron then subtracts the correction and checks against `A^2`.
* **LDAWAI.** The sum is `A^2*sigma + A*B*sum w + A*B*sum x + k*B^2`. Three
  steps remove the extra terms:
  1. The main adder takes the constant `-k*B^2`.
  2. A second adder adds the coded inputs and the stored per-neuron constant
     `A*sum(w) - k*B`. The result is `A*sum x + A*sum w`.
  3. That result is multiplied by `B` and subtracted.

  As in LDAWCI, the raw sum is checked against `A` and the corrected sum
  against `A^2`.

`neuron_mem` computes the per-neuron constants while the weights are loaded.
The constant is therefore stored separately from the weights. This matters:
if the constant were recomputed from the stored weights, a corrupted weight
would corrupt the constant in the same way, and the error would cancel.

### The evaluation function and GPCI's `g`

`f` is a staircase of `STEPS` comparators (`step_eval`): `y` is the number of
thresholds `thr[t]` that `sigma` reaches, 0 to `STEPS`. With `STEPS = 1` it
is a single step. Each neuron's bias (its threshold) is folded into its own
thresholds. The comparator output is coded directly as `A*y + B`, so
evaluation and coding are one operation.

GPCI must pass an error on even though it never checks. `g_eval` computes
`g(v) = A*f(q) - A*q`, with `q = floor(v/A)`, and the neuron outputs `v + g(v)`.
For a codeword `v = A*sigma` this is `A*f(sigma)`. For a wrong sum it is
`A*f(q) + (v mod A)`, so the remainder of the error goes on to the next layer.

## Reporting errors

**Error chain.** Every local-detection neuron has `e_in` and `e_out`, with
`e_out = e_in | e`. `ced_network` chains all its neurons into one go/no-go
signal, `err`.

**Fault location.** Neurons are placed on an array with one column per layer
and one row per position in a layer.

* `fault_loc_uncoded` (LDCW). Each local error drives the vertical line of
  its layer and the horizontal line of its row. Under a single fault, the
  faulty neuron is at the crossing of the leftmost active vertical line and
  the uppermost active horizontal line. `loc_layer` and `loc_row` decode that
  crossing.
* `fault_loc_coded` (the other local-detection architectures). With coded
  inputs, a wrong output of one neuron makes every neuron that receives it
  flag an error, which would light every horizontal line. So the cumulative
  line `ec[l] = vline[0] | ... | vline[l]` inhibits the local errors of every
  later layer before they reach the horizontal lines. Only the first faulty
  layer then marks its row.
  * `LATCH_EC = 1` takes the inhibiting lines from a register, to cut the
    skew of long vertical chains. The cost is one clock of location latency.
  * The default is `LATCH_EC = 0`, which is combinational.

**Output check.** `ced_network` decodes the last layer's outputs with an
`an_checker` and reports a non-codeword on `out_err`. This is the only check
for LPCI and GPCI. For LDCW the outputs are plain, so `out_err` stays 0.

## Network, top level and timing

`ced_network #(.ARCH(...), .LAYERS, .NEURONS, .STEPS, .DW, .LATCH_EC)` builds
a fully connected feed-forward network:

* `LAYERS` layers of `NEURONS` neurons, each neuron with `NEURONS` synapses;
* `an_encoder`s on the primary inputs;
* one `neuron_mem` per neuron;
* the neuron type chosen by `ARCH`;
* a layer correction generator for LDAWCI;
* the matching location network and the output checkers.

`ced_top` instantiates one `ced_network` for each of the eight architectures.
Output index `a` is the `arch_e` value: 0 LDCW, 1 LDCI, 2 LDCWI, 3 LDCWAI,
4 LDAWCI, 5 LDAWAI, 6 LPCI, 7 GPCI. All eight share the inputs `x` and the load
port.

* **Datapath.** All neurons are combinational. `y`, `err`, `out_err`,
  `loc_valid`, `loc_layer` and `loc_row` are registered, so the outputs for an
  input vector appear one clock after it is applied. A new vector can be
  applied every clock.
* **Loading.** Write one word per clock with `we`, `wlayer`, `wneuron`,
  `waddr` and `wdata`.
  * Words `0 .. N_IN-1` are nominal weights, in the low `DW` bits of `wdata`.
    They are coded on the way in.
  * Words `N_IN .. N_IN+STEPS-1` are the thresholds, stored uncoded.
  * Write a neuron's weights as a complete set starting with word 0, because
    word 0 restarts the correction-constant accumulator.
* **Reset.** `rst_n` is asynchronous and active low. It clears the storage and
  the output registers.

Default sizes are in `ced_pkg`: `DW = 8` (signed nominal data), `A = 3`,
`B = 1`, `STEPS = 3`, `LAYERS = 2`, `NEURONS = 3`. Derived widths:

* coded operands: `DW + clog2(A+1) + 1` = 11 bits;
* sums: `2*11 + clog2(N_IN+2) + 2` = 27 bits.

These widths are wide enough that no sum of coded operands overflows.

## What is this design's own choice

Taken from the source architecture:

* the eight datapaths and their correction terms;
* `A = 3` and `B = 1`;
* the OR-chain error propagation;
* the two location schemes and the latching option;
* the `g` function of GPCI, for codewords.

Chosen here where the source is silent:

* data widths, number of synapses (3), number of steps, and network size
  (2 x 3);
* the staircase form of `f`, and folding the bias into the thresholds;
* registers for the weight storage, with the load protocol and
  correction-constant accumulation above;
* registered outputs with one clock of latency;
* running all eight variants side by side in `ced_top`;
* decoding the location crossing into `loc_layer` and `loc_row`;
* the value of `g` for non-codewords (floor division, so the residue
  survives);
* the error chain order (layer by layer, row by row);
* the output checker on coded-output local-detection networks.

Not covered:

* **Fail-safe checkers and comparators.** The scheme asks that a fault in a
  checker, or in the evaluator's comparators, produce a non-codeword rather
  than a wrong codeword. That is a property of the gate-level design, which
  RTL cannot fix; here these units are written behaviourally.
* **PLA evaluator.** The PLA implementation of the staircase, mentioned as an
  alternative, is not built.
* **Learning.** Weights are loaded from outside.
* **Unprotected units.** The thresholds and the evaluation function are
  unprotected, as in the source scheme.
* **Locating output-line faults.** If a neuron's output line is corrupted
  with coded inputs, the neuron itself raises no error. Location then points
  at the first layer that receives the bad value. This is how the scheme
  works, not a bug.

## Verifying and changing it

Every module has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M`. `tb_ref_pkg` holds the integer reference
model: the staircase function, floor division and a non-negative residue.

* Unit tests compare against that model. They inject single `+-2^k` errors on
  weights, input lines, correction constants and adder outputs, and check
  each error flag against the rules listed above.
* `tb_ced_top` runs all eight networks at the default size against a model of
  the whole network. It injects five kinds of fault using `force` on internal
  signals, and checks the error chain, location and output check for every
  architecture. It also counts that each mechanism occurred at least once:
  * latent weight error;
  * masked line error;
  * inhibition;
  * LPCI and GPCI propagation.
* `tb_ced_network` runs a 3-layer network with the latched location option.

To run one test with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ced_pkg.sv tb/tb_ref_pkg.sv tb/tb_ced_top.sv --top-module tb_ced_top
./obj_dir/Vtb_ced_top
```

To change the code, override `A` and `B` on the modules, or the constants in
`ced_pkg`. `A` should stay odd. `B` must be odd and prime to `A`. `STEPS`,
`LAYERS` and `NEURONS` are parameters of `ced_network` and `ced_top`.

To add a neuron variant:

1. add an `arch_e` value;
2. give its codes in the `code_*` functions of `ced_pkg`;
3. add a branch to the generate `case` in `ced_network`.
