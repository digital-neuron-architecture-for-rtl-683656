# A serial-parallel digital neuron with sigmoid / tanh activation

This is a small digital neuron for multilayer networks that learn on-chip. It
computes

    z  = sum_{i=0..15} w_i * x_i          (x_0 = bias b, w_0 = +1)
    y  = f(z)
    yD = f'(z)

where `f` is either the logistic sigmoid or a tanh-shaped function, picked by a
one-bit `neuronType` input. The derivative output `yD` is there for the
backward pass of back-propagation, so a learning engine does not have to
recompute it.

Two ideas keep the design small:

* **Serial-parallel net input.** A fully parallel 16-input neuron needs 16
  multipliers. Here the 16 input-weight pairs go through four multipliers in
  four clock cycles, four pairs per cycle, and a register sums the groups.
* **Multiplier-free activation.** The sigmoid is a piecewise-linear PLAN
  approximation whose slopes are powers of two, so it needs only shifts, a
  comparator and an adder. The sigmoid's derivative and the tanh come from
  the sigmoid through algebraic identities.

The 16-input default has 16 flip-flops (the accumulator) and five multipliers:
four in the net-input path and one for the derivative.

## Number format

Every signal on the datapath is a 16-bit two's-complement number in **3.12**
format: a sign bit, 3 integer bits and 12 fraction bits. The range is
[-8.0, +7.999755859375] and the step is 2^-12. `neuron_pkg` defines the type
`fix_t` and all constants.

The datapath takes "one" as **0x0FFF (0.999755859375)**, not 0x1000. This
value is used in four places: the flat part of the sigmoid, `1 - sigma+`,
`1 - sigma` and `2*sigma - 1`. As a result `y` never quite reaches +1 or -1,
and `sigma(z) + sigma(-z)` equals 0x0FFF, one LSB short of 1.0. The weight `w_0 = +1`
of the bias input is an input value, not an internal constant. The
testbenches drive it as 0x1000, which is exactly 1.0.

Arithmetic rules, which the golden model in `tb/tb_ref_pkg.sv` restates:

| operator | rule |
|---|---|
| multiplier | full 32-bit product (6.24). The result is `{p[31], p[26:12]}`: the sign, 3 integer bits and 12 fraction bits. The fraction is truncated (floor). The integer field is **not** saturated: a product of magnitude 8 or more wraps (3.0 * 3.0 gives 1.0). |
| adder | 16-bit sum, clamped to 0x7FFF or 0x8000 on overflow. |
| subtractor | plain 16-bit difference. It is only used where the result cannot overflow. |

The multiplier really does wrap. Keep `|x_i * w_i| < 8`. With inputs and
weights in [-1, 1], which is normal for sigmoid/tanh networks, this holds
easily. The adders after the multipliers do saturate, so a sum that is too
large sticks at the rail and does not wrap.

## Datapath

```
 x[0..15], w[0..15]
        |
   selBlock  ---- sel (2 bits): group g = pairs 4g..4g+3
        |  xs[0..3], ws[0..3]
   netInputBlock
        4 x multiplier -> adder, adder -> adder = partial sum p
        adder(z, p) -> rpp (16-bit register) -> z
        |
   activationBlock ---- neuronType
        sigmaCircuit -> sigma
        sigmaDCircuit(sigma) -> sigmaD           = sigma*(1-sigma)
        tanhCircuit(sigma)   -> tanh             = 2*sigma - 1
        adder(sigmaD, sigmaD) -> tanhD           = 2*sigmaD
        2 x mux2 -> y, yD
```

* **selBlock** is a row of eight `mux4`: one per lane for the inputs and one
  per lane for the weights. Lane k gets `x[4*sel+k]` and `w[4*sel+k]`. With
  the `N_INPUTS` parameter set above 16 (a multiple of 4), further mux4 levels
  form a tree. Each level takes two more `sel` bits, and the lowest bits drive
  the first level. So for 64 inputs `sel` is 4 bits wide and selects groups
  0..15.
* **netInputBlock** forms `p = (xs0*ws0 + xs1*ws1) + (xs2*ws2 + xs3*ws3)` with
  four multipliers and three saturating adders. A fourth saturating adder and
  the register `rpp` accumulate: `z <= sat(z + p)` in each cycle with `en`
  high. `rst` clears `z`.
* **activationBlock** is purely combinational, so `y` and `yD` follow `z`
  within the same cycle.

## The PLAN sigmoid (sigmaCircuit)

For `a = |z|` the positive half of the sigmoid is approximated by four line
segments:

| segment (`seg_e`) | range of \|z\| | sigma+ | slope as a shift |
|---|---|---|---|
| `SEG_LT1` | 0 .. 1 | 0.25 a + 0.5 | a >> 2 |
| `SEG_LT2_4` | 1 .. 2.375 | 0.125 a + 0.625 | a >> 3 |
| `SEG_LT5` | 2.375 .. 5 | 0.03125 a + 0.84375 | a >> 5 |
| `SEG_SAT` | >= 5 | 1 (0x0FFF) | 0 |

Each segment includes its lower limit. The circuit works as follows:

1. `conditionDetector` compares |z| with 1, 2.375 and 5.
2. `shifter` produces the slope term.
3. A `mux4` picks the segment's offset.
4. An adder sums the slope term and the offset.
5. For negative z the symmetry `sigma(-a) = 1 - sigma(a)` applies. A
   subtractor forms `1 - sigma+`, and a `mux2` on the sign bit of z picks the
   result.

z = -8.0 has no positive 3.12 counterpart, so its magnitude is taken as
0x7FFF. Any magnitude of 5 or more gives the same output.

Over all 65536 input codes the result differs from 1/(1+e^-z) by at most
0.0192. The largest errors are near the segment joints. Shifting drops the
low bits of |z|, so the curve comes out in small steps.

## Derivative and tanh

* `sigmaD = sigma * (1 - sigma)` uses the same truncating multiplier as the
  net-input path. Its maximum is 0.25 at z = 0.
* `tanh = 2*sigma - 1` is a one-bit left shift followed by subtraction of the
  unit.
* `tanhD = sigmaD + sigmaD`.

**What the "tanh" output is.** `sigma` is evaluated at z, not at 2z, so the
tanh output is `2*sigma(z) - 1 = tanh(z/2)`. It has the shape and output range
(-1, 1) of tanh, but it is half as steep: its slope at 0 is 0.5, where tanh
has slope 1. `tanhD = 2*sigmaD` is the exact derivative of this function, so
`y` and `yD` stay consistent for back-propagation. If you need tanh(z) itself,
scale the weights by 2, or put a saturating doubling of z in front of
`sigmaCircuit` in tanh mode. The second option is not part of this design.

Measured over all z against the exact functions: in tanh mode `y` is within
0.0381 of tanh(z/2) and `yD` within 0.0325 of its derivative. In sigmoid mode
`yD` is within 0.0162. The tanh path doubles the sigmoid's error, which is why
its error is larger.

## Driving the neuron

The neuron has no sequencer of its own. The network controller drives `rst`,
`en` and `sel`. With the default `PIPELINE = 0` one evaluation is:

```
cycle      0     1     2     3     4     5 ...
rst        1     0     0     0     0     0
en         0     1     1     1     1     0
sel        -     0     1     2     3     -
x, w       -   <------ stable ------->
z          ?  0     g0    g0+g1 ..    z (final after edge 4)
y, yD                                 valid after edge 4, held while en=0
```

Here "edge k" is the rising edge that ends cycle k. `x` and `w` must be stable
while the groups are taken. They may also change group by group, as long as
the selected four pairs are valid in their cycle. A 16-input evaluation
therefore takes 5 clocks, including the clear. Once `en` drops, `z`, `y` and
`yD` hold until the next `rst`.

`neuronType` acts on the combinational activation only. It can be changed at
any time, and `y`/`yD` switch at once.

An assertion in `neuron` (`a_sel_in_range`) reports any accumulate cycle
whose `sel` names a group that does not exist. This can only happen when
`N_INPUTS` is not 4 times a power of 4, because the top mux4 level then has
unused leaves.

Outputs for observation: `sat` is high in an accumulate cycle in which one of
the accumulator's adders saturated. `cond` is the PLAN segment of |z|.

### Pipelined variant (`PIPELINE = 1`)

This variant adds register stages at the selection-block outputs and the
activation-block outputs, which shortens the clock period. `rst` and `en` are
delayed by one stage inside the neuron, so the driving sequence stays the
same. The effects are:

* `z` becomes final one clock later than with `PIPELINE = 0`.
* `y` and `yD` become valid two clocks later, after edge 6 of the sequence.
* `sat` moves one clock later.
* The flip-flop count grows to 16 + 128 + 32 + 2.

The pipeline registers have no reset.

## Accuracy of the whole neuron

`tb_neuron` runs 50 random sets per activation type, with inputs and weights
drawn from [-1, 1). It compares the outputs with an exact real-valued neuron
and measures these largest errors:

| mode | max \|y - exact\| | max \|yD - exact\| |
|---|---|---|
| sigmoid | 0.0167 | 0.0153 |
| tanh (tanh(z/2)) | 0.0379 | 0.0310 |

The sigmoid figures are within about 0.002 of the approximation's own error.
The multipliers truncate, which adds a small downward bias to z. It is at most
16 LSB (0.004) for 16 products.

## Design choices beyond the architecture

The architecture fixes the block structure, the number format, the multiplier
bit selection, the adder saturation bounds, the PLAN segments, the identities
for the derivative and tanh, and the option of pipeline registers. The
following are choices of this implementation:

* `rpp` has a synchronous, active-high clear. The same signal starts each
  evaluation. The register also has a load enable `en`.
* Group g holds pairs 4g..4g+3 in order, and lane k feeds multiplier k.
* The encoding of the PLAN segment in `seg_e`.
* The magnitude of -8.0 is taken as 0x7FFF.
* At exactly |z| = 5 the flat segment is used. This matches the segment
  table; the exact point makes no difference to the output.
* The pipelined variant delays `rst`/`en` inside and has unreset pipeline
  registers.
* The `z`, `sat` and `cond` outputs exist for observation.

Not included: the circuits that run back-propagation learning (they consume
`yD`), and the wiring of several neurons into a network with weight storage
and sequencing.

## Files

| file | content |
|---|---|
| `rtl/neuron_pkg.sv` | `fix_t`, unit and PLAN constants, `seg_e`, `neuron_type_e` |
| `rtl/neuron.sv` | top: the complete neuron, parameters `N_INPUTS` (16), `PIPELINE` (0) |
| `rtl/selBlock.sv`, `rtl/mux4.sv`, `rtl/mux2.sv` | input/weight group selection, multiplexers |
| `rtl/netInputBlock.sv`, `rtl/multiplier.sv`, `rtl/adder.sv`, `rtl/rpp.sv` | net input and accumulator |
| `rtl/activationBlock.sv`, `rtl/sigmaCircuit.sv`, `rtl/conditionDetector.sv`, `rtl/shifter.sv`, `rtl/subtractor.sv`, `rtl/sigmaDCircuit.sv`, `rtl/tanhCircuit.sv` | activation function and derivative |
| `tb/tb_ref_pkg.sv` | integer golden model and exact reference functions |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_neuron.sv` | end-to-end test at default parameters (random workload, every segment, saturation both ways, multiplier wrap, hold, cycle count) |
| `tb/tb_neuron_pipe.sv` | the same test with `PIPELINE = 1` |
| `tb/tb_neuron_wide.sv` | the neuron scaled to 32 inputs: two mux4 levels, eight groups per evaluation |
| `tb/tb_xor_network.sv` | one neuron, time-shared, evaluates a 2-2-1 XOR network with fixed weights in both modes |

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
The combinational blocks are tested exhaustively over their input codes:
`sigmaCircuit`, `activationBlock`, `conditionDetector`, `sigmaDCircuit`,
`tanhCircuit`, and `shifter` in steps of 3.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -y rtl -y tb rtl/neuron_pkg.sv tb/tb_ref_pkg.sv \
          tb/tb_neuron.sv --top-module tb_neuron
./obj_dir/Vtb_neuron
```

Replace `tb_neuron` with any other testbench name. Every test finishes in well
under a second. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/neuron_pkg.sv rtl/<module>.sv`.
The two remaining lint warnings are intentional: unused package constants, and
the product bits the multiplier drops by design.
