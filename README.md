# Genetically evolved neural network in floating-point hardware

This is a small feed-forward neural network in synthesizable SystemVerilog.
Its topology and weights were found offline by a genetic algorithm (GA), so
the chip has no learning unit. It only evaluates the network that the GA
produced. Two networks are included, side by side:

| network | topology | inputs | outputs | weights + biases |
|---|---|---|---|---|
| 8-bit even parity | 8-4-1 | 8 binary bits | 1 bit (`outtresh_par`) | 32 + 4 + 4 + 1 = 41 |
| TCLX character recognition | 9-4-2 | 3 x 3 black/white pixels | 2-bit letter code | 36 + 4 + 8 + 2 = 50 |

All arithmetic is IEEE 754 single precision. The main idea is in the hidden
layer. Its inputs are single bits, so `input x weight` is either 0 or the
weight. Each hidden synapse therefore uses a select ("comparator"), not a
multiplier. Multipliers appear only in the output layer, where the inputs are
real-valued hidden outputs.

## Dataflow

```
 inp[N_IN-1:0] ──► hidden_neuron x N_HID (in parallel)             output_neuron x N_OUT (in parallel)
                   ┌───────────────────────────────────┐            ┌───────────────────────────────────────┐
  bit k ─► input_comparator(w_k) ─► fp_add chain ─► OH_j ──► fp_mul(Wo_j) ─► fp_add chain ─► y ─► fp_threshold ─► bit
           (w_k or +0.0)     (bias first, then k=1..N_IN)   (bias first, then j=1..N_HID)     (y >= 0.5)
                   └───────────────────────────────────┘            └───────────────────────────────────────┘
                                                                              │                       │
                                                          clk ──► output registers: y_val[]    outtresh[]
```

Inside one layer all neurons work in parallel ("neuron parallelism"). The two
layers follow each other in the same combinational path. The only clocked
elements are the weight registers and the output registers.

## Floating-point units

`fp_add` and `fp_mul` are combinational single-precision units. They
implement the usual textbook steps.

* **fp_mul**: XOR the signs and add the exponents, removing the bias of 127.
  Multiply the 24-bit mantissas, including the hidden 1. If the product is
  in [2, 4), shift it right by one and increment the exponent.
* **fp_add**: order the operands by magnitude, comparing `{exp, mantissa}`
  as one unsigned integer. Shift the smaller mantissa right by the exponent
  difference, keeping three guard bits. Add if the signs agree, otherwise
  subtract. The result takes the sign of the larger operand. Normalise: after
  a carry shift right by one, otherwise shift left by the leading-zero count.
  Adjust the exponent to match.

The following details are this design's own choices:

* Rounding is truncation (round toward zero). There is no sticky bit.
  `fp_mul` is always within 1 ulp of the exact product, and never larger in
  magnitude. `fp_add` is within 2 ulp of the exact sum.
* An operand with exponent 0 is treated as zero, so subnormals are flushed.
  Results that underflow become +0 (`fp_add`) or a signed zero (`fp_mul`).
  Results that overflow saturate to infinity. NaN and infinity inputs get no
  special handling.
* Both units pick their result with AND-OR masks rather than a chain of
  muxes. The function is the same. With muxes, yosys's resource-sharing pass
  spent minutes trying to merge the shifters of the 80 flattened adders.

`fp_threshold` compares two encodings directly: integer order for positive
numbers, reversed order for negative numbers, and +0 equals −0.

## Neurons

* `hidden_neuron #(N_IN)` has N_IN `input_comparator`s and N_IN `fp_add`s
  in a chain. One adder per weight would need only N_IN−1. The extra adder
  adds the neuron's bias, which the weight tables supply. The hidden output
  is the plain sum. **No activation function** is applied.
* `output_neuron #(N_HID, THRESH)` has N_HID `fp_mul`s, N_HID `fp_add`s
  (again one extra for the bias) and an `fp_threshold`. `y_bit = (y_val >= THRESH)`,
  with THRESH = 0.5 by default.

## Network, reset and timing (`gann_net`)

* **Reset high**: the weight registers load the evolved tables from the
  parameters on each rising edge of `clk`. The outputs are held at 0.
* **Reset low**: the network runs. `inp` drives the two layers
  combinationally. `outtresh` and `y_val` are registered. A pattern applied
  in one cycle appears at the next rising edge and stays until the edge after
  a new pattern. The reference clock is 100 ns, but nothing depends on it.
  The critical path is one comparator, N_IN adders, one multiplier, N_HID
  adders and a comparator. At a given clock rate it may need retiming or
  pipelining on a real device.
* **Bit order**: input neuron k (k = 1..N_IN, the row order of the weight
  tables) is `inp[N_IN-k]`. A pattern written as a binary literal therefore
  reads in table order. For example, `9'b111_010_010` is the letter T
  (rows `111`, `010`, `010`). In the same way, output neuron k is
  `outtresh[N_OUT-k]`, and the TCLX code reads "o1 o2": T = 00, C = 01,
  L = 10, X = 11.

Without the `y_val` observation outputs, a network has the pins `clk`,
`reset`, `inp` and `outtresh`. That is 11 pins for parity and 13 for TCLX,
the same I/O counts reported for the original FPGA builds.

The defaults of `gann_net` are the TCLX network. `gann_top` instantiates it
twice: once with the `PAR_*` tables and once with the `CHR_*` tables.

## Weight tables (`gann_pkg`)

The evolved weights are given to four decimal places. They are stored as
IEEE 754 words, rounded to nearest, and each table row carries its decimal
values in a comment. The indexing is:

* `W_IH[hidden][input]`, `B_H[hidden]`, `W_HO[output][hidden]`, `B_O[output]`.

The parity network's output layer has weights 0.886, −0.178, −0.2722 and
0.0429, and bias 0.0925. Its hidden biases are 1.3336, −0.2937, 1.7109 and
0.0551.

## What these weights compute — read before trusting the outputs

The RTL computes exactly the network described above. Both testbenches check
it against an independent double-precision model of that network. However,
the evolved weights, used in this architecture, **do not give the intended
classification**:

* **Parity.** With linear hidden neurons, the output sum is an affine
  function of the 8 inputs. Parity is not linearly separable, so no threshold
  can realise it. With these weights the output sum lies between 0.69 and
  3.28 for all 256 inputs. At threshold 0.5, `outtresh_par` is therefore 1
  for every input. This matches the network's reported fitness: an MSE of
  0.25 is what a constant output of 0.5 gives for parity.
* **TCLX.** The output sums for T, C, L and X are (2.61, 10.19),
  (1.77, 10.00), (3.04, 5.80) and (2.87, 6.16). At threshold 0.5 all four
  letters give code 11. A threshold between 2.61 and 2.87 on output 1 would
  separate {T, C} from {L, X}. No threshold on output 2 separates {C, X}
  from {T, L}.

The weights were most likely evolved in a software model that had a
nonlinear activation in the hidden layer. That activation is not part of the
hardware described here. If you need working classifiers:

* insert an activation unit between `hidden_neuron` and `output_neuron`, or
* load weights evolved for this linear-hidden architecture.

`THRESH` is a parameter of `gann_net` and `output_neuron`.

## Departures from the original architecture and open points

* One extra adder per neuron for the bias. The architecture description
  counts nine comparators and eight adders per hidden neuron, and four
  multipliers and three adders per output neuron. The weight tables, however,
  give biases for every neuron.
* The threshold value of 0.5 is an assumption. So are the rounding mode, the
  handling of special values, the adder-chain order and the bit order of the
  ports.
* The weight registers can only be loaded from the parameters during reset.
  There is no run-time weight-load port. To run another network, change the
  parameters.
* The genetic algorithm itself is not hardware here. It used binary
  chromosomes of 41 and 50 bits, two-point crossover (pc = 0.8), uniform
  mutation (pm = 0.01) and MSE fitness, and ran offline.
* The original work also explored 8-3-1 … 8-8-1 and 9-3-2 … 9-8-2
  topologies. `N_HID` supports them, but their weights are not available.

## Files

| file | contents |
|---|---|
| `rtl/gann_pkg.sv` | `float32_t`, `fp32_s`, weight/bias tables, threshold |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv` | single-precision adder and multiplier |
| `rtl/input_comparator.sv` | hidden synapse: weight or +0.0 |
| `rtl/fp_threshold.sv` | `value >= thresh` on IEEE 754 words |
| `rtl/hidden_neuron.sv`, `rtl/output_neuron.sv` | the two neuron types |
| `rtl/gann_net.sv` | one network with weight registers and output registers |
| `rtl/gann_top.sv` | parity and TCLX networks side by side (top) |
| `tb/tb_fp_util_pkg.sv` | float-to-real conversion and random operands for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each also has a watchdog that counts a failure if the test hangs.
With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/gann_pkg.sv tb/tb_fp_util_pkg.sv tb/tb_gann_top.sv --top-module tb_gann_top
./obj_dir/Vtb_gann_top
```

Replace `tb_gann_top` with any other `tb_*` name to run that testbench.

* `tb_gann_top` runs the full system at its default parameters. It applies
  all 512 TCLX patterns and all 256 parity patterns, twice, with a reset
  between the passes. It checks:
  * the one-edge latency;
  * clearing of the outputs during reset;
  * the output sums, within a magnitude-scaled tolerance;
  * the thresholded bits.

  It also counts that reset clearing, weight loading, output changes at the
  edge, threshold decisions of both values and negative output sums each
  occur at least once.
* `tb_gann_net` does the same for the TCLX network alone and prints the
  codes of the four letters.
* The arithmetic testbenches compare against exact double-precision
  results: 20 000 to 25 000 random and directed operand pairs for `fp_add`
  and `fp_mul`.

Coarse yosys synthesis of `gann_top` gives about 7 000 word-level cells and
99 flip-flops. These are the output registers only: the weight registers only
ever load parameter constants, so synthesis folds them into constants.
