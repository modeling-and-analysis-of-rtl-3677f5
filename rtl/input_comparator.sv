// input_comparator: the synapse of a hidden neuron.
//
// The hidden layer receives binary inputs, so the product input x weight is
// either 0 or the weight itself. Instead of a multiplier, each synapse checks
// whether its input bit is one and then passes its IEEE 754 weight to the
// adder chain, else it passes +0.0. This replacement of multipliers by
// comparators is the central area saving of the network.
// Interface: in_bit, weight in; gated out; purely combinational.
module input_comparator
  import gann_pkg::*;
(
  input  logic     in_bit,
  input  float32_t weight,
  output float32_t gated
);
  always_comb gated = (in_bit == 1'b1) ? weight : FP_ZERO;
endmodule
