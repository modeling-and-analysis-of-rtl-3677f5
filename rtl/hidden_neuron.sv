// hidden_neuron: hidden-layer neuron without multipliers.
//
// One input_comparator per binary input passes either 0 or that input's
// weight; a chain of fp_add adders sums the gated weights, and one more adder
// adds the neuron's bias. The sum is the neuron output and goes to the output
// layer as it is: no activation function is applied in hardware.
// For N_IN inputs there are N_IN comparators and N_IN adders (N_IN-1 for the
// weights, one for the bias). The bias adder and the chain order (bias first,
// then input 0, 1, ...) are this design's choices.
// Interface: in_bits[N_IN] binary inputs, weights[N_IN] and bias in IEEE 754
// single precision; out_val is the neuron output. Purely combinational.
module hidden_neuron
  import gann_pkg::*;
#(
  parameter int N_IN = 9
) (
  input  logic     [N_IN-1:0] in_bits,
  input  float32_t            weights [N_IN],
  input  float32_t            bias,
  output float32_t            out_val
);
  float32_t gated [N_IN];
  float32_t acc   [N_IN+1];

  assign acc[0] = bias;

  for (genvar i = 0; i < N_IN; i++) begin : g_syn
    input_comparator u_cmp (
      .in_bit (in_bits[i]),
      .weight (weights[i]),
      .gated  (gated[i])
    );
    fp_add u_add (
      .a (acc[i]),
      .b (gated[i]),
      .s (acc[i+1])
    );
  end

  assign out_val = acc[N_IN];
endmodule
