// fp_threshold: decides the binary output of an output neuron.
//
// Compares an IEEE 754 single-precision value with a threshold and outputs
// 1 when value >= threshold. The comparison works directly on the encodings:
// for two non-negative numbers the larger integer is the larger number, for
// two negative ones the order reverses, and +0 and -0 count as equal.
// The threshold is a port so that it can come from a constant or register.
// Interface: value, thresh in; ge out; purely combinational.
module fp_threshold
  import gann_pkg::*;
(
  input  float32_t value,
  input  float32_t thresh,
  output logic     ge
);
  logic v_zero, t_zero;
  always_comb begin
    v_zero = (value[30:0] == 31'd0);
    t_zero = (thresh[30:0] == 31'd0);
    if (v_zero && t_zero)
      ge = 1'b1;
    else if (value[31] != thresh[31])
      ge = !value[31];
    else if (!value[31])
      ge = value[30:0] >= thresh[30:0];
    else
      ge = value[30:0] <= thresh[30:0];
  end
endmodule
