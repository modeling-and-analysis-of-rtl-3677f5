// output_neuron: output-layer neuron with multipliers and a threshold.
//
// Each hidden-layer output is multiplied by its weight in an fp_mul; a chain
// of fp_add adders sums the products and the bias; fp_threshold compares the
// sum with THRESH and gives the discrete binary output.
// For N_HID hidden neurons there are N_HID multipliers, N_HID-1 adders for
// the products and one adder for the bias (the bias adder, the chain order
// and the threshold value are this design's choices).
// Interface: hid[N_HID], weights[N_HID], bias (IEEE 754) in; y_val is the
// weighted sum, y_bit = (y_val >= THRESH). Purely combinational.
module output_neuron
  import gann_pkg::*;
#(
  parameter int       N_HID  = 4,
  parameter float32_t THRESH = THRESH_DEFAULT
) (
  input  float32_t hid     [N_HID],
  input  float32_t weights [N_HID],
  input  float32_t bias,
  output float32_t y_val,
  output logic     y_bit
);
  float32_t prod [N_HID];
  float32_t acc  [N_HID+1];

  assign acc[0] = bias;

  for (genvar j = 0; j < N_HID; j++) begin : g_mac
    fp_mul u_mul (
      .a (hid[j]),
      .b (weights[j]),
      .p (prod[j])
    );
    fp_add u_add (
      .a (acc[j]),
      .b (prod[j]),
      .s (acc[j+1])
    );
  end

  assign y_val = acc[N_HID];

  fp_threshold u_thr (
    .value  (y_val),
    .thresh (THRESH),
    .ge     (y_bit)
  );
endmodule
