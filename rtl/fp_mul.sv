// fp_mul: combinational IEEE 754 single-precision multiplier.
//
// Steps, in the order the multiplier flowchart gives them: split both
// operands into sign, exponent and mantissa; add the exponents (with one
// extra bit for the carry) and remove the bias; XOR the signs; multiply the
// two mantissas with their hidden 1 (24 x 24 bits); if the product's top bit
// is set, shift right by one and increment the exponent; pack the result.
//
// Choices of this design (the flowchart does not cover them):
//   * rounding is truncation (round toward zero);
//   * a zero exponent (zero or subnormal) operand gives a signed zero;
//   * exponent overflow saturates to infinity, underflow flushes to zero;
//   * NaN and infinity inputs are not given special treatment.
// The low 23 product bits are dropped by the truncation, so a lint tool
// reports them as unused; that is intended.
// Interface: a, b in, p out, purely combinational (no clock).
module fp_mul
  import gann_pkg::*;
(
  input  float32_t a,
  input  float32_t b,
  output float32_t p
);
  fp32_s fa, fb;
  logic [23:0] ma, mb;
  logic [47:0] prod;
  logic signed [9:0] e_sum;
  logic signed [9:0] e_res;
  logic [22:0] m_res;
  logic s_res;
  logic k_zero, k_inf, k_norm;

  always_comb begin
    fa    = a;
    fb    = b;
    s_res = fa.sign ^ fb.sign;
    ma    = {1'b1, fa.man};
    mb    = {1'b1, fb.man};
    prod  = ma * mb;
    e_sum = $signed({2'b00, fa.exp}) + $signed({2'b00, fb.exp}) - 10'sd127;
    // a product in [2,4) moves right by one and bumps the exponent
    e_res = e_sum + $signed({9'd0, prod[47]});
    m_res = prod[47] ? prod[46:24] : prod[45:23];
    // result selection by AND-OR masking rather than a mux chain
    k_zero = (fa.exp == 8'd0) || (fb.exp == 8'd0) || (e_res <= 10'sd0);
    k_inf  = !k_zero && (e_res >= 10'sd255);
    k_norm = !k_zero && !k_inf;
    p = {s_res, 31'd0} |
        ({32{k_inf}}  & {1'b0, 8'hFF, 23'd0}) |
        ({32{k_norm}} & {1'b0, e_res[7:0], m_res});
  end
endmodule
