// fp_add: combinational IEEE 754 single-precision adder/subtractor.
//
// Following the adder flowchart: split both operands; compare exponent and
// mantissa to find the larger magnitude; align the smaller operand to the
// larger one by shifting its mantissa right by the exponent difference; add
// the mantissas when the signs agree, otherwise subtract the smaller from
// the larger; the result takes the sign of the larger magnitude; normalise
// the mantissa (one right shift after a carry, or a left shift by the
// number of leading zeros after a subtraction) and adjust the exponent.
//
// Choices of this design: three guard bits are kept while aligning, the
// result is truncated (round toward zero), zero/subnormal operands count as
// zero, an exact cancellation gives +0, exponent overflow saturates to
// infinity and underflow flushes to zero. NaN/infinity are not special-cased.
// The guard bits and the top bits of the normalising shifter are dropped by
// the truncation, so a lint tool reports them as unused; that is intended.
// Interface: a, b in, s = a + b out, purely combinational.
module fp_add
  import gann_pkg::*;
(
  input  float32_t a,
  input  float32_t b,
  output float32_t s
);
  fp32_s op_l, op_s;
  logic [4:0]  lz, sh_al, sh_nm;
  logic [7:0]  ediff;
  logic [26:0] m_big, m_small;      // 1.23 mantissa plus 3 guard bits
  logic [27:0] m_sum;               // one more bit for the carry
  logic [26:0] m_shl;
  logic [22:0] m_res;
  logic signed [9:0] e_adj, e_res;
  logic eff_sub;
  logic sign_res;
  logic res_zero;
  logic k_pass, k_inf, k_norm;

  always_comb begin
    // order by magnitude: {exp, man} compares as an unsigned integer
    if (a[30:0] >= b[30:0]) begin
      op_l = a;
      op_s = b;
    end else begin
      op_l = b;
      op_s = a;
    end
    sign_res = op_l.sign;
    ediff    = op_l.exp - op_s.exp;
    m_big    = (op_l.exp == 8'd0) ? 27'd0 : {1'b1, op_l.man, 3'b000};
    m_small  = (op_s.exp == 8'd0) ? 27'd0 : {1'b1, op_s.man, 3'b000};
    sh_al    = (ediff > 8'd27) ? 5'd27 : ediff[4:0];   // 27 shifts all out
    m_small  = m_small >> sh_al;

    // one adder: subtraction adds the two's complement of the smaller one
    eff_sub = op_l.sign ^ op_s.sign;
    m_sum   = {1'b0, m_big} + ({1'b0, m_small} ^ {28{eff_sub}}) + 28'(eff_sub);

    // leading-zero count of m_sum[26:0] (bit 27 is the carry)
    lz = 5'd27;
    for (int i = 0; i <= 26; i++)
      if (m_sum[i]) lz = 5'(26 - i);

    res_zero = (m_big == 27'd0) || (m_sum == 28'd0);
    // after a carry the mantissa moves right by one, else left by lz
    sh_nm    = m_sum[27] ? 5'd0 : lz;
    m_shl    = (m_sum[27] ? m_sum[27:1] : m_sum[26:0]) << sh_nm;
    m_res    = m_shl[25:3];
    e_adj    = m_sum[27] ? 10'sd1 : -$signed({5'd0, lz});
    e_res    = $signed({2'b00, op_l.exp}) + e_adj;

    // result selection by AND-OR masking rather than a mux chain
    k_pass = (m_big == 27'd0) && (op_s.exp != 8'd0);
    k_inf  = !k_pass && !res_zero && (e_res >= 10'sd255);
    k_norm = !k_pass && !res_zero && (m_big != 27'd0) && (e_res > 10'sd0) &&
             (e_res < 10'sd255);
    s = ({32{k_pass}} & float32_t'(op_s)) |
        ({32{k_inf}}  & {sign_res, 8'hFF, 23'd0}) |
        ({32{k_norm}} & {sign_res, e_res[7:0], m_res});
  end
endmodule
