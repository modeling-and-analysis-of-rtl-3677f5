// tb_fp_util_pkg: helpers shared by the testbenches.
// f2r converts an IEEE 754 single-precision word to a real by evaluating
// (-1)^s * 2^(e-127) * (1 + m/2^23) in double precision (zero exponent -> 0),
// independently of the RTL. rand_fp draws a normal number with its exponent
// in [emin, emax] and a random sign and mantissa.
package tb_fp_util_pkg;
  function automatic real f2r(logic [31:0] f);
    real m;
    int  e;
    if (f[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    m = m * (2.0 ** e);
    return f[31] ? -m : m;
  endfunction

  function automatic logic [31:0] rand_fp(int emin, int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom_range(emax - emin)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  function automatic real rabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction
endpackage
