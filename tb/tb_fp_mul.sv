// tb_fp_mul: self-checking test of the single-precision multiplier.
// Random normal operands over a wide exponent range plus directed cases
// (zero operand, x*1, sign rules, overflow to infinity, underflow to zero).
// The reference is the exact product in double precision; because fp_mul
// truncates, the result must not exceed it in magnitude and must lie within
// one unit in the last place of it.
module tb_fp_mul;
  import tb_fp_util_pkg::*;
  logic [31:0] a, b, p;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .p(p));

  task automatic check_val();
    real ref_v, got, err;
    ref_v = f2r(a) * f2r(b);
    got   = f2r(p);
    err   = rabs(got - ref_v);
    checks++;
    if ((p[31] != (a[31] ^ b[31])) || rabs(got) > rabs(ref_v) ||
        err >= rabs(ref_v) * (2.0 ** -23)) begin
      failures++;
      $display("FAIL mul %h * %h = %h (ref %g got %g)", a, b, p, ref_v, got);
    end
  endtask

  task automatic check_bits(logic [31:0] exp_p);
    checks++;
    if (p !== exp_p) begin
      failures++;
      $display("FAIL mul %h * %h = %h, expected %h", a, b, p, exp_p);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed
    a = 32'h3F80_0000; b = 32'h4049_0FDB; #1 check_bits(32'h4049_0FDB);  // 1 * pi
    a = 32'hC000_0000; b = 32'h4040_0000; #1 check_bits(32'hC0C0_0000);  // -2 * 3
    a = 32'hBF00_0000; b = 32'hBF00_0000; #1 check_bits(32'h3E80_0000);  // -.5 * -.5
    a = 32'h0000_0000; b = 32'h4040_0000; #1 check_bits(32'h0000_0000);  // 0 * 3
    a = 32'h3FC0_0000; b = 32'h3FC0_0000; #1 check_bits(32'h4010_0000);  // 1.5*1.5 = 2.25
    a = 32'h7F00_0000; b = 32'h7F00_0000; #1 check_bits(32'h7F80_0000);  // overflow
    a = 32'h0080_0000; b = 32'h0080_0000; #1 check_bits(32'h0000_0000);  // underflow
    // random
    repeat (20000) begin
      a = rand_fp(64, 190);
      b = rand_fp(64, 190);
      #1 check_val();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
