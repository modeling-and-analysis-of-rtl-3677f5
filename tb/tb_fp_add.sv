// tb_fp_add: self-checking test of the single-precision adder/subtractor.
// Random operands of both signs with exponents close together (so that
// alignment, carry-out and long cancellations all occur) and far apart, plus
// directed cases. The reference is the sum in double precision, which is
// exact for these operands. fp_add truncates, so the error must stay below
// two units in the last place of the result; exact cases are compared bit
// for bit.
module tb_fp_add;
  import tb_fp_util_pkg::*;
  logic [31:0] a, b, s;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .s(s));

  task automatic check_val();
    real ref_v, got;
    ref_v = f2r(a) + f2r(b);
    got   = f2r(s);
    checks++;
    if (rabs(got - ref_v) > rabs(ref_v) * (2.0 ** -22) ||
        (ref_v != 0.0 && ((got < 0.0) != (ref_v < 0.0)))) begin
      failures++;
      $display("FAIL add %h + %h = %h (ref %g got %g)", a, b, s, ref_v, got);
    end
  endtask

  task automatic check_bits(logic [31:0] exp_s);
    checks++;
    if (s !== exp_s) begin
      failures++;
      $display("FAIL add %h + %h = %h, expected %h", a, b, s, exp_s);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 32'h3F80_0000; b = 32'h3F80_0000; #1 check_bits(32'h4000_0000);  // 1+1
    a = 32'h4040_0000; b = 32'hBF80_0000; #1 check_bits(32'h4000_0000);  // 3-1
    a = 32'h3F80_0000; b = 32'hC040_0000; #1 check_bits(32'hC000_0000);  // 1-3
    a = 32'h3FC0_0000; b = 32'hBFC0_0000; #1 check_bits(32'h0000_0000);  // x-x
    a = 32'h0000_0000; b = 32'hBE80_0000; #1 check_bits(32'hBE80_0000);  // 0+y
    a = 32'h4120_0000; b = 32'h0000_0000; #1 check_bits(32'h4120_0000);  // x+0
    a = 32'h3F80_0001; b = 32'hBF80_0000; #1 check_bits(32'h3400_0000);  // tiny diff
    a = 32'h7F7F_FFFF; b = 32'h7F7F_FFFF; #1 check_bits(32'h7F80_0000);  // overflow
    a = 32'h4B80_0000; b = 32'h3F80_0000; #1 check_bits(32'h4B80_0000);  // 2^24+1 truncates
    repeat (20000) begin
      a = rand_fp(120, 130);
      b = rand_fp(120, 130);
      #1 check_val();
    end
    repeat (5000) begin
      a = rand_fp(100, 150);
      b = {a[31:23] ^ {1'($urandom), 8'd0}, 23'($urandom)};  // same exponent
      #1 check_val();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
