// tb_fp_threshold: checks value >= thresh on IEEE 754 encodings against a
// comparison of the real values, for random pairs of mixed signs, equal
// values, signed zeros and the default threshold 0.5.
module tb_fp_threshold;
  import tb_fp_util_pkg::*;
  logic [31:0] value, thresh;
  logic        ge;
  int checks = 0, failures = 0;

  fp_threshold dut (.value(value), .thresh(thresh), .ge(ge));

  task automatic check();
    logic exp_ge;
    exp_ge = (f2r(value) >= f2r(thresh));
    checks++;
    if (ge !== exp_ge) begin
      failures++;
      $display("FAIL %h >= %h gave %0b", value, thresh, ge);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    value = 32'h8000_0000; thresh = 32'h0000_0000; #1 check();
    value = 32'h0000_0000; thresh = 32'h8000_0000; #1 check();
    value = 32'h8000_0000; thresh = 32'h3F00_0000; #1 check();
    value = 32'h0000_0000; thresh = 32'hBF00_0000; #1 check();
    value = 32'h3F00_0000; thresh = 32'h3F00_0000; #1 check();
    value = 32'hBF00_0000; thresh = 32'hBF00_0000; #1 check();
    repeat (5000) begin
      value  = rand_fp(120, 130);
      thresh = ($urandom_range(3) == 0) ? 32'h3F00_0000 : rand_fp(120, 130);
      #1 check();
      value = thresh; #1 check();
      value = {thresh[31:1], ~thresh[0]}; #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
