// tb_hidden_neuron: checks the multiplier-free hidden neuron. For random
// weights, biases and binary inputs (including all-zeros and all-ones) the
// output must equal bias + sum of the weights whose input bit is 1, computed
// in double precision, within a tolerance of 2^-20 times the sum of the
// magnitudes of the terms (truncation in each of the N_IN adders).
module tb_hidden_neuron;
  import tb_fp_util_pkg::*;
  localparam int N_IN = 9;
  logic [N_IN-1:0] in_bits;
  logic [31:0]     weights [N_IN];
  logic [31:0]     bias, out_val;
  int checks = 0, failures = 0;

  hidden_neuron #(.N_IN(N_IN)) dut (
    .in_bits(in_bits), .weights(weights), .bias(bias), .out_val(out_val));

  task automatic check();
    real ref_v, mag, got;
    ref_v = f2r(bias);
    mag   = rabs(ref_v);
    for (int i = 0; i < N_IN; i++)
      if (in_bits[i]) begin
        ref_v += f2r(weights[i]);
        mag   += rabs(f2r(weights[i]));
      end
    got = f2r(out_val);
    checks++;
    if (rabs(got - ref_v) > mag * (2.0 ** -20)) begin
      failures++;
      $display("FAIL hidden in=%b got %g ref %g", in_bits, got, ref_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) begin
      for (int i = 0; i < N_IN; i++) weights[i] = rand_fp(118, 129);
      bias = rand_fp(118, 129);
      case ($urandom_range(5))
        0:       in_bits = '0;
        1:       in_bits = '1;
        default: in_bits = N_IN'($urandom);
      endcase
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
