// tb_input_comparator: checks that the hidden-neuron synapse passes the
// weight unchanged for input 1 and +0.0 for input 0.
module tb_input_comparator;
  import tb_fp_util_pkg::*;
  logic        in_bit;
  logic [31:0] weight, gated;
  int checks = 0, failures = 0;

  input_comparator dut (.in_bit(in_bit), .weight(weight), .gated(gated));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) begin
      in_bit = 1'($urandom);
      weight = rand_fp(100, 150);
      #1;
      checks++;
      if (gated !== (in_bit ? weight : 32'h0)) begin
        failures++;
        $display("FAIL in=%0b w=%h gated=%h", in_bit, weight, gated);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
