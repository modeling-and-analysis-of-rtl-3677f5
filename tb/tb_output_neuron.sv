// tb_output_neuron: checks the output neuron. For random hidden values,
// weights and bias the sum y_val must equal bias + sum(hid*w) in double
// precision within 2^-20 times the sum of the magnitudes of the terms, and
// y_bit must equal (reference >= 0.5) wherever the reference is further than
// that tolerance from the threshold. Biases are drawn around 0.5 so that
// both output values occur often.
module tb_output_neuron;
  import tb_fp_util_pkg::*;
  localparam int N_HID = 4;
  logic [31:0] hid [N_HID];
  logic [31:0] weights [N_HID];
  logic [31:0] bias, y_val;
  logic        y_bit;
  int checks = 0, failures = 0;
  int ones = 0, zeros = 0;

  output_neuron #(.N_HID(N_HID)) dut (
    .hid(hid), .weights(weights), .bias(bias), .y_val(y_val), .y_bit(y_bit));

  task automatic check();
    real ref_v, mag, got, t;
    ref_v = f2r(bias);
    mag   = rabs(ref_v);
    for (int j = 0; j < N_HID; j++) begin
      t      = f2r(hid[j]) * f2r(weights[j]);
      ref_v += t;
      mag   += rabs(t);
    end
    got = f2r(y_val);
    checks++;
    if (rabs(got - ref_v) > mag * (2.0 ** -20)) begin
      failures++;
      $display("FAIL output sum got %g ref %g", got, ref_v);
    end
    if (rabs(ref_v - 0.5) > mag * (2.0 ** -20)) begin
      checks++;
      if (y_bit !== (ref_v >= 0.5)) begin
        failures++;
        $display("FAIL output bit %0b for sum %g", y_bit, ref_v);
      end
    end
    if (y_bit) ones++; else zeros++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) begin
      for (int j = 0; j < N_HID; j++) begin
        hid[j]     = rand_fp(118, 129);
        weights[j] = rand_fp(115, 126);
      end
      bias = rand_fp(124, 127);
      #1 check();
    end
    checks++;
    if (ones == 0 || zeros == 0) begin
      failures++;
      $display("FAIL threshold never produced both values (%0d/%0d)", ones, zeros);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
