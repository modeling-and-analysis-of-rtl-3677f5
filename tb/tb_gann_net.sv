// tb_gann_net: end-to-end test of one network at its default configuration
// (the 9-4-2 TCLX character network).
// * Reset: outputs must read 0 while reset is high; the weights are loaded.
// * Every one of the 512 input patterns is applied after a falling edge.
//   Just before the next rising edge the outputs must still show the
//   previous answer (the output is registered); right after it they must
//   show the new one: a latency of one clock edge.
// * The reference computes bias + gated weights per hidden neuron and
//   bias + weighted hidden outputs per output neuron in double precision
//   from the weight tables; y_val must match within a tolerance set by the
//   magnitudes of the terms, outtresh must equal (reference >= 0.5) wherever
//   the reference is clear of the threshold.
// * A second reset in mid-run must clear the outputs again.
// The clock period is 100 ns.
module tb_gann_net;
  timeunit 1ns; timeprecision 1ps;
  import gann_pkg::*;
  import tb_fp_util_pkg::*;
  localparam int NI = CHR_N_IN, NH = CHR_N_HID, NO = CHR_N_OUT;

  logic          clk = 1'b0;
  logic          reset;
  logic [NI-1:0] inp;
  logic [NO-1:0] outtresh;
  float32_t      y_val [NO];
  int checks = 0, failures = 0, cycles = 0;

  gann_net dut (.clk(clk), .reset(reset), .inp(inp), .outtresh(outtresh), .y_val(y_val));

  always #50 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  task automatic ref_net(input logic [NI-1:0] x, output real y [NO], output real mag [NO]);
    real h [NH], hm [NH];
    for (int j = 0; j < NH; j++) begin
      h[j]  = f2r(CHR_B_H[j]);
      hm[j] = rabs(h[j]);
      for (int k = 0; k < NI; k++)
        if (x[NI-1-k]) begin
          h[j]  += f2r(CHR_W_IH[j][k]);
          hm[j] += rabs(f2r(CHR_W_IH[j][k]));
        end
    end
    for (int o = 0; o < NO; o++) begin
      y[o]   = f2r(CHR_B_O[o]);
      mag[o] = rabs(y[o]);
      for (int j = 0; j < NH; j++) begin
        y[o]   += h[j] * f2r(CHR_W_HO[o][j]);
        mag[o] += hm[j] * rabs(f2r(CHR_W_HO[o][j]));
      end
    end
  endtask

  logic [NO-1:0] prev_out;
  real yr [NO], mg [NO];

  initial begin
    reset = 1'b1;
    inp   = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (outtresh !== '0) begin failures++; $display("FAIL output not cleared in reset"); end
    @(negedge clk) reset = 1'b0;
    @(posedge clk) #1;
    prev_out = outtresh;
    for (int v = 0; v < (1 << NI); v++) begin
      @(negedge clk) inp = NI'(v);
      ref_net(inp, yr, mg);
      #49;  // just before the rising edge
      checks++;
      if (outtresh !== prev_out) begin
        failures++;
        $display("FAIL output changed before the clock edge (input %b)", inp);
      end
      @(posedge clk) #1;
      for (int o = 0; o < NO; o++) begin
        checks++;
        if (rabs(f2r(y_val[o]) - yr[o]) > mg[o] * (2.0 ** -19)) begin
          failures++;
          $display("FAIL input %b output %0d: y=%g ref=%g", inp, o, f2r(y_val[o]), yr[o]);
        end
        if (rabs(yr[o] - 0.5) > mg[o] * (2.0 ** -19)) begin
          checks++;
          if (outtresh[NO-1-o] !== (yr[o] >= 0.5)) begin
            failures++;
            $display("FAIL input %b output %0d bit %0b, ref %g", inp, o, outtresh[NO-1-o], yr[o]);
          end
        end
      end
      prev_out = outtresh;
    end
    // letters, for information
    foreach (CHR_LETTERS[i]) begin
      @(negedge clk) inp = CHR_LETTERS[i];
      @(posedge clk) #1;
      $display("pattern %b -> code %b  y = %f %f", inp, outtresh, f2r(y_val[0]), f2r(y_val[1]));
    end
    // reset again in mid-run
    @(negedge clk) reset = 1'b1;
    @(posedge clk) #1;
    checks++;
    if (outtresh !== '0 || y_val[0] !== FP_ZERO) begin
      failures++;
      $display("FAIL second reset did not clear the outputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [NI-1:0] CHR_LETTERS [4] = '{9'b111_010_010, 9'b111_100_111,
                                                9'b100_100_111, 9'b101_010_101};
endmodule
