// tb_gann_top: end-to-end test of the complete system at its default
// parameters: the 8-4-1 parity network and the 9-4-2 TCLX network, driven
// together from one clock (100 ns) and one reset.
// * Reset loads both weight sets and clears both outputs.
// * All 512 TCLX patterns are applied, the parity network getting the low
//   eight bits of the same counter, so all 256 parity inputs are covered too.
// * Each answer must appear at the first rising edge after the input and not
//   before it; each IEEE 754 output sum is compared with a double-precision
//   reference built from the weight tables, and each thresholded bit with
//   (reference >= 0.5) where the reference is clear of the threshold.
// * Counted mechanisms (each must occur at least once): reset clearing the
//   outputs, a weight load followed by correct results, an output that held
//   its value up to the edge and changed at it, a threshold decision of 1,
//   a threshold decision of 0, and a negative output sum.
module tb_gann_top;
  timeunit 1ns; timeprecision 1ps;
  import gann_pkg::*;
  import tb_fp_util_pkg::*;

  logic                 clk = 1'b0;
  logic                 reset;
  logic [PAR_N_IN-1:0]  inp_par;
  logic                 outtresh_par;
  float32_t             y_par;
  logic [CHR_N_IN-1:0]  inp_chr;
  logic [CHR_N_OUT-1:0] outtresh_chr;
  float32_t             y_chr [CHR_N_OUT];

  int checks = 0, failures = 0, cycles = 0;
  int n_reset_clear = 0, n_weight_load = 0, n_edge_update = 0;
  int n_thr_one = 0, n_thr_zero = 0, n_neg_sum = 0;

  gann_top dut (.*);

  always #50 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 3000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // generic reference: x in table order is x[n_in-1-k] for input neuron k+1
  task automatic ref_par(input logic [PAR_N_IN-1:0] x, output real y, output real mag);
    real h [PAR_N_HID], hm [PAR_N_HID];
    for (int j = 0; j < PAR_N_HID; j++) begin
      h[j] = f2r(PAR_B_H[j]); hm[j] = rabs(h[j]);
      for (int k = 0; k < PAR_N_IN; k++)
        if (x[PAR_N_IN-1-k]) begin
          h[j] += f2r(PAR_W_IH[j][k]); hm[j] += rabs(f2r(PAR_W_IH[j][k]));
        end
    end
    y = f2r(PAR_B_O[0]); mag = rabs(y);
    for (int j = 0; j < PAR_N_HID; j++) begin
      y += h[j] * f2r(PAR_W_HO[0][j]); mag += hm[j] * rabs(f2r(PAR_W_HO[0][j]));
    end
  endtask

  task automatic ref_chr(input logic [CHR_N_IN-1:0] x, output real y [CHR_N_OUT],
                         output real mag [CHR_N_OUT]);
    real h [CHR_N_HID], hm [CHR_N_HID];
    for (int j = 0; j < CHR_N_HID; j++) begin
      h[j] = f2r(CHR_B_H[j]); hm[j] = rabs(h[j]);
      for (int k = 0; k < CHR_N_IN; k++)
        if (x[CHR_N_IN-1-k]) begin
          h[j] += f2r(CHR_W_IH[j][k]); hm[j] += rabs(f2r(CHR_W_IH[j][k]));
        end
    end
    for (int o = 0; o < CHR_N_OUT; o++) begin
      y[o] = f2r(CHR_B_O[o]); mag[o] = rabs(y[o]);
      for (int j = 0; j < CHR_N_HID; j++) begin
        y[o] += h[j] * f2r(CHR_W_HO[o][j]); mag[o] += hm[j] * rabs(f2r(CHR_W_HO[o][j]));
      end
    end
  endtask

  task automatic check_one(string what, float32_t got, logic got_bit, real y, real mag);
    checks++;
    if (rabs(f2r(got) - y) > mag * (2.0 ** -19)) begin
      failures++;
      $display("FAIL %s: y=%g ref=%g", what, f2r(got), y);
    end
    if (rabs(y - 0.5) > mag * (2.0 ** -19)) begin
      checks++;
      if (got_bit !== (y >= 0.5)) begin
        failures++;
        $display("FAIL %s: bit %0b for ref %g", what, got_bit, y);
      end
    end
    if (got_bit) n_thr_one++; else n_thr_zero++;
    if (got[31] && got[30:0] != 31'd0) n_neg_sum++;
  endtask

  task automatic check_reset_clear();
    checks++;
    if (outtresh_par !== 1'b0 || outtresh_chr !== '0 || y_par !== FP_ZERO) begin
      failures++;
      $display("FAIL reset did not clear the outputs");
    end else n_reset_clear++;
  endtask

  logic [CHR_N_OUT:0] prev, now;
  real yp, mp;
  real yc [CHR_N_OUT], mc [CHR_N_OUT];
  int  bad_before;

  initial begin
    reset   = 1'b1;
    inp_par = '0;
    inp_chr = '0;
    repeat (2) @(posedge clk);
    #1 check_reset_clear();
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk) reset = 1'b0;
      @(posedge clk) #1;
      prev = {outtresh_par, outtresh_chr};
      bad_before = failures;
      for (int v = 0; v < (1 << CHR_N_IN); v++) begin
        @(negedge clk);
        inp_chr = CHR_N_IN'(v);
        inp_par = PAR_N_IN'(v * 37 + pass);
        ref_par(inp_par, yp, mp);
        ref_chr(inp_chr, yc, mc);
        #49;
        checks++;
        if ({outtresh_par, outtresh_chr} !== prev) begin
          failures++;
          $display("FAIL outputs changed before the clock edge");
        end
        @(posedge clk) #1;
        now = {outtresh_par, outtresh_chr};
        if (now != prev) n_edge_update++;
        prev = now;
        check_one("parity", y_par, outtresh_par, yp, mp);
        for (int o = 0; o < CHR_N_OUT; o++)
          check_one("tclx", y_chr[o], outtresh_chr[CHR_N_OUT-1-o], yc[o], mc[o]);
      end
      if (failures == bad_before) n_weight_load++;
      // reset again: outputs must clear, weights reload
      @(negedge clk) reset = 1'b1;
      @(posedge clk) #1 check_reset_clear();
    end

    $display("mechanisms: reset_clear=%0d weight_load=%0d edge_update=%0d thr_one=%0d thr_zero=%0d neg_sum=%0d",
             n_reset_clear, n_weight_load, n_edge_update, n_thr_one, n_thr_zero, n_neg_sum);
    checks += 6;
    if (n_reset_clear == 0) begin failures++; $display("FAIL reset clear never seen"); end
    if (n_weight_load == 0) begin failures++; $display("FAIL weight load never verified"); end
    if (n_edge_update == 0) begin failures++; $display("FAIL no output ever changed"); end
    if (n_thr_one == 0)     begin failures++; $display("FAIL threshold never gave 1"); end
    if (n_thr_zero == 0)    begin failures++; $display("FAIL threshold never gave 0"); end
    if (n_neg_sum == 0)     begin failures++; $display("FAIL no negative output sum"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
