// gann_top: the neuro-genetic hybrid system with both evolved networks.
//
// Two independent gann_net instances share the clock and the reset:
//   * the 8-4-1 even-parity network (input inp_par, output outtresh_par)
//   * the 9-4-2 TCLX character-recognition network (input inp_chr, output
//     outtresh_chr, a 2-bit code: T=00, C=01, L=10, X=11)
// Reset high loads both weight sets; reset low lets both networks compute.
// Each output is registered: an input applied before a rising clock edge is
// answered at that edge. The IEEE 754 output sums are brought out as well.
module gann_top
  import gann_pkg::*;
(
  input  logic                 clk,
  input  logic                 reset,
  input  logic [PAR_N_IN-1:0]  inp_par,
  output logic                 outtresh_par,
  output float32_t             y_par,
  input  logic [CHR_N_IN-1:0]  inp_chr,
  output logic [CHR_N_OUT-1:0] outtresh_chr,
  output float32_t             y_chr [CHR_N_OUT]
);
  float32_t y_par_arr [PAR_N_OUT];
  logic [PAR_N_OUT-1:0] par_bits;

  gann_net #(
    .N_IN  (PAR_N_IN),
    .N_HID (PAR_N_HID),
    .N_OUT (PAR_N_OUT),
    .W_IH  (PAR_W_IH),
    .B_H   (PAR_B_H),
    .W_HO  (PAR_W_HO),
    .B_O   (PAR_B_O)
  ) u_parity (
    .clk      (clk),
    .reset    (reset),
    .inp      (inp_par),
    .outtresh (par_bits),
    .y_val    (y_par_arr)
  );

  assign outtresh_par = par_bits[0];
  assign y_par        = y_par_arr[0];

  gann_net #(
    .N_IN  (CHR_N_IN),
    .N_HID (CHR_N_HID),
    .N_OUT (CHR_N_OUT),
    .W_IH  (CHR_W_IH),
    .B_H   (CHR_B_H),
    .W_HO  (CHR_W_HO),
    .B_O   (CHR_B_O)
  ) u_tclx (
    .clk      (clk),
    .reset    (reset),
    .inp      (inp_chr),
    .outtresh (outtresh_chr),
    .y_val    (y_chr)
  );
endmodule
