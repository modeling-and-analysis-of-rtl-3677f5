// gann_net: one complete evolved feed-forward network (N_IN-N_HID-N_OUT).
//
// Neuron parallelism: all hidden neurons compute at once from the binary
// input, then all output neurons compute at once from the hidden outputs;
// the two layers follow each other combinationally within one clock cycle.
//
// Weights live in registers. While `reset` is high the registers are loaded
// with the evolved weight set given by the parameters and the outputs are
// held at 0; when `reset` is low the network runs. The input `inp` is taken
// combinationally and the thresholded output `outtresh` (and the IEEE 754
// output sums `y_val`) are registered, so a new input shows at the output
// on the next rising edge of `clk`.
//
// Input order: input neuron k (k = 1..N_IN, the row order of the weight
// tables) is inp[N_IN-k], so a pattern written as a binary literal reads in
// table order (for example 9'b111_010_010 is the 3 x 3 letter T). In the
// same way output neuron k is outtresh[N_OUT-k] (so a TCLX code reads "o1 o2")
// and y_val[k-1].
//
// The defaults are the 9-4-2 TCLX character-recognition network; the 8-4-1
// parity network is the same module with the PAR_* tables of gann_pkg.
// An assertion checks that the outputs are 0 after every reset edge.
// Registering the output (and not the input) and the synchronous weight load
// are this design's reading of the reset/clock behaviour.
module gann_net
  import gann_pkg::*;
#(
  parameter int       N_IN   = CHR_N_IN,
  parameter int       N_HID  = CHR_N_HID,
  parameter int       N_OUT  = CHR_N_OUT,
  parameter float32_t W_IH [N_HID][N_IN]  = CHR_W_IH,
  parameter float32_t B_H  [N_HID]        = CHR_B_H,
  parameter float32_t W_HO [N_OUT][N_HID] = CHR_W_HO,
  parameter float32_t B_O  [N_OUT]        = CHR_B_O,
  parameter float32_t THRESH = THRESH_DEFAULT
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [N_IN-1:0]  inp,
  output logic [N_OUT-1:0] outtresh,
  output float32_t         y_val [N_OUT]
);
  // weight registers, loaded while reset is high
  float32_t w_ih [N_HID][N_IN];
  float32_t b_h  [N_HID];
  float32_t w_ho [N_OUT][N_HID];
  float32_t b_o  [N_OUT];

  always_ff @(posedge clk) begin
    if (reset) begin
      w_ih <= W_IH;
      b_h  <= B_H;
      w_ho <= W_HO;
      b_o  <= B_O;
    end
  end

  float32_t        hid   [N_HID];
  float32_t        y_c   [N_OUT];
  logic [N_OUT-1:0] bit_c;

  // table order: in_ord[k-1] is input neuron k
  logic [N_IN-1:0] in_ord;
  always_comb
    for (int k = 0; k < N_IN; k++) in_ord[k] = inp[N_IN-1-k];

  for (genvar h = 0; h < N_HID; h++) begin : g_hid
    hidden_neuron #(.N_IN(N_IN)) u_hn (
      .in_bits (in_ord),
      .weights (w_ih[h]),
      .bias    (b_h[h]),
      .out_val (hid[h])
    );
  end

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    output_neuron #(.N_HID(N_HID), .THRESH(THRESH)) u_on (
      .hid     (hid),
      .weights (w_ho[o]),
      .bias    (b_o[o]),
      .y_val   (y_c[o]),
      .y_bit   (bit_c[N_OUT-1-o])
    );
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      outtresh <= '0;
      for (int o = 0; o < N_OUT; o++) y_val[o] <= FP_ZERO;
    end else begin
      outtresh <= bit_c;
      y_val    <= y_c;
    end
  end

  // a clock edge with reset high must leave the outputs cleared
  a_reset_clears: assert property (@(posedge clk) reset |=> outtresh == '0);
endmodule
