// gann_pkg: types and constants shared by the genetically evolved neural
// network (GANN) datapath.
//
// All network values are IEEE 754 single-precision words (float32_t). The
// weight and bias tables below are the evolved weight sets of the two
// networks, encoded to IEEE 754 by round-to-nearest from their four-digit
// decimal values (shown in the comments):
//   * PAR_*  : 8-4-1 even-parity network
//   * CHR_*  : 9-4-2 TCLX character-recognition network
// Indexing is [hidden neuron][input] for input-to-hidden weights and
// [output neuron][hidden neuron] for hidden-to-output weights.
// The output threshold THRESH_DEFAULT (0.5) is this design's own choice: the
// network is trained for 0/1 targets and 0.5 is their midpoint.
package gann_pkg;

  typedef logic [31:0] float32_t;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] man;
  } fp32_s;

  localparam float32_t FP_ZERO        = 32'h0000_0000;
  localparam float32_t THRESH_DEFAULT = 32'h3F00_0000;  // 0.5

  // ---------------- 8-4-1 parity network ----------------
  localparam int PAR_N_IN  = 8;
  localparam int PAR_N_HID = 4;
  localparam int PAR_N_OUT = 1;

  localparam float32_t PAR_W_IH [PAR_N_HID][PAR_N_IN] = '{
    // H1: 0.8357 0.8896 0.5753 0.691 0.7944 0.8678 0.8965 0.3099
    '{32'h3F55F06F, 32'h3F63BCD3, 32'h3F1346DC, 32'h3F30E560,
      32'h3F4B5DCC, 32'h3F5E2824, 32'h3F658106, 32'h3E9EAB36},
    // H2: 1.236 1.2732 0.705 0.8228 1.4901 0.9432 0.4306 0.6362
    '{32'h3F9E353F, 32'h3FA2F838, 32'h3F347AE1, 32'h3F52A305,
      32'h3FBEBB99, 32'h3F71758E, 32'h3EDC779A, 32'h3F22DE01},
    // H3: 0.9488 0.3288 2.0304 1.3995 0.0055 0.8898 0.3753 0.2716
    '{32'h3F72E48F, 32'h3EA85879, 32'h4001F213, 32'h3FB322D1,
      32'h3BB43958, 32'h3F63C9EF, 32'h3EC02752, 32'h3E8B0F28},
    // H4: 1.2441 0.6875 -0.2142 0.3744 -0.0421 0.5914 -0.4368 -0.048
    '{32'h3F9F3EAB, 32'h3F300000, 32'hBE5B573F, 32'h3EBFB15B,
      32'hBD2C710D, 32'h3F1765FE, 32'hBEDFA440, 32'hBD449BA6}
  };
  // hidden biases: 1.3336 -0.2937 1.7109 0.0551
  localparam float32_t PAR_B_H [PAR_N_HID] = '{
    32'h3FAAB368, 32'hBE965FD9, 32'h3FDAFEC5, 32'h3D61B08A};
  // output weights: 0.886 -0.178 -0.2722 0.0429
  localparam float32_t PAR_W_HO [PAR_N_OUT][PAR_N_HID] = '{
    '{32'h3F62D0E5, 32'hBE3645A2, 32'hBE8B5DCC, 32'h3D2FB7E9}};
  // output bias: 0.0925
  localparam float32_t PAR_B_O [PAR_N_OUT] = '{32'h3DBD70A4};

  // ---------------- 9-4-2 TCLX character network ----------------
  localparam int CHR_N_IN  = 9;
  localparam int CHR_N_HID = 4;
  localparam int CHR_N_OUT = 2;

  localparam float32_t CHR_W_IH [CHR_N_HID][CHR_N_IN] = '{
    // H1: -0.0826 0.1731 -0.076 0.2617 1.2786 0.4235 -0.5047 1.8538 -0.3787
    '{32'hBDA92A30, 32'h3E314120, 32'hBD9BA5E3, 32'h3E85FD8B, 32'h3FA3A92A,
      32'h3ED8D4FE, 32'hBF013405, 32'h3FED4952, 32'hBEC1E4F7},
    // H2: 0.4273 -2.5914 -1.6177 -0.513 -1.6695 2.0695 -1.2504 -1.3483 -2.6797
    '{32'h3EDAC711, 32'hC025D97F, 32'hBFCF10CB, 32'hBF0353F8, 32'hBFD5B22D,
      32'h400472B0, 32'hBFA00D1B, 32'hBFAC9518, 32'hC02B8034},
    // H3: 0.0031 0.8914 2.1266 1.4674 2.1176 0.7347 2.9228 0.6531 0.3509
    '{32'h3B4B295F, 32'h3F6432CA, 32'h40081A37, 32'h3FBBD3C3, 32'h400786C2,
      32'h3F3C154D, 32'h403B0F28, 32'h3F273190, 32'h3EB3A92A},
    // H4: 0.8917 0.8123 0.2951 1.9791 -0.3155 -0.8926 1.7954 -3.6263 1.3465
    '{32'h3F644674, 32'h3F4FF2E5, 32'h3E971759, 32'h3FFD5326, 32'hBEA18937,
      32'hBF64816F, 32'h3FE5CFAB, 32'hC068154D, 32'h3FAC5A1D}
  };
  // hidden biases: -0.3896 1.4192 0.9215 1.0728
  localparam float32_t CHR_B_H [CHR_N_HID] = '{
    32'hBEC779A7, 32'h3FB5A858, 32'h3F6BE76D, 32'h3F895183};
  localparam float32_t CHR_W_HO [CHR_N_OUT][CHR_N_HID] = '{
    // output 1: 0.346 0.6464 0.4366 0.0854
    '{32'h3EB126E9, 32'h3F257A78, 32'h3EDF8A09, 32'h3DAEE632},
    // output 2: 0.5228 -1.1363 -0.0633 -0.4011
    '{32'h3F05D639, 32'hBF917247, 32'hBD81A36E, 32'hBECD5CFB}
  };
  // output biases: 2.2747 2.7092
  localparam float32_t CHR_B_O [CHR_N_OUT] = '{32'h401194AF, 32'h402D6388};

endpackage
