// nn_bist_pkg: shared sizes, fixed-point formats and the CUT table of the
// reconfigurable neural-network online tester.
//
// Fixed-point formats follow the ux.y / sx.y notation: x integer bits (the
// sign bit included for sx.y) and y fractional bits.  The defaults are the
// widths of the combined five-CUT tester: hidden-value RAM u1.7, coefficient
// ROM s6.7 and multiplier output s6.7.  The accumulator uses the multiplier
// format.  The CUT table gives, per monitored circuit, the numbers of input,
// hidden and output neurons of its network; the start pointer of each CUT's
// coefficients in the ROM is derived from it (the ROM is packed neuron by
// neuron, CUT after CUT).
package nn_bist_pkg;

  // ---- data-path formats -------------------------------------------------
  localparam int unsigned RAM_F = 7;               // u1.7 : hidden neuron value
  localparam int unsigned RAM_W = 1 + RAM_F;
  localparam int unsigned ROM_I = 6;               // s6.7 : weights and biases
  localparam int unsigned ROM_F = 7;
  localparam int unsigned ROM_W = ROM_I + ROM_F;
  localparam int unsigned MUL_I = 6;               // s6.7 : truncated product / accumulator
  localparam int unsigned MUL_F = 7;
  localparam int unsigned MUL_W = MUL_I + MUL_F;

  // ---- reconfiguration limits -------------------------------------------
  localparam int unsigned N_CUTS    = 5;
  localparam int unsigned MAX_IN    = 11;          // widest CUT input (7485)
  localparam int unsigned MAX_OUT   = 8;           // widest CUT output (Div4)
  localparam int unsigned MAX_HID   = 43;          // largest hidden layer (Div4)
  localparam int unsigned ROM_DEPTH = 1024;        // 1018 coefficients used
  localparam int unsigned ROM_AW    = $clog2(ROM_DEPTH);
  localparam int unsigned HID_AW    = $clog2(MAX_HID);
  localparam int unsigned CUT_W     = $clog2(N_CUTS);
  localparam int unsigned IN_CW     = $clog2(MAX_IN + 1);
  localparam int unsigned HID_CW    = $clog2(MAX_HID + 1);
  localparam int unsigned OUT_CW    = $clog2(MAX_OUT + 1);

  // One network configuration as held in the controller ROM.
  typedef struct packed {
    logic [ROM_AW-1:0] ptr;    // first coefficient of this CUT in the ROM
    logic [IN_CW-1:0]  n_in;   // input neurons  (= CUT input bits)
    logic [HID_CW-1:0] n_hid;  // hidden neurons
    logic [OUT_CW-1:0] n_out;  // output neurons (= CUT output bits)
  } nn_cfg_t;

  // CUT table: C17, 74182, 74283, 7485, Div4 (in this order).
  localparam int CUT_NIN  [N_CUTS] = '{5, 9, 9, 11, 8};
  localparam int CUT_NHID [N_CUTS] = '{3, 5, 8, 3, 43};
  localparam int CUT_NOUT [N_CUTS] = '{2, 5, 5, 3, 8};

  // Number of ROM words a network occupies: every hidden neuron has a bias
  // and one weight per input, every output neuron a bias and one weight per
  // hidden neuron.
  function automatic int net_words(int nin, int nhid, int nout);
    return nhid * (nin + 1) + nout * (nhid + 1);
  endfunction

  function automatic int cut_ptr(int cut);
    int p = 0;
    for (int c = 0; c < cut; c++)
      p += net_words(CUT_NIN[c], CUT_NHID[c], CUT_NOUT[c]);
    return p;
  endfunction

endpackage
