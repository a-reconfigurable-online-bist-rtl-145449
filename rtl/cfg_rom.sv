// cfg_rom: controller ROM of the reconfigurable tester.
//
// For each monitored circuit it holds where that circuit's coefficients start
// in the coefficient ROM and how many input, hidden and output neurons its
// network has.  The table is built at elaboration time from the CUT table of
// nn_bist_pkg; the start pointers are the running sum of the networks' sizes,
// so networks lie back to back in the coefficient ROM.  Asynchronous read.
module cfg_rom
  import nn_bist_pkg::*;
(
  input  logic [CUT_W-1:0] sel,
  output nn_cfg_t          cfg
);
  nn_cfg_t table_q [N_CUTS];

  always_comb begin
    for (int c = 0; c < int'(N_CUTS); c++) begin
      table_q[c].ptr   = ROM_AW'(cut_ptr(c));
      table_q[c].n_in  = IN_CW'(CUT_NIN[c]);
      table_q[c].n_hid = HID_CW'(CUT_NHID[c]);
      table_q[c].n_out = OUT_CW'(CUT_NOUT[c]);
    end
    cfg = (int'(sel) < int'(N_CUTS)) ? table_q[sel] : table_q[0];
  end
endmodule
