// bist_top: five combinational benchmark circuits monitored on line by one
// reconfigurable neural-network tester.
//
// The circuits (C17, 74182, 74283, 7485, Div4) work on their functional inputs
// as usual and their outputs leave the top unchanged; the tester only listens.
// Their input and output vectors are gathered, zero-extended to the widest
// circuit, into the tester's packed arrays in CUT-table order.  The tester
// samples one circuit at a time, recomputes the circuit's outputs with that
// circuit's network and flags any difference ('err', 'err_cut', 'err_bit',
// sticky 'fault_flags').  It moves round-robin to the next circuit after
// 'tests_per_cut' tests.  The coefficient image is taken from COEF_FILE.
module bist_top
  import nn_bist_pkg::*;
#(
  parameter string COEF_FILE = "rtl/nn_coef.hex"
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       enable,
  input  logic [15:0]                tests_per_cut,
  // functional inputs / outputs of the monitored circuits
  input  logic [4:0]                 c17_in,
  output logic [1:0]                 c17_out,
  input  logic [8:0]                 lcg_in,     // 74182
  output logic [4:0]                 lcg_out,
  input  logic [8:0]                 add_in,     // 74283
  output logic [4:0]                 add_out,
  input  logic [10:0]                cmp_in,     // 7485
  output logic [2:0]                 cmp_out,
  input  logic [7:0]                 div_in,     // Div4
  output logic [7:0]                 div_out,
  // tester status
  output logic                       err,
  output logic [CUT_W-1:0]           err_cut,
  output logic [$clog2(MAX_OUT)-1:0] err_bit,
  output logic [N_CUTS-1:0]          fault_flags,
  output logic                       chk_valid,
  output logic                       test_done,
  output logic                       cut_switched,
  output logic [CUT_W-1:0]           cur_cut,
  output logic                       acc_saturated
);
  logic [N_CUTS-1:0][MAX_IN-1:0]  cut_in;
  logic [N_CUTS-1:0][MAX_OUT-1:0] cut_out;

  c17      u_c17 (.in(c17_in), .out(c17_out));
  ttl74182 u_lcg (.in(lcg_in), .out(lcg_out));
  ttl74283 u_add (.in(add_in), .out(add_out));
  ttl7485  u_cmp (.in(cmp_in), .out(cmp_out));
  div4     u_div (.in(div_in), .out(div_out));

  assign cut_in[0]  = MAX_IN'(c17_in);
  assign cut_in[1]  = MAX_IN'(lcg_in);
  assign cut_in[2]  = MAX_IN'(add_in);
  assign cut_in[3]  = MAX_IN'(cmp_in);
  assign cut_in[4]  = MAX_IN'(div_in);
  assign cut_out[0] = MAX_OUT'(c17_out);
  assign cut_out[1] = MAX_OUT'(lcg_out);
  assign cut_out[2] = MAX_OUT'(add_out);
  assign cut_out[3] = MAX_OUT'(cmp_out);
  assign cut_out[4] = MAX_OUT'(div_out);

  nn_bist #(.COEF_FILE(COEF_FILE)) u_bist (
    .clk, .rst_n, .enable, .tests_per_cut, .cut_in, .cut_out,
    .err, .err_cut, .err_bit, .fault_flags, .chk_valid, .test_done,
    .cut_switched, .cur_cut, .acc_saturated);
endmodule
