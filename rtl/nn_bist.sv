// nn_bist: reconfigurable neural-network online tester (data path plus
// controller) for a set of combinational circuits.
//
// Each monitored circuit is modelled by a three-layer feed-forward network
// (one input neuron per input bit, a hidden layer, one output neuron per
// output bit) whose coefficients sit in one shared ROM.  A single neuron is
// time-multiplexed over all neurons: the controller loads a bias into the
// saturating accumulator, then multiplies each fan-in value (an input bit as
// 0 or 1.0 for the hidden layer, a stored hidden activation for the output
// layer) by its weight with a sequential multiplier, truncates and adds the
// product, and finally passes the sum through the PLAN logsig.  Hidden
// results go to a small RAM; each output neuron is rounded to a bit and
// compared with the matching sampled CUT output bit.  A difference is a
// detected fault.
//
// Interface: the inputs/outputs of all circuits arrive as packed arrays; a
// round-robin scheduler picks the circuit under test, switching after
// 'tests_per_cut' tests.  'err' pulses for one cycle on each mismatching
// output bit, with 'err_cut' and 'err_bit' naming the circuit and output;
// 'fault_flags' keeps a sticky bit per circuit.  A test takes
// 2 + n_hid*(2 + n_in*10) + n_out*(2 + n_hid*10) cycles at the default
// u1.7 multiplier operand; the CUT values used are those present in the
// SAMPLE cycle, values applied meanwhile are not checked.
//
// Formats (defaults): hidden values u1.7, coefficients s6.7, truncated
// product and accumulator s6.7.  Products are truncated (arithmetic shift)
// and then saturated; biases enter the accumulator directly.
module nn_bist
  import nn_bist_pkg::*;
#(
  parameter string COEF_FILE = "rtl/nn_coef.hex"
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          enable,
  input  logic [15:0]                   tests_per_cut,
  input  logic [N_CUTS-1:0][MAX_IN-1:0] cut_in,
  input  logic [N_CUTS-1:0][MAX_OUT-1:0] cut_out,
  output logic                          err,
  output logic [CUT_W-1:0]              err_cut,
  output logic [$clog2(MAX_OUT)-1:0]    err_bit,
  output logic [N_CUTS-1:0]             fault_flags,
  output logic                          chk_valid,
  output logic                          test_done,
  output logic                          cut_switched,
  output logic [CUT_W-1:0]              cur_cut,
  output logic                          acc_saturated
);
  localparam int unsigned P_W  = RAM_W + ROM_W;           // full product width
  localparam int unsigned P_SH = RAM_F + ROM_F - MUL_F;   // product truncation
  localparam int unsigned B_SH = ROM_F - MUL_F;           // bias alignment

  // controller <-> data path
  logic              sample, acc_load, acc_add, mult_start, layer_out, in_shift;
  logic              ram_we, check, mult_ready, mult_busy;
  logic [ROM_AW-1:0] rom_addr;
  logic [HID_AW-1:0] ram_waddr, ram_raddr;
  nn_cfg_t           cfg;
  logic [CUT_W-1:0]  sel, cut_q;
  logic [MAX_IN-1:0] sel_in;
  logic [MAX_OUT-1:0] sel_out;

  logic [ROM_W-1:0]        rom_data;
  logic [RAM_W-1:0]        ram_rdata, af_out;
  logic                    in_bit;
  logic [RAM_W-1:0]        mul_a;
  logic signed [P_W-1:0]   prod;
  logic signed [MUL_W-1:0] prod_t, bias_t, acc_d, acc;

  // saturate a wide signed value into MUL_W bits
  function automatic logic signed [MUL_W-1:0] sat_mul(input logic signed [P_W-1:0] v);
    logic signed [P_W-1:0] hi, lo;
    hi = P_W'({1'b0, {(MUL_W-1){1'b1}}});
    lo = -hi - 1;
    if (v > hi)      return {1'b0, {(MUL_W-1){1'b1}}};
    else if (v < lo) return {1'b1, {(MUL_W-1){1'b0}}};
    else             return MUL_W'(v);
  endfunction

  cut_scheduler #(.N_CUTS(N_CUTS), .IN_W(MAX_IN), .OUT_W(MAX_OUT), .CNT_W(16)) u_sched (
    .clk, .rst_n, .cut_in, .cut_out, .tests_per_cut, .test_done,
    .sel, .sel_in, .sel_out, .switched(cut_switched));

  cfg_rom u_cfg (.sel, .cfg);

  nn_controller u_ctrl (
    .clk, .rst_n, .enable, .cfg, .mult_ready, .sample, .acc_load, .acc_add,
    .mult_start, .layer_out, .in_shift, .rom_addr, .ram_we, .ram_waddr,
    .ram_raddr, .check, .test_done, .busy());

  coef_rom #(.W(ROM_W), .DEPTH(ROM_DEPTH), .INIT_FILE(COEF_FILE)) u_rom (
    .addr(rom_addr), .data(rom_data));

  hidden_ram #(.W(RAM_W), .DEPTH(MAX_HID)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(af_out),
    .raddr(ram_raddr), .rdata(ram_rdata));

  in_shift_reg #(.W(MAX_IN)) u_insr (
    .clk, .rst_n, .load(sample), .d(sel_in), .len(cfg.n_in),
    .shift(in_shift), .bit_out(in_bit));

  assign mul_a = layer_out ? ram_rdata : (in_bit ? RAM_W'(1) << RAM_F : '0);

  seq_mult #(.A_F(RAM_F), .B_W(ROM_W)) u_mult (
    .clk, .rst_n, .start(mult_start), .a(mul_a), .b(rom_data),
    .busy(mult_busy), .ready(mult_ready), .p(prod));

  assign prod_t = sat_mul(prod >>> P_SH);
  assign bias_t = sat_mul(P_W'(signed'(rom_data)) >>> B_SH);
  assign acc_d  = acc_load ? bias_t : prod_t;

  sat_acc #(.W(MUL_W)) u_acc (
    .clk, .rst_n, .load(acc_load), .add(acc_add), .d(acc_d),
    .acc, .sat(acc_saturated));

  plan_logsig #(.IN_I(MUL_I), .IN_F(MUL_F), .OUT_F(RAM_F)) u_af (
    .s(acc), .f(af_out));

  out_checker #(.W(MAX_OUT), .F(RAM_F)) u_chk (
    .clk, .rst_n, .load(sample), .d(sel_out), .check, .f(af_out),
    .err, .chk_valid, .nn_bit(), .cut_bit(), .bit_idx(err_bit));

  // circuit whose test is in progress (the scheduler may already have moved on)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cut_q       <= '0;
      fault_flags <= '0;
    end else begin
      if (sample) cut_q <= sel;
      if (err)    fault_flags[cut_q] <= 1'b1;
    end
  end

  assign err_cut = cut_q;

  // the controller never restarts the multiplier while it is working
  assert property (@(posedge clk) disable iff (!rst_n) mult_start |-> !mult_busy);
  assign cur_cut = sel;
endmodule
