// nn_controller: sequencer of the time-multiplexed single-neuron network.
//
// One test of the selected circuit is:
//   SAMPLE  capture CUT inputs/outputs and its network configuration, point
//           the coefficient ROM at the circuit's first word;
//   then for every hidden neuron and afterwards every output neuron:
//   BIAS    load the bias into the accumulator, step the ROM address;
//   MSTART  start the sequential multiplier on (input bit or hidden value,
//           weight);
//   MWAIT   wait for 'mult_ready', add the truncated product, step the ROM
//           address, the fan-in count and (hidden layer) the input rotator;
//           back to MSTART until the neuron's fan-in is exhausted;
//   ACT     the accumulator passes the activation function: a hidden neuron
//           writes the RAM at its index, an output neuron is checked;
//   DONE    pulse 'test_done' and start the next test if 'enable' holds.
// The coefficient ROM and the hidden RAM are only ever addressed in
// increasing order, which is why the coefficients are stored neuron by
// neuron.  With an A_W-cycle multiplier a test takes
//   2 + n_hid*(2 + n_in*(A_W+2)) + n_out*(2 + n_hid*(A_W+2))
// clock cycles; SAMPLE of the next test follows DONE directly.
// State encoding, the one-cycle BIAS/ACT steps and the handshake with the
// multiplier are this design's choices.
module nn_controller
  import nn_bist_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  nn_cfg_t           cfg,          // configuration of the selected CUT
  input  logic              mult_ready,
  output logic              sample,       // capture CUT I/O (shift registers)
  output logic              acc_load,
  output logic              acc_add,
  output logic              mult_start,
  output logic              layer_out,    // 0: hidden layer, 1: output layer
  output logic              in_shift,
  output logic [ROM_AW-1:0] rom_addr,
  output logic              ram_we,
  output logic [HID_AW-1:0] ram_waddr,
  output logic [HID_AW-1:0] ram_raddr,
  output logic              check,        // output neuron to be compared
  output logic              test_done,
  output logic              busy
);
  typedef enum logic [2:0] {S_IDLE, S_SAMPLE, S_BIAS, S_MSTART, S_MWAIT, S_ACT, S_DONE} state_t;

  state_t             state;
  nn_cfg_t            cfg_q;
  logic [HID_CW-1:0]  n_cnt;    // neuron index within the layer
  logic [HID_CW-1:0]  k_cnt;    // fan-in index within the neuron
  logic [HID_CW-1:0]  fan_in, layer_size;
  logic               act_valid;   // accumulator holds a finished neuron

  assign fan_in     = layer_out ? cfg_q.n_hid : HID_CW'(cfg_q.n_in);
  assign layer_size = layer_out ? HID_CW'(cfg_q.n_out) : cfg_q.n_hid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cfg_q     <= '0;
      n_cnt     <= '0;
      k_cnt     <= '0;
      layer_out <= 1'b0;
      rom_addr  <= '0;
    end else begin
      unique case (state)
        S_IDLE:   if (enable) state <= S_SAMPLE;
        S_SAMPLE: begin
          cfg_q     <= cfg;
          rom_addr  <= cfg.ptr;
          layer_out <= 1'b0;
          n_cnt     <= '0;
          state     <= (cfg.n_hid == '0) ? S_DONE : S_BIAS;
        end
        S_BIAS: begin
          rom_addr <= rom_addr + 1'b1;
          k_cnt    <= '0;
          state    <= (fan_in == '0) ? S_ACT : S_MSTART;
        end
        S_MSTART: state <= S_MWAIT;
        S_MWAIT: if (mult_ready) begin
          rom_addr <= rom_addr + 1'b1;
          k_cnt    <= k_cnt + 1'b1;
          state    <= (k_cnt + 1'b1 == fan_in) ? S_ACT : S_MSTART;
        end
        S_ACT: begin
          if (n_cnt + 1'b1 == layer_size) begin
            n_cnt <= '0;
            if (!layer_out && cfg_q.n_out != '0) begin
              layer_out <= 1'b1;
              state     <= S_BIAS;
            end else begin
              state     <= S_DONE;
            end
          end else begin
            n_cnt <= n_cnt + 1'b1;
            state <= S_BIAS;
          end
        end
        S_DONE:   state <= enable ? S_SAMPLE : S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    sample     = state == S_SAMPLE;
    acc_load   = state == S_BIAS;
    mult_start = state == S_MSTART;
    acc_add    = state == S_MWAIT && mult_ready;
    in_shift   = acc_add && !layer_out;
    act_valid  = state == S_ACT;
    ram_we     = act_valid && !layer_out;
    check      = act_valid && layer_out;
    ram_waddr  = HID_AW'(n_cnt);
    ram_raddr  = HID_AW'(k_cnt);
    test_done  = state == S_DONE;
    busy       = state != S_IDLE;
  end

  // the multiplier must answer while it is waited for, never otherwise
  assert property (@(posedge clk) disable iff (!rst_n) mult_ready |-> state == S_MWAIT);
endmodule
