// in_shift_reg: circular shift register for the sampled CUT input.
//
// 'load' captures the CUT input vector and its length 'len' (the number of
// input bits of the CUT now monitored).  Bit 0 is presented on 'bit_out';
// each 'shift' rotates the lowest 'len' bits right by one, so bit 0 moves to
// position len-1.  After 'len' shifts the register is back to the loaded
// value, ready for the next hidden neuron.  Registered, load wins over shift.
module in_shift_reg #(
  parameter int unsigned W = 11
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,
  input  logic [W-1:0]              d,
  input  logic [$clog2(W+1)-1:0]    len,
  input  logic                      shift,
  output logic                      bit_out
);
  logic [W-1:0] r, r_rot;
  logic [$clog2(W+1)-1:0] len_q;

  always_comb begin
    r_rot = r >> 1;
    for (int i = 0; i < int'(W); i++)
      if (i == int'(len_q) - 1) r_rot[i] = r[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r     <= '0;
      len_q <= '0;
    end else if (load) begin
      r     <= d;
      len_q <= len;
    end else if (shift) begin
      r     <= r_rot;
    end
  end

  assign bit_out = r[0];
endmodule
