// out_checker: output shift register and validity check of the tester.
//
// 'load' captures the CUT output vector sampled together with its inputs.
// For every output neuron the controller pulses 'check' with that neuron's
// activation 'f' (u1.F).  The network's bit is 1 when either of the two most
// significant bits of f is set, i.e. f >= 0.5.  It is compared with bit 0 of
// the shift register, the register then shifts right by one.  A difference
// raises 'err' for one cycle, registered, together with the two bits and the
// output index.  So output neuron k is checked against CUT output bit k.
module out_checker #(
  parameter int unsigned W = 8,        // widest CUT output
  parameter int unsigned F = 7         // f is u1.F
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic [W-1:0]             d,
  input  logic                     check,
  input  logic [F:0]               f,
  output logic                     err,
  output logic                     chk_valid,
  output logic                     nn_bit,
  output logic                     cut_bit,
  output logic [$clog2(W)-1:0]     bit_idx
);
  logic [W-1:0] r;
  logic [$clog2(W)-1:0] idx;
  logic nn_b;

  assign nn_b = f[F] | f[F-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r         <= '0;
      idx       <= '0;
      err       <= 1'b0;
      chk_valid <= 1'b0;
      nn_bit    <= 1'b0;
      cut_bit   <= 1'b0;
      bit_idx   <= '0;
    end else begin
      err       <= 1'b0;
      chk_valid <= 1'b0;
      if (load) begin
        r   <= d;
        idx <= '0;
      end else if (check) begin
        err       <= nn_b != r[0];
        chk_valid <= 1'b1;
        nn_bit    <= nn_b;
        cut_bit   <= r[0];
        bit_idx   <= idx;
        r         <= r >> 1;
        idx       <= idx + 1'b1;
      end
    end
  end
endmodule
