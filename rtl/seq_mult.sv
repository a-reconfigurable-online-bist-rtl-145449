// seq_mult: sequential shift-and-add multiplier of the neuron data path.
//
// Multiplies an unsigned neuron value a (u1.A_F, i.e. A_F+1 bits: a hidden
// neuron output, or 0/1.0 for an input bit) by a signed coefficient b
// (B_W bits, two's complement).  One bit of a is consumed per clock, LSB
// first, so a product takes A_F+1 cycles after start; 'ready' then pulses for
// one cycle with the full-precision signed product held in 'p' until the next
// start.  A start while busy restarts the multiplication.  Trading this loop
// for a parallel array is the area saving the tester is built around; the
// shift-add order and the start/ready handshake are this design's choice.
module seq_mult #(
  parameter int unsigned A_F = 7,      // a is u1.A_F
  parameter int unsigned B_W = 13      // b is signed B_W bits
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [A_F:0]              a,
  input  logic signed [B_W-1:0]     b,
  output logic                      busy,
  output logic                      ready,
  output logic signed [A_F+B_W:0]   p
);
  localparam int unsigned A_W = A_F + 1;
  localparam int unsigned P_W = A_W + B_W;

  logic [A_W-1:0]          a_sh;
  logic signed [P_W-1:0]   b_sh;
  logic [$clog2(A_W+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      ready <= 1'b0;
      p     <= '0;
      a_sh  <= '0;
      b_sh  <= '0;
      cnt   <= '0;
    end else begin
      ready <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        a_sh <= a;
        b_sh <= P_W'(b);
        p    <= '0;
        cnt  <= '0;
      end else if (busy) begin
        if (a_sh[0]) p <= p + b_sh;
        a_sh <= a_sh >> 1;
        b_sh <= b_sh <<< 1;
        cnt  <= cnt + 1'b1;
        if (cnt == $bits(cnt)'(A_W - 1)) begin
          busy  <= 1'b0;
          ready <= 1'b1;
        end
      end
    end
  end
endmodule
