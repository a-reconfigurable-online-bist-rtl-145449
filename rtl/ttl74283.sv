// ttl74283: 4-bit binary full adder (function of the 74283).
//
// Inputs in = {C0, B[3:0], A[3:0]}, outputs out = {C4, S[3:0]} with
// {C4,S} = A + B + C0.  Built as a ripple of four full adders, the form the
// network tester sees as a 9-input, 5-output combinational circuit.
// Combinational; the vector order is this design's choice.
module ttl74283 (
  input  logic [8:0] in,
  output logic [4:0] out
);
  logic [3:0] a, b;
  logic [4:0] c;
  assign a    = in[3:0];
  assign b    = in[7:4];
  assign c[0] = in[8];
  for (genvar i = 0; i < 4; i++) begin : g_fa
    assign out[i]  = a[i] ^ b[i] ^ c[i];
    assign c[i+1]  = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end
  assign out[4] = c[4];
endmodule
