// c17: the ISCAS-85 C17 benchmark, six two-input NAND gates.
//
// Inputs in = {N7, N6, N3, N2, N1} (in[0] = N1), outputs out = {N23, N22}.
//   N10 = NAND(N1,N3)  N11 = NAND(N3,N6)  N16 = NAND(N2,N11)
//   N19 = NAND(N11,N7) N22 = NAND(N10,N16) N23 = NAND(N16,N19)
// Combinational.  The netlist is the standard benchmark; the bit order of the
// vectors is this design's choice.
module c17 (
  input  logic [4:0] in,
  output logic [1:0] out
);
  logic n1, n2, n3, n6, n7, n10, n11, n16, n19;
  assign {n7, n6, n3, n2, n1} = in;
  assign n10 = ~(n1 & n3);
  assign n11 = ~(n3 & n6);
  assign n16 = ~(n2 & n11);
  assign n19 = ~(n11 & n7);
  assign out[0] = ~(n10 & n16);
  assign out[1] = ~(n16 & n19);
endmodule
