// ttl74182: 4-bit look-ahead carry generator (function of the 74182).
//
// Inputs in = {G3_n..G0_n, P3_n..P0_n, Cn}: carry in and active-low group
// generate/propagate of four adder slices.  Outputs out = {P_n, G_n, Cn+z,
// Cn+y, Cn+x}: the three look-ahead carries into slices 1..3 (active high) and
// the active-low block propagate and generate.  Combinational.  Pin polarity
// follows the standard part; the vector order is this design's choice.
module ttl74182 (
  input  logic [8:0] in,
  output logic [4:0] out
);
  logic       cn;
  logic [3:0] p, g;
  assign cn = in[0];
  assign p  = ~in[4:1];
  assign g  = ~in[8:5];
  assign out[0] = g[0] | (p[0] & cn);
  assign out[1] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cn);
  assign out[2] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cn);
  assign out[3] = ~(g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]));
  assign out[4] = ~(&p);
endmodule
