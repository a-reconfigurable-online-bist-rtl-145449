// ttl7485: 4-bit magnitude comparator with cascade inputs (function of the
// 7485).
//
// Inputs in = {I_gt, I_eq, I_lt, B[3:0], A[3:0]}, outputs out = {O_gt, O_eq,
// O_lt}.  When A and B differ the outputs say which is larger; when they are
// equal the cascade inputs decide: O_eq = I_eq, O_gt = !I_eq & !I_lt,
// O_lt = !I_eq & !I_gt (the cascading rule of the LS version of the part).
// Combinational; the vector order is this design's choice.
module ttl7485 (
  input  logic [10:0] in,
  output logic [2:0]  out
);
  logic [3:0] a, b;
  logic i_lt, i_eq, i_gt;
  assign a = in[3:0];
  assign b = in[7:4];
  assign {i_gt, i_eq, i_lt} = in[10:8];
  always_comb begin
    if (a > b)      out = 3'b100;
    else if (a < b) out = 3'b001;
    else            out = {~i_eq & ~i_lt, i_eq, ~i_eq & ~i_gt};
  end
endmodule
