// div4: 4-bit unsigned divider, 8 inputs and 8 outputs.
//
// Inputs in = {divisor[3:0], dividend[3:0]}, outputs out = {remainder[3:0],
// quotient[3:0]}.  Built as a combinational restoring-division array: four
// rows, each a trial subtraction of the shifted divisor and a multiplexer.
// Division by zero yields quotient 4'hF and remainder = dividend, which is
// what the restoring array produces naturally.  Both the output split and the
// divide-by-zero result are this design's choices.
module div4 (
  input  logic [7:0] in,
  output logic [7:0] out
);
  logic [3:0] n, d, q;
  logic [4:0] r [5];
  assign n = in[3:0];
  assign d = in[7:4];
  assign r[0] = '0;
  for (genvar i = 0; i < 4; i++) begin : g_row
    logic [4:0] t;     // partial remainder with next dividend bit
    logic [5:0] diff;
    assign t       = {r[i][3:0], n[3-i]};
    assign diff    = {1'b0, t} - {2'b0, d};
    assign q[3-i]  = ~diff[5];
    assign r[i+1]  = diff[5] ? t : diff[4:0];
  end
  assign out = {r[4][3:0], q};
endmodule
