// plan_logsig: logsig activation F(S) = 1/(1+exp(-S)) approximated by the
// PLAN piecewise-linear scheme.
//
// The four PLAN segments for |S| are
//     |S| >= 5          : 1
//     2.375 <= |S| < 5  : |S|/32 + 0.84375
//     1 <= |S| < 2.375  : |S|/8  + 0.625
//     0 <= |S| < 1      : |S|/4  + 0.5
// and F(-S) = 1 - F(S).  All slopes are powers of two, so the unit is a
// comparator tree, three shifts, an adder and a final subtract: no multiplier
// and no table.  The input is the accumulator value in signed fixed point
// (IN_I integer bits including sign, IN_F fractional bits); the output is an
// unsigned u1.OUT_F value in [0, 1].  The segment values are computed exactly
// with IN_F+5 fractional bits and then truncated to OUT_F bits.
//
// Purely combinational.  Using PLAN with a 7-bit fraction at the output is
// what the tester is specified with; the segment constants are the published
// PLAN ones, and truncation (not rounding) to OUT_F bits is this design's
// choice.
module plan_logsig #(
  parameter int unsigned IN_I  = 6,
  parameter int unsigned IN_F  = 7,
  parameter int unsigned OUT_F = 7
) (
  input  logic signed [IN_I+IN_F-1:0] s,
  output logic        [OUT_F:0]       f
);
  localparam int unsigned IN_W = IN_I + IN_F;
  localparam int unsigned YF   = IN_F + 5;          // exact fraction of the segments
  localparam int unsigned YW   = IN_W + 6;          // room for |S| << 3 plus constant

  logic [IN_W-1:0] ax;
  logic [YW-1:0]   y, yf;

  always_comb begin
    ax = s[IN_W-1] ? IN_W'(-s) : IN_W'(s);
    if (YW'(ax) >= (YW'(5) << IN_F))
      y = YW'(1) << YF;
    else if ((YW'(ax) << 3) >= (YW'(19) << IN_F))
      y = YW'(ax) + (YW'(27) << IN_F);
    else if (YW'(ax) >= (YW'(1) << IN_F))
      y = (YW'(ax) << 2) + (YW'(5) << (IN_F + 2));
    else
      y = (YW'(ax) << 3) + (YW'(1) << (YF - 1));
    yf = s[IN_W-1] ? (YW'(1) << YF) - y : y;
    f  = (OUT_F + 1)'(yf >> (YF - OUT_F));
  end

  initial assert (OUT_F <= YF) else $error("plan_logsig: OUT_F too large");
endmodule
