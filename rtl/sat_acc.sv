// sat_acc: accumulator register fed by a saturating adder.
//
// 'load' puts a value (a neuron's bias) into the register; 'add' adds a
// truncated product to it.  A sum that leaves the signed W-bit range is
// clamped to the largest positive or most negative value instead of wrapping,
// so a neuron that is driven far into saturation keeps the right sign at the
// activation function.  load wins over add.  Registered: the new value is
// visible one clock after the command.  Saturating accumulation is what the
// tester specifies; the load/add interface is this design's choice.
module sat_acc #(
  parameter int unsigned W = 13
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                add,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] acc,
  output logic                sat      // the last add was clamped
);
  localparam logic signed [W-1:0] MAXV = {1'b0, {(W-1){1'b1}}};
  localparam logic signed [W-1:0] MINV = {1'b1, {(W-1){1'b0}}};

  logic signed [W:0] sum;
  logic signed [W-1:0] sum_sat;
  logic ovf;

  always_comb begin
    sum = {acc[W-1], acc} + {d[W-1], d};
    ovf = sum[W] != sum[W-1];
    if (ovf) sum_sat = sum[W] ? MINV : MAXV;
    else     sum_sat = sum[W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      sat <= 1'b0;
    end else if (load) begin
      acc <= d;
      sat <= 1'b0;
    end else if (add) begin
      acc <= sum_sat;
      sat <= ovf;
    end
  end
endmodule
