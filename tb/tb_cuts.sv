// tb_cuts: every input combination of the five benchmark circuits against
// behavioural models (Boolean equations, integer add, compare and divide).
module tb_cuts;
  import tb_nn_ref_pkg::*;
  logic [4:0] i0;  logic [1:0] o0;
  logic [8:0] i1;  logic [4:0] o1;
  logic [8:0] i2;  logic [4:0] o2;
  logic [10:0] i3; logic [2:0] o3;
  logic [7:0] i4;  logic [7:0] o4;
  int checks = 0, failures = 0;

  c17      u0 (.in(i0), .out(o0));
  ttl74182 u1 (.in(i1), .out(o1));
  ttl74283 u2 (.in(i2), .out(o2));
  ttl7485  u3 (.in(i3), .out(o3));
  div4     u4 (.in(i4), .out(o4));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int cut, int in, int got);
    checks++;
    if (got != cut_model(cut, in)) begin
      failures++;
      if (failures < 20) $display("cut %0d in %h got %h exp %h", cut, in, got, cut_model(cut, in));
    end
  endtask

  initial begin
    for (int v = 0; v < 2048; v++) begin
      i0 = 5'(v); i1 = 9'(v); i2 = 9'(v); i3 = 11'(v); i4 = 8'(v);
      #1;
      if (v < 32)  chk(0, v, int'(o0));
      if (v < 512) chk(1, v, int'(o1));
      if (v < 512) chk(2, v, int'(o2));
      chk(3, v, int'(o3));
      if (v < 256) chk(4, v, int'(o4));
    end
    // hand-worked spot values: 13/4 = 3 r 1, 7+9+1 = 17, A=B with I_eq -> O_eq
    i4 = 8'h4d; i2 = 9'h197; i3 = 11'h255; #1;
    checks++; if (o4 != 8'h13) failures++;
    checks++; if (o2 != 5'h11) failures++;
    checks++; if (o3 != 3'b010) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
