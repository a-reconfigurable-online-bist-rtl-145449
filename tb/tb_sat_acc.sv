// tb_sat_acc: load and random saturating additions compared with a clamped
// integer model; forces both saturation limits.
module tb_sat_acc;
  logic clk = 0, rst_n = 0, load = 0, add = 0;
  logic signed [12:0] d, acc;
  logic sat;
  int checks = 0, failures = 0, model = 0, nsat = 0;
  bit exp_sat = 0;

  sat_acc #(.W(13)) dut (.clk, .rst_n, .load, .add, .d, .acc, .sat);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      int v, s;
      v = int'($urandom_range(8191)) - 4096;
      if (i % 37 == 0) begin
        load = 1; add = 0; model = v; exp_sat = 0;
      end else begin
        load = 0; add = 1;
        s = model + v;
        model = s > 4095 ? 4095 : (s < -4096 ? -4096 : s);
        exp_sat = s != model;
        if (exp_sat) nsat++;
      end
      d = 13'(v);
      @(negedge clk);
      checks++;
      if (int'(acc) != model || sat != exp_sat) begin
        failures++;
        if (failures < 10) $display("acc=%0d model=%0d", acc, model);
      end
    end
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
