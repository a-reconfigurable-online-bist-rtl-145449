// tb_out_checker: activations around the 0.5 threshold against sampled
// output bits; err must pulse exactly on disagreement, with the bit index.
module tb_out_checker;
  logic clk = 0, rst_n = 0, load = 0, check = 0;
  logic [7:0] d = 0, f = 0;
  logic err, chk_valid, nn_bit, cut_bit;
  logic [2:0] bit_idx;
  int checks = 0, failures = 0, nerr = 0;

  out_checker #(.W(8), .F(7)) dut (.clk, .rst_n, .load, .d, .check, .f, .err,
                                   .chk_valid, .nn_bit, .cut_bit, .bit_idx);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int n;
      logic [7:0] vec;
      n = int'($urandom_range(8, 1));
      vec = 8'($urandom_range(255));
      @(negedge clk);
      load = 1; d = vec;
      @(negedge clk);
      load = 0;
      for (int k = 0; k < n; k++) begin
        int fv, e;
        fv = int'($urandom_range(128));
        if (k == 0) fv = 63 + int'($urandom_range(1));   // just below / at 0.5
        check = 1; f = 8'(fv);
        @(negedge clk);
        check = 0;
        e = ((fv >= 64) ? 1 : 0) != int'(vec[k]) ? 1 : 0;
        checks++;
        if (int'(err) != e || !chk_valid || int'(bit_idx) != k || cut_bit != vec[k]) begin
          failures++;
          if (failures < 10) $display("k=%0d f=%0d bit=%0d err=%0d", k, fv, vec[k], err);
        end
        nerr += e;
      end
      @(negedge clk);
      checks++;
      if (err || chk_valid) failures++;
    end
    checks++;
    if (nerr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
