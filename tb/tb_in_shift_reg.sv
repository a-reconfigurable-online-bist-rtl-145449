// tb_in_shift_reg: the register presents input bits 0..len-1 in order and
// repeats them after len shifts, for random vectors and lengths.
module tb_in_shift_reg;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [10:0] d = 0;
  logic [3:0] len = 0;
  logic bit_out;
  int checks = 0, failures = 0;

  in_shift_reg #(.W(11)) dut (.clk, .rst_n, .load, .d, .len, .shift, .bit_out);

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
    for (int t = 0; t < 100; t++) begin
      int n;
      n = int'($urandom_range(11, 1));
      @(negedge clk);
      load = 1; d = 11'($urandom_range(2047)); len = 4'(n);
      @(negedge clk);
      load = 0; shift = 1;
      for (int r = 0; r < 3; r++)
        for (int i = 0; i < n; i++) begin
          checks++;
          if (bit_out != d[i]) failures++;
          @(negedge clk);
        end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
