// tb_hidden_ram: write every word, read them back in order, overwrite some.
module tb_hidden_ram;
  logic clk = 0, we = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [43];
  int checks = 0, failures = 0;

  hidden_ram #(.W(8), .DEPTH(43)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < 43; i++) begin
        if (pass == 0 || $urandom_range(1) == 1) begin
          @(negedge clk);
          we = 1; waddr = 6'(i); wdata = 8'($urandom_range(255)); model[i] = wdata;
        end
      end
      @(negedge clk); we = 0;
      for (int i = 0; i < 43; i++) begin
        raddr = 6'(i); #1; checks++;
        if (rdata != model[i]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
