// tb_coef_rom: the ROM reads its image file and is zero beyond it.
module tb_coef_rom;
  logic [9:0] addr;
  logic [12:0] data;
  int checks = 0, failures = 0;
  int expv [4] = '{'h0a0b, 'h1fff, 'h1000, 'h05a0};

  coef_rom #(.W(13), .DEPTH(1024), .INIT_FILE("tb/coef_test.hex")) dut (.addr, .data);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      addr = 10'(i); #1; checks++;
      if (int'(data) != expv[i]) begin failures++; $display("addr %0d data %h", i, data); end
    end
    for (int i = 4; i < 1024; i += 97) begin
      addr = 10'(i); #1; checks++;
      if (data != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
