// tb_cut_scheduler: round-robin order, dwell of tests_per_cut tests (changed
// on the fly, including 0), and routing of the selected circuit's vectors.
module tb_cut_scheduler;
  logic clk = 0, rst_n = 0, test_done = 0;
  logic [4:0][10:0] cut_in;
  logic [4:0][7:0]  cut_out;
  logic [15:0] tpc;
  logic [2:0] sel;
  logic [10:0] sel_in;
  logic [7:0] sel_out;
  logic switched;
  int checks = 0, failures = 0, exp_sel = 0, cnt = 0, nsw = 0;

  cut_scheduler #(.N_CUTS(5), .IN_W(11), .OUT_W(8), .CNT_W(16)) dut (
    .clk, .rst_n, .cut_in, .cut_out, .tests_per_cut(tpc), .test_done,
    .sel, .sel_in, .sel_out, .switched);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 5; c++) begin cut_in[c] = 11'(100 * c + 7); cut_out[c] = 8'(30 * c + 1); end
    tpc = 3;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int lim;
      if (t % 50 == 0) tpc = 16'($urandom_range(4));
      lim = (tpc == 0) ? 1 : int'(tpc);
      checks++;
      if (int'(sel) != exp_sel || sel_in != 11'(100 * exp_sel + 7) || sel_out != 8'(30 * exp_sel + 1)) begin
        failures++;
        if (failures < 10) $display("t=%0d sel=%0d exp=%0d", t, sel, exp_sel);
      end
      test_done = 1;
      @(negedge clk);
      test_done = 0;
      if (cnt + 1 >= lim) begin
        cnt = 0; exp_sel = (exp_sel + 1) % 5;
        checks++;
        if (!switched) failures++;
        nsw++;
      end else begin
        cnt++;
        checks++;
        if (switched) failures++;
      end
      repeat (int'($urandom_range(2))) @(negedge clk);
    end
    checks++;
    if (nsw < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
