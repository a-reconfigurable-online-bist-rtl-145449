// tb_seq_mult: random and corner products of the sequential multiplier,
// checked against integer multiplication, with the A_F+1 cycle latency.
module tb_seq_mult;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] a;
  logic signed [12:0] b;
  logic busy, ready;
  logic signed [20:0] p;
  int checks = 0, failures = 0;

  seq_mult #(.A_F(7), .B_W(13)) dut (.clk, .rst_n, .start, .a, .b, .busy, .ready, .p);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int av, int bv);
    int n;
    @(negedge clk);
    a = 8'(av); b = 13'(bv); start = 1;
    @(negedge clk);
    start = 0; n = 1;
    while (!ready) begin @(negedge clk); n++; end
    checks++;
    if (p != 21'(av * bv)) begin
      failures++;
      $display("a=%0d b=%0d p=%0d", av, bv, p);
    end
    checks++;
    if (n != 9) begin failures++; $display("latency %0d", n); end
  endtask

  initial begin
    a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 100); run(128, -4096); run(255, 4095); run(255, -4096); run(1, -1);
    repeat (300) run(int'($urandom_range(255)), int'($urandom_range(8191)) - 4096);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
