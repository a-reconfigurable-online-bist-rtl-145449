// tb_bist_top: end-to-end run of the five circuits with their on-line tester,
// all parameters at their defaults.
//
// The tester runs with its shipped coefficient image.  The functional inputs
// of all circuits change at random moments.  Every output check is compared
// with the bit-true network reference applied to the vectors the tester
// sampled.  Circuits whose network reproduces them exactly (found by an
// exhaustive sweep of the reference) must never raise an alarm while
// fault-free.  Halfway through, a stuck-at-1 fault is forced on C17's internal
// net N16, and C17 errors must then appear.  Mechanisms counted: round-robin
// switches, a change of the dwell time on the fly, accumulator saturation,
// detected C17 faults, all five circuits tested, and the test length.
module tb_bist_top;
  import tb_nn_ref_pkg::*;

  logic clk = 0, rst_n = 0, enable = 0;
  logic [15:0] tpc = 1;
  logic [4:0] c17_in = 0;  logic [1:0] c17_out;
  logic [8:0] lcg_in = 0;  logic [4:0] lcg_out;
  logic [8:0] add_in = 0;  logic [4:0] add_out;
  logic [10:0] cmp_in = 0; logic [2:0] cmp_out;
  logic [7:0] div_in = 0;  logic [7:0] div_out;
  logic err, chk_valid, test_done, cut_switched, acc_saturated;
  logic [2:0] err_cut, err_bit, cur_cut;
  logic [4:0] fault_flags;

  int checks = 0, failures = 0, cyc = 0;
  int n_tests = 0, n_switch = 0, n_sat = 0, false_alarms = 0, c17_err_fault = 0;
  int s_cut, s_in, s_out, s_pred, k_seen, t_start;
  bit faulty = 0;
  bit [4:0] tested = '0;
  bit exact [5];
  logic [12:0] img [1024];

  bist_top dut (.*, .tests_per_cut(tpc));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #50000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if ($urandom_range(5) == 0) c17_in = 5'($urandom);
    if ($urandom_range(5) == 0) lcg_in = 9'($urandom);
    if ($urandom_range(5) == 0) add_in = 9'($urandom);
    if ($urandom_range(5) == 0) cmp_in = 11'($urandom);
    if ($urandom_range(5) == 0) div_in = 8'($urandom);
  end

  function automatic int port_in(int c);
    case (c)
      0: return int'(c17_in);
      1: return int'(lcg_in);
      2: return int'(add_in);
      3: return int'(cmp_in);
      default: return int'(div_in);
    endcase
  endfunction

  function automatic int port_out(int c);
    case (c)
      0: return int'(c17_out);
      1: return int'(lcg_out);
      2: return int'(add_out);
      3: return int'(cmp_out);
      default: return int'(div_out);
    endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (dut.u_bist.u_ctrl.sample) begin
      s_cut = int'(cur_cut); s_in = port_in(s_cut); s_out = port_out(s_cut);
      s_pred = predict(s_cut, s_in);
      k_seen = 0; t_start = cyc; tested[s_cut] = 1;
      // the circuits themselves must behave as specified while fault-free
      if (!faulty) begin
        checks++;
        if (s_out != cut_model(s_cut, s_in)) failures++;
      end
    end
    if (chk_valid) begin
      int e;
      e = (((s_pred >> k_seen) & 1) != ((s_out >> k_seen) & 1)) ? 1 : 0;
      checks++;
      if (int'(err) != e || int'(err_bit) != k_seen || int'(err_cut) != s_cut) begin
        failures++;
        if (failures < 20) $display("cut %0d bit %0d err %0d exp %0d", s_cut, k_seen, err, e);
      end
      if (e != 0 && faulty && s_cut == 0) c17_err_fault++;
      if (e != 0 && !faulty && exact[s_cut]) false_alarms++;
      k_seen++;
    end
    if (acc_saturated) n_sat++;
    if (cut_switched) n_switch++;
    if (test_done) begin
      n_tests++;
      checks++;
      if (cyc - t_start + 1 != test_cycles(s_cut)) begin
        failures++;
        $display("cut %0d took %0d cycles", s_cut, cyc - t_start + 1);
      end
    end
  end

  initial begin
    $readmemh("rtl/nn_coef.hex", img);
    for (int i = 0; i < 1024; i++) coef[i] = sext13(int'(img[i]));
    for (int c = 0; c < 5; c++) begin
      int bad;
      bad = 0;
      for (int v = 0; v < (1 << NIN[c]); v++)
        if (predict(c, v) != cut_model(c, v)) bad++;
      exact[c] = bad == 0;
    end
    // the shipped image models all five circuits exactly
    for (int c = 0; c < 5; c++) begin
      checks++;
      if (!exact[c]) begin failures++; $display("network of circuit %0d not exact", c); end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    enable = 1;
    wait (n_tests == 10);           // two rounds, one test per circuit
    @(negedge clk) tpc = 3;         // dwell changed while running
    wait (n_tests == 25);
    force dut.u_c17.n16 = 1'b1;     // stuck-at-1 on C17 net N16
    faulty = 1;
    @(negedge clk) tpc = 12;
    wait (n_tests == 40);
    release dut.u_c17.n16;
    wait (test_done);
    @(negedge clk) enable = 0;
    repeat (5) @(negedge clk);
    checks++; if (false_alarms != 0) begin failures++; $display("alarms from exact networks while fault-free"); end
    checks++; if (c17_err_fault == 0) begin failures++; $display("C17 fault not detected"); end
    checks++; if (!fault_flags[0])    begin failures++; $display("C17 fault flag not set"); end
    checks++; if (n_switch < 8)       begin failures++; $display("too few switches"); end
    checks++; if (n_sat == 0)         begin failures++; $display("no saturation"); end
    checks++; if (tested != 5'h1f)    begin failures++; $display("not all circuits tested"); end
    $display("tests %0d switches %0d saturations %0d c17 fault detections %0d cycles %0d",
             n_tests, n_switch, n_sat, c17_err_fault, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
