// tb_nn_bist: the complete tester on five simulated circuits.
//
// The coefficient ROM is filled with a hand-built exact network for C17
// (three threshold neurons: N1&N3, N2&!(N3&N6), N7&!(N3&N6), ORed pairwise
// into N22 and N23) and with random words for the other circuits.  The
// circuit vectors change at random moments; for C17 and 74283 the outputs are
// the true function, sometimes with one bit flipped (an injected fault), for
// the others they are random.  Every output check is compared with the
// bit-true reference model of the network, the test length with
// 2 + n_hid*(2 + n_in*10) + n_out*(2 + n_hid*10) cycles, the order of the
// circuits with round-robin switching every tests_per_cut tests, and the
// sticky fault flags with the errors seen.
module tb_nn_bist;
  import tb_nn_ref_pkg::*;
  import nn_bist_pkg::N_CUTS;

  logic clk = 0, rst_n = 0, enable = 0;
  logic [15:0] tpc = 2;
  logic [4:0][10:0] cut_in;
  logic [4:0][7:0]  cut_out;
  logic err, chk_valid, test_done, cut_switched, acc_saturated;
  logic [2:0] err_cut, cur_cut;
  logic [2:0] err_bit;
  logic [4:0] fault_flags;

  int checks = 0, failures = 0;
  int n_err = 0, n_switch = 0, n_sat = 0, n_tests = 0, n_c17_clean = 0;
  int s_cut, s_in, s_out, s_pred, k_seen, t_start, exp_cut, cnt_in_dwell, cyc = 0;
  bit [4:0] flags_model = '0;
  bit in_test = 0;

  nn_bist dut (.clk, .rst_n, .enable, .tests_per_cut(tpc), .cut_in, .cut_out,
               .err, .err_cut, .err_bit, .fault_flags, .chk_valid, .test_done,
               .cut_switched, .cur_cut, .acc_saturated);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #20000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int q(real v);   // real -> s6.7 word
    return int'(v * 128.0);
  endfunction

  task automatic load_coefs();
    int c17 [26] = '{
      q(-15), q(10), q(0), q(10), q(0), q(0),       // h0 = N1 & N3
      q(-5),  q(0), q(20), q(-10), q(-10), q(0),    // h1 = N2 & !(N3 & N6)
      q(-5),  q(0), q(0), q(-10), q(-10), q(20),    // h2 = N7 & !(N3 & N6)
      q(-5),  q(10), q(10), q(0),                   // N22 = h0 | h1
      q(-5),  q(0), q(10), q(10)};                  // N23 = h1 | h2
    for (int i = 0; i < 1024; i++) begin
      int v;
      if (i < 26)             v = c17[i];
      else if (i % 4 == 0)    v = int'($urandom_range(8191)) - 4096;
      else                    v = int'($urandom_range(1023)) - 512;
      coef[i] = v;
      dut.u_rom.mem[i] = 13'(v);
    end
  endtask

  task automatic new_vectors(int c);
    int in, out;
    in = int'($urandom_range((1 << NIN[c]) - 1));
    if (c == 0 || c == 2) begin
      out = cut_model(c, in);
      if ($urandom_range(3) == 0) out ^= 1 << $urandom_range(NOUT[c] - 1);
    end else begin
      out = int'($urandom_range((1 << NOUT[c]) - 1));
    end
    cut_in[c]  = 11'(in);
    cut_out[c] = 8'(out);
  endtask

  // stimulus: circuits change their vectors at random moments
  always @(negedge clk)
    for (int c = 0; c < 5; c++)
      if ($urandom_range(7) == 0) new_vectors(c);

  // scoreboard
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.sample) begin
      s_cut = int'(dut.sel); s_in = int'(cut_in[s_cut]) & ((1 << NIN[s_cut]) - 1);
      s_out = int'(cut_out[s_cut]);
      s_pred = predict(s_cut, s_in);
      k_seen = 0; t_start = cyc; in_test = 1;
      checks++;
      if (s_cut != exp_cut) begin failures++; $display("cut %0d expected %0d", s_cut, exp_cut); end
      if (s_cut == 0 && cut_model(0, s_in) == s_pred) n_c17_clean++;
      if (s_cut == 0 && cut_model(0, s_in) != s_pred) begin
        failures++; $display("C17 network disagrees with C17 for %h", s_in);
      end
    end
    if (chk_valid) begin
      int e;
      e = (((s_pred >> k_seen) & 1) != ((s_out >> k_seen) & 1)) ? 1 : 0;
      checks++;
      if (int'(err) != e || int'(err_bit) != k_seen || int'(err_cut) != s_cut) begin
        failures++;
        if (failures < 20) $display("cut %0d in %h bit %0d: err %0d exp %0d (pred %h out %h)",
                                    s_cut, s_in, k_seen, err, e, s_pred, s_out);
      end
      if (e != 0) begin n_err++; flags_model[s_cut] = 1; end
      k_seen++;
    end
    if (acc_saturated) n_sat++;
    if (cut_switched) n_switch++;
    if (test_done) begin
      n_tests++;
      checks++;
      if (cyc - t_start + 1 != test_cycles(s_cut) || k_seen != NOUT[s_cut]) begin
        failures++;
        $display("cut %0d: %0d cycles (exp %0d), %0d checks", s_cut, cyc - t_start + 1,
                 test_cycles(s_cut), k_seen);
      end
      cnt_in_dwell++;
      if (cnt_in_dwell == int'(tpc)) begin cnt_in_dwell = 0; exp_cut = (exp_cut + 1) % 5; end
    end
  end

  initial begin
    exp_cut = 0; cnt_in_dwell = 0;
    for (int c = 0; c < 5; c++) new_vectors(c);
    #1;
    load_coefs();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    enable = 1;
    wait (n_tests == 30);
    @(negedge clk);
    enable = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (fault_flags != flags_model) begin
      failures++; $display("fault flags %b expected %b", fault_flags, flags_model);
    end
    // every mechanism must have happened
    checks++; if (n_err == 0)       begin failures++; $display("no error detected"); end
    checks++; if (n_switch < 10)    begin failures++; $display("too few switches"); end
    checks++; if (n_sat == 0)       begin failures++; $display("no saturation"); end
    checks++; if (n_c17_clean == 0) begin failures++; $display("no C17 test"); end
    $display("tests %0d errors %0d switches %0d saturations %0d", n_tests, n_err, n_switch, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
