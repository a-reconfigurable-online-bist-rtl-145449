// tb_mfdl: fault-detection latency of the tester with the shipped coefficient
// image, all parameters at their defaults.
//
// The image's networks are first compared exhaustively with the circuits
// through the reference model; each must be exact.  Input patterns change randomly every cycle.  Single
// stuck-at faults are injected one at a time (C17: each of its nine internal
// and input nets and both outputs; other circuits: each output bit), at a
// random moment, and the cycles until the tester flags that circuit are
// measured.  Mean fault-detection latency is reported twice: with the tester
// dwelling on C17 only (its stand-alone case), and with round-robin over all
// five circuits, one test each.  Fails if a fault stays undetected, if an exact
// network ever raises an alarm on a fault-free circuit, or if a check of the
// tester disagrees with the reference model.
module tb_mfdl;
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
  logic [12:0] img [1024];

  int checks = 0, failures = 0, cyc = 0;
  int s_cut, s_in, s_out, s_pred, k_seen;
  int n_faults [5] = '{22, 10, 10, 6, 16};
  bit exact [5];
  bit faulty = 0;
  int false_alarms = 0;

  bist_top dut (.*, .tests_per_cut(tpc));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #3000000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    c17_in = 5'($urandom); lcg_in = 9'($urandom); add_in = 9'($urandom);
    cmp_in = 11'($urandom); div_in = 8'($urandom);
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

  // every check must agree with the reference network on the sampled vectors
  always @(posedge clk) if (rst_n) begin
    if (dut.u_bist.u_ctrl.sample) begin
      s_cut = int'(cur_cut); s_in = port_in(s_cut); s_out = port_out(s_cut);
      s_pred = predict(s_cut, s_in); k_seen = 0;
    end
    if (chk_valid) begin
      int e;
      e = (((s_pred >> k_seen) & 1) != ((s_out >> k_seen) & 1)) ? 1 : 0;
      checks++;
      if (int'(err) != e) failures++;
      if (err && !faulty && exact[err_cut]) false_alarms++;
      k_seen++;
    end
  end

  // stuck-at fault f of circuit c: C17 has its nine internal nets and two outputs,
  // the other circuits their output bits.  Fault f: net/bit f/2 stuck at f%2.
  task automatic inject(int c, int f, bit on);
    case (c)
      0: case (f)
        0: if (on) force dut.u_c17.n1 = 1'b0; else release dut.u_c17.n1;
        1: if (on) force dut.u_c17.n1 = 1'b1; else release dut.u_c17.n1;
        2: if (on) force dut.u_c17.n2 = 1'b0; else release dut.u_c17.n2;
        3: if (on) force dut.u_c17.n2 = 1'b1; else release dut.u_c17.n2;
        4: if (on) force dut.u_c17.n3 = 1'b0; else release dut.u_c17.n3;
        5: if (on) force dut.u_c17.n3 = 1'b1; else release dut.u_c17.n3;
        6: if (on) force dut.u_c17.n6 = 1'b0; else release dut.u_c17.n6;
        7: if (on) force dut.u_c17.n6 = 1'b1; else release dut.u_c17.n6;
        8: if (on) force dut.u_c17.n7 = 1'b0; else release dut.u_c17.n7;
        9: if (on) force dut.u_c17.n7 = 1'b1; else release dut.u_c17.n7;
        10: if (on) force dut.u_c17.n10 = 1'b0; else release dut.u_c17.n10;
        11: if (on) force dut.u_c17.n10 = 1'b1; else release dut.u_c17.n10;
        12: if (on) force dut.u_c17.n11 = 1'b0; else release dut.u_c17.n11;
        13: if (on) force dut.u_c17.n11 = 1'b1; else release dut.u_c17.n11;
        14: if (on) force dut.u_c17.n16 = 1'b0; else release dut.u_c17.n16;
        15: if (on) force dut.u_c17.n16 = 1'b1; else release dut.u_c17.n16;
        16: if (on) force dut.u_c17.n19 = 1'b0; else release dut.u_c17.n19;
        17: if (on) force dut.u_c17.n19 = 1'b1; else release dut.u_c17.n19;
        18: if (on) force dut.c17_out[0] = 1'b0; else release dut.c17_out[0];
        19: if (on) force dut.c17_out[0] = 1'b1; else release dut.c17_out[0];
        20: if (on) force dut.c17_out[1] = 1'b0; else release dut.c17_out[1];
        21: if (on) force dut.c17_out[1] = 1'b1; else release dut.c17_out[1];
        default: ;
      endcase
      1: case (f)
        0: if (on) force dut.lcg_out[0] = 1'b0; else release dut.lcg_out[0];
        1: if (on) force dut.lcg_out[0] = 1'b1; else release dut.lcg_out[0];
        2: if (on) force dut.lcg_out[1] = 1'b0; else release dut.lcg_out[1];
        3: if (on) force dut.lcg_out[1] = 1'b1; else release dut.lcg_out[1];
        4: if (on) force dut.lcg_out[2] = 1'b0; else release dut.lcg_out[2];
        5: if (on) force dut.lcg_out[2] = 1'b1; else release dut.lcg_out[2];
        6: if (on) force dut.lcg_out[3] = 1'b0; else release dut.lcg_out[3];
        7: if (on) force dut.lcg_out[3] = 1'b1; else release dut.lcg_out[3];
        8: if (on) force dut.lcg_out[4] = 1'b0; else release dut.lcg_out[4];
        9: if (on) force dut.lcg_out[4] = 1'b1; else release dut.lcg_out[4];
        default: ;
      endcase
      2: case (f)
        0: if (on) force dut.add_out[0] = 1'b0; else release dut.add_out[0];
        1: if (on) force dut.add_out[0] = 1'b1; else release dut.add_out[0];
        2: if (on) force dut.add_out[1] = 1'b0; else release dut.add_out[1];
        3: if (on) force dut.add_out[1] = 1'b1; else release dut.add_out[1];
        4: if (on) force dut.add_out[2] = 1'b0; else release dut.add_out[2];
        5: if (on) force dut.add_out[2] = 1'b1; else release dut.add_out[2];
        6: if (on) force dut.add_out[3] = 1'b0; else release dut.add_out[3];
        7: if (on) force dut.add_out[3] = 1'b1; else release dut.add_out[3];
        8: if (on) force dut.add_out[4] = 1'b0; else release dut.add_out[4];
        9: if (on) force dut.add_out[4] = 1'b1; else release dut.add_out[4];
        default: ;
      endcase
      3: case (f)
        0: if (on) force dut.cmp_out[0] = 1'b0; else release dut.cmp_out[0];
        1: if (on) force dut.cmp_out[0] = 1'b1; else release dut.cmp_out[0];
        2: if (on) force dut.cmp_out[1] = 1'b0; else release dut.cmp_out[1];
        3: if (on) force dut.cmp_out[1] = 1'b1; else release dut.cmp_out[1];
        4: if (on) force dut.cmp_out[2] = 1'b0; else release dut.cmp_out[2];
        5: if (on) force dut.cmp_out[2] = 1'b1; else release dut.cmp_out[2];
        default: ;
      endcase
      4: case (f)
        0: if (on) force dut.div_out[0] = 1'b0; else release dut.div_out[0];
        1: if (on) force dut.div_out[0] = 1'b1; else release dut.div_out[0];
        2: if (on) force dut.div_out[1] = 1'b0; else release dut.div_out[1];
        3: if (on) force dut.div_out[1] = 1'b1; else release dut.div_out[1];
        4: if (on) force dut.div_out[2] = 1'b0; else release dut.div_out[2];
        5: if (on) force dut.div_out[2] = 1'b1; else release dut.div_out[2];
        6: if (on) force dut.div_out[3] = 1'b0; else release dut.div_out[3];
        7: if (on) force dut.div_out[3] = 1'b1; else release dut.div_out[3];
        8: if (on) force dut.div_out[4] = 1'b0; else release dut.div_out[4];
        9: if (on) force dut.div_out[4] = 1'b1; else release dut.div_out[4];
        10: if (on) force dut.div_out[5] = 1'b0; else release dut.div_out[5];
        11: if (on) force dut.div_out[5] = 1'b1; else release dut.div_out[5];
        12: if (on) force dut.div_out[6] = 1'b0; else release dut.div_out[6];
        13: if (on) force dut.div_out[6] = 1'b1; else release dut.div_out[6];
        14: if (on) force dut.div_out[7] = 1'b0; else release dut.div_out[7];
        15: if (on) force dut.div_out[7] = 1'b1; else release dut.div_out[7];
        default: ;
      endcase
      default: ;
    endcase
  endtask

  // one fault run: returns the detection latency in cycles, -1 if undetected
  task automatic one_run(int c, int f, int dwell, int limit, output int lat);
    int t0;
    rst_n = 0; enable = 0; tpc = 16'(dwell);
    repeat (2) @(negedge clk);
    rst_n = 1; enable = 1;
    repeat (int'($urandom_range(3000))) @(negedge clk);
    inject(c, f, 1); faulty = 1;
    t0 = cyc; lat = -1;
    while (cyc - t0 < limit && lat < 0) begin
      @(posedge clk);
      if (err && int'(err_cut) == c) lat = cyc - t0;
    end
    @(negedge clk);
    inject(c, f, 0); faulty = 0;
  endtask

  initial begin
    real sum, tot;
    int lat, n, ntot;
    $readmemh("rtl/nn_coef.hex", img);
    for (int i = 0; i < 1024; i++) coef[i] = sext13(int'(img[i]));
    // which networks reproduce their circuit exactly
    for (int c = 0; c < 5; c++) begin
      int bad;
      bad = 0;
      for (int v = 0; v < (1 << NIN[c]); v++)
        if (predict(c, v) != cut_model(c, v)) bad++;
      exact[c] = bad == 0;
      $display("circuit %0d: network wrong on %0d of %0d input vectors", c, bad, 1 << NIN[c]);
    end
    // the shipped image models all five circuits exactly
    for (int c = 0; c < 5; c++) begin
      checks++;
      if (!exact[c]) begin failures++; $display("network of circuit %0d not exact", c); end
    end
    // fault-free run in round-robin: no alarms from exact networks
    one_run(0, -1, 1, 40000, lat);
    // stand-alone C17: the tester stays on C17
    sum = 0; n = 0;
    for (int f = 0; f < n_faults[0]; f++) begin
      one_run(0, f, 65535, 100000, lat);
      checks++;
      if (lat < 0) begin failures++; $display("C17 fault %0d undetected", f); end
      else begin sum += lat; n++; end
    end
    $display("C17 dedicated tester: mean detection latency %0.1f cycles over %0d faults", sum / n, n);
    // round-robin over all circuits, one test each
    tot = 0; ntot = 0;
    for (int c = 0; c < 5; c++) if (exact[c]) begin
      sum = 0; n = 0;
      for (int f = 0; f < n_faults[c]; f++) begin
        one_run(c, f, 1, 3000000, lat);
        checks++;
        if (lat < 0) begin failures++; $display("circuit %0d fault %0d undetected", c, f); end
        else begin sum += lat; n++; tot += lat; ntot++; end
      end
      $display("circuit %0d round-robin: mean detection latency %0.1f cycles over %0d faults", c, sum / n, n);
    end
    $display("all circuits round-robin: mean detection latency %0.1f cycles over %0d faults", tot / ntot, ntot);
    checks++;
    if (false_alarms != 0) begin failures++; $display("%0d false alarms", false_alarms); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
