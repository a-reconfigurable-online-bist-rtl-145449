// tb_cfg_rom: each circuit's start pointer and neuron counts.  The pointers
// are the running sums of hid*(in+1) + out*(hid+1): 26, 80, 125, 48 words.
module tb_cfg_rom;
  import nn_bist_pkg::*;
  logic [CUT_W-1:0] sel;
  nn_cfg_t cfg;
  int checks = 0, failures = 0;
  int eptr [5] = '{0, 26, 106, 231, 279};
  int ein  [5] = '{5, 9, 9, 11, 8};
  int ehid [5] = '{3, 5, 8, 3, 43};
  int eout [5] = '{2, 5, 5, 3, 8};

  cfg_rom dut (.sel, .cfg);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 5; c++) begin
      sel = CUT_W'(c); #1;
      checks++;
      if (int'(cfg.ptr) != eptr[c] || int'(cfg.n_in) != ein[c] ||
          int'(cfg.n_hid) != ehid[c] || int'(cfg.n_out) != eout[c]) begin
        failures++;
        $display("cut %0d: ptr %0d in %0d hid %0d out %0d", c, cfg.ptr, cfg.n_in, cfg.n_hid, cfg.n_out);
      end
    end
    // the last network ends at word 1018, inside the 1024-word ROM
    checks++;
    if (279 + 43 * 9 + 8 * 44 != 1018 || 1018 > ROM_DEPTH) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
