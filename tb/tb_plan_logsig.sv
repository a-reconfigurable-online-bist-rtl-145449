// tb_plan_logsig: exhaustive check of the PLAN activation over every s6.7
// input against the real-arithmetic reference, plus a bound on its distance
// from the exact logsig.
module tb_plan_logsig;
  import tb_nn_ref_pkg::*;
  logic signed [12:0] s;
  logic [7:0] f;
  int checks = 0, failures = 0;
  real maxerr = 0.0, e;

  plan_logsig #(.IN_I(6), .IN_F(7), .OUT_F(7)) dut (.s, .f);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -4096; v < 4096; v++) begin
      s = 13'(v);
      #1;
      checks++;
      if (int'(f) != plan_ref(v)) begin
        failures++;
        if (failures < 10) $display("mismatch s=%0d f=%0d ref=%0d", v, f, plan_ref(v));
      end
      e = real'(f) / 128.0 - 1.0 / (1.0 + $exp(-real'(v) / 128.0));
      if (e < 0) e = -e;
      if (e > maxerr) maxerr = e;
    end
    // spot values worked out by hand: F(0)=0.5, F(1)=0.75, F(-1)=0.25, F(8)=1
    s = 0;          #1; checks++; if (f != 8'd64)  failures++;
    s = 13'(128);   #1; checks++; if (f != 8'd96)  failures++;
    s = -13'sd128;  #1; checks++; if (f != 8'd32)  failures++;
    s = 13'(1024);  #1; checks++; if (f != 8'd128) failures++;
    checks++;
    if (maxerr > 0.03) begin
      failures++;
      $display("max deviation from logsig %f", maxerr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
