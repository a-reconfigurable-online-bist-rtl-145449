// cut_scheduler: round-robin choice of the circuit under test and the
// multiplexers that route its inputs and outputs to the tester.
//
// All monitored circuits run all the time; the tester looks at one of them.
// 'sel' names it and 'sel_in' / 'sel_out' carry its input and output vectors
// (zero-extended to the widest circuit).  Each 'test_done' pulse counts one
// completed test; after 'tests_per_cut' tests of the same circuit the
// scheduler moves on to the next one, wrapping after the last, and pulses
// 'switched'.  tests_per_cut is a run-time input so the dwell time can be
// changed while the tester runs; 0 is treated as 1.  It is read at every
// test_done, so a new value takes effect from the current dwell.
module cut_scheduler #(
  parameter int unsigned N_CUTS = 5,
  parameter int unsigned IN_W   = 11,
  parameter int unsigned OUT_W  = 8,
  parameter int unsigned CNT_W  = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [N_CUTS-1:0][IN_W-1:0] cut_in,
  input  logic [N_CUTS-1:0][OUT_W-1:0] cut_out,
  input  logic [CNT_W-1:0]            tests_per_cut,
  input  logic                        test_done,
  output logic [$clog2(N_CUTS)-1:0]   sel,
  output logic [IN_W-1:0]             sel_in,
  output logic [OUT_W-1:0]            sel_out,
  output logic                        switched
);
  logic [CNT_W-1:0] cnt;
  logic             last;

  assign last    = (cnt + 1'b1 >= tests_per_cut) || (tests_per_cut == '0);
  assign sel_in  = cut_in[sel];
  assign sel_out = cut_out[sel];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel      <= '0;
      cnt      <= '0;
      switched <= 1'b0;
    end else begin
      switched <= 1'b0;
      if (test_done) begin
        if (last) begin
          cnt      <= '0;
          switched <= 1'b1;
          sel      <= (int'(sel) == int'(N_CUTS) - 1) ? '0 : sel + 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) int'(sel) < int'(N_CUTS));
endmodule
