// tb_center_tracker: self-checking test of the 50%-point register.
//
// Compares the register with a cycle-by-cycle reference of the sign-step rule
// for random samples, checks that it holds while adapt or valid is low and
// clamps at the ends of the range, and checks convergence: fed a two-level
// signal (levels 10 and 22 with +-1 code of noise) the register must end
// between the two levels, with half of the samples above it.
// That the register settles at the 50% point follows the design
// description; the sign-step rule and the test levels are this design's choices.
module tb_center_tracker;
  import dfe_pkg::*;

  localparam int unsigned STEP = 2;
  localparam int unsigned CW   = SAMPLE_W + FRAC;

  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0, adapt = 1'b1;
  logic [SAMPLE_W-1:0] sample = '0;
  logic [CW-1:0] center;

  center_tracker #(.STEP(STEP)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_c;
  int above;

  task automatic step(input int s, input bit v, input bit a);
    @(negedge clk);
    sample = SAMPLE_W'(s);
    valid  = v;
    adapt  = a;
    if (v && a) begin
      if (s * 64 > ref_c)      ref_c = (ref_c + STEP > 2047) ? 2047 : ref_c + STEP;
      else if (s * 64 < ref_c) ref_c = (ref_c < STEP) ? 0 : ref_c - STEP;
    end
    @(posedge clk);
    #1;
    check(int'(center) == ref_c, $sformatf("centre %0d expected %0d", center, ref_c));
  endtask

  initial begin
    ref_c = 1024;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    #1 check(center == CW'(1024), "reset to mid-scale");
    // random samples, random valid/adapt
    repeat (400) step($urandom % 32, ($urandom % 4) != 0, ($urandom % 5) != 0);
    // clamp at the top and bottom
    repeat (1100) step(31, 1'b1, 1'b1);
    check(center == CW'(1984), "settles on a constant top sample");
    repeat (1100) step(0, 1'b1, 1'b1);
    check(center == '0, "clamps at zero");
    // two-level signal: must settle between the levels, half above
    repeat (3000) step((($urandom % 2) ? 22 : 10) + int'($urandom % 3) - 1, 1'b1, 1'b1);
    above = 0;
    for (int i = 0; i < 400; i++) begin
      int s;
      s = (($urandom % 2) ? 22 : 10) + int'($urandom % 3) - 1;
      if (s * 64 > ref_c) above++;
      step(s, 1'b1, 1'b1);
    end
    check(center > CW'(9 * 64) && center < CW'(23 * 64), "centre between the two levels");
    check(above > 150 && above < 250, $sformatf("about half above (%0d of 400)", above));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
