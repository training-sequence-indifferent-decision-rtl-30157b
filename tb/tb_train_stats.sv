// tb_train_stats: self-checking test of the ones and equal-pair counters.
//
// Random decisions with a random history and random valid gaps; a reference
// in the testbench counts ones and, per lag, decisions equal to the one k
// symbols earlier over each window of 2**WL valid samples. At each window end
// the registered counts must match and done must pulse; between window ends
// done must stay low. Windows with all-ones and all-equal data check the full
// count N, which needs the extra counter bit.
// Counting ones and equal pairs follows the design description; the lags
// 2..5 and the window length are this design's choices.
module tb_train_stats;
  import dfe_pkg::*;

  localparam int unsigned WL = 5;

  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0, win_end = 1'b0, d = 1'b0;
  logic [NTAPS-1:0] d_hist = '0;
  logic [WL:0] n_ones;
  logic [WL:0] n_same [NTAPS];
  logic done;

  train_stats #(.WIN_LOG2(WL)) dut (.*);

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

  int r_ones, r_same [NTAPS];
  int cnt = 0, windows = 0;

  task automatic sample(input bit dv, input logic [NTAPS-1:0] hv, input bit v);
    bit we;
    @(negedge clk);
    valid = v; d = dv; d_hist = hv;
    we = v && (cnt == (1 << WL) - 1);
    win_end = we;
    if (v) begin
      r_ones += dv;
      for (int k = 0; k < NTAPS; k++) r_same[k] += (dv == hv[k]);
      cnt = (cnt + 1) % (1 << WL);
    end
    @(posedge clk);
    #1;
    check(done == we, "done only at window end");
    if (we) begin
      check(int'(n_ones) == r_ones, $sformatf("ones %0d expected %0d", n_ones, r_ones));
      for (int k = 0; k < NTAPS; k++)
        check(int'(n_same[k]) == r_same[k],
              $sformatf("lag %0d equal pairs %0d expected %0d", k+1, n_same[k], r_same[k]));
      r_ones = 0;
      for (int k = 0; k < NTAPS; k++) r_same[k] = 0;
      windows++;
    end
  endtask

  initial begin
    r_ones = 0;
    for (int k = 0; k < NTAPS; k++) r_same[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (500) sample($urandom % 2, NTAPS'($urandom), ($urandom % 4) != 0);
    while (cnt != 0) sample($urandom % 2, NTAPS'($urandom), 1'b1);
    repeat (1 << WL) sample(1'b1, '1, 1'b1);          // all ones, all equal
    repeat (1 << WL) sample(1'b0, '1, 1'b1);          // no ones, none equal
    check(windows >= 12, "enough windows closed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
