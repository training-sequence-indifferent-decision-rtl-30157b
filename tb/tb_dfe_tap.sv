// tb_dfe_tap: self-checking test of one equalizer tap, chained three deep.
//
// Three taps are chained as in the receiver. Random decisions, centred
// samples, valid gaps and coefficient loads are applied; a reference model in
// the testbench keeps the delay line, the coefficients and the window
// correlation sums. Checks every clock: each tap holds the decision 1, 2, 3
// symbols back, prod is +coef for a held 1 and -coef for a held 0, the
// coefficient changes only on load, and at each window end corr_sum equals
// the reference sum of +-x and corr_done pulses once.
// The one-symbol delay between taps and the coefficient multiply follow the
// design description; the correlation window is this design's choice.
module tb_dfe_tap;
  import dfe_pkg::*;

  localparam int unsigned WL = 4;
  localparam int unsigned NT = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid = 1'b0, win_end = 1'b0, d_new = 1'b0;
  xval_t x = '0;
  logic  [NT-1:0] load = '0;
  xval_t coef_in [NT];
  logic  [NT-1:0] d_out;
  xval_t coef [NT];
  xval_t prod [NT];
  logic signed [XW+WL-1:0] corr_sum [NT];
  logic [NT-1:0] corr_done;

  for (genvar k = 0; k < NT; k++) begin : g_t
    dfe_tap #(.WIN_LOG2(WL)) dut (
      .clk, .rst_n, .valid, .win_end,
      .d_in(k == 0 ? d_new : d_out[(k == 0) ? 0 : k-1]),
      .x, .load(load[k]), .coef_in(coef_in[k]),
      .d_out(d_out[k]), .coef(coef[k]), .prod(prod[k]),
      .corr_sum(corr_sum[k]), .corr_done(corr_done[k])
    );
  end

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

  bit  hist [NT];
  int  rcoef [NT];
  int  acc [NT];
  int  total [NT];
  int  cnt = 0;
  int  windows = 0;

  initial begin
    for (int k = 0; k < NT; k++) begin
      hist[k] = 0; rcoef[k] = 0; acc[k] = 0; total[k] = 0; coef_in[k] = '0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (600) begin
      bit we;
      @(negedge clk);
      valid = ($urandom % 3) != 0;
      d_new = $urandom % 2;
      x     = xval_t'(int'($urandom % 4001) - 2000);
      we    = valid && (cnt == (1 << WL) - 1);
      win_end = we;
      for (int k = 0; k < NT; k++) begin
        load[k]    = ($urandom % 8) == 0;
        coef_in[k] = xval_t'(int'($urandom % 2001) - 1000);
      end
      // products use the held decision and coefficient before this edge
      for (int k = 0; k < NT; k++)
        check(prod[k] == (hist[k] ? xval_t'(rcoef[k]) : xval_t'(-rcoef[k])),
              $sformatf("tap %0d product", k+1));
      // reference update
      if (valid) begin
        for (int k = 0; k < NT; k++) acc[k] += hist[k] ? int'(x) : -int'(x);
        if (we) begin
          for (int k = 0; k < NT; k++) begin
            total[k] = acc[k];
            acc[k] = 0;
          end
        end
        for (int k = NT - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = d_new;
        cnt = (cnt + 1) % (1 << WL);
      end
      for (int k = 0; k < NT; k++) if (load[k]) rcoef[k] = int'(coef_in[k]);
      @(posedge clk);
      #1;
      for (int k = 0; k < NT; k++) begin
        check(d_out[k] == hist[k], $sformatf("tap %0d delayed decision", k+1));
        check(int'(coef[k]) == rcoef[k], $sformatf("tap %0d coefficient", k+1));
        check(corr_done[k] == we, $sformatf("tap %0d window done", k+1));
        if (we)
          check(int'(corr_sum[k]) == total[k],
                $sformatf("tap %0d window sum %0d expected %0d", k+1, corr_sum[k], total[k]));
      end
      if (we) windows++;
    end
    check(windows >= 10, "enough windows closed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
