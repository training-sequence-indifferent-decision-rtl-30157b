// tb_decision_block: self-checking test of the tap-adjustment solver.
//
// For several training windows the testbench draws a bit sequence (balanced
// PRBS-like, ones-biased, or transition-heavy), forms the centred samples
// x_n = delta + sum_j h_j s_(n-j) of a known pulse response with a known
// centre error delta, and computes the window sums the receiver would
// deliver. The reference answer is the exact least-squares solution of the
// same normal equations, solved in floating point by Gaussian elimination in
// the testbench. Checks: every tap, the main cursor and the centre
// correction match it within 0.1 code; with comp_en low the taps equal the
// plain window correlations; done rises on the (ITER*(NTAPS+2)+1)-th clock edge
// after the one that takes start.
// The statistics the solver uses (ones, equal pairs) follow the design
// description; the normal equations, the tolerances and the test sequences are
// this design's choices.
module tb_decision_block;
  import dfe_pkg::*;

  localparam int unsigned WL   = 10;
  localparam int unsigned N    = 1 << WL;
  localparam int unsigned ITER = 24;
  localparam int unsigned AW   = XW + WL;
  localparam int unsigned NU   = NTAPS + 2;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, comp_en = 1'b1;
  logic signed [AW-1:0] sum_x;
  logic signed [AW-1:0] corr [NTAPS+1];
  logic [WL:0]          n_ones;
  logic [WL:0]          n_same [NTAPS];
  xval_t coef [NTAPS];
  xval_t dc, main;
  logic  busy, done;

  decision_block #(.WIN_LOG2(WL), .ITER(ITER)) dut (.*);

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
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real h [NTAPS+1];
  real delta;
  int  s [N + NTAPS];          // +-1, index NTAPS.. is the window
  real A [NU][NU+1];
  real sol [NU];

  // least-squares reference on the regressors [1, s_n .. s_(n-NTAPS)]
  task automatic reference(input real xs [N]);
    real v [NU];
    real f;
    for (int i = 0; i < NU; i++)
      for (int j = 0; j <= NU; j++) A[i][j] = 0.0;
    for (int n = 0; n < N; n++) begin
      v[0] = 1.0;
      for (int j = 0; j <= NTAPS; j++) v[j+1] = real'(s[n + NTAPS - j]);
      for (int i = 0; i < NU; i++) begin
        for (int j = 0; j < NU; j++) A[i][j] += v[i] * v[j];
        A[i][NU] += v[i] * xs[n];
      end
    end
    for (int c = 0; c < NU; c++)
      for (int r = 0; r < NU; r++)
        if (r != c) begin
          f = A[r][c] / A[c][c];
          for (int j = 0; j <= NU; j++) A[r][j] -= f * A[c][j];
        end
    for (int i = 0; i < NU; i++) sol[i] = A[i][NU] / A[i][i];
  endtask

  function automatic real code(input xval_t v);
    return real'(v) / real'(1 << FRAC);
  endfunction

  task automatic run_case(input int kind, input bit comp);
    real xs [N];
    int  xi;
    int  ones;
    int  same [NTAPS];
    longint sx;
    longint cr [NTAPS+1];
    int  cycles;
    real e;
    // bits
    s[0] = 1;
    for (int n = 1; n < N + NTAPS; n++) begin
      case (kind)
        0: s[n] = ($urandom % 2) ? 1 : -1;
        1: s[n] = (($urandom % 1000) < 400) ? 1 : -1;
        default: s[n] = (($urandom % 100) < 70) ? -s[n-1] : s[n-1];
      endcase
    end
    sx = 0; ones = 0;
    for (int k = 0; k <= NTAPS; k++) cr[k] = 0;
    for (int k = 0; k < NTAPS; k++) same[k] = 0;
    for (int n = 0; n < N; n++) begin
      real y;
      y = delta;
      for (int j = 0; j <= NTAPS; j++) y += h[j] * real'(s[n + NTAPS - j]);
      xi = $rtoi(y * 64.0 + (y >= 0.0 ? 0.5 : -0.5));
      xs[n] = real'(xi) / 64.0;
      sx += xi;
      for (int k = 0; k <= NTAPS; k++) cr[k] += xi * s[n + NTAPS - k];
      if (s[n + NTAPS] > 0) ones++;
      for (int k = 1; k <= NTAPS; k++)
        if (s[n + NTAPS] == s[n + NTAPS - k]) same[k-1]++;
    end
    reference(xs);
    @(negedge clk);
    sum_x = AW'(sx);
    for (int k = 0; k <= NTAPS; k++) corr[k] = AW'(cr[k]);
    n_ones = (WL+1)'(ones);
    for (int k = 0; k < NTAPS; k++) n_same[k] = (WL+1)'(same[k]);
    comp_en = comp;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < 10000) begin
      @(negedge clk);
      cycles++;
    end
    if (comp) begin
      check(cycles == ITER * NU + 2, $sformatf("solve time %0d clocks", cycles));
      e = code(dc) - sol[0];
      check(e < 0.1 && e > -0.1, $sformatf("kind %0d centre correction %f vs %f", kind, code(dc), sol[0]));
      e = code(main) - sol[1];
      check(e < 0.1 && e > -0.1, $sformatf("kind %0d main %f vs %f", kind, code(main), sol[1]));
      for (int k = 1; k <= NTAPS; k++) begin
        e = code(coef[k-1]) - sol[k+1];
        check(e < 0.1 && e > -0.1,
              $sformatf("kind %0d tap %0d: %f vs %f", kind, k, code(coef[k-1]), sol[k+1]));
      end
    end else begin
      check(cycles <= 2, $sformatf("blind result time %0d clocks", cycles));
      check(dc == '0, "blind centre correction is zero");
      for (int k = 1; k <= NTAPS; k++)
        check(coef[k-1] == xval_t'(cr[k] >>> WL), $sformatf("blind tap %0d is the correlation", k));
    end
  endtask

  initial begin
    sum_x  = '0;
    n_ones = '0;
    for (int k = 0; k <= NTAPS; k++) corr[k] = '0;
    for (int k = 0; k < NTAPS; k++) n_same[k] = '0;
    h = '{6.0, 2.5, -1.5, 0.875, 0.5, -0.25};
    delta = 0.4;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int kind = 0; kind < 3; kind++) run_case(kind, 1'b1);
    run_case(2, 1'b0);
    h = '{5.0, -2.0, 1.0, 0.5, -0.5, 0.25};
    delta = -0.6;
    for (int kind = 0; kind < 3; kind++) run_case(kind, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
