// tb_dfe_core: self-checking test of the equalizer receiver.
//
// A behavioural ISI channel in the testbench (pulse response 6, 2.5, 1.5,
// 0.875, 0.5, 0.25 codes around mid-scale 16, rounded to 5-bit codes) carries
// a transition-heavy bit sequence (a change with probability 3/4, so the lag-1
// agreement is about -0.5). Checks:
//   * the output decision follows each sample by exactly one clock;
//   * with compensation on, after a few training windows every tap
//     coefficient is within 0.4 code of the true post-cursor (the 5-bit rounding of the
//     samples shifts the least-squares taps by up to about 0.3 code) and a whole
//     window is received without a bit error;
//   * with compensation off (plain blind DFE) the first tap trains to a
//     visibly wrong value (more than 1 code off), the failure the
//     compensation exists to prevent;
//   * with train_en low the coefficients do not change;
//   * dout_raw, and with bypass high also dout, is the unequalized slicer
//     decision.
// The five taps and the training-sequence problem follow the design
// description; the test channel, the sequence proportions and the tolerances
// are this design's choices.
module tb_dfe_core;
  import dfe_pkg::*;

  localparam int unsigned WL = 10;
  localparam int unsigned N  = 1 << WL;
  localparam real H [6] = '{6.0, 2.5, 1.5, 0.875, 0.5, 0.25};

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid = 1'b0, train_en = 1'b1, comp_en = 1'b1, bypass = 1'b0;
  logic [SAMPLE_W-1:0] sample = '0;
  logic dout, dout_valid, dout_raw, coef_load;
  logic [SAMPLE_W-1:0] eq_code, raw_code;
  xval_t coef [NTAPS];
  xval_t dc, main;
  logic [SAMPLE_W+FRAC-1:0] center;

  dfe_core #(.WIN_LOG2(WL)) dut (.*);

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
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmitted bits, newest in [0]
  bit tx [6];
  bit pend_bit;       // bit whose decision is due next
  bit pend;
  bit exp_raw;
  int errors = 0;
  int latency_bad = 0;
  int loads = 0;
  bit pend_raw_chk = 0;
  int raw_bad = 0;

  always @(posedge clk) if (rst_n && coef_load) loads++;

  function automatic logic [SAMPLE_W-1:0] chan();
    real y;
    int  c;
    y = 16.0;
    for (int j = 0; j < 6; j++) y += tx[j] ? H[j] : -H[j];
    c = $rtoi(y + 0.5);
    if (c < 0) c = 0;
    if (c > 31) c = 31;
    return SAMPLE_W'(c);
  endfunction

  // send one symbol; the previous symbol's decision is checked here
  task automatic send(input int p_flip_pct);
    bit b;
    b = (($urandom % 100) < p_flip_pct) ? ~tx[0] : tx[0];
    for (int j = 5; j > 0; j--) tx[j] = tx[j-1];
    tx[0] = b;
    @(negedge clk);
    sample = chan();
    valid  = 1'b1;
    exp_raw = ({1'b0, sample, {FRAC{1'b0}}} >= {1'b0, center});
    @(negedge clk);
    valid = 1'b0;
    if (!dout_valid) latency_bad++;
    if (dout_raw != exp_raw) raw_bad++;
    if (bypass) begin
      if (dout != exp_raw) raw_bad++;
    end else if (dout != b) errors++;
    // one idle clock between samples
    @(negedge clk);
    if (dout_valid) latency_bad++;
  endtask

  function automatic real to_code(input xval_t v);
    return real'(v) / real'(1 << FRAC);
  endfunction

  real err;
  xval_t frozen [NTAPS];

  initial begin
    for (int j = 0; j < 6; j++) tx[j] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- compensated training on transition-heavy data ----
    repeat (6 * N) send(75);
    check(loads >= 5, "coefficient loads during compensated training");
    for (int k = 0; k < NTAPS; k++) begin
      err = to_code(coef[k]) - H[k+1];
      $display("comp tap %0d: coef %f true %f", k+1, to_code(coef[k]), H[k+1]);
      check(err < 0.4 && err > -0.4, $sformatf("compensated tap %0d accuracy", k+1));
    end
    $display("comp: main %f dc %f center %f", to_code(main), to_code(dc),
             real'(center) / 64.0);
    check(to_code(main) > 5.5 && to_code(main) < 6.5, "main cursor estimate");
    errors = 0;
    repeat (N) send(75);
    check(errors == 0, $sformatf("error-free window with compensation (%0d errors)", errors));

    // ---- frozen coefficients ----
    train_en = 1'b0;
    for (int k = 0; k < NTAPS; k++) frozen[k] = coef[k];
    repeat (2 * N) send(75);
    for (int k = 0; k < NTAPS; k++)
      check(coef[k] == frozen[k], $sformatf("tap %0d held with train_en low", k+1));

    // ---- bypass: unequalized slicer ----
    check(raw_bad == 0, $sformatf("dout_raw is the slicer decision (%0d wrong)", raw_bad));
    bypass = 1'b1;
    raw_bad = 0;
    repeat (200) send(75);
    check(raw_bad == 0, $sformatf("bypass gives slicer decision (%0d wrong)", raw_bad));
    bypass = 1'b0;

    // ---- plain blind DFE (no compensation) ----
    train_en = 1'b1;
    comp_en  = 1'b0;
    repeat (3 * N) send(75);
    err = to_code(coef[0]) - H[1];
    $display("blind tap 1: coef %f true %f", to_code(coef[0]), H[1]);
    check(err > 1.0 || err < -1.0, "blind DFE mistrains tap 1 on transition-heavy data");

    check(latency_bad == 0, $sformatf("one-clock output latency (%0d bad)", latency_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
