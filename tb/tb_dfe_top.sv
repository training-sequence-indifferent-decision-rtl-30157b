// tb_dfe_top: end-to-end test of the whole equalizer at its default sizes
// (80 MHz clock, 8 clocks per symbol, training windows of 4096 symbols).
//
// Bits from the on-chip generator pass through the on-chip ISI channel (pulse
// response 6, 2.5, 1.5, 0.875, 0.5, 0.25 codes) with a little noise and are
// equalized; every received bit is compared with the transmitted one. The
// test walks through the design's mechanisms and counts each:
//   1. compensated training on transition-heavy bits: the taps must reach the
//      channel's post-cursors (within 0.4 code) and a window must then be
//      received without error;
//   2. the same bits with compensation off (plain blind DFE): tap 1 must
//      mistrain by more than a code, as the compensation is meant to prevent;
//   3. compensated training on ones-biased (49%) bits, then on PRBS bits:
//      error-free windows again;
//   4. frozen coefficients (train_en low) carrying external, image-like bits
//      with long runs: error-free, coefficients unchanged;
//   5. bypass: the unequalized slicer makes errors on this channel where the
//      equalizer makes none;
//   6. the display histograms: after a cleared frame the equalized one must
//      have an empty middle and hold every sample, the raw one must not;
//   7. the sigma-delta input path, with a behavioural analog loop fed from a
//      milder analog channel: after retraining, the bit error rate at the best
//      alignment must stay below 1%;
//   8. the VGA output: whole frames of 800 pixels by 3 clocks per line, with
//      the pictures and bar charts drawn.
// A mechanism that never happened counts as a failure.
// The rates, the mechanisms and the sequence kinds follow the design
// description; the test channel, the proportions (49% ones, 75% transitions),
// the tolerances and the order of phases are this design's choices.
module tb_dfe_top;
  import dfe_pkg::*;

  localparam int unsigned N = 4096;       // default training window
  localparam real H [6] = '{6.0, 2.5, 1.5, 0.875, 0.5, 0.25};

  logic clk = 1'b0, rst_n = 1'b0;
  pattern_mode_e mode = PAT_TRANS;
  logic [7:0] p_one = 8'd125, p_flip = 8'd192;
  logic ext_bit = 1'b0;
  logic signed [7:0] noise = '0;
  logic tx_bit, tx_valid;
  logic src_sel = 1'b0, sd_cmp_in, sd_dac_out;
  logic train_en = 1'b1, comp_en = 1'b1, bypass = 1'b0;
  logic rx_bit, rx_valid;
  xval_t coef [NTAPS];
  xval_t dc, main;
  logic [SAMPLE_W+FRAC-1:0] center;
  logic coef_load;
  logic hist_clear = 1'b0;
  logic [SAMPLE_W-1:0] hist_addr = '0;
  logic [17:0] eq_hist, raw_hist;
  logic vga_pix_en, vga_hsync, vga_vsync, vga_blank_n;
  logic [2:0] vga_rgb;

  dfe_top dut (.*);

  // analog loop of the sigma-delta converter
  real u = 0.0;
  sd_loop_model u_loop (.clk, .u, .dac_in(sd_dac_out), .cmp_out(sd_cmp_in));

  always #6.25ns clk = ~clk;               // 80 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #80ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- noise and external bits --------------------------------------------------
  int img_x = 0;
  always @(posedge clk) begin
    noise <= 8'(int'($urandom % 9) - 4);   // +-0.25 code
    if (tx_valid) begin
      // image-like data: runs of 1..40 equal bits
      if (img_x == 0) begin
        ext_bit <= ~ext_bit;
        img_x   <= 1 + int'($urandom % 40);
      end else img_x <= img_x - 1;
    end
  end

  // ---- bit error counting on the simulated channel path ----------------------------
  bit txq [$];
  int errors = 0, received = 0;
  always @(posedge clk) begin
    if (rst_n && tx_valid && !src_sel) txq.push_back(tx_bit);
    if (rst_n && rx_valid && !src_sel && txq.size() > 0) begin
      bit b;
      b = txq.pop_front();
      received++;
      if (rx_bit != b) errors++;
    end
  end

  // ---- analog channel for the sigma-delta path -------------------------------------
  localparam real HA [3] = '{0.40, 0.15, 0.05};   // in full-scale units
  bit ah [3];
  bit txh [64];
  bit rxh [64];
  int ntx = 0, nrx = 0;
  always @(posedge clk) begin
    if (rst_n && tx_valid) begin
      real a;
      ah[2] = ah[1]; ah[1] = ah[0]; ah[0] = tx_bit;
      a = 0.0;
      for (int j = 0; j < 3; j++) a += ah[j] ? HA[j] : -HA[j];
      u <= a;
      txh[ntx % 64] = tx_bit;
      ntx++;
    end
    if (rst_n && rx_valid && src_sel) begin
      rxh[nrx % 64] = rx_bit;
      nrx++;
    end
  end

  // mechanism counters
  int n_load = 0, n_comp_win = 0, n_blind_win = 0, n_bypass = 0, n_frozen = 0;
  int n_adc = 0, n_clear = 0;
  int n_mode [4];
  always @(posedge clk) if (rst_n) begin
    if (coef_load) begin
      n_load++;
      if (comp_en) n_comp_win++; else n_blind_win++;
    end
    if (rx_valid && bypass) n_bypass++;
    if (rx_valid && !train_en) n_frozen++;
    if (rx_valid && src_sel) n_adc++;
    if (hist_clear) n_clear++;
    if (tx_valid) n_mode[mode]++;
  end

  task automatic symbols(input int n);
    repeat (n) @(posedge clk iff tx_valid);
  endtask

  function automatic real code(input xval_t v);
    return real'(v) / real'(1 << FRAC);
  endfunction

  task automatic check_taps(input string tag);
    real e;
    for (int k = 0; k < NTAPS; k++) begin
      e = code(coef[k]) - H[k+1];
      check(e < 0.4 && e > -0.4,
            $sformatf("%s: tap %0d = %f, channel %f", tag, k+1, code(coef[k]), H[k+1]));
    end
  endtask

  task automatic error_free_window(input string tag);
    errors = 0;
    symbols(N);
    check(errors == 0, $sformatf("%s: %0d errors in a window", tag, errors));
  endtask

  // video counters: frames, line length, lit pixels
  int n_frames = 0, lit = 0, line_bad = 0, since_h = 0;
  logic hs_q = 1'b1, vs_q = 1'b1;
  always @(posedge clk) if (rst_n) begin
    hs_q <= vga_hsync;
    vs_q <= vga_vsync;
    since_h++;
    if (hs_q && !vga_hsync) begin
      if (since_h != 2400) line_bad++;
      since_h = 0;
    end
    if (vs_q && !vga_vsync) n_frames++;
    if (vga_pix_en && vga_blank_n && vga_rgb != 3'b000) lit++;
  end

  xval_t frozen [NTAPS];
  int best, errs_at [9];

  initial begin
    for (int m = 0; m < 4; m++) n_mode[m] = 0;
    for (int j = 0; j < 3; j++) ah[j] = 0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;

    // 1. compensated training, transition-heavy bits
    symbols(5 * N + 200);
    check_taps("transition-heavy, compensated");
    $display("main %f centre %f dc %f", code(main), real'(center) / 64.0, code(dc));
    error_free_window("transition-heavy, compensated");

    // 2. plain blind DFE on the same bits
    comp_en = 1'b0;
    symbols(3 * N + 200);
    $display("blind tap 1 = %f", code(coef[0]));
    check(code(coef[0]) < H[1] - 1.0 || code(coef[0]) > H[1] + 1.0,
          "plain blind DFE mistrains tap 1 on transition-heavy bits");
    comp_en = 1'b1;

    // 3. biased, then PRBS
    mode = PAT_BIASED;
    symbols(4 * N + 200);
    check_taps("ones-biased, compensated");
    error_free_window("ones-biased, compensated");
    mode = PAT_PRBS;
    symbols(3 * N + 200);
    check_taps("PRBS, compensated");
    error_free_window("PRBS, compensated");

    // 4. frozen coefficients, image-like external bits
    train_en = 1'b0;
    for (int k = 0; k < NTAPS; k++) frozen[k] = coef[k];
    mode = PAT_EXT;
    symbols(100);
    error_free_window("external bits, frozen taps");
    for (int k = 0; k < NTAPS; k++)
      check(coef[k] == frozen[k], $sformatf("tap %0d frozen", k+1));

    // 5. bypass
    mode = PAT_PRBS;
    bypass = 1'b1;
    symbols(10);
    errors = 0;
    symbols(N);
    $display("bypass errors: %0d of %0d", errors, N);
    check(errors > 0, "unequalized slicer makes errors on this channel");
    bypass = 1'b0;
    symbols(10);

    // 6. histograms over one cleared frame, clear of the display's frame end
    @(negedge vga_vsync);
    @(negedge clk);
    hist_clear = 1'b1;
    @(negedge clk);
    hist_clear = 1'b0;
    symbols(N);
    begin
      int eq_total, raw_total, eq_mid, raw_mid;
      eq_total = 0; raw_total = 0; eq_mid = 0; raw_mid = 0;
      @(negedge clk);
      for (int i = 0; i < 32; i++) begin
        hist_addr = SAMPLE_W'(i);
        #1;
        eq_total  += int'(eq_hist);
        raw_total += int'(raw_hist);
        if (i >= 14 && i <= 18) begin
          eq_mid  += int'(eq_hist);
          raw_mid += int'(raw_hist);
        end
      end
      $display("histograms: eq total %0d middle %0d, raw total %0d middle %0d",
               eq_total, eq_mid, raw_total, raw_mid);
      check(eq_total >= N && eq_total <= N + 2, "equalized histogram holds the frame");
      check(raw_total == eq_total, "raw histogram holds the frame");
      check(eq_mid == 0, "equalized eye open in the histogram");
      check(raw_mid > 0, "raw samples fill the middle");
    end

    // 7. sigma-delta input path
    train_en = 1'b1;
    src_sel  = 1'b1;
    symbols(6 * N);
    for (int d = 0; d < 9; d++) errs_at[d] = 0;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk iff rx_valid);
      #1;
      for (int d = 0; d < 9; d++)
        if (rxh[(nrx - 1) % 64] != txh[(ntx - 1 - d) % 64]) errs_at[d]++;
    end
    best = 0;
    for (int d = 1; d < 9; d++) if (errs_at[d] < errs_at[best]) best = d;
    $display("sigma-delta path: %0d errors of 2000 at a delay of %0d symbols",
             errs_at[best], best);
    check(errs_at[best] < 20, "sigma-delta path: bit error rate below 1%");

    // 8. video output: two whole frames with the equalized picture
    src_sel = 1'b0;
    mode    = PAT_EXT;
    n_frames = 0;
    lit = 0;
    @(negedge vga_vsync);
    line_bad = 0;
    @(negedge vga_vsync);
    @(negedge vga_vsync);
    repeat (2) @(posedge clk);
    $display("video: %0d frames, %0d lit pixels, %0d lines of wrong length",
             n_frames, lit, line_bad);
    check(n_frames == 3, "three vertical syncs seen");
    check(line_bad == 0, "every line 800 pixels of 3 clocks");
    check(lit > 10000, "pictures and bars drawn");

    // mechanisms
    check(n_load > 0, "coefficient loads happened");
    check(n_comp_win > 0 && n_blind_win > 0, "compensated and blind training both ran");
    check(n_bypass > 0, "bypass used");
    check(n_frozen > 0, "frozen coefficients used");
    check(n_adc > 0, "sigma-delta input used");
    check(n_clear > 0, "histogram cleared");
    check(n_frames > 0, "video frames produced");
    for (int m = 0; m < 4; m++) check(n_mode[m] > 0, $sformatf("bit source mode %0d used", m));
    $display("mechanisms: loads %0d (comp %0d, blind %0d), bypass %0d, frozen %0d, adc %0d, clears %0d, modes %p",
             n_load, n_comp_win, n_blind_win, n_bypass, n_frozen, n_adc, n_clear, n_mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
