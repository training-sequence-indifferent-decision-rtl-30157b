// dfe_core: the receiver, a 5-tap decision-feedback equalizer whose training
// tolerates unbalanced and non-random training sequences.
//
// Each valid 5-bit sample is centred on the tracked 50% point (tap 1's centre
// register), the products of the five taps (coefficient times the decision
// 1..5 symbols back) and the centre correction are subtracted, and the sign
// of the result is the decision. The decision enters the tap chain at once,
// so the feedback loop closes within one sample.
//
// Training runs continuously in windows of 2**WIN_LOG2 samples. During a
// window the taps accumulate their correlations with the signal and the
// statistics units count ones and equal decision pairs at lags 1..NTAPS. At
// the end of a window the decision block solves for the compensated tap
// coefficients; if train_en is high they are loaded into the taps' adjustment
// registers when it finishes. Training is decision-directed (blind): with all
// coefficients at zero after reset, the first window's decisions are those of
// a plain slicer. comp_en selects the compensated solution (1) or the plain
// blind-DFE correlation taps (0). bypass sends the unequalized slicer decision
// to the output instead of the equalized one (the "bypassing DFE" view);
// training is not affected by it.
//
// Interface and timing: one sample per cycle at most, marked by valid.
// dout/dout_valid and the display codes are registered: they appear one clock
// after the sample; dout_raw, always the unequalized slicer decision, comes
// with it. eq_code is the equalized sample requantized to a 5-bit
// code around mid-scale 16, raw_code the sample as received. coef, dc,
// center and main show the current equalizer state; coef_load pulses when new
// coefficients are loaded.
// The tap structure, the centre point, the statistics units, the decision
// block and the 5-bit/1-bit interfaces follow the design description; window
// length, the fixed-point formats and the control inputs are this
// implementation's choices.
module dfe_core
  import dfe_pkg::*;
#(
  parameter int unsigned WIN_LOG2 = 12,
  parameter int unsigned ITER     = 16,
  parameter int unsigned STEP     = 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      valid,
  input  logic [SAMPLE_W-1:0]       sample,
  input  logic                      train_en,
  input  logic                      comp_en,
  input  logic                      bypass,
  output logic                      dout,
  output logic                      dout_valid,
  output logic                      dout_raw,
  output logic [SAMPLE_W-1:0]       eq_code,
  output logic [SAMPLE_W-1:0]       raw_code,
  output xval_t                     coef [NTAPS],
  output xval_t                     dc,
  output xval_t                     main,
  output logic [SAMPLE_W+FRAC-1:0]  center,
  output logic                      coef_load
);

  localparam int unsigned AW = XW + WIN_LOG2;
  localparam int unsigned ZW = XW + 4;

  // ---- centre point (tap 1) -------------------------------------------------
  center_tracker #(.STEP(STEP)) u_center (
    .clk, .rst_n, .valid, .adapt(train_en), .sample, .center
  );

  xval_t x;
  assign x = xval_t'({1'b0, sample, {FRAC{1'b0}}}) - xval_t'({1'b0, center});

  // ---- taps -----------------------------------------------------------------
  logic                  d_now;                  // decision for this sample
  logic [NTAPS-1:0]      d_tap;                  // decisions 1..NTAPS back
  xval_t                 prod  [NTAPS];
  xval_t                 coef_new [NTAPS];
  logic signed [AW-1:0]  corr  [NTAPS+1];
  logic [NTAPS-1:0]      tap_done;
  logic                  win_end;
  logic                  dec_done;

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    dfe_tap #(.WIN_LOG2(WIN_LOG2)) u_tap (
      .clk, .rst_n, .valid, .win_end,
      .d_in     (k == 0 ? d_now : d_tap[(k == 0) ? 0 : k-1]),
      .x,
      .load     (coef_load),
      .coef_in  (coef_new[k]),
      .d_out    (d_tap[k]),
      .coef     (coef[k]),
      .prod     (prod[k]),
      .corr_sum (corr[k+1]),
      .corr_done(tap_done[k])
    );
  end

  // ---- summing node and slicer ---------------------------------------------
  xval_t dc_reg;
  logic signed [ZW-1:0] z;
  always_comb begin
    z = ZW'(x) - ZW'(dc_reg);
    for (int k = 0; k < NTAPS; k++) z -= ZW'(prod[k]);
  end
  assign d_now = ~z[ZW-1];
  assign dc    = dc_reg;

  // ---- window control and main-cursor / mean sums ---------------------------
  logic [WIN_LOG2-1:0] wcnt;
  assign win_end = valid && (wcnt == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     wcnt <= '0;
    else if (valid) wcnt <= wcnt + 1'b1;
  end

  logic signed [AW-1:0] sum_x;
  logic                 g0_done, mean_done;

  win_acc #(.TW(XW), .AW(AW)) u_acc_g0 (
    .clk, .rst_n, .valid, .win_end,
    .term(d_now ? x : xval_t'(-x)), .total(corr[0]), .done(g0_done)
  );
  win_acc #(.TW(XW), .AW(AW)) u_acc_mean (
    .clk, .rst_n, .valid, .win_end,
    .term(x), .total(sum_x), .done(mean_done)
  );

  // ---- statistics and decision block -----------------------------------------
  logic [WIN_LOG2:0] n_ones;
  logic [WIN_LOG2:0] n_same [NTAPS];
  logic              stats_done;

  train_stats #(.WIN_LOG2(WIN_LOG2)) u_stats (
    .clk, .rst_n, .valid, .win_end,
    .d(d_now), .d_hist(d_tap), .n_ones, .n_same, .done(stats_done)
  );

  xval_t dc_new;
  logic  dec_busy;

  decision_block #(.WIN_LOG2(WIN_LOG2), .ITER(ITER)) u_decide (
    .clk, .rst_n,
    .start  (stats_done),
    .comp_en,
    .sum_x, .corr, .n_ones, .n_same,
    .coef   (coef_new),
    .dc     (dc_new),
    .main,
    .busy   (dec_busy),
    .done   (dec_done)
  );

  assign coef_load = dec_done && train_en;

  // All window sums close on the same clock, and a window must be long enough
  // for the decision block to finish before the next window closes.
  a_win_sync: assert property (@(posedge clk) disable iff (!rst_n)
    stats_done |-> (&tap_done && g0_done && mean_done));
  a_dec_free: assert property (@(posedge clk) disable iff (!rst_n)
    stats_done |-> !dec_busy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         dc_reg <= '0;
    else if (coef_load) dc_reg <= dc_new;
  end

  // ---- outputs --------------------------------------------------------------
  logic signed [ZW-1:0] zq;
  assign zq = ((z + ZW'(1 << (FRAC-1))) >>> FRAC) + ZW'(1 << (SAMPLE_W-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout       <= 1'b0;
      dout_valid <= 1'b0;
      dout_raw   <= 1'b0;
      eq_code    <= '0;
      raw_code   <= '0;
    end else begin
      dout_valid <= valid;
      if (valid) begin
        dout     <= bypass ? ~x[XW-1] : d_now;
        dout_raw <= ~x[XW-1];
        raw_code <= sample;
        if (zq < 0)                               eq_code <= '0;
        else if (zq > ZW'((1 << SAMPLE_W) - 1))   eq_code <= '1;
        else                                      eq_code <= zq[SAMPLE_W-1:0];
      end
    end
  end

endmodule
