// dfe_tap: one feedback tap of the equalizer (TAP k, its delay, its
// adjustment register and its multiplier).
//
// The tap holds the decision of k symbols ago. On every valid sample it takes
// the decision held by the tap before it (the one-symbol delay between taps),
// so chaining taps gives decisions delayed by 1, 2, 3, ... symbols. While a
// training window runs, the tap accumulates the correlation of the incoming
// centred sample with its delayed decision: +x when the decision is 1, -x
// when it is 0. This is how much the symbol k places back pushes the signal up
// or down, and it is reported at the end of each window for the decision block.
// The adjustment register holds the coefficient the decision block computed;
// the tap's output product is +coef for a held 1 and -coef for a held 0, and
// the receiver subtracts it from the signal (pushing it down where the ISI
// raised it and boosting it where the ISI lowered it).
//
// Timing: d_out, coef and the window sum are registers; prod is combinational
// from d_out and coef, so it is ready in the cycle of the sample it corrects.
// The tap structure, the one-symbol delay between taps and the multiply of
// tap and adjustment follow the design description; the correlation estimate
// and the +-1 decision encoding are this implementation's choices.
module dfe_tap
  import dfe_pkg::*;
#(
  parameter int unsigned WIN_LOG2 = 12   // log2 of training window length
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             valid,     // one sample this cycle
  input  logic                             win_end,   // last sample of window
  input  logic                             d_in,      // decision one symbol newer
  input  xval_t                            x,         // centred sample
  input  logic                             load,      // take coef_in
  input  xval_t                            coef_in,
  output logic                             d_out,     // decision k symbols ago
  output xval_t                            coef,
  output xval_t                            prod,      // +-coef
  output logic signed [XW+WIN_LOG2-1:0]    corr_sum,  // sum of x*(+-1)
  output logic                             corr_done
);

  xval_t term;
  assign term = d_out ? x : xval_t'(-x);
  assign prod = d_out ? coef : xval_t'(-coef);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_out <= 1'b0;
      coef  <= '0;
    end else begin
      if (valid) d_out <= d_in;
      if (load)  coef  <= coef_in;
    end
  end

  win_acc #(.TW(XW), .AW(XW+WIN_LOG2)) u_acc (
    .clk, .rst_n, .valid, .win_end,
    .term, .total(corr_sum), .done(corr_done)
  );

endmodule
