// dfe_pkg: widths, fixed-point formats and shared types of the
// training-sequence-indifferent decision-feedback equalizer.
//
// Samples arrive as 5-bit unsigned codes (0..31) at the symbol rate, as the
// sigma-delta input interface delivers them. Inside the receiver a sample is
// carried in signed fixed point with FRAC fractional bits (so one code step
// is 2**FRAC), and the statistics of a training window (ones balance and
// lag correlations of the decisions) are carried as signed fractions with
// SFRAC fractional bits (1.0 = 2**SFRAC). The 5-bit sample, the five taps and
// the 8x oversampling come from the design description; the fixed-point
// formats are this implementation's choice.
package dfe_pkg;

  // Sample code width delivered by the input interface.
  localparam int unsigned SAMPLE_W = 5;
  // Number of feedback taps.
  localparam int unsigned NTAPS    = 5;
  // Fractional bits of samples, centre point and tap coefficients.
  localparam int unsigned FRAC     = 6;
  // Width of a centred sample / coefficient (signed): +-64 codes.
  localparam int unsigned XW       = SAMPLE_W + FRAC + 2;
  // Fractional bits of the window statistics (ones balance, correlations).
  localparam int unsigned SFRAC    = 10;
  // Width of a statistic (signed, range -1.0 .. +1.0).
  localparam int unsigned SW       = SFRAC + 2;

  typedef logic signed [XW-1:0] xval_t;
  typedef logic signed [SW-1:0] stat_t;

  // Bit source selection.
  typedef enum logic [1:0] {
    PAT_PRBS   = 2'd0,  // pseudorandom, 50/50
    PAT_BIASED = 2'd1,  // ones drawn with a programmable probability
    PAT_TRANS  = 2'd2,  // transitions drawn with a programmable probability
    PAT_EXT    = 2'd3   // external bits (for example image data)
  } pattern_mode_e;

  // Saturate a wide signed value to XW bits.
  function automatic xval_t sat_x(input logic signed [31:0] v);
    localparam logic signed [31:0] MAXV = (32'sd1 <<< (XW-1)) - 32'sd1;
    localparam logic signed [31:0] MINV = -(32'sd1 <<< (XW-1));
    if (v > MAXV)      return xval_t'(MAXV);
    else if (v < MINV) return xval_t'(MINV);
    else               return xval_t'(v);
  endfunction

endpackage
