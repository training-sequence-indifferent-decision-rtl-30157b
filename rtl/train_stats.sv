// train_stats: the "compare + store" statistics units of the receiver.
//
// Over each training window this block counts, from the stream of receiver
// decisions:
//   n_ones       how many decisions were 1 (the "0's vs. 1's" unit), and
//   n_same[k-1]  for lag k = 1..NTAPS, how many decisions equalled the one k
//                symbols earlier. Lag 1 is the "00/11 vs. 01/10" unit
//                (non-transitions against transitions); lags 2..NTAPS are the
//                "other stats" unit.
// The window has 2**WIN_LOG2 samples, so the decision block can turn each
// count c into a balance (2c - N)/N with shifts only. The counts are
// registered on the last valid sample of a window (win_end) and done pulses
// for one cycle; the counters then restart from zero.
//
// d_hist[k-1] must hold the decision of k symbols before d (the tap chain
// supplies it). Three statistics units and what the first two compare follow
// the design description; the choice of lags 2..NTAPS as the "other stats" is
// this implementation's.
module train_stats
  import dfe_pkg::*;
#(
  parameter int unsigned WIN_LOG2 = 12
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  valid,
  input  logic                  win_end,
  input  logic                  d,
  input  logic [NTAPS-1:0]      d_hist,
  output logic [WIN_LOG2:0]     n_ones,
  output logic [WIN_LOG2:0]     n_same [NTAPS],
  output logic                  done
);

  logic [WIN_LOG2:0] c_ones, c_ones_nxt;
  logic [WIN_LOG2:0] c_same [NTAPS];
  logic [WIN_LOG2:0] c_same_nxt [NTAPS];

  always_comb begin
    c_ones_nxt = c_ones + (WIN_LOG2+1)'(d);
    for (int k = 0; k < NTAPS; k++)
      c_same_nxt[k] = c_same[k] + (WIN_LOG2+1)'(d == d_hist[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_ones <= '0;
      n_ones <= '0;
      done   <= 1'b0;
      for (int k = 0; k < NTAPS; k++) begin
        c_same[k] <= '0;
        n_same[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      if (valid) begin
        if (win_end) begin
          n_ones <= c_ones_nxt;
          c_ones <= '0;
          for (int k = 0; k < NTAPS; k++) begin
            n_same[k] <= c_same_nxt[k];
            c_same[k] <= '0;
          end
          done <= 1'b1;
        end else begin
          c_ones <= c_ones_nxt;
          for (int k = 0; k < NTAPS; k++) c_same[k] <= c_same_nxt[k];
        end
      end
    end
  end

endmodule
