// decision_block: turns the statistics of one training window into the tap
// adjustments, compensating for a training sequence that is not random.
//
// A conventional blind DFE takes the correlation of the signal with the
// decision k symbols back, g_k = E[x_n s_(n-k)] (s = +-1), as tap k. That is
// right only when the training bits are balanced and uncorrelated. In general
//   E[x_n]           = delta + m * sum_j h_j
//   g_k              = delta*m + sum_j h_j * rho_|k-j|        (k = 0..NTAPS)
// where h_j is the channel's pulse response (h_0 the main cursor), delta the
// error of the centre point, m = E[s] the ones/zeros balance and
// rho_l = E[s_n s_(n-l)] (rho_0 = 1) the lag-l agreement of the bits, both
// measured by the statistics units. This block solves that set of equations
// for delta and h_0..h_NTAPS by Gauss-Seidel sweeps: each unknown in turn is
// recomputed from the current values of the others, so each later tap is
// corrected using the earlier taps' corrected values. The normal equations are
// symmetric positive definite, so the sweeps converge.
//
// Interface and timing: start (one cycle) latches the window sums; after
// ITER sweeps of NTAPS+2 cycles (one unknown per cycle) done pulses for one
// cycle with coef[k-1] = h_k for the feedback taps, dc = delta and
// main = h_0; these outputs are registered and hold until the next solve
// finishes. done rises on the (ITER*(NTAPS+2)+1)-th clock edge after the one
// that takes start (the first with comp_en low). With comp_en low the block acts as the plain blind DFE:
// coef[k-1] = g_k, dc = 0. Inputs: sum_x = sum of x over the window,
// corr[k] = sum of x*s_(n-k), k = 0..NTAPS, n_ones and n_same[] as counted by
// train_stats, window length 2**WIN_LOG2.
// That a decision block converts the compare-and-store statistics into tap
// adjustments is from the design description; the equations, the
// Gauss-Seidel solution and all fixed-point formats are this
// implementation's choices.
module decision_block
  import dfe_pkg::*;
#(
  parameter int unsigned WIN_LOG2 = 12,
  parameter int unsigned ITER     = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic                          comp_en,
  input  logic signed [XW+WIN_LOG2-1:0] sum_x,
  input  logic signed [XW+WIN_LOG2-1:0] corr [NTAPS+1],
  input  logic [WIN_LOG2:0]             n_ones,
  input  logic [WIN_LOG2:0]             n_same [NTAPS],
  output xval_t                         coef [NTAPS],
  output xval_t                         dc,
  output xval_t                         main,
  output logic                          busy,
  output logic                          done
);

  localparam int unsigned NU = NTAPS + 2;          // unknowns: delta, h_0..h_N
  localparam int unsigned AW = XW + WIN_LOG2;
  localparam int unsigned HW = XW + 4;             // internal solution width
  localparam int unsigned CW = WIN_LOG2 + SFRAC + 3;
  localparam int unsigned IW = $clog2(ITER + 1);
  localparam int unsigned UW = $clog2(NU);

  typedef logic signed [HW-1:0] hval_t;

  // ---- window averages ------------------------------------------------------
  function automatic hval_t avg(input logic signed [AW-1:0] s);
    logic signed [AW-1:0] t;
    t = s >>> WIN_LOG2;
    return hval_t'(t);
  endfunction

  // balance (2c - N) / N as a signed fraction with SFRAC bits
  function automatic stat_t balance(input logic [WIN_LOG2:0] c);
    logic signed [CW-1:0] b;
    b = (CW'(c) <<< 1) - (CW'(1) <<< WIN_LOG2);
    b = (b <<< SFRAC) >>> WIN_LOG2;
    return stat_t'(b);
  endfunction

  // distance between tap indices, used to pick rho
  function automatic int lag(input int a, input int b);
    return (a > b) ? a - b : b - a;
  endfunction

  function automatic hval_t sat_h(input logic signed [47:0] v);
    localparam logic signed [47:0] MAXV = (48'sd1 <<< (HW-1)) - 48'sd1;
    localparam logic signed [47:0] MINV = -(48'sd1 <<< (HW-1));
    if (v > MAXV)      return hval_t'(MAXV);
    else if (v < MINV) return hval_t'(MINV);
    else               return hval_t'(v);
  endfunction

  // ---- latched problem ------------------------------------------------------
  hval_t ex;                     // E[x]
  hval_t g   [NTAPS+1];          // correlations g_0..g_N
  stat_t m;                      // ones balance
  stat_t rho [NTAPS+1];          // rho_0 = 1, rho_1..rho_N
  logic  comp_q;

  // ---- solution -------------------------------------------------------------
  hval_t delta;
  hval_t h [NTAPS+1];

  logic [IW-1:0] sweep;
  logic [UW-1:0] u;              // 0: delta, 1+k: h_k

  // one Gauss-Seidel step for unknown u
  logic signed [47:0] acc, dm, nv;
  always_comb begin
    acc = '0;
    dm  = (48'(delta) * 48'(m)) >>> SFRAC;
    nv  = '0;
    if (u == '0) begin
      for (int j = 0; j <= NTAPS; j++) acc += 48'(h[j]);
      nv = 48'(ex) - ((acc * 48'(m)) >>> SFRAC);
    end else begin
      for (int j = 0; j <= NTAPS; j++)
        if (j != int'(u) - 1) acc += 48'(h[j]) * 48'(rho[lag(j, int'(u) - 1)]);
      nv = 48'(g[int'(u) - 1]) - dm - (acc >>> SFRAC);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      comp_q <= 1'b0;
      sweep  <= '0;
      u      <= '0;
      ex     <= '0;
      m      <= '0;
      delta  <= '0;
      for (int k = 0; k <= NTAPS; k++) begin
        g[k]   <= '0;
        rho[k] <= '0;
        h[k]   <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start) begin
        busy   <= 1'b1;
        comp_q <= comp_en;
        sweep  <= '0;
        u      <= '0;
        ex     <= avg(sum_x);
        m      <= balance(n_ones);
        rho[0] <= stat_t'(1) <<< SFRAC;
        delta  <= '0;
        for (int k = 0; k <= NTAPS; k++) begin
          g[k] <= avg(corr[k]);
          h[k] <= avg(corr[k]);
        end
        for (int k = 1; k <= NTAPS; k++) rho[k] <= balance(n_same[k-1]);
      end else if (busy) begin
        if (!comp_q || sweep == IW'(ITER)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          if (u == '0) delta <= sat_h(nv);
          else         h[int'(u) - 1] <= sat_h(nv);
          if (u == UW'(NU - 1)) begin
            u     <= '0;
            sweep <= sweep + 1'b1;
          end else begin
            u <= u + 1'b1;
          end
        end
      end
    end
  end

  // ---- outputs: registered when a solve finishes ------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dc   <= '0;
      main <= '0;
      for (int k = 0; k < NTAPS; k++) coef[k] <= '0;
    end else if (busy && (!comp_q || sweep == IW'(ITER))) begin
      for (int k = 1; k <= NTAPS; k++) coef[k-1] <= sat_x(32'(h[k]));
      dc   <= comp_q ? sat_x(32'(delta)) : '0;
      main <= sat_x(32'(h[0]));
    end
  end

endmodule
