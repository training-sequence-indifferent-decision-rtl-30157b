// win_acc: signed accumulator over one training window.
//
// On every valid cycle the signed input term is added to a running sum. On the
// valid cycle that also carries win_end (the last sample of the window) the
// completed sum, including that last term, is copied to total, done pulses
// for one cycle, and the running sum restarts from zero. The window length is
// set by whoever drives win_end. Used by the taps and the receiver for the
// correlation sums of a training window; an implementation helper, not a
// separate unit of the design description.
module win_acc #(
  parameter int unsigned TW = 13,   // term width
  parameter int unsigned AW = 25    // accumulator width (TW + log2 window)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid,
  input  logic                 win_end,
  input  logic signed [TW-1:0] term,
  output logic signed [AW-1:0] total,
  output logic                 done
);

  logic signed [AW-1:0] acc, nxt;
  assign nxt = acc + AW'(term);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      total <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (valid) begin
        if (win_end) begin
          total <= nxt;
          acc   <= '0;
          done  <= 1'b1;
        end else begin
          acc <= nxt;
        end
      end
    end
  end

endmodule
