// isi_channel: the simulated channel, an FIR filter that adds inter-symbol
// interference to a bit stream.
//
// Each bit is mapped to +1/-1 and the last NH symbols are weighted by the
// pulse response H (H[0] the main cursor, H[1..] the post-cursors, in units of
// 1/16 of a code step). The sum is added to the mid-scale level MID plus a
// signed noise input (also in 1/16 code), rounded to a code and clipped to
// the 5-bit sample range: the same kind of sample the sigma-delta input
// interface delivers from a real cable.
//
// Timing: one input bit per valid; sample/sample_valid are registered, so the
// sample of bit n (with the ISI of bits n-1 .. n-NH+1) appears one clock
// later. That the channel is emulated by filtering follows the design
// description; the pulse response, the noise input and the mid level are
// this implementation's choices.
module isi_channel
  import dfe_pkg::*;
#(
  parameter int unsigned NH  = 6,
  parameter int          H [NH] = '{96, 40, 24, 14, 8, 4},
  parameter int unsigned MID = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid,
  input  logic                 bit_in,
  input  logic signed [7:0]    noise,
  output logic [SAMPLE_W-1:0]  sample,
  output logic                 sample_valid
);

  logic [NH-2:0] hist;            // hist[j]: bit j+1 symbols back
  logic [NH-1:0] bits;            // bits[j]: bit j symbols back (0: new)
  assign bits = {hist, bit_in};

  logic signed [31:0] acc, code;
  always_comb begin
    acc = 32'(signed'(MID)) * 16 + 32'(noise);
    for (int j = 0; j < NH; j++)
      acc += bits[j] ? 32'(H[j]) : -32'(H[j]);
    code = (acc + 8) >>> 4;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist         <= '0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= valid;
      if (valid) begin
        hist <= bits[NH-2:0];
        if (code < 0)                        sample <= '0;
        else if (code > (1 << SAMPLE_W) - 1) sample <= '1;
        else                                 sample <= code[SAMPLE_W-1:0];
      end
    end
  end

endmodule
