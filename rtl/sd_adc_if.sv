// sd_adc_if: FPGA side of the sigma-delta analog-to-digital input interface.
//
// The analog part outside the FPGA (a second-order loop filter and a
// comparator) produces a 1-bit decision that this block samples on every
// clock (80 MHz). The sampled bit is sent straight back as the 1-bit DAC
// feedback (dac_out), closing the modulator loop, and is decimated by OSR = 8
// with an ORDER = 3 cascaded integrator-comb (sinc^3) filter, one order above
// the loop's second-order noise shaping. The filter output (0 .. OSR**ORDER)
// is scaled to a SAMPLE_W = 5-bit code, so full-scale input gives code 31 and
// mid-scale gives 16.
//
// Timing: sample_valid pulses once every OSR clocks (10 MHz at an 80 MHz
// clock), with sample registered in the same cycle. The filter has a group
// delay of about 1.5 output samples.
// The 80 MHz clock, 8x oversampling, 1-bit DAC, second-order shaping and
// 5-bit output follow the design description; the sinc^3 decimator, the
// input register and the scaling are this implementation's choices.
module sd_adc_if
  import dfe_pkg::*;
#(
  parameter int unsigned OSR   = 8,
  parameter int unsigned ORDER = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cmp_in,
  output logic                 dac_out,
  output logic [SAMPLE_W-1:0]  sample,
  output logic                 sample_valid
);

  localparam int unsigned LOSR  = $clog2(OSR);
  localparam int unsigned W     = ORDER * LOSR + 1;
  localparam int unsigned SHIFT = ORDER * LOSR - SAMPLE_W;

  logic [W-1:0] integ [ORDER];
  logic [W-1:0] dly   [ORDER];
  logic [W-1:0] comb  [ORDER+1];
  logic [LOSR-1:0] phase;

  always_comb begin
    comb[0] = integ[ORDER-1];
    for (int i = 0; i < ORDER; i++) comb[i+1] = comb[i] - dly[i];
  end

  logic [W-1:0] scaled;
  assign scaled = comb[ORDER] >> SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_out      <= 1'b0;
      phase        <= '0;
      sample       <= '0;
      sample_valid <= 1'b0;
      for (int i = 0; i < ORDER; i++) begin
        integ[i] <= '0;
        dly[i]   <= '0;
      end
    end else begin
      dac_out  <= cmp_in;
      integ[0] <= integ[0] + W'(dac_out);
      for (int i = 1; i < ORDER; i++) integ[i] <= integ[i] + integ[i-1];
      phase        <= phase + 1'b1;
      sample_valid <= 1'b0;
      if (phase == LOSR'(OSR - 1)) begin
        for (int i = 0; i < ORDER; i++) dly[i] <= comb[i];
        sample_valid <= 1'b1;
        if (scaled > W'((1 << SAMPLE_W) - 1)) sample <= '1;
        else                                  sample <= scaled[SAMPLE_W-1:0];
      end
    end
  end

endmodule
