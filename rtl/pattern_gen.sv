// pattern_gen: the bit source feeding the channel ("Input").
//
// Produces one bit per en strobe, of one of the kinds of training sequence the
// equalizer has to cope with:
//   PAT_PRBS   a PRBS31 bit (x^31 + x^28 + 1): balanced and uncorrelated;
//   PAT_BIASED a 1 with probability p_one/256 (p_one = 125 gives the 49/51
//              ones/zeros split of a SATA-like sequence);
//   PAT_TRANS  a change from the previous bit with probability p_flip/256
//              (above 128: more transitions than repeats, as in sequences
//              that over-balance their ones and zeros);
//   PAT_EXT    ext_bit, for instance image data.
// The random draws use a byte taken from the PRBS31 register, which advances
// eight steps per strobe so that successive bytes do not overlap.
//
// Timing: bit_out and bit_valid are registered, one clock after en.
// The kinds of sequence follow the design description; the generator
// polynomial, the byte-threshold method and the reset seed are this
// implementation's choices.
module pattern_gen
  import dfe_pkg::*;
#(
  parameter logic [30:0] SEED = 31'h2A5F_3C1D
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  pattern_mode_e mode,
  input  logic [7:0]    p_one,
  input  logic [7:0]    p_flip,
  input  logic          ext_bit,
  output logic          bit_out,
  output logic          bit_valid
);

  logic [30:0] lfsr, lfsr_nxt;
  logic [7:0]  rnd;

  always_comb begin
    lfsr_nxt = lfsr;
    for (int i = 0; i < 8; i++) begin
      lfsr_nxt = {lfsr_nxt[29:0], lfsr_nxt[30] ^ lfsr_nxt[27]};
      rnd[i]   = lfsr_nxt[0];
    end
  end

  logic nxt_bit;
  always_comb begin
    unique case (mode)
      PAT_PRBS:   nxt_bit = rnd[0];
      PAT_BIASED: nxt_bit = (rnd < p_one);
      PAT_TRANS:  nxt_bit = bit_out ^ (rnd < p_flip);
      default:    nxt_bit = ext_bit;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr      <= SEED;
      bit_out   <= 1'b0;
      bit_valid <= 1'b0;
    end else begin
      bit_valid <= en;
      if (en) begin
        lfsr    <= lfsr_nxt;
        bit_out <= nxt_bit;
      end
    end
  end

endmodule
