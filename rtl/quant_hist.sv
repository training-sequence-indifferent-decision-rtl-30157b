// quant_hist: quantization histogram of a 5-bit sample stream.
//
// Counts how often each code value occurs, one counter per code. It is used
// to show the distribution of the equalized and of the unequalized samples:
// an open eye gives two separated humps, a closed one a smear. clear ends a
// frame: the counts are copied to a display copy and all counters restart
// from zero. Counters saturate at all ones instead of wrapping. The running
// counts can be read through rd_addr/rd_count, the display copy (the last
// completed frame) through disp_addr/disp_count; both reads are
// combinational.
//
// Timing: one sample per clock at most (valid); the count includes a sample
// from the clock after it is presented. A sample in the same clock as clear
// is dropped. That histograms of the quantized data are displayed follows
// the design description; bin layout, counter width, the display copy and
// the read ports are this implementation's choices.
module quant_hist
  import dfe_pkg::*;
#(
  parameter int unsigned CNT_W = 18
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 valid,
  input  logic [SAMPLE_W-1:0]  code,
  input  logic [SAMPLE_W-1:0]  rd_addr,
  output logic [CNT_W-1:0]     rd_count,
  input  logic [SAMPLE_W-1:0]  disp_addr,
  output logic [CNT_W-1:0]     disp_count
);

  localparam int unsigned NBINS = 1 << SAMPLE_W;

  logic [CNT_W-1:0] bin_cnt [NBINS];
  logic [CNT_W-1:0] shadow  [NBINS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NBINS; i++) bin_cnt[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < NBINS; i++) bin_cnt[i] <= '0;
    end else if (valid && bin_cnt[code] != '1) begin
      bin_cnt[code] <= bin_cnt[code] + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NBINS; i++) shadow[i] <= '0;
    end else if (clear) begin
      for (int i = 0; i < NBINS; i++) shadow[i] <= bin_cnt[i];
    end
  end

  assign rd_count   = bin_cnt[rd_addr];
  assign disp_count = shadow[disp_addr];

endmodule
