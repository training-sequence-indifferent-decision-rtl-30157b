// dfe_top: complete equalizer demonstrator: bit source, channel, input
// interface, training-sequence-indifferent DFE and display histograms.
//
// Runs from one clock, the 80 MHz input-interface clock; the symbol rate is
// that clock divided by OSR = 8 (10 Mbit/s). A pattern generator produces the
// transmitted bits (PRBS, biased, transition-heavy or external image bits).
// They leave on tx_bit towards a physical channel and also pass through the
// on-chip simulated ISI channel. The receiver takes its 5-bit samples either
// from that simulated channel (src_sel = 0) or from the sigma-delta input
// interface (src_sel = 1), whose comparator input and 1-bit DAC output are
// pins. The DFE core equalizes and slices the samples to rx_bit. Two
// histograms collect the equalized and the unequalized sample codes; each
// displayed frame (or hist_clear) closes a histogram frame, and hist_addr
// reads the running count of one bin of each. The VGA stage shows the
// pictures carried by the equalized bits (rx_bit, or the unequalized
// decision when bypass is high) and by the unequalized decisions, next to
// bar charts of the two histograms.
//
// Timing: with src_sel = 0 the decision for a bit appears on rx_bit three
// clocks after that bit on tx_bit (channel register, core register; the
// generator register is shared). With src_sel = 1 the delay depends on the
// analog loop and the decimation filter.
// The signal chain, rates and widths follow the design description; the
// source selection, control pins and histogram read port are this
// implementation's choices.
module dfe_top
  import dfe_pkg::*;
#(
  parameter int unsigned OSR      = 8,
  parameter int unsigned WIN_LOG2 = 12,
  parameter int unsigned ITER     = 16,
  parameter int unsigned CNT_W    = 18
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // bit source and simulated channel
  input  pattern_mode_e             mode,
  input  logic [7:0]                p_one,
  input  logic [7:0]                p_flip,
  input  logic                      ext_bit,
  input  logic signed [7:0]         noise,
  output logic                      tx_bit,
  output logic                      tx_valid,
  // sigma-delta input interface
  input  logic                      src_sel,
  input  logic                      sd_cmp_in,
  output logic                      sd_dac_out,
  // equalizer control and status
  input  logic                      train_en,
  input  logic                      comp_en,
  input  logic                      bypass,
  output logic                      rx_bit,
  output logic                      rx_valid,
  output xval_t                     coef [NTAPS],
  output xval_t                     dc,
  output xval_t                     main,
  output logic [SAMPLE_W+FRAC-1:0]  center,
  output logic                      coef_load,
  // display histograms
  input  logic                      hist_clear,
  input  logic [SAMPLE_W-1:0]       hist_addr,
  output logic [CNT_W-1:0]          eq_hist,
  output logic [CNT_W-1:0]          raw_hist,
  // VGA output
  output logic                      vga_pix_en,
  output logic [2:0]                vga_rgb,
  output logic                      vga_hsync,
  output logic                      vga_vsync,
  output logic                      vga_blank_n
);

  // ---- symbol strobe ----------------------------------------------------------
  logic [$clog2(OSR)-1:0] div;
  logic                   sym_en;
  assign sym_en = (div == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else        div <= (div == ($clog2(OSR))'(OSR - 1)) ? '0 : div + 1'b1;
  end

  // ---- bit source and simulated channel -----------------------------------------
  pattern_gen u_src (
    .clk, .rst_n, .en(sym_en), .mode, .p_one, .p_flip, .ext_bit,
    .bit_out(tx_bit), .bit_valid(tx_valid)
  );

  logic [SAMPLE_W-1:0] ch_sample;
  logic                ch_valid;

  isi_channel u_chan (
    .clk, .rst_n, .valid(tx_valid), .bit_in(tx_bit), .noise,
    .sample(ch_sample), .sample_valid(ch_valid)
  );

  // ---- sigma-delta input interface ------------------------------------------------
  logic [SAMPLE_W-1:0] adc_sample;
  logic                adc_valid;

  sd_adc_if #(.OSR(OSR)) u_adc (
    .clk, .rst_n, .cmp_in(sd_cmp_in), .dac_out(sd_dac_out),
    .sample(adc_sample), .sample_valid(adc_valid)
  );

  // ---- receiver ---------------------------------------------------------------
  logic [SAMPLE_W-1:0] rx_sample;
  logic                rx_in_valid;
  assign rx_sample   = src_sel ? adc_sample : ch_sample;
  assign rx_in_valid = src_sel ? adc_valid  : ch_valid;

  logic [SAMPLE_W-1:0] eq_code, raw_code;
  logic                rx_raw;

  dfe_core #(.WIN_LOG2(WIN_LOG2), .ITER(ITER)) u_dfe (
    .clk, .rst_n,
    .valid(rx_in_valid), .sample(rx_sample),
    .train_en, .comp_en, .bypass,
    .dout(rx_bit), .dout_valid(rx_valid), .dout_raw(rx_raw),
    .eq_code, .raw_code,
    .coef, .dc, .main, .center, .coef_load
  );

  // ---- display histograms ------------------------------------------------------
  logic [SAMPLE_W-1:0] disp_addr;
  logic [CNT_W-1:0]    eq_disp, raw_disp;
  logic                frame_start, hist_frame;
  assign hist_frame = hist_clear || frame_start;

  quant_hist #(.CNT_W(CNT_W)) u_hist_eq (
    .clk, .rst_n, .clear(hist_frame), .valid(rx_valid), .code(eq_code),
    .rd_addr(hist_addr), .rd_count(eq_hist),
    .disp_addr, .disp_count(eq_disp)
  );
  quant_hist #(.CNT_W(CNT_W)) u_hist_raw (
    .clk, .rst_n, .clear(hist_frame), .valid(rx_valid), .code(raw_code),
    .rd_addr(hist_addr), .rd_count(raw_hist),
    .disp_addr, .disp_count(raw_disp)
  );

  // ---- video output -------------------------------------------------------------
  video_out #(.CNT_W(CNT_W)) u_video (
    .clk, .rst_n,
    .bit_valid(rx_valid), .eq_bit(rx_bit), .raw_bit(rx_raw),
    .hist_addr(disp_addr), .eq_count(eq_disp), .raw_count(raw_disp),
    .frame_start,
    .pix_en(vga_pix_en), .rgb(vga_rgb), .hsync(vga_hsync), .vsync(vga_vsync),
    .blank_n(vga_blank_n)
  );

endmodule
