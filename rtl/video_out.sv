// video_out: VGA output stage showing the received data as pictures and the
// sample histograms as bar charts.
//
// Four 300x200 tiles on a 640x480 screen:
//   top left     picture from the equalized bits      top right    histogram of equalized samples
//   bottom left  picture from the unequalized bits    bottom right histogram of unequalized samples
// Pictures: every 3 consecutive received bits form one pixel (first bit red,
// then green, then blue; 3-bit colour). Pixels fill a 300x200 frame buffer in
// row-major order and wrap after 60000 pixels; there is one buffer per
// stream, written in the symbol clock domain (bit_valid) and read at the
// pixel rate.
// Histograms: 32 bins drawn 9 pixels wide from the left edge of the tile,
// bar height = count >> HSHIFT pixels (clipped to 200), in white.
//
// Timing: one clock; the pixel rate is clk / PIX_DIV (80 MHz / 3 = 26.7 MHz,
// 800 x 525 totals, so about 63.5 frames per second). frame_start pulses for
// one clock when vertical sync begins; the histograms use it to latch the
// frame's counts for display and start counting the next frame. rgb, hsync,
// vsync (active low) and blank_n are registered together and change on
// pix_en. hist_addr selects the bin whose count must be on eq_count and
// raw_count; they are sampled in the clock after hist_addr changes.
// The tile size, the 3-bit colour and the set of pictures and histograms
// follow the design description (without its 2-tap comparison equalizer);
// the screen mode, the tile layout, the bit-to-colour order and the bar
// scaling are this implementation's choices.
module video_out
  import dfe_pkg::*;
#(
  parameter int unsigned PIX_DIV = 3,
  parameter int unsigned CNT_W   = 18,
  parameter int unsigned HSHIFT  = 9
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // received bit streams
  input  logic                 bit_valid,
  input  logic                 eq_bit,
  input  logic                 raw_bit,
  // histogram counts of the previous frame
  output logic [SAMPLE_W-1:0]  hist_addr,
  input  logic [CNT_W-1:0]     eq_count,
  input  logic [CNT_W-1:0]     raw_count,
  output logic                 frame_start,
  // VGA
  output logic                 pix_en,
  output logic [2:0]           rgb,
  output logic                 hsync,
  output logic                 vsync,
  output logic                 blank_n
);

  // 640x480 timing, in pixels and lines
  localparam int unsigned H_VIS = 640, H_FP = 16, H_SY = 96, H_BP = 48;
  localparam int unsigned V_VIS = 480, V_FP = 10, V_SY = 2,  V_BP = 33;
  localparam int unsigned H_TOT = H_VIS + H_FP + H_SY + H_BP;
  localparam int unsigned V_TOT = V_VIS + V_FP + V_SY + V_BP;
  // tiles
  localparam int unsigned TW = 300, TH = 200;
  localparam int unsigned X0 = 10, X1 = 330, Y0 = 30, Y1 = 250;
  localparam int unsigned NPIX = TW * TH;
  localparam int unsigned AW = $clog2(NPIX);
  localparam int unsigned BIN_W = 9;

  // the frame-buffer read needs one clock between pixels
  if (PIX_DIV < 2) begin : g_pix_div_check
    $error("video_out: PIX_DIV must be at least 2");
  end

  // ---- write side: pack 3 bits per pixel ---------------------------------------
  logic [1:0]    nbits;
  logic [1:0]    eq_acc, raw_acc;
  logic [AW-1:0] wr_addr;
  logic [2:0]    fb_eq  [NPIX];
  logic [2:0]    fb_raw [NPIX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nbits   <= '0;
      eq_acc  <= '0;
      raw_acc <= '0;
      wr_addr <= '0;
    end else if (bit_valid) begin
      if (nbits == 2'd2) begin
        nbits   <= '0;
        wr_addr <= (wr_addr == AW'(NPIX - 1)) ? '0 : wr_addr + 1'b1;
      end else begin
        nbits <= nbits + 1'b1;
      end
      eq_acc  <= {eq_acc[0], eq_bit};
      raw_acc <= {raw_acc[0], raw_bit};
    end
  end

  // frame buffers: plain write port, no reset (contents are picture data)
  always_ff @(posedge clk) begin
    if (bit_valid && nbits == 2'd2) begin
      fb_eq[wr_addr]  <= {eq_acc, eq_bit};
      fb_raw[wr_addr] <= {raw_acc, raw_bit};
    end
  end

  // ---- raster counters ---------------------------------------------------------
  logic [$clog2(PIX_DIV)-1:0] div;
  logic [9:0] hc, vc;

  assign pix_en = (div == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0;
      hc  <= '0;
      vc  <= '0;
    end else begin
      div <= (div == ($clog2(PIX_DIV))'(PIX_DIV - 1)) ? '0 : div + 1'b1;
      if (pix_en) begin
        if (hc == 10'(H_TOT - 1)) begin
          hc <= '0;
          vc <= (vc == 10'(V_TOT - 1)) ? '0 : vc + 1'b1;
        end else begin
          hc <= hc + 1'b1;
        end
      end
    end
  end

  // ---- where the current pixel lies -------------------------------------------------
  logic       in_l, in_r, in_t, in_b;
  logic [9:0] tx, ty;
  always_comb begin
    in_l = (hc >= 10'(X0)) && (hc < 10'(X0 + TW));
    in_r = (hc >= 10'(X1)) && (hc < 10'(X1 + TW));
    in_t = (vc >= 10'(Y0)) && (vc < 10'(Y0 + TH));
    in_b = (vc >= 10'(Y1)) && (vc < 10'(Y1 + TH));
    tx   = in_r ? hc - 10'(X1) : hc - 10'(X0);
    ty   = in_b ? vc - 10'(Y1) : vc - 10'(Y0);
  end

  // frame-buffer read, one clock after the counters settle (PIX_DIV >= 2)
  logic [AW-1:0] rd_addr;
  logic [2:0]    q_eq, q_raw;
  assign rd_addr = AW'(ty) * AW'(TW) + AW'(tx);

  always_ff @(posedge clk) begin
    q_eq  <= fb_eq[rd_addr];
    q_raw <= fb_raw[rd_addr];
  end

  // histogram bin of this column and bar test
  logic [9:0] bin;
  assign bin       = tx / 10'(BIN_W);
  assign hist_addr = SAMPLE_W'(bin);

  logic [CNT_W-1:0] eq_c, raw_c;
  always_ff @(posedge clk) begin
    eq_c  <= eq_count;
    raw_c <= raw_count;
  end

  function automatic logic bar(input logic [CNT_W-1:0] c, input logic [9:0] row,
                               input logic [9:0] b);
    logic [CNT_W-1:0] h;
    h = c >> HSHIFT;
    return (b < 10'(1 << SAMPLE_W)) && (CNT_W'(TH - 1) - CNT_W'(row) < h);
  endfunction

  // ---- pixel output ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rgb         <= '0;
      hsync       <= 1'b1;
      vsync       <= 1'b1;
      blank_n     <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      frame_start <= 1'b0;
      if (pix_en) begin
        hsync   <= !((hc >= 10'(H_VIS + H_FP)) && (hc < 10'(H_VIS + H_FP + H_SY)));
        vsync   <= !((vc >= 10'(V_VIS + V_FP)) && (vc < 10'(V_VIS + V_FP + V_SY)));
        blank_n <= (hc < 10'(H_VIS)) && (vc < 10'(V_VIS));
        frame_start <= (hc == '0) && (vc == 10'(V_VIS + V_FP));
        if (in_l && in_t)      rgb <= q_eq;
        else if (in_l && in_b) rgb <= q_raw;
        else if (in_r && in_t) rgb <= bar(eq_c, ty, bin)  ? 3'b111 : 3'b000;
        else if (in_r && in_b) rgb <= bar(raw_c, ty, bin) ? 3'b111 : 3'b000;
        else                   rgb <= 3'b000;
      end
    end
  end

endmodule
