// tb_video_out: self-checking test of the VGA output stage.
//
// Two random bit streams (199 998 bits each, one per clock) are written into
// the picture buffers; a reference model packs them three bits to a pixel
// (first bit red) row-major into 300x200 pixels with wrap-around. The
// histogram inputs answer each bin address with a known count, so every bar
// height is known. The second displayed frame is then compared pixel by
// pixel with the reference: sync pulses at the 640x480 positions (hsync at
// pixels 656..751, vsync at lines 490..491, active low), blanking, the two
// picture tiles, the two bar-chart tiles and black elsewhere; frame_start
// must pulse once per frame, at the first pixel of vertical sync.
// The 300x200 tiles and 3-bit colour follow the design description; the
// screen mode, the layout, the colour order and the bar scaling are this
// design's choices.
module tb_video_out;
  import dfe_pkg::*;

  localparam int H_TOT = 800, V_TOT = 525;
  localparam int TW = 300, TH = 200, X0 = 10, X1 = 330, Y0 = 30, Y1 = 250;
  localparam int NPIX = TW * TH;

  logic clk = 1'b0, rst_n = 1'b0;
  logic bit_valid = 1'b0, eq_bit = 1'b0, raw_bit = 1'b0;
  logic [SAMPLE_W-1:0] hist_addr;
  logic [17:0] eq_count, raw_count;
  logic frame_start, pix_en, hsync, vsync, blank_n;
  logic [2:0] rgb;

  video_out dut (.*);

  // known histogram: bar heights 3*bin and 3*(31-bin) pixels
  assign eq_count  = 18'(int'(hist_addr) * 3 * 512 + 100);
  assign raw_count = 18'((31 - int'(hist_addr)) * 3 * 512 + 100);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #40_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] ref_eq [NPIX];
  logic [2:0] ref_raw [NPIX];

  // bit streams
  initial begin
    int nb;
    nb = 0;
    for (int i = 0; i < NPIX; i++) begin ref_eq[i] = 3'd0; ref_raw[i] = 3'd0; end
    @(posedge rst_n);
    repeat (199998) begin
      int p;
      @(negedge clk);
      bit_valid = 1'b1;
      eq_bit  = $urandom % 2;
      raw_bit = $urandom % 2;
      p = (nb / 3) % NPIX;
      ref_eq[p][2 - nb % 3]  = eq_bit;
      ref_raw[p][2 - nb % 3] = raw_bit;
      nb++;
    end
    @(negedge clk);
    bit_valid = 1'b0;
  end

  function automatic logic [2:0] expect_rgb(input int h, input int v);
    bit l, r, t, b;
    int tx, ty, bin, ht;
    l = h >= X0 && h < X0 + TW;
    r = h >= X1 && h < X1 + TW;
    t = v >= Y0 && v < Y0 + TH;
    b = v >= Y1 && v < Y1 + TH;
    tx = r ? h - X1 : h - X0;
    ty = b ? v - Y1 : v - Y0;
    bin = tx / 9;
    if (l && t) return ref_eq[ty * TW + tx];
    if (l && b) return ref_raw[ty * TW + tx];
    if (r && (t || b)) begin
      if (bin > 31) return 3'b000;
      ht = t ? 3 * (bin % 32) : 3 * (31 - bin % 32);
      return (TH - 1 - ty < ht) ? 3'b111 : 3'b000;
    end
    return 3'b000;
  endfunction

  initial begin
    int k, h, v, frames, lit;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    k = 0; frames = 0; lit = 0;
    while (k < 2 * H_TOT * V_TOT) begin
      @(posedge clk iff pix_en);
      #1;
      h = k % H_TOT;
      v = (k / H_TOT) % V_TOT;
      check(frame_start == (h == 0 && v == 490), "frame_start position");
      if (frame_start) frames++;
      if (k >= H_TOT * V_TOT) begin
        check(hsync == !(h >= 656 && h < 752), $sformatf("hsync at %0d,%0d", h, v));
        check(vsync == !(v >= 490 && v < 492), $sformatf("vsync at %0d,%0d", h, v));
        check(blank_n == (h < 640 && v < 480), $sformatf("blank at %0d,%0d", h, v));
        check(rgb == expect_rgb(h, v),
              $sformatf("pixel %0d,%0d: %0d expected %0d", h, v, rgb, expect_rgb(h, v)));
        if (rgb != 0) lit++;
      end
      k++;
    end
    check(frames == 2, $sformatf("two frame starts (%0d)", frames));
    check(lit > 50000, "picture content visible");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
