// tb_isi_channel: self-checking test of the simulated ISI channel.
//
// Random bits with random noise and valid gaps go through the channel with
// its default pulse response and with an overriding one that drives the
// output into both clip limits. A reference FIR in the testbench (real
// arithmetic, round half up, clip to 0..31) gives the expected code one
// clock after each valid bit.
// A simulated ISI channel in front of the receiver follows the design
// description; the pulse response and the rounding are this design's choices.
module tb_isi_channel;
  import dfe_pkg::*;

  localparam int HA [6] = '{96, 40, 24, 14, 8, 4};
  localparam int HB [4] = '{200, -120, 60, 30};

  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0, bit_in = 1'b0;
  logic signed [7:0] noise = '0;
  logic [SAMPLE_W-1:0] sa, sb;
  logic va, vb;

  isi_channel dut_a (.clk, .rst_n, .valid, .bit_in, .noise, .sample(sa), .sample_valid(va));
  isi_channel #(.NH(4), .H(HB), .MID(15)) dut_b (
    .clk, .rst_n, .valid, .bit_in, .noise, .sample(sb), .sample_valid(vb));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit hist [6];

  function automatic int expect_code(input int mid, input int nh, input int sel, input int nz);
    real y;
    int c;
    y = real'(mid) + real'(nz) / 16.0;
    for (int j = 0; j < nh; j++) begin
      int h;
      h = sel ? HB[j] : HA[j];
      y += (hist[j] ? 1.0 : -1.0) * real'(h) / 16.0;
    end
    c = $rtoi($floor(y + 0.5));
    return (c < 0) ? 0 : (c > 31) ? 31 : c;
  endfunction

  int ea, eb, lows = 0, highs = 0;

  initial begin
    for (int j = 0; j < 6; j++) hist[j] = 0;
    ea = 0; eb = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2000) begin
      bit v;
      @(negedge clk);
      v = ($urandom % 4) != 0;
      valid  = v;
      bit_in = $urandom % 2;
      noise  = 8'(int'($urandom % 65) - 32);
      if (v) begin
        for (int j = 5; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = bit_in;
        ea = expect_code(16, 6, 0, int'(noise));
        eb = expect_code(15, 4, 1, int'(noise));
      end
      @(posedge clk);
      #1;
      check(va == v && vb == v, "sample_valid follows valid");
      if (v) begin
        check(int'(sa) == ea, $sformatf("default channel %0d expected %0d", sa, ea));
        check(int'(sb) == eb, $sformatf("second channel %0d expected %0d", sb, eb));
        if (sb == 0) lows++;
        if (sb == 31) highs++;
      end
    end
    check(lows > 0 && highs > 0, "both clip limits reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
