// tb_sd_adc_if: self-checking test of the sigma-delta input interface with a
// behavioural model of the analog loop.
//
// Checks that dac_out is the comparator bit one clock later, that
// sample_valid pulses exactly once every 8 clocks, that steady inputs at a
// range of levels give the expected code (level/32 of full scale -> code =
// level, within one code, with full scale clipped to 31), and that a slow
// ramp of input levels is followed monotonically within two codes.
// The 8x oversampling and 5-bit samples follow the design description; the
// decimator, the code scaling and the tolerances are this design's choices.
module tb_sd_adc_if;
  import dfe_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cmp, dac;
  logic [SAMPLE_W-1:0] sample;
  logic sample_valid;
  real u = 0.0;

  sd_loop_model u_loop (.clk, .u, .dac_in(dac), .cmp_out(cmp));
  sd_adc_if dut (.clk, .rst_n, .cmp_in(cmp), .dac_out(dac), .sample, .sample_valid);

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
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // dac_out follows the comparator by one clock; valid period is 8
  logic cmp_q = 1'b0;
  int   since = 0, period_bad = 0, dac_bad = 0, nvalid = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      if (dac != cmp_q) dac_bad++;
      if (sample_valid) begin
        if (nvalid > 0 && since != 8) period_bad++;
        nvalid++;
        since = 1;
      end else since++;
    end
  end
  always @(posedge clk) cmp_q <= cmp;

  task automatic settle_and_read(input int level, output int code);
    u = real'(level) / 16.0 - 1.0;
    repeat (8 * 20) @(posedge clk);
    code = 0;
    // average of 8 decimated samples
    for (int i = 0; i < 8; i++) begin
      @(posedge clk iff sample_valid);
      #1 code += int'(sample);
    end
    code = (code + 4) / 8;
  endtask

  initial begin
    int c, prev;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int level = 4; level <= 28; level += 3) begin
      settle_and_read(level, c);
      check(c >= level - 1 && c <= level + 1, $sformatf("level %0d gives code %0d", level, c));
    end
    // ramp
    prev = 0;
    for (int level = 6; level <= 26; level++) begin
      settle_and_read(level, c);
      check(c + 2 >= prev, $sformatf("ramp monotonic at %0d (%0d after %0d)", level, c, prev));
      prev = c;
    end
    check(dac_bad == 0, $sformatf("DAC bit follows comparator (%0d bad)", dac_bad));
    check(period_bad == 0 && nvalid > 100, $sformatf("decimation by 8 (%0d bad)", period_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
