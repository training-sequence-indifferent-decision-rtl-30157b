// tb_quant_hist: self-checking test of the quantization histogram.
//
// Random codes with random valid gaps are counted by a reference array;
// every bin is read back through the read port and compared, clear must
// empty all bins (dropping a sample in the same clock) and copy the counts it
// ends to the display port, and an 8-bit instance must saturate at 255
// rather than wrap.
// Histograms of the quantized samples follow the design description; the
// counter width, saturation and the display copy are this design's choices.
module tb_quant_hist;
  import dfe_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, valid = 1'b0;
  logic [SAMPLE_W-1:0] code = '0, rd_addr = '0;
  logic [17:0] rd_count, disp_count;
  logic [7:0]  rd_small, disp_small;
  logic [SAMPLE_W-1:0] disp_addr = '0;

  quant_hist dut (.*);
  quant_hist #(.CNT_W(8)) dut_small (.clk, .rst_n, .clear, .valid, .code, .rd_addr,
                                     .rd_count(rd_small), .disp_addr,
                                     .disp_count(disp_small));

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

  int ref_h [32];
  int ref_d [32];

  task automatic read_disp(input string tag);
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      disp_addr = SAMPLE_W'(i);
      #1;
      check(int'(disp_count) == ref_d[i], $sformatf("%s display bin %0d: %0d expected %0d", tag, i, disp_count, ref_d[i]));
      check(int'(disp_small) == ((ref_d[i] > 255) ? 255 : ref_d[i]), $sformatf("%s small display bin %0d", tag, i));
    end
  endtask

  task automatic read_all(input string tag);
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      rd_addr = SAMPLE_W'(i);
      #1;
      check(int'(rd_count) == ref_h[i], $sformatf("%s bin %0d: %0d expected %0d", tag, i, rd_count, ref_h[i]));
      check(int'(rd_small) == ((ref_h[i] > 255) ? 255 : ref_h[i]), $sformatf("%s small bin %0d", tag, i));
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) begin ref_h[i] = 0; ref_d[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3000) begin
      @(negedge clk);
      valid = ($urandom % 3) != 0;
      code  = ($urandom % 2) ? SAMPLE_W'(12 + $urandom % 3) : SAMPLE_W'($urandom);
      if (valid) ref_h[code]++;
    end
    @(negedge clk);
    valid = 1'b0;
    read_all("first");
    // clear with a simultaneous sample
    @(negedge clk);
    clear = 1'b1; valid = 1'b1; code = 5'd7;
    @(negedge clk);
    clear = 1'b0; valid = 1'b0;
    for (int i = 0; i < 32; i++) begin ref_d[i] = ref_h[i]; ref_h[i] = 0; end
    read_all("cleared");
    read_disp("after clear");
    repeat (500) begin
      @(negedge clk);
      valid = 1'b1;
      code  = SAMPLE_W'($urandom % 4);
      ref_h[code]++;
    end
    @(negedge clk);
    valid = 1'b0;
    read_all("second");
    read_disp("kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
