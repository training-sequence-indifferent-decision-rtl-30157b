// tb_pattern_gen: self-checking test of the bit source.
//
// PRBS mode is compared bit for bit with an independent PRBS31 model
// (x^31 + x^28 + 1, eight steps per bit, newest bit taken). Biased mode with
// p_one = 125 must give 46..52% ones over 20000 bits and p_one = 64 about a
// quarter; transition mode with p_flip = 192 must give 72..78% transitions;
// external mode must copy ext_bit. bit_valid must follow en by one clock and
// the bit must not change without en.
// PRBS, biased and transition-heavy training bits follow the design
// description; the PRBS polynomial and the proportions are this design's
// choices.
module tb_pattern_gen;
  import dfe_pkg::*;

  localparam logic [30:0] SEED = 31'h1234_5678;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, ext_bit = 1'b0;
  pattern_mode_e mode = PAT_PRBS;
  logic [7:0] p_one = 8'd125, p_flip = 8'd192;
  logic bit_out, bit_valid;

  pattern_gen #(.SEED(SEED)) dut (.*);

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
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [30:0] model;
  int prbs_bad = 0, valid_bad = 0;

  task automatic strobe(output bit b);
    @(negedge clk);
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    if (!bit_valid) valid_bad++;
    b = bit_out;
  endtask

  initial begin
    bit b, prev;
    int ones, trans;
    model = SEED;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // PRBS against the model
    for (int i = 0; i < 3000; i++) begin
      strobe(b);
      for (int s = 0; s < 8; s++) begin
        model = {model[29:0], model[30] ^ model[27]};
        if (s == 0) prev = model[0];
      end
      if (b != prev) prbs_bad++;
      // idle clock: nothing may change
      @(negedge clk);
      if (bit_valid || bit_out != b) valid_bad++;
    end
    check(prbs_bad == 0, $sformatf("PRBS31 sequence (%0d mismatches)", prbs_bad));
    // biased
    mode = PAT_BIASED;
    ones = 0;
    for (int i = 0; i < 20000; i++) begin strobe(b); ones += b; end
    $display("p_one=125: %0d ones of 20000", ones);
    check(ones > 9200 && ones < 10400, "biased 49/51 split");
    p_one = 8'd64;
    ones = 0;
    for (int i = 0; i < 20000; i++) begin strobe(b); ones += b; end
    check(ones > 4500 && ones < 5500, "biased one in four");
    // transitions
    mode = PAT_TRANS;
    trans = 0;
    strobe(prev);
    for (int i = 0; i < 20000; i++) begin
      strobe(b);
      trans += (b != prev);
      prev = b;
    end
    $display("p_flip=192: %0d transitions of 20000", trans);
    check(trans > 14400 && trans < 15600, "transition-heavy sequence");
    // external
    mode = PAT_EXT;
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < 200; i++) begin
        bit e;
        e = $urandom % 2;
        ext_bit = e;
        strobe(b);
        if (b != e) bad++;
      end
      check(bad == 0, "external bits passed through");
    end
    check(valid_bad == 0, $sformatf("bit_valid timing (%0d bad)", valid_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
