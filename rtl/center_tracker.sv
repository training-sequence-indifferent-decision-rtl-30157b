// center_tracker: the "centre point" register of tap 1.
//
// Tracks the 50% point of the received samples: the level that half of the
// samples lie above and half below (a running median). On every valid sample
// taken while adaptation is enabled, the register steps up by STEP when the
// sample is above it and down by STEP when the sample is below it, so it
// settles where ups and downs balance and keeps following slow drift for as
// long as training continues. With adapt low the register holds.
//
// Interface: sample is a SAMPLE_W-bit unsigned code, center is the same code
// with FRAC fractional bits appended (unsigned). The register updates on the
// clock edge of a valid sample; center is the registered value.
// That tap 1 finds the 50% point and keeps adjusting it during training is
// from the design description; the sign-step update, the step size and the
// mid-scale reset value are this implementation's choices.
module center_tracker
  import dfe_pkg::*;
#(
  parameter int unsigned STEP = 1   // step in units of 2**-FRAC code
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      valid,
  input  logic                      adapt,
  input  logic [SAMPLE_W-1:0]       sample,
  output logic [SAMPLE_W+FRAC-1:0]  center
);

  localparam int unsigned CW = SAMPLE_W + FRAC;
  localparam logic [CW-1:0] MID  = CW'(1) << (CW-1);
  localparam logic [CW-1:0] CMAX = '1;

  logic [CW-1:0] s_fx;
  assign s_fx = {sample, {FRAC{1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      center <= MID;
    end else if (valid && adapt) begin
      if (s_fx > center) begin
        if (center <= CMAX - CW'(STEP)) center <= center + CW'(STEP);
        else                            center <= CMAX;
      end else if (s_fx < center) begin
        if (center >= CW'(STEP)) center <= center - CW'(STEP);
        else                     center <= '0;
      end
    end
  end

endmodule
