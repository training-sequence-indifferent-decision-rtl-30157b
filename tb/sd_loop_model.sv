// sd_loop_model: behavioural model of the analog half of the sigma-delta
// converter (loop filter and comparator), for simulation only.
//
// A discrete-time second-order loop: on every clock the two integrators take
// i1 += 0.5*(u - fb) and i2 += 0.5*(i1 - fb), where fb = +1 or -1 is the
// 1-bit DAC level the FPGA drives back (dac_in), and cmp_out = (i2 >= 0) is
// the comparator output the FPGA samples. u is the analog input in the range
// -1..+1 (about +-0.8 is usable before the loop overloads). The real part is
// a continuous-time RC circuit; this model only reproduces its bit density
// and second-order noise shaping.
// The second-order loop with a 1-bit DAC follows the design description;
// the integrator gains and the discrete-time form are this model's choices.
module sd_loop_model (
  input  logic clk,
  input  real  u,
  input  logic dac_in,
  output logic cmp_out
);

  real i1 = 0.0, i2 = 0.0;

  always @(posedge clk) begin
    real fb;
    fb = dac_in ? 1.0 : -1.0;
    i2 = i2 + 0.5 * (i1 - fb);
    i1 = i1 + 0.5 * (u - fb);
  end

  assign cmp_out = (i2 >= 0.0);

endmodule
