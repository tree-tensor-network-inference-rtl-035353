// dsp_mult: one DSP-slice multiplier of the TTN datapath.
//
// Multiplies two 16-bit fixed-point values (1 sign, 1 integer, 14 fraction
// bits) and returns the product in the same format: the full 32-bit product
// is shifted right by 14 (floor) and saturated to [-2, 2). The product goes
// through LAT pipeline registers, so p is valid LAT enabled cycles after a
// and b. The DSP latency LAT is the dt_DSP of the design's latency formulas;
// its default of 4 is the value the published tree latencies imply
// (64 cycles for the N=8 full-parallel tree = 4 * 16). Rounding and
// saturation are this implementation's choice.
module dsp_mult
  import ttn_pkg::*;
#(
  parameter int unsigned LAT = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  fx_t  a,
  input  fx_t  b,
  output fx_t  p
);
  fx_t prod;
  assign prod = fx_mul(a, b);

  pipe_delay #(.W(DW), .STAGES(LAT)) u_pipe (
    .clk, .rst_n, .en, .d(prod), .q(p)
  );

  initial assert (LAT >= 1) else $error("dsp_mult: LAT must be at least 1");
endmodule
