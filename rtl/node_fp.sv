// node_fp: full-parallel contraction of one tree node.
//
// Computes z[mu] = sum_{nu,rho} V[mu][nu][rho] * x[nu] * y[rho] for two
// input vectors x, y of dimension DIN and a weight tensor V of dimension
// DIN x DIN x DOUT, in three pipelined stages as the design splits the
// three-factor product:
//   mult1: the DIN^2 products x[nu]*y[rho], one DSP multiplier each;
//   mult2: each of those times its weight, DOUT*DIN^2 DSP multipliers;
//   sum  : DOUT adder trees of log2(DIN^2) levels.
// Every multiplier and every adder level takes LAT cycles, so the node has a
// latency of LAT * (2 + log2(DIN^2)) and accepts a new pair of vectors every
// cycle. en advances the whole pipeline (global stall); in_valid travels
// with the data to out_valid. The weights are static during inference and
// are not pipelined. Weight order, w[(mu*DIN + nu)*DIN + rho], and the final
// saturation of the sum to 16 bits are this implementation's choices.
module node_fp
  import ttn_pkg::*;
#(
  parameter int unsigned DIN  = 2,
  parameter int unsigned DOUT = 4,
  parameter int unsigned LAT  = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic in_valid,
  input  fx_t  x [DIN],
  input  fx_t  y [DIN],
  input  fx_t  w [DOUT*DIN*DIN],
  output logic out_valid,
  output fx_t  z [DOUT]
);
  localparam int unsigned K       = DIN * DIN;
  localparam int unsigned LATENCY = LAT * (2 + $clog2(K));

  fx_t p [K];  // mult1 results

  for (genvar nu = 0; nu < int'(DIN); nu++) begin : g_m1_nu
    for (genvar rho = 0; rho < int'(DIN); rho++) begin : g_m1_rho
      dsp_mult #(.LAT(LAT)) u_m1 (
        .clk, .rst_n, .en, .a(x[nu]), .b(y[rho]), .p(p[nu*DIN+rho])
      );
    end
  end

  for (genvar mu = 0; mu < int'(DOUT); mu++) begin : g_out
    fx_t                q     [K];
    logic signed [31:0] terms [K];
    logic signed [31:0] s;
    for (genvar k = 0; k < int'(K); k++) begin : g_m2
      dsp_mult #(.LAT(LAT)) u_m2 (
        .clk, .rst_n, .en, .a(p[k]), .b(w[mu*K+k]), .p(q[k])
      );
      assign terms[k] = 32'(q[k]);
    end
    adder_tree #(.N_IN(K), .LAT(LAT)) u_sum (
      .clk, .rst_n, .en, .terms, .sum(s)
    );
    assign z[mu] = sat_fx(64'(s));
  end

  pipe_delay #(.W(1), .STAGES(LATENCY)) u_valid (
    .clk, .rst_n, .en, .d(in_valid), .q(out_valid)
  );
endmodule
