// feature_map: encodes each input feature as a two-component state.
//
// Feature x_i (already rescaled to an angle in [0, pi/2] by the host,
// 16-bit fixed point with 14 fraction bits) becomes
// phi_i = [cos(x_i), sin(x_i)], each a 16-bit fixed-point value in [0, 1].
// Every feature has its own cosine and sine ROM (trig_rom), 2N ROMs in all,
// so a whole sample is mapped per cycle with the ROMs' two-cycle latency.
// en stalls the ROMs and the valid pipeline together.
module feature_map
  import ttn_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic in_valid,
  input  fx_t  feat [N],
  output logic out_valid,
  output fx_t  phi  [N][2]
);
  for (genvar i = 0; i < int'(N); i++) begin : g_feat
    trig_rom #(.AW(16), .FUNC(1'b0)) u_cos (.clk, .en, .addr(feat[i]), .dout(phi[i][0]));
    trig_rom #(.AW(16), .FUNC(1'b1)) u_sin (.clk, .en, .addr(feat[i]), .dout(phi[i][1]));
  end

  pipe_delay #(.W(1), .STAGES(2)) u_valid (
    .clk, .rst_n, .en, .d(in_valid), .q(out_valid)
  );
endmodule
