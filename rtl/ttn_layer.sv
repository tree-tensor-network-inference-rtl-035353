// ttn_layer: one layer of the tree, NODES nodes side by side.
//
// Node j contracts input vectors 2j and 2j+1 of the layer below with its
// own weight tensor and produces output vector j, so a layer halves the
// number of vectors and turns dimension DIN into DOUT. IMPL selects the
// full-parallel node (node_fp: one vector pair per cycle, stalled by en) or
// the partial-parallel node (node_pp: valid/ready handshake). All nodes of a
// layer see the same control and stay in step, so the layer's handshake is
// that of its nodes; with full-parallel nodes out_ready is not used (the
// tree stalls through en instead). Node j uses weights w[j*DOUT*DIN*DIN +: DOUT*DIN*DIN].
module ttn_layer
  import ttn_pkg::*;
#(
  parameter int unsigned NODES = 4,
  parameter int unsigned DIN   = 2,
  parameter int unsigned DOUT  = 4,
  parameter int unsigned LAT   = 4,
  parameter impl_e       IMPL  = IMPL_FP
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,         // full parallel: pipeline advance
  input  logic in_valid,
  output logic in_ready,   // partial parallel only; always 1 for full parallel
  input  fx_t  in_vec  [2*NODES][DIN],
  input  fx_t  w       [NODES*DOUT*DIN*DIN],
  output logic out_valid,
  input  logic out_ready,  // partial parallel only
  output fx_t  out_vec [NODES][DOUT]
);
  localparam int unsigned NWN = DOUT * DIN * DIN;  // weights per node

  logic [NODES-1:0] n_in_ready, n_out_valid;

  for (genvar j = 0; j < int'(NODES); j++) begin : g_node
    fx_t wn [NWN];
    for (genvar i = 0; i < int'(NWN); i++) begin : g_w
      assign wn[i] = w[j*NWN + i];
    end
    if (IMPL == IMPL_FP) begin : g_fp
      node_fp #(.DIN(DIN), .DOUT(DOUT), .LAT(LAT)) u_node (
        .clk, .rst_n, .en, .in_valid,
        .x(in_vec[2*j]), .y(in_vec[2*j+1]), .w(wn),
        .out_valid(n_out_valid[j]), .z(out_vec[j])
      );
      assign n_in_ready[j] = 1'b1;
    end else begin : g_pp
      node_pp #(.DIN(DIN), .DOUT(DOUT), .LAT(LAT)) u_node (
        .clk, .rst_n, .in_valid, .in_ready(n_in_ready[j]),
        .x(in_vec[2*j]), .y(in_vec[2*j+1]), .w(wn),
        .out_valid(n_out_valid[j]), .out_ready, .z(out_vec[j])
      );
    end
  end

  assign in_ready  = &n_in_ready;
  assign out_valid = &n_out_valid;
endmodule
