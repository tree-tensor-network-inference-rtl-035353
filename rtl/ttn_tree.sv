// ttn_tree: the whole Tree Tensor Network contraction.
//
// N feature vectors of dimension D0 enter at the leaves; layer i (1..L,
// L = log2(N)) holds N/2^i nodes turning dimension X_{i-1} into X_i, with the
// bond dimensions derived from X0 by the rule XMODE (ttn_pkg::layer_dim) and
// X_L = O at the root. The root's O-component vector is the classification
// result. Weights arrive as one flat static vector, layer after layer, node
// after node (ttn_pkg::weight_offset).
//
// IMPL = IMPL_FP: every layer is a fixed-latency pipeline that takes one
// sample per cycle; the whole tree stalls together while a result waits for
// out_ready. Latency LAT * sum_i (2 + log2(X_{i-1}^2)).
// IMPL = IMPL_PP: layers pass results with valid/ready, so different layers
// work on different samples. Latency LAT * sum_i (X_{i-1}^2 + X_i + 1), one
// sample per slowest layer.
module ttn_tree
  import ttn_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter int unsigned D0    = 2,
  parameter int unsigned X0    = 8,
  parameter int unsigned O     = 1,
  parameter xmode_e      XMODE = XMODE_MINIMAL,
  parameter impl_e       IMPL  = IMPL_FP,
  parameter int unsigned LAT   = 4,
  localparam int unsigned NW   = total_weights(N, D0, X0, O, XMODE)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  fx_t  phi [N][D0],
  input  fx_t  w   [NW],
  output logic out_valid,
  input  logic out_ready,
  output fx_t  result [O]
);
  localparam int unsigned L = num_layers(N);

  logic adv;  // full parallel: whole-tree advance
  logic [L:0] vld, rdy;

  assign adv = !out_valid || out_ready;

  for (genvar i = 1; i <= int'(L); i++) begin : g_layer
    localparam int unsigned NODES = N >> i;
    localparam int unsigned DIN   = layer_dim(i - 1, N, D0, X0, O, XMODE);
    localparam int unsigned DOUT  = layer_dim(i, N, D0, X0, O, XMODE);
    localparam int unsigned WOFF  = weight_offset(i, N, D0, X0, O, XMODE);
    localparam int unsigned NWL   = NODES * DOUT * DIN * DIN;

    fx_t vin  [2*NODES][DIN];
    fx_t vout [NODES][DOUT];
    fx_t wl   [NWL];

    for (genvar k = 0; k < int'(NWL); k++) begin : g_w
      assign wl[k] = w[WOFF + k];
    end

    if (i == 1) begin : g_leaf
      assign vin = phi;
    end else begin : g_inner
      assign vin = g_layer[i-1].vout;
    end

    ttn_layer #(.NODES(NODES), .DIN(DIN), .DOUT(DOUT), .LAT(LAT), .IMPL(IMPL)) u_layer (
      .clk, .rst_n, .en(adv),
      .in_valid(vld[i-1]), .in_ready(rdy[i-1]),
      .in_vec(vin), .w(wl),
      .out_valid(vld[i]), .out_ready(rdy[i]),
      .out_vec(vout)
    );
  end

  assign vld[0]    = in_valid;
  assign rdy[L]    = out_ready;
  assign in_ready  = (IMPL == IMPL_FP) ? adv : rdy[0];
  assign out_valid = vld[L];
  assign result    = g_layer[L].vout[0];

  initial assert (N == (1 << L) && N >= 2) else $error("ttn_tree: N must be a power of two");
endmodule
