// ttn_pkg: types, constants and elaboration-time functions shared by the
// Tree Tensor Network (TTN) inference engine.
//
// Every value in the datapath is a 16-bit signed fixed-point number with
// 1 sign bit, 1 integer bit and 14 fraction bits (range [-2, +2), step
// 2^-14 = 6.1e-5), as the design prescribes. The functions below derive the
// shape of the tree from four numbers (features N, input dimension D0, bond
// dimension X0, output dimension O) and one of three bond-dimension rules:
//   fixed   : X_i = X0
//   minimal : X_i = min(X0, D0^(2^i))
//   maximal : X_i = D0^(2^i)
// with X_0 = D0 for the leaves and X_L = O for the root, L = log2(N).
// Rounding of products (floor, then saturation) and the order of weights in
// the weight memory are this implementation's choices.
package ttn_pkg;

  localparam int unsigned DW   = 16;  // data width of every value
  localparam int unsigned FRAC = 14;  // fraction bits

  typedef logic signed [DW-1:0] fx_t;

  // Degree of parallelism of the node contraction.
  typedef enum logic {IMPL_FP = 1'b0, IMPL_PP = 1'b1} impl_e;
  // Rule that derives the inner bond dimensions from X0.
  typedef enum logic [1:0] {XMODE_FIXED = 2'd0, XMODE_MINIMAL = 2'd1, XMODE_MAXIMAL = 2'd2} xmode_e;

  localparam fx_t FX_MAX = 16'sh7fff;
  localparam fx_t FX_MIN = -16'sh8000;

  // Saturate a wide signed value to 16 bits.
  function automatic fx_t sat_fx(input logic signed [63:0] v);
    if (v > 64'(FX_MAX)) return FX_MAX;
    if (v < 64'(FX_MIN)) return FX_MIN;
    return fx_t'(v);
  endfunction

  // Fixed-point product: full 32-bit product, floor-shifted by FRAC, saturated.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [2*DW-1:0] p;
    p = a * b;
    return sat_fx(64'(p >>> FRAC));
  endfunction

  function automatic int unsigned num_layers(input int unsigned n);
    return $clog2(n);
  endfunction

  // Bond dimension X_i of layer i (i = 0 are the leaves, i = L the root).
  function automatic int unsigned layer_dim(input int unsigned i, input int unsigned n,
                                            input int unsigned d0, input int unsigned x0,
                                            input int unsigned o, input xmode_e mode);
    int unsigned pw;
    if (i == 0) return d0;
    if (i >= num_layers(n)) return o;
    pw = d0;
    for (int unsigned k = 0; k < i; k++) begin
      if (pw > 65536) break;
      pw = pw * pw;               // D0^(2^i)
    end
    case (mode)
      XMODE_FIXED:   return x0;
      XMODE_MINIMAL: return (x0 < pw) ? x0 : pw;
      default:       return pw;
    endcase
  endfunction

  // Number of weights of layer i (1..L): N/2^i nodes of X_{i-1}^2 * X_i weights.
  function automatic int unsigned layer_weights(input int unsigned i, input int unsigned n,
                                                input int unsigned d0, input int unsigned x0,
                                                input int unsigned o, input xmode_e mode);
    int unsigned xin;
    xin = layer_dim(i - 1, n, d0, x0, o, mode);
    return (n >> i) * xin * xin * layer_dim(i, n, d0, x0, o, mode);
  endfunction

  // Offset of the first weight of layer i in the weight memory.
  function automatic int unsigned weight_offset(input int unsigned i, input int unsigned n,
                                                input int unsigned d0, input int unsigned x0,
                                                input int unsigned o, input xmode_e mode);
    int unsigned s;
    s = 0;
    for (int unsigned k = 1; k < i; k++) s += layer_weights(k, n, d0, x0, o, mode);
    return s;
  endfunction

  function automatic int unsigned total_weights(input int unsigned n, input int unsigned d0,
                                                input int unsigned x0, input int unsigned o,
                                                input xmode_e mode);
    return weight_offset(num_layers(n) + 1, n, d0, x0, o, mode);
  endfunction

  // Latency of the tree in clock cycles, from the cycle a sample is accepted
  // to the cycle its result is valid.
  //   full parallel   : dt * sum_i (2 + log2(X_{i-1}^2))
  //   partial parallel: dt * sum_i (X_{i-1}^2 + X_i + 1)
  function automatic int unsigned tree_latency(input impl_e impl, input int unsigned dt,
                                               input int unsigned n, input int unsigned d0,
                                               input int unsigned x0, input int unsigned o,
                                               input xmode_e mode);
    int unsigned s, xin, xout;
    s = 0;
    for (int unsigned i = 1; i <= num_layers(n); i++) begin
      xin  = layer_dim(i - 1, n, d0, x0, o, mode);
      xout = layer_dim(i, n, d0, x0, o, mode);
      if (impl == IMPL_FP) s += 2 + $clog2(xin * xin);
      else                 s += xin * xin + xout + 1;
    end
    return dt * s;
  endfunction

endpackage
