// ttn_ref_pkg: reference model of the TTN arithmetic for the testbenches.
//
// Written with plain integer arithmetic, independently of the RTL: a product
// of two 16-bit fixed-point values (14 fraction bits) is the exact product
// divided by 2^14 and rounded towards minus infinity, then clamped to
// [-32768, 32767]; a node sums its DIN^2 weighted products exactly and clamps
// the sum once. Vectors are int queues.
package ttn_ref_pkg;

  function automatic int clamp16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic longint floor_div(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  function automatic int ref_mul(input int a, input int b);
    return clamp16(floor_div(longint'(a) * longint'(b), 16384));
  endfunction

  typedef int ivec_t[$];

  // z[mu] = sum_{nu,rho} w[(mu*din+nu)*din+rho] * x[nu] * y[rho]
  function automatic ivec_t ref_node(input ivec_t x, input ivec_t y, input ivec_t w,
                                     input int din, input int dout);
    ivec_t  z;
    longint s;
    for (int mu = 0; mu < dout; mu++) begin
      s = 0;
      for (int nu = 0; nu < din; nu++)
        for (int rho = 0; rho < din; rho++)
          s += ref_mul(ref_mul(x[nu], y[rho]), w[(mu*din + nu)*din + rho]);
      z.push_back(clamp16(s));
    end
    return z;
  endfunction

  // 16-bit fixed-point value of cos (f = 0) or sin (f = 1) of an angle given
  // as a 16-bit fixed-point number
  function automatic int ref_trig(input int angle, input bit f);
    real a, v;
    a = real'(angle) / 16384.0;
    v = f ? $sin(a) : $cos(a);
    return clamp16(longint'($floor(v * 16384.0 + 0.5)));
  endfunction

  // Whole tree: phi holds the N leaf vectors of dimension D0 one after the
  // other; weights are stored layer after layer, node after node.
  function automatic ivec_t ref_tree(input ivec_t phi, input ivec_t w, input int n,
                                     input int d0, input int x0, input int o,
                                     input ttn_pkg::xmode_e mode);
    ivec_t cur, nxt, x, y, wn, z;
    int    woff, din, dout, nodes;
    cur  = phi;
    woff = 0;
    for (int i = 1; (1 << i) <= n; i++) begin
      din   = int'(ttn_pkg::layer_dim(i - 1, n, d0, x0, o, mode));
      dout  = int'(ttn_pkg::layer_dim(i, n, d0, x0, o, mode));
      nodes = n >> i;
      nxt   = {};
      for (int j = 0; j < nodes; j++) begin
        x = {}; y = {}; wn = {};
        for (int k = 0; k < din; k++) begin
          x.push_back(cur[(2*j)*din + k]);
          y.push_back(cur[(2*j+1)*din + k]);
        end
        for (int k = 0; k < din*din*dout; k++) wn.push_back(w[woff + k]);
        woff += din * din * dout;
        z = ref_node(x, y, wn, din, dout);
        foreach (z[k]) nxt.push_back(z[k]);
      end
      cur = nxt;
    end
    return cur;
  endfunction

endpackage
