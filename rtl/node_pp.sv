// node_pp: partial-parallel contraction of one tree node.
//
// Computes the same z[mu] = sum_{nu,rho} V[mu][nu][rho] * x[nu] * y[rho] as
// node_fp with far fewer multipliers, trading resources for latency:
//   mult1: a single DSP multiplier forms the DIN^2 products x[nu]*y[rho] one
//          after the other; each takes LAT cycles and the next one is issued
//          when the previous result is back;
//   mult2: DIN^2 DSP multipliers scale all products by the weights of one
//          output component mu at a time;
//   sum  : the DIN^2 scaled products of that component are added and the
//          result is stored; the DOUT components are done serially, with
//          mult2 of component mu+1 overlapping the sum of component mu.
// Each step takes LAT cycles, giving a latency of LAT * (DIN^2 + DOUT + 1)
// cycles from the accepting cycle to out_valid, the design's
// partial-parallel formula. The step counts follow the design; the exact
// overlap, the single-cycle sum stage followed by LAT-1 registers and the
// handshake are this implementation's choices.
//
// Handshake: valid/ready. A pair (x, y) is accepted when in_valid and
// in_ready are high; the first product is formed from the input bus in that
// cycle and x, y are stored for the rest. z is held with out_valid high until
// out_ready; a new pair can be accepted in the cycle the result is taken.
module node_pp
  import ttn_pkg::*;
#(
  parameter int unsigned DIN  = 2,
  parameter int unsigned DOUT = 4,
  parameter int unsigned LAT  = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  fx_t  x [DIN],
  input  fx_t  y [DIN],
  input  fx_t  w [DOUT*DIN*DIN],
  output logic out_valid,
  input  logic out_ready,
  output fx_t  z [DOUT]
);
  localparam int unsigned K    = DIN * DIN;
  localparam int unsigned KW   = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned MW   = (DOUT > 1) ? $clog2(DOUT) : 1;
  localparam int unsigned STW  = $clog2(K + DOUT + 2);
  localparam int unsigned SBW  = (LAT > 1) ? $clog2(LAT) : 1;

  // ---------------- control ----------------
  logic           busy;
  logic [SBW-1:0] sub, cur_sub;
  logic [STW-1:0] step, cur_step;
  logic           accept, active, step_end;
  fx_t            xr [DIN];
  fx_t            yr [DIN];

  assign in_ready = !busy && (!out_valid || out_ready);
  assign accept   = in_valid && in_ready;
  assign active   = busy || accept;
  assign cur_sub  = busy ? sub  : '0;
  assign cur_step = busy ? step : '0;
  assign step_end = (cur_sub == SBW'(LAT - 1));

  // ---------------- mult1: one multiplier, K serial products ----------------
  logic          m1_issue, m1_vld;
  logic [KW-1:0] m1_k, m1_kout;
  fx_t           m1_a, m1_b, m1_p;

  assign m1_issue = active && (cur_sub == '0) && (cur_step < STW'(K));
  assign m1_k     = KW'(cur_step);
  always_comb begin
    if (accept) begin
      m1_a = x[0];
      m1_b = y[0];
    end else begin
      m1_a = xr[int'(m1_k) / int'(DIN)];
      m1_b = yr[int'(m1_k) % int'(DIN)];
    end
  end

  dsp_mult #(.LAT(LAT)) u_m1 (.clk, .rst_n, .en(1'b1), .a(m1_a), .b(m1_b), .p(m1_p));
  pipe_delay #(.W(1 + KW), .STAGES(LAT)) u_m1_tag (
    .clk, .rst_n, .en(1'b1), .d({m1_issue, m1_k}), .q({m1_vld, m1_kout})
  );

  fx_t p [K];      // stored mult1 results
  fx_t p_eff [K];  // with the last product forwarded straight from the multiplier
  for (genvar k = 0; k < int'(K); k++) begin : g_peff
    if (k == int'(K) - 1) begin : g_fwd
      assign p_eff[k] = (m1_vld && m1_kout == KW'(k)) ? m1_p : p[k];
    end else begin : g_reg
      assign p_eff[k] = p[k];
    end
  end

  // ---------------- mult2: K multipliers, one component per step ----------------
  logic          m2_issue, m2_vld;
  logic [MW-1:0] m2_mu, m2_muout;
  fx_t           m2_p [K];

  assign m2_issue = busy && (cur_sub == '0) && (cur_step >= STW'(K)) && (cur_step < STW'(K + DOUT));
  always_comb begin
    m2_mu = MW'(cur_step - STW'(K));
    if (!m2_issue || int'(m2_mu) >= int'(DOUT)) m2_mu = '0;  // keep the weight index in range
  end

  for (genvar k = 0; k < int'(K); k++) begin : g_m2
    dsp_mult #(.LAT(LAT)) u_m2 (
      .clk, .rst_n, .en(1'b1), .a(p_eff[k]), .b(w[int'(m2_mu)*K + k]), .p(m2_p[k])
    );
  end
  pipe_delay #(.W(1 + MW), .STAGES(LAT)) u_m2_tag (
    .clk, .rst_n, .en(1'b1), .d({m2_issue, m2_mu}), .q({m2_vld, m2_muout})
  );

  // ---------------- sum: K-input add, LAT cycles ----------------
  logic signed [31:0] ssum;
  fx_t                s_fx, s_q;
  logic               s_vld;
  logic [MW-1:0]      s_mu;

  always_comb begin
    ssum = '0;
    for (int k = 0; k < int'(K); k++) ssum += 32'(m2_p[k]);
  end
  assign s_fx = sat_fx(64'(ssum));

  pipe_delay #(.W(1 + MW + DW), .STAGES(LAT - 1)) u_sum (
    .clk, .rst_n, .en(1'b1), .d({m2_vld, m2_muout, s_fx}), .q({s_vld, s_mu, s_q})
  );

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      sub       <= '0;
      step      <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < int'(DIN); i++) begin
        xr[i] <= '0;
        yr[i] <= '0;
      end
      for (int k = 0; k < int'(K); k++) p[k] <= '0;
      for (int m = 0; m < int'(DOUT); m++) z[m] <= '0;
    end else begin
      if (accept) begin
        busy <= 1'b1;
        xr   <= x;
        yr   <= y;
      end
      if (active) begin
        sub  <= step_end ? '0 : cur_sub + 1'b1;
        step <= cur_step + STW'(step_end);
      end
      if (m1_vld) p[m1_kout] <= m1_p;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (s_vld) begin
        z[s_mu] <= s_q;
        if (s_mu == MW'(DOUT - 1)) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
        end
      end
    end
  end

  // a held result may not change before it is taken
  logic [DOUT*DW-1:0] z_flat;
  for (genvar m = 0; m < int'(DOUT); m++) begin : g_zf
    assign z_flat[m*DW +: DW] = z[m];
  end
  property p_hold;
    @(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> out_valid && $stable(z_flat);
  endproperty
  assert property (p_hold);

  initial assert (LAT >= 1) else $error("node_pp: LAT must be at least 1");
endmodule
