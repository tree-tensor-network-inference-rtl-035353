// ttn_top_harness: drives one ttn_top end to end and scores it.
//
// 1. Writes a random set of weights into the register blocks over
//    AXI-Lite, reads a sample of registers back, and probes an address
//    beyond the last block (must answer DECERR).
// 2. Measures the latency of one sample through an idle design: two cycles
//    of feature map, one cycle of FIFO for partial parallel, then the tree
//    latency.
// 3. Streams NSAMP random samples with random gaps on the input and random
//    back-pressure on the output and compares every result with the
//    reference model (feature map + tree contraction).
// It counts the mechanisms it saw: output stalls, input back-pressure, FIFO
// filling (partial parallel only), DECERR responses and register read-backs;
// one that never happened counts as a failure. IMPL, N and X0 select the
// configuration; the full-parallel N = 16, X0 = 8 configuration is
// instantiated as ttn_top with all its defaults.
module ttn_top_harness
  import ttn_pkg::*;
  import ttn_ref_pkg::*;
  import axil_pkg::*;
#(
  parameter impl_e IMPL  = IMPL_FP,
  parameter int    N     = 16,
  parameter int    X0    = 8,
  parameter int    NSAMP = 40
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int D0 = 2, O = 1, LAT = 4;
  // the design's default configuration is instantiated without parameters
  localparam bit DEFAULTS = (IMPL == IMPL_FP) && (N == 16) && (X0 == 8);
  localparam xmode_e MODE = XMODE_MINIMAL;
  localparam int NW  = int'(total_weights(N, D0, X0, O, MODE));
  localparam int NB  = (NW + 1023) / 1024;
  localparam int TL  = int'(tree_latency(IMPL, LAT, N, D0, X0, O, MODE));
  localparam int EXP_LAT = 2 + TL + ((IMPL == IMPL_PP) ? 1 : 0);

  logic [31:0]   awaddr, wdata, araddr, rdata;
  logic [3:0]    wstrb;
  logic          awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [1:0]    bresp, rresp;
  logic          s_tvalid, s_tready, m_tvalid, m_tready;
  logic [N*16-1:0] s_tdata;
  logic [O*16-1:0] m_tdata;

  if (DEFAULTS) begin : g_def
    ttn_top dut (
      .clk, .rst_n,
      .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
      .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
      .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
      .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
      .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
      .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready), .s_axis_tdata(s_tdata),
      .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready), .m_axis_tdata(m_tdata));
  end else begin : g_par
    ttn_top #(.N(N), .X0(X0), .IMPL(IMPL)) dut (
      .clk, .rst_n,
      .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
      .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
      .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
      .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
      .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
      .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready), .s_axis_tdata(s_tdata),
      .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready), .m_axis_tdata(m_tdata));
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("[%s] %s: got %0d expected %0d", IMPL.name(), what, got, exp);
    end
  endtask

  task automatic axil_write(input logic [31:0] addr, input logic [31:0] data, output logic [1:0] resp);
    @(negedge clk);
    awaddr = addr; awvalid = 1; wdata = data; wstrb = 4'hf; wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    @(negedge clk);
    awvalid = 0; wvalid = 0; bready = 1;
    do @(posedge clk); while (!bvalid);
    resp = bresp;
    @(negedge clk);
    bready = 0;
  endtask

  task automatic axil_read(input logic [31:0] addr, output logic [31:0] data, output logic [1:0] resp);
    @(negedge clk);
    araddr = addr; arvalid = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0; rready = 1;
    do @(posedge clk); while (!rvalid);
    data = rdata;
    resp = rresp;
    @(negedge clk);
    rready = 0;
  endtask

  ivec_t wq;
  ivec_t feats[$];
  ivec_t expect_r[$];
  int    cnt_stall = 0, cnt_backpressure = 0, cnt_fifo = 0, cnt_decerr = 0, cnt_readback = 0;
  int    got = 0, sent = 0;

  function automatic ivec_t make_sample();
    ivec_t f;
    for (int i = 0; i < N; i++) f.push_back($urandom_range(0, 25736));
    return f;
  endfunction

  function automatic ivec_t model(input ivec_t f);
    ivec_t phi;
    foreach (f[i]) begin
      phi.push_back(ref_trig(f[i], 1'b0));
      phi.push_back(ref_trig(f[i], 1'b1));
    end
    return ref_tree(phi, wq, N, D0, X0, O, MODE);
  endfunction

  task automatic put_sample(input ivec_t f);
    foreach (f[i]) s_tdata[16*i +: 16] = 16'(f[i]);
  endtask

  // output monitor
  always @(posedge clk) begin
    if (rst_n && sent > 0) begin
      if (m_tvalid && m_tready) begin
        check("result", $signed(m_tdata[15:0]), expect_r[got][0]);
        got++;
      end
      if (m_tvalid && !m_tready) cnt_stall++;
      if (s_tvalid && !s_tready) cnt_backpressure++;
    end
  end

  if (IMPL == IMPL_PP) begin : g_fifo_mon
    always @(posedge clk) if (rst_n && g_par.dut.g_pp.f_count > 1) cnt_fifo++;
  end

  initial begin
    logic [31:0] d;
    logic [1:0]  resp;
    int          t0, lat;
    done = 0; checks = 0; failures = 0;
    awaddr = '0; awvalid = 0; wdata = '0; wstrb = '0; wvalid = 0; bready = 0;
    araddr = '0; arvalid = 0; rready = 0;
    s_tvalid = 0; s_tdata = '0; m_tready = 0;
    // weights in [-0.25, 0.25)
    for (int i = 0; i < NB * 1024; i++) wq.push_back($signed(16'($urandom)) / 8);
    wait (rst_n);
    // ---- 1. weights over AXI-Lite ----
    for (int r = 0; r < NB * 512; r++) begin
      axil_write(32'(((r / 512) << 12) + 4 * (r % 512)), {16'(wq[2*r+1]), 16'(wq[2*r])}, resp);
      if (resp != RESP_OKAY) failures++;
    end
    for (int k = 0; k < 40; k++) begin
      int r;
      r = $urandom_range(0, NB * 512 - 1);
      axil_read(32'(((r / 512) << 12) + 4 * (r % 512)), d, resp);
      check("readback", d, {16'(wq[2*r+1]), 16'(wq[2*r])});
      check("readback resp", resp, RESP_OKAY);
      cnt_readback++;
    end
    axil_write(32'(NB << 12), 32'h1234, resp);
    check("decerr write", resp, RESP_DECERR);
    if (resp == RESP_DECERR) cnt_decerr++;
    axil_read(32'((NB << 12) + 8), d, resp);
    check("decerr read", resp, RESP_DECERR);
    if (resp == RESP_DECERR) cnt_decerr++;
    repeat (3) @(negedge clk);   // weight slice register
    // ---- 2. latency through the idle design ----
    feats.push_back(make_sample());
    expect_r.push_back(model(feats[0]));
    @(negedge clk);
    put_sample(feats[0]);
    s_tvalid = 1;
    m_tready = 1;
    sent = 1;
    @(posedge clk);
    t0 = 0;
    #1;
    s_tvalid = 0;
    lat = 1;
    while (!m_tvalid) begin @(posedge clk); #1; lat++; end
    check("latency", lat, EXP_LAT);
    @(posedge clk); #1;
    // ---- 3. stream ----
    for (int s = 1; s < NSAMP; s++) begin
      feats.push_back(make_sample());
      expect_r.push_back(model(feats[s]));
    end
    fork
      begin : source
        while (sent < NSAMP) begin
          @(negedge clk);
          if (!s_tvalid || s_taken) begin
            s_tvalid = ($urandom_range(0, 1) != 0);
            if (s_tvalid) begin
              put_sample(feats[sent]);
              sent++;
            end
          end
        end
        do begin @(posedge clk); #1; end while (!s_taken);
        @(negedge clk);
        s_tvalid = 0;
      end
      begin : sink
        while (got < NSAMP) begin
          @(negedge clk);
          // long output stalls early on fill the partial-parallel FIFO
          m_tready = (got < NSAMP / 2) ? ($urandom_range(0, 9) == 0) : ($urandom_range(0, 2) != 0);
        end
      end
    join
    check("results", got, NSAMP);
    $display("[%s] latency %0d, stalls %0d, back-pressure %0d, fifo>1 %0d, decerr %0d, read-backs %0d",
             IMPL.name(), lat, cnt_stall, cnt_backpressure, cnt_fifo, cnt_decerr, cnt_readback);
    if (cnt_stall == 0 || cnt_backpressure == 0 || cnt_decerr < 2 || cnt_readback == 0) failures++;
    if (IMPL == IMPL_PP && cnt_fifo == 0) failures++;
    done = 1;
  end

  bit s_taken = 0;
  always @(posedge clk) s_taken = s_tvalid && s_tready;
endmodule
