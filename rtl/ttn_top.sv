// ttn_top: Tree Tensor Network classifier for streamed samples.
//
// A trained TTN with N input features is evaluated in hardware, one sample
// at a time:
//   s_axis  -> feature_map -> [sample_fifo, partial parallel only] -> ttn_tree -> m_axis
// A sample is one AXI-Stream beat of N 16-bit features (feature i in bits
// [16i +: 16]), each already rescaled to [0, pi/2] by the host. The result is
// one beat of O 16-bit fixed-point values (1 sign, 1 integer, 14 fraction
// bits), the root vector of the tree.
//
// The weights live in NB = ceil(NW / 1024) blocks of 512 32-bit registers
// that the host writes and reads back over AXI-Lite; axil_crossbar selects the
// block from the address (block b at byte address b * 2^APER, weight k of a
// block at byte offset 2k), weight_slice registers the 16-bit weights and
// hands them to the tree, which only reads them. Weights must not be changed
// while samples are in flight.
//
// IMPL chooses full-parallel nodes (one sample per cycle, fixed latency) or
// partial-parallel nodes (far fewer multipliers, a sample every few dozen
// cycles, with the input FIFO absorbing bursts). The default parameters
// are the N = 16, D0 = 2, X0 = 8 tree with minimal bond dimensions
// (X = 2, 4, 8, 8, 1), whose 1728 weights fill two register blocks. A single
// clock drives both AXI interfaces; that and the reset (active low,
// asynchronous) are this implementation's choices.
module ttn_top
  import ttn_pkg::*;
  import axil_pkg::*;
#(
  parameter int unsigned N          = 16,
  parameter int unsigned D0         = 2,
  parameter int unsigned X0         = 8,
  parameter int unsigned O          = 1,
  parameter xmode_e      XMODE      = XMODE_MINIMAL,
  parameter impl_e       IMPL       = IMPL_FP,
  parameter int unsigned LAT        = 4,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned APER       = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  // AXI4-Lite: weight registers
  input  logic [31:0]        s_axil_awaddr,
  input  logic               s_axil_awvalid,
  output logic               s_axil_awready,
  input  logic [31:0]        s_axil_wdata,
  input  logic [3:0]         s_axil_wstrb,
  input  logic               s_axil_wvalid,
  output logic               s_axil_wready,
  output logic [1:0]         s_axil_bresp,
  output logic               s_axil_bvalid,
  input  logic               s_axil_bready,
  input  logic [31:0]        s_axil_araddr,
  input  logic               s_axil_arvalid,
  output logic               s_axil_arready,
  output logic [31:0]        s_axil_rdata,
  output logic [1:0]         s_axil_rresp,
  output logic               s_axil_rvalid,
  input  logic               s_axil_rready,
  // AXI4-Stream: samples in
  input  logic               s_axis_tvalid,
  output logic               s_axis_tready,
  input  logic [N*DW-1:0]    s_axis_tdata,
  // AXI4-Stream: results out
  output logic               m_axis_tvalid,
  input  logic               m_axis_tready,
  output logic [O*DW-1:0]    m_axis_tdata
);
  localparam int unsigned NW   = total_weights(N, D0, X0, O, XMODE);
  localparam int unsigned NREG = 512;
  localparam int unsigned NB   = (NW + 2 * NREG - 1) / (2 * NREG);
  localparam int unsigned FM_LAT = 2;

  // ---------------- weights: AXI-Lite -> crossbar -> register blocks ----------------
  axil_req_t   s_req;
  axil_rsp_t   s_rsp;
  axil_req_t   m_req [NB];
  axil_rsp_t   m_rsp [NB];
  logic [31:0] regs  [NB][NREG];
  fx_t         w     [NW];

  always_comb begin
    s_req.awaddr  = s_axil_awaddr;
    s_req.awvalid = s_axil_awvalid;
    s_req.wdata   = s_axil_wdata;
    s_req.wstrb   = s_axil_wstrb;
    s_req.wvalid  = s_axil_wvalid;
    s_req.bready  = s_axil_bready;
    s_req.araddr  = s_axil_araddr;
    s_req.arvalid = s_axil_arvalid;
    s_req.rready  = s_axil_rready;
  end
  assign s_axil_awready = s_rsp.awready;
  assign s_axil_wready  = s_rsp.wready;
  assign s_axil_bresp   = s_rsp.bresp;
  assign s_axil_bvalid  = s_rsp.bvalid;
  assign s_axil_arready = s_rsp.arready;
  assign s_axil_rdata   = s_rsp.rdata;
  assign s_axil_rresp   = s_rsp.rresp;
  assign s_axil_rvalid  = s_rsp.rvalid;

  axil_crossbar #(.NM(NB), .APER(APER)) u_xbar (
    .clk, .rst_n, .s_req, .s_rsp, .m_req, .m_rsp
  );

  for (genvar b = 0; b < int'(NB); b++) begin : g_blk
    axil_reg_block #(.NREG(NREG)) u_regs (
      .clk, .rst_n, .req(m_req[b]), .rsp(m_rsp[b]), .regs(regs[b])
    );
  end

  weight_slice #(.NB(NB), .NREG(NREG), .NW(NW)) u_slice (
    .clk, .rst_n, .regs, .w
  );

  // ---------------- samples: feature map -> (FIFO) -> tree ----------------
  fx_t  feat [N];
  fx_t  phi  [N][2];
  fx_t  tphi [N][2];
  fx_t  res  [O];
  logic fm_en, fm_in_valid, fm_out_valid;
  logic t_in_valid, t_in_ready;

  for (genvar i = 0; i < int'(N); i++) begin : g_feat
    assign feat[i] = s_axis_tdata[i*DW +: DW];
  end

  feature_map #(.N(N)) u_fmap (
    .clk, .rst_n, .en(fm_en), .in_valid(fm_in_valid), .feat,
    .out_valid(fm_out_valid), .phi
  );

  if (IMPL == IMPL_FP) begin : g_fp
    // the feature map is part of the stalling pipeline
    assign fm_en         = t_in_ready;
    assign s_axis_tready = t_in_ready;
    assign fm_in_valid   = s_axis_tvalid;
    assign t_in_valid    = fm_out_valid;
    assign tphi          = phi;
  end else begin : g_pp
    localparam int unsigned FW = 2 * N * DW;
    logic [FW-1:0]                   f_in, f_out;
    logic [$clog2(FIFO_DEPTH+1)-1:0] f_count;
    logic                            f_in_ready;

    // stop taking samples while the ones inside the feature map might not fit
    assign s_axis_tready = f_count < ($bits(f_count))'(FIFO_DEPTH - FM_LAT);
    assign fm_en         = 1'b1;
    assign fm_in_valid   = s_axis_tvalid && s_axis_tready;

    for (genvar i = 0; i < int'(N); i++) begin : g_pack
      assign f_in[(2*i)*DW +: DW]   = phi[i][0];
      assign f_in[(2*i+1)*DW +: DW] = phi[i][1];
      assign tphi[i][0] = f_out[(2*i)*DW +: DW];
      assign tphi[i][1] = f_out[(2*i+1)*DW +: DW];
    end

    sample_fifo #(.W(FW), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n, .in_valid(fm_out_valid), .in_ready(f_in_ready), .in_data(f_in),
      .out_valid(t_in_valid), .out_ready(t_in_ready), .out_data(f_out), .count(f_count)
    );

    assert property (@(posedge clk) disable iff (!rst_n) fm_out_valid |-> f_in_ready)
      else $error("ttn_top: sample lost at the input FIFO");
  end

  ttn_tree #(.N(N), .D0(D0), .X0(X0), .O(O), .XMODE(XMODE), .IMPL(IMPL), .LAT(LAT)) u_tree (
    .clk, .rst_n, .in_valid(t_in_valid), .in_ready(t_in_ready), .phi(tphi), .w,
    .out_valid(m_axis_tvalid), .out_ready(m_axis_tready), .result(res)
  );

  for (genvar o = 0; o < int'(O); o++) begin : g_res
    assign m_axis_tdata[o*DW +: DW] = res[o];
  end

  initial assert (D0 == 2) else $error("ttn_top: the feature map produces D0 = 2 components");
endmodule
