// axil_crossbar: routes one AXI4-Lite manager to NM register blocks.
//
// Block m owns the address window [m * 2^APER, (m+1) * 2^APER); the block
// number is taken from the address bits just above the window. When a write
// (read) address arrives, the crossbar spends one cycle latching the target,
// then connects the manager's write (read) channels straight to that block
// until the response has been taken, so one write and one read can be in
// flight at once, to the same block or different ones. An address beyond the
// last block is answered by the crossbar itself with DECERR (read data 0).
// The window size and this one-transaction-per-direction scheme are this
// implementation's choices; the design only states that the crossbar
// switches between register blocks according to the base address.
module axil_crossbar
  import axil_pkg::*;
#(
  parameter int unsigned NM   = 2,   // number of register blocks
  parameter int unsigned APER = 12   // log2 of the address window per block
) (
  input  logic      clk,
  input  logic      rst_n,
  input  axil_req_t s_req,
  output axil_rsp_t s_rsp,
  output axil_req_t m_req [NM],
  input  axil_rsp_t m_rsp [NM]
);
  localparam int unsigned SW = $clog2(NM + 1);

  function automatic logic [SW-1:0] decode(input logic [AXIL_AW-1:0] a);
    logic [AXIL_AW-1:0] blk;
    blk = a >> APER;
    return (blk < AXIL_AW'(NM)) ? SW'(blk) : SW'(NM);  // NM: no such block
  endfunction

  logic          wr_busy, rd_busy;
  logic [SW-1:0] wr_sel, rd_sel;
  // local DECERR responder
  logic          e_bvalid, e_rvalid, e_wr_go, e_rd_go;

  assign e_wr_go = wr_busy && wr_sel == SW'(NM) && s_req.awvalid && s_req.wvalid && !e_bvalid;
  assign e_rd_go = rd_busy && rd_sel == SW'(NM) && s_req.arvalid && !e_rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_busy  <= 1'b0;
      rd_busy  <= 1'b0;
      wr_sel   <= '0;
      rd_sel   <= '0;
      e_bvalid <= 1'b0;
      e_rvalid <= 1'b0;
    end else begin
      if (!wr_busy && s_req.awvalid) begin
        wr_busy <= 1'b1;
        wr_sel  <= decode(s_req.awaddr);
      end else if (wr_busy && s_rsp.bvalid && s_req.bready) begin
        wr_busy <= 1'b0;
      end
      if (!rd_busy && s_req.arvalid) begin
        rd_busy <= 1'b1;
        rd_sel  <= decode(s_req.araddr);
      end else if (rd_busy && s_rsp.rvalid && s_req.rready) begin
        rd_busy <= 1'b0;
      end
      if (e_wr_go) e_bvalid <= 1'b1;
      else if (s_req.bready) e_bvalid <= 1'b0;
      if (e_rd_go) e_rvalid <= 1'b1;
      else if (s_req.rready) e_rvalid <= 1'b0;
    end
  end

  always_comb begin
    s_rsp = '0;
    // write side
    if (wr_busy) begin
      if (wr_sel == SW'(NM)) begin
        s_rsp.awready = e_wr_go;
        s_rsp.wready  = e_wr_go;
        s_rsp.bvalid  = e_bvalid;
        s_rsp.bresp   = RESP_DECERR;
      end else begin
        for (int m = 0; m < int'(NM); m++) begin
          if (wr_sel == SW'(m)) begin
            s_rsp.awready = m_rsp[m].awready;
            s_rsp.wready  = m_rsp[m].wready;
            s_rsp.bvalid  = m_rsp[m].bvalid;
            s_rsp.bresp   = m_rsp[m].bresp;
          end
        end
      end
    end
    // read side
    if (rd_busy) begin
      if (rd_sel == SW'(NM)) begin
        s_rsp.arready = e_rd_go;
        s_rsp.rvalid  = e_rvalid;
        s_rsp.rresp   = RESP_DECERR;
      end else begin
        for (int m = 0; m < int'(NM); m++) begin
          if (rd_sel == SW'(m)) begin
            s_rsp.arready = m_rsp[m].arready;
            s_rsp.rvalid  = m_rsp[m].rvalid;
            s_rsp.rdata   = m_rsp[m].rdata;
            s_rsp.rresp   = m_rsp[m].rresp;
          end
        end
      end
    end
  end

  for (genvar m = 0; m < int'(NM); m++) begin : g_m
    always_comb begin
      m_req[m]         = s_req;
      m_req[m].awvalid = s_req.awvalid && wr_busy && wr_sel == SW'(m);
      m_req[m].wvalid  = s_req.wvalid  && wr_busy && wr_sel == SW'(m);
      m_req[m].bready  = s_req.bready  && wr_busy && wr_sel == SW'(m);
      m_req[m].arvalid = s_req.arvalid && rd_busy && rd_sel == SW'(m);
      m_req[m].rready  = s_req.rready  && rd_busy && rd_sel == SW'(m);
    end
  end

  // AXI rule: a valid response stays until it is taken
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_rsp.bvalid && !s_req.bready |=> s_rsp.bvalid);
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_rsp.rvalid && !s_req.rready |=> s_rsp.rvalid && $stable(s_rsp.rdata));
endmodule
