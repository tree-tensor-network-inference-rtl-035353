// axil_reg_block: one block of weight registers behind an AXI4-Lite port.
//
// NREG 32-bit registers (512 by default, i.e. 1024 16-bit weights), readable
// and writable by the host, and presented in parallel on regs for the tree,
// which only reads them. Register r sits at byte offset 4*r; higher address
// bits are ignored (the crossbar decodes them). A write is taken when address
// and data are both valid, honours wstrb and answers OKAY one cycle later; a
// read answers the register one cycle after the address. One transaction per
// direction is outstanding at a time. All registers reset to zero.
module axil_reg_block
  import axil_pkg::*;
#(
  parameter int unsigned NREG = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  axil_req_t   req,
  output axil_rsp_t   rsp,
  output logic [31:0] regs [NREG]
);
  localparam int unsigned RW = $clog2(NREG);

  logic          bvalid, rvalid;
  logic [31:0]   rdata;
  logic          wr_go, rd_go;
  logic [RW-1:0] widx, ridx;

  assign wr_go = req.awvalid && req.wvalid && !bvalid;
  assign rd_go = req.arvalid && !rvalid;
  assign widx  = req.awaddr[2 +: RW];
  assign ridx  = req.araddr[2 +: RW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid <= 1'b0;
      rvalid <= 1'b0;
      rdata  <= '0;
      for (int r = 0; r < int'(NREG); r++) regs[r] <= '0;
    end else begin
      if (wr_go) begin
        for (int b = 0; b < 4; b++)
          if (req.wstrb[b]) regs[widx][8*b +: 8] <= req.wdata[8*b +: 8];
        bvalid <= 1'b1;
      end else if (req.bready) begin
        bvalid <= 1'b0;
      end
      if (rd_go) begin
        rdata  <= regs[ridx];
        rvalid <= 1'b1;
      end else if (req.rready) begin
        rvalid <= 1'b0;
      end
    end
  end

  always_comb begin
    rsp         = '0;
    rsp.awready = wr_go;
    rsp.wready  = wr_go;
    rsp.bvalid  = bvalid;
    rsp.bresp   = RESP_OKAY;
    rsp.arready = rd_go;
    rsp.rvalid  = rvalid;
    rsp.rdata   = rdata;
    rsp.rresp   = RESP_OKAY;
  end
endmodule
