// tb_axil_crossbar: a crossbar in front of three register blocks (small,
// 16 registers each, 4 KiB windows). Writes and reads go to random blocks
// and registers and to addresses beyond the last block; each block's
// registers must match a model, read data must come from the addressed
// block, and out-of-range addresses must get DECERR.
module tb_axil_crossbar;
  import axil_pkg::*;

  localparam int NM = 3, NREG = 16, APER = 12;
  logic        clk = 0, rst_n = 0;
  axil_req_t   s_req;
  axil_rsp_t   s_rsp;
  axil_req_t   m_req [NM];
  axil_rsp_t   m_rsp [NM];
  logic [31:0] regs  [NM][NREG];
  logic [31:0] model [NM][NREG];
  int          checks = 0, failures = 0, decerrs = 0;

  axil_crossbar #(.NM(NM), .APER(APER)) dut (.clk, .rst_n, .s_req, .s_rsp, .m_req, .m_rsp);
  for (genvar m = 0; m < NM; m++) begin : g_blk
    axil_reg_block #(.NREG(NREG)) u_blk (.clk, .rst_n, .req(m_req[m]), .rsp(m_rsp[m]), .regs(regs[m]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic axil_write(input logic [31:0] addr, input logic [31:0] data, output logic [1:0] resp);
    @(negedge clk);
    s_req.awaddr = addr; s_req.awvalid = 1; s_req.wdata = data; s_req.wstrb = 4'hf; s_req.wvalid = 1;
    do @(posedge clk); while (!(s_rsp.awready && s_rsp.wready));
    @(negedge clk);
    s_req.awvalid = 0; s_req.wvalid = 0; s_req.bready = 1;
    do @(posedge clk); while (!s_rsp.bvalid);
    resp = s_rsp.bresp;
    @(negedge clk);
    s_req.bready = 0;
  endtask

  task automatic axil_read(input logic [31:0] addr, output logic [31:0] data, output logic [1:0] resp);
    @(negedge clk);
    s_req.araddr = addr; s_req.arvalid = 1;
    do @(posedge clk); while (!s_rsp.arready);
    @(negedge clk);
    s_req.arvalid = 0; s_req.rready = 1;
    do @(posedge clk); while (!s_rsp.rvalid);
    data = s_rsp.rdata;
    resp = s_rsp.rresp;
    @(negedge clk);
    s_req.rready = 0;
  endtask

  initial begin
    logic [31:0] d;
    logic [1:0]  resp;
    s_req = '0;
    foreach (model[m, r]) model[m][r] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int m, r;
      logic [31:0] v;
      m = $urandom_range(0, NM);   // NM: beyond the last block
      r = $urandom_range(0, NREG - 1);
      v = $urandom;
      axil_write(32'((m << APER) + 4 * r), v, resp);
      if (m < NM) begin
        model[m][r] = v;
        check("bresp", resp, RESP_OKAY);
      end else begin
        check("bresp decerr", resp, RESP_DECERR);
        decerrs++;
      end
      m = $urandom_range(0, NM);
      r = $urandom_range(0, NREG - 1);
      axil_read(32'((m << APER) + 4 * r), d, resp);
      if (m < NM) begin
        check("rdata", d, model[m][r]);
        check("rresp", resp, RESP_OKAY);
      end else begin
        check("rresp decerr", resp, RESP_DECERR);
        decerrs++;
      end
    end
    @(negedge clk);
    foreach (regs[m, r]) check("regs", regs[m][r], model[m][r]);
    if (decerrs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
