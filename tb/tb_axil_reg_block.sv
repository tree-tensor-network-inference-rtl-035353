// tb_axil_reg_block: AXI4-Lite writes with random byte strobes and random
// response back-pressure, read-back of every register written, and the
// parallel register outputs, all against a model array.
module tb_axil_reg_block;
  import axil_pkg::*;

  localparam int NREG = 512;
  logic        clk = 0, rst_n = 0;
  axil_req_t   req;
  axil_rsp_t   rsp;
  logic [31:0] regs [NREG];
  logic [31:0] model [NREG];
  int          checks = 0, failures = 0;

  axil_reg_block #(.NREG(NREG)) dut (.clk, .rst_n, .req, .rsp, .regs);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic axil_write(input logic [31:0] addr, input logic [31:0] data, input logic [3:0] strb);
    @(negedge clk);
    req.awaddr = addr; req.awvalid = 1; req.wdata = data; req.wstrb = strb; req.wvalid = 1;
    do @(posedge clk); while (!(rsp.awready && rsp.wready));
    @(negedge clk);
    req.awvalid = 0; req.wvalid = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
    req.bready = 1;
    do @(posedge clk); while (!rsp.bvalid);
    check("bresp", rsp.bresp, RESP_OKAY);
    @(negedge clk);
    req.bready = 0;
  endtask

  task automatic axil_read(input logic [31:0] addr, output logic [31:0] data);
    @(negedge clk);
    req.araddr = addr; req.arvalid = 1;
    do @(posedge clk); while (!rsp.arready);
    @(negedge clk);
    req.arvalid = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
    req.rready = 1;
    do @(posedge clk); while (!rsp.rvalid);
    data = rsp.rdata;
    check("rresp", rsp.rresp, RESP_OKAY);
    @(negedge clk);
    req.rready = 0;
  endtask

  initial begin
    logic [31:0] d;
    req = '0;
    foreach (model[i]) model[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      int          r;
      logic [31:0] v;
      logic [3:0]  s;
      r = $urandom_range(0, NREG - 1);
      v = $urandom;
      s = (n < 600) ? 4'hf : 4'($urandom);
      axil_write(32'(4 * r), v, s);
      for (int b = 0; b < 4; b++) if (s[b]) model[r][8*b +: 8] = v[8*b +: 8];
      if (n % 3 == 0) begin
        r = $urandom_range(0, NREG - 1);
        axil_read(32'(4 * r), d);
        check("read", d, model[r]);
      end
    end
    @(negedge clk);
    foreach (regs[i]) check("regs", regs[i], model[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
