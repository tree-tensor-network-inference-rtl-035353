// axil_pkg: AXI4-Lite channel bundles (32-bit address, 32-bit data) used
// between the host-side AXI-Lite port, the crossbar and the weight register
// blocks. A request struct carries everything the manager drives, a response
// struct everything the subordinate drives.
package axil_pkg;

  localparam int unsigned AXIL_AW = 32;
  localparam int unsigned AXIL_DW = 32;

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_DECERR = 2'b11;

  typedef struct packed {
    logic [AXIL_AW-1:0]   awaddr;
    logic            awvalid;
    logic [AXIL_DW-1:0]   wdata;
    logic [AXIL_DW/8-1:0] wstrb;
    logic            wvalid;
    logic            bready;
    logic [AXIL_AW-1:0]   araddr;
    logic            arvalid;
    logic            rready;
  } axil_req_t;

  typedef struct packed {
    logic          awready;
    logic          wready;
    logic [1:0]    bresp;
    logic          bvalid;
    logic          arready;
    logic [AXIL_DW-1:0] rdata;
    logic [1:0]    rresp;
    logic          rvalid;
  } axil_rsp_t;

endpackage
