// axil_pkg: AXI4-Lite request and response bundles (32-bit address and
// data) used between the network-side master, the crossbar and the
// per-link slow-control slaves. Grouping the channels into two structs
// keeps arrays of ports simple; the signals and handshake rules are those
// of AXI4-Lite (a transfer happens when valid and ready are both high).
package axil_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;
  localparam logic [1:0] RESP_DECERR = 2'b11;

  typedef struct packed {
    logic [ADDR_W-1:0]   awaddr;
    logic                awvalid;
    logic [DATA_W-1:0]   wdata;
    logic [DATA_W/8-1:0] wstrb;
    logic                wvalid;
    logic                bready;
    logic [ADDR_W-1:0]   araddr;
    logic                arvalid;
    logic                rready;
  } axil_req_t;

  typedef struct packed {
    logic              awready;
    logic              wready;
    logic [1:0]        bresp;
    logic              bvalid;
    logic              arready;
    logic [DATA_W-1:0] rdata;
    logic [1:0]        rresp;
    logic              rvalid;
  } axil_rsp_t;

endpackage
