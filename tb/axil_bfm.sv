// axil_bfm: AXI4-Lite master bus-functional model for the testbenches.
// Requests are driven on the falling clock edge and held until the slave's
// ready is seen; the response is taken on the cycle it is valid (ready is
// held high). Used through hierarchical task calls: u_bfm.write / u_bfm.read.
module axil_bfm
  import axil_pkg::*;
(
  input  logic      clk,
  output axil_req_t req,
  input  axil_rsp_t rsp
);

  initial req = '0;

  task automatic write(input logic [31:0] addr, input logic [31:0] data,
                       input logic [3:0] strb, output logic [1:0] resp);
    @(negedge clk);
    req.awaddr  = addr;
    req.awvalid = 1'b1;
    req.wdata   = data;
    req.wstrb   = strb;
    req.wvalid  = 1'b1;
    req.bready  = 1'b1;
    #1;
    while (!(rsp.awready && rsp.wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    req.awvalid = 1'b0;
    req.wvalid  = 1'b0;
    #1;
    while (!rsp.bvalid) begin @(negedge clk); #1; end
    resp = rsp.bresp;
    @(negedge clk);
    req.bready = 1'b0;
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] data,
                      output logic [1:0] resp);
    @(negedge clk);
    req.araddr  = addr;
    req.arvalid = 1'b1;
    req.rready  = 1'b1;
    #1;
    while (!rsp.arready) begin @(negedge clk); #1; end
    @(negedge clk);
    req.arvalid = 1'b0;
    #1;
    while (!rsp.rvalid) begin @(negedge clk); #1; end
    data = rsp.rdata;
    resp = rsp.rresp;
    @(negedge clk);
    req.rready = 1'b0;
  endtask

endmodule
