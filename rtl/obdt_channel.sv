// obdt_channel: everything the backend keeps for one OBDT front-end board,
// between the shared timing/network logic and the link's LpGBT-FPGA core.
//
// Timing path: BX, BC0 and the BC counter from the TIMING block are
// registered once into the downlink inputs (dl). Every channel has the same
// single stage, so all links see the same fixed latency.
// Slow-control path: the channel's AXI-Lite slave (slow_control) feeds two
// lane serialisers, IC and EC (ic_ec_serdes). Downlink pairs advance on the
// timing BX strobe, so dl.ic/dl.ec change together with dl.bx; uplink pairs
// are sampled on ul.strobe. The host's link reset request (CTRL bit 4)
// leaves in dl.link_reset.
//
// The split into timing and slow-control paths per link follows the
// backend architecture; the register stage and the lane code are this
// design's own.
module obdt_channel
  import backend_pkg::*;
  import axil_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic      clk,
  input  logic      rst,
  input  timing_t   tim,
  input  axil_req_t req,
  output axil_rsp_t rsp,
  output lpgbt_dl_t dl,
  input  lpgbt_ul_t ul
);

  logic [7:0] ic_tx_data, ec_tx_data, ic_rx_data, ec_rx_data;
  logic       ic_tx_valid, ic_tx_ready, ec_tx_valid, ec_tx_ready;
  logic       ic_rx_valid, ec_rx_valid;
  logic [1:0] ic_pair, ec_pair;
  logic       link_reset;

  slow_control #(.FIFO_DEPTH(FIFO_DEPTH)) u_sc (
    .clk, .rst, .req, .rsp,
    .ic_tx_data, .ic_tx_valid, .ic_tx_ready, .ic_rx_data, .ic_rx_valid,
    .ec_tx_data, .ec_tx_valid, .ec_tx_ready, .ec_rx_data, .ec_rx_valid,
    .link_ready(ul.ready), .timing_locked(tim.locked), .link_reset);

  ic_ec_serdes u_ic (
    .clk, .rst,
    .tx_strobe(tim.bx), .tx_data(ic_tx_data), .tx_valid(ic_tx_valid),
    .tx_ready(ic_tx_ready), .tx_pair(ic_pair),
    .rx_strobe(ul.strobe), .rx_pair(ul.ic), .rx_data(ic_rx_data),
    .rx_valid(ic_rx_valid));

  ic_ec_serdes u_ec (
    .clk, .rst,
    .tx_strobe(tim.bx), .tx_data(ec_tx_data), .tx_valid(ec_tx_valid),
    .tx_ready(ec_tx_ready), .tx_pair(ec_pair),
    .rx_strobe(ul.strobe), .rx_pair(ul.ec), .rx_data(ec_rx_data),
    .rx_valid(ec_rx_valid));

  always_ff @(posedge clk) begin
    if (rst) begin
      dl.bx       <= 1'b0;
      dl.bc0      <= 1'b0;
      dl.bc_count <= '0;
    end else begin
      dl.bx       <= tim.bx;
      dl.bc0      <= tim.bc0;
      dl.bc_count <= tim.bc_count;
    end
  end

  assign dl.ic = ic_pair;
  assign dl.ec = ec_pair;
  assign dl.link_reset = link_reset;

endmodule
