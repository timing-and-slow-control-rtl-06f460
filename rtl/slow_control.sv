// slow_control: per-link AXI4-Lite register slave through which the host
// configures and monitors one front-end board. Bytes written by the host
// are queued and sent over the link's IC lane (to the LpGBT chip) or EC
// lane (to the SCA chip); bytes received on those lanes are queued for the
// host to read.
//
// That the block is an AXI-Lite slave in front of the LpGBT and SCA
// control channels follows the backend architecture, as does the presence
// of link management and status monitoring; the register map, the queue
// depth, the raw-byte transport and the form of the link-management
// registers (a reset request and a count of uplink losses) are this
// design's own.
//
// Register map (byte offsets within the slave's 256-byte window):
//   0x00 CTRL     W: bit0 flush IC queues, bit1 flush EC queues (self-clearing),
//                    bit4 link reset request (level, held until written 0)
//                 R: bit4 link reset request
//   0x04 STATUS   R: 0 uplink ready, 1 timing locked, 2 IC TX full,
//                    3 IC RX empty, 4 EC TX full, 5 EC RX empty,
//                    6 IC RX overflow, 7 EC RX overflow (sticky);
//                 W: write 1 to bit 6/7 to clear the overflow flag
//   0x08 IC_TX    W: push wdata[7:0] (SLVERR if the queue is full)
//   0x0C IC_RX    R: pop; bit 8 = byte valid, bits 7:0 = byte
//   0x10 EC_TX    W: as IC_TX
//   0x14 EC_RX    R: as IC_RX
//   0x18 SCRATCH  RW: 32-bit scratch register, honours wstrb
//   0x1C DROPS    R: number of times uplink ready fell (saturates);
//                 W: any write clears it
//   other offsets answer SLVERR.
//
// Handshake: a write is taken when awvalid and wvalid are both high and no
// response is pending; bvalid follows one clock later. A read is taken when
// arvalid is high and no read data is pending; rvalid follows one clock
// later. One write and one read may be in progress at the same time.
module slow_control
  import axil_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  axil_req_t  req,
  output axil_rsp_t  rsp,
  // IC lane
  output logic [7:0] ic_tx_data,
  output logic       ic_tx_valid,
  input  logic       ic_tx_ready,
  input  logic [7:0] ic_rx_data,
  input  logic       ic_rx_valid,
  // EC lane
  output logic [7:0] ec_tx_data,
  output logic       ec_tx_valid,
  input  logic       ec_tx_ready,
  input  logic [7:0] ec_rx_data,
  input  logic       ec_rx_valid,
  // status
  input  logic       link_ready,
  input  logic       timing_locked,
  output logic       link_reset    // to the link's LpGBT-FPGA core and MGT
);

  localparam logic [7:0] A_CTRL    = 8'h00;
  localparam logic [7:0] A_STATUS  = 8'h04;
  localparam logic [7:0] A_IC_TX   = 8'h08;
  localparam logic [7:0] A_IC_RX   = 8'h0C;
  localparam logic [7:0] A_EC_TX   = 8'h10;
  localparam logic [7:0] A_EC_RX   = 8'h14;
  localparam logic [7:0] A_SCRATCH = 8'h18;
  localparam logic [7:0] A_DROPS   = 8'h1C;

  // ---------------------------------------------------------------- queues
  logic       ic_tx_push, ic_tx_full, ic_tx_empty;
  logic       ec_tx_push, ec_tx_full, ec_tx_empty;
  logic       ic_rx_pop, ic_rx_full, ic_rx_empty;
  logic       ec_rx_pop, ec_rx_full, ec_rx_empty;
  logic [7:0] ic_rx_q, ec_rx_q;
  logic       ic_flush, ec_flush;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_ic_tx (
    .clk, .rst, .flush(ic_flush), .push(ic_tx_push), .wr_data(req.wdata[7:0]),
    .pop(ic_tx_valid && ic_tx_ready), .rd_data(ic_tx_data),
    .full(ic_tx_full), .empty(ic_tx_empty));
  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_ec_tx (
    .clk, .rst, .flush(ec_flush), .push(ec_tx_push), .wr_data(req.wdata[7:0]),
    .pop(ec_tx_valid && ec_tx_ready), .rd_data(ec_tx_data),
    .full(ec_tx_full), .empty(ec_tx_empty));
  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_ic_rx (
    .clk, .rst, .flush(ic_flush), .push(ic_rx_valid), .wr_data(ic_rx_data),
    .pop(ic_rx_pop), .rd_data(ic_rx_q), .full(ic_rx_full), .empty(ic_rx_empty));
  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_ec_rx (
    .clk, .rst, .flush(ec_flush), .push(ec_rx_valid), .wr_data(ec_rx_data),
    .pop(ec_rx_pop), .rd_data(ec_rx_q), .full(ec_rx_full), .empty(ec_rx_empty));

  assign ic_tx_valid = !ic_tx_empty;
  assign ec_tx_valid = !ec_tx_empty;

  // Response registers, kept apart from the rsp struct.
  logic        bvalid_q, rvalid_q;
  logic [1:0]  bresp_q, rresp_q;
  logic [31:0] rdata_q;

  // ---------------------------------------------------------------- writes
  logic        wr_take;
  logic [7:0]  wr_off;
  logic [31:0] scratch;
  logic        ic_ovf, ec_ovf;

  assign wr_take     = req.awvalid && req.wvalid && !bvalid_q;
  assign wr_off      = req.awaddr[7:0];
  assign ic_tx_push  = wr_take && (wr_off == A_IC_TX) && req.wstrb[0];
  assign ec_tx_push  = wr_take && (wr_off == A_EC_TX) && req.wstrb[0];
  assign ic_flush    = wr_take && (wr_off == A_CTRL) && req.wstrb[0] && req.wdata[0];
  assign ec_flush    = wr_take && (wr_off == A_CTRL) && req.wstrb[0] && req.wdata[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      bvalid_q <= 1'b0;
      bresp_q  <= RESP_OKAY;
      scratch    <= '0;
      link_reset <= 1'b0;
    end else begin
      if (bvalid_q && req.bready) bvalid_q <= 1'b0;
      if (wr_take) begin
        bvalid_q <= 1'b1;
        bresp_q  <= RESP_OKAY;
        unique case (wr_off)
          A_CTRL: if (req.wstrb[0]) link_reset <= req.wdata[4];
          A_STATUS, A_DROPS: ;
          A_IC_TX: if (ic_tx_full) bresp_q <= RESP_SLVERR;
          A_EC_TX: if (ec_tx_full) bresp_q <= RESP_SLVERR;
          A_SCRATCH:
            for (int b = 0; b < 4; b++)
              if (req.wstrb[b]) scratch[8*b +: 8] <= req.wdata[8*b +: 8];
          default: bresp_q <= RESP_SLVERR;
        endcase
      end
    end
  end

  // Sticky receive-overflow flags: set when a byte arrives at a full queue.
  always_ff @(posedge clk) begin
    if (rst) begin
      ic_ovf <= 1'b0;
      ec_ovf <= 1'b0;
    end else begin
      if (wr_take && wr_off == A_STATUS && req.wstrb[0] && req.wdata[6]) ic_ovf <= 1'b0;
      if (wr_take && wr_off == A_STATUS && req.wstrb[0] && req.wdata[7]) ec_ovf <= 1'b0;
      if (ic_rx_valid && ic_rx_full) ic_ovf <= 1'b1;
      if (ec_rx_valid && ec_rx_full) ec_ovf <= 1'b1;
    end
  end

  // Uplink-loss counter: counts falling edges of link_ready, saturating.
  logic        ready_q;
  logic [31:0] drops;
  always_ff @(posedge clk) begin
    if (rst) begin
      ready_q <= 1'b0;
      drops   <= '0;
    end else begin
      ready_q <= link_ready;
      if (wr_take && wr_off == A_DROPS)
        drops <= '0;
      else if (ready_q && !link_ready && drops != '1)
        drops <= drops + 1'b1;
    end
  end

  // ----------------------------------------------------------------- reads
  logic       rd_take;
  logic [7:0] rd_off;

  assign rd_take     = req.arvalid && !rvalid_q;
  assign rd_off      = req.araddr[7:0];
  assign ic_rx_pop   = rd_take && (rd_off == A_IC_RX);
  assign ec_rx_pop   = rd_take && (rd_off == A_EC_RX);

  always_ff @(posedge clk) begin
    if (rst) begin
      rvalid_q <= 1'b0;
      rdata_q  <= '0;
      rresp_q  <= RESP_OKAY;
    end else begin
      if (rvalid_q && req.rready) rvalid_q <= 1'b0;
      if (rd_take) begin
        rvalid_q <= 1'b1;
        rresp_q  <= RESP_OKAY;
        rdata_q  <= '0;
        unique case (rd_off)
          A_CTRL:    rdata_q[4] <= link_reset;
          A_STATUS:  rdata_q[7:0] <= {ec_ovf, ic_ovf, ec_rx_empty, ec_tx_full,
                                        ic_rx_empty, ic_tx_full, timing_locked, link_ready};
          A_IC_RX:   if (!ic_rx_empty) rdata_q[8:0] <= {1'b1, ic_rx_q};
          A_EC_RX:   if (!ec_rx_empty) rdata_q[8:0] <= {1'b1, ec_rx_q};
          A_SCRATCH: rdata_q <= scratch;
          A_DROPS:   rdata_q <= drops;
          default:   rresp_q <= RESP_SLVERR;
        endcase
      end
    end
  end

  always_comb begin
    rsp         = '0;
    rsp.awready = wr_take;
    rsp.wready  = wr_take;
    rsp.bvalid  = bvalid_q;
    rsp.bresp   = bresp_q;
    rsp.arready = rd_take;
    rsp.rvalid  = rvalid_q;
    rsp.rdata   = rdata_q;
    rsp.rresp   = rresp_q;
  end

  // AXI rule: a response, once valid, is held until it is accepted.
  a_b_hold: assert property (@(posedge clk) disable iff (rst)
    bvalid_q && !req.bready |=> bvalid_q && $stable(bresp_q));
  a_r_hold: assert property (@(posedge clk) disable iff (rst)
    rvalid_q && !req.rready |=> rvalid_q && $stable(rdata_q));

endmodule
