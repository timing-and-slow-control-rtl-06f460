// axil_crossbar: connects the single AXI4-Lite master of the network side
// to N_SLV slow-control slaves. Address bits [SLOT_BITS+IDX_W-1:SLOT_BITS]
// select the slave (each slave owns a 2**SLOT_BITS-byte window, 256 bytes
// by default); the full address is passed on. An index at or above N_SLV
// is answered with DECERR without reaching any slave.
//
// One transaction is in flight at a time. The crossbar takes a write when
// awvalid and wvalid are both high, or a read when arvalid is high (writes
// first if both arrive together), holds it, presents it to the chosen slave
// until the slave accepts it, waits for the slave's response and returns
// it to the master. This sequencing is this design's own; the backend
// architecture only calls for one AXI-Lite master fanning out to one
// slave per link.
//
// Latency: with a slave that answers at once (as slow_control does), bvalid
// or rvalid reaches the master two clocks after the crossbar takes the
// request; an unmapped access is answered in the next clock.
module axil_crossbar
  import axil_pkg::*;
#(
  parameter int unsigned N_SLV     = 90,
  parameter int unsigned SLOT_BITS = 8,
  parameter int unsigned IDX_W     = 8
) (
  input  logic      clk,
  input  logic      rst,
  input  axil_req_t m_req,
  output axil_rsp_t m_rsp,
  output axil_req_t s_req [N_SLV],
  input  axil_rsp_t s_rsp [N_SLV]
);

  typedef enum logic [2:0] {S_IDLE, S_WR, S_WRESP, S_RD, S_RRESP} state_t;

  state_t            state;
  logic [IDX_W-1:0]  sel;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] data;
  logic [3:0]        strb;
  logic              aw_done, w_done, a_done;
  logic [1:0]        resp;
  logic [DATA_W-1:0] rdata;

  logic take_wr, take_rd;
  logic [IDX_W-1:0] wr_idx, rd_idx;

  assign wr_idx  = m_req.awaddr[SLOT_BITS +: IDX_W];
  assign rd_idx  = m_req.araddr[SLOT_BITS +: IDX_W];
  assign take_wr = (state == S_IDLE) && m_req.awvalid && m_req.wvalid;
  assign take_rd = (state == S_IDLE) && !take_wr && m_req.arvalid;

  // The selected slave's response, muxed once.
  axil_rsp_t sel_rsp;
  always_comb begin
    sel_rsp = '0;
    for (int i = 0; i < N_SLV; i++)
      if (IDX_W'(i) == sel) sel_rsp = s_rsp[i];
  end

  // Drive the chosen slave.
  always_comb begin
    for (int i = 0; i < N_SLV; i++) begin
      s_req[i] = '0;
      if (IDX_W'(i) == sel) begin
        s_req[i].awaddr  = addr;
        s_req[i].wdata   = data;
        s_req[i].wstrb   = strb;
        s_req[i].araddr  = addr;
        s_req[i].awvalid = (state == S_WR) && !aw_done;
        s_req[i].wvalid  = (state == S_WR) && !w_done;
        s_req[i].bready  = (state == S_WR);
        s_req[i].arvalid = (state == S_RD) && !a_done;
        s_req[i].rready  = (state == S_RD);
      end
    end
  end

  always_comb begin
    m_rsp         = '0;
    m_rsp.awready = take_wr;
    m_rsp.wready  = take_wr;
    m_rsp.arready = take_rd;
    m_rsp.bvalid  = (state == S_WRESP);
    m_rsp.bresp   = resp;
    m_rsp.rvalid  = (state == S_RRESP);
    m_rsp.rresp   = resp;
    m_rsp.rdata   = rdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      sel     <= '0;
      addr    <= '0;
      data    <= '0;
      strb    <= '0;
      aw_done <= 1'b0;
      w_done  <= 1'b0;
      a_done  <= 1'b0;
      resp    <= RESP_OKAY;
      rdata   <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          aw_done <= 1'b0;
          w_done  <= 1'b0;
          a_done  <= 1'b0;
          if (take_wr) begin
            sel  <= wr_idx;
            addr <= m_req.awaddr;
            data <= m_req.wdata;
            strb <= m_req.wstrb;
            if (32'(wr_idx) < N_SLV) begin
              state <= S_WR;
            end else begin
              resp  <= RESP_DECERR;
              state <= S_WRESP;
            end
          end else if (take_rd) begin
            sel  <= rd_idx;
            addr <= m_req.araddr;
            if (32'(rd_idx) < N_SLV) begin
              state <= S_RD;
            end else begin
              resp  <= RESP_DECERR;
              rdata <= '0;
              state <= S_RRESP;
            end
          end
        end
        S_WR: begin
          if (sel_rsp.awready) aw_done <= 1'b1;
          if (sel_rsp.wready)  w_done  <= 1'b1;
          if (sel_rsp.bvalid) begin
            resp  <= sel_rsp.bresp;
            state <= S_WRESP;
          end
        end
        S_WRESP: if (m_req.bready) state <= S_IDLE;
        S_RD: begin
          if (sel_rsp.arready) a_done <= 1'b1;
          if (sel_rsp.rvalid) begin
            resp  <= sel_rsp.rresp;
            rdata <= sel_rsp.rdata;
            state <= S_RRESP;
          end
        end
        S_RRESP: if (m_req.rready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // AXI rule on the master side: a request, once valid, stays valid until
  // it is accepted.
  a_ar_hold: assert property (@(posedge clk) disable iff (rst)
    m_req.arvalid && !m_rsp.arready |=> m_req.arvalid);
  a_aw_hold: assert property (@(posedge clk) disable iff (rst)
    m_req.awvalid && !m_rsp.awready |=> m_req.awvalid);

endmodule
