// dt_backend_top: timing and slow-control backend for the on-board
// electronics of a drift-tube detector (one board, N_LINKS front-end links).
//
// The TCDS2 timing stream, already decoded into one frame per bunch
// crossing (frame strobe plus 16-bit command field), enters the TIMING
// block. Its BX strobe, BC0 marker and bunch-crossing counter fan out to
// every channel, which registers them into the downlink inputs of that
// link's LpGBT-FPGA core (dl). OC0, EC0, GCR, Resync and HR are decoded and
// brought out here, but are not sent down the links. The network side's
// AXI-Lite master (axil_req/axil_rsp) reaches each channel's slow-control
// slave through the crossbar; channel i owns the 256-byte window at
// i*0x100. Each channel's IC and EC lanes travel in dl.ic/dl.ec and come
// back in ul.ic/ul.ec.
//
// Everything runs in the single 320.632 MHz clock domain recovered from the
// TCDS2 stream, as the architecture requires for fixed latency. Latency
// from tcds2_strobe to dl[i].bx is three clocks for every link. The TCDS2
// receiver, the LpGBT-FPGA cores, the transceivers, the jitter-cleaner PLL
// and the Ethernet/UDP stack lie outside this module.
module dt_backend_top
  import backend_pkg::*;
  import axil_pkg::*;
#(
  parameter int unsigned N_LINKS    = 90,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  // decoded TCDS2 frames
  input  logic             tcds2_strobe,
  input  logic [CMD_W-1:0] tcds2_cmd,
  // host register access
  input  axil_req_t        axil_req,
  output axil_rsp_t        axil_rsp,
  // LpGBT-FPGA cores, one per link
  output lpgbt_dl_t        dl [N_LINKS],
  input  lpgbt_ul_t        ul [N_LINKS],
  // timing status kept on the backend
  output tcds2_cmd_t       tcds2_decoded,
  output logic [31:0]      orbit_count,
  output logic             timing_locked,
  output logic             bc0_misaligned
);

  timing_t   tim;
  axil_req_t s_req [N_LINKS];
  axil_rsp_t s_rsp [N_LINKS];

  timing #(.ORBIT_W(32)) u_timing (
    .clk, .rst,
    .frame_strobe(tcds2_strobe), .frame_cmd(tcds2_cmd),
    .tim, .cmd(tcds2_decoded), .orbit_count, .bc0_misaligned);

  assign timing_locked = tim.locked;

  axil_crossbar #(.N_SLV(N_LINKS), .SLOT_BITS(8), .IDX_W(8)) u_xbar (
    .clk, .rst, .m_req(axil_req), .m_rsp(axil_rsp), .s_req, .s_rsp);

  for (genvar i = 0; i < N_LINKS; i++) begin : g_ch
    obdt_channel #(.FIFO_DEPTH(FIFO_DEPTH)) u_ch (
      .clk, .rst, .tim, .req(s_req[i]), .rsp(s_rsp[i]),
      .dl(dl[i]), .ul(ul[i]));
  end

endmodule
