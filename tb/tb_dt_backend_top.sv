// tb_dt_backend_top: end-to-end test of the backend at its default size
// (90 links). Each link's LpGBT-FPGA core is replaced by a lane loopback.
//
// Timing thread: TCDS2 frames every 8 clocks for a little over two orbits
// of 3564 crossings, with OC0, EC0, GCR, Resync and HR sent once each, one
// early BC0 and one missing BC0 (the counter must wrap on its own). Every clock, every link's downlink BX/BC0/BC counter must
// equal the input strobe delayed by three clocks and be identical on all
// links (no skew); the BC counter must step by one, wrap 3563 -> 0 and read
// 0 at BC0; the orbit counter and the misalignment pulse are predicted.
// Control thread: register access to several links through the crossbar,
// an unmapped window (DECERR), IC and EC bytes round-tripped over the
// lanes, a full transmit queue (SLVERR) and a receive overflow, no
// crosstalk to a neighbouring link, uplink-ready drops counted on one link
// and a link reset request on another.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_dt_backend_top;
  import backend_pkg::*;
  import axil_pkg::*;

  localparam int N = 90;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             rst;
  logic             tcds2_strobe;
  logic [CMD_W-1:0] tcds2_cmd;
  axil_req_t        axil_req;
  axil_rsp_t        axil_rsp;
  lpgbt_dl_t        dl [N];
  lpgbt_ul_t        ul [N];
  tcds2_cmd_t       tcds2_decoded;
  logic [31:0]      orbit_count;
  logic             timing_locked, bc0_misaligned;

  int checks = 0, failures = 0;
  logic [N-1:0] ul_ready = '1;

  dt_backend_top dut (.*);
  axil_bfm u_bfm (.clk, .req(axil_req), .rsp(axil_rsp));

  for (genvar i = 0; i < N; i++) begin : g_loop
    assign ul[i].strobe = dl[i].bx;
    assign ul[i].ready  = ul_ready[i];
    assign ul[i].ic     = dl[i].ic;
    assign ul[i].ec     = dl[i].ec;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_bx = 0, n_bc0 = 0, n_wrap = 0, n_mis = 0, n_oc0 = 0, n_ec0 = 0;
  int n_gcr = 0, n_resync = 0, n_hr = 0, n_orbit_clr = 0;
  int n_drop = 0, n_lreset = 0;
  int n_decerr = 0, n_slverr = 0, n_ovf = 0, n_ic_loop = 0, n_ec_loop = 0;
  bit timing_done = 0;

  // ----------------------------------------------------------- timing side
  logic [CMD_W:0] hist [3];   // {strobe, cmd} of the last three clocks
  int  last_bc = -1, m_orbit = 0;

  always @(negedge clk) if (!rst) begin
    // hist[2] was applied three clock edges ago
    check(dl[0].bx == hist[2][CMD_W], "dl.bx latency 3");
    check(dl[0].bc0 == (hist[2][CMD_W] & hist[2][CMD_BC0]), "dl.bc0 latency 3");
    for (int i = 1; i < N; i++)
      if (dl[i].bx != dl[0].bx || dl[i].bc0 != dl[0].bc0 || dl[i].bc_count != dl[0].bc_count)
        check(1'b0, "links identical");
    if (dl[0].bx) begin
      n_bx++;
      if (dl[0].bc0) begin
        n_bc0++;
        check(dl[0].bc_count == 0, "bc 0 at BC0");
      end else if (last_bc >= 0) begin
        if (last_bc == 3563) begin
          n_wrap++;
          check(dl[0].bc_count == 0, "wrap to 0");
        end else begin
          check(int'(dl[0].bc_count) == last_bc + 1, "bc step");
        end
      end
      if (last_bc >= 0 || dl[0].bc0) last_bc = int'(dl[0].bc_count);
    end
    // decoded commands, one clock after the timing block output
    if (tcds2_decoded.oc0)    n_oc0++;
    if (tcds2_decoded.ec0)    n_ec0++;
    if (tcds2_decoded.gcr)    n_gcr++;
    if (tcds2_decoded.resync) n_resync++;
    if (tcds2_decoded.hr)     n_hr++;
    if (bc0_misaligned)       n_mis++;
  end

  always @(posedge clk) begin
    hist[2] <= hist[1];
    hist[1] <= hist[0];
    hist[0] <= {tcds2_strobe, tcds2_cmd};
  end

  initial begin : timing_thread
    int bxo;
    rst = 1; tcds2_strobe = 0; tcds2_cmd = '0;
    hist[0] = '0; hist[1] = '0; hist[2] = '0;
    repeat (4) @(negedge clk);
    rst = 0;
    bxo = 3400;
    for (int bx = 0; bx < 2 * 3564 + 1000; bx++) begin
      for (int k = 0; k < CLK_PER_BX; k++) begin
        tcds2_strobe = (k == 0);
        tcds2_cmd    = '0;
        if (k == 0) begin
          if (bx == 3564 + 700) bxo = 0;   // early BC0
          tcds2_cmd[CMD_BC0]    = (bxo == 0) && (bx != 3564 + 700 + 3564); // one BC0 missing
          tcds2_cmd[CMD_OC0]    = (bx == 2000);
          tcds2_cmd[CMD_EC0]    = (bx == 2100);
          tcds2_cmd[CMD_GCR]    = (bx == 2 * 3564 + 900);
          tcds2_cmd[CMD_RESYNC] = (bx == 2200);
          tcds2_cmd[CMD_HR]     = (bx == 2300);
          if (tcds2_cmd[CMD_OC0] || tcds2_cmd[CMD_GCR]) begin m_orbit = 0; n_orbit_clr++; end
          else if (tcds2_cmd[CMD_BC0]) m_orbit++;
          bxo = (bxo == 3563) ? 0 : bxo + 1;
        end
        @(negedge clk);
      end
    end
    tcds2_strobe = 0;
    repeat (5) @(negedge clk);
    check(orbit_count == 32'(m_orbit), "orbit count");
    check(timing_locked, "locked");
    timing_done = 1;
  end

  // ----------------------------------------------------------- control side
  function automatic logic [31:0] ra(input int link, input int off);
    return 32'(link * 256 + off);
  endfunction

  initial begin : control_thread
    logic [31:0] d;
    logic [1:0]  r;
    byte unsigned sent[$];
    int links[4] = '{0, 3, 47, 89};
    @(negedge clk);
    wait (!rst);
    repeat (10) @(negedge clk);
    // scratch registers on several links stay separate
    foreach (links[j]) u_bfm.write(ra(links[j], 'h18), 32'hC0DE_0000 + 32'(links[j]), 4'hF, r);
    foreach (links[j]) begin
      u_bfm.read(ra(links[j], 'h18), d, r);
      check(d == 32'hC0DE_0000 + 32'(links[j]) && r == RESP_OKAY, "scratch per link");
    end
    // unmapped windows
    u_bfm.read(ra(90, 'h18), d, r);   if (r == RESP_DECERR) n_decerr++;
    u_bfm.write(ra(200, 0), 0, 4'hF, r); if (r == RESP_DECERR) n_decerr++;
    // IC and EC round trip on each chosen link
    foreach (links[j]) begin
      u_bfm.write(ra(links[j], 'h08), 32'h40 + 32'(j), 4'h1, r);
      u_bfm.write(ra(links[j], 'h10), 32'h80 + 32'(j), 4'h1, r);
    end
    repeat (6 * CLK_PER_BX * 5) @(negedge clk);
    foreach (links[j]) begin
      u_bfm.read(ra(links[j], 'h0C), d, r);
      if (d == 32'h140 + 32'(j)) n_ic_loop++; else check(1'b0, "ic loop");
      u_bfm.read(ra(links[j], 'h14), d, r);
      if (d == 32'h180 + 32'(j)) n_ec_loop++; else check(1'b0, "ec loop");
    end
    // flood link 5's IC queue: some writes are refused, the receive side overflows
    for (int i = 0; i < 24; i++) begin
      u_bfm.write(ra(5, 'h08), 32'(i), 4'h1, r);
      if (r == RESP_SLVERR) n_slverr++; else sent.push_back(8'(i));
    end
    repeat (30 * CLK_PER_BX * 5) @(negedge clk);
    u_bfm.read(ra(5, 'h04), d, r);
    if (d[6]) n_ovf++;
    check(sent.size() > 16, "more than a queue accepted");
    for (int i = 0; i < 16; i++) begin
      u_bfm.read(ra(5, 'h0C), d, r);
      check(d == {23'h0, 1'b1, sent[i]}, "flood data in order");
    end
    u_bfm.read(ra(6, 'h0C), d, r);
    check(d[8] == 1'b0, "no crosstalk to link 6");
    // link management: uplink drops on link 10, reset request on link 20
    u_bfm.write(ra(10, 'h1C), 0, 4'hF, r);
    for (int i = 0; i < 2; i++) begin
      @(negedge clk) ul_ready[10] = 1'b0;
      repeat (5) @(negedge clk);
      ul_ready[10] = 1'b1;
    end
    u_bfm.read(ra(10, 'h1C), d, r); if (d == 2) n_drop++; else check(1'b0, "drops link 10");
    u_bfm.read(ra(11, 'h1C), d, r); check(d == 0, "no drops link 11");
    u_bfm.write(ra(20, 'h00), 32'h10, 4'h1, r);
    if (dl[20].link_reset && !dl[21].link_reset && !dl[19].link_reset) n_lreset++;
    u_bfm.write(ra(20, 'h00), 32'h00, 4'h1, r);
    check(!dl[20].link_reset, "link reset released");
    wait (timing_done);
    // mechanism coverage
    check(n_bx > 0, "bx");           check(n_bc0 >= 2, "bc0");
    check(n_wrap > 0, "bc wrap");    check(n_mis == 1, "bc0 misaligned");
    check(n_oc0 == 1, "oc0");        check(n_ec0 == 1, "ec0");
    check(n_gcr == 1, "gcr");        check(n_resync == 1, "resync");
    check(n_hr == 1, "hr");          check(n_orbit_clr == 2, "orbit clears");
    check(n_decerr == 2, "decerr");  check(n_slverr > 0, "slverr");
    check(n_ovf == 1, "overflow");   check(n_ic_loop == 4, "ic loops");
    check(n_ec_loop == 4, "ec loops");
    check(n_drop == 1, "uplink drop counted"); check(n_lreset == 1, "link reset request");
    $display("bx=%0d bc0=%0d wrap=%0d mis=%0d oc0=%0d ec0=%0d gcr=%0d resync=%0d hr=%0d",
             n_bx, n_bc0, n_wrap, n_mis, n_oc0, n_ec0, n_gcr, n_resync, n_hr);
    $display("decerr=%0d slverr=%0d ovf=%0d ic_loop=%0d ec_loop=%0d",
             n_decerr, n_slverr, n_ovf, n_ic_loop, n_ec_loop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
