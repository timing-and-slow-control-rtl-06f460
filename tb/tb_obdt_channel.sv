// tb_obdt_channel: one channel with its LpGBT-FPGA core replaced by a lane
// loopback (uplink pairs = downlink pairs, uplink strobe = downlink BX).
// Timing: BX every 8 clocks with a running BC counter; dl.bx, dl.bc0 and
// dl.bc_count must follow tim exactly one clock later. Slow control: bytes
// written to IC_TX and EC_TX through AXI-Lite must come back in IC_RX and
// EC_RX, in order, after travelling the lanes; the lane carries at most one
// byte per five bunch crossings.
module tb_obdt_channel;
  import backend_pkg::*;
  import axil_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      rst;
  timing_t   tim;
  axil_req_t req;
  axil_rsp_t rsp;
  lpgbt_dl_t dl;
  lpgbt_ul_t ul;

  int checks = 0, failures = 0;

  obdt_channel dut (.*);
  axil_bfm u_bfm (.clk, .req, .rsp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // timing source: BX every 8 clocks, BC0 every 40 crossings (short orbit)
  int ph = 0, bc = 0;
  timing_t tim_d;
  always @(posedge clk) begin
    if (rst) begin
      tim <= '0; ph <= 0; bc <= 0; tim_d <= '0;
    end else begin
      tim_d <= tim;
      ph <= (ph + 1) % CLK_PER_BX;
      tim.bx <= (ph == 0);
      tim.bc0 <= (ph == 0) && (bc == 0);
      tim.locked <= 1'b1;
      if (ph == 0) begin
        tim.bc_count <= 12'(bc);
        bc <= (bc == 39) ? 0 : bc + 1;
      end
    end
  end

  // timing path check, every clock
  int n_bc0 = 0;
  always @(negedge clk) if (!rst) begin
    check(dl.bx == tim_d.bx && dl.bc0 == tim_d.bc0 && dl.bc_count == tim_d.bc_count,
          "dl timing one clock after tim");
    if (dl.bc0) n_bc0++;
  end

  // lane loopback
  assign ul.strobe = dl.bx;
  assign ul.ready  = 1'b1;
  assign ul.ic     = dl.ic;
  assign ul.ec     = dl.ec;

  initial begin
    logic [31:0] d;
    logic [1:0]  r;
    byte unsigned ic_in[$], ec_in[$];
    int t0;
    rst = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    u_bfm.read(32'h04, d, r); check(d[1:0] == 2'b11, "locked and ready");
    for (int i = 0; i < 8; i++) begin
      ic_in.push_back(8'($urandom)); ec_in.push_back(8'($urandom));
      u_bfm.write(32'h08, {24'h0, ic_in[$]}, 4'h1, r);
      u_bfm.write(32'h10, {24'h0, ec_in[$]}, 4'h1, r);
    end
    t0 = int'($time / 10);
    // 8 bytes x 5 crossings x 8 clocks, plus margin
    repeat (8 * 5 * CLK_PER_BX + 40) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      u_bfm.read(32'h0C, d, r); check(d == {23'h0, 1'b1, ic_in[i]}, "ic loop");
      u_bfm.read(32'h14, d, r); check(d == {23'h0, 1'b1, ec_in[i]}, "ec loop");
    end
    u_bfm.read(32'h0C, d, r); check(d[8] == 1'b0, "ic drained");
    check(n_bc0 > 0, "bc0 passed");
    check(dl.link_reset == 1'b0, "no reset request");
    u_bfm.write(32'h00, 32'h10, 4'h1, r);
    check(dl.link_reset == 1'b1, "reset request reaches dl");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
