// tb_slow_control: exercises the per-link register slave through an AXI-Lite
// master model. The IC and EC byte outputs go to consumers that accept at
// random; receive bytes are injected directly. Checks the scratch register
// with byte strobes, the order and value of bytes sent on IC and EC, SLVERR
// on a full transmit queue and on unmapped offsets, reading received bytes
// (valid bit, empty reads), the sticky receive-overflow flag and its
// write-1-to-clear, the status bits, the queue flush, the link reset
// request and the uplink-loss counter.
module tb_slow_control;
  import axil_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst;
  axil_req_t  req;
  axil_rsp_t  rsp;
  logic [7:0] ic_tx_data, ec_tx_data, ic_rx_data, ec_rx_data;
  logic       ic_tx_valid, ic_tx_ready, ec_tx_valid, ec_tx_ready;
  logic       ic_rx_valid, ec_rx_valid;
  logic       link_ready, timing_locked, link_reset;

  int checks = 0, failures = 0;

  slow_control #(.FIFO_DEPTH(16)) dut (.*);
  axil_bfm u_bfm (.clk, .req, .rsp);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // lane consumers
  bit         ic_accept_en = 1, ec_accept_en = 1;
  byte unsigned ic_out[$], ec_out[$];
  always @(negedge clk) begin
    ic_tx_ready <= ic_accept_en && ($urandom_range(0, 2) == 0);
    ec_tx_ready <= ec_accept_en && ($urandom_range(0, 2) == 0);
  end
  always @(posedge clk) begin
    if (!rst && ic_tx_valid && ic_tx_ready) ic_out.push_back(ic_tx_data);
    if (!rst && ec_tx_valid && ec_tx_ready) ec_out.push_back(ec_tx_data);
  end

  task automatic inject(input bit ec, input logic [7:0] b);
    @(negedge clk);
    if (ec) begin ec_rx_valid = 1; ec_rx_data = b; end
    else    begin ic_rx_valid = 1; ic_rx_data = b; end
    @(negedge clk);
    ic_rx_valid = 0; ec_rx_valid = 0;
  endtask

  initial begin
    logic [31:0] d;
    logic [1:0]  r;
    byte unsigned ic_in[$], ec_in[$];
    rst = 1; ic_rx_valid = 0; ec_rx_valid = 0; ic_rx_data = 0; ec_rx_data = 0;
    ic_tx_ready = 0; ec_tx_ready = 0;
    link_ready = 1; timing_locked = 0;
    repeat (3) @(negedge clk);
    rst = 0;

    // scratch register with byte strobes
    u_bfm.write(32'h18, 32'hA5A5_1234, 4'hF, r); check(r == RESP_OKAY, "scratch wr");
    u_bfm.write(32'h18, 32'hFFFF_FF00, 4'b0010, r);
    u_bfm.read(32'h18, d, r); check(d == 32'hA5A5_FF34 && r == RESP_OKAY, "scratch strb");

    // status
    u_bfm.read(32'h04, d, r);
    check(d[7:0] == 8'b0010_1001, "status idle");   // EC RX empty, IC RX empty, link ready
    timing_locked = 1; link_ready = 0;
    u_bfm.read(32'h04, d, r); check(d[1:0] == 2'b10, "status inputs");

    // unmapped offset
    u_bfm.write(32'h40, 32'h1, 4'hF, r); check(r == RESP_SLVERR, "unmapped wr");
    u_bfm.read(32'h7C, d, r);            check(r == RESP_SLVERR, "unmapped rd");

    // bytes to IC and EC lanes
    for (int i = 0; i < 20; i++) begin
      ic_in.push_back(8'($urandom)); ec_in.push_back(8'($urandom));
      u_bfm.write(32'h08, {24'h0, ic_in[$]}, 4'h1, r); check(r == RESP_OKAY, "ic tx ok");
      u_bfm.write(32'h10, {24'h0, ec_in[$]}, 4'h1, r); check(r == RESP_OKAY, "ec tx ok");
    end
    repeat (200) @(negedge clk);
    check(ic_out.size() == 20 && ec_out.size() == 20, "bytes out");
    for (int i = 0; i < 20; i++) begin
      check(ic_out[i] == ic_in[i], "ic order");
      check(ec_out[i] == ec_in[i], "ec order");
    end

    // full queue answers SLVERR
    ic_accept_en = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      u_bfm.write(32'h08, i, 4'h1, r); check(r == RESP_OKAY, "fill");
    end
    u_bfm.read(32'h04, d, r); check(d[2] == 1'b1, "ic tx full flag");
    u_bfm.write(32'h08, 32'h99, 4'h1, r); check(r == RESP_SLVERR, "full slverr");
    // flush IC queues
    u_bfm.write(32'h00, 32'h1, 4'h1, r);
    u_bfm.read(32'h04, d, r); check(d[2] == 1'b0, "flushed");
    ic_accept_en = 1;

    // receive path
    inject(0, 8'h3C); inject(0, 8'hC3); inject(1, 8'h5A);
    u_bfm.read(32'h0C, d, r); check(d == 32'h13C, "ic rx 1");
    u_bfm.read(32'h0C, d, r); check(d == 32'h1C3, "ic rx 2");
    u_bfm.read(32'h0C, d, r); check(d == 32'h000, "ic rx empty");
    u_bfm.read(32'h14, d, r); check(d == 32'h15A, "ec rx");

    // overflow: 17 bytes into a 16-deep queue
    for (int i = 0; i < 17; i++) inject(0, 8'(i));
    u_bfm.read(32'h04, d, r); check(d[6] == 1'b1, "overflow set");
    for (int i = 0; i < 16; i++) begin
      u_bfm.read(32'h0C, d, r); check(d == (32'h100 | i), "rx after overflow");
    end
    u_bfm.write(32'h04, 32'h40, 4'h1, r);
    u_bfm.read(32'h04, d, r); check(d[6] == 1'b0, "overflow cleared");

    // link management: reset request and uplink-loss counter
    check(link_reset == 1'b0, "link reset idle");
    u_bfm.write(32'h00, 32'h10, 4'h1, r);
    check(link_reset == 1'b1, "link reset set");
    u_bfm.read(32'h00, d, r); check(d == 32'h10, "ctrl readback");
    u_bfm.write(32'h00, 32'h00, 4'h1, r);
    check(link_reset == 1'b0, "link reset cleared");
    u_bfm.read(32'h1C, d, r); check(d == 32'd1, "one drop so far");
    u_bfm.write(32'h1C, 32'h0, 4'hF, r);
    u_bfm.read(32'h1C, d, r); check(d == 32'd0, "drops cleared");
    link_ready = 1;
    for (int i = 0; i < 3; i++) begin
      repeat (3) @(negedge clk); link_ready = 0;
      repeat (3) @(negedge clk); link_ready = 1;
    end
    u_bfm.read(32'h1C, d, r); check(d == 32'd3, "three drops");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
