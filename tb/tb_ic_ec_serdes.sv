// tb_ic_ec_serdes: loops the serialiser's lane back into its own receiver
// (uplink strobe = downlink strobe delayed by three clocks) and sends random
// bytes, sometimes back to back, sometimes with idle gaps. Checks the line
// pattern of every byte (start pair 00, then the byte's pairs LSB first,
// idle 11), that every byte comes back intact and in order, and that back-
// to-back bytes take exactly five frames each.
module tb_ic_ec_serdes;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst;
  logic       tx_strobe, tx_valid, tx_ready, rx_strobe, rx_valid;
  logic [7:0] tx_data, rx_data;
  logic [1:0] tx_pair, rx_pair;

  int checks = 0, failures = 0;

  ic_ec_serdes dut (.clk, .rst, .tx_strobe, .tx_data, .tx_valid, .tx_ready,
                    .tx_pair, .rx_strobe, .rx_pair, .rx_data, .rx_valid);

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

  // lane loopback with a fixed delay
  logic [2:0] sd;
  always_ff @(posedge clk) sd <= {sd[1:0], tx_strobe};
  assign rx_strobe = sd[2];
  assign rx_pair   = tx_pair;

  byte unsigned sent[$], got[$], expect_line[$];
  int frame = 0, first_frame = -1, last_frame = 0;

  // receiver side
  always @(posedge clk) if (!rst && rx_valid) got.push_back(rx_data);

  initial begin
    int gap;
    rst = 1'b1; tx_strobe = 0; tx_valid = 0; tx_data = '0; sd = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < 3000; f++) begin
      // one frame = 8 clocks; strobe on the first
      for (int k = 0; k < 8; k++) begin
        tx_strobe = (k == 0);
        if (k == 0 && !tx_valid && sent.size() < 500) begin
          gap = (f < 1500) ? 0 : $urandom_range(0, 2);
          if (gap == 0) begin tx_valid = 1; tx_data = 8'($urandom); end
        end
        #1;
        if (tx_strobe && tx_valid && tx_ready) begin
          sent.push_back(tx_data);
          if (first_frame < 0) first_frame = f;
          last_frame = f;
          expect_line.push_back(8'h00);
          for (int p = 0; p < 4; p++) expect_line.push_back(8'((tx_data >> (2 * p)) & 3));
        end
        @(negedge clk);
        if (tx_strobe) begin
          // line pattern on the lane after this frame's strobe
          if (expect_line.size() > 0)
            check(tx_pair == 2'(expect_line.pop_front()), "lane pair");
          else
            check(tx_pair == 2'b11, "idle pair");
          if (tx_valid && sent.size() > 0 && last_frame == f) tx_valid = 0;
        end
      end
    end
    tx_valid = 0;
    repeat (100) @(negedge clk);
    check(sent.size() == got.size(), "byte count");
    for (int i = 0; i < sent.size() && i < got.size(); i++)
      check(sent[i] == got[i], "byte value");
    // the first 1500 frames ran back to back: 300 bytes in 1500 frames
    check(sent.size() >= 300, "throughput");
    $display("sent=%0d got=%0d", sent.size(), got.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
