// tb_tcds2_decoder: drives random TCDS2 frames (random strobe, random
// command field) and checks each decoded pulse one clock later against the
// bit layout 0 BC0, 1 OC0, 2 EC0, 3 GCR, 4 Resync, 5 HR, 15..6 reserved.
module tb_tcds2_decoder;
  import backend_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             rst;
  logic             frame_strobe;
  logic [CMD_W-1:0] frame_cmd;
  tcds2_cmd_t       cmd;

  int checks = 0, failures = 0;

  tcds2_decoder dut (.clk, .rst, .frame_strobe, .frame_cmd, .cmd);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic             s;
    logic [CMD_W-1:0] c;
    rst = 1'b1; frame_strobe = 1'b0; frame_cmd = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      s = ($urandom_range(0, 3) == 0);
      c = CMD_W'($urandom);
      frame_strobe = s;
      frame_cmd    = c;
      @(negedge clk);
      check(cmd.bx == s, "bx");
      check(cmd.bc0    == (s & c[0]), "bc0");
      check(cmd.oc0    == (s & c[1]), "oc0");
      check(cmd.ec0    == (s & c[2]), "ec0");
      check(cmd.gcr    == (s & c[3]), "gcr");
      check(cmd.resync == (s & c[4]), "resync");
      check(cmd.hr     == (s & c[5]), "hr");
      check(cmd.reserved == (s ? c[15:6] : 10'd0), "reserved");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
