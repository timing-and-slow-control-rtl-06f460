// tb_timing: end-to-end check of the TIMING block. Frames arrive one per
// bunch crossing (every 8 clocks) with BC0 every 3564 crossings and the
// other commands sprinkled in. Checks: the BX strobe comes out exactly two
// clocks after each frame strobe; BC0 appears with bc_count == 0 and the
// crossing before it reads 3563; bc_count steps by one per crossing; each
// command bit comes out on its own pulse aligned with BX.
module tb_timing;
  import backend_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             rst;
  logic             frame_strobe;
  logic [CMD_W-1:0] frame_cmd;
  timing_t          tim;
  tcds2_cmd_t       cmd;
  logic [31:0]      orbit_count;
  logic             bc0_misaligned;

  int checks = 0, failures = 0;

  timing dut (.clk, .rst, .frame_strobe, .frame_cmd, .tim, .cmd, .orbit_count,
              .bc0_misaligned);

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

  // stimulus history, to check the two-clock latency
  logic [CMD_W:0] hist [2];
  int  last_bc, n_bc0 = 0, n_bx = 0, n_cmd = 0;
  bit  started = 0;

  initial begin
    int bxo;
    rst = 1'b1; frame_strobe = 1'b0; frame_cmd = '0;
    hist[0] = '0; hist[1] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    bxo = 3560;
    for (int c = 0; c < 8 * (3564 + 200); c++) begin
      frame_strobe = (c % CLK_PER_BX == 0);
      frame_cmd    = '0;
      if (frame_strobe) begin
        frame_cmd[CMD_BC0] = (bxo == 0);
        if ($urandom_range(0, 99) == 0) frame_cmd[5:1] = 5'($urandom);
        frame_cmd[15:6] = 10'($urandom);
      end
      @(negedge clk);
      // two clock edges have passed since the previous input (hist[0])
      check(tim.bx == hist[0][CMD_W], "bx latency 2");
      if (hist[0][CMD_W]) begin
        n_bx++;
        check(tim.bc0 == hist[0][CMD_BC0], "bc0 aligned with bx");
        check(cmd.oc0 == hist[0][CMD_OC0] && cmd.ec0 == hist[0][CMD_EC0] &&
              cmd.gcr == hist[0][CMD_GCR] && cmd.resync == hist[0][CMD_RESYNC] &&
              cmd.hr == hist[0][CMD_HR] && cmd.reserved == hist[0][15:6],
              "commands aligned with bx");
        if (hist[0][5:1] != 0) n_cmd++;
        if (tim.bc0) begin
          n_bc0++;
          check(tim.bc_count == 0, "bc_count 0 at BC0");
          if (started) check(last_bc == 3563, "3563 before BC0");
          started = 1;
        end else if (started) begin
          check(int'(tim.bc_count) == last_bc + 1, "bc_count step");
        end
        last_bc = int'(tim.bc_count);
      end else begin
        check(!tim.bc0, "no bc0 without bx");
      end
      hist[1] = hist[0];
      hist[0] = {frame_strobe, frame_cmd};
      if (frame_strobe) bxo = (bxo == 3563) ? 0 : bxo + 1;
    end
    check(n_bc0 == 2, "two BC0 seen");
    check(n_cmd > 0, "commands seen");
    check(tim.locked, "locked");
    $display("bx=%0d bc0=%0d cmds=%0d", n_bx, n_bc0, n_cmd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
