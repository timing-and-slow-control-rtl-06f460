// tb_bc_counter: feeds bc_counter with one bunch crossing every 8 clocks
// and a BC0 every 3564 crossings, then disturbs it with an early BC0, OC0
// and GCR, and one missing BC0 (the counter must wrap on its own). An
// independent model predicts bc_count, bc0, locked, the orbit
// counter and the misalignment pulse, compared every clock.
module tb_bc_counter;
  import backend_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst;
  tcds2_cmd_t  cmd;
  timing_t     tim;
  logic [31:0] orbit_count;
  logic        bc0_misaligned;

  int checks = 0, failures = 0;
  int n_wrap = 0, n_mis = 0;

  bc_counter dut (.clk, .rst, .cmd, .tim, .orbit_count, .bc0_misaligned);

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

  // model state
  int  m_cnt, m_orbit;
  bit  m_locked, m_mis, m_bx, m_bc0;

  initial begin
    int bx_in_orbit;
    rst = 1'b1; cmd = '0;
    m_cnt = 0; m_orbit = 0; m_locked = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // start mid-orbit, unlocked
    bx_in_orbit = 3000;
    for (int bx = 0; bx < 3 * 3564 + 2000; bx++) begin
      for (int k = 0; k < CLK_PER_BX; k++) begin
        cmd = '0;
        if (k == 0) begin
          cmd.bx  = 1'b1;
          cmd.bc0 = (bx_in_orbit == 0) && (bx != 3564 + 1000 + 3564); // one BC0 missing
          // one early BC0 to provoke the misalignment check
          if (bx == 3564 + 1000) begin cmd.bc0 = 1'b1; bx_in_orbit = 0; end
          cmd.oc0 = (bx == 2 * 3564 + 100);
          cmd.gcr = (bx == 3 * 3564 + 50);
        end
        // model
        m_bx = cmd.bx; m_bc0 = cmd.bx & cmd.bc0; m_mis = 0;
        if (cmd.bx) begin
          if (cmd.bc0) begin
            m_mis = m_locked && (m_cnt != 3563);
            m_cnt = 0; m_locked = 1;
          end else begin
            if (m_cnt == 3563) n_wrap++;
            m_cnt = (m_cnt == 3563) ? 0 : m_cnt + 1;
          end
        end
        if (cmd.oc0 || cmd.gcr) m_orbit = 0;
        else if (cmd.bx && cmd.bc0) m_orbit++;
        @(negedge clk);
        if (m_mis) n_mis++;
        check(tim.bx == m_bx && tim.bc0 == m_bc0, "bx/bc0");
        check(tim.locked == m_locked, "locked");
        check(int'(tim.bc_count) == m_cnt, "bc_count");
        check(int'(orbit_count) == m_orbit, "orbit");
        check(bc0_misaligned == m_mis, "misaligned");
      end
      bx_in_orbit = (bx_in_orbit == 3563) ? 0 : bx_in_orbit + 1;
    end
    check(n_wrap > 0, "wrap seen");
    check(n_mis == 1, "one misalignment");
    check(m_orbit > 0, "orbit counted");
    $display("wraps=%0d misaligned=%0d orbit=%0d", n_wrap, n_mis, m_orbit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
