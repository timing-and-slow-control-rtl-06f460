// tb_axil_crossbar: four memory-like AXI-Lite slaves, each with random
// ready and response delays, behind the crossbar. Random writes and reads
// over the four windows and over unmapped windows are compared against a
// reference memory: data must land only in the addressed slave, reads must
// return it, unmapped windows must answer DECERR, and a slave's own error
// response (offsets 0xF0 and up) must be passed back to the master.
module tb_axil_crossbar;
  import axil_pkg::*;

  localparam int N = 4;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      rst;
  axil_req_t m_req;
  axil_rsp_t m_rsp;
  axil_req_t s_req [N];
  axil_rsp_t s_rsp [N];

  int checks = 0, failures = 0;

  axil_crossbar #(.N_SLV(N), .SLOT_BITS(8), .IDX_W(8)) dut (.*);
  axil_bfm u_bfm (.clk, .req(m_req), .rsp(m_rsp));

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

  // slave models: 64 words each; offsets >= 0xF0 answer SLVERR
  logic [31:0] smem [N][64];
  for (genvar s = 0; s < N; s++) begin : g_slv
    logic aw_got, w_got, ar_got;
    logic [7:0] aw_off, ar_off;
    logic [31:0] w_dat;
    always @(negedge clk) begin
      s_rsp[s].awready <= !aw_got && s_req[s].awvalid && ($urandom_range(0, 1) == 0);
      s_rsp[s].wready  <= !w_got  && s_req[s].wvalid  && ($urandom_range(0, 1) == 0);
      s_rsp[s].arready <= !ar_got && s_req[s].arvalid && ($urandom_range(0, 1) == 0);
    end
    always @(posedge clk) begin
      if (rst) begin
        aw_got <= 0; w_got <= 0; ar_got <= 0;
        s_rsp[s].bvalid <= 0; s_rsp[s].rvalid <= 0;
        s_rsp[s].bresp <= 0; s_rsp[s].rresp <= 0; s_rsp[s].rdata <= 0;
      end else begin
        if (s_req[s].awvalid && s_rsp[s].awready) begin aw_got <= 1; aw_off <= s_req[s].awaddr[7:0]; end
        if (s_req[s].wvalid && s_rsp[s].wready) begin w_got <= 1; w_dat <= s_req[s].wdata; end
        if (aw_got && w_got && !s_rsp[s].bvalid && $urandom_range(0, 2) == 0) begin
          s_rsp[s].bvalid <= 1;
          s_rsp[s].bresp  <= (aw_off >= 8'hF0) ? RESP_SLVERR : RESP_OKAY;
          if (aw_off < 8'hF0) smem[s][aw_off[7:2]] <= w_dat;
        end
        if (s_rsp[s].bvalid && s_req[s].bready) begin
          s_rsp[s].bvalid <= 0; aw_got <= 0; w_got <= 0;
        end
        if (s_req[s].arvalid && s_rsp[s].arready) begin ar_got <= 1; ar_off <= s_req[s].araddr[7:0]; end
        if (ar_got && !s_rsp[s].rvalid && $urandom_range(0, 2) == 0) begin
          s_rsp[s].rvalid <= 1;
          s_rsp[s].rresp  <= (ar_off >= 8'hF0) ? RESP_SLVERR : RESP_OKAY;
          s_rsp[s].rdata  <= smem[s][ar_off[7:2]];
        end
        if (s_rsp[s].rvalid && s_req[s].rready) begin
          s_rsp[s].rvalid <= 0; ar_got <= 0;
        end
      end
    end
  end

  logic [31:0] ref_mem [N][64];

  initial begin
    logic [31:0] a, d, rd;
    logic [1:0]  r;
    int idx, off;
    int n_decerr = 0, n_slverr = 0, n_rd = 0;
    rst = 1;
    for (int s = 0; s < N; s++)
      for (int w = 0; w < 64; w++) begin smem[s][w] = 32'(s * 1000 + w); ref_mem[s][w] = 32'(s * 1000 + w); end
    repeat (3) @(negedge clk);
    rst = 0;
    // first and last unmapped windows
    u_bfm.write(32'(N * 256), 32'h1, 4'hF, r); check(r == RESP_DECERR, "wr decerr at N");
    u_bfm.read(32'(N * 256 + 4), rd, r);      check(r == RESP_DECERR, "rd decerr at N");
    u_bfm.write(32'hFF04, 32'h1, 4'hF, r);    check(r == RESP_DECERR, "wr decerr at 255");
    for (int n = 0; n < 600; n++) begin
      idx = ($urandom_range(0, 9) == 0) ? $urandom_range(N, 255) : $urandom_range(0, N - 1);
      off = ($urandom_range(0, 15) == 0) ? $urandom_range(60, 63) : $urandom_range(0, 59);
      a = {16'h0, 8'(idx), 6'(off), 2'b00};
      if ($urandom_range(0, 1) == 0) begin
        d = $urandom;
        u_bfm.write(a, d, 4'hF, r);
        if (idx >= N) begin check(r == RESP_DECERR, "wr decerr"); n_decerr++; end
        else if (off >= 60) begin check(r == RESP_SLVERR, "wr slverr"); n_slverr++; end
        else begin check(r == RESP_OKAY, "wr ok"); ref_mem[idx][off] = d; end
      end else begin
        u_bfm.read(a, rd, r);
        if (idx >= N) begin check(r == RESP_DECERR, "rd decerr"); n_decerr++; end
        else if (off >= 60) begin check(r == RESP_SLVERR, "rd slverr"); n_slverr++; end
        else begin
          check(r == RESP_OKAY && rd == ref_mem[idx][off], "rd data"); n_rd++;
        end
      end
    end
    // all slave memories must match the reference (no stray writes)
    for (int s = 0; s < N; s++)
      for (int w = 0; w < 60; w++) check(smem[s][w] == ref_mem[s][w], "slave contents");
    check(n_decerr > 0 && n_slverr > 0 && n_rd > 0, "all cases hit");
    $display("decerr=%0d slverr=%0d reads=%0d", n_decerr, n_slverr, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
