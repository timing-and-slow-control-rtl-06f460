// timing: the backend's TIMING block. It turns the stream of TCDS2 frames
// into the BX strobe, the BC0 marker and the bunch-crossing counter that
// are fanned out to every LpGBT link, and decodes the commands that stay on
// the backend (OC0, EC0, GCR, Resync, HR), which are not sent to the
// front-end boards.
//
// It is tcds2_decoder followed by bc_counter, all in the 320 MHz clock
// domain. The decoded commands are delayed by one register so that they
// line up with tim. Latency from frame_strobe to tim.bx is fixed at two
// clocks, the same for every link, as required for deterministic timing.
module timing
  import backend_pkg::*;
#(
  parameter int unsigned BX_PER_ORBIT_P = BX_PER_ORBIT,
  parameter int unsigned ORBIT_W        = 32
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               frame_strobe,
  input  logic [CMD_W-1:0]   frame_cmd,
  output timing_t            tim,
  output tcds2_cmd_t         cmd,            // decoded, aligned with tim
  output logic [ORBIT_W-1:0] orbit_count,
  output logic               bc0_misaligned
);

  tcds2_cmd_t cmd_dec;

  tcds2_decoder u_dec (
    .clk, .rst, .frame_strobe, .frame_cmd, .cmd(cmd_dec)
  );

  bc_counter #(.BX_PER_ORBIT_P(BX_PER_ORBIT_P), .ORBIT_W(ORBIT_W)) u_bc (
    .clk, .rst, .cmd(cmd_dec), .tim, .orbit_count, .bc0_misaligned
  );

  always_ff @(posedge clk) begin
    if (rst) cmd <= '0;
    else     cmd <= cmd_dec;
  end

endmodule
