// bc_counter: bunch-crossing and orbit counters driven by the decoded
// TCDS2 frames.
//
// The BC counter advances by one at every bunch crossing (cmd.bx) and wraps
// from BX_PER_ORBIT-1 (3563) to 0. A BC0 forces it to 0, so at the output
// BC0 and bc_count == 0 appear in the same cycle, together with BX. The
// counter counts bunch crossings, not 320 MHz clock cycles: it changes once
// every 8 clocks.
//
// This design adds, on its own account: an orbit counter that advances at
// each BC0 and is cleared by OC0 (orbit-counter reset) or GCR (global
// counter reset); a locked flag set by the first BC0 after reset; and a
// bc0_misaligned pulse when a BC0 arrives while the locked counter was not
// at 3563, i.e. when the orbit length seen differs from 3564 crossings.
//
// Timing: all outputs are registered, one clock after cmd.
module bc_counter
  import backend_pkg::*;
#(
  parameter int unsigned BX_PER_ORBIT_P = BX_PER_ORBIT,
  parameter int unsigned ORBIT_W        = 32
) (
  input  logic               clk,
  input  logic               rst,
  input  tcds2_cmd_t         cmd,
  output timing_t            tim,
  output logic [ORBIT_W-1:0] orbit_count,
  output logic               bc0_misaligned
);

  localparam logic [BC_W-1:0] BC_MAX = BC_W'(BX_PER_ORBIT_P - 1);

  logic orbit_clear;
  assign orbit_clear = cmd.oc0 | cmd.gcr;

  always_ff @(posedge clk) begin
    if (rst) begin
      tim            <= '0;
      orbit_count    <= '0;
      bc0_misaligned <= 1'b0;
    end else begin
      tim.bx         <= cmd.bx;
      tim.bc0        <= cmd.bx & cmd.bc0;
      bc0_misaligned <= 1'b0;
      if (cmd.bx) begin
        if (cmd.bc0) begin
          tim.bc_count   <= '0;
          tim.locked     <= 1'b1;
          bc0_misaligned <= tim.locked && (tim.bc_count != BC_MAX);
        end else if (tim.bc_count == BC_MAX) begin
          tim.bc_count <= '0;
        end else begin
          tim.bc_count <= tim.bc_count + 1'b1;
        end
      end
      if (orbit_clear)
        orbit_count <= '0;
      else if (cmd.bx && cmd.bc0)
        orbit_count <= orbit_count + 1'b1;
    end
  end

endmodule
