// tcds2_decoder: splits the command field of each valid TCDS2 frame into
// single-cycle pulses.
//
// The TCDS2 receiver delivers one frame per bunch crossing, marked by a
// one-cycle frame_strobe in the 320 MHz clock domain. There is no separate
// BX bit: the strobe itself is the bunch crossing, so cmd.bx is the
// registered strobe. The flag positions follow the TCDS2 command layout
// (bit 0 BC0, 1 OC0, 2 EC0, 3 GCR, 4 Resync, 5 HR, 15..6 reserved); the
// reserved bits are carried through. Bits seen outside a valid frame are
// ignored, and the single register stage are this design's choices.
//
// Interface: frame_strobe/frame_cmd in, cmd (backend_pkg::tcds2_cmd_t) out.
// Timing: cmd is valid one clock after the strobe and lasts one clock.
module tcds2_decoder
  import backend_pkg::*;
(
  input  logic             clk,
  input  logic             rst,          // synchronous, active high
  input  logic             frame_strobe, // valid TCDS2 frame
  input  logic [CMD_W-1:0] frame_cmd,    // command field of that frame
  output tcds2_cmd_t       cmd           // registered decoded pulses
);

  always_ff @(posedge clk) begin
    if (rst) begin
      cmd <= '0;
    end else if (frame_strobe) begin
      cmd.bx       <= 1'b1;
      cmd.bc0      <= frame_cmd[CMD_BC0];
      cmd.oc0      <= frame_cmd[CMD_OC0];
      cmd.ec0      <= frame_cmd[CMD_EC0];
      cmd.gcr      <= frame_cmd[CMD_GCR];
      cmd.resync   <= frame_cmd[CMD_RESYNC];
      cmd.hr       <= frame_cmd[CMD_HR];
      cmd.reserved <= frame_cmd[CMD_W-1:CMD_RSV_LO];
    end else begin
      cmd <= '0;
    end
  end

endmodule
