// backend_pkg: constants and types shared by the timing and link logic of
// the drift-tube timing and slow-control backend.
//
// The command-field bit positions come from the TCDS2 frame layout used by
// the backend (bit 0 BC0, 1 OC0, 2 EC0, 3 GCR, 4 Resync, 5 HR, 15..6
// reserved). An LHC orbit holds 3564 bunch crossings (counter 0..3563) and
// the 320.632 MHz master clock runs at eight times the 40.079 MHz
// bunch-crossing rate. The layout of the per-link structs towards the
// LpGBT-FPGA cores is this design's own choice.
package backend_pkg;

  localparam int unsigned CLK_PER_BX   = 8;     // 320.632 MHz / 40.079 MHz
  localparam int unsigned BX_PER_ORBIT = 3564;  // BC counter 0 .. 3563
  localparam int unsigned BC_W         = 12;    // enough for 0 .. 4095
  localparam int unsigned CMD_W        = 16;    // TCDS2 command field width
  localparam int unsigned RSV_W        = 10;    // reserved bits 15..6

  // Command-field bit positions.
  localparam int unsigned CMD_BC0    = 0;
  localparam int unsigned CMD_OC0    = 1;
  localparam int unsigned CMD_EC0    = 2;
  localparam int unsigned CMD_GCR    = 3;
  localparam int unsigned CMD_RESYNC = 4;
  localparam int unsigned CMD_HR     = 5;
  localparam int unsigned CMD_RSV_LO = 6;

  // Decoded command of one TCDS2 frame; every flag is a one-cycle pulse.
  typedef struct packed {
    logic             bx;       // valid frame = one bunch crossing
    logic             bc0;      // bunch-crossing zero
    logic             oc0;      // orbit-counter reset
    logic             ec0;      // event-counter reset
    logic             gcr;      // global counter reset
    logic             resync;   // flush pipelines
    logic             hr;       // HR bit of the command field
    logic [RSV_W-1:0] reserved; // carried through unchanged
  } tcds2_cmd_t;

  // Timing information distributed to every link.
  typedef struct packed {
    logic            bx;        // one-cycle strobe per bunch crossing
    logic            bc0;       // one-cycle strobe at bunch crossing 0
    logic [BC_W-1:0] bc_count;  // bunch-crossing number in the orbit
    logic            locked;    // a BC0 has been seen since reset
  } timing_t;

  // Downlink inputs of one LpGBT-FPGA core (one per 40 MHz frame).
  typedef struct packed {
    logic            bx;        // frame strobe
    logic            bc0;
    logic [BC_W-1:0] bc_count;
    logic [1:0]      ic;        // internal-control pair (LpGBT chip)
    logic [1:0]      ec;        // external-control pair (SCA chip)
    logic            link_reset;// host request to reset core and transceiver
  } lpgbt_dl_t;

  // Uplink outputs of one LpGBT-FPGA core.
  typedef struct packed {
    logic       strobe;         // one-cycle strobe per received frame
    logic       ready;          // uplink locked
    logic [1:0] ic;
    logic [1:0] ec;
  } lpgbt_ul_t;

endpackage
