// ijtag_pkg: types and constants shared by the JTAG/IJTAG test infrastructure.
//
// All scan logic runs on one system clock. The test clock TCK is sampled and
// turned into two one-cycle enables, `rise` and `fall`: capture and shift act on
// a cycle where `rise` is set, update registers (and TDO) act on a cycle where
// `fall` is set. When the on-chip (APB) controller drives the network both
// enables are tied high, so every system clock edge counts as both edges.
//
// The instruction indices, the 8-bit IR length and the IDCODE fields are the
// values of the example specification (RiVal 2 integration). The struct
// layouts are this design's own way of bundling the signal lists of the
// JTAG-TAP, JTAG-TDR, IJTAG-TAP and IJTAG-TDR interfaces.
package ijtag_pkg;

  // ---- instruction register ------------------------------------------------
  localparam int unsigned IR_LEN = 8;
  typedef logic [IR_LEN-1:0] instr_t;

  localparam instr_t INSTR_IDCODE         = 8'd1;
  localparam instr_t INSTR_IJTAG          = 8'd8;
  localparam instr_t INSTR_SIB            = 8'd9;
  localparam instr_t INSTR_EXCFG          = 8'd10;
  localparam instr_t INSTR_EXTEST         = 8'd18;
  localparam instr_t INSTR_SAMPLE_PRELOAD = 8'd19;
  localparam instr_t INSTR_BYPASS         = 8'd255;

  // IDCODE: version[31:28], part number[27:12], manufacturer[11:1], 1[0]
  localparam logic [3:0]  IDCODE_VERSION = 4'd0;
  localparam logic [15:0] IDCODE_PARTNUM = 16'd0;
  localparam logic [10:0] IDCODE_MFRID   = 11'd65;
  localparam logic [31:0] IDCODE_VALUE   = {IDCODE_VERSION, IDCODE_PARTNUM, IDCODE_MFRID, 1'b1};

  // Number of IJTAG subnetworks in the example network.
  localparam int unsigned NUM_SUBNETS = 3;

  // ---- JTAG-TAP-Interface: shared control/data from a controller ----------
  // (Clock is represented by the rise/fall enables.)
  typedef struct packed {
    logic rise;     // rising-edge enable: capture, shift
    logic fall;     // falling-edge enable: update
    logic capture;  // capture enable (not masked by select)
    logic shift;    // shift enable   (not masked by select)
    logic update;   // update enable  (not masked by select)
    logic si;       // serial data towards the TDRs
  } jtag_tap_t;

  // JTAG-TAP-EXT-Interface: extension signals of the TAP controller
  typedef struct packed {
    logic idle;     // Run-Test/Idle
    logic reset;    // Test-Logic-Reset
    logic pause;    // Pause-DR
  } jtag_tap_ext_t;

  // ---- IJTAG-TAP-Interface: shared signals towards the subnetworks --------
  typedef struct packed {
    logic rise;
    logic fall;
    logic capture;
    logic shift;
    logic update;
    logic excfg;      // update actions target the config registers
    logic config_en;  // configuration (update) permitted
  } ijtag_tap_t;

  // IJTAG-TDR-Interface, network-to-subnetwork direction
  typedef struct packed {
    logic select;
    logic si;
  } ijtag_tdr_in_t;

  // IJTAG-TDR-Interface, subnetwork-to-network direction
  typedef struct packed {
    logic so;
    logic error;
  } ijtag_tdr_out_t;

  // ---- APB-Module register map (16-bit word index = PADDR[3:1]) -----------
  typedef enum logic [2:0] {
    REG_INSTRUCTION = 3'd0,
    REG_ACTION      = 3'd1,
    REG_WRITEF      = 3'd2,
    REG_WRITEP      = 3'd3,
    REG_READ        = 3'd4,
    REG_CONTROL     = 3'd5,
    REG_STATUS      = 3'd6
  } apb_reg_e;

  // Action register bits
  localparam int unsigned ACT_CAPTURE = 0;
  localparam int unsigned ACT_UPDATE  = 1;

endpackage
