// macb_pkg -- types and constants shared by the MACB (Master AIDA Clock Box) RTL.
//
// The MACB sits between up to four FEE64 front-end cards (or four lower-level
// MACBs) and the next level of the distribution tree.  Every HDMI port carries
// the same bundle: a Clock and a SYNC travelling away from the root, a
// SYNC_Return and an ASIC Trigger travelling towards the root, and four
// single-ended spare lines whose direction depends on the mode.  The bundles
// below model the differential LVDS pairs as one logic bit each.
//
// The port counts (4 downstream HDMI ports, 4 spare lines, 4 Fast NIM inputs
// and 4 outputs) and the list of switch codes follow the specification.  The
// numbering of the Fast NIM sockets and the encodings of the enums are this
// design's own choice.
package macb_pkg;

  localparam int unsigned NUM_PORTS = 4;  // downstream HDMI ports 1..4
  localparam int unsigned NUM_SPARE = 4;  // Spare1..Spare4 per HDMI port
  localparam int unsigned NUM_LEMO  = 4;  // isolated Fast NIM inputs, and outputs

  // Spare line use in Correlation DAQ mode (index = SpareN - 1)
  localparam int unsigned SP_CLK10     = 0;  // Correlation DAQ 10 MHz clock
  localparam int unsigned SP_SCALER_RST= 1;  // Correlation DAQ (scaler) reset
  localparam int unsigned SP_RST_REQ   = 2;  // Correlation DAQ reset request
  localparam int unsigned SP_TRIG_ACC  = 3;  // Correlation DAQ trigger accept

  // Fast NIM input sockets
  localparam int unsigned LI_TRIG_ACC  = 0;  // accepted trigger from the DAQ
  localparam int unsigned LI_RST_REQ   = 1;  // scaler reset request from the DAQ
  localparam int unsigned LI_EXT_RST   = 2;  // external timestamp reset (code 4)
  // Fast NIM output sockets
  localparam int unsigned LO_CLK10     = 0;  // 10 MHz clock to the DAQ
  localparam int unsigned LO_SCALER_RST= 1;  // scaler reset to the DAQ

  // Front-panel rotary switch positions that the specification defines
  typedef enum logic [3:0] {
    CODE_MASTER_ROOT_XTAL        = 4'd0,   // internal 50 MHz, SYNC from master FEE64
    CODE_MASTER_ROOT_EXT         = 4'd1,   // external clock and SYNC
    CODE_MASTER_BRANCH           = 4'd2,   // master FEE64 on port 1, below the root
    CODE_SLAVE_BRANCH            = 4'd3,   // everything from Port Next
    CODE_MASTER_ROOT_EXT_TSRST   = 4'd4,   // ext clock, internal SYNC, ext timestamp reset
    CODE_MASTER_ROOT_EXT50       = 4'd5,   // ext 50 MHz clock, internal SYNC
    CODE_MASTER_ROOT_EXT100      = 4'd6,   // ext 100 MHz / 2, internal SYNC
    CODE_MASTER_ROOT_EXT100_SYNC = 4'd12,  // ext 100 MHz / 2, external SYNC
    CODE_MASTER_ROOT_EXT200_SYNC = 4'd13   // ext 200 MHz / 4, external SYNC
  } macb_code_e;

  typedef enum logic [2:0] {
    CLK_NONE      = 3'd0,  // undefined (commissioning) code: clock held low
    CLK_CRYSTAL   = 3'd1,  // on-board 50 MHz crystal
    CLK_EXT       = 3'd2,  // back-panel SMA, used directly
    CLK_EXT_DIV2  = 3'd3,  // back-panel SMA divided by 2
    CLK_EXT_DIV4  = 3'd4,  // back-panel SMA divided by 4
    CLK_PORT_NEXT = 3'd5   // from the next level up
  } clk_src_e;

  typedef enum logic [1:0] {
    SYNC_NONE      = 2'd0, // undefined code: SYNC held low
    SYNC_EXT       = 2'd1, // back-panel SMA
    SYNC_PORT1_RET = 2'd2, // SYNC_Return of the master FEE64 on port 1
    SYNC_PORT_NEXT = 2'd3  // from the next level up
  } sync_src_e;

  // Decoded rotary switch setting
  typedef struct packed {
    logic      valid;     // code is one the specification defines
    logic      master;    // port 1 holds the master FEE64 (or the branch towards it)
    logic      root;      // top of the hierarchy: Correlation DAQ Lemo sockets in use
    clk_src_e  clk_src;
    sync_src_e sync_src;
    logic      ext_ts_rst; // Correlation DAQ Reset comes from a Lemo input
  } macb_cfg_t;

  // Timestamping signals flowing away from the root (MACB -> FEE64)
  typedef struct packed {
    logic clock;
    logic sync;
  } ts_down_t;

  // Signals flowing towards the root (FEE64 -> MACB)
  typedef struct packed {
    logic sync_return;
    logic asic_trigger;
  } ts_up_t;

  typedef logic [NUM_SPARE-1:0] spare_t;

endpackage
