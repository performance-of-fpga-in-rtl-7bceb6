// wdt_pkg: types and constants shared by the windowed watchdog timer.
//
// The watchdog monitors a processor through a service window (opened by a
// falling edge on INIT) and a frame window (started by a correct service).
// This package holds the configuration register bit map, the states of the
// fault detection state machine, the failure-mode codes logged in FLSTAT,
// the two unlock patterns and the default hard-coded window length tables.
//
// Taken from the original specification: the register field names (FWLEN, SWLEN, WDRST,
// WDSRVC, SWSTAT, WDFAIL, FLSTAT, INIT), the four FSM states, the three
// failure modes, the 16-bit unlock register and its patterns 0xAAAA/0x5555,
// the 16-bit window main counters. Own choices: the bit positions of the
// fields, the 2-bit width of the length selectors, the address map, the
// failure-mode encoding and every numeric default marked "assumed" below.
package wdt_pkg;

  // Processor bus: 16-bit data (the unlock register is 16 bits wide).
  localparam int unsigned DATA_W = 16;
  // Address bus width (assumed): two registers are decoded.
  localparam int unsigned ADDR_W = 2;

  typedef logic [DATA_W-1:0] data_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Register addresses (assumed).
  localparam addr_t ADDR_CONFIG = 2'd0;
  localparam addr_t ADDR_UNLOCK = 2'd1;

  // Unlock patterns, written back to back to the unlock register.
  localparam data_t UNLOCK_PAT1 = 16'hAAAA;
  localparam data_t UNLOCK_PAT2 = 16'h5555;

  // Window main counters are 16 bits wide.
  localparam int unsigned WIN_CNT_W = 16;
  typedef logic [WIN_CNT_W-1:0] win_len_t;

  // Window length selectors: 2 bits each, choosing one of four hard-coded
  // lengths (assumed width).
  localparam int unsigned LEN_SEL_W = 2;
  typedef logic [LEN_SEL_W-1:0] len_sel_t;
  typedef logic [(1<<LEN_SEL_W)-1:0][WIN_CNT_W-1:0] len_tab_t;

  // Default tables, in periods of the derived window clock. Entry 0 is the
  // shortest: 10 SWCLK and 15 FWCLK periods, the lengths used in the
  // reference simulation of the original design; the other entries are assumed.
  localparam len_tab_t SW_LEN_TAB_DEF = {16'd100, 16'd50, 16'd25, 16'd10};
  localparam len_tab_t FW_LEN_TAB_DEF = {16'd100, 16'd50, 16'd20, 16'd15};

  // Configuration register bit map (assumed positions).
  localparam int unsigned CFG_FWLEN_LSB  = 0;   // [1:0]   RW, lockable
  localparam int unsigned CFG_SWLEN_LSB  = 2;   // [3:2]   RW, lockable
  localparam int unsigned CFG_WDRST      = 4;   // [4]     RW
  localparam int unsigned CFG_WDSRVC     = 5;   // [5]     RW
  localparam int unsigned CFG_SWSTAT_LSB = 6;   // [7:6]   RO: {missed, open}
  localparam int unsigned CFG_WDFAIL     = 8;   // [8]     RO
  localparam int unsigned CFG_FLSTAT_LSB = 9;   // [10:9]  RO
  localparam int unsigned CFG_INIT       = 11;  // [11]    RO

  // States of the reset-initialisation and fault detection machine.
  typedef enum logic [1:0] {
    ST_FAILED  = 2'd0,  // STATE0: WDFAIL = 1, waiting for a WDRST rising edge
    ST_ARMED   = 2'd1,  // STATE1: WDFAIL = 1, waiting for a service window
    ST_WINDOW  = 2'd2,  // STATE2: WDFAIL = 1, window open, waiting for service
    ST_RUNNING = 2'd3   // STATE3: WDFAIL = 0, watchdog operational
  } wdt_state_e;

  // Failure modes logged in FLSTAT.
  typedef enum logic [1:0] {
    FL_NONE        = 2'd0,  // no failure since power-up
    FL_FRAME_EXP   = 2'd1,  // frame window expired
    FL_SRVC_OUTSIDE = 2'd2, // WDSRVC rising edge outside the service window
    FL_FALL_INSIDE = 2'd3   // WDSRVC falling edge inside the service window
  } fail_mode_e;

  // SWSTAT field.
  typedef struct packed {
    logic missed;  // a service window closed without a service
    logic open;    // the service window is open
  } swstat_t;

endpackage
