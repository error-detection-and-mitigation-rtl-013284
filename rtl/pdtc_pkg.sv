// pdtc_pkg: types and constants shared by the Program & Data Trace Checker.
//
// Holds the hardened-data word layout (four 32-bit lanes of one 128-bit SIMD
// register: lane 0 control data, lanes 1..3 the data and its two copies), the
// configuration bundle passed from the register block to the checkers, the
// error-event encoding and the register map of the configuration interface.
// The lane layout follows the hardened data structure of the method; the
// register map, the event bit order and the ITM port assignment are choices of
// this design.
package pdtc_pkg;

  parameter int unsigned N_RANGES_DEF = 8;   // range checkers in the program checker
  parameter int unsigned ADDR_W       = 32;  // PC width
  parameter int unsigned DATA_W       = 32;  // checked data width (32-bit integers)

  // One hardened scalar: a 128-bit SIMD register split into four 32-bit lanes.
  typedef struct packed {
    logic [DATA_W-1:0] copy2;    // lane 3, bits 127:96  (data'')
    logic [DATA_W-1:0] copy1;    // lane 2, bits 95:64   (data')
    logic [DATA_W-1:0] data;     // lane 1, bits 63:32   (original data)
    logic [DATA_W-1:0] control;  // lane 0, bits 31:0    (control data)
  } hardened_word_t;

  // Error event bits, used for the event pulses and the sticky status flags.
  typedef enum logic [1:0] {
    EV_RANGE    = 2'd0,  // PC in no enabled code region
    EV_WATCHDOG = 2'd1,  // loop start PC not seen before the timeout
    EV_CONTROL  = 2'd2,  // control data differs from the golden value
    EV_TRIPLE   = 2'd3   // triplicated data not all equal
  } event_e;
  parameter int unsigned N_EVENTS = 4;

  // Configuration seen by the checkers.
  typedef struct packed {
    logic                prog_en;     // range checking on
    logic                wd_en;       // loop watchdog on
    logic                data_en;     // data checking on
    logic [ADDR_W-1:0]   wd_loop_pc;  // first instruction of the watched loop
    logic [31:0]         wd_timeout;  // maximum loop time, clock cycles
  } core_cfg_t;

  // Register map (byte addresses on an 8-bit APB address).
  parameter logic [7:0] REG_CTRL       = 8'h00;  // [0] prog_en [1] wd_en [2] data_en
  parameter logic [7:0] REG_STATUS     = 8'h04;  // sticky events [3:0], write 1 to clear
  parameter logic [7:0] REG_RANGE_EN   = 8'h08;  // one enable bit per range
  parameter logic [7:0] REG_WD_LOOP_PC = 8'h0C;
  parameter logic [7:0] REG_WD_TIMEOUT = 8'h10;
  parameter logic [7:0] REG_LAST_PC    = 8'h14;  // read only: last decoded PC
  parameter logic [7:0] REG_EVENT_CNT  = 8'h18;  // read only: events seen since reset
  parameter logic [7:0] REG_WD_COUNT   = 8'h1C;  // read only: watchdog count
  parameter logic [7:0] REG_LAST_OOR   = 8'h20;  // read only: per-range out-of-range of last PC
  parameter logic [7:0] REG_RANGE_BASE = 8'h80;  // range i: low at 0x80+8i, high at 0x84+8i

endpackage
