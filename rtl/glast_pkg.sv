// glast_pkg: constants and types shared by the silicon-strip tracker
// front-end readout chip, the hybrid controller chip and the hybrid/tower
// wiring.
//
// Numbers taken from the design description: 64 channels per front-end chip,
// 25 chips per hybrid, an 8-deep event FIFO, a 207-bit front-end control
// register, 5-bit chip and layer addresses with 5'h1F as the wild card, 11-bit
// packet words, at most 63 hits per hybrid and a 10-bit time-over-threshold.
// The 20 MHz controller clock, 1.3 us trigger latency and 5 MHz TOT counting
// rate give the cycle counts below. Everything else (the controller control
// register layout beyond bits 0-4, the defaults of the unused bit) is
// this implementation's choice and documented where used.
package glast_pkg;

  localparam int unsigned NCHAN       = 64;   // channels per front-end chip
  localparam int unsigned NCHIPS      = 25;   // front-end chips per hybrid
  localparam int unsigned FE_FIFO_DEPTH = 8;  // event FIFO depth (FE and TOT)
  localparam int unsigned FE_CTRL_BITS  = 207;// front-end control register
  localparam int unsigned WORD_BITS   = 11;   // packet word
  localparam int unsigned MAX_HITS    = 63;   // hits kept per hybrid and event
  localparam int unsigned TOT_BITS    = 10;   // time-over-threshold counter
  localparam logic [4:0]  WILDCARD    = 5'h1F;

  // 20 MHz controller clock: 1.3 us latency = 26 cycles, 5 MHz TOT = /4.
  localparam int unsigned LATENCY_CYCLES = 26;
  localparam int unsigned TOT_PRESCALE   = 4;

  // Front-end frame: start bit, 5 address bits, 3 command bits.
  localparam int unsigned FE_FRAME_BITS = 9;
  // Clocks a calibration strobe needs in total.
  localparam int unsigned FE_CAL_CLOCKS = 522;
  // Clocks clear/reset commands need in total.
  localparam int unsigned FE_SHORT_CLOCKS = 12;

  // Front-end serial command codes (sent LSB first).
  typedef enum logic [2:0] {
    FE_NOP        = 3'b000,
    FE_LOAD_CTRL  = 3'b001,
    FE_READ_EVENT = 3'b010,
    FE_CAL_STROBE = 3'b011,
    FE_CLEAR_EVT  = 3'b100,
    FE_RESET      = 3'b101,
    FE_RESET_FIFO = 3'b110,
    FE_END_READ   = 3'b111
  } fe_cmd_e;

  // Controller serial command codes (sent MSB first).
  typedef enum logic [2:0] {
    CC_LOAD_CTRL   = 3'b000,
    CC_CLEAR_EVT   = 3'b001,
    CC_READ_EVENT  = 3'b010,
    CC_LOAD_FE     = 3'b011,
    CC_CLOCK_ON    = 3'b100,
    CC_CAL_STROBE  = 3'b101,
    CC_SEND_FE_CMD = 3'b110,
    CC_RESET       = 3'b111
  } ctl_cmd_e;

  // Controller control register, bit 0 first on the serial line.
  localparam int unsigned CTL_CFG_BITS = 8;
  typedef struct packed {
    logic       read_always;  // bit 7: read out even without a fast-OR
    logic       unused;       // bit 6: no longer used
    logic       cksum_en;     // bit 5: append the 11-bit check-sum
    logic [4:0] nchips;       // bits 4..0: front-end chips to read
  } ctl_cfg_t;
  localparam ctl_cfg_t CTL_CFG_DEFAULT = '{read_always: 1'b1, unused: 1'b0,
                                          cksum_en: 1'b1, nchips: 5'd5};

  // Bits the controller forwards for its "load front-end control register"
  // command (front-end code, address, register contents) and for its
  // "send command to the front-end chips" command (code and address).
  localparam int unsigned LOAD_FE_DATA_BITS = 5 + 3 + FE_CTRL_BITS;
  localparam int unsigned SEND_FE_DATA_BITS = 5 + 3;

  // One entry of the controller's TOT FIFO.
  typedef struct packed {
    logic                read_flag;
    logic [TOT_BITS-1:0] tot;
  } tot_entry_t;

endpackage
