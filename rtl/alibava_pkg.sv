// alibava_pkg: constants and types shared by the mother-board FPGA logic.
//
// The numbers that describe the Beetle readout chip and the acquisition
// (40 MHz chip clock, pipeline latency of 128 clocks, a readout frame of a
// 16-bit header followed by 128 channels, two chips per daughter board,
// 1 kHz laser trigger rate, at most 64776 events per acquisition, a 12-bit
// threshold DAC, an 8-bit programmable delay) follow the system description.
// The host command codes and the layout of an event in SDRAM are choices of
// this design; they are documented next to their definitions below.
package alibava_pkg;

  // ---------------------------------------------------------------- timing
  localparam int unsigned CLK_HZ        = 40_000_000; // FPGA crystal and Beetle CLK
  localparam int unsigned PIPE_LATENCY  = 128;        // Beetle analogue pipeline latency (CLK cycles)
  localparam int unsigned HEADER_BITS   = 16;         // header slots in a readout frame
  localparam int unsigned N_CHANNELS    = 128;        // channels per Beetle chip
  localparam int unsigned N_CHIPS       = 2;          // Beetle chips on the daughter board
  localparam int unsigned TRIG_OUT_HZ   = 1_000;      // laser TRIG OUT rate
  localparam int unsigned MAX_EVENTS    = 64776;      // largest acquisition kept in SDRAM

  // ------------------------------------------------------------ data words
  localparam int unsigned WORD_W        = 16;         // every stored sample is a 16-bit word
  localparam int unsigned SDRAM_AW      = 24;         // 256 Mbit = 2^24 words of 16 bits
  localparam int unsigned DAC_W         = 12;         // threshold DAC resolution
  localparam int unsigned DELAY_W       = 8;          // programmable delay code (1 ns steps)

  typedef logic [WORD_W-1:0]   word_t;
  typedef logic [SDRAM_AW-1:0] sdram_addr_t;

  // Words of one stored event (this design's layout):
  //   laser / calibration : temperature, chip 0 ch 0..127, chip 1 ch 0..127
  //   radioactive source  : TDC[31:16], TDC[15:0], temperature, chip 0, chip 1
  localparam int unsigned LASER_EVENT_WORDS = 1 + N_CHIPS*N_CHANNELS;      // 257
  localparam int unsigned RS_EVENT_WORDS    = 3 + N_CHIPS*N_CHANNELS;      // 259

  // ------------------------------------------------------- host commands
  // A command is one opcode byte followed by a fixed number of argument
  // bytes (multi-byte values most significant byte first).
  typedef enum logic [7:0] {
    CMD_RESET       = 8'h01, // no arguments
    CMD_BEETLE_CFG  = 8'h02, // i2c address (7 bit), register, value
    CMD_CALIBRATION = 8'h03, // number of events (2 bytes)
    CMD_TRIGIN_CFG  = 8'h04, // 4 thresholds (2 bytes each), scheme byte
    CMD_LASER_SYNC  = 8'h05, // delay code (ns), synchronisation delay (clocks)
    CMD_LASER_ACQ   = 8'h06, // number of events (2 bytes)
    CMD_LASER_READ  = 8'h07, // no arguments
    CMD_RS_ACQ      = 8'h08, // number of events (2 bytes)
    CMD_RS_READ     = 8'h09  // no arguments
  } cmd_e;

  // Byte sent to the host when a command has finished (status byte follows).
  localparam logic [7:0] ACK_BYTE = 8'hA5;

  // ----------------------------------------------------- CFSM main states
  typedef enum logic [3:0] {
    ST_RESET,
    ST_WAITING,
    ST_BEETLE_CFG,
    ST_CALIBRATION,
    ST_TRIGIN_CFG,
    ST_LASER_SYNC,
    ST_LASER_ACQ,
    ST_LASER_READ,
    ST_RS_ACQ,
    ST_RS_READ
  } cfsm_state_e;

  // LED codes understood by led_control.
  typedef enum logic [1:0] {
    LED_OFF   = 2'd0,
    LED_GREEN = 2'd1,  // idle, ready for a command
    LED_RED   = 2'd2,  // busy with a command
    LED_BOTH  = 2'd3   // error
  } led_code_e;

endpackage
