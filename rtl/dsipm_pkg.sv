// dsipm_pkg: constants and types shared by the digital SiPM chip.
//
// The chip reads a matrix of 32x30 pixels (9 SPADs each) through 16 readout
// columns of 60 pixels. A hit is stored as a 20-bit word {T, Y, X}: a 4-bit
// column address X, a 6-bit row address Y and a 10-bit time stamp T. On the
// serial chain a hit travels in a 28-bit packet: a '1' marker, a valid bit
// and 26 data bits {hit word, 6-bit chip ID}, sent least significant bit
// first. The widths of X, Y, T, the chip ID, the packet length, the FIFO depth
// and the 12 pulse-width commands follow the published description; the
// order of the fields in the packet, the test pattern and the layout of the
// configuration register are this design's own choices.
package dsipm_pkg;

  localparam int unsigned DEF_NCOL       = 16;  // readout columns (X address 0..15)
  localparam int unsigned DEF_NROW       = 60;  // pixels per readout column
  localparam int unsigned DEF_NSPAD      = 9;   // SPADs per pixel
  localparam int unsigned X_W        = 4;
  localparam int unsigned Y_W        = 6;
  localparam int unsigned TS_W       = 10;
  localparam int unsigned ID_W       = 6;
  localparam int unsigned DEF_FIFO_DEPTH = 32;
  localparam int unsigned PKT_LEN    = 28;  // marker + valid + 26 data bits
  localparam int unsigned DATA_W     = PKT_LEN - 2;

  // One hit as it sits in the FIFO (20 bits).
  typedef struct packed {
    logic [TS_W-1:0] t;
    logic [Y_W-1:0]  y;
    logic [X_W-1:0]  x;
  } hit_word_t;

  localparam int unsigned HIT_W = $bits(hit_word_t);

  // Configuration register: pixel address and its 9 SPAD enable bits.
  typedef struct packed {
    logic [X_W-1:0]   x;
    logic [Y_W-1:0]   y;
    logic [DEF_NSPAD-1:0] en;
  } cfg_t;

  // Commands, numbered by the width of the CMD pulse in clock cycles.
  typedef enum logic [3:0] {
    CMD_NONE           = 4'd0,
    CMD_RESET_ALL      = 4'd1,
    CMD_RESET_TIME     = 4'd2,
    CMD_RESET_MATRIX   = 4'd3,
    CMD_READOUT_SIMPLE = 4'd4,
    CMD_START_READOUT  = 4'd5,
    CMD_STOP_READOUT   = 4'd6,
    CMD_WRITE_CONFIG   = 4'd7,
    CMD_READ_CONFIG    = 4'd8,
    CMD_WRITE_ID       = 4'd9,
    CMD_INJECT_MATRIX  = 4'd10,
    CMD_INJECT_FIFO    = 4'd11,
    CMD_INJECT_SER     = 4'd12
  } cmd_e;

  // Test word written by InjectFIFO and sent by InjectSerializer:
  // alternating bits, so that stuck or swapped serial bits show.
  localparam hit_word_t TEST_WORD = hit_word_t'(20'hA5C3A);

endpackage
