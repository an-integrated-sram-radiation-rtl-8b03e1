// radmon_pkg: sizes, command encoding and serial frame layout shared by the
// SRAM radiation monitor.
//
// The array geometry (160 rows, 8 words of 16 bits per row, 11-bit address
// split A[10:3] row / A[2:0] column) follows the published architecture.
// The serial frame (command, address, data) and its encoding, and the
// read-safe core supply threshold, are this design's own choices.
package radmon_pkg;

  localparam int unsigned ROWS          = 160;  // physical rows
  localparam int unsigned WORDS_PER_ROW = 8;    // words multiplexed per row
  localparam int unsigned WORD_W        = 16;   // bits per word
  localparam int unsigned COLS          = WORDS_PER_ROW * WORD_W;  // 128
  localparam int unsigned ROW_AW        = 8;    // A[10:3]
  localparam int unsigned COL_AW        = 3;    // A[2:0]
  localparam int unsigned ADDR_W        = ROW_AW + COL_AW;  // 11
  localparam int unsigned WORDS         = ROWS * WORDS_PER_ROW; // 1280

  // Core supply, millivolts. Nominal is 1.8 V; reading below the
  // threshold may destroy the row being read.
  localparam int unsigned VDD_W           = 11;
  localparam int unsigned VDD_NOM_MV      = 1800;
  localparam int unsigned VDD_READ_MIN_MV = 1620;

  typedef enum logic [1:0] {
    CMD_NOP   = 2'b00,
    CMD_WRITE = 2'b01,
    CMD_READ  = 2'b10,
    CMD_RSVD  = 2'b11
  } cmd_e;

  // One chip's slice of the daisy chain. Shifted MSB first.
  typedef struct packed {
    cmd_e              cmd;
    logic [ADDR_W-1:0] addr;
    logic [WORD_W-1:0] data;
  } frame_t;

  localparam int unsigned FRAME_W = $bits(frame_t);  // 29

  // Interface controller state.
  typedef enum logic [1:0] {
    S_IDLE = 2'b00,  // shifting allowed
    S_EXEC = 2'b01,  // Read/Write asserted to the core
    S_CAPT = 2'b10   // Out Enable asserted, response loaded into the shift register
  } sif_state_e;

endpackage
