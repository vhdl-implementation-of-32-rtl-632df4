// switch_pkg: types and constants shared by the dual-exchange time switch.
//
// The 32-bit opcode is the word every subscriber presents to its exchange.
// Field layout, MSB first: E (bit 31, subscriber enabled), I (bit 30,
// inter-exchange call), D (bits 29:26, destination subscriber), S (bits
// 25:22, source subscriber, the caller ID), six unused zero bits (21:16) and
// 16 data bits (15:0). The layout is the published one; the other types
// (data-memory word, control-memory entry, phase encoding) are this design's.
package switch_pkg;

  localparam int unsigned N_EXCH    = 2;   // exchanges
  localparam int unsigned N_USERS   = 16;  // subscribers per exchange
  localparam int unsigned USER_W    = 4;   // subscriber number width
  localparam int unsigned DATA_W    = 16;  // payload bits per opcode
  localparam int unsigned OPCODE_W  = 32;

  typedef logic [USER_W-1:0] user_t;

  typedef struct packed {
    logic              en;     // E, bit 31
    logic              inter;  // I, bit 30
    user_t             dst;    // D3..D0, bits 29:26
    user_t             src;    // S3..S0, bits 25:22
    logic [5:0]        zero;   // bits 21:16
    logic [DATA_W-1:0] data;   // D15..D0, bits 15:0
  } opcode_t;

  // 17-bit data memory word: enable flag and payload
  typedef struct packed {
    logic              en;
    logic [DATA_W-1:0] data;
  } dm_word_t;

  // Global inlet number: exchange (0 or 1) and subscriber within it
  typedef struct packed {
    logic  exch;
    user_t user;
  } inlet_t;

  // Control memory entry, one per outlet: which inlet it is connected to
  typedef struct packed {
    logic   valid;
    inlet_t inlet;
  } cm_entry_t;

  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,  // after reset, until the first enabled clock
    PH_LOAD = 2'd1,  // serial lines: next opcodes shifted in, last results out
    PH_SCAN = 2'd2,  // phase 1: sequential write
    PH_READ = 2'd3   // phase 2: random read
  } phase_e;

endpackage
