// spw_pkg: types and constants shared by the SpaceWire codec modules.
//
// The character codes follow the SpaceWire character level: every character
// starts with a parity bit and a data/control flag. A control character then
// carries two bits (FCT 00, EOP 01, EEP 10, ESC 11, in transmission order),
// a data character eight bits, least significant first. NULL is ESC followed
// by FCT, a time-code is ESC followed by a data character whose bits 5:0 are
// the time and bits 7:6 the control flags.
//
// Host-side N-Chars are 9 bits wide: bit 8 is the control flag. With the flag
// set, bit 0 selects EOP (0) or EEP (1); this encoding is a choice of this
// design, the document does not define a host format.
package spw_pkg;

  // Link states of the initialisation state machine.
  typedef enum logic [2:0] {
    ST_ERROR_RESET = 3'd0,
    ST_ERROR_WAIT  = 3'd1,
    ST_READY       = 3'd2,
    ST_STARTED     = 3'd3,
    ST_CONNECTING  = 3'd4,
    ST_RUN         = 3'd5
  } link_state_t;

  // Two control bits in transmission order: {first, second}.
  localparam logic [1:0] CTRL_FCT = 2'b00;
  localparam logic [1:0] CTRL_EOP = 2'b01;
  localparam logic [1:0] CTRL_EEP = 2'b10;
  localparam logic [1:0] CTRL_ESC = 2'b11;

  // Credit granted by one FCT and the largest credit a link may hold.
  localparam int unsigned FCT_CREDIT = 8;
  localparam int unsigned MAX_CREDIT = 56;

  // Host-side N-Char: flag plus eight bits.
  typedef struct packed {
    logic       ctrl;   // 1: end-of-packet marker
    logic [7:0] data;   // data byte, or bit 0 = 0 EOP / 1 EEP
  } nchar_t;

  // Commands from the state machine to transmitter and receiver.
  typedef struct packed {
    logic enable_tx;
    logic send_nulls;
    logic send_fcts;
    logic send_nchars;
    logic send_timecodes;
    logic enable_rx;
  } link_ctrl_t;

endpackage
