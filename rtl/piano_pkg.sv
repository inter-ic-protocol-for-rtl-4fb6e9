// piano_pkg: types and constants shared by the key-bus master, the slave
// boards and the MIDI encoder.
//
// The bus carries a 2-bit control code (CTRL), a data word (DATA) and,
// when the dedicated velocity bus is enabled, a 7-bit velocity word (VEL).
// CTRL bit 1 tells a velocity word (1) from a note number (0); bit 0 tells
// note-on (1) from note-off (0). The fourth combination, "velocity, off",
// has no meaning of its own and is used as the no-data code, which is also
// what the bus reads when no slave drives it.
// Widths: velocity 0..127 needs 7 bits; a board's local note number
// (22 keys per board) needs 5 bits; the shared DATA word is 8 bits wide so
// that it can hold either one.
package piano_pkg;

  localparam int unsigned VEL_W  = 7;
  localparam int unsigned NOTE_W = 5;
  localparam int unsigned DATA_W = 8;

  typedef enum logic [1:0] {
    CTRL_NOTE_OFF = 2'b00,
    CTRL_NOTE_ON  = 2'b01,
    CTRL_NO_DATA  = 2'b10,
    CTRL_VELOCITY = 2'b11
  } ctrl_e;

  // One key event, as queued in a slave board.
  typedef struct packed {
    logic              on;    // 1: key pressed (note-on), 0: released (note-off)
    logic [NOTE_W-1:0] note;  // key number local to the board
    logic [VEL_W-1:0]  vel;   // strike velocity (meaningful for note-on)
  } key_event_t;

  localparam int unsigned EVENT_W = $bits(key_event_t);

endpackage
