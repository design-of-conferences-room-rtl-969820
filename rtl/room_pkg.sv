// room_pkg: codes shared by the conference-room controller and its models.
//
// The door and curtain motors are each driven through a four-transistor
// H-bridge by a 4-bit word. Three words are used: 3 hex turns the motor
// left (opening), C hex turns it right (closing) and 0 stops it; these
// codes are the room model's own published encoding. The split of the word
// into two transistor pairs (bits 1:0 for the opening pair, bits 3:2 for the
// closing pair) is this design's reading of the H-bridge description.
package room_pkg;

  // 4-bit H-bridge drive word
  typedef logic [3:0] motor_word_t;

  localparam motor_word_t MOTOR_STOP  = 4'b0000;
  localparam motor_word_t MOTOR_OPEN  = 4'b0011;  // left turn: opening pair on
  localparam motor_word_t MOTOR_CLOSE = 4'b1100;  // right turn: closing pair on

  // Two-switch command of a motor channel, {close switch, open switch}
  typedef enum logic [1:0] {
    CMD_STOP    = 2'b00,
    CMD_OPEN    = 2'b01,
    CMD_CLOSE   = 2'b10,
    CMD_REVERSE = 2'b11
  } motor_cmd_t;

  // Temperature comparator code: bit 0 = above 25 C, bit 1 = below 20 C
  localparam logic [1:0] TS_COMFORT = 2'b00;
  localparam logic [1:0] TS_HOT     = 2'b01;
  localparam logic [1:0] TS_COLD    = 2'b10;

endpackage
