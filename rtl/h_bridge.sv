// h_bridge: behavioural model of the four-transistor H-bridge that turns a
// DC motor (door or curtain). Not synthesizable CPLD logic: it stands for the
// transistor circuit driven by four controller pins.
//
// Transistors Q2 and Q3 on (drive word 3 hex) turn the motor left, which
// opens the door or curtain; Q4 and Q5 on (C hex) turn it right, which closes
// it; with all off the motor stands. The direction rule follows the room
// model's description; the assignment of q[1:0] to Q2/Q3 and q[3:2] to Q4/Q5
// is this model's reading of it. A word with a transistor of each pair on
// would short the supply: it is flagged as shoot_through, and any word other
// than the three above leaves the motor standing.
//
// Interface: q is the drive word from the controller; outputs follow it with
// no delay.
module h_bridge
  import room_pkg::*;
(
  input  motor_word_t q,
  output logic        turn_left,     // opening direction
  output logic        turn_right,    // closing direction
  output logic        shoot_through  // both sides conducting
);

  always_comb begin
    turn_left     = (q == MOTOR_OPEN);
    turn_right    = (q == MOTOR_CLOSE);
    shoot_through = (|q[1:0]) && (|q[3:2]);
  end

  always_comb begin
    a_no_short: assert (!shoot_through) else $warning("H-bridge shoot-through: q=%b", q);
  end

endmodule
