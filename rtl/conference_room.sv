// conference_room: the whole conference-room model around its CPLD
// controller.
//
// The user works the room through switches: two for the door, two for the
// curtain, a mode switch and two switches for the lights. Sensors act on it
// too: a smoke detector opens door and curtain and sounds the alarm, an LM35
// temperature sensor switches the heater below 20 C and the air conditioner
// above 25 C, a photo sensor at the door stops a closing door when something
// is in the way, and a second photo sensor adds the high light group when the
// room is dark. The controller (room_controller) is the only synthesizable
// part; around it sit behavioural models of the circuits it is wired to on
// the model board: the temperature comparators (temp_sensor_circuit), two LDR
// photo sensors (light_sensor_circuit) and the door and curtain H-bridges
// (h_bridge). This lets a testbench drive the model with temperatures and LDR
// resistances and observe motor directions.
//
// The units and their wiring follow the room model's description; the use of
// the same LDR circuit for both photo sensors is this design's assumption.
//
// Timing: everything in the controller is sampled on the rising edge of clk
// (CLK_HZ, the board's 25.175 MHz oscillator) and all controller outputs are
// registered, so a switch or sensor change shows one clock later. The models
// are combinational. rst is synchronous and active high.
module conference_room
  import room_pkg::*;
#(
  parameter int CLK_HZ = 25_175_000  // board clock; documents the timing only
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [4:0]         sw,             // 0/1 door, 2/3 curtain, 4 manual lights
  input  logic [1:0]         sww,            // manual light switches
  input  logic               fs,             // smoke detector
  input  logic signed [11:0] temp_dc,        // room temperature, 0.1 C
  input  logic [20:0]        door_ldr_ohms,  // doorway LDR resistance
  input  logic [20:0]        room_ldr_ohms,  // room LDR resistance
  output logic               alarm,
  output logic               cool,
  output logic               heat,
  output logic               l1,
  output logic               l2,
  output motor_word_t        p,              // door H-bridge drive
  output motor_word_t        n,              // curtain H-bridge drive
  output logic               door_left,      // door opening
  output logic               door_right,     // door closing
  output logic               curtain_left,   // curtain opening
  output logic               curtain_right   // curtain closing
);

  logic               phd, phd1;
  logic [1:0]         ts;
  // analog levels and bridge flags, for observation in simulation only
  logic signed [11:0] lm35_mv;
  logic [12:0]        door_node_mv, room_node_mv;
  logic               door_short, curtain_short;

  temp_sensor_circuit u_temp (
    .temp_dc,
    .vout_mv(lm35_mv),
    .ts
  );

  light_sensor_circuit u_door_ldr (
    .ldr_ohms(door_ldr_ohms),
    .node_mv (door_node_mv),
    .out     (phd)
  );

  light_sensor_circuit u_room_ldr (
    .ldr_ohms(room_ldr_ohms),
    .node_mv (room_node_mv),
    .out     (phd1)
  );

  room_controller u_cpld (
    .clk, .rst, .sw, .sww,
    .phd, .phd1, .fs, .ts,
    .alarm, .cool, .heat,
    .p, .n, .l1, .l2
  );

  h_bridge u_door_bridge (
    .q            (p),
    .turn_left    (door_left),
    .turn_right   (door_right),
    .shoot_through(door_short)
  );

  h_bridge u_curtain_bridge (
    .q            (n),
    .turn_left    (curtain_left),
    .turn_right   (curtain_right),
    .shoot_through(curtain_short)
  );

  initial assert (CLK_HZ > 0) else $error("CLK_HZ must be positive");

endmodule
