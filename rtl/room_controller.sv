// room_controller: the logic programmed into the CPLD of the conference-room
// model.
//
// On every rising clock edge it reads the user switches and the sensor lines
// and updates its registered outputs:
//   door_ctrl     sw[0]/sw[1] and the doorway photo sensor phd -> p
//   curtain_ctrl  sw[2]/sw[3]                                   -> n
//   light_ctrl    sw[4], sww and the room photo sensor phd1     -> l1, l2
//   fire_alarm    fire sensor fs -> alarm, and p = n = 3 hex (open) while
//                 smoke is present
//   hvac_ctrl     temperature comparator code ts                -> cool, heat
// The port list and the split into these units follow the room model's
// description and source; reset is this design's addition (the source has
// none). All outputs are registered: each reacts one clock after its inputs.
// rst is synchronous and active high.
module room_controller
  import room_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [4:0]  sw,     // 0/1 door open/close, 2/3 curtain open/close, 4 manual lights
  input  logic [1:0]  sww,    // manual light switches
  input  logic        phd,    // doorway photo sensor, 1 = barrier
  input  logic        phd1,   // room photo sensor, 1 = dark
  input  logic        fs,     // fire sensor, 1 = smoke
  input  logic [1:0]  ts,     // {below 20 C, above 25 C}
  output logic        alarm,
  output logic        cool,
  output logic        heat,
  output motor_word_t p,      // door H-bridge drive
  output motor_word_t n,      // curtain H-bridge drive
  output logic        l1,
  output logic        l2
);

  logic emergency;
  logic r1, r2, r3, r4;  // command registers, kept for observation in simulation

  fire_alarm u_fire (
    .clk, .rst, .fs,
    .alarm, .emergency
  );

  door_ctrl u_door (
    .clk, .rst,
    .sw_open (sw[0]),
    .sw_close(sw[1]),
    .phd,
    .fire    (emergency),
    .p, .r1, .r2
  );

  curtain_ctrl u_curtain (
    .clk, .rst,
    .sw_open (sw[2]),
    .sw_close(sw[3]),
    .fire    (emergency),
    .n, .r3, .r4
  );

  light_ctrl u_light (
    .clk, .rst,
    .manual(sw[4]),
    .sww, .phd1,
    .l1, .l2
  );

  hvac_ctrl u_hvac (
    .clk, .rst, .ts,
    .cool, .heat
  );

endmodule
