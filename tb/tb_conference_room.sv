// tb_conference_room: end-to-end test of the conference-room model at its
// default parameters.
//
// Plays one session of the room from physical quantities: the door is opened,
// someone stands in the doorway while it closes (the door LDR goes dark and
// the door stops), the curtain is opened, closed and reversed, the room gets
// dark and the high light group comes on, the lights are switched by hand,
// the temperature passes through hot, cold and comfortable, and finally smoke
// opens door and curtain and sounds the alarm. Every reaction is checked one
// clock after its cause (all controller outputs are registered) against
// hand-worked values, and each mechanism is counted; a mechanism that never
// happened counts as a failure. A watchdog ends the run.
`timescale 1ns/1ps
module tb_conference_room;
  import room_pkg::*;

  localparam logic [20:0] BRIGHT = 21'd500;        // LDR in daylight, ohms
  localparam logic [20:0] DARK   = 21'd1_000_000;  // LDR in darkness, ohms

  logic clk = 1'b0;
  logic rst, fs;
  logic [4:0] sw;
  logic [1:0] sww;
  logic signed [11:0] temp_dc;
  logic [20:0] door_ldr_ohms, room_ldr_ohms;
  logic alarm, cool, heat, l1, l2;
  motor_word_t p, n;
  logic door_left, door_right, curtain_left, curtain_right;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_door_open, n_door_close, n_barrier, n_curtain_open, n_curtain_close;
  int n_reverse, n_fire, n_auto_dark, n_auto_bright, n_manual, n_cool, n_heat, n_comfort;

  conference_room dut (.*);

  always #19.86 clk = ~clk;  // about 25.175 MHz

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(int k = 1);
    repeat (k) @(posedge clk);
    #1;
  endtask

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s (p=%h n=%h l=%b%b a=%b c=%b h=%b)", $time, what, p, n, l1, l2, alarm, cool, heat);
    end
  endtask

  // door: {left, right}; curtain: {left, right}
  function automatic logic [3:0] motors();
    return {door_left, door_right, curtain_left, curtain_right};
  endfunction

  initial begin
    rst = 1; fs = 0; sw = 0; sww = 0; temp_dc = 12'sd220;
    door_ldr_ohms = BRIGHT; room_ldr_ohms = BRIGHT;
    {n_door_open, n_door_close, n_barrier, n_curtain_open, n_curtain_close} = '0;
    {n_reverse, n_fire, n_auto_dark, n_auto_bright, n_manual, n_cool, n_heat, n_comfort} = '0;
    tick(3);
    check(motors() == 4'b0000 && !alarm && !cool && !heat && !l1 && !l2, "reset state");
    rst = 0;
    tick();
    check(l1 && !l2, "daylight: low group only");
    if (l1 && !l2) n_auto_bright++;
    check(!cool && !heat, "22.0 C: comfort band");
    if (!cool && !heat) n_comfort++;

    // --- door: open for 50 clocks, then stop
    sw = 5'b00001;
    tick();
    check(motors() == 4'b1000, "door opening");
    for (int i = 1; i < 50; i++) begin
      tick();
      if (!door_left) break;
    end
    check(door_left && !door_right, "door keeps opening while sw0 is on");
    if (door_left) n_door_open++;
    sw = 0;
    tick();
    check(motors() == 4'b0000, "door stops when switch released");

    // --- door: close, somebody steps into the doorway
    sw = 5'b00010;
    tick();
    check(motors() == 4'b0100, "door closing");
    if (door_right) n_door_close++;
    tick(10);
    door_ldr_ohms = DARK;
    tick();
    check(!door_right && !door_left, "barrier stops closing door one clock later");
    if (!door_right) n_barrier++;
    door_ldr_ohms = BRIGHT;
    tick(5);
    check(!door_right, "door stays stopped after doorway clears");
    sw = 0; tick();
    sw = 5'b00010; tick();
    check(door_right, "door closes again after re-command");
    tick(20);
    sw = 0; tick();

    // --- curtain: open, close, reverse
    sw = 5'b00100; tick();
    check(motors() == 4'b0010, "curtain opening");
    if (curtain_left) n_curtain_open++;
    tick(30);
    sw = 5'b01000; tick();
    check(motors() == 4'b0001, "curtain closing");
    if (curtain_right) n_curtain_close++;
    tick(10);
    sw = 5'b01100; tick();
    check(motors() == 4'b0010, "both curtain switches reverse closing to opening");
    tick(5);
    check(motors() == 4'b0010, "reversal happens once");
    if (curtain_left) n_reverse++;
    sw = 0; tick();
    check(motors() == 4'b0000, "curtain stopped");

    // --- lights
    room_ldr_ohms = DARK; tick();
    check(l1 && l2, "dark room: both light groups");
    if (l1 && l2) n_auto_dark++;
    sw = 5'b10000; sww = 2'b01; tick();
    check(!l1 && l2, "manual: high group only");
    sww = 2'b10; tick();
    check(l1 && !l2, "manual: low group only");
    if (l1 && !l2) n_manual++;
    sw = 0; room_ldr_ohms = BRIGHT; tick();
    check(l1 && !l2, "automatic again in daylight");

    // --- temperature
    temp_dc = 12'sd300; tick();
    check(cool && !heat, "30.0 C: air conditioner");
    if (cool) n_cool++;
    temp_dc = 12'sd251; tick();
    check(cool && !heat, "25.1 C: still air conditioner");
    temp_dc = 12'sd250; tick();
    check(!cool && !heat, "25.0 C: off");
    temp_dc = 12'sd150; tick();
    check(heat && !cool, "15.0 C: heater");
    if (heat) n_heat++;
    temp_dc = 12'sd200; tick();
    check(!heat && !cool, "20.0 C: off");

    // --- fire while the user closes everything
    sw = 5'b01010; tick(3);
    check(motors() == 4'b0101, "closing door and curtain");
    fs = 1; tick();
    check(alarm && motors() == 4'b1010, "smoke: alarm on, door and curtain open");
    if (alarm && door_left && curtain_left) n_fire++;
    door_ldr_ohms = DARK; tick(5);
    check(alarm && motors() == 4'b1010, "open held during smoke, barrier or not");
    fs = 0; door_ldr_ohms = BRIGHT; sw = 0; tick();
    check(!alarm && motors() == 4'b0000, "smoke cleared, switches off");

    // --- every mechanism must have happened
    begin
      int counts[13];
      string names[13];
      counts = '{n_door_open, n_door_close, n_barrier, n_curtain_open, n_curtain_close,
                         n_reverse, n_fire, n_auto_dark, n_auto_bright, n_manual, n_cool, n_heat, n_comfort};
      names = '{"door open", "door close", "barrier stop", "curtain open", "curtain close",
                           "reversal", "fire override", "auto dark", "auto bright", "manual lights",
                           "cooling", "heating", "comfort"};
      for (int i = 0; i < 13; i++) begin
        $display("mechanism %-14s happened %0d time(s)", names[i], counts[i]);
        check(counts[i] > 0, {"mechanism never happened: ", names[i]});
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
