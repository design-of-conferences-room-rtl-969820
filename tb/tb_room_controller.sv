// tb_room_controller: self-checking test of the controller as a whole.
//
// Checks that each switch and sensor line reaches the right unit and that the
// fire override acts on both motors at once: door and curtain commands,
// doorway barrier, automatic and manual lights, alarm with forced opening,
// and the three temperature codes. Every check is taken one clock after the
// inputs change, against hand-worked values. A watchdog ends the run.
`timescale 1ns/1ps
module tb_room_controller;
  import room_pkg::*;

  logic clk = 1'b0;
  logic rst, phd, phd1, fs;
  logic [4:0] sw;
  logic [1:0] sww, ts;
  logic alarm, cool, heat, l1, l2;
  motor_word_t p, n;
  int checks = 0, failures = 0;

  room_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs packed as {alarm, cool, heat, l1, l2, p, n}
  task automatic tick_and_check(logic [12:0] e, string what);
    @(posedge clk); #1;
    checks++;
    if ({alarm, cool, heat, l1, l2, p, n} !== e) begin
      failures++;
      $display("FAIL %s: got a%b c%b h%b l%b%b p=%h n=%h, expected %b", what,
               alarm, cool, heat, l1, l2, p, n, e);
    end
  endtask

  initial begin
    rst = 1; sw = 0; sww = 0; phd = 0; phd1 = 0; fs = 0; ts = 0;
    tick_and_check({3'b000, 2'b00, 4'h0, 4'h0}, "reset");
    rst = 0;
    tick_and_check({3'b000, 2'b10, 4'h0, 4'h0}, "idle, bright room: low lights");

    sw = 5'b00001; tick_and_check({3'b000, 2'b10, 4'h3, 4'h0}, "sw0 opens door only");
    sw = 5'b00100; tick_and_check({3'b000, 2'b10, 4'h0, 4'h3}, "sw2 opens curtain only");
    sw = 5'b01010; tick_and_check({3'b000, 2'b10, 4'hC, 4'hC}, "sw1, sw3 close both");
    phd = 1;       tick_and_check({3'b000, 2'b10, 4'h0, 4'hC}, "door barrier stops door only");
    phd = 0; sw = 0;
    tick_and_check({3'b000, 2'b10, 4'h0, 4'h0}, "all stop");

    phd1 = 1;      tick_and_check({3'b000, 2'b11, 4'h0, 4'h0}, "dark room: both groups");
    sw = 5'b10000; sww = 2'b01;
    tick_and_check({3'b000, 2'b01, 4'h0, 4'h0}, "manual: sww=01");
    sww = 2'b10;   tick_and_check({3'b000, 2'b10, 4'h0, 4'h0}, "manual: sww=10");
    sww = 2'b00;   tick_and_check({3'b000, 2'b00, 4'h0, 4'h0}, "manual: all off");
    sw = 0; phd1 = 0;
    tick_and_check({3'b000, 2'b10, 4'h0, 4'h0}, "back to automatic");

    fs = 1;        tick_and_check({3'b100, 2'b10, 4'h3, 4'h3}, "fire: alarm, door and curtain open");
    sw = 5'b01010; phd = 1;
    tick_and_check({3'b100, 2'b10, 4'h3, 4'h3}, "fire wins over close switches");
    fs = 0; sw = 0; phd = 0;
    tick_and_check({3'b000, 2'b10, 4'h0, 4'h0}, "fire over");

    ts = 2'b01;    tick_and_check({3'b010, 2'b10, 4'h0, 4'h0}, "hot: air conditioner");
    ts = 2'b10;    tick_and_check({3'b001, 2'b10, 4'h0, 4'h0}, "cold: heater");
    ts = 2'b00;    tick_and_check({3'b000, 2'b10, 4'h0, 4'h0}, "comfort: both off");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
