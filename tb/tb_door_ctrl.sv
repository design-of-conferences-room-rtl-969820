// tb_door_ctrl: self-checking test of the door motor control.
//
// Directed part: every command the door knows (open, close, stop, reverse),
// the doorway barrier while closing (stop, stays stopped until the close
// switch is set again), and the fire override, each checked one clock after
// the inputs change against hand-worked values of p, r1 and r2. Random part:
// 4000 clocks of random switches, barrier and fire, compared with a reference
// model written as a transition table. A watchdog ends the run.
`timescale 1ns/1ps
module tb_door_ctrl;
  import room_pkg::*;

  logic clk = 1'b0;
  logic rst, sw_open, sw_close, phd, fire;
  motor_word_t p;
  logic r1, r2;
  int checks = 0, failures = 0;

  door_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(motor_word_t ep, logic er1, logic er2, string what);
    checks++;
    if (p !== ep || r1 !== er1 || r2 !== er2) begin
      failures++;
      $display("FAIL %s: p=%h r1=%b r2=%b, expected p=%h r1=%b r2=%b", what, p, r1, r2, ep, er1, er2);
    end
  endtask

  // apply inputs, wait one clock edge
  task automatic step(logic o, logic c, logic b, logic f);
    sw_open = o; sw_close = c; phd = b; fire = f;
    @(posedge clk); #1;
  endtask

  // reference: one clock of the door rules
  function automatic void ref_step(input logic o, c, b, f, inout motor_word_t rp, inout logic q1, q2);
    motor_word_t np = rp;
    logic n1 = q1, n2 = q2;
    if (!o && !c) begin np = 4'h0; n1 = 0; n2 = 0; end
    else if (o && !c) begin
      if (!q1) begin np = 4'h3; n1 = 1; n2 = 0; end
      else if (q2) begin np = 4'h0; n2 = 0; end
    end else if (!o && c) begin
      if (b) begin np = 4'h0; n1 = 0; n2 = 1; end
      else if (!q2) begin np = 4'hC; n1 = 0; n2 = 1; end
      else if (q1) begin np = 4'h0; n1 = 0; end
    end else begin
      if (q1 && !q2) begin np = 4'hC; n2 = 1; end
      else if (q2 && !q1) begin np = 4'h3; n1 = 1; end
    end
    if (b && np == 4'hC) np = 4'h0;
    if (f) np = 4'h3;
    rp = np; q1 = n1; q2 = n2;
  endfunction

  initial begin
    motor_word_t rp;
    logic q1, q2;
    logic o, c, b, f;
    rst = 1; sw_open = 0; sw_close = 0; phd = 0; fire = 0;
    repeat (2) @(posedge clk); #1;
    expect_state(4'h0, 0, 0, "reset");
    rst = 0;

    step(1, 0, 0, 0); expect_state(4'h3, 1, 0, "open starts motor");
    repeat (5) step(1, 0, 0, 0);
    expect_state(4'h3, 1, 0, "open held while switch on");
    step(0, 0, 0, 0); expect_state(4'h0, 0, 0, "both off stops");

    step(0, 1, 0, 0); expect_state(4'hC, 0, 1, "close starts motor");
    step(0, 1, 0, 0); expect_state(4'hC, 0, 1, "close held");
    step(0, 1, 1, 0); expect_state(4'h0, 0, 1, "barrier stops closing door");
    step(0, 1, 0, 0); expect_state(4'h0, 0, 1, "stays stopped after barrier clears");
    step(0, 0, 0, 0); expect_state(4'h0, 0, 0, "release close switch");
    step(0, 1, 0, 0); expect_state(4'hC, 0, 1, "close again after re-command");
    step(0, 1, 1, 0); expect_state(4'h0, 0, 1, "barrier again");
    step(0, 0, 0, 0);
    step(0, 1, 1, 0); expect_state(4'h0, 0, 1, "close refused with barrier present");

    step(0, 0, 0, 0);
    step(0, 1, 0, 0);
    step(1, 1, 0, 0); expect_state(4'h3, 1, 1, "reverse closing to opening");
    step(1, 1, 0, 0); expect_state(4'h3, 1, 1, "reverse happens once");
    step(1, 0, 0, 0); expect_state(4'h0, 1, 0, "open after reverse stops");
    step(1, 0, 0, 0); expect_state(4'h0, 1, 0, "and stays stopped");

    step(0, 0, 0, 0);
    step(1, 0, 0, 0);
    step(1, 1, 0, 0); expect_state(4'hC, 1, 1, "reverse opening to closing");
    step(1, 1, 1, 0); expect_state(4'h0, 1, 1, "barrier stops reversed door");

    step(0, 0, 0, 0);
    step(0, 0, 0, 1); expect_state(4'h3, 0, 0, "fire opens stopped door");
    step(0, 0, 0, 0); expect_state(4'h0, 0, 0, "fire over, switches off stop");
    step(0, 1, 0, 0); expect_state(4'hC, 0, 1, "closing");
    step(0, 1, 0, 1); expect_state(4'h3, 0, 1, "fire overrides closing");
    step(0, 1, 1, 1); expect_state(4'h3, 0, 1, "fire opens despite barrier");
    step(0, 1, 0, 0); expect_state(4'h3, 0, 1, "drive word held after fire");

    // random comparison with the reference table
    step(0, 0, 0, 0);
    rp = p; q1 = r1; q2 = r2;
    for (int i = 0; i < 4000; i++) begin
      o = 1'($urandom_range(0, 1)); c = 1'($urandom_range(0, 1));
      b = ($urandom_range(0, 3) == 0); f = ($urandom_range(0, 15) == 0);
      ref_step(o, c, b, f, rp, q1, q2);
      step(o, c, b, f);
      expect_state(rp, q1, q2, "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
