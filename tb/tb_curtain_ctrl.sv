// tb_curtain_ctrl: self-checking test of the curtain motor control.
//
// Directed part: open, close, stop, a single reversal in each direction and
// the fire override, checked one clock after each input change against
// hand-worked values of n, r3 and r4. Random part: 4000 clocks compared with a
// reference transition table. A watchdog ends the run.
`timescale 1ns/1ps
module tb_curtain_ctrl;
  import room_pkg::*;

  logic clk = 1'b0;
  logic rst, sw_open, sw_close, fire;
  motor_word_t n;
  logic r3, r4;
  int checks = 0, failures = 0;

  curtain_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(motor_word_t en, logic e3, logic e4, string what);
    checks++;
    if (n !== en || r3 !== e3 || r4 !== e4) begin
      failures++;
      $display("FAIL %s: n=%h r3=%b r4=%b, expected n=%h r3=%b r4=%b", what, n, r3, r4, en, e3, e4);
    end
  endtask

  task automatic step(logic o, logic c, logic f);
    sw_open = o; sw_close = c; fire = f;
    @(posedge clk); #1;
  endtask

  function automatic void ref_step(input logic o, c, f, inout motor_word_t rn, inout logic q3, q4);
    motor_word_t nn = rn;
    logic n3 = q3, n4 = q4;
    case ({c, o})
      2'b00: begin nn = 4'h0; n3 = 0; n4 = 0; end
      2'b01: if (!q3) begin nn = 4'h3; n3 = 1; n4 = 0; end
             else if (q4) begin nn = 4'h0; n4 = 0; end
      2'b10: if (!q4) begin nn = 4'hC; n3 = 0; n4 = 1; end
             else if (q3) begin nn = 4'h0; n3 = 0; end
      2'b11: if (q3 && !q4) begin nn = 4'hC; n4 = 1; end
             else if (q4 && !q3) begin nn = 4'h3; n3 = 1; end
    endcase
    if (f) nn = 4'h3;
    rn = nn; q3 = n3; q4 = n4;
  endfunction

  initial begin
    motor_word_t rn;
    logic q3, q4, o, c, f;
    rst = 1; sw_open = 0; sw_close = 0; fire = 0;
    repeat (2) @(posedge clk); #1;
    expect_state(4'h0, 0, 0, "reset");
    rst = 0;

    step(1, 0, 0); expect_state(4'h3, 1, 0, "open starts motor");
    repeat (4) step(1, 0, 0);
    expect_state(4'h3, 1, 0, "open held");
    step(0, 1, 0); expect_state(4'hC, 0, 1, "close directly after open");
    step(0, 1, 0); expect_state(4'hC, 0, 1, "close held");
    step(1, 1, 0); expect_state(4'h3, 1, 1, "reverse closing to opening");
    step(1, 1, 0); expect_state(4'h3, 1, 1, "reverse only once");
    step(0, 1, 0); expect_state(4'h0, 0, 1, "close after reverse stops");
    step(0, 0, 0); expect_state(4'h0, 0, 0, "both off");
    step(1, 1, 0); expect_state(4'h0, 0, 0, "reverse of a stopped curtain does nothing");
    step(1, 0, 0);
    step(1, 1, 0); expect_state(4'hC, 1, 1, "reverse opening to closing");
    step(0, 0, 1); expect_state(4'h3, 0, 0, "fire opens");
    step(0, 0, 0); expect_state(4'h0, 0, 0, "fire over");

    rn = n; q3 = r3; q4 = r4;
    for (int i = 0; i < 4000; i++) begin
      o = 1'($urandom_range(0, 1)); c = 1'($urandom_range(0, 1));
      f = ($urandom_range(0, 15) == 0);
      ref_step(o, c, f, rn, q3, q4);
      step(o, c, f);
      expect_state(rn, q3, q4, "random");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
