// tb_h_bridge: self-checking test of the H-bridge model.
//
// Applies all sixteen drive words and checks the motor direction (3 hex left,
// C hex right, otherwise standing) and the shoot-through flag (a transistor
// of each pair on). A watchdog ends the run.
`timescale 1ns/1ps
module tb_h_bridge;
  logic [3:0] q;
  logic turn_left, turn_right, shoot_through;
  int checks = 0, failures = 0;

  h_bridge dut (.*);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 16; w++) begin
      logic el, er, es;
      q = 4'(w);
      #1;
      el = (w == 3);
      er = (w == 12);
      es = (w % 4 != 0) && (w / 4 != 0);
      checks++;
      if (turn_left !== el || turn_right !== er || shoot_through !== es) begin
        failures++;
        $display("FAIL q=%h: left=%b right=%b short=%b expected %b %b %b",
                 q, turn_left, turn_right, shoot_through, el, er, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
