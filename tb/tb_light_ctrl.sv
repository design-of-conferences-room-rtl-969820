// tb_light_ctrl: self-checking test of the two light groups.
//
// Goes through every combination of mode switch, manual switches and room
// sensor, then random inputs, and checks l1/l2 one clock later: automatic
// mode gives l1 = 1 and l2 = dark, manual mode gives {l1,l2} = sww. A
// watchdog ends the run.
`timescale 1ns/1ps
module tb_light_ctrl;
  logic clk = 1'b0;
  logic rst, manual, phd1;
  logic [1:0] sww;
  logic l1, l2;
  int checks = 0, failures = 0;

  light_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply_and_check(logic m, logic [1:0] s, logic d);
    logic el1, el2;
    manual = m; sww = s; phd1 = d;
    @(posedge clk); #1;
    if (m) begin el1 = s[1]; el2 = s[0]; end
    else   begin el1 = 1'b1; el2 = d; end
    checks++;
    if (l1 !== el1 || l2 !== el2) begin
      failures++;
      $display("FAIL manual=%b sww=%b phd1=%b: l1=%b l2=%b expected %b %b", m, s, d, l1, l2, el1, el2);
    end
  endtask

  initial begin
    rst = 1; manual = 0; sww = 0; phd1 = 0;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (l1 !== 0 || l2 !== 0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int i = 0; i < 16; i++) apply_and_check(i[3], i[2:1], i[0]);
    for (int i = 0; i < 500; i++)
      apply_and_check(1'($urandom_range(0, 1)), 2'($urandom_range(0, 3)), 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
