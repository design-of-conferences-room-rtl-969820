// tb_fire_alarm: self-checking test of the fire alarm unit.
//
// Drives smoke pulses of random length and checks that the alarm follows the
// detector one clock later, is not latched, and that the emergency request is
// raised in the same cycle as the detector line (outside reset). A watchdog
// ends the run.
`timescale 1ns/1ps
module tb_fire_alarm;
  logic clk = 1'b0;
  logic rst, fs, alarm, emergency;
  int checks = 0, failures = 0;

  fire_alarm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev;
    rst = 1; fs = 1;
    @(posedge clk); #1;
    checks++;
    if (alarm !== 0 || emergency !== 0) begin failures++; $display("FAIL alarm in reset"); end
    rst = 0; fs = 0;
    @(posedge clk); #1;
    prev = fs;
    for (int i = 0; i < 1000; i++) begin
      fs = ($urandom_range(0, 2) == 0);
      #1;
      checks++;
      if (emergency !== fs) begin failures++; $display("FAIL emergency=%b fs=%b", emergency, fs); end
      @(posedge clk); #1;
      checks++;
      if (alarm !== fs) begin failures++; $display("FAIL alarm=%b after fs=%b", alarm, fs); end
    end
    // smoke gone: alarm must drop after one clock
    fs = 1; @(posedge clk); #1;
    fs = 0; @(posedge clk); #1;
    checks++;
    if (alarm !== 0) begin failures++; $display("FAIL alarm latched"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
