// tb_light_sensor_circuit: self-checking test of the LDR / Schmitt-trigger
// model.
//
// Checks the divider voltage against VCC * R / (R + R_ldr) worked out here,
// the output at bright light (100 ohm, output 0) and darkness (1 Mohm,
// output 1), and the hysteresis: a resistance whose node voltage lies between
// the two thresholds keeps whichever output the previous level gave. A
// watchdog ends the run.
`timescale 1ns/1ps
module tb_light_sensor_circuit;
  logic [20:0] ldr_ohms;
  logic [12:0] node_mv;
  logic out;
  int checks = 0, failures = 0;

  light_sensor_circuit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_and_check(int ohms, logic eout);
    int emv;
    ldr_ohms = 21'(ohms);
    #1;
    emv = (5000 * 10000) / (10000 + ohms);
    checks++;
    if (int'(node_mv) != emv || out !== eout) begin
      failures++;
      $display("FAIL R_ldr=%0d: node=%0d mV out=%b expected %0d mV out=%b", ohms, node_mv, out, emv, eout);
    end
  endtask

  initial begin
    // node above 1.7 V needs R_ldr < 19411; below 0.9 V needs R_ldr > 45555
    set_and_check(100, 1'b0);        // bright: 4950 mV
    set_and_check(30_000, 1'b0);     // 1250 mV, inside the band: keeps 0
    set_and_check(1_000_000, 1'b1);  // dark: 49 mV
    set_and_check(30_000, 1'b1);     // inside the band: keeps 1
    set_and_check(19_000, 1'b0);     // 1724 mV: above upper threshold
    set_and_check(45_000, 1'b0);     // 909 mV: still in band
    set_and_check(46_000, 1'b1);     // 892 mV: below lower threshold
    set_and_check(19_500, 1'b1);     // 1694 mV: in band
    // random walk with an independent hysteresis model
    begin
      automatic logic st = 1'b1;
      for (int i = 0; i < 2000; i++) begin
        int r, mv;
        r = $urandom_range(100, 1_500_000);
        mv = (5000 * 10000) / (10000 + r);
        if (mv >= 1700) st = 1'b0;
        else if (mv <= 900) st = 1'b1;
        set_and_check(r, st);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
