// tb_temp_sensor_circuit: self-checking test of the LM35 / comparator model.
//
// Sweeps the temperature over the LM35 range (-55.0 C to +150.0 C in 0.1 C
// steps) and checks the sensor voltage (10 mV per degree) and both comparator
// bits, with explicit checks at the edges 19.9/20.0 C and 25.0/25.1 C. A
// watchdog ends the run.
`timescale 1ns/1ps
module tb_temp_sensor_circuit;
  logic signed [11:0] temp_dc;
  logic signed [11:0] vout_mv;
  logic [1:0] ts;
  int checks = 0, failures = 0;

  temp_sensor_circuit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_at(int tenths, logic [1:0] ets);
    temp_dc = 12'(tenths);
    #1;
    checks++;
    if (ts !== ets || int'(vout_mv) != tenths) begin
      failures++;
      $display("FAIL %0d.%0d C: vout=%0d mV ts=%b expected %0d mV ts=%b",
               tenths / 10, tenths % 10, vout_mv, ts, tenths, ets);
    end
  endtask

  initial begin
    check_at(199, 2'b10);  // 19.9 C: heater
    check_at(200, 2'b00);  // 20.0 C: comfort band
    check_at(250, 2'b00);  // 25.0 C: comfort band
    check_at(251, 2'b01);  // 25.1 C: air conditioner
    for (int t = -550; t <= 1500; t++)
      check_at(t, {t < 200, t > 250});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
