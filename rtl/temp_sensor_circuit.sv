// temp_sensor_circuit: behavioural model of the analog temperature front end
// (LM35 sensor and two voltage comparators). Not synthesizable CPLD logic: it
// stands for a circuit on the sensor board, so the room model can be
// simulated from a temperature.
//
// The LM35 gives 10 mV per degree C, so its output in mV equals the
// temperature in tenths of a degree. Two comparators check it against 200 mV
// (20 C) and 250 mV (25 C): ts[0] is 1 above HOT_MV and ts[1] is 1 below
// COLD_MV. The slope and both thresholds follow the room model's description;
// the absence of hysteresis is this model's choice.
//
// Interface: temp_dc is signed, in tenths of a degree C (-550 .. 1500 for the
// LM35 range). Outputs follow the input with no delay.
module temp_sensor_circuit #(
  parameter int COLD_MV = 200,  // heater threshold, 20 C
  parameter int HOT_MV  = 250   // air-conditioner threshold, 25 C
) (
  input  logic signed [11:0] temp_dc,  // temperature, 0.1 C units
  output logic signed [11:0] vout_mv,  // LM35 output, mV
  output logic        [1:0]  ts        // {below COLD_MV, above HOT_MV}
);

  // 10 mV per degree = 1 mV per tenth of a degree
  assign vout_mv = temp_dc;

  always_comb begin
    ts[0] = (int'(vout_mv) > HOT_MV);
    ts[1] = (int'(vout_mv) < COLD_MV);
  end

  initial assert (COLD_MV < HOT_MV) else $error("COLD_MV must be below HOT_MV");

endmodule
