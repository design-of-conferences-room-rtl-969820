// light_sensor_circuit: behavioural model of the LDR photo-sensor circuit.
// Not synthesizable CPLD logic: it stands for the analog divider and the 7414
// Schmitt-trigger inverter in front of the controller.
//
// The LDR runs from VCC to a node and the resistor R from that node to
// ground, so the node sits at VCC * R / (R + R_ldr). The node drives an
// inverting Schmitt trigger: when it rises above VT_POS_MV the output goes 0,
// when it falls below VT_NEG_MV the output goes 1, and in between the output
// keeps its last value. Darkness (a barrier in front of the LDR) gives a high
// LDR resistance, a low node and so an output of 1. The topology follows the
// room model's circuit; R, VCC and the two trigger thresholds are not given
// there, so typical 5 V 74LS14 values and a mid-range R are assumed.
//
// Interface: ldr_ohms is the LDR resistance in ohms (about 100 in bright
// light up to about 1 M in darkness). Outputs follow with no delay; the output
// starts at the value of its first input. The memory between the thresholds
// is the hysteresis of the real trigger, so a synthesis tool reading this
// model infers a latch for it; that is intended.
module light_sensor_circuit #(
  parameter int R_OHMS    = 10_000,  // fixed divider resistor
  parameter int VCC_MV    = 5000,
  parameter int VT_POS_MV = 1700,    // rising input threshold
  parameter int VT_NEG_MV = 900      // falling input threshold
) (
  input  logic [20:0] ldr_ohms,
  output logic [12:0] node_mv,  // Schmitt-trigger input voltage
  output logic        out       // 1 = dark / barrier
);

  always_comb begin
    longint num;
    num     = longint'(VCC_MV) * longint'(R_OHMS);
    node_mv = 13'(num / (longint'(R_OHMS) + longint'(ldr_ohms)));
  end

  // Inverting Schmitt trigger with memory between the thresholds
  logic state;
  logic seen;

  initial begin
    state = 1'b0;
    seen  = 1'b0;
  end

  always @(node_mv) begin
    if (int'(node_mv) >= VT_POS_MV)      state = 1'b0;
    else if (int'(node_mv) <= VT_NEG_MV) state = 1'b1;
    else if (!seen)                      state = (int'(node_mv) < (VT_POS_MV + VT_NEG_MV) / 2);
    seen = 1'b1;
  end

  assign out = state;

  initial assert (VT_NEG_MV < VT_POS_MV && VT_POS_MV < VCC_MV)
    else $error("Schmitt thresholds must satisfy VT_NEG < VT_POS < VCC");

endmodule
