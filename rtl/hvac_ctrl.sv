// hvac_ctrl: heating and air-conditioning control of the conference room.
//
// The temperature circuit outside the controller compares the LM35 voltage
// with two thresholds and delivers a two-bit code ts: ts[0] means above 25 C,
// ts[1] means below 20 C. Above 25 C the air conditioner (cool) is switched
// on, below 20 C the heater (heat), and between the two both are off. The
// code 11 cannot come from the comparators; both outputs then keep their
// values, as in the room model's source.
//
// Thresholds and codes follow the room model's description and source.
//
// Timing: cool/heat are registered, one clock after ts. rst (synchronous,
// active high) switches both off.
module hvac_ctrl
  import room_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [1:0] ts,    // {below 20 C, above 25 C}
  output logic       cool,  // air conditioner
  output logic       heat   // heater
);

  always_ff @(posedge clk) begin
    if (rst) begin
      cool <= 1'b0;
      heat <= 1'b0;
    end else begin
      case (ts)
        TS_COMFORT: begin cool <= 1'b0; heat <= 1'b0; end
        TS_HOT:     begin cool <= 1'b1; heat <= 1'b0; end
        TS_COLD:    begin cool <= 1'b0; heat <= 1'b1; end
        default:    ;  // impossible comparator code: hold
      endcase
    end
  end

endmodule
