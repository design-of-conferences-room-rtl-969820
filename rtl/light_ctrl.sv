// light_ctrl: the two LED light groups of the conference-room model.
//
// With the mode switch off (sw4 = 0) the lights follow the room photo sensor:
// the low group l1 is always on and the high group l2 is added when the
// sensor reports darkness (phd1 = 1). With the mode switch on (sw4 = 1) the
// two light switches set the groups directly, l1 from sww[1] and l2 from
// sww[0].
//
// The automatic rule and the separate room sensor follow the room model's
// description and source; the bit order of the manual switches is this
// design's reading of a partly lost table.
//
// Timing: l1/l2 are registered and change on the rising clock edge after the
// inputs; rst (synchronous, active high) turns both groups off.
module light_ctrl (
  input  logic       clk,
  input  logic       rst,
  input  logic       manual,  // sw4
  input  logic [1:0] sww,     // manual light switches
  input  logic       phd1,    // room photo sensor, 1 = dark
  output logic       l1,      // low light group
  output logic       l2       // high light group
);

  always_ff @(posedge clk) begin
    if (rst) begin
      l1 <= 1'b0;
      l2 <= 1'b0;
    end else if (manual) begin
      l1 <= sww[1];
      l2 <= sww[0];
    end else begin
      l1 <= 1'b1;
      l2 <= phd1;
    end
  end

endmodule
