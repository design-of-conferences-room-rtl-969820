// fire_alarm: security unit of the conference-room model.
//
// The smoke detector gives one digital line, fs. While it reports smoke the
// alarm output is on and the emergency request to the door and curtain units
// is raised, so that both are driven open on the same clock edge that turns
// the alarm on. The alarm is not latched: it goes off on the first clock edge
// after the smoke clears, as in the room model's source.
//
// Interface: alarm is registered (one clock after fs); emergency is the
// combinational request, which the door and curtain units register together
// with their drive words. rst is synchronous, active high, and clears alarm.
module fire_alarm (
  input  logic clk,
  input  logic rst,
  input  logic fs,         // fire sensor, 1 = smoke
  output logic alarm,      // alarm output
  output logic emergency   // open request to door and curtain
);

  always_ff @(posedge clk) begin
    if (rst) alarm <= 1'b0;
    else     alarm <= fs;
  end

  assign emergency = fs && !rst;

endmodule
