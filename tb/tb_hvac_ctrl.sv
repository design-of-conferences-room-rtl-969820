// tb_hvac_ctrl: self-checking test of the heating / air-conditioning unit.
//
// Applies each comparator code, and random sequences of codes, and checks
// cool/heat one clock later: 01 -> cool, 10 -> heat, 00 -> both off, 11 ->
// both keep their values. A watchdog ends the run.
`timescale 1ns/1ps
module tb_hvac_ctrl;
  logic clk = 1'b0;
  logic rst;
  logic [1:0] ts;
  logic cool, heat;
  int checks = 0, failures = 0;

  hvac_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ec, eh;
    rst = 1; ts = 2'b01;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (cool !== 0 || heat !== 0) begin failures++; $display("FAIL reset"); end
    rst = 0;
    ec = 0; eh = 0;
    for (int i = 0; i < 1000; i++) begin
      ts = (i < 8) ? 2'(i) : 2'($urandom_range(0, 3));
      case (ts)
        2'b00: begin ec = 0; eh = 0; end
        2'b01: begin ec = 1; eh = 0; end
        2'b10: begin ec = 0; eh = 1; end
        default: ;
      endcase
      @(posedge clk); #1;
      checks++;
      if (cool !== ec || heat !== eh) begin
        failures++;
        $display("FAIL ts=%b: cool=%b heat=%b expected %b %b", ts, cool, heat, ec, eh);
      end
      if (cool && heat) begin failures++; $display("FAIL cool and heat together"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
