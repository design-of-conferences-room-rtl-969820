// curtain_ctrl: curtain motor control of the conference-room model.
//
// Same command scheme as the door, without a photo sensor. sw_open (sw2) and
// sw_close (sw3) command the curtain; the registers r3 (open acted on) and r4
// (close acted on) make each command start the motor once and then hold the
// drive word n, so the motor runs for as long as the switch stays on. Both
// switches off stops the motor and clears r3/r4; both on reverses a running
// motor once. A fire request forces n to "open" while it lasts without
// touching r3/r4.
//
// The rules, register names and codes (3 hex open, C hex close, 0 stop)
// follow the room model's description and source; since there is no limit
// switch, r3/r4 record commands rather than curtain positions.
//
// Timing: inputs sampled on the rising clock edge, n/r3/r4 change on that
// edge. rst is synchronous, active high, and stops the curtain.
module curtain_ctrl
  import room_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        sw_open,   // sw2
  input  logic        sw_close,  // sw3
  input  logic        fire,      // emergency open request
  output motor_word_t n,         // H-bridge drive word
  output logic        r3,        // open command acted on
  output logic        r4         // close command acted on
);

  motor_cmd_t  cmd;
  motor_word_t n_next;
  logic        r3_next, r4_next;

  assign cmd = motor_cmd_t'({sw_close, sw_open});

  always_comb begin
    n_next  = n;
    r3_next = r3;
    r4_next = r4;
    unique case (cmd)
      CMD_STOP: begin
        n_next  = MOTOR_STOP;
        r3_next = 1'b0;
        r4_next = 1'b0;
      end
      CMD_OPEN: begin
        if (!r3) begin
          n_next  = MOTOR_OPEN;
          r3_next = 1'b1;
          r4_next = 1'b0;
        end else if (r4) begin
          n_next  = MOTOR_STOP;
          r4_next = 1'b0;
        end
      end
      CMD_CLOSE: begin
        if (!r4) begin
          n_next  = MOTOR_CLOSE;
          r3_next = 1'b0;
          r4_next = 1'b1;
        end else if (r3) begin
          n_next  = MOTOR_STOP;
          r3_next = 1'b0;
        end
      end
      CMD_REVERSE: begin
        if (r3 && !r4) begin
          n_next  = MOTOR_CLOSE;
          r4_next = 1'b1;
        end else if (r4 && !r3) begin
          n_next  = MOTOR_OPEN;
          r3_next = 1'b1;
        end
      end
    endcase
    if (fire) n_next = MOTOR_OPEN;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      n  <= MOTOR_STOP;
      r3 <= 1'b0;
      r4 <= 1'b0;
    end else begin
      n  <= n_next;
      r3 <= r3_next;
      r4 <= r4_next;
    end
  end

  // The drive word never turns on both transistor pairs
  a_legal_word: assert property (@(posedge clk) disable iff (rst)
    (n == MOTOR_STOP || n == MOTOR_OPEN || n == MOTOR_CLOSE));

endmodule
