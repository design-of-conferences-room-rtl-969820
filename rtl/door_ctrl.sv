// door_ctrl: door motor control of the conference-room model.
//
// Two switches command the door: sw_open (sw0) and sw_close (sw1). Two
// command registers, r1 (open acted on) and r2 (close acted on), make each
// command start the motor once and then hold the drive word p, so the motor
// runs for as long as the switch stays on; turning both switches off stops the
// motor and clears both registers. Turning both on reverses a running motor
// once. While closing, the doorway photo sensor phd is checked on every clock:
// a barrier stops the door and sets r2, so it stays stopped until the close
// switch is released and set again. A fire request forces p to "open" while it
// lasts, without touching r1/r2; afterwards p keeps its value until a switch
// branch writes it again.
//
// These rules, the register names and the drive codes (3 hex open, C hex
// close, 0 stop) follow the room model's description and source. The model
// has no limit switch, so r1/r2 record commands, not door positions; the
// barrier latch and the treatment of a reversal into a blocked doorway are
// this design's reading of the description.
//
// Timing: inputs are sampled on the rising clock edge and p, r1, r2 change on
// that edge (one clock of latency). rst is synchronous and active high and
// leaves the door stopped with both registers clear.
module door_ctrl
  import room_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        sw_open,   // sw0
  input  logic        sw_close,  // sw1
  input  logic        phd,       // 1 = barrier in the doorway
  input  logic        fire,      // emergency open request
  output motor_word_t p,         // H-bridge drive word
  output logic        r1,        // open command acted on
  output logic        r2         // close command acted on
);

  motor_cmd_t  cmd;
  motor_word_t p_next;
  logic        r1_next, r2_next;

  assign cmd = motor_cmd_t'({sw_close, sw_open});

  always_comb begin
    p_next  = p;
    r1_next = r1;
    r2_next = r2;
    unique case (cmd)
      CMD_STOP: begin
        p_next  = MOTOR_STOP;
        r1_next = 1'b0;
        r2_next = 1'b0;
      end
      CMD_OPEN: begin
        if (!r1) begin
          p_next  = MOTOR_OPEN;
          r1_next = 1'b1;
          r2_next = 1'b0;
        end else if (r2) begin
          p_next  = MOTOR_STOP;
          r2_next = 1'b0;
        end
      end
      CMD_CLOSE: begin
        if (phd) begin
          p_next  = MOTOR_STOP;
          r1_next = 1'b0;
          r2_next = 1'b1;
        end else if (!r2) begin
          p_next  = MOTOR_CLOSE;
          r1_next = 1'b0;
          r2_next = 1'b1;
        end else if (r1) begin
          p_next  = MOTOR_STOP;
          r1_next = 1'b0;
        end
      end
      CMD_REVERSE: begin
        if (r1 && !r2) begin
          p_next  = MOTOR_CLOSE;
          r2_next = 1'b1;
        end else if (r2 && !r1) begin
          p_next  = MOTOR_OPEN;
          r1_next = 1'b1;
        end
      end
    endcase
    // the doorway is checked whatever branch keeps the door closing
    if (phd && p_next == MOTOR_CLOSE) p_next = MOTOR_STOP;
    if (fire) p_next = MOTOR_OPEN;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      p  <= MOTOR_STOP;
      r1 <= 1'b0;
      r2 <= 1'b0;
    end else begin
      p  <= p_next;
      r1 <= r1_next;
      r2 <= r2_next;
    end
  end

  // The drive word never turns on both transistor pairs
  a_legal_word: assert property (@(posedge clk) disable iff (rst)
    (p == MOTOR_STOP || p == MOTOR_OPEN || p == MOTOR_CLOSE));

  // A barrier never lets the door close, unless fire forces it open
  a_barrier_stops: assert property (@(posedge clk) disable iff (rst)
    (phd && !fire && sw_close) |=> p != MOTOR_CLOSE);

endmodule
