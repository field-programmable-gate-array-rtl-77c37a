// Movement state machine of the motor-control IP.
//
// On each update strobe the requests cometo, backward, left and right are
// turned into one movement state, by priority backward > cometo > left >
// right, and STOP when none is raised. The state sets the command of each
// motor: driver_1 drives motor 1 (left wheel), driver_2 motor 2 (right
// wheel); forward and backward run both wheels the same way, a turn runs
// them in opposite directions. The state holds between updates; reset gives
// STOP. The FSM/PWM split and the four request names follow the source
// design; states, priority and wheel mapping are this design's choice.
module motor_fsm
  import track_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   update,
  input  logic   cometo,
  input  logic   backward,
  input  logic   right,
  input  logic   left,
  output move_e  state,
  output drive_e driver_1,
  output drive_e driver_2
);
  move_e next;

  always_comb begin
    if      (backward) next = MV_BACK;
    else if (cometo)   next = MV_FWD;
    else if (left)     next = MV_LEFT;
    else if (right)    next = MV_RIGHT;
    else               next = MV_STOP;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state <= MV_STOP;
    else if (update) state <= next;
  end

  always_comb begin
    unique case (state)
      MV_FWD:   begin driver_1 = DRV_FWD;  driver_2 = DRV_FWD;  end
      MV_BACK:  begin driver_1 = DRV_REV;  driver_2 = DRV_REV;  end
      MV_LEFT:  begin driver_1 = DRV_REV;  driver_2 = DRV_FWD;  end
      MV_RIGHT: begin driver_1 = DRV_FWD;  driver_2 = DRV_REV;  end
      default:  begin driver_1 = DRV_STOP; driver_2 = DRV_STOP; end
    endcase
  end
endmodule
