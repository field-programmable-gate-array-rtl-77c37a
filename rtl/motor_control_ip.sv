// Motor-control IP core: the movement FSM feeding two servo pulse
// generators. Requests cometo/backward/right/left are taken on update;
// driver_1 and driver_2 from the FSM set the pulse widths of signal_1 and
// signal_2, which change at the next servo period. Structure (FSM module,
// PWM module, driver_1/driver_2, signal_1/signal_2) follows the source
// design; see motor_fsm and servo_pwm for the choices made inside.
module motor_control_ip
  import track_pkg::*;
#(
  parameter int unsigned PERIOD  = 2_000_000,
  parameter int unsigned PW_STOP = 150_000,
  parameter int unsigned PW_FWD  = 200_000,
  parameter int unsigned PW_REV  = 100_000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  update,
  input  logic  cometo,
  input  logic  backward,
  input  logic  right,
  input  logic  left,
  output move_e state,
  output logic  signal_1,
  output logic  signal_2
);
  drive_e driver_1, driver_2;

  motor_fsm u_fsm (
    .clk, .rst_n, .update, .cometo, .backward, .right, .left,
    .state, .driver_1, .driver_2
  );

  servo_pwm #(.PERIOD(PERIOD), .PW_STOP(PW_STOP), .PW_FWD(PW_FWD), .PW_REV(PW_REV)) u_pwm1 (
    .clk, .rst_n, .driver(driver_1), .signal_out(signal_1)
  );
  servo_pwm #(.PERIOD(PERIOD), .PW_STOP(PW_STOP), .PW_FWD(PW_FWD), .PW_REV(PW_REV)) u_pwm2 (
    .clk, .rst_n, .driver(driver_2), .signal_out(signal_2)
  );
endmodule
