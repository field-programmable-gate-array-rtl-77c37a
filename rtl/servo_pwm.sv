// Servo pulse generator for one motor.
//
// A counter runs over PERIOD clocks. At the start of every period the motor
// command is sampled and the output goes high for PW_STOP, PW_FWD or PW_REV
// clocks: with a 100 MHz clock the defaults give a 20 ms frame with a 1.5 ms
// (stop), 2.0 ms (forward) or 1.0 ms (reverse) pulse, the usual drive of a
// continuous-rotation servo. A new command therefore takes effect at the next
// period boundary, so no pulse is ever cut short. Driving the motors by
// pulses is from the source design; the timing values are this design's.
module servo_pwm
  import track_pkg::*;
#(
  parameter int unsigned PERIOD  = 2_000_000,
  parameter int unsigned PW_STOP = 150_000,
  parameter int unsigned PW_FWD  = 200_000,
  parameter int unsigned PW_REV  = 100_000,
  localparam int unsigned CW = $clog2(PERIOD)
) (
  input  logic   clk,
  input  logic   rst_n,
  input  drive_e driver,
  output logic   signal_out
);
  logic [CW-1:0] cnt;
  logic [CW-1:0] width;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      width <= CW'(PW_STOP);
    end else begin
      cnt <= (cnt == CW'(PERIOD - 1)) ? '0 : cnt + 1'b1;
      if (cnt == CW'(PERIOD - 1)) begin
        unique case (driver)
          DRV_FWD: width <= CW'(PW_FWD);
          DRV_REV: width <= CW'(PW_REV);
          default: width <= CW'(PW_STOP);
        endcase
      end
    end
  end

  assign signal_out = (cnt < width);
endmodule
