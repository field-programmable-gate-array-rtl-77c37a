// Testbench of servo_pwm with a short period (PERIOD=100, pulses 15/20/10).
// The command changes at random times; each period's high time is measured
// and must equal the width of the command held at the start of that period,
// and the period must be exactly PERIOD clocks.
module tb_servo_pwm;
  import track_pkg::*;
  localparam int PERIOD = 100, PW_STOP = 15, PW_FWD = 20, PW_REV = 10;
  logic clk = 0, rst_n = 0;
  drive_e driver;
  logic sig;
  int checks = 0, failures = 0;
  int last_w = PW_STOP;

  servo_pwm #(.PERIOD(PERIOD), .PW_STOP(PW_STOP), .PW_FWD(PW_FWD), .PW_REV(PW_REV)) dut (
    .clk, .rst_n, .driver, .signal_out(sig));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int width_of(drive_e d);
    case (d)
      DRV_FWD: return PW_FWD;
      DRV_REV: return PW_REV;
      default: return PW_STOP;
    endcase
  endfunction

  // command changes
  initial begin
    driver = DRV_STOP;
    forever begin
      repeat ($urandom_range(30, 250)) @(negedge clk);
      driver = drive_e'($urandom_range(0, 2));
    end
  end

  initial begin
    int hi, exp_w;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // first period after reset: stop pulse
    exp_w = PW_STOP;
    for (int p = 0; p < 200; p++) begin
      hi = 0;
      for (int c = 0; c < PERIOD; c++) begin
        #1;
        if (sig) hi++;
        if (c == PERIOD - 1) exp_w = width_of(driver);  // sampled at the wrap
        @(negedge clk);
      end
      checks++;
      if (p > 0 && hi != last_w) begin
        failures++; $display("FAIL period %0d high %0d exp %0d", p, hi, last_w);
      end
      last_w = exp_w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
