// Testbench of motor_control_ip with a short servo period (PERIOD=200,
// pulses 30/40/20). For each request set, an update strobe is given; from
// the next full period on, the pulse widths on signal_1 and signal_2 must
// match the movement chosen (both forward, both reverse, opposite for a
// turn, stop pulses when nothing is requested).
module tb_motor_control_ip;
  import track_pkg::*;
  localparam int PERIOD = 200, PW_STOP = 30, PW_FWD = 40, PW_REV = 20;
  logic clk = 0, rst_n = 0;
  logic update, cometo, backward, right, left;
  move_e state;
  logic signal_1, signal_2;
  int checks = 0, failures = 0;

  motor_control_ip #(.PERIOD(PERIOD), .PW_STOP(PW_STOP), .PW_FWD(PW_FWD), .PW_REV(PW_REV)) dut (
    .clk, .rst_n, .update, .cometo, .backward, .right, .left, .state, .signal_1, .signal_2);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h1, h2, e1, e2;
    logic [3:0] req;
    update = 0; {cometo, backward, right, left} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 24; t++) begin
      req = (t < 16) ? 4'(t) : 4'($urandom);
      @(negedge clk);
      {cometo, backward, right, left} = req;
      update = 1;
      @(negedge clk);
      update = 0;
      if      (backward) begin e1 = PW_REV;  e2 = PW_REV;  end
      else if (cometo)   begin e1 = PW_FWD;  e2 = PW_FWD;  end
      else if (left)     begin e1 = PW_REV;  e2 = PW_FWD;  end
      else if (right)    begin e1 = PW_FWD;  e2 = PW_REV;  end
      else               begin e1 = PW_STOP; e2 = PW_STOP; end
      // every pulse starts a period: measure the second period after the update
      @(posedge signal_1);
      @(posedge signal_1);
      @(negedge clk);
      h1 = 0; h2 = 0;
      for (int c = 0; c < PERIOD; c++) begin
        #1;
        h1 += int'(signal_1); h2 += int'(signal_2);
        @(negedge clk);
      end
      checks += 2;
      if (h1 != e1 || h2 != e2) begin
        failures++; $display("FAIL req %b widths %0d/%0d exp %0d/%0d", req, h1, h2, e1, e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
