// Testbench of motor_fsm: all 16 request combinations, with and without the
// update strobe. The state must follow the priority backward > cometo >
// left > right > stop only on update, and the two motor commands must match
// the state.
module tb_motor_fsm;
  import track_pkg::*;
  logic clk = 0, rst_n = 0;
  logic update, cometo, backward, right, left;
  move_e state;
  drive_e driver_1, driver_2;
  int checks = 0, failures = 0;

  motor_fsm dut (.clk, .rst_n, .update, .cometo, .backward, .right, .left, .state, .driver_1, .driver_2);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    move_e exp_s, nxt;
    drive_e e1, e2;
    update = 0; {cometo, backward, right, left} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    exp_s = MV_STOP;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      {cometo, backward, right, left} = (i < 32) ? 4'(i) : 4'($urandom);
      update = (i < 32) ? i[4] : ($urandom_range(0, 2) != 0);
      if      (backward) nxt = MV_BACK;
      else if (cometo)   nxt = MV_FWD;
      else if (left)     nxt = MV_LEFT;
      else if (right)    nxt = MV_RIGHT;
      else               nxt = MV_STOP;
      @(posedge clk);
      if (update) exp_s = nxt;
      #1;
      case (exp_s)
        MV_FWD:   begin e1 = DRV_FWD;  e2 = DRV_FWD;  end
        MV_BACK:  begin e1 = DRV_REV;  e2 = DRV_REV;  end
        MV_LEFT:  begin e1 = DRV_REV;  e2 = DRV_FWD;  end
        MV_RIGHT: begin e1 = DRV_FWD;  e2 = DRV_REV;  end
        default:  begin e1 = DRV_STOP; e2 = DRV_STOP; end
      endcase
      checks++;
      if (state != exp_s || driver_1 != e1 || driver_2 != e2) begin
        failures++;
        $display("FAIL i=%0d state %0d exp %0d drv %0d/%0d", i, state, exp_s, driver_1, driver_2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
