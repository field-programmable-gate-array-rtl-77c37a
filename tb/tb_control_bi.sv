// Testbench of control_bi. A three-stage delay line stands for the pipeline
// and a counter for FIFO Out, drained at random. Checks: FIFO Out never
// receives more words than it holds, every pipeline result is written, a
// block is started whenever FIFO In has data and the credit rule allows it,
// and rd follows the output handshake. Stalls must occur.
module tb_control_bi;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic fifo_in_empty, pipe_out_valid, fifo_in_rd, fifo_out_wr;
  logic [3:0] fifo_out_count;
  logic fifo_out_empty, m_ready, m_valid, rd;
  logic [2:0] pipe;
  int count = 0, inflight = 0;
  int checks = 0, failures = 0, stalls = 0;

  control_bi #(.DEPTH(DEPTH), .LATENCY(3)) dut (
    .clk_f(clk), .rst_f_n(rst_n), .fifo_in_empty, .fifo_out_count, .pipe_out_valid,
    .fifo_in_rd, .fifo_out_wr, .fifo_out_empty, .m_ready, .m_valid, .rd
  );

  always #5 clk = ~clk;
  assign pipe_out_valid = pipe[2];
  assign fifo_out_count = 4'(count);
  assign fifo_out_empty = (count == 0);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic s_wr, s_rd, s_in, s_pv;
    pipe = 0;
    fifo_in_empty = 1; m_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      fifo_in_empty = ($urandom_range(0, 4) == 0);
      m_ready = ($urandom_range(0, 9) < ((i / 500) % 2 == 0 ? 2 : 9));
      #1;
      checks += 4;
      if (fifo_in_rd !== (!fifo_in_empty && (count + inflight + 1 <= DEPTH))) begin
        failures++; $display("FAIL fifo_in_rd at %0d cnt=%0d infl=%0d dut=%0d rd=%b empty=%b", i, count, inflight, dut.inflight, fifo_in_rd, fifo_in_empty);
      end
      if (fifo_out_wr !== pipe_out_valid) begin failures++; $display("FAIL fifo_out_wr"); end
      if (m_valid !== (count != 0)) begin failures++; $display("FAIL m_valid"); end
      if (rd !== (m_valid && m_ready)) begin failures++; $display("FAIL rd"); end
      if (!fifo_in_empty && !fifo_in_rd) stalls++;
      s_wr = fifo_out_wr; s_rd = rd; s_in = fifo_in_rd; s_pv = pipe_out_valid;
      @(posedge clk);
      count <= count + int'(s_wr) - int'(s_rd);
      inflight <= inflight + int'(s_in) - int'(s_pv);
      pipe <= {pipe[1:0], s_in};
      checks++;
      if (count > DEPTH || count < 0) begin failures++; $display("FAIL overflow %0d", count); end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
