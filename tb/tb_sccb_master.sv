// Testbench of sccb_master (QDIV=5, so SIO_C has a 20-clock period). A bus
// monitor decodes the start condition, the 27 bits taken on rising SIO_C and
// the stop condition, and checks: the three bytes equal the requested
// ID/address/data, the ninth bit of each phase is released, SIO_D never
// changes while SIO_C is high except at start and stop, every SIO_C period
// is 20 clocks, busy/done frame the transfer, and a request made while busy
// is ignored.
module tb_sccb_master;
  localparam int QDIV = 5;
  logic clk = 0, rst_n = 0;
  logic start, busy, done, sio_c, sio_d, sio_d_oe;
  logic [7:0] id, addr, data;
  int checks = 0, failures = 0;

  sccb_master #(.QDIV(QDIV)) dut (.clk, .rst_n, .start, .id, .addr, .data, .busy, .done, .sio_c, .sio_d, .sio_d_oe);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- bus monitor ----------------
  logic pc = 1, pd = 1;
  int nbits = 0, nstart = 0, nstop = 0, last_rise = -1, cyc = 0;
  logic [26:0] bits;
  logic [2:0]  released;
  logic [26:0] got_q[$];
  logic [2:0]  rel_q[$];

  always @(negedge clk) begin
    logic dl;
    cyc++;
    dl = sio_d_oe ? sio_d : 1'b1;   // released line is pulled high
    if (rst_n) begin
      if (pc && sio_c && pd && !dl) begin nstart++; nbits = 0; released = '0; end
      else if (pc && sio_c && !pd && dl) begin
        nstop++;
        got_q.push_back(bits); rel_q.push_back(released);
      end else if (pc && sio_c && pd != dl) begin
        failures++; $display("FAIL SIO_D changed while SIO_C high");
      end
      if (!pc && sio_c) begin
        if (last_rise >= 0 && nbits > 0 && nbits < 27) begin
          checks++;
          if (cyc - last_rise != 4 * QDIV) begin failures++; $display("FAIL SIO_C period %0d", cyc - last_rise); end
        end
        last_rise = cyc;
        if (nbits < 27) begin
          bits[26 - nbits] = dl;
          if (nbits % 9 == 8) released[nbits / 9] = !sio_d_oe;
        end
        nbits++;
      end
    end
    pc = sio_c; pd = dl;
  end

  task automatic write_reg(logic [7:0] i, logic [7:0] a, logic [7:0] v);
    logic [26:0] g;
    logic [2:0] r;
    int ndone;
    @(negedge clk);
    id = i; addr = a; data = v; start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (!busy) begin failures++; $display("FAIL busy not raised"); end
    // a second request during the transfer must be ignored
    repeat (50) @(negedge clk);
    id = ~i; start = 1;
    @(negedge clk);
    start = 0;
    ndone = 0;
    while (busy) begin @(negedge clk); ndone += int'(done); end
    repeat (3 * QDIV) @(negedge clk);
    checks += 4;
    if (ndone != 1) begin failures++; $display("FAIL done count %0d", ndone); end
    if (got_q.size() != 1) begin failures++; $display("FAIL %0d transfers seen", got_q.size()); end
    else begin
      g = got_q.pop_front(); r = rel_q.pop_front();
      if ({g[26:19], g[17:10], g[8:1]} != {i, a, v}) begin
        failures++; $display("FAIL bytes %h %h %h exp %h %h %h", g[26:19], g[17:10], g[8:1], i, a, v);
      end
      if (r != 3'b111) begin failures++; $display("FAIL ninth bits not released %b", r); end
    end
    if (busy || sio_c !== 1'b1 || sio_d !== 1'b1) begin failures++; $display("FAIL bus not idle"); end
  endtask

  initial begin
    start = 0; id = 0; addr = 0; data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    write_reg(8'h42, 8'h12, 8'h80);
    write_reg(8'h42, 8'h40, 8'hd0);
    for (int t = 0; t < 6; t++) write_reg(8'h42, 8'($urandom), 8'($urandom));
    checks++;
    if (nstart != 8 || nstop != 8) begin failures++; $display("FAIL starts %0d stops %0d", nstart, nstop); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
