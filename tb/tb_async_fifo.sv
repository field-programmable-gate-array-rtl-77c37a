// Testbench of async_fifo: a 100 MHz writer and a 30 MHz reader with random
// pauses on both sides. Every word read must equal the next word written
// (order and data), the FIFO must report full and empty at some point, and
// all words must come out.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en, rd_en, full, empty;
  logic [15:0] wdata, rdata;
  logic [3:0] wr_count;
  int checks = 0, failures = 0;
  int nfull = 0, nempty = 0;
  logic [15:0] sent[$];
  localparam int N = 3000;

  async_fifo #(.WIDTH(16), .DEPTH(8)) dut (
    .wclk, .wrst_n, .wr_en, .wdata, .full, .wr_count,
    .rclk, .rrst_n, .rd_en, .rdata, .empty
  );

  always #5 wclk = ~wclk;
  always #16.5 rclk = ~rclk;

  initial begin
    repeat (200000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer
  initial begin
    int n;
    n = 0;
    wr_en = 0; wdata = 0;
    repeat (4) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    while (n < N) begin
      @(negedge wclk);
      wr_en = 0;
      if (!full && ($urandom_range(0, 9) < ((n / 1000) % 2 == 0 ? 9 : 2))) begin
        wr_en = 1;
        wdata = 16'($urandom);
        sent.push_back(wdata);
        n++;
      end
      if (full) nfull++;
      if (wr_count > 8) begin failures++; $display("FAIL count %0d", wr_count); end
    end
    @(negedge wclk);
    wr_en = 0;
  end

  // reader
  initial begin
    int got;
    logic [15:0] e;
    got = 0;
    rd_en = 0;
    @(posedge rrst_n);
    while (got < N) begin
      @(negedge rclk);
      rd_en = 0;
      if (empty) nempty++;
      else if ($urandom_range(0, 3) != 0) begin
        rd_en = 1;
        e = sent.pop_front();
        checks++;
        if (rdata !== e) begin
          failures++;
          $display("FAIL word %0d exp %h got %h", got, e, rdata);
        end
        got++;
      end
    end
    @(negedge rclk);
    rd_en = 0;
    repeat (5) @(posedge rclk);
    checks++;
    if (!empty || nfull == 0 || nempty == 0) begin
      failures++;
      $display("FAIL end state empty=%b nfull=%0d nempty=%0d", empty, nfull, nempty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
