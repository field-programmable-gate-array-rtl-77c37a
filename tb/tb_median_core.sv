// Testbench of median_core. Streams random three-row bands of RGB565 blocks
// (with idle cycles between blocks), computes every 3x3 median in the
// testbench by sorting nine values, and checks each output word and that it
// appears exactly three clocks after its block. The first 64 blocks come
// back to back and must give 64 consecutive result cycles (4 pixels/clock).
module tb_median_core;
  import track_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  rgb565_t [2:0][3:0] in_blk;
  logic out_valid;
  rgb888_t [3:0] out_pix;
  int checks = 0, failures = 0;
  int cycle = 0;

  median_core dut (.clk, .rst_n, .in_valid, .in_blk, .out_valid, .out_pix);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] med9(logic [7:0] v[9]);
    logic [7:0] t;
    for (int i = 0; i < 9; i++)
      for (int j = 0; j < 8 - i; j++)
        if (v[j] > v[j+1]) begin t = v[j]; v[j] = v[j+1]; v[j+1] = t; end
    return v[4];
  endfunction

  // expected outputs and the cycle they must appear in
  rgb888_t exp_q[$];
  int      due_q[$];
  rgb888_t col_hist [$][3];   // all columns sent, widened

  initial begin
    int nblk = 0;
    in_valid = 0;
    in_blk = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 400; b++) begin
      @(negedge clk);
      in_valid = (b < 64) || ($urandom_range(0, 3) != 0);   // first 64 back to back
      if (in_valid) begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 4; c++)
            in_blk[r][c] = ($urandom_range(0, 4) == 0) ? rgb565_t'(16'hffff) : rgb565_t'(16'($urandom));
        for (int c = 0; c < 4; c++) begin
          rgb888_t col[3];
          for (int r = 0; r < 3; r++) col[r] = widen565(in_blk[r][c]);
          col_hist.push_back(col);
        end
        if (nblk > 0) begin
          rgb888_t e;
          for (int j = 0; j < 4; j++) begin
            int base;
            logic [7:0] vr[9], vg[9], vb[9];
            base = 4 * nblk - 2 + j;
            for (int dc = 0; dc < 3; dc++)
              for (int r = 0; r < 3; r++) begin
                vr[dc*3+r] = col_hist[base+dc][r].r;
                vg[dc*3+r] = col_hist[base+dc][r].g;
                vb[dc*3+r] = col_hist[base+dc][r].b;
              end
            e.r = med9(vr); e.g = med9(vg); e.b = med9(vb);
            exp_q.push_back(e);
          end
          due_q.push_back(cycle + 3);
        end else begin
          due_q.push_back(-(cycle + 3));   // first block: timing only
        end
        nblk++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (best_run < 64) begin
      failures++;
      $display("FAIL only %0d consecutive result cycles (4 pixels each)", best_run);
    end
    if (due_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", due_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rate: the 64 back-to-back blocks must give 64 consecutive result cycles
  int run = 0, best_run = 0;
  always @(negedge clk) begin
    run = (rst_n && out_valid) ? run + 1 : 0;
    if (run > best_run) best_run = run;
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int due;
      if (due_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        due = due_q.pop_front();
        checks++;
        if ((due < 0 ? -due : due) != cycle) begin
          failures++;
          $display("FAIL latency: due %0d at %0d", due, cycle);
        end
        if (due > 0) begin
          for (int j = 0; j < 4; j++) begin
            rgb888_t e;
            e = exp_q.pop_front();
            checks++;
            if (out_pix[j] != e) begin
              failures++;
              $display("FAIL pix %0d exp %h got %h", j, e, out_pix[j]);
            end
          end
        end
      end
    end
  end
endmodule
