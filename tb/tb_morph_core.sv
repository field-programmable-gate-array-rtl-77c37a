// Testbench of morph_core, an erosion and a dilation instance side by side.
// Random 9x9 blocks (dense for erosion, sparse for dilation, so both output
// values occur) with idle cycles; each of the nine outputs is recomputed
// from the 18-column strip of the previous and current block, and each
// result must appear exactly nine clocks after its block. The first 64
// blocks come back to back and must give 64 consecutive results.
module tb_morph_core;
  localparam int K = 9;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [0:K-1][0:K-1] blk_e, blk_d;
  logic ov_e, ov_d;
  logic [0:K-1] ob_e, ob_d;
  int checks = 0, failures = 0, cycle = 0, ones_e = 0, zeros_d = 0;

  morph_core #(.K(K), .DILATE(1'b0)) dut_e (.clk, .rst_n, .in_valid, .in_blk(blk_e), .out_valid(ov_e), .out_bits(ob_e));
  morph_core #(.K(K), .DILATE(1'b1)) dut_d (.clk, .rst_n, .in_valid, .in_blk(blk_d), .out_valid(ov_d), .out_bits(ob_d));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [0:K-1] exp_e[$], exp_d[$];
  int due_q[$];

  initial begin
    logic [0:K-1][0:K-1] pe, pd;
    logic [0:K-1] ee, ed;
    int nblk;
    nblk = 0;
    in_valid = 0; blk_e = '0; blk_d = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 600; b++) begin
      @(negedge clk);
      in_valid = (b < 64) || ($urandom_range(0, 3) != 0);   // first 64 back to back
      if (in_valid) begin
        for (int r = 0; r < K; r++)
          for (int c = 0; c < K; c++) begin
            blk_e[r][c] = ($urandom_range(0, 199) != 0);
            blk_d[r][c] = ($urandom_range(0, 199) == 0);
          end
        if (nblk > 0) begin
          for (int n = 0; n < K; n++) begin
            ee[n] = 1'b1; ed[n] = 1'b0;
            for (int r = 0; r < K; r++)
              for (int c = n; c < n + K; c++) begin
                ee[n] &= (c < K) ? pe[r][c] : blk_e[r][c-K];
                ed[n] |= (c < K) ? pd[r][c] : blk_d[r][c-K];
              end
          end
          exp_e.push_back(ee); exp_d.push_back(ed);
          due_q.push_back(cycle + K);
        end else begin
          due_q.push_back(-(cycle + K));
        end
        pe = blk_e; pd = blk_d;
        nblk++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (12) @(posedge clk);
    checks++;
    if (best_run < 64) begin failures++; $display("FAIL rate: %0d consecutive results", best_run); end
    checks++;
    if (due_q.size() != 0 || ones_e == 0 || zeros_d == 0) begin
      failures++;
      $display("FAIL left=%0d ones_e=%0d zeros_d=%0d", due_q.size(), ones_e, zeros_d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rate: 64 back-to-back blocks must give 64 consecutive 9-bit results
  int run = 0, best_run = 0;
  always @(negedge clk) begin
    run = (rst_n && ov_e && ov_d) ? run + 1 : 0;
    if (run > best_run) best_run = run;
  end

  always @(negedge clk) begin
    if (rst_n && (ov_e || ov_d)) begin
      int due;
      logic [0:K-1] e1, e2;
      checks++;
      if (!(ov_e && ov_d) || due_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        due = due_q.pop_front();
        if ((due < 0 ? -due : due) != cycle) begin
          failures++; $display("FAIL latency due %0d at %0d", due, cycle);
        end
        if (due > 0) begin
          e1 = exp_e.pop_front(); e2 = exp_d.pop_front();
          checks += 2;
          ones_e += $countones(ob_e);
          zeros_d += K - $countones(ob_d);
          if (ob_e != e1) begin failures++; $display("FAIL erosion exp %b got %b", e1, ob_e); end
          if (ob_d != e2) begin failures++; $display("FAIL dilation exp %b got %b", e2, ob_d); end
        end
      end
    end
  end
endmodule
