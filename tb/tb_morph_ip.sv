// Testbench of morph_ip: an erosion core and a dilation core, each fed its
// own random stream of 9x9 blocks (dense for erosion, sparse for dilation)
// across the two clock domains with input gaps and output back-pressure.
// Each output word is recomputed from the previous and current block and
// compared in order. Refused inputs and held outputs must both occur.
module tb_morph_ip;
  localparam int K = 9;
  localparam int NBLK = 800;
  logic clk_axi = 0, clk_filt = 0, rst_axi_n = 0, rst_filt_n = 0;
  logic       s_tvalid[2], s_tready[2], m_tvalid[2], m_tready[2];
  logic [80:0] s_tdata[2];
  logic [8:0]  m_tdata[2];
  int checks = 0, failures = 0, n_refused = 0, n_held = 0, n_done = 0;
  int toggles[2];

  morph_ip #(.DILATE(1'b0)) dut_e (
    .clk_axi, .rst_axi_n, .clk_filt, .rst_filt_n,
    .s_tvalid(s_tvalid[0]), .s_tready(s_tready[0]), .s_tdata(s_tdata[0]),
    .m_tvalid(m_tvalid[0]), .m_tready(m_tready[0]), .m_tdata(m_tdata[0]));
  morph_ip #(.DILATE(1'b1)) dut_d (
    .clk_axi, .rst_axi_n, .clk_filt, .rst_filt_n,
    .s_tvalid(s_tvalid[1]), .s_tready(s_tready[1]), .s_tdata(s_tdata[1]),
    .m_tvalid(m_tvalid[1]), .m_tready(m_tready[1]), .m_tdata(m_tdata[1]));

  always #5 clk_axi = ~clk_axi;
  always #16.5 clk_filt = ~clk_filt;

  initial begin
    repeat (200000) @(posedge clk_axi);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk_filt);
    rst_axi_n = 1; rst_filt_n = 1;
  end

  for (genvar u = 0; u < 2; u++) begin : g_unit
    logic [8:0] exp_q[$];

    initial begin
      logic [0:K-1][0:K-1] blk, prev;
      logic [8:0] e;
      s_tvalid[u] = 0; s_tdata[u] = '0;
      @(posedge rst_axi_n);
      for (int k = 0; k < NBLK; k++) begin
        for (int r = 0; r < K; r++)
          for (int c = 0; c < K; c++)
            blk[r][c] = (u == 0) ? ($urandom_range(0, 149) != 0) : ($urandom_range(0, 149) == 0);
        for (int n = 0; n < K; n++) begin
          e[8-n] = (u == 0);
          for (int r = 0; r < K; r++)
            for (int c = n; c < n + K; c++)
              if (u == 0) e[8-n] &= (c < K) ? prev[r][c] : blk[r][c-K];
              else        e[8-n] |= (c < K) ? prev[r][c] : blk[r][c-K];
        end
        exp_q.push_back(e);
        prev = blk;
        @(negedge clk_axi);
        while ($urandom_range(0, 9) == 0) @(negedge clk_axi);
        s_tvalid[u] = 1; s_tdata[u] = blk;
        #1;
        while (!s_tready[u]) begin n_refused++; @(negedge clk_axi); #1; end
        @(posedge clk_axi);
        @(negedge clk_axi);
        s_tvalid[u] = 0;
      end
    end

    initial begin
      int got;
      logic [8:0] e, last;
      got = 0; last = '0; toggles[u] = 0;
      m_tready[u] = 0;
      @(posedge rst_axi_n);
      while (got < NBLK) begin
        @(negedge clk_axi);
        m_tready[u] = ($urandom_range(0, 9) < (((got / 150) % 2 == 0) ? 1 : 9));
        #1;
        if (m_tvalid[u] && !m_tready[u]) n_held++;
        if (m_tvalid[u] && m_tready[u]) begin
          e = exp_q.pop_front();
          if (got > 0) begin
            checks++;
            if (m_tdata[u] != last) toggles[u]++;
            last = m_tdata[u];
            if (m_tdata[u] !== e) begin
              failures++; $display("FAIL unit %0d word %0d exp %b got %b", u, got, e, m_tdata[u]);
            end
          end
          got++;
        end
        @(posedge clk_axi);
      end
      n_done++;
    end
  end

  initial begin
    wait (n_done == 2);
    checks++;
    if (n_refused == 0 || n_held == 0 || toggles[0] == 0 || toggles[1] == 0) begin
      failures++; $display("FAIL refused=%0d held=%0d toggles=%0d/%0d", n_refused, n_held, toggles[0], toggles[1]);
    end
    $display("COUNT refused=%0d held=%0d toggles=%0d/%0d", n_refused, n_held, toggles[0], toggles[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
