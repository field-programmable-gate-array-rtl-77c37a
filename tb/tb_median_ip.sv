// Testbench of median_ip: 100 MHz stream side, 30 MHz filter clock, random
// gaps on the input and random back-pressure on the output. The expected
// object bits are computed in the testbench (3x3 median of each channel,
// then the colour thresholds) and compared word by word, in order. It also
// requires that the input stream was refused (FIFO In full) and the output
// held (back-pressure) at least once.
module tb_median_ip;
  import track_pkg::*;
  logic clk_axi = 0, clk_filt = 0, rst_axi_n = 0, rst_filt_n = 0;
  logic s_tvalid, s_tready, m_tvalid, m_tready;
  logic [191:0] s_tdata;
  logic [3:0] m_tdata;
  localparam logic [7:0] RMIN = 150, GMAX = 90, BMAX = 90;
  localparam int NBLK = 1200;
  int checks = 0, failures = 0, n_refused = 0, n_held = 0, ones = 0;

  median_ip dut (
    .clk_axi, .rst_axi_n, .clk_filt, .rst_filt_n,
    .s_tvalid, .s_tready, .s_tdata, .m_tvalid, .m_tready, .m_tdata,
    .r_min(RMIN), .g_max(GMAX), .b_max(BMAX)
  );

  always #5 clk_axi = ~clk_axi;
  always #16.5 clk_filt = ~clk_filt;

  initial begin
    repeat (200000) @(posedge clk_axi);
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

  rgb888_t col_hist[$][3];
  logic [3:0] exp_q[$];

  function automatic rgb565_t rand_pix();
    if ($urandom_range(0, 1) == 0)
      return rgb565_t'({5'($urandom_range(22, 31)), 6'($urandom_range(0, 20)), 5'($urandom_range(0, 10))});
    return rgb565_t'(16'($urandom));
  endfunction

  initial begin
    rgb565_t [2:0][3:0] blk;
    rgb888_t col[3];
    logic [3:0] e;
    int base;
    logic [7:0] vr[9], vg[9], vb[9];
    s_tvalid = 0; s_tdata = '0;
    repeat (4) @(posedge clk_filt);
    rst_axi_n = 1; rst_filt_n = 1;
    for (int k = 0; k < NBLK; k++) begin
      for (int r = 0; r < 3; r++) for (int c = 0; c < 4; c++) blk[r][c] = rand_pix();
      for (int c = 0; c < 4; c++) begin
        for (int r = 0; r < 3; r++) col[r] = widen565(blk[r][c]);
        col_hist.push_back(col);
      end
      if (k > 0) begin
        for (int j = 0; j < 4; j++) begin
          base = 4 * k - 2 + j;
          for (int dc = 0; dc < 3; dc++)
            for (int r = 0; r < 3; r++) begin
              vr[dc*3+r] = col_hist[base+dc][r].r;
              vg[dc*3+r] = col_hist[base+dc][r].g;
              vb[dc*3+r] = col_hist[base+dc][r].b;
            end
          e[j] = (med9(vr) >= RMIN) && (med9(vg) <= GMAX) && (med9(vb) <= BMAX);
        end
      end else e = 'x;
      exp_q.push_back(e);
      // present the block, with a random gap first
      @(negedge clk_axi);
      while ($urandom_range(0, 9) == 0) @(negedge clk_axi);
      s_tvalid = 1; s_tdata = blk;
      #1;
      while (!s_tready) begin n_refused++; @(negedge clk_axi); #1; end
      @(posedge clk_axi);
      @(negedge clk_axi);
      s_tvalid = 0;
    end
  end

  initial begin
    int got;
    logic [3:0] e;
    got = 0;
    m_tready = 0;
    @(posedge rst_axi_n);
    while (got < NBLK) begin
      @(negedge clk_axi);
      // long stretches of slow draining, then fast
      m_tready = ($urandom_range(0, 9) < (((got / 200) % 2 == 0) ? 1 : 9));
      #1;
      if (m_tvalid && !m_tready) n_held++;
      if (m_tvalid && m_tready) begin
        e = exp_q.pop_front();
        if (got > 0) begin
          checks++;
          ones += $countones(m_tdata);
          if (m_tdata !== e) begin
            failures++; $display("FAIL word %0d exp %b got %b", got, e, m_tdata);
          end
        end
        got++;
      end
      @(posedge clk_axi);
    end
    checks++;
    if (n_refused == 0 || n_held == 0 || ones == 0) begin
      failures++; $display("FAIL refused=%0d held=%0d ones=%0d", n_refused, n_held, ones);
    end
    $display("COUNT refused=%0d held=%0d ones=%0d", n_refused, n_held, ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
