// End-to-end testbench of tracking_top at its default size (320x240, 20 ms
// servo frame at 100 MHz). The testbench stands in for the processor and
// DMA engine of the full system: it cuts frames into the blocks each image
// IP expects and chains the passes.
//
// Two camera register writes over SCCB are decoded and checked first.
// For each of five synthetic frames (a red rectangle of chosen size and
// place on a non-red background, with isolated red and dark specks, a small
// red blob and a hole in_obj the object):
//   1. frame 0 only: the frame is sent over the camera bus and the captured
//      pixels are compared with it;
//   2. median + colour separation: bands of 3 rows, replicate-padded, sent as
//      3x4 blocks; the binary result is compared with a reference computed
//      here;
//   3. opening (erosion, dilation) and closing (dilation, erosion), each pass
//      in 9-row bands of 9x9 blocks, each compared with a reference pass;
//   4. the final mask goes to the object locator; box and requests are
//      compared with the rectangle drawn, and the motor state and both servo
//      pulse widths are checked.
// The run must see: input refused (FIFO full), output back-pressure, the
// blob removed by opening, the hole filled by closing, and the moves
// forward, backward, left, right and stop.
module tb_tracking_top;
  import track_pkg::*;
  localparam int W = 320, H = 240;
  localparam logic [7:0] RMIN = 150, GMAX = 90, BMAX = 90;
  localparam int ALPHA = 40, BETA = 100;
  localparam int PW_STOP = 150_000, PW_FWD = 200_000, PW_REV = 100_000, PERIOD = 2_000_000;

  logic clk_axi = 0, clk_filt = 0, cam_pclk = 0;
  logic rst_axi_n = 0, rst_filt_n = 0, cam_rst_n = 0;
  logic cam_vsync, cam_href;
  logic [7:0] cam_d;
  logic cam_pix_valid, cam_sof;
  rgb565_t cam_pix;
  logic [8:0] cam_x;
  logic [7:0] cam_y;
  logic med_s_tvalid, med_s_tready, med_m_tvalid, med_m_tready;
  logic [191:0] med_s_tdata;
  logic [3:0] med_m_tdata;
  logic ms_tvalid[2], ms_tready[2], mm_tvalid[2], mm_tready[2];
  logic [80:0] ms_tdata[2];
  logic [8:0]  mm_tdata[2];
  logic loc_valid, loc_pix, loc_sof;
  logic obj_done, obj_found, req_cometo, req_backward, req_left, req_right;
  logic [8:0] obj_xmin, obj_xmax, obj_xob;
  logic [7:0] obj_ymin, obj_ymax, obj_yob;
  move_e move_state;
  logic sccb_start, sccb_busy, sccb_done, cam_sio_c, cam_sio_d, cam_sio_d_oe;
  logic [7:0] sccb_id, sccb_addr, sccb_data;
  logic signal_1, signal_2;

  tracking_top dut (
    .clk_axi, .rst_axi_n, .clk_filt, .rst_filt_n, .cam_pclk, .cam_rst_n,
    .cam_vsync, .cam_href, .cam_d, .cam_pix_valid, .cam_pix, .cam_x, .cam_y, .cam_sof,
    .sccb_start, .sccb_id, .sccb_addr, .sccb_data, .sccb_busy, .sccb_done,
    .cam_sio_c, .cam_sio_d, .cam_sio_d_oe,
    .med_s_tvalid, .med_s_tready, .med_s_tdata, .med_m_tvalid, .med_m_tready, .med_m_tdata,
    .r_min(RMIN), .g_max(GMAX), .b_max(BMAX),
    .ero_s_tvalid(ms_tvalid[0]), .ero_s_tready(ms_tready[0]), .ero_s_tdata(ms_tdata[0]),
    .ero_m_tvalid(mm_tvalid[0]), .ero_m_tready(mm_tready[0]), .ero_m_tdata(mm_tdata[0]),
    .dil_s_tvalid(ms_tvalid[1]), .dil_s_tready(ms_tready[1]), .dil_s_tdata(ms_tdata[1]),
    .dil_m_tvalid(mm_tvalid[1]), .dil_m_tready(mm_tready[1]), .dil_m_tdata(mm_tdata[1]),
    .loc_valid, .loc_pix, .loc_sof, .obj_done, .obj_found,
    .obj_xmin, .obj_xmax, .obj_ymin, .obj_ymax, .obj_xob, .obj_yob,
    .req_cometo, .req_backward, .req_left, .req_right,
    .move_state, .signal_1, .signal_2
  );

  always #5    clk_axi  = ~clk_axi;
  always #16.5 clk_filt = ~clk_filt;
  always #20   cam_pclk = ~cam_pclk;

  int checks = 0, failures = 0;
  int n_refused = 0, n_held = 0, n_blob_removed = 0, n_hole_filled = 0, n_erode = 0, n_dilate = 0;
  int n_move[5];
  int n_sccb = 0;

  // SCCB write: collects the bits taken on rising SIO_C (released bits read as 1)
  task automatic sccb_write(logic [7:0] i, logic [7:0] a, logic [7:0] v);
    logic [26:0] bits;
    int n;
    logic pc;
    @(negedge clk_axi);
    sccb_id = i; sccb_addr = a; sccb_data = v; sccb_start = 1;
    @(negedge clk_axi);
    sccb_start = 0;
    n = 0; pc = cam_sio_c;
    while (sccb_busy) begin
      if (!pc && cam_sio_c && n < 27) begin
        bits[26 - n] = cam_sio_d_oe ? cam_sio_d : 1'b1;
        n++;
      end
      pc = cam_sio_c;
      @(negedge clk_axi);
    end
    check(n == 27 && {bits[26:19], bits[17:10], bits[8:1]} == {i, a, v},
          $sformatf("SCCB write %h %h %h: %0d bits, got %h", i, a, v, n, bits));
    n_sccb++;
  endtask

  initial begin
    repeat (60_000_000) @(posedge clk_axi);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------------ images
  rgb565_t rgb [H][W];
  logic    bin_med [H][W];   // from the median IP
  logic    bin_a [H][W];
  logic    bin_b [H][W];
  logic    ref_img [H][W];

  function automatic rgb565_t red_px();
    return rgb565_t'({5'($urandom_range(26, 31)), 6'($urandom_range(0, 12)), 5'($urandom_range(0, 6))});
  endfunction
  function automatic rgb565_t bg_px();
    return rgb565_t'({5'($urandom), 6'($urandom_range(30, 63)), 5'($urandom)});
  endfunction

  // object rectangle [x0,x0+w) x [y0,y0+h); w=0 for no object
  task automatic make_frame(int x0, int y0, int w, int h);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        bit in_obj;
        in_obj = (x >= x0 && x < x0 + w && y >= y0 && y < y0 + h);
        // 5x5 hole in the middle of the object
        if (in_obj && x >= x0 + w/2 - 2 && x <= x0 + w/2 + 2 && y >= y0 + h/2 - 2 && y <= y0 + h/2 + 2)
          in_obj = 0;
        if (in_obj) rgb[y][x] = ($urandom_range(0, 49) == 0) ? bg_px() : red_px();
        else        rgb[y][x] = ($urandom_range(0, 199) == 0) ? red_px() : bg_px();
      end
    // 4x4 red blob away from the object
    for (int y = 5; y < 9; y++)
      for (int x = (x0 < W/2 ? W - 12 : 8); x < (x0 < W/2 ? W - 8 : 12); x++)
        if (w > 0) rgb[y + 200][x] = red_px();
  endtask

  // ------------------------------------------------------------------ camera
  task automatic camera_frame();
    int got;
    got = 0;
    cam_vsync = 0; cam_href = 0; cam_d = 0;
    @(negedge cam_pclk); cam_vsync = 1;
    repeat (10) @(negedge cam_pclk);
    cam_vsync = 0;
    repeat (10) @(negedge cam_pclk);
    fork
      begin
        for (int y = 0; y < H; y++) begin
          for (int x = 0; x < W; x++) begin
            cam_href = 1; cam_d = rgb[y][x][15:8];
            @(negedge cam_pclk);
            cam_d = rgb[y][x][7:0];
            @(negedge cam_pclk);
          end
          cam_href = 0;
          repeat (20) @(negedge cam_pclk);
        end
      end
      begin
        int bad;
        bad = 0;
        while (got < W * H) begin
          @(negedge cam_pclk);
          if (cam_pix_valid) begin
            if (cam_pix != rgb[cam_y][cam_x] || int'(cam_x) != got % W || int'(cam_y) != got / W ||
                cam_sof != (got == 0)) bad++;
            got++;
          end
        end
        check(bad == 0, $sformatf("camera capture: %0d bad pixels", bad));
      end
    join
  endtask

  // ------------------------------------------------------------------ median
  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  function automatic logic [7:0] med9(logic [7:0] v[9]);
    logic [7:0] t;
    for (int i = 0; i < 9; i++)
      for (int j = 0; j < 8 - i; j++)
        if (v[j] > v[j+1]) begin t = v[j]; v[j] = v[j+1]; v[j+1] = t; end
    return v[4];
  endfunction

  task automatic ref_median();
    logic [7:0] vr[9], vg[9], vb[9];
    rgb888_t p;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++) begin
            p = widen565(rgb[clampi(y + dy, 0, H - 1)][clampi(x + dx, 0, W - 1)]);
            vr[(dy+1)*3+dx+1] = p.r; vg[(dy+1)*3+dx+1] = p.g; vb[(dy+1)*3+dx+1] = p.b;
          end
        ref_img[y][x] = (med9(vr) >= RMIN) && (med9(vg) <= GMAX) && (med9(vb) <= BMAX);
      end
  endtask

  localparam int MBEATS = 81;   // 3 left pad columns + 320 + 1 right pad = 324 = 81 x 4

  task automatic median_pass();
    fork
      begin
        rgb565_t [2:0][3:0] blk;
        for (int y = 0; y < H; y++)
          for (int k = 0; k < MBEATS; k++) begin
            for (int r = 0; r < 3; r++)
              for (int c = 0; c < 4; c++)
                blk[r][c] = rgb[clampi(y + r - 1, 0, H - 1)][clampi(4 * k + c - 3, 0, W - 1)];
            @(negedge clk_axi);
            med_s_tvalid = 1; med_s_tdata = blk;
            #1;
            while (!med_s_tready) begin n_refused++; @(negedge clk_axi); #1; end
            @(posedge clk_axi);
          end
        @(negedge clk_axi);
        med_s_tvalid = 0;
      end
      begin
        int idx, k, y, x;
        idx = 0;
        while (idx < H * MBEATS) begin
          @(negedge clk_axi);
          med_m_tready = ($urandom_range(0, 3) != 0);
          #1;
          if (med_m_tvalid && !med_m_tready) n_held++;
          if (med_m_tvalid && med_m_tready) begin
            y = idx / MBEATS; k = idx % MBEATS;
            for (int j = 0; j < 4; j++) begin
              x = 4 * k - 4 + j;
              if (k > 0 && x < W) bin_med[y][x] = med_m_tdata[j];
            end
            idx++;
          end
          @(posedge clk_axi);
        end
        @(negedge clk_axi);
        med_m_tready = 0;
      end
    join
  endtask

  // ------------------------------------------------------------------ morphology
  localparam int KB = 37;   // 4 left pad columns + 320 + 9 right pad = 333 = 37 x 9

  // u = 0 erosion, 1 dilation; reads bin_a, writes bin_b
  task automatic morph_pass(int u);
    logic padv;
    int bad;
    padv = (u == 0);   // outside pixels do not take part
    fork
      begin
        logic [0:8][0:8] blk;
        int yy, xx;
        for (int y = 0; y < H; y++)
          for (int k = 0; k < KB; k++) begin
            for (int r = 0; r < 9; r++)
              for (int c = 0; c < 9; c++) begin
                yy = y + r - 4; xx = 9 * k + c - 4;
                blk[r][c] = (yy < 0 || yy >= H || xx < 0 || xx >= W) ? padv : bin_a[yy][xx];
              end
            @(negedge clk_axi);
            ms_tvalid[u] = 1; ms_tdata[u] = blk;
            #1;
            while (!ms_tready[u]) begin n_refused++; @(negedge clk_axi); #1; end
            @(posedge clk_axi);
          end
        @(negedge clk_axi);
        ms_tvalid[u] = 0;
      end
      begin
        int idx, k, y, x;
        idx = 0;
        while (idx < H * KB) begin
          @(negedge clk_axi);
          mm_tready[u] = ($urandom_range(0, 3) != 0);
          #1;
          if (mm_tvalid[u] && !mm_tready[u]) n_held++;
          if (mm_tvalid[u] && mm_tready[u]) begin
            y = idx / KB; k = idx % KB;
            for (int n = 0; n < 9; n++) begin
              x = 9 * (k - 1) + n;
              if (k > 0 && x < W) bin_b[y][x] = mm_tdata[u][8-n];
            end
            idx++;
          end
          @(posedge clk_axi);
        end
        @(negedge clk_axi);
        mm_tready[u] = 0;
      end
    join
    // reference pass
    bad = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        logic acc;
        acc = (u == 0);
        for (int dy = -4; dy <= 4; dy++)
          for (int dx = -4; dx <= 4; dx++)
            if (y + dy >= 0 && y + dy < H && x + dx >= 0 && x + dx < W)
              acc = (u == 0) ? (acc & bin_a[y+dy][x+dx]) : (acc | bin_a[y+dy][x+dx]);
        if (bin_b[y][x] !== acc) bad++;
      end
    check(bad == 0, $sformatf("%s pass: %0d bad pixels", u == 0 ? "erosion" : "dilation", bad));
    if (u == 0) n_erode++; else n_dilate++;
    bin_a = bin_b;
  endtask

  // ------------------------------------------------------------------ locator + motors
  function automatic int pw(drive_e d);
    case (d)
      DRV_FWD: return PW_FWD;
      DRV_REV: return PW_REV;
      default: return PW_STOP;
    endcase
  endfunction

  task automatic locate_and_drive(int x0, int y0, int w, int h);
    move_e exp_m;
    int cx, hh, h1, h2, e1, e2;
    bit f;
    f = (w > 0);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk_axi);
        loc_valid = 1; loc_pix = bin_a[y][x]; loc_sof = (x == 0 && y == 0);
      end
    @(negedge clk_axi);
    loc_valid = 0; loc_sof = 0;
    check(obj_done === 1'b1, "locator done");
    cx = (2 * x0 + w - 1) / 2; hh = h - 1;
    check(obj_found == f, "object found");
    if (f) begin
      check(int'(obj_xmin) == x0 && int'(obj_xmax) == x0 + w - 1 &&
            int'(obj_ymin) == y0 && int'(obj_ymax) == y0 + h - 1,
            $sformatf("box %0d..%0d x %0d..%0d", obj_xmin, obj_xmax, obj_ymin, obj_ymax));
      check(int'(obj_xob) == cx && int'(obj_yob) == (2 * y0 + h - 1) / 2, "centre");
    end
    if (!f)                  exp_m = MV_STOP;
    else if (hh > BETA)      exp_m = MV_BACK;
    else if (hh <= ALPHA)    exp_m = MV_FWD;
    else if (cx < W / 2)     exp_m = MV_LEFT;
    else                     exp_m = MV_RIGHT;
    @(negedge clk_axi);
    check(move_state == exp_m, $sformatf("move state %0d exp %0d", move_state, exp_m));
    n_move[int'(exp_m)]++;
    case (exp_m)
      MV_FWD:   begin e1 = PW_FWD;  e2 = PW_FWD;  end
      MV_BACK:  begin e1 = PW_REV;  e2 = PW_REV;  end
      MV_LEFT:  begin e1 = PW_REV;  e2 = PW_FWD;  end
      MV_RIGHT: begin e1 = PW_FWD;  e2 = PW_REV;  end
      default:  begin e1 = PW_STOP; e2 = PW_STOP; end
    endcase
    // the second pulse after the decision carries the new command
    @(posedge signal_1);
    @(posedge signal_1);
    @(negedge clk_axi);
    h1 = 0; h2 = 0;
    for (int c = 0; c < PW_FWD + 1000; c++) begin
      #1;
      h1 += int'(signal_1); h2 += int'(signal_2);
      @(negedge clk_axi);
    end
    check(h1 == e1 && h2 == e2, $sformatf("servo pulses %0d/%0d exp %0d/%0d", h1, h2, e1, e2));
  endtask

  // ------------------------------------------------------------------ main
  initial begin
    int fx[5] = '{30, 150, 40, 220, 0};
    int fy[5] = '{60, 40, 70, 90, 0};
    int fw[5] = '{25, 120, 50, 60, 0};
    int fh[5] = '{31, 141, 61, 51, 0};
    int bad;
    cam_vsync = 0; cam_href = 0; cam_d = 0;
    med_s_tvalid = 0; med_s_tdata = '0; med_m_tready = 0;
    for (int u = 0; u < 2; u++) begin ms_tvalid[u] = 0; ms_tdata[u] = '0; mm_tready[u] = 0; end
    loc_valid = 0; loc_pix = 0; loc_sof = 0;
    repeat (4) @(posedge clk_filt);
    rst_axi_n = 1; rst_filt_n = 1; cam_rst_n = 1;
    sccb_start = 0; sccb_id = 0; sccb_addr = 0; sccb_data = 0;
    // two example register writes to the camera
    sccb_write(8'h42, 8'h12, 8'h14);
    sccb_write(8'h42, 8'h40, 8'hd0);

    for (int f = 0; f < 5; f++) begin
      make_frame(fx[f], fy[f], fw[f], fh[f]);
      if (f == 0) camera_frame();
      ref_median();
      median_pass();
      bad = 0;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) if (bin_med[y][x] !== ref_img[y][x]) bad++;
      check(bad == 0, $sformatf("frame %0d median/colour: %0d bad pixels", f, bad));
      bin_a = bin_med;
      // opening
      morph_pass(0);
      morph_pass(1);
      if (fw[f] > 0 && bin_med[206][fx[f] < W/2 ? W - 10 : 10] && !bin_a[206][fx[f] < W/2 ? W - 10 : 10])
        n_blob_removed++;
      // closing
      morph_pass(1);
      if (fw[f] > 0 && !bin_med[fy[f] + fh[f]/2][fx[f] + fw[f]/2] && bin_a[fy[f] + fh[f]/2][fx[f] + fw[f]/2])
        n_hole_filled++;
      morph_pass(0);
      locate_and_drive(fx[f], fy[f], fw[f], fh[f]);
      $display("frame %0d done at %0t", f, $time);
    end

    check(n_sccb == 2, "SCCB writes done");
    check(n_refused > 0, "input refused at least once");
    check(n_held > 0, "output held at least once");
    check(n_blob_removed > 0, "blob removed by opening");
    check(n_hole_filled > 0, "hole filled by closing");
    check(n_erode > 0 && n_dilate > 0, "erosion and dilation used");
    for (int m = 0; m < 5; m++) check(n_move[m] > 0, $sformatf("move %0d seen", m));
    $display("COUNT sccb=%0d", n_sccb);
    $display("COUNT refused=%0d held=%0d blob_removed=%0d hole_filled=%0d erode=%0d dilate=%0d moves=%0d/%0d/%0d/%0d/%0d",
             n_refused, n_held, n_blob_removed, n_hole_filled, n_erode, n_dilate,
             n_move[0], n_move[1], n_move[2], n_move[3], n_move[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
