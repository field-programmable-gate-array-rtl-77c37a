// Testbench of object_locator on a small 40x30 frame (ALPHA=5, BETA=12).
// Frames hold rectangles of chosen size and place, scattered pixels, or
// nothing; the expected box, centre and requests are computed from the
// pixels sent. Frames are sent back to back and with gaps; the first frame
// starts with sof after a partial frame to check resynchronisation. Each of
// cometo, backward, stationary, left, right and "no object" must occur.
module tb_object_locator;
  localparam int W = 40, H = 30, ALPHA = 5, BETA = 12;
  logic clk = 0, rst_n = 0;
  logic pix_valid, pix, sof;
  logic done, found, cometo, backward, left, right;
  logic [5:0] xmin, xmax, xob;
  logic [4:0] ymin, ymax, yob;
  int checks = 0, failures = 0;
  int n_come = 0, n_back = 0, n_stay = 0, n_left = 0, n_right = 0, n_none = 0;

  object_locator #(.IMG_W(W), .IMG_H(H), .ALPHA(ALPHA), .BETA(BETA)) dut (
    .clk, .rst_n, .pix_valid, .pix, .sof, .done, .found,
    .xmin, .xmax, .ymin, .ymax, .xob, .yob, .cometo, .backward, .left, .right);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic img [H][W];

  task automatic send_frame(bit gaps);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        while (gaps && $urandom_range(0, 3) == 0) begin pix_valid = 0; @(negedge clk); end
        pix_valid = 1; pix = img[y][x]; sof = (x == 0 && y == 0);
      end
    @(negedge clk);
    pix_valid = 0; sof = 0;
  endtask

  task automatic check_frame();
    int exmin, exmax, eymin, eymax, cx, h;
    bit f;
    f = 0; exmin = 0; exmax = 0; eymin = 0; eymax = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        if (img[y][x]) begin
          if (!f || x < exmin) exmin = x;
          if (!f || x > exmax) exmax = x;
          if (!f || y < eymin) eymin = y;
          if (!f || y > eymax) eymax = y;
          f = 1;
        end
    // done pulses in the clock after the last pixel is taken
    #1;
    checks++;
    if (!done) begin failures++; $display("FAIL no done"); return; end
    cx = (exmin + exmax) / 2; h = eymax - eymin;
    checks += 4;
    if (found !== f) begin failures++; $display("FAIL found"); end
    if (f && (xmin != exmin || xmax != exmax || ymin != eymin || ymax != eymax)) begin
      failures++; $display("FAIL box %0d %0d %0d %0d vs %0d %0d %0d %0d", xmin, xmax, ymin, ymax, exmin, exmax, eymin, eymax);
    end
    if (f && (xob != cx || yob != (eymin + eymax) / 2)) begin failures++; $display("FAIL centre"); end
    if (cometo !== (f && h <= ALPHA) || backward !== (f && h > BETA) ||
        left !== (f && cx < W / 2) || right !== (f && cx >= W / 2)) begin
      failures++; $display("FAIL requests c=%b b=%b l=%b r=%b h=%0d cx=%0d", cometo, backward, left, right, h, cx);
    end
    if (!f) n_none++;
    else begin
      if (h <= ALPHA) n_come++; else if (h > BETA) n_back++; else n_stay++;
      if (cx < W / 2) n_left++; else n_right++;
    end
  endtask

  task automatic make_rect(int x0, int y0, int w, int h, int noise);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
      img[y][x] = (x >= x0 && x < x0 + w && y >= y0 && y < y0 + h) || ($urandom_range(0, 999) < noise);
  endtask

  initial begin
    pix_valid = 0; pix = 0; sof = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // a partial frame of ones, then resynchronise on sof
    for (int i = 0; i < 57; i++) begin @(negedge clk); pix_valid = 1; pix = 1; end
    @(negedge clk); pix_valid = 0;
    for (int t = 0; t < 16; t++) begin
      case (t % 8)
        0: make_rect(2, 3, 4, 3, 0);       // small, left  -> cometo
        1: make_rect(25, 2, 10, 20, 0);    // large, right -> backward
        2: make_rect(8, 5, 6, 8, 0);       // medium, left -> stay
        3: make_rect(0, 0, 0, 0, 0);       // empty
        4: make_rect(30, 20, 3, 2, 0);     // small, right
        5: make_rect(0, 0, 40, 30, 0);     // whole frame
        6: make_rect(15, 10, 5, 5, 3);     // with scattered pixels
        default: make_rect(39, 29, 1, 1, 0);
      endcase
      send_frame(t >= 8);
      check_frame();
    end
    checks++;
    if (n_come == 0 || n_back == 0 || n_stay == 0 || n_left == 0 || n_right == 0 || n_none == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
