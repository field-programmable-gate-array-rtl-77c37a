// Testbench of camera_capture on an 8x4 frame. The camera model sends a
// vsync pulse, then lines of random bytes with href high and blanking
// between lines; each line carries one pixel too many and each frame one
// line too many, which must be dropped. Every captured pixel is checked for
// value, x, y and sof, in order, over three frames.
module tb_camera_capture;
  import track_pkg::*;
  localparam int W = 8, H = 4;
  logic pclk = 0, rst_n = 0;
  logic vsync, href;
  logic [7:0] d;
  logic pix_valid, sof;
  rgb565_t pix;
  logic [2:0] x;
  logic [1:0] y;
  int checks = 0, failures = 0;
  typedef struct { logic [15:0] v; int x; int y; } exp_t;
  exp_t exp_q[$];

  camera_capture #(.IMG_W(W), .IMG_H(H)) dut (.pclk, .rst_n, .vsync, .href, .d, .pix_valid, .pix, .x, .y, .sof);

  always #20 pclk = ~pclk;

  initial begin
    repeat (20000) @(posedge pclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_t e;
    logic [15:0] v;
    vsync = 0; href = 0; d = 0;
    repeat (3) @(negedge pclk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      @(negedge pclk); vsync = 1;
      repeat (5) @(negedge pclk);
      vsync = 0;
      repeat (3) @(negedge pclk);
      for (int yy = 0; yy <= H; yy++) begin
        for (int xx = 0; xx <= W; xx++) begin
          v = 16'($urandom);
          if (xx < W && yy < H) begin e.v = v; e.x = xx; e.y = yy; exp_q.push_back(e); end
          href = 1; d = v[15:8];
          @(negedge pclk);
          d = v[7:0];
          @(negedge pclk);
        end
        href = 0; d = 8'($urandom);
        repeat (4 + f) @(negedge pclk);
      end
    end
    repeat (5) @(negedge pclk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d pixels missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge pclk) begin
    if (rst_n && pix_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL extra pixel"); end
      else begin
        e = exp_q.pop_front();
        if (pix != e.v || int'(x) != e.x || int'(y) != e.y || sof != (e.x == 0 && e.y == 0)) begin
          failures++;
          $display("FAIL pixel %h (%0d,%0d) sof=%b exp %h (%0d,%0d)", pix, x, y, sof, e.v, e.x, e.y);
        end
      end
    end
  end
endmodule
