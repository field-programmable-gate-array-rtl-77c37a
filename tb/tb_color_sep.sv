// Testbench of color_sep: random pixels and thresholds, including values
// right at each threshold; the object bit is recomputed per pixel.
module tb_color_sep;
  import track_pkg::*;
  rgb888_t [3:0] pix;
  logic [7:0] r_min, g_max, b_max;
  logic [3:0] bin;
  int checks = 0, failures = 0;

  color_sep #(.NPIX(4)) dut (.pix, .r_min, .g_max, .b_max, .bin);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones = 0;
    for (int i = 0; i < 2000; i++) begin
      r_min = 8'($urandom_range(100, 200));
      g_max = 8'($urandom_range(40, 120));
      b_max = 8'($urandom_range(40, 120));
      for (int j = 0; j < 4; j++) begin
        case ($urandom_range(0, 3))
          0: pix[j] = '{r: r_min, g: g_max, b: b_max};          // at the edges
          1: pix[j] = '{r: r_min - 8'd1, g: g_max, b: b_max};   // just not red
          default: pix[j] = '{r: 8'($urandom), g: 8'($urandom_range(0, 160)), b: 8'($urandom_range(0, 160))};
        endcase
      end
      #1;
      for (int j = 0; j < 4; j++) begin
        logic exp_bit;
        exp_bit = !(pix[j].r < r_min) && !(pix[j].g > g_max) && !(pix[j].b > b_max);
        ones += int'(exp_bit);
        checks++;
        if (bin[j] !== exp_bit) begin
          failures++;
          $display("FAIL pix=%h thr=%0d/%0d/%0d got %b", pix[j], r_min, g_max, b_max, bin[j]);
        end
      end
    end
    if (ones == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
