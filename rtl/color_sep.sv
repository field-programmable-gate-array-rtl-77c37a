// Colour separation: turns filtered RGB888 pixels into a binary object mask.
// A pixel is object (1) when its red channel is at least r_min and its green
// and blue channels are at most g_max and b_max; everything else is
// background (0). NPIX pixels are handled side by side; combinational.
// Thresholding each channel is from the source design; the thresholds are
// run-time inputs because their values are chosen by experiment.
module color_sep
  import track_pkg::*;
#(
  parameter int unsigned NPIX = 4
) (
  input  rgb888_t [NPIX-1:0] pix,
  input  logic [7:0]         r_min,
  input  logic [7:0]         g_max,
  input  logic [7:0]         b_max,
  output logic [NPIX-1:0]    bin
);
  always_comb begin
    for (int i = 0; i < int'(NPIX); i++)
      bin[i] = (pix[i].r >= r_min) && (pix[i].g <= g_max) && (pix[i].b <= b_max);
  end
endmodule
