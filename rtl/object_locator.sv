// Object locator: bounding box, centre and movement requests from a binary
// frame.
//
// Pixels of the filtered binary image arrive in raster order, one per clock
// when pix_valid is high; sof marks pixel (0,0) and resynchronises the x/y
// counters. While the frame streams in, the smallest and largest x and y of
// the object (1) pixels are tracked. With the last pixel of the frame the
// results are registered and done pulses for one clock:
//   * xmin/xmax/ymin/ymax: the box around the object (y counted from the top);
//   * xob/yob: its centre, the mean of the box edges;
//   * backward when the box height ymax-ymin exceeds BETA (object close),
//     cometo when it is at most ALPHA (object far), neither in between;
//   * left when the centre lies in the left half of the frame (quadrants B
//     and C), right otherwise (quadrants A and D).
// With no object pixel in the frame, found is 0 and no request is raised.
// The box-and-centre method and the quadrant rule follow the source design;
// the ALPHA/BETA values and the empty-frame behaviour are this design's.
module object_locator #(
  parameter int unsigned IMG_W = 320,
  parameter int unsigned IMG_H = 240,
  parameter int unsigned ALPHA = 40,
  parameter int unsigned BETA  = 100,
  localparam int unsigned XW = $clog2(IMG_W),
  localparam int unsigned YW = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pix_valid,
  input  logic          pix,
  input  logic          sof,

  output logic          done,
  output logic          found,
  output logic [XW-1:0] xmin,
  output logic [XW-1:0] xmax,
  output logic [YW-1:0] ymin,
  output logic [YW-1:0] ymax,
  output logic [XW-1:0] xob,
  output logic [YW-1:0] yob,
  output logic          cometo,
  output logic          backward,
  output logic          left,
  output logic          right
);
  logic [XW-1:0] x, cx;
  logic [YW-1:0] y, cy;
  // running box
  logic          a_found, n_found;
  logic [XW-1:0] a_xmin, a_xmax, n_xmin, n_xmax;
  logic [YW-1:0] a_ymin, a_ymax, n_ymin, n_ymax;
  logic          last_pix;
  logic [XW:0]   xsum;
  logic [YW:0]   ysum;
  logic [YW-1:0] height;

  always_comb begin
    cx = sof ? '0 : x;
    cy = sof ? '0 : y;
    last_pix = (cx == XW'(IMG_W - 1)) && (cy == YW'(IMG_H - 1));
    // start a fresh box at pixel (0,0)
    if (cx == '0 && cy == '0) begin
      n_found = 1'b0;
      n_xmin = '0; n_xmax = '0; n_ymin = '0; n_ymax = '0;
    end else begin
      n_found = a_found;
      n_xmin = a_xmin; n_xmax = a_xmax; n_ymin = a_ymin; n_ymax = a_ymax;
    end
    if (pix) begin
      if (!n_found || cx < n_xmin) n_xmin = cx;
      if (!n_found || cx > n_xmax) n_xmax = cx;
      if (!n_found || cy < n_ymin) n_ymin = cy;
      if (!n_found || cy > n_ymax) n_ymax = cy;
      n_found = 1'b1;
    end
    xsum   = {1'b0, n_xmin} + {1'b0, n_xmax};
    ysum   = {1'b0, n_ymin} + {1'b0, n_ymax};
    height = n_ymax - n_ymin;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0;
      a_found <= 1'b0;
      a_xmin <= '0; a_xmax <= '0; a_ymin <= '0; a_ymax <= '0;
      done <= 1'b0; found <= 1'b0;
      xmin <= '0; xmax <= '0; ymin <= '0; ymax <= '0; xob <= '0; yob <= '0;
      cometo <= 1'b0; backward <= 1'b0; left <= 1'b0; right <= 1'b0;
    end else begin
      done <= 1'b0;
      if (pix_valid) begin
        a_found <= n_found;
        a_xmin <= n_xmin; a_xmax <= n_xmax; a_ymin <= n_ymin; a_ymax <= n_ymax;
        if (cx == XW'(IMG_W - 1)) begin
          x <= '0;
          y <= last_pix ? '0 : cy + 1'b1;
        end else begin
          x <= cx + 1'b1;
          y <= cy;
        end
        if (last_pix) begin
          done     <= 1'b1;
          found    <= n_found;
          xmin     <= n_xmin; xmax <= n_xmax; ymin <= n_ymin; ymax <= n_ymax;
          xob      <= xsum[XW:1];
          yob      <= ysum[YW:1];
          backward <= n_found && (height > YW'(BETA));
          cometo   <= n_found && (height <= YW'(ALPHA));
          left     <= n_found && (xsum[XW:1] < XW'(IMG_W / 2));
          right    <= n_found && (xsum[XW:1] >= XW'(IMG_W / 2));
        end
      end
    end
  end
endmodule
