// OV7670 camera interface: assembles RGB565 pixels from the camera's 8-bit
// parallel bus.
//
// Runs on the camera pixel clock. While href is high, bytes are taken on
// each rising pclk edge in pairs: the first byte is R[4:0],G[5:3], the
// second G[2:0],B[4:0]. Each completed pair is output for one clock with
// pix_valid, with its column x and row y; sof marks pixel (0,0). The falling
// edge of href ends a line; vsync high resets to the start of a frame.
// Counters stop at IMG_W-1 / IMG_H-1 so a longer line or frame is cut.
// The 8-bit bus and the 320x240 RGB565 format follow the source design; the
// byte order and sync polarities are those commonly used with this camera.
module camera_capture
  import track_pkg::*;
#(
  parameter int unsigned IMG_W = 320,
  parameter int unsigned IMG_H = 240,
  localparam int unsigned XW = $clog2(IMG_W),
  localparam int unsigned YW = $clog2(IMG_H)
) (
  input  logic          pclk,
  input  logic          rst_n,
  input  logic          vsync,
  input  logic          href,
  input  logic [7:0]    d,
  output logic          pix_valid,
  output rgb565_t       pix,
  output logic [XW-1:0] x,
  output logic [YW-1:0] y,
  output logic          sof
);
  logic          phase;      // 0: expecting the first byte of a pixel
  logic [7:0]    hi_byte;
  logic          href_q;
  logic [XW:0]   xc;         // one bit wider: counts past the last column
  logic [YW:0]   yc;

  always_ff @(posedge pclk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= 1'b0; hi_byte <= '0; href_q <= 1'b0;
      xc <= '0; yc <= '0;
      pix_valid <= 1'b0; pix <= '0; x <= '0; y <= '0; sof <= 1'b0;
    end else begin
      href_q    <= href;
      pix_valid <= 1'b0;
      sof       <= 1'b0;
      if (vsync) begin
        phase <= 1'b0; xc <= '0; yc <= '0;
      end else if (href) begin
        if (!phase) begin
          hi_byte <= d;
          phase   <= 1'b1;
        end else begin
          phase <= 1'b0;
          if (xc < (XW+1)'(IMG_W) && yc < (YW+1)'(IMG_H)) begin
            pix_valid <= 1'b1;
            pix       <= rgb565_t'({hi_byte, d});
            x         <= xc[XW-1:0];
            y         <= yc[YW-1:0];
            sof       <= (xc == '0) && (yc == '0);
            xc        <= xc + 1'b1;
          end
        end
      end else if (href_q) begin
        // end of line
        phase <= 1'b0;
        xc    <= '0;
        if (yc < (YW+1)'(IMG_H)) yc <= yc + 1'b1;
      end
    end
  end
endmodule
