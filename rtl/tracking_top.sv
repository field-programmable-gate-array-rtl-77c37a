// Red-object tracking hardware for a camera-guided robot.
//
// The chip side of the tracking system: an OV7670 camera interface (pixel
// capture and an SCCB master for register writes), a median
// filter + colour separation IP, an erosion IP and a dilation IP (9x9
// element), an object locator and a motor-control IP driving two servos.
// In the full system a soft processor and a DMA engine move frames between
// external memory and the image IPs; those parts are outside this RTL, so
// the camera pixel stream and the stream ports of the three image IPs are
// brought out here, and a testbench plays the part of the DMA (forming the
// 3x4 and 9x9 blocks, chaining opening and closing, returning the final
// binary frame to loc_*).
//
// Clocks: clk_axi (100 MHz) for the stream ports, the locator and the
// motors; clk_filt (30 MHz) inside the image IPs; cam_pclk from the camera.
// Each domain has its own active-low reset.
//
// The locator's done strobe is the motor FSM's update: one movement
// decision per frame. Splitting into these blocks and the clock values
// follow the source design; the wiring of the locator straight into the
// motor IP and the stream framing are this design's choice.
module tracking_top
  import track_pkg::*;
#(
  parameter int unsigned IMG_W = 320,
  parameter int unsigned IMG_H = 240,
  localparam int unsigned XW = $clog2(IMG_W),
  localparam int unsigned YW = $clog2(IMG_H)
) (
  input  logic          clk_axi,
  input  logic          rst_axi_n,
  input  logic          clk_filt,
  input  logic          rst_filt_n,
  input  logic          cam_pclk,
  input  logic          cam_rst_n,

  // camera bus and captured pixel stream
  input  logic          cam_vsync,
  input  logic          cam_href,
  input  logic [7:0]    cam_d,
  output logic          cam_pix_valid,
  output rgb565_t       cam_pix,
  output logic [XW-1:0] cam_x,
  output logic [YW-1:0] cam_y,
  output logic          cam_sof,

  // camera register writes over SCCB (AXI clock domain)
  input  logic          sccb_start,
  input  logic [7:0]    sccb_id,
  input  logic [7:0]    sccb_addr,
  input  logic [7:0]    sccb_data,
  output logic          sccb_busy,
  output logic          sccb_done,
  output logic          cam_sio_c,
  output logic          cam_sio_d,
  output logic          cam_sio_d_oe,

  // median + colour separation IP
  input  logic          med_s_tvalid,
  output logic          med_s_tready,
  input  logic [191:0]  med_s_tdata,
  output logic          med_m_tvalid,
  input  logic          med_m_tready,
  output logic [3:0]    med_m_tdata,
  input  logic [7:0]    r_min,
  input  logic [7:0]    g_max,
  input  logic [7:0]    b_max,

  // erosion IP
  input  logic          ero_s_tvalid,
  output logic          ero_s_tready,
  input  logic [80:0]   ero_s_tdata,
  output logic          ero_m_tvalid,
  input  logic          ero_m_tready,
  output logic [8:0]    ero_m_tdata,

  // dilation IP
  input  logic          dil_s_tvalid,
  output logic          dil_s_tready,
  input  logic [80:0]   dil_s_tdata,
  output logic          dil_m_tvalid,
  input  logic          dil_m_tready,
  output logic [8:0]    dil_m_tdata,

  // binary frame to the object locator
  input  logic          loc_valid,
  input  logic          loc_pix,
  input  logic          loc_sof,
  output logic          obj_done,
  output logic          obj_found,
  output logic [XW-1:0] obj_xmin,
  output logic [XW-1:0] obj_xmax,
  output logic [YW-1:0] obj_ymin,
  output logic [YW-1:0] obj_ymax,
  output logic [XW-1:0] obj_xob,
  output logic [YW-1:0] obj_yob,
  output logic          req_cometo,
  output logic          req_backward,
  output logic          req_left,
  output logic          req_right,

  // motors
  output move_e         move_state,
  output logic          signal_1,
  output logic          signal_2
);
  camera_capture #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_cam (
    .pclk(cam_pclk), .rst_n(cam_rst_n), .vsync(cam_vsync), .href(cam_href), .d(cam_d),
    .pix_valid(cam_pix_valid), .pix(cam_pix), .x(cam_x), .y(cam_y), .sof(cam_sof)
  );

  sccb_master u_sccb (
    .clk(clk_axi), .rst_n(rst_axi_n), .start(sccb_start),
    .id(sccb_id), .addr(sccb_addr), .data(sccb_data),
    .busy(sccb_busy), .done(sccb_done),
    .sio_c(cam_sio_c), .sio_d(cam_sio_d), .sio_d_oe(cam_sio_d_oe)
  );

  median_ip u_median_ip (
    .clk_axi, .rst_axi_n, .clk_filt, .rst_filt_n,
    .s_tvalid(med_s_tvalid), .s_tready(med_s_tready), .s_tdata(med_s_tdata),
    .m_tvalid(med_m_tvalid), .m_tready(med_m_tready), .m_tdata(med_m_tdata),
    .r_min, .g_max, .b_max
  );

  morph_ip #(.DILATE(1'b0)) u_erosion_ip (
    .clk_axi, .rst_axi_n, .clk_filt, .rst_filt_n,
    .s_tvalid(ero_s_tvalid), .s_tready(ero_s_tready), .s_tdata(ero_s_tdata),
    .m_tvalid(ero_m_tvalid), .m_tready(ero_m_tready), .m_tdata(ero_m_tdata)
  );

  morph_ip #(.DILATE(1'b1)) u_dilation_ip (
    .clk_axi, .rst_axi_n, .clk_filt, .rst_filt_n,
    .s_tvalid(dil_s_tvalid), .s_tready(dil_s_tready), .s_tdata(dil_s_tdata),
    .m_tvalid(dil_m_tvalid), .m_tready(dil_m_tready), .m_tdata(dil_m_tdata)
  );

  object_locator #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_locator (
    .clk(clk_axi), .rst_n(rst_axi_n),
    .pix_valid(loc_valid), .pix(loc_pix), .sof(loc_sof),
    .done(obj_done), .found(obj_found),
    .xmin(obj_xmin), .xmax(obj_xmax), .ymin(obj_ymin), .ymax(obj_ymax),
    .xob(obj_xob), .yob(obj_yob),
    .cometo(req_cometo), .backward(req_backward), .left(req_left), .right(req_right)
  );

  motor_control_ip u_motor (
    .clk(clk_axi), .rst_n(rst_axi_n), .update(obj_done),
    .cometo(req_cometo), .backward(req_backward), .right(req_right), .left(req_left),
    .state(move_state), .signal_1, .signal_2
  );
endmodule
