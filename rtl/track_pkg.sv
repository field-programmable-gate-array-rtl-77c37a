// Shared types and constants of the red-object tracking pipeline.
// Pixels arrive from the camera as RGB565 and are widened to 8 bits per
// channel (bit replication) before the median network, whose compare nodes
// are 8 bits wide. Motor commands are a small enum shared by the FSM and the
// servo pulse generator. These encodings are this design's choice.
package track_pkg;

  typedef struct packed {
    logic [4:0] r;
    logic [5:0] g;
    logic [4:0] b;
  } rgb565_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb888_t;

  // Motor command carried on driver_1 / driver_2.
  typedef enum logic [1:0] {
    DRV_STOP = 2'd0,
    DRV_FWD  = 2'd1,
    DRV_REV  = 2'd2
  } drive_e;

  // Movement state of the robot.
  typedef enum logic [2:0] {
    MV_STOP  = 3'd0,
    MV_FWD   = 3'd1,
    MV_BACK  = 3'd2,
    MV_LEFT  = 3'd3,
    MV_RIGHT = 3'd4
  } move_e;

  function automatic rgb888_t widen565(rgb565_t p);
    rgb888_t q;
    q.r = {p.r, p.r[4:2]};
    q.g = {p.g, p.g[5:4]};
    q.b = {p.b, p.b[4:2]};
    return q;
  endfunction
endpackage
