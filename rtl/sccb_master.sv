// SCCB (camera serial control bus) master for register writes.
//
// A pulse on start with id/addr/data sends one 3-phase write transmission:
// start condition, the device ID byte, the register address byte and the
// data byte, each followed by a ninth "don't care" bit during which the
// master releases SIO_D (sio_d_oe low), then the stop condition. Bits go
// most significant first; SIO_D changes only while SIO_C is low.
//
// Timing: every bit slot is four quarter periods of QDIV clocks (SIO_C low,
// low, high, high), so SIO_C runs at clk / (4*QDIV): 100 kHz for the default
// 100 MHz clock. A transfer takes 29 slots (start, 27 bits, stop); busy is
// high throughout and done pulses once at the end. Requests while busy are
// ignored. Using SCCB to set up the camera is from the source design; the
// register values to write are not known and are left to the caller, and
// the bus timing here is this design's choice within the SCCB rules.
module sccb_master #(
  parameter int unsigned QDIV = 250,
  localparam int unsigned QW = $clog2(QDIV)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] id,
  input  logic [7:0] addr,
  input  logic [7:0] data,
  output logic       busy,
  output logic       done,
  output logic       sio_c,
  output logic       sio_d,
  output logic       sio_d_oe
);
  localparam int unsigned NSLOT = 29;   // 0 start, 1..27 bits, 28 stop

  logic [QW-1:0] qcnt;
  logic [1:0]    quarter;
  logic [4:0]    slot;
  logic [26:0]   shreg;                // 3 x (8 bits + don't-care)
  logic          tick;

  assign tick = (qcnt == QW'(QDIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0;
      qcnt <= '0; quarter <= '0; slot <= '0; shreg <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy    <= 1'b1;
          qcnt    <= '0;
          quarter <= '0;
          slot    <= '0;
          shreg   <= {id, 1'b0, addr, 1'b0, data, 1'b0};
        end
      end else begin
        qcnt <= tick ? '0 : qcnt + 1'b1;
        if (tick) begin
          quarter <= quarter + 1'b1;
          if (quarter == 2'd3) begin
            if (slot >= 5'd1 && slot <= 5'd27) shreg <= shreg << 1;
            if (slot == 5'(NSLOT - 1)) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              slot <= slot + 1'b1;
            end
          end
        end
      end
    end
  end

  // Bus levels per slot and quarter.
  always_comb begin
    sio_c    = 1'b1;
    sio_d    = 1'b1;
    sio_d_oe = 1'b1;
    if (busy) begin
      if (slot == 5'd0) begin
        // start: SIO_D falls while SIO_C is high, then SIO_C falls
        sio_c = (quarter <= 2'd1);
        sio_d = (quarter == 2'd0);
      end else if (slot == 5'(NSLOT - 1)) begin
        // stop: SIO_C rises while SIO_D is low, then SIO_D rises
        sio_c = (quarter != 2'd0);
        sio_d = (quarter == 2'd3);
      end else begin
        sio_c    = quarter[1];
        sio_d    = shreg[26];
        // ninth bit of each phase: released
        sio_d_oe = !(slot == 5'd9 || slot == 5'd18 || slot == 5'd27);
      end
    end
  end
endmodule
