// Dual-clock FIFO used to move stream data between the 100 MHz AXI clock
// domain and the filter clock domain (FIFO In / FIFO Out of each image IP).
//
// Storage is a register array of DEPTH words (DEPTH a power of two). Each
// side keeps a binary pointer one bit wider than the address and publishes
// it in Gray code; the other side samples it through two flip-flops. full
// and wr_count are computed on the write side, empty on the read side, both
// conservatively (a pointer seen late only makes the FIFO look fuller or
// emptier). Reads are first-word fall-through: rdata shows the head word
// while empty is low, and rd_en removes it.
//
// Interface: write with wr_en when full is low; read with rd_en when empty
// is low. A write is seen on the read side three read clocks later.
// The need for two clock-crossing FIFOs is from the source design; depth and
// structure are this design's choice.
module async_fifo #(
  parameter int unsigned WIDTH = 192,
  parameter int unsigned DEPTH = 16
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  output logic [$clog2(DEPTH):0] wr_count,

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in read domain
  logic [AW:0] rbin_w;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write side ----------------
  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_comb begin
    rbin_w   = gray2bin(rgray_w2);
    wr_count = wbin - rbin_w;
    full     = (wr_count == (AW+1)'(DEPTH));
  end

  // ---------------- read side ----------------
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];

  // Protocol rules of the two ports.
  a_no_overflow:  assert property (@(posedge wclk) disable iff (!wrst_n) wr_en |-> !full)
    else $error("async_fifo: write while full");
  a_no_underflow: assert property (@(posedge rclk) disable iff (!rrst_n) rd_en |-> !empty)
    else $error("async_fifo: read while empty");
endmodule
