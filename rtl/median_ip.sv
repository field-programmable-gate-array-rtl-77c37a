// Median-filter and colour-separation IP core (AXI4-Stream in and out).
//
// Data path: s_* stream (100 MHz AXI clock) -> FIFO In -> median_core
// (filter clock) -> FIFO Out -> color_sep -> m_* stream (AXI clock).
// control_bi pops FIFO In only when FIFO Out can take the result, so the
// stall-free median pipeline never loses data, and pops FIFO Out when the
// output stream accepts a word.
//
// Interface: s_tdata is one 3x4 RGB565 block, row-major (bits [191:176] are
// row 0 column 0, see median_core). m_tdata[j] is the object bit of the
// pixel centred on column 4k-1+j for input block k of a band. One output
// word per input word, in order. Throughput one block per filter clock;
// latency 3 filter clocks plus the two clock crossings.
// The chain FIFO In / median / FIFO Out / colour separation with control_bi
// follows the source design; the stream framing is this design's.
module median_ip
  import track_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic         clk_axi,
  input  logic         rst_axi_n,
  input  logic         clk_filt,
  input  logic         rst_filt_n,

  input  logic         s_tvalid,
  output logic         s_tready,
  input  logic [191:0] s_tdata,

  output logic         m_tvalid,
  input  logic         m_tready,
  output logic [3:0]   m_tdata,

  input  logic [7:0]   r_min,
  input  logic [7:0]   g_max,
  input  logic [7:0]   b_max
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  logic               in_full, in_empty, in_rd;
  logic [CW-1:0]      in_count;
  rgb565_t [2:0][3:0] in_blk;
  logic               med_valid;
  rgb888_t [3:0]      med_pix;
  logic               out_full, out_empty, out_wr, out_rd;
  logic [CW-1:0]      out_count;
  rgb888_t [3:0]      out_pix;

  assign s_tready = !in_full;

  async_fifo #(.WIDTH(192), .DEPTH(FIFO_DEPTH)) u_fifo_in (
    .wclk(clk_axi), .wrst_n(rst_axi_n), .wr_en(s_tvalid && !in_full), .wdata(s_tdata),
    .full(in_full), .wr_count(in_count),
    .rclk(clk_filt), .rrst_n(rst_filt_n), .rd_en(in_rd), .rdata(in_blk), .empty(in_empty)
  );

  median_core u_median (
    .clk(clk_filt), .rst_n(rst_filt_n),
    .in_valid(in_rd), .in_blk(in_blk),
    .out_valid(med_valid), .out_pix(med_pix)
  );

  async_fifo #(.WIDTH(96), .DEPTH(FIFO_DEPTH)) u_fifo_out (
    .wclk(clk_filt), .wrst_n(rst_filt_n), .wr_en(out_wr), .wdata(med_pix),
    .full(out_full), .wr_count(out_count),
    .rclk(clk_axi), .rrst_n(rst_axi_n), .rd_en(out_rd), .rdata(out_pix), .empty(out_empty)
  );

  control_bi #(.DEPTH(FIFO_DEPTH), .LATENCY(3)) u_ctrl (
    .clk_f(clk_filt), .rst_f_n(rst_filt_n),
    .fifo_in_empty(in_empty), .fifo_out_count(out_count), .pipe_out_valid(med_valid),
    .fifo_in_rd(in_rd), .fifo_out_wr(out_wr),
    .fifo_out_empty(out_empty), .m_ready(m_tready), .m_valid(m_tvalid), .rd(out_rd)
  );

  color_sep #(.NPIX(4)) u_csep (
    .pix(out_pix), .r_min(r_min), .g_max(g_max), .b_max(b_max), .bin(m_tdata)
  );

  // in_count and out_full are status outputs of the FIFOs that this core does
  // not need (flow control is done by credits).
  logic unused;
  assign unused = ^{in_count, out_full};
endmodule
