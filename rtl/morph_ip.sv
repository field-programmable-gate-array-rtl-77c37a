// Morphological filter IP core (erosion when DILATE=0, dilation when
// DILATE=1), AXI4-Stream in and out.
//
// Data path: s_* stream (100 MHz AXI clock) -> FIFO In -> morph_core
// (filter clock) -> FIFO Out -> m_* stream. control_bi pops FIFO In only
// when FIFO Out has room for the result, and pops FIFO Out when the output
// stream accepts a word.
//
// Interface: s_tdata is one 9x9 bit block, row 0 in bits [80:72] with
// column 0 the most significant bit of each row. m_tdata[8-n] is Out(n+1)
// (see morph_core): bit 8 is the leftmost of the nine result pixels. One
// output word per input word, 9 filter clocks of latency plus the two
// crossings. One filter core between two FIFO memories, for both the
// dilation and the erosion core, follows the source design; the clocking
// of these cores is this design's choice (the same as the median IP).
module morph_ip #(
  parameter bit          DILATE     = 1'b1,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk_axi,
  input  logic        rst_axi_n,
  input  logic        clk_filt,
  input  logic        rst_filt_n,

  input  logic        s_tvalid,
  output logic        s_tready,
  input  logic [80:0] s_tdata,

  output logic        m_tvalid,
  input  logic        m_tready,
  output logic [8:0]  m_tdata
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  logic          in_full, in_empty, in_rd;
  logic [CW-1:0] in_count;
  logic [80:0]   in_blk;
  logic          core_valid;
  logic [8:0]    core_bits;
  logic          out_full, out_empty, out_wr, out_rd;
  logic [CW-1:0] out_count;

  assign s_tready = !in_full;

  async_fifo #(.WIDTH(81), .DEPTH(FIFO_DEPTH)) u_fifo_in (
    .wclk(clk_axi), .wrst_n(rst_axi_n), .wr_en(s_tvalid && !in_full), .wdata(s_tdata),
    .full(in_full), .wr_count(in_count),
    .rclk(clk_filt), .rrst_n(rst_filt_n), .rd_en(in_rd), .rdata(in_blk), .empty(in_empty)
  );

  morph_core #(.K(9), .DILATE(DILATE)) u_core (
    .clk(clk_filt), .rst_n(rst_filt_n),
    .in_valid(in_rd), .in_blk(in_blk),
    .out_valid(core_valid), .out_bits(core_bits)
  );

  async_fifo #(.WIDTH(9), .DEPTH(FIFO_DEPTH)) u_fifo_out (
    .wclk(clk_filt), .wrst_n(rst_filt_n), .wr_en(out_wr), .wdata(core_bits),
    .full(out_full), .wr_count(out_count),
    .rclk(clk_axi), .rrst_n(rst_axi_n), .rd_en(out_rd), .rdata(m_tdata), .empty(out_empty)
  );

  control_bi #(.DEPTH(FIFO_DEPTH), .LATENCY(9)) u_ctrl (
    .clk_f(clk_filt), .rst_f_n(rst_filt_n),
    .fifo_in_empty(in_empty), .fifo_out_count(out_count), .pipe_out_valid(core_valid),
    .fifo_in_rd(in_rd), .fifo_out_wr(out_wr),
    .fifo_out_empty(out_empty), .m_ready(m_tready), .m_valid(m_tvalid), .rd(out_rd)
  );

  // Status outputs not needed here (flow control is done by credits).
  logic unused;
  assign unused = ^{in_count, out_full};
endmodule
