// Flow control of an image IP built as FIFO In -> pipeline -> FIFO Out.
//
// Filter-clock side: the pipeline has no stall, so a block may only be
// popped from FIFO In (fifo_in_rd) when FIFO Out has room for it and for
// every block already inside the pipeline. A counter of blocks in flight
// (started, result not yet written) is kept; a result leaving the pipeline
// is written to FIFO Out (fifo_out_wr). fifo_out_count is FIFO Out's fill
// seen from the write side, which may only overstate the fill.
//
// AXI-clock side (combinational): the output stream is valid while FIFO Out
// holds data, and rd pops FIFO Out when the stream accepts the word.
//
// The block's role (managing the writes of the pipeline into FIFO Out, and
// the rd signal into FIFO Out) follows the source design; the credit rule is
// this design's choice.
module control_bi #(
  parameter int unsigned DEPTH   = 16,
  parameter int unsigned LATENCY = 3
) (
  input  logic                    clk_f,
  input  logic                    rst_f_n,
  input  logic                    fifo_in_empty,
  input  logic [$clog2(DEPTH):0]  fifo_out_count,
  input  logic                    pipe_out_valid,
  output logic                    fifo_in_rd,
  output logic                    fifo_out_wr,

  input  logic                    fifo_out_empty,
  input  logic                    m_ready,
  output logic                    m_valid,
  output logic                    rd
);
  localparam int unsigned CW = $clog2(DEPTH) + 2;
  logic [CW-1:0] inflight;
  logic [CW-1:0] room_needed;

  always_comb begin
    room_needed = CW'(fifo_out_count) + inflight + 1'b1;
    fifo_in_rd  = !fifo_in_empty && (room_needed <= CW'(DEPTH));
    fifo_out_wr = pipe_out_valid;
  end

  always_ff @(posedge clk_f or negedge rst_f_n) begin
    if (!rst_f_n) inflight <= '0;
    else          inflight <= inflight + CW'(fifo_in_rd) - CW'(pipe_out_valid);
  end

  assign m_valid = !fifo_out_empty;
  assign rd      = m_valid && m_ready;

  // Never more results in flight than the pipeline can hold.
  a_inflight: assert property (@(posedge clk_f) disable iff (!rst_f_n) inflight <= CW'(LATENCY))
    else $error("control_bi: more blocks in flight than pipeline stages");
endmodule
