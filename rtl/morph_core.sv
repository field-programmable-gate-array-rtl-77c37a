// Binary erosion / dilation with a 9x9 square structuring element.
//
// The image is processed in bands of K=9 rows. Each cycle with in_valid
// high, one KxK bit block of the band arrives (in_blk[r][c], row r, column c,
// both 0 = top/left); consecutive blocks walk the band left to right. The
// previous block (Block 1) and the new one (Block 2) form an 18-column strip.
// The strip enters a K-stage pipeline; stage n looks at the 9 columns at the
// left of the strip, reduces the 81 bits (AND for erosion, OR for dilation)
// into Out n, then shifts the strip left by one column for the next stage.
// So Out1 is centred on column 4 of Block 1 and Out9 on column 3 of Block 2:
// out_bits[n] is the result centred on column 9(k-1)+4+n of the band's centre
// row, for block k. Band-edge padding is the stream source's job.
//
// Timing: out_valid rises K cycles after the block is taken, then one K-bit
// result per cycle. No stall input. The 9x9 element, the shifting of Block 1
// and Block 2 one column per stage and the 9-cycle fill follow the source
// design; the square element and row/column layout are this design's.
module morph_core #(
  parameter int unsigned K      = 9,
  parameter bit          DILATE = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [0:K-1][0:K-1]    in_blk,
  output logic                   out_valid,
  output logic [0:K-1]           out_bits
);
  typedef logic [0:K-1][0:2*K-1] strip_t;

  logic [0:K-1][0:K-1] prev_blk;
  strip_t              strip_in;
  strip_t              st_strip [K];
  logic [0:K-1]        st_out   [K];
  logic [K-1:0]        st_v;

  // One window reduction over the left K columns of a strip.
  function automatic logic reduce_win(strip_t s);
    logic acc;
    acc = DILATE ? 1'b0 : 1'b1;
    for (int r = 0; r < int'(K); r++)
      for (int c = 0; c < int'(K); c++)
        acc = DILATE ? (acc | s[r][c]) : (acc & s[r][c]);
    return acc;
  endfunction

  function automatic strip_t shl1(strip_t s);
    strip_t t;
    for (int r = 0; r < int'(K); r++) t[r] = s[r] << 1;
    return t;
  endfunction

  always_comb begin
    for (int r = 0; r < int'(K); r++) strip_in[r] = {prev_blk[r], in_blk[r]};
  end

  always_ff @(posedge clk) begin
    if (in_valid) prev_blk <= in_blk;
    // stage 0: Out1 from the unshifted strip
    st_strip[0] <= shl1(strip_in);
    st_out[0]   <= '0;
    st_out[0][0] <= reduce_win(strip_in);
    for (int n = 1; n < int'(K); n++) begin
      st_strip[n]    <= shl1(st_strip[n-1]);
      st_out[n]      <= st_out[n-1];
      st_out[n][n]   <= reduce_win(st_strip[n-1]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st_v <= '0;
    else        st_v <= {st_v[K-2:0], in_valid};
  end

  assign out_valid = st_v[K-1];
  assign out_bits  = st_out[K-1];
endmodule
