// 3x3 median filter pipeline, four output pixels per clock.
//
// Each cycle with in_valid high, one 3x4 block of a three-row band arrives:
// in_blk[r][c] is row r (0 = top) and column c (0 = left) of the block, in
// RGB565. Consecutive blocks walk the band left to right. Every channel is
// widened to 8 bits and filtered on its own.
//
// How: the 3x3 median is found by sorting each vertical triple, then taking
// the maximum of the three minima, the median of the three middles and the
// minimum of the three maxima, and finally the median of those three values
// (the "diagonal" of the twice-sorted mask). Each column is sorted once and
// shared by the three windows that contain it; the two right-most sorted
// columns of a block are kept for the next one. So a block of columns
// 4k..4k+3 yields the medians centred on columns 4k-1..4k+2:
// out_pix[j] is centred on column 4k-1+j. Padding at the band edges is the
// stream source's job.
//
// Timing: three register stages (column sort, cross sort, diagonal median);
// out_valid rises three clocks after the block is taken. No stall: the
// caller must be able to accept every result. Four pixels per cycle, the
// 3-cycle latency and the row/column/diagonal method follow the source
// design; the stage split and the column alignment are this design's.
module median_core
  import track_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  rgb565_t [2:0][3:0]  in_blk,
  output logic                out_valid,
  output rgb888_t [3:0]       out_pix
);
  localparam int unsigned NCH = 3;

  // Channel c of a pixel: 0 = R, 1 = G, 2 = B.
  function automatic logic [W-1:0] chan(rgb888_t p, int c);
    case (c)
      0:       return p.r;
      1:       return p.g;
      default: return p.b;
    endcase
  endfunction

  // ---------------- stage 1: sort each new column -----------------------
  logic [W-1:0] cs_mx [NCH][4];
  logic [W-1:0] cs_md [NCH][4];
  logic [W-1:0] cs_mn [NCH][4];

  for (genvar c = 0; c < NCH; c++) begin : g_s1ch
    for (genvar k = 0; k < 4; k++) begin : g_s1col
      sort3 #(.W(W)) u_col (
        .x0(chan(widen565(in_blk[0][k]), c)),
        .x1(chan(widen565(in_blk[1][k]), c)),
        .x2(chan(widen565(in_blk[2][k]), c)),
        .mx(cs_mx[c][k]), .md(cs_md[c][k]), .mn(cs_mn[c][k])
      );
    end
  end

  // Six sorted columns: [0],[1] kept from the previous block, [2..5] new.
  logic [W-1:0] s_mx [NCH][6];
  logic [W-1:0] s_md [NCH][6];
  logic [W-1:0] s_mn [NCH][6];
  logic         v1, v2, v3;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int c = 0; c < NCH; c++) begin
        for (int k = 0; k < 2; k++) begin
          s_mx[c][k] <= s_mx[c][k+4];
          s_md[c][k] <= s_md[c][k+4];
          s_mn[c][k] <= s_mn[c][k+4];
        end
        for (int k = 0; k < 4; k++) begin
          s_mx[c][k+2] <= cs_mx[c][k];
          s_md[c][k+2] <= cs_md[c][k];
          s_mn[c][k+2] <= cs_mn[c][k];
        end
      end
    end
  end

  // ---------------- stage 2: sort across the three columns ---------------
  logic [W-1:0] lo_c [NCH][4];
  logic [W-1:0] mi_c [NCH][4];
  logic [W-1:0] hi_c [NCH][4];
  logic [W-1:0] lo_q [NCH][4];
  logic [W-1:0] mi_q [NCH][4];
  logic [W-1:0] hi_q [NCH][4];

  for (genvar c = 0; c < NCH; c++) begin : g_s2ch
    for (genvar j = 0; j < 4; j++) begin : g_s2win
      logic [W-1:0] u0, u1, u2, u3, u4, u5;
      // maximum of the minima
      sort3 #(.W(W)) u_lo (.x0(s_mn[c][j]), .x1(s_mn[c][j+1]), .x2(s_mn[c][j+2]),
                           .mx(lo_c[c][j]), .md(u0), .mn(u1));
      // median of the middles
      sort3 #(.W(W)) u_mi (.x0(s_md[c][j]), .x1(s_md[c][j+1]), .x2(s_md[c][j+2]),
                           .mx(u2), .md(mi_c[c][j]), .mn(u3));
      // minimum of the maxima
      sort3 #(.W(W)) u_hi (.x0(s_mx[c][j]), .x1(s_mx[c][j+1]), .x2(s_mx[c][j+2]),
                           .mx(u4), .md(u5), .mn(hi_c[c][j]));
    end
  end

  always_ff @(posedge clk) begin
    lo_q <= lo_c;
    mi_q <= mi_c;
    hi_q <= hi_c;
  end

  // ---------------- stage 3: median of the diagonal -----------------------
  logic [W-1:0] med_c [NCH][4];
  for (genvar c = 0; c < NCH; c++) begin : g_s3ch
    for (genvar j = 0; j < 4; j++) begin : g_s3win
      logic [W-1:0] u6, u7;
      sort3 #(.W(W)) u_dg (.x0(lo_q[c][j]), .x1(mi_q[c][j]), .x2(hi_q[c][j]),
                           .mx(u6), .md(med_c[c][j]), .mn(u7));
    end
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < 4; j++) begin
      out_pix[j].r <= med_c[0][j];
      out_pix[j].g <= med_c[1][j];
      out_pix[j].b <= med_c[2][j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
      v3 <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      v3 <= v2;
    end
  end
  assign out_valid = v3;
endmodule
