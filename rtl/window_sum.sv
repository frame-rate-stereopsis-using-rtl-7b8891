// window_sum: 11x11 box sum of match counts for one disparity.
//
// The sum is split into column sums and row sums, as in the original board.
// Each valid cycle brings the match count of the current pixel (x, y) and
// the count of the pixel 11 lines above, (x, y-11), which the caller supplies
// from a second census stream read 11 lines behind (zero for y < 11). The
// column sum of x is updated in a one-line memory:
//     C(x,y) = C(x,y-1) + m(x,y) - m(x,y-11),   C(x,-1) = 0
// and the row sum slides along the line over the last 11 column sums:
//     S(x,y) = S(x-1,y) + C(x,y) - C(x-11,y),   S(-1,y) = 0, C(x<0) = 0.
// S(x,y) is the sum over columns x-10..x and rows y-10..y (trailing
// alignment). Pixels must arrive in raster order; the row sum restarts at
// x = 0 and the column memory is ignored on row 0, so no clearing pass is
// needed. Latency is 1 clock. The recurrences and alignment are this
// design's reading of "row sums and column sums"; the column memory uses an
// asynchronous read (distributed RAM).
module window_sum
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned XW    = $clog2(IMG_W),
  parameter int unsigned YW    = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  input  match_t        m_new,     // m(x, y)
  input  match_t        m_old,     // m(x, y-11), zero when y < 11
  output logic          out_valid,
  output score_t        out_sum,   // S(x, y)
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y
);

  colsum_t colmem [IMG_W];
  colsum_t hist [MWIN];           // hist[k] = C(x-1-k, y)
  colsum_t col_prev, col_new, col_drop;
  score_t  row_prev;

  always_comb begin
    col_prev = (in_y == '0) ? '0 : colmem[in_x];
    col_new  = col_prev + colsum_t'(m_new) - colsum_t'(m_old);
    col_drop = (in_x >= XW'(MWIN)) ? hist[MWIN-1] : '0;
    row_prev = (in_x == '0) ? '0 : out_sum;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      colmem[in_x] <= col_new;
      hist[0]      <= col_new;
      for (int k = 1; k < MWIN; k++) hist[k] <= hist[k-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sum   <= '0;
      out_x     <= '0;
      out_y     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sum <= row_prev + score_t'(col_new) - score_t'(col_drop);
        out_x   <= in_x;
        out_y   <= in_y;
      end
    end
  end

endmodule
