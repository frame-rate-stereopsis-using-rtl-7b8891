// census_transform: streaming sparse 5x5 census transform.
//
// Pixels arrive in raster order, one per valid cycle, with their column and
// row. Four line buffers hold the previous four lines, so that every valid
// cycle one new 5-pixel column enters a 5x5 window register. The centre of
// the window is compared with the 15 neighbours selected by CENSUS_MASK; a
// census bit is 1 when the neighbour is darker (less) than the centre. All
// 15 comparisons run in parallel, as in the original board.
//
// Output position: the word produced for input (x, y) is the census of pixel
// (x-2, y-2), tagged with (x, y), i.e. aligned with the trailing corner of
// the window. It is zero while the window is not complete (x < 4 or y < 4).
// Left and right images are shifted alike, so disparities are unaffected;
// the later stages undo the offset. Latency is 2 clocks; a new pixel may be
// accepted every cycle. Line buffers are not cleared: incomplete windows are
// masked instead. The choice of neighbours, the trailing alignment and the
// border rule are this design's; the transform itself follows the original.
module census_transform
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned XW    = $clog2(IMG_W),
  parameter int unsigned YW    = 9
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  pix_t          in_pix,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  output logic          out_valid,
  output census_t       out_census,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y
);

  pix_t          lines [CWIN-1][IMG_W];   // lines[0] = previous line
  pix_t          win   [CWIN][CWIN];      // win[row][col], row 0 oldest
  pix_t          column [CWIN];           // column[row], row CWIN-1 newest
  logic          s1_valid, s1_full;
  logic [XW-1:0] s1_x;
  logic [YW-1:0] s1_y;
  census_t       census;

  always_comb begin
    column[CWIN-1] = in_pix;
    for (int r = 0; r < CWIN-1; r++)
      column[r] = lines[CWIN-2-r][in_x];
  end

  // stage 1: line buffers and window shift
  always_ff @(posedge clk) begin
    if (in_valid) begin
      lines[0][in_x] <= in_pix;
      for (int k = 1; k < CWIN-1; k++)
        lines[k][in_x] <= lines[k-1][in_x];
      for (int r = 0; r < CWIN; r++) begin
        for (int c = 0; c < CWIN-1; c++)
          win[r][c] <= win[r][c+1];
        win[r][CWIN-1] <= column[r];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_full  <= 1'b0;
      s1_x     <= '0;
      s1_y     <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_full <= (in_x >= XW'(CWIN-1)) && (in_y >= YW'(CWIN-1));
        s1_x    <= in_x;
        s1_y    <= in_y;
      end
    end
  end

  // 15 comparisons against the centre
  always_comb begin
    int unsigned k;
    k      = 0;
    census = '0;
    for (int r = 0; r < CWIN; r++)
      for (int c = 0; c < CWIN; c++)
        if (CENSUS_MASK[r*CWIN+c]) begin
          census[k] = win[r][c] < win[CWIN/2][CWIN/2];
          k++;
        end
  end

  // stage 2: registered census word
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_census <= '0;
      out_x      <= '0;
      out_y      <= '0;
    end else begin
      out_valid <= s1_valid;
      if (s1_valid) begin
        out_census <= s1_full ? census : '0;
        out_x      <= s1_x;
        out_y      <= s1_y;
      end
    end
  end

endmodule
