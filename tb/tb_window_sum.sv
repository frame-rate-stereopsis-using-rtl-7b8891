// tb_window_sum: feeds random match counts of a 24x20 image (two frames, with
// idle cycles), supplying m(x, y-11) as the caller would, and compares every
// output with a brute-force sum over the trailing 11x11 window.
module tb_window_sum;
  import stereo_pkg::*;
  localparam int W = 24, H = 20, XW = 5, YW = 5;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid, out_valid;
  logic [XW-1:0] in_x, out_x;
  logic [YW-1:0] in_y, out_y;
  match_t        m_new, m_old;
  score_t        out_sum;
  int            m [H][W];
  int            nout = 0;

  window_sum #(.IMG_W(W), .XW(XW), .YW(YW)) dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int x = out_x, y = out_y, s = 0;
    for (int j = y - MWIN + 1; j <= y; j++)
      for (int i = x - MWIN + 1; i <= x; i++)
        if (i >= 0 && j >= 0) s += m[j][i];
    checks++;
    if (int'(out_sum) != s) begin
      failures++;
      if (failures < 10) $display("(%0d,%0d) got %0d exp %0d", x, y, out_sum, s);
    end
    nout++;
  end

  initial begin
    in_valid = 0; in_x = 0; in_y = 0; m_new = 0; m_old = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          m[y][x] = (f == 0) ? $urandom_range(0, 15) : 15;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 0;
          if ($urandom_range(0, 4) == 0) @(negedge clk);
          in_valid = 1; in_x = XW'(x); in_y = YW'(y);
          m_new = match_t'(m[y][x]);
          m_old = (y >= MWIN) ? match_t'(m[y-MWIN][x]) : '0;
        end
      @(negedge clk); in_valid = 0;
      repeat (3) @(negedge clk);
    end
    checks++;
    if (nout != 2*W*H) begin failures++; $display("outputs %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
