// tb_census_transform: streams two random 16x12 images through the census
// unit, with random idle cycles between pixels, and compares every output
// word with the reference census of pixel (x-2, y-2). Also checks the
// two-clock latency.
module tb_census_transform;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;
  localparam int W = 16, H = 12, XW = 4, YW = 4;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid, out_valid;
  pix_t          in_pix;
  logic [XW-1:0] in_x, out_x;
  logic [YW-1:0] in_y, out_y;
  census_t       out_census;
  uarr_t         img;
  int            sent_cycle [W*H];
  int            cycle = 0, nout = 0;

  census_transform #(.IMG_W(W), .XW(XW), .YW(YW)) dut (.*);

  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) if (rst_n && out_valid) begin
    automatic int x = out_x, y = out_y;
    automatic census_t exp = (x >= 4 && y >= 4) ? census_ref(img, W, H, x-2, y-2) : '0;
    checks++;
    if (out_census !== exp) begin
      failures++;
      if (failures < 10) $display("(%0d,%0d) got %h exp %h", x, y, out_census, exp);
    end
    checks++;
    if (cycle - sent_cycle[y*W+x] != 2) begin
      failures++;
      $display("latency %0d at (%0d,%0d)", cycle - sent_cycle[y*W+x], x, y);
    end
    nout++;
  end

  initial begin
    in_valid = 0; in_pix = 0; in_x = 0; in_y = 0;
    img = new[W*H];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < W*H; i++) img[i] = (f == 0) ? $urandom_range(0, 255) : $urandom_range(100, 103);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 0;
          if ($urandom_range(0, 3) == 0) begin @(negedge clk); end
          in_valid = 1; in_pix = pix_t'(img[y*W+x]); in_x = XW'(x); in_y = YW'(y);
          sent_cycle[y*W+x] = cycle;
        end
      @(negedge clk); in_valid = 0;
      repeat (4) @(negedge clk);
    end
    checks++;
    if (nout != 2*W*H) begin failures++; $display("outputs %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
