// tb_stereo_full: one complete frame through stereo_top at its default size
// (256x256 images, 512x512 8-bit frame stores, 32 disparities in four
// passes). The right image is the left image shifted by a disparity that
// changes across four bands of lines (2, 9, 18 and 27, one per matching
// pass) and brightened by 40 grey levels. Every pixel of the disparity image
// is compared with the reference model; the census and matching pass lengths
// are checked (65 536 + 8 and 67 328 + 8 cycles, about 6.7 ms each at
// 10 MHz), and the share of fully covered pixels where the true disparity is
// recovered is reported and must exceed 90 %.
module tb_stereo_full;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;
  localparam int W = 256, H = 256, DRAIN = 8;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;   // 10 MHz

  logic       in_valid, in_ready, out_valid, frame_done, upd_improve;
  pix_t       in_left, in_right;
  disp_t      out_disp;
  logic [7:0] out_x, out_y;
  phase_e     phase;
  logic [1:0] pass_idx;

  stereo_top dut (.*);

  uarr_t left, right, expd;
  int    nout = 0, correct = 0, valid_px = 0, n_improve = 0, n_frames = 0;
  int    cyc_census = 0, cyc_match = 0, cyc_frame = 0;

  initial begin : watchdog
    repeat (800000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic int true_disp(int y);
    return (y < 64) ? 2 : (y < 128) ? 9 : (y < 192) ? 18 : 27;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (phase == PH_CENSUS) cyc_census++;
    if (phase == PH_MATCH) cyc_match++;
    if (phase == PH_CENSUS || phase == PH_MATCH) cyc_frame++;
    if (upd_improve) n_improve++;
    if (frame_done) n_frames++;
    if (out_valid) begin
      automatic int x = out_x, y = out_y, i = y*W + x;
      check(i == nout, "output order");
      check(int'(out_disp) == int'(expd[i]),
            $sformatf("(%0d,%0d) disparity %0d expected %0d", x, y, out_disp, expd[i]));
      if (x >= 7 && x <= W-8 && y >= 7 && y <= H-8 && x + true_disp(y) + 5 <= W - 3 &&
          (y - 5) / 64 == (y + 5) / 64) begin
        valid_px++;
        if (int'(out_disp) == true_disp(y)) correct++;
      end
      nout++;
    end
  end

  initial begin
    uarr_t cl, cr;
    left = new[W*H]; right = new[W*H];
    foreach (left[i]) left[i] = $urandom_range(0, 200);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic int xs = x + true_disp(y);
        right[y*W+x] = (xs < W) ? left[y*W+xs] + 40 : $urandom_range(0, 255);
      end
    cl = census_image(left, W, H);
    cr = census_image(right, W, H);
    expd = disparity_ref(cl, cr, W, H);

    in_valid = 0; in_left = 0; in_right = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < W*H; i++) begin
      in_valid = 1; in_left = pix_t'(left[i]); in_right = pix_t'(right[i]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    wait (nout == W*H);
    repeat (20) @(posedge clk);
    check(n_frames == 1, "frame_done");
    check(cyc_census == W*H + DRAIN, $sformatf("census pass %0d cycles", cyc_census));
    check(cyc_match == NPASS*(H*(W+NDISP-1) + DRAIN), $sformatf("matching passes %0d cycles", cyc_match));
    check(n_improve > 0, "later passes improved matches");
    check(correct * 10 >= valid_px * 9, "true disparity recovered");
    $display("frame: %0d cycles (%0.2f ms at 10 MHz); census pass %0d, matching passes %0d",
             cyc_frame, cyc_frame / 10000.0, cyc_census, cyc_match);
    $display("true disparity recovered at %0d of %0d fully covered pixels", correct, valid_px);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
