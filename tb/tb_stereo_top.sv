// tb_stereo_top: end-to-end test of the stereo matcher on 48x32 images.
//
// Two stereo frames are sent back to back. Each right image is its left
// image shifted by a known disparity per band of lines (small disparities
// in one band, disparities beyond the first pass in another) and
// radiometrically distorted (an offset in frame 0, a gain and an offset in
// frame 1), differences the census transform is insensitive to. Every
// output pixel is compared with the reference model
// (census_ref + summed-area window sums, independent of the hardware's
// sliding sums). The test also counts the mechanisms of the design and
// fails if one never happens: input back-pressure, input overlapped with
// matching, output overlapped with the next census pass, an output-only
// pass and a later pass improving a stored match. Pass lengths are checked
// against W*H + DRAIN (census) and H*(W+7) + DRAIN (matching).
module tb_stereo_top;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;
  localparam int W = 48, H = 32, FS_AW = 12, DRAIN = 8, NF = 2;
  localparam int XW = $clog2(W), YW = $clog2(H);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid, in_ready, out_valid, frame_done, upd_improve;
  pix_t          in_left, in_right;
  disp_t         out_disp;
  logic [XW-1:0] out_x;
  logic [YW-1:0] out_y;
  phase_e        phase;
  logic [1:0]    pass_idx;

  stereo_top #(.IMG_W(W), .IMG_H(H), .FS_AW(FS_AW), .DRAIN(DRAIN)) dut (.*);

  uarr_t left [NF], right [NF], expd [NF];
  int    nout = 0, frames_done = 0, correct = 0, valid_px = 0;
  int    n_stall = 0, n_in_match = 0, n_out_census = 0, n_out_only = 0;
  int    n_improve = 0, cyc_census = 0, cyc_match = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int true_disp(int f, int y);
    if (f == 0) return (y < H/2) ? 3 : 13;
    else        return (y < H/2) ? 17 : 6;
  endfunction

  // monitors
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (in_valid && in_ready && phase == PH_MATCH) n_in_match++;
    if (phase == PH_CENSUS) cyc_census++;
    if (phase == PH_MATCH) cyc_match++;
    if (upd_improve) n_improve++;
    if (frame_done) frames_done++;
    if (out_valid) begin
      automatic int f = nout / (W*H);
      automatic int x = out_x, y = out_y;
      automatic int i = y*W + x;
      if (phase == PH_CENSUS) n_out_census++;
      if (phase == PH_OUTPUT) n_out_only++;
      check(i == nout % (W*H), $sformatf("output order at %0d", nout));
      if (f < NF) begin
        check(int'(out_disp) == int'(expd[f][i]),
              $sformatf("frame %0d (%0d,%0d): disparity %0d, expected %0d", f, x, y, out_disp, expd[f][i]));
        if (x >= 7 && x <= W-8 && y >= 7 && y <= H-8 && x + true_disp(f, y) + 5 <= W - 3) begin
          valid_px++;
          if (int'(out_disp) == true_disp(f, y)) correct++;
        end
      end
      nout++;
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      uarr_t cl, cr;
      left[f] = new[W*H];
      right[f] = new[W*H];
      for (int i = 0; i < W*H; i++) left[f][i] = $urandom_range(0, 196);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          automatic int xs = x + true_disp(f, y);
          // frame 0: offset of +40; frame 1: gain of 5/4 and offset of +10
          // (both keep the order of grey levels, so census words are equal)
          if (f == 0) right[f][y*W+x] = (xs < W) ? left[f][y*W+xs] + 40 : $urandom_range(0, 255);
          else        right[f][y*W+x] = (xs < W) ? left[f][y*W+xs] * 5 / 4 + 10 : $urandom_range(0, 255);
        end
      cl = census_image(left[f], W, H);
      cr = census_image(right[f], W, H);
      expd[f] = disparity_ref(cl, cr, W, H);
    end
    in_valid = 0; in_left = 0; in_right = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int f = 0; f < NF; f++)
      for (int i = 0; i < W*H; i++) begin
        in_valid = 1; in_left = pix_t'(left[f][i]); in_right = pix_t'(right[f][i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
    in_valid = 0;
    wait (nout == NF*W*H);
    repeat (20) @(posedge clk);
    check(frames_done == NF, $sformatf("frames done %0d", frames_done));
    check(cyc_census == NF*(W*H + DRAIN), $sformatf("census cycles %0d", cyc_census));
    check(cyc_match == NF*NPASS*(H*(W+NDISP-1) + DRAIN), $sformatf("matching cycles %0d", cyc_match));
    check(n_stall > 0, "input back-pressure never happened");
    check(n_in_match > 0, "input never overlapped matching");
    check(n_out_census > 0, "output never overlapped a census pass");
    check(n_out_only > 0, "no output-only pass");
    check(n_improve > 0, "no later pass improved a match");
    check(correct * 10 >= valid_px * 9, $sformatf("true disparity found at %0d of %0d pixels", correct, valid_px));
    $display("stalls=%0d in_during_match=%0d out_during_census=%0d out_only=%0d improvements=%0d",
             n_stall, n_in_match, n_out_census, n_out_only, n_improve);
    $display("true disparity recovered at %0d of %0d fully covered pixels", correct, valid_px);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
