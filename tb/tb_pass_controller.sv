// tb_pass_controller: runs the controller on an 8x6 image with DRAIN = 4 and
// checks the pass sequence (census, four matching passes with bases 0, 8, 16,
// 24, then output), the raster order and length of every scan, the length of
// every pass, the census_end and frame_done pulses, and the overlapped
// output (out_en during the census pass of the next frame).
module tb_pass_controller;
  import stereo_pkg::*;
  localparam int W = 8, H = 6, DRAIN = 4, LEAD = NDISP - 1;
  localparam int XW = 3, YW = 3;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          frame_ready, first_pass, out_en, scan_valid, census_end, frame_done;
  phase_e        phase;
  logic [1:0]    pass_idx;
  disp_t         base_disp;
  logic [XW:0]   scan_c;
  logic [YW-1:0] scan_y;

  pass_controller #(.IMG_W(W), .IMG_H(H), .LEAD(LEAD), .DRAIN(DRAIN), .XW(XW), .YW(YW)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // observe one pass starting at the current cycle (scan_valid high)
  task automatic observe(input phase_e ph, input int pidx, input bit oe);
    int rowlen = (ph == PH_MATCH) ? W + LEAD : W;
    int n = 0, len = 0;
    check(phase == ph, $sformatf("phase %s expected %s", phase.name(), ph.name()));
    check(out_en == oe, "out_en");
    if (ph == PH_MATCH) begin
      check(int'(pass_idx) == pidx, "pass index");
      check(int'(base_disp) == NDISP * pidx, "base disparity");
      check(first_pass == (pidx == 0), "first_pass");
    end
    while (scan_valid) begin
      check(int'(scan_c) == n % rowlen && int'(scan_y) == n / rowlen, "raster order");
      n++; len++;
      @(posedge clk); #1;
    end
    check(n == rowlen * H, $sformatf("scan length %0d", n));
    while (!scan_valid && phase == ph && len < rowlen * H + DRAIN + 2) begin
      if (ph == PH_CENSUS && census_end) break;
      if (ph == PH_MATCH && frame_done) break;
      len++;
      @(posedge clk); #1;
    end
    check(len == rowlen * H + DRAIN, $sformatf("pass length %0d", len));
  endtask

  initial begin
    frame_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk); #1;
    check(phase == PH_IDLE && !scan_valid, "idle without a frame");
    frame_ready = 1;
    @(posedge clk); #1;
    for (int f = 0; f < 2; f++) begin
      observe(PH_CENSUS, 0, f == 1);
      check(census_end, "census_end pulse");
      frame_ready = 0;
      for (int p = 0; p < NPASS; p++) begin
        observe(PH_MATCH, p, 0);
        // the next input frame completes while frame 0 is being matched
        if (f == 0 && p == 1) frame_ready = 1;
      end
      check(frame_done, "frame_done pulse");
      @(posedge clk); #1;
    end
    // no frame waiting: separate output pass
    check(phase == PH_OUTPUT, "output-only pass");
    observe(PH_OUTPUT, 0, 1);
    repeat (3) @(posedge clk); #1;
    check(phase == PH_IDLE, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
