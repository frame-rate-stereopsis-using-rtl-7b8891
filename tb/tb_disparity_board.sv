// tb_disparity_board: drives the four census streams of a 48x20 pair of
// random census images exactly as the first board would, for the four
// matching passes, then runs an output pass. Every output disparity is
// compared with the reference (summed-area window sums over the stored
// census words, ties to the smaller disparity). The census words are drawn
// so that the best disparity of most pixels is clear (upper band: the left
// image is the right image shifted by 5 with one bit flipped per word), or so
// that scores tie across passes (lower band: a pattern of period 8 shifted
// by 14), which checks that ties keep the smaller disparity.
module tb_disparity_board;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;
  localparam int W = 48, H = 20, FS_AW = 12, LEAD = NDISP - 1, DRAIN = 8;
  localparam int XW = 6, YW = 5;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  phase_e        phase;
  disp_t         base_disp;
  logic          first_pass, out_en, scan_valid;
  logic [XW:0]   scan_c;
  logic [YW-1:0] scan_y;
  logic          st_valid, st_lvalid, st_rvalid, st_old_ok;
  census_t       st_l_new, st_l_old, st_r_new, st_r_old;
  logic [XW-1:0] st_x;
  logic [YW-1:0] st_y;
  logic          out_valid, upd_write, upd_improve;
  disp_t         out_disp;
  logic [XW-1:0] out_x;
  logic [YW-1:0] out_y;

  disparity_board #(.IMG_W(W), .IMG_H(H), .FS_AW(FS_AW), .XW(XW), .YW(YW)) dut (.*);

  uarr_t al, ar, cl, cr, expd;   // al/ar: stored (address) census words
  int    nout = 0, nwrite = 0, nimprove = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (upd_write) nwrite++;
    if (upd_improve) nimprove++;
    if (out_valid) begin
      automatic int i = int'(out_y) * W + int'(out_x);
      check(i == nout, "output order");
      check(int'(out_disp) == int'(expd[i]),
            $sformatf("(%0d,%0d) disparity %0d expected %0d", out_x, out_y, out_disp, expd[i]));
      nout++;
    end
  end

  initial begin
    al = new[W*H]; ar = new[W*H]; cl = new[W*H]; cr = new[W*H];
    foreach (ar[i]) ar[i] = $urandom_range(0, 32767);
    // lower band: right words repeat every 8 columns, so disparities 6, 14,
    // 22 and 30 score alike and the tie rule across passes decides
    for (int y = 6; y < H; y++)
      for (int x = 8; x < W; x++) ar[y*W+x] = ar[y*W + x%8];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        if (y < 6)
          al[y*W+x] = (x >= 5) ? (ar[y*W+x-5] ^ (1 << $urandom_range(0, 14))) : $urandom_range(0, 32767);
        else
          al[y*W+x] = (x >= 14) ? ar[y*W+x-14] : $urandom_range(0, 32767);
      end
    // image-space view for the reference: pixel (p, q) is stored at (p+2, q+2)
    for (int q = 0; q < H; q++)
      for (int p = 0; p < W; p++) begin
        cl[q*W+p] = (p + 2 < W && q + 2 < H) ? al[(q+2)*W+p+2] : 0;
        cr[q*W+p] = (p + 2 < W && q + 2 < H) ? ar[(q+2)*W+p+2] : 0;
      end
    expd = disparity_ref(cl, cr, W, H);

    phase = PH_IDLE; base_disp = 0; first_pass = 0; out_en = 0;
    scan_valid = 0; scan_c = 0; scan_y = 0;
    st_valid = 0; st_lvalid = 0; st_rvalid = 0; st_old_ok = 0;
    st_l_new = 0; st_l_old = 0; st_r_new = 0; st_r_old = 0; st_x = 0; st_y = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NPASS; p++) begin
      automatic int b = p * NDISP;
      @(negedge clk);
      phase = PH_MATCH; base_disp = disp_t'(b); first_pass = (p == 0);
      for (int y = 0; y < H; y++)
        for (int c = 0; c < W + LEAD; c++) begin
          automatic int lc = c + b, rc = c - LEAD;
          st_valid  = 1;
          st_lvalid = lc < W;
          st_rvalid = c >= LEAD;
          st_old_ok = y >= MWIN;
          st_l_new  = st_lvalid ? census_t'(al[y*W+lc]) : '0;
          st_l_old  = (st_lvalid && st_old_ok) ? census_t'(al[(y-MWIN)*W+lc]) : '0;
          st_r_new  = st_rvalid ? census_t'(ar[y*W+rc]) : '0;
          st_r_old  = (st_rvalid && st_old_ok) ? census_t'(ar[(y-MWIN)*W+rc]) : '0;
          st_x = XW'(rc); st_y = YW'(y);
          @(negedge clk);
        end
      st_valid = 0; st_lvalid = 0; st_rvalid = 0;
      repeat (DRAIN) @(negedge clk);
    end
    phase = PH_OUTPUT; out_en = 1;
    for (int y = 0; y < H; y++)
      for (int c = 0; c < W; c++) begin
        scan_valid = 1; scan_c = (XW+1)'(c); scan_y = YW'(y);
        @(negedge clk);
      end
    scan_valid = 0;
    repeat (4) @(negedge clk);
    check(nout == W*H, $sformatf("outputs %0d", nout));
    check(nwrite >= W*H && nimprove > 0, $sformatf("writes %0d improvements %0d", nwrite, nimprove));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
