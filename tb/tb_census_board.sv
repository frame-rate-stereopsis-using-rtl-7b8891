// tb_census_board: loads a 16x16 stereo pair through the input handshake,
// runs a census pass and two matching passes (base disparities 0 and 16)
// with pointers generated here, and compares the four census streams, their
// valid flags and coordinates with the reference census of the stored
// images. Also checks that input is refused while a frame waits and during
// the census pass, and accepted again afterwards.
module tb_census_board;
  import stereo_pkg::*;
  import stereo_ref_pkg::*;
  localparam int W = 16, H = 16, FS_AW = 10, LEAD = NDISP - 1;
  localparam int XW = 4, YW = 4;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid, in_ready, frame_ready, scan_valid, census_end;
  pix_t          in_left, in_right;
  phase_e        phase;
  disp_t         base_disp;
  logic [XW:0]   scan_c;
  logic [YW-1:0] scan_y;
  logic          st_valid, st_lvalid, st_rvalid, st_old_ok;
  census_t       st_l_new, st_l_old, st_r_new, st_r_old;
  logic [XW-1:0] st_x;
  logic [YW-1:0] st_y;

  census_board #(.IMG_W(W), .IMG_H(H), .FS_AW(FS_AW), .LEAD(LEAD), .XW(XW), .YW(YW)) dut (.*);

  uarr_t left, right;
  int    n_stream = 0;

  typedef struct {
    bit lv, rv, ok;
    census_t ln, lo, rn, ro;
    int x, y;
  } exp_t;
  exp_t expq [$];

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

  // census word stored at address (ax, ay): census of pixel (ax-2, ay-2)
  function automatic census_t ca(uarr_t img, int ax, int ay);
    return census_ref(img, W, H, ax - 2, ay - 2);
  endfunction

  always @(posedge clk) if (rst_n && st_valid) begin
    exp_t e;
    if (expq.size() == 0) check(0, "unexpected stream word");
    else begin
      e = expq.pop_front();
      check(st_lvalid == e.lv && st_rvalid == e.rv && st_old_ok == e.ok, "stream flags");
      check(st_l_new == e.ln && st_l_old == e.lo, $sformatf("left streams at (%0d,%0d)", e.x, e.y));
      check(st_r_new == e.rn && st_r_old == e.ro, $sformatf("right streams at (%0d,%0d)", e.x, e.y));
      if (e.rv) check(int'(st_x) == e.x && int'(st_y) == e.y, "stream coordinates");
      n_stream++;
    end
  end

  task automatic scan(input phase_e ph, input int b);
    int rowlen = (ph == PH_MATCH) ? W + LEAD : W;
    phase = ph; base_disp = disp_t'(b);
    for (int y = 0; y < H; y++)
      for (int c = 0; c < rowlen; c++) begin
        @(negedge clk);
        scan_valid = 1; scan_c = (XW+1)'(c); scan_y = YW'(y);
        if (ph == PH_MATCH) begin
          exp_t e;
          int lc = c + b, rc = c - LEAD;
          e.lv = lc < W; e.rv = c >= LEAD; e.ok = y >= MWIN;
          e.ln = e.lv ? ca(left, lc, y) : '0;
          e.lo = (e.lv && e.ok) ? ca(left, lc, y - MWIN) : '0;
          e.rn = e.rv ? ca(right, rc, y) : '0;
          e.ro = (e.rv && e.ok) ? ca(right, rc, y - MWIN) : '0;
          e.x = rc; e.y = y;
          expq.push_back(e);
        end
        if (ph == PH_CENSUS) check(!in_ready, "input refused during census pass");
      end
    @(negedge clk);
    scan_valid = 0;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    left = new[W*H]; right = new[W*H];
    foreach (left[i]) begin left[i] = $urandom_range(0, 255); right[i] = $urandom_range(0, 255); end
    in_valid = 0; in_left = 0; in_right = 0; phase = PH_IDLE; base_disp = 0;
    scan_valid = 0; scan_c = 0; scan_y = 0; census_end = 0;
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
    check(frame_ready, "frame_ready after a full frame");
    check(!in_ready, "input refused while a frame waits");
    scan(PH_CENSUS, 0);
    census_end = 1; @(negedge clk); census_end = 0;
    #1;
    check(!frame_ready, "frame_ready cleared by census_end");
    phase = PH_MATCH;
    #1;
    check(in_ready, "input accepted again during matching");
    scan(PH_MATCH, 0);
    scan(PH_MATCH, 16);
    check(expq.size() == 0, "all stream words seen");
    check(n_stream == 2*H*(W+LEAD), $sformatf("stream words %0d", n_stream));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
