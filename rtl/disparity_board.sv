// disparity_board: the second processing board - eight-disparity matching,
// best-match store and disparity output.
//
// Matching pass with base disparity b: the four census streams of the first
// board arrive one word per clock. The left streams (lines y and y-11) run
// through NDISP-stage delay lines; because the first board reads the left
// image NDISP-1 columns ahead, tap NDISP-1-k holds the left word at column
// x+b+k for the right word at column x. For each of the NDISP lanes a pair
// of match_counter units compares lines y and y-11, and a window_sum unit
// forms the 11x11 sum of equal census bits. disparity_max picks the best
// lane, and the result is compared with the best match stored for that pixel
// by the previous passes: on the first pass, or when the new sum is strictly
// larger, {sum, b+k} is written back. Ties therefore keep the smaller
// disparity. The best store is read on port B and written on port A, three
// clocks after the stream word arrives.
//
// Output: while out_en is set, the controller's pointers scan output pixel
// (u, v) and the disparity of that pixel is read from the best store. Census
// words and window sums are stored at the trailing corner of their windows,
// so pixel (u, v) lives at address (u+7, v+7); pixels closer than 7 to the
// border have no complete window and are output as 0. Output is one pixel per
// clock, one clock after the pointer. The delay-line arrangement, the store
// layout, the tie rule and the border value are this design's choices; the
// eight parallel disparities, the running maximum over four passes and the
// output of the disparity image follow the original.
module disparity_board
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256,
  parameter int unsigned FS_AW = 18,
  parameter int unsigned XW    = $clog2(IMG_W),
  parameter int unsigned YW    = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  // controller
  input  phase_e        phase,
  input  disp_t         base_disp,
  input  logic          first_pass,
  input  logic          out_en,
  input  logic          scan_valid,
  input  logic [XW:0]   scan_c,
  input  logic [YW-1:0] scan_y,
  // census streams from the first board
  input  logic          st_valid,
  input  logic          st_lvalid,
  input  census_t       st_l_new,
  input  census_t       st_l_old,
  input  logic          st_rvalid,
  input  census_t       st_r_new,
  input  census_t       st_r_old,
  input  logic          st_old_ok,
  input  logic [XW-1:0] st_x,
  input  logic [YW-1:0] st_y,
  // disparity image output
  output logic          out_valid,
  output disp_t         out_disp,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y,
  // events, for monitoring
  output logic          upd_write,    // best store written
  output logic          upd_improve   // a later pass beat the stored match
);

  localparam int unsigned CAW = FS_AW - 1;
  localparam int unsigned OFF = CWIN/2 + MWIN/2;
  localparam int unsigned KW  = $clog2(NDISP);

  // ------------------------------------------------------- stage A: taps
  census_t       tap_new [NDISP];
  census_t       tap_old [NDISP];
  logic          tap_v   [NDISP];
  census_t       a_r_new, a_r_old;
  logic          a_valid, a_old_ok;
  logic [XW-1:0] a_x;
  logic [YW-1:0] a_y;

  always_ff @(posedge clk) begin
    if (st_valid) begin
      tap_new[0] <= st_l_new;
      tap_old[0] <= st_l_old;
      for (int j = 1; j < NDISP; j++) begin
        tap_new[j] <= tap_new[j-1];
        tap_old[j] <= tap_old[j-1];
      end
      a_r_new <= st_r_new;
      a_r_old <= st_r_old;
      a_x     <= st_x;
      a_y     <= st_y;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid  <= 1'b0;
      a_old_ok <= 1'b0;
      for (int j = 0; j < NDISP; j++) tap_v[j] <= 1'b0;
    end else begin
      a_valid  <= st_valid && st_rvalid;
      a_old_ok <= st_old_ok;
      if (st_valid) begin
        tap_v[0] <= st_lvalid;
        for (int j = 1; j < NDISP; j++) tap_v[j] <= tap_v[j-1];
      end
    end
  end

  // ------------------------------------------- stage B: lanes, window sums
  score_t        sums [NDISP];
  logic          ws_valid [NDISP];
  logic [XW-1:0] ws_x [NDISP];
  logic [YW-1:0] ws_y [NDISP];

  for (genvar k = 0; k < NDISP; k++) begin : g_lane
    match_t m_new, m_old;

    match_counter u_mc_new (
      .a(a_r_new), .b(tap_new[NDISP-1-k]), .valid(tap_v[NDISP-1-k]), .n_equal(m_new));
    match_counter u_mc_old (
      .a(a_r_old), .b(tap_old[NDISP-1-k]), .valid(tap_v[NDISP-1-k] && a_old_ok),
      .n_equal(m_old));

    window_sum #(.IMG_W(IMG_W), .XW(XW), .YW(YW)) u_ws (
      .clk, .rst_n, .in_valid(a_valid), .in_x(a_x), .in_y(a_y),
      .m_new, .m_old,
      .out_valid(ws_valid[k]), .out_sum(sums[k]), .out_x(ws_x[k]), .out_y(ws_y[k]));
  end

  // ---------------------------------------- stage C: lane maximum, lookup
  score_t         max_score, c_score;
  logic [KW-1:0]  max_idx, c_idx;
  logic           c_valid;
  logic [XW-1:0]  c_x;
  logic [YW-1:0]  c_y;

  disparity_max #(.N(NDISP)) u_max (
    .scores(sums), .best_score(max_score), .best_idx(max_idx));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_valid <= 1'b0; c_score <= '0; c_idx <= '0; c_x <= '0; c_y <= '0;
    end else begin
      c_valid <= ws_valid[0];
      c_score <= max_score;
      c_idx   <= max_idx;
      c_x     <= ws_x[0];
      c_y     <= ws_y[0];
    end
  end

  // ------------------------------------------------ best store and output
  logic           match_ph, rd_en, wr_en, take;
  logic [CAW-1:0] rd_addr;
  best_t          old_best, new_best;
  logic [15:0]    rd_data, a_unused;

  logic [XW:0]    ou;
  logic [YW:0]    ov;
  logic           o_inside, o_rd, o_inside_d, o_valid_d;
  logic [XW-1:0]  o_x_d;
  logic [YW-1:0]  o_y_d;

  always_comb begin
    match_ph = (phase == PH_MATCH);
    ou       = (XW+1)'(scan_c[XW-1:0]) + (XW+1)'(OFF);
    ov       = (YW+1)'(scan_y) + (YW+1)'(OFF);
    o_inside = (scan_c[XW-1:0] >= XW'(OFF)) && (ou < (XW+1)'(IMG_W)) &&
               (scan_y >= YW'(OFF)) && (ov < (YW+1)'(IMG_H));
    o_rd     = out_en && scan_valid && !match_ph;
    rd_en    = match_ph ? ws_valid[0] : (o_rd && o_inside);
    rd_addr  = match_ph ? CAW'({ws_y[0], ws_x[0]}) : CAW'({ov[YW-1:0], ou[XW-1:0]});
    old_best = best_t'(rd_data);
    take     = first_pass || (c_score > old_best.score);
    wr_en    = match_ph && c_valid && take;
    new_best = '{score: c_score, disp: base_disp + disp_t'(c_idx)};
  end

  frame_store #(.ADDR_W(CAW), .DATA_W(16)) u_best (
    .clk,
    .a_en(wr_en), .a_we(1'b1), .a_addr(CAW'({c_y, c_x})), .a_wdata(new_best),
    .a_rdata(a_unused),
    .b_en(rd_en), .b_addr(rd_addr), .b_rdata(rd_data));

  assign upd_write   = wr_en;
  assign upd_improve = wr_en && !first_pass;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o_valid_d <= 1'b0; o_inside_d <= 1'b0; o_x_d <= '0; o_y_d <= '0;
    end else begin
      o_valid_d  <= o_rd;
      o_inside_d <= o_rd && o_inside;
      o_x_d      <= scan_c[XW-1:0];
      o_y_d      <= scan_y;
    end
  end

  assign out_valid = o_valid_d;
  assign out_disp  = o_inside_d ? old_best.disp : '0;
  assign out_x     = o_x_d;
  assign out_y     = o_y_d;

endmodule
