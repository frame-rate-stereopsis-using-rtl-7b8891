// census_board: the first processing board - image input, census pass and
// the four census streams of the matching passes.
//
// Four frame stores sit behind a shuffle network: FS0 and FS1 hold the left
// and right input images, FS2 and FS3 their census words.
//  * Input: left and right pixels arrive together in raster order with a
//    valid/ready handshake and are written to FS0/FS1. in_ready is low while
//    a complete frame waits for its census pass and during that pass; the
//    source must then hold its pixel (checked by an assertion).
//  * Census pass: FS0/FS1 are read in raster order and two census_transform
//    units (left and right in parallel) write their words to FS2/FS3.
//  * Matching pass b (base disparity b): FS2 and FS3 are read on both of
//    their ports, on line y and on line y-11, giving four streams: left
//    census at column c+b and right census at column c-LEAD of lines y and
//    y-11. Reading the left image ahead lets the second board form
//    disparities b..b+7 from a short delay line. Each stream carries a valid
//    flag (column inside the image, line y-11 exists).
// Streams appear one clock after the controller's pointers. Store addresses
// are {line, column}; census words occupy 16-bit locations (2^(FS_AW-1) x 16,
// the capacity of one 2^FS_AW x 8 store). The storage of census words in
// their own stores, reading 11 lines apart and the board split follow the
// original; addressing, the handshake and the stream alignment are this
// design's choices. Verilator reports rst_n as used both synchronously and
// asynchronously: the synchronous use is only the `disable iff` of the
// input-handshake assertion, not logic.
module census_board
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256,
  parameter int unsigned FS_AW = 18,
  parameter int unsigned LEAD  = NDISP - 1,
  parameter int unsigned XW    = $clog2(IMG_W),
  parameter int unsigned YW    = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  // video input
  input  logic          in_valid,
  output logic          in_ready,
  input  pix_t          in_left,
  input  pix_t          in_right,
  output logic          frame_ready,
  // controller
  input  phase_e        phase,
  input  disp_t         base_disp,
  input  logic          scan_valid,
  input  logic [XW:0]   scan_c,
  input  logic [YW-1:0] scan_y,
  input  logic          census_end,
  // census streams to the second board
  output logic          st_valid,
  output logic          st_lvalid,
  output census_t       st_l_new,
  output census_t       st_l_old,
  output logic          st_rvalid,
  output census_t       st_r_new,
  output census_t       st_r_old,
  output logic          st_old_ok,
  output logic [XW-1:0] st_x,
  output logic [YW-1:0] st_y
);

  localparam int unsigned CAW = FS_AW - 1;     // census store address width
  localparam int unsigned NS  = 8;             // shuffle network sources
  // sources: 0/1 input writer L/R, 2/3 census reader L/R,
  //          4/5 census writer L/R, 6/7 stream reader L/R (line y)

  // ---------------------------------------------------------------- input
  logic [XW-1:0] wx;
  logic [YW-1:0] wy;
  logic          frame_full, in_fire;

  assign in_ready    = !frame_full && (phase != PH_CENSUS);
  assign in_fire     = in_valid && in_ready;
  assign frame_ready = frame_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wx <= '0; wy <= '0; frame_full <= 1'b0;
    end else begin
      if (census_end) frame_full <= 1'b0;
      if (in_fire) begin
        if (wx == XW'(IMG_W - 1)) begin
          wx <= '0;
          if (wy == YW'(IMG_H - 1)) begin
            wy <= '0;
            frame_full <= 1'b1;
          end else wy <= wy + 1'b1;
        end else wx <= wx + 1'b1;
      end
    end
  end

  a_in_hold: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid && $stable(in_left) && $stable(in_right));

  // ------------------------------------------------------- shuffle network
  logic              src_en [NS], src_we [NS];
  logic [FS_AW-1:0]  src_addr [NS];
  logic [15:0]       src_wdata [NS], src_rdata [NS];
  logic [1:0]        src_sel [NS];
  logic [2:0]        st_sel [4];
  logic              fs_en [4], fs_we [4];
  logic [FS_AW-1:0]  fs_addr [4];
  logic [15:0]       fs_wdata [4], fs_rdata [4];

  logic              census_ph, match_ph;
  assign census_ph = (phase == PH_CENSUS);
  assign match_ph  = (phase == PH_MATCH);

  always_comb begin
    st_sel[0] = census_ph ? 3'd2 : 3'd0;
    st_sel[1] = census_ph ? 3'd3 : 3'd1;
    st_sel[2] = match_ph  ? 3'd6 : 3'd4;
    st_sel[3] = match_ph  ? 3'd7 : 3'd5;
    src_sel   = '{2'd0, 2'd1, 2'd0, 2'd1, 2'd2, 2'd3, 2'd2, 2'd3};
  end

  shuffle_network #(.NSRC(NS), .NDST(4), .ADDR_W(FS_AW), .DATA_W(16)) u_shuffle (
    .src_en, .src_we, .src_addr, .src_wdata, .src_rdata, .src_sel,
    .st_sel, .st_en(fs_en), .st_we(fs_we), .st_addr(fs_addr),
    .st_wdata(fs_wdata), .st_rdata(fs_rdata)
  );

  // ------------------------------------------------------------- stores
  logic [CAW-1:0] old_addr_l, old_addr_r;
  logic           old_rd;
  logic [15:0]    fs2_b, fs3_b;
  logic [7:0]     fs0_a, fs1_a, fs0_b, fs1_b;

  frame_store #(.ADDR_W(FS_AW), .DATA_W(8)) u_fs0 (
    .clk, .a_en(fs_en[0]), .a_we(fs_we[0]), .a_addr(fs_addr[0]),
    .a_wdata(fs_wdata[0][7:0]), .a_rdata(fs0_a),
    .b_en(1'b0), .b_addr('0), .b_rdata(fs0_b));
  frame_store #(.ADDR_W(FS_AW), .DATA_W(8)) u_fs1 (
    .clk, .a_en(fs_en[1]), .a_we(fs_we[1]), .a_addr(fs_addr[1]),
    .a_wdata(fs_wdata[1][7:0]), .a_rdata(fs1_a),
    .b_en(1'b0), .b_addr('0), .b_rdata(fs1_b));
  frame_store #(.ADDR_W(CAW), .DATA_W(16)) u_fs2 (
    .clk, .a_en(fs_en[2]), .a_we(fs_we[2]), .a_addr(fs_addr[2][CAW-1:0]),
    .a_wdata(fs_wdata[2]), .a_rdata(fs_rdata[2]),
    .b_en(old_rd), .b_addr(old_addr_l), .b_rdata(fs2_b));
  frame_store #(.ADDR_W(CAW), .DATA_W(16)) u_fs3 (
    .clk, .a_en(fs_en[3]), .a_we(fs_we[3]), .a_addr(fs_addr[3][CAW-1:0]),
    .a_wdata(fs_wdata[3]), .a_rdata(fs_rdata[3]),
    .b_en(old_rd), .b_addr(old_addr_r), .b_rdata(fs3_b));

  assign fs_rdata[0] = {8'h00, fs0_a};
  assign fs_rdata[1] = {8'h00, fs1_a};

  // --------------------------------------------------------- census pass
  logic          cen_rd, cen_vld;
  logic [XW-1:0] cen_x, cx_l, cx_r;
  logic [YW-1:0] cen_y, cy_l, cy_r;
  logic          cv_l, cv_r;
  census_t       cw_l, cw_r;

  assign cen_rd = census_ph && scan_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cen_vld <= 1'b0; cen_x <= '0; cen_y <= '0;
    end else begin
      cen_vld <= cen_rd;
      cen_x   <= scan_c[XW-1:0];
      cen_y   <= scan_y;
    end
  end

  census_transform #(.IMG_W(IMG_W), .XW(XW), .YW(YW)) u_census_l (
    .clk, .rst_n, .in_valid(cen_vld), .in_pix(src_rdata[2][7:0]),
    .in_x(cen_x), .in_y(cen_y),
    .out_valid(cv_l), .out_census(cw_l), .out_x(cx_l), .out_y(cy_l));
  census_transform #(.IMG_W(IMG_W), .XW(XW), .YW(YW)) u_census_r (
    .clk, .rst_n, .in_valid(cen_vld), .in_pix(src_rdata[3][7:0]),
    .in_x(cen_x), .in_y(cen_y),
    .out_valid(cv_r), .out_census(cw_r), .out_x(cx_r), .out_y(cy_r));

  // ------------------------------------------------------ matching pass
  logic [XW+1:0] lcol;
  logic [XW:0]   rcol;
  logic          m_rd, lval, rval, oldok;
  logic [YW-1:0] y_old;

  always_comb begin
    m_rd   = match_ph && scan_valid;
    lcol   = (XW+2)'(scan_c) + (XW+2)'(base_disp);
    lval   = lcol < (XW+2)'(IMG_W);
    rval   = scan_c >= (XW+1)'(LEAD);
    rcol   = scan_c - (XW+1)'(LEAD);
    oldok  = scan_y >= YW'(MWIN);
    y_old  = scan_y - YW'(MWIN);
    old_rd = m_rd;
    old_addr_l = CAW'({y_old, lcol[XW-1:0]});
    old_addr_r = CAW'({y_old, rcol[XW-1:0]});
  end

  // source ports
  always_comb begin
    // input writer
    src_en[0] = in_fire;  src_we[0] = 1'b1;
    src_en[1] = in_fire;  src_we[1] = 1'b1;
    src_addr[0] = FS_AW'({wy, wx});
    src_addr[1] = FS_AW'({wy, wx});
    src_wdata[0] = {8'h00, in_left};
    src_wdata[1] = {8'h00, in_right};
    // census reader
    src_en[2] = cen_rd;  src_we[2] = 1'b0;
    src_en[3] = cen_rd;  src_we[3] = 1'b0;
    src_addr[2] = FS_AW'({scan_y, scan_c[XW-1:0]});
    src_addr[3] = FS_AW'({scan_y, scan_c[XW-1:0]});
    src_wdata[2] = '0;
    src_wdata[3] = '0;
    // census writer
    src_en[4] = cv_l;  src_we[4] = 1'b1;
    src_en[5] = cv_r;  src_we[5] = 1'b1;
    src_addr[4] = FS_AW'({cy_l, cx_l});
    src_addr[5] = FS_AW'({cy_r, cx_r});
    src_wdata[4] = {1'b0, cw_l};
    src_wdata[5] = {1'b0, cw_r};
    // stream reader, line y
    src_en[6] = m_rd;  src_we[6] = 1'b0;
    src_en[7] = m_rd;  src_we[7] = 1'b0;
    src_addr[6] = FS_AW'({scan_y, lcol[XW-1:0]});
    src_addr[7] = FS_AW'({scan_y, rcol[XW-1:0]});
    src_wdata[6] = '0;
    src_wdata[7] = '0;
  end

  // stream side information, aligned with the store read data
  logic lval_d, rval_d, oldok_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_valid <= 1'b0; lval_d <= 1'b0; rval_d <= 1'b0; oldok_d <= 1'b0;
      st_x <= '0; st_y <= '0;
    end else begin
      st_valid <= m_rd;
      lval_d   <= m_rd && lval;
      rval_d   <= m_rd && rval;
      oldok_d  <= m_rd && oldok;
      st_x     <= rcol[XW-1:0];
      st_y     <= scan_y;
    end
  end

  always_comb begin
    st_lvalid = lval_d;
    st_rvalid = rval_d;
    st_old_ok = oldok_d;
    st_l_new  = lval_d ? src_rdata[6][CENSUS_BITS-1:0] : '0;
    st_r_new  = rval_d ? src_rdata[7][CENSUS_BITS-1:0] : '0;
    st_l_old  = (lval_d && oldok_d) ? fs2_b[CENSUS_BITS-1:0] : '0;
    st_r_old  = (rval_d && oldok_d) ? fs3_b[CENSUS_BITS-1:0] : '0;
  end

endmodule
