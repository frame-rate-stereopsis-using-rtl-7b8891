// stereo_top: frame-rate census stereo matcher.
//
// A pair of 8-bit images (left and right, IMG_W x IMG_H, raster order, both
// pixels in one transfer) goes in; a disparity image with respect to the
// right camera comes out, one 5-bit disparity (0-31) per pixel, the
// disparity that maximises the number of equal census bits summed over an
// 11x11 window. The design is split as in the original two-board system:
// census_board stores the images, computes the 15-bit census words and
// streams them; disparity_board compares eight disparities per pass and
// keeps the best match per pixel; pass_controller runs one census pass and
// four matching passes per frame and hands the stores between them. The
// disparity image of frame n is output during the census pass of frame n+1
// (or in an output-only pass when no frame is waiting), and frame n+1 is
// loaded while frame n is being matched.
//
// At the defaults (256x256, 10 MHz) a census pass takes 65 536 + 8 cycles
// and a matching pass 67 328 + 8 cycles, so one frame takes about 34 ms.
// Disparities at pixels closer than 7 to the border are output as 0.
// phase, pass_idx and frame_done report progress.
module stereo_top
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256,
  parameter int unsigned FS_AW = 18,
  parameter int unsigned DRAIN = 8,
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned YW   = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  pix_t          in_left,
  input  pix_t          in_right,
  output logic          out_valid,
  output disp_t         out_disp,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y,
  output phase_e        phase,
  output logic [1:0]    pass_idx,
  output logic          frame_done,
  output logic          upd_improve
);

  logic          frame_ready, first_pass, out_en, scan_valid, census_end;
  disp_t         base_disp;
  logic [XW:0]   scan_c;
  logic [YW-1:0] scan_y;

  logic          st_valid, st_lvalid, st_rvalid, st_old_ok;
  census_t       st_l_new, st_l_old, st_r_new, st_r_old;
  logic [XW-1:0] st_x;
  logic [YW-1:0] st_y;
  logic          upd_write;

  pass_controller #(.IMG_W(IMG_W), .IMG_H(IMG_H), .LEAD(NDISP-1), .DRAIN(DRAIN),
                    .XW(XW), .YW(YW)) u_ctrl (
    .clk, .rst_n, .frame_ready, .phase, .pass_idx, .first_pass, .base_disp,
    .out_en, .scan_valid, .scan_c, .scan_y, .census_end, .frame_done);

  census_board #(.IMG_W(IMG_W), .IMG_H(IMG_H), .FS_AW(FS_AW), .LEAD(NDISP-1),
                 .XW(XW), .YW(YW)) u_board1 (
    .clk, .rst_n, .in_valid, .in_ready, .in_left, .in_right, .frame_ready,
    .phase, .base_disp, .scan_valid, .scan_c, .scan_y, .census_end,
    .st_valid, .st_lvalid, .st_l_new, .st_l_old, .st_rvalid, .st_r_new,
    .st_r_old, .st_old_ok, .st_x, .st_y);

  disparity_board #(.IMG_W(IMG_W), .IMG_H(IMG_H), .FS_AW(FS_AW),
                    .XW(XW), .YW(YW)) u_board2 (
    .clk, .rst_n, .phase, .base_disp, .first_pass, .out_en, .scan_valid,
    .scan_c, .scan_y,
    .st_valid, .st_lvalid, .st_l_new, .st_l_old, .st_rvalid, .st_r_new,
    .st_r_old, .st_old_ok, .st_x, .st_y,
    .out_valid, .out_disp, .out_x, .out_y, .upd_write, .upd_improve);

endmodule
