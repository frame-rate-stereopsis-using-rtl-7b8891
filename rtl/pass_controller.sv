// pass_controller: sequences the passes of one stereo frame and generates the
// raster pointers shared by both boards.
//
// One frame takes five passes: a census pass, in which the first board turns
// the stored left and right images into census words, and four matching
// passes, each comparing eight disparities (0-7, 8-15, 16-23, 24-31). The
// disparity image of a frame is written out during the census pass of the
// next frame; if no new frame is waiting, a separate output pass does it.
// Image input runs in the background whenever the census pass is not reading
// the input stores.
//
// Every pass scans the image in raster order, one pointer step per clock,
// then waits DRAIN clocks so that the pipelines empty before the stores are
// switched. Census and output passes scan IMG_W columns per line; matching
// passes scan IMG_W + LEAD, the first LEAD columns of every line only
// pre-loading the left-image delay line. At 256x256 a matching pass takes
// 256*263 + DRAIN cycles, 6.73 ms at 10 MHz. The pass order follows the
// original; the lead-in, the drain and the separate output pass are this
// design's choices. scan_c, scan_y, phase and pass_idx are registered;
// base_disp is pass_idx * 8, so its three low bits are always zero.
module pass_controller
  import stereo_pkg::*;
#(
  parameter int unsigned IMG_W = 256,
  parameter int unsigned IMG_H = 256,
  parameter int unsigned LEAD  = NDISP - 1,
  parameter int unsigned DRAIN = 8,
  parameter int unsigned XW    = $clog2(IMG_W),
  parameter int unsigned YW    = $clog2(IMG_H)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  frame_ready,  // a complete input frame is stored
  output phase_e                phase,
  output logic [1:0]            pass_idx,     // matching pass number
  output logic                  first_pass,
  output disp_t                 base_disp,    // smallest disparity of this pass
  output logic                  out_en,       // disparity output runs this pass
  output logic                  scan_valid,
  output logic [XW:0]           scan_c,
  output logic [YW-1:0]         scan_y,
  output logic                  census_end,   // pulse: input stores are free again
  output logic                  frame_done    // pulse: last matching pass finished
);

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_DRAIN} state_e;

  state_e                     state;
  logic                       pending;        // a finished disparity image waits
  logic [$clog2(DRAIN+1)-1:0] drain_cnt;
  logic [XW:0]                row_last;

  assign row_last   = (phase == PH_MATCH) ? (XW+1)'(IMG_W + LEAD - 1) : (XW+1)'(IMG_W - 1);
  assign first_pass = (pass_idx == 2'd0);
  assign base_disp  = disp_t'(pass_idx) * disp_t'(NDISP);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      phase      <= PH_IDLE;
      pass_idx   <= '0;
      pending    <= 1'b0;
      out_en     <= 1'b0;
      scan_valid <= 1'b0;
      scan_c     <= '0;
      scan_y     <= '0;
      drain_cnt  <= '0;
      census_end <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      census_end <= 1'b0;
      frame_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          phase <= PH_IDLE;
          out_en <= 1'b0;
          if (frame_ready) begin
            phase      <= PH_CENSUS;
            out_en     <= pending;
            pending    <= 1'b0;
            state      <= S_SCAN;
            scan_valid <= 1'b1;
            scan_c     <= '0;
            scan_y     <= '0;
          end else if (pending) begin
            phase      <= PH_OUTPUT;
            out_en     <= 1'b1;
            pending    <= 1'b0;
            state      <= S_SCAN;
            scan_valid <= 1'b1;
            scan_c     <= '0;
            scan_y     <= '0;
          end
        end
        S_SCAN: begin
          if (scan_c == row_last) begin
            scan_c <= '0;
            if (scan_y == YW'(IMG_H - 1)) begin
              scan_valid <= 1'b0;
              state      <= S_DRAIN;
              drain_cnt  <= '0;
            end else begin
              scan_y <= scan_y + 1'b1;
            end
          end else begin
            scan_c <= scan_c + 1'b1;
          end
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (drain_cnt == ($clog2(DRAIN+1))'(DRAIN - 1)) begin
            scan_c <= '0;
            scan_y <= '0;
            out_en <= 1'b0;
            unique case (phase)
              PH_CENSUS: begin
                census_end <= 1'b1;
                phase      <= PH_MATCH;
                pass_idx   <= '0;
                state      <= S_SCAN;
                scan_valid <= 1'b1;
              end
              PH_MATCH: begin
                if (pass_idx == 2'(NPASS - 1)) begin
                  frame_done <= 1'b1;
                  pending    <= 1'b1;
                  pass_idx   <= '0;
                  phase      <= PH_IDLE;
                  state      <= S_IDLE;
                end else begin
                  pass_idx   <= pass_idx + 1'b1;
                  state      <= S_SCAN;
                  scan_valid <= 1'b1;
                end
              end
              default: begin
                phase <= PH_IDLE;
                state <= S_IDLE;
              end
            endcase
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
