// disparity_max: winner of the eight disparities evaluated in one pass.
//
// Returns the largest of N window sums and the index of the lane that holds
// it. Ties go to the lowest index, i.e. the smallest disparity, which is this
// design's choice. Purely combinational: a linear compare chain that a
// synthesis tool may rebalance.
module disparity_max
  import stereo_pkg::*;
#(
  parameter int unsigned N = NDISP
) (
  input  score_t                   scores [N],
  output score_t                   best_score,
  output logic [$clog2(N)-1:0]     best_idx
);

  always_comb begin
    best_score = scores[0];
    best_idx   = '0;
    for (int i = 1; i < N; i++)
      if (scores[i] > best_score) begin
        best_score = scores[i];
        best_idx   = ($clog2(N))'(i);
      end
  end

endmodule
