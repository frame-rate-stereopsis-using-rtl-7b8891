// tb_disparity_max: random and tied score vectors; the maximum and the lowest
// index holding it are compared with a reference scan.
module tb_disparity_max;
  import stereo_pkg::*;

  int checks = 0, failures = 0;
  score_t scores [NDISP];
  score_t best;
  logic [$clog2(NDISP)-1:0] idx;

  disparity_max #(.N(NDISP)) dut (.scores, .best_score(best), .best_idx(idx));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int eb, ei;
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < NDISP; i++)
        scores[i] = (t % 3 == 0) ? score_t'($urandom_range(0, 3)) : score_t'($urandom_range(0, 1815));
      #1;
      eb = -1; ei = 0;
      for (int i = 0; i < NDISP; i++)
        if (int'(scores[i]) > eb) begin eb = scores[i]; ei = i; end
      checks++;
      if (int'(best) != eb || int'(idx) != ei) begin
        failures++;
        if (failures < 10) $display("t=%0d got %0d@%0d exp %0d@%0d", t, best, idx, eb, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
