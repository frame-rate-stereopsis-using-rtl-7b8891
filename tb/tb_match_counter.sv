// tb_match_counter: random census pairs; the count of equal bits is compared
// with a bit-by-bit count, and an invalid partner must give zero.
module tb_match_counter;
  import stereo_pkg::*;

  int checks = 0, failures = 0;
  census_t a, b;
  logic    valid;
  match_t  n;

  match_counter dut (.a, .b, .valid, .n_equal(n));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int i = 0; i < 2000; i++) begin
      a = census_t'($urandom);
      b = (i % 7 == 0) ? a : census_t'($urandom);
      if (i % 11 == 0) b = ~a;
      valid = (i % 5) != 0;
      #1;
      exp = 0;
      if (valid) for (int k = 0; k < CENSUS_BITS; k++) exp += (a[k] == b[k]);
      checks++;
      if (n != match_t'(exp)) begin
        failures++;
        if (failures < 10) $display("a=%h b=%h v=%b got %0d exp %0d", a, b, valid, n, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
