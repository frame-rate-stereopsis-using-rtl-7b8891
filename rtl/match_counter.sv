// match_counter: similarity of two census words.
//
// The two words are combined with exclusive-or and the zero bits of the
// result, i.e. the positions where both census words agree, are counted.
// This is the per-pixel term of the Hamming-distance matching measure,
// expressed as a count of matching bits so that a larger value means a
// better match. When `valid` is low (the partner pixel lies outside the
// image) the count is forced to zero, a choice of this design. Purely
// combinational.
module match_counter
  import stereo_pkg::*;
(
  input  census_t a,
  input  census_t b,
  input  logic    valid,
  output match_t  n_equal
);

  census_t same;

  always_comb begin
    same    = ~(a ^ b);
    n_equal = '0;
    if (valid)
      for (int i = 0; i < CENSUS_BITS; i++)
        n_equal = n_equal + match_t'(same[i]);
  end

endmodule
