// tb_fpa_s9_range: checks stage 9: the out-of-range flag must be set exactly
// for far-path exponents of 255 and above; all else passes on unchanged.
// Operands with large exponents are mixed in so that the flag is exercised.
module tb_fpa_s9_range;
`include "fpa_stage_tb.svh"
  initial begin
    int n_huge;
    n_huge = 0;
    for (int i = 0; i < N_VEC; i++) begin
      next_vector();
      `CHECK(s9.f_huge == (int'(s8.fexp) >= 255), "range")
      `CHECK(s9.r == s8, "forwarded")
      if (s9.f_huge) n_huge++;
    end
    `CHECK(n_huge > 0, "out-of-range case seen")
    finish_tb();
  end
endmodule
