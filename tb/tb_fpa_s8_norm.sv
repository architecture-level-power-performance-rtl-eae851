// tb_fpa_s8_norm: checks stage 8: the left-shifted close-path significand
// and the far-path exponent for the overflow, lost-one, in-place and
// denormal cases.
module tb_fpa_s8_norm;
`include "fpa_stage_tb.svh"
  initial begin
    int e;
    for (int i = 0; i < N_VEC; i++) begin
      next_vector();
      `CHECK(s8.cnorm == 25'(s7.cdiff << s7.cshift), "barrel left")
      if (s7.fsum >= 28'h800_0000) e = int'(s7.c.el) + 1;
      else if (s7.c.eop && s7.fsum < 28'h400_0000) e = int'(s7.c.el) - 1;
      else if (s7.fsum >= 28'h400_0000) e = int'(s7.c.el);
      else e = 0;
      `CHECK(int'(s8.fexp) == e, "far exponent")
      `CHECK(s8.cexp == s7.cexp && s8.fsum == s7.fsum, "forwarded")
    end
    finish_tb();
  end
endmodule
