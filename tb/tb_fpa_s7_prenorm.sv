// tb_fpa_s7_prenorm: checks stage 7 by what its outputs must achieve. Close
// path: shifting the difference by cshift must give a leading one exactly
// when the exponent field is non-zero, with exponent el - cshift, and a
// denormal must use the largest shift the exponent allows. Far path: the
// overflow and lost-leading-one cases must match the size of the sum.
module tb_fpa_s7_prenorm;
`include "fpa_stage_tb.svh"
  initial begin
    logic [24:0] sh;
    for (int i = 0; i < N_VEC; i++) begin
      next_vector();
      sh = s6.cdiff << s7.cshift;
      if (s6.cdiff == 0) begin
        `CHECK(s7.cexp == 0, "zero difference exponent")
      end else if (s7.cexp != 0) begin
        `CHECK(sh[24] && (int'(s7.cexp) == int'(s6.c.el) - int'(s7.cshift)), "normal close result")
      end else begin
        `CHECK(!sh[24] && int'(s7.cshift) == int'(s6.c.el) - 1, "denormal close result")
      end
      `CHECK(s7.f_ovf == (s6.fsum >= 28'h800_0000), "far overflow")
      `CHECK(s7.f_left == (s6.c.eop && s6.fsum < 28'h400_0000), "far lost leading one")
      `CHECK(s7.fsum == s6.fsum && s7.cdiff == s6.cdiff && s7.byp == s6.byp, "forwarded")
    end
    finish_tb();
  end
endmodule
