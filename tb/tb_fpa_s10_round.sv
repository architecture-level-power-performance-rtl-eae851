// tb_fpa_s10_round: checks stage 10 against the reference adder: for finite
// operands the rounded word of the path in use, with its sign, must be the
// correctly rounded sum, and the path's inexact bit must match.
module tb_fpa_s10_round;
`include "fpa_stage_tb.svh"
  initial begin
    ref_t r;
    for (int i = 0; i < N_VEC; i++) begin
      next_vector();
      r = ref_add(a, b);
      if (!s10.byp) begin
        if (s10.c.close) begin
          `CHECK({s10.csign, s10.cres} == r.res && s10.cinx == r.inexact, "close rounding")
        end else if (!r.overflow) begin
          `CHECK({s10.c.sl, s10.fres} == r.res && s10.finx == r.inexact, "far rounding")
        end else begin
          `CHECK(s10.f_huge || s10.fres[30:23] == 8'hFF, "far overflow")
        end
      end
    end
    finish_tb();
  end
endmodule
