// tb_fpa_s1_denormal: checks the denormal check (stage 1) on random and
// special operands: effective exponent, explicit hidden bit, sign and the
// NaN / signalling NaN / infinity classes, against IEEE 754 field rules.
module tb_fpa_s1_denormal;
`include "fpa_stage_tb.svh"

  function automatic void expect_op(input logic [31:0] x, input logic s,
                                    input logic [7:0] e, input logic [23:0] m,
                                    input opclass_t c, input string which);
    int ex;
    ex = int'(x[30:23]);
    `CHECK(s == x[31], {which, " sign"})
    `CHECK(int'(e) == ((ex == 0) ? 1 : ex), {which, " exponent"})
    `CHECK(m == {ex != 0, x[22:0]}, {which, " significand"})
    `CHECK(c.nan == (ex == 255 && x[22:0] != 0), {which, " nan"})
    `CHECK(c.snan == (ex == 255 && x[22:0] != 0 && !x[22]), {which, " snan"})
    `CHECK(c.inf == (ex == 255 && x[22:0] == 0), {which, " inf"})
  endfunction

  initial begin
    for (int i = 0; i < N_VEC; i++) begin
      next_vector();
      expect_op(a, s1.sa, s1.ea, s1.ma, s1.ca, "a");
      expect_op(b, s1.sb, s1.eb, s1.mb, s1.cb, "b");
    end
    finish_tb();
  end
endmodule
