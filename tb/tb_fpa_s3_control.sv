// tb_fpa_s3_control: checks the control logic (stage 3): operand order by
// exponent, |ea - eb|, effective subtraction and the close/far path choice.
module tb_fpa_s3_control;
`include "fpa_stage_tb.svh"
  initial begin
    int da;
    bit a_big, eop;
    for (int i = 0; i < N_VEC; i++) begin
      next_vector();
      da = int'(s1.ea) - int'(s1.eb);
      a_big = (da >= 0);
      eop = s1.sa ^ s1.sb;
      `CHECK(s3.el == (a_big ? s1.ea : s1.eb), "larger exponent")
      `CHECK(s3.ml == (a_big ? s1.ma : s1.mb) && s3.ms == (a_big ? s1.mb : s1.ma), "order")
      `CHECK(s3.sl == (a_big ? s1.sa : s1.sb), "sign of l")
      `CHECK(int'(s3.d) == (a_big ? da : -da), "distance")
      `CHECK(s3.eop == eop, "effective operation")
      `CHECK(s3.close == (eop && (da >= -1 && da <= 1)), "path")
      `CHECK(s3.spec.ca == s1.ca && s3.spec.cb == s1.cb && s3.spec.sa == s1.sa && s3.spec.sb == s1.sb, "spec")
    end
    finish_tb();
  end
endmodule
