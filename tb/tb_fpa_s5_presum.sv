// tb_fpa_s5_presum: checks stage 5: both close-path differences with their
// borrow, the close-path sign, and the far-path operand inversion.
module tb_fpa_s5_presum;
`include "fpa_stage_tb.svh"
  initial begin
    int x, y;
    for (int i = 0; i < N_VEC; i++) begin
      next_vector();
      x = int'(s4.cx);
      y = int'(s4.cy);
      `CHECK(int'($signed(s5.cd1)) == x - y, "cx - cy")
      `CHECK(int'($signed(s5.cd2)) == y - x, "cy - cx")
      `CHECK(s5.csign == ((x < y) ? !s4.c.sl : s4.c.sl), "close sign")
      `CHECK(s5.fsc == (s4.c.eop ? ~s4.fs : s4.fs), "pre-adder")
      `CHECK(s5.fl == s4.fl && s5.c == s4.c, "forwarded")
    end
    finish_tb();
  end
endmodule
