// tb_fpa_s6_sum: checks stage 6: |cx - cy|, its leading-zero count, the
// updated exponent, the zero sign, the bypass for NaN and infinity, and the
// far-path sum l + s or l - s (modulo 2^27 for a subtraction).
module tb_fpa_s6_sum;
`include "fpa_stage_tb.svh"
  initial begin
    int x, y, diff, lz;
    logic [27:0] fs_exp;
    bit nan_in, clash;
    for (int i = 0; i < N_VEC; i++) begin
      next_vector();
      x = int'(s4.cx);
      y = int'(s4.cy);
      diff = (x > y) ? x - y : y - x;
      lz = 25;
      while (lz > 0 && (diff >> (25 - lz)) != 0) lz--;
      `CHECK(int'(s6.cdiff) == diff, "close difference")
      `CHECK(int'(s6.lz) == lz, "leading zeros")
      `CHECK(int'(s6.cexp_t) == int'(s4.c.el) - lz, "exponent update")
      `CHECK(s6.csign == ((diff == 0) ? 1'b0 : s5.csign), "close sign")
      nan_in = (a[30:23] == 8'hFF && a[22:0] != 0) || (b[30:23] == 8'hFF && b[22:0] != 0);
      clash = (a[30:0] == 31'h7F80_0000) && (b[30:0] == 31'h7F80_0000) && (a[31] != b[31]);
      `CHECK(s6.byp == (a[30:23] == 8'hFF || b[30:23] == 8'hFF), "bypass taken")
      if (s6.byp) begin
        if (nan_in || clash) `CHECK(s6.byp_val == 32'h7FC0_0000, "bypass NaN")
        else `CHECK(s6.byp_val == ((a[30:23] == 8'hFF) ? a : b), "bypass infinity")
      end
      fs_exp = s4.c.eop ? {1'b0, 27'(s4.fl - s4.fs)} : 28'({1'b0, s4.fl} + {1'b0, s4.fs});
      `CHECK(s6.fsum == fs_exp, "far sum")
    end
    finish_tb();
  end
endmodule
