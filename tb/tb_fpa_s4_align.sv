// tb_fpa_s4_align: checks stage 4. Close path: l with a guard bit, s
// pre-shifted by d mod 2. Far path: s shifted right by d in a 128-bit field,
// top 26 bits kept and everything below ORed into the sticky bit.
module tb_fpa_s4_align;
`include "fpa_stage_tb.svh"
  initial begin
    logic [127:0] full;
    logic [25:0]  top;
    logic         st;
    for (int i = 0; i < N_VEC; i++) begin
      next_vector();
      `CHECK(s4.cx == {s3.ml, 1'b0}, "close x")
      `CHECK(s4.cy == (s3.d[0] ? {1'b0, s3.ms} : {s3.ms, 1'b0}), "close y")
      `CHECK(s4.fl == {s3.ml, 3'b000}, "far l")
      if (s3.d >= 100) begin
        top = '0;
        st = |s3.ms;
      end else begin
        full = {s3.ms, 104'd0} >> s3.d;
        top = full[127:102];
        st = |full[101:0];
      end
      `CHECK(s4.fs == {top, st}, "far aligned with sticky")
      `CHECK(s4.c.el == s3.el && s4.c.sl == s3.sl && s4.c.eop == s3.eop && s4.c.close == s3.close, "common")
    end
    finish_tb();
  end
endmodule
