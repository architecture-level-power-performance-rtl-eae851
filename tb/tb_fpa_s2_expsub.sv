// tb_fpa_s2_expsub: checks the exponent subtractor (stage 2): the 9-bit
// difference must equal ea - eb as an integer, and the operands must pass on.
module tb_fpa_s2_expsub;
`include "fpa_stage_tb.svh"
  initial begin
    for (int i = 0; i < N_VEC; i++) begin
      next_vector();
      `CHECK(int'($signed(s2.dexp)) == int'(s1.ea) - int'(s1.eb), "difference")
      `CHECK(s2.op == s1, "operands forwarded")
    end
    finish_tb();
  end
endmodule
