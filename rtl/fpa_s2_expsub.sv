// fpa_s2_expsub: stage 2 of the adder, the exponent subtractor.
//
// Computes the signed difference ea - eb of the effective exponents as a
// 9-bit two's complement number and forwards the unpacked operands.
// Combinational. Element and stage follow the data-flow graph; the width is
// the one binary32 needs.
module fpa_s2_expsub
  import fpa_pkg::*;
(
  input  s1_t s1,
  output s2_t s2
);

  always_comb begin
    s2.op   = s1;
    s2.dexp = {1'b0, s1.ea} - {1'b0, s1.eb};
  end

endmodule
