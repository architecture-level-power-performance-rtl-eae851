// fpa_s9_range: stage 9 of the adder, the underflow/overflow check.
//
// Flags a far-path exponent field of 255 or more before rounding: the result
// then overflows to infinity. Underflow needs no check here because a
// denormal result already has its exponent field forced to 0 in stages 7 and
// 8; the underflow flag is raised from the rounded result in stage 11.
// Combinational. Element and stage follow the data-flow graph.
module fpa_s9_range
  import fpa_pkg::*;
(
  input  s8_t s8,
  output s9_t s9
);

  always_comb begin
    s9.r      = s8;
    s9.f_huge = (s8.fexp >= 9'd255);
  end

endmodule
