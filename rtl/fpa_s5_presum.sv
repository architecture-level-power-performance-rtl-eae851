// fpa_s5_presum: stage 5 of the adder: close-path significand adder, final
// sign, and the far-path pre-significand adder.
//
// The close path forms both cx - cy and cy - cx with a borrow bit, so the
// result selector can later take the non-negative one without a comparison;
// the final-sign element derives the close-path result sign from the borrow
// (sign of l when cx >= cy, the opposite sign otherwise). The far-path
// pre-adder inverts the aligned operand for an effective subtraction (the
// +1 of the two's complement is added in stage 6). Combinational. Elements
// and stage follow the data-flow graph; the dual subtraction is how this
// design realises the close path.
module fpa_s5_presum
  import fpa_pkg::*;
(
  input  s4_t s4,
  output s5_t s5
);

  always_comb begin
    s5.c     = s4.c;
    s5.cd1   = {1'b0, s4.cx} - {1'b0, s4.cy};
    s5.cd2   = {1'b0, s4.cy} - {1'b0, s4.cx};
    s5.csign = s5.cd1[CLS_W] ? !s4.c.sl : s4.c.sl;
    s5.fl    = s4.fl;
    s5.fsc   = s4.c.eop ? ~s4.fs : s4.fs;
  end

endmodule
