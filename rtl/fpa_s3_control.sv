// fpa_s3_control: stage 3 of the adder, the control logic.
//
// Orders the operands by exponent (the one with the larger exponent, or a if
// they are equal, becomes "l"), takes the absolute exponent difference d,
// decides whether the operation is an effective subtraction, and chooses the
// path: the close path handles effective subtractions with d <= 1, where
// massive cancellation can happen; the far path handles everything else.
// Combinational. The two-path split follows the adder architecture; ordering
// by exponent only (equal exponents are sorted out later by the close path
// computing both differences) is this design's choice.
module fpa_s3_control
  import fpa_pkg::*;
(
  input  s2_t s2,
  output s3_t s3
);

  logic a_big;

  always_comb begin
    a_big = !s2.dexp[EXP_W];                 // ea >= eb
    s3.spec.sa = s2.op.sa;
    s3.spec.sb = s2.op.sb;
    s3.spec.ca = s2.op.ca;
    s3.spec.cb = s2.op.cb;
    s3.sl    = a_big ? s2.op.sa : s2.op.sb;
    s3.el    = a_big ? s2.op.ea : s2.op.eb;
    s3.ml    = a_big ? s2.op.ma : s2.op.mb;
    s3.ms    = a_big ? s2.op.mb : s2.op.ma;
    s3.d     = a_big ? s2.dexp[EXP_W-1:0] : EXP_W'(-s2.dexp);
    s3.eop   = s2.op.sa ^ s2.op.sb;
    s3.close = s3.eop && (s3.d <= EXP_W'(1));
  end

endmodule
