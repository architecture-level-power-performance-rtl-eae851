// fpa_s7_prenorm: stage 7 of the adder: pre-barrel-left logic (close path)
// and the MO/M-1 generator (far path).
//
// Pre-barrel left: the normalising left shift is the leading-zero count,
// unless that would take the exponent below 1; then the shift stops at el - 1
// and the result is denormal (exponent field 0). Far path: the sum either
// overflowed into its carry bit (MO, shift right by one), lost its leading
// one in a subtraction (M-1, shift left by one), or is in place. An addition
// of two denormals that stays below the hidden bit is left as a denormal.
// Combinational. Elements and stage follow the data-flow graph; reading
// "MO/M-1" as these two normalisation cases is this design's interpretation.
module fpa_s7_prenorm
  import fpa_pkg::*;
(
  input  s6_t s6,
  output s7_t s7
);

  always_comb begin
    s7.c       = s6.c;
    s7.cdiff   = s6.cdiff;
    s7.csign   = s6.csign;
    s7.byp     = s6.byp;
    s7.byp_val = s6.byp_val;
    s7.byp_inv = s6.byp_inv;
    s7.fsum    = s6.fsum;

    if (s6.cexp_t >= 1 && s6.lz != 5'(CLS_W)) begin
      s7.cshift = s6.lz;
      s7.cexp   = s6.cexp_t[EXP_W-1:0];
    end else begin
      s7.cshift = 5'(s6.c.el - EXP_W'(1));
      s7.cexp   = '0;
    end

    s7.f_ovf  = s6.fsum[FAR_W];
    s7.f_left = !s6.fsum[FAR_W] && !s6.fsum[FAR_W-1] && s6.c.eop;
  end

endmodule
