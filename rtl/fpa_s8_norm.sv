// fpa_s8_norm: stage 8 of the adder: barrel left shifter (close path) and
// exponent subtractor (far path).
//
// The close-path difference is shifted left by the amount found in stage 7,
// giving a 24-bit significand plus one guard bit. The far-path exponent field
// becomes el + 1 after an overflow, el - 1 after a lost leading one, el when
// the sum is in place, and 0 when it is a denormal (no hidden bit). It is
// kept 9 bits wide so an out-of-range value can be seen in stage 9.
// Combinational. Elements and stage follow the data-flow graph.
module fpa_s8_norm
  import fpa_pkg::*;
(
  input  s7_t s7,
  output s8_t s8
);

  always_comb begin
    s8.c       = s7.c;
    s8.cnorm   = s7.cdiff << s7.cshift;
    s8.cexp    = s7.cexp;
    s8.csign   = s7.csign;
    s8.byp     = s7.byp;
    s8.byp_val = s7.byp_val;
    s8.byp_inv = s7.byp_inv;
    s8.fsum    = s7.fsum;
    s8.f_ovf   = s7.f_ovf;
    s8.f_left  = s7.f_left;
    if (s7.f_ovf)                 s8.fexp = {1'b0, s7.c.el} + 9'd1;
    else if (s7.f_left)           s8.fexp = {1'b0, s7.c.el} - 9'd1;
    else if (s7.fsum[FAR_W-1])    s8.fexp = {1'b0, s7.c.el};
    else                          s8.fexp = '0;
  end

endmodule
