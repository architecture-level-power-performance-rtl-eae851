// fpa_s6_sum: stage 6 of the adder: exponent update, result select, leading
// zero counter, bypass logic and the far-path significand adder.
//
// Close path: the result selector keeps the non-negative difference, the
// leading-zero counter measures it (25 for zero), and the exponent update
// forms el - lz, which may fall below 1 when the result is denormal. A zero
// difference takes the sign +0. Bypass: NaN operands and infinities produce
// the result directly (quiet NaN 0x7FC00000 for NaN inputs and inf - inf,
// which together with signalling NaN inputs is flagged invalid). Far path:
// the significand adder adds l and the (inverted) aligned operand with the
// carry-in of the effective subtraction; for a subtraction the carry out is
// dropped, so bit 27 is the overflow of an addition only. Combinational.
// Elements and stage follow the data-flow graph; the special-value rules are
// IEEE 754 default behaviour chosen by this design.
module fpa_s6_sum
  import fpa_pkg::*;
(
  input  s5_t s5,
  output s6_t s6
);

  logic [FAR_W:0] raw;
  logic           any_nan, inf_clash;

  always_comb begin
    s6.c = s5.c;

    // result select, leading-zero counter, exponent update (close path)
    s6.cdiff  = s5.cd1[CLS_W] ? s5.cd2[CLS_W-1:0] : s5.cd1[CLS_W-1:0];
    s6.lz     = lzc25(s6.cdiff);
    s6.cexp_t = $signed({2'b00, s5.c.el}) - $signed({5'b00000, s6.lz});
    s6.csign  = (s6.cdiff == '0) ? 1'b0 : s5.csign;

    // bypass logic
    any_nan   = s5.c.spec.ca.nan || s5.c.spec.cb.nan;
    inf_clash = s5.c.spec.ca.inf && s5.c.spec.cb.inf &&
                (s5.c.spec.sa != s5.c.spec.sb);
    s6.byp     = any_nan || s5.c.spec.ca.inf || s5.c.spec.cb.inf;
    s6.byp_inv = s5.c.spec.ca.snan || s5.c.spec.cb.snan || inf_clash;
    if (any_nan || inf_clash)  s6.byp_val = QNAN;
    else if (s5.c.spec.ca.inf) s6.byp_val = {s5.c.spec.sa, 8'hFF, 23'd0};
    else                       s6.byp_val = {s5.c.spec.sb, 8'hFF, 23'd0};

    // significand adder (far path)
    raw     = {1'b0, s5.fl} + {1'b0, s5.fsc} + (FAR_W+1)'(s5.c.eop);
    s6.fsum = s5.c.eop ? {1'b0, raw[FAR_W-1:0]} : raw;
  end

endmodule
