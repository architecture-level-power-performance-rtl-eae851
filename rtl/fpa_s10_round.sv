// fpa_s10_round: stage 10 of the adder, the final 1-bit shift and rounding.
//
// Far path: the sum is shifted right by one after an overflow, left by one
// after a lost leading one, or taken as it is; the two bits below the 24-bit
// significand become the guard bit and the sticky bit. Close path: the
// normalised significand has only a guard bit. Both are rounded to nearest,
// ties to even, by adding the round-up bit to the packed {exponent, fraction}
// word, so a carry out of the fraction moves into the exponent (denormal to
// normal, or the largest finite number to infinity). The inexact bit of each
// path is its guard OR sticky. Combinational. Element and stage follow the
// data-flow graph; rounding both paths here is this design's choice.
module fpa_s10_round
  import fpa_pkg::*;
(
  input  s9_t  s9,
  output s10_t s10
);

  logic [SIG_W-1:0] fsig, csig;
  logic             fg, fst, cg;

  always_comb begin
    // final shift (far path)
    if (s9.r.f_ovf) begin
      fsig = s9.r.fsum[FAR_W -: SIG_W];
      fg   = s9.r.fsum[3];
      fst  = |s9.r.fsum[2:0];
    end else if (s9.r.f_left) begin
      fsig = s9.r.fsum[FAR_W-2 -: SIG_W];
      fg   = s9.r.fsum[1];
      fst  = s9.r.fsum[0];
    end else begin
      fsig = s9.r.fsum[FAR_W-1 -: SIG_W];
      fg   = s9.r.fsum[2];
      fst  = |s9.r.fsum[1:0];
    end
    csig = s9.r.cnorm[CLS_W-1 -: SIG_W];
    cg   = s9.r.cnorm[0];

    s10.c       = s9.r.c;
    s10.csign   = s9.r.csign;
    s10.fres    = {s9.r.fexp[EXP_W-1:0], fsig[FRAC_W-1:0]} +
                  31'(fg && (fst || fsig[0]));
    s10.finx    = fg || fst;
    s10.cres    = {s9.r.cexp, csig[FRAC_W-1:0]} + 31'(cg && csig[0]);
    s10.cinx    = cg;
    s10.f_huge  = s9.f_huge;
    s10.byp     = s9.r.byp;
    s10.byp_val = s9.r.byp_val;
    s10.byp_inv = s9.r.byp_inv;
  end

endmodule
