// fpa_s11_integrate: the result integrator that closes the adder.
//
// Chooses the bypass result for NaN and infinite operands, otherwise the
// close- or far-path result with its sign. A far-path exponent that was out
// of range, or that rounding carried to 255, gives a correctly signed
// infinity. It also produces the flags: invalid (signalling NaN operand or
// inf - inf), overflow, inexact, and underflow, which this design defines as
// an inexact result whose exponent field is 0 (tininess after rounding).
// Combinational; the valid bit is handled by the enclosing pipeline. The
// element comes from the design's data-flow graph; the flag rules are this
// design's.
module fpa_s11_integrate
  import fpa_pkg::*;
(
  input  s10_t        s10,
  output logic [31:0] result,
  output flags_t      flags
);

  always_comb begin
    flags = '0;
    if (s10.byp) begin
      result        = s10.byp_val;
      flags.invalid = s10.byp_inv;
    end else if (s10.c.close) begin
      result        = {s10.csign, s10.cres};
      flags.inexact = s10.cinx;
    end else if (s10.f_huge || s10.fres[30:23] == 8'hFF) begin
      result         = {s10.c.sl, 8'hFF, 23'd0};
      flags.overflow = 1'b1;
      flags.inexact  = 1'b1;
    end else begin
      result        = {s10.c.sl, s10.fres};
      flags.inexact = s10.finx;
    end
    flags.underflow = !s10.byp && flags.inexact && (result[30:23] == 8'd0);
  end

endmodule
