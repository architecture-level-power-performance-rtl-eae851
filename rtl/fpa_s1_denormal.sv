// fpa_s1_denormal: stage 1 of the adder, the denormal check.
//
// Splits both binary32 operands into sign, exponent and significand. A
// denormal or zero operand gets the effective exponent 1 and a hidden bit of
// 0, so that later stages treat all finite operands alike. It also flags NaN
// (and signalling NaN) and infinity for the bypass logic. Purely
// combinational; the register after it is placed by the stage algorithm.
// The element and its stage come from the design's data-flow graph; the
// unpacking rules are standard IEEE 754 and this design's choice of encoding.
module fpa_s1_denormal
  import fpa_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output s1_t         s1
);

  function automatic void unpack(input logic [31:0] x, output logic s,
                                 output logic [EXP_W-1:0] e,
                                 output logic [SIG_W-1:0] m,
                                 output opclass_t c);
    logic exp_zero, exp_ones;
    exp_zero = (x[30:23] == '0);
    exp_ones = (x[30:23] == '1);
    s      = x[31];
    e      = exp_zero ? EXP_W'(1) : x[30:23];
    m      = {!exp_zero, x[22:0]};
    c.nan  = exp_ones && (x[22:0] != '0);
    c.snan = exp_ones && (x[22:0] != '0) && !x[22];
    c.inf  = exp_ones && (x[22:0] == '0);
  endfunction

  always_comb begin
    unpack(a, s1.sa, s1.ea, s1.ma, s1.ca);
    unpack(b, s1.sb, s1.eb, s1.mb, s1.cb);
  end

endmodule
