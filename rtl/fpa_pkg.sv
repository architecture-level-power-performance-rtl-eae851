// fpa_pkg: types shared by the stages of the two-path single-precision
// floating-point adder.
//
// The adder is cut into ten stages (plus the result integrator after the last
// one). Each stage boundary carries one struct, sN_t being everything that is
// alive just after stage N. Whether that struct is registered or passed
// through is decided per boundary by the pipeline stage algorithm in psa_pkg.
//
// Number format: IEEE 754 binary32. Operands are unpacked into a sign, an
// "effective" biased exponent (1 for denormals and zero) and a 24-bit
// significand with the hidden bit made explicit (0 for denormals and zero).
// The format, the rounding mode (round to nearest even) and the flag set are
// choices of this design; the stage split and the functional elements in each
// stage follow the ten-stage data-flow graph the design is built around.
package fpa_pkg;

  localparam int EXP_W  = 8;
  localparam int FRAC_W = 23;
  localparam int SIG_W  = FRAC_W + 1;    // with hidden bit
  localparam int FAR_W  = SIG_W + 3;     // significand, guard, round, sticky
  localparam int CLS_W  = SIG_W + 1;     // close path: significand and guard

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  // Operand class found by the denormal check.
  typedef struct packed {
    logic nan;
    logic snan;
    logic inf;
  } opclass_t;

  // Exception flags of one addition.
  typedef struct packed {
    logic invalid;
    logic overflow;
    logic underflow;
    logic inexact;
  } flags_t;

  // After stage 1: unpacked operands.
  typedef struct packed {
    logic             sa, sb;
    logic [EXP_W-1:0] ea, eb;
    logic [SIG_W-1:0] ma, mb;
    opclass_t         ca, cb;
  } s1_t;

  // After stage 2: plus exponent difference ea - eb.
  typedef struct packed {
    s1_t              op;
    logic [EXP_W:0]   dexp;   // two's complement, ea - eb
  } s2_t;

  // Sign and class information that travels to the bypass logic.
  typedef struct packed {
    logic     sa, sb;
    opclass_t ca, cb;
  } spec_t;

  // After stage 3: operands ordered by exponent, path decided.
  typedef struct packed {
    spec_t            spec;
    logic             sl;      // sign of the operand with the larger exponent
    logic [EXP_W-1:0] el;      // larger exponent
    logic [SIG_W-1:0] ml, ms;  // significands: larger / smaller exponent
    logic [EXP_W-1:0] d;       // |ea - eb|
    logic             eop;     // effective subtraction
    logic             close;   // close path: subtraction with d <= 1
  } s3_t;

  // Fields common to all later stages.
  typedef struct packed {
    spec_t            spec;
    logic             sl;
    logic [EXP_W-1:0] el;
    logic             eop;
    logic             close;
  } com_t;

  // After stage 4: close-path operands, far-path aligned operands.
  typedef struct packed {
    com_t             c;
    logic [CLS_W-1:0] cx, cy;   // close path, cy pre-aligned by 0 or 1 bit
    logic [FAR_W-1:0] fl, fs;   // far path, fs aligned with sticky in bit 0
  } s4_t;

  // After stage 5: both close-path differences, far-path adder inputs.
  typedef struct packed {
    com_t             c;
    logic [CLS_W:0]   cd1, cd2;  // cx - cy and cy - cx (MSB = borrow)
    logic             csign;     // sign of the close-path result
    logic [FAR_W-1:0] fl, fsc;   // fsc: fs, inverted for subtraction
  } s5_t;

  // After stage 6.
  typedef struct packed {
    com_t             c;
    logic [CLS_W-1:0] cdiff;     // non-negative close-path difference
    logic [4:0]       lz;        // its leading zeros (25 when zero)
    logic signed [EXP_W+1:0] cexp_t;  // el - lz, may go below 1
    logic             csign;
    logic             byp;       // special operands: bypass result valid
    logic [31:0]      byp_val;
    logic             byp_inv;   // invalid operation
    logic [FAR_W:0]   fsum;      // far-path sum with carry
  } s6_t;

  // After stage 7.
  typedef struct packed {
    com_t             c;
    logic [CLS_W-1:0] cdiff;
    logic [4:0]       cshift;    // left shift, limited by the exponent
    logic [EXP_W-1:0] cexp;      // close-path exponent field
    logic             csign;
    logic             byp;
    logic [31:0]      byp_val;
    logic             byp_inv;
    logic [FAR_W:0]   fsum;
    logic             f_ovf;     // sum overflowed into the carry bit
    logic             f_left;    // sum lost its leading one (one left shift)
  } s7_t;

  // After stage 8.
  typedef struct packed {
    com_t             c;
    logic [CLS_W-1:0] cnorm;     // normalised close-path significand + guard
    logic [EXP_W-1:0] cexp;
    logic             csign;
    logic             byp;
    logic [31:0]      byp_val;
    logic             byp_inv;
    logic [FAR_W:0]   fsum;
    logic             f_ovf, f_left;
    logic [EXP_W:0]   fexp;      // far-path exponent field before rounding
  } s8_t;

  // After stage 9.
  typedef struct packed {
    s8_t              r;
    logic             f_huge;    // far-path exponent out of range
  } s9_t;

  // After stage 10: both paths rounded and packed (without sign).
  typedef struct packed {
    com_t             c;
    logic             csign;
    logic [30:0]      cres;      // close path {exponent, fraction}
    logic             cinx;
    logic [30:0]      fres;      // far path {exponent, fraction}
    logic             finx;
    logic             f_huge;
    logic             byp;
    logic [31:0]      byp_val;
    logic             byp_inv;
  } s10_t;

  // Leading-zero count of a close-path difference (25 when it is zero).
  function automatic logic [4:0] lzc25(input logic [CLS_W-1:0] v);
    logic [4:0] n;
    logic       found;
    n = 5'(CLS_W);
    found = 1'b0;
    for (int i = CLS_W - 1; i >= 0; i--) begin
      if (!found && v[i]) begin
        n = 5'(CLS_W - 1 - i);
        found = 1'b1;
      end
    end
    return n;
  endfunction

endpackage
