// fpa_ref_pkg: reference model and stimulus helpers for the adder testbenches.
//
// The reference adds two binary32 numbers through double precision: each
// operand is converted exactly to a real, the two are added (a double sum of
// two binary32 values rounds correctly to binary32 after a second rounding),
// and the sum is rounded to binary32, nearest even, from its IEEE double bit
// pattern. The part of the exact sum lost by the double addition is
// recovered with the two-sum method and only feeds the inexact flag. Special values follow IEEE 754 defaults with a canonical quiet
// NaN 0x7FC00000. The flags are defined as in the adder: invalid (signalling
// NaN operand or inf - inf), overflow (finite operands, infinite result),
// inexact, and underflow (inexact with a zero exponent field).
package fpa_ref_pkg;

  typedef struct packed {
    logic [31:0] res;
    logic        invalid, overflow, underflow, inexact;
  } ref_t;

  function automatic real pow2(input int n);
    real r;
    r = 1.0;
    for (int i = 0; i < n; i++) r = r * 2.0;
    for (int i = 0; i > n; i--) r = r / 2.0;
    return r;
  endfunction

  function automatic real f2r(input logic [31:0] x);
    real r;
    if (x[30:23] == 8'd0) r = real'(x[22:0]) * pow2(-149);
    else r = real'({1'b1, x[22:0]}) * pow2(int'(x[30:23]) - 150);
    return x[31] ? -r : r;
  endfunction

  // Round a real to binary32, nearest even; returns bits and inexact.
  function automatic logic [32:0] r2f(input real r);
    logic [63:0] d;
    logic [52:0] m;
    logic [52:0] rem;
    logic [52:0] half;
    logic [23:0] sig;
    logic [30:0] packed_v;
    int          e, sh;
    logic        up, inx;
    d = $realtobits(r);
    if (d[62:0] == '0) return {1'b0, d[63], 31'd0};
    m  = {1'b1, d[51:0]};
    e  = int'(d[62:52]) - 1023 + 127;
    sh = (e >= 1) ? 29 : 29 + 1 - e;
    if (sh > 53) begin
      sig = '0; rem = m; half = 53'd1 << 52; up = 1'b0;  // far below half an ulp
      inx = 1'b1;
    end else begin
      sig  = 24'(m >> sh);
      rem  = m & ((53'd1 << sh) - 1);
      half = 53'd1 << (sh - 1);
      up   = (rem > half) || (rem == half && sig[0]);
      inx  = (rem != 0);
    end
    if (e >= 1) packed_v = {8'(e), sig[22:0]} + 31'(up);
    else        packed_v = {8'd0, sig[22:0]} + 31'(up);
    if (e >= 255 || packed_v[30:23] == 8'hFF) packed_v = {8'hFF, 23'd0};
    return {inx, d[63], packed_v};
  endfunction

  function automatic ref_t ref_add(input logic [31:0] a, input logic [31:0] b);
    ref_t o;
    logic a_nan, b_nan, a_inf, b_inf;
    logic [32:0] f;
    real x, y, s, bv, err;
    o = '0;
    a_nan = (a[30:23] == 8'hFF) && (a[22:0] != 0);
    b_nan = (b[30:23] == 8'hFF) && (b[22:0] != 0);
    a_inf = (a[30:23] == 8'hFF) && (a[22:0] == 0);
    b_inf = (b[30:23] == 8'hFF) && (b[22:0] == 0);
    if (a_nan || b_nan) begin
      o.res = 32'h7FC0_0000;
      o.invalid = (a_nan && !a[22]) || (b_nan && !b[22]);
    end else if (a_inf && b_inf && (a[31] != b[31])) begin
      o.res = 32'h7FC0_0000;
      o.invalid = 1'b1;
    end else if (a_inf) o.res = a;
    else if (b_inf) o.res = b;
    else begin
      // two-sum: err is what the double addition lost
      x = f2r(a);
      y = f2r(b);
      s = x + y;
      bv = s - x;
      err = (x - (s - bv)) + (y - bv);
      f = r2f(s);
      if (err != 0.0) f[32] = 1'b1;
      o.res = f[31:0];
      // exact zero sum: +0 unless both operands are -0
      if (f[30:0] == 0 && !f[32]) o.res[31] = a[31] & b[31];
      o.inexact   = f[32];
      o.overflow  = (o.res[30:23] == 8'hFF);
      if (o.overflow) o.inexact = 1'b1;
      o.underflow = o.inexact && (o.res[30:23] == 8'd0);
    end
    return o;
  endfunction

  // Random operand pair biased towards the interesting cases: close
  // exponents, cancellation, denormals, extremes and special values.
  function automatic logic [63:0] rand_pair();
    logic [31:0] a, b;
    int unsigned kind;
    a = $urandom();
    b = $urandom();
    kind = $urandom_range(0, 11);
    case (kind)
      0, 1: b[30:23] = a[30:23];                                   // d = 0
      2, 3: b[30:23] = a[30:23] + 8'(($urandom_range(0, 1) != 0) ? 1 : -1);
      4:    begin b = a ^ 32'h8000_0000; b[3:0] = 4'($urandom()); end  // cancellation
      5:    begin a[30:23] = 8'($urandom_range(0, 2)); b[30:23] = 8'($urandom_range(0, 2)); end
      6:    begin a[30:23] = 8'($urandom_range(250, 254)); b[30:23] = 8'($urandom_range(250, 254)); end
      7:    b[30:23] = a[30:23] - 8'($urandom_range(2, 30));
      8:    case ($urandom_range(0, 4))
              0: a = {a[31], 8'hFF, 23'd0};
              1: a = {a[31], 8'hFF, 1'b1, a[21:0]};
              2: a = {a[31], 8'hFF, 1'b0, a[21:1], 1'b1};
              3: a = {a[31], 31'd0};
              default: begin a = {a[31], 8'hFF, 23'd0}; b = {b[31], 8'hFF, 23'd0}; end
            endcase
      9:    begin b[30:23] = a[30:23]; b[31] = !a[31]; b[22:16] = a[22:16]; end
      default: ;
    endcase
    if (a[30:23] == 8'hFF && kind != 8) a[30] = 1'b0;
    if (b[30:23] == 8'hFF && kind != 8) b[30] = 1'b0;
    return {a, b};
  endfunction

endpackage
