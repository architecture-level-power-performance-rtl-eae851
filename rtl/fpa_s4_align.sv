// fpa_s4_align: stage 4 of the adder: data select, barrel right shifter and
// sticky bit.
//
// Close path (data select): places both significands in a 25-bit field with
// one guard bit; the smaller-exponent operand is pre-aligned right by 0 or 1
// bit. Far path: the smaller-exponent significand is shifted right by d into
// a 26-bit field (significand, guard, round) and everything shifted out is
// ORed into a sticky bit kept as bit 0. Shifts of 27 or more leave only the
// sticky bit, so d is clamped to 31. Combinational. The three elements and
// their stage follow the data-flow graph; field widths are this design's.
module fpa_s4_align
  import fpa_pkg::*;
(
  input  s3_t s3,
  output s4_t s4
);

  logic [4:0]                 sh;
  logic [SIG_W+FAR_W-2:0]     wide;   // 50 bits: significand then 26 zeros

  always_comb begin
    s4.c.spec  = s3.spec;
    s4.c.sl    = s3.sl;
    s4.c.el    = s3.el;
    s4.c.eop   = s3.eop;
    s4.c.close = s3.close;

    // data select (close path)
    s4.cx = {s3.ml, 1'b0};
    s4.cy = s3.d[0] ? {1'b0, s3.ms} : {s3.ms, 1'b0};

    // barrel right shifter and sticky bit (far path)
    sh    = (s3.d > EXP_W'(31)) ? 5'd31 : s3.d[4:0];
    wide  = {s3.ms, {(FAR_W-1){1'b0}}} >> sh;
    s4.fl = {s3.ml, 3'b000};
    s4.fs = {wide[SIG_W+FAR_W-2 -: FAR_W-1], |wide[SIG_W-1:0]};
  end

endmodule
