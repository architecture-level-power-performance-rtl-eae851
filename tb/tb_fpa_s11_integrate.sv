// tb_fpa_s11_integrate: checks the result integrator, the last element: the
// packed result and all four flags must equal the reference adder's, on
// directed corner cases (some with hand-worked results) and random pairs.
module tb_fpa_s11_integrate;
`include "fpa_stage_tb.svh"
  // directed corner cases: {a, b}
  localparam logic [63:0] DIRECTED [14] = '{
    {32'h3F80_0000, 32'h3380_0000},   // 1 + 2^-24: tie, stays even
    {32'h3F80_0001, 32'h3380_0000},   // tie with odd LSB: rounds up
    {32'h3F80_0000, 32'hB380_0000},   // 1 - 2^-24: far path, lost leading one
    {32'h7F7F_FFFF, 32'h7F7F_FFFF},   // overflow to infinity
    {32'h7F7F_FFFF, 32'h7380_0000},   // max + half ulp: tie rounds to infinity
    {32'h007F_FFFF, 32'h0000_0001},   // denormal + denormal = smallest normal
    {32'h0080_0000, 32'h8000_0001},   // normal - denormal = denormal
    {32'h3F80_0000, 32'hBF80_0000},   // x - x = +0
    {32'h8000_0000, 32'h8000_0000},   // -0 + -0 = -0
    {32'h0000_0000, 32'h8000_0000},   // +0 + -0 = +0
    {32'h7F80_0000, 32'hFF80_0000},   // inf - inf: invalid
    {32'h7F80_0001, 32'h3F80_0000},   // signalling NaN: invalid
    {32'hFF80_0000, 32'h3F80_0000},   // -inf + 1 = -inf
    {32'h4B7F_FFFF, 32'h3F00_0000}    // 2^24-1 + 0.5: carry out, tie to even
  };

  initial begin
    ref_t r;
    for (int i = 0; i < 14; i++) begin
      @(negedge clk);
      {a, b} = DIRECTED[i];
      #1;
      r = ref_add(a, b);
      `CHECK(result == r.res, "directed result")
      `CHECK(flags == {r.invalid, r.overflow, r.underflow, r.inexact}, "directed flags")
    end
    // hand-worked values for a few of them
    {a, b} = DIRECTED[0]; #1 `CHECK(result == 32'h3F80_0000 && flags.inexact, "1 + 2^-24")
    {a, b} = DIRECTED[1]; #1 `CHECK(result == 32'h3F80_0002, "tie to even up")
    {a, b} = DIRECTED[3]; #1 `CHECK(result == 32'h7F80_0000 && flags.overflow, "overflow")
    {a, b} = DIRECTED[5]; #1 `CHECK(result == 32'h0080_0000 && !flags.inexact, "denormals to normal")
    {a, b} = DIRECTED[7]; #1 `CHECK(result == 32'h0000_0000, "x - x")
    {a, b} = DIRECTED[8]; #1 `CHECK(result == 32'h8000_0000, "-0 + -0")
    {a, b} = DIRECTED[10]; #1 `CHECK(result == 32'h7FC0_0000 && flags.invalid, "inf - inf")
    {a, b} = DIRECTED[13]; #1 `CHECK(result == 32'h4B80_0000 && flags.inexact, "carry-out tie")
    for (int i = 0; i < N_VEC; i++) begin
      next_vector();
      r = ref_add(a, b);
      `CHECK(result == r.res, "result")
      `CHECK(flags == {r.invalid, r.overflow, r.underflow, r.inexact}, "flags")
    end
    finish_tb();
  end
endmodule
