// fpa_psa_adder: pipelined binary32 floating-point adder whose pipeline
// registers are placed by the pipeline stage algorithm (PSA).
//
// The adder is a two-path design (a close path for effective subtractions of
// operands whose exponents differ by at most one, a far path for everything
// else, and a bypass for NaN and infinity) built from 21 functional elements
// grouped into ten stages (fpa_s1_denormal .. fpa_s10_round) and a final
// result integrator (fpa_s11_integrate). Every stage boundary, and the input,
// has a candidate register (fpa_stage_reg). KEEP[0] is the input register;
// KEEP[i] is the register after stage i. By default KEEP is computed from
// the target clock period CLOCK_PERIOD_PS and the threshold PHI with
// psa_pkg::psa_keep: a boundary is dropped when merging the next stage still
// meets the clock and the next boundary would not need more register bits
// (by a factor PHI) than this one. Setting KEEP to all ones gives the naive
// ten-stage pipeline.
//
// Interface: a, b and in_valid are taken on a rising clk edge when KEEP[0] is
// set; result, flags and out_valid appear stage_count(KEEP) cycles later
// (the integrator after the last kept register is combinational). One
// addition can start every cycle; there is no stall. rst_n is synchronous and
// active low and clears only the valid bits. With the defaults (2500 ps,
// PHI = 1.0) eight boundaries are kept and the latency is 8 cycles.
//
// The default clock period and PHI are the operating point the design was
// evaluated at; IEEE rounding (nearest even), the flags and the valid
// handshake are this design's choices.
module fpa_psa_adder
  import fpa_pkg::*;
  import psa_pkg::*;
#(
  parameter int unsigned        CLOCK_PERIOD_PS = 2500,
  parameter real                PHI             = 1.0,
  parameter logic [NSTAGES:0]   KEEP            = psa_keep(CLOCK_PERIOD_PS, PHI)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  output logic [31:0] result,
  output flags_t      flags
);

  typedef struct packed {
    logic [31:0] a, b;
  } s0_t;

  localparam int unsigned LATENCY = stage_count(KEEP);

  logic v0, v1, v2, v3, v4, v5, v6, v7, v8, v9, v10;
  s0_t  d0_in, d0;
  s1_t  c1, d1;
  s2_t  c2, d2;
  s3_t  c3, d3;
  s4_t  c4, d4;
  s5_t  c5, d5;
  s6_t  c6, d6;
  s7_t  c7, d7;
  s8_t  c8, d8;
  s9_t  c9, d9;
  s10_t c10, d10;

  assign d0_in = '{a: a, b: b};

  fpa_stage_reg #(.KEEP(KEEP[0]),  .T(s0_t))  u_r0  (.clk, .rst_n, .in_valid(in_valid), .in_data(d0_in), .out_valid(v0),  .out_data(d0));
  fpa_s1_denormal   u_s1  (.a(d0.a), .b(d0.b), .s1(c1));
  fpa_stage_reg #(.KEEP(KEEP[1]),  .T(s1_t))  u_r1  (.clk, .rst_n, .in_valid(v0), .in_data(c1),  .out_valid(v1),  .out_data(d1));
  fpa_s2_expsub     u_s2  (.s1(d1), .s2(c2));
  fpa_stage_reg #(.KEEP(KEEP[2]),  .T(s2_t))  u_r2  (.clk, .rst_n, .in_valid(v1), .in_data(c2),  .out_valid(v2),  .out_data(d2));
  fpa_s3_control    u_s3  (.s2(d2), .s3(c3));
  fpa_stage_reg #(.KEEP(KEEP[3]),  .T(s3_t))  u_r3  (.clk, .rst_n, .in_valid(v2), .in_data(c3),  .out_valid(v3),  .out_data(d3));
  fpa_s4_align      u_s4  (.s3(d3), .s4(c4));
  fpa_stage_reg #(.KEEP(KEEP[4]),  .T(s4_t))  u_r4  (.clk, .rst_n, .in_valid(v3), .in_data(c4),  .out_valid(v4),  .out_data(d4));
  fpa_s5_presum     u_s5  (.s4(d4), .s5(c5));
  fpa_stage_reg #(.KEEP(KEEP[5]),  .T(s5_t))  u_r5  (.clk, .rst_n, .in_valid(v4), .in_data(c5),  .out_valid(v5),  .out_data(d5));
  fpa_s6_sum        u_s6  (.s5(d5), .s6(c6));
  fpa_stage_reg #(.KEEP(KEEP[6]),  .T(s6_t))  u_r6  (.clk, .rst_n, .in_valid(v5), .in_data(c6),  .out_valid(v6),  .out_data(d6));
  fpa_s7_prenorm    u_s7  (.s6(d6), .s7(c7));
  fpa_stage_reg #(.KEEP(KEEP[7]),  .T(s7_t))  u_r7  (.clk, .rst_n, .in_valid(v6), .in_data(c7),  .out_valid(v7),  .out_data(d7));
  fpa_s8_norm       u_s8  (.s7(d7), .s8(c8));
  fpa_stage_reg #(.KEEP(KEEP[8]),  .T(s8_t))  u_r8  (.clk, .rst_n, .in_valid(v7), .in_data(c8),  .out_valid(v8),  .out_data(d8));
  fpa_s9_range      u_s9  (.s8(d8), .s9(c9));
  fpa_stage_reg #(.KEEP(KEEP[9]),  .T(s9_t))  u_r9  (.clk, .rst_n, .in_valid(v8), .in_data(c9),  .out_valid(v9),  .out_data(d9));
  fpa_s10_round     u_s10 (.s9(d9), .s10(c10));
  fpa_stage_reg #(.KEEP(KEEP[10]), .T(s10_t)) u_r10 (.clk, .rst_n, .in_valid(v9), .in_data(c10), .out_valid(v10), .out_data(d10));
  fpa_s11_integrate u_s11 (.s10(d10), .result(result), .flags(flags));

  assign out_valid = v10;

  // The input register always exists: it defines where an addition starts.
  initial assert (KEEP[0]) else $error("KEEP[0] (input register) must be set");
  initial assert (LATENCY >= 1);

endmodule
