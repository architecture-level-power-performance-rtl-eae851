// fpa_comb_chain: the adder's stages connected without any registers.
//
// Used by the stage testbenches: it turns an operand pair into the struct at
// every stage boundary, so a testbench can look at the inputs and outputs of
// the one stage it checks.
module fpa_comb_chain
  import fpa_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output s1_t         s1,
  output s2_t         s2,
  output s3_t         s3,
  output s4_t         s4,
  output s5_t         s5,
  output s6_t         s6,
  output s7_t         s7,
  output s8_t         s8,
  output s9_t         s9,
  output s10_t        s10,
  output logic [31:0] result,
  output flags_t      flags
);

  fpa_s1_denormal   u_s1  (.a, .b, .s1);
  fpa_s2_expsub     u_s2  (.s1, .s2);
  fpa_s3_control    u_s3  (.s2, .s3);
  fpa_s4_align      u_s4  (.s3, .s4);
  fpa_s5_presum     u_s5  (.s4, .s5);
  fpa_s6_sum        u_s6  (.s5, .s6);
  fpa_s7_prenorm    u_s7  (.s6, .s7);
  fpa_s8_norm       u_s8  (.s7, .s8);
  fpa_s9_range      u_s9  (.s8, .s9);
  fpa_s10_round     u_s10 (.s9, .s10);
  fpa_s11_integrate u_s11 (.s10, .result, .flags);

endmodule
