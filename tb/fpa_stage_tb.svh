// Common body of the stage testbenches: operands, the register-free chain
// of all stages, a clock that paces the vectors, the check counters, a check
// macro and a watchdog.
  import fpa_pkg::*;
  import fpa_ref_pkg::*;

  localparam int N_VEC = 20000;

  logic        clk = 1'b0;
  logic [31:0] a = '0, b = '0;
  s1_t s1; s2_t s2; s3_t s3; s4_t s4; s5_t s5;
  s6_t s6; s7_t s7; s8_t s8; s9_t s9; s10_t s10;
  logic [31:0] result;
  flags_t      flags;
  int          checks = 0, failures = 0;

  always #5 clk = !clk;

  fpa_comb_chain u_chain (.a, .b, .s1, .s2, .s3, .s4, .s5, .s6, .s7, .s8, .s9,
                          .s10, .result, .flags);

`define CHECK(cond, what) \
  begin \
    checks++; \
    if (!(cond)) begin \
      failures++; \
      if (failures < 10) $display("FAIL %s: a=%h b=%h", what, a, b); \
    end \
  end

  initial begin : watchdog
    repeat (N_VEC + 1000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // Apply the next random operand pair and let the chain settle.
  task automatic next_vector();
    logic [63:0] p;
    @(negedge clk);
    p = rand_pair();
    a = p[63:32];
    b = p[31:0];
    #1;
  endtask

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask
