// tb_fpa_full: runs the adder exactly as configured by default (2500 ps
// target, PHI = 1, so seven stage boundaries plus the input register) on a
// stream of random and special operand pairs, back to back with occasional
// idle cycles, and checks every result, its flags and the 8-cycle latency
// against the reference model.
module tb_fpa_full;
  import fpa_pkg::*;
  import fpa_ref_pkg::*;

  localparam int N_OPS = 50000;

  logic        clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [31:0] a = '0, b = '0, result;
  logic        out_valid;
  flags_t      flags;
  int          ck, fa, pe;
  int          checks = 0, failures = 0;

  always #5 clk = !clk;

  fpa_psa_adder u_dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .result, .flags);

  fpa_scoreboard #(.LATENCY(8), .NAME("adder")) u_sb (
    .clk, .rst_n, .in_valid, .a, .b, .out_valid, .result, .flags,
    .checks(ck), .failures(fa), .pending(pe));

  initial begin : watchdog
    repeat (N_OPS * 2 + 1000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [63:0] p;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < N_OPS; i++) begin
      @(negedge clk);
      p = rand_pair();
      a = p[63:32];
      b = p[31:0];
      in_valid = ($urandom_range(0, 15) != 0);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (12) @(posedge clk);
    #1;
    checks = ck + 1;
    failures = fa + ((pe != 0) ? 1 : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
