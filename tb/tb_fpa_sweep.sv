// tb_fpa_sweep: runs the adder at every clock period of the evaluated sweep
// (1500 to 5000 ps, PHI = 1), one instance per period, all on the same
// operand stream. Each instance is checked for bit-exact results, flags and
// a latency equal to its number of kept registers, and the number of kept
// boundaries is compared with the published stage counts for 1500-4400 ps
// (at 5000 ps the expected 6 is this implementation's own result; the
// published count there is 5).
module tb_fpa_sweep;
  import fpa_pkg::*;
  import psa_pkg::*;
  import fpa_ref_pkg::*;

  localparam int NP = 13;
  localparam int unsigned PERIODS [NP] = '{1500, 1700, 1900, 2100, 2300, 2500, 2700, 3000, 3300, 3600, 4000, 4400, 5000};
  localparam int unsigned STAGES  [NP] = '{10, 10, 8, 8, 8, 7, 7, 6, 6, 6, 6, 6, 6};
  localparam int N_OPS = 4000;

  logic        clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [31:0] a = '0, b = '0;
  logic        ov [NP];
  logic [31:0] res [NP];
  flags_t      fl [NP];
  int          ck [NP], fa [NP], pe [NP];
  int          checks = 0, failures = 0;

  always #5 clk = !clk;

  for (genvar p = 0; p < NP; p++) begin : g_dut
    fpa_psa_adder #(.CLOCK_PERIOD_PS(PERIODS[p])) u_dut (
      .clk, .rst_n, .in_valid, .a, .b,
      .out_valid(ov[p]), .result(res[p]), .flags(fl[p]));
    fpa_scoreboard #(.LATENCY(stage_count(psa_keep(PERIODS[p], 1.0))), .NAME($sformatf("%0dps", PERIODS[p]))) u_sb (
      .clk, .rst_n, .in_valid, .a, .b,
      .out_valid(ov[p]), .result(res[p]), .flags(fl[p]),
      .checks(ck[p]), .failures(fa[p]), .pending(pe[p]));
  end

  initial begin : watchdog
    repeat (N_OPS * 2 + 1000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [63:0] pr;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < N_OPS; i++) begin
      @(negedge clk);
      pr = rand_pair();
      a = pr[63:32];
      b = pr[31:0];
      in_valid = ($urandom_range(0, 7) != 0);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (15) @(posedge clk);
    #1;
    for (int p = 0; p < NP; p++) begin
      checks += ck[p] + 2;
      failures += fa[p];
      if (pe[p] != 0) begin
        failures++;
        $display("FAIL %0d ps: %0d results missing", PERIODS[p], pe[p]);
      end
      if (stage_count(psa_keep(PERIODS[p], 1.0)) - 1 != STAGES[p]) begin
        failures++;
        $display("FAIL %0d ps: boundary count", PERIODS[p]);
      end
      $display("%0d ps: latency %0d cycles, %0d results checked", PERIODS[p],
               stage_count(psa_keep(PERIODS[p], 1.0)), ck[p]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
