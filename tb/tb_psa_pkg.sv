// tb_psa_pkg: checks the pipeline stage algorithm against the stage counts
// published for the adder with PHI = 1 over clock periods of 1500-4400 ps
// (10, 10, 8, 8, 8, 7, 7, 6, 6, 6, 6, 6 kept boundaries), checks that it
// never keeps a stage whose merge would break timing, and that a larger PHI
// (1.4) removes more register bits at 5000 ps, and that the largest useful
// PHI is the widest cut (178 bits) over the narrowest (78 bits). The input register is not
// counted as a boundary here.
module tb_psa_pkg;
  import psa_pkg::*;

  localparam int NP = 12;
  localparam int unsigned PERIODS [NP] = '{1500, 1700, 1900, 2100, 2300, 2500, 2700, 3000, 3300, 3600, 4000, 4400};
  localparam int unsigned STAGES  [NP] = '{10, 10, 8, 8, 8, 7, 7, 6, 6, 6, 6, 6};

  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = !clk;

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [NSTAGES:0] k;
    int unsigned      acc, worst;
    @(posedge clk);
    for (int p = 0; p < NP; p++) begin
      k = psa_keep(PERIODS[p], 1.0);
      check(k[0], "input register kept");
      check(stage_count(k) - 1 == STAGES[p],
            $sformatf("%0d ps: %0d boundaries, expected %0d", PERIODS[p], stage_count(k) - 1, STAGES[p]));
      // every stage between two kept registers fits in the clock period
      acc = 0;
      worst = 0;
      for (int i = 1; i <= NSTAGES + 1; i++) begin
        acc += T_PS[i];
        if (acc > worst) worst = acc;
        if (i <= NSTAGES && k[i]) acc = 0;
      end
      check(worst <= PERIODS[p], $sformatf("%0d ps: longest stage %0d ps", PERIODS[p], worst));
      $display("%0d ps: keep %b, %0d boundaries, %0d register bits, longest stage %0d ps",
               PERIODS[p], k, stage_count(k) - 1, register_bits(k), worst);
    end
    check(register_bits(psa_keep(5000, 1.4)) < register_bits(psa_keep(5000, 1.0)),
          "PHI = 1.4 keeps fewer bits than PHI = 1 at 5000 ps");
    check(psa_keep(1500, 1.0) == '1, "shortest period keeps every boundary");
    // 200 MHz with PHI = 1.4: three registers, 3 x 5 ns = 15 ns latency
    check(stage_count(psa_keep(5000, 1.4)) == 3, "three registers at 5000 ps, PHI = 1.4");
    check(phi_max() > 2.28 && phi_max() < 2.29, "largest PHI is 178 / 78");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
