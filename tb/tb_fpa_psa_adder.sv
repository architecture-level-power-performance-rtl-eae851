// tb_fpa_psa_adder: end-to-end test of the PSA-pipelined adder.
//
// Four instances run side by side on the same operand stream: the default
// configuration (2500 ps, PHI = 1), the naive pipeline with every boundary
// registered, and the configurations for a 5000 ps clock with PHI = 1 and
// PHI = 1.4 (the latter a three-register pipeline). Each is checked by
// a scoreboard for bit-exact results, flags and latency (the number of kept
// registers). The stream mixes back-to-back inputs with idle cycles and a
// reset in the middle. The test also counts that every mechanism of the
// adder was exercised: close path, far path, bypass, far-path overflow and
// one-bit left normalisation, denormal results, rounding, overflow to
// infinity, removed and kept boundaries, and the idle and reset behaviour.
module tb_fpa_psa_adder;
  import fpa_pkg::*;
  import psa_pkg::*;
  import fpa_ref_pkg::*;

  localparam logic [NSTAGES:0] K_DEF   = psa_keep(2500, 1.0);
  localparam logic [NSTAGES:0] K_NAIVE = '1;
  localparam logic [NSTAGES:0] K_5000  = psa_keep(5000, 1.0);
  localparam logic [NSTAGES:0] K_PHI14 = psa_keep(5000, 1.4);
  localparam int N_OPS = 20000;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [31:0] a = 0, b = 0;
  logic        ov [4];
  logic [31:0] res [4];
  flags_t      fl [4];
  int          ck [4], fa [4], pe [4];
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  fpa_psa_adder                     u_def   (.clk, .rst_n, .in_valid, .a, .b, .out_valid(ov[0]), .result(res[0]), .flags(fl[0]));
  fpa_psa_adder #(.KEEP(K_NAIVE))   u_naive (.clk, .rst_n, .in_valid, .a, .b, .out_valid(ov[1]), .result(res[1]), .flags(fl[1]));
  fpa_psa_adder #(.CLOCK_PERIOD_PS(5000)) u_5000 (.clk, .rst_n, .in_valid, .a, .b, .out_valid(ov[2]), .result(res[2]), .flags(fl[2]));
  fpa_psa_adder #(.CLOCK_PERIOD_PS(5000), .PHI(1.4)) u_phi14 (.clk, .rst_n, .in_valid, .a, .b, .out_valid(ov[3]), .result(res[3]), .flags(fl[3]));

  // the scoreboard sees inputs only while out of reset
  logic sb_in;
  assign sb_in = in_valid && rst_n;
  fpa_scoreboard #(.LATENCY(stage_count(K_DEF)),   .NAME("default")) sb0 (.clk, .rst_n, .in_valid(sb_in), .a, .b, .out_valid(ov[0]), .result(res[0]), .flags(fl[0]), .checks(ck[0]), .failures(fa[0]), .pending(pe[0]));
  fpa_scoreboard #(.LATENCY(stage_count(K_NAIVE)), .NAME("naive"))   sb1 (.clk, .rst_n, .in_valid(sb_in), .a, .b, .out_valid(ov[1]), .result(res[1]), .flags(fl[1]), .checks(ck[1]), .failures(fa[1]), .pending(pe[1]));
  fpa_scoreboard #(.LATENCY(stage_count(K_5000)),  .NAME("5000ps"))  sb2 (.clk, .rst_n, .in_valid(sb_in), .a, .b, .out_valid(ov[2]), .result(res[2]), .flags(fl[2]), .checks(ck[2]), .failures(fa[2]), .pending(pe[2]));
  fpa_scoreboard #(.LATENCY(stage_count(K_PHI14)), .NAME("phi1.4"))  sb3 (.clk, .rst_n, .in_valid(sb_in), .a, .b, .out_valid(ov[3]), .result(res[3]), .flags(fl[3]), .checks(ck[3]), .failures(fa[3]), .pending(pe[3]));

  // mechanism counters, sampled inside the default instance
  int n_close, n_far, n_byp, n_mo, n_m1, n_den, n_round, n_ovf, n_idle, n_reset_flush;

  always @(posedge clk) if (rst_n) begin
    if (u_def.v6 && !u_def.c7.byp) begin
      if (u_def.c7.c.close) n_close++;
      else begin
        n_far++;
        if (u_def.c7.f_ovf)  n_mo++;
        if (u_def.c7.f_left) n_m1++;
      end
    end
    if (u_def.v6 && u_def.c7.byp) n_byp++;
    if (ov[0] && res[0][30:23] == 0 && res[0][22:0] != 0) n_den++;
    if (ov[0] && fl[0].inexact) n_round++;
    if (ov[0] && fl[0].overflow) n_ovf++;
    if (!in_valid && !ov[0]) n_idle++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (N_OPS * 3 + 2000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [63:0] p;
    {n_close, n_far, n_byp, n_mo, n_m1, n_den, n_round, n_ovf, n_idle, n_reset_flush} = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < N_OPS; i++) begin
      @(negedge clk);
      p = rand_pair();
      a = p[63:32];
      b = p[31:0];
      in_valid = ($urandom_range(0, 7) != 0);
      if (i == N_OPS / 2) begin
        // reset while the pipelines are full: pending results must vanish
        rst_n = 0;
        @(negedge clk);
        rst_n = 1;
        in_valid = 0;
        @(posedge clk);
        #1;
        if (!ov[0] && !ov[1] && !ov[2] && !ov[3]) n_reset_flush++;
        // forget what the scoreboards were still waiting for
        sb0.q.delete(); sb1.q.delete(); sb2.q.delete(); sb3.q.delete();
        @(negedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (20) @(posedge clk);
    #1;

    for (int k = 0; k < 4; k++) begin
      checks += ck[k];
      failures += fa[k];
      check(pe[k] == 0, $sformatf("instance %0d still has %0d results pending", k, pe[k]));
    end

    // stage algorithm outcome, as in the published evaluation: 7 stages at 2500 ps,
    // 6 at 3000-4400 ps, 10 for the naive pipeline
    check(stage_count(K_DEF) == 8,  "default keeps input register + 7 boundaries");
    check(stage_count(K_NAIVE) == 11, "naive keeps all 11 registers");
    check(stage_count(K_PHI14) == 3, "PHI = 1.4 at 5000 ps keeps three registers");
    check(K_DEF != K_NAIVE, "a boundary was removed in the default pipeline");

    check(n_close > 0, "close path used");
    check(n_far > 0, "far path used");
    check(n_byp > 0, "bypass used");
    check(n_mo > 0, "far-path carry (MO) normalisation");
    check(n_m1 > 0, "far-path one-bit left (M-1) normalisation");
    check(n_den > 0, "denormal result");
    check(n_round > 0, "inexact, rounded result");
    check(n_ovf > 0, "overflow to infinity");
    check(n_idle > 0, "idle cycles");
    check(n_reset_flush > 0, "reset emptied the pipelines");
    $display("mechanisms: close=%0d far=%0d bypass=%0d MO=%0d M-1=%0d denormal=%0d rounded=%0d overflow=%0d idle=%0d reset=%0d",
             n_close, n_far, n_byp, n_mo, n_m1, n_den, n_round, n_ovf, n_idle, n_reset_flush);
    $display("kept boundaries: default %b, 5000 ps %b, 5000 ps PHI 1.4 %b", K_DEF, K_5000, K_PHI14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
