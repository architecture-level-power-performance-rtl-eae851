// tb_fpa_stage_reg: checks a kept boundary (one cycle of delay, valid
// cleared by reset, data held while no valid input arrives) and a removed
// boundary (same-cycle pass-through).
module tb_fpa_stage_reg;
  logic        clk = 1'b0, rst_n = 1'b0, iv = 1'b0;
  logic [31:0] d = '0, q1, q0;
  logic        v1, v0;
  int          checks = 0, failures = 0;
  logic        pv;
  logic [31:0] pd, held;

  always #5 clk = !clk;

  fpa_stage_reg #(.KEEP(1'b1), .T(logic [31:0])) u_keep (.clk, .rst_n, .in_valid(iv), .in_data(d), .out_valid(v1), .out_data(q1));
  fpa_stage_reg #(.KEEP(1'b0), .T(logic [31:0])) u_wire (.clk, .rst_n, .in_valid(iv), .in_data(d), .out_valid(v0), .out_data(q0));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    iv = 1'b1;
    d = 32'h1234_5678;
    @(posedge clk);
    #1 check(!v1, "valid cleared by reset");
    held = q1;
    @(negedge clk);
    rst_n = 1'b1;
    pv = 1'b0;
    pd = '0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      iv = ($urandom_range(0, 2) != 0);
      d = $urandom();
      #1;
      check(v0 == iv && q0 == d, "removed boundary passes through");
      @(posedge clk);
      #1;
      check(v1 == iv, "kept boundary delays valid by one cycle");
      if (iv) begin
        check(q1 == d, "kept boundary delays data by one cycle");
        held = d;
      end else begin
        check(q1 == held, "kept boundary holds data when idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
