// fpa_scoreboard: checks one adder instance against the reference model.
//
// Every accepted input (in_valid on a clock edge) is queued with its
// expected result, flags and issue cycle. Every out_valid must then deliver
// the oldest entry exactly LATENCY cycles after it was issued, with the
// expected result bits and flags. The running counts are outputs so the
// enclosing testbench can report them. Nothing is checked or queued while
// rst_n is low.
module fpa_scoreboard
  import fpa_pkg::*;
  import fpa_ref_pkg::*;
#(
  parameter int unsigned LATENCY = 1,
  parameter string       NAME    = "dut"
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        out_valid,
  input  logic [31:0] result,
  input  flags_t      flags,
  output int          checks,
  output int          failures,
  output int          pending
);

  typedef struct {
    logic [31:0] a, b;
    ref_t        exp;
    longint      cyc;
  } item_t;

  item_t  q[$];
  longint cycle = 0;

  initial begin
    checks = 0;
    failures = 0;
  end

  assign pending = q.size();

  always @(posedge clk) begin
    item_t it;
    cycle <= cycle + 1;
    if (out_valid && rst_n) begin
      checks += 1;
      if (q.size() == 0) begin
        failures += 1;
        $display("%s: unexpected output %h at cycle %0d", NAME, result, cycle);
      end else begin
        it = q.pop_front();
        if (result !== it.exp.res ||
            flags !== {it.exp.invalid, it.exp.overflow, it.exp.underflow, it.exp.inexact} ||
            cycle - it.cyc != longint'(LATENCY)) begin
          failures += 1;
          if (failures < 10)
            $display("%s: %h + %h = %h flags %b, expected %h flags %b, latency %0d (want %0d)",
                     NAME, it.a, it.b, result, flags, it.exp.res,
                     {it.exp.invalid, it.exp.overflow, it.exp.underflow, it.exp.inexact},
                     cycle - it.cyc, LATENCY);
        end
      end
    end
    if (in_valid && rst_n) begin
      it.a = a;
      it.b = b;
      it.exp = ref_add(a, b);
      it.cyc = cycle;
      q.push_back(it);
    end
  end

endmodule
