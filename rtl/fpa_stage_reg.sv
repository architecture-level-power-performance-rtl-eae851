// fpa_stage_reg: one candidate pipeline register at a stage boundary.
//
// With KEEP = 1 it registers the boundary's data and a valid bit on every
// clock edge; with KEEP = 0 the boundary is removed and both pass straight
// through. The data registers are loaded only when the incoming valid bit is
// set, so idle cycles do not toggle them; only the valid bit is reset
// (active-low, synchronous). The pipeline never stalls. The keep/remove
// choice per boundary is what the stage algorithm decides; the valid bit,
// the load enable and the reset are this design's choices.
module fpa_stage_reg #(
  parameter bit  KEEP = 1'b1,
  parameter type T    = logic [31:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  T     in_data,
  output logic out_valid,
  output T     out_data
);

  if (KEEP) begin : g_reg
    always_ff @(posedge clk) begin
      if (!rst_n) out_valid <= 1'b0;
      else        out_valid <= in_valid;
    end
    always_ff @(posedge clk) begin
      if (in_valid) out_data <= in_data;
    end
  end else begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end

endmodule
