// pdd_ff_array: the sampling flip-flop array of the phase difference detector.
//
// One flip-flop per phase-shifted sampling clock: flip-flop k captures the interface signal
// on the rising edge of pss_clk[k]. Together the PHASES outputs are PHASES snapshots of the
// signal taken at evenly spaced instants across one sampling clock period (64 in the
// document). The outputs are still in PHASES different clock domains and go to the
// synchronizer. The asynchronous active-low reset is this design's choice; the document
// does not mention reset.
module pdd_ff_array #(
  parameter int unsigned PHASES = 64
) (
  input  logic [PHASES-1:0] pss_clk,
  input  logic              rst_n,
  input  logic              sig,
  output logic [PHASES-1:0] pss_q
);
  timeunit 1ps;
  timeprecision 1fs;

  for (genvar k = 0; k < PHASES; k++) begin : g_ff
    logic q;
    always_ff @(posedge pss_clk[k] or negedge rst_n) begin
      if (!rst_n) q <= 1'b0;
      else        q <= sig;
    end
    assign pss_q[k] = q;
  end
endmodule
