// pdd_synchronizer: brings the PHASES phase-shifted samples into the system clock domain.
//
// As in the document, each sample passes through two flip-flops clocked by the system clock
// to let metastability settle. Output sync_q is the sample vector two system clock edges
// after it was presented. Reset (asynchronous, active low, clears to 0) is this design's
// choice.
module pdd_synchronizer #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk_sys,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] sync_q
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [WIDTH-1:0] meta_q;

  always_ff @(posedge clk_sys or negedge rst_n) begin
    if (!rst_n) begin
      meta_q <= '0;
      sync_q <= '0;
    end else begin
      meta_q <= d;
      sync_q <= meta_q;
    end
  end
endmodule
