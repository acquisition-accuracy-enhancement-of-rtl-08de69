// clock_phase_shifter: behavioural model of the clock phase shifter (not synthesizable).
//
// Produces PHASES copies of the sampling clock, copy k delayed by k*PERIOD_PS/PHASES, so the
// copies together divide one sampling period into equal phase steps. In the FPGA build the
// document describes, this is done with the device's programmable delay elements (64 clocks,
// 78 ps steps for a 5 ns clock); here plain transport delays stand in for them.
// Numbering follows the labels printed in the phase encoder figure: clock 0 is the
// undelayed sampling clock (0 deg) and clock PHASES-1 is delayed by (PHASES-1)/PHASES of a
// period. The text numbers the same set 1..PHASES with the last one at 2*pi, which is the
// same edge set.
// Interface: clk_samp in, pss_clk[PHASES-1:0] out. Timing: pure delays, no registers.
module clock_phase_shifter #(
  parameter int unsigned PHASES    = 64,
  parameter real         PERIOD_PS = 5000.0
) (
  input  logic              clk_samp,
  output logic [PHASES-1:0] pss_clk
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam real STEP_PS = PERIOD_PS / real'(PHASES);

  assign pss_clk[0] = clk_samp;

  for (genvar k = 1; k < PHASES; k++) begin : g_shift
    logic q;
    initial q = 1'b0;
    // One process per clock transition: delays beyond half a period must not cancel the
    // previous transition (transport delay).
    always begin
      @(clk_samp);
      fork
        begin : carry
          automatic logic v = clk_samp;
          #(STEP_PS * real'(k)) q = v;
        end
      join_none
    end
    assign pss_clk[k] = q;
  end
endmodule
