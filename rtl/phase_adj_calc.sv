// phase_adj_calc: phase-adjustment value calculator of the signal phase adjuster.
//
// Computes the extra delay Pa = lambda - Ps that moves a signal edge measured at phase Ps
// (distance from the sampling clock edge to the signal edge) to pi from the sampling edge for
// SDR sampling, or pi/2 for DDR sampling. As in the document, lambda is
//   SDR: pi    for Ps in [0, pi),     3*pi   for Ps in [pi, 2*pi)
//   DDR: pi/2  for Ps in [0, pi/2),   5*pi/2 for Ps in [pi/2, 2*pi)
// and the hardware is a 4-to-1 multiplexer of lambda constants selected by {DR, s0}, where s0
// is the top bit of Ps (the pi boundary) for SDR and the next bit (the pi/2 boundary) for DDR,
// followed by a (PW+1)-bit subtractor whose low PW bits are the result, i.e. the difference
// modulo one period. For DDR the bit-[PW-2] select picks pi/2 instead of 5*pi/2 for Ps in
// [pi, 3*pi/2); modulo one period both give the same result, so the output equals the
// formula. The 5*pi/2 constant is 5*PHASES/4 (80 for 64 phases). Combinational.
module phase_adj_calc
  import dpa_pkg::*;
#(
  parameter int unsigned PHASES = 64,
  localparam int unsigned PW    = $clog2(PHASES)
) (
  input  data_rate_e    dr,
  input  logic [PW-1:0] ps,
  output logic [PW-1:0] pa
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam logic [PW:0] LAM_PI     = (PW+1)'(PHASES / 2);
  localparam logic [PW:0] LAM_3PI    = (PW+1)'(3 * PHASES / 2);
  localparam logic [PW:0] LAM_HALFPI = (PW+1)'(PHASES / 4);
  localparam logic [PW:0] LAM_5HALFPI = (PW+1)'(5 * PHASES / 4);

  logic        s0;
  logic [PW:0] lambda, diff;

  // 2-to-1 multiplexer: range bit of Ps chosen by the data rate.
  assign s0 = (dr == DR_DDR) ? ps[PW-2] : ps[PW-1];

  // 4-to-1 multiplexer of lambda constants, select {DR, s0}.
  always_comb begin
    unique case ({dr == DR_DDR, s0})
      2'b00:   lambda = LAM_PI;
      2'b01:   lambda = LAM_3PI;
      2'b10:   lambda = LAM_HALFPI;
      default: lambda = LAM_5HALFPI;
    endcase
  end

  // (PW+1)-bit subtraction; the borrow bit diff[PW] is dropped (result modulo one period).
  assign diff = lambda - {1'b0, ps};
  assign pa   = diff[PW-1:0];
endmodule
