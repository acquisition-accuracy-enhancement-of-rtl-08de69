// signal_phase_adjuster (SPA): places one signal's eye on the sampling clock edge.
//
// As in the document, a phase-adjustment value calculator turns the measured edge phase Ps
// from the phase difference detector into Pa = lambda - Ps, and a signal delay adder delays
// the signal by Pa steps. Pa is registered on the system clock whenever ps_valid is high and
// held otherwise; it is zero until the first measurement (this design's choice). dr selects
// SDR or DDR placement of the edge. Latency from ps to the new delay: two system clock cycles
// (Pa register, then tap register). The tap settings are brought out for observation.
module signal_phase_adjuster
  import dpa_pkg::*;
#(
  parameter int unsigned PHASES         = 64,
  parameter real         PERIOD_PS      = 5000.0,
  parameter int unsigned COMP_BASE_TAPS = 0,
  localparam int unsigned PW            = $clog2(PHASES)
) (
  input  logic          clk_sys,
  input  logic          rst_n,
  input  data_rate_e    dr,
  input  logic [PW-1:0] ps,
  input  logic          ps_valid,
  input  logic          sig,
  output logic          sig_out,
  output logic [PW-1:0] pa,
  output logic [PW-2:0] comp_tap,
  output logic [PW-2:0] front_tap,
  output logic [PW-2:0] rear_tap
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [PW-1:0] pa_calc;

  phase_adj_calc #(.PHASES(PHASES)) u_calc (.dr(dr), .ps(ps), .pa(pa_calc));

  always_ff @(posedge clk_sys or negedge rst_n) begin
    if (!rst_n)        pa <= '0;
    else if (ps_valid) pa <= pa_calc;
  end

  signal_delay_adder #(
    .PHASES(PHASES), .PERIOD_PS(PERIOD_PS), .COMP_BASE_TAPS(COMP_BASE_TAPS)
  ) u_add (
    .clk_sys(clk_sys), .rst_n(rst_n), .sig(sig), .pa(pa), .sig_out(sig_out),
    .comp_tap(comp_tap), .front_tap(front_tap), .rear_tap(rear_tap)
  );
endmodule
