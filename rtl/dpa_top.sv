// dpa_top: dynamic phase alignment (DPA) front end for a parallel storage interface.
//
// A signal acquisition system taps a storage interface (eMMC DAT0-DAT7 in the document) with
// its own free-running sampling clock, so every lane arrives with an unknown and possibly
// changing delay. This top wires the three stages the document proposes, per lane:
//   phase difference detector (PDD) -> measured edge phase Ps (PHASES steps per period)
//   signal phase adjuster (SPA)     -> lane delayed by Pa = lambda - Ps, eye on a sampling edge
// and, shared by all lanes, a cycle adjuster (CA) that samples the phase-aligned lanes on the
// undelayed sampling clock and removes up to one cycle of lane-to-lane spread using the start
// bits. The clock phase shifter that makes the PHASES phase-shifted sampling clocks and the
// delay elements inside the SPA are behavioural models of FPGA delay primitives.
// Defaults follow the document: 64 phases, 5 ns (200 MHz) sampling clock, 8 lanes.
// Clocks: clk_samp (sampling clock) and clk_sys (system clock of PDD and SPA); this design
// assumes clk_sys runs at the sampling frequency, edge-aligned with clk_samp.
// Output: dout, the phase- and cycle-aligned lanes, registered on clk_samp. Per-lane ps/pa
// and the CA status are brought out for observation.
module dpa_top
  import dpa_pkg::*;
#(
  parameter int unsigned LANES          = 8,
  parameter int unsigned PHASES         = 64,
  parameter real         PERIOD_PS      = 5000.0,
  parameter int unsigned COMP_BASE_TAPS = 0,
  parameter logic        START_BIT      = 1'b0,
  parameter int unsigned IDLE_CYCLES    = 8,
  localparam int unsigned PW            = $clog2(PHASES)
) (
  input  logic                    clk_samp,
  input  logic                    clk_sys,
  input  logic                    rst_n,
  input  data_rate_e              dr,
  input  logic [LANES-1:0]        sig_in,
  output logic [LANES-1:0]        dout,
  output logic [LANES-1:0]        phase_aligned,
  output logic [LANES-1:0][PW-1:0] ps,
  output logic [LANES-1:0]        ps_valid,
  output logic [LANES-1:0]        ps_upd,
  output logic [LANES-1:0][PW-1:0] ps_first,
  output logic [LANES-1:0][PW-1:0] ps_last,
  output logic [LANES-1:0][PW-1:0] pa,
  output logic [LANES-1:0]        ca_sel,
  output logic                    ca_locked,
  output logic                    ca_start,
  output logic                    ca_range_err
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [PHASES-1:0] pss_clk;

  clock_phase_shifter #(.PHASES(PHASES), .PERIOD_PS(PERIOD_PS)) u_cps (
    .clk_samp(clk_samp), .pss_clk(pss_clk)
  );

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    phase_diff_detector #(.PHASES(PHASES)) u_pdd (
      .pss_clk(pss_clk), .clk_sys(clk_sys), .rst_n(rst_n), .sig(sig_in[i]),
      .phase(ps[i]), .phase_valid(ps_valid[i]), .upd(ps_upd[i]),
      .first(ps_first[i]), .last(ps_last[i])
    );

    signal_phase_adjuster #(
      .PHASES(PHASES), .PERIOD_PS(PERIOD_PS), .COMP_BASE_TAPS(COMP_BASE_TAPS)
    ) u_spa (
      .clk_sys(clk_sys), .rst_n(rst_n), .dr(dr), .ps(ps[i]), .ps_valid(ps_valid[i]),
      .sig(sig_in[i]), .sig_out(phase_aligned[i]), .pa(pa[i]),
      .comp_tap(), .front_tap(), .rear_tap()
    );
  end

  cycle_adjuster #(.LANES(LANES), .START_BIT(START_BIT), .IDLE_CYCLES(IDLE_CYCLES)) u_ca (
    .clk_samp(clk_samp), .rst_n(rst_n), .din(phase_aligned), .dout(dout), .sel(ca_sel),
    .locked(ca_locked), .start_pulse(ca_start), .range_err(ca_range_err)
  );
endmodule
