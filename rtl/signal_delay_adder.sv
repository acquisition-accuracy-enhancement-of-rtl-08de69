// signal_delay_adder: delays one interface signal by the phase-adjustment value.
//
// As in the document, the signal passes a delay compensator, then a front and a rear phase
// delay element, each able to add up to half a period, so together they reach a full
// period; a delay amount generator derives the three tap settings from Pa. The elements are
// behavioural models of the FPGA delay primitive (see delay_module); the generator is
// synthesizable. The document builds the compensator from several delay elements and uses it
// to offset processing latency and the elements' insertion delay; here it is one element
// whose setting is COMP_BASE_TAPS plus the single step the front and rear cannot cover.
// Timing: the taps change one system clock cycle after pa; the output then follows the input
// after (comp + front + rear) steps of PERIOD_PS/PHASES each.
module signal_delay_adder #(
  parameter int unsigned PHASES         = 64,
  parameter real         PERIOD_PS      = 5000.0,
  parameter int unsigned COMP_BASE_TAPS = 0,
  localparam int unsigned PW            = $clog2(PHASES),
  localparam int unsigned TW            = PW - 1
) (
  input  logic          clk_sys,
  input  logic          rst_n,
  input  logic          sig,
  input  logic [PW-1:0] pa,
  output logic          sig_out,
  output logic [TW-1:0] comp_tap,
  output logic [TW-1:0] front_tap,
  output logic [TW-1:0] rear_tap
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam real STEP_PS = PERIOD_PS / real'(PHASES);

  logic sig_comp, sig_front;

  delay_amount_generator #(.PHASES(PHASES), .COMP_BASE_TAPS(COMP_BASE_TAPS)) u_gen (
    .clk_sys(clk_sys), .rst_n(rst_n), .pa(pa),
    .comp_tap(comp_tap), .front_tap(front_tap), .rear_tap(rear_tap)
  );

  delay_module #(.TW(TW), .STEP_PS(STEP_PS)) u_comp (
    .d_in(sig), .tap(comp_tap), .d_out(sig_comp)
  );

  delay_module #(.TW(TW), .STEP_PS(STEP_PS)) u_front (
    .d_in(sig_comp), .tap(front_tap), .d_out(sig_front)
  );

  delay_module #(.TW(TW), .STEP_PS(STEP_PS)) u_rear (
    .d_in(sig_front), .tap(rear_tap), .d_out(sig_out)
  );
endmodule
