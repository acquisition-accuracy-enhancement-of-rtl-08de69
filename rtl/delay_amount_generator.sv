// delay_amount_generator: turns a phase-adjustment value into delay-element tap settings.
//
// The signal delay adder chains a delay compensator and a front and a rear phase delay
// element; each element covers at most half a period (pi), so a delay of up to a full period
// needs two. This block splits Pa (0 .. PHASES-1 steps) as the document requires but, since
// the document does not give the rule, with this design's own one: the front element takes
// as much as it can (up to MAXTAP = PHASES/2-1 steps), the rear one the rest up to MAXTAP,
// and the single step that may remain (Pa = PHASES-1) is added to the compensator on top of
// its fixed COMP_BASE_TAPS setting. So front + rear + comp - COMP_BASE_TAPS == Pa always.
// Outputs are registered on the system clock (one cycle latency), reset to zero delay.
module delay_amount_generator #(
  parameter int unsigned PHASES         = 64,
  parameter int unsigned COMP_BASE_TAPS = 0,
  localparam int unsigned PW            = $clog2(PHASES),
  localparam int unsigned TW            = PW - 1
) (
  input  logic          clk_sys,
  input  logic          rst_n,
  input  logic [PW-1:0] pa,
  output logic [TW-1:0] comp_tap,
  output logic [TW-1:0] front_tap,
  output logic [TW-1:0] rear_tap
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam logic [PW-1:0] MAXTAP = PW'(PHASES / 2 - 1);

  logic [PW-1:0] front, rem, rear;
  logic          extra;

  always_comb begin
    front = (pa > MAXTAP) ? MAXTAP : pa;
    rem   = pa - front;
    rear  = (rem > MAXTAP) ? MAXTAP : rem;
    extra = (rem != rear);
  end

  always_ff @(posedge clk_sys or negedge rst_n) begin
    if (!rst_n) begin
      comp_tap  <= TW'(COMP_BASE_TAPS);
      front_tap <= '0;
      rear_tap  <= '0;
    end else begin
      comp_tap  <= TW'(COMP_BASE_TAPS) + TW'(extra);
      front_tap <= front[TW-1:0];
      rear_tap  <= rear[TW-1:0];
    end
  end
endmodule
