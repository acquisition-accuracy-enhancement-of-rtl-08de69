// cycle_adjuster (CA): puts the phase-aligned lanes back into the same clock cycle.
//
// After phase adjustment every lane's eye sits on a sampling edge, but a lane that arrived
// almost a period later than another lands one cycle later. As in the document, each lane
// has a sampling flip-flop (SFF, captures the lane on the undelayed sampling clock) and a
// delayed-sample flip-flop (DSFF, the SFF value one cycle later), and a shared cycle
// selector watches the SFFs for the protocol's start bit (START_BIT, 0 for eMMC). In the
// first cycle any lane shows a start bit, the lanes that show it are early: from then on
// they are taken from their DSFF and all other lanes from their SFF. The document guarantees
// at most one cycle of spread, so the remaining lanes must show their start bit one cycle
// later; range_err pulses if one does not (this check is this design's addition).
// Releasing the selection is not described in the document: here the selector re-arms once
// all output lanes have read the idle level (not START_BIT) for IDLE_CYCLES cycles in a row.
// Timing: dout is registered; an aligned start bit leaves dout two sampling clock cycles
// after the early lanes' start bit was sampled, and start_pulse is high in that same cycle.
// SFF sampling happens on the rising edge only (the SDR arrangement of the figure).
module cycle_adjuster
  import dpa_pkg::*;
#(
  parameter int unsigned LANES       = 8,
  parameter logic        START_BIT   = 1'b0,
  parameter int unsigned IDLE_CYCLES = 8
) (
  input  logic             clk_samp,
  input  logic             rst_n,
  input  logic [LANES-1:0] din,
  output logic [LANES-1:0] dout,
  output logic [LANES-1:0] sel,
  output logic             locked,
  output logic             start_pulse,
  output logic             range_err
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned CW = $clog2(IDLE_CYCLES + 1);

  logic [LANES-1:0] sff, dsff, start_mask, sel_d;
  logic             any_start, check_q, all_idle;
  logic [CW-1:0]    idle_cnt;
  ca_state_e        state;

  assign start_mask = START_BIT ? sff : ~sff;
  assign any_start  = |start_mask;
  assign sel_d      = (state == CA_ARMED && any_start) ? start_mask : sel;
  assign all_idle   = (dout == {LANES{~START_BIT}});
  assign locked     = (state == CA_LOCKED);

  // Sampling and delayed-sample flip-flops.
  always_ff @(posedge clk_samp or negedge rst_n) begin
    if (!rst_n) begin
      sff  <= {LANES{~START_BIT}};
      dsff <= {LANES{~START_BIT}};
    end else begin
      sff  <= din;
      dsff <= sff;
    end
  end

  // Cycle selector.
  always_ff @(posedge clk_samp or negedge rst_n) begin
    if (!rst_n) begin
      state       <= CA_ARMED;
      sel         <= '0;
      dout        <= {LANES{~START_BIT}};
      check_q     <= 1'b0;
      start_pulse <= 1'b0;
      range_err   <= 1'b0;
      idle_cnt    <= '0;
    end else begin
      dout        <= (sel_d & dsff) | (~sel_d & sff);
      start_pulse <= check_q;
      check_q     <= 1'b0;
      range_err   <= 1'b0;
      if (check_q) begin
        // Lanes not delayed must show their start bit now.
        range_err <= |(~sel & ~start_mask);
      end
      unique case (state)
        CA_ARMED: begin
          if (any_start) begin
            sel      <= start_mask;
            state    <= CA_LOCKED;
            check_q  <= 1'b1;
            idle_cnt <= '0;
          end
        end
        default: begin
          if (!all_idle || check_q) begin
            idle_cnt <= '0;
          end else if (idle_cnt == CW'(IDLE_CYCLES - 1)) begin
            state    <= CA_ARMED;
            sel      <= '0;
            idle_cnt <= '0;
          end else begin
            idle_cnt <= idle_cnt + CW'(1);
          end
        end
      endcase
    end
  end

  // The lane selection may only change when a new packet is detected.
  a_sel_stable: assert property (@(posedge clk_samp) disable iff (!rst_n)
    (state == CA_LOCKED && $past(state) == CA_LOCKED) |-> $stable(sel));
endmodule
