// phase_diff_detector (PDD): measures the phase of one interface signal's edges.
//
// Structure as in the document: a PHASES-entry flip-flop array clocked by the phase-shifted
// sampling clocks, a two-flop synchronizer into the system clock domain and a phase encoder.
// This design adds one window register so the encoder sees a full window plus the first
// sample of the next one, and registers the result: every system clock cycle in which the
// window shows a change, phase is updated and upd pulses; in cycles without a change the
// last measurement is held. Changes are ignored for the first four system clock cycles after
// reset, while the reset values are flushed out of the pipeline. phase_valid rises with the first measurement after reset.
// Latency from the edge to the updated phase is about four system clock cycles. The system
// clock is assumed to have the sampling clock's frequency and phase, so that one window holds
// the samples of one sampling period in phase order; the document only says the system
// clock synchronizes the samples.
module phase_diff_detector #(
  parameter int unsigned PHASES = 64,
  localparam int unsigned PW    = $clog2(PHASES)
) (
  input  logic [PHASES-1:0] pss_clk,
  input  logic              clk_sys,
  input  logic              rst_n,
  input  logic              sig,
  output logic [PW-1:0]     phase,
  output logic              phase_valid,
  output logic              upd,
  output logic [PW-1:0]     first,
  output logic [PW-1:0]     last
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [PHASES-1:0] pss_q, sync_q, win_q;
  logic              found;
  logic [PW-1:0]     enc_first, enc_last, enc_phase;
  logic [2:0]        fill_q;   // pipeline fill after reset: ignore the reset-to-data step
  logic              live;

  pdd_ff_array #(.PHASES(PHASES)) u_ffs (
    .pss_clk(pss_clk), .rst_n(rst_n), .sig(sig), .pss_q(pss_q)
  );

  pdd_synchronizer #(.WIDTH(PHASES)) u_sync (
    .clk_sys(clk_sys), .rst_n(rst_n), .d(pss_q), .sync_q(sync_q)
  );

  always_ff @(posedge clk_sys or negedge rst_n) begin
    if (!rst_n) win_q <= '0;
    else        win_q <= sync_q;
  end

  phase_encoder #(.PHASES(PHASES)) u_enc (
    .win(win_q), .next0(sync_q[0]), .found(found),
    .first(enc_first), .last(enc_last), .phase(enc_phase)
  );

  assign live = (fill_q == 3'd4);

  always_ff @(posedge clk_sys or negedge rst_n) begin
    if (!rst_n)     fill_q <= '0;
    else if (!live) fill_q <= fill_q + 3'd1;
  end

  always_ff @(posedge clk_sys or negedge rst_n) begin
    if (!rst_n) begin
      phase       <= '0;
      first       <= '0;
      last        <= '0;
      phase_valid <= 1'b0;
      upd         <= 1'b0;
    end else begin
      upd <= found && live;
      if (found && live) begin
        phase       <= enc_phase;
        first       <= enc_first;
        last        <= enc_last;
        phase_valid <= 1'b1;
      end
    end
  end
endmodule
