// tb_dpa_top: end-to-end test of the dynamic phase alignment front end at its default size
// (8 lanes, 64 phases, 5 ns sampling clock).
//
// A source sends eMMC-like packets on all lanes at one bit per sampling period: idle high,
// a start bit 0 on every lane, random payload, an end bit 1, idle. Each lane reaches the
// design after its own delay, which may exceed one period; some lanes have noisy edges
// (the level bounces back for one phase step after the transition). For every delay
// configuration one packet trains the phase detectors, then packets are checked word by
// word at the output after the cycle adjuster's start pulse, and every edge leaving the
// phase adjusters must sit half a period after a sampling edge.
// Mechanisms counted, each must occur at least once: clean and noisy edge measurement,
// lambda = pi and lambda = 3*pi placement, use of the rear delay element, a cycle spread
// removed by the cycle adjuster, its re-arming, the out-of-range report, a switch to DDR
// placement (checked on the phase-adjustment values), and re-alignment after the delays
// change during operation.
module tb_dpa_top;
  import dpa_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int   LANES   = 8;
  localparam real  T       = 5000.0;
  localparam real  STEP    = T / 64.0;
  localparam int   PAYLOAD = 48;

  int checks = 0, failures = 0;
  int n_noisy_meas = 0, n_clean_meas = 0, n_lam_pi = 0, n_lam_3pi = 0, n_rear = 0;
  int n_spread = 0, n_rearm = 0, n_range = 0, n_ddr = 0, n_realign = 0, n_packets = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  data_rate_e dr;
  logic [LANES-1:0] sig_in, dout, phase_aligned, ps_valid, ps_upd, ca_sel;
  logic [LANES-1:0][5:0] ps, ps_first, ps_last, pa;
  logic ca_locked, ca_start, ca_range_err;

  dpa_top dut (
    .clk_samp(clk), .clk_sys(clk), .rst_n(rst_n), .dr(dr), .sig_in(sig_in), .dout(dout),
    .phase_aligned(phase_aligned), .ps(ps), .ps_valid(ps_valid), .ps_upd(ps_upd),
    .ps_first(ps_first), .ps_last(ps_last), .pa(pa), .ca_sel(ca_sel), .ca_locked(ca_locked),
    .ca_start(ca_start), .ca_range_err(ca_range_err));

  always #2500 clk = ~clk;

  // Source side: word sent in the current period, per-lane delay and noise.
  logic [LANES-1:0] tx_word = '1;
  real  dly   [LANES];
  bit   noisy [LANES];
  logic lane_level [LANES];

  for (genvar i = 0; i < LANES; i++) begin : g_src
    initial lane_level[i] = 1'b1;
    assign sig_in[i] = lane_level[i];
    always begin
      @(posedge clk);
      fork
        begin : launch
          automatic logic v  = tx_word[i];
          automatic real  d  = dly[i];
          automatic bit   nz = noisy[i];
          #(d);
          if (lane_level[i] != v) begin
            lane_level[i] = v;
            if (nz) begin
              #(STEP * 1.5) lane_level[i] = ~v;
              #(STEP) lane_level[i] = v;
            end
          end
        end
      join_none
    end
  end

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && ca_range_err) n_range++;

  // Eye placement: while timing_on, every edge leaving the phase adjusters must sit half a
  // period after a sampling edge: phase step 32, or from 30 to 35 for the transitions of a
  // noisy edge, whose middle is what gets placed there.
  // Sampling edges are at 2500 ps + n * 5000 ps.
  bit timing_on = 1'b0;
  int n_eye = 0;
  for (genvar i = 0; i < LANES; i++) begin : g_eye
    always begin
      @(phase_aligned[i]);
      if (timing_on) begin
        real pos;
        pos = ($realtime - 2500.0) - T * $floor(($realtime - 2500.0) / T);
        pos = pos / STEP;
        checks++;
        n_eye++;
        if (pos < 30.0 || pos >= 35.0) begin
          failures++;
          $display("FAIL lane %0d phase-aligned edge at step %0f of the period", i, pos);
        end
      end
    end
  end

  // Pick a delay whose phase slot lands in [lo, hi] and whose whole-cycle part is cyc.
  function automatic real pick(int cyc, int lo, int hi);
    return cyc * T + $urandom_range(lo, hi) * STEP + 10.0 + $urandom_range(0, 50);
  endfunction

  // Lane i is sampled (after phase adjustment) `base` or `base`+1 cycles after launch.
  task automatic configure(int base, bit allow_spread);
    for (int i = 0; i < LANES; i++) begin
      int target;
      target = base + ((allow_spread && $urandom_range(0, 1) == 1) ? 1 : 0);
      noisy[i] = ($urandom_range(0, 2) == 0);
      // launch cycle k, slot < 32 -> sampled k+1; slot >= 32 -> sampled k+2
      if (target == 1)                      dly[i] = pick(0, 3, 27);
      else if ($urandom_range(0, 1) == 1)   dly[i] = pick(0, 36, 57);
      else                                  dly[i] = pick(1, 3, 27);
      if (target == 3) dly[i] = pick(1, 36, 57);
    end
  endtask

  task automatic send_packet(bit check);
    logic [LANES-1:0] payload [PAYLOAD];
    for (int k = 0; k < PAYLOAD; k++) payload[k] = LANES'($urandom);
    n_packets++;
    fork
      begin
        for (int k = 0; k < 4; k++) begin @(negedge clk); tx_word = '1; end
        @(negedge clk); tx_word = '0;
        for (int k = 0; k < PAYLOAD; k++) begin @(negedge clk); tx_word = payload[k]; end
        @(negedge clk); tx_word = '1;
        for (int k = 0; k < 24; k++) @(negedge clk);
      end
      begin
        if (check) begin
          do begin @(posedge clk); #1; end while (!ca_start);
          checks++;
          if (dout !== '0) begin failures++; $display("FAIL start bits %b", dout); end
          if (ca_sel != '0 && ca_sel != '1) n_spread++;
          for (int k = 0; k < PAYLOAD; k++) begin
            @(posedge clk); #1;
            checks++;
            if (dout !== payload[k]) begin
              failures++;
              $display("FAIL word %0d: %b expected %b (sel %b)", k, dout, payload[k], ca_sel);
            end
          end
        end
      end
    join
    checks++;
    if (ca_locked) begin failures++; $display("FAIL cycle adjuster still locked after idle"); end
    else if (check) n_rearm++;
  endtask

  // Check the phase measured on every lane against the delay applied, and the placement.
  task automatic check_phases();
    for (int i = 0; i < LANES; i++) begin
      int slot, exp_ps, tgt;
      slot   = int'($floor((dly[i] - T * $floor(dly[i] / T)) / STEP));
      exp_ps = noisy[i] ? (slot + slot + 2) / 2 : slot;
      checks++;
      if (!ps_valid[i] || ps[i] != 6'(exp_ps)) begin
        failures++;
        $display("FAIL lane %0d ps=%0d expected %0d (delay %0f)", i, ps[i], exp_ps, dly[i]);
      end
      if (ps_first[i] != ps_last[i]) n_noisy_meas++; else n_clean_meas++;
      tgt = (dr == DR_SDR) ? 32 : 16;
      checks++;
      if (6'(ps[i] + pa[i]) != 6'(tgt)) begin
        failures++;
        $display("FAIL lane %0d ps=%0d pa=%0d does not place the edge at %0d", i, ps[i], pa[i], tgt);
      end
      if (dr == DR_SDR) begin
        if (ps[i] < 32) n_lam_pi++; else n_lam_3pi++;
      end else n_ddr++;
      if (pa[i] > 31) n_rear++;
    end
  endtask

  int r0, r1;

  initial begin
    dr = DR_SDR;
    foreach (dly[i]) begin dly[i] = 1000.0; noisy[i] = 1'b0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (10) @(posedge clk);
    // Several delay configurations, switched while running.
    for (int c = 0; c < 8; c++) begin
      configure((c % 2) + 1, c != 0);
      send_packet(1'b0);          // trains the phase detectors
      check_phases();
      r0 = n_range;
      timing_on = 1'b1;
      for (int p = 0; p < 3; p++) send_packet(1'b1);
      timing_on = 1'b0;
      checks++;
      if (n_range != r0) begin failures++; $display("FAIL range error on an aligned packet"); end
      if (c > 0) n_realign++;
    end
    // DDR placement: phase-adjustment values must move edges to pi/2.
    dr = DR_DDR;
    send_packet(1'b0);
    check_phases();
    dr = DR_SDR;
    send_packet(1'b0);
    // Spread of two cycles: out of the cycle adjuster's range.
    r1 = n_range;
    configure(1, 1'b0);
    dly[2] = pick(1, 36, 57);   // two cycles later than the others
    send_packet(1'b0);
    send_packet(1'b0);
    checks++;
    if (n_range == r1) begin failures++; $display("FAIL out-of-range spread not reported"); end
    // Every mechanism must have happened.
    n_range = n_range - r1;
    checks++;
    if (n_noisy_meas == 0 || n_clean_meas == 0 || n_lam_pi == 0 || n_lam_3pi == 0 || n_rear == 0 ||
        n_spread == 0 || n_rearm == 0 || n_ddr == 0 || n_realign == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("phase-aligned edges checked %0d", n_eye);
    $display("packets %0d, measurements clean %0d noisy %0d, lambda pi %0d 3pi %0d, rear delay used %0d",
             n_packets, n_clean_meas, n_noisy_meas, n_lam_pi, n_lam_3pi, n_rear);
    $display("cycle spread removed %0d, re-arm %0d, range errors %0d, DDR placements %0d, realignments %0d",
             n_spread, n_rearm, n_range, n_ddr, n_realign);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
