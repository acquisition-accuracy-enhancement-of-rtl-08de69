// tb_dpa_models: the three skewed-lane system models at the default size.
//
// Each model adds a fixed extra delay (ns) to each of the eight data lanes:
//   Model 1: 0     0.75  2.813 0.188 5.813 1.688 5.063 3.75
//   Model 2: 2.438 2.625 0.563 4.688 1.688 3.563 0.938 2.625
//   Model 3: 1.313 5.813 2.813 2.25  4.5   0     4.875 0.188
// on top of a common 0.4 ns wiring delay assumed here. Lanes then differ by up to 5.8 ns,
// more than one 5 ns sampling period. Data run at one bit per sampling period (SDR). For
// each model one packet trains the detectors, then packets with a checkerboard payload
// (alternating 0x55 / 0xAA words) and packets with random payload are captured; the bit
// error rate at the output must be zero. The same bits sampled straight from the input
// lanes on the sampling clock, lined up to DAT0's start bit, are counted as the
// uncorrected error rate for comparison (reported, not checked).
module tb_dpa_models;
  import dpa_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  LANES   = 8;
  localparam real T       = 5000.0;
  localparam int  PAYLOAD = 64;

  int checks = 0, failures = 0;
  longint bits = 0, bit_err = 0, raw_err = 0;

  real model [3][LANES] = '{
    '{0.0,   0.75,  2.813, 0.188, 5.813, 1.688, 5.063, 3.75},
    '{2.438, 2.625, 0.563, 4.688, 1.688, 3.563, 0.938, 2.625},
    '{1.313, 5.813, 2.813, 2.25,  4.5,   0.0,   4.875, 0.188}};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [LANES-1:0] sig_in, dout, phase_aligned, ps_valid, ps_upd, ca_sel;
  logic [LANES-1:0][5:0] ps, ps_first, ps_last, pa;
  logic ca_locked, ca_start, ca_range_err;

  dpa_top dut (
    .clk_samp(clk), .clk_sys(clk), .rst_n(rst_n), .dr(DR_SDR), .sig_in(sig_in), .dout(dout),
    .phase_aligned(phase_aligned), .ps(ps), .ps_valid(ps_valid), .ps_upd(ps_upd),
    .ps_first(ps_first), .ps_last(ps_last), .pa(pa), .ca_sel(ca_sel), .ca_locked(ca_locked),
    .ca_start(ca_start), .ca_range_err(ca_range_err));

  always #2500 clk = ~clk;

  logic [LANES-1:0] tx_word = '1;
  real  dly [LANES];
  logic lane_level [LANES];

  for (genvar i = 0; i < LANES; i++) begin : g_src
    initial lane_level[i] = 1'b1;
    assign sig_in[i] = lane_level[i];
    always begin
      @(posedge clk);
      fork
        begin : launch
          automatic logic v = tx_word[i];
          automatic real  d = dly[i];
          #(d) lane_level[i] = v;
        end
      join_none
    end
  end

  // Uncorrected capture: input lanes sampled on the sampling clock.
  logic [LANES-1:0] raw_q;
  always @(posedge clk) raw_q <= sig_in;

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_packet(bit check, bit cboard);
    logic [LANES-1:0] payload [PAYLOAD];
    for (int k = 0; k < PAYLOAD; k++)
      payload[k] = cboard ? ((k % 2 == 0) ? 8'h55 : 8'hAA) : LANES'($urandom);
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
          for (int k = 0; k < PAYLOAD; k++) begin
            @(posedge clk); #1;
            bits += longint'(LANES);
            bit_err += $countones(dout ^ payload[k]);
          end
        end
      end
      begin
        // Uncorrected reference: each lane's raw samples, counted from DAT0's start bit.
        if (check) begin
          logic [LANES-1:0] raw [$];
          int s0;
          repeat (PAYLOAD + 20) begin @(posedge clk); #1; raw.push_back(raw_q); end
          s0 = -1;
          foreach (raw[j]) if (s0 < 0 && raw[j][0] == 1'b0) s0 = j;
          if (s0 >= 0)
            for (int k = 0; k < PAYLOAD && s0 + 1 + k < raw.size(); k++)
              raw_err += $countones(raw[s0 + 1 + k] ^ payload[k]);
        end
      end
    join
  endtask

  initial begin
    foreach (dly[i]) dly[i] = 400.0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (10) @(posedge clk);
    for (int m = 0; m < 3; m++) begin
      longint b0, e0, r0;
      foreach (dly[i]) dly[i] = 400.0 + 1000.0 * model[m][i];
      send_packet(1'b0, 1'b1);           // training
      b0 = bits; e0 = bit_err; r0 = raw_err;
      for (int p = 0; p < 4; p++) send_packet(1'b1, p % 2 == 0);
      checks++;
      if (bit_err != e0 || bits == b0) begin
        failures++;
        $display("FAIL model %0d: %0d bit errors in %0d bits", m + 1, bit_err - e0, bits - b0);
      end
      for (int i = 0; i < LANES; i++) $display("model %0d DAT%0d: delay %0.3f ns, edge phase %0d, adjustment %0d", m + 1, i, model[m][i], ps[i], pa[i]);
      $display("model %0d: %0d bits, errors with alignment %0d, without %0d (%0.2f%%)",
               m + 1, bits - b0, bit_err - e0, raw_err - r0, 100.0 * (raw_err - r0) / (bits - b0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
