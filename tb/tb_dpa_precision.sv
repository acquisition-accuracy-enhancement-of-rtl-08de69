// tb_dpa_precision: the skewed-lane models at phase resolutions of 1/4 to 1/64 period.
//
// Five copies of the design with PHASES = 4, 8, 16, 32 and 64 receive the same lanes. For
// each of the three lane-delay models (see tb_dpa_models) one packet trains the detectors,
// then random-payload packets are captured and each copy's bit errors are counted. Edges are
// clean (no jitter). Checked: every copy captures with zero errors (with clean edges even a
// quarter-period step leaves margin) and reports every start pulse.
module tb_dpa_precision;
  import dpa_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  LANES   = 8;
  localparam int  NP      = 5;
  localparam int  PAYLOAD = 48;

  int checks = 0, failures = 0;
  longint bits [NP];
  longint errs [NP];
  int     starts [NP];

  real model [3][LANES] = '{
    '{0.0,   0.75,  2.813, 0.188, 5.813, 1.688, 5.063, 3.75},
    '{2.438, 2.625, 0.563, 4.688, 1.688, 3.563, 0.938, 2.625},
    '{1.313, 5.813, 2.813, 2.25,  4.5,   0.0,   4.875, 0.188}};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [LANES-1:0] sig_in;
  logic [LANES-1:0] dout [NP];
  logic             start [NP];

  for (genvar j = 0; j < NP; j++) begin : g_dut
    localparam int unsigned PH = 4 << j;
    logic [LANES-1:0] pal, psv, psu, sel;
    logic [LANES-1:0][$clog2(PH)-1:0] ps, psf, psl, pa;
    logic lk, rerr;
    dpa_top #(.PHASES(PH)) dut (
      .clk_samp(clk), .clk_sys(clk), .rst_n(rst_n), .dr(DR_SDR), .sig_in(sig_in), .dout(dout[j]),
      .phase_aligned(pal), .ps(ps), .ps_valid(psv), .ps_upd(psu), .ps_first(psf), .ps_last(psl),
      .pa(pa), .ca_sel(sel), .ca_locked(lk), .ca_start(start[j]), .ca_range_err(rerr));
  end

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

  initial begin
    #2_000_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic capture(int j, logic [LANES-1:0] payload [PAYLOAD]);
    do begin @(posedge clk); #1; end while (!start[j]);
    starts[j]++;
    for (int k = 0; k < PAYLOAD; k++) begin
      @(posedge clk); #1;
      bits[j] += LANES;
      errs[j] += $countones(dout[j] ^ payload[k]);
    end
  endtask

  task automatic send_packet(bit check);
    logic [LANES-1:0] payload [PAYLOAD];
    for (int k = 0; k < PAYLOAD; k++) payload[k] = LANES'($urandom);
    fork
      begin
        for (int k = 0; k < 4; k++) begin @(negedge clk); tx_word = '1; end
        @(negedge clk); tx_word = '0;
        for (int k = 0; k < PAYLOAD; k++) begin @(negedge clk); tx_word = payload[k]; end
        @(negedge clk); tx_word = '1;
        for (int k = 0; k < 24; k++) @(negedge clk);
      end
      if (check) capture(0, payload);
      if (check) capture(1, payload);
      if (check) capture(2, payload);
      if (check) capture(3, payload);
      if (check) capture(4, payload);
    join
  endtask

  initial begin
    foreach (dly[i]) dly[i] = 400.0;
    foreach (bits[j]) begin bits[j] = 0; errs[j] = 0; starts[j] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (10) @(posedge clk);
    for (int m = 0; m < 3; m++) begin
      foreach (dly[i]) dly[i] = 400.0 + 1000.0 * model[m][i];
      send_packet(1'b0);
      for (int p = 0; p < 3; p++) send_packet(1'b1);
    end
    for (int j = 0; j < NP; j++) begin
      checks++;
      if (errs[j] != 0 || starts[j] != 9) begin
        failures++;
        $display("FAIL precision 1/%0d: %0d errors, %0d starts", 4 << j, errs[j], starts[j]);
      end
      $display("precision 1/%0d: %0d bits, %0d errors", 4 << j, bits[j], errs[j]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
