// tb_cycle_adjuster: self-checking test of the cycle adjuster.
// Packets (idle high, a start bit 0 on all lanes, random payload, end bit 1) are sent with
// each lane delayed by 0 or 1 sampling clock cycle, a new random pattern of delays for every
// packet. After start_pulse the output lanes must carry the start bit together and then the
// payload exactly as sent; sel must mark the early lanes. One extra packet has a lane two
// cycles late and must raise range_err. Between packets the selector must re-arm.
module tb_cycle_adjuster;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int LANES = 8;
  localparam int PAYLOAD = 40;

  int checks = 0, failures = 0, locks = 0, rearms = 0, range_errs = 0, mixed = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [LANES-1:0] din, dout, sel;
  logic locked, start_pulse, range_err;

  // Stream of words as sent; lane i sees the stream delayed by off[i] cycles.
  logic [LANES-1:0] stream [$];
  int off [LANES];

  cycle_adjuster #(.LANES(LANES), .START_BIT(1'b0), .IDLE_CYCLES(8)) dut (
    .clk_samp(clk), .rst_n(rst_n), .din(din), .dout(dout), .sel(sel), .locked(locked),
    .start_pulse(start_pulse), .range_err(range_err));

  always #2500 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drive one word per cycle on the negative edge.
  task automatic drive_word(logic [LANES-1:0] w);
    stream.push_back(w);
    @(negedge clk);
    for (int i = 0; i < LANES; i++) begin
      int idx;
      idx = stream.size() - 1 - off[i];
      din[i] = (idx >= 0) ? stream[idx][i] : 1'b1;
    end
  endtask

  always @(posedge clk) if (rst_n && range_err) range_errs++;

  task automatic run_packet(bit expect_err);
    logic [LANES-1:0] payload [PAYLOAD];
    logic [LANES-1:0] early;
    int seen;
    for (int k = 0; k < PAYLOAD; k++) payload[k] = LANES'($urandom);
    early = '0;
    for (int i = 0; i < LANES; i++) if (off[i] == 0) early[i] = 1'b1;
    if (early != 0 && early != '1) mixed++;
    fork
      begin
        for (int k = 0; k < 12; k++) drive_word('1);
        drive_word('0);
        for (int k = 0; k < PAYLOAD; k++) drive_word(payload[k]);
        drive_word('1);
        for (int k = 0; k < 20; k++) drive_word('1);
      end
      begin
        seen = 0;
        do begin @(posedge clk); #1; end while (!start_pulse);
        locks++;
        if (!expect_err) begin
          checks++;
          if (dout !== '0) begin failures++; $display("FAIL start bits not aligned: %b", dout); end
          checks++;
          if (sel !== early) begin failures++; $display("FAIL sel=%b expected %b", sel, early); end
          for (int k = 0; k < PAYLOAD; k++) begin
            @(posedge clk); #1;
            checks++;
            if (dout !== payload[k]) begin
              failures++;
              $display("FAIL payload word %0d: %b expected %b (sel %b)", k, dout, payload[k], sel);
            end
          end
        end
      end
    join
    checks++;
    if (locked) begin failures++; $display("FAIL selector did not re-arm"); end
    else rearms++;
  endtask

  initial begin
    din = '1;
    foreach (off[i]) off[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int p = 0; p < 30; p++) begin
      foreach (off[i]) off[i] = (p == 0) ? 0 : $urandom_range(0, 1);
      run_packet(1'b0);
    end
    checks++;
    if (range_errs != 0) begin failures++; $display("FAIL range_err without cause"); end
    // A lane two cycles late is out of range.
    foreach (off[i]) off[i] = 0;
    off[3] = 2;
    run_packet(1'b1);
    checks++;
    if (range_errs != 1) begin failures++; $display("FAIL range_err count %0d", range_errs); end
    checks++;
    if (mixed == 0) begin failures++; $display("FAIL no packet had a cycle spread"); end
    $display("locks %0d rearms %0d packets with spread %0d range errors %0d", locks, rearms, mixed, range_errs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
