// tb_phase_encoder: self-checking test of the phase encoder.
// Checks the worked example with 16 phases (noisy samples from phase 2 to 4 give edge phase
// 3, i.e. 67.5 deg), clean single edges at every position of a 64-phase window, and random
// noisy edges, against a reference that scans the sample list from both ends.
module tb_phase_encoder;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;

  logic [63:0] win;
  logic        next0, found;
  logic [5:0]  first, last, phase;
  logic [15:0] win16;
  logic        next16, found16;
  logic [3:0]  first16, last16, phase16;

  phase_encoder #(.PHASES(64)) dut (.win(win), .next0(next0), .found(found),
    .first(first), .last(last), .phase(phase));
  phase_encoder #(.PHASES(16)) dut16 (.win(win16), .next0(next16), .found(found16),
    .first(first16), .last(last16), .phase(phase16));

  // Reference: list samples 0..64 (64 = next0), scan from the start and from the end.
  task automatic check64(string what);
    logic [64:0] s;
    int f, l, exp_phase;
    bit  exp_found;
    s = {next0, win};
    f = -1; l = -1;
    for (int k = 0; k < 64; k++) if (s[k] != s[k+1]) begin f = k; break; end
    for (int k = 63; k >= 0; k--) if (s[k] != s[k+1]) begin l = k; break; end
    exp_found = (f >= 0);
    exp_phase = exp_found ? (f + l) / 2 : 0;
    #1;
    checks++;
    if (found !== exp_found || (exp_found && (first != 6'(f) || last != 6'(l) || phase != 6'(exp_phase)))) begin
      failures++;
      $display("FAIL %s win=%h next0=%b found=%b first=%0d last=%0d phase=%0d exp %0d/%0d/%0d",
               what, win, next0, found, first, last, phase, f, l, exp_phase);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: samples 1,1,1,0,1,0,... (falling edge, noise from phase 2 to 4).
    win16 = 16'b0000_0000_0001_0111; next16 = 1'b0;
    #1;
    checks++;
    if (!(found16 && first16 == 4'd2 && last16 == 4'd4 && phase16 == 4'd3)) begin
      failures++;
      $display("FAIL example: found=%b first=%0d last=%0d phase=%0d", found16, first16, last16, phase16);
    end
    // No change at all.
    win = '1; next0 = 1'b1;
    check64("flat");
    // Clean rising edges at each position.
    for (int p = 0; p < 64; p++) begin
      win = ~64'(0) << (p + 1);   // samples 0..p low, p+1.. high
      next0 = 1'b1;
      check64("clean");
    end
    // Edge between phase 63 and the next window.
    win = '0; next0 = 1'b1;
    check64("wrap");
    // Random noisy edges.
    for (int n = 0; n < 2000; n++) begin
      int p, w;
      p = $urandom_range(2, 58); w = $urandom_range(0, 4);
      win = ~64'(0) << p;
      for (int k = p - 2; k <= p + w && k < 64; k++) win[k] = 1'($urandom);
      next0 = 1'b1;
      check64("noisy");
    end
    // Fully random windows.
    for (int n = 0; n < 1000; n++) begin
      win = {$urandom, $urandom}; next0 = 1'($urandom);
      check64("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
