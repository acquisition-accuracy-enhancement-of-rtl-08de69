// tb_phase_diff_detector: self-checking test of the phase difference detector.
// The signal toggles every fourth sampling period at a random delay d after the sampling
// edge. Some edges are clean; others are noisy (the signal returns to the old level for a
// moment, as a slow edge read near its threshold would). The measured phase must equal
// floor((first + last) / 2), where first and last are the sample slots of the first and last
// transition in the period. Also checks that phase_valid rises and that the phase is held
// in periods without a transition.
module tb_phase_diff_detector;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real STEP = 78.125;

  int checks = 0, failures = 0, noisy = 0, holds = 0;
  logic clk = 1'b0, rst_n = 1'b0, sig = 1'b1;
  logic [63:0] pss_clk;
  logic [5:0]  phase, first, last;
  logic        valid, upd;

  clock_phase_shifter #(.PHASES(64), .PERIOD_PS(5000.0)) u_cps (.clk_samp(clk), .pss_clk(pss_clk));
  phase_diff_detector #(.PHASES(64)) dut (.pss_clk(pss_clk), .clk_sys(clk), .rst_n(rst_n),
    .sig(sig), .phase(phase), .phase_valid(valid), .upd(upd), .first(first), .last(last));

  always #2500 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (8) @(posedge clk);
    checks++;
    if (valid) begin failures++; $display("FAIL valid before any edge"); end
    for (int n = 0; n < 400; n++) begin
      int  s1, s2, exp_phase;
      real d, g;
      bit  nz;
      s1 = $urandom_range(0, 56);
      d  = s1 * STEP + 10.0 + $urandom_range(0, 58);
      nz = ($urandom_range(0, 1) == 1);
      @(posedge clk);
      #(d) sig = ~sig;
      s2 = s1;
      if (nz) begin
        // back to the old level from slot s1+1 to s1+2, then the new level again
        s2 = s1 + 2 + $urandom_range(0, 3);
        g = (s1 + 1) * STEP + 20.0;
        #(g - d) sig = ~sig;
        #((s2 * STEP + 20.0) - g) sig = ~sig;
        noisy++;
      end
      exp_phase = (s1 + s2) / 2;
      repeat (7) @(posedge clk);
      #10;
      checks++;
      if (!valid || phase != 6'(exp_phase) || first != 6'(s1) || last != 6'(s2)) begin
        failures++;
        $display("FAIL d=%0f noisy=%0d phase=%0d first=%0d last=%0d expected %0d (%0d..%0d)",
                 d, nz, phase, first, last, exp_phase, s1, s2);
      end else if (!upd) begin
        holds++;
      end
    end
    $display("noisy edges %0d, periods checked while holding %0d", noisy, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
