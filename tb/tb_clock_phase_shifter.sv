// tb_clock_phase_shifter: self-checking test of the clock phase shifter model.
// Measures the rising edge of each phase-shifted clock after a sampling clock edge and
// compares it with k * 5000 / 64 ps.
module tb_clock_phase_shifter;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [63:0] pss;
  realtime t_edge;
  realtime t_pss [64];

  clock_phase_shifter #(.PHASES(64), .PERIOD_PS(5000.0)) dut (.clk_samp(clk), .pss_clk(pss));

  always #2500 clk = ~clk;

  for (genvar k = 0; k < 64; k++) begin : g_mon
    always @(posedge pss[k]) t_pss[k] = $realtime;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    t_edge = $realtime;
    #4990;   // after clock 63 (4921.875 ps) and before the next edge of clock 0
    for (int k = 0; k < 64; k++) begin
      checks++;
      if (t_pss[k] - t_edge > k * 78.125 + 0.01 || t_pss[k] - t_edge < k * 78.125 - 0.01) begin
        failures++;
        $display("FAIL clock %0d edge after %0f ps", k, t_pss[k] - t_edge);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
