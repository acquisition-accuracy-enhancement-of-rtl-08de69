// tb_signal_phase_adjuster: self-checking test of the signal phase adjuster.
// For a random measured edge phase and data rate, the signal edge must leave the adjuster
// at pi (SDR) or pi/2 (DDR) from a sampling edge, modulo one period: the delay added is
// checked against the phase it moves the edge to. Also checks that pa holds while ps_valid
// is low.
module tb_signal_phase_adjuster;
  import dpa_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, sig = 1'b0, sig_out, ps_valid;
  data_rate_e dr;
  logic [5:0] ps, pa;
  logic [4:0] ct, ft, rt;
  realtime t_in, t_out;

  signal_phase_adjuster #(.PHASES(64), .PERIOD_PS(5000.0)) dut (
    .clk_sys(clk), .rst_n(rst_n), .dr(dr), .ps(ps), .ps_valid(ps_valid), .sig(sig),
    .sig_out(sig_out), .pa(pa), .comp_tap(ct), .front_tap(ft), .rear_tap(rt));

  always #2500 clk = ~clk;
  always begin @(sig_out); t_out = $realtime; end

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ps = '0; ps_valid = 1'b0; dr = DR_SDR;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 256; n++) begin
      int  p, target;
      real edge_at;
      p = n % 64;
      @(negedge clk);
      dr = (n >= 128) ? DR_DDR : DR_SDR;
      ps = 6'(p); ps_valid = 1'b1;
      @(negedge clk) ps_valid = 1'b0;
      ps = 6'($urandom);   // must be ignored
      repeat (3) @(posedge clk);
      // Edge at phase p (p steps after the sampling edge).
      #(p * 78.125 + 1.0);
      t_in = $realtime;
      sig = ~sig;
      #6000;
      target = (dr == DR_SDR) ? 32 : 16;
      edge_at = p * 78.125 + (t_out - t_in);
      checks++;
      if ((t_out - t_in) < -0.01 || (t_out - t_in) > 63 * 78.125 + 0.01 ||
          int'(edge_at / 78.125) % 64 != target) begin
        failures++;
        $display("FAIL dr=%0d ps=%0d pa=%0d delay %0f -> edge at step %0f", dr, p, pa,
                 t_out - t_in, edge_at / 78.125);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
