// tb_phase_adj_calc: self-checking test of the phase-adjustment value calculator.
// For every edge phase and both data rates, the result must place the edge at pi (SDR) or
// pi/2 (DDR) from a sampling edge: Pa = lambda - Ps with lambda picked from the edge's range,
// taken modulo one period. Also checks the worked example with 16 phases: an edge at 67.5 deg
// (phase 3) needs 112.5 deg (5 steps) in SDR.
module tb_phase_adj_calc;
  import dpa_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  data_rate_e dr;
  logic [5:0] ps, pa;
  logic [3:0] ps16, pa16;

  phase_adj_calc #(.PHASES(64)) dut (.dr(dr), .ps(ps), .pa(pa));
  phase_adj_calc #(.PHASES(16)) dut16 (.dr(DR_SDR), .ps(ps16), .pa(pa16));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ps16 = 4'd3;
    #1;
    checks++;
    if (pa16 != 4'd5) begin failures++; $display("FAIL example pa=%0d", pa16); end
    for (int d = 0; d < 2; d++) begin
      for (int p = 0; p < 64; p++) begin
        real lam_rad, ps_rad, pa_rad;
        int  exp_pa;
        dr = d ? DR_DDR : DR_SDR; ps = 6'(p);
        ps_rad = 2.0 * 3.14159265358979 * p / 64.0;
        if (d == 0) lam_rad = (ps_rad < 3.14159265358979) ? 3.14159265358979 : 3.0 * 3.14159265358979;
        else        lam_rad = (ps_rad < 3.14159265358979 / 2.0) ? 3.14159265358979 / 2.0 : 2.5 * 3.14159265358979;
        pa_rad = lam_rad - ps_rad;
        exp_pa = int'(pa_rad / (2.0 * 3.14159265358979) * 64.0) % 64;  // int'() rounds to nearest
        #1;
        checks++;
        if (pa != 6'(exp_pa)) begin
          failures++;
          $display("FAIL dr=%0d ps=%0d pa=%0d exp=%0d", d, p, pa, exp_pa);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
