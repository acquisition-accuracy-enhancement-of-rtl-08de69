// tb_pdd_ff_array: self-checking test of the PSS flip-flop array.
// The signal changes at a random time d inside a sampling period; afterwards flip-flop k
// must hold the new value exactly when its clock edge (k * 78.125 ps) came after d.
module tb_pdd_ff_array;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, sig = 1'b0;
  logic [63:0] pss_clk, q;

  clock_phase_shifter #(.PHASES(64), .PERIOD_PS(5000.0)) u_cps (.clk_samp(clk), .pss_clk(pss_clk));
  pdd_ff_array #(.PHASES(64)) dut (.pss_clk(pss_clk), .rst_n(rst_n), .sig(sig), .pss_q(q));

  always #2500 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      int  slot;
      real d;
      logic oldv;
      slot = $urandom_range(0, 62);
      d = slot * 78.125 + 20.0 + ($urandom_range(0, 38));
      @(posedge clk);
      oldv = sig;
      #(d) sig = ~sig;
      #(4990.0 - d);
      checks++;
      for (int k = 0; k < 64; k++) begin
        logic e;
        e = (k * 78.125 > d) ? ~oldv : oldv;
        if (q[k] !== e) begin
          failures++;
          $display("FAIL d=%0f ff %0d = %b expected %b", d, k, q[k], e);
          break;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
