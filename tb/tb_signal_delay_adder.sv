// tb_signal_delay_adder: self-checking test of the signal delay adder.
// For every phase-adjustment value the output edge must follow the input edge by
// pa * 78.125 ps (compensator base setting 0).
module tb_signal_delay_adder;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, sig = 1'b0, sig_out;
  logic [5:0] pa;
  logic [4:0] ct, ft, rt;
  realtime t_in, t_out;

  signal_delay_adder #(.PHASES(64), .PERIOD_PS(5000.0), .COMP_BASE_TAPS(0)) dut (
    .clk_sys(clk), .rst_n(rst_n), .sig(sig), .pa(pa), .sig_out(sig_out),
    .comp_tap(ct), .front_tap(ft), .rear_tap(rt));

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
    pa = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 64; v++) begin
      @(negedge clk) pa = 6'(v);
      repeat (2) @(posedge clk);
      #100;
      t_in = $realtime;
      sig = ~sig;
      #6000;
      checks++;
      if (t_out - t_in > v * 78.125 + 0.01 || t_out - t_in < v * 78.125 - 0.01) begin
        failures++;
        $display("FAIL pa=%0d delay %0f ps", v, t_out - t_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
