// tb_delay_module: self-checking test of the behavioural delay element.
// For each tap setting a pulse is applied and the time of the output's rising and falling
// edges is compared with tap * 78.125 ps.
module tb_delay_module;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic din = 1'b0, dout;
  logic [4:0] tap;
  realtime t_in, t_rise, t_fall;

  delay_module #(.TW(5), .STEP_PS(78.125)) dut (.d_in(din), .tap(tap), .d_out(dout));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge dout) t_rise = $realtime;
  always @(negedge dout) t_fall = $realtime;

  initial begin
    tap = '0;
    #1000;
    for (int t = 0; t < 32; t++) begin
      tap = 5'(t);
      #1000;
      t_in = $realtime;
      din = 1'b1;
      #1000;
      din = 1'b0;
      #4000;
      checks++;
      if (t_rise - t_in > t * 78.125 + 0.01 || t_rise - t_in < t * 78.125 - 0.01 ||
          t_fall - t_in > 1000.0 + t * 78.125 + 0.01 || t_fall - t_in < 1000.0 + t * 78.125 - 0.01) begin
        failures++;
        $display("FAIL tap=%0d rise after %0f fall after %0f", t, t_rise - t_in, t_fall - t_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
