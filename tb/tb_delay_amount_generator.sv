// tb_delay_amount_generator: self-checking test of the tap split.
// For every phase-adjustment value the three taps must add up to it (plus the compensator's
// base setting), each tap must stay within half a period (31 steps), and the front element
// must be filled first. Taps appear one system clock cycle after pa.
module tb_delay_amount_generator;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [5:0] pa;
  logic [4:0] comp, front, rear;

  delay_amount_generator #(.PHASES(64), .COMP_BASE_TAPS(2)) dut (
    .clk_sys(clk), .rst_n(rst_n), .pa(pa), .comp_tap(comp), .front_tap(front), .rear_tap(rear));

  always #2500 clk = ~clk;

  initial begin
    #10_000_000;
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
      @(negedge clk);
      checks++;
      if (int'(comp) + int'(front) + int'(rear) - 2 != v || front > 31 || rear > 31 ||
          (v <= 31 && (front != 5'(v) || rear != 0)) || (v > 31 && front != 31)) begin
        failures++;
        $display("FAIL pa=%0d comp=%0d front=%0d rear=%0d", v, comp, front, rear);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
