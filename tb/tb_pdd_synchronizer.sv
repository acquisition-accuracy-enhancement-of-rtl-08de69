// tb_pdd_synchronizer: self-checking test of the two-flop synchronizer.
// Random words are applied once per system clock cycle; each must appear at the output
// exactly two clock edges later.
module tb_pdd_synchronizer;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [63:0] d, q;
  logic [63:0] hist [$];

  pdd_synchronizer #(.WIDTH(64)) dut (.clk_sys(clk), .rst_n(rst_n), .d(d), .sync_q(q));

  always #2500 clk = ~clk;

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (q !== '0) begin failures++; $display("FAIL reset value %h", q); end
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      d = {$urandom, $urandom};
      hist.push_back(d);
      if (hist.size() > 2) begin
        // value applied two cycles ago
        checks++;
        if (q !== hist[hist.size() - 3]) begin
          failures++;
          $display("FAIL cycle %0d q=%h expected %h", n, q, hist[hist.size() - 3]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
