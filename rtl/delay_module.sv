// delay_module: behavioural model of a programmable input delay element (not synthesizable).
//
// Stands in for the FPGA's tap delay line used by the document for both clock phase shifting
// and signal delaying. The output follows the input after tap*STEP_PS + INTRINSIC_PS
// picoseconds (transport delay; the tap value at the time of each input transition applies).
// With 5-bit taps of 78.125 ps it spans 0 .. 31 steps, just under half of a 5 ns period,
// which matches the document's statement that one element delays by at most pi.
// INTRINSIC_PS models the element's fixed insertion delay (default 0, this design's choice).
module delay_module #(
  parameter int unsigned TW           = 5,
  parameter real         STEP_PS      = 78.125,
  parameter real         INTRINSIC_PS = 0.0
) (
  input  logic          d_in,
  input  logic [TW-1:0] tap,
  output logic          d_out
);
  timeunit 1ps;
  timeprecision 1fs;

  // Start at the input's level once it has settled (1 ps after time zero).
  initial begin
    d_out = 1'b0;
    #1;
    d_out = d_in;
  end

  // Each input transition is carried by its own process, so pulses shorter than the delay
  // pass unchanged (transport delay).
  always begin
    @(d_in);
    fork
      begin : carry
        automatic logic    v   = d_in;
        automatic realtime dly = real'(tap) * STEP_PS + INTRINSIC_PS;
        if (dly > 0.0) #(dly);
        d_out = v;
      end
    join_none
  end
endmodule
