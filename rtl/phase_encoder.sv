// phase_encoder: finds the phase of a signal edge in one window of phase-shifted samples.
//
// Input win[k] is the sample taken at phase k (k = 0 .. PHASES-1) of one sampling period and
// next0 is the phase-0 sample of the following period. As in the document, consecutive
// samples are XORed: chg[k] = win[k] ^ win[k+1] (chg[PHASES-1] uses next0), so chg[k] = 1
// means the signal changed between phase k and k+1. A priority encoder returns the first
// (lowest) set position, a reverse priority encoder the last (highest), and the intermediate
// value calculator returns their median, floor((first + last) / 2), as the phase of the
// signal edge. Scanning from both ends and taking the median makes the result robust to
// samples near the edge that read randomly (metastability).
// Taking the XOR of the last sample with the next period's first sample is this design's
// reading of the wrap-around XOR in the encoder figure. found = 0 when no change was seen;
// first/last/phase are then 0. An edge whose noisy region straddles phase 0 is not handled
// specially (the document does not discuss it) and yields the median of the two ends.
// Purely combinational.
module phase_encoder #(
  parameter int unsigned PHASES = 64,
  localparam int unsigned PW    = $clog2(PHASES)
) (
  input  logic [PHASES-1:0] win,
  input  logic              next0,
  output logic              found,
  output logic [PW-1:0]     first,
  output logic [PW-1:0]     last,
  output logic [PW-1:0]     phase
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [PHASES-1:0] chg;
  logic [PW:0]       sum, half;

  assign chg = win ^ {next0, win[PHASES-1:1]};
  assign found = |chg;

  // Priority encoder: lowest set bit.
  always_comb begin
    first = '0;
    for (int k = PHASES - 1; k >= 0; k--) begin
      if (chg[k]) first = PW'(k);
    end
  end

  // Reverse priority encoder: highest set bit.
  always_comb begin
    last = '0;
    for (int k = 0; k < PHASES; k++) begin
      if (chg[k]) last = PW'(k);
    end
  end

  // Intermediate value calculator.
  assign sum   = {1'b0, first} + {1'b0, last};
  assign half  = sum >> 1;
  assign phase = half[PW-1:0];
endmodule
