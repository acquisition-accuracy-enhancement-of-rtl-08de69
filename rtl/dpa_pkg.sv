// dpa_pkg: types and default constants shared by the dynamic phase alignment (DPA) blocks.
//
// The DPA measures where each incoming interface signal changes relative to a free-running
// sampling clock, delays each signal so its eye is centred on a sampling edge, and finally
// lines up the parallel signals to the same cycle using the protocol's start bits.
// Phases are encoded as integers 0 .. PHASES-1 that divide one sampling clock period
// (2*pi rad) into PHASES equal steps. The document's build uses 64 steps of a 5 ns
// (200 MHz) sampling clock, i.e. 78.125 ps per step, and eight data lanes (eMMC DAT0-DAT7).
// The lane count default of 8 and the enum encoding are choices of this design.
package dpa_pkg;
  timeunit 1ps;
  timeprecision 1fs;


  // Data rate select (the "DR" input of the phase-adjustment value calculator).
  typedef enum logic {
    DR_SDR = 1'b0,  // edges placed pi away from the sampling edge
    DR_DDR = 1'b1   // edges placed pi/2 away from the sampling edge
  } data_rate_e;

  // State of the cycle adjuster's cycle selector.
  typedef enum logic {
    CA_ARMED  = 1'b0,  // waiting for start bits
    CA_LOCKED = 1'b1   // lane selection fixed for the current packet
  } ca_state_e;
endpackage
