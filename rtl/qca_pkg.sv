// qca_pkg: types and constants shared by the QCA serial-parallel multipliers.
//
// A QCA circuit is clocked by four phases. Every wire is cut into clock
// zones, and a zone latches its value while its phase is active, so each
// zone behaves like a register that is enabled once per QCA clock. The RTL
// models one QCA clock as NUM_ZONES steps of the RTL clock `clk`; in each
// step exactly one zone number is enabled (zone_en_t is one-hot).
//
// One zone step is the D^-1 delay of the multiplier networks, and four zone
// steps make one QCA clock (D^-4 = Z^-1).
package qca_pkg;

  localparam int unsigned NUM_ZONES = 4;

  typedef logic [NUM_ZONES-1:0] zone_en_t;
  typedef logic [$clog2(NUM_ZONES)-1:0] zone_t;

  // Zone number of the first register of a wire that starts at a signal which
  // is `delay` zone steps away from the multiplier's serial input. A register
  // at distance d from the input latches in zone (d-1) mod 4, so the first
  // register after a signal at distance `delay` latches in zone delay mod 4.
  function automatic int unsigned zone_after(input int unsigned delay);
    return delay % NUM_ZONES;
  endfunction

endpackage
