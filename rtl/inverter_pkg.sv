// inverter_pkg: constants shared by the grid-synchronised square-wave
// inverter switching controller.
//
// The controller times each grid half cycle with an 18 MHz clock. At a
// 50 Hz grid one half cycle lasts 10 ms, i.e. 180000 clock cycles, so one
// electrical degree is exactly 1000 counts. Angles are therefore carried as
// millidegrees, which map one-to-one onto counts at the nominal clock.
//
// The 18 MHz clock (50 MHz x 9/25), the 180000-count half-cycle counters,
// their 18-bit width, the 30 degree notch angle for third-harmonic
// elimination and the 7.2 degree filter-lag compensation are the
// published design's numbers. The millidegree representation and the
// helper function are choices of this implementation.
package inverter_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  // Width of the half-cycle counters (q[17..0]).
  localparam int unsigned COUNT_W = 18;

  // Counter modulus: clock cycles in one nominal 10 ms half cycle.
  localparam int unsigned HALF_COUNTS = 180000;

  // One half cycle spans 180 degrees = 180000 millidegrees.
  localparam int unsigned MDEG_PER_HALF = 180000;

  // Notch angle alpha on each side of a pulse; alpha = 90/n removes the
  // n-th harmonic, 30 degrees removes the third.
  localparam int unsigned ALPHA_MDEG = 30000;

  // Phase advance that cancels the lag of the output LC filter.
  localparam int unsigned LAG_COMP_MDEG = 7200;

  // Converts an angle in millidegrees into counts of a half-cycle counter
  // whose modulus is half_counts (rounded down).
  function automatic int unsigned mdeg_to_counts(int unsigned mdeg,
                                                 int unsigned half_counts);
    longint unsigned prod;
    prod = longint'(mdeg) * longint'(half_counts);
    return int'(prod / longint'(MDEG_PER_HALF));
  endfunction

endpackage
