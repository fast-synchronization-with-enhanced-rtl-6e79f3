// switch_window: pulse-window decoder for one diagonal pair of the bridge.
//
// Turns the phase count of a half-cycle counter into the gate command of the
// two MOSFETs that apply one polarity to the load. The pulse is centred in
// the half cycle and notched by ALPHA on each side, giving the quasi-square
// wave v = +/-Vdc from alpha to 180-alpha. Its fundamental is
// (4 Vdc / pi) cos(alpha) and its n-th harmonic (4 Vdc / n pi) cos(n alpha),
// so alpha = 30 degrees removes the third harmonic. The whole window is then
// moved earlier by LAG_COMP to cancel the phase lag of the output LC filter,
// so the filtered voltage lines up with the grid:
//   F = 1  for  (ALPHA - LAG_COMP) <= angle(S) < (180 - ALPHA - LAG_COMP)
// With the defaults this is 22800 <= S < 142800.
//
// Interface and timing: purely combinational, F follows S in the same clock
// cycle. Angles are in millidegrees and are converted to counts for a counter
// of modulus HALF_COUNTS. F is 0 while the counter is held at 0 (the other
// polarity), which requires ALPHA > LAG_COMP.
//
// The 30 degree notch and the 7.2 degree compensation are the published
// design's values; that the block is a start/stop comparison on the count is
// this implementation's reading of a block whose contents are not shown.
module switch_window
  import inverter_pkg::*;
#(
  parameter int unsigned HALF       = HALF_COUNTS,
  parameter int unsigned WIDTH      = COUNT_W,
  parameter int unsigned ALPHA      = ALPHA_MDEG,     // millidegrees
  parameter int unsigned LAG_COMP   = LAG_COMP_MDEG   // millidegrees
) (
  input  logic [WIDTH-1:0] S,  // half-cycle phase count
  output logic             F   // gate command for the diagonal pair
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned START_CNT = mdeg_to_counts(ALPHA - LAG_COMP, HALF);
  localparam int unsigned STOP_CNT  =
      mdeg_to_counts(MDEG_PER_HALF - ALPHA - LAG_COMP, HALF);

  initial begin
    assert (ALPHA > LAG_COMP && ALPHA < MDEG_PER_HALF / 2)
      else $error("need LAG_COMP < ALPHA < 90 degrees");
    assert (START_CNT > 0 && STOP_CNT > START_CNT && STOP_CNT <= HALF)
      else $error("pulse window out of range");
  end

  localparam logic [WIDTH-1:0] START_Q = WIDTH'(START_CNT);
  localparam logic [WIDTH-1:0] STOP_Q  = WIDTH'(STOP_CNT);

  always_comb F = (S >= START_Q) && (S < STOP_Q);

endmodule
